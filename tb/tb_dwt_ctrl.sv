// tb_dwt_ctrl: tests the control logic alone, at the 8 x 8 image size and with three levels.
//
// The frame memory, line buffer and external ROM are arrays in this testbench, and the filter
// is replaced by a model with the same handshake (busy for 4 clocks after a load, result one
// clock later) that returns 256*in_even of its latest load and 256*in_odd of the load before.
// With that filter a forward pass must move x[2k] to position k and x[2k-1 mod S] to S/2+k
// of every line (which shows the priming pair and the dropped first result), and an inverse
// pass must place L[(m+1) mod S/2] at 2m and H[m] at 2m+1. The testbench predicts the memory
// after a whole forward and inverse run, and after an inverse run with the high bands of two
// levels discarded. It checks every word and the level shift of the loaded pixels, the order
// and count of passes, the external read addresses, and the number of clocks of a run.
module tb_dwt_ctrl;
  import dwt_pkg::*;

  localparam int N = 8, LEVELS = 3, WORD_W = 16, PIX_W = 8;
  localparam int AW = $clog2(N * N), LW = $clog2(N), ACC_W = WORD_W + 12;

  logic clk = 0, rst = 1, start = 0;
  op_e op = OP_DWT;
  logic [$clog2(LEVELS+1)-1:0] drop_levels = 0;
  logic ready, ext_rd;
  logic [AW-1:0] ext_addr;
  logic [PIX_W-1:0] ext_data;
  logic fm_we, lb_we;
  logic [AW-1:0] fm_waddr, fm_raddr;
  logic [WORD_W-1:0] fm_wdata, fm_rdata;
  logic [LW-1:0] lb_waddr, lb_raddr_e, lb_raddr_o;
  logic [WORD_W-1:0] lb_wdata, lb_rdata_e, lb_rdata_o;
  op_e cur_op;
  logic flt_load, flt_ready, flt_valid;
  logic signed [WORD_W-1:0] flt_even, flt_odd;
  logic signed [ACC_W-1:0] flt_a, flt_b;
  pass_e cur_pass;
  logic [$clog2(LEVELS+1)-1:0] cur_level;

  always #5 clk = ~clk;

  dwt_ctrl #(.N(N), .LEVELS(LEVELS)) dut (
    .clk, .rst, .start, .op, .drop_levels, .ready, .ext_rd, .ext_addr, .ext_data,
    .fm_we, .fm_waddr, .fm_wdata, .fm_raddr, .fm_rdata,
    .lb_we, .lb_waddr, .lb_wdata, .lb_raddr_e, .lb_raddr_o, .lb_rdata_e, .lb_rdata_o,
    .cur_op, .flt_load, .flt_even, .flt_odd, .flt_ready, .flt_valid, .flt_a, .flt_b,
    .cur_pass, .cur_level);

  // ---- memories and external ROM ----
  logic [WORD_W-1:0] fm [N * N];
  logic [WORD_W-1:0] lb [N];
  logic [PIX_W-1:0]  rom [N * N];
  always_ff @(posedge clk) begin
    if (fm_we) fm[fm_waddr] <= fm_wdata;
    if (lb_we) lb[lb_waddr] <= lb_wdata;
    if (ext_rd) ext_data <= rom[ext_addr];
  end
  assign fm_rdata   = fm[fm_raddr];
  assign lb_rdata_e = lb[lb_raddr_e];
  assign lb_rdata_o = lb[lb_raddr_o];

  // ---- filter model ----
  int busy_cnt = 0;
  logic signed [WORD_W-1:0] le = 0, lo = 0, plo = 0;
  assign flt_ready = (busy_cnt == 0) || (busy_cnt == 1);
  always_ff @(posedge clk) begin
    flt_valid <= (busy_cnt == 1);
    if (busy_cnt == 1) begin
      flt_a <= ACC_W'(le) <<< 8;
      flt_b <= ACC_W'(plo) <<< 8;
    end
    if (flt_load && flt_ready) begin
      busy_cnt <= 4;
      le <= flt_even; lo <= flt_odd; plo <= lo;
    end else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---- reference ----
  int m [N][N];

  task automatic pass_model(input bit inverse, input bit cols, input int s);
    int x [N], y [N];
    for (int ln = 0; ln < s; ln++) begin
      for (int p = 0; p < s; p++) x[p] = cols ? m[p][ln] : m[ln][p];
      for (int k = 0; k < s / 2; k++)
        if (!inverse) begin
          y[k] = x[2 * k]; y[s / 2 + k] = x[(2 * k - 1 + s) % s];
        end else begin
          y[2 * k] = x[(k + 1) % (s / 2)]; y[2 * k + 1] = x[s / 2 + k];
        end
      for (int p = 0; p < s; p++) if (cols) m[p][ln] = y[p]; else m[ln][p] = y[p];
    end
  endtask

  // pass order observed at the start of each pass
  int order [$];
  int ext_bad = 0, ext_reads = 0;
  always @(posedge clk) if (!rst) begin
    if (lb_we && lb_waddr == 0 && dut.line == 0)
      order.push_back(10 * int'(cur_pass) + int'(cur_level));
    if (ext_rd) begin
      if (int'(ext_addr) != ext_reads) ext_bad++;
      ext_reads++;
    end
  end

  function automatic int expected_cycles(bit inverse);
    int c;
    c = inverse ? 0 : N * N + 1;
    for (int l = 0; l < LEVELS; l++) begin
      int s = N >> l;
      c += 2 * s * (s + 4 * (s / 2 + 1) + 5);
    end
    return c;
  endfunction

  task automatic run(input op_e o, output int cyc);
    longint t0;
    @(negedge clk); op = o; start = 1;
    @(negedge clk); start = 0;
    t0 = cycle;
    while (!ready) @(negedge clk);
    cyc = int'(cycle - t0);
  endtask

  task automatic compare(input string what);
    for (int i = 0; i < N * N; i++) begin
      checks++;
      if ($signed(fm[i]) != m[i / N][i % N]) begin
        failures++;
        if (failures < 10) $display("%s: word %0d got %0d exp %0d", what, i, $signed(fm[i]),
                                    m[i / N][i % N]);
      end
    end
  endtask

  initial begin
    int c;
    for (int i = 0; i < N * N; i++) rom[i] = PIX_W'($urandom);
    repeat (3) @(negedge clk);
    rst = 0;

    for (int i = 0; i < N * N; i++) m[i / N][i % N] = int'(rom[i]) - 128;
    run(OP_DWT, c);
    for (int l = 0; l < LEVELS; l++) begin pass_model(0, 0, N >> l); pass_model(0, 1, N >> l); end
    compare("forward");
    checks++;
    if (ext_reads != N * N || ext_bad != 0) begin
      failures++; $display("external reads: %0d, %0d out of order", ext_reads, ext_bad);
    end
    checks++;
    if (c != expected_cycles(0)) begin failures++; $display("DWT took %0d clocks, exp %0d", c, expected_cycles(0)); end

    run(OP_IDWT, c);
    for (int l = LEVELS - 1; l >= 0; l--) begin pass_model(1, 1, N >> l); pass_model(1, 0, N >> l); end
    compare("inverse");
    checks++;
    if (c != expected_cycles(1)) begin failures++; $display("IDWT took %0d clocks, exp %0d", c, expected_cycles(1)); end

    // forward again, then inverse with the high bands of levels 0 and 1 discarded
    for (int i = 0; i < N * N; i++) m[i / N][i % N] = int'(rom[i]) - 128;
    run(OP_DWT, c);
    for (int l = 0; l < LEVELS; l++) begin pass_model(0, 0, N >> l); pass_model(0, 1, N >> l); end
    drop_levels = 2;
    run(OP_IDWT, c);
    for (int l = LEVELS - 1; l >= 0; l--) begin
      if (l < 2)
        for (int r = 0; r < (N >> l); r++) for (int cc = 0; cc < (N >> l); cc++)
          if (r >= (N >> (l + 1)) || cc >= (N >> (l + 1))) m[r][cc] = 0;
      pass_model(1, 1, N >> l); pass_model(1, 0, N >> l);
    end
    compare("inverse, two levels dropped");

    checks++;
    // 10*pass + level, pass 0 = rows, 1 = columns
    if (order != '{0, 10, 1, 11, 2, 12, 12, 2, 11, 1, 10, 0, 0, 10, 1, 11, 2, 12, 12, 2, 11, 1, 10, 0}) begin
      failures++; $display("pass order: %p", order);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

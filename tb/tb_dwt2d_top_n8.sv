// tb_dwt2d_top_n8: end-to-end test of the DWT/IDWT processor built for an 8 x 8 image memory
// with three decomposition levels (the smallest square that allows three levels), otherwise
// the same test as tb_dwt2d_top.
//
// For each of two images held in a model of the external ROM (uniform random pixels, and
// random pixels of only 0 and 255) it runs a forward transform, compares every one of the
// N*N coefficients with an integer reference model written here (direct dot products with
// the Daubechies-2 coefficients, periodic extension, the same rounding), then runs the
// inverse transform and compares every rebuilt pixel with the model and with the original
// image (at most 3 grey levels apart). It also checks the filter rate (a result pair every 4
// clocks inside a line) and counts the mechanisms of the design: both operations, row and
// column passes at every level, the priming load at each line start, pixel clipping, and
// the discarding of high sub-bands before an inverse transform (one and all levels dropped),
// whose result is checked against the model with the same bands zeroed.
module tb_dwt2d_top_n8;
  import dwt_pkg::*;

  localparam int N = 8, LEVELS = 3, WORD_W = 16, PIX_W = 8;
  localparam int AW = $clog2(N * N);

  logic clk = 0, reset = 1, start = 0;
  op_e op = OP_DWT;
  logic [$clog2(LEVELS+1)-1:0] drop_levels = 0;
  logic ready, ext_rd;
  logic [AW-1:0] ext_addr, rd_addr;
  logic [PIX_W-1:0] ext_data, d0, d1, rd_pixel;
  logic signed [WORD_W-1:0] rd_coef;
  pass_e stat_pass;
  logic [$clog2(LEVELS+1)-1:0] stat_level;
  int img_sel = 0;

  always #5 clk = ~clk;

  dwt2d_top #(.N(N), .LEVELS(LEVELS)) dut (.clk, .reset, .start, .op, .drop_levels, .ready, .ext_rd, .ext_addr, .ext_data,
                 .rd_addr, .rd_coef, .rd_pixel, .stat_pass, .stat_level);

  ext_image_rom #(.N(N), .SEED(7),  .STYLE(0)) rom0 (.clk, .rd(ext_rd), .addr(ext_addr), .data(d0));
  ext_image_rom #(.N(N), .SEED(11), .STYLE(2)) rom1 (.clk, .rd(ext_rd), .addr(ext_addr), .data(d1));
  assign ext_data = (img_sel == 0) ? d0 : d1;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- reference model ----------------
  int ref_m [N][N];
  int orig  [N][N];
  int h [4] = '{124, 214, 57, -33};
  int g [4] = '{-33, -57, 214, -124};

  function automatic int rnd(int v);
    int r;
    r = (v + 128) >>> 8;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic fwd_line(ref int x [N], input int s);
    int y [N];
    for (int n = 0; n < s / 2; n++) begin
      int lo = 0, hi = 0;
      for (int k = 0; k < 4; k++) begin
        int idx = ((2 * n + 1 - k) % s + s) % s;
        lo += h[k] * x[idx];
        hi += g[k] * x[idx];
      end
      y[n] = rnd(lo);
      y[s / 2 + n] = rnd(hi);
    end
    for (int i = 0; i < s; i++) x[i] = y[i];
  endtask

  task automatic inv_line(ref int x [N], input int s);
    int y [N];
    int hs = s / 2;
    for (int m = 0; m < hs; m++) begin
      int l0 = x[m], l1 = x[(m + 1) % hs], h0 = x[hs + m], h1 = x[hs + (m + 1) % hs];
      y[2 * m]     = rnd(h[1] * l0 + h[3] * l1 + g[1] * h0 + g[3] * h1);
      y[2 * m + 1] = rnd(h[0] * l0 + h[2] * l1 + g[0] * h0 + g[2] * h1);
    end
    for (int i = 0; i < s; i++) x[i] = y[i];
  endtask

  task automatic model_pass(input bit inverse, input bit cols, input int s);
    int x [N];
    for (int ln = 0; ln < s; ln++) begin
      for (int p = 0; p < s; p++) x[p] = cols ? ref_m[p][ln] : ref_m[ln][p];
      if (inverse) inv_line(x, s); else fwd_line(x, s);
      for (int p = 0; p < s; p++) if (cols) ref_m[p][ln] = x[p]; else ref_m[ln][p] = x[p];
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_dwt = 0, n_idwt = 0, n_prime = 0, n_clip = 0, n_drop = 0;
  int n_pass [2][LEVELS];     // [rows/cols][level], counts lines
  int rate_ok = 0, rate_bad = 0;
  longint last_valid = -1;

  always @(posedge clk) if (!reset) begin
    if (dut.u_ctrl.lb_we && dut.u_ctrl.lb_waddr == 0)
      n_pass[stat_pass][stat_level]++;
    if (dut.flt_valid && dut.u_ctrl.out_j == 0) n_prime++;
    if (dut.flt_valid) begin
      if (dut.u_ctrl.out_j != 0) begin
        if (cycle - last_valid == 4) rate_ok++; else rate_bad++;
      end
      last_valid = cycle;
    end
  end

  // Clocks from start to ready: N*N+1 to load (DWT only), then per line of side S:
  // S to fill the line buffer, 4 per filter load (S/2+1 loads), 5 to drain and write back.
  function automatic int expected_cycles(bit inverse);
    int c;
    c = inverse ? 0 : N * N + 1;
    for (int l = 0; l < LEVELS; l++) c += 2 * (N >> l) * ((N >> l) + 4 * ((N >> l) / 2 + 1) + 5);
    return c;
  endfunction

  task automatic run(input op_e o, output longint cyc);
    longint t0;
    @(negedge clk); op = o; start = 1;
    @(negedge clk); start = 0;
    t0 = cycle;
    while (!ready) @(negedge clk);
    cyc = cycle - t0;
  endtask

  task automatic test_image(input int sel, input int drop);
    longint c_dwt, c_idwt;
    int max_err = 0;
    img_sel = sel;
    for (int i = 0; i < N * N; i++)
      orig[i / N][i % N] = (sel == 0) ? rom0.pixel(i) : rom1.pixel(i);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) ref_m[r][c] = orig[r][c] - 128;

    // forward
    run(OP_DWT, c_dwt); n_dwt++;
    for (int l = 0; l < LEVELS; l++) begin
      model_pass(0, 0, N >> l);
      model_pass(0, 1, N >> l);
    end
    for (int i = 0; i < N * N; i++) begin
      rd_addr = AW'(i); #1;
      checks++;
      if (int'(rd_coef) != ref_m[i / N][i % N]) begin
        failures++;
        if (failures < 10) $display("DWT mismatch img%0d at (%0d,%0d): got %0d exp %0d",
                                    sel, i / N, i % N, rd_coef, ref_m[i / N][i % N]);
      end
    end

    // inverse
    drop_levels = ($clog2(LEVELS+1))'(drop);
    run(OP_IDWT, c_idwt); n_idwt++;
    if (drop > 0) n_drop++;
    for (int l = LEVELS - 1; l >= 0; l--) begin
      if (l < drop)
        for (int r = 0; r < (N >> l); r++) for (int c = 0; c < (N >> l); c++)
          if (r >= (N >> (l + 1)) || c >= (N >> (l + 1))) ref_m[r][c] = 0;
      model_pass(1, 1, N >> l);
      model_pass(1, 0, N >> l);
    end
    for (int i = 0; i < N * N; i++) begin
      int e, clipped, d;
      rd_addr = AW'(i); #1;
      e = ref_m[i / N][i % N] + 128;
      clipped = e < 0 ? 0 : (e > 255 ? 255 : e);
      if (e != clipped) n_clip++;
      checks++;
      if (int'(rd_coef) != ref_m[i / N][i % N] || int'(rd_pixel) != clipped) begin
        failures++;
        if (failures < 10) $display("IDWT mismatch img%0d at %0d: got %0d/%0d exp %0d",
                                    sel, i, rd_coef, rd_pixel, ref_m[i / N][i % N]);
      end
      d = int'(rd_pixel) - orig[i / N][i % N];
      if (d < 0) d = -d;
      if (d > max_err) max_err = d;
    end
    checks++;
    if (drop == 0 && max_err > 3) begin
      failures++;
      $display("reconstruction error %0d grey levels too large", max_err);
    end
    checks++;
    if (c_dwt != longint'(expected_cycles(0)) || c_idwt != longint'(expected_cycles(1))) begin
      failures++;
      $display("run lengths %0d / %0d, expected %0d / %0d", c_dwt, c_idwt,
               expected_cycles(0), expected_cycles(1));
    end
    $display("image %0d, %0d levels of high bands dropped: DWT %0d clocks, IDWT %0d clocks, max error %0d",
             sel, drop, c_dwt, c_idwt, max_err);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("not ready after reset"); end

    test_image(0, 0);
    test_image(1, 0);
    test_image(0, 1);
    test_image(1, LEVELS);

    // filter rate: every result after the first in a line follows the previous by 4 clocks
    checks++;
    if (rate_bad != 0 || rate_ok == 0) begin
      failures++;
      $display("filter rate: %0d results at 4 clocks, %0d otherwise", rate_ok, rate_bad);
    end
    // mechanisms
    $display("mechanisms: dwt=%0d idwt=%0d prime=%0d clip=%0d rate4=%0d drop=%0d", n_dwt,
             n_idwt, n_prime, n_clip, rate_ok, n_drop);
    for (int p = 0; p < 2; p++) for (int l = 0; l < LEVELS; l++) begin
      $display("  %s pass level %0d: %0d lines", p ? "column" : "row", l, n_pass[p][l]);
      checks++;
      if (n_pass[p][l] == 0) failures++;
    end
    checks += 5;
    if (n_drop == 0)  failures++;
    if (n_dwt == 0)   failures++;
    if (n_idwt == 0)  failures++;
    if (n_prime == 0) failures++;
    if (n_clip == 0) begin failures++; $display("clipping never happened"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

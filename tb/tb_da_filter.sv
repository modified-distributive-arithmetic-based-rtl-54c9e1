// tb_da_filter: self-checking test of the DA filter pair at the paper's 8-bit sample width
// (two nibble lanes, four ROMs) and at the 16-bit width the processor uses.
//
// Streams random (even, odd) pairs, including the extreme values, back to back and with idle
// gaps, and compares every out_a / out_b with a direct dot product of the four-tap window and
// the coefficient sets (analysis for the 8-bit unit, synthesis for the 16-bit unit). It also
// checks the rate (loads accepted every 4 clocks when streaming) and the latency (a result 5
// clocks after its load).
module tb_da_filter;
  import dwt_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // 8-bit unit (the paper's configuration), analysis coefficients
  logic load8 = 0, ready8, valid8;
  logic signed [7:0] e8 = 0, o8 = 0;
  logic signed [19:0] a8, b8;
  da_filter #(.DATA_W(8)) u8 (.clk, .rst, .load(load8), .in_even(e8), .in_odd(o8),
                              .ready(ready8), .valid(valid8), .out_a(a8), .out_b(b8));

  // 16-bit unit, synthesis coefficients
  logic load16 = 0, ready16, valid16;
  logic signed [15:0] e16 = 0, o16 = 0;
  logic signed [27:0] a16, b16;
  da_filter #(.DATA_W(16), .COEF_A(IDWT_A), .COEF_B(IDWT_B)) u16 (
    .clk, .rst, .load(load16), .in_even(e16), .in_odd(o16),
    .ready(ready16), .valid(valid16), .out_a(a16), .out_b(b16));

  // expected results queue: window taps -> dot products
  longint exp8a [$], exp8b [$], exp16a [$], exp16b [$];
  longint tload8 [$], tload16 [$];
  longint w8 [4] = '{0, 0, 0, 0};
  longint w16 [4] = '{0, 0, 0, 0};
  int lat_bad = 0, loads_streamed = 0, rate_bad = 0;
  longint last_load8 = -100;

  function automatic longint dot(coef4_t c, longint w [4]);
    longint s;
    s = 0;
    for (int k = 0; k < 4; k++) s += longint'($signed(c[k])) * w[k];
    return s;
  endfunction

  function automatic longint pick(int bits);
    int r;
    longint mx;
    r = $urandom % 8;
    mx = (longint'(1) <<< (bits - 1)) - 1;
    if (r == 0) return mx;
    if (r == 1) return -mx - 1;
    return longint'($signed($urandom)) % (mx + 1);
  endfunction

  always @(posedge clk) if (!rst) begin
    if (load8 && ready8) begin
      w8[3] = w8[1]; w8[2] = w8[0]; w8[1] = longint'(e8); w8[0] = longint'(o8);
      exp8a.push_back(dot(DWT_A, w8)); exp8b.push_back(dot(DWT_B, w8));
      tload8.push_back(cycle);
      if (last_load8 >= 0 && cycle - last_load8 < 4) rate_bad++;
      if (cycle - last_load8 == 4) loads_streamed++;
      last_load8 = cycle;
    end
    if (load16 && ready16) begin
      w16[3] = w16[1]; w16[2] = w16[0]; w16[1] = longint'(e16); w16[0] = longint'(o16);
      exp16a.push_back(dot(IDWT_A, w16)); exp16b.push_back(dot(IDWT_B, w16));
      tload16.push_back(cycle);
    end
    if (valid8) begin
      longint ea, eb, t;
      ea = exp8a.pop_front(); eb = exp8b.pop_front(); t = tload8.pop_front();
      checks++;
      if (longint'(a8) != ea || longint'(b8) != eb) begin
        failures++;
        if (failures < 10) $display("8-bit: got %0d %0d exp %0d %0d", a8, b8, ea, eb);
      end
      if (cycle - t != 5) lat_bad++;
    end
    if (valid16) begin
      longint ea, eb, t;
      ea = exp16a.pop_front(); eb = exp16b.pop_front(); t = tload16.pop_front();
      checks++;
      if (longint'(a16) != ea || longint'(b16) != eb) begin
        failures++;
        if (failures < 10) $display("16-bit: got %0d %0d exp %0d %0d", a16, b16, ea, eb);
      end
      if (cycle - t != 5) lat_bad++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // mostly keep load high (streaming), sometimes pause
      load8  = ($urandom % 5) != 0;
      load16 = ($urandom % 5) != 0;
      e8 = 8'(pick(8)); o8 = 8'(pick(8));
      e16 = 16'(pick(16)); o16 = 16'(pick(16));
    end
    @(negedge clk); load8 = 0; load16 = 0;
    repeat (10) @(negedge clk);
    checks += 4;
    if (lat_bad != 0) begin failures++; $display("latency not 5 clocks %0d times", lat_bad); end
    if (rate_bad != 0) begin failures++; $display("loads closer than 4 clocks"); end
    if (loads_streamed < 100) begin failures++; $display("too few back-to-back loads"); end
    if (exp8a.size() != 0 || exp16a.size() != 0) begin failures++; $display("missing results"); end
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

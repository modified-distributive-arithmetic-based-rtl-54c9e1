// tb_scaling_acc: feeds random signed partial sums, four per word, least significant bit
// first, into the scaling accumulator and checks that after the fourth the register holds
// sum of din_b * 2^b exactly; also checks that a word start discards the old contents and
// that the register holds its value while en is low.
module tb_scaling_acc;
  logic clk = 0, rst = 1, en = 0, first = 0;
  logic signed [15:0] din = 0;
  logic signed [23:0] acc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scaling_acc #(.IN_W(16), .ACC_W(24), .SHIFT_IN(3)) dut (.clk, .rst, .en, .first, .din, .acc);

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int w = 0; w < 500; w++) begin
      longint exp_v;
      exp_v = 0;
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        en = 1; first = (b == 0);
        din = 16'($urandom);
        if (w % 7 == 0) din = (b == 3) ? -16'sd32768 : 16'sd32767;
        exp_v += longint'(din) <<< b;
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (longint'(acc) != exp_v) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d exp %0d", w, acc, exp_v);
      end
      din = 16'($urandom);
      @(negedge clk);
      checks++;
      if (longint'(acc) != exp_v) begin failures++; $display("acc changed while idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

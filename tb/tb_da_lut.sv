// tb_da_lut: checks all 16 words of the partial-product ROM for the four coefficient sets of
// the processor (analysis low/high, synthesis even/odd) against sums formed here.
module tb_da_lut;
  import dwt_pkg::*;

  logic [3:0] addr;
  lut_t d [4];
  coef4_t sets [4];
  int checks = 0, failures = 0;

  da_lut #(.COEF(DWT_A))  u0 (.addr, .data(d[0]));
  da_lut #(.COEF(DWT_B))  u1 (.addr, .data(d[1]));
  da_lut #(.COEF(IDWT_A)) u2 (.addr, .data(d[2]));
  da_lut #(.COEF(IDWT_B)) u3 (.addr, .data(d[3]));

  // coefficient values written out independently of the package (tap 0 first)
  int cv [4][4] = '{'{124, 214, 57, -33}, '{-33, -57, 214, -124},
                    '{-124, -33, -57, 214}, '{214, 57, -33, 124}};

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      for (int s = 0; s < 4; s++) begin
        int e;
        e = 0;
        for (int k = 0; k < 4; k++) if (a[k]) e += cv[s][k];
        checks++;
        if (int'(d[s]) != e) begin
          failures++;
          $display("set %0d addr %0d: got %0d exp %0d", s, a, d[s], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ram_2r1w: random writes and reads on both read ports of a 64-word memory, compared with
// an array model; the write lands at the clock edge and reads are combinational.
module tb_ram_2r1w;
  localparam int D = 64, W = 16;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, ra = 0, rb = 0;
  logic [W-1:0] wdata = 0, da, db;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ram_2r1w #(.DEPTH(D), .W(W)) dut (.clk, .we, .waddr, .wdata, .raddr_a(ra), .rdata_a(da),
                                    .raddr_b(rb), .rdata_b(db));

  initial begin
    // fill every word first
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = W'($urandom);
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra = 6'($urandom); rb = 6'($urandom);
      #1;
      checks += 2;
      if (da != model[ra]) begin failures++; $display("port a @%0d: %h vs %h", ra, da, model[ra]); end
      if (db != model[rb]) begin failures++; $display("port b @%0d: %h vs %h", rb, db, model[rb]); end
      we = ($urandom % 2) == 1; waddr = 6'($urandom); wdata = W'($urandom);
      if (we) model[waddr] = wdata;
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

// scaling_acc: the DA scaling accumulator ("ACC" with the ">>1" feedback).
//
// Each enabled cycle the register takes (acc >>> 1) + (din <<< SHIFT_IN); on the first cycle
// of a word the old contents are dropped. Feeding the partial sums of bit 0, 1, ... NB-1
// (least significant first) with SHIFT_IN = NB-1 leaves acc = sum over b of din_b * 2^b after
// NB cycles, exactly: the right shift never drops a set bit because every earlier term was
// entered NB-1 places up. The update is registered: acc shows the new value one clock after
// en. Synchronous active-high reset clears it. The right-shifting accumulator follows the
// paper; the pre-shift by SHIFT_IN that keeps it exact is this design's choice.
module scaling_acc #(
  parameter int unsigned IN_W     = 16,
  parameter int unsigned ACC_W    = 20,
  parameter int unsigned SHIFT_IN = 3
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,     // accumulate this cycle
  input  logic                    first,  // first bit of a new word: discard old contents
  input  logic signed [IN_W-1:0]  din,    // partial sum of the current bit
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] base, term;

  always_comb begin
    if (first) base = '0;
    else       base = acc >>> 1;
    term = ACC_W'(din) <<< SHIFT_IN;
  end

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= base + term;
  end

endmodule

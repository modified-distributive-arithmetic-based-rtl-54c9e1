// da_lut: distributed-arithmetic partial-product ROM (the "LPF ROM" / "HPF ROM").
//
// For a four-tap filter with coefficients C[0..3], entry a holds sum over k of a[k]*C[k]:
// the partial product selected when bit a[k] is one bit of tap k. The sixteen entries are
// constants worked out at elaboration, so the block synthesises to a 16 x LUT_W ROM (or to
// plain logic on an FPGA). Reading is combinational: data follows addr in the same cycle.
// The ROM structure is the paper's; the coefficient word widths are this design's.
module da_lut
  import dwt_pkg::*;
#(
  parameter coef4_t COEF = DWT_A   // coefficient of tap k is COEF[k]
) (
  input  logic [NTAPS-1:0] addr,   // bit k = current bit of tap k
  output lut_t             data    // partial product
);

  function automatic lut_t entry(int unsigned a);
    lut_t s;
    s = '0;
    for (int k = 0; k < NTAPS; k++)
      if (a[k]) s = s + lut_t'($signed(COEF[k]));
    return s;
  endfunction

  lut_t rom [2**NTAPS];

  always_comb
    for (int unsigned i = 0; i < 2**NTAPS; i++) rom[i] = entry(i);

  assign data = rom[addr];

endmodule

// dwt_pkg: shared constants and types of the DA-based Daubechies-2 DWT/IDWT processor.
//
// The wavelet is Daubechies 2 (four taps). Its coefficients are held as signed fixed-point
// integers with COEF_FRAC = 8 fractional bits, i.e. round(256 * c):
//   h = (1+sqrt3, 3+sqrt3, 3-sqrt3, 1-sqrt3) / (4*sqrt2)  ->  124, 214, 57, -33
//   g[k] = (-1)^k * h[3-k]                                 ->  -33, -57, 214, -124
// The quantised set keeps sum(h*g) = 0 exactly and sum(h^2) = 65510 (ideal 65536).
//
// A DA filter (da_filter) forms two four-term dot products over a window of four taps
// (tap 0 newest). The coefficient order in a coef4_t is tap 0 first, index [k] = tap k.
//   Analysis  (DWT):  tap k = x[2n+1-k];            A = h  -> low band,  B = g -> high band
//   Synthesis (IDWT): taps = (H[m+1], L[m+1], H[m], L[m]);
//                      A -> x[2m]   = g3, h3, g1, h1
//                      B -> x[2m+1] = g2, h2, g0, h0
// The synthesis sets are the transpose of the analysis matrix for a periodic signal, which
// is its inverse because the Daubechies filters are orthogonal.
// The paper names Daubechies 2 as the implemented wavelet and the 4-bit MSB / LSB split; the
// coefficient format and the synthesis arrangement are this design's.
package dwt_pkg;

  localparam int unsigned COEF_W    = 9;   // signed coefficient width
  localparam int unsigned LUT_W     = 10;  // signed width of a partial-product ROM word
  localparam int unsigned COEF_FRAC = 8;   // fractional bits of the coefficients
  localparam int unsigned NIB_W     = 4;   // bits per nibble lane (MSB / LSB split)
  localparam int unsigned NTAPS     = 4;   // Daubechies-2 filter length

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t [NTAPS-1:0]         coef4_t;
  typedef logic signed [LUT_W-1:0]  lut_t;

  // Analysis: A = low-pass h, B = high-pass g.
  localparam coef4_t DWT_A  = '{ -9'sd33,  9'sd57,   9'sd214, 9'sd124 };  // [3]..[0]
  localparam coef4_t DWT_B  = '{ -9'sd124, 9'sd214, -9'sd57, -9'sd33  };
  // Synthesis: A -> even output sample, B -> odd output sample.
  localparam coef4_t IDWT_A = '{  9'sd214, -9'sd57, -9'sd33, -9'sd124 };
  localparam coef4_t IDWT_B = '{  9'sd124, -9'sd33,  9'sd57,  9'sd214 };

  // Processor operation selected at start.
  typedef enum logic { OP_DWT = 1'b0, OP_IDWT = 1'b1 } op_e;

  // Direction of a filtering pass over the square image.
  typedef enum logic { PASS_ROWS = 1'b0, PASS_COLS = 1'b1 } pass_e;

endpackage

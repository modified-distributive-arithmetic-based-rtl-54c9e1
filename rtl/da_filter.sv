// da_filter: modified distributed-arithmetic poly-phase filter pair.
//
// Computes two four-tap dot products, out_a = sum A[k]*tap_k and out_b = sum B[k]*tap_k,
// without multipliers. Each DATA_W-bit two's-complement sample is cut into NIB_W = 4-bit
// nibble lanes (for DATA_W = 8: an MSB lane and an LSB lane). Every lane holds the four
// taps in four 4-bit shift registers and owns two partial-product ROMs (da_lut), one per
// coefficient set, so DATA_W = 8 gives the four ROMs of the modified architecture. In each
// compute cycle the shift registers rotate by one bit (they circulate, so after four cycles
// they hold their samples again) and bit b of all four taps of a lane addresses that lane's
// ROMs. The lane outputs are combined with a left shift of 4 per lane ("<<4") and fed to a
// right-shifting scaling accumulator (scaling_acc). The sign bit of the top lane weighs
// -2^(DATA_W-1), so its partial product is subtracted in the last cycle.
//
// Poly-phase input: one load brings an (even, odd) sample pair. The window shifts by two:
//   tap0 <= in_odd, tap1 <= in_even, tap2 <= old tap0, tap3 <= old tap1.
// For the DWT the pair is (x[2n], x[2n+1]) and the taps become x[2n+1-k]; for the IDWT the
// pair is (L[m+1], H[m+1]) and the taps become (H[m+1], L[m+1], H[m], L[m]).
//
// Timing: load is taken when ready is high. The four bit cycles follow the load cycle;
// valid is a one-cycle pulse in the cycle after the fourth, with out_a / out_b (full
// precision, scaled by 2^COEF_FRAC) valid in that cycle only. ready is high when idle and
// in the fourth bit cycle, so back-to-back loads give one result pair every 4 clocks, and a
// result appears 5 clocks after its load. The nibble split, the ROM per lane and filter and
// the 4-cycle rate follow the paper; the load protocol and the window update are this
// design's.
module da_filter
  import dwt_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter coef4_t      COEF_A = DWT_A,
  parameter coef4_t      COEF_B = DWT_B,
  localparam int unsigned ACC_W = DATA_W + 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     load,
  input  logic signed [DATA_W-1:0] in_even,
  input  logic signed [DATA_W-1:0] in_odd,
  output logic                     ready,
  output logic                     valid,
  output logic signed [ACC_W-1:0]  out_a,
  output logic signed [ACC_W-1:0]  out_b
);

  localparam int unsigned NL = DATA_W / NIB_W;   // nibble lanes

  typedef logic [NIB_W-1:0] nib_t;

  nib_t       taps [NL][NTAPS];   // taps[lane][tap]
  logic       busy;
  logic [1:0] bitc;               // bit cycle 0..3

  // --- window update ---------------------------------------------------------------------
  function automatic nib_t rot(nib_t v);
    return {v[0], v[NIB_W-1:1]};
  endfunction

  logic accept;
  assign ready  = !busy || (bitc == 2'(NIB_W - 1));
  assign accept = load && ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      bitc  <= '0;
      valid <= 1'b0;
      for (int l = 0; l < NL; l++)
        for (int k = 0; k < NTAPS; k++) taps[l][k] <= '0;
    end else begin
      valid <= busy && (bitc == 2'(NIB_W - 1));
      if (accept) begin
        busy <= 1'b1;
        bitc <= '0;
        for (int l = 0; l < NL; l++) begin
          // During the last bit cycle one more rotation restores the stored samples.
          taps[l][0] <= in_odd [l*NIB_W +: NIB_W];
          taps[l][1] <= in_even[l*NIB_W +: NIB_W];
          taps[l][2] <= busy ? rot(taps[l][0]) : taps[l][0];
          taps[l][3] <= busy ? rot(taps[l][1]) : taps[l][1];
        end
      end else if (busy) begin
        bitc <= bitc + 2'd1;
        if (bitc == 2'(NIB_W - 1)) busy <= 1'b0;
        for (int l = 0; l < NL; l++)
          for (int k = 0; k < NTAPS; k++) taps[l][k] <= rot(taps[l][k]);
      end
    end
  end

  // --- ROMs: one pair per nibble lane ----------------------------------------------------
  logic [NTAPS-1:0] addr [NL];
  lut_t             pa   [NL];
  lut_t             pb   [NL];

  for (genvar l = 0; l < NL; l++) begin : g_lane
    always_comb
      for (int k = 0; k < NTAPS; k++) addr[l][k] = taps[l][k][0];
    da_lut #(.COEF(COEF_A)) u_lut_a (.addr(addr[l]), .data(pa[l]));
    da_lut #(.COEF(COEF_B)) u_lut_b (.addr(addr[l]), .data(pb[l]));
  end

  // --- combine lanes (<<4 per lane), sign bit subtracted ---------------------------------
  logic signed [ACC_W-1:0] sum_a, sum_b;
  logic                    sign_cycle;

  assign sign_cycle = (bitc == 2'(NIB_W - 1));

  always_comb begin
    sum_a = '0;
    sum_b = '0;
    for (int l = 0; l < NL; l++) begin
      if (sign_cycle && l == NL - 1) begin
        sum_a = sum_a - (ACC_W'(pa[l]) <<< (NIB_W * l));
        sum_b = sum_b - (ACC_W'(pb[l]) <<< (NIB_W * l));
      end else begin
        sum_a = sum_a + (ACC_W'(pa[l]) <<< (NIB_W * l));
        sum_b = sum_b + (ACC_W'(pb[l]) <<< (NIB_W * l));
      end
    end
  end

  // --- scaling accumulators (lo / ho) ----------------------------------------------------
  scaling_acc #(.IN_W(ACC_W), .ACC_W(ACC_W), .SHIFT_IN(NIB_W - 1)) u_acc_a (
    .clk, .rst, .en(busy), .first(bitc == 2'd0), .din(sum_a), .acc(out_a));
  scaling_acc #(.IN_W(ACC_W), .ACC_W(ACC_W), .SHIFT_IN(NIB_W - 1)) u_acc_b (
    .clk, .rst, .en(busy), .first(bitc == 2'd0), .din(sum_b), .acc(out_b));

  // A load that is taken yields its result pulse exactly five clocks later.
  a_latency: assert property (@(posedge clk) disable iff (rst) accept |-> ##5 valid);
  // Results never come closer than the 4-clock word time.
  a_spacing: assert property (@(posedge clk) disable iff (rst) valid |=> !valid [*3]);

endmodule

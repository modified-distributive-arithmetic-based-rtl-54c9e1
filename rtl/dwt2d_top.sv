// dwt2d_top: 2-D DWT / IDWT image co-processor built on modified distributed arithmetic.
//
// An N x N 8-bit image is read from an external memory into the on-chip frame memory and
// decomposed in place into LEVELS levels of Daubechies-2 sub-bands (LL, LH, HL, HH per level,
// Mallat layout). The same processor runs the inverse transform on the frame memory contents
// to rebuild the image. All filtering is done by two multiplier-free DA filter pairs
// (da_filter): one with the analysis low/high-pass ROMs for the DWT and one with the synthesis
// ROMs for the IDWT. The control logic (dwt_ctrl) streams one row or column at a time through
// a line buffer into the filter selected by the running operation.
//
// Interface: pulse start (with op = OP_DWT or OP_IDWT) while ready is high; ready drops and
// returns high when the operation is over. For an IDWT, drop_levels = k discards the LH, HL
// and HH bands of levels 0..k-1 (the finest ones), so the image is rebuilt from the coarser
// sub-bands only, as a compressor would transmit it. During a DWT the image is read through
// ext_rd / ext_addr, with ext_data expected one clock after the address (a synchronous ROM).
// After a DWT, rd_coef at rd_addr (row*N + column) is a signed sub-band coefficient; after an
// IDWT, rd_pixel is the rebuilt pixel, rd_coef + 128 clipped to 0..255. The read-out port is
// combinational; it may be used at any time, but shows a mix of data while an operation runs.
// stat_pass / stat_level show the pass and level being worked on.
//
// Timing at the defaults (N = 32, LEVELS = 2): each filter delivers a result pair every 4
// clocks; a DWT takes 1025 clocks of loading plus 8544 clocks of filtering passes, an IDWT
// the 8544 clocks of passes alone. Clock clk, synchronous active-high reset.
//
// From the paper: the row-then-column multi-level decomposition, the modified DA filters,
// the module name and its clk / reset / start / ready pins. This design's own: the op,
// drop_levels, external-memory and read-out ports, the in-place memory organisation and the
// inverse transform built from a second DA filter pair.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 32,   // image side
  parameter int unsigned LEVELS = 2,    // decomposition levels
  parameter int unsigned WORD_W = 16,   // coefficient word width
  parameter int unsigned PIX_W  = 8,    // pixel width
  localparam int unsigned AW    = $clog2(N * N)
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     start,
  input  op_e                      op,
  input  logic [$clog2(LEVELS+1)-1:0] drop_levels,  // IDWT: discard high bands of levels < this
  output logic                     ready,
  // external image memory
  output logic                     ext_rd,
  output logic [AW-1:0]            ext_addr,
  input  logic [PIX_W-1:0]         ext_data,
  // result read-out
  input  logic [AW-1:0]            rd_addr,
  output logic signed [WORD_W-1:0] rd_coef,
  output logic [PIX_W-1:0]         rd_pixel,
  // progress: pass and level being processed
  output pass_e                    stat_pass,
  output logic [$clog2(LEVELS+1)-1:0] stat_level
);

  localparam int unsigned ACC_W = WORD_W + 12;
  localparam int unsigned LW    = $clog2(N);

  logic                    fm_we;
  logic [AW-1:0]           fm_waddr, fm_raddr;
  logic [WORD_W-1:0]       fm_wdata, fm_rdata, fm_rdata_out;
  logic                    lb_we;
  logic [LW-1:0]           lb_waddr, lb_raddr_e, lb_raddr_o;
  logic [WORD_W-1:0]       lb_wdata, lb_rdata_e, lb_rdata_o;
  op_e                     cur_op;
  logic                    flt_load;
  logic signed [WORD_W-1:0] flt_even, flt_odd;
  logic                    flt_ready, flt_valid;
  logic signed [ACC_W-1:0] flt_a, flt_b;
  logic                    f_ready [2];
  logic                    f_valid [2];
  logic signed [ACC_W-1:0] f_a [2];
  logic signed [ACC_W-1:0] f_b [2];

  dwt_ctrl #(.N(N), .LEVELS(LEVELS), .WORD_W(WORD_W), .PIX_W(PIX_W)) u_ctrl (
    .clk, .rst(reset), .start, .op, .drop_levels, .ready,
    .ext_rd, .ext_addr, .ext_data,
    .fm_we, .fm_waddr, .fm_wdata, .fm_raddr, .fm_rdata,
    .lb_we, .lb_waddr, .lb_wdata, .lb_raddr_e, .lb_raddr_o, .lb_rdata_e, .lb_rdata_o,
    .cur_op, .flt_load, .flt_even, .flt_odd, .flt_ready, .flt_valid, .flt_a, .flt_b,
    .cur_pass(stat_pass), .cur_level(stat_level));

  // Frame memory: port A for the controller, port B for read-out.
  ram_2r1w #(.DEPTH(N * N), .W(WORD_W)) u_frame (
    .clk, .we(fm_we), .waddr(fm_waddr), .wdata(fm_wdata),
    .raddr_a(fm_raddr), .rdata_a(fm_rdata),
    .raddr_b(rd_addr),  .rdata_b(fm_rdata_out));

  // Line buffer: the two read ports give the even and odd sample of a pair.
  ram_2r1w #(.DEPTH(N), .W(WORD_W)) u_line (
    .clk, .we(lb_we), .waddr(lb_waddr), .wdata(lb_wdata),
    .raddr_a(lb_raddr_e), .rdata_a(lb_rdata_e),
    .raddr_b(lb_raddr_o), .rdata_b(lb_rdata_o));

  // Forward transform filter pair: low-pass (A) and high-pass (B) ROMs.
  da_filter #(.DATA_W(WORD_W), .COEF_A(DWT_A), .COEF_B(DWT_B)) u_dwt (
    .clk, .rst(reset), .load(flt_load && cur_op == OP_DWT),
    .in_even(flt_even), .in_odd(flt_odd),
    .ready(f_ready[0]), .valid(f_valid[0]), .out_a(f_a[0]), .out_b(f_b[0]));

  // Inverse transform filter pair: even-sample (A) and odd-sample (B) ROMs.
  da_filter #(.DATA_W(WORD_W), .COEF_A(IDWT_A), .COEF_B(IDWT_B)) u_idwt (
    .clk, .rst(reset), .load(flt_load && cur_op == OP_IDWT),
    .in_even(flt_even), .in_odd(flt_odd),
    .ready(f_ready[1]), .valid(f_valid[1]), .out_a(f_a[1]), .out_b(f_b[1]));

  assign flt_ready = f_ready[cur_op];
  assign flt_valid = f_valid[cur_op];
  assign flt_a     = f_a[cur_op];
  assign flt_b     = f_b[cur_op];

  // Read-out: coefficient, and pixel with the level shift undone and clipped.
  logic signed [WORD_W:0] pix_full;
  assign rd_coef  = $signed(fm_rdata_out);
  assign pix_full = (WORD_W+1)'(rd_coef) + (WORD_W+1)'(2**(PIX_W-1));
  always_comb begin
    if (pix_full < 0)                                rd_pixel = '0;
    else if (pix_full > (WORD_W+1)'(2**PIX_W - 1))   rd_pixel = '1;
    else                                             rd_pixel = PIX_W'(pix_full);
  end

endmodule

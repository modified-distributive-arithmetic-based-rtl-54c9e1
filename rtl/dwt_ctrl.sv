// dwt_ctrl: control logic of the 2-D DWT/IDWT processor.
//
// Sequences one pair of DA filters (da_filter) over an N x N image held in place in the frame
// memory (ram_2r1w), level by level, in the Mallat layout: at level l the active square has
// side S = N >> l, a row pass writes the low band to columns 0..S/2-1 and the high band to
// S/2..S-1 of each row, and a column pass does the same down each column. The LL quarter is
// carried to the next level.
//
//   start with op = OP_DWT : LOAD  - read N*N pixels from external memory (one per clock,
//                                    read data one clock after the address), subtract 128
//                                    (level shift to signed) and store them;
//                            then for level 0..LEVELS-1: a row pass, then a column pass.
//   start with op = OP_IDWT: for level LEVELS-1..0: a column pass, then a row pass, each
//                            inverting the matching forward pass; no load. The high bands
//                            (LH, HL, HH) of levels below drop_levels are read as zero, which
//                            keeps only the coarser sub-bands, as in compression.
//
// A pass treats its S lines one by one. FILL copies the line into the line buffer (S clocks).
// FILT issues S/2 + 1 loads of (even, odd) pairs to the selected filter. The first load primes
// the window with the pair that precedes position 0 under periodic extension, (x[S-2], x[S-1])
// for the DWT and (L[0], H[0]) for the IDWT, whose pairs then run (L[1],H[1])..(L[0],H[0]); its
// result is discarded. Each later result is rounded, (v + 128) >>> 8, saturated to WORD_W bits
// and written back in two clocks (band A, then band B). Loads go out as soon as the filter is
// ready, so a line takes S + 4*(S/2+1) + 5 clocks.
//
// ready is high while idle; start is sampled only then. The frame memory is not cleared by
// reset. Filter sharing, periodic extension, the level shift, rounding and the drop_levels
// encoding are choices of this design. The paper gives only that a control logic loads the
// data from external memory and feeds the DA filters, that rows are filtered before columns
// with the LL band going on to the next level, and that high sub-bands may be discarded.
module dwt_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned LEVELS = 2,
  parameter int unsigned WORD_W = 16,
  parameter int unsigned PIX_W  = 8,
  localparam int unsigned ACC_W = WORD_W + 12,
  localparam int unsigned AW    = $clog2(N * N),
  localparam int unsigned LW    = $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  op_e                      op,
  input  logic [$clog2(LEVELS+1)-1:0] drop_levels,  // IDWT: zero the high bands of levels below this
  output logic                     ready,
  // external pixel memory
  output logic                     ext_rd,
  output logic [AW-1:0]            ext_addr,
  input  logic [PIX_W-1:0]         ext_data,
  // frame memory
  output logic                     fm_we,
  output logic [AW-1:0]            fm_waddr,
  output logic [WORD_W-1:0]        fm_wdata,
  output logic [AW-1:0]            fm_raddr,
  input  logic [WORD_W-1:0]        fm_rdata,
  // line buffer
  output logic                     lb_we,
  output logic [LW-1:0]            lb_waddr,
  output logic [WORD_W-1:0]        lb_wdata,
  output logic [LW-1:0]            lb_raddr_e,
  output logic [LW-1:0]            lb_raddr_o,
  input  logic [WORD_W-1:0]        lb_rdata_e,
  input  logic [WORD_W-1:0]        lb_rdata_o,
  // filter (the top routes it to the DWT or the IDWT filter by cur_op)
  output op_e                      cur_op,
  output logic                     flt_load,
  output logic signed [WORD_W-1:0] flt_even,
  output logic signed [WORD_W-1:0] flt_odd,
  input  logic                     flt_ready,
  input  logic                     flt_valid,
  input  logic signed [ACC_W-1:0]  flt_a,
  input  logic signed [ACC_W-1:0]  flt_b,
  // status
  output pass_e                    cur_pass,
  output logic [$clog2(LEVELS+1)-1:0] cur_level
);

  typedef enum logic [2:0] { S_IDLE, S_LOAD, S_FILL, S_FILT } state_e;

  state_e              state;
  op_e                 op_r;
  logic [$clog2(LEVELS+1)-1:0] drop_r;   // levels whose LH, HL and HH bands are discarded
  logic                zero_word;
  pass_e               pass;
  logic [$clog2(LEVELS+1)-1:0] lvl;
  logic [LW:0]         line;      // line within the active square
  logic [AW:0]         cnt;       // LOAD / FILL counter
  logic [LW:0]         ld_j;      // loads issued in this line
  logic [LW:0]         out_j;     // results received in this line
  logic [1:0]          wr_phase;  // 0 idle, 1 write band A, 2 write band B
  logic [LW:0]         res_idx;
  logic [WORD_W-1:0]   res_a, res_b;

  logic [LW:0] side, half;
  assign side = (LW+1)'(N) >> lvl;
  assign half = side >> 1;

  assign ready     = (state == S_IDLE);
  assign cur_op    = op_r;
  assign cur_pass  = pass;
  assign cur_level = lvl;

  // Address of position p of the current line.
  function automatic logic [AW-1:0] addr_of(logic [LW:0] ln, logic [LW:0] p, pass_e ps);
    if (ps == PASS_ROWS) return AW'(ln) * AW'(N) + AW'(p);
    else                 return AW'(p)  * AW'(N) + AW'(ln);
  endfunction

  // Round a filter result (scaled by 2^COEF_FRAC) to nearest and saturate to WORD_W bits.
  localparam logic signed [ACC_W-1:0] MAXW = ACC_W'((2**(WORD_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MINW = -ACC_W'(2**(WORD_W-1));
  function automatic logic [WORD_W-1:0] round_sat(logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] r;
    r = (v + ACC_W'(2**(COEF_FRAC-1))) >>> COEF_FRAC;
    if (r > MAXW) r = MAXW;
    if (r < MINW) r = MINW;
    return r[WORD_W-1:0];
  endfunction

  // ---- pair selection for the next filter load ------------------------------------------
  logic [LW:0] pk;   // pair index
  always_comb begin
    if (op_r == OP_DWT) pk = (ld_j == 0) ? half - 1 : ld_j - 1;
    else                pk = (ld_j == half) ? '0 : ld_j;
    if (op_r == OP_DWT) begin
      lb_raddr_e = LW'(pk << 1);
      lb_raddr_o = LW'((pk << 1) + (LW+1)'(1));
    end else begin
      lb_raddr_e = LW'(pk);
      lb_raddr_o = LW'(half + pk);
    end
  end

  assign flt_even = lb_rdata_e;
  assign flt_odd  = lb_rdata_o;
  assign flt_load = (state == S_FILT) && (ld_j <= half) && flt_ready;

  // ---- memory ports ---------------------------------------------------------------------
  logic [LW:0] pos_a, pos_b;
  always_comb begin
    if (op_r == OP_DWT) begin pos_a = res_idx;      pos_b = half + res_idx; end
    else                begin pos_a = res_idx << 1; pos_b = (res_idx << 1) + 1; end
  end

  always_comb begin
    ext_rd   = (state == S_LOAD) && (cnt < (AW+1)'(N * N));
    ext_addr = AW'(cnt);
    fm_raddr = addr_of(line, (LW+1)'(cnt), pass);
    lb_we    = (state == S_FILL);
    lb_waddr = LW'(cnt);
    // Sub-band selection: in the first inverse pass of a discarded level, every word outside
    // the LL quarter of the active square enters the line buffer as zero.
    zero_word = (op_r == OP_IDWT) && (pass == PASS_COLS) && (lvl < drop_r) &&
                (((LW+1)'(cnt) >= half) || (line >= half));
    lb_wdata = zero_word ? '0 : fm_rdata;
    fm_we    = 1'b0;
    fm_waddr = '0;
    fm_wdata = '0;
    if (state == S_LOAD) begin
      fm_we    = (cnt != 0);
      fm_waddr = AW'(cnt - 1);
      fm_wdata = WORD_W'($signed({1'b0, ext_data}) - $signed((PIX_W+1)'(2**(PIX_W-1))));
    end else if (state == S_FILT && wr_phase != 0) begin
      fm_we    = 1'b1;
      fm_waddr = addr_of(line, (wr_phase == 1) ? pos_a : pos_b, pass);
      fm_wdata = (wr_phase == 1) ? res_a : res_b;
    end
  end

  // ---- sequencing -----------------------------------------------------------------------
  logic line_done;
  assign line_done = (state == S_FILT) && (out_j == half + 1) && (wr_phase == 0) && !flt_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      op_r     <= OP_DWT;
      drop_r   <= '0;
      pass     <= PASS_ROWS;
      lvl      <= '0;
      line     <= '0;
      cnt      <= '0;
      ld_j     <= '0;
      out_j    <= '0;
      wr_phase <= '0;
      res_idx  <= '0;
      res_a    <= '0;
      res_b    <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          op_r   <= op;
          drop_r <= drop_levels;
          cnt  <= '0;
          line <= '0;
          if (op == OP_DWT) begin
            state <= S_LOAD;
            lvl   <= '0;
            pass  <= PASS_ROWS;
          end else begin
            state <= S_FILL;
            lvl   <= ($clog2(LEVELS+1))'(LEVELS - 1);
            pass  <= PASS_COLS;
          end
        end

        S_LOAD: begin
          if (cnt == (AW+1)'(N * N)) begin
            state <= S_FILL;
            cnt   <= '0;
          end else cnt <= cnt + 1;
        end

        S_FILL: begin
          if (cnt == (AW+1)'(side - 1)) begin
            state    <= S_FILT;
            ld_j     <= '0;
            out_j    <= '0;
            wr_phase <= '0;
          end else cnt <= cnt + 1;
        end

        S_FILT: begin
          if (flt_load) ld_j <= ld_j + 1;
          if (flt_valid) begin
            out_j <= out_j + 1;
            if (out_j != 0) begin
              res_a    <= round_sat(flt_a);
              res_b    <= round_sat(flt_b);
              res_idx  <= out_j - 1;
              wr_phase <= 2'd1;
            end
          end else if (wr_phase == 2'd1) wr_phase <= 2'd2;
          else if (wr_phase == 2'd2)      wr_phase <= 2'd0;

          if (line_done) begin
            cnt <= '0;
            if (line != side - 1) begin
              line  <= line + 1;
              state <= S_FILL;
            end else begin
              line  <= '0;
              state <= S_FILL;
              if (op_r == OP_DWT) begin
                if (pass == PASS_ROWS) pass <= PASS_COLS;
                else if (lvl != ($clog2(LEVELS+1))'(LEVELS - 1)) begin
                  pass <= PASS_ROWS;
                  lvl  <= lvl + 1;
                end else state <= S_IDLE;
              end else begin
                if (pass == PASS_COLS) pass <= PASS_ROWS;
                else if (lvl != 0) begin
                  pass <= PASS_COLS;
                  lvl  <= lvl - 1;
                end else state <= S_IDLE;
              end
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // The two write-back clocks of a result end before the next result arrives.
  a_writeback: assert property (@(posedge clk) disable iff (rst) flt_valid |-> wr_phase == 2'd0);
  // The filter is loaded only when it is ready.
  a_load_ready: assert property (@(posedge clk) disable iff (rst) flt_load |-> flt_ready);

endmodule

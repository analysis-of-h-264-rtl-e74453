// INTERP pipeline stage: fractional-sample interpolation and pixel
// reconstruction of one macroblock, 4x4 block by 4x4 block.
//
// Two identical interpolation units, each a luma and a chroma
// interpolator, work on L0 and L1 of the same block at the same time, so a
// bi-predicted block costs no more interpolation time than a one-list
// block. For each block index 0..15 (double-z order) the stage
//   1. reads the block's row of all four reference data buffer memories
//      (one cycle, the block index change, shared with the last cycle of
//      the previous block),
//   2. starts both units; luma takes 5 or 6 cycles by fraction, chroma 5,
//   3. hands the predictions and the block's residual to pixel_recon,
//      2 cycles for one list, 3 for bi-prediction,
//   4. emits the reconstructed block (rec_valid) and moves on.
// A block therefore takes 8 to 10 cycles; with mb_start in cycle 0, mb_done
// is high in cycle 2 + (sum of the block times), 130 to 162.
//
// Interface: mb_start (one cycle, with pred_flag per 8x8 valid) begins a
// macroblock whose reference rows sit in the read half of the buffer.
// res_blk names the block whose residual must be present on resid; it is
// sampled while pixel_recon runs. rec_valid pulses once per block with
// rec_blk and rec (16 luma row-major, 4 Cb, 4 Cr); mb_done pulses after the
// last block. busy is high from mb_start to mb_done. A macroblock with no
// pred_flag bit set (intra) produces no output and mb_done follows mb_start
// in the next cycle; its samples come from intra prediction, outside this
// unit.
//
// Follows the document: two interpolation units for L0 and L1, the 5-6 +
// 2-3 + 1 cycle block schedule and reading the reference rows of a whole MB
// from the buffer. This design's own: the 2 start-up cycles (130-162
// cycles per MB where the document quotes 128-160), waiting only for the
// lists a block uses, and the residual interface.
module interp_stage
  import mc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   mb_start,
  input  logic [3:0][1:0]        pred_flag,
  output logic                   busy,
  output logic                   mb_done,
  // reference data buffer read port
  output logic                   buf_re,
  output logic [3:0]             buf_raddr,
  input  logic [LROW_W-1:0]      rluma_l0,
  input  logic [LROW_W-1:0]      rluma_l1,
  input  logic [CROW_W-1:0]      rchroma_l0,
  input  logic [CROW_W-1:0]      rchroma_l1,
  // residual of the current block
  output logic [3:0]             res_blk,
  input  logic [23:0][RES_W-1:0] resid,
  // reconstructed block
  output logic                   rec_valid,
  output logic [3:0]             rec_blk,
  output pix_t [23:0]            rec
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_INTERP, S_WAIT, S_RECON} state_e;
  state_e          st;
  logic [3:0]      blk;
  logic [3:0][1:0] pf_q;
  logic [1:0]      pf_blk;
  logic            go;                   // start both interpolation units
  logic [3:0]      got;                  // done flags: luma0, chroma0, luma1, chroma1
  logic [3:0]      dn;
  logic            all_done;

  lrow_t lw0, lw1;
  crow_t cw0, cw1;
  assign lw0 = lrow_t'(rluma_l0);
  assign lw1 = lrow_t'(rluma_l1);
  assign cw0 = crow_t'(rchroma_l0);
  assign cw1 = crow_t'(rchroma_l1);

  pix_t [15:0] yp0, yp1;
  pix_t [3:0]  cbp0, crp0, cbp1, crp1;

  // Interpolation unit for L0. The luma quarter-sample fraction is the low
  // two bits of the stored eighth-sample chroma fraction (the chroma MV is
  // the luma MV read in eighths of a chroma sample).
  luma_interp u_luma0 (.clk, .rst_n, .start(go), .xfrac(cw0.cfx[1:0]), .yfrac(cw0.cfy[1:0]),
                       .win(lw0), .pred(yp0), .done(dn[0]));
  chroma_interp u_chroma0 (.clk, .rst_n, .start(go), .cfx(cw0.cfx[2:0]), .cfy(cw0.cfy[2:0]),
                           .win_cb(cw0.cb), .win_cr(cw0.cr), .pred_cb(cbp0), .pred_cr(crp0),
                           .done(dn[1]));
  // interpolation unit for L1
  luma_interp u_luma1 (.clk, .rst_n, .start(go), .xfrac(cw1.cfx[1:0]), .yfrac(cw1.cfy[1:0]),
                       .win(lw1), .pred(yp1), .done(dn[2]));
  chroma_interp u_chroma1 (.clk, .rst_n, .start(go), .cfx(cw1.cfx[2:0]), .cfy(cw1.cfy[2:0]),
                           .win_cb(cw1.cb), .win_cr(cw1.cr), .pred_cb(cbp1), .pred_cr(crp1),
                           .done(dn[3]));

  // pixel reconstruction
  logic        rec_go, rec_dn;
  pix_t [23:0] pl0, pl1;
  assign pl0 = {crp0, cbp0, yp0};
  assign pl1 = {crp1, cbp1, yp1};

  pixel_recon u_recon (.clk, .rst_n, .start(rec_go), .pred_flag(pf_blk), .pred_l0(pl0),
                       .pred_l1(pl1), .resid, .recon(rec), .done(rec_dn));

  // the 8x8 quadrant of a double-z block index is its top two bits
  assign pf_blk   = pf_q[blk[3:2]];
  // only the units of the lists the block uses are waited for
  assign all_done = &(got | dn | ~{pf_blk[1], pf_blk[1], pf_blk[0], pf_blk[0]});
  assign res_blk  = blk;
  assign busy     = (st != S_IDLE);
  // the read of the next block shares the cycle that completes this one
  assign buf_re    = (st == S_READ) || ((st == S_RECON) && rec_dn && (blk != 4'd15));
  assign buf_raddr = (st == S_READ) ? blk : blk + 4'd1;
  assign go       = (st == S_INTERP);
  assign rec_go   = (st == S_WAIT) && all_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; blk <= '0; pf_q <= '0; got <= '0;
      rec_valid <= 1'b0; rec_blk <= '0; mb_done <= 1'b0;
    end else begin
      rec_valid <= 1'b0;
      mb_done   <= 1'b0;
      unique case (st)
        S_IDLE: if (mb_start) begin
          pf_q <= pred_flag;
          blk  <= '0;
          if (pred_flag == '0) mb_done <= 1'b1;   // intra MB: nothing to predict here
          else                 st      <= S_READ;
        end
        S_READ:   st <= S_INTERP;
        S_INTERP: begin got <= '0; st <= S_WAIT; end
        S_WAIT: begin
          got <= got | dn;
          if (all_done) st <= S_RECON;
        end
        S_RECON: if (rec_dn) begin
          rec_valid <= 1'b1;
          rec_blk   <= blk;
          blk       <= blk + 4'd1;
          if (blk == 4'd15) begin
            mb_done <= 1'b1;
            st      <= S_IDLE;
          end else begin
            st <= S_INTERP;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule

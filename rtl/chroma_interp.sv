// Eighth-sample chroma interpolator for one 4x4 luma block (2x2 Cb, 2x2 Cr).
//
// Each predicted sample is the weighted mean of its four nearest integer
// samples A, B, C, D with fraction (x, y) in eighths:
//   ((8-x)(8-y)A + x(8-y)B + (8-x)yC + xyD + 32) >> 6.
// It is computed in two registered steps, horizontal then vertical:
//   t0 = (8-x)A + xB, t1 = (8-x)C + xD, out = ((8-y)t0 + y t1 + 32) >> 6,
// which gives the same value. Cb and Cr have their own filter, so the unit
// makes one Cb and one Cr sample per cycle.
//
// Input windows are 3x3 per component, sample (x, y) of the 2x2 block at
// integer position sits at win[y][x]. Timing: start is a one-cycle pulse
// with cfx/cfy valid; sample 0 is issued in the start cycle and samples
// 1..3 in the next three; the windows must stay stable until done. With
// start in cycle 0, done is high in cycle 5. pred_cb/pred_cr are row-major
// (pred[2*y+x]) and held until the next start.
//
// Follows the document: the eq. (4.9) bilinear weights, Cb and Cr side by
// side at one sample each per cycle, 5 cycles per block. This design's own:
// the separable horizontal-then-vertical form with a full-precision
// intermediate (it gives exactly the eq. (4.9) result) and the handshake.
module chroma_interp
  import mc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [2:0]                cfx,
  input  logic [2:0]                cfy,
  input  pix_t [CWIN-1:0][CWIN-1:0] win_cb,
  input  pix_t [CWIN-1:0][CWIN-1:0] win_cr,
  output pix_t [3:0]                pred_cb,
  output pix_t [3:0]                pred_cr,
  output logic                      done
);
  logic [2:0] fx_q, fy_q, fx_c;
  logic       busy, act;
  logic [1:0] cnt, idx;
  logic [1:0] px, py;

  assign act  = start || busy;
  assign idx  = start ? 2'd0 : cnt;
  assign fx_c = start ? cfx : fx_q;
  assign px   = {1'b0, idx[0]};
  assign py   = {1'b0, idx[1]};

  // stage 1: horizontal weighting of the upper and lower sample pairs
  logic [10:0] t0_cb, t1_cb, t0_cr, t1_cr;
  logic [10:0] t0_cb_q, t1_cb_q, t0_cr_q, t1_cr_q;
  logic        s1_vld;
  logic [1:0]  s1_idx;

  function automatic logic [10:0] hw(input logic [2:0] f, input pix_t l, input pix_t r);
    return (11'd8 - 11'(f)) * 11'(l) + 11'(f) * 11'(r);
  endfunction

  always_comb begin
    t0_cb = hw(fx_c, win_cb[py][px],   win_cb[py][px+1]);
    t1_cb = hw(fx_c, win_cb[py+1][px], win_cb[py+1][px+1]);
    t0_cr = hw(fx_c, win_cr[py][px],   win_cr[py][px+1]);
    t1_cr = hw(fx_c, win_cr[py+1][px], win_cr[py+1][px+1]);
  end

  // stage 2: vertical weighting, rounding and shift
  function automatic pix_t vw(input logic [2:0] f, input logic [10:0] t0, input logic [10:0] t1);
    logic [14:0] s;
    s = (15'd8 - 15'(f)) * 15'(t0) + 15'(f) * 15'(t1) + 15'd32;
    return pix_t'(s >> 6);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fx_q <= '0; fy_q <= '0; busy <= 1'b0; cnt <= '0;
      s1_vld <= 1'b0; s1_idx <= '0;
      t0_cb_q <= '0; t1_cb_q <= '0; t0_cr_q <= '0; t1_cr_q <= '0;
      pred_cb <= '0; pred_cr <= '0; done <= 1'b0;
    end else begin
      if (start) begin
        fx_q <= cfx; fy_q <= cfy; busy <= 1'b1; cnt <= 2'd1;
      end else if (busy) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) busy <= 1'b0;
      end
      s1_vld  <= act;
      s1_idx  <= idx;
      t0_cb_q <= t0_cb; t1_cb_q <= t1_cb;
      t0_cr_q <= t0_cr; t1_cr_q <= t1_cr;
      if (s1_vld) begin
        pred_cb[s1_idx] <= vw(fy_q, t0_cb_q, t1_cb_q);
        pred_cr[s1_idx] <= vw(fy_q, t0_cr_q, t1_cr_q);
      end
      done <= s1_vld && (s1_idx == 2'd3);
    end
  end
endmodule

// Motion vector prediction processing element.
//
// Reconstructs the MV of one partition of one list in three cycles:
//   cycle 0 (start): the neighbouring MV data A (left), B (above),
//                    C (above right) and D (above left) are registered;
//   cycle 1: the predictor MVp is derived;
//   cycle 2: the decoded difference mvd is added; done is high in cycle 2
//            with mv valid, so the caller can store it at the end of the
//            cycle and start the next block in cycle 3.
// Predictor rules (H.264 clause 8.4.1.3):
//   - C is replaced by D when C is not available;
//   - 16x8 upper partition: B if B uses the same reference index;
//     16x8 lower: A; 8x16 left: A; 8x16 right: C (same condition);
//   - otherwise the median path: when B and C are unavailable and A is
//     available, B and C take A's data; if exactly one of A, B, C uses the
//     same reference index its MV is the predictor, else the componentwise
//     median of A, B and C.
// A neighbour that is unavailable, or does not use this list, must be given
// with ref_idx = -1 and a zero MV. Skip and direct predictions are not
// handled. mv is only valid in the done cycle.
//
// Follows the document: three cycles per block (neighbours, predictor, add
// mvd) and the median / 16x8 / 8x16 rules. This design's own: the register
// placement and the MV widths; skip and direct prediction are not covered.
module mvp_pe
  import mc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  mvp_dir_e                dir,
  input  logic [REF_W-1:0]        ref_idx,
  input  mvinfo_t                 na, nb, nc, nd,
  input  logic                    avail_a, avail_b, avail_c, avail_d,
  input  mv_t                     mvd,
  output mv_t                     mv,
  output logic                    done
);
  // cycle 0 registers
  mvinfo_t                 a_q, b_q, c_q;
  logic                    av_a_q, av_b_q, av_c_q;
  mvp_dir_e                dir_q;
  logic [REF_W-1:0]        ref_q;
  mv_t                     mvd_q, mvp_q;
  logic                    s1;

  function automatic logic signed [MVX_W-1:0] med_x(input logic signed [MVX_W-1:0] p, q, r);
    if ((p <= q && q <= r) || (r <= q && q <= p)) return q;
    if ((q <= p && p <= r) || (r <= p && p <= q)) return p;
    return r;
  endfunction
  function automatic logic signed [MVY_W-1:0] med_y(input logic signed [MVY_W-1:0] p, q, r);
    if ((p <= q && q <= r) || (r <= q && q <= p)) return q;
    if ((q <= p && p <= r) || (r <= p && p <= q)) return p;
    return r;
  endfunction

  // cycle 1: predictor
  mv_t mvp_c;
  always_comb begin
    mvinfo_t mb, mc;
    logic ea, eb, ec;
    mb = b_q; mc = c_q;
    if (!av_b_q && !av_c_q && av_a_q) begin mb = a_q; mc = a_q; end
    ea = (a_q.ref_idx == ref_q);
    eb = (mb.ref_idx == ref_q);
    ec = (mc.ref_idx == ref_q);
    mvp_c = a_q.mv;
    if      (ea && !eb && !ec) mvp_c = a_q.mv;
    else if (!ea && eb && !ec) mvp_c = mb.mv;
    else if (!ea && !eb && ec) mvp_c = mc.mv;
    else begin
      mvp_c.x = med_x(a_q.mv.x, mb.mv.x, mc.mv.x);
      mvp_c.y = med_y(a_q.mv.y, mb.mv.y, mc.mv.y);
    end
    unique case (dir_q)
      MVP_16X8_UP:    if (b_q.ref_idx == ref_q) mvp_c = b_q.mv;
      MVP_16X8_LO:    if (a_q.ref_idx == ref_q) mvp_c = a_q.mv;
      MVP_8X16_LEFT:  if (a_q.ref_idx == ref_q) mvp_c = a_q.mv;
      MVP_8X16_RIGHT: if (c_q.ref_idx == ref_q) mvp_c = c_q.mv;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= MVINFO_NONE; b_q <= MVINFO_NONE; c_q <= MVINFO_NONE;
      av_a_q <= 1'b0; av_b_q <= 1'b0; av_c_q <= 1'b0;
      dir_q <= MVP_MEDIAN; ref_q <= '0; mvd_q <= '0; mvp_q <= '0;
      s1 <= 1'b0; done <= 1'b0;
    end else begin
      s1   <= start;
      done <= s1;
      if (start) begin
        a_q    <= na;
        b_q    <= nb;
        c_q    <= avail_c ? nc : nd;
        av_a_q <= avail_a;
        av_b_q <= avail_b;
        av_c_q <= avail_c | avail_d;
        dir_q  <= dir;
        ref_q  <= ref_idx;
        mvd_q  <= mvd;
      end
      if (s1) mvp_q <= mvp_c;
    end
  end

  // cycle 2: add mvd
  assign mv.x = mvp_q.x + mvd_q.x;
  assign mv.y = mvp_q.y + mvd_q.y;
endmodule

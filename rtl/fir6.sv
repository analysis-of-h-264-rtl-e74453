// 6-tap luma half-sample filter, taps (1, -5, 20, 20, -5, 1).
//
// Combinational. The multiplications are replaced by shifts and additions
// as in the filter tree of the design: t = 4*(C+D) - (B+E), then
// A+F + t + 4*t + 16 = A - 5B + 20C + 20D - 5E + F + 16, so the rounding
// constant rides in the last adder. The rounded sum is shifted right by 5
// and clipped to 0..255. All six inputs are 8-bit samples: the second
// filtering pass of the interpolator feeds 8-bit clipped half samples
// (intermediates truncated to 8 bits), so no wider input is needed.
//
// Ports: a..f are the six taps in order, q the clipped half sample. The
// internal sum spans -2550..10710 and needs 15 signed bits.
//
// Follows the document: the shift-and-add form of the filter. This
// design's own: adding the rounding constant in the final adder and clipping
// inside the filter.
module fir6
  import mc_pkg::*;
(
  input  pix_t               a, b, c, d, e, f,
  output pix_t               q
);
  logic signed [14:0] af, be, cd, t, rnd;

  always_comb begin
    af  = 15'(a) + 15'(f);
    be  = 15'(b) + 15'(e);
    cd  = 15'(c) + 15'(d);
    t   = (cd <<< 2) - be;
    rnd = af + t + ((t <<< 2) + 15'sd16);
    q   = clip1(16'(rnd >>> 5));
  end
endmodule

// Data request generator: the reference area one partition needs.
//
// Block size based request: one request covers the whole partition
// (4w x 4h luma samples, w and h in 4x4 units) instead of one 9x9 window
// per 4x4 block. Precision based request: the six-tap filter margin
// (2 samples before, 3 after) is only fetched in a direction whose MV
// fraction is non-zero, so the luma area is (M+5)x(N+5), (M+5)xN,
// Mx(N+5) or MxN for an MxN partition.
//
// The luma area is given in the coordinates of the 21x21 register array,
// whose cell (0,0) is the sample at (partition position + integer MV - 2)
// in both directions; a precision-reduced request fills only rows
// row_first..row_last and columns col_first..col_last of it. Chroma always
// takes (2w+1)x(2h+1) samples per component starting at the integer chroma
// position; the chroma MV is the luma MV read in eighths of a chroma sample.
// Combinational.
//
// Follows the document: one request per partition and the four area
// classes of the precision based request. This design's own: the array
// coordinates, and fetching chroma always at (2w+1)x(2h+1).
module data_request_gen
  import mc_pkg::*;
(
  input  mv_t              mv,
  input  logic [1:0]       ox, oy,      // partition origin, 4x4 units
  input  logic [2:0]       w, h,        // partition size, 4x4 units
  input  logic [MBX_W-1:0] mb_x,
  input  logic [MBY_W-1:0] mb_y,
  // luma: picture position of array cell (0,0) and the filled range
  output int               lx0,
  output int               ly0,
  output logic [4:0]       col_first, col_last,
  output logic [4:0]       row_first, row_last,
  // chroma: picture position of the first sample, and size
  output int               cx0,
  output int               cy0,
  output logic [4:0]       ccols,
  output logic [4:0]       crows,
  // fractions
  output logic [2:0]       cfx, cfy
);
  logic signed [MVX_W-1:0] smx;
  logic signed [MVY_W-1:0] smy;
  logic [1:0] xfrac, yfrac;
  int mvx, mvy, pw, ph;
  assign smx = mv.x;
  assign smy = mv.y;

  always_comb begin
    mvx   = int'(smx);
    mvy   = int'(smy);
    pw    = 4 * int'(w);
    ph    = 4 * int'(h);
    xfrac = mv.x[1:0];
    yfrac = mv.y[1:0];
    cfx   = mv.x[2:0];
    cfy   = mv.y[2:0];
    lx0   = 16 * int'(mb_x) + 4 * int'(ox) + (mvx >>> 2) - 2;
    ly0   = 16 * int'(mb_y) + 4 * int'(oy) + (mvy >>> 2) - 2;
    col_first = (xfrac != 2'd0) ? 5'd0 : 5'd2;
    col_last  = 5'((xfrac != 2'd0) ? pw + 4 : pw + 1);
    row_first = (yfrac != 2'd0) ? 5'd0 : 5'd2;
    row_last  = 5'((yfrac != 2'd0) ? ph + 4 : ph + 1);
    cx0   = 8 * int'(mb_x) + 2 * int'(ox) + (mvx >>> 3);
    cy0   = 8 * int'(mb_y) + 2 * int'(oy) + (mvy >>> 3);
    ccols = 5'(2 * int'(w) + 1);
    crows = 5'(2 * int'(h) + 1);
  end
endmodule

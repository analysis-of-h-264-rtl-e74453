// Shared types and constants of the two-stage motion compensation (MC) unit.
//
// A macroblock (MB) is 16x16 luma plus two 8x8 chroma blocks (YUV 4:2:0).
// It is handled as sixteen 4x4 luma blocks per prediction list, numbered in
// double-z order: for block index {b3,b2,b1,b0} the 4x4 column is {b2,b0}
// and the 4x4 row is {b3,b1}. The MV generation stage walks the 32 indices
// of L0 then L1 (index 0..15 = L0, 16..31 = L1).
//
// Motion vectors are quarter-pel luma units. The MV and reference index
// widths are this design's choice (the H.264 level limits for 1080p video:
// horizontal range [-2048, 2047.75] pixels, vertical [-512, 511.75]).
//
// Follows the document: the 9x9 luma and 3x3 chroma windows per block, the
// 21-sample row and the double-z numbering. This design's own: every field
// width and encoding.
package mc_pkg;

  localparam int PIX_W    = 8;      // sample width
  localparam int MVX_W    = 14;     // horizontal MV, quarter-pel
  localparam int MVY_W    = 12;     // vertical MV, quarter-pel
  localparam int REF_W    = 3;      // signed reference index, -1 = not used
  localparam int RES_W    = 9;      // signed residual sample
  localparam int COORD_W  = 13;     // signed picture coordinate
  localparam int MBX_W    = 7;      // MB column, up to 127
  localparam int MBY_W    = 7;      // MB row, up to 127

  // Reference window sizes held for one 4x4 block.
  localparam int LWIN     = 9;      // 9x9 luma window
  localparam int CWIN     = 3;      // 3x3 chroma window per component
  localparam int LROW_W   = LWIN*LWIN*PIX_W;          // 648 bits
  localparam int FRAC_W   = 4;                        // stored chroma fraction field
  localparam int CROW_W   = 2*FRAC_W + 2*CWIN*CWIN*PIX_W; // 152 bits
  localparam int ARR      = 21;     // 21x21 luma register array
  localparam int CARR     = 9;      // 9x9 chroma register arrays

  typedef logic [PIX_W-1:0] pix_t;

  // Struct fields are kept unsigned; users apply signed'() where the sign
  // matters (comparison, extension, arithmetic shift).
  typedef struct packed {
    logic [MVX_W-1:0] x;     // two's complement
    logic [MVY_W-1:0] y;     // two's complement
  } mv_t;

  // One entry of the neighbouring / current MV buffers.
  typedef struct packed {
    mv_t                     mv;
    logic [REF_W-1:0]        ref_idx;   // two's complement, -1: list not used / unavailable
  } mvinfo_t;

  localparam mvinfo_t MVINFO_NONE = '{mv: '0, ref_idx: '1};

  // Macroblock partition (mb_type) and 8x8 sub-partition (sub_mb_type).
  typedef enum logic [1:0] {PART_16X16 = 2'd0, PART_16X8 = 2'd1,
                            PART_8X16  = 2'd2, PART_8X8  = 2'd3} mb_part_e;
  typedef enum logic [1:0] {SUB_8X8 = 2'd0, SUB_8X4 = 2'd1,
                            SUB_4X8 = 2'd2, SUB_4X4 = 2'd3} sub_part_e;

  // Direction rule of the MV predictor (Fig. 4.3).
  typedef enum logic [2:0] {MVP_MEDIAN = 3'd0, MVP_16X8_UP = 3'd1, MVP_16X8_LO = 3'd2,
                            MVP_8X16_LEFT = 3'd3, MVP_8X16_RIGHT = 3'd4} mvp_dir_e;

  // Per-MB input of the MC unit (from entropy decoding / MB header).
  typedef struct packed {
    logic [MBX_W-1:0]               mb_x;
    logic [MBY_W-1:0]               mb_y;
    mb_part_e                       part;
    logic [3:0][1:0]                sub;        // sub_part_e per 8x8 (only for PART_8X8)
    logic [3:0][1:0]                pred_flag;  // per 8x8: bit0 = L0, bit1 = L1
    logic [3:0][REF_W-1:0]          ref_l0;     // per 8x8
    logic [3:0][REF_W-1:0]          ref_l1;
    logic [15:0][MVX_W+MVY_W-1:0]   mvd_l0;     // per 4x4 block index, used at a partition's first block
    logic [15:0][MVX_W+MVY_W-1:0]   mvd_l1;
  } mb_info_t;

  // A partition whose MV is final, sent from MV generation to reference pixel accessing.
  typedef struct packed {
    logic                    list;     // 0 = L0, 1 = L1
    logic [1:0]              ox, oy;   // origin in 4x4 units
    logic [2:0]              w, h;     // size in 4x4 units (1, 2 or 4)
    mv_t                     mv;
    logic [REF_W-1:0]        ref_idx;
  } part_desc_t;

  // Row layouts of the reference data buffer.
  typedef pix_t [LWIN-1:0][LWIN-1:0] lrow_t;   // [row][col], 648 bits
  typedef struct packed {
    logic [FRAC_W-1:0]         cfx;          // chroma MV fraction, eighths (0..7)
    logic [FRAC_W-1:0]         cfy;
    pix_t [CWIN-1:0][CWIN-1:0] cb;
    pix_t [CWIN-1:0][CWIN-1:0] cr;
  } crow_t;                                  // 152 bits

  // Row request to the external memory controller.
  typedef enum logic [1:0] {PL_Y = 2'd0, PL_CB = 2'd1, PL_CR = 2'd2} plane_e;
  typedef struct packed {
    plane_e                  plane;
    logic                    list;
    logic [REF_W-1:0]        ref_idx;
    logic [COORD_W-1:0]      x;        // first sample, inside the picture
    logic [COORD_W-1:0]      y;        // row, inside the picture
    logic [4:0]              len;      // samples needed, 1..21
  } mem_req_t;

  // Double-z block index <-> 4x4 position.
  function automatic logic [1:0] blk_x(input logic [3:0] idx);
    return {idx[2], idx[0]};
  endfunction
  function automatic logic [1:0] blk_y(input logic [3:0] idx);
    return {idx[3], idx[1]};
  endfunction
  function automatic logic [3:0] blk_idx(input logic [1:0] bx, input logic [1:0] by);
    return {by[1], bx[1], by[0], bx[0]};
  endfunction

  function automatic pix_t clip1(input logic signed [15:0] v);
    if (v < 0) return '0;
    else if (v > 255) return 8'd255;
    else return v[7:0];
  endfunction

endpackage

// Reference data buffer between the MVG and INTERP pipeline stages.
//
// Four on-chip memories: luma and chroma for L0 and for L1. Each holds 16
// rows per macroblock, one row per 4x4 block index (double-z order):
//   luma row   : the 9x9 reference window, 81 samples = 648 bits;
//   chroma row : {cfx, cfy, 3x3 Cb, 3x3 Cr}, fractions stored in 4-bit
//                fields, 152 bits.
// Every memory is doubled into a ping-pong pair of 16-row halves, so that
// the MVG stage fills one macroblock while the INTERP stage reads the
// previous one: 2 x 2 x 16 x (648 + 152) bits = 6.25 KiB.
//
// Interface: the write side (one row per cycle, list selected by wlist)
// always goes to half wsel; the read side reads the same row address of all
// four memories from the other half, with one cycle of latency (registered
// like a synchronous SRAM). A swap pulse exchanges the halves; it is given
// by the pipeline control when both stages have finished their macroblock.
//
// Follows the document: four memories (luma and chroma for L0 and L1), 16
// rows each, used as a ping-pong buffer of 6.25 KB in all. This design's
// own: the 4-bit fraction fields (chosen so the total matches) and the port
// timing.
module ref_data_buffer
  import mc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              swap,
  output logic              wsel,
  // write port (MVG stage)
  input  logic              we,
  input  logic              wlist,
  input  logic [3:0]        waddr,
  input  logic [LROW_W-1:0] wluma,
  input  logic [CROW_W-1:0] wchroma,
  // read port (INTERP stage)
  input  logic              re,
  input  logic [3:0]        raddr,
  output logic [LROW_W-1:0] rluma_l0,
  output logic [LROW_W-1:0] rluma_l1,
  output logic [CROW_W-1:0] rchroma_l0,
  output logic [CROW_W-1:0] rchroma_l1
);
  logic [LROW_W-1:0] luma_l0   [32];
  logic [LROW_W-1:0] luma_l1   [32];
  logic [CROW_W-1:0] chroma_l0 [32];
  logic [CROW_W-1:0] chroma_l1 [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wsel <= 1'b0;
    else if (swap) wsel <= ~wsel;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      if (!wlist) begin
        luma_l0[{wsel, waddr}]   <= wluma;
        chroma_l0[{wsel, waddr}] <= wchroma;
      end else begin
        luma_l1[{wsel, waddr}]   <= wluma;
        chroma_l1[{wsel, waddr}] <= wchroma;
      end
    end
    if (re) begin
      rluma_l0   <= luma_l0[{~wsel, raddr}];
      rluma_l1   <= luma_l1[{~wsel, raddr}];
      rchroma_l0 <= chroma_l0[{~wsel, raddr}];
      rchroma_l1 <= chroma_l1[{~wsel, raddr}];
    end
  end
endmodule

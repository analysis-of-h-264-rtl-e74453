// Neighbouring MV buffer: motion data of the bottom row of 4x4 blocks of
// every macroblock in one MB row, kept for the MB row below.
//
// One on-chip memory per list with one word per MB column; a word holds
// the four bottom 4x4 blocks (block x = 0..3) of that MB as mvinfo_t
// {mv, ref_idx}. MB_COLS defaults to 120 columns, one 1080p row.
// Synchronous memory: read data appear the cycle after re (both lists read
// together); a write updates both lists of one column.
//
// Follows the document: one memory per list holding the bottom four blocks
// of every MB column, 120 columns for 1920-sample pictures. This design's
// own: the 29-bit entry (the document's 2.46 KB total implies a narrower
// one) and the read latency.
module nb_mv_buffer
  import mc_pkg::*;
#(
  parameter int MB_COLS = 120
) (
  input  logic                clk,
  input  logic                re,
  input  logic [MBX_W-1:0]    raddr,
  output mvinfo_t [3:0]       rdata_l0,
  output mvinfo_t [3:0]       rdata_l1,
  input  logic                we,
  input  logic [MBX_W-1:0]    waddr,
  input  mvinfo_t [3:0]       wdata_l0,
  input  mvinfo_t [3:0]       wdata_l1
);
  mvinfo_t [3:0] mem_l0 [MB_COLS];
  mvinfo_t [3:0] mem_l1 [MB_COLS];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < MB_COLS) begin
      mem_l0[waddr] <= wdata_l0;
      mem_l1[waddr] <= wdata_l1;
    end
    if (re) begin
      rdata_l0 <= (int'(raddr) < MB_COLS) ? mem_l0[raddr] : {4{MVINFO_NONE}};
      rdata_l1 <= (int'(raddr) < MB_COLS) ? mem_l1[raddr] : {4{MVINFO_NONE}};
    end
  end
endmodule

// Partition queue between MV generation and reference pixel accessing.
//
// A plain synchronous first-in first-out queue of partition descriptors
// (list, position, size, final MV, reference index). It lets MV generation
// run ahead of the row requests of reference pixel accessing: with the
// default depth of 32, every partition of one macroblock (at most 16 per
// list) fits, so MV generation never waits on the external memory.
// The depth is this design's choice.
//
// Interface: in_valid/in_ready and out_valid/out_ready handshakes; a
// transfer happens in a cycle where both are high. Data written in one
// cycle can be read from the next cycle on. empty is high when nothing is
// queued.
module part_fifo
  import mc_pkg::*;
#(
  parameter int DEPTH = 32
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  part_desc_t in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output part_desc_t out_data,
  output logic       empty
);
  localparam int AW = $clog2(DEPTH);

  part_desc_t       mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;
  logic             push, pop;

  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign empty     = (cnt == '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end
endmodule

// Behavioural model of the external reference picture memory.
//
// Accepts row requests (mem_req_t) on a valid/ready port and answers each
// with one response of 21 samples, in request order, LAT cycles after it
// was accepted. Sample i of a response is ref_pix(plane, list, ref_idx,
// x + i, y) for i < len and 0 beyond. When stall_en is high the ready
// signal drops at random (about one cycle in four) to exercise the
// requester's back-pressure handling. Pictures are not stored: the
// contents come from mc_tb_pkg::ref_pix. This stands in for the memory
// controller and DDR memory, which the design does not include.
//
// Its port and timing are this design's own; the document gives only the
// 21-sample row width.
module ref_mem_model
  import mc_pkg::*;
  import mc_tb_pkg::*;
#(
  parameter int LAT   = 4
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           stall_en,
  input  logic           req_valid,
  output logic           req_ready,
  input  mem_req_t       req,
  output logic           resp_valid,
  output pix_t [ARR-1:0] resp_data
);
  typedef struct {
    mem_req_t r;
    longint   due;
  } entry_t;
  entry_t q[$];
  longint cyc;
  logic   rdy;

  assign req_ready = rdy;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= 0; resp_valid <= 1'b0; resp_data <= '0; rdy <= 1'b1;
      q.delete();
    end else begin
      cyc <= cyc + 1;
      if (req_valid && rdy) q.push_back('{r: req, due: cyc + LAT - 1});
      resp_valid <= 1'b0;
      if (q.size() > 0 && q[0].due <= cyc) begin
        entry_t e;
        e = q.pop_front();
        resp_valid <= 1'b1;
        for (int i = 0; i < ARR; i++)
          resp_data[i] <= (i < int'(e.r.len))
                          ? ref_pix(int'(e.r.plane), int'(e.r.list), int'(e.r.ref_idx),
                                    int'(e.r.x) + i, int'(e.r.y))
                          : 8'h00;
      end
      rdy <= !stall_en || ($urandom_range(3) != 0);
    end
  end
endmodule

// Pixel reconstruction of one 4x4 block: 16 luma, 4 Cb and 4 Cr samples.
//
// The two interpolation units deliver the L0 and L1 predictions. For a
// block predicted from one list that prediction is taken; for a
// bi-predicted block the two are averaged with rounding, (p0 + p1 + 1) >> 1
// (default weighted prediction of H.264; explicit weights are not handled).
// The residual is then added and the sum clipped to 0..255.
//
// Timing: start is a one-cycle pulse with pred_flag, the predictions and
// the residual valid; they must stay stable until done. With start in
// cycle 0 the prediction is latched at the end of cycle 0; a bi-predicted
// block spends one more cycle in the averaging step; done is high in
// cycle 2 (one list) or cycle 3 (bi-prediction) with recon valid and held.
// Sample order: index 0..15 luma row-major, 16..19 Cb, 20..23 Cr.
//
// Follows the document: 2 cycles for one list and 3 for bi-prediction.
// This design's own: the order of the steps and the residual format;
// weighted prediction is not covered.
module pixel_recon
  import mc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [1:0]                    pred_flag,   // bit0 L0, bit1 L1
  input  pix_t [23:0]                   pred_l0,
  input  pix_t [23:0]                   pred_l1,
  input  logic [23:0][RES_W-1:0]        resid,       // two's complement
  output pix_t [23:0]                   recon,
  output logic                          done
);
  typedef enum logic [1:0] {R_IDLE, R_AVG, R_ADD} rstate_e;
  rstate_e     st;
  pix_t [23:0] p0_q, p1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; p0_q <= '0; p1_q <= '0;
      recon <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        R_IDLE: if (start) begin
          p0_q <= pred_flag[0] ? pred_l0 : pred_l1;
          p1_q <= pred_l1;
          st   <= (&pred_flag) ? R_AVG : R_ADD;
        end
        R_AVG: begin
          for (int i = 0; i < 24; i++)
            p0_q[i] <= pix_t'((9'(p0_q[i]) + 9'(p1_q[i]) + 9'd1) >> 1);
          st <= R_ADD;
        end
        R_ADD: begin
          for (int i = 0; i < 24; i++)
            recon[i] <= clip1(16'(signed'({1'b0, p0_q[i]})) + 16'(signed'(resid[i])));
          done <= 1'b1;
          st   <= R_IDLE;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule

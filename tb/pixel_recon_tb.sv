// Self-checking test of pixel_recon: random predictions and residuals for
// L0-only, L1-only and bi-predicted blocks, against the rounding average
// plus residual with clipping. Checks done arrives in cycle 2 (one list)
// or cycle 3 (bi-prediction).
//
// The 2 and 3 cycle latencies checked are the document's.
module pixel_recon_tb;
  import mc_pkg::*;
  logic clk = 0, rst_n = 1'b1, start = 0, done;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock
  logic [1:0] pred_flag;
  pix_t [23:0] pred_l0, pred_l1, recon;
  logic [23:0][RES_W-1:0] resid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pixel_recon dut (.clk, .rst_n, .start, .pred_flag, .pred_l0, .pred_l1, .resid, .recon, .done);

  task automatic run(input logic [1:0] pf);
    int cyc, p, e, r;
    for (int i = 0; i < 24; i++) begin
      pred_l0[i] = pix_t'($urandom);
      pred_l1[i] = pix_t'($urandom);
      resid[i]   = RES_W'(int'($urandom % 511) - 255);
    end
    pred_flag = pf;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 20) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ((pf == 2'b11) ? 3 : 2)) begin failures++; $display("FAIL latency %0d pf=%b", cyc, pf); end
    for (int i = 0; i < 24; i++) begin
      p = (pf == 2'b11) ? (int'(pred_l0[i]) + int'(pred_l1[i]) + 1) / 2 :
          (pf == 2'b01) ? int'(pred_l0[i]) : int'(pred_l1[i]);
      r = int'(signed'(resid[i]));
      e = p + r; e = (e < 0) ? 0 : (e > 255) ? 255 : e;
      checks++;
      if (int'(recon[i]) != e) begin
        failures++; $display("FAIL pf=%b i=%0d got %0d exp %0d", pf, i, recon[i], e);
      end
    end
  endtask

  initial begin
    pred_l0 = '0; pred_l1 = '0; resid = '0; pred_flag = 2'b01;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) begin run(2'b01); run(2'b10); run(2'b11); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

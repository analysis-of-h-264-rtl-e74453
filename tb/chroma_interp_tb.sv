// Self-checking test of chroma_interp: all 64 fraction pairs and random
// windows against the four-sample weighted mean, plus the fixed 5-cycle
// block time (start in cycle 0, done in cycle 5).
//
// The expected values come from eq. (4.9) of the standard; the 5-cycle
// latency is the document's figure.
module chroma_interp_tb;
  import mc_pkg::*;
  logic clk = 0, rst_n = 1'b1, start = 0, done;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock
  logic [2:0] cfx, cfy;
  pix_t [CWIN-1:0][CWIN-1:0] win_cb, win_cr;
  pix_t [3:0] pred_cb, pred_cr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  chroma_interp dut (.clk, .rst_n, .start, .cfx, .cfy, .win_cb, .win_cr, .pred_cb, .pred_cr, .done);

  function automatic int model(input pix_t [CWIN-1:0][CWIN-1:0] w, input int x, input int y,
                               input int fx, input int fy);
    return ((8-fx)*(8-fy)*w[y][x] + fx*(8-fy)*w[y][x+1] + (8-fx)*fy*w[y+1][x]
            + fx*fy*w[y+1][x+1] + 32) >> 6;
  endfunction

  task automatic run(input int fx, input int fy);
    int cyc;
    for (int r = 0; r < CWIN; r++)
      for (int c = 0; c < CWIN; c++) begin
        win_cb[r][c] = pix_t'($urandom);
        win_cr[r][c] = pix_t'($urandom);
      end
    cfx = 3'(fx); cfy = 3'(fy);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 20) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 5) begin failures++; $display("FAIL latency %0d", cyc); end
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (int'(pred_cb[i]) != model(win_cb, i % 2, i / 2, fx, fy)) begin
        failures++; $display("FAIL cb fx=%0d fy=%0d i=%0d got %0d exp %0d", fx, fy, i, pred_cb[i],
                             model(win_cb, i % 2, i / 2, fx, fy));
      end
      if (int'(pred_cr[i]) != model(win_cr, i % 2, i / 2, fx, fy)) begin
        failures++; $display("FAIL cr fx=%0d fy=%0d i=%0d", fx, fy, i);
      end
    end
  endtask

  initial begin
    win_cb = '0; win_cr = '0; cfx = 0; cfy = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int fx = 0; fx < 8; fx++)
      for (int fy = 0; fy < 8; fy++)
        run(fx, fy);
    repeat (100) run(int'($urandom % 8), int'($urandom % 8));
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

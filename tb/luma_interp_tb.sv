// Self-checking test of luma_interp. For all 16 quarter-sample positions and
// random 9x9 windows the 4x4 prediction is compared with a model written
// from the interpolation equations (half samples b, h by the 6-tap filter,
// j from 8-bit clipped intermediates, quarter samples by rounding averages).
// The cycle count from start to done is checked: 5 cycles when one filter
// level suffices, 6 for j, i, k, f and q.
//
// The expected values follow the standard's interpolation, with j from
// clipped 8-bit intermediates as the design allows; the 5 and 6 cycle
// latencies are the document's.
module luma_interp_tb;
  import mc_pkg::*;
  logic clk = 0, rst_n = 1'b1, start = 0, done;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock
  logic [1:0] xfrac, yfrac;
  pix_t [LWIN-1:0][LWIN-1:0] win;
  pix_t [15:0] pred;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  luma_interp dut (.clk, .rst_n, .start, .xfrac, .yfrac, .win, .pred, .done);

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  function automatic int tap6(input int p0, p1, p2, p3, p4, p5);
    return clip((p0 - 5*p1 + 20*p2 + 20*p3 - 5*p4 + p5 + 16) >>> 5);
  endfunction
  // integer sample at block coordinate (x, y), x,y in -2..6
  function automatic int G(input int x, input int y);
    return int'(win[y+2][x+2]);
  endfunction
  function automatic int hb(input int x, input int y); // b: between (x,y) and (x+1,y)
    return tap6(G(x-2,y), G(x-1,y), G(x,y), G(x+1,y), G(x+2,y), G(x+3,y));
  endfunction
  function automatic int hh(input int x, input int y); // h: between (x,y) and (x,y+1)
    return tap6(G(x,y-2), G(x,y-1), G(x,y), G(x,y+1), G(x,y+2), G(x,y+3));
  endfunction
  // j: horizontal pass over clipped h (row form) or vertical pass over clipped b (column form)
  function automatic int hj(input int x, input int y, input bit colform);
    if (colform) return tap6(hb(x,y-2), hb(x,y-1), hb(x,y), hb(x,y+1), hb(x,y+2), hb(x,y+3));
    else         return tap6(hh(x-2,y), hh(x-1,y), hh(x,y), hh(x+1,y), hh(x+2,y), hh(x+3,y));
  endfunction
  function automatic int av(input int p, input int q);
    return (p + q + 1) >> 1;
  endfunction
  function automatic int model(input int x, input int y, input int xf, input int yf);
    bit cf;
    cf = (xf == 2) && (yf % 2 == 1);
    case (xf*4 + yf)
      0:  return G(x,y);
      4:  return av(G(x,y), hb(x,y));
      8:  return hb(x,y);
      12: return av(hb(x,y), G(x+1,y));
      1:  return av(G(x,y), hh(x,y));
      2:  return hh(x,y);
      3:  return av(hh(x,y), G(x,y+1));
      5:  return av(hb(x,y), hh(x,y));        // e
      13: return av(hb(x,y), hh(x+1,y));      // g
      7:  return av(hh(x,y), hb(x,y+1));      // p
      15: return av(hh(x+1,y), hb(x,y+1));    // r
      10: return hj(x,y,cf);                  // j
      6:  return av(hh(x,y), hj(x,y,cf));     // i
      14: return av(hj(x,y,cf), hh(x+1,y));   // k
      9:  return av(hb(x,y), hj(x,y,cf));     // f
      11: return av(hj(x,y,cf), hb(x,y+1));   // q
      default: return -1;
    endcase
  endfunction

  task automatic run(input int xf, input int yf, input int mode);
    int cyc, expc;
    for (int r = 0; r < LWIN; r++)
      for (int c = 0; c < LWIN; c++)
        case (mode)
          0: win[r][c] = pix_t'($urandom);
          1: win[r][c] = ((r + c) % 2) ? 8'd255 : 8'd0;
          default: win[r][c] = pix_t'(r * 28 + c);
        endcase
    xfrac = 2'(xf); yfrac = 2'(yf);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 20) begin @(negedge clk); cyc++; end
    expc = (((xf == 2) && (yf != 0)) || ((yf == 2) && (xf != 0))) ? 6 : 5;
    checks++;
    if (cyc != expc) begin
      failures++;
      $display("FAIL latency xf=%0d yf=%0d: %0d cycles, expected %0d", xf, yf, cyc, expc);
    end
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        checks++;
        if (int'(pred[4*y+x]) != model(x, y, xf, yf)) begin
          failures++;
          $display("FAIL xf=%0d yf=%0d (%0d,%0d): got %0d exp %0d", xf, yf, x, y,
                   pred[4*y+x], model(x, y, xf, yf));
        end
      end
  endtask

  initial begin
    win = '0; xfrac = 0; yfrac = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++)
      for (int xf = 0; xf < 4; xf++)
        for (int yf = 0; yf < 4; yf++)
          run(xf, yf, m);
    repeat (200) run(int'($urandom % 4), int'($urandom % 4), 0);
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

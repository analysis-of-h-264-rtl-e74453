// Self-checking test of interp_stage. A behavioural reference data buffer
// (one-cycle read latency) holds random 9x9 luma windows, 3x3 chroma windows
// and random fractions for both lists; random pred_flag per 8x8 and random
// residuals are applied. Every reconstructed block is compared with a model
// of interpolation, bi-prediction averaging and residual addition, and the
// macroblock time is checked against 2 + sum over blocks of
// (luma time 5|6) + (reconstruction time 2|3) + 1.
//
// The 8-10 cycles per block checked here follow the document's 5-6 + 2-3 + 1
// cycle schedule.
module interp_stage_tb;
  import mc_pkg::*;
  logic clk = 0, rst_n = 1'b1, mb_start = 0, busy, mb_done, buf_re, rec_valid;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock
  logic [3:0][1:0] pred_flag;
  logic [3:0] buf_raddr, res_blk, rec_blk;
  logic [LROW_W-1:0] rluma_l0, rluma_l1;
  logic [CROW_W-1:0] rchroma_l0, rchroma_l1;
  logic [23:0][RES_W-1:0] resid;
  pix_t [23:0] rec;
  int checks = 0, failures = 0;

  lrow_t lmem [2][16];
  crow_t cmem [2][16];
  logic [23:0][RES_W-1:0] rmem [16];

  always #5 clk = ~clk;

  interp_stage dut (.clk, .rst_n, .mb_start, .pred_flag, .busy, .mb_done, .buf_re, .buf_raddr,
                    .rluma_l0, .rluma_l1, .rchroma_l0, .rchroma_l1, .res_blk, .resid,
                    .rec_valid, .rec_blk, .rec);

  always_ff @(posedge clk) if (buf_re) begin
    rluma_l0 <= lmem[0][buf_raddr]; rluma_l1 <= lmem[1][buf_raddr];
    rchroma_l0 <= cmem[0][buf_raddr]; rchroma_l1 <= cmem[1][buf_raddr];
  end
  assign resid = rmem[res_blk];

  // ---- model ----
  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  function automatic int tap6(input int p0, p1, p2, p3, p4, p5);
    return clip((p0 - 5*p1 + 20*p2 + 20*p3 - 5*p4 + p5 + 16) >>> 5);
  endfunction
  function automatic int G(input lrow_t w, input int x, input int y);
    return int'(w[y+2][x+2]);
  endfunction
  function automatic int hb(input lrow_t w, input int x, input int y);
    return tap6(G(w,x-2,y), G(w,x-1,y), G(w,x,y), G(w,x+1,y), G(w,x+2,y), G(w,x+3,y));
  endfunction
  function automatic int hh(input lrow_t w, input int x, input int y);
    return tap6(G(w,x,y-2), G(w,x,y-1), G(w,x,y), G(w,x,y+1), G(w,x,y+2), G(w,x,y+3));
  endfunction
  function automatic int hj(input lrow_t w, input int x, input int y, input bit cf);
    if (cf) return tap6(hb(w,x,y-2), hb(w,x,y-1), hb(w,x,y), hb(w,x,y+1), hb(w,x,y+2), hb(w,x,y+3));
    else    return tap6(hh(w,x-2,y), hh(w,x-1,y), hh(w,x,y), hh(w,x+1,y), hh(w,x+2,y), hh(w,x+3,y));
  endfunction
  function automatic int av(input int p, input int q);
    return (p + q + 1) >> 1;
  endfunction
  function automatic int lmodel(input lrow_t w, input int x, input int y, input int xf, input int yf);
    bit cf;
    cf = (xf == 2) && (yf % 2 == 1);
    case (xf*4 + yf)
      0: return G(w,x,y);                 4: return av(G(w,x,y), hb(w,x,y));
      8: return hb(w,x,y);                12: return av(hb(w,x,y), G(w,x+1,y));
      1: return av(G(w,x,y), hh(w,x,y));  2: return hh(w,x,y);
      3: return av(hh(w,x,y), G(w,x,y+1));
      5: return av(hb(w,x,y), hh(w,x,y));     13: return av(hb(w,x,y), hh(w,x+1,y));
      7: return av(hh(w,x,y), hb(w,x,y+1));   15: return av(hh(w,x+1,y), hb(w,x,y+1));
      10: return hj(w,x,y,cf);                6: return av(hh(w,x,y), hj(w,x,y,cf));
      14: return av(hj(w,x,y,cf), hh(w,x+1,y)); 9: return av(hb(w,x,y), hj(w,x,y,cf));
      11: return av(hj(w,x,y,cf), hb(w,x,y+1));
      default: return -1;
    endcase
  endfunction
  function automatic int cmodel(input pix_t [CWIN-1:0][CWIN-1:0] w, input int x, input int y,
                                input int fx, input int fy);
    return ((8-fx)*(8-fy)*w[y][x] + fx*(8-fy)*w[y][x+1] + (8-fx)*fy*w[y+1][x]
            + fx*fy*w[y+1][x+1] + 32) >> 6;
  endfunction
  function automatic int pred(input int l, input int b, input int i);
    crow_t c;
    c = cmem[l][b];
    if (i < 16) return lmodel(lmem[l][b], i % 4, i / 4, int'(c.cfx[1:0]), int'(c.cfy[1:0]));
    else if (i < 20) return cmodel(c.cb, (i-16) % 2, (i-16) / 2, int'(c.cfx[2:0]), int'(c.cfy[2:0]));
    else return cmodel(c.cr, (i-20) % 2, (i-20) / 2, int'(c.cfx[2:0]), int'(c.cfy[2:0]));
  endfunction
  function automatic bit twol(input int l, input int b);
    int xf, yf;
    xf = int'(cmem[l][b].cfx[1:0]); yf = int'(cmem[l][b].cfy[1:0]);
    return ((xf == 2) && (yf != 0)) || ((yf == 2) && (xf != 0));
  endfunction

  int exp_cycles, cyc, nrec;
  logic [3:0][1:0] pf_cur;

  always @(posedge clk) if (rec_valid) begin
    int p, e, b;
    b = int'(rec_blk);
    checks++;
    if (rec_blk != 4'(nrec)) begin failures++; $display("FAIL block order %0d vs %0d", rec_blk, nrec); end
    nrec++;
    for (int i = 0; i < 24; i++) begin
      case (pf_cur[b/4])
        2'b01: p = pred(0, b, i);
        2'b10: p = pred(1, b, i);
        default: p = av(pred(0, b, i), pred(1, b, i));
      endcase
      e = clip(p + int'(signed'(rmem[b][i])));
      checks++;
      if (int'(rec[i]) != e) begin
        failures++; $display("FAIL blk %0d i %0d got %0d exp %0d", b, i, rec[i], e);
      end
    end
  end

  task automatic run_mb();
    for (int q = 0; q < 4; q++) pf_cur[q] = 2'(1 + $urandom % 3);
    for (int l = 0; l < 2; l++)
      for (int b = 0; b < 16; b++) begin
        for (int r = 0; r < LWIN; r++) for (int c = 0; c < LWIN; c++) lmem[l][b][r][c] = pix_t'($urandom);
        cmem[l][b] = crow_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        cmem[l][b].cfx[3] = 1'b0; cmem[l][b].cfy[3] = 1'b0;
      end
    for (int b = 0; b < 16; b++)
      for (int i = 0; i < 24; i++) rmem[b][i] = RES_W'(int'($urandom % 101) - 50);
    exp_cycles = 2;
    for (int b = 0; b < 16; b++) begin
      bit tl;
      tl = (pf_cur[b/4][0] && twol(0, b)) || (pf_cur[b/4][1] && twol(1, b));
      exp_cycles += (tl ? 6 : 5) + ((pf_cur[b/4] == 2'b11) ? 3 : 2) + 1;
    end
    nrec = 0;
    pred_flag = pf_cur;
    @(negedge clk); mb_start = 1; @(negedge clk); mb_start = 0;
    cyc = 1;
    while (!mb_done && cyc < 1000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks += 2;
    if (cyc != exp_cycles) begin failures++; $display("FAIL MB cycles %0d exp %0d", cyc, exp_cycles); end
    if (nrec != 16) begin failures++; $display("FAIL %0d blocks", nrec); end
  endtask

  initial begin
    pred_flag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (30) run_mb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end bench of the motion compensation unit, shared by the short
// end-to-end test, the full-size test and the throughput test. It counts
// checks and failures and raises bench_done when finished (or when its
// watchdog expires, which counts a failure); the enclosing test prints the
// result line and ends the simulation.
//
// Drives svc_mc_top (default parameters) with every MB of NPIC pictures of
// PW x PH macroblocks in raster order. MB types, sub-partitions, lists
// (L0, L1, bi), reference indices and mvds are random, about one MB in
// eight is intra; one mvd in sixteen is large, so that reference areas
// leave the picture. The reference memory is ref_mem_model, whose ready
// drops at random in every other MB row. The residual of sample i of
// block b of an MB is a fixed function of its position.
//
// Checks:
//   - every inter MB yields its 16 blocks in order, for the right MB, and
//     intra MBs yield none;
//   - every reconstructed sample equals an independent model: the final MVs
//     (taken from the unit's current MV buffer when MV generation of the MB
//     ends; MV prediction itself is checked by the mv_gen test) applied to
//     the edge-clamped reference picture with the standard six-tap and
//     bilinear filters, the j position from clipped 8-bit intermediates,
//     bi-prediction averaged with rounding, residual added and clipped;
//   - the INTERP stage time of each inter MB lies in 130..162 cycles, and
//     the cycles per MB over the run are reported.
// Each mechanism is counted and a failure is counted for any that never
// happened: every partition and sub-partition shape, bi-prediction, intra
// MBs, integer / half / quarter / two-level fractions, reference areas
// clipped at the picture edge, memory back-pressure, MV generation ending
// while partitions still wait in the queue (the queue holds a whole MB,
// so it never fills and MV generation never waits on it), INTERP waiting for MVG, MVG waiting for INTERP, and both
// stages busy at once (the ping-pong overlap).
//
// The 130-162 cycle INTERP window is the document's 128-160 plus this
// design's 2 start-up cycles.
module mc_e2e_bench
  import mc_pkg::*;
  import mc_tb_pkg::*;
#(
  parameter int PW    = 4,
  parameter int PH    = 3,
  parameter int NPIC  = 2,
  parameter int LAT   = 4,
  parameter bit GAPS  = 1,     // random pauses between input MBs
  parameter bit STALL = 1,     // memory back-pressure in every other MB row
  parameter int BUDGET = 0,    // if non-zero: cycles per MB the run must stay under
  parameter longint WATCHDOG = 2_000_000
);
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock
  always #5 clk = ~clk;

  logic                   mb_valid, mb_ready;
  mb_info_t               mb;
  logic                   req_valid, req_ready, resp_valid, stall_en;
  mem_req_t               req;
  pix_t [ARR-1:0]         resp_data;
  logic [3:0]             res_blk;
  logic [23:0][RES_W-1:0] resid;
  logic                   rec_valid, mb_done, mvg_done, idle;
  logic [MBX_W-1:0]       rec_mb_x;
  logic [MBY_W-1:0]       rec_mb_y;
  logic [3:0]             rec_blk;
  pix_t [23:0]            rec;
  mvinfo_t [1:0][15:0]    cur_mv;

  svc_mc_top dut (
    .clk, .rst_n, .pic_w_mbs(MBX_W'(PW)), .pic_h_mbs(MBY_W'(PH)),
    .mb_valid, .mb_ready, .mb,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req(req),
    .mem_resp_valid(resp_valid), .mem_resp_data(resp_data),
    .res_blk, .resid, .rec_valid, .rec_mb_x, .rec_mb_y, .rec_blk, .rec, .mb_done,
    .cur_mv, .mvg_done, .idle);

  ref_mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .stall_en, .req_valid, .req_ready, .req, .resp_valid, .resp_data);

  int checks = 0, failures = 0;
  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  // the enclosing test prints the result and ends the run when bench_done rises
  logic bench_done = 1'b0;
  initial begin
    wait (cyc == WATCHDOG);
    $display("watchdog timeout");
    failures++;
    bench_done = 1'b1;
  end

  // ---------------- residual ----------------
  function automatic int res_of(input int mx, input int my, input int b, input int i);
    return ((mx * 7 + my * 13 + b * 5 + i * 3) % 61) - 30;
  endfunction
  always_comb
    for (int i = 0; i < 24; i++)
      resid[i] = RES_W'(res_of(int'(rec_mb_x), int'(rec_mb_y), int'(res_blk), i));

  // ---------------- prediction model ----------------
  int m_list, m_ref;
  function automatic int P(input int x, input int y);
    return int'(ref_pix(0, m_list, m_ref, clampi(x, PW * 16 - 1), clampi(y, PH * 16 - 1)));
  endfunction
  function automatic int C(input int pl, input int x, input int y);
    return int'(ref_pix(pl, m_list, m_ref, clampi(x, PW * 8 - 1), clampi(y, PH * 8 - 1)));
  endfunction
  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  function automatic int tap6(input int p0, p1, p2, p3, p4, p5);
    return clip((p0 - 5*p1 + 20*p2 + 20*p3 - 5*p4 + p5 + 16) >>> 5);
  endfunction
  function automatic int hb(input int x, input int y);
    return tap6(P(x-2,y), P(x-1,y), P(x,y), P(x+1,y), P(x+2,y), P(x+3,y));
  endfunction
  function automatic int hh(input int x, input int y);
    return tap6(P(x,y-2), P(x,y-1), P(x,y), P(x,y+1), P(x,y+2), P(x,y+3));
  endfunction
  function automatic int hj(input int x, input int y, input bit cf);
    if (cf) return tap6(hb(x,y-2), hb(x,y-1), hb(x,y), hb(x,y+1), hb(x,y+2), hb(x,y+3));
    else    return tap6(hh(x-2,y), hh(x-1,y), hh(x,y), hh(x+1,y), hh(x+2,y), hh(x+3,y));
  endfunction
  function automatic int av(input int p, input int q);
    return (p + q + 1) >> 1;
  endfunction
  function automatic int luma(input int x, input int y, input int xf, input int yf);
    bit cf;
    cf = (xf == 2) && (yf % 2 == 1);
    case (xf*4 + yf)
      0: return P(x,y);                   4: return av(P(x,y), hb(x,y));
      8: return hb(x,y);                  12: return av(hb(x,y), P(x+1,y));
      1: return av(P(x,y), hh(x,y));      2: return hh(x,y);
      3: return av(hh(x,y), P(x,y+1));
      5: return av(hb(x,y), hh(x,y));     13: return av(hb(x,y), hh(x+1,y));
      7: return av(hh(x,y), hb(x,y+1));   15: return av(hh(x+1,y), hb(x,y+1));
      10: return hj(x,y,cf);              6: return av(hh(x,y), hj(x,y,cf));
      14: return av(hj(x,y,cf), hh(x+1,y)); 9: return av(hb(x,y), hj(x,y,cf));
      11: return av(hj(x,y,cf), hb(x,y+1));
      default: return -1;
    endcase
  endfunction
  function automatic int chroma(input int pl, input int x, input int y, input int fx, input int fy);
    return ((8-fx)*(8-fy)*C(pl,x,y) + fx*(8-fy)*C(pl,x+1,y) + (8-fx)*fy*C(pl,x,y+1)
            + fx*fy*C(pl,x+1,y+1) + 32) >> 6;
  endfunction

  // ---------------- MBs in flight ----------------
  typedef struct {
    int                  mx, my;
    logic                intra;
    mvinfo_t [1:0][15:0] mv;
  } inflight_t;
  inflight_t q_mvg[$];      // MBs taken, waiting for MV generation to end
  inflight_t q_int[$];      // MBs whose MVs are known, in INTERP order

  // counters of mechanisms
  int cnt_part[4], cnt_sub[4], cnt_bi, cnt_intra, cnt_frac[4], cnt_clip;
  int cnt_memstall, cnt_fifo_full, cnt_int_wait, cnt_mvg_wait, cnt_overlap;
  int n_mb_done, n_inter, exp_blk;
  longint int_t0, int_sum;
  int int_min = 1 << 30, int_max = 0;

  always @(posedge clk) if (rst_n) begin
    if (req_valid && !req_ready) cnt_memstall++;
    if (dut.mvg_gen_done && !dut.fifo_empty) cnt_fifo_full++;
    if (dut.mvg_busy && !dut.int_busy && !dut.mvg_finished && n_mb_done > 0) cnt_int_wait++;
    if (dut.mvg_finished && dut.int_busy) cnt_mvg_wait++;
    if (dut.mvg_busy && !dut.mvg_finished && dut.int_stage_busy) cnt_overlap++;
    if (dut.int_start) int_t0 = cyc;
    if (mvg_done) begin
      inflight_t e;
      e = q_mvg.pop_front();
      e.mv = cur_mv;
      q_int.push_back(e);
    end
    if (rec_valid) begin
      inflight_t e;
      int bx, by, x, y, mvx, mvy, exp_v, nl, p[2];
      e = q_int[0];
      checks++;
      if (e.intra || int'(rec_mb_x) != e.mx || int'(rec_mb_y) != e.my || int'(rec_blk) != exp_blk)
        fail($sformatf("block order: MB (%0d,%0d) blk %0d", rec_mb_x, rec_mb_y, rec_blk));
      bx = int'(blk_x(rec_blk)); by = int'(blk_y(rec_blk));
      for (int i = 0; i < 24; i++) begin
        nl = 0;
        for (int l = 0; l < 2; l++) begin
          mvinfo_t mi;
          mi = e.mv[l][rec_blk];
          if (mi.ref_idx != '1) begin
            logic signed [MVX_W-1:0] smx;
            logic signed [MVY_W-1:0] smy;
            smx = mi.mv.x; smy = mi.mv.y;
            mvx = int'(smx); mvy = int'(smy);
            m_list = l; m_ref = int'(mi.ref_idx);
            if (i < 16) begin
              x = e.mx * 16 + bx * 4 + i % 4 + (mvx >>> 2);
              y = e.my * 16 + by * 4 + i / 4 + (mvy >>> 2);
              p[nl] = luma(x, y, mvx & 3, mvy & 3);
              if (i == 0) begin
                if (x - 2 < 0 || y - 2 < 0 || x + 6 > PW * 16 - 1 || y + 6 > PH * 16 - 1) cnt_clip++;
                cnt_frac[((mvx & 3) == 0 && (mvy & 3) == 0) ? 0 :
                         (((mvx & 3) == 2 && (mvy & 3) != 0) || ((mvy & 3) == 2 && (mvx & 3) != 0)) ? 3 :
                         (((mvx & 1) == 0) && ((mvy & 1) == 0)) ? 1 : 2]++;
              end
            end else begin
              x = e.mx * 8 + bx * 2 + (i - 16) % 2 + (mvx >>> 3);
              y = e.my * 8 + by * 2 + ((i - 16) % 4) / 2 + (mvy >>> 3);
              p[nl] = chroma((i < 20) ? 1 : 2, x, y, mvx & 7, mvy & 7);
            end
            nl++;
          end
        end
        if (i == 0 && nl == 2) cnt_bi++;
        exp_v = clip(((nl == 2) ? av(p[0], p[1]) : p[0]) + res_of(e.mx, e.my, int'(rec_blk), i));
        checks++;
        if (nl == 0 || int'(rec[i]) != exp_v)
          fail($sformatf("MB (%0d,%0d) blk %0d sample %0d: got %0d expected %0d",
                         e.mx, e.my, rec_blk, i, rec[i], exp_v));
      end
      exp_blk++;
    end
    if (mb_done) begin
      inflight_t e;
      e = q_int.pop_front();
      n_mb_done++;
      checks++;
      if (!e.intra && exp_blk != 16) fail($sformatf("MB (%0d,%0d): %0d blocks", e.mx, e.my, exp_blk));
      if (e.intra && exp_blk != 0)   fail("intra MB produced blocks");
      if (!e.intra) begin
        n_inter++;
        int_sum += cyc - int_t0;
        if (cyc - int_t0 < int_min) int_min = int'(cyc - int_t0);
        if (cyc - int_t0 > int_max) int_max = int'(cyc - int_t0);
        checks++;
        if (cyc - int_t0 < 130 || cyc - int_t0 > 162)
          fail($sformatf("INTERP time %0d cycles", cyc - int_t0));
      end
      exp_blk = 0;
    end
  end

  // ---------------- stimulus ----------------
  function automatic mb_info_t rand_mb(input int mx, input int my);
    mb_info_t m;
    m = '0;
    m.mb_x = MBX_W'(mx); m.mb_y = MBY_W'(my);
    m.part = mb_part_e'($urandom % 4);
    for (int q = 0; q < 4; q++) begin
      m.sub[q] = 2'($urandom % 4);
      m.pred_flag[q] = 2'(1 + $urandom % 3);
      m.ref_l0[q] = REF_W'($urandom % 3);
      m.ref_l1[q] = REF_W'($urandom % 3);
    end
    case (m.part)
      PART_16X16: for (int q = 1; q < 4; q++) begin
        m.pred_flag[q] = m.pred_flag[0]; m.ref_l0[q] = m.ref_l0[0]; m.ref_l1[q] = m.ref_l1[0];
      end
      PART_16X8: begin
        m.pred_flag[1] = m.pred_flag[0]; m.pred_flag[3] = m.pred_flag[2];
        m.ref_l0[1] = m.ref_l0[0]; m.ref_l0[3] = m.ref_l0[2];
        m.ref_l1[1] = m.ref_l1[0]; m.ref_l1[3] = m.ref_l1[2];
      end
      PART_8X16: begin
        m.pred_flag[2] = m.pred_flag[0]; m.pred_flag[3] = m.pred_flag[1];
        m.ref_l0[2] = m.ref_l0[0]; m.ref_l0[3] = m.ref_l0[1];
        m.ref_l1[2] = m.ref_l1[0]; m.ref_l1[3] = m.ref_l1[1];
      end
      default: ;
    endcase
    if ($urandom % 8 == 0) m.pred_flag = '0;   // intra MB
    for (int b = 0; b < 16; b++) begin
      int r, dx0, dy0, dx1, dy1;
      logic [MVX_W-1:0] ux0, ux1;
      logic [MVY_W-1:0] uy0, uy1;
      r = ($urandom % 16 == 0) ? 400 : 24;
      dx0 = int'($urandom_range(2 * r)) - r; dy0 = int'($urandom_range(2 * r)) - r;
      dx1 = int'($urandom_range(2 * r)) - r; dy1 = int'($urandom_range(2 * r)) - r;
      ux0 = MVX_W'(dx0); uy0 = MVY_W'(dy0); ux1 = MVX_W'(dx1); uy1 = MVY_W'(dy1);
      m.mvd_l0[b] = {ux0, uy0};
      m.mvd_l1[b] = {ux1, uy1};
    end
    return m;
  endfunction

  initial begin
    longint t_start;
    mb_valid = 1'b0; mb = '0; stall_en = 1'b0;
    exp_blk = 0; n_mb_done = 0; n_inter = 0; int_sum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    t_start = cyc;
    for (int pic = 0; pic < NPIC; pic++) begin
      for (int my = 0; my < PH; my++)
        for (int mx = 0; mx < PW; mx++) begin
          inflight_t e;
          stall_en = STALL && ((my + pic) % 2 == 1);
          mb = rand_mb(mx, my);
          mb_valid = 1'b1;
          @(posedge clk);
          while (!mb_ready) @(posedge clk);
          e.mx = mx; e.my = my; e.intra = (mb.pred_flag == '0); e.mv = '0;
          q_mvg.push_back(e);
          if (e.intra) cnt_intra++;
          cnt_part[int'(mb.part)]++;
          if (mb.part == PART_8X8) for (int q = 0; q < 4; q++) cnt_sub[int'(mb.sub[q])]++;
          @(negedge clk);
          mb_valid = 1'b0;
          if (GAPS && $urandom % 4 == 0) repeat ($urandom_range(300)) @(negedge clk);   // input gaps
        end
    end
    while (n_mb_done < NPIC * PW * PH) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (!idle || q_mvg.size() != 0 || q_int.size() != 0) fail("not idle at the end");
    $display("MBs=%0d inter=%0d cycles=%0d (%0.1f per MB); INTERP per inter MB min %0d max %0d avg %0.1f",
             n_mb_done, n_inter, cyc - t_start, real'(cyc - t_start) / n_mb_done,
             int_min, int_max, real'(int_sum) / (n_inter > 0 ? n_inter : 1));
    $display("partitions 16x16=%0d 16x8=%0d 8x16=%0d 8x8=%0d; sub 8x8=%0d 8x4=%0d 4x8=%0d 4x4=%0d",
             cnt_part[0], cnt_part[1], cnt_part[2], cnt_part[3], cnt_sub[0], cnt_sub[1], cnt_sub[2], cnt_sub[3]);
    $display("bi=%0d intra=%0d frac int=%0d half=%0d quarter=%0d two-level=%0d edge=%0d",
             cnt_bi, cnt_intra, cnt_frac[0], cnt_frac[1], cnt_frac[2], cnt_frac[3], cnt_clip);
    $display("mem stall=%0d MV generation ahead=%0d INTERP waits=%0d MVG waits=%0d overlap=%0d",
             cnt_memstall, cnt_fifo_full, cnt_int_wait, cnt_mvg_wait, cnt_overlap);
    for (int k = 0; k < 4; k++) begin
      checks += 3;
      if (cnt_part[k] == 0) fail($sformatf("partition type %0d never used", k));
      if (cnt_sub[k] == 0)  fail($sformatf("sub-partition type %0d never used", k));
      if (cnt_frac[k] == 0) fail($sformatf("fraction class %0d never used", k));
    end
    if (BUDGET > 0) begin
      checks++;
      if (real'(cyc - t_start) / n_mb_done > real'(BUDGET))
        fail($sformatf("%0.1f cycles per MB, over the budget of %0d", real'(cyc - t_start) / n_mb_done, BUDGET));
    end
    checks += 3;
    if (cnt_bi == 0)        fail("no bi-prediction");
    if (cnt_intra == 0)     fail("no intra MB");
    if (cnt_clip == 0)      fail("no reference area at the picture edge");
    if (STALL) begin
      checks++;
      if (cnt_memstall == 0)  fail("no memory back-pressure");
    end
    checks += 4;
    if (cnt_fifo_full == 0) fail("MV generation never ran ahead of the memory");
    if (cnt_int_wait == 0)  fail("INTERP never waited for MVG");
    if (cnt_mvg_wait == 0)  fail("MVG never waited for INTERP");
    if (cnt_overlap == 0)   fail("stages never overlapped");
    bench_done = 1'b1;
  end
endmodule

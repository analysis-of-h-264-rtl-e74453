// Self-checking test of mv_gen over a small picture (5x3 macroblocks, every
// MB given in raster order, several pictures). MB types, sub-partitions,
// prediction lists, reference indices and mvds are random; some MBs are
// intra. The model keeps a picture-wide field of 4x4 motion data with a
// "decoded" flag per block and finds neighbours A, B, C, D by sample
// position: a neighbour is available when it lies inside the picture and
// has been decoded, which follows the standard's partition order
// (partition, then sub-partition). Checked per MB: every entry of the
// current MV buffer, the sequence of partitions sent on, and the cycle
// count 5 + sum of block costs (3 for a predicted first block, 1 otherwise).
//
// The cycle count checked here is the document's three cycles per predicted
// block, plus this design's preload and write-back.
module mv_gen_tb;
  import mc_pkg::*;
  localparam int PW = 5, PH = 3;
  logic clk = 0, rst_n = 1'b1, start = 0, done;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock
  mb_info_t mb;
  logic [MBX_W-1:0] pic_w_mbs;
  logic nb_re, nb_we, part_valid, part_ready;
  logic [MBX_W-1:0] nb_raddr, nb_waddr;
  mvinfo_t [3:0] nb_rdata_l0, nb_rdata_l1, nb_wdata_l0, nb_wdata_l1;
  part_desc_t part;
  mvinfo_t [1:0][15:0] cur_mv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nb_mv_buffer #(.MB_COLS(PW)) u_nb (.clk, .re(nb_re), .raddr(nb_raddr), .rdata_l0(nb_rdata_l0),
      .rdata_l1(nb_rdata_l1), .we(nb_we), .waddr(nb_waddr), .wdata_l0(nb_wdata_l0),
      .wdata_l1(nb_wdata_l1));
  mv_gen dut (.clk, .rst_n, .start, .mb, .pic_w_mbs, .done, .nb_re, .nb_raddr, .nb_rdata_l0,
              .nb_rdata_l1, .nb_we, .nb_waddr, .nb_wdata_l0, .nb_wdata_l1, .part_valid,
              .part_ready, .part, .cur_mv);

  // model state: picture field in 4x4 units
  int  fx [2][PH*4][PW*4];
  int  fy [2][PH*4][PW*4];
  int  fr [2][PH*4][PW*4];
  bit  fdec [PH*4][PW*4];
  part_desc_t exp_parts[$];
  int  nparts_got;
  int  cnt_part[4], cnt_sub[4], cnt_bi, cnt_intra;

  function automatic int sxv(input logic signed [MVX_W-1:0] v); return int'(v); endfunction
  function automatic int syv(input logic signed [MVY_W-1:0] v); return int'(v); endfunction
  function automatic int srv(input logic signed [REF_W-1:0] v); return int'(v); endfunction

  function automatic int med3(input int p, input int q, input int r);
    int mn, mx;
    mn = (p < q) ? p : q; mn = (mn < r) ? mn : r;
    mx = (p > q) ? p : q; mx = (mx > r) ? mx : r;
    return p + q + r - mn - mx;
  endfunction

  // neighbour at 4x4 picture position (X, Y)
  task automatic nbr(input int l, input int X, input int Y, output bit av, output int x, output int y,
                     output int r);
    av = (X >= 0) && (Y >= 0) && (X < PW*4) && (Y < PH*4) && fdec[Y][X];
    if (av) begin x = fx[l][Y][X]; y = fy[l][Y][X]; r = fr[l][Y][X]; end
    else begin x = 0; y = 0; r = -1; end
  endtask

  // predict and store one partition: position X0,Y0 (4x4 units in picture), size w,h
  task automatic do_part(input int l, input int X0, input int Y0, input int w, input int h,
                         input int kind, input int refi, input int mdx, input int mdy,
                         input int ox, input int oy);
    bit aA, aB, aC, aD, hit;
    int ax, ay, ar, bx2, by2, br, cx, cy, cr, dx, dy, dr, px, py, m;
    part_desc_t pd;
    nbr(l, X0-1, Y0, aA, ax, ay, ar);
    nbr(l, X0, Y0-1, aB, bx2, by2, br);
    nbr(l, X0+w, Y0-1, aC, cx, cy, cr);
    nbr(l, X0-1, Y0-1, aD, dx, dy, dr);
    if (!aC) begin aC = aD; cx = dx; cy = dy; cr = dr; end
    hit = 0;
    // kind: 0 median, 1 16x8 up, 2 16x8 low, 3 8x16 left, 4 8x16 right
    if (kind == 1 && br == refi) begin px = bx2; py = by2; hit = 1; end
    if ((kind == 2 || kind == 3) && ar == refi) begin px = ax; py = ay; hit = 1; end
    if (kind == 4 && cr == refi) begin px = cx; py = cy; hit = 1; end
    if (!hit) begin
      if (!aB && !aC && aA) begin bx2 = ax; by2 = ay; br = ar; cx = ax; cy = ay; cr = ar; end
      m = int'(ar == refi) + int'(br == refi) + int'(cr == refi);
      if (m == 1 && ar == refi) begin px = ax; py = ay; end
      else if (m == 1 && br == refi) begin px = bx2; py = by2; end
      else if (m == 1) begin px = cx; py = cy; end
      else begin px = med3(ax, bx2, cx); py = med3(ay, by2, cy); end
    end
    // MV arithmetic wraps at the field widths, as in the hardware
    px = sxv(MVX_W'(px + mdx)); py = syv(MVY_W'(py + mdy));
    for (int j = 0; j < h; j++)
      for (int i = 0; i < w; i++) begin
        fx[l][Y0+j][X0+i] = px; fy[l][Y0+j][X0+i] = py; fr[l][Y0+j][X0+i] = refi;
      end
    pd.list = l[0]; pd.ox = 2'(ox); pd.oy = 2'(oy); pd.w = 3'(w); pd.h = 3'(h);
    pd.mv.x = MVX_W'(px); pd.mv.y = MVY_W'(py); pd.ref_idx = REF_W'(refi);
    exp_parts.push_back(pd);
  endtask

  task automatic unused_part(input int l, input int X0, input int Y0, input int w, input int h);
    for (int j = 0; j < h; j++)
      for (int i = 0; i < w; i++) begin
        fx[l][Y0+j][X0+i] = 0; fy[l][Y0+j][X0+i] = 0; fr[l][Y0+j][X0+i] = -1;
      end
  endtask

  // expected cost in cycles of the block walk
  int cost;

  task automatic model_mb(input int mx, input int my);
    int nps, pw, ph, pox[4], poy[4], q, ptot;
    // list the partitions in decoding order, as (ox, oy, w, h) in 4x4 units
    int lox[16], loy[16], lw[16], lh[16], lkind[16];
    ptot = 0;
    case (mb.part)
      PART_16X16: begin lox[0]=0; loy[0]=0; lw[0]=4; lh[0]=4; lkind[0]=0; ptot=1; end
      PART_16X8:  begin for (int p = 0; p < 2; p++) begin lox[p]=0; loy[p]=2*p; lw[p]=4; lh[p]=2; lkind[p]=1+p; end ptot=2; end
      PART_8X16:  begin for (int p = 0; p < 2; p++) begin lox[p]=2*p; loy[p]=0; lw[p]=2; lh[p]=4; lkind[p]=3+p; end ptot=2; end
      default: begin
        for (int qq = 0; qq < 4; qq++) begin
          int qx, qy;
          qx = 2*(qq%2); qy = 2*(qq/2);
          case (sub_part_e'(mb.sub[qq]))
            SUB_8X8: begin lox[ptot]=qx; loy[ptot]=qy; lw[ptot]=2; lh[ptot]=2; lkind[ptot]=0; ptot++; end
            SUB_8X4: for (int s = 0; s < 2; s++) begin lox[ptot]=qx; loy[ptot]=qy+s; lw[ptot]=2; lh[ptot]=1; lkind[ptot]=0; ptot++; end
            SUB_4X8: for (int s = 0; s < 2; s++) begin lox[ptot]=qx+s; loy[ptot]=qy; lw[ptot]=1; lh[ptot]=2; lkind[ptot]=0; ptot++; end
            default: for (int s = 0; s < 4; s++) begin lox[ptot]=qx+s%2; loy[ptot]=qy+s/2; lw[ptot]=1; lh[ptot]=1; lkind[ptot]=0; ptot++; end
          endcase
        end
      end
    endcase
    // predictions: all L0 partitions are sent before all L1 partitions (hardware order),
    // each list walks its partitions in double-z order of their first block
    cost = 0;
    for (int l = 0; l < 2; l++) begin
      for (int b = 0; b < 16; b++) begin
        int bxx, byy, qd;
        bxx = 2*((b>>2)&1) + (b & 1); byy = 2*((b>>3)&1) + ((b>>1)&1);
        qd = b >> 2;
        // is (bxx,byy) the first block of a partition?
        begin
          int pi;
          pi = -1;
          for (int p = 0; p < ptot; p++) if (lox[p] == bxx && loy[p] == byy) pi = p;
          if (pi >= 0 && mb.pred_flag[qd][l]) begin
            logic [MVX_W+MVY_W-1:0] md;
            md = l ? mb.mvd_l1[b] : mb.mvd_l0[b];
            // decoded flags for this list's view: everything of partitions before pi
            for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) fdec[my*4+j][mx*4+i] = 0;
            for (int p = 0; p < pi; p++)
              for (int j = 0; j < lh[p]; j++) for (int i = 0; i < lw[p]; i++)
                fdec[my*4+loy[p]+j][mx*4+lox[p]+i] = 1;
            do_part(l, mx*4+bxx, my*4+byy, lw[pi], lh[pi], lkind[pi],
                    srv(l ? mb.ref_l1[qd] : mb.ref_l0[qd]),
                    sxv(md[MVX_W+MVY_W-1:MVY_W]), syv(md[MVY_W-1:0]), bxx, byy);
            cost += 3;
          end else begin
            cost += 1;
            if (pi >= 0) unused_part(l, mx*4+bxx, my*4+byy, lw[pi], lh[pi]);
          end
        end
      end
    end
    for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) fdec[my*4+j][mx*4+i] = 1;
  endtask

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
      PART_16X16: for (int q = 1; q < 4; q++) begin m.pred_flag[q] = m.pred_flag[0]; m.ref_l0[q] = m.ref_l0[0]; m.ref_l1[q] = m.ref_l1[0]; end
      PART_16X8: begin m.pred_flag[1] = m.pred_flag[0]; m.pred_flag[3] = m.pred_flag[2];
                       m.ref_l0[1] = m.ref_l0[0]; m.ref_l0[3] = m.ref_l0[2]; m.ref_l1[1] = m.ref_l1[0]; m.ref_l1[3] = m.ref_l1[2]; end
      PART_8X16: begin m.pred_flag[2] = m.pred_flag[0]; m.pred_flag[3] = m.pred_flag[1];
                       m.ref_l0[2] = m.ref_l0[0]; m.ref_l0[3] = m.ref_l0[1]; m.ref_l1[2] = m.ref_l1[0]; m.ref_l1[3] = m.ref_l1[1]; end
      default: ;
    endcase
    if ($urandom % 8 == 0) m.pred_flag = '0;   // intra MB
    for (int b = 0; b < 16; b++) begin
      int dx0, dy0, dx1, dy1;
      logic [MVX_W-1:0] ux0, ux1;
      logic [MVY_W-1:0] uy0, uy1;
      dx0 = int'($urandom_range(40)) - 20; dy0 = int'($urandom_range(40)) - 20;
      dx1 = int'($urandom_range(40)) - 20; dy1 = int'($urandom_range(40)) - 20;
      ux0 = MVX_W'(dx0); uy0 = MVY_W'(dy0); ux1 = MVX_W'(dx1); uy1 = MVY_W'(dy1);
      m.mvd_l0[b] = {ux0, uy0};
      m.mvd_l1[b] = {ux1, uy1};
    end
    return m;
  endfunction

  always @(posedge clk) if (part_valid && part_ready) begin
    part_desc_t e;
    checks++;
    if (exp_parts.size() == 0) begin failures++; $display("FAIL unexpected partition"); end
    else begin
      e = exp_parts.pop_front();
      if (part != e) begin
        failures++;
        $display("FAIL partition got l%0d o(%0d,%0d) %0dx%0d mv(%0d,%0d) r%0d exp l%0d o(%0d,%0d) %0dx%0d mv(%0d,%0d) r%0d",
                 part.list, part.ox, part.oy, part.w, part.h, sxv(part.mv.x), syv(part.mv.y), srv(part.ref_idx),
                 e.list, e.ox, e.oy, e.w, e.h, sxv(e.mv.x), syv(e.mv.y), srv(e.ref_idx));
      end
    end
  end

  always @(posedge clk) part_ready <= ($urandom % 4 != 0);

  initial begin
    int cyc;
    mb = '0; pic_w_mbs = MBX_W'(PW);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pic = 0; pic < 6; pic++) begin
      for (int j = 0; j < PH*4; j++) for (int i = 0; i < PW*4; i++) fdec[j][i] = 0;
      for (int my = 0; my < PH; my++)
        for (int mx = 0; mx < PW; mx++) begin
          mb = rand_mb(mx, my);
          cnt_part[int'(mb.part)]++;
          if (mb.pred_flag == '0) cnt_intra++;
          if (mb.pred_flag[0] == 2'b11) cnt_bi++;
          if (mb.part == PART_8X8) for (int q = 0; q < 4; q++) cnt_sub[int'(mb.sub[q])]++;
          model_mb(mx, my);
          @(negedge clk); start = 1; @(negedge clk); start = 0;
          cyc = 1;
          while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
          checks++;
          // the walk may be longer when partitions wait for part_ready
          if (cyc < 5 + cost) begin failures++; $display("FAIL cycles %0d < %0d", cyc, 5 + cost); end
          for (int l = 0; l < 2; l++)
            for (int b = 0; b < 16; b++) begin
              int bxx, byy, X, Y;
              bxx = 2*((b>>2)&1) + (b & 1); byy = 2*((b>>3)&1) + ((b>>1)&1);
              X = mx*4 + bxx; Y = my*4 + byy;
              checks++;
              if (sxv(cur_mv[l][b].mv.x) != fx[l][Y][X] || syv(cur_mv[l][b].mv.y) != fy[l][Y][X] ||
                  srv(cur_mv[l][b].ref_idx) != fr[l][Y][X]) begin
                failures++;
                $display("FAIL mb(%0d,%0d) part %0d l%0d blk %0d got (%0d,%0d) r%0d exp (%0d,%0d) r%0d", mx, my,
                         mb.part, l, b, sxv(cur_mv[l][b].mv.x), syv(cur_mv[l][b].mv.y), srv(cur_mv[l][b].ref_idx),
                         fx[l][Y][X], fy[l][Y][X], fr[l][Y][X]);
              end
            end
          checks++;
          if (exp_parts.size() != 0) begin failures++; $display("FAIL %0d partitions missing", exp_parts.size()); exp_parts.delete(); end
        end
    end
    // worst case timing with part_ready always high: sixteen bi-predicted 4x4 blocks
    begin
      mb = rand_mb(0, 0);
      mb.part = PART_8X8; mb.sub = '1; mb.pred_flag = {4{2'b11}};
      for (int j = 0; j < PH*4; j++) for (int i = 0; i < PW*4; i++) fdec[j][i] = 0;
      model_mb(0, 0);
      force part_ready = 1'b1;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 5 + 96) begin failures++; $display("FAIL worst case %0d cycles, exp %0d", cyc, 5 + 96); end
      release part_ready;
      exp_parts.delete();
    end
    for (int k = 0; k < 4; k++) begin
      checks += 2;
      if (cnt_part[k] == 0) begin failures++; $display("FAIL mb type %0d never used", k); end
      if (cnt_sub[k] == 0) begin failures++; $display("FAIL sub type %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

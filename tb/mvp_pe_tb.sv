// Self-checking test of mvp_pe: random neighbours, availabilities,
// reference indices (from a small set so that matches are frequent),
// direction rules and mvd, against a model of the H.264 predictor rules
// with the median computed as sum minus minimum minus maximum. Checks that
// the result comes in cycle 2 after start (three cycles per block).
//
// The reference model follows the standard's predictor rules; the 3-cycle
// latency is the document's.
module mvp_pe_tb;
  import mc_pkg::*;
  logic clk = 0, rst_n = 1'b1, start = 0, done;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock
  mvp_dir_e dir;
  logic [REF_W-1:0] ref_idx;
  mvinfo_t na, nb, nc, nd;
  logic avail_a, avail_b, avail_c, avail_d;
  mv_t mvd, mv;
  int checks = 0, failures = 0;
  int cnt_dir[5], cnt_single, cnt_copyA;

  always #5 clk = ~clk;

  mvp_pe dut (.clk, .rst_n, .start, .dir, .ref_idx, .na, .nb, .nc, .nd,
              .avail_a, .avail_b, .avail_c, .avail_d, .mvd, .mv, .done);

  function automatic int sxv(input logic signed [MVX_W-1:0] v);
    return int'(v);
  endfunction
  function automatic int syv(input logic signed [MVY_W-1:0] v);
    return int'(v);
  endfunction

  function automatic int med3(input int p, input int q, input int r);
    // median = sum minus minimum minus maximum
    int mn, mx;
    mn = (p < q) ? p : q; mn = (mn < r) ? mn : r;
    mx = (p > q) ? p : q; mx = (mx > r) ? mx : r;
    return p + q + r - mn - mx;
  endfunction

  function automatic mvinfo_t rnd_nb(input logic av);
    mvinfo_t n;
    if (!av) return MVINFO_NONE;
    n.ref_idx = REF_W'(int'($urandom % 3) - 1);
    if (n.ref_idx == '1) n.mv = '0;
    else begin
      n.mv.x = MVX_W'(int'($urandom % 401) - 200);
      n.mv.y = MVY_W'(int'($urandom % 201) - 100);
    end
    return n;
  endfunction

  task automatic one();
    mvinfo_t A, B, C;
    bit avB, avC, dirhit;
    int ex, ey, m;
    int cyc;
    avail_a = 1'($urandom); avail_b = 1'($urandom); avail_c = 1'($urandom); avail_d = 1'($urandom);
    na = rnd_nb(avail_a); nb = rnd_nb(avail_b); nc = rnd_nb(avail_c); nd = rnd_nb(avail_d);
    dir = mvp_dir_e'($urandom % 5);
    ref_idx = REF_W'($urandom % 2);
    mvd.x = MVX_W'(int'($urandom % 61) - 30);
    mvd.y = MVY_W'(int'($urandom % 61) - 30);
    // model
    A = na; B = nb; C = avail_c ? nc : nd; avB = avail_b; avC = avail_c || avail_d;
    dirhit = 1'b0;
    case (dir)
      MVP_16X8_UP:    if (B.ref_idx == ref_idx) begin ex = sxv(B.mv.x); ey = syv(B.mv.y); dirhit = 1; end
      MVP_16X8_LO, MVP_8X16_LEFT:
                      if (A.ref_idx == ref_idx) begin ex = sxv(A.mv.x); ey = syv(A.mv.y); dirhit = 1; end
      MVP_8X16_RIGHT: if (C.ref_idx == ref_idx) begin ex = sxv(C.mv.x); ey = syv(C.mv.y); dirhit = 1; end
      default: ;
    endcase
    if (dirhit) cnt_dir[int'(dir)]++;
    if (!dirhit) begin
      if (!avB && !avC && avail_a) begin B = A; C = A; cnt_copyA++; end
      m = int'(A.ref_idx == ref_idx) + int'(B.ref_idx == ref_idx) + int'(C.ref_idx == ref_idx);
      if (m == 1) begin
        cnt_single++;
        if (A.ref_idx == ref_idx) begin ex = sxv(A.mv.x); ey = syv(A.mv.y); end
        else if (B.ref_idx == ref_idx) begin ex = sxv(B.mv.x); ey = syv(B.mv.y); end
        else begin ex = sxv(C.mv.x); ey = syv(C.mv.y); end
      end else begin
        ex = med3(sxv(A.mv.x), sxv(B.mv.x), sxv(C.mv.x));
        ey = med3(syv(A.mv.y), syv(B.mv.y), syv(C.mv.y));
      end
    end
    ex += sxv(mvd.x); ey += syv(mvd.y);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 10) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 2) begin failures++; $display("FAIL latency %0d", cyc); end
    if (sxv(mv.x) != ex || syv(mv.y) != ey) begin
      failures++;
      $display("FAIL dir=%0d got (%0d,%0d) exp (%0d,%0d) av=%b%b%b%b ref=%0d A=%0d,%0d,%0d B=%0d,%0d,%0d C=%0d,%0d,%0d D=%0d,%0d,%0d", dir, sxv(mv.x), syv(mv.y), ex, ey, avail_a, avail_b, avail_c, avail_d, ref_idx, na.mv.x, na.mv.y, na.ref_idx, nb.mv.x, nb.mv.y, nb.ref_idx, nc.mv.x, nc.mv.y, nc.ref_idx, nd.mv.x, nd.mv.y, nd.ref_idx);
    end
  endtask

  initial begin
    dir = MVP_MEDIAN; ref_idx = 0; na = MVINFO_NONE; nb = MVINFO_NONE; nc = MVINFO_NONE; nd = MVINFO_NONE;
    avail_a = 0; avail_b = 0; avail_c = 0; avail_d = 0; mvd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3000) one();
    // every rule must have been exercised
    for (int d = 1; d < 5; d++) begin
      checks++;
      if (cnt_dir[d] == 0) begin failures++; $display("FAIL direction rule %0d never used", d); end
    end
    checks += 2;
    if (cnt_single == 0) begin failures++; $display("FAIL single-match rule never used"); end
    if (cnt_copyA == 0) begin failures++; $display("FAIL A-copy rule never used"); end
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

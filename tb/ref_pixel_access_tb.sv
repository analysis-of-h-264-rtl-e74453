// Self-checking testbench of ref_pixel_access (with data_request_gen).
//
// Random partitions (every size, any position in the MB, random list,
// reference index and MV, including MVs that point far outside the
// picture) are fed for random MBs of a 64x48 picture. The reference memory
// is the behavioural model ref_mem_model. For each partition the bench
// checks:
//   - the number of row requests: luma rows N+5 when the vertical fraction
//     is non-zero, else N; chroma 2h+1 rows per component;
//   - the luma row length when the row lies inside the picture: M+5 when
//     the horizontal fraction is non-zero, else M (precision based request);
//   - the buffer writes: w*h of them, in raster order inside the partition,
//     at the double-z block index, each window sample equal to the edge-
//     clamped reference sample wherever the block's fractions need it (all
//     9 rows or columns with a fraction, the middle 4 without), and the
//     chroma fraction;
//   - without memory back-pressure, the busy time: rows are requested
//     group by group (the rows block row g still lacks: luma, then Cb, then
//     Cr), one per cycle, and block row g is written, one block per cycle,
//     from the cycle after its last row has arrived.
// The second half of the run makes the memory drop ready at random.
//
// The request sizes checked are the document's Tables 4.2 and 4.3.
module ref_pixel_access_tb;
  import mc_pkg::*;
  import mc_tb_pkg::*;

  localparam int W = 64, H = 48, LAT = 4, NPART = 600;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock
  always #5 clk = ~clk;

  logic [MBX_W-1:0] mb_x;
  logic [MBY_W-1:0] mb_y;
  logic             part_valid, part_ready, busy;
  part_desc_t       part;
  logic             req_valid, req_ready, resp_valid, stall_en;
  mem_req_t         req;
  pix_t [ARR-1:0]   resp_data;
  logic             buf_we, buf_wlist;
  logic [3:0]       buf_waddr;
  lrow_t            buf_wluma;
  crow_t            buf_wchroma;

  ref_pixel_access dut (
    .clk, .rst_n, .pic_w(COORD_W'(W)), .pic_h(COORD_W'(H)), .mb_x, .mb_y,
    .part_valid, .part_ready, .part, .busy,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req(req),
    .mem_resp_valid(resp_valid), .mem_resp_data(resp_data),
    .buf_we, .buf_wlist, .buf_waddr, .buf_wluma, .buf_wchroma);

  ref_mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .stall_en, .req_valid, .req_ready, .req, .resp_valid, .resp_data);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // monitor: counts requests, samples and busy cycles of the current partition
  int nreq_seen, busy_cyc, min_len, max_len, luma_rows;
  always @(posedge clk) begin
    if (busy) busy_cyc++;
    if (req_valid && req_ready) begin
      nreq_seen++;
      if (req.plane == PL_Y) begin
        luma_rows++;
        if (int'(req.len) < min_len) min_len = int'(req.len);
        if (int'(req.len) > max_len) max_len = int'(req.len);
      end
    end
  end

  function automatic int sx(input logic [MVX_W-1:0] v); return int'(signed'(v)); endfunction
  function automatic int sy(input logic [MVY_W-1:0] v); return int'(signed'(v)); endfunction

  initial begin
    int sizes[3] = '{1, 2, 4};
    int w, h, ox, oy, mvx, mvy, xf, yf, lx0, ly0, cx0, cy0, rf, rl, cf, cl, nl, nc;
    int bi, bj, ar, ac, exp_v, ref_i, lst, nfar = 0, nclamp = 0;
    logic ok;
    part_valid = 1'b0; part = '0; mb_x = '0; mb_y = '0; stall_en = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NPART; n++) begin
      stall_en = (n >= NPART / 2);
      w  = sizes[$urandom_range(2)];
      h  = sizes[$urandom_range(2)];
      ox = (w == 4) ? 0 : w * $urandom_range(4 / w - 1);
      oy = (h == 4) ? 0 : h * $urandom_range(4 / h - 1);
      if ($urandom_range(9) == 0) begin
        mvx = $urandom_range(8000) - 4000;     // far outside
        mvy = $urandom_range(1600) - 800;
        nfar++;
      end else begin
        mvx = $urandom_range(160) - 80;
        mvy = $urandom_range(160) - 80;
      end
      lst   = $urandom_range(1);
      ref_i = $urandom_range(3);
      @(negedge clk);
      mb_x = MBX_W'($urandom_range(W / 16 - 1));
      mb_y = MBY_W'($urandom_range(H / 16 - 1));
      part = '{list: lst[0], ox: 2'(ox), oy: 2'(oy), w: 3'(w), h: 3'(h),
               mv: '{x: MVX_W'(mvx), y: MVY_W'(mvy)}, ref_idx: REF_W'(ref_i)};
      part_valid = 1'b1;
      // expected geometry
      xf  = mvx & 3;  yf = mvy & 3;
      lx0 = 16 * int'(mb_x) + 4 * ox + (mvx >>> 2) - 2;
      ly0 = 16 * int'(mb_y) + 4 * oy + (mvy >>> 2) - 2;
      cx0 = 8 * int'(mb_x) + 2 * ox + (mvx >>> 3);
      cy0 = 8 * int'(mb_y) + 2 * oy + (mvy >>> 3);
      cf  = xf ? 0 : 2;  cl = xf ? 4 * w + 4 : 4 * w + 1;
      rf  = yf ? 0 : 2;  rl = yf ? 4 * h + 4 : 4 * h + 1;
      nl  = rl - rf + 1; nc = 2 * h + 1;
      nreq_seen = 0; busy_cyc = 0; min_len = 99; max_len = 0; luma_rows = 0;
      @(posedge clk);
      while (!part_ready) @(posedge clk);
      @(negedge clk);
      part_valid = 1'b0;
      bi = 0; bj = 0;
      for (int k = 0; k < w * h; k++) begin
        while (!buf_we) @(negedge clk);
        check(buf_waddr == blk_idx(2'(ox + bi), 2'(oy + bj)) && buf_wlist == lst[0], "write address");
        ok = 1'b1;
        for (int r = 0; r < LWIN; r++)
          for (int c = 0; c < LWIN; c++) begin
            ar = 4 * bj + r; ac = 4 * bi + c;
            // the cells this block's fractions need
            if ((yf ? 1 : (r >= 2 && r <= 5)) && (xf ? 1 : (c >= 2 && c <= 5))) begin
              exp_v = ref_pix(0, lst, ref_i, clampi(lx0 + ac, W - 1), clampi(ly0 + ar, H - 1));
              if (buf_wluma[r][c] != 8'(exp_v)) ok = 1'b0;
            end
          end
        check(ok, "luma window");
        ok = 1'b1;
        for (int r = 0; r < CWIN; r++)
          for (int c = 0; c < CWIN; c++) begin
            if (buf_wchroma.cb[r][c] != ref_pix(1, lst, ref_i, clampi(cx0 + 2 * bi + c, W / 2 - 1),
                                                clampi(cy0 + 2 * bj + r, H / 2 - 1))) ok = 1'b0;
            if (buf_wchroma.cr[r][c] != ref_pix(2, lst, ref_i, clampi(cx0 + 2 * bi + c, W / 2 - 1),
                                                clampi(cy0 + 2 * bj + r, H / 2 - 1))) ok = 1'b0;
          end
        check(ok, "chroma windows");
        check(int'(buf_wchroma.cfx) == (mvx & 7) && int'(buf_wchroma.cfy) == (mvy & 7), "chroma fraction");
        bi++;
        if (bi == w) begin bi = 0; bj++; end
        @(negedge clk);
      end
      check(!buf_we, "no extra write");
      @(negedge clk);
      check(!busy, "idle after the last write");
      check(nreq_seen == nl + 2 * nc, $sformatf("request count %0d, expected %0d", nreq_seen, nl + 2 * nc));
      check(luma_rows == (yf ? 4 * h + 5 : 4 * h), "luma rows per Table 4.3");
      if (lx0 + cf >= 0 && lx0 + cl <= W - 1)
        check(min_len == max_len && max_len == (xf ? 4 * w + 5 : 4 * w), "luma row length per Table 4.3");
      else
        nclamp++;
      if (!stall_en) begin
        // rows go out group by group (what block row g still lacks); block
        // row g is written once its last row has arrived
        int k, lrow, crow, ready_g, end_w, lt;
        k = 0; lrow = rf; crow = 0; end_w = 0;
        for (int g = 0; g < h; g++) begin
          lt = yf ? 4 * g + 8 : 4 * g + 5;
          while (lrow <= lt) begin lrow++; k++; end
          while (crow <= 2 * g + 2) begin crow++; k += 2; end
          ready_g = (k - 1) + LAT + 1;
          end_w = ((ready_g > end_w) ? ready_g : end_w) + w;
        end
        check(k == nl + 2 * nc, "request schedule length");
        check(busy_cyc == end_w, $sformatf("busy cycles %0d, expected %0d", busy_cyc, end_w));
      end
    end
    check(nfar > 10 && nclamp > 10, "boundary cases exercised");
    $display("partitions=%0d far=%0d clamped=%0d", NPART, nfar, nclamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

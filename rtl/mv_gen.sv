// Motion vector generation for one macroblock (MVG stage, first half).
//
// The macroblock is walked as 32 4x4 blocks: block index 0..15 of L0, then
// 0..15 of L1, each in double-z order. For every block:
//   - if its 8x8 quadrant does not use the list, the block is marked unused
//     (ref_idx = -1, zero MV)                                   1 cycle;
//   - if it is the first (top-left) block of its partition, the MV is
//     reconstructed by mvp_pe, written to the current MV buffer and the
//     partition is sent on (part_*)                              3 cycles;
//   - otherwise the block copies the MV of its partition's first block,
//     which skips the prediction                                  1 cycle.
// Before the walk the neighbouring data are preloaded (3 cycles): the
// bottom row of the above MB and the bottom-left block of the above-right
// MB from the neighbouring MV buffer; the above-left block is kept from the
// previous MB's preload, because the previous MB has already overwritten
// that column of the buffer with its own bottom row. The left MB's right
// column is kept in registers. After the walk the bottom row of both lists
// is written back to the neighbouring MV buffer (1 cycle).
// Worst case (sixteen 4x4 bi-predicted blocks): 3 + 96 + 1 cycles.
//
// Neighbour availability assumes one slice per picture and macroblocks
// given in raster order, every MB of the picture included (an intra MB is
// given with all pred_flag bits zero, which marks its motion data unused).
// Partitions go out on a valid/ready port; at most 32 per MB are sent.
//
// Interface: start (one cycle) with mb and pic_w_mbs valid; done pulses
// when the walk and the write-back are complete. cur_mv exposes the current
// MV buffer ([list][block index]); it is stable from done to the next start.
//
// Follows the document: the double-z walk over 32 block indices, prediction
// only for the first block of a partition, three cycles per predicted block,
// the bottom-row write-back and the worst case of preload + 96 cycles. This
// design's own: the 3-cycle preload, the above-left register and the
// partition port.
module mv_gen
  import mc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  mb_info_t            mb,
  input  logic [MBX_W-1:0]    pic_w_mbs,
  output logic                done,
  // neighbouring MV buffer
  output logic                nb_re,
  output logic [MBX_W-1:0]    nb_raddr,
  input  mvinfo_t [3:0]       nb_rdata_l0,
  input  mvinfo_t [3:0]       nb_rdata_l1,
  output logic                nb_we,
  output logic [MBX_W-1:0]    nb_waddr,
  output mvinfo_t [3:0]       nb_wdata_l0,
  output mvinfo_t [3:0]       nb_wdata_l1,
  // partitions to reference pixel accessing
  output logic                part_valid,
  input  logic                part_ready,
  output part_desc_t          part,
  // current MV buffer
  output mvinfo_t [1:0][15:0] cur_mv
);
  typedef enum logic [2:0] {G_IDLE, G_PRE0, G_PRE1, G_PRE2, G_BLK, G_MVP, G_PUSH, G_WB} gstate_e;
  gstate_e st;

  mb_info_t          mb_q;
  logic              list;
  logic [3:0]        idx;

  // neighbour registers, per list
  mvinfo_t [1:0][3:0] above, left;
  mvinfo_t [1:0]      above_l, above_r;
  mvinfo_t [1:0]      above_l_next;    // above-left of the next MB
  logic               avail_left, avail_up, avail_ur;

  // ---------------- partition geometry of the current block ----------------
  logic [1:0] bx, by, q, ox, oy;
  logic [2:0] w, h;
  logic       first, used;
  mvp_dir_e   dir;
  logic [3:0] oidx;

  always_comb begin
    bx = blk_x(idx);
    by = blk_y(idx);
    q  = idx[3:2];
    ox = bx; oy = by; w = 3'd1; h = 3'd1;
    dir = MVP_MEDIAN;
    unique case (mb_q.part)
      PART_16X16: begin ox = 2'd0; oy = 2'd0; w = 3'd4; h = 3'd4; end
      PART_16X8:  begin ox = 2'd0; oy = {by[1], 1'b0}; w = 3'd4; h = 3'd2;
                        dir = by[1] ? MVP_16X8_LO : MVP_16X8_UP; end
      PART_8X16:  begin ox = {bx[1], 1'b0}; oy = 2'd0; w = 3'd2; h = 3'd4;
                        dir = bx[1] ? MVP_8X16_RIGHT : MVP_8X16_LEFT; end
      default: begin
        unique case (sub_part_e'(mb_q.sub[q]))
          SUB_8X8: begin ox = {bx[1], 1'b0}; oy = {by[1], 1'b0}; w = 3'd2; h = 3'd2; end
          SUB_8X4: begin ox = {bx[1], 1'b0}; oy = by;            w = 3'd2; h = 3'd1; end
          SUB_4X8: begin ox = bx;            oy = {by[1], 1'b0}; w = 3'd1; h = 3'd2; end
          default: begin ox = bx;            oy = by;            w = 3'd1; h = 3'd1; end
        endcase
      end
    endcase
    first = (ox == bx) && (oy == by);
    oidx  = blk_idx(ox, oy);
    used  = mb_q.pred_flag[q][list];
  end

  // ---------------- neighbour fetch ----------------
  // x, y in 4x4 units relative to the MB, -1..4 and -1..3
  function automatic mvinfo_t nb_get(input logic signed [3:0] x, input logic signed [3:0] y);
    if (y < 0) begin
      if (x < 0)      return above_l[list];
      else if (x > 3) return above_r[list];
      else            return above[list][x];
    end else if (x < 0) return left[list][y];
    else if (x > 3)     return MVINFO_NONE;
    else                return cur_mv[list][blk_idx(2'(x), 2'(y))];
  endfunction
  function automatic logic nb_avail(input logic signed [3:0] x, input logic signed [3:0] y);
    if (y < 0) begin
      if (x < 0)      return avail_up && avail_left;
      else if (x > 3) return avail_ur;
      else            return avail_up;
    end else if (x < 0) return avail_left;
    else if (x > 3)     return 1'b0;
    else                return blk_idx(2'(x), 2'(y)) < oidx;   // decoded earlier in this MB
  endfunction

  logic signed [3:0] xa, ya, xc, oxs, oys;
  mvinfo_t na, nbv, nc, nd;
  logic    ava, avb, avc, avd;
  logic [REF_W-1:0] cur_ref;
  logic [MVX_W+MVY_W-1:0] cur_mvd;
  always_comb begin
    oxs = signed'({2'b00, ox});
    oys = signed'({2'b00, oy});
    xa  = oxs - 4'sd1;
    ya  = oys - 4'sd1;
    xc  = oxs + signed'({1'b0, w});
    ava = nb_avail(xa, oys);
    avb = nb_avail(oxs, ya);
    avc = nb_avail(xc, ya);
    avd = nb_avail(xa, ya);
    // an unavailable neighbour is presented as unused: ref_idx -1, zero MV
    na  = ava ? nb_get(xa, oys) : MVINFO_NONE;
    nbv = avb ? nb_get(oxs, ya) : MVINFO_NONE;
    nc  = avc ? nb_get(xc, ya)       : MVINFO_NONE;
    nd  = avd ? nb_get(xa, ya)       : MVINFO_NONE;
    cur_ref = list ? mb_q.ref_l1[q] : mb_q.ref_l0[q];
    cur_mvd = list ? mb_q.mvd_l1[idx] : mb_q.mvd_l0[idx];
  end

  logic pe_start, pe_done;
  mv_t  pe_mv;
  mvp_pe u_pe (.clk, .rst_n, .start(pe_start), .dir, .ref_idx(cur_ref),
               .na, .nb(nbv), .nc, .nd, .avail_a(ava), .avail_b(avb), .avail_c(avc), .avail_d(avd),
               .mvd(mv_t'(cur_mvd)), .mv(pe_mv), .done(pe_done));

  assign pe_start = (st == G_BLK) && used && first;

  // ---------------- neighbouring MV buffer access ----------------
  always_comb begin
    nb_re    = (st == G_PRE0) || (st == G_PRE1);
    nb_raddr = (st == G_PRE0) ? mb_q.mb_x : mb_q.mb_x + 1'b1;
    nb_we    = (st == G_WB);
    nb_waddr = mb_q.mb_x;
    for (int x = 0; x < 4; x++) begin
      nb_wdata_l0[x] = cur_mv[0][blk_idx(2'(x), 2'd3)];
      nb_wdata_l1[x] = cur_mv[1][blk_idx(2'(x), 2'd3)];
    end
  end

  // ---------------- partition output ----------------
  // sent in the cycle the MV is ready; held in part_q if not accepted
  part_desc_t part_q, part_new;
  assign part_new   = '{list: list, ox: ox, oy: oy, w: w, h: h, mv: pe_mv, ref_idx: cur_ref};
  assign part       = (st == G_PUSH) ? part_q : part_new;
  assign part_valid = (st == G_PUSH) || ((st == G_MVP) && pe_done);

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= G_IDLE; mb_q <= '0; list <= 1'b0; idx <= '0;
      above <= '0; left <= '0; above_l <= '0; above_r <= '0; above_l_next <= '0;
      avail_left <= 1'b0; avail_up <= 1'b0; avail_ur <= 1'b0;
      cur_mv <= '0; part_q <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        G_IDLE: if (start) begin
          mb_q       <= mb;
          avail_left <= (mb.mb_x != '0);
          avail_up   <= (mb.mb_y != '0);
          avail_ur   <= (mb.mb_y != '0) && (mb.mb_x + 1'b1 < pic_w_mbs);
          // above-left: the above row of the previous MB (same row) still holds it
          above_l    <= above_l_next;
          st         <= G_PRE0;
        end
        G_PRE0: st <= G_PRE1;
        G_PRE1: begin
          above[0] <= nb_rdata_l0;
          above[1] <= nb_rdata_l1;
          st       <= G_PRE2;
        end
        G_PRE2: begin
          above_r[0] <= nb_rdata_l0[0];
          above_r[1] <= nb_rdata_l1[0];
          list <= 1'b0;
          idx  <= '0;
          st   <= G_BLK;
        end
        G_BLK: begin
          if (!used) begin
            cur_mv[list][idx] <= MVINFO_NONE;
            st <= G_BLK;
          end else if (!first) begin
            cur_mv[list][idx] <= cur_mv[list][oidx];
            st <= G_BLK;
          end else begin
            st <= G_MVP;
          end
          if (!used || !first) begin
            idx <= idx + 4'd1;
            if (idx == 4'd15) begin
              list <= ~list;
              if (list) st <= G_WB;
            end
          end
        end
        G_MVP: if (pe_done) begin
          cur_mv[list][idx] <= '{mv: pe_mv, ref_idx: cur_ref};
          part_q <= part_new;
          if (part_ready) begin
            idx <= idx + 4'd1;
            st  <= G_BLK;
            if (idx == 4'd15) begin
              list <= ~list;
              if (list) st <= G_WB;
            end
          end else begin
            st <= G_PUSH;
          end
        end
        G_PUSH: if (part_ready) begin
          idx <= idx + 4'd1;
          st  <= G_BLK;
          if (idx == 4'd15) begin
            list <= ~list;
            if (list) st <= G_WB;
          end
        end
        G_WB: begin
          for (int y = 0; y < 4; y++) begin
            left[0][y] <= cur_mv[0][blk_idx(2'd3, 2'(y))];
            left[1][y] <= cur_mv[1][blk_idx(2'd3, 2'(y))];
          end
          above_l_next[0] <= above[0][3];
          above_l_next[1] <= above[1][3];
          done <= 1'b1;
          st   <= G_IDLE;
        end
        default: st <= G_IDLE;
      endcase
    end
  end
endmodule

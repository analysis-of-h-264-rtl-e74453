// Reference pixel accessing (MVG stage, second half).
//
// Takes one partition at a time (final MV known) and fetches its reference
// samples row by row from the external memory, then writes them to the
// reference data buffer as one entry per 4x4 block.
//
// Fetch: data_request_gen gives the area. Rows are requested one per
// cycle while the memory accepts, in groups: group g holds the rows that
// block row g of the partition still lacks, first luma (up to array row
// 4g+8 with a vertical fraction, 4g+5 without), then Cb, then Cr (up to
// row 2g+2). A request carries the first sample and the length of the row
// part that lies inside the picture; a row returns up to 21 samples (168
// bits) in one response, responses arriving in request order. Rows and
// columns outside the picture are not fetched: the request is clamped to
// the picture, and the clamped (edge-repeated) samples are rebuilt when a
// response is stored: array cell c of the row takes response sample
// clamp(x0 + c) - first sample. Luma goes into the 21x21 register array,
// Cb and Cr into two 9x9 arrays.
//
// Write-out: as soon as all rows of block row g have arrived, its blocks
// are written left to right, one per cycle, while later rows still come
// in; over the partition this is raster order. Each write holds the 9x9
// luma window at array offset (4*by, 4*bx), the 3x3 Cb and Cr windows at
// (2*by, 2*bx) and the chroma fraction, at the block index (double-z) with
// the list. Only the rows and columns that the block's fractions need are
// valid in the window; the others hold old data and are never used by the
// interpolators.
//
// Timing per partition: 1 accept cycle, then R request cycles (R = luma
// rows + 2 * chroma rows, see data_request_gen); the writes of a block row
// start the cycle after its last row arrives, so without back-pressure the
// partition ends w cycles after the last response at the earliest.
//
// Follows the document: block-size and precision based requests, 168-bit
// rows collected in a 21x21 array, edge extension rebuilt in the array,
// writes as soon as a block's rows are present, raster order within the
// partition. This design's own: the request format, the group order of
// the rows, the separate 9x9 chroma arrays, and taking the next partition
// only after the last write.
//
// Interface: part_valid/part_ready (ready only when idle); mem_req_valid /
// mem_req_ready; mem_resp_valid with 21 samples, first sample at index 0.
// busy is high from accepting a partition until its last buffer write.
module ref_pixel_access
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] pic_w,       // luma samples
  input  logic [COORD_W-1:0] pic_h,
  input  logic [MBX_W-1:0]   mb_x,
  input  logic [MBY_W-1:0]   mb_y,
  // partitions
  input  logic               part_valid,
  output logic               part_ready,
  input  part_desc_t         part,
  output logic               busy,
  // external memory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output mem_req_t           mem_req,
  input  logic               mem_resp_valid,
  input  pix_t [ARR-1:0]     mem_resp_data,
  // reference data buffer write port
  output logic               buf_we,
  output logic               buf_wlist,
  output logic [3:0]         buf_waddr,
  output lrow_t              buf_wluma,
  output crow_t              buf_wchroma
);
  typedef enum logic [0:0] {A_IDLE, A_FETCH} astate_e;
  astate_e st;

  part_desc_t p;

  // ---------------- geometry ----------------
  int         lx0, ly0, cx0, cy0;
  logic [4:0] cf, cl, rf, rl, ccols, crows;
  logic [2:0] cfx, cfy;

  data_request_gen u_drg (
    .mv(p.mv), .ox(p.ox), .oy(p.oy), .w(p.w), .h(p.h), .mb_x, .mb_y,
    .lx0, .ly0, .col_first(cf), .col_last(cl), .row_first(rf), .row_last(rl),
    .cx0, .cy0, .ccols, .crows, .cfx, .cfy);

  function automatic int clampi(input int v, input int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  int lw, lh, cw, ch;
  int lxs, lxe, cxs, cxe;
  always_comb begin
    lw  = int'(pic_w) - 1;
    lh  = int'(pic_h) - 1;
    cw  = int'(pic_w[COORD_W-1:1]) - 1;
    ch  = int'(pic_h[COORD_W-1:1]) - 1;
    lxs = clampi(lx0 + int'(cf), lw);
    lxe = clampi(lx0 + int'(cl), lw);
    cxs = clampi(cx0, cw);
    cxe = clampi(cx0 + int'(ccols) - 1, cw);
  end

  // ---------------- row order ----------------
  logic [1:0] yfrac;
  assign yfrac = p.mv.y[1:0];

  // Rows are fetched group by group: group g holds what block row g of the
  // partition still lacks, luma rows up to lt(g), then Cb and Cr rows up to
  // ct(g). Requests and responses follow the same order, each side keeping
  // its own row counters (next luma row, next Cb row, next Cr row).
  function automatic logic [4:0] lt(input int g);
    return 5'((yfrac != 2'd0) ? 4 * g + 8 : 4 * g + 5);
  endfunction
  function automatic logic [4:0] ct(input int g);
    return 5'(2 * g + 2);
  endfunction
  // plane of the next row after counters (nl_, ncb, ncr); valid = rows left
  function automatic logic [2:0] next_row(input logic [4:0] nl_, input logic [4:0] ncb,
                                          input logic [4:0] ncr);
    // returns {valid, plane[1:0]}
    for (int g = 0; g < 4; g++) begin
      if (g < int'(p.h)) begin
        if (nl_ <= lt(g)) return {1'b1, PL_Y};
        if (ncb <= ct(g)) return {1'b1, PL_CB};
        if (ncr <= ct(g)) return {1'b1, PL_CR};
      end
    end
    return {1'b0, PL_Y};
  endfunction

  // ---------------- requests ----------------
  logic [4:0] ql, qcb, qcr;    // next rows to request
  logic [2:0] qn;
  logic [4:0] qrow;
  always_comb begin
    qn   = next_row(ql, qcb, qcr);
    qrow = (qn[1:0] == PL_Y) ? ql : (qn[1:0] == PL_CB) ? qcb : qcr;
    mem_req_valid = (st == A_FETCH) && qn[2];
    mem_req = '0;
    mem_req.list    = p.list;
    mem_req.ref_idx = p.ref_idx;
    mem_req.plane   = plane_e'(qn[1:0]);
    if (qn[1:0] == PL_Y) begin
      mem_req.x   = COORD_W'(lxs);
      mem_req.y   = COORD_W'(clampi(ly0 + int'(qrow), lh));
      mem_req.len = 5'(lxe - lxs + 1);
    end else begin
      mem_req.x   = COORD_W'(cxs);
      mem_req.y   = COORD_W'(clampi(cy0 + int'(qrow), ch));
      mem_req.len = 5'(cxe - cxs + 1);
    end
  end

  // ---------------- register arrays ----------------
  pix_t [ARR-1:0][ARR-1:0]   larr;
  pix_t [CARR-1:0][CARR-1:0] cbarr, crarr;

  // ---------------- response alignment ----------------
  // The plane and row of the next response, and its samples moved to array
  // columns with the picture edge repeated.
  logic [4:0] al, acb, acr;    // next rows to arrive
  logic [2:0] an;
  logic [4:0] arow;
  pix_t [ARR-1:0]  lrow_new;
  pix_t [CARR-1:0] crow_new;
  always_comb begin
    an   = next_row(al, acb, acr);
    arow = (an[1:0] == PL_Y) ? al : (an[1:0] == PL_CB) ? acb : acr;
    for (int c = 0; c < ARR; c++)
      lrow_new[c] = mem_resp_data[5'(clampi(lx0 + c, lw) - lxs)];
    for (int c = 0; c < CARR; c++)
      crow_new[c] = mem_resp_data[5'(clampi(cx0 + c, cw) - cxs)];
  end

  // ---------------- write-out ----------------
  // Block row bj is written, left to right, once all its rows have arrived.
  logic [1:0] bi, bj;          // block inside the partition
  logic       row_ready;
  always_comb begin
    row_ready = (al > lt(int'(bj))) && (acb > ct(int'(bj))) && (acr > ct(int'(bj)));
    buf_we    = (st == A_FETCH) && row_ready;
    buf_wlist = p.list;
    buf_waddr = blk_idx(p.ox + bi, p.oy + bj);
    for (int r = 0; r < LWIN; r++)
      for (int c = 0; c < LWIN; c++)
        buf_wluma[r][c] = larr[4*int'(bj) + r][4*int'(bi) + c];
    buf_wchroma.cfx = FRAC_W'(cfx);
    buf_wchroma.cfy = FRAC_W'(cfy);
    for (int r = 0; r < CWIN; r++)
      for (int c = 0; c < CWIN; c++) begin
        buf_wchroma.cb[r][c] = cbarr[2*int'(bj) + r][2*int'(bi) + c];
        buf_wchroma.cr[r][c] = crarr[2*int'(bj) + r][2*int'(bi) + c];
      end
  end

  // every requested row lies inside the area given by data_request_gen
  // and every response belongs to an outstanding request
  always @(posedge clk) begin
    if (mem_req_valid) begin
      if (qn[1:0] == PL_Y) assert (qrow >= rf && qrow <= rl) else $error("luma row outside the area");
      else                 assert (qrow < crows)             else $error("chroma row outside the area");
    end
    if (mem_resp_valid) assert (st == A_FETCH && an[2]) else $error("unexpected memory response");
  end

  assign part_ready = (st == A_IDLE);
  assign busy       = (st != A_IDLE);

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; p <= '0; bi <= '0; bj <= '0;
      ql <= '0; qcb <= '0; qcr <= '0; al <= '0; acb <= '0; acr <= '0;
      larr <= '0; cbarr <= '0; crarr <= '0;
    end else begin
      unique case (st)
        A_IDLE: if (part_valid) begin
          p   <= part;
          // first luma row: 0 with a vertical fraction, else 2
          ql  <= (part.mv.y[1:0] != 2'd0) ? 5'd0 : 5'd2;
          al  <= (part.mv.y[1:0] != 2'd0) ? 5'd0 : 5'd2;
          qcb <= '0; qcr <= '0; acb <= '0; acr <= '0;
          bi  <= '0; bj <= '0;
          st  <= A_FETCH;
        end
        A_FETCH: begin
          if (mem_req_valid && mem_req_ready) begin
            unique case (qn[1:0])
              PL_Y:    ql  <= ql + 1'b1;
              PL_CB:   qcb <= qcb + 1'b1;
              default: qcr <= qcr + 1'b1;
            endcase
          end
          if (mem_resp_valid) begin
            unique case (an[1:0])
              PL_Y: begin
                al <= al + 1'b1;
                for (int c = 0; c < ARR; c++)
                  if (c >= int'(cf) && c <= int'(cl)) larr[arow][c] <= lrow_new[c];
              end
              PL_CB: begin
                acb <= acb + 1'b1;
                for (int c = 0; c < CARR; c++)
                  if (c < int'(ccols)) cbarr[arow][c] <= crow_new[c];
              end
              default: begin
                acr <= acr + 1'b1;
                for (int c = 0; c < CARR; c++)
                  if (c < int'(ccols)) crarr[arow][c] <= crow_new[c];
              end
            endcase
          end
          if (buf_we) begin
            if (bi == 2'(p.w - 3'd1)) begin
              bi <= '0;
              bj <= bj + 1'b1;
              if (bj == 2'(p.h - 3'd1)) st <= A_IDLE;
            end else begin
              bi <= bi + 1'b1;
            end
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule

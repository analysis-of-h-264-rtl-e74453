// Motion compensation unit of a scalable (SVC) H.264 decoder: top level.
//
// The unit takes one macroblock (MB) description at a time (partition
// shape, reference indices, MV differences) and returns the
// motion-compensated, residual-added samples of every inter MB. It is cut
// into two MB pipeline stages that overlap, as in a four-stage decoder
// pipeline:
//   MVG    mv_gen (MV prediction and reconstruction, with the
//          neighbouring MV buffer nb_mv_buffer), part_fifo, and
//          ref_pixel_access (row requests to the external memory through
//          the 21x21 register array) which fills one half of the reference
//          data buffer;
//   INTERP interp_stage (two interpolation units for L0 and L1, and pixel
//          reconstruction) which reads the other half.
// ref_data_buffer is the ping-pong buffer between them. When MVG has
// finished MB n (MV walk done, partition queue empty, last block written)
// and INTERP has finished MB n-1, both halves swap and INTERP starts MB n
// in the same cycle, while MVG may take MB n+1.
//
// Interface:
//   mb_valid / mb_ready     MB description in raster order, every MB of the
//                           picture given (an intra MB with all pred_flag
//                           bits zero); pic_w_mbs / pic_h_mbs picture size
//   mem_req_* / mem_resp_*  row requests to the memory controller, answered
//                           in order with 21 samples (168 bits) each
//   res_blk / resid         the INTERP stage names the 4x4 block whose
//                           residual (from inverse transform) must be on
//                           resid: 16 luma, 4 Cb, 4 Cr samples
//   rec_valid ...           one reconstructed 4x4 block per pulse, with its
//                           MB position and block index (double-z)
//   mb_done                 the INTERP stage finished an MB (also for intra)
// The external memory, the memory controller and the residual and intra
// paths are not part of this unit. Picture size, buffer sizes and cycle
// budgets follow the document; the handshakes are this design's own.
module svc_mc_top
  import mc_pkg::*;
#(
  parameter int MB_COLS    = 120,   // neighbouring MV buffer: MBs per row (1920 / 16)
  parameter int FIFO_DEPTH = 32     // partition queue
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [MBX_W-1:0]       pic_w_mbs,
  input  logic [MBY_W-1:0]       pic_h_mbs,
  // MB input
  input  logic                   mb_valid,
  output logic                   mb_ready,
  input  mb_info_t               mb,
  // external reference memory
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output mem_req_t               mem_req,
  input  logic                   mem_resp_valid,
  input  pix_t [ARR-1:0]         mem_resp_data,
  // residual
  output logic [3:0]             res_blk,
  input  logic [23:0][RES_W-1:0] resid,
  // reconstructed output
  output logic                   rec_valid,
  output logic [MBX_W-1:0]       rec_mb_x,
  output logic [MBY_W-1:0]       rec_mb_y,
  output logic [3:0]             rec_blk,
  output pix_t [23:0]            rec,
  output logic                   mb_done,
  // motion data of the MB in the MVG stage ([list][block index]), valid
  // from mvg_done until the next MB is taken (for deblocking and for
  // inter-layer motion prediction of the next layer)
  output mvinfo_t [1:0][15:0]    cur_mv,
  output logic                   mvg_done,
  output logic                   idle
);
  // ---------------- MVG stage ----------------
  logic             mvg_busy, mvg_gen_done;
  logic [MBX_W-1:0] mvg_mb_x;
  logic [MBY_W-1:0] mvg_mb_y;
  logic [3:0][1:0]  mvg_pf;
  logic             gen_start, gen_done;

  logic             nb_re, nb_we;
  logic [MBX_W-1:0] nb_raddr, nb_waddr;
  mvinfo_t [3:0]    nb_rdata_l0, nb_rdata_l1, nb_wdata_l0, nb_wdata_l1;
  logic             gp_valid, gp_ready, fp_valid, fp_ready, fifo_empty;
  part_desc_t       gp, fp;
  logic             rpa_busy;

  logic             buf_we, buf_wlist;
  logic [3:0]       buf_waddr;
  lrow_t            buf_wluma;
  crow_t            buf_wchroma;

  assign mb_ready  = !mvg_busy;
  assign gen_start = mb_valid && mb_ready;

  mv_gen u_mv_gen (
    .clk, .rst_n, .start(gen_start), .mb, .pic_w_mbs, .done(gen_done),
    .nb_re, .nb_raddr, .nb_rdata_l0, .nb_rdata_l1,
    .nb_we, .nb_waddr, .nb_wdata_l0, .nb_wdata_l1,
    .part_valid(gp_valid), .part_ready(gp_ready), .part(gp), .cur_mv);

  nb_mv_buffer #(.MB_COLS(MB_COLS)) u_nb_mv (
    .clk, .re(nb_re), .raddr(nb_raddr), .rdata_l0(nb_rdata_l0), .rdata_l1(nb_rdata_l1),
    .we(nb_we), .waddr(nb_waddr), .wdata_l0(nb_wdata_l0), .wdata_l1(nb_wdata_l1));

  part_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .in_valid(gp_valid), .in_ready(gp_ready), .in_data(gp),
    .out_valid(fp_valid), .out_ready(fp_ready), .out_data(fp), .empty(fifo_empty));

  ref_pixel_access u_rpa (
    .clk, .rst_n,
    .pic_w(COORD_W'({pic_w_mbs, 4'b0000})), .pic_h(COORD_W'({pic_h_mbs, 4'b0000})),
    .mb_x(mvg_mb_x), .mb_y(mvg_mb_y),
    .part_valid(fp_valid), .part_ready(fp_ready), .part(fp), .busy(rpa_busy),
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data,
    .buf_we, .buf_wlist, .buf_waddr, .buf_wluma, .buf_wchroma);

  // ---------------- reference data buffer ----------------
  logic                  swap, buf_re;
  logic [3:0]            buf_raddr;
  logic [LROW_W-1:0]     rluma_l0, rluma_l1;
  logic [CROW_W-1:0]     rchroma_l0, rchroma_l1;

  ref_data_buffer u_rdb (
    .clk, .rst_n, .swap, .wsel(),
    .we(buf_we), .wlist(buf_wlist), .waddr(buf_waddr), .wluma(buf_wluma), .wchroma(buf_wchroma),
    .re(buf_re), .raddr(buf_raddr), .rluma_l0, .rluma_l1, .rchroma_l0, .rchroma_l1);

  // ---------------- INTERP stage ----------------
  logic int_busy, int_start, int_done, int_stage_busy;

  interp_stage u_interp (
    .clk, .rst_n, .mb_start(int_start), .pred_flag(mvg_pf), .busy(int_stage_busy), .mb_done(int_done),
    .buf_re, .buf_raddr, .rluma_l0, .rluma_l1, .rchroma_l0, .rchroma_l1,
    .res_blk, .resid, .rec_valid, .rec_blk, .rec);

  // ---------------- MB pipeline control ----------------
  logic mvg_finished;
  assign mvg_finished = mvg_busy && (mvg_gen_done || gen_done) && fifo_empty && !rpa_busy;
  assign swap         = mvg_finished && !int_busy;
  assign int_start    = swap;
  assign mb_done      = int_done;
  assign mvg_done     = gen_done;
  assign idle         = !mvg_busy && !int_busy && !int_stage_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mvg_busy <= 1'b0; mvg_gen_done <= 1'b0; mvg_mb_x <= '0; mvg_mb_y <= '0; mvg_pf <= '0;
      int_busy <= 1'b0; rec_mb_x <= '0; rec_mb_y <= '0;
    end else begin
      if (gen_done) mvg_gen_done <= 1'b1;
      if (swap) begin
        mvg_busy <= 1'b0;
        int_busy <= 1'b1;
        rec_mb_x <= mvg_mb_x;
        rec_mb_y <= mvg_mb_y;
      end else if (int_done) begin
        int_busy <= 1'b0;
      end
      if (gen_start) begin
        mvg_busy     <= 1'b1;
        mvg_gen_done <= 1'b0;
        mvg_mb_x     <= mb.mb_x;
        mvg_mb_y     <= mb.mb_y;
        mvg_pf       <= mb.pred_flag;
      end
    end
  end
endmodule

// Quarter-sample luma interpolator for one 4x4 block.
//
// Input is the 9x9 reference window of the block: pixel (x, y) of the block
// at integer MV position sits at win[y+2][x+2]. The unit follows the
// separable 1-D structure of thirteen 6-tap filters and four bilinear
// averagers and produces 4 pixels per cycle:
//   FIR_1..9   filter nine parallel columns (row mode) or nine parallel rows
//              (column mode) of the window, 8-bit clipped, and registered.
//   FIR_10..13 filter either a window row straight from the buffer (b and s
//              half samples) or the registered FIR_1..9 results (j), through
//              an input multiplexer, and are registered.
//   A second register on the FIR_1..9 path keeps h/m aligned with j.
//   Bilinear_1..4 average two of: integer samples, FIR_1..9 results, FIR_10..13
//              results; an output multiplexer picks plain or averaged values.
// The centre sample j uses 8-bit clipped intermediates (the simplified
// two-pass form), not the 15-bit ones of the standard; its result can
// differ from the standard by one in rare cases.
//
// Row mode produces one output row per cycle. Column mode, used only for f
// and q (xfrac = 2 with odd yfrac), filters rows first so that b/s and j
// come out of the same pass; it produces one output column per cycle.
//
// Timing: start is a one-cycle pulse with xfrac/yfrac valid; row 0 is issued
// in the start cycle and rows 1..3 in the next three. win must stay stable
// until done. With start in cycle 0, done is high in cycle 5 when one filter
// level suffices and in cycle 6 for j, i, k, f and q; the next start may be
// given in the done cycle. pred is valid
// while done is high and held until the next start. Row-major: pred[4*y+x].
//
// Follows the document: thirteen six-tap filters and four bilinear
// filters, 4 samples per cycle, 5 or 6 cycles per block, and 8-bit clipped
// first-pass values for the centre half-sample j (a small departure from the
// standard allowed by the document). This design's own: the assignment of
// filters to rows and columns, the switch to horizontal intermediates for f
// and q, and the window layout.
module luma_interp
  import mc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [1:0]                xfrac,
  input  logic [1:0]                yfrac,
  input  pix_t [LWIN-1:0][LWIN-1:0] win,      // win[row][col]
  output pix_t [15:0]               pred,
  output logic                      done
);
  // operand sources of the output selector
  typedef enum logic [2:0] {OP_G, OP_GR, OP_GD, OP_VH, OP_VM, OP_H} op_e;

  logic [1:0] xf_q, yf_q;
  logic       colmode, colmode_q, twolevel, twolevel_c;
  logic       iss_busy, iss_act;
  logic [1:0] iss_cnt, iss_row;
  logic [1:0] xf_c, yf_c;

  // stage 1 (FIR_1..9) and aligned integer samples
  pix_t [LWIN-1:0] v_s1, v_d1;
  pix_t [3:0]      g_s1, gr_s1, gd_s1;
  logic            s1_vld, d1_vld;
  logic [1:0]      s1_cnt, d1_cnt;
  // FIR_10..13 register
  pix_t [3:0]      h_q;

  // the start cycle issues row/column 0 straight from the inputs
  assign iss_act  = start || iss_busy;
  assign iss_row  = start ? 2'd0 : iss_cnt;
  assign xf_c     = start ? xfrac : xf_q;
  assign yf_c     = start ? yfrac : yf_q;
  assign colmode  = (xf_c == 2'd2) && yf_c[0];
  assign twolevel_c = ((xf_c == 2'd2) && (yf_c != 2'd0)) || ((yf_c == 2'd2) && (xf_c != 2'd0));
  assign colmode_q = (xf_q == 2'd2) && yf_q[0];
  assign twolevel = ((xf_q == 2'd2) && (yf_q != 2'd0)) || ((yf_q == 2'd2) && (xf_q != 2'd0));

  // ---------------- FIR_1..9 ----------------
  pix_t [LWIN-1:0] v_new;
  for (genvar k = 0; k < LWIN; k++) begin : g_fir_v
    pix_t [5:0] tap;
    always_comb begin
      for (int t = 0; t < 6; t++)
        tap[t] = colmode ? win[k][int'(iss_row) + t] : win[int'(iss_row) + t][k];
    end
    fir6 u_fir (.a(tap[0]), .b(tap[1]), .c(tap[2]), .d(tap[3]), .e(tap[4]), .f(tap[5]),
                .q(v_new[k]));
  end

  // ---------------- FIR_10..13 with input multiplexer ----------------
  pix_t [LWIN-1:0] hin;
  pix_t [3:0]      h_new;
  always_comb begin
    if (twolevel_c) hin = v_s1;                                    // j from registered FIR_1..9
    else            hin = win[int'(iss_row) + (yf_c == 2'd3 ? 3 : 2)]; // b (or s) from the buffer
  end
  for (genvar x = 0; x < 4; x++) begin : g_fir_h
    fir6 u_fir (.a(hin[x]), .b(hin[x+1]), .c(hin[x+2]), .d(hin[x+3]), .e(hin[x+4]), .f(hin[x+5]),
                .q(h_new[x]));
  end

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xf_q <= '0; yf_q <= '0;
      iss_busy <= 1'b0; iss_cnt <= '0;
      s1_vld <= 1'b0; s1_cnt <= '0; d1_vld <= 1'b0; d1_cnt <= '0;
      v_s1 <= '0; v_d1 <= '0; g_s1 <= '0; gr_s1 <= '0; gd_s1 <= '0; h_q <= '0;
    end else begin
      if (start) begin
        xf_q <= xfrac; yf_q <= yfrac;
        iss_busy <= 1'b1; iss_cnt <= 2'd1;
      end else if (iss_busy) begin
        iss_cnt <= iss_cnt + 2'd1;
        if (iss_cnt == 2'd3) iss_busy <= 1'b0;
      end
      s1_vld <= iss_act;
      s1_cnt <= iss_row;
      v_s1   <= v_new;
      for (int x = 0; x < 4; x++) begin
        g_s1[x]  <= win[int'(iss_row) + 2][x+2];
        gr_s1[x] <= win[int'(iss_row) + 2][x+3];
        gd_s1[x] <= win[int'(iss_row) + 3][x+2];
      end
      h_q    <= h_new;
      d1_vld <= s1_vld;
      d1_cnt <= s1_cnt;
      v_d1   <= v_s1;
    end
  end

  // ---------------- bilinear averagers and output multiplexer ----------------
  op_e  opa, opb;
  logic avg;
  always_comb begin
    opa = OP_G; opb = OP_G; avg = 1'b0;
    unique case ({xf_q, yf_q})
      4'b00_00: begin opa = OP_G;  end
      4'b01_00: begin opa = OP_G;  opb = OP_H;  avg = 1'b1; end
      4'b10_00: begin opa = OP_H;  end
      4'b11_00: begin opa = OP_H;  opb = OP_GR; avg = 1'b1; end
      4'b00_01: begin opa = OP_G;  opb = OP_VH; avg = 1'b1; end
      4'b00_10: begin opa = OP_VH; end
      4'b00_11: begin opa = OP_VH; opb = OP_GD; avg = 1'b1; end
      4'b10_10: begin opa = OP_H;  end
      4'b01_01, 4'b01_11, 4'b01_10, 4'b10_01:
                begin opa = OP_H;  opb = OP_VH; avg = 1'b1; end
      default:  begin opa = OP_H;  opb = OP_VM; avg = 1'b1; end // (3,1) (3,3) (3,2) (2,3)
    endcase
  end

  logic            out_vld;
  logic [1:0]      out_cnt;
  pix_t [LWIN-1:0] v_sel;
  pix_t [3:0]      res;
  assign out_vld = twolevel ? d1_vld : s1_vld;
  assign out_cnt = twolevel ? d1_cnt : s1_cnt;
  assign v_sel   = twolevel ? v_d1   : v_s1;

  function automatic pix_t pick(input op_e op, input int x, input pix_t [3:0] g, input pix_t [3:0] gr,
                                input pix_t [3:0] gd, input pix_t [LWIN-1:0] v, input pix_t [3:0] h);
    unique case (op)
      OP_G:    return g[x];
      OP_GR:   return gr[x];
      OP_GD:   return gd[x];
      OP_VH:   return v[x+2];
      OP_VM:   return v[x+3];
      default: return h[x];
    endcase
  endfunction

  for (genvar x = 0; x < 4; x++) begin : g_bilinear
    pix_t a_op, b_op;
    always_comb begin
      a_op   = pick(opa, x, g_s1, gr_s1, gd_s1, v_sel, h_q);
      b_op   = pick(opb, x, g_s1, gr_s1, gd_s1, v_sel, h_q);
      res[x] = avg ? pix_t'((9'(a_op) + 9'(b_op) + 9'd1) >> 1) : a_op;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred <= '0;
      done <= 1'b0;
    end else begin
      done <= out_vld && (out_cnt == 2'd3);
      if (out_vld) begin
        for (int x = 0; x < 4; x++) begin
          if (colmode_q) pred[4*x + int'(out_cnt)] <= res[x];
          else         pred[4*int'(out_cnt) + x] <= res[x];
        end
      end
    end
  end
endmodule

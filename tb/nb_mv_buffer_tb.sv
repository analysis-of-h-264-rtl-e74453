// Self-checking test of nb_mv_buffer: writes generated motion data to every
// column, reads all back with one cycle of latency, overwrites half of the
// columns and checks that only those changed.
//
// The 120-column size checked is the document's.
module nb_mv_buffer_tb;
  import mc_pkg::*;
  localparam int COLS = 120;
  logic clk = 0, re = 0, we = 0;
  logic [MBX_W-1:0] raddr = 0, waddr = 0;
  mvinfo_t [3:0] rdata_l0, rdata_l1, wdata_l0, wdata_l1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nb_mv_buffer #(.MB_COLS(COLS)) dut (.clk, .re, .raddr, .rdata_l0, .rdata_l1, .we, .waddr,
                                      .wdata_l0, .wdata_l1);

  function automatic mvinfo_t [3:0] pat(input int col, input int l, input int gen);
    mvinfo_t [3:0] v;
    for (int b = 0; b < 4; b++) begin
      v[b].mv.x = MVX_W'(col * 17 + b * 5 + l * 333 + gen * 1000);
      v[b].mv.y = MVY_W'(col * 3 - b * 7 + l * 71 + gen * 99);
      v[b].ref_idx = REF_W'(col + b + l + gen);
    end
    return v;
  endfunction

  task automatic wr(input int col, input int gen);
    @(negedge clk);
    we = 1; waddr = MBX_W'(col); wdata_l0 = pat(col, 0, gen); wdata_l1 = pat(col, 1, gen);
    @(negedge clk); we = 0;
  endtask

  task automatic rd(input int col, input int gen);
    @(negedge clk); re = 1; raddr = MBX_W'(col);
    @(negedge clk); re = 0;
    checks++;
    if (rdata_l0 != pat(col, 0, gen) || rdata_l1 != pat(col, 1, gen)) begin
      failures++; $display("FAIL column %0d generation %0d", col, gen);
    end
  endtask

  initial begin
    wdata_l0 = '0; wdata_l1 = '0;
    for (int c = 0; c < COLS; c++) wr(c, 0);
    for (int c = 0; c < COLS; c++) rd(c, 0);
    for (int c = 0; c < COLS; c += 2) wr(c, 1);
    for (int c = 0; c < COLS; c++) rd(c, c % 2 == 0 ? 1 : 0);
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

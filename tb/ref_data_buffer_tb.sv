// Self-checking test of ref_data_buffer: fills all rows of both lists in
// one half with generated patterns, swaps, reads them back (one-cycle read
// latency) while the other half is being overwritten, and checks that the
// read half is not disturbed by those writes.
//
// The buffer organisation checked is the document's; the one-cycle read
// latency is the design's own.
module ref_data_buffer_tb;
  import mc_pkg::*;
  logic clk = 0, rst_n = 1'b1, swap = 0, wsel, we = 0, wlist = 0, re = 0;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock
  logic [3:0] waddr = 0, raddr = 0;
  logic [LROW_W-1:0] wluma = '0, rluma_l0, rluma_l1;
  logic [CROW_W-1:0] wchroma = '0, rchroma_l0, rchroma_l1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ref_data_buffer dut (.clk, .rst_n, .swap, .wsel, .we, .wlist, .waddr, .wluma, .wchroma,
                       .re, .raddr, .rluma_l0, .rluma_l1, .rchroma_l0, .rchroma_l1);

  function automatic logic [LROW_W-1:0] lpat(input int mb, input int l, input int a);
    logic [LROW_W-1:0] v;
    for (int i = 0; i < LROW_W / 8; i++) v[8*i +: 8] = 8'(mb * 37 + l * 101 + a * 13 + i * 7);
    return v;
  endfunction
  function automatic logic [CROW_W-1:0] cpat(input int mb, input int l, input int a);
    logic [CROW_W-1:0] v;
    for (int i = 0; i < CROW_W / 8; i++) v[8*i +: 8] = 8'(mb * 11 + l * 59 + a * 29 + i * 3);
    return v;
  endfunction

  task automatic fill(input int mb);
    for (int l = 0; l < 2; l++)
      for (int a = 0; a < 16; a++) begin
        @(negedge clk);
        we = 1; wlist = l[0]; waddr = 4'(a); wluma = lpat(mb, l, a); wchroma = cpat(mb, l, a);
      end
    @(negedge clk); we = 0;
  endtask

  task automatic readback(input int mb);
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); re = 1; raddr = 4'(a);
      @(negedge clk); re = 0;
      checks += 4;
      if (rluma_l0 != lpat(mb, 0, a))   begin failures++; $display("FAIL luma l0 mb%0d a%0d", mb, a); end
      if (rluma_l1 != lpat(mb, 1, a))   begin failures++; $display("FAIL luma l1 mb%0d a%0d", mb, a); end
      if (rchroma_l0 != cpat(mb, 0, a)) begin failures++; $display("FAIL chroma l0 mb%0d a%0d", mb, a); end
      if (rchroma_l1 != cpat(mb, 1, a)) begin failures++; $display("FAIL chroma l1 mb%0d a%0d", mb, a); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fill(0);
    for (int mb = 1; mb < 6; mb++) begin
      @(negedge clk); swap = 1; @(negedge clk); swap = 0;
      fill(mb);          // writes the other half
      readback(mb - 1);  // previous MB must be intact
    end
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

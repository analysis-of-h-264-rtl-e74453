// Self-checking test of fir6: random and extreme tap values against the
// direct formula clip((A - 5B + 20C + 20D - 5E + F + 16) >> 5).
//
// The expected values come from the filter's defining sum, not from its
// shift-and-add form.
module fir6_tb;
  import mc_pkg::*;
  pix_t a, b, c, d, e, f, q;
  int checks = 0, failures = 0;

  fir6 dut (.a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .q(q));

  function automatic int model(input int ia, ib, ic, id, ie, i_f);
    int s;
    s = (ia - 5*ib + 20*ic + 20*id - 5*ie + i_f + 16) >>> 5;
    return (s < 0) ? 0 : (s > 255) ? 255 : s;
  endfunction

  task automatic check1();
    #1;
    checks++;
    if (int'(q) != model(a, b, c, d, e, f)) begin
      failures++;
      $display("FAIL fir6 %0d %0d %0d %0d %0d %0d -> %0d exp %0d", a, b, c, d, e, f, q,
               model(a, b, c, d, e, f));
    end
  endtask

  initial begin
    // extremes: most negative and most positive sums (Table of bit widths)
    {a, b, c, d, e, f} = {8'd0, 8'd255, 8'd0, 8'd0, 8'd255, 8'd0};     check1();
    {a, b, c, d, e, f} = {8'd255, 8'd0, 8'd255, 8'd255, 8'd0, 8'd255}; check1();
    {a, b, c, d, e, f} = {8'd10, 8'd20, 8'd30, 8'd40, 8'd50, 8'd60};   check1();
    repeat (5000) begin
      a = pix_t'($urandom); b = pix_t'($urandom); c = pix_t'($urandom);
      d = pix_t'($urandom); e = pix_t'($urandom); f = pix_t'($urandom);
      check1();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end test of svc_mc_top on a small picture: 4 x 3 macroblocks,
// four pictures, through mc_e2e_bench (see there for what is checked).
// The unit runs at its default parameters; only the picture is small.
//
// The picture size is this test's own, small for speed.
module svc_mc_top_tb;
  mc_e2e_bench #(.PW(4), .PH(3), .NPIC(4), .LAT(4), .WATCHDOG(400_000)) u_bench ();
  initial begin
    wait (u_bench.bench_done);
    $display("TB_RESULT checks=%0d failures=%0d", u_bench.checks, u_bench.failures);
    $finish;
  end
endmodule

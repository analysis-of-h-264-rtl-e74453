// Full-size test of svc_mc_top: one whole 1920x1088 picture (120 x 68
// macroblocks, 8160 MBs), the largest picture the unit is sized for, with
// the unit at its default parameters (120-column neighbouring MV buffer).
// Everything is checked as in the short end-to-end test (mc_e2e_bench).
//
// The picture size is the largest one of the document's target (1080p).
module svc_mc_top_full_tb;
  mc_e2e_bench #(.PW(120), .PH(68), .NPIC(1), .LAT(4), .WATCHDOG(20_000_000)) u_bench ();
  initial begin
    wait (u_bench.bench_done);
    $display("TB_RESULT checks=%0d failures=%0d", u_bench.checks, u_bench.failures);
    $finish;
  end
endmodule

// Throughput test of svc_mc_top against the 227-cycle MB budget.
//
// The target decoder runs three spatial layers (352x288, 720x480 and
// 1920x1088) at 60 pictures per second on a 135 MHz clock, which leaves
// 227 cycles per MB per pipeline stage. This test feeds eight full MB rows
// of a 1920-sample-wide picture (960 MBs) back to back, with no pauses at
// the input and a memory that answers every row 4 cycles after the request
// without back-pressure, and fails if the average time per MB exceeds 227
// cycles. The MB mix is uniform random (every partition shape equally
// likely, one MB in eight intra, one list in three bi-predicted), which has
// more small partitions than typical video. Results are also checked
// sample by sample, as in the end-to-end test (mc_e2e_bench).
//
// The 227-cycle budget and the picture width are the document's; the MB mix
// and the memory latency are this test's own.
module svc_mc_workload_tb;
  mc_e2e_bench #(.PW(120), .PH(8), .NPIC(1), .LAT(4), .GAPS(0), .STALL(0),
                 .BUDGET(227), .WATCHDOG(2_000_000)) u_bench ();
  initial begin
    wait (u_bench.bench_done);
    $display("TB_RESULT checks=%0d failures=%0d", u_bench.checks, u_bench.failures);
    $finish;
  end
endmodule

// tb_rfht_dual_pe_full: the dual-PE engine at its default length
// N = 4^10 = 1,048,576, three sparse data sets fed back to back (the first
// out in Hartley form, the other two in Fourier form). At this length the
// latency, about 5N/4 cycles, exceeds the N-cycle update period, which the
// alternation between the two PEs must absorb. See tb_dual_body.svh.
module tb_rfht_dual_pe_full;
  localparam int N            = 1 << 20;
  localparam int NSETS        = 3;
  localparam int DENSE        = 0;
  localparam int FOURIER_FROM = 1;
`include "tb_dual_body.svh"
  rfht_dual_pe dut (.*);   // all parameters at their defaults

  // watchdog: a run that has not finished after this many clocks fails
  initial begin
    repeat (N * (NSETS + 4) + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d sets out", oset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

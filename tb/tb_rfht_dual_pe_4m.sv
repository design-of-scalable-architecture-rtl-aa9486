// tb_rfht_dual_pe_4m: the dual-PE engine built for the four million-point
// case, N = 4^11 = 4,194,304 (latency about 11N/8 cycles, between N and
// 2N), three sparse data sets back to back, the last two in Fourier form.
// See tb_dual_body.svh for the checks.
module tb_rfht_dual_pe_4m;
  localparam int N            = 1 << 22;
  localparam int NSETS        = 3;
  localparam int DENSE        = 0;
  localparam int FOURIER_FROM = 1;
`include "tb_dual_body.svh"
  rfht_dual_pe #(.N(N)) dut (.*);

  // watchdog: a run that has not finished after this many clocks fails
  initial begin
    repeat (N * (NSETS + 4) + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d sets out", oset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rfht_dual_pe_3lvl: end-to-end testbench of the dual-PE engine built
// with the three-level twiddle LUT (LUT_LEVELS = 3) at N = 4096: two dense
// random sets (direct DHT reference) and two sparse sets, fed back to back;
// the first two come out as Hartley values, the last two as Fourier bins.
// See tb_dual_body.svh for the checks.
module tb_rfht_dual_pe_3lvl;
  localparam int N            = 4096;
  localparam int NSETS        = 4;
  localparam int DENSE        = 1;
  localparam int FOURIER_FROM = 2;
`include "tb_dual_body.svh"
  rfht_dual_pe #(.N(N), .LUT_LEVELS(3)) dut (.*);

  // watchdog: a run that has not finished after this many clocks fails
  initial begin
    repeat (N * (NSETS + 4) + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d sets out", oset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

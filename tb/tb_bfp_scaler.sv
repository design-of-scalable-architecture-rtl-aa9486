// tb_bfp_scaler: self-checking testbench of the block floating-point peak
// detector. Blocks of random eight-word observations, each drawn with a
// random magnitude range, are fed with 'clear' on the first word; after
// every word the combinational shift must equal the smallest s for which
// every word of the block so far, shifted right by s, lies in
// [-2^14, 2^14) (three bits of headroom in 18-bit words).
module tb_bfp_scaler;
  import rfht_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear = 1'b0, obs_valid = 1'b0;
  data_t obs [8];
  logic [1:0] shift;

  bfp_scaler #(.LANES(8)) dut (.*);

  int checks = 0, failures = 0;
  int seen_shift [4] = '{0, 0, 0, 0};

  function automatic int need(input int v);
    int s;
    s = 0;
    while ((v >>> s) >= (1 << 14) || (v >>> s) < -(1 << 14)) s++;
    return s;
  endfunction

  initial begin
    foreach (obs[i]) obs[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 200; b++) begin
      int range, exp_s;
      range = 1 << $urandom_range(8, 17);
      exp_s = 0;
      for (int w = 0; w < 6; w++) begin
        clear = (w == 0);
        obs_valid = ($urandom_range(0, 4) != 0) || w == 0;
        for (int i = 0; i < 8; i++) begin
          int v;
          v = int'($urandom_range(0, 2 * range - 1)) - range;
          if (v > 131071) v = 131071;
          obs[i] = data_t'(v);
          if (obs_valid && need(v) > exp_s) exp_s = need(v);
        end
        #1;
        checks++;
        if (int'(shift) != exp_s) begin
          failures++;
          if (failures < 10) $display("FAIL: block %0d word %0d shift %0d expected %0d", b, w, shift, exp_s);
        end
        seen_shift[exp_s]++;
        @(negedge clk);
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen_shift[s] == 0) begin failures++; $display("FAIL: shift %0d never exercised", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_twiddle_gen: self-checking testbench of the two-level-LUT twiddle
// generator at its default length N = 4^10. Random angle indices (plus the
// quadrant boundaries and the last index) are applied one per clock; after
// the 3-cycle latency cos, cos-sin and cos+sin must match the double-
// precision values of phi = 2*pi*j/N within 4 LSB of the 2^-25 coefficient
// scale.
module tb_twiddle_gen;
  import rfht_pkg::*;
  localparam int  N    = 1 << 20;
  localparam int  AW   = $clog2(N);
  localparam int  NVEC = 3000;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [AW-1:0] angle = '0;
  twiddle_t tw;

  twiddle_gen #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int ang [NVEC];

  task automatic chk(input coef_t got, input real expv, input string what, input int j);
    real d;
    d = real'(got) - expv * (2.0 ** COEF_FRAC);
    checks++;
    if (d > 4.0 || d < -4.0) begin
      failures++;
      if (failures < 10) $display("FAIL: %s j=%0d got %0d exp %f", what, j, got, expv * (2.0 ** COEF_FRAC));
    end
  endtask

  initial begin
    for (int v = 0; v < NVEC; v++) begin
      case (v)
        0: ang[v] = 0;
        1: ang[v] = N / 4;
        2: ang[v] = N / 2;
        3: ang[v] = 3 * N / 4;
        4: ang[v] = N - 1;
        5: ang[v] = N / 8;
        default: ang[v] = int'($urandom_range(0, N - 1));
      endcase
    end
    @(negedge clk);
    for (int v = 0; v < NVEC + 2; v++) begin
      if (v < NVEC) angle = AW'(ang[v]);
      @(posedge clk);
      #1;
      if (v >= 2) begin
        // the angle applied at iteration v-2 was sampled 3 edges ago
        real p;
        p = 2.0 * PI * ang[v-2] / N;
        chk(tw.c,   $cos(p),            "cos",     ang[v-2]);
        chk(tw.cms, $cos(p) - $sin(p),  "cos-sin", ang[v-2]);
        chk(tw.cps, $cos(p) + $sin(p),  "cos+sin", ang[v-2]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

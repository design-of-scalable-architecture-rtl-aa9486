// tb_rfht_pe: self-checking testbench of one RFHT processing element.
//
// Three random data sets (plus one impulse set) of N = 256 samples are fed
// one sample per clock, one set every 2N clocks (the rate a PE sees inside
// the dual-PE engine). Every output word, scaled by its block exponent, is
// compared with a directly computed DHT  H[k] = sum x[n] cas(2 pi n k / N)
// (double precision). The set alternates between natural and Fourier pair
// output order, and the latency from the last input sample to the first
// output word is checked against log4(N)*(N/8 + 8) + 4 cycles.
module tb_rfht_pe;
  import rfht_pkg::*;
  localparam int N      = 256;
  localparam int AW     = $clog2(N);
  localparam int NSETS  = 4;
  localparam real PI    = 3.14159265358979323846;
  localparam int EXP_LAT = (AW / 2) * (N / 8 + 8) + 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, fourier_order;
  data_t in_data;
  logic out_valid, out_last, out_fourier, busy, stage_done, overrun;
  data_t out_data;
  logic [1:0] out_tag, stage_shift;
  logic [AW-1:0] out_index;
  logic [EXP_W-1:0] out_exp;

  rfht_pe #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  real x   [NSETS][N];
  real ref_h [NSETS][N];
  real max_err = 0.0;
  int  shifts_seen = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // reference DHT
  initial begin
    for (int s = 0; s < NSETS; s++) begin
      for (int n = 0; n < N; n++) begin
        if (s == 3) x[s][n] = (n == 5) ? 100000.0 : 0.0;
        else        x[s][n] = real'($signed(18'($urandom_range(0, 262143)))) / (s + 1);
        x[s][n] = $floor(x[s][n]);
      end
      for (int k = 0; k < N; k++) begin
        ref_h[s][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a = 2.0 * PI * ((n * k) % N) / N;
          ref_h[s][k] += x[s][n] * ($cos(a) + $sin(a));
        end
      end
    end
  end

  // stimulus: one set every 2N cycles
  int last_in_cycle [NSETS];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 1'b0; in_data = '0; fourier_order = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int s = 0; s < NSETS; s++) begin
      for (int n = 0; n < N; n++) begin
        in_valid <= 1'b1;
        in_data  <= data_t'(longint'(x[s][n]));
        @(posedge clk);
        if (n == N - 1) last_in_cycle[s] = cyc;
      end
      in_valid <= 1'b0;
      repeat (N) @(posedge clk);
    end
  end

  // the unload of set s uses the order requested at its start
  always @(posedge clk) fourier_order <= (oset % 2 == 1);

  // output checker
  int oset = 0, ocnt = 0;
  int first_out_cycle;
  always @(posedge clk) begin
    if (rst_n && stage_done && stage_shift != 0) shifts_seen++;
    if (rst_n && out_valid) begin
      int k;
      real val, err, tol;
      k = int'(out_index);
      if (ocnt == 0) begin
        first_out_cycle = cyc;
        check(cyc - last_in_cycle[oset] == EXP_LAT,
              $sformatf("set %0d latency %0d, expected %0d", oset, cyc - last_in_cycle[oset], EXP_LAT));
      end
      if (oset % 2 == 0) begin
        check(k == ocnt && out_tag == 2'd1 && !out_fourier, $sformatf("natural order: word %0d index %0d", ocnt, k));
      end else begin
        int ek;
        ek = (ocnt == 0) ? 0 : (ocnt == N - 1) ? N / 2 : (ocnt + 1) / 2;
        check(k == ek && out_fourier, $sformatf("pair order: word %0d index %0d", ocnt, k));
        if (out_tag == 2'd2) k = N - k;
      end
      val = real'(out_data) * (2.0 ** out_exp);
      err = val - ref_h[oset][k];
      if (err < 0) err = -err;
      tol = 32.0 * (2.0 ** out_exp) + 1.0;
      if (err / (2.0 ** out_exp) > max_err) max_err = err / (2.0 ** out_exp);
      check(err <= tol, $sformatf("set %0d bin %0d: got %f expected %f", oset, k, val, ref_h[oset][k]));
      check(out_last == (ocnt == N - 1), "out_last");
      ocnt++;
      if (ocnt == N) begin ocnt = 0; oset++; end
    end
  end

  initial begin
    wait (oset == NSETS);
    repeat (4) @(posedge clk);
    check(!overrun, "no overrun");
    check(shifts_seen > 0, "block floating-point scaling used");
    $display("max error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * N * (NSETS + 3) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d sets out", oset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

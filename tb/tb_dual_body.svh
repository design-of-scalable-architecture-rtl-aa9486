// Shared body of the dual-PE engine testbenches. The including module
// defines N (transform length), NSETS (data sets, fed back to back with no
// gap), DENSE (1: sets 0 and 1 are dense random data checked against a
// direct O(N^2) DHT; 0: all sets sparse) and FOURIER_FROM (first set whose
// output is requested in Fourier form; earlier sets are plain Hartley).
//
// Sparse sets are a few impulses of random position and amplitude, whose
// transform is known in closed form: H[k] = sum_i a_i cas(2 pi n_i k / N).
// Every output bin is checked, in Hartley or Fourier form (with its power
// spectral density, exactly and against the reference), against that
// reference after scaling by the block exponent. It also counts the
// mechanisms of the engine and fails if one never occurred: both PEs
// used, stages with and without block floating-point scaling, both output
// forms, a switch of output form, non-zero PSD bins, a latency above N
// (needs N >= 4^8) or not,
// continuous input with no overrun.
  import rfht_pkg::*;
  localparam int  AW  = $clog2(N);
  localparam real PI  = 3.14159265358979323846;
  localparam int  NIMP = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fourier_mode, in_valid, out_valid, out_last, out_fourier, overrun;
  data_t in_data;
  logic signed [DATA_W:0] out_re, out_im;
  logic [AW-1:0] out_index;
  logic signed [EXP_W:0] out_exp;
  logic [2*DATA_W+1:0] out_psd;
  int n_psd = 0;
  logic [1:0] pe_busy, pe_stage_done;
  logic [1:0] pe_stage_shift [2];

  int checks = 0, failures = 0;
  real ref_h [NSETS][];
  int  imp_pos [NSETS][NIMP];
  int  imp_amp [NSETS][NIMP];
  real max_err = 0.0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic bit is_dense(input int s);
    return DENSE != 0 && s < 2;
  endfunction

  // sample n of set s
  int dense_x [2][];
  function automatic int sample(input int s, input int n);
    int v;
    if (is_dense(s)) return dense_x[s][n];
    v = 0;
    for (int i = 0; i < NIMP; i++) if (imp_pos[s][i] == n) v += imp_amp[s][i];
    return v;
  endfunction

  initial begin
    for (int s = 0; s < NSETS; s++) begin
      ref_h[s] = new[N];
      for (int i = 0; i < NIMP; i++) begin
        imp_pos[s][i] = int'($urandom_range(0, N - 1));
        imp_amp[s][i] = int'($urandom_range(0, 40000)) - 20000;
      end
    end
    for (int s = 0; s < 2; s++) begin
      dense_x[s] = new[N];
      for (int n = 0; n < N; n++) dense_x[s][n] = int'($urandom_range(0, 131071)) - 65536;
    end
    for (int s = 0; s < NSETS; s++)
      for (int k = 0; k < N; k++) begin
        real acc;
        acc = 0.0;
        if (is_dense(s)) begin
          for (int n = 0; n < N; n++) begin
            real a;
            a = 2.0 * PI * real'((longint'(n) * k) % N) / N;
            acc += dense_x[s][n] * ($cos(a) + $sin(a));
          end
        end else begin
          for (int i = 0; i < NIMP; i++) begin
            real a;
            a = 2.0 * PI * real'((longint'(imp_pos[s][i]) * k) % N) / N;
            acc += imp_amp[s][i] * ($cos(a) + $sin(a));
          end
        end
        ref_h[s][k] = acc;
      end
  end

  // the including module instantiates the engine as 'dut'

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // stimulus: all sets back to back, one sample per clock
  int last_in_cycle [NSETS];
  initial begin
    in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int s = 0; s < NSETS; s++)
      for (int n = 0; n < N; n++) begin
        in_valid <= 1'b1;
        in_data  <= data_t'(sample(s, n));
        @(posedge clk);
        if (n == N - 1) last_in_cycle[s] = cyc;
      end
    in_valid <= 1'b0;
  end

  // output form, switched between sets
  int oset = 0, ocnt = 0;
  // (the form is sampled when a PE starts unloading, shortly before the
  // previous set's last word appears here, so it is set half-way through)
  always @(posedge clk) fourier_mode <= (oset + ((ocnt > N / 4) ? 1 : 0) >= FOURIER_FROM);

  // mechanism counters
  int n_pe_sets [2] = '{0, 0};
  int n_scaled = 0, n_unscaled = 0, n_fourier_sets = 0, n_hartley_sets = 0;
  int n_mode_switch = 0, n_long_latency = 0, n_short_latency = 0;
  logic [1:0] busy_q = '0;
  logic       mode_q = 1'b0;
  always @(posedge clk) begin
    busy_q <= pe_busy;
    if (rst_n) for (int p = 0; p < 2; p++) begin
      if (pe_busy[p] && !busy_q[p]) n_pe_sets[p]++;
      if (pe_stage_done[p]) begin
        if (pe_stage_shift[p] != 0) n_scaled++; else n_unscaled++;
      end
    end
  end

  int gap_seen = 0;
  int set_words;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int k;
      real sc, tol, ere, eim;
      real rre, rim;
      bit four;
      four = (oset >= FOURIER_FROM);
      check(out_fourier == four, $sformatf("set %0d output form flag", oset));
      set_words = four ? N / 2 + 1 : N;
      k = int'(out_index);
      if (ocnt == 0) begin
        int lat;
        lat = cyc - last_in_cycle[oset];
        if (lat > N) n_long_latency++; else n_short_latency++;
        check(lat < 2 * N, $sformatf("set %0d latency %0d below 2N", oset, lat));
        if (four) n_fourier_sets++; else n_hartley_sets++;
        if (oset > 0 && four != mode_q) n_mode_switch++;
        mode_q <= four;
      end
      sc = 2.0 ** out_exp;
      if (four) begin
        check(k == ocnt, $sformatf("Fourier bin order: word %0d bin %0d", ocnt, k));
        rre = 0.5 * (ref_h[oset][(N - k) % N] + ref_h[oset][k]);
        rim = 0.5 * (ref_h[oset][(N - k) % N] - ref_h[oset][k]);
      end else begin
        check(k == ocnt, $sformatf("Hartley order: word %0d bin %0d", ocnt, k));
        rre = ref_h[oset][k];
        rim = 0.0;
      end
      ere = real'(out_re) * sc - rre;  if (ere < 0) ere = -ere;
      eim = real'(out_im) * sc - rim;  if (eim < 0) eim = -eim;
      if (ere / sc > max_err) max_err = ere / sc;
      if (eim / sc > max_err) max_err = eim / sc;
      tol = (8.0 * AW + 16.0) * sc + 1.0;
      check(ere <= tol && eim <= tol,
            $sformatf("set %0d bin %0d: got (%f,%f) expected (%f,%f)", oset, k,
                      real'(out_re) * sc, real'(out_im) * sc, rre, rim));
      if (four) begin
        // power spectral density: exact integer form and value
        longint pr, pi2;
        real    pref, perr;
        pr  = longint'(out_re) * longint'(out_re);
        pi2 = longint'(out_im) * longint'(out_im);
        check(longint'(out_psd) == pr + pi2,
              $sformatf("set %0d bin %0d: PSD word %0d", oset, k, out_psd));
        pref = rre * rre + rim * rim;
        perr = real'(out_psd) * sc * sc - pref;
        if (perr < 0) perr = -perr;
        check(perr <= 2.0 * tol * ((rre < 0 ? -rre : rre) + (rim < 0 ? -rim : rim) + tol),
              $sformatf("set %0d bin %0d: PSD %f expected %f", oset, k,
                        real'(out_psd) * sc * sc, pref));
        if (out_psd != 0) n_psd++;
      end
      check(out_last == (ocnt == set_words - 1), "out_last marks the end of a set");
      ocnt++;
      if (ocnt == set_words) begin ocnt = 0; oset++; end
    end
  end

  initial begin
    wait (oset == NSETS);
    repeat (4) @(posedge clk);
    check(!overrun, "continuous input without overrun");
    $display("sets per PE %0d/%0d, stages scaled %0d unscaled %0d, Hartley sets %0d Fourier sets %0d, mode switches %0d, PSD bins %0d, latency >N %0d <=N %0d, max error %f LSB",
             n_pe_sets[0], n_pe_sets[1], n_scaled, n_unscaled, n_hartley_sets, n_fourier_sets,
             n_mode_switch, n_psd, n_long_latency, n_short_latency, max_err);
    check(n_pe_sets[0] > 0 && n_pe_sets[1] > 0, "both PEs processed data sets");
    check(n_scaled > 0,   "a stage needed block floating-point scaling");
    check(n_unscaled > 0, "a stage needed no scaling");
    check(n_hartley_sets > 0 && n_fourier_sets > 0, "both output forms used");
    check(n_mode_switch > 0, "output form switched between sets");
    check(n_psd > 0, "non-zero power spectral density bins produced");
    if (N >= 65536) check(n_long_latency > 0, "latency above one update period handled");
    else            check(n_short_latency > 0, "latency below one update period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the including module holds the watchdog

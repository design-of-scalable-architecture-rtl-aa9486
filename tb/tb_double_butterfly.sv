// tb_double_butterfly: self-checking testbench of the double butterfly.
// Random eight-sample sets (|x| <= 2^14) with random twiddle angles are
// streamed one per clock in all three butterfly types. The expected outputs
// are computed in double precision straight from the Hartley butterfly
// definition (cas terms of the output index), independent of the unit's
// factorisation, with the same quantised coefficients. Checks: every output
// within 4 LSB (three rounded products per rotation), and the 3-cycle latency.
module tb_double_butterfly;
  import rfht_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  NVEC = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     in_valid = 1'b0, out_valid;
  db_mode_e mode = DB_GENERIC;
  data_t    x [8];
  twiddle_t tw [1:3];
  data_t    y [8];

  double_butterfly dut (.*);

  int checks = 0, failures = 0;
  real exp_y [NVEC][8];
  int  in_cyc [NVEC];
  int  cyc = 0, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic coef_t qc(input real v);
    return coef_t'(longint'($floor(v * (2.0 ** COEF_FRAC) + 0.5)));
  endfunction
  function automatic real cas(input real a);
    return $cos(a) + $sin(a);
  endfunction

  initial begin
    foreach (x[i]) x[i] = '0;
    for (int r = 1; r <= 3; r++) tw[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < NVEC; v++) begin
      real phi [1:3];
      real xr [8];
      real cs [1:3], sn [1:3];
      db_mode_e m;
      m = (v % 3 == 0) ? DB_GENERIC : (v % 3 == 1) ? DB_SPECIAL : DB_FIRST;
      if (v < 3) m = db_mode_e'(v);
      for (int i = 0; i < 8; i++) begin
        x[i]  = data_t'(int'($urandom_range(0, 32768)) - 16384);
        xr[i] = real'(x[i]);
      end
      // x is applied now; the set is sampled at the next rising edge
      for (int r = 1; r <= 3; r++) begin
        if (m == DB_GENERIC)      phi[r] = 2.0 * PI * $urandom_range(0, 65535) / 65536.0;
        else if (m == DB_SPECIAL) phi[r] = PI * r / 4.0;
        else                      phi[r] = (r == 3) ? 1.5 * PI : 0.5 * PI;
        tw[r].c   = qc($cos(phi[r]));
        tw[r].cms = qc($cos(phi[r]) - $sin(phi[r]));
        tw[r].cps = qc($cos(phi[r]) + $sin(phi[r]));
      end
      // expected: outputs of a length-4M Hartley merge, written with cas()
      // of the full output angle (M-independent form)
      for (int q = 0; q < 4; q++) begin
        real a, b;
        a = 0.0; b = 0.0;
        for (int r = 0; r < 4; r++) begin
          real ph;
          ph = (r == 0) ? 0.0 : phi[r];
          if (m == DB_GENERIC) begin
            // H[k+qM]   = sum_r cos(ph+rq pi/2) a_r + sin(ph+rq pi/2) b_r
            // H[M-k+qM] = sum_r cos(r(q+1)pi/2-ph) b_r + sin(r(q+1)pi/2-ph) a_r
            a += $cos(ph + r * q * PI / 2) * xr[r] + $sin(ph + r * q * PI / 2) * xr[4+r];
            b += $cos(r * (q + 1) * PI / 2 - ph) * xr[4+r] + $sin(r * (q + 1) * PI / 2 - ph) * xr[r];
          end else begin
            a += cas(r * q * PI / 2) * xr[r];
            if (m == DB_SPECIAL) b += cas(r * PI / 4 + r * q * PI / 2) * xr[4+r];
            else                 b += cas(r * q * PI / 2) * xr[4+r];
          end
        end
        exp_y[v][q]   = a;
        exp_y[v][4+q] = b;
      end
      mode      = m;
      in_valid  = 1'b1;
      in_cyc[v] = cyc;
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && nout < NVEC) begin
      checks++;
      if (cyc - in_cyc[nout] != 3) begin
        failures++;
        $display("FAIL: latency %0d", cyc - in_cyc[nout]);
      end
      for (int i = 0; i < 8; i++) begin
        real d;
        d = real'(y[i]) - exp_y[nout][i];
        checks++;
        if (d > 4.0 || d < -4.0) begin
          failures++;
          if (failures < 10) $display("FAIL: vec %0d out %0d got %0d exp %f", nout, i, y[i], exp_y[nout][i]);
        end
      end
      nout++;
    end
  end

  initial begin
    wait (nout == NVEC);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NVEC + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

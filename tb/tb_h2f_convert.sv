// tb_h2f_convert: self-checking testbench of the Hartley-to-Fourier
// converter, N = 16. A random Hartley set is streamed first in natural
// order with fourier = 0 (pass-through), then in the pair order H[0],
// H[1], H[N-1], ..., H[N/2] with fourier = 1. Expected Fourier outputs:
// 2*Re X[k] = H[N-k] + H[k], 2*Im X[k] = H[N-k] - H[k] with the exponent
// lowered by one; pass-through keeps value and exponent.
module tb_h2f_convert;
  import rfht_pkg::*;
  localparam int N  = 16;
  localparam int AW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fourier = 1'b0, in_valid = 1'b0, in_last = 1'b0;
  data_t in_data = '0;
  logic [1:0] in_tag = '0;
  logic [AW-1:0] in_index = '0;
  logic [EXP_W-1:0] in_exp = EXP_W'(5);
  logic out_valid, out_last, out_fourier;
  logic signed [DATA_W:0] out_re, out_im;
  logic [AW-1:0] out_index;
  logic signed [EXP_W:0] out_exp;

  h2f_convert #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  data_t h [N];
  int nout = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int k;
    k = int'(out_index);
    if (nout < N) begin
      chk(!out_fourier && k == nout && out_re == h[k] && out_im == 0 && out_exp == 5,
          $sformatf("pass-through bin %0d", k));
    end else begin
      int nk;
      nk = (N - k) % N;
      chk(out_fourier && k == nout - N, $sformatf("Fourier bin order %0d", k));
      chk(out_re == h[nk] + h[k] && out_im == h[nk] - h[k] && out_exp == 4,
          $sformatf("Fourier bin %0d: %0d %0d", k, out_re, out_im));
    end
    chk(out_last == (nout == N - 1 || nout == N + N / 2), "last flag");
    nout++;
  end

  initial begin
    foreach (h[i]) h[i] = data_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      in_valid = 1'b1; fourier = 1'b0; in_tag = 2'd1; in_index = AW'(i);
      in_data = h[i]; in_last = (i == N - 1);
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      int k;
      fourier = 1'b1;
      if (i == 0)          begin k = 0;           in_tag = 2'd0; in_data = h[0]; end
      else if (i == N - 1) begin k = N / 2;       in_tag = 2'd0; in_data = h[N/2]; end
      else begin
        k = (i + 1) / 2;
        in_tag  = (i % 2 == 1) ? 2'd1 : 2'd2;
        in_data = (i % 2 == 1) ? h[k] : h[N - k];
      end
      in_index = AW'(k); in_last = (i == N - 1);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    chk(nout == N + N / 2 + 1, $sformatf("%0d outputs", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_psd_calc: self-checking testbench of the power-spectral-density unit.
// Random Fourier bins (re, im over the full 19-bit range, including the
// extreme values) are applied; psd must equal re^2 + im^2 computed here in
// 64-bit integers. The
// unit is combinational, so outputs are checked after a short settle time.
module tb_psd_calc;
  import rfht_pkg::*;
  localparam int NVEC = 2000;

  logic signed [DATA_W:0]   re, im;
  logic [2*DATA_W+1:0]      psd;

  psd_calc dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  localparam longint LO = -(longint'(1) <<< DATA_W);
  localparam longint HI = (longint'(1) <<< DATA_W) - 1;

  initial begin
    for (int v = 0; v < NVEC; v++) begin
      longint a, b;
      case (v)
        0: begin a = LO; b = LO; end
        1: begin a = HI; b = LO; end
        2: begin a = 0;  b = 0;  end
        3: begin a = -1; b = HI; end
        default: begin
          a = longint'($signed(($urandom % (1 << (DATA_W + 1))))) - (longint'(1) <<< DATA_W);
          b = longint'($signed(($urandom % (1 << (DATA_W + 1))))) - (longint'(1) <<< DATA_W);
        end
      endcase
      re = (DATA_W+1)'(a); im = (DATA_W+1)'(b);
      #1;
      chk(longint'(psd) == a * a + b * b, $sformatf("re %0d im %0d: psd %0d", a, b, psd));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(10 * NVEC + 100);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

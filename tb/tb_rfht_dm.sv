// tb_rfht_dm: self-checking testbench of the double-buffered, eight-bank
// data memory, N = 64 (eight banks of 8 words per half).
// The bank of address p is recomputed here independently (base-4 digit sum
// mod 4, plus 4 when p is odd; word p >> 3 in the bank). Phases:
//  1. half 0 loaded through the load port in dibit-reversed order while
//     half 1 is filled by eight-bank writes through the processing port;
//  2. half 0 read back through the unload port (full addresses) while half
//     1 is read bank-wise through the processing read port;
//  3. half 1 read through the unload port: the processing-port writes must
//     sit at the full addresses the bank function gives;
//  4. half 1 reloaded through the load port while half 0 is unloaded at the
//     same time, then half 1 read bank-wise through the processing port.
// Read data is checked one clock after the address.
module tb_rfht_dm;
  import rfht_pkg::*;
  localparam int N  = 64;
  localparam int AW = $clog2(N);
  localparam int BW = AW - 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          p_rd_en = 1'b0, p_half = 1'b0, p_wr_en = 1'b0, p_wr_half = 1'b0;
  logic [BW-1:0] p_rd_addr [8], p_wr_addr [8];
  data_t         p_rd_data [8], p_wr_data [8];
  logic          ld_en = 1'b0, ld_half = 1'b0, o_half = 1'b0;
  logic [AW-1:0] ld_addr = '0, o_addr = '0;
  data_t         ld_data = '0, o_data;

  rfht_dm #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  data_t ref_m [2][N];

  function automatic int bank_of(input int p);
    int s = 0;
    for (int q = p; q > 0; q = q / 4) s += q % 4;
    return s % 4 + 4 * (p % 2);
  endfunction
  // full address of word w in bank b
  function automatic int addr_of(input int b, input int w);
    for (int p = 8 * w; p < 8 * w + 8; p++) if (bank_of(p) == b) return p;
    return -1;
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    foreach (p_rd_addr[i]) begin p_rd_addr[i] = '0; p_wr_addr[i] = '0; p_wr_data[i] = '0; end
    // the bank function must cover every bank once in each group of eight
    for (int w = 0; w < N / 8; w++)
      for (int b = 0; b < 8; b++) chk(addr_of(b, w) >= 0, $sformatf("bank %0d word %0d", b, w));
    @(negedge clk);
    // 1. half 0 through the load port, half 1 through the processing port
    for (int c = 0; c < N; c++) begin
      ld_en = 1'b1; ld_half = 1'b0; ld_addr = AW'(dibit_reverse(c, AW / 2));
      ld_data = data_t'($urandom); ref_m[0][ld_addr] = ld_data;
      p_wr_en = (c < N / 8); p_wr_half = 1'b1;
      for (int b = 0; b < 8; b++) begin
        p_wr_addr[b] = BW'(c);
        p_wr_data[b] = data_t'($urandom);
        if (p_wr_en) ref_m[1][addr_of(b, c)] = p_wr_data[b];
      end
      @(negedge clk);
    end
    ld_en = 1'b0; p_wr_en = 1'b0;
    // 2. unload port on half 0, processing read port on half 1
    for (int c = 0; c <= N; c++) begin
      if (c > 0) begin
        chk(o_data == ref_m[0][c-1], $sformatf("half 0 word %0d", c - 1));
        if (c <= N / 8)
          for (int b = 0; b < 8; b++)
            chk(p_rd_data[b] == ref_m[1][addr_of(b, (c - 1 + b) % (N / 8))],
                $sformatf("half 1 bank %0d word %0d", b, (c - 1 + b) % (N / 8)));
      end
      o_half = 1'b0; o_addr = AW'(c);
      p_rd_en = (c < N / 8); p_half = 1'b1;
      for (int b = 0; b < 8; b++) p_rd_addr[b] = BW'((c + b) % (N / 8));
      @(negedge clk);
    end
    p_rd_en = 1'b0;
    // 3. half 1 through the unload port
    for (int c = 0; c <= N; c++) begin
      if (c > 0) chk(o_data == ref_m[1][N - c], $sformatf("half 1 word %0d by unload", N - c));
      o_half = 1'b1; o_addr = AW'(N - 1 - c);
      @(negedge clk);
    end
    // 4. load half 1 while unloading half 0, then read half 1 bank-wise
    for (int c = 0; c <= N; c++) begin
      if (c > 0) chk(o_data == ref_m[0][N - c], $sformatf("half 0 word %0d during load", N - c));
      if (c < N) begin
        ld_en = 1'b1; ld_half = 1'b1; ld_addr = AW'(c);
        ld_data = data_t'($urandom); ref_m[1][c] = ld_data;
        o_half = 1'b0; o_addr = AW'(N - 1 - c);
      end else ld_en = 1'b0;
      @(negedge clk);
    end
    for (int c = 0; c <= N / 8; c++) begin
      if (c > 0)
        for (int b = 0; b < 8; b++)
          chk(p_rd_data[b] == ref_m[1][addr_of(b, c - 1)], $sformatf("half 1 bank %0d word %0d after load", b, c - 1));
      p_rd_en = 1'b1; p_half = 1'b1;
      for (int b = 0; b < 8; b++) p_rd_addr[b] = BW'(c % (N / 8));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dm_pair_router: self-checking testbench of the pair router at N = 256,
// against a behavioural model of eight dual-port banks (one read and one
// write per bank per clock by construction of the interface; sync read).
// The bank of address p is recomputed here independently. All four stages
// of the transform are run, one double butterfly per clock, each stage's
// address sets derived here from the radix-4 index arithmetic; stages are
// separated by a 12-clock gap. For every butterfly the eight slot-order
// inputs x must equal the model memory at its eight addresses 3 clocks after
// it enters; its results y (a fixed function of x) are returned 3 clocks
// later and must end up in place: after each stage the whole memory is
// compared with the reference.
module tb_dm_pair_router;
  import rfht_pkg::*;
  localparam int N   = 256;
  localparam int AW  = $clog2(N);
  localparam int BW  = AW - 3;
  localparam int NS  = AW / 2;
  localparam int NDB = N / 8;
  localparam int GAP = 12;
  localparam int SPAN = NS * (NDB + GAP) + 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic          i_valid = 1'b0, i_odd = 1'b0, y_valid = 1'b0;
  logic [AW-1:0] i_addr [8];
  logic          rd_en, wr_en;
  logic [BW-1:0] rd_addr [8], wr_addr [8];
  data_t         rd_data [8], x [8], y [8], wr_data [8];

  dm_pair_router #(.N(N), .Y_LAT(3)) dut (.*);

  function automatic int bank_of(input int p);
    int s = 0;
    for (int q = p; q > 0; q = q / 4) s += q % 4;
    return s % 4 + 4 * (p % 2);
  endfunction

  // behavioural banks
  data_t bank_m [8][N / 8];
  always_ff @(posedge clk) begin
    for (int b = 0; b < 8; b++) begin
      if (rd_en && rst_n) rd_data[b] <= bank_m[b][rd_addr[b]];
      if (wr_en && rst_n) bank_m[b][wr_addr[b]] <= wr_data[b];
    end
  end

  int checks = 0, failures = 0;
  data_t ref_m [N];
  int    ent_db [SPAN];        // butterfly entering at each clock, -1 none
  int    ent_st [SPAN];
  data_t xexp [SPAN][8];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic void db_addr(input int s, input int j, output int a [8]);
    int m, g, k, k1;
    m = 4 ** s;
    if (m == 1) begin
      for (int i = 0; i < 8; i++) a[i] = 8 * j + i;
    end else begin
      g = j / (m / 2); k = j % (m / 2); k1 = (k == 0) ? m / 2 : m - k;
      for (int r = 0; r < 4; r++) begin
        a[r]     = g * 4 * m + r * m + k;
        a[r + 4] = g * 4 * m + r * m + k1;
      end
    end
  endfunction

  function automatic data_t fy(input data_t v, input int slot);
    return v ^ data_t'(18'h15a5a + slot);
  endfunction

  int a [8];
  initial begin
    foreach (i_addr[i]) begin i_addr[i] = '0; y[i] = '0; end
    for (int c = 0; c < SPAN; c++) ent_db[c] = -1;
    for (int s = 0; s < NS; s++)
      for (int j = 0; j < NDB; j++) begin
        ent_db[10 + s * (NDB + GAP) + j] = j;
        ent_st[10 + s * (NDB + GAP) + j] = s;
      end
    for (int p = 0; p < N; p++) begin
      ref_m[p] = data_t'($urandom);
      bank_m[bank_of(p)][p / 8] = ref_m[p];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < SPAN; c++) begin
      // inputs of the butterfly that entered 3 clocks ago
      if (c >= 3 && ent_db[c-3] >= 0)
        for (int i = 0; i < 8; i++)
          chk(x[i] == xexp[c-3][i],
              $sformatf("stage %0d db %0d slot %0d input", ent_st[c-3], ent_db[c-3], i));
      // results of the butterfly that entered 6 clocks ago
      y_valid = (c >= 6 && ent_db[c-6] >= 0);
      if (y_valid) begin
        db_addr(ent_st[c-6], ent_db[c-6], a);
        for (int i = 0; i < 8; i++) begin
          y[i] = fy(xexp[c-6][i], i);
          ref_m[a[i]] = y[i];
        end
      end
      // butterfly entering now
      i_valid = (ent_db[c] >= 0);
      if (i_valid) begin
        i_odd = ent_db[c][0];
        db_addr(ent_st[c], ent_db[c], a);
        for (int i = 0; i < 8; i++) begin
          i_addr[i]  = AW'(a[i]);
          xexp[c][i] = ref_m[a[i]];
        end
      end
      // whole memory after each stage (last write 8 clocks after entry)
      if (c >= 9 && ent_db[c-9] == NDB - 1)
        for (int p = 0; p < N; p++)
          chk(bank_m[bank_of(p)][p / 8] == ref_m[p],
              $sformatf("stage %0d word %0d in place", ent_st[c-9], p));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (SPAN + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

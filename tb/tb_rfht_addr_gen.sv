// tb_rfht_addr_gen: self-checking testbench of the in-place address
// generator, N = 1024 (five stages). For every stage and double butterfly
// the expected addresses, type and angles are built from nested loops over
// groups g and sub-indices k (not from the unit's bit arithmetic), and the
// eight addresses of each stage must cover all N words exactly once.
module tb_rfht_addr_gen;
  import rfht_pkg::*;
  localparam int N  = 1024;
  localparam int AW = $clog2(N);
  localparam int NS = AW / 2;

  logic [AW/2-1:0] stage;
  logic [AW-4:0]   db_index;
  logic [AW-1:0]   addr [8];
  db_mode_e        mode;
  logic [AW-1:0]   angle [1:3];

  rfht_addr_gen #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      int seen [N];
      int m, j;
      m = 4 ** s;
      foreach (seen[i]) seen[i] = 0;
      j = 0;
      for (int g = 0; g < N / (4 * m); g++) begin
        for (int k = 0; k < ((m == 1) ? 1 : m / 2); k++) begin
          int ea [8];
          int eang [1:3];
          db_mode_e em;
          if (m == 1) begin
            if (g % 2 == 1) continue;
            for (int r = 0; r < 4; r++) begin
              ea[r] = 4 * g + r; ea[4+r] = 4 * (g + 1) + r;
            end
            em = DB_FIRST;
            eang[1] = N / 4; eang[2] = N / 4; eang[3] = 3 * N / 4;
          end else begin
            int kp;
            kp = (k == 0) ? m / 2 : k;
            for (int r = 0; r < 4; r++) begin
              ea[r]   = g * 4 * m + r * m + k;
              ea[4+r] = g * 4 * m + r * m + ((k == 0) ? m / 2 : m - k);
            end
            em = (k == 0) ? DB_SPECIAL : DB_GENERIC;
            // phi_r = 2 pi r k' / (4m)  ->  index r k' N / (4m) mod N
            for (int r = 1; r <= 3; r++) eang[r] = (r * kp * (N / (4 * m))) % N;
          end
          stage = (AW/2)'(s);
          db_index = (AW-3)'(j);
          #1;
          for (int i = 0; i < 8; i++) begin
            chk(int'(addr[i]) == ea[i], $sformatf("stage %0d db %0d slot %0d: %0d vs %0d", s, j, i, addr[i], ea[i]));
            seen[addr[i]]++;
          end
          chk(mode == em, $sformatf("stage %0d db %0d type", s, j));
          for (int r = 1; r <= 3; r++)
            chk(int'(angle[r]) == eang[r], $sformatf("stage %0d db %0d angle %0d: %0d vs %0d", s, j, r, angle[r], eang[r]));
          j++;
        end
      end
      chk(j == N / 8, $sformatf("stage %0d has %0d double butterflies", s, j));
      for (int i = 0; i < N; i++) chk(seen[i] == 1, $sformatf("stage %0d word %0d used %0d times", s, i, seen[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rfht_addr_gen: in-place address generator of the RFHT.
//
// With the input stored in dibit-reversed order, stage s (s = 0 .. log4(N)-1)
// merges groups of four length-M Hartley transforms (M = 4^s) into length-4M
// transforms. Word p = g*4M + r*M + m holds H_r[m] of group g. Double
// butterfly j of the stage (j = 0 .. N/8-1) works on
//   s = 0      : slots 0..3 = 8j + r, slots 4..7 = 8j + 4 + r   (DB_FIRST)
//   s > 0      : g = j / (M/2), k = j mod (M/2),
//                slots 0..3 = g*4M + r*M + k,
//                slots 4..7 = g*4M + r*M + (k == 0 ? M/2 : M-k)
//                (DB_SPECIAL for k = 0, otherwise DB_GENERIC)
// and writes its eight results back to the same eight words (in place).
// The twiddle angle of rotation r is phi_r = 2*pi*r*k'/(4M), given as an
// index r*k'*N/(4M) mod N into the circle of N points (k' = M/2 for the
// special butterfly, and pi/2, pi/2, 3*pi/2 in the first stage).
// This ordering is this design's own; it gives N/8 double butterflies per
// stage and (N/8)*log4(N) per transform, as the document states.
//
// Purely combinational.
module rfht_addr_gen
  import rfht_pkg::*;
#(
  parameter int N = 1 << 20
)(
  input  logic [$clog2(N)/2-1:0] stage,
  input  logic [$clog2(N)-4:0]   db_index,
  output logic [$clog2(N)-1:0]   addr  [8],
  output db_mode_e               mode,
  output logic [$clog2(N)-1:0]   angle [1:3]
);
  localparam int AW = $clog2(N);
  typedef logic [AW-1:0] addr_t;

  always_comb begin
    addr_t m, half, k, k1, kk, base;
    int    s2;
    k = '0; k1 = '0; kk = '0;
    s2   = 2 * int'(stage);
    m    = addr_t'(1) << s2;
    half = m >> 1;
    if (stage == '0) begin
      base = addr_t'(db_index) << 3;
      for (int r = 0; r < 4; r++) begin
        addr[r]   = base + addr_t'(r);
        addr[4+r] = base + addr_t'(4 + r);
      end
      mode     = DB_FIRST;
      angle[1] = addr_t'(N / 4);
      angle[2] = addr_t'(N / 4);
      angle[3] = addr_t'(3 * N / 4);
    end else begin
      k    = addr_t'(db_index) & (half - addr_t'(1));
      base = (addr_t'(db_index) >> (s2 - 1)) << (s2 + 2);
      k1   = (k == '0) ? half : m - k;
      kk   = (k == '0) ? half : k;
      for (int r = 0; r < 4; r++) begin
        addr[r]   = base + addr_t'(r) * m + k;
        addr[4+r] = base + addr_t'(r) * m + k1;
      end
      mode = (k == '0) ? DB_SPECIAL : DB_GENERIC;
      for (int r = 1; r <= 3; r++)
        angle[r] = (addr_t'(r) * kk) << (AW - 2 - s2);
    end
  end
endmodule

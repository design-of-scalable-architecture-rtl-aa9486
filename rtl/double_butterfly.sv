// double_butterfly: radix-4 Hartley "double butterfly", nine-multiplier
// version. Each clock it takes eight samples and three twiddle factors and
// produces eight outputs, i.e. two radix-4 Hartley butterflies that share
// their rotations.
//
// Generic type (slots 0..3 = a_r = H_r[k], slots 4..7 = b_r = H_r[M-k],
// r = 0..3, for the four length-M sub-transforms of a group of 4M):
//   rotation r = 1..3:  c_r = cos*a_r + sin*b_r ,  e_r = cos*b_r - sin*a_r
//   computed with three multipliers each: t = cos*(a+b),
//   c = t - (cos-sin)*b,  e = t - (cos+sin)*a          (9 mult, 9 add)
//   outputs  H[k+qM]   : A0=c0+c1+c2+c3  A1=c0+e1-c2-e3
//                        A2=c0-c1+c2-c3  A3=c0-e1-c2+e3
//            H[M-k+qM] : B0=b0+c1-e2-c3  B1=b0-e1+e2-e3
//                        B2=b0-c1-e2+c3  B3=b0+e1+e2+e3   (16 add)
// for 9 multipliers and 25 adders, the counts of the document's nine-
// multiplier double butterfly; the exact signal flow graph is this design's
// own derivation. The regularisation (one unit for every butterfly of the
// transform) is done with a few multiplexers: in DB_SPECIAL and DB_FIRST
// types the A outputs are formed from slots 0..3 by additions only and the
// rotators take both of their inputs from slots 4..7; the twiddle angles
// then make the B outputs the k = M/2 butterfly (angles r*pi/4) or a plain
// length-4 butterfly (angles pi/2, pi/2, 3pi/2).
//
// Timing: three register stages, in_valid -> out_valid latency 3 cycles,
// one eight-sample set per clock. Inputs must be pre-scaled (block floating
// point) to |x| <= 2^(DATA_W-4) so that the up-to-3-bit word growth fits;
// outputs are saturated to DATA_W bits as a safeguard.
module double_butterfly
  import rfht_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  db_mode_e mode,
  input  data_t    x   [8],
  input  twiddle_t tw  [1:3],
  output logic     out_valid,
  output data_t    y   [8]
);
  localparam int W1 = DATA_W + 3;   // rotated values
  localparam int W2 = DATA_W + 4;   // partial sums
  localparam int PW = DATA_W + 1 + COEF_W;
  typedef logic signed [W1-1:0] w1_t;
  typedef logic signed [W2-1:0] w2_t;

  // Product scaled back by 2^-COEF_FRAC with rounding.
  function automatic w1_t mul_tw(input logic signed [DATA_W:0] d, input coef_t k);
    logic signed [PW-1:0] p;
    p = PW'(d) * PW'(k);
    p = p + (PW'(1) <<< (COEF_FRAC - 1));
    return W1'(p >>> COEF_FRAC);
  endfunction

  function automatic data_t sat(input w2_t v);
    if (v > w2_t'((1 <<< (DATA_W - 1)) - 1)) return data_t'((1 <<< (DATA_W - 1)) - 1);
    if (v < -w2_t'(1 <<< (DATA_W - 1)))      return data_t'(-(1 <<< (DATA_W - 1)));
    return data_t'(v);
  endfunction

  // ---- stage 1: pre-additions and the nine multiplications ----
  w1_t      mt_q [1:3], mb_q [1:3], ma_q [1:3];
  data_t    a_q  [4];
  data_t    b0_q;
  logic     gen_q;
  logic     v1_q;

  always_ff @(posedge clk) begin
    for (int r = 1; r <= 3; r++) begin
      logic signed [DATA_W:0] ra, rb;
      ra = (mode == DB_GENERIC) ? (DATA_W+1)'(x[r]) : (DATA_W+1)'(x[4+r]);
      rb = (DATA_W+1)'(x[4+r]);
      mt_q[r] <= mul_tw(ra + rb, tw[r].c);
      mb_q[r] <= mul_tw(rb, tw[r].cms);
      ma_q[r] <= mul_tw(ra, tw[r].cps);
    end
    for (int r = 0; r < 4; r++) a_q[r] <= x[r];
    b0_q  <= x[4];
    gen_q <= (mode == DB_GENERIC);
  end

  // ---- stage 2: rotation outputs and first butterfly additions ----
  w1_t c [1:3], e [1:3];
  w1_t ca1, ca2, ca3, ea1, ea3;
  always_comb begin
    for (int r = 1; r <= 3; r++) begin
      c[r] = mt_q[r] - mb_q[r];
      e[r] = mt_q[r] - ma_q[r];
    end
    ca1 = gen_q ? c[1] : W1'(a_q[1]);
    ca2 = gen_q ? c[2] : W1'(a_q[2]);
    ca3 = gen_q ? c[3] : W1'(a_q[3]);
    ea1 = gen_q ? e[1] : W1'(a_q[1]);
    ea3 = gen_q ? e[3] : W1'(a_q[3]);
  end

  w2_t s02p_q, s02m_q, s13p_q, e13m_q, b2p_q, b2m_q, c13m_q, e13p_q;
  logic v2_q;
  always_ff @(posedge clk) begin
    s02p_q <= W2'(a_q[0]) + W2'(ca2);
    s02m_q <= W2'(a_q[0]) - W2'(ca2);
    s13p_q <= W2'(ca1) + W2'(ca3);
    e13m_q <= W2'(ea1) - W2'(ea3);
    b2p_q  <= W2'(b0_q) + W2'(e[2]);
    b2m_q  <= W2'(b0_q) - W2'(e[2]);
    c13m_q <= W2'(c[1]) - W2'(c[3]);
    e13p_q <= W2'(e[1]) + W2'(e[3]);
  end

  // ---- stage 3: output additions ----
  always_ff @(posedge clk) begin
    y[0] <= sat(s02p_q + s13p_q);
    y[1] <= sat(s02m_q + e13m_q);
    y[2] <= sat(s02p_q - s13p_q);
    y[3] <= sat(s02m_q - e13m_q);
    y[4] <= sat(b2m_q + c13m_q);
    y[5] <= sat(b2p_q - e13p_q);
    y[6] <= sat(b2m_q - c13m_q);
    y[7] <= sat(b2p_q + e13p_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0; v2_q <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1_q <= in_valid; v2_q <= v1_q; out_valid <= v2_q;
    end
  end
endmodule

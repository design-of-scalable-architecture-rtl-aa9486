// twiddle_gen: coefficient generator for one non-trivial twiddle factor,
// built on a two-level look-up table.
//
// The angle is phi = 2*pi*j/N for an index j of log2(N) bits. The top two
// bits select the quadrant; the remaining bits split into a coarse index ic
// and a fine index f of log2(L) bits each, with L = sqrt(N/4). Three one-
// level tables of L words each are held:
//   coarse sine  SC[i] = sin(pi/2 * i/L)            (serves sine and cosine:
//                                                    cos(theta) = SC[L-i])
//   fine sine    SF[i] = sin(pi/2 * i/L^2)
//   fine cosine  CF[i] = cos(pi/2 * i/L^2)
// and the in-quadrant value is rebuilt with four multipliers from
//   cos(theta+psi) = cos(theta)cos(psi) - sin(theta)sin(psi)
//   sin(theta+psi) = sin(theta)cos(psi) + cos(theta)sin(psi).
// The table layout, the coarse/fine split and the table length sqrt(N/4)
// follow the two-level scheme of the design; the quadrant folding and the
// use of ic = 0 -> cos = 1 (so that the coarse table needs no L-th entry)
// are this design's choices. The tables are computed at elaboration time.
// The outputs are cos, cos-sin and cos+sin, the three coefficients used by
// the three-multiplier rotator of the double butterfly.
//
// Timing: three register stages (table read, products, folding), one new
// angle per clock, latency 3 cycles. Coefficients are signed COEF_W bits
// with COEF_FRAC fractional bits.
module twiddle_gen
  import rfht_pkg::*;
#(
  parameter int N = 1 << 20          // transform length, a power of 4, >= 16
)(
  input  logic                 clk,
  input  logic [$clog2(N)-1:0] angle,
  output twiddle_t             tw
);
  localparam int LOG2N = $clog2(N);
  localparam int LB    = (LOG2N - 2) / 2;   // log2(L)
  localparam int L     = 1 << LB;
  localparam int PW    = 2 * COEF_W;
  localparam real PI   = 3.14159265358979323846;

  typedef coef_t tab_t [L];

  function automatic coef_t q(input real v);
    return coef_t'(longint'($floor(v * (2.0 ** COEF_FRAC) + 0.5)));
  endfunction
  function automatic tab_t gen_sc();
    tab_t t;
    for (int i = 0; i < L; i++) t[i] = q($sin(PI / 2.0 * i / L));
    return t;
  endfunction
  function automatic tab_t gen_sf();
    tab_t t;
    for (int i = 0; i < L; i++) t[i] = q($sin(PI / 2.0 * i / (real'(L) * L)));
    return t;
  endfunction
  function automatic tab_t gen_cf();
    tab_t t;
    for (int i = 0; i < L; i++) t[i] = q($cos(PI / 2.0 * i / (real'(L) * L)));
    return t;
  endfunction

  localparam tab_t SC = gen_sc();
  localparam tab_t SF = gen_sf();
  localparam tab_t CF = gen_cf();
  localparam coef_t ONE = coef_t'(1 <<< COEF_FRAC);

  function automatic coef_t mulc(input coef_t a, input coef_t b);
    logic signed [PW-1:0] p;
    p = PW'(a) * PW'(b);
    p = p + (PW'(1) <<< (COEF_FRAC - 1));
    return coef_t'(p >>> COEF_FRAC);
  endfunction

  logic [1:0]    quad;
  logic [LB-1:0] ic, f;
  assign quad = angle[LOG2N-1 -: 2];
  assign ic   = angle[2*LB-1 -: LB];
  assign f    = angle[LB-1:0];

  // stage 1: table reads
  coef_t sc1, cc1, sf1, cf1;
  logic [1:0] q1;
  always_ff @(posedge clk) begin
    sc1 <= SC[ic];
    cc1 <= (ic == '0) ? ONE : SC[LB'(L - int'(ic))];
    sf1 <= SF[f];
    cf1 <= CF[f];
    q1  <= quad;
  end

  // stage 2: angle-sum identities (four multipliers)
  coef_t cos2, sin2;
  logic [1:0] q2;
  always_ff @(posedge clk) begin
    cos2 <= mulc(cc1, cf1) - mulc(sc1, sf1);
    sin2 <= mulc(sc1, cf1) + mulc(cc1, sf1);
    q2   <= q1;
  end

  // stage 3: quadrant folding and the rotator coefficient sums
  coef_t cq, sq;
  always_comb begin
    unique case (q2)
      2'd0: begin cq =  cos2; sq =  sin2; end
      2'd1: begin cq = -sin2; sq =  cos2; end
      2'd2: begin cq = -cos2; sq = -sin2; end
      default: begin cq = sin2; sq = -cos2; end
    endcase
  end
  always_ff @(posedge clk) begin
    tw.c   <= cq;
    tw.cms <= cq - sq;
    tw.cps <= cq + sq;
  end
endmodule

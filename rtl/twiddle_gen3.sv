// twiddle_gen3: coefficient generator for one non-trivial twiddle factor,
// built on a three-level look-up table (the scheme for ultra-long lengths).
//
// The angle is phi = 2*pi*j/N. Below the two quadrant bits, the W = log2(N)-2
// in-quadrant bits split into a coarse field (CB bits, the rest), a middle
// field and a fine field (W/3 bits each). Five one-level tables are held:
//   coarse sine  SC[i] = sin(pi/2 * i/2^CB)         (also gives the cosine as SC[2^CB-i])
//   middle sine  SM[i] = sin(pi/2 * i/2^(CB+MB)),  middle cosine CM[i]
//   fine sine    SF[i] = sin(pi/2 * i/2^W),        fine cosine   CF[i]
// i.e. about cbrt(N/4) words each. The angle-sum identities
//   cos(a+b) = cos a cos b - sin a sin b,  sin(a+b) = sin a cos b + cos a sin b
// are applied twice (coarse+middle, then +fine) with four multipliers each,
// eight in all. Five tables, eight multipliers and the repeated use of the
// identities follow the three-level scheme of the design; the field split,
// the quadrant folding and the pipeline are this design's choices.
//
// Timing: four register stages, one angle per clock, latency 4 cycles.
// Outputs cos, cos-sin, cos+sin (signed COEF_W bits, COEF_FRAC fractional).
module twiddle_gen3
  import rfht_pkg::*;
#(
  parameter int N = 1 << 20          // transform length, a power of 4, >= 64
)(
  input  logic                 clk,
  input  logic [$clog2(N)-1:0] angle,
  output twiddle_t             tw
);
  localparam int LOG2N = $clog2(N);
  localparam int W     = LOG2N - 2;
  localparam int FB    = W / 3;
  localparam int MB    = W / 3;
  localparam int CB    = W - FB - MB;
  localparam int PW    = 2 * COEF_W;
  localparam real PI   = 3.14159265358979323846;

  typedef coef_t tabc_t [1 << CB];
  typedef coef_t tabm_t [1 << MB];
  typedef coef_t tabf_t [1 << FB];

  function automatic coef_t q(input real v);
    return coef_t'(longint'($floor(v * (2.0 ** COEF_FRAC) + 0.5)));
  endfunction
  function automatic tabc_t gen_sc();
    tabc_t t;
    for (int i = 0; i < (1 << CB); i++) t[i] = q($sin(PI / 2.0 * i / (2.0 ** CB)));
    return t;
  endfunction
  function automatic tabm_t gen_m(input bit cosine);
    tabm_t t;
    for (int i = 0; i < (1 << MB); i++)
      t[i] = cosine ? q($cos(PI / 2.0 * i / (2.0 ** (CB + MB))))
                    : q($sin(PI / 2.0 * i / (2.0 ** (CB + MB))));
    return t;
  endfunction
  function automatic tabf_t gen_f(input bit cosine);
    tabf_t t;
    for (int i = 0; i < (1 << FB); i++)
      t[i] = cosine ? q($cos(PI / 2.0 * i / (2.0 ** W)))
                    : q($sin(PI / 2.0 * i / (2.0 ** W)));
    return t;
  endfunction

  localparam tabc_t SC = gen_sc();
  localparam tabm_t SM = gen_m(1'b0);
  localparam tabm_t CM = gen_m(1'b1);
  localparam tabf_t SF = gen_f(1'b0);
  localparam tabf_t CF = gen_f(1'b1);
  localparam coef_t ONE = coef_t'(1 <<< COEF_FRAC);

  function automatic coef_t mulc(input coef_t a, input coef_t b);
    logic signed [PW-1:0] p;
    p = PW'(a) * PW'(b);
    p = p + (PW'(1) <<< (COEF_FRAC - 1));
    return coef_t'(p >>> COEF_FRAC);
  endfunction

  logic [1:0]    quad;
  logic [CB-1:0] ic;
  logic [MB-1:0] im;
  logic [FB-1:0] ifn;
  assign quad = angle[LOG2N-1 -: 2];
  assign ic   = angle[W-1 -: CB];
  assign im   = angle[FB +: MB];
  assign ifn  = angle[FB-1:0];

  // stage 1: table reads
  coef_t sc1, cc1, sm1, cm1, sf1, cf1;
  logic [1:0] q1;
  always_ff @(posedge clk) begin
    sc1 <= SC[ic];
    cc1 <= (ic == '0) ? ONE : SC[CB'((1 << CB) - int'(ic))];
    sm1 <= SM[im];
    cm1 <= CM[im];
    sf1 <= SF[ifn];
    cf1 <= CF[ifn];
    q1  <= quad;
  end

  // stage 2: coarse + middle angle
  coef_t c2, s2, sf2, cf2;
  logic [1:0] q2;
  always_ff @(posedge clk) begin
    c2  <= mulc(cc1, cm1) - mulc(sc1, sm1);
    s2  <= mulc(sc1, cm1) + mulc(cc1, sm1);
    sf2 <= sf1;
    cf2 <= cf1;
    q2  <= q1;
  end

  // stage 3: + fine angle
  coef_t c3, s3;
  logic [1:0] q3;
  always_ff @(posedge clk) begin
    c3 <= mulc(c2, cf2) - mulc(s2, sf2);
    s3 <= mulc(s2, cf2) + mulc(c2, sf2);
    q3 <= q2;
  end

  // stage 4: quadrant folding and rotator coefficient sums
  coef_t cq, sq;
  always_comb begin
    unique case (q3)
      2'd0: begin cq =  c3; sq =  s3; end
      2'd1: begin cq = -s3; sq =  c3; end
      2'd2: begin cq = -c3; sq = -s3; end
      default: begin cq = s3; sq = -c3; end
    endcase
  end
  always_ff @(posedge clk) begin
    tw.c   <= cq;
    tw.cms <= cq - sq;
    tw.cps <= cq + sq;
  end
endmodule

// rfht_pkg: types and constants shared by the regularized fast Hartley
// transform (RFHT) processing element and the dual-PE engine built on it.
//
// Number formats: data words are signed DATA_W = 18 bit integers (block
// floating point, one exponent per data set); twiddle coefficients are
// signed COEF_W = 27 bit fixed point with COEF_FRAC = 25 fractional bits,
// so values in [-2, 2) can be held (cos+sin reaches sqrt(2)). The 18/27-bit
// split follows the 18x27 FPGA multiplier size the design targets; the
// fractional split is this design's choice.
package rfht_pkg;

  localparam int DATA_W    = 18;
  localparam int COEF_W    = 27;
  localparam int COEF_FRAC = 25;
  localparam int EXP_W     = 6;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Double-butterfly type.
  //  DB_GENERIC : inputs H_r[k] (slots 0..3) and H_r[M-k] (slots 4..7),
  //               all three rotations active.
  //  DB_SPECIAL : k = 0 and k = M/2 of a group: slots 0..3 hold H_r[0]
  //               (pure radix-4 additions), slots 4..7 hold H_r[M/2]
  //               (rotations by r*pi/4).
  //  DB_FIRST   : first stage (length-4 groups): two independent length-4
  //               Hartley butterflies, slots 0..3 and 4..7.
  typedef enum logic [1:0] {DB_GENERIC = 2'd0, DB_SPECIAL = 2'd1, DB_FIRST = 2'd2} db_mode_e;

  // Twiddle coefficients as consumed by the three-multiplier rotator.
  typedef struct packed {
    coef_t c;      // cos(phi)
    coef_t cms;    // cos(phi) - sin(phi)
    coef_t cps;    // cos(phi) + sin(phi)
  } twiddle_t;

  // Base-4 digit reversal of an index of 2*ND bits (dibit reversal).
  function automatic logic [31:0] dibit_reverse(input logic [31:0] idx, input int nd);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < nd; i++) r = {r[29:0], idx[2*i +: 2]};
    return r;
  endfunction

  // Memory bank of data address p (2*ND bits) in the eight-bank data memory:
  // bank = (sum of the base-4 digits of p) mod 4 + 4 * p[0]. Every aligned
  // block of eight addresses covers the eight banks once (so the word
  // address inside the bank is p >> 3), and the sixteen addresses of the
  // double butterflies 2i and 2i+1 of any stage hit every bank exactly twice.
  function automatic logic [2:0] dm_bank(input logic [31:0] p, input int nd);
    logic [1:0] d;
    d = '0;
    for (int i = 0; i < nd; i++) d = d + p[2*i +: 2];
    return {p[0], d};
  endfunction

endpackage

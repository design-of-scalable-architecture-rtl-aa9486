// psd_calc: power spectral density of the Fourier-form output bins.
//
// For bin k the converter delivers, in block floating point with the
// common set exponent exp, Re X[k] = re * 2^exp and Im X[k] = im * 2^exp.
// The power is
//   |X[k]|^2 = (re^2 + im^2) * 2^(2 exp)
// so psd = re^2 + im^2 (exact, unsigned, 2*(DATA_W+1) bits), scaled by
// 4^exp with the exponent that comes with the bin. Because
// re = H[N-k] + H[k] and im = H[N-k] - H[k], psd also equals
// 2 (H[k]^2 + H[N-k]^2): the same figure straight from the
// Hartley values. Obtaining the PSD from the transform outputs follows the
// document; computing it from the Fourier pair after the conversion, the
// exact integer form and the absence of a 1/N normalisation are this
// design's choices.
//
// Interface: re, im (signed, DATA_W+1 bits) in; psd out.
// Timing: combinational (two squarers and an adder); it follows the
// registered converter outputs, so the PSD is valid with them.
module psd_calc
  import rfht_pkg::*;
(
  input  logic signed [DATA_W:0]    re,
  input  logic signed [DATA_W:0]    im,
  output logic [2*DATA_W+1:0]       psd
);
  localparam int PW = 2 * DATA_W + 2;

  logic signed [PW-1:0] re2, im2;
  always_comb begin
    re2     = PW'(re) * PW'(re);
    im2     = PW'(im) * PW'(im);
    psd = PW'(re2) + PW'(im2);
  end
endmodule

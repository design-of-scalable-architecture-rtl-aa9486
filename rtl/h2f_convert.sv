// h2f_convert: Hartley-space to Fourier-space conversion of a DHT output
// stream, following
//   Re X[k] = (H[N-k] + H[k]) / 2 ,   Im X[k] = (H[N-k] - H[k]) / 2 .
// The stream must deliver H[k] (tag PAIR_FIRST) immediately followed by
// H[N-k] (tag PAIR_SECOND); the self-paired bins k = 0 and k = N/2 arrive
// alone (tag SELF, Im = 0). The halving is not applied to the words: the
// outputs are the exact sums (DATA_W+1 bits) and the factor 1/2 is carried
// by decrementing the block exponent. In bypass mode (fourier = 0) every
// sample is passed on as Re with Im = 0 and the exponent unchanged. The
// mode input belongs to the incoming word and is passed on with it.
//
// Timing: one register stage; a Fourier-mode output appears one clock after
// the second word of its pair, so N Hartley words give N/2+1 outputs.
module h2f_convert
  import rfht_pkg::*;
#(
  parameter int N = 1 << 20
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   fourier,
  input  logic                   in_valid,
  input  data_t                  in_data,
  input  logic [1:0]             in_tag,     // 0 SELF, 1 PAIR_FIRST, 2 PAIR_SECOND
  input  logic [$clog2(N)-1:0]   in_index,
  input  logic [EXP_W-1:0]       in_exp,
  input  logic                   in_last,
  output logic                   out_valid,
  output logic signed [DATA_W:0] out_re,
  output logic signed [DATA_W:0] out_im,
  output logic [$clog2(N)-1:0]   out_index,
  output logic signed [EXP_W:0]  out_exp,
  output logic                   out_last,
  output logic                   out_fourier
);
  data_t hk_q;   // H[k] of the pair in progress

  always_ff @(posedge clk) begin
    if (in_valid && in_tag == 2'd1) hk_q <= in_data;
    out_index <= in_index;
    out_last  <= in_last;
    out_fourier <= fourier;
    if (!fourier) begin
      out_re  <= (DATA_W+1)'(in_data);
      out_im  <= '0;
      out_exp <= (EXP_W+1)'(in_exp);
    end else if (in_tag == 2'd0) begin
      out_re  <= (DATA_W+1)'(in_data) + (DATA_W+1)'(in_data);
      out_im  <= '0;
      out_exp <= (EXP_W+1)'(in_exp) - (EXP_W+1)'(1);
    end else begin
      out_re  <= (DATA_W+1)'(in_data) + (DATA_W+1)'(hk_q);
      out_im  <= (DATA_W+1)'(in_data) - (DATA_W+1)'(hk_q);
      out_exp <= (EXP_W+1)'(in_exp) - (EXP_W+1)'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && (!fourier || in_tag != 2'd1);
  end
endmodule

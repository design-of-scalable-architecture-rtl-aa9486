// bfp_scaler: peak detector of the block floating-point (conditional)
// scaling scheme.
//
// It watches the LANES words written by one stage of double butterflies (or
// the input samples as a data set is loaded) and keeps the OR of their
// magnitudes (one's-complement magnitude, x ^ sign). From the bit length of
// that peak it gives the right shift, 0 to GROWTH bits, that the next stage
// must apply to its inputs so that they have GROWTH bits of headroom for the
// word growth of a double butterfly. Scaling is therefore only applied when
// the data actually needs it, stage by stage, and the last stage's growth is
// kept in the result; this follows the document's block floating-point
// scheme, the peak measure and headroom rule are this design's choices.
//
// Interface: 'clear' restarts the peak (it may coincide with an
// observation, which is then the first of the new block). 'shift' is
// combinational and already includes the current observation, so it is
// valid in the same cycle as the last word of the block.
module bfp_scaler
  import rfht_pkg::*;
#(
  parameter int LANES  = 8,
  parameter int GROWTH = 3          // bits of growth per double butterfly
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       obs_valid,
  input  data_t      obs [LANES],
  output logic [1:0] shift
);
  localparam int LIMIT = DATA_W - 1 - GROWTH;   // allowed magnitude bits

  logic [DATA_W-2:0] peak_q, peak_n;

  always_comb begin
    peak_n = clear ? '0 : peak_q;
    if (obs_valid)
      for (int i = 0; i < LANES; i++)
        peak_n |= obs[i][DATA_W-2:0] ^ {(DATA_W-1){obs[i][DATA_W-1]}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) peak_q <= '0;
    else        peak_q <= peak_n;
  end

  // bit length of the peak minus the allowed number of bits, clipped at 0
  always_comb begin
    shift = 2'd0;
    for (int b = LIMIT; b < DATA_W - 1; b++)
      if (peak_n[b]) shift = 2'(b - LIMIT + 1);
  end
endmodule

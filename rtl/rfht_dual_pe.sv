// rfht_dual_pe: dual-PE real-data DFT engine via the regularized FHT.
//
// One PE alone keeps up with a continuous input of one sample per clock only
// while its latency (N/8)log4(N) stays below the N-cycle update period, i.e.
// up to N = 4^7. Two PEs lift the limit: data sets (N consecutive input
// samples) are dealt alternately, even-numbered sets to PE0 and odd-numbered
// ones to PE1, so each PE has 2N cycles per set while together they still
// deliver one N-sample output set every N cycles. With N = 4^10 the latency
// is about 5N/4 cycles, between N and 2N.
//
// The two PE output streams never overlap (they start N cycles apart and
// last N cycles each) and are merged into one stream, which h2f_convert
// either passes on as Hartley values (fourier_mode = 0) or turns into
// Fourier-space bins Re/Im X[k], k = 0 .. N/2 (fourier_mode = 1; the mode is
// sampled when a PE starts unloading a set and travels with that set's
// words, flagged by out_fourier). With the Fourier bins, psd_calc gives
// the power spectral density |X[k]|^2 of each bin (out_psd). The dealing of data sets and the
// merge follow the document; the Fourier pair ordering, the exponent output
// and the 'overrun' flag (input set arriving at a PE whose buffers are all in
// use, or the two output streams colliding) are this design's additions.
//
// LUT_LEVELS selects the coefficient generator: the two-level scheme
// (default, the document's choice for the 1M- and 4M-point cases) or the
// three-level one it gives for ultra-long lengths.
//
// Interface: in_valid/in_data one sample per clock, N samples per set.
// out_re/out_im with a block exponent: value = out_re * 2^out_exp.
module rfht_dual_pe
  import rfht_pkg::*;
#(
  parameter int N          = 1 << 20,
  parameter int LUT_LEVELS = 2        // twiddle LUT scheme of the PEs: 2 or 3 levels
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   fourier_mode,
  input  logic                   in_valid,
  input  data_t                  in_data,
  output logic                   out_valid,
  output logic signed [DATA_W:0] out_re,
  output logic signed [DATA_W:0] out_im,
  output logic [$clog2(N)-1:0]   out_index,
  output logic signed [EXP_W:0]  out_exp,
  output logic                   out_last,
  output logic                   out_fourier,   // output set is in Fourier form
  output logic [2*DATA_W+1:0]    out_psd,       // Fourier form: |X[k]|^2 = out_psd * 4^out_exp
  output logic [1:0]             pe_busy,
  output logic [1:0]             pe_stage_done,   // per PE: end of a stage
  output logic [1:0]             pe_stage_shift [2], // per PE: scaling chosen at that stage end
  output logic                   overrun
);
  localparam int AW = $clog2(N);

  logic [AW-1:0] in_cnt;
  logic          set_sel;     // PE receiving the current data set

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt  <= '0;
      set_sel <= 1'b0;
    end else if (in_valid) begin
      in_cnt <= in_cnt + 1'b1;
      if (in_cnt == AW'(N - 1)) set_sel <= ~set_sel;
    end
  end

  logic          pe_ov    [2];
  data_t         pe_data  [2];
  logic [1:0]    pe_tag   [2];
  logic [AW-1:0] pe_idx   [2];
  logic [EXP_W-1:0] pe_exp [2];
  logic          pe_last  [2];
  logic          pe_four  [2];
  logic          pe_overrun [2];

  for (genvar p = 0; p < 2; p++) begin : g_pe
    rfht_pe #(.N(N), .LUT_LEVELS(LUT_LEVELS)) u_pe (
      .clk, .rst_n,
      .in_valid      (in_valid && set_sel == 1'(p)),
      .in_data       (in_data),
      .fourier_order (fourier_mode),
      .out_valid     (pe_ov[p]),
      .out_data      (pe_data[p]),
      .out_tag       (pe_tag[p]),
      .out_index     (pe_idx[p]),
      .out_exp       (pe_exp[p]),
      .out_last      (pe_last[p]),
      .out_fourier   (pe_four[p]),
      .busy          (pe_busy[p]),
      .stage_done    (pe_stage_done[p]),
      .stage_shift   (pe_stage_shift[p]),
      .overrun       (pe_overrun[p])
    );
  end

  // output merge
  logic          m_valid;
  data_t         m_data;
  logic [1:0]    m_tag;
  logic [AW-1:0] m_idx;
  logic [EXP_W-1:0] m_exp;
  logic          m_last;
  logic          m_four;
  logic          collide;

  always_comb begin
    logic s;
    s       = pe_ov[1];
    m_valid = pe_ov[0] || pe_ov[1];
    m_data  = pe_data[s];
    m_tag   = pe_tag[s];
    m_idx   = pe_idx[s];
    m_exp   = pe_exp[s];
    m_last  = pe_last[s];
    m_four  = pe_four[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) collide <= 1'b0;
    else if (pe_ov[0] && pe_ov[1]) collide <= 1'b1;
  end
  assign overrun = collide || pe_overrun[0] || pe_overrun[1];

  h2f_convert #(.N(N)) u_h2f (
    .clk, .rst_n,
    .fourier   (m_four),
    .in_valid  (m_valid),
    .in_data   (m_data),
    .in_tag    (m_tag),
    .in_index  (m_idx),
    .in_exp    (m_exp),
    .in_last   (m_last),
    .out_valid,
    .out_re,
    .out_im,
    .out_index,
    .out_exp,
    .out_last,
    .out_fourier
  );

  psd_calc u_psd (
    .re  (out_re),
    .im  (out_im),
    .psd (out_psd)
  );
endmodule

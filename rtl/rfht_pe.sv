// rfht_pe: one processing element = one complete regularized FHT module.
//
// It computes the N-point discrete Hartley transform of each N-sample data
// set it receives, in block floating point, with one memory-based engine:
//   load    : samples arrive one per clock (in_valid) and are written in
//             dibit-reversed order into the free half of the double-buffered
//             data memory; a bfp_scaler measures their peak.
//   process : log4(N) stages of N/8 double butterflies each, one double
//             butterfly per clock. rfht_addr_gen gives the eight in-place
//             addresses, the butterfly type and three twiddle angles; three
//             twiddle_gen units (twiddle_gen3 when LUT_LEVELS = 3; one per
//             non-trivial twiddle factor) supply
//             the coefficients; inputs are right-shifted by the shift the
//             previous stage's peak asked for; the eight results are written
//             back in place. The data memory is eight dual-port banks per
//             half; dm_pair_router reads and writes butterflies 2i and 2i+1
//             together over two clocks, so each bank sees one read and one
//             write per clock. Between stages the pipeline is drained
//             (PIPE_GAP cycles) and the shifts are summed into the block
//             exponent.
//   unload  : the transformed set is read out one word per clock, in natural
//             order (H[0..N-1]) or, when fourier_order is set at the start of
//             the unload, in the pair order H[0], H[1], H[N-1], H[2], H[N-2],
//             ..., H[N/2] that h2f_convert expects.
// The three activities run concurrently on different halves; halves are
// used in strict rotation. Each half's state is EMPTY -> FULL -> DONE ->
// EMPTY. A data set that starts while its half is not empty sets 'overrun'.
//
// Timing: a butterfly's inputs reach it X_LAT = 4 clocks after issue; the
// last write of a stage lands 8 clocks after the stage's last issue.
// Processing takes log4(N) * (N/8 + PIPE_GAP) + 1 cycles; output
// words follow the unload read by one clock. The stage/latency structure,
// the dibit-reversed load, the natural-order unload and the stage-wise
// conditional scaling follow the document; the pipeline depths, the
// handshake-free streaming interface and the pair-order unload are this
// design's choices.
module rfht_pe
  import rfht_pkg::*;
#(
  parameter int N          = 1 << 20,
  parameter int LUT_LEVELS = 2        // twiddle LUT scheme: 2 (twiddle_gen) or 3 (twiddle_gen3)
)(
  input  logic                 clk,
  input  logic                 rst_n,
  // input stream: consecutive valid samples form data sets of N samples
  input  logic                 in_valid,
  input  data_t                in_data,
  input  logic                 fourier_order,
  // output stream
  output logic                 out_valid,
  output data_t                out_data,
  output logic [1:0]           out_tag,     // 0 self, 1 first / natural, 2 second of pair
  output logic [$clog2(N)-1:0] out_index,   // Hartley bin k of out_data (k of the pair)
  output logic [EXP_W-1:0]     out_exp,     // block exponent: value = out_data * 2^out_exp
  output logic                 out_last,
  output logic                 out_fourier, // out_data belongs to a pair-order unload
  // status
  output logic                 busy,        // engine processing
  output logic                 stage_done,  // pulse at the end of each stage
  output logic [1:0]           stage_shift, // shift chosen for the next stage (valid with stage_done)
  output logic                 overrun
);
  localparam int AW       = $clog2(N);
  localparam int NSTAGE   = AW / 2;
  localparam int NDB      = N / 8;
  localparam int SW       = (NSTAGE > 1) ? $clog2(NSTAGE) : 1;
  localparam int TW_LAT   = LUT_LEVELS + 1;  // twiddle generator latency
  localparam int X_LAT    = 4;      // issue -> double butterfly input (pair router)
  localparam int PIPE_GAP = 8;      // >= issue-to-last-write depth of a pair (X_LAT + 4)

  typedef enum logic [1:0] {H_EMPTY, H_FULL, H_DONE} half_state_e;
  typedef enum logic [1:0] {E_IDLE, E_RUN, E_DRAIN} eng_state_e;
  typedef logic [AW-1:0] addr_t;

  half_state_e      hstate [2];
  logic [1:0]       ld_shift [2];
  logic [EXP_W-1:0] hexp [2];
  logic             ld_ptr, pr_ptr, ou_ptr;

  // ------------------------------------------------------------------ load
  addr_t      ld_cnt;
  logic [1:0] ld_bfp_shift;
  data_t      ld_obs [1];
  assign ld_obs[0] = in_data;

  bfp_scaler #(.LANES(1)) u_bfp_load (
    .clk, .rst_n,
    .clear     (in_valid && ld_cnt == '0),
    .obs_valid (in_valid),
    .obs       (ld_obs),
    .shift     (ld_bfp_shift)
  );

  // ---------------------------------------------------------------- engine
  eng_state_e          est;
  logic [SW-1:0]       stage;
  logic [AW-4:0]       dbi;
  logic [3:0]          gap;
  logic [1:0]          cur_shift;
  logic [EXP_W-1:0]    exp_acc;
  logic                issue;
  logic [1:0]          pr_bfp_shift;

  addr_t    ag_addr [8];
  db_mode_e ag_mode;
  addr_t    ag_angle [1:3];

  rfht_addr_gen #(.N(N)) u_addr (
    .stage    ((AW/2)'(stage)),
    .db_index (dbi),
    .addr     (ag_addr),
    .mode     (ag_mode),
    .angle    (ag_angle)
  );

  twiddle_t tw [1:3];
  for (genvar r = 1; r <= 3; r++) begin : g_tw
    if (LUT_LEVELS == 3) begin : g_l3
      twiddle_gen3 #(.N(N)) u_tw (.clk, .angle(ag_angle[r]), .tw(tw[r]));
    end else begin : g_l2
      twiddle_gen #(.N(N)) u_tw (.clk, .angle(ag_angle[r]), .tw(tw[r]));
    end
  end

  assign issue = (est == E_RUN);

  // issue pipeline: mode/valid delayed to the double butterfly input at
  // issue + X_LAT, twiddles delayed from issue + TW_LAT to the same clock;
  // addresses go to the pair router the clock after issue
  addr_t    pa_addr [8];
  logic     pa_odd;
  db_mode_e pa_mode [X_LAT];
  logic     pa_v    [X_LAT];
  twiddle_t tw_d    [X_LAT-TW_LAT+1][1:3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < X_LAT; d++) pa_v[d] <= 1'b0;
    end else begin
      pa_v[0] <= issue;
      for (int d = 1; d < X_LAT; d++) pa_v[d] <= pa_v[d-1];
    end
  end
  always_ff @(posedge clk) begin
    pa_addr    <= ag_addr;
    pa_odd     <= dbi[0];
    pa_mode[0] <= ag_mode;
    for (int d = 1; d < X_LAT; d++) pa_mode[d] <= pa_mode[d-1];
    for (int d = 1; d <= X_LAT - TW_LAT; d++) tw_d[d] <= tw_d[d-1];
  end
  assign tw_d[0] = tw;

  // ---------------------------------------------------------------- memory
  logic                rt_rd_en, rt_wr_en;
  logic [AW-4:0]       rt_rd_addr [8];
  logic [AW-4:0]       rt_wr_addr [8];
  data_t               dm_rd [8];
  data_t               rt_x  [8];
  data_t               rt_wr [8];
  data_t               db_x  [8];
  data_t               db_y  [8];
  logic                db_ov;
  logic                ou_rd_en;
  addr_t               ou_addr;
  data_t               ou_data;

  rfht_dm #(.N(N)) u_dm (
    .clk,
    .p_rd_en   (rt_rd_en),
    .p_half    (pr_ptr),
    .p_rd_addr (rt_rd_addr),
    .p_rd_data (dm_rd),
    .p_wr_en   (rt_wr_en),
    .p_wr_half (pr_ptr),
    .p_wr_addr (rt_wr_addr),
    .p_wr_data (rt_wr),
    .ld_en     (in_valid),
    .ld_half   (ld_ptr),
    .ld_addr   (addr_t'(dibit_reverse(32'(ld_cnt), NSTAGE))),
    .ld_data   (in_data),
    .o_half    (ou_ptr),
    .o_addr    (ou_addr),
    .o_data    (ou_data)
  );

  dm_pair_router #(.N(N), .Y_LAT(3)) u_route (
    .clk, .rst_n,
    .i_valid (pa_v[0]),
    .i_odd   (pa_odd),
    .i_addr  (pa_addr),
    .rd_en   (rt_rd_en),
    .rd_addr (rt_rd_addr),
    .rd_data (dm_rd),
    .x       (rt_x),
    .y_valid (db_ov),
    .y       (db_y),
    .wr_en   (rt_wr_en),
    .wr_addr (rt_wr_addr),
    .wr_data (rt_wr)
  );

  // block floating-point input scaling of the double butterfly
  always_comb
    for (int i = 0; i < 8; i++) db_x[i] = rt_x[i] >>> cur_shift;

  double_butterfly u_db (
    .clk, .rst_n,
    .in_valid  (pa_v[X_LAT-1]),
    .mode      (pa_mode[X_LAT-1]),
    .x         (db_x),
    .tw        (tw_d[X_LAT-TW_LAT]),
    .out_valid (db_ov),
    .y         (db_y)
  );

  bfp_scaler #(.LANES(8)) u_bfp_proc (
    .clk, .rst_n,
    .clear     (est == E_IDLE || stage_done),
    .obs_valid (db_ov),
    .obs       (db_y),
    .shift     (pr_bfp_shift)
  );

  // ---------------------------------------------------------------- unload
  typedef enum logic {O_IDLE, O_RUN} out_state_e;
  out_state_e ost;
  addr_t      ou_cnt;
  logic       ou_four;
  addr_t      ou_k;
  logic [1:0] ou_tag;
  logic       ou_v_q, ou_last_q, ou_four_q;
  logic [1:0] ou_tag_q;
  addr_t      ou_k_q;

  always_comb begin
    if (!ou_four) begin
      ou_k = ou_cnt; ou_addr = ou_cnt; ou_tag = 2'd1;
    end else if (ou_cnt == '0) begin
      ou_k = '0; ou_addr = '0; ou_tag = 2'd0;
    end else if (ou_cnt == addr_t'(N - 1)) begin
      ou_k = addr_t'(N / 2); ou_addr = addr_t'(N / 2); ou_tag = 2'd0;
    end else begin
      ou_k    = (ou_cnt + addr_t'(1)) >> 1;
      ou_addr = ou_cnt[0] ? ou_k : addr_t'(N) - ou_k;
      ou_tag  = ou_cnt[0] ? 2'd1 : 2'd2;
    end
  end
  assign ou_rd_en = (ost == O_RUN);

  always_ff @(posedge clk) begin
    ou_tag_q <= ou_tag;
    ou_k_q   <= ou_k;
    ou_four_q <= ou_four;
  end

  assign out_valid = ou_v_q;
  assign out_data  = ou_data;
  assign out_tag   = ou_tag_q;
  assign out_index = ou_k_q;
  assign out_last  = ou_last_q;
  assign out_fourier = ou_four_q;

  // ------------------------------------------------------------ controller
  assign busy = (est != E_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < 2; h++) begin
        hstate[h]   <= H_EMPTY;
        ld_shift[h] <= '0;
        hexp[h]     <= '0;
      end
      ld_ptr <= 1'b0; pr_ptr <= 1'b0; ou_ptr <= 1'b0;
      ld_cnt <= '0;
      est <= E_IDLE; stage <= '0; dbi <= '0; gap <= '0;
      cur_shift <= '0; exp_acc <= '0;
      stage_done <= 1'b0; stage_shift <= '0;
      ost <= O_IDLE; ou_cnt <= '0; ou_four <= 1'b0;
      ou_v_q <= 1'b0; ou_last_q <= 1'b0; out_exp <= '0;
      overrun <= 1'b0;
    end else begin
      stage_done <= 1'b0;

      // load
      if (in_valid) begin
        if (ld_cnt == '0 && hstate[ld_ptr] != H_EMPTY) overrun <= 1'b1;
        ld_cnt <= ld_cnt + addr_t'(1);
        if (ld_cnt == addr_t'(N - 1)) begin
          hstate[ld_ptr]   <= H_FULL;
          ld_shift[ld_ptr] <= ld_bfp_shift;
          ld_ptr           <= ~ld_ptr;
        end
      end

      // engine
      unique case (est)
        E_IDLE: if (hstate[pr_ptr] == H_FULL) begin
          est       <= E_RUN;
          stage     <= '0;
          dbi       <= '0;
          cur_shift <= ld_shift[pr_ptr];
          exp_acc   <= EXP_W'(ld_shift[pr_ptr]);
        end
        E_RUN: begin
          dbi <= dbi + 1'b1;
          if (dbi == (AW-3)'(NDB - 1)) begin
            est <= E_DRAIN;
            gap <= 4'(PIPE_GAP - 1);
          end
        end
        E_DRAIN: begin
          gap <= gap - 1'b1;
          if (gap == '0) begin
            stage_done  <= 1'b1;
            stage_shift <= pr_bfp_shift;
            if (stage == SW'(NSTAGE - 1)) begin
              est            <= E_IDLE;
              hstate[pr_ptr] <= H_DONE;
              hexp[pr_ptr]   <= exp_acc;
              pr_ptr         <= ~pr_ptr;
            end else begin
              est       <= E_RUN;
              stage     <= stage + 1'b1;
              dbi       <= '0;
              cur_shift <= pr_bfp_shift;
              exp_acc   <= exp_acc + EXP_W'(pr_bfp_shift);
            end
          end
        end
        default: est <= E_IDLE;
      endcase

      // unload
      ou_v_q    <= ou_rd_en;
      ou_last_q <= ou_rd_en && ou_cnt == addr_t'(N - 1);
      unique case (ost)
        O_IDLE: if (hstate[ou_ptr] == H_DONE) begin
          ost     <= O_RUN;
          ou_cnt  <= '0;
          ou_four <= fourier_order;
          out_exp <= hexp[ou_ptr];
        end
        O_RUN: begin
          ou_cnt <= ou_cnt + addr_t'(1);
          if (ou_cnt == addr_t'(N - 1)) begin
            ost            <= O_IDLE;
            hstate[ou_ptr] <= H_EMPTY;
            ou_ptr         <= ~ou_ptr;
          end
        end
        default: ost <= O_IDLE;
      endcase
    end
  end
endmodule

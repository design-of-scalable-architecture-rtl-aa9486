// dm_pair_router: conflict-free access of the eight-bank data memory by
// pairs of double butterflies.
//
// The double butterflies of a stage are issued one per clock; butterflies
// 2i and 2i+1 form a pair whose sixteen addresses hit every bank exactly
// twice (dm_bank in rfht_pkg). For each pair the router plans, per bank,
// which of its two words is accessed in the first and which in the second
// of two clocks (first occurrence in slot order 0..15 goes first), and then
//   read side : issues the two bank-order reads, keeps the first read's
//               data, and hands each butterfly its eight inputs in slot
//               order, the even one 4 clocks after its issue and the odd one
//               the clock after (both 4 clocks after their own issue);
//   write side: keeps the even butterfly's results for one clock and,
//               when the odd one's results arrive, writes the sixteen words
//               back in place with the same two-clock plan.
// So the memory sees one read and one write per bank per clock, and the
// pipeline still runs one double butterfly per clock.
//
// Interface and timing (t = issue of the even butterfly of a pair):
//   i_valid/i_odd/i_addr : eight full data addresses, at t+1 (even) and t+2
//                          (odd); pairs are always issued back to back.
//   rd_en/rd_addr        : bank-local read addresses at t+2 and t+3.
//   rd_data              : bank-order read data at t+3 and t+4.
//   x                    : slot-order butterfly inputs at t+4 and t+5.
//   y_valid/y            : slot-order results, Y_LAT clocks after x
//                          (even then odd, back to back).
//   wr_en/wr_addr/wr_data: bank-order writes, the clock the odd results
//                          arrive and the clock after.
// Reading and writing two butterflies over two consecutive clocks through
// eight dual-port banks follows the document; the plan rule, the buffers
// and the timing are this design's.
module dm_pair_router
  import rfht_pkg::*;
#(
  parameter int N     = 1 << 20,
  parameter int Y_LAT = 3              // clocks from x to y (double butterfly)
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 i_valid,
  input  logic                 i_odd,
  input  logic [$clog2(N)-1:0] i_addr  [8],
  output logic                 rd_en,
  output logic [$clog2(N)-4:0] rd_addr [8],
  input  data_t                rd_data [8],
  output data_t                x       [8],
  input  logic                 y_valid,
  input  data_t                y       [8],
  output logic                 wr_en,
  output logic [$clog2(N)-4:0] wr_addr [8],
  output data_t                wr_data [8]
);
  localparam int AW   = $clog2(N);
  localparam int BW   = AW - 3;
  localparam int WDLY = Y_LAT + 2;     // pair addresses: read plan -> write plan
  typedef logic [AW-1:0] addr_t;

  // plan of one pair: per slot its bank and clock (0 first, 1 second), per
  // bank and clock the slot accessed
  typedef struct packed {
    logic [15:0][2:0] bank;
    logic [15:0]      cyc;
    logic [1:0][7:0][3:0] sel;
  } plan_t;

  function automatic plan_t make_plan(input addr_t a [16]);
    plan_t      p;
    logic [7:0] seen;
    p    = '0;
    seen = '0;
    for (int s = 0; s < 16; s++) begin
      p.bank[s] = dm_bank(32'(a[s]), AW / 2);
      p.cyc[s]  = seen[p.bank[s]];
      seen[p.bank[s]] = 1'b1;
      p.sel[p.cyc[s]][p.bank[s]] = 4'(s);
    end
    return p;
  endfunction

  // ------------------------------------------------------------- read side
  addr_t even_a [8];
  addr_t pair_a [16];
  addr_t pair_q [16];
  plan_t rplan, rplan_q;
  logic [15:0][2:0] xbank;             // slot banks and clocks at assembly
  logic [15:0]      xcyc;
  logic  r2_pend;

  always_ff @(posedge clk)
    if (i_valid && !i_odd) even_a <= i_addr;

  always_comb begin
    for (int s = 0; s < 8; s++) begin
      pair_a[s]     = even_a[s];
      pair_a[s + 8] = i_addr[s];
    end
    rplan = make_plan(pair_a);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r2_pend <= 1'b0;
    else        r2_pend <= i_valid && i_odd;

  always_ff @(posedge clk) begin
    if (i_valid && i_odd) begin
      pair_q  <= pair_a;
      rplan_q <= rplan;
    end
    xbank <= rplan_q.bank;
    xcyc  <= rplan_q.cyc;
  end

  always_comb begin
    rd_en = (i_valid && i_odd) || r2_pend;
    for (int b = 0; b < 8; b++)
      rd_addr[b] = r2_pend ? pair_q[rplan_q.sel[1][b]][AW-1:3]
                           : pair_a[rplan.sel[0][b]][AW-1:3];
  end

  // first-clock data, then assembly in slot order
  data_t rd1 [8];
  data_t odd_x [8];
  logic  r1_got, x_even, x_odd;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      r1_got <= 1'b0;
      x_even <= 1'b0;
      x_odd  <= 1'b0;
    end else begin
      r1_got <= i_valid && i_odd;
      x_even <= r1_got;
      x_odd  <= x_even;
    end
  always_ff @(posedge clk) begin
    if (r1_got) rd1 <= rd_data;
    if (x_even)
      for (int s = 0; s < 8; s++)
        odd_x[s] <= xcyc[s + 8] ? rd_data[xbank[s + 8]] : rd1[xbank[s + 8]];
  end
  always_comb
    for (int s = 0; s < 8; s++)
      x[s] = x_odd ? odd_x[s] : (xcyc[s] ? rd_data[xbank[s]] : rd1[xbank[s]]);

  // ------------------------------------------------------------ write side
  addr_t wa [WDLY][16];
  always_ff @(posedge clk) begin
    wa[0] <= pair_q;
    for (int d = 1; d < WDLY; d++) wa[d] <= wa[d-1];
  end

  data_t y_even [8];
  data_t ys [16];
  data_t w2_data [8];
  logic [BW-1:0] w2_addr [8];
  logic  y_phase, w2_pend;
  logic [1:0][7:0][3:0] wsel;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      y_phase <= 1'b0;
      w2_pend <= 1'b0;
    end else begin
      if (y_valid) y_phase <= ~y_phase;
      w2_pend <= y_valid && y_phase;
    end

  always_ff @(posedge clk)
    if (y_valid && !y_phase) y_even <= y;

  always_comb begin
    for (int s = 0; s < 8; s++) begin
      ys[s]     = y_even[s];
      ys[s + 8] = y[s];
    end
    wsel = make_plan(wa[WDLY-1]).sel;
  end

  always_ff @(posedge clk)
    if (y_valid && y_phase)
      for (int b = 0; b < 8; b++) begin
        w2_data[b] <= ys[wsel[1][b]];
        w2_addr[b] <= wa[WDLY-1][wsel[1][b]][AW-1:3];
      end

  always_comb begin
    wr_en = (y_valid && y_phase) || w2_pend;
    for (int b = 0; b < 8; b++) begin
      wr_data[b] = w2_pend ? w2_data[b] : ys[wsel[0][b]];
      wr_addr[b] = w2_pend ? w2_addr[b] : wa[WDLY-1][wsel[0][b]][AW-1:3];
    end
  end
endmodule

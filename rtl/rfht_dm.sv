// rfht_dm: double-buffered data memory of one processing element, 2N words
// held in two halves of eight dual-port banks (dm_bank) of N/8 words each.
//
// Data address p lives in bank dm_bank(p) (see rfht_pkg) at word p >> 3.
// At any time one half may be processed while the other is loaded (one
// write per clock) or unloaded (one read per clock):
//   processing port: per bank one read and one write per clock, addressed
//     with bank-local word addresses (dm_pair_router plans them so that two
//     double butterflies are read, and later written, over two clocks);
//     p_rd_en/p_half steer the read ports, p_wr_en/p_wr_half the writes.
//   load port: full address ld_addr, written into its bank.
//   unload port: full address o_addr, read from its bank.
// Each bank's read port serves the processing or the unload traffic and its
// write port the processing or the load traffic; the processing port has
// priority (the controller never lets them meet in one half).
//
// The split into eight dual-port banks per half, the two-clock pairing of
// double butterflies and the cyclic use of consecutive banks by
// consecutive samples (every aligned group of eight addresses covers all
// banks) follow the document; the bank function itself is this design's.
//
// Timing: reads return data one clock after the address.
module rfht_dm
  import rfht_pkg::*;
#(
  parameter int N = 1 << 20
)(
  input  logic                 clk,
  // processing port (bank order, bank-local word addresses)
  input  logic                 p_rd_en,
  input  logic                 p_half,
  input  logic [$clog2(N)-4:0] p_rd_addr [8],
  output data_t                p_rd_data [8],
  input  logic                 p_wr_en,
  input  logic                 p_wr_half,
  input  logic [$clog2(N)-4:0] p_wr_addr [8],
  input  data_t                p_wr_data [8],
  // load port (one sample per clock)
  input  logic                 ld_en,
  input  logic                 ld_half,
  input  logic [$clog2(N)-1:0] ld_addr,
  input  data_t                ld_data,
  // unload port (one sample per clock)
  input  logic                 o_half,
  input  logic [$clog2(N)-1:0] o_addr,
  output data_t                o_data
);
  localparam int AW = $clog2(N);
  localparam int BW = AW - 3;

  logic [BW-1:0] rd_addr [2][8];
  data_t         rd_data [2][8];
  logic          wr_en   [2][8];
  logic [BW-1:0] wr_addr [2][8];
  data_t         wr_data [2][8];
  logic [2:0]    ld_bank, o_bank, o_bank_q;
  logic          p_half_q, o_half_q;

  assign ld_bank = dm_bank(32'(ld_addr), AW / 2);
  assign o_bank  = dm_bank(32'(o_addr), AW / 2);

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      for (int b = 0; b < 8; b++) begin
        if (p_rd_en && p_half == 1'(h)) rd_addr[h][b] = p_rd_addr[b];
        else                            rd_addr[h][b] = o_addr[AW-1:3];
        if (p_wr_en && p_wr_half == 1'(h)) begin
          wr_en[h][b]   = 1'b1;
          wr_addr[h][b] = p_wr_addr[b];
          wr_data[h][b] = p_wr_data[b];
        end else begin
          wr_en[h][b]   = ld_en && ld_half == 1'(h) && ld_bank == 3'(b);
          wr_addr[h][b] = ld_addr[AW-1:3];
          wr_data[h][b] = ld_data;
        end
      end
    end
  end

  for (genvar h = 0; h < 2; h++) begin : g_half
    for (genvar b = 0; b < 8; b++) begin : g_bank
      dm_bank #(.DEPTH(N / 8)) u_bank (
        .clk,
        .rd_addr (rd_addr[h][b]),
        .rd_data (rd_data[h][b]),
        .wr_en   (wr_en[h][b]),
        .wr_addr (wr_addr[h][b]),
        .wr_data (wr_data[h][b])
      );
    end
  end

  always_ff @(posedge clk) begin
    p_half_q <= p_half;
    o_half_q <= o_half;
    o_bank_q <= o_bank;
  end

  always_comb begin
    for (int b = 0; b < 8; b++) p_rd_data[b] = rd_data[p_half_q][b];
    o_data = rd_data[o_half_q][o_bank_q];
  end
endmodule

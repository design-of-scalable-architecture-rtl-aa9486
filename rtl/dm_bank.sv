// dm_bank: one memory bank of the data memory: DEPTH words of DATA_W bits,
// simple dual-port (one write port and one synchronous read port, usable in
// the same clock), as an FPGA block RAM provides. Read data appears one
// clock after the address; a read of the word being written returns the
// old value. Dual-port banks follow the document; the rest is generic.
module dm_bank
  import rfht_pkg::*;
#(
  parameter int DEPTH = 1 << 17
)(
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output data_t                    rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  data_t                    wr_data
);
  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule

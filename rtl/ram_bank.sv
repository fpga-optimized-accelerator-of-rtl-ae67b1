// ram_bank: one RAM group (RAM GA or RAM GB), L single-channel RAMs of DEPTH
// 6-bit words. Channel c of a feature map with more than L channels lives in
// RAM c mod L at offset (c / L) * (map size). All RAMs share one read address
// (the INPUT CU reads the same position of every channel) and one write
// address with a write enable per RAM. Synchronous read, latency 1 clock.
// Contents start at zero so that unused FC inputs read as zero.
module ram_bank
  import dcnn_pkg::*;
#(
  parameter int L     = LANES,
  parameter int DEPTH = 50176,
  parameter int AW    = 16
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output sm_t           rd_data[L],
  input  logic          wr_en[L],
  input  logic [AW-1:0] wr_addr,
  input  sm_t           wr_data[L]
);
  sm_t mem[L][DEPTH];

  initial mem = '{default: '0};

  always_ff @(posedge clk) begin
    for (int c = 0; c < L; c++) begin
      if (wr_en[c]) mem[c][wr_addr] <= wr_data[c];
      if (rd_en)    rd_data[c] <= mem[c][rd_addr];
    end
  end
endmodule

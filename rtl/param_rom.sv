// param_rom: ROM of the invariant per-output-channel parameters: the bias and
// the 31 ascending thresholds d1..d31 of the Q/A unit (word 0 = bias,
// words 1..31 = d1..d31, each ACC_W bits). Read-only during inference; the
// host fills it through the load port beforehand. Synchronous read, latency 1.
// Depth default: 13416 = the output channels/neurons of VGG16 on ImageNet.
module param_rom
  import dcnn_pkg::*;
#(
  parameter int DEPTH = 13416,
  parameter int AW    = 14
) (
  input  logic          clk,
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  logic [4:0]    ld_word,
  input  acc_t          ld_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output acc_t          rd_bias,
  output acc_t          rd_thr[NTHR]
);
  acc_t mem[DEPTH][NTHR+1];

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr][ld_word] <= ld_data;
    if (rd_en) begin
      rd_bias <= mem[rd_addr][0];
      for (int i = 0; i < NTHR; i++) rd_thr[i] <= mem[rd_addr][i+1];
    end
  end
endmodule

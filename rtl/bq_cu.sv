// bq_cu: B_Q CU, fetches the bias and quantisation thresholds of the four
// kernels of a pass from the ROM into registers that feed the OUTPUT CU.
// A start pulse with the ROM address of kernel 4j reads four consecutive ROM
// entries, one per clock; 'ready' rises one clock after the last read.
module bq_cu
  import dcnn_pkg::*;
#(
  parameter int AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  output logic          ready,
  // ROM read port
  output logic          rom_rd_en,
  output logic [AW-1:0] rom_rd_addr,
  input  acc_t          rom_bias,
  input  acc_t          rom_thr[NTHR],
  // to OUTPUT CU
  output acc_t          bias[NK],
  output acc_t          thr [NK][NTHR]
);
  logic [2:0]    issue;     // reads issued
  logic          land_v;
  logic [1:0]    land_k;
  logic          busy;

  assign rom_rd_en   = busy && (issue < 3'(NK));
  assign rom_rd_addr = base + AW'(issue);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issue <= '0; land_v <= 1'b0; land_k <= '0; busy <= 1'b0; ready <= 1'b0;
      bias <= '{default: '0}; thr <= '{default: '0};
    end else begin
      land_v <= rom_rd_en;
      land_k <= issue[1:0];
      if (start) begin
        busy <= 1'b1; issue <= '0; ready <= 1'b0;
      end else if (rom_rd_en) begin
        issue <= issue + 3'd1;
      end
      if (land_v) begin
        bias[land_k] <= rom_bias;
        thr[land_k]  <= rom_thr;
        if (land_k == 2'(NK - 1)) begin
          ready <= 1'b1;
          busy  <= 1'b0;
        end
      end
    end
  end
endmodule

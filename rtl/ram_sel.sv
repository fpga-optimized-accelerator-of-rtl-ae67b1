// ram_sel: RAM SEL, ping-pong use of the two RAM groups plus the write-back
// address generator.
// For layer parity 0 the INPUT CU reads group A and results are written to
// group B; parity 1 swaps them. Results of kernel group j (output channels
// 4j..4j+3) go to RAMs (4j+m) mod L at offset (4j / L) * (output map size):
//   - convolution with pooling: the pooled outputs arrive in row-major order,
//     so the address is the output count;
//   - convolution without pooling: the outputs arrive in circular-window order
//     (per 2x2 block: (0,0), (1,0), (1,1), (0,1)); the address is rebuilt from
//     block counters as row * n + col;
//   - FC: output neuron 4j+m is one word at offset (4j / L).
// A host port writes and reads either group while the accelerator is idle
// (host reads have latency 1 and use the read port of the chosen group).
// The exact mapping of channels and neurons to RAMs is this design's choice.
module ram_sel
  import dcnn_pkg::*;
#(
  parameter int L     = LANES,
  parameter int DEPTH = 50176,
  parameter int AW    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          parity,
  // INPUT CU read port
  input  logic          ic_rd_en,
  input  logic [AW-1:0] ic_rd_addr,
  output sm_t           ic_rd_data[L],
  // OUTPUT CU write-back
  input  logic          clear,           // start of pass: reset counters
  input  logic          conv_mode,
  input  logic          pool_en,
  input  logic [15:0]   n,               // conv output size before pooling
  input  logic [15:0]   kgroup,          // j
  input  logic          wb_valid,
  input  logic [QW-1:0] wb_data[NK],
  // host port
  input  logic          host_wr_en,
  input  logic          host_group,
  input  logic [$clog2(L)-1:0] host_lane,
  input  logic [AW-1:0] host_addr,
  input  sm_t           host_wr_data,
  input  logic          host_rd_en,
  output sm_t           host_rd_data
);
  localparam int LW = $clog2(L);

  logic          rd_en [2];
  logic [AW-1:0] rd_addr[2];
  sm_t           rd_data[2][L];
  logic          wr_en [2][L];
  logic [AW-1:0] wr_addr[2];
  sm_t           wr_data[2][L];

  // write-back address generation
  logic [15:0] st_cnt, g_cnt, rp_cnt;
  logic [31:0] q_cnt;
  logic [31:0] out_pix, base_off, wb_addr32;
  logic [15:0] ch0;
  logic        wb_row, wb_col;
  logic        host_sel_q;

  assign ch0      = kgroup * 16'(NK);
  assign out_pix  = pool_en ? 32'(n >> 1) * 32'(n >> 1) : 32'(n) * 32'(n);
  assign base_off = 32'(ch0 >> LW) * (conv_mode ? out_pix : 32'd1);
  assign wb_row   = (st_cnt == 16'd1) || (st_cnt == 16'd2);
  assign wb_col   = (st_cnt >= 16'd2);

  always_comb begin
    if (!conv_mode)   wb_addr32 = base_off;
    else if (pool_en) wb_addr32 = base_off + q_cnt;
    else              wb_addr32 = base_off + 32'(2 * rp_cnt + 16'(wb_row)) * 32'(n)
                                           + 32'(2 * g_cnt + 16'(wb_col));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_cnt <= '0; g_cnt <= '0; rp_cnt <= '0; q_cnt <= '0; host_sel_q <= 1'b0;
    end else begin
      host_sel_q <= host_group;
      if (clear) begin
        st_cnt <= '0; g_cnt <= '0; rp_cnt <= '0; q_cnt <= '0;
      end else if (wb_valid) begin
        q_cnt <= q_cnt + 1;
        if (st_cnt == 16'd3) begin
          st_cnt <= '0;
          if (g_cnt == (n >> 1) - 1) begin
            g_cnt <= '0; rp_cnt <= rp_cnt + 1;
          end else g_cnt <= g_cnt + 1;
        end else st_cnt <= st_cnt + 1;
      end
    end
  end

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      rd_en[b]   = 1'b0;
      rd_addr[b] = ic_rd_addr;
      wr_addr[b] = AW'(wb_addr32);
      for (int c = 0; c < L; c++) begin
        wr_en[b][c]   = 1'b0;
        wr_data[b][c] = '0;
      end
    end
    // accelerator traffic
    rd_en[parity] = ic_rd_en;
    for (int m = 0; m < NK; m++) begin
      wr_en  [!parity][LW'(ch0) + LW'(m)] = wb_valid;
      wr_data[!parity][LW'(ch0) + LW'(m)] = sm_t'({1'b0, wb_data[m]});
    end
    // host traffic
    if (host_rd_en) begin
      rd_en[host_group]   = 1'b1;
      rd_addr[host_group] = host_addr;
    end
    if (host_wr_en) begin
      wr_addr[host_group] = host_addr;
      wr_en[host_group][host_lane]   = 1'b1;
      wr_data[host_group][host_lane] = host_wr_data;
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    ram_bank #(.L(L), .DEPTH(DEPTH), .AW(AW)) u_bank (
      .clk, .rd_en(rd_en[b]), .rd_addr(rd_addr[b]), .rd_data(rd_data[b]),
      .wr_en(wr_en[b]), .wr_addr(wr_addr[b]), .wr_data(wr_data[b]));
  end

  assign ic_rd_data   = rd_data[parity];
  assign host_rd_data = rd_data[host_sel_q][host_lane];
endmodule

// dcnn_top: the DCNN accelerator - memory cell, control unit and PE array.
//
// Dataflow of one pass: TOP CU picks layer / kernel group / channel group;
// B_Q CU loads bias and thresholds of four kernels from the ROM; WEIGHT CU
// has the pass's weights ready in its ping-pong bank (filled from the four
// clock-crossing weight FIFOs); INPUT CU reads the active RAM group through
// RAM SEL in circular-sliding-window order and sends two beats per window to
// the PE array (64 PE3 + 64 PE2 + 32 PE2, 1152 multiplies per clock built
// from 448 shared multipliers); OUTPUT CU sums, accumulates (using its FIFOs
// for partial sums across channel groups), quantises/activates, pools, and
// writes four output channels at a time back through RAM SEL into the other
// RAM group. The last FC layer also drives SOFTMAX, whose label is output.
//
// The DDR4 memory holding the weights is outside: its side of the weight
// FIFOs (ddr_clk domain) is brought out as ports, one 64-weight word per
// kernel FIFO. Host ports load the layer table, the ROM and the input image
// and read back results; they are used while the accelerator is idle.
module dcnn_top
  import dcnn_pkg::*;
#(
  parameter int L          = LANES,
  parameter int RAM_DEPTH  = 50176,
  parameter int RAM_AW     = 16,
  parameter int ROM_DEPTH  = 13416,
  parameter int ROM_AW     = 14,
  parameter int PSUM_DEPTH = 50176,
  parameter int WF_AW      = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // DDR4 side of the weight FIFOs
  input  logic              ddr_clk,
  input  logic              ddr_rst_n,
  input  logic              w_wr_en,
  input  logic [L*DW-1:0]   w_wr_data[NK],
  output logic              w_full[NK],
  // host: layer table, ROM, RAM groups
  input  logic              lt_we,
  input  logic [3:0]        lt_addr,
  input  layer_t            lt_data,
  input  logic              rom_ld_en,
  input  logic [ROM_AW-1:0] rom_ld_addr,
  input  logic [4:0]        rom_ld_word,
  input  acc_t              rom_ld_data,
  input  logic              host_wr_en,
  input  logic              host_rd_en,
  input  logic              host_group,
  input  logic [$clog2(L)-1:0] host_lane,
  input  logic [RAM_AW-1:0] host_addr,
  input  sm_t               host_wr_data,
  output sm_t               host_rd_data,
  // run control and result
  input  logic              start,
  input  logic [4:0]        layer_num,
  output logic              busy,
  output logic              done,
  output logic              label_valid,
  output logic [15:0]       label
);
  // ---- TOP CU -----------------------------------------------------------
  layer_t              cur;
  logic                parity, bq_start, bq_ready, ic_start, ic_done;
  logic                oc_clear, use_fifo, to_fifo, sm_en, sm_clear;
  logic [15:0]         kgroup;
  logic [ROM_AW-1:0]   bq_base;
  logic [RAM_AW-1:0]   ic_base;

  top_cu #(.AW(RAM_AW), .ROM_AW(ROM_AW)) u_top_cu (
    .clk, .rst_n, .lt_we, .lt_addr, .lt_data, .start, .layer_num, .busy, .done,
    .cur, .parity, .kgroup, .bq_start, .bq_base, .bq_ready, .ic_start, .ic_base, .ic_done,
    .oc_clear, .use_fifo, .to_fifo, .sm_en, .sm_clear);

  // ---- ROM and B_Q CU ---------------------------------------------------
  logic              rom_rd_en;
  logic [ROM_AW-1:0] rom_rd_addr;
  acc_t              rom_bias;
  acc_t              rom_thr[NTHR];
  acc_t              bias[NK];
  acc_t              thr[NK][NTHR];

  param_rom #(.DEPTH(ROM_DEPTH), .AW(ROM_AW)) u_rom (
    .clk, .ld_en(rom_ld_en), .ld_addr(rom_ld_addr), .ld_word(rom_ld_word), .ld_data(rom_ld_data),
    .rd_en(rom_rd_en), .rd_addr(rom_rd_addr), .rd_bias(rom_bias), .rd_thr(rom_thr));

  bq_cu #(.AW(ROM_AW)) u_bq_cu (
    .clk, .rst_n, .start(bq_start), .base(bq_base), .ready(bq_ready),
    .rom_rd_en, .rom_rd_addr, .rom_bias, .rom_thr, .bias, .thr);

  // ---- weight FIFOs and WEIGHT CU -----------------------------------------
  logic [L*DW-1:0] wf_data[NK];
  logic            wf_empty[NK];
  logic            wf_rd, w_ready, w_take;
  sm_t             wt[NK][L][NSLOT];
  beat_t           ic_beat;

  for (genvar k = 0; k < NK; k++) begin : g_wfifo
    async_fifo #(.W(L*DW), .AW(WF_AW)) u_wfifo (
      .wclk(ddr_clk), .wrst_n(ddr_rst_n), .winc(w_wr_en), .wdata(w_wr_data[k]), .wfull(w_full[k]),
      .rclk(clk), .rrst_n(rst_n), .rinc(wf_rd), .rdata(wf_data[k]), .rempty(wf_empty[k]));
  end

  weight_cu #(.L(L)) u_weight_cu (
    .clk, .rst_n, .fifo_data(wf_data), .fifo_empty(wf_empty), .fifo_rd(wf_rd),
    .ready(w_ready), .take(w_take), .conv_mode(cur.conv), .phase(ic_beat.phase), .wt);

  // ---- RAM group, RAM SEL, INPUT CU -----------------------------------------
  logic              ic_rd_en;
  logic [RAM_AW-1:0] ic_rd_addr;
  sm_t               ic_rd_data[L];
  sm_t               act[L][NSLOT];
  logic              ic_busy;
  logic              wb_valid;
  logic [QW-1:0]     wb_data[NK];

  ram_sel #(.L(L), .DEPTH(RAM_DEPTH), .AW(RAM_AW)) u_ram_sel (
    .clk, .rst_n, .parity, .ic_rd_en, .ic_rd_addr, .ic_rd_data,
    .clear(oc_clear), .conv_mode(cur.conv), .pool_en(cur.pool), .n(cur.n), .kgroup,
    .wb_valid, .wb_data,
    .host_wr_en, .host_group, .host_lane, .host_addr, .host_wr_data, .host_rd_en, .host_rd_data);

  input_cu #(.L(L), .AW(RAM_AW)) u_input_cu (
    .clk, .rst_n, .start(ic_start), .conv_mode(cur.conv), .n(cur.n), .base(ic_base),
    .fc_steps(cur.fc_steps), .busy(ic_busy), .done(ic_done),
    .rd_en(ic_rd_en), .rd_addr(ic_rd_addr), .rd_data(ic_rd_data),
    .w_ready, .w_take, .beat(ic_beat), .act);

  // ---- PE array -------------------------------------------------------------
  beat_t pe_beat;
  prod_t fc_prod[NK][L][4];
  prod_t only_prod[2][L];

  pe_array #(.L(L)) u_pe_array (
    .clk, .conv_mode(cur.conv), .beat_in(ic_beat), .act, .wt,
    .beat_out(pe_beat), .fc_prod, .only_prod);

  // ---- OUTPUT CU ------------------------------------------------------------
  logic [QW-1:0] label_max;

  output_cu #(.L(L), .FIFO_DEPTH(PSUM_DEPTH)) u_output_cu (
    .clk, .rst_n, .clear(oc_clear), .conv_mode(cur.conv), .pool_en(cur.pool),
    .use_fifo, .to_fifo, .sm_en, .sm_clear, .sm_groups(cur.kgroups), .sm_nvalid(cur.nvalid),
    .beat(pe_beat), .fc_prod, .only_prod, .bias, .thr,
    .out_valid(wb_valid), .out_data(wb_data), .label_valid, .label, .label_max);
endmodule

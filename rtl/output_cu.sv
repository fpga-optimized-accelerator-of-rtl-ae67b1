// output_cu: OUTPUT CU, four COV_FC_OUT units (one per kernel of the pass),
// one COV_ONLY_OUT unit and the four partial-sum FIFOs.
// All four kernel paths run in lockstep, so one valid flag covers the four
// results. Control levels (conv_mode, pool_en, use_fifo, to_fifo) are held
// constant for a whole pass by TOP CU; 'clear' is pulsed at pass start.
module output_cu
  import dcnn_pkg::*;
#(
  parameter int L          = LANES,
  parameter int FIFO_DEPTH = 50176
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          conv_mode,
  input  logic          pool_en,
  input  logic          use_fifo,
  input  logic          to_fifo,
  input  logic          sm_en,           // last layer: feed SOFTMAX
  input  logic          sm_clear,
  input  logic [15:0]   sm_groups,
  input  logic [15:0]   sm_nvalid,
  input  beat_t         beat,
  input  prod_t         fc_prod  [NK][L][4],
  input  prod_t         only_prod[2][L],
  input  acc_t          bias[NK],
  input  acc_t          thr [NK][NTHR],
  output logic          out_valid,
  output logic [QW-1:0] out_data[NK],
  output logic          label_valid,
  output logic [15:0]   label,
  output logic [QW-1:0] label_max
);
  acc_t          side[NK];
  acc_t          fifo_dout[NK];
  logic          fifo_pop[NK];
  logic          fifo_push[NK];
  acc_t          fifo_din[NK];
  logic          qa_v[NK];
  logic [QW-1:0] qa_d[NK];
  logic          o_v[NK];

  cov_only_out #(.L(L)) u_only (
    .clk, .rst_n, .clear(sm_clear), .conv_mode, .use_fifo, .beat, .only_prod,
    .bias, .fifo_dout, .fifo_pop, .side,
    .sm_valid(sm_en && qa_v[0]), .sm_data(qa_d), .sm_groups, .sm_nvalid,
    .label_valid, .label, .label_max);

  for (genvar k = 0; k < NK; k++) begin : g_k
    prod_t p[L*4];
    logic  f_empty, f_full;
    always_comb for (int c = 0; c < L; c++) for (int j = 0; j < 4; j++) p[c*4+j] = fc_prod[k][c][j];

    cov_fc_out #(.L(L)) u_cfo (
      .clk, .rst_n, .clear, .beat, .prod(p), .side(side[k]), .to_fifo, .pool_en,
      .thr(thr[k]), .fifo_push(fifo_push[k]), .fifo_data(fifo_din[k]),
      .qa_valid(qa_v[k]), .qa_data(qa_d[k]), .out_valid(o_v[k]), .out_data(out_data[k]));

    sync_fifo #(.W(ACC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clear(1'b0), .push(fifo_push[k]), .din(fifo_din[k]),
      .pop(fifo_pop[k]), .dout(fifo_dout[k]), .empty(f_empty), .full(f_full));
  end

  assign out_valid = o_v[0];
endmodule

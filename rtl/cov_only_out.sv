// cov_only_out: COV_ONLY_OUT, the path used by convolution only, plus SOFTMAX.
// Two 64-input addition trees sum the position-0 products of PE row 3 for the
// two kernels handled in the current beat (kernels 0,1 in phase 0 and 2,3 in
// phase 1). On the first beat of an output value the bias (first group of
// input channels, or any FC step 0) or the partial sum popped from the FIFO
// (later channel groups) is added. The resulting side value per kernel goes
// to the accumulator of the matching COV_FC_OUT in the same clock, so the
// accumulation register is shared with COV_FC_OUT. In FC mode row 3 is idle
// and only the bias is added. The source names a single 64-input tree; two
// trees are used here because row 3 delivers two kernels' products per clock.
// The SOFTMAX unit takes the four Q/A results of the last layer.
module cov_only_out
  import dcnn_pkg::*;
#(
  parameter int L = LANES
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          conv_mode,
  input  logic          use_fifo,
  input  beat_t         beat,
  input  prod_t         only_prod[2][L],
  input  acc_t          bias[NK],
  input  acc_t          fifo_dout[NK],
  output logic          fifo_pop[NK],
  output acc_t          side[NK],
  // SOFTMAX
  input  logic          sm_valid,
  input  logic [QW-1:0] sm_data[NK],
  input  logic [15:0]   sm_groups,
  input  logic [15:0]   sm_nvalid,
  output logic          label_valid,
  output logic [15:0]   label,
  output logic [QW-1:0] label_max
);
  acc_t tsum[2];

  for (genvar s = 0; s < 2; s++) begin : g_tree
    add_tree #(.N(L), .IW(SPW), .OW(ACC_W)) u_tree (.din(only_prod[s]), .sum(tsum[s]));
  end

  always_comb begin
    for (int k = 0; k < NK; k++) begin
      side[k] = '0;
      if (beat.valid && conv_mode && (beat.phase == k[1])) side[k] = tsum[k % 2];
      fifo_pop[k] = beat.valid && beat.first && use_fifo;
      if (beat.valid && beat.first) side[k] = side[k] + (use_fifo ? fifo_dout[k] : bias[k]);
    end
  end

  softmax_unit #(.LBW(16)) u_softmax (
    .clk, .rst_n, .clear, .in_valid(sm_valid), .din(sm_data),
    .n_groups(sm_groups), .n_valid(sm_nvalid),
    .label_valid, .label, .data_max(label_max));
endmodule

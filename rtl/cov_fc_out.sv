// cov_fc_out: COV_FC_OUT, result path of one kernel (conv) or one output
// neuron (FC).
// A 256-input addition tree sums the L x 4 products of PE rows 1/2 for this
// kernel; the accumulator adds the tree sum and the side input from
// COV_ONLY_OUT (position-0 products, bias or earlier partial sum) and starts
// afresh on a beat marked 'first'. One clock after a beat marked 'last' the
// value is complete and goes either to the partial-sum FIFO (more input
// channel groups follow: to_fifo) or through the Q/A unit, and then either
// through the pooling unit (pool_en) or straight out. The Q/A result is also
// offered to the SOFTMAX unit. Latency from the last beat: 1 clock to the
// FIFO, 2 clocks to the Q/A output, 3 clocks to the pooled output.
module cov_fc_out
  import dcnn_pkg::*;
#(
  parameter int L = LANES
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,          // start of a pass
  input  beat_t         beat,
  input  prod_t         prod[L*4],
  input  acc_t          side,
  input  logic          to_fifo,
  input  logic          pool_en,
  input  acc_t          thr[NTHR],
  output logic          fifo_push,
  output acc_t          fifo_data,
  output logic          qa_valid,
  output logic [QW-1:0] qa_data,
  output logic          out_valid,
  output logic [QW-1:0] out_data
);
  acc_t tree_sum;
  acc_t acc;
  logic done_r;
  logic pool_v;
  logic [QW-1:0] pool_d;

  add_tree #(.N(L*4), .IW(SPW), .OW(ACC_W)) u_tree (.din(prod), .sum(tree_sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      done_r <= 1'b0;
    end else begin
      done_r <= beat.valid && beat.last;
      if (beat.valid) acc <= (beat.first ? acc_t'(0) : acc) + tree_sum + side;
    end
  end

  assign fifo_push = done_r && to_fifo;
  assign fifo_data = acc;

  qa_unit u_qa (.clk, .rst_n, .in_valid(done_r && !to_fifo), .a(acc), .thr,
                .out_valid(qa_valid), .b(qa_data));

  pool_unit u_pool (.clk, .rst_n, .clear, .in_valid(qa_valid && pool_en), .din(qa_data),
                    .out_valid(pool_v), .dout(pool_d));

  assign out_valid = pool_en ? pool_v : qa_valid;
  assign out_data  = pool_en ? pool_d : qa_data;
endmodule

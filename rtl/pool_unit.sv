// pool_unit: 2x2 max pooling with a single comparator.
// The circular sliding window delivers the four outputs of one 2x2 pooling
// window in four consecutive results, so no line buffer is needed: the
// comparator compares each new value with the running maximum fed back from
// its output, and the feedback is replaced by 0 at the first value of every
// group of four (values are non-negative after ReLU). After the fourth value
// the maximum is output (registered). 'clear' restarts the group count.
module pool_unit
  import dcnn_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic [QW-1:0] din,
  output logic          out_valid,
  output logic [QW-1:0] dout
);
  logic [1:0]    cnt;
  logic [QW-1:0] max_r, fb, m;

  always_comb begin
    fb = (cnt == 2'd0) ? '0 : max_r;
    m  = (din > fb) ? din : fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; max_r <= '0; out_valid <= 1'b0; dout <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        cnt <= '0;
      end else if (in_valid) begin
        max_r <= m;
        cnt   <= cnt + 2'd1;
        if (cnt == 2'd3) begin
          out_valid <= 1'b1;
          dout      <= m;
        end
      end
    end
  end
endmodule

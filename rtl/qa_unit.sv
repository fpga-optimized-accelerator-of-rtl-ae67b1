// qa_unit: fused quantisation and ReLU activation (Q/A unit).
// Instead of multiplying the accumulated value by a floating-point scale and
// clipping, the result is found by a range judge: the input a is compared
// with the 31 thresholds d1..d31 of the current output channel, giving a
// 31-bit thermometer code, and a 32-way selector returns the index b of the
// interval that holds a (b = 0 for a <= d1, b = i for d_i < a <= d_(i+1),
// b = 31 for a > d31). Thresholds must be ascending; they come from the ROM
// through B_Q CU. Output: 5-bit unsigned, registered (latency 1).
module qa_unit
  import dcnn_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  acc_t         a,
  input  acc_t         thr[NTHR],       // d1..d31
  output logic         out_valid,
  output logic [QW-1:0] b
);
  logic [NTHR-1:0] above;   // range judge: above[i] = a > d(i+1)
  logic [QW-1:0]   sel;     // 32-channel selector output

  always_comb begin
    for (int i = 0; i < NTHR; i++) above[i] = (a > thr[i]);
    sel = '0;
    for (int i = 0; i < NTHR; i++) if (above[i]) sel = QW'(i + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      b         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) b <= sel;
    end
  end
endmodule

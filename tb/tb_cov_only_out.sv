// tb_cov_only_out: checks the side values sent to the four accumulators
// (position-0 tree sums of the kernel pair of the current phase, plus bias or
// FIFO partial sum on the first beat), the FIFO pop requests, and the
// SOFTMAX label path.
module tb_cov_only_out;
  import dcnn_pkg::*;
  localparam int L = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, conv_mode = 1, use_fifo = 0;
  beat_t beat; prod_t only_prod[2][L]; acc_t bias[NK], fifo_dout[NK], side[NK];
  logic fifo_pop[NK];
  logic sm_valid = 0, label_valid; logic [QW-1:0] sm_data[NK], label_max;
  logic [15:0] sm_groups = 3, sm_nvalid = 10, label;
  cov_only_out #(.L(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    sm_data = '{default: '0};
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int ts[2];
      conv_mode = 1'($urandom); use_fifo = 1'($urandom);
      beat = beat_t'($urandom); beat.valid = 1'($urandom_range(0, 3) != 0);
      ts = '{0, 0};
      for (int s = 0; s < 2; s++) for (int c = 0; c < L; c++) begin
        only_prod[s][c] = prod_t'($urandom_range(0, 1922) - 961); ts[s] += int'(only_prod[s][c]);
      end
      for (int k = 0; k < NK; k++) begin bias[k] = acc_t'($urandom_range(0, 999)); fifo_dout[k] = acc_t'($urandom_range(0, 99999) - 50000); end
      #1;
      for (int k = 0; k < NK; k++) begin
        int exp;
        exp = 0;
        if (beat.valid && conv_mode && int'(beat.phase) == k / 2) exp += ts[k % 2];
        if (beat.valid && beat.first) exp += use_fifo ? int'(fifo_dout[k]) : int'(bias[k]);
        checks += 2;
        if (int'(side[k]) != exp) begin failures++; if (failures < 5) $display("FAIL side k=%0d %0d vs %0d", k, side[k], exp); end
        if (fifo_pop[k] != (beat.valid && beat.first && use_fifo)) failures++;
      end
      @(negedge clk);
    end
    // SOFTMAX: three groups, ten valid outputs, maximum at index 6
    beat = '0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int g = 0; g < 3; g++) begin
      for (int i = 0; i < 4; i++) sm_data[i] = (g * 4 + i == 6) ? 5'd20 : ((g * 4 + i >= 10) ? 5'd31 : 5'd3);
      sm_valid = 1; @(negedge clk); sm_valid = 0;
    end
    repeat (3) begin
      if (!label_valid) @(negedge clk);
    end
    checks++;
    if (!label_valid || label != 6 || label_max != 20) begin failures++; $display("FAIL label %0d", label); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

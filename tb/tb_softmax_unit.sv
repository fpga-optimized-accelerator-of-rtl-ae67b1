// tb_softmax_unit: several rounds of n_groups groups of four 5-bit results;
// the label must be the index of the first largest value among the n_valid
// real outputs, valid three clocks after the last group.
module tb_softmax_unit;
  import dcnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, label_valid;
  logic [QW-1:0] din[4]; logic [15:0] n_groups, n_valid, label; logic [QW-1:0] data_max;
  softmax_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    din = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      int best, bestv, lat;
      n_groups = 16'($urandom_range(1, 6));
      n_valid  = 16'(n_groups * 4 - $urandom_range(0, 3));
      clear = 1; @(posedge clk); #1; clear = 0;
      best = -1; bestv = -1;
      for (int g = 0; g < n_groups; g++) begin
        for (int i = 0; i < 4; i++) begin
          din[i] = QW'($urandom_range(0, (r % 2) ? 31 : 3));
          if (g*4+i < n_valid && int'(din[i]) > bestv) begin bestv = din[i]; best = g*4+i; end
        end
        in_valid = 1; @(posedge clk); #1; in_valid = 0;
        if (g < n_groups - 1 && $urandom_range(0,1) == 1) begin @(posedge clk); #1; end
      end
      lat = 1;
      while (!label_valid && lat < 10) begin @(posedge clk); #1; lat++; end
      checks += 2;
      if (!label_valid || int'(label) != best || int'(data_max) != bestv) begin
        failures++; if (failures < 5) $display("FAIL r=%0d label=%0d exp=%0d", r, label, best);
      end
      // three clocks: two comparator levels then the MAX TEMP comparison
      if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sync_fifo: random push/pop traffic compared with a queue model, filling
// the FIFO to full and draining it to empty.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0, empty, full;
  logic [23:0] din, dout;
  logic [23:0] q[$];
  sync_fifo #(.W(24), .DEPTH(12)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int t = 0; t < 3000; t++) begin
      int bias;
      bias = (t % 600 < 300) ? 70 : 30;     // alternate filling and draining
      push = ($urandom_range(0, 99) < bias) && (q.size() < 12);
      pop  = ($urandom_range(0, 99) < 100 - bias) && (q.size() > 0);
      din  = 24'($urandom);
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 12)) failures++;
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin failures++; if (failures < 5) $display("FAIL data"); end
      end
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

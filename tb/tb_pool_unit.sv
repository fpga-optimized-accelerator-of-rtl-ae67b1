// tb_pool_unit: random groups of four values, with and without idle clocks
// between them; the maximum of each group must appear one clock after its
// fourth value, and nothing in between.
module tb_pool_unit;
  import dcnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  logic [QW-1:0] din, dout;
  pool_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    clear = 1; @(posedge clk); #1; clear = 0;
    for (int g = 0; g < 500; g++) begin
      logic [QW-1:0] mx;
      mx = 0;
      for (int i = 0; i < 4; i++) begin
        din = (g % 7 == 0) ? QW'(0) : QW'($urandom);
        if (din > mx) mx = din;
        in_valid = 1;
        @(posedge clk); #1;
        in_valid = 0;
        checks++;
        if (i < 3 && out_valid) failures++;
        if (i == 3 && (!out_valid || dout != mx)) begin
          failures++; if (failures < 5) $display("FAIL g=%0d got %0d exp %0d", g, dout, mx);
        end
        if (g % 3 == 1) begin @(posedge clk); #1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_qa_unit: random ascending thresholds and inputs around them; the 5-bit
// output must equal the number of thresholds below the input (Eq. 7's
// piecewise function), one clock after in_valid.
module tb_qa_unit;
  import dcnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  acc_t a; acc_t thr[NTHR]; logic [QW-1:0] b;
  qa_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int exp, x;
      if (t % 50 == 0) begin
        x = -int'($urandom_range(0, 2000));
        for (int i = 0; i < NTHR; i++) begin x += int'($urandom_range(1, 200)); thr[i] = acc_t'(x); end
      end
      case (t % 4)
        0: a = thr[$urandom_range(0, NTHR-1)];                 // exactly on a threshold
        1: a = thr[$urandom_range(0, NTHR-1)] + 1;
        2: a = thr[0] - acc_t'($urandom_range(0, 100));
        default: a = acc_t'(int'(thr[0]) + int'($urandom_range(0, 8000)) - 500);
      endcase
      exp = 0;
      for (int i = 0; i < NTHR; i++) if (a > thr[i]) exp++;
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid || int'(b) != exp) begin
        failures++; if (failures < 5) $display("FAIL a=%0d b=%0d exp=%0d v=%0b", a, b, exp, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

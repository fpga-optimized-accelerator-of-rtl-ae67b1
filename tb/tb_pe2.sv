// tb_pe2: checks the four signed products of a PE2 unit (two SSDM units with
// independent inputs and weights).
module tb_pe2;
  import dcnn_pkg::*;
  int checks = 0, failures = 0;
  sm_t in_sm[4]; sm_t w_sm[4]; prod_t prod[4];
  pe2 dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int j = 0; j < 4; j++) begin in_sm[j] = sm_t'($urandom); w_sm[j] = sm_t'($urandom); end
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(prod[j]) != sm2int(in_sm[j]) * sm2int(w_sm[j])) begin
          failures++; if (failures < 5) $display("FAIL j=%0d", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

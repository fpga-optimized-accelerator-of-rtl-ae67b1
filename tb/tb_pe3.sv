// tb_pe3: checks the twelve signed products of a PE3 unit (4 slots x 3 kernels).
module tb_pe3;
  import dcnn_pkg::*;
  int checks = 0, failures = 0;
  sm_t in_sm[4]; sm_t w_sm[3][4]; prod_t prod[3][4];
  pe3 dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int j = 0; j < 4; j++) begin
        in_sm[j] = sm_t'($urandom);
        for (int k = 0; k < 3; k++) w_sm[k][j] = sm_t'($urandom);
      end
      #1;
      for (int k = 0; k < 3; k++) for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(prod[k][j]) != sm2int(in_sm[j]) * sm2int(w_sm[k][j])) begin
          failures++; if (failures < 5) $display("FAIL k=%0d j=%0d", k, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

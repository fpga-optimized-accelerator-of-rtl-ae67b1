// tb_param_rom: loads bias and 31 thresholds for a set of output channels
// word by word through the load port, then reads channels back in random
// order and checks that one read returns the whole 32-word entry one clock
// later. Small depth to keep it short.
module tb_param_rom;
  import dcnn_pkg::*;
  localparam int DEPTH = 32, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ld_en, rd_en;
  logic [AW-1:0] ld_addr, rd_addr;
  logic [4:0] ld_word;
  acc_t ld_data, rd_bias, rd_thr[NTHR];
  param_rom #(.DEPTH(DEPTH), .AW(AW)) dut (.*);
  acc_t model[DEPTH][NTHR+1];
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ld_en = 0; rd_en = 0; ld_addr = '0; rd_addr = '0; ld_word = '0; ld_data = '0;
    for (int a = 0; a < DEPTH; a++)
      for (int w = 0; w <= NTHR; w++) begin
        @(negedge clk);
        ld_en = 1; ld_addr = AW'(a); ld_word = 5'(w); ld_data = acc_t'($urandom);
        model[a][w] = ld_data;
      end
    @(negedge clk); ld_en = 0;
    for (int t = 0; t < 200; t++) begin
      int a;
      a = $urandom_range(0, DEPTH-1);
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_bias != model[a][0]) begin failures++; $display("FAIL bias %0d", a); end
      for (int i = 0; i < NTHR; i++) begin
        checks++;
        if (rd_thr[i] != model[a][i+1]) begin failures++; if (failures < 5) $display("FAIL thr %0d/%0d", a, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

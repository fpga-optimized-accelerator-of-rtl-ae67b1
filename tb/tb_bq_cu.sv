// tb_bq_cu: B_Q CU together with a parameter ROM. The ROM is loaded with
// random entries; for random base addresses a start pulse is given and the
// test checks that 'ready' rises within a fixed number of clocks (start, 4 reads with
// latency 1: 6 clocks) and that bias[m] / thr[m] hold entry base+m for m = 0..3.
module tb_bq_cu;
  import dcnn_pkg::*;
  localparam int DEPTH = 64, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld_en, rom_rd_en, start, ready;
  logic [AW-1:0] ld_addr, rom_rd_addr, base;
  logic [4:0] ld_word;
  acc_t ld_data, rom_bias, rom_thr[NTHR], bias[NK], thr[NK][NTHR];
  acc_t model[DEPTH][NTHR+1];
  param_rom #(.DEPTH(DEPTH), .AW(AW)) u_rom (.clk, .ld_en, .ld_addr, .ld_word, .ld_data,
    .rd_en(rom_rd_en), .rd_addr(rom_rd_addr), .rd_bias(rom_bias), .rd_thr(rom_thr));
  bq_cu #(.AW(AW)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ld_en = 0; ld_addr = '0; ld_word = '0; ld_data = '0; start = 0; base = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < DEPTH; a++)
      for (int w = 0; w <= NTHR; w++) begin
        @(negedge clk);
        ld_en = 1; ld_addr = AW'(a); ld_word = 5'(w); ld_data = acc_t'($urandom);
        model[a][w] = ld_data;
      end
    @(negedge clk); ld_en = 0;
    for (int t = 0; t < 40; t++) begin
      int b, lat;
      b = $urandom_range(0, DEPTH - NK);
      @(negedge clk); start = 1; base = AW'(b);
      @(negedge clk); start = 0;
      lat = 1;
      while (!ready && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 6) begin failures++; $display("FAIL ready after %0d clocks", lat); end
      for (int m = 0; m < NK; m++) begin
        checks++;
        if (bias[m] != model[b+m][0]) begin failures++; $display("FAIL bias %0d", m); end
        for (int i = 0; i < NTHR; i++) begin
          checks++;
          if (thr[m][i] != model[b+m][i+1]) begin failures++; if (failures < 5) $display("FAIL thr"); end
        end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

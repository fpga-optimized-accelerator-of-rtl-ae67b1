// tb_ram_bank: checks the L-lane RAM with per-lane write enables against an
// array model: random writes with random lane masks, reads with latency one,
// read data held while rd_en is low, and read-before-write on the same
// address (the old word is returned). Small depth to keep it short.
module tb_ram_bank;
  import dcnn_pkg::*;
  localparam int L = 8, DEPTH = 64, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en[L];
  logic [AW-1:0] rd_addr, wr_addr;
  sm_t rd_data[L], wr_data[L];
  ram_bank #(.L(L), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  sm_t model[L][DEPTH], exp_d[L], held[L];
  int checks = 0, failures = 0;
  logic exp_v;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (model[c, a]) model[c][a] = '0;
    rd_en = 0; rd_addr = '0; wr_addr = '0; exp_v = 0;
    foreach (wr_en[c]) begin wr_en[c] = 0; wr_data[c] = '0; end
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      if (exp_v) for (int c = 0; c < L; c++) begin
        checks++;
        if (rd_data[c] != exp_d[c]) begin
          failures++; if (failures < 5) $display("FAIL t%0d lane %0d %h exp %h", t, c, rd_data[c], exp_d[c]);
        end
      end
      rd_en = $urandom_range(0, 2) != 0;
      rd_addr = AW'($urandom_range(0, DEPTH-1));
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : AW'($urandom_range(0, DEPTH-1));
      if (rd_en) begin for (int c = 0; c < L; c++) exp_d[c] = model[c][rd_addr]; exp_v = 1; end
      for (int c = 0; c < L; c++) begin
        wr_en[c] = $urandom_range(0, 1) == 1;
        wr_data[c] = sm_t'($urandom_range(0, 63));
        if (wr_en[c]) model[c][wr_addr] = wr_data[c];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

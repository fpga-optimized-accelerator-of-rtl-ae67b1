// tb_ram_sel: checks RAM SEL with 8 lanes. The host port fills group A; the
// INPUT CU read port must see group A for parity 0 and group B for parity 1.
// Write-back is checked for the three layouts: convolution without pooling
// (outputs arrive in circular-window order and must land at row*n+col),
// with pooling (row-major, sequential) and FC (one word per neuron), for
// kernel groups that map to different lanes and offsets. All of both groups
// is then read back through the host port (latency 1) against a model.
module tb_ram_sel;
  import dcnn_pkg::*;
  localparam int L = 8, DEPTH = 64, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic parity, ic_rd_en, clear, conv_mode, pool_en, wb_valid, host_wr_en, host_group, host_rd_en;
  logic [AW-1:0] ic_rd_addr, host_addr;
  sm_t ic_rd_data[L], host_wr_data, host_rd_data;
  logic [15:0] n, kgroup;
  logic [QW-1:0] wb_data[NK];
  logic [2:0] host_lane;
  ram_sel #(.L(L), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  sm_t model[2][L][DEPTH];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wb(int g, int j, int addr);
    wb_valid = 1;
    for (int m = 0; m < NK; m++) begin
      wb_data[m] = QW'($urandom_range(0, 31));
      model[g][(4*j+m)%L][addr] = sm_t'({1'b0, wb_data[m]});
    end
    @(negedge clk);
    wb_valid = 0;
  endtask

  task automatic ic_check(int g);
    for (int a = 0; a < DEPTH; a += 3) begin
      ic_rd_en = 1; ic_rd_addr = AW'(a);
      @(negedge clk);
      ic_rd_en = 0;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (ic_rd_data[l] != model[g][l][a]) begin failures++; if (failures < 5) $display("FAIL ic g%0d l%0d a%0d", g, l, a); end
      end
    end
  endtask

  initial begin
    parity = 0; ic_rd_en = 0; ic_rd_addr = '0; clear = 0; conv_mode = 1; pool_en = 0; wb_valid = 0;
    host_wr_en = 0; host_group = 0; host_rd_en = 0; host_addr = '0; host_wr_data = '0; host_lane = '0;
    n = 16'd4; kgroup = '0;
    foreach (wb_data[m]) wb_data[m] = '0;
    foreach (model[g, l, a]) model[g][l][a] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int l = 0; l < L; l++)
      for (int a = 0; a < DEPTH; a++) begin
        host_wr_en = 1; host_group = 0; host_lane = 3'(l); host_addr = AW'(a);
        host_wr_data = sm_t'($urandom_range(0, 63)); model[0][l][a] = host_wr_data;
        @(negedge clk);
      end
    host_wr_en = 0;
    ic_check(0);
    // conv, no pooling, n = 4, kernel group 1 -> lanes 4..7, offset 0
    kgroup = 16'd1; conv_mode = 1; pool_en = 0;
    clear = 1; @(negedge clk); clear = 0;
    for (int rp = 0; rp < 2; rp++)
      for (int g = 0; g < 2; g++) begin
        wb(1, 1, (2*rp)*4 + 2*g);
        wb(1, 1, (2*rp+1)*4 + 2*g);
        @(negedge clk);                       // gaps are allowed
        wb(1, 1, (2*rp+1)*4 + 2*g + 1);
        wb(1, 1, (2*rp)*4 + 2*g + 1);
      end
    // conv with pooling, kernel group 2 -> lanes 0..3, offset 1 * 2 * 2
    kgroup = 16'd2; pool_en = 1;
    clear = 1; @(negedge clk); clear = 0;
    for (int q = 0; q < 4; q++) wb(1, 2, 4 + q);
    // FC, kernel group 3 -> lanes 4..7, offset 1
    kgroup = 16'd3; pool_en = 0; conv_mode = 0;
    clear = 1; @(negedge clk); clear = 0;
    wb(1, 3, 1);
    // next layer: parity 1 reads group B, writes group A
    parity = 1; conv_mode = 1; pool_en = 1; kgroup = 16'd0; n = 16'd8;
    ic_check(1);
    clear = 1; @(negedge clk); clear = 0;
    for (int q = 0; q < 16; q++) wb(0, 0, q);
    // host read-back of both groups
    for (int g = 0; g < 2; g++)
      for (int l = 0; l < L; l++)
        for (int a = 0; a < DEPTH; a++) begin
          host_rd_en = 1; host_group = g[0]; host_lane = 3'(l); host_addr = AW'(a);
          @(negedge clk);
          host_rd_en = 0;
          checks++;
          if (host_rd_data != model[g][l][a]) begin
            failures++; if (failures < 8) $display("FAIL host g%0d l%0d a%0d %0d exp %0d", g, l, a, host_rd_data, model[g][l][a]);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_top_cu: checks the loop order of TOP CU. A layer table of three layers
// (conv with 3 channel groups x 2 kernel groups, conv with 1 x 1, FC with 3
// neuron groups) is written; the test answers B_Q CU and INPUT CU with
// ready / done after random delays and compares the sequence of passes it
// sees (layer parity, kernel group j, INPUT CU base address k*n*n, FIFO
// levels use_fifo / to_fifo, SOFTMAX enable) with the nested loops worked
// out here, then checks 'done'.
module tb_top_cu;
  import dcnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic lt_we, start, busy, done, parity, bq_start, bq_ready, ic_start, ic_done;
  logic oc_clear, use_fifo, to_fifo, sm_en, sm_clear;
  logic [3:0] lt_addr;
  layer_t lt_data, cur;
  logic [4:0] layer_num;
  logic [15:0] kgroup, ic_base;
  logic [13:0] bq_base;
  top_cu #(.AW(16), .ROM_AW(14), .DRAIN(3)) dut (.*);
  int checks = 0, failures = 0;
  typedef struct { int par, j, base, uf, tf, sm, bq; } pass_t;
  pass_t exp_q[$];
  layer_t tab[3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // B_Q CU / INPUT CU responders
  initial begin
    bq_ready = 0; ic_done = 0;
    forever begin
      @(negedge clk);
      ic_done = 0;
      if (bq_start) begin
        bq_ready = 0;
        repeat ($urandom_range(1, 5)) @(negedge clk);
        bq_ready = 1;
      end
      if (ic_start) begin
        pass_t e;
        checks++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL extra pass"); end
        else begin
          e = exp_q.pop_front();
          if (e.par != int'(parity) || e.j != int'(kgroup) || e.base != int'(ic_base) ||
              e.uf != int'(use_fifo) || e.tf != int'(to_fifo) || e.sm != int'(sm_en) ||
              e.bq != int'(bq_base)) begin
            failures++;
            $display("FAIL pass par%0d j%0d base%0d uf%0d tf%0d sm%0d bq%0d", parity, kgroup,
                     ic_base, use_fifo, to_fifo, sm_en, bq_base);
          end
        end
        repeat ($urandom_range(2, 12)) @(negedge clk);
        ic_done = 1;
      end
    end
  end

  initial begin
    lt_we = 0; lt_addr = '0; lt_data = '0; start = 0; layer_num = 5'd3;
    tab[0] = '{conv:1, pool:1, n:8, cin_groups:3, kgroups:2, fc_steps:0, rom_base:0,  nvalid:8};
    tab[1] = '{conv:1, pool:0, n:4, cin_groups:1, kgroups:1, fc_steps:0, rom_base:8,  nvalid:4};
    tab[2] = '{conv:0, pool:0, n:0, cin_groups:1, kgroups:3, fc_steps:2, rom_base:12, nvalid:10};
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < tab[i].kgroups; j++)
        for (int k = 0; k < (tab[i].conv ? tab[i].cin_groups : 1); k++) begin
          pass_t e;
          e.par = i % 2; e.j = j;
          e.base = tab[i].conv ? k * tab[i].n * tab[i].n : 0;
          e.uf = tab[i].conv && k != 0;
          e.tf = tab[i].conv && k != tab[i].cin_groups - 1;
          e.sm = (i == 2);
          e.bq = tab[i].rom_base + 4 * j;
          exp_q.push_back(e);
        end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      lt_we = 1; lt_addr = 4'(i); lt_data = tab[i]; @(negedge clk);
    end
    lt_we = 0;
    start = 1; @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy"); end
    while (!done) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d passes missing", exp_q.size()); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dcnn_top: end-to-end test of the accelerator at its default sizes
// (64 lanes, full RAM/ROM/FIFO depths, no parameter overrides).
// A three-layer network is loaded through the host ports and run once:
//   layer 0: 3x3 convolution, 8x8 input, 128 input channels (two channel
//            groups, so partial sums go through the FIFOs), 8 kernels (two
//            kernel groups), 2x2 max pooling -> 4x4x8;
//   layer 1: 3x3 convolution, 4x4 input, one channel group, 4 kernels, no
//            pooling -> 4x4x4;
//   layer 2: fully connected, 2 steps of 8 x 64 inputs, 12 neurons of which
//            10 are valid, SOFTMAX label.
// Weights are streamed into the four weight FIFOs from a separate, slower
// clock as the DDR4 side would. A reference model (plain integer arithmetic
// on a copy of both RAM groups, using the same memory layout) computes every
// written result, which is read back through the host port, and the label.
// The mechanisms of the design are counted and each must occur: CSW window
// states r1..r4, padding reads, partial-sum FIFO writes and reads, pooling,
// FC beats, weight bank swaps, weight-FIFO back-pressure, waiting for
// weights, RAM group swaps and the SOFTMAX label.
module tb_dcnn_top;
  import dcnn_pkg::*;
  localparam int L    = LANES;
  localparam int RDEP = 256;                  // modelled part of each RAM

  logic clk = 0, ddr_clk = 0, rst_n = 0, ddr_rst_n = 0;
  always #5 clk = ~clk;
  always #7 ddr_clk = ~ddr_clk;

  logic              w_wr_en;
  logic [L*DW-1:0]   w_wr_data[NK];
  logic              w_full[NK];
  logic              lt_we;
  logic [3:0]        lt_addr;
  layer_t            lt_data;
  logic              rom_ld_en;
  logic [13:0]       rom_ld_addr;
  logic [4:0]        rom_ld_word;
  acc_t              rom_ld_data;
  logic              host_wr_en, host_rd_en, host_group;
  logic [$clog2(L)-1:0] host_lane;
  logic [15:0]       host_addr;
  sm_t               host_wr_data, host_rd_data;
  logic              start, busy, done, label_valid;
  logic [4:0]        layer_num;
  logic [15:0]       label;

  dcnn_top dut (.*);

  int checks = 0, failures = 0;

  // ---- network ---------------------------------------------------------
  localparam int N0 = 8, C0 = 128, K0 = 8;    // layer 0
  localparam int N1 = 4, C1 = 64,  K1 = 4;    // layer 1 (reads all 64 lanes)
  localparam int FS = 2, K2 = 12, NV = 10;    // layer 2
  sm_t  w0[K0][C0][9];
  sm_t  w1[K1][C1][9];
  sm_t  wf[K2][FS][8][L];
  int   bias[24];
  int   thr [24][NTHR];
  sm_t  mem [2][L][RDEP];                     // reference copy of RAM groups
  int   ref_label;

  function automatic sm_t rnd_sm(int maxmag);
    return sm_t'({1'($urandom_range(0, 1)), 5'($urandom_range(0, maxmag))});
  endfunction
  function automatic int val(sm_t x);
    return x[5] ? -int'(x[4:0]) : int'(x[4:0]);
  endfunction
  function automatic int qa(int a, int ch);
    int b;
    b = 0;
    for (int i = 0; i < NTHR; i++) if (a > thr[ch][i]) b++;
    return b;
  endfunction

  // conv layer on the reference memory: reads group g, writes group !g
  task automatic ref_conv(int g, int n, int cin, int nk, bit pool, int rb, int which);
    int q[64][64];
    int pix;
    pix = pool ? (n/2)*(n/2) : n*n;
    for (int o = 0; o < nk; o++) begin
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          int a;
          a = bias[rb+o];
          for (int ch = 0; ch < cin; ch++)
            for (int p = 0; p < 9; p++) begin
              int rr, cc;
              rr = r + p/3 - 1; cc = c + p%3 - 1;
              if (rr >= 0 && rr < n && cc >= 0 && cc < n)
                a += val(mem[g][ch%L][(ch/L)*n*n + rr*n + cc]) *
                     val(which == 0 ? w0[o][ch][p] : w1[o][ch][p]);
            end
          q[r][c] = qa(a, rb+o);
        end
      for (int r = 0; r < (pool ? n/2 : n); r++)
        for (int c = 0; c < (pool ? n/2 : n); c++) begin
          int v;
          if (pool) begin
            v = q[2*r][2*c];
            if (q[2*r+1][2*c]   > v) v = q[2*r+1][2*c];
            if (q[2*r][2*c+1]   > v) v = q[2*r][2*c+1];
            if (q[2*r+1][2*c+1] > v) v = q[2*r+1][2*c+1];
            mem[1-g][o%L][(o/L)*pix + r*(n/2) + c] = sm_t'(v);
          end else
            mem[1-g][o%L][(o/L)*pix + r*n + c] = sm_t'(q[r][c]);
        end
    end
  endtask

  task automatic ref_fc(int g, int rb);
    int best;
    best = -1;
    for (int o = 0; o < K2; o++) begin
      int a, v;
      a = bias[rb+o];
      for (int s = 0; s < FS; s++)
        for (int i = 0; i < 8; i++)
          for (int l = 0; l < L; l++)
            a += val(mem[g][l][8*s+i]) * val(wf[o][s][i][l]);
      v = qa(a, rb+o);
      mem[1-g][o%L][o/L] = sm_t'(v);
      if (o < NV && (best < 0 || v > best)) begin best = v; ref_label = o; end
    end
  endtask

  // ---- weight stream (DDR side) -----------------------------------------
  logic [L*DW-1:0] wq[NK][$];
  task automatic build_stream();
    for (int j = 0; j < K0/NK; j++)
      for (int k = 0; k < C0/L; k++)
        for (int m = 0; m < NK; m++)
          for (int p = 0; p < 9; p++) begin
            logic [L*DW-1:0] wd;
            for (int c = 0; c < L; c++) wd[c*DW +: DW] = w0[NK*j+m][k*L+c][p];
            wq[m].push_back(wd);
          end
    for (int m = 0; m < NK; m++)
      for (int p = 0; p < 9; p++) begin
        logic [L*DW-1:0] wd;
        for (int c = 0; c < L; c++) wd[c*DW +: DW] = w1[m][c][p];
        wq[m].push_back(wd);
      end
    for (int j = 0; j < K2/NK; j++)
      for (int s = 0; s < FS; s++)
        for (int m = 0; m < NK; m++)
          for (int i = 0; i < 9; i++) begin
            logic [L*DW-1:0] wd;
            for (int l = 0; l < L; l++) wd[l*DW +: DW] = (i < 8) ? wf[NK*j+m][s][i][l] : '0;
            wq[m].push_back(wd);
          end
  endtask

  int n_full = 0;
  always @(posedge ddr_clk) begin
    logic any_full;
    any_full = w_full[0] | w_full[1] | w_full[2] | w_full[3];
    if (ddr_rst_n && w_wr_en && !any_full)
      for (int m = 0; m < NK; m++) void'(wq[m].pop_front());
    if (ddr_rst_n && any_full && wq[0].size() != 0) n_full++;
  end
  always @(negedge ddr_clk) begin
    w_wr_en <= ddr_rst_n && wq[0].size() != 0 && $urandom_range(0, 3) != 0;
    for (int m = 0; m < NK; m++) w_wr_data[m] <= (wq[m].size() != 0) ? wq[m][0] : '0;
  end

  // ---- mechanism counters ----------------------------------------------
  int n_state[4], n_pad = 0, n_push = 0, n_pop = 0, n_pool = 0, n_fc = 0;
  int n_take = 0, n_wwait = 0, n_swap = 0, n_label = 0, n_wb = 0;
  logic par_q;
  initial for (int i = 0; i < 4; i++) n_state[i] = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ic_beat.valid && dut.cur.conv && dut.ic_beat.phase == 1'b0)
      n_state[dut.u_input_cu.c_st]++;
    if (dut.u_input_cu.l_v && dut.u_input_cu.l_pad) n_pad++;
    if (dut.u_output_cu.fifo_push[0]) n_push++;
    if (dut.u_output_cu.fifo_pop[0])  n_pop++;
    if (dut.wb_valid) n_wb++;
    if (dut.wb_valid && dut.cur.conv && dut.cur.pool) n_pool++;
    if (dut.ic_beat.valid && !dut.cur.conv) n_fc++;
    if (dut.w_take) n_take++;
    if (dut.ic_busy && !dut.w_ready) n_wwait++;
    if (busy && dut.parity != par_q) n_swap++;
    par_q <= dut.parity;
    if (label_valid) n_label++;
  end

  task automatic count(string name, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
    else $display("  %-22s %0d", name, n);
  endtask

  // ---- watchdog ---------------------------------------------------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus ---------------------------------------------------------
  int got_label;
  initial begin
    w_wr_en = 0; lt_we = 0; rom_ld_en = 0; host_wr_en = 0; host_rd_en = 0;
    host_group = 0; host_lane = '0; host_addr = '0; host_wr_data = '0; start = 0;
    lt_addr = '0; lt_data = '0; rom_ld_addr = '0; rom_ld_word = '0; rom_ld_data = '0;
    layer_num = 5'd3; par_q = 0; got_label = -1;
    for (int m = 0; m < NK; m++) w_wr_data[m] = '0;
    for (int g = 0; g < 2; g++) for (int l = 0; l < L; l++) for (int a = 0; a < RDEP; a++)
      mem[g][l][a] = '0;

    // random network; thresholds ascending, spread over each layer's range
    foreach (w0[o, c, p]) w0[o][c][p] = rnd_sm(31);
    foreach (w1[o, c, p]) w1[o][c][p] = rnd_sm(31);
    foreach (wf[o, s, i, l]) wf[o][s][i][l] = rnd_sm(31);
    for (int o = 0; o < 24; o++) begin
      int step, t0;
      step = (o < 8) ? 1200 : (o < 12) ? 700 : 500;
      t0   = -5 * step + int'($urandom_range(0, 400)) - 200;
      bias[o] = int'($urandom_range(0, 2000)) - 1000;
      for (int i = 0; i < NTHR; i++) thr[o][i] = t0 + i * step;
    end
    build_stream();

    repeat (3) @(negedge clk);
    rst_n = 1; ddr_rst_n = 1;
    #1;
    // layer table
    @(negedge clk);
    lt_we = 1;
    lt_addr = 0; lt_data = '{conv:1, pool:1, n:N0, cin_groups:C0/L, kgroups:K0/NK, fc_steps:0, rom_base:0,  nvalid:K0};
    @(negedge clk);
    lt_addr = 1; lt_data = '{conv:1, pool:0, n:N1, cin_groups:1,    kgroups:K1/NK, fc_steps:0, rom_base:8,  nvalid:K1};
    @(negedge clk);
    lt_addr = 2; lt_data = '{conv:0, pool:0, n:0,  cin_groups:1,    kgroups:K2/NK, fc_steps:FS, rom_base:12, nvalid:NV};
    @(negedge clk);
    lt_we = 0;
    // ROM
    for (int o = 0; o < 24; o++)
      for (int w = 0; w < 32; w++) begin
        rom_ld_en = 1; rom_ld_addr = 14'(o); rom_ld_word = 5'(w);
        rom_ld_data = acc_t'(w == 0 ? bias[o] : thr[o][w-1]);
        @(negedge clk);
      end
    rom_ld_en = 0;
    // input image into group A: channel c -> lane c%L, address (c/L)*n*n + pixel
    for (int c = 0; c < C0; c++)
      for (int px = 0; px < N0*N0; px++) begin
        sm_t x;
        x = rnd_sm(31);
        mem[0][c%L][(c/L)*N0*N0 + px] = x;
        host_wr_en = 1; host_group = 0; host_lane = 6'(c%L);
        host_addr = 16'((c/L)*N0*N0 + px); host_wr_data = x;
        @(negedge clk);
      end
    host_wr_en = 0;

    // reference
    ref_conv(0, N0, C0, K0, 1, 0, 0);
    ref_conv(1, N1, C1, K1, 0, 8, 1);
    ref_fc(0, 12);

    // run
    start = 1; @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk);
      if (label_valid) got_label = int'(label);
    end
    if (label_valid) got_label = int'(label);
    repeat (4) @(negedge clk);

    checks++;
    if (got_label != ref_label) begin
      failures++; $display("FAIL label %0d expected %0d", got_label, ref_label);
    end
    // read back every written location of both groups
    for (int g = 0; g < 2; g++)
      for (int l = 0; l < L; l++)
        for (int a = 0; a < 64; a++) begin
          if (g == 0 && !(l < K1 && a < N1*N1)) continue;   // image area kept as is
          if (g == 1 && !((l < K0 && a < 16) || (l < K2 && a == 0))) continue;
          host_rd_en = 1; host_group = g[0]; host_lane = 6'(l); host_addr = 16'(a);
          @(negedge clk);
          host_rd_en = 0;
          checks++;
          if (host_rd_data != mem[g][l][a]) begin
            failures++;
            if (failures < 10)
              $display("FAIL ram g%0d lane %0d addr %0d: %0d expected %0d", g, l, a,
                       host_rd_data, mem[g][l][a]);
          end
        end

    $display("mechanisms:");
    count("CSW r1 (start)",      n_state[0]);
    count("CSW r2 (down)",       n_state[1]);
    count("CSW r3 (right)",      n_state[2]);
    count("CSW r4 (up)",         n_state[3]);
    count("padding reads",       n_pad);
    count("psum FIFO writes",    n_push);
    count("psum FIFO reads",     n_pop);
    count("pooled outputs",      n_pool);
    count("FC beats",            n_fc);
    count("weight bank swaps",   n_take);
    count("weight FIFO full",    n_full);
    count("waits for weights",   n_wwait);
    count("RAM group swaps",     n_swap);
    count("SOFTMAX label",       n_label);
    // output counts: 8x16 pooled + 4x16 + 12 FC
    checks++;
    if (n_wb != 2*16 + 16 + 3) begin failures++; $display("FAIL write-back count %0d", n_wb); end
    $display("label %0d (reference %0d), cycles %0t", got_label, ref_label, $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

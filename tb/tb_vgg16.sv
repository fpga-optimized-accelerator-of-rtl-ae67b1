// tb_vgg16: runs the VGG16 workloads on the accelerator at its default sizes.
//   1. The whole VGG16 network for 32x32 CIFAR-10 images: 13 convolution
//      layers (64-64, 128-128, 256 x3, 512 x3, 512 x3 channels, pooling after
//      layers 2, 4, 7, 10, 13) and three FC layers (512-512-512-10), ending in
//      the SOFTMAX label.
//   2. The first VGG16 layer for 224x224 ImageNet images (3 -> 64 channels),
//      which fills every RAM of a group to its last word.
// Weights are pseudo-random (a hash of layer, kernel, channel and position)
// and streamed through the weight FIFOs from a separate clock. Biases and
// the 31 Q/A thresholds of each layer are calibrated from the reference
// model's own sums (step = rms / 8) so that activations stay spread over the
// 5-bit range through all layers. The reference works on plain tensors with
// integer arithmetic; the test compares the ten class outputs and the label
// of the CIFAR-10 run, and 3000 sampled outputs of the ImageNet layer, and
// prints the clock count of each run.
module tb_vgg16;
  import dcnn_pkg::*;
  localparam int L = LANES;

  logic clk = 0, ddr_clk = 0, rst_n = 0, ddr_rst_n = 0;
  always #5 clk = ~clk;
  always #3 ddr_clk = ~ddr_clk;

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

  // ---- network description -----------------------------------------------
  int nl;                       // number of layers
  int l_conv[16], l_pool[16], l_n[16], l_cin[16], l_cout[16], l_rb[16];
  int bias[13416];
  int step[16];

  function automatic sm_t wgt(int l, int o, int c, int p);
    logic [31:0] h;
    if (c >= l_cin[l]) return '0;
    h = 32'(l) * 32'h9E3779B1 ^ 32'(o) * 32'h85EBCA77 ^ 32'(c) * 32'hC2B2AE3D ^ 32'(p) * 32'h27D4EB2F;
    h = h ^ (h >> 15); h = h * 32'h2C1B3C6D; h = h ^ (h >> 12); h = h * 32'h297A2D39; h = h ^ (h >> 15);
    return sm_t'({h[7], h[4:0]});
  endfunction
  function automatic int val(sm_t x);
    return x[5] ? -int'(x[4:0]) : int'(x[4:0]);
  endfunction
  function automatic int qa(int a, int s);
    int b;
    b = 0;
    for (int i = 1; i <= NTHR; i++) if (a > i * s) b++;
    return b;
  endfunction

  // ---- reference model on tensors [c][r][col] -----------------------------
  int x[];                      // current activations
  int y[];

  task automatic ref_layer(int l);
    int n, ci, co, no;
    longint sq;
    int acc[];
    n = l_n[l]; ci = l_cin[l]; co = l_cout[l];
    if (l_conv[l]) begin
      acc = new[co * n * n];
      for (int o = 0; o < co; o++) begin
        int wl[];
        wl = new[ci * 9];
        for (int c = 0; c < ci; c++) for (int p = 0; p < 9; p++) wl[c*9+p] = val(wgt(l, o, c, p));
        for (int r = 0; r < n; r++)
          for (int cc = 0; cc < n; cc++) begin
            int a;
            a = 0;
            for (int c = 0; c < ci; c++)
              for (int p = 0; p < 9; p++) begin
                int rr, c2;
                rr = r + p/3 - 1; c2 = cc + p%3 - 1;
                if (rr >= 0 && rr < n && c2 >= 0 && c2 < n) a += x[c*n*n + rr*n + c2] * wl[c*9+p];
              end
            acc[o*n*n + r*n + cc] = a;
          end
      end
    end else begin
      acc = new[co];
      for (int o = 0; o < co; o++) begin
        int a;
        a = 0;
        for (int c = 0; c < ci; c++) a += x[c] * val(wgt(l, o, c, (c / L) % 8));
        acc[o] = a;
      end
    end
    // calibration: threshold step from the rms of the sums
    sq = 0;
    foreach (acc[i]) sq += longint'(acc[i]) * longint'(acc[i]);
    step[l] = int'($sqrt(real'(sq) / real'(acc.size()))) / 8 + 1;
    for (int o = 0; o < co; o++) bias[l_rb[l] + o] = int'($urandom_range(0, 2 * step[l])) - step[l];
    // Q/A and pooling
    no = (l_conv[l] && l_pool[l]) ? n / 2 : n;
    y = new[l_conv[l] ? co * no * no : co];
    if (!l_conv[l]) for (int o = 0; o < co; o++) y[o] = qa(acc[o] + bias[l_rb[l] + o], step[l]);
    else
      for (int o = 0; o < co; o++)
        for (int r = 0; r < no; r++)
          for (int cc = 0; cc < no; cc++) begin
            if (l_pool[l]) begin
              int m;
              m = 0;
              for (int d = 0; d < 4; d++) begin
                int q;
                q = qa(acc[o*n*n + (2*r + d/2)*n + 2*cc + d%2] + bias[l_rb[l] + o], step[l]);
                if (q > m) m = q;
              end
              y[o*no*no + r*no + cc] = m;
            end else
              y[o*n*n + r*n + cc] = qa(acc[o*n*n + r*n + cc] + bias[l_rb[l] + o], step[l]);
          end
    x = y;
  endtask

  // ---- weight stream ------------------------------------------------------
  // per layer, kernel group j, channel group k (conv) or step s (FC):
  // 9 words per kernel (FC: 8 words and a filler)
  bit stream_go = 0;
  always @(posedge stream_go) begin
    for (int l = 0; l < nl; l++)
      for (int j = 0; j < (l_cout[l] + NK - 1) / NK; j++)
        for (int k = 0; k < (l_conv[l] ? (l_cin[l] + L - 1) / L : l_cin[l] / (8 * L)); k++)
          for (int i = 0; i < 9; i++) begin
            @(negedge ddr_clk);
            while (w_full[0] | w_full[1] | w_full[2] | w_full[3]) @(negedge ddr_clk);
            for (int m = 0; m < NK; m++)
              for (int c = 0; c < L; c++)
                if (l_conv[l]) w_wr_data[m][c*DW +: DW] = wgt(l, NK*j + m, k*L + c, i);
                else w_wr_data[m][c*DW +: DW] = (i < 8) ? wgt(l, NK*j + m, (8*k + i)*L + c, i) : '0;
            w_wr_en = 1;
            @(negedge ddr_clk);
            w_wr_en = 0;
          end
  end

  // ---- helpers --------------------------------------------------------------
  task automatic load_tables();
    for (int l = 0; l < nl; l++) begin
      layer_t t;
      t = '0;
      t.conv = l_conv[l][0]; t.pool = l_pool[l][0]; t.n = 16'(l_n[l]);
      t.cin_groups = 16'((l_cin[l] + L - 1) / L);
      t.kgroups = 16'((l_cout[l] + NK - 1) / NK);
      t.fc_steps = l_conv[l] ? 16'd0 : 16'(l_cin[l] / (8 * L));
      t.rom_base = 16'(l_rb[l]); t.nvalid = 16'(l_cout[l]);
      lt_we = 1; lt_addr = 4'(l); lt_data = t;
      @(negedge clk);
    end
    lt_we = 0;
    for (int l = 0; l < nl; l++)
      for (int o = 0; o < ((l_cout[l] + NK - 1) / NK) * NK; o++)
        for (int w = 0; w < 32; w++) begin
          rom_ld_en = 1; rom_ld_addr = 14'(l_rb[l] + o); rom_ld_word = 5'(w);
          rom_ld_data = acc_t'(w == 0 ? bias[l_rb[l] + o] : w * step[l]);
          @(negedge clk);
        end
    rom_ld_en = 0;
  endtask

  task automatic load_image(int n, int ci, const ref int img[]);
    for (int c = 0; c < ci; c++)
      for (int p = 0; p < n * n; p++) begin
        host_wr_en = 1; host_group = 0; host_lane = 6'(c % L);
        host_addr = 16'((c / L) * n * n + p); host_wr_data = sm_t'(img[c*n*n + p]);
        @(negedge clk);
      end
    host_wr_en = 0;
  endtask

  task automatic run(output int lab, output longint clocks);
    longint t0;
    lab = -1;
    t0 = longint'($time);
    start = 1; stream_go = 1; @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk);
      if (label_valid) lab = int'(label);
    end
    stream_go = 0;
    clocks = (longint'($time) - t0) / 10;
  endtask

  task automatic host_read(int g, int lane, int addr, output int v);
    host_rd_en = 1; host_group = g[0]; host_lane = 6'(lane); host_addr = 16'(addr);
    @(negedge clk);
    host_rd_en = 0;
    v = int'(host_rd_data);
  endtask

  // ---- watchdog -----------------------------------------------------------
  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[];
    int lab, v, ref_lab, best, rb;
    longint clocks;
    w_wr_en = 0; lt_we = 0; rom_ld_en = 0; host_wr_en = 0; host_rd_en = 0;
    host_group = 0; host_lane = '0; host_addr = '0; host_wr_data = '0; start = 0;
    lt_addr = '0; lt_data = '0; rom_ld_addr = '0; rom_ld_word = '0; rom_ld_data = '0;
    for (int m = 0; m < NK; m++) w_wr_data[m] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1; ddr_rst_n = 1;
    #1;

    // ---- 1. VGG16, CIFAR-10 ----
    begin
      int cfg_n[16]    = '{32, 32, 16, 16, 8, 8, 8, 4, 4, 4, 2, 2, 2, 1, 1, 1};
      int cfg_cout[16] = '{64, 64, 128, 128, 256, 256, 256, 512, 512, 512, 512, 512, 512, 512, 512, 10};
      int cfg_pool[16] = '{0, 1, 0, 1, 0, 0, 1, 0, 0, 1, 0, 0, 1, 0, 0, 0};
      nl = 16; rb = 0;
      for (int l = 0; l < nl; l++) begin
        l_conv[l] = (l < 13); l_pool[l] = cfg_pool[l]; l_n[l] = cfg_n[l];
        l_cin[l] = (l == 0) ? 3 : cfg_cout[l-1]; l_cout[l] = cfg_cout[l];
        l_rb[l] = rb; rb += ((cfg_cout[l] + NK - 1) / NK) * NK;
      end
    end
    img = new[3 * 32 * 32];
    foreach (img[i]) img[i] = $urandom_range(0, 31);
    x = img;
    for (int l = 0; l < nl; l++) ref_layer(l);
    layer_num = 5'(nl);
    load_tables();
    load_image(32, 3, img);
    run(lab, clocks);
    ref_lab = -1; best = -1;
    for (int o = 0; o < 10; o++) if (x[o] > best) begin best = x[o]; ref_lab = o; end
    checks++;
    if (lab != ref_lab) begin failures++; $display("FAIL CIFAR-10 label %0d expected %0d", lab, ref_lab); end
    for (int o = 0; o < 10; o++) begin
      host_read(nl % 2, o, 0, v);
      checks++;
      if (v != x[o]) begin failures++; $display("FAIL CIFAR-10 class %0d: %0d expected %0d", o, v, x[o]); end
    end
    $display("VGG16 CIFAR-10: label %0d (reference %0d), outputs %p, %0d clocks", lab, ref_lab, x, clocks);

    // ---- 2. VGG16 layer 1, ImageNet 224x224 ----
    nl = 1;
    l_conv[0] = 1; l_pool[0] = 0; l_n[0] = 224; l_cin[0] = 3; l_cout[0] = 64; l_rb[0] = 0;
    img = new[3 * 224 * 224];
    foreach (img[i]) img[i] = $urandom_range(0, 31);
    x = img;
    ref_layer(0);
    layer_num = 5'd1;
    load_tables();
    load_image(224, 3, img);
    run(lab, clocks);
    for (int t = 0; t < 3000; t++) begin
      int o, p;
      o = $urandom_range(0, 63);
      p = (t == 0) ? 224 * 224 - 1 : $urandom_range(0, 224 * 224 - 1);
      host_read(1, o, p, v);
      checks++;
      if (v != x[o * 224 * 224 + p]) begin
        failures++;
        if (failures < 10) $display("FAIL ImageNet ch %0d pixel %0d: %0d expected %0d", o, p, v, x[o*224*224 + p]);
      end
    end
    $display("VGG16 ImageNet layer 1: %0d clocks (16 passes of %0d reads)", clocks, 226 * 4 * 112);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

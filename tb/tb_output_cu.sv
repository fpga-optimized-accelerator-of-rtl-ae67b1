// tb_output_cu: OUTPUT CU with 8 lanes. Random products are fed as two-beat
// values. Convolution is run as two passes over the same 12 positions: the
// first (bias added, to_fifo) stores partial sums in the four FIFOs, the
// second (use_fifo) adds them back and goes through Q/A, without and then
// with pooling. Position-0 products of row 3 are routed to kernels 0,1 in
// phase 0 and 2,3 in phase 1. An FC run of three neuron groups with SOFTMAX
// enabled checks the Q/A outputs and the label (10 valid outputs). All
// expected values are computed here from the products, bias and thresholds.
module tb_output_cu;
  import dcnn_pkg::*;
  localparam int L = 8, V = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, conv_mode, pool_en, use_fifo, to_fifo, sm_en, sm_clear, out_valid, label_valid;
  logic [15:0] sm_groups, sm_nvalid, label;
  beat_t beat;
  prod_t fc_prod[NK][L][4], only_prod[2][L];
  acc_t bias[NK], thr[NK][NTHR];
  logic [QW-1:0] out_data[NK], label_max;
  output_cu #(.L(L), .FIFO_DEPTH(16)) dut (.*);
  int checks = 0, failures = 0;
  int psum[V][NK];
  int exp_out[$];
  int n_out = 0;

  function automatic int qa(int a, int m);
    int b;
    b = 0;
    for (int i = 0; i < NTHR; i++) if (a > int'(thr[m][i])) b++;
    return b;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    n_out++;
    for (int m = 0; m < NK; m++) begin
      checks++;
      if (exp_out.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        int e;
        e = exp_out.pop_front();
        if (int'(out_data[m]) != e) begin failures++; $display("FAIL out %0d exp %0d", out_data[m], e); end
      end
    end
  end

  // one value: two beats; returns the four sums of products (plus side)
  task automatic value(bit conv, output int s[NK]);
    for (int m = 0; m < NK; m++) s[m] = 0;
    for (int ph = 0; ph < 2; ph++) begin
      beat.valid = 1; beat.phase = ph[0]; beat.first = (ph == 0); beat.last = (ph == 1);
      for (int m = 0; m < NK; m++)
        for (int l = 0; l < L; l++)
          for (int i = 0; i < 4; i++) begin
            fc_prod[m][l][i] = prod_t'($urandom_range(0, 1922) - 961);
            s[m] += int'(fc_prod[m][l][i]);
          end
      for (int k = 0; k < 2; k++)
        for (int l = 0; l < L; l++) begin
          only_prod[k][l] = conv ? prod_t'($urandom_range(0, 1922) - 961) : '0;
          s[2*ph+k] += int'(only_prod[k][l]);
        end
      @(negedge clk);
    end
    beat = '0;
  endtask

  initial begin
    int s[NK];
    int q[V][NK];
    clear = 0; conv_mode = 1; pool_en = 0; use_fifo = 0; to_fifo = 0; sm_en = 0; sm_clear = 0;
    sm_groups = 16'd3; sm_nvalid = 16'd10; beat = '0;
    foreach (fc_prod[m, l, i]) fc_prod[m][l][i] = '0;
    foreach (only_prod[k, l]) only_prod[k][l] = '0;
    for (int m = 0; m < NK; m++) begin
      bias[m] = acc_t'($urandom_range(0, 2000) - 1000);
      for (int i = 0; i < NTHR; i++) thr[m][i] = acc_t'(-15000 + i * 1000 + m * 100);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int pass = 0; pass < 4; pass++) begin
      // pass 0/2: first channel group to FIFO; pass 1/3: last group (1: no pool, 3: pool)
      use_fifo = pass[0]; to_fifo = !pass[0]; pool_en = (pass == 3);
      clear = 1; @(negedge clk); clear = 0;
      for (int v = 0; v < V; v++) begin
        if (pass[0]) begin
          // expected outputs are queued before the value's beats are sent
          value(1, s);
          for (int m = 0; m < NK; m++) q[v][m] = qa(psum[v][m] + s[m], m);
          if (!pool_en) for (int m = 0; m < NK; m++) exp_out.push_back(q[v][m]);
          else if (v % 4 == 3)
            for (int m = 0; m < NK; m++) begin
              int mx;
              mx = 0;
              for (int w = v - 3; w <= v; w++) if (q[w][m] > mx) mx = q[w][m];
              exp_out.push_back(mx);
            end
        end else begin
          value(1, s);
          for (int m = 0; m < NK; m++) psum[v][m] = int'(bias[m]) + s[m];
        end
        if ($urandom_range(0, 2) == 0) @(negedge clk);
      end
      repeat (6) @(negedge clk);
    end
    checks++;
    if (n_out != V + V/4) begin failures++; $display("FAIL output count %0d", n_out); end
    // FC with SOFTMAX: three groups of four neurons, 10 valid, one step each
    begin
      int best, best_i;
      best = -1; best_i = -1;
      conv_mode = 0; pool_en = 0; use_fifo = 0; to_fifo = 0; sm_en = 1;
      sm_clear = 1; @(negedge clk); sm_clear = 0;
      for (int g = 0; g < 3; g++) begin
        clear = 1; @(negedge clk); clear = 0;
        value(0, s);
        for (int m = 0; m < NK; m++) begin
          int r;
          r = qa(int'(bias[m]) + s[m], m);
          exp_out.push_back(r);
          if (4*g + m < 10 && r > best) begin best = r; best_i = 4*g + m; end
        end
        repeat (6) @(negedge clk);
      end
      repeat (4) @(negedge clk);
      checks++;
      if (int'(label) != best_i || int'(label_max) != best) begin
        failures++; $display("FAIL label %0d/%0d exp %0d/%0d", label, label_max, best_i, best);
      end
    end
    checks++;
    if (exp_out.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_out.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

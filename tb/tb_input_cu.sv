// tb_input_cu: drives the INPUT CU from a behavioural RAM (latency 1) and
// checks every beat against windows cut from the zero-padded image:
// output order of the circular sliding window, kernel positions per slot and
// phase, first/last flags, the number of read slots per pass (every datum of
// each 4-row strip once, (n+2)*4*n/2 in total), the 8-clock group period in
// the steady state, and the fully connected read/beat order.
module tb_input_cu;
  import dcnn_pkg::*;
  localparam int L = 8, AW = 12;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, conv_mode = 1, busy, done, rd_en, w_ready = 1, w_take;
  logic [15:0] n = 4, fc_steps = 1;
  logic [AW-1:0] base = 0, rd_addr;
  sm_t rd_data[L];
  beat_t beat;
  sm_t act[L][NSLOT];
  sm_t mem[L][1 << AW];

  input_cu #(.L(L), .AW(AW)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (rd_en) for (int c = 0; c < L; c++) rd_data[c] <= mem[c][rd_addr];

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic sm_t pix(int c, int pr, int pc, int nn, int bs);
    if (pr < 1 || pc < 1 || pr > nn || pc > nn) return '0;
    return mem[c][bs + (pr - 1) * nn + (pc - 1)];
  endfunction

  int issued, cyc;
  always @(posedge clk) begin
    cyc++;
    if (dut.q_issue) issued++;
  end

  task automatic run_conv(input int nn, input int bs);
    int s, ph, g0_time[$], bad;
    int kpos[2][5] = '{'{1, 3, 4, 6, 0}, '{2, 5, 7, 8, 0}};
    issued = 0; s = 0; ph = 0; bad = 0;
    n = 16'(nn); base = AW'(bs); conv_mode = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk); #1;
      if (beat.valid) begin
        int st, g, rp, orow, ocol;
        st = s % 4; g = (s / 4) % (nn / 2); rp = s / (4 * (nn / 2));
        orow = 2 * rp + ((st == 1 || st == 2) ? 1 : 0);
        ocol = 2 * g + ((st >= 2) ? 1 : 0);
        if (st == 0 && ph == 0) g0_time.push_back(cyc);
        checks++;
        if (beat.phase != ph[0] || beat.first != (ph == 0) || beat.last != (ph == 1)) bad++;
        for (int c = 0; c < L; c++)
          for (int j = 0; j < 5; j++) begin
            int kr, kc;
            kr = kpos[ph][j] / 3; kc = kpos[ph][j] % 3;
            if (act[c][j] != pix(c, orow + kr, ocol + kc, nn, bs)) bad++;
          end
        if (ph == 1) s++;
        ph ^= 1;
      end
    end
    if (bad != 0) begin failures++; $display("FAIL conv n=%0d: %0d mismatches", nn, bad); end
    checks++;
    if (s != (nn / 2) * (nn / 2) * 4) begin failures++; $display("FAIL states %0d", s); end
    // Eq. (2) with P=2, S=1, K=3: (n+2) * 4 * n / 2 read slots
    checks++;
    if (issued != (nn + 2) * 4 * nn / 2) begin failures++; $display("FAIL reads %0d", issued); end
    // steady state: groups after the first of a strip start 8 clocks apart
    for (int i = 1; i < g0_time.size(); i++) begin
      if (i % (nn / 2) <= 1) continue;   // first two groups of a strip include the fill
      checks++;
      if (g0_time[i] - g0_time[i-1] != 8) begin
        failures++; $display("FAIL group period %0d at %0d", g0_time[i] - g0_time[i-1], i);
      end
    end
  endtask

  task automatic run_fc(input int steps, input int bs);
    int k, ph, takes, bad;
    k = 0; ph = 0; takes = 0; bad = 0;
    fc_steps = 16'(steps); base = AW'(bs); conv_mode = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk);
      if (w_take) takes++;
      #1;
      if (beat.valid) begin
        checks++;
        if (beat.first != (ph == 0 && k == 0) || beat.last != (ph == 1 && k == steps - 1)) bad++;
        for (int c = 0; c < L; c++)
          for (int j = 0; j < 4; j++)
            if (act[c][j] != mem[c][bs + 8 * k + 4 * ph + j]) bad++;
        if (ph == 1) k++;
        ph ^= 1;
      end
    end
    checks += 2;
    if (bad != 0 || k != steps) begin failures++; $display("FAIL fc bad=%0d k=%0d", bad, k); end
    if (takes != steps) begin failures++; $display("FAIL fc takes %0d", takes); end
  endtask

  initial begin
    for (int c = 0; c < L; c++) for (int a = 0; a < (1 << AW); a++) mem[c][a] = sm_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_conv(4, 0);
    run_conv(6, 100);
    run_conv(8, 7);
    run_conv(2, 33);
    run_fc(3, 5);
    run_fc(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

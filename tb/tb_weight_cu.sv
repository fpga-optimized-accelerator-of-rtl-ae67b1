// tb_weight_cu: a queue-modelled FIFO feeds numbered weight words; checks the
// ready/take ping-pong (the next bank fills while the active one is used),
// and the slot selection for both convolution phases and FC phases.
module tb_weight_cu;
  import dcnn_pkg::*;
  localparam int L = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, fifo_rd, ready, take = 0, conv_mode = 1, phase = 0;
  logic [L*DW-1:0] fifo_data[NK]; logic fifo_empty[NK];
  sm_t wt[NK][L][NSLOT];
  logic [L*DW-1:0] q[NK][$];
  int pushed = 0;
  weight_cu #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [L*DW-1:0] word(int k, int n);
    logic [L*DW-1:0] w;
    for (int c = 0; c < L; c++) w[c*DW +: DW] = DW'((n * 7 + k * 3 + c * 5) % 64);
    return w;
  endfunction

  always_comb for (int k = 0; k < NK; k++) begin
    fifo_empty[k] = (q[k].size() == 0);
    fifo_data[k]  = fifo_empty[k] ? '0 : q[k][0];
  end
  always @(posedge clk) if (fifo_rd) for (int k = 0; k < NK; k++) void'(q[k].pop_front());

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int conv_pos[2][5] = '{'{1, 3, 4, 6, 0}, '{2, 5, 7, 8, 0}};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      int wait_cyc;
      // push the 9 words of bank b, one every other clock
      for (int i = 0; i < 9; i++) begin
        @(negedge clk);
        for (int k = 0; k < NK; k++) q[k].push_back(word(k, b * 9 + i));
        @(negedge clk);
      end
      wait_cyc = 0;
      while (!ready && wait_cyc < 50) begin @(negedge clk); wait_cyc++; end
      checks++;
      if (!ready) failures++;
      take = 1; @(negedge clk); take = 0;
      checks++;
      if (ready) failures++;       // the new shadow bank starts empty
      conv_mode = (b % 2 == 0);
      for (int ph = 0; ph < 2; ph++) begin
        phase = ph[0]; #1;
        for (int k = 0; k < NK; k++) for (int c = 0; c < L; c++) for (int s = 0; s < NSLOT; s++) begin
          int widx;
          widx = conv_mode ? conv_pos[ph][s] : (s == 4 ? 8 : 4 * ph + s);
          checks++;
          if (wt[k][c][s] != word(k, b * 9 + widx)[c*DW +: DW]) begin
            failures++; if (failures < 5) $display("FAIL b=%0d k=%0d c=%0d s=%0d", b, k, c, s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

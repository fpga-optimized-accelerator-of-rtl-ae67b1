// tb_cov_fc_out: streams of two-beat output values with random products and
// side inputs. Checks the accumulated value at the FIFO port (to_fifo), the
// Q/A result two clocks after the last beat, and the 2x2 max-pooled result
// after every fourth value when pooling is on.
module tb_cov_fc_out;
  import dcnn_pkg::*;
  localparam int L = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, to_fifo = 0, pool_en = 0;
  beat_t beat; prod_t prod[L*4]; acc_t side; acc_t thr[NTHR];
  logic fifo_push, qa_valid, out_valid; acc_t fifo_data; logic [QW-1:0] qa_data, out_data;
  cov_fc_out #(.L(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int qa_ref(int a);
    int b = 0;
    for (int i = 0; i < NTHR; i++) if (a > int'(thr[i])) b++;
    return b;
  endfunction

  int exp_fifo[$], exp_qa[$], exp_out[$];
  // monitors
  always @(posedge clk) if (rst_n) begin
    if (fifo_push) begin
      checks++;
      if (exp_fifo.size() == 0 || int'(fifo_data) != exp_fifo.pop_front()) begin failures++; $display("FAIL fifo"); end
    end
    if (qa_valid) begin
      checks++;
      if (exp_qa.size() == 0 || int'(qa_data) != exp_qa.pop_front()) begin failures++; $display("FAIL qa"); end
    end
    if (out_valid) begin
      checks++;
      if (exp_out.size() == 0 || int'(out_data) != exp_out.pop_front()) begin failures++; $display("FAIL out"); end
    end
  end

  initial begin
    beat = '0; side = '0; prod = '{default: '0};
    for (int i = 0; i < NTHR; i++) thr[i] = acc_t'(-3000 + i * 200);
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int mode = 0; mode < 3; mode++) begin
      int pmax;
      to_fifo = (mode == 0); pool_en = (mode == 2);
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      pmax = 0;
      for (int v = 0; v < 40; v++) begin
        int sum;
        sum = 0;
        for (int ph = 0; ph < 2; ph++) begin
          beat.valid = 1; beat.phase = ph[0]; beat.first = (ph == 0); beat.last = (ph == 1);
          for (int i = 0; i < L*4; i++) begin prod[i] = prod_t'($urandom_range(0, 1922) - 961); sum += int'(prod[i]); end
          side = acc_t'($urandom_range(0, 2000) - 1000); sum += int'(side);
          if (ph == 1) begin
            // expected results are queued before the last beat is clocked in
            if (mode == 0) exp_fifo.push_back(sum);
            else begin
              int q;
              q = qa_ref(sum);
              exp_qa.push_back(q);
              if (mode == 1) exp_out.push_back(q);
              else begin
                if (q > pmax) pmax = q;
                if (v % 4 == 3) begin exp_out.push_back(pmax); pmax = 0; end
              end
            end
          end
          @(negedge clk);
          beat = '0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
      end
      repeat (5) @(negedge clk);
      checks++;
      if (exp_fifo.size() + exp_qa.size() + exp_out.size() != 0) begin failures++; $display("FAIL missing results mode %0d", mode); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

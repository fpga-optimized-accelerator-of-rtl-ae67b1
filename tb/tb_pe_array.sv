// tb_pe_array: random activations and weights in both modes; after one clock
// every product of rows 1/2 must equal act*weight for its kernel and slot, and
// row 3 must deliver position 0 of kernels 2*phase and 2*phase+1 for every
// channel in convolution mode and zero in FC mode.
module tb_pe_array;
  import dcnn_pkg::*;
  localparam int L = 8;
  int checks = 0, failures = 0;
  logic clk = 0, conv_mode;
  beat_t beat_in, beat_out;
  sm_t act[L][NSLOT]; sm_t wt[NK][L][NSLOT];
  prod_t fc_prod[NK][L][4]; prod_t only_prod[2][L];
  pe_array #(.L(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      sm_t a[L][NSLOT]; sm_t w[NK][L][NSLOT]; beat_t b; logic cm;
      @(negedge clk);
      cm = 1'($urandom); b = beat_t'($urandom); b.valid = 1;
      for (int c = 0; c < L; c++) for (int s = 0; s < NSLOT; s++) begin
        a[c][s] = sm_t'($urandom);
        for (int k = 0; k < NK; k++) w[k][c][s] = sm_t'($urandom);
      end
      act = a; wt = w; conv_mode = cm; beat_in = b;
      @(posedge clk); #1;
      checks++;
      if (beat_out != b) failures++;
      for (int c = 0; c < L; c++) begin
        for (int k = 0; k < NK; k++) for (int j = 0; j < 4; j++) begin
          checks++;
          if (int'(fc_prod[k][c][j]) != sm2int(a[c][j]) * sm2int(w[k][c][j])) failures++;
        end
        for (int s = 0; s < 2; s++) begin
          int exp;
          exp = cm ? sm2int(a[c][4]) * sm2int(w[2*b.phase+s][c][4]) : 0;
          checks++;
          if (int'(only_prod[s][c]) != exp) begin
            failures++; if (failures < 5) $display("FAIL row3 c=%0d s=%0d", c, s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

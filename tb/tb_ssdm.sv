// tb_ssdm: checks the SSDM unit (two independent sign-magnitude products from
// one multiplier) for 6-, 5- and 4-bit data against reference products.
module tb_ssdm;
  int checks = 0, failures = 0;

  logic [5:0] a6, b6, c6, d6; logic [9:0] p6, q6; logic ps6, qs6;
  logic [4:0] a5, b5, c5, d5; logic [7:0] p5, q5; logic ps5, qs5;
  logic [3:0] a4, b4, c4, d4; logic [5:0] p4, q4; logic ps4, qs4;

  ssdm #(.MW(5)) dut6 (.in1_sm(a6), .in2_sm(b6), .w1_sm(c6), .w2_sm(d6), .out1_mag(p6), .out2_mag(q6), .out1_sgn(ps6), .out2_sgn(qs6));
  ssdm #(.MW(4)) dut5 (.in1_sm(a5), .in2_sm(b5), .w1_sm(c5), .w2_sm(d5), .out1_mag(p5), .out2_mag(q5), .out1_sgn(ps5), .out2_sgn(qs5));
  ssdm #(.MW(3)) dut4 (.in1_sm(a4), .in2_sm(b4), .w1_sm(c4), .w2_sm(d4), .out1_mag(p4), .out2_mag(q4), .out1_sgn(ps4), .out2_sgn(qs4));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      if (t < 2) {a6, b6, c6, d6} = {4{6'h3f}};
      else {a6, b6, c6, d6} = 24'($urandom);
      {a5, b5, c5, d5} = 20'($urandom);
      {a4, b4, c4, d4} = 16'($urandom);
      #1;
      checks += 3;
      if (p6 != 10'(a6[4:0] * c6[4:0]) || q6 != 10'(b6[4:0] * d6[4:0]) ||
          ps6 != (a6[5] ^ c6[5]) || qs6 != (b6[5] ^ d6[5])) begin
        failures++; if (failures < 5) $display("FAIL 6b %h %h %h %h -> %0d %0d", a6, b6, c6, d6, p6, q6);
      end
      if (p5 != 8'(a5[3:0] * c5[3:0]) || q5 != 8'(b5[3:0] * d5[3:0]) || ps5 != (a5[4] ^ c5[4]) || qs5 != (b5[4] ^ d5[4])) failures++;
      if (p4 != 6'(a4[2:0] * c4[2:0]) || q4 != 6'(b4[2:0] * d4[2:0]) || ps4 != (a4[3] ^ c4[3]) || qs4 != (b4[3] ^ d4[3])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

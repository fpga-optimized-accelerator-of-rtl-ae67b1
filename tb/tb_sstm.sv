// tb_sstm: checks the SSTM unit against sign-magnitude reference products for
// the three widths of the packing table: 6-bit data x 3 weights (default),
// 4-bit x 4 and 8-bit x 2. Random operands plus the extreme magnitudes.
module tb_sstm;
  int checks = 0, failures = 0;

  logic [5:0] in6;  logic [5:0] w6[3];  logic [9:0]  m6[3];  logic s6[3];
  logic [3:0] in4;  logic [3:0] w4[4];  logic [5:0]  m4[4];  logic s4[4];
  logic [7:0] in8;  logic [7:0] w8[2];  logic [13:0] m8[2];  logic s8[2];

  sstm #(.MW(5), .NW(3)) dut6 (.in_sm(in6), .w_sm(w6), .out_mag(m6), .out_sgn(s6));
  sstm #(.MW(3), .NW(4)) dut4 (.in_sm(in4), .w_sm(w4), .out_mag(m4), .out_sgn(s4));
  sstm #(.MW(7), .NW(2)) dut8 (.in_sm(in8), .w_sm(w8), .out_mag(m8), .out_sgn(s8));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      in6 = (t < 4) ? 6'h1f : 6'($urandom); for (int i = 0; i < 3; i++) w6[i] = (t < 4) ? 6'h3f : 6'($urandom);
      in4 = 4'($urandom); for (int i = 0; i < 4; i++) w4[i] = 4'($urandom);
      in8 = 8'($urandom); for (int i = 0; i < 2; i++) w8[i] = 8'($urandom);
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (m6[i] != 10'(in6[4:0] * w6[i][4:0]) || s6[i] != (in6[5] ^ w6[i][5])) begin
          failures++; if (failures < 5) $display("FAIL 6b t=%0d i=%0d", t, i);
        end
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (m4[i] != 6'(in4[2:0] * w4[i][2:0]) || s4[i] != (in4[3] ^ w4[i][3])) failures++;
      end
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (m8[i] != 14'(in8[6:0] * w8[i][6:0]) || s8[i] != (in8[7] ^ w8[i][7])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_add_tree: random sums through trees of 256, 64 and 5 inputs.
module tb_add_tree;
  int checks = 0, failures = 0;
  logic signed [10:0] a[256]; logic signed [23:0] sa;
  logic signed [10:0] b[64];  logic signed [23:0] sb;
  logic signed [10:0] c[5];   logic signed [23:0] sc;
  add_tree #(.N(256), .IW(11), .OW(24)) d256 (.din(a), .sum(sa));
  add_tree #(.N(64),  .IW(11), .OW(24)) d64  (.din(b), .sum(sb));
  add_tree #(.N(5),   .IW(11), .OW(24)) d5   (.din(c), .sum(sc));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 300; t++) begin
      int ra, rb, rc;
      ra = 0; rb = 0; rc = 0;
      for (int i = 0; i < 256; i++) begin a[i] = (t == 0) ? -11'sd961 : 11'($urandom_range(0, 1922)) - 11'sd961; ra += int'(a[i]); end
      for (int i = 0; i < 64; i++)  begin b[i] = (t == 1) ?  11'sd961 : 11'($urandom_range(0, 1922)) - 11'sd961; rb += int'(b[i]); end
      for (int i = 0; i < 5; i++)   begin c[i] = 11'($urandom_range(0, 1922)) - 11'sd961; rc += int'(c[i]); end
      #1;
      checks += 3;
      if (int'(sa) != ra) begin failures++; $display("FAIL 256: %0d vs %0d", sa, ra); end
      if (int'(sb) != rb) failures++;
      if (int'(sc) != rc) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

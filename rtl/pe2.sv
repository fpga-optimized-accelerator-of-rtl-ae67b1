// pe2: PE2 unit, two SSDM units.
// SSDM s computes in[2s]*w[2s] and in[2s+1]*w[2s+1]; the two inputs of one
// SSDM may differ. Products are returned as two's complement. Combinational.
module pe2
  import dcnn_pkg::*;
(
  input  sm_t   in_sm[4],
  input  sm_t   w_sm [4],
  output prod_t prod [4]
);
  for (genvar s = 0; s < 2; s++) begin : g_ssdm
    logic [PW-1:0] m1, m2;
    logic          s1, s2;
    ssdm #(.MW(MW)) u_ssdm (
      .in1_sm(in_sm[2*s]), .in2_sm(in_sm[2*s+1]),
      .w1_sm (w_sm[2*s]),  .w2_sm (w_sm[2*s+1]),
      .out1_mag(m1), .out2_mag(m2), .out1_sgn(s1), .out2_sgn(s2));
    assign prod[2*s]   = sm_prod(s1, m1);
    assign prod[2*s+1] = sm_prod(s2, m2);
  end
endmodule

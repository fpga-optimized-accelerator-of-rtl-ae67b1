// pe3: PE3 unit of the first PE-array row, four SSTM units.
// SSTM j multiplies input slot j (in1..in4 of one channel) by the weights of
// the same slot for three kernels. Products are returned as two's complement
// so that the adder trees can sum them. Combinational.
module pe3
  import dcnn_pkg::*;
(
  input  sm_t   in_sm[4],        // slots in1..in4 of one channel
  input  sm_t   w_sm [3][4],     // [kernel][slot]
  output prod_t prod [3][4]      // [kernel][slot]
);
  for (genvar j = 0; j < 4; j++) begin : g_sstm
    sm_t            w_col[3];
    logic [PW-1:0]  mag[3];
    logic           sgn[3];
    always_comb for (int k = 0; k < 3; k++) w_col[k] = w_sm[k][j];
    sstm #(.MW(MW), .NW(3)) u_sstm (.in_sm(in_sm[j]), .w_sm(w_col), .out_mag(mag), .out_sgn(sgn));
    always_comb for (int k = 0; k < 3; k++) prod[k][j] = sm_prod(sgn[k], mag[k]);
  end
endmodule

// ssdm: Signed-Signed Double Multiplication unit.
// Two independent products in1*w1 and in2*w2 from a single wide multiplier.
// The input magnitudes are packed as {in1, 3*MW zeros, in2} (25 bits for 6-bit
// data) and the weight magnitudes as {w1, MW zeros, w2} (15 bits). The wide
// product is in1*w1*2^(6MW) + in1*w2*2^(4MW) + in2*w1*2^(2MW) + in2*w2, whose
// 2MW-bit fields do not overlap: out1 is the top field, out2 the bottom one,
// and the two middle fields (cross terms) are discarded. Signs are the XOR of
// the sign bits. Default widths follow the source (25 x 15 -> 40 bits); its
// Table 3 widths follow from MW = 3 and 4. Purely combinational.
module ssdm #(
  parameter int MW = 5
) (
  input  logic [MW:0]     in1_sm, in2_sm,
  input  logic [MW:0]     w1_sm,  w2_sm,
  output logic [2*MW-1:0] out1_mag, out2_mag,
  output logic            out1_sgn, out2_sgn
);
  localparam int AW = 5 * MW;   // packed input width
  localparam int BW = 3 * MW;   // packed weight width
  localparam int PWK = 8 * MW;  // product width

  logic [AW-1:0]  a;
  logic [BW-1:0]  b;
  logic [PWK-1:0] prod;

  always_comb begin
    a = {in1_sm[MW-1:0], {(3*MW){1'b0}}, in2_sm[MW-1:0]};
    b = {w1_sm[MW-1:0], {MW{1'b0}}, w2_sm[MW-1:0]};
    prod = PWK'(a) * PWK'(b);
    out1_mag = prod[PWK-1 -: 2*MW];
    out2_mag = prod[2*MW-1:0];
    out1_sgn = in1_sm[MW] ^ w1_sm[MW];
    out2_sgn = in2_sm[MW] ^ w2_sm[MW];
  end
endmodule

// sstm: Signed-Signed Three Multiplication unit (generalised to NW products).
// One input datum is multiplied by NW weights with a single wide multiplier,
// as a DSP slice would do it. Operands are sign-magnitude: the product signs
// are the XOR of the sign bits, and the magnitudes are multiplied at once by
// packing the NW weight magnitudes with MW zero bits between neighbours
// ({w1, 0, w2, 0, w3} for the 6-bit default). Each partial product is below
// 2^(2*MW), so the fields of the wide product do not overlap and out_i is
// read straight from bits [(NW-1-i)*2MW +: 2MW]. Defaults follow the source
// (6-bit data, three weights, 25-bit packed weight, 30-bit product); other
// widths of its Table 2 are reached with MW=3/NW=4 and MW=7/NW=2.
// Purely combinational; the registering is done by the PE array.
module sstm #(
  parameter int MW = 5,
  parameter int NW = 3
) (
  input  logic [MW:0]     in_sm,           // sign-magnitude input
  input  logic [MW:0]     w_sm   [NW],     // sign-magnitude weights w1..wNW
  output logic [2*MW-1:0] out_mag[NW],     // product magnitudes
  output logic            out_sgn[NW]      // product signs (out_flag)
);
  localparam int WPK = (2 * NW - 1) * MW;  // packed weight width
  localparam int PPK = 2 * NW * MW;        // packed product width

  logic [WPK-1:0] wpk;
  logic [PPK-1:0] prod;

  always_comb begin
    wpk = '0;
    for (int i = 0; i < NW; i++)
      wpk[(NW-1-i)*2*MW +: MW] = w_sm[i][MW-1:0];
    prod = PPK'(in_sm[MW-1:0]) * PPK'(wpk);
    for (int i = 0; i < NW; i++) begin
      out_mag[i] = prod[(NW-1-i)*2*MW +: 2*MW];
      out_sgn[i] = in_sm[MW] ^ w_sm[i][MW];
    end
  end
endmodule

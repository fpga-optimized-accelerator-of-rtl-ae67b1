// add_tree: balanced binary addition tree of N signed inputs.
// Used with N=256 (COV_FC_OUT) and N=64 (COV_ONLY_OUT). Inputs are
// sign-extended to OW bits and zero-padded to the next power of two; level
// l+1 adds neighbouring pairs of level l. Purely combinational (the source
// does not describe pipelining inside the tree).
module add_tree #(
  parameter int N  = 256,
  parameter int IW = 11,
  parameter int OW = 24
) (
  input  logic signed [IW-1:0] din[N],
  output logic signed [OW-1:0] sum
);
  localparam int LV = (N > 1) ? $clog2(N) : 1;
  localparam int NP = 1 << LV;

  logic signed [OW-1:0] lvl[LV+1][NP];

  always_comb begin
    lvl = '{default: '0};
    for (int i = 0; i < N; i++) lvl[0][i] = OW'(din[i]);
    for (int l = 0; l < LV; l++)
      for (int i = 0; i < (NP >> (l + 1)); i++)
        lvl[l+1][i] = lvl[l][2*i] + lvl[l][2*i+1];
    sum = lvl[LV][0];
  end
endmodule

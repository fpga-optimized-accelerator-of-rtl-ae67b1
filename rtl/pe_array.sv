// pe_array: the calculation unit, three rows of PEs.
//   row 1: LANES PE3 units   -> kernels 0..2, slots in1..in4 of every channel
//   row 2: LANES PE2 units   -> kernel 3,    slots in1..in4 of every channel
//   row 3: LANES/2 PE2 units -> slot in5 (kernel position 0), convolution only
// Rows 1 and 2 see the same input data per column and different weights. In
// convolution mode a 3x3 window is processed in two clocks (positions
// 1,3,4,6 then 2,5,7,8 in slots in1..in4, position 0 in in5 both clocks); the
// 128 multipliers of row 3 cover the 256 position-0 products over the two
// clocks: in phase p, PE2 u multiplies channels 2u and 2u+1 by the weights of
// kernels 2p (SSDM 0) and 2p+1 (SSDM 1). This split of row 3 between the two
// clocks is this design's choice; the source gives only the unit counts. In
// FC mode row 3 is idle (its inputs are forced to zero).
// All products and the side-band are registered once (latency 1 clock).
module pe_array
  import dcnn_pkg::*;
#(
  parameter int L = LANES
) (
  input  logic  clk,
  input  logic  conv_mode,
  input  beat_t beat_in,
  input  sm_t   act[L][NSLOT],          // [channel][slot in1..in5]
  input  sm_t   wt [NK][L][NSLOT],      // [kernel][channel][slot]
  output beat_t beat_out,
  output prod_t fc_prod  [NK][L][4],    // [kernel][channel][slot] rows 1-2
  output prod_t only_prod[2][L]         // [SSDM s -> kernel 2*phase+s][channel] row 3
);
  prod_t r1 [3][L][4];
  prod_t r2 [L][4];
  prod_t r3 [L/2][4];

  for (genvar c = 0; c < L; c++) begin : g_col
    sm_t a4[4];
    sm_t w3[3][4];
    sm_t w1[4];
    prod_t p3[3][4];
    always_comb begin
      for (int j = 0; j < 4; j++) begin
        a4[j] = act[c][j];
        w1[j] = wt[3][c][j];
        for (int k = 0; k < 3; k++) w3[k][j] = wt[k][c][j];
      end
    end
    pe3 u_pe3 (.in_sm(a4), .w_sm(w3), .prod(p3));
    pe2 u_pe2 (.in_sm(a4), .w_sm(w1), .prod(r2[c]));
    always_comb for (int k = 0; k < 3; k++) for (int j = 0; j < 4; j++) r1[k][c][j] = p3[k][j];
  end

  for (genvar u = 0; u < L/2; u++) begin : g_row3
    sm_t a[4];
    sm_t w[4];
    always_comb begin
      if (conv_mode && beat_in.valid) begin
        a[0] = act[2*u][4];   a[1] = act[2*u+1][4];
        a[2] = act[2*u][4];   a[3] = act[2*u+1][4];
        w[0] = wt[{beat_in.phase, 1'b0}][2*u][4];
        w[1] = wt[{beat_in.phase, 1'b0}][2*u+1][4];
        w[2] = wt[{beat_in.phase, 1'b1}][2*u][4];
        w[3] = wt[{beat_in.phase, 1'b1}][2*u+1][4];
      end else begin
        a = '{default: '0};
        w = '{default: '0};
      end
    end
    pe2 u_pe2 (.in_sm(a), .w_sm(w), .prod(r3[u]));
  end

  always_ff @(posedge clk) begin
    beat_out <= beat_in;
    for (int c = 0; c < L; c++)
      for (int j = 0; j < 4; j++) begin
        for (int k = 0; k < 3; k++) fc_prod[k][c][j] <= r1[k][c][j];
        fc_prod[3][c][j] <= r2[c][j];
      end
    for (int u = 0; u < L/2; u++) begin
      only_prod[0][2*u]   <= r3[u][0];
      only_prod[0][2*u+1] <= r3[u][1];
      only_prod[1][2*u]   <= r3[u][2];
      only_prod[1][2*u+1] <= r3[u][3];
    end
  end
endmodule

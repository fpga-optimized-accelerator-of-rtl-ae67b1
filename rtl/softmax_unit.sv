// softmax_unit: label of the largest output of the last layer (arg-max).
// Results arrive four at a time (one per COV_FC_OUT). Clock 1 compares
// data1/data2 and data3/data4, clock 2 compares the two winners
// (group_now_max and its label), clock 3 compares that with the maximum of
// the earlier groups held in MAX TEMP. After the group numbered
// n_groups-1 the overall maximum and its label are output. Outputs whose
// index is n_valid or above (padding of the last group, e.g. 10 classes in
// three groups of four) never win; on a tie the lower index wins.
module softmax_unit
  import dcnn_pkg::*;
#(
  parameter int LBW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           in_valid,
  input  logic [QW-1:0]  din[4],
  input  logic [LBW-1:0] n_groups,
  input  logic [LBW-1:0] n_valid,
  output logic           label_valid,
  output logic [LBW-1:0] label,
  output logic [QW-1:0]  data_max
);
  typedef struct packed {
    logic           ok;     // entry takes part in the comparison
    logic [QW-1:0]  val;
    logic [LBW-1:0] lab;
  } cand_t;

  function automatic cand_t pick(input cand_t x, input cand_t y);
    if (!y.ok) return x;
    if (!x.ok) return y;
    return (y.val > x.val) ? y : x;
  endfunction

  logic [LBW-1:0] grp_in;              // group number of the incoming data
  cand_t          s1[2];
  logic           v1, v2, last1, last2;
  cand_t          now_max, past_max;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp_in <= '0; v1 <= 1'b0; v2 <= 1'b0; last1 <= 1'b0; last2 <= 1'b0;
      s1 <= '{default: '0}; now_max <= '0; past_max <= '0;
      label_valid <= 1'b0; label <= '0; data_max <= '0;
    end else begin
      label_valid <= 1'b0;
      if (clear) begin
        grp_in <= '0; v1 <= 1'b0; v2 <= 1'b0; past_max <= '0;
      end else begin
        // clock 1: two comparators
        v1 <= in_valid;
        if (in_valid) begin
          cand_t c[4];
          for (int i = 0; i < 4; i++) begin
            c[i].lab = LBW'(grp_in * 4 + LBW'(i));
            c[i].val = din[i];
            c[i].ok  = (c[i].lab < n_valid);
          end
          s1[0] <= pick(c[0], c[1]);
          s1[1] <= pick(c[2], c[3]);
          last1 <= (grp_in == n_groups - 1'b1);
          grp_in <= (grp_in == n_groups - 1'b1) ? '0 : grp_in + 1'b1;
        end
        // clock 2: group_now_max
        v2 <= v1;
        if (v1) begin
          now_max <= pick(s1[0], s1[1]);
          last2   <= last1;
        end
        // clock 3: compare with MAX TEMP, output on the last group
        if (v2) begin
          cand_t best;
          best = pick(past_max, now_max);
          past_max <= last2 ? cand_t'('0) : best;
          if (last2) begin
            label_valid <= 1'b1;
            label       <= best.lab;
            data_max    <= best.val;
          end
        end
      end
    end
  end
endmodule

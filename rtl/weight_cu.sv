// weight_cu: WEIGHT CU, ping-pong weight banks between the weight FIFOs and
// the PE array.
// Each of the NK weight FIFOs (one per kernel / output neuron) delivers words
// of one 6-bit weight for each of the L channels. A bank holds NPOS = 9 such
// words per kernel: the 3x3 positions 0..8 of a convolution pass, or the
// 8 weight words of one fully connected step (word 8 is then a filler the
// weight stream must contain). While the PE array uses the active bank, the
// other bank is filled from the FIFOs (one word per kernel per clock, when
// all NK FIFOs hold data); 'ready' says it is full, and a 'take' pulse swaps
// the banks and starts refilling. The fixed bank size and filler word are
// this design's choice. The slot multiplexer is combinational on the phase of
// the beat being sent:
//   convolution, phase 0: in1..in5 = positions 1,3,4,6,0
//   convolution, phase 1: in1..in5 = positions 2,5,7,8,0
//   FC,          phase p: in1..in4 = words 4p..4p+3, in5 = word 8
module weight_cu
  import dcnn_pkg::*;
#(
  parameter int L = LANES
) (
  input  logic          clk,
  input  logic          rst_n,
  // weight FIFO read side
  input  logic [L*DW-1:0] fifo_data [NK],
  input  logic          fifo_empty[NK],
  output logic          fifo_rd,           // one word from every FIFO
  // bank handshake with INPUT CU
  output logic          ready,
  input  logic          take,
  // selection
  input  logic          conv_mode,
  input  logic          phase,
  output sm_t           wt[NK][L][NSLOT]
);
  sm_t        bank[2][NK][NPOS][L];
  logic       act;                     // active bank
  logic [3:0] fill;                    // words in the shadow bank
  logic       any_empty;

  always_comb begin
    any_empty = 1'b0;
    for (int k = 0; k < NK; k++) any_empty |= fifo_empty[k];
  end

  assign ready   = (fill == 4'(NPOS));
  assign fifo_rd = !ready && !any_empty;

  always_ff @(posedge clk) begin
    if (fifo_rd)
      for (int k = 0; k < NK; k++)
        for (int c = 0; c < L; c++)
          bank[~act][k][fill][c] <= fifo_data[k][c*DW +: DW];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act  <= 1'b0;
      fill <= '0;
    end else if (take) begin
      act  <= ~act;
      fill <= '0;
    end else if (fifo_rd) begin
      fill <= fill + 4'd1;
    end
  end

  // slot -> stored word index
  function automatic int unsigned word_of(input logic cm, input logic ph, input int unsigned slot);
    if (slot == 4) return cm ? 0 : 8;
    if (!cm) return ph ? 4 + slot : slot;
    case ({ph, 2'(slot)})
      3'b000: return 1;  3'b001: return 3;  3'b010: return 4;  3'b011: return 6;
      3'b100: return 2;  3'b101: return 5;  3'b110: return 7;  default: return 8;
    endcase
  endfunction

  always_comb
    for (int k = 0; k < NK; k++)
      for (int c = 0; c < L; c++)
        for (int s = 0; s < NSLOT; s++)
          wt[k][c][s] = bank[act][k][word_of(conv_mode, phase, s)][c];

  a_take_when_ready: assert property (@(posedge clk) disable iff (!rst_n) take |-> ready);
endmodule

// top_cu: TOP CU, the three nested loops of the accelerator.
// For every layer i of the layer table (outer loop), for every group j of four
// kernels / output neurons (middle loop), and in convolution for every group
// k of 64 input channels (inner loop), it loads the bias and thresholds of
// the four kernels (B_Q CU), then starts one INPUT CU pass and waits for it
// and the output pipeline (DRAIN clocks) to finish. An FC layer runs one pass
// per group j, the pass covering all fc_steps input steps. The control levels
// of the OUTPUT CU follow from k: the first channel group adds the bias, later
// ones the FIFO partial sums; all but the last channel group write partial
// sums to the FIFO, the last one goes through Q/A (and pooling). The RAM
// group parity flips every layer. The layer table is written by the host.
module top_cu
  import dcnn_pkg::*;
#(
  parameter int AW     = 16,
  parameter int ROM_AW = 14,
  parameter int DRAIN  = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          lt_we,
  input  logic [3:0]    lt_addr,
  input  layer_t        lt_data,
  input  logic          start,
  input  logic [4:0]    layer_num,
  output logic          busy,
  output logic          done,
  // current layer
  output layer_t        cur,
  output logic          parity,
  output logic [15:0]   kgroup,
  // B_Q CU
  output logic          bq_start,
  output logic [ROM_AW-1:0] bq_base,
  input  logic          bq_ready,
  // INPUT CU
  output logic          ic_start,
  output logic [AW-1:0] ic_base,
  input  logic          ic_done,
  // OUTPUT CU levels
  output logic          oc_clear,
  output logic          use_fifo,
  output logic          to_fifo,
  output logic          sm_en,
  output logic          sm_clear
);
  typedef enum logic [2:0] {IDLE, LAYER, JSTART, JWAIT, KSTART, KRUN, KDRAIN, NEXT} st_e;
  st_e         st;
  layer_t      table_mem[16];
  logic [4:0]  li;
  logic [15:0] kc;
  logic [7:0]  dcnt;

  always_ff @(posedge clk) if (lt_we) table_mem[lt_addr] <= lt_data;

  assign busy     = (st != IDLE);
  assign parity   = li[0];
  assign use_fifo = cur.conv && (kc != 0);
  assign to_fifo  = cur.conv && (kc != cur.cin_groups - 1);
  assign sm_en    = !cur.conv && (li == layer_num - 1);
  assign bq_base  = ROM_AW'(cur.rom_base + kgroup * 16'(NK));
  assign ic_base  = cur.conv ? AW'(32'(kc) * 32'(cur.n) * 32'(cur.n)) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; li <= '0; kc <= '0; kgroup <= '0; dcnt <= '0; cur <= '0;
      done <= 1'b0; bq_start <= 1'b0; ic_start <= 1'b0; oc_clear <= 1'b0; sm_clear <= 1'b0;
    end else begin
      done <= 1'b0; bq_start <= 1'b0; ic_start <= 1'b0; oc_clear <= 1'b0; sm_clear <= 1'b0;
      unique case (st)
        IDLE:   if (start) begin li <= '0; st <= LAYER; end
        LAYER:  begin cur <= table_mem[li[3:0]]; kgroup <= '0; sm_clear <= 1'b1; st <= JSTART; end
        JSTART: begin bq_start <= 1'b1; kc <= '0; st <= JWAIT; end
        JWAIT:  if (bq_ready && !bq_start) st <= KSTART;
        KSTART: begin ic_start <= 1'b1; oc_clear <= 1'b1; st <= KRUN; end
        KRUN:   if (ic_done) begin dcnt <= 8'(DRAIN); st <= KDRAIN; end
        KDRAIN: if (dcnt == 0) st <= NEXT; else dcnt <= dcnt - 8'd1;
        NEXT: begin
          if (cur.conv && kc != cur.cin_groups - 1) begin
            kc <= kc + 1; st <= KSTART;
          end else if (kgroup != cur.kgroups - 1) begin
            kgroup <= kgroup + 1; st <= JSTART;
          end else if (li != layer_num - 1) begin
            li <= li + 1; st <= LAYER;
          end else begin
            done <= 1'b1; st <= IDLE;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

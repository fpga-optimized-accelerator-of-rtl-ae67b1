// input_cu: INPUT CU, reads activations for all L channels in parallel.
//
// Convolution (3x3, stride 1, one pixel of zero padding) uses the circular
// sliding window (CSW) order: the window moves down, right, up, right, so
// that four window states r1..r4 cover a 2x2 block of outputs and the next
// group of four states starts two columns further right. Each row pair of
// outputs is produced from a 4-row strip of the padded image; every datum
// of the strip is read from RAM exactly once, one address per clock for all
// L channels: 16 reads for the first group of a strip, then 8 per group
// (3 + 1 + 3 + 1 new data for r1..r4). Read data land in a 4x4 register
// window per channel, indexed by (strip row, column mod 4). A read replaces
// the datum four columns to its left, so it may only be issued once every
// state using that datum has been sent: this allows the reads of r1 and r3 to
// run two states ahead of the state being sent and those of r2 and r4 three
// states ahead, which keeps the steady state at 8 clocks per group, equal to
// the compute rate. A new strip starts reading only after the previous strip
// has been sent.
//
// Every window state is sent to the PE array in two beats (registered
// outputs): phase 0 carries kernel positions 1,3,4,6 in slots in1..in4,
// phase 1 positions 2,5,7,8, and slot in5 carries position 0 in both beats.
// Padding positions are read as zero without a RAM access but still take
// their clock. The output order is, per group, (row 0,col 0), (row 1,col 0),
// (row 1,col 1), (row 0,col 1) of the 2x2 block, so 2x2 pooling can follow
// directly. The image size n must be even.
//
// Fully connected layers: each step reads FCW = 8 consecutive addresses
// (8 x L input neurons, address-major) and sends them in two beats of
// 4 x L neurons; the step count is given at start.
//
// The weight bank is taken (w_take) at the first beat of a convolution pass
// and at the first beat of every FC step. RAM read latency is one clock.
// The register-window indexing, the lookahead rule and the FC read order are
// this design's choices; the state sequence and beat contents follow the
// source.
module input_cu
  import dcnn_pkg::*;
#(
  parameter int L  = LANES,
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          conv_mode,
  input  logic [15:0]   n,            // input feature-map size (unpadded)
  input  logic [AW-1:0] base,         // RAM address of this channel group / FC input
  input  logic [15:0]   fc_steps,     // FC: number of 512-neuron steps
  output logic          busy,
  output logic          done,         // one-clock pulse after the last beat
  // RAM group read port (shared address, L lanes)
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  sm_t           rd_data[L],
  // weight bank handshake
  input  logic          w_ready,
  output logic          w_take,
  // beats to the PE array
  output beat_t         beat,
  output sm_t           act[L][NSLOT]
);
  typedef enum logic [2:0] {IDLE, CONV, FC_RD, FC_WAIT, FC_EMIT} mode_e;
  mode_e mode;

  sm_t win  [L][4][4];        // CSW register window [lane][strip row][col mod 4]
  sm_t fcbuf[L][FCW];

  logic [15:0] groups;        // groups per strip = strips = n/2
  logic [31:0] total;         // window states in the pass

  // read side
  logic [15:0] r_rp, r_g;
  logic [1:0]  r_st;
  logic [3:0]  r_idx;
  logic [31:0] r_flat;
  logic        r_active;
  // landing side (one clock after issue)
  logic        l_v, l_pad, l_last;
  logic [1:0]  l_row, l_col;
  logic [3:0]  l_fcidx;
  logic [31:0] landed;        // states whose data are all in the window
  // send side
  logic [15:0] c_g;
  logic [1:0]  c_st;
  logic        c_ph;
  logic [31:0] c_flat;
  logic [15:0] fc_k;
  logic [3:0]  fc_i;

  // ---- read address generation --------------------------------------------
  logic [1:0]  q_row;
  logic [15:0] q_col;
  logic [3:0]  q_len;
  logic [15:0] q_prow;
  logic        q_pad, q_issue;

  always_comb begin
    q_row = '0; q_col = '0; q_len = 4'd1;
    unique case (r_st)
      2'd0: if (r_g == 0) begin
              q_len = 4'd9;
              q_row = 2'(r_idx % 4'd3);
              q_col = 16'(r_idx / 4'd3);
            end else begin
              q_len = 4'd3; q_row = r_idx[1:0]; q_col = 16'(2 * r_g + 2);
            end
      2'd1: if (r_g == 0) begin
              q_len = 4'd3; q_row = 2'd3; q_col = 16'(r_idx);
            end else begin
              q_len = 4'd1; q_row = 2'd3; q_col = 16'(2 * r_g + 2);
            end
      2'd2: begin q_len = 4'd3; q_row = 2'(r_idx + 1); q_col = 16'(2 * r_g + 3); end
      default: begin q_len = 4'd1; q_row = 2'd0; q_col = 16'(2 * r_g + 3); end
    endcase
    q_prow = 16'(2 * r_rp) + 16'(q_row);
    q_pad  = (q_prow == 0) || (q_prow == n + 1) || (q_col == 0) || (q_col == n + 1);
    // lookahead: reads of r1/r3 may run two states ahead of the state being
    // sent, reads of r2/r4 three (see header); a new strip waits for the old
    // one to be sent
    q_issue = (mode == CONV) && r_active && (r_flat <= c_flat + (r_st[0] ? 3 : 2)) &&
              !(r_g == 0 && r_st == 0 && r_rp != 0 && c_flat != r_flat);
  end

  always_comb begin
    rd_en   = 1'b0;
    rd_addr = '0;
    if (q_issue && !q_pad) begin
      rd_en   = 1'b1;
      rd_addr = base + AW'(32'(q_prow - 16'd1) * 32'(n) + 32'(q_col - 16'd1));
    end else if (mode == FC_RD) begin
      rd_en   = 1'b1;
      rd_addr = base + AW'(fc_k * FCW + 16'(fc_i));
    end
  end

  // ---- send side ------------------------------------------------------------
  logic       c_ro;
  logic [1:0] c_co;
  logic       can_send;
  assign c_ro = (c_st == 2'd1) || (c_st == 2'd2);
  assign c_co = 2'(2 * c_g + ((c_st >= 2'd2) ? 1 : 0));
  assign can_send = (mode == CONV) && (landed > c_flat) && (c_flat != 0 || c_ph || w_ready);
  assign w_take = (can_send && c_flat == 0 && !c_ph) || (mode == FC_EMIT && !c_ph && w_ready);
  assign busy = (mode != IDLE);

  function automatic sm_t wpos(input sm_t w[4][4], input logic ro, input logic [1:0] co,
                               input int kr, input int kc);
    return w[2'(int'(ro) + kr)][2'(int'(co) + kc)];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= IDLE; done <= 1'b0; beat <= '0;
      groups <= '0; total <= '0;
      r_rp <= '0; r_g <= '0; r_st <= '0; r_idx <= '0; r_flat <= '0; r_active <= 1'b0;
      l_v <= 1'b0; l_pad <= 1'b0; l_last <= 1'b0; l_row <= '0; l_col <= '0; l_fcidx <= '0;
      landed <= '0;
      c_g <= '0; c_st <= '0; c_ph <= 1'b0; c_flat <= '0;
      fc_k <= '0; fc_i <= '0;
    end else begin
      done <= 1'b0;
      beat <= '0;
      l_v  <= 1'b0;
      l_last <= 1'b0;
      unique case (mode)
        IDLE: if (start) begin
          groups <= n >> 1;
          total  <= 32'(n >> 1) * 32'(n >> 1) * 4;
          r_rp <= '0; r_g <= '0; r_st <= '0; r_idx <= '0; r_flat <= '0;
          landed <= '0; c_g <= '0; c_st <= '0; c_ph <= 1'b0; c_flat <= '0;
          fc_k <= '0; fc_i <= '0;
          r_active <= conv_mode;
          mode <= conv_mode ? CONV : FC_RD;
        end
        CONV: begin
          if (q_issue) begin
            l_v <= 1'b1; l_pad <= q_pad; l_row <= q_row; l_col <= q_col[1:0];
            l_last <= (r_idx == q_len - 1);
            if (r_idx == q_len - 1) begin
              r_idx  <= '0;
              r_flat <= r_flat + 1;
              r_st   <= r_st + 2'd1;
              if (r_st == 2'd3) begin
                if (r_g == groups - 1) begin
                  r_g <= '0;
                  if (r_rp == groups - 1) r_active <= 1'b0;
                  else r_rp <= r_rp + 1;
                end else r_g <= r_g + 1;
              end
            end else r_idx <= r_idx + 4'd1;
          end
          if (l_v && l_last) landed <= landed + 1;
          if (can_send) begin
            beat.valid <= 1'b1;
            beat.phase <= c_ph;
            beat.first <= !c_ph;
            beat.last  <= c_ph;
            c_ph <= ~c_ph;
            if (c_ph) begin
              c_flat <= c_flat + 1;
              c_st   <= c_st + 2'd1;
              if (c_st == 2'd3) c_g <= (c_g == groups - 1) ? '0 : c_g + 1;
              if (c_flat + 1 == total) begin
                mode <= IDLE;
                done <= 1'b1;
              end
            end
          end
        end
        FC_RD: begin
          l_v <= 1'b1; l_pad <= 1'b0; l_fcidx <= fc_i;
          fc_i <= fc_i + 4'd1;
          if (fc_i == 4'(FCW - 1)) mode <= FC_WAIT;
        end
        FC_WAIT: mode <= FC_EMIT;
        FC_EMIT: if (c_ph || w_ready) begin
          beat.valid <= 1'b1;
          beat.phase <= c_ph;
          beat.first <= !c_ph && fc_k == 0;
          beat.last  <= c_ph && fc_k == fc_steps - 1;
          c_ph <= ~c_ph;
          if (c_ph) begin
            fc_i <= '0;
            fc_k <= fc_k + 1;
            if (fc_k == fc_steps - 1) begin
              mode <= IDLE;
              done <= 1'b1;
            end else mode <= FC_RD;
          end
        end
        default: mode <= IDLE;
      endcase
    end
  end

  // data registers: window / FC buffer writes and beat contents
  always_ff @(posedge clk) begin
    if (l_v) begin
      for (int c = 0; c < L; c++) begin
        if (mode == CONV) win[c][l_row][l_col] <= l_pad ? '0 : rd_data[c];
        else              fcbuf[c][l_fcidx[2:0]] <= rd_data[c];
      end
    end
    for (int c = 0; c < L; c++) begin
      if (mode == CONV && can_send) begin
        if (!c_ph) begin
          act[c][0] <= wpos(win[c], c_ro, c_co, 0, 1);
          act[c][1] <= wpos(win[c], c_ro, c_co, 1, 0);
          act[c][2] <= wpos(win[c], c_ro, c_co, 1, 1);
          act[c][3] <= wpos(win[c], c_ro, c_co, 2, 0);
        end else begin
          act[c][0] <= wpos(win[c], c_ro, c_co, 0, 2);
          act[c][1] <= wpos(win[c], c_ro, c_co, 1, 2);
          act[c][2] <= wpos(win[c], c_ro, c_co, 2, 1);
          act[c][3] <= wpos(win[c], c_ro, c_co, 2, 2);
        end
        act[c][4] <= wpos(win[c], c_ro, c_co, 0, 0);
      end else if (mode == FC_EMIT && (c_ph || w_ready)) begin
        for (int j = 0; j < 4; j++) act[c][j] <= fcbuf[c][{c_ph, 2'(j)}];
        act[c][4] <= '0;
      end
    end
  end
endmodule

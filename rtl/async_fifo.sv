// async_fifo: dual-clock first-word-fall-through FIFO for the weight stream.
// The DDR4 side writes at its own clock, the accelerator reads at the
// accelerator clock (FIFO1..FIFO4 between DDR4 and WEIGHT CU). Classic Gray
// code pointers with two-flop synchronisers; depth 2^AW. rdata shows the
// oldest word while rempty is low; rinc removes it. Depth and word width are
// this design's choices (one word = one weight for each of 64 channels).
module async_fifo #(
  parameter int W  = 384,
  parameter int AW = 4
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         winc,
  input  logic [W-1:0] wdata,
  output logic         wfull,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rinc,
  output logic [W-1:0] rdata,
  output logic         rempty
);
  logic [W-1:0] mem[1 << AW];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer in the read domain
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_n = wbin + (AW+1)'(winc && !wfull);
  assign rbin_n = rbin + (AW+1)'(rinc && !rempty);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk) if (winc && !wfull) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; wfull <= 1'b0;
    end else begin
      wbin  <= wbin_n;
      wgray <= b2g(wbin_n);
      {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
      wfull <= (b2g(wbin_n) == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0; rempty <= 1'b1;
    end else begin
      rbin  <= rbin_n;
      rgray <= b2g(rbin_n);
      {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
      rempty <= (b2g(rbin_n) == wgray_r2);
    end
  end
endmodule

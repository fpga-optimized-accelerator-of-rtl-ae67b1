// tb_async_fifo: a writer at one clock and a reader at an unrelated slower or
// faster clock; every word must come out once, in order, and the full/empty
// flags must stop overflow and underflow.
module tb_async_fifo;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, winc = 0, rinc = 0, wfull, rempty;
  logic [15:0] wdata, rdata;
  int wcount = 0, rcount = 0;
  localparam int NW = 2000;
  async_fifo #(.W(16), .AW(3)) dut (.*);
  always #3 wclk = ~wclk;
  always #7 rclk = ~rclk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wdata = 0;
    #20 wrst_n = 1; rrst_n = 1;
  end
  always @(posedge wclk) if (wrst_n) begin
    if (winc && !wfull) begin wcount++; end
    #1;
    winc  = (wcount < NW) && ($urandom_range(0, 3) != 0);
    wdata = 16'(wcount * 7 + 3);
  end
  always @(posedge rclk) if (rrst_n) begin
    #1;
    if (!rempty && ($urandom_range(0, 4) != 0 || rcount > NW/2)) begin
      checks++;
      if (rdata != 16'(rcount * 7 + 3)) begin failures++; if (failures < 5) $display("FAIL %0d: %0d", rcount, rdata); end
      rinc = 1; rcount++;
    end else rinc = 0;
    if (rcount == NW) begin
      @(posedge rclk); #1; rinc = 0;
      repeat (5) @(posedge rclk);
      checks++;
      if (!rempty) failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

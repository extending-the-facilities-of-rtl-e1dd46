// tb_async_fifo: writes a numbered sequence at one clock and reads it at an
// unrelated slower or faster clock with random enables; checks order, no
// loss, full and empty behaviour, and the read-side level.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_async_fifo;
  localparam int W = 32, DL = 4;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #3.1 wclk = ~wclk;
  always #3.9 rclk = ~rclk;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic full, empty;
  logic [DL:0] rlevel;
  int checks = 0, failures = 0;

  async_fifo #(.W(W), .DEPTH_LOG2(DL)) dut (.*);

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nw = 0, nr = 0, nfull = 0;
  localparam int N = 2000;

  // writer
  initial begin
    #20 wrst_n = 1;
    while (nw < N) begin
      @(negedge wclk);
      wr_en = ($urandom_range(0, 3) != 0);
      wdata = nw;
      @(posedge wclk);
      if (wr_en && !full) nw++;
      if (wr_en && full) nfull++;
    end
    @(negedge wclk); wr_en = 0;
  end

  // reader
  logic pend = 0;
  initial begin
    #20 rrst_n = 1;
    while (nr < N) begin
      @(negedge rclk);
      // slow at first so the FIFO fills, fast later so it drains
      rd_en = (nr < 500) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      checks++;
      if (int'(rlevel) > (1 << DL)) begin failures++; $display("FAIL level %0d", rlevel); end
      @(posedge rclk);
      pend = rd_en && !empty;
      #0.5;
      if (pend) begin
        checks++;
        if (rdata != W'(nr)) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d got %0d", nr, rdata);
        end
        nr++;
      end
    end
    rd_en = 0;
    repeat (10) @(posedge rclk);
    checks++;
    if (!empty) begin failures++; $display("FAIL not empty at end"); end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_buffer: builds Ethernet/IPv4/UDP frames carrying VDIF frames
// (42 + 32 header bytes, so the payload is not word aligned), sends them
// on a 200 MHz receive clock with random idle cycles and checks on the
// 128 MHz side that:
//  - the restored stream equals the payload samples, offset binary turned
//    into two's complement, in order and with nothing lost or added;
//  - after 'go' a word leaves every clock (continuous 8 samples/clock);
//  - first_hdr holds the first frame's time stamp;
//  - a skipped frame number and an invalid frame are counted;
//  - when the input stops the output keeps running with zero samples
//    and underflows are counted.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_data_buffer;
  import ddcb_pkg::*;
  localparam int P = 64;           // payload words per VDIF frame
  localparam int NF = 12;          // frames sent
  logic rx_clk = 0, clk = 0, rx_rst_n = 0, rst_n = 0;
  always #2.5 rx_clk = ~rx_clk;
  always #3.90625 clk = ~clk;
  logic [63:0] rx_data = 0;
  logic rx_valid = 0, rx_last = 0;
  logic [31:0] frames_cnt, gap_cnt, invalid_cnt, overflow_cnt, underflow_cnt;
  logic go = 0, ready, running, dout_valid, have_first;
  logic signed [7:0] dout [8];
  vdif_info_t first_hdr;
  int checks = 0, failures = 0;

  data_buffer #(.HDR_OFFSET(42), .DEPTH_LOG2(9), .PREFILL(256)) dut (.*);

  initial begin : watchdog
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] expq [$];
  bit sent_all = 0;

  task automatic send_frame(int fno, bit invalid);
    logic [7:0] bytes [$];
    logic [31:0] w [8];
    for (int i = 0; i < 42; i++) bytes.push_back(8'($urandom));
    w[0] = {invalid, 1'b0, 30'd123456};
    w[1] = {2'b00, 6'd33, 24'(fno)};
    w[2] = {3'd0, 5'd0, 24'(P + 4)};
    w[3] = {1'b0, 5'd7, 10'd2, 16'h5254};
    for (int k = 4; k < 8; k++) w[k] = $urandom;   // extended user data
    for (int k = 0; k < 8; k++)
      for (int b = 0; b < 4; b++) bytes.push_back(w[k][8*b +: 8]);
    for (int k = 0; k < P; k++) begin
      logic [63:0] d, e;
      d = {$urandom, $urandom};
      for (int b = 0; b < 8; b++) begin
        bytes.push_back(d[8*b +: 8]);
        e[8*b +: 8] = d[8*b +: 8] ^ 8'h80;
      end
      expq.push_back(e);
    end
    while (bytes.size() % 8 != 0) bytes.push_back(8'hEE);
    for (int k = 0; k < bytes.size() / 8; k++) begin
      while ($urandom_range(0, 9) == 0) begin
        @(negedge rx_clk); rx_valid = 0;
      end
      @(negedge rx_clk);
      rx_valid = 1;
      for (int b = 0; b < 8; b++) rx_data[8*b +: 8] = bytes[8*k + b];
      rx_last = (k == bytes.size() / 8 - 1);
    end
    @(negedge rx_clk); rx_valid = 0; rx_last = 0;
  endtask

  // Receive side
  initial begin
    #30 rx_rst_n = 1;
    for (int f = 0; f < NF; f++) send_frame((f < 5) ? 100 + f : 101 + f, f == 7);
    sent_all = 1;
  end

  // Output side
  int nwords = 0, nzero = 0;
  bit seen_valid = 0, gap_in_valid = 0;
  always @(posedge clk) if (rst_n) begin
    if (seen_valid && !dout_valid) gap_in_valid = 1;
    if (dout_valid) begin
      logic [63:0] got;
      seen_valid = 1;
      for (int b = 0; b < 8; b++) got[8*b +: 8] = dout[b];
      checks++;
      if (expq.size() > 0) begin
        if (got != expq[0]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d: %h exp %h", nwords, got, expq[0]);
        end
        void'(expq.pop_front());
        nwords++;
      end else begin
        if (got != 0) begin failures++; $display("FAIL non-zero word after data"); end
        nzero++;
      end
    end
  end

  initial begin
    #30 rst_n = 1;
    // go before ready has no effect
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (running) begin failures++; $display("FAIL started before ready"); end
    wait (ready);
    checks++;
    if (!have_first || first_hdr.seconds != 123456 || first_hdr.epoch != 33 ||
        first_hdr.frame_no != 100 || first_hdr.frame_len != P + 4 || first_hdr.thread_id != 2) begin
      failures++; $display("FAIL first_hdr %p", first_hdr);
    end
    @(negedge clk); go = 1;
    @(negedge clk); go = 0;
    wait (sent_all);
    repeat (NF * P + 200) @(posedge clk);
    checks++;
    if (nwords != NF * P) begin failures++; $display("FAIL %0d words restored of %0d", nwords, NF * P); end
    checks++;
    if (gap_in_valid) begin failures++; $display("FAIL output not continuous"); end
    checks++;
    if (nzero < 50 || underflow_cnt < 50) begin failures++; $display("FAIL underflow not seen (%0d, %0d)", nzero, underflow_cnt); end
    checks++;
    if (frames_cnt != NF || gap_cnt != 1 || invalid_cnt != 1 || overflow_cnt != 0) begin
      failures++; $display("FAIL counters frames %0d gaps %0d invalid %0d overflow %0d", frames_cnt, gap_cnt, invalid_cnt, overflow_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

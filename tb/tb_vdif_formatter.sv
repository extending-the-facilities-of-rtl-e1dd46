// tb_vdif_formatter: drives 16 channels of 2-bit samples with a known
// pattern, second pulses every 3 frames and random back-pressure, and
// checks every output word: the 32-byte VDIF header (seconds, epoch, frame
// number restarting at each second, frame length, 4 channels log2, 2-bit
// real data, thread and station id, user words) and the payload packing
// (channel c in bits 2c+1:2c, earlier sample in the low half).
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_vdif_formatter;
  import ddcb_pkg::*;
  localparam int PW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, pps = 0;
  logic [29:0] sec = 30'd5000;
  logic [5:0] epoch = 6'd40;
  logic [9:0] thread_id = 10'd3;
  logic [15:0] station_id = 16'h4b56;
  logic [127:0] user = {32'h44444444, 32'h33333333, 32'h22222222, 32'h11111111};
  logic din_valid = 0;
  logic [31:0] din = 0;
  logic [63:0] m_data;
  logic m_valid, m_last, m_ready = 0;
  logic started;
  logic [31:0] frames_sent, drop_cnt;
  int checks = 0, failures = 0;

  vdif_formatter #(.PAYLOAD_WORDS(PW), .FIFO_LOG2(5)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample source: one sample time every 4 clocks, value = running count.
  int nsamp = 0;
  int ncyc = 0;
  localparam int SAMP_PER_SEC = 3 * PW * 2;     // 3 frames per second
  always @(posedge clk) if (rst_n) begin
    ncyc++;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    en = 1;
    forever begin
      // pps one clock before the sample that starts a second
      @(negedge clk);
      din_valid = 0;
      pps = 0;
      if (ncyc % 4 == 0) begin
        din_valid = 1;
        din = 32'(nsamp) * 32'h9E3779B1;
        if (nsamp % SAMP_PER_SEC == SAMP_PER_SEC - 1) begin
          // next second starts after this sample
        end
        nsamp++;
      end else if (ncyc % 4 == 2 && nsamp % SAMP_PER_SEC == 0 && nsamp > 0) begin
        pps = 1;
        sec = sec + 1;
      end
      m_ready = ($urandom_range(0, 3) != 0);
    end
  end

  // Checker: rebuild expected frames.
  int wi = 0;                 // word index within output frame
  int fcount = 0;
  logic [31:0] h [8];
  int first_samp;             // sample index of frame payload start
  int exp_fno, exp_sec;
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    if (wi < 4) begin
      h[2*wi] = m_data[31:0];
      h[2*wi+1] = m_data[63:32];
      if (wi == 3) begin
        // Work out which samples this frame should hold from its number.
        checks++;
        if (h[0][31:30] != 0 || h[1][29:24] != 40 || h[2] != {3'd0, 5'd4, 24'(PW + 4)} ||
            h[3] != {1'b0, 5'd1, 10'd3, 16'h4b56} || {h[7], h[6], h[5], h[4]} != user) begin
          failures++; $display("FAIL header fields %h %h %h %h", h[0], h[1], h[2], h[3]);
        end
        if (fcount == 0) begin
          first_samp = SAMP_PER_SEC;   // packing starts at the first second pulse
          // the first frame must start at a second boundary
          exp_fno = 0;
          exp_sec = int'(h[0][29:0]);
        end
        checks++;
        if (int'(h[1][23:0]) != exp_fno || int'(h[0][29:0]) != exp_sec) begin
          failures++; $display("FAIL frame %0d: number %0d sec %0d, exp %0d %0d", fcount, h[1][23:0], h[0][29:0], exp_fno, exp_sec);
        end
      end
    end else begin
      int s0;
      logic [63:0] e;
      s0 = first_samp + 2 * (wi - 4);
      e = {32'(s0 + 1) * 32'h9E3779B1, 32'(s0) * 32'h9E3779B1};
      checks++;
      if (m_data != e) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d word %0d: %h exp %h", fcount, wi, m_data, e);
      end
    end
    checks++;
    if (m_last != (wi == PW + 3)) begin failures++; $display("FAIL last at word %0d", wi); end
    if (wi == PW + 3) begin
      wi = 0;
      fcount++;
      first_samp += 2 * PW;
      exp_fno++;
      if (exp_fno == 3) begin exp_fno = 0; exp_sec++; end
    end else wi++;
  end

  initial begin
    wait (fcount == 10);
    checks++;
    if (drop_cnt != 0) begin failures++; $display("FAIL drops"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

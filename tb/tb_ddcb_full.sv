// tb_ddcb_full: the downconverter bank at full size, no parameter overrides
// (1000-word output frames, 128e6 ticks per second, 2048-word prefill,
// 2^16-sample RMS interval). Input frames carry 1000 payload words; the
// first frame number is chosen 10 frames before the end of a second so the
// first second pulse, and with it the output, comes early. The test runs
// until two complete output packets have been sent and checks their length,
// Ethernet header, VDIF time stamps (next second, frames 0 and 1) and
// payload codes: the tone channel shows all four codes, the channel switched
// to an unused source only the code for zero. The frame lengths and the
// one-frame-per-62.5-us output rate are checked against the clock count.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_ddcb_full;
  import ddcb_pkg::*;
  localparam int P      = 1000;
  localparam int FPS    = 128000;     // input frames per second
  localparam int FIRST  = FPS - 10;
  localparam int NF     = 40;
  localparam int SEC0   = 1234;
  localparam int PKT_BYTES = 14 + 32 + 8000;

  logic clk = 0, rx_clk = 0, rst_n = 0, rx_rst_n = 0;
  always #3.90625 clk = ~clk;
  always #2.5 rx_clk = ~rx_clk;

  logic [63:0]  rx_data  [N_IN];
  logic         rx_valid [N_IN];
  logic         rx_last  [N_IN];
  ddc_cfg_t     cfg [N_CH];
  logic         bw8 = 0;
  logic [9:0]   thread_id = 10'd1;
  logic [15:0]  station_id = 16'h4b56;
  logic [127:0] vdif_user = '0;
  eth_cfg_t     eth_cfg;
  logic [63:0]  tx_data;
  logic [7:0]   tx_keep;
  logic         tx_valid, tx_last, tx_ready = 1;
  logic         cap_arm = 0;
  logic [3:0]   cap_sel = 0;
  logic [9:0]   cap_rd_addr = 0;
  sample_t      cap_rd_data;
  logic         cap_done, running;
  logic [31:0]  underflow_cnt [N_IN], overflow_cnt [N_IN], gap_cnt [N_IN], rx_frames [N_IN];
  logic [15:0]  threshold [N_CH];
  logic [29:0]  time_sec;
  logic [31:0]  frames_sent, packets_sent;

  ddcb_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_stream(int s);
    int m;
    m = 0;
    for (int f = 0; f < NF; f++) begin
      logic [7:0] bytes [$];
      logic [31:0] w [8];
      int fno;
      fno = FIRST + f;
      for (int i = 0; i < 42; i++) bytes.push_back(8'(i));
      w[0] = {2'b00, 30'(SEC0 + fno / FPS)};
      w[1] = {2'b00, 6'd44, 24'(fno % FPS)};
      w[2] = {3'd0, 5'd0, 24'(P + 4)};
      w[3] = {1'b0, 5'd7, 10'(s), 16'h4b56};
      for (int k = 4; k < 8; k++) w[k] = 0;
      for (int k = 0; k < 8; k++)
        for (int b = 0; b < 4; b++) bytes.push_back(w[k][8*b +: 8]);
      for (int k = 0; k < 8 * P; k++) begin
        int x;
        x = $rtoi($floor(50.0 * $cos(2.0 * PI * 158.0 / 1024.0 * m) + 0.5))
            + int'($urandom_range(0, 6)) - 3;
        bytes.push_back(8'(x) ^ 8'h80);
        m++;
      end
      while (bytes.size() % 8 != 0) bytes.push_back(8'h00);
      // pace the frames at the sample rate: 1000 words per 7.8125 us
      while ($realtime < 100.0 + f * 7812.5) @(negedge rx_clk);
      for (int k = 0; k < bytes.size() / 8; k++) begin
        @(negedge rx_clk);
        rx_valid[s] = 1;
        for (int b = 0; b < 8; b++) rx_data[s][8*b +: 8] = bytes[8*k + b];
        rx_last[s] = (k == bytes.size() / 8 - 1);
      end
      @(negedge rx_clk); rx_valid[s] = 0; rx_last[s] = 0;
    end
  endtask

  logic [7:0] pk [$];
  int npk = 0;
  longint cyc = 0, last_cyc;
  int code_hist [N_CH][4];

  always @(posedge clk) begin
    cyc++;
    if (rst_n && tx_valid && tx_ready) begin
      for (int b = 0; b < 8; b++) if (tx_keep[b]) pk.push_back(tx_data[8*b +: 8]);
      if (tx_last) begin
        logic [31:0] vw [4];
        check(pk.size() == PKT_BYTES, $sformatf("packet length %0d at %0d: %p", pk.size(), cyc, pk[0:19]));
        check({pk[12], pk[13]} == 16'h88B5, "EtherType");
        if (pk.size() == PKT_BYTES) begin
          for (int k = 0; k < 4; k++) vw[k] = {pk[14+4*k+3], pk[14+4*k+2], pk[14+4*k+1], pk[14+4*k]};
          check(vw[0][29:0] == 30'(SEC0 + 1) && vw[1][23:0] == 24'(npk),
                $sformatf("time stamp %0d/%0d", vw[0][29:0], vw[1][23:0]));
          check(vw[2][23:0] == 24'd1004 && vw[2][28:24] == 5'd4 && vw[3] == {1'b0, 5'd1, 10'd1, 16'h4b56},
                "VDIF header fields");
          for (int k = 0; k < 2000; k++) begin
            logic [31:0] sw;
            sw = {pk[46+4*k+3], pk[46+4*k+2], pk[46+4*k+1], pk[46+4*k]};
            for (int c = 0; c < N_CH; c++) code_hist[c][sw[2*c +: 2]]++;
          end
        end
        // one frame of 2000 samples at 32 MS/s every 8000 clocks
        if (npk == 1) check(cyc - last_cyc == 8000, $sformatf("frame spacing %0d clocks", cyc - last_cyc));
        last_cyc = cyc;
        pk.delete();
        npk++;
      end
    end
  end

  initial begin
    eth_cfg = '{dst_mac: 48'h0a1b2c3d4e5f, src_mac: 48'h020000000001, src_ip: 32'hc0a80a05,
                dst_ip: 32'hc0a80a64, src_port: 16'd4660, dst_port: 16'd46220, udp_en: 1'b0};
    for (int c = 0; c < N_CH; c++)
      cfg[c] = '{src: 5'd31, qshift: QS_OFF, invert: 1'b0, front_sb: 1'b0, fword: 13'd0, out_sb: 1'b0};
    cfg[0] = '{src: 5'd1, qshift: QS_OFF, invert: 1'b0, front_sb: 1'b0, fword: 13'd2500, out_sb: 1'b0};
    for (int c = 0; c < N_CH; c++) for (int v = 0; v < 4; v++) code_hist[c][v] = 0;
    for (int s = 0; s < N_IN; s++) begin rx_valid[s] = 0; rx_last[s] = 0; rx_data[s] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1; rx_rst_n = 1;
    fork
      send_stream(0);
      send_stream(1);
      send_stream(2);
      wait (npk == 2);
    join_any
    wait (npk == 2);
    check(code_hist[0][0] > 0 && code_hist[0][1] > 0 && code_hist[0][2] > 0 && code_hist[0][3] > 0,
          $sformatf("tone channel codes %0d %0d %0d %0d", code_hist[0][0], code_hist[0][1], code_hist[0][2], code_hist[0][3]));
    check(code_hist[7][0] == 0 && code_hist[7][1] == 0 && code_hist[7][3] == 0, "idle channel");
    for (int s = 0; s < N_IN; s++) check(overflow_cnt[s] == 0 && gap_cnt[s] == 0, $sformatf("buffer counters ovf %0d gap %0d frames %0d", overflow_cnt[s], gap_cnt[s], rx_frames[s]));
    check(time_sec == 30'(SEC0 + 1), "timer seconds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

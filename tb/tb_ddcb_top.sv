// tb_ddcb_top: end-to-end test of the downconverter bank at reduced sizes
// (short VDIF frames, a 1024-tick "second", small buffers, short RMS
// interval). Three input streams carry tones that fall into known
// sub-bands; channels are configured to exercise every mode of the data
// path. Each phase sends 40 input frames per stream, then stops the input.
//
// Phase 1: 16 MHz video band, raw Ethernet output. Phase 2 (after reset):
// 8 MHz band, Ethernet/IPv4/UDP output.
//
// The output packets are rebuilt from tx_data/tx_keep and checked: header
// length and type, VDIF time stamps (seconds from the input headers, frame
// numbers restarting at every second), frame length, payload size; from the
// payload the 2-bit codes of each channel are collected. Channels fed with
// a tone must show both signs and both magnitudes, a channel switched to an
// unused source must send only the code for zero. Mechanisms counted, each
// must happen at least once: output back-pressure, input frame gap,
// buffer underflow at the end of the input, threshold update, second
// boundary, 32 MHz converter, inverter mode, lower sidebands, raw and UDP
// framing, 8 and 16 MHz bands, data capture.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_ddcb_top;
  import ddcb_pkg::*;
  localparam int P      = 64;       // input payload words per frame
  localparam int PW     = 16;       // output payload words per frame
  localparam int TPS    = 1024;     // ticks (input words) per second
  localparam int NF     = 40;       // input frames per stream and phase
  localparam int FIRST  = 12;       // first input frame number
  localparam int SEC0   = 777;

  logic clk = 0, rx_clk = 0, rst_n = 0, rx_rst_n = 0;
  always #3.90625 clk = ~clk;
  always #2.5 rx_clk = ~rx_clk;

  logic [63:0]  rx_data  [N_IN];
  logic         rx_valid [N_IN];
  logic         rx_last  [N_IN];
  ddc_cfg_t     cfg [N_CH];
  logic         bw8 = 0;
  logic [9:0]   thread_id = 10'd5;
  logic [15:0]  station_id = 16'h5254;
  logic [127:0] vdif_user = 128'h0123_4567_89ab_cdef_0011_2233_4455_6677;
  eth_cfg_t     eth_cfg;
  logic [63:0]  tx_data;
  logic [7:0]   tx_keep;
  logic         tx_valid, tx_last, tx_ready = 0;
  logic         cap_arm = 0;
  logic [3:0]   cap_sel = 0;
  logic [5:0]   cap_rd_addr = 0;
  sample_t      cap_rd_data;
  logic         cap_done, running;
  logic [31:0]  underflow_cnt [N_IN], overflow_cnt [N_IN], gap_cnt [N_IN], rx_frames [N_IN];
  logic [15:0]  threshold [N_CH];
  logic [29:0]  time_sec;
  logic [31:0]  frames_sent, packets_sent;

  ddcb_top #(
    .BUF_DEPTH_LOG2(9), .PREFILL(128), .Q_LOG2_N(6), .PAYLOAD_WORDS(PW),
    .FMT_FIFO_LOG2(6), .TICKS_PER_SEC(TPS), .CAP_DEPTH_LOG2(6)
  ) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- stimulus
  real tone_mhz [N_IN] = '{158.0, 404.0, 290.0};

  realtime t_phase;

  task automatic send_stream(int s);
    int m;
    m = 0;
    for (int f = 0; f < NF; f++) begin
      logic [7:0] bytes [$];
      logic [31:0] w [8];
      int fno;
      // stream 2 skips one frame number (a lost frame upstream)
      fno = FIRST + f + ((s == 2 && f >= 20) ? 1 : 0);
      for (int i = 0; i < 42; i++) bytes.push_back(8'(i + s));
      w[0] = {2'b00, 30'(SEC0 + fno / (TPS / P))};
      w[1] = {2'b00, 6'd44, 24'(fno % (TPS / P))};
      w[2] = {3'd0, 5'd0, 24'(P + 4)};
      w[3] = {1'b0, 5'd7, 10'(s), 16'h5254};
      for (int k = 4; k < 8; k++) w[k] = 0;
      for (int k = 0; k < 8; k++)
        for (int b = 0; b < 4; b++) bytes.push_back(w[k][8*b +: 8]);
      for (int k = 0; k < 8 * P; k++) begin
        int x;
        x = $rtoi($floor(60.0 * $cos(2.0 * PI * tone_mhz[s] / 1024.0 * m) + 0.5))
            + int'($urandom_range(0, 6)) - 3;
        bytes.push_back(8'(x) ^ 8'h80);
        m++;
      end
      while (bytes.size() % 8 != 0) bytes.push_back(8'h00);
      // pace the frames at the sample rate: P words per P clocks of 128 MHz
      while ($realtime < t_phase + f * P * 7.8125) @(negedge rx_clk);
      for (int k = 0; k < bytes.size() / 8; k++) begin
        @(negedge rx_clk);
        rx_valid[s] = ($urandom_range(0, 15) != 0);
        while (!rx_valid[s]) begin @(negedge rx_clk); rx_valid[s] = ($urandom_range(0, 15) != 0); end
        for (int b = 0; b < 8; b++) rx_data[s][8*b +: 8] = bytes[8*k + b];
        rx_last[s] = (k == bytes.size() / 8 - 1);
      end
      @(negedge rx_clk); rx_valid[s] = 0; rx_last[s] = 0;
    end
  endtask

  // ------------------------------------------------------------------ sink
  logic [7:0] pk [$];
  int  npk, n_stall, n_sec_bound, n_thr_upd, n_raw, n_udp;
  int  exp_fno, exp_sec, frames_per_sec;
  bit  udp_mode;
  int  code_hist [N_CH][4];
  logic [15:0] last_thr;

  always @(posedge clk) if (rst_n) begin
    if (tx_valid && !tx_ready) n_stall++;
    if (threshold[0] != last_thr) n_thr_upd++;
    last_thr = threshold[0];
    if (tx_valid && tx_ready) begin
      for (int b = 0; b < 8; b++) if (tx_keep[b]) pk.push_back(tx_data[8*b +: 8]);
      if (tx_last) begin
        int h;
        logic [31:0] vw [8];
        h = udp_mode ? 42 : 14;
        check(pk.size() == h + 8 * (PW + 4), $sformatf("packet %0d length %0d", npk, pk.size()));
        check({pk[12], pk[13]} == (udp_mode ? 16'h0800 : 16'h88B5), "EtherType");
        if (udp_mode) n_udp++; else n_raw++;
        if (pk.size() == h + 8 * (PW + 4)) begin
          for (int k = 0; k < 8; k++) vw[k] = {pk[h+4*k+3], pk[h+4*k+2], pk[h+4*k+1], pk[h+4*k]};
          if (npk == 0) begin
            exp_sec = int'(vw[0][29:0]);
            check(exp_sec == SEC0 + 1, $sformatf("first output second %0d", exp_sec));
            exp_fno = 0;
          end
          check(int'(vw[0][29:0]) == exp_sec && int'(vw[1][23:0]) == exp_fno,
                $sformatf("packet %0d time %0d/%0d, exp %0d/%0d", npk, vw[0][29:0], vw[1][23:0], exp_sec, exp_fno));
          check(vw[1][29:24] == 6'd44 && vw[2][23:0] == 24'(PW + 4) && vw[2][28:24] == 5'd4 &&
                vw[3] == {1'b0, 5'd1, 10'd5, 16'h5254} && {vw[7], vw[6], vw[5], vw[4]} == vdif_user,
                "VDIF header fields");
          if (vw[1][23:0] == 0) n_sec_bound++;
          exp_fno++;
          if (exp_fno == frames_per_sec) begin exp_fno = 0; exp_sec++; end
          for (int k = 0; k < 2 * PW; k++) begin
            logic [31:0] sw;
            sw = {pk[h+32+4*k+3], pk[h+32+4*k+2], pk[h+32+4*k+1], pk[h+32+4*k]};
            for (int c = 0; c < N_CH; c++) code_hist[c][sw[2*c +: 2]]++;
          end
        end
        pk.delete();
        npk++;
      end
    end
  end

  always @(negedge clk) tx_ready = ($urandom_range(0, 4) != 0);

  // ----------------------------------------------------------------- phases
  int n_cap;
  task automatic phase(bit b8, bit udp);
    int exp_packets;
    bw8 = b8;
    udp_mode = udp;
    eth_cfg.udp_en = udp;
    frames_per_sec = b8 ? TPS / (16 * PW) : TPS / (8 * PW);
    npk = 0; pk.delete();
    for (int c = 0; c < N_CH; c++) for (int v = 0; v < 4; v++) code_hist[c][v] = 0;
    rst_n = 0; rx_rst_n = 0;
    for (int s = 0; s < N_IN; s++) begin rx_valid[s] = 0; rx_last[s] = 0; rx_data[s] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1; rx_rst_n = 1;
    t_phase = $realtime;
    fork
      send_stream(0);
      send_stream(1);
      send_stream(2);
      begin
        // data capture of channel 0 once the output is running
        wait (frames_sent > 2);
        @(negedge clk); cap_arm = 1; cap_sel = 0;
        @(negedge clk); cap_arm = 0;
        wait (cap_done);
        begin
          real pw;
          pw = 0;
          for (int a = 0; a < 64; a++) begin
            @(negedge clk); cap_rd_addr = 6'(a);
            @(posedge clk); #1;
            pw += real'(cap_rd_data) ** 2;
          end
          check(pw / 64 > 1.0e6, $sformatf("captured video power %f", pw / 64));
          n_cap++;
        end
      end
    join
    // let the pipeline drain into underflow
    repeat (2000) @(posedge clk);
    exp_packets = ((NF * P - (TPS - FIRST * P)) / (b8 ? 8 : 4)) / (2 * PW);
    check(npk >= exp_packets - 2, $sformatf("only %0d packets, expected about %0d", npk, exp_packets));
    check(packets_sent == npk && frames_sent == npk, "packet counters");
    for (int s = 0; s < N_IN; s++) begin
      check(rx_frames[s] == NF, $sformatf("stream %0d frames %0d", s, rx_frames[s]));
      check(overflow_cnt[s] == 0, "buffer overflow");
      check(underflow_cnt[s] > 0, "underflow at end of input not seen");
    end
    check(gap_cnt[0] == 0 && gap_cnt[1] == 0 && gap_cnt[2] == 1, "frame gap counts");
    // Tone channels show all four codes, the idle channel only '10'.
    for (int c = 0; c < 6; c++) begin
      int tot, outer;
      tot = code_hist[c][0] + code_hist[c][1] + code_hist[c][2] + code_hist[c][3];
      outer = code_hist[c][0] + code_hist[c][3];
      check(code_hist[c][0] > 0 && code_hist[c][1] > 0 && code_hist[c][2] > 0 && code_hist[c][3] > 0 &&
            real'(outer) / tot > 0.2 && real'(outer) / tot < 0.8,
            $sformatf("channel %0d codes %0d %0d %0d %0d", c, code_hist[c][0], code_hist[c][1], code_hist[c][2], code_hist[c][3]));
    end
    check(code_hist[15][2] > 0 && code_hist[15][0] == 0 && code_hist[15][1] == 0 && code_hist[15][3] == 0,
          $sformatf("idle channel 15 not constant: %0d %0d %0d %0d", code_hist[15][0], code_hist[15][1], code_hist[15][2], code_hist[15][3]));
  endtask

  initial begin
    int n_bw8, n_bw16;
    n_stall = 0; n_thr_upd = 0; n_sec_bound = 0; n_raw = 0; n_udp = 0; n_cap = 0;
    last_thr = 0;
    eth_cfg = '{dst_mac: 48'h0a1b2c3d4e5f, src_mac: 48'h020000000007, src_ip: 32'hc0a80a05,
                dst_ip: 32'hc0a80a64, src_port: 16'd4660, dst_port: 16'd46220, udp_en: 1'b0};
    for (int c = 0; c < N_CH; c++)
      cfg[c] = '{src: 5'(c % 24), qshift: QS_OFF, invert: 1'b0, front_sb: 1'b0, fword: 13'd1000, out_sb: 1'b0};
    // stream 0, band 1 holds the 158 MHz tone at +30 MHz
    cfg[0] = '{src: 5'd1,  qshift: QS_OFF,  invert: 1'b0, front_sb: 1'b0, fword: 13'd2500, out_sb: 1'b0};
    // +30 MHz shifted up to 62 MHz: inverter mode, NCO 57 MHz
    cfg[1] = '{src: 5'd1,  qshift: QS_UP,   invert: 1'b1, front_sb: 1'b0, fword: 13'd5500, out_sb: 1'b0};
    // +30 MHz shifted down to -2 MHz: lower front sideband, NCO at 0
    cfg[2] = '{src: 5'd1,  qshift: QS_DOWN, invert: 1'b0, front_sb: 1'b1, fword: 13'd0,    out_sb: 1'b0};
    // stream 1, band 3 (384 MHz): tone at +20 MHz; NCO 25 MHz, lower sideband
    cfg[3] = '{src: 5'd11, qshift: QS_OFF,  invert: 1'b0, front_sb: 1'b0, fword: 13'd2500, out_sb: 1'b1};
    // stream 2, band 2 (256 MHz): tone at +34 MHz; NCO 30 MHz
    cfg[4] = '{src: 5'd18, qshift: QS_OFF,  invert: 1'b0, front_sb: 1'b0, fword: 13'd3000, out_sb: 1'b0};
    // stream 2, band 6 (mirror, -256 MHz): the tone appears at -34 MHz
    cfg[5] = '{src: 5'd22, qshift: QS_OFF,  invert: 1'b0, front_sb: 1'b1, fword: 13'd3000, out_sb: 1'b0};
    cfg[15] = '{src: 5'd31, qshift: QS_OFF, invert: 1'b0, front_sb: 1'b0, fword: 13'd1000, out_sb: 1'b0};
    repeat (3) @(posedge clk);
    phase(1'b0, 1'b0);
    n_bw16 = npk;
    phase(1'b1, 1'b1);
    n_bw8 = npk;
    $display("mechanisms: stalls %0d second boundaries %0d threshold updates %0d raw %0d udp %0d captures %0d",
             n_stall, n_sec_bound, n_thr_upd, n_raw, n_udp, n_cap);
    check(n_stall > 0, "no back-pressure");
    check(n_sec_bound >= 2, "no second boundary");
    check(n_thr_upd > 0, "no threshold update");
    check(n_raw > 0 && n_udp > 0, "raw and UDP framing");
    check(n_bw16 > 0 && n_bw8 > 0, "both bands");
    check(n_cap == 2, "data capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

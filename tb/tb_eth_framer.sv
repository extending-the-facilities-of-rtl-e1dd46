// tb_eth_framer: sends numbered 64-byte payloads through the framer in raw
// and UDP mode alternately, with random gaps on the input and random
// back-pressure on the output. Each output packet is rebuilt byte by byte
// from m_data/m_keep and checked: length, MAC addresses, EtherType, the
// IPv4 header (length, protocol, addresses, checksum verified by summing),
// UDP ports and length, and the payload bytes in order.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_eth_framer;
  import ddcb_pkg::*;
  localparam int PB = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  eth_cfg_t cfg;
  logic [63:0] s_data = 0;
  logic s_valid = 0, s_last = 0, s_ready;
  logic [63:0] m_data;
  logic [7:0] m_keep;
  logic m_valid, m_last, m_ready = 0;
  logic [31:0] pkt_cnt;
  int checks = 0, failures = 0;

  eth_framer #(.PAYLOAD_BYTES(PB)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pbyte(int pkt, int i);
    return 8'(pkt * 37 + i * 11 + 5);
  endfunction

  localparam int NP = 8;
  bit mode_of [NP];

  // Source
  initial begin
    cfg.dst_mac = 48'h0a_1b_2c_3d_4e_5f;
    cfg.src_mac = 48'h02_00_00_00_00_07;
    cfg.src_ip = 32'hc0a8_0a05;
    cfg.dst_ip = 32'hc0a8_0a64;
    cfg.src_port = 16'd4660;
    cfg.dst_port = 16'd46220;
    cfg.udp_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      cfg.udp_en = p[0];
      mode_of[p] = p[0];
      for (int w = 0; w < PB / 8; w++) begin
        for (int b = 0; b < 8; b++) s_data[8*b +: 8] = pbyte(p, 8*w + b);
        s_last = (w == PB / 8 - 1);
        s_valid = ($urandom_range(0, 3) != 0);
        while (!s_valid) begin @(negedge clk); s_valid = ($urandom_range(0, 3) != 0); end
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        @(negedge clk);
        s_valid = 0;
      end
      s_last = 0;
    end
  end

  always @(negedge clk) m_ready = ($urandom_range(0, 4) != 0);

  // Sink
  logic [7:0] pk [$];
  int npk = 0;
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    for (int b = 0; b < 8; b++) if (m_keep[b]) pk.push_back(m_data[8*b +: 8]);
    if (m_last) begin
      int h;
      bit udp;
      udp = mode_of[npk];
      h = udp ? 42 : 14;
      checks++;
      if (pk.size() != h + PB) begin failures++; $display("FAIL pkt %0d length %0d", npk, pk.size()); end
      else begin
        checks++;
        if ({pk[0], pk[1], pk[2], pk[3], pk[4], pk[5]} != cfg.dst_mac ||
            {pk[6], pk[7], pk[8], pk[9], pk[10], pk[11]} != cfg.src_mac ||
            {pk[12], pk[13]} != (udp ? 16'h0800 : 16'h88B5)) begin
          failures++; $display("FAIL pkt %0d Ethernet header", npk);
        end
        if (udp) begin
          int sum;
          sum = 0;
          for (int i = 14; i < 34; i += 2) sum += {pk[i], pk[i+1]};
          while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
          checks++;
          if (sum != 16'hFFFF) begin failures++; $display("FAIL IP checksum %h", sum); end
          checks++;
          if (pk[14] != 8'h45 || {pk[16], pk[17]} != 16'(20 + 8 + PB) || pk[23] != 8'd17 ||
              {pk[26], pk[27], pk[28], pk[29]} != cfg.src_ip || {pk[30], pk[31], pk[32], pk[33]} != cfg.dst_ip ||
              {pk[34], pk[35]} != cfg.src_port || {pk[36], pk[37]} != cfg.dst_port ||
              {pk[38], pk[39]} != 16'(8 + PB)) begin
            failures++; $display("FAIL pkt %0d IP/UDP header", npk);
          end
        end
        for (int i = 0; i < PB; i++) begin
          checks++;
          if (pk[h + i] != pbyte(npk, i)) begin
            failures++;
            if (failures < 10) $display("FAIL pkt %0d byte %0d: %h exp %h", npk, i, pk[h + i], pbyte(npk, i));
          end
        end
      end
      pk.delete();
      npk++;
    end
  end

  initial begin
    wait (npk == NP);
    repeat (2) @(posedge clk);
    checks++;
    if (pkt_cnt != NP) begin failures++; $display("FAIL pkt_cnt %0d", pkt_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// eth_framer: Ethernet frame pack for the output link.
//
// Wraps each VDIF frame (PAYLOAD_BYTES, a multiple of 8) into a raw Ethernet
// frame (14-byte header, EtherType RAW_ETHERTYPE) or, with udp_en = 1, into
// Ethernet + IPv4 + UDP (42 bytes of headers), the two options the published design
// names. The IPv4 header checksum is computed from the configuration; the
// UDP checksum is sent as 0 (allowed for IPv4), the IP identification is 0
// with Don't-Fragment set and TTL is 64. The FCS is left to the MAC.
//
// Headers of 14 or 42 bytes are not a multiple of the 8-byte word, so the
// payload is shifted by S = H mod 8 bytes: each output word holds the
// upper S bytes of the previous payload word and the lower 8-S bytes of
// the current one, and a final word carries the last S bytes with m_keep
// marking them. Output byte 0 (bits 7:0) is the first byte on the wire.
// Both sides use valid/ready; the output is registered and a word offered
// stays until taken. udp_en and the addresses are sampled at frame start.
module eth_framer
  import ddcb_pkg::*;
#(
  parameter int          PAYLOAD_BYTES = 8032,
  parameter logic [15:0] RAW_ETHERTYPE = 16'h88B5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  eth_cfg_t    cfg,
  input  logic [63:0] s_data,
  input  logic        s_valid,
  input  logic        s_last,
  output logic        s_ready,
  output logic [63:0] m_data,
  output logic [7:0]  m_keep,
  output logic        m_valid,
  output logic        m_last,
  input  logic        m_ready,
  output logic [31:0] pkt_cnt
);

  localparam int HMAX = 48;

  eth_cfg_t   c;          // configuration latched for the current frame
  logic [7:0] hb [HMAX];
  logic [5:0] hlen;       // header bytes
  logic [2:0] hw_n;       // whole header words
  logic [2:0] sft;        // payload byte shift

  // Header bytes.
  logic [15:0] ip_len, udp_len;
  logic [31:0] csum;
  logic [15:0] ip_csum;
  always_comb begin
    ip_len  = 16'(20 + 8 + PAYLOAD_BYTES);
    udp_len = 16'(8 + PAYLOAD_BYTES);
    csum = 32'h4500 + 32'(ip_len) + 32'h0000 + 32'h4000 + 32'h4011
         + 32'(c.src_ip[31:16]) + 32'(c.src_ip[15:0])
         + 32'(c.dst_ip[31:16]) + 32'(c.dst_ip[15:0]);
    csum = {16'd0, csum[15:0]} + {16'd0, csum[31:16]};
    csum = {16'd0, csum[15:0]} + {16'd0, csum[31:16]};
    ip_csum = ~csum[15:0];

    for (int i = 0; i < HMAX; i++) hb[i] = 8'h00;
    for (int i = 0; i < 6; i++) begin
      hb[i]     = c.dst_mac[47 - 8*i -: 8];
      hb[6 + i] = c.src_mac[47 - 8*i -: 8];
    end
    if (c.udp_en) begin
      {hb[12], hb[13]} = 16'h0800;
      {hb[14], hb[15]} = 16'h4500;
      {hb[16], hb[17]} = ip_len;
      {hb[18], hb[19]} = 16'h0000;
      {hb[20], hb[21]} = 16'h4000;
      {hb[22], hb[23]} = 16'h4011;            // TTL 64, protocol UDP
      {hb[24], hb[25]} = ip_csum;
      {hb[26], hb[27], hb[28], hb[29]} = c.src_ip;
      {hb[30], hb[31], hb[32], hb[33]} = c.dst_ip;
      {hb[34], hb[35]} = c.src_port;
      {hb[36], hb[37]} = c.dst_port;
      {hb[38], hb[39]} = udp_len;
      {hb[40], hb[41]} = 16'h0000;
      hlen = 6'd42;
    end else begin
      {hb[12], hb[13]} = RAW_ETHERTYPE;
      hlen = 6'd14;
    end
    hw_n = hlen[5:3];
    sft  = hlen[2:0];
  end

  function automatic logic [63:0] hword(int k);
    logic [63:0] r;
    for (int b = 0; b < 8; b++) r[8*b +: 8] = hb[8*k + b];
    return r;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_BODY, S_TAIL} st_e;
  st_e         st;
  logic [2:0]  hcnt;
  logic [63:0] carry;
  logic        adv;
  logic [7:0]  tail_keep;
  logic [63:0] body_word, carry_n;

  assign adv       = !m_valid || m_ready;
  assign s_ready   = (st == S_BODY) && adv;
  assign tail_keep = 8'((9'd1 << sft) - 9'd1);

  always_comb begin
    body_word = (s_data << (8 * sft)) | (carry & ~(64'hFFFF_FFFF_FFFF_FFFF << (8 * sft)));
    carry_n   = (sft == 0) ? 64'd0 : (s_data >> (8 * (4'd8 - 4'(sft))));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      c       <= '0;
      hcnt    <= '0;
      carry   <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
      m_keep  <= '0;
      m_last  <= 1'b0;
      pkt_cnt <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (s_valid) begin
          c    <= cfg;
          hcnt <= '0;
          st   <= S_HDR;
        end
        S_HDR: if (adv) begin
          if (hcnt == hw_n) begin
            // Header tail bytes wait in the carry for the first payload word.
            carry <= hword(int'(hw_n));
            st    <= S_BODY;
          end else begin
            m_valid <= 1'b1;
            m_data  <= hword(int'(hcnt));
            m_keep  <= 8'hFF;
            m_last  <= 1'b0;
            hcnt    <= hcnt + 3'd1;
          end
        end
        S_BODY: if (adv && s_valid) begin
          m_valid <= 1'b1;
          m_data  <= body_word;
          m_keep  <= 8'hFF;
          m_last  <= s_last && (sft == 0);
          carry   <= carry_n;
          if (s_last) begin
            st <= (sft == 0) ? S_IDLE : S_TAIL;
            if (sft == 0) pkt_cnt <= pkt_cnt + 1;
          end
        end
        S_TAIL: if (adv) begin
          m_valid <= 1'b1;
          m_data  <= carry;
          m_keep  <= tail_keep;
          m_last  <= 1'b1;
          st      <= S_IDLE;
          pkt_cnt <= pkt_cnt + 1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   m_valid && !m_ready |=> m_valid && $stable(m_data) && $stable(m_keep));

endmodule

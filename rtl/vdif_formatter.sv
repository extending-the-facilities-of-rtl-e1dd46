// vdif_formatter: output VDIF frame packer.
//
// Joins the 2-bit samples of the 16 downconverter channels into one flow and
// cuts it into VDIF frames of PAYLOAD_WORDS 64-bit words, as the published design
// describes. One sample time of all channels is one 32-bit VDIF word
// (channel c in bits 2c+1:2c); two sample times fill a 64-bit word, the
// earlier one in the low half. Frames start at a second boundary: after
// 'en' the packer waits for 'pps', then numbers frames from 0 after every
// pps and stamps them with the timer's seconds and epoch, which come from
// the decoded input headers.
//
// Header (32 bytes, VDIF non-legacy): word0 = seconds, word1 = epoch and
// frame number, word2 = version 0, log2(channels) = 4 and frame length in
// 8-byte units, word3 = real data, 2 bits/sample, thread and station id,
// words 4-7 = 'user' (extended user data: the bank's own parameters).
// Sample words wait in a FIFO of two frames until the frame is complete;
// the frame is then sent as 4 header words and the payload on a
// valid/ready stream, m_last on the final word. Frame size and the use of
// the extended user data words are this design's choices.
module vdif_formatter
  import ddcb_pkg::*;
#(
  parameter int PAYLOAD_WORDS = 1000,
  parameter int FIFO_LOG2     = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             pps,
  input  logic [29:0]      sec,
  input  logic [5:0]       epoch,
  input  logic [9:0]       thread_id,
  input  logic [15:0]      station_id,
  input  logic [127:0]     user,
  input  logic             din_valid,
  input  logic [2*N_CH-1:0] din,
  output logic [63:0]      m_data,
  output logic             m_valid,
  output logic             m_last,
  input  logic             m_ready,
  output logic             started,
  output logic [31:0]      frames_sent,
  output logic [31:0]      drop_cnt
);

  typedef struct packed {
    logic [29:0] sec;
    logic [5:0]  epoch;
    logic [23:0] frame_no;
  } fhdr_t;

  localparam logic [23:0] FRAME_LEN8 = 24'(PAYLOAD_WORDS + 4);

  // ------------------------------------------------------------ packing
  logic        pps_pend;
  logic        half;
  logic [31:0] lo;
  logic [15:0] wcnt;
  fhdr_t       cur;
  logic        dwr;
  logic [63:0] dword;
  logic        hpush;
  logic        d_full, h_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started  <= 1'b0;
      pps_pend <= 1'b0;
      half     <= 1'b0;
      lo       <= '0;
      wcnt     <= '0;
      cur      <= '0;
      dwr      <= 1'b0;
      dword    <= '0;
      hpush    <= 1'b0;
      drop_cnt <= '0;
    end else begin
      dwr   <= 1'b0;
      hpush <= 1'b0;
      if (pps && en) begin
        pps_pend <= 1'b1;
        started  <= 1'b1;
      end
      if (din_valid && started) begin
        if (!half && wcnt == 0) begin
          // First sample of a new frame.
          if (pps_pend || pps) begin
            cur.frame_no <= '0;
            cur.sec      <= sec;
            cur.epoch    <= epoch;
            pps_pend     <= 1'b0;
          end else begin
            cur.frame_no <= cur.frame_no + 24'd1;
          end
        end
        half <= ~half;
        if (!half) begin
          lo <= din;
        end else begin
          dwr   <= 1'b1;
          dword <= {din, lo};
          if (d_full) drop_cnt <= drop_cnt + 1;
          if (wcnt == 16'(PAYLOAD_WORDS - 1)) begin
            wcnt  <= '0;
            hpush <= 1'b1;
          end else begin
            wcnt <= wcnt + 16'd1;
          end
        end
      end
    end
  end

  // -------------------------------------------------------------- FIFOs
  logic [63:0]        d_rdata;
  logic               d_empty, d_rd;
  logic [FIFO_LOG2:0] d_count;
  fhdr_t              h_rdata;
  logic               h_empty, h_rd;
  logic [2:0]         h_count;

  sync_fifo #(.W(64), .DEPTH_LOG2(FIFO_LOG2)) u_data (
    .clk, .rst_n, .wr_en(dwr && !d_full), .wdata(dword), .rd_en(d_rd),
    .rdata(d_rdata), .empty(d_empty), .full(d_full), .count(d_count));

  sync_fifo #(.W($bits(fhdr_t)), .DEPTH_LOG2(2)) u_hdr (
    .clk, .rst_n, .wr_en(hpush && !h_full), .wdata(cur), .rd_en(h_rd),
    .rdata(h_rdata), .empty(h_empty), .full(h_full), .count(h_count));

  // ------------------------------------------------------------- output
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} ost_e;
  ost_e        st;
  logic [1:0]  hw;
  logic [15:0] dcnt;
  fhdr_t       oh;
  logic        adv;
  logic [31:0] w [8];

  assign adv = !m_valid || m_ready;

  always_comb begin
    w[0] = {1'b0, 1'b0, oh.sec};
    w[1] = {2'b00, oh.epoch, oh.frame_no};
    w[2] = {3'd0, 5'd4, FRAME_LEN8};
    w[3] = {1'b0, 5'd1, thread_id, station_id};
    w[4] = user[31:0];
    w[5] = user[63:32];
    w[6] = user[95:64];
    w[7] = user[127:96];
  end

  assign h_rd = (st == S_IDLE) && !h_empty;
  assign d_rd = (st == S_DATA) && adv && !d_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      hw          <= '0;
      dcnt        <= '0;
      oh          <= '0;
      m_valid     <= 1'b0;
      m_data      <= '0;
      m_last      <= 1'b0;
      frames_sent <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (!h_empty) begin
          oh <= h_rdata;
          hw <= '0;
          st <= S_HDR;
        end
        S_HDR: if (adv) begin
          m_valid <= 1'b1;
          m_last  <= 1'b0;
          m_data  <= {w[2*hw+1], w[2*hw]};
          hw      <= hw + 2'd1;
          if (hw == 2'd3) begin
            st   <= S_DATA;
            dcnt <= '0;
          end
        end
        S_DATA: if (adv && !d_empty) begin
          m_valid <= 1'b1;
          m_data  <= d_rdata;
          m_last  <= (dcnt == 16'(PAYLOAD_WORDS - 1));
          dcnt    <= dcnt + 16'd1;
          if (dcnt == 16'(PAYLOAD_WORDS - 1)) begin
            st          <= S_IDLE;
            frames_sent <= frames_sent + 1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Stream rule: a word offered is held until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_valid && !m_ready |=> m_valid && $stable(m_data) && $stable(m_last));

endmodule

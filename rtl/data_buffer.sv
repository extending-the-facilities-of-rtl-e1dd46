// data_buffer: input packet parser and continuous-stream buffer.
//
// One of three. It receives Ethernet frames carrying VDIF data from the 10GE
// MAC (64-bit words, byte 0 first on the wire, rx_last on the final word),
// strips the HDR_OFFSET bytes of network headers in front of the VDIF
// header, decodes the VDIF header (time, frame number, frame length, legacy
// flag), and writes the sample words of the frame into a dual-clock FIFO.
// On the 128 MHz side it restores a continuous stream of eight 8-bit
// samples per clock, 8.192 Gb/s, as the published design describes.
//
// Header realignment: HDR_OFFSET need not be a multiple of 8 (42 bytes for
// Ethernet + IPv4 + UDP); each aligned word is then formed from the upper
// bytes of one input word and the lower bytes of the next. Frame length is
// taken from the VDIF header, so padding after the frame is ignored. VDIF
// 8-bit samples are offset binary and are converted to two's complement.
//
// Read side: 'ready' rises once PREFILL words are buffered. When 'go' is
// seen (the top raises it when all three buffers are ready, so the three
// streams start on the same clock) the buffer reads one word per clock for
// ever; dout_valid is high every clock from then on. If the FIFO runs dry
// the word is replaced by zeros and counted as an underflow, keeping the
// stream continuous. first_hdr is the header of the first buffered frame,
// captured before any of its data enters the FIFO and constant afterwards,
// so it is safe to read in the other clock domain once 'ready' is high.
//
// The packet format in front of the VDIF header, the FIFO depth, the prefill
// level and the underflow policy are this design's choices. The input
// stream is assumed to begin on a frame boundary after reset.
module data_buffer
  import ddcb_pkg::*;
#(
  parameter int HDR_OFFSET = 42,
  parameter int DEPTH_LOG2 = 12,
  parameter int PREFILL    = 2048
) (
  // 10GE receive domain
  input  logic        rx_clk,
  input  logic        rx_rst_n,
  input  logic [63:0] rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  output logic [31:0] frames_cnt,     // VDIF frames parsed
  output logic [31:0] gap_cnt,        // frame-number discontinuities
  output logic [31:0] invalid_cnt,    // frames flagged invalid by the sender
  output logic [31:0] overflow_cnt,   // words dropped, FIFO full

  // 128 MHz processing domain
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  output logic        ready,
  output logic        running,
  output logic        dout_valid,
  output logic signed [SAMPLE_W-1:0] dout [M],
  output vdif_info_t  first_hdr,
  output logic        have_first,
  output logic [31:0] underflow_cnt
);

  localparam int S  = HDR_OFFSET % 8;
  localparam int W0 = HDR_OFFSET / 8;

  // ------------------------------------------------------------ receive side
  logic [15:0] widx;       // index of the current input word in its frame
  logic [63:0] prev;
  logic        al_valid;
  logic [63:0] al_data;
  logic [15:0] al_idx;     // index of the aligned word after the offset

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      widx <= '0;
      prev <= '0;
    end else if (rx_valid) begin
      prev <= rx_data;
      widx <= rx_last ? 16'd0 : widx + 16'd1;
    end
  end

  generate
    if (S == 0) begin : g_aligned
      assign al_valid = rx_valid && (widx >= 16'(W0));
      assign al_data  = rx_data;
      assign al_idx   = widx - 16'(W0);
    end else begin : g_shift
      assign al_valid = rx_valid && (widx >= 16'(W0 + 1));
      assign al_data  = {rx_data[S*8-1:0], prev[63:S*8]};
      assign al_idx   = widx - 16'(W0 + 1);
    end
  endgenerate

  vdif_info_t  hdr;
  logic        legacy;
  logic [23:0] exp_frame;
  logic [29:0] last_sec;
  logic        seen_any;
  logic        wr_en;
  logic [63:0] wr_word;
  logic        fifo_full;
  logic [15:0] hdr_words;
  logic        hdr_done;
  logic        have_first_w;

  assign hdr_words = legacy ? 16'd2 : 16'd4;

  // Header as complete after its second word.
  vdif_info_t h;
  always_comb begin
    h           = hdr;
    h.frame_len = al_data[23:0];
    h.thread_id = al_data[57:48];
  end

  // Offset binary to two's complement: invert the MSB of every byte.
  always_comb begin
    for (int b = 0; b < 8; b++) wr_word[8*b +: 8] = al_data[8*b +: 8] ^ 8'h80;
    wr_en = al_valid && hdr_done && (al_idx >= hdr_words)
            && (32'(al_idx) < 32'(hdr.frame_len));
  end

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      hdr          <= '0;
      legacy       <= 1'b0;
      hdr_done     <= 1'b0;
      exp_frame    <= '0;
      last_sec     <= '0;
      seen_any     <= 1'b0;
      first_hdr    <= '0;
      have_first_w <= 1'b0;
      frames_cnt   <= '0;
      gap_cnt      <= '0;
      invalid_cnt  <= '0;
      overflow_cnt <= '0;
    end else begin
      if (rx_valid && rx_last) hdr_done <= 1'b0;
      if (al_valid && al_idx == 16'd0) begin
        hdr.invalid <= al_data[31];
        legacy      <= al_data[30];
        hdr.seconds <= al_data[29:0];
        hdr.epoch   <= al_data[61:56];
        hdr.frame_no <= al_data[55:32];
      end
      if (al_valid && al_idx == 16'd1) begin
        hdr         <= h;
        hdr_done    <= 1'b1;
        frames_cnt  <= frames_cnt + 1;
        if (h.invalid) invalid_cnt <= invalid_cnt + 1;
        if (seen_any && !(h.frame_no == exp_frame ||
                          (h.frame_no == 24'd0 && h.seconds != last_sec)))
          gap_cnt <= gap_cnt + 1;
        seen_any  <= 1'b1;
        exp_frame <= h.frame_no + 24'd1;
        last_sec  <= h.seconds;
        if (!have_first_w) begin
          first_hdr    <= h;
          have_first_w <= 1'b1;
        end
      end
      if (wr_en && fifo_full) overflow_cnt <= overflow_cnt + 1;
    end
  end


  // ------------------------------------------------------------------ FIFO
  logic [63:0]         rd_word;
  logic                fifo_empty;
  logic [DEPTH_LOG2:0] level;
  logic                rd_en;

  async_fifo #(.W(64), .DEPTH_LOG2(DEPTH_LOG2)) u_fifo (
    .wclk (rx_clk), .wrst_n(rx_rst_n), .wr_en, .wdata(wr_word), .full(fifo_full),
    .rclk (clk),    .rrst_n(rst_n),    .rd_en, .rdata(rd_word), .empty(fifo_empty),
    .rlevel(level)
  );

  // ------------------------------------------------------------- read side
  logic hf_s1, hf_s2;
  logic rd_ok;

  assign rd_en = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hf_s1         <= 1'b0;
      hf_s2         <= 1'b0;
      ready         <= 1'b0;
      running       <= 1'b0;
      rd_ok         <= 1'b0;
      dout_valid    <= 1'b0;
      underflow_cnt <= '0;
    end else begin
      hf_s1 <= have_first_w;
      hf_s2 <= hf_s1;
      if (32'(level) >= 32'(PREFILL) && hf_s2) ready <= 1'b1;
      if (go && ready) running <= 1'b1;
      rd_ok      <= running && !fifo_empty;
      dout_valid <= running;
      if (running && fifo_empty) underflow_cnt <= underflow_cnt + 1;
    end
  end

  always_comb
    for (int p = 0; p < M; p++) dout[p] = rd_ok ? rd_word[8*p +: 8] : '0;

  assign have_first = hf_s2;

endmodule

// ddcb_top: digital downconverter bank.
//
// Converts three wideband 512 MHz channels, received as VDIF over 10GE
// (two X-band and one S-band stream), into 16 narrow-band 2-bit channels
// of 16 or 8 MHz sent as one VDIF stream over 10GE. Data path:
//
//   3 x data_buffer   parse packets, restore 8 samples / 128 MHz clock
//   3 x pfb_dft8      8 complex sub-bands of 128 MHz each
//   channel_switch    any of the 24 sub-bands to any of 16 channels
//   16 x ddc_channel  32 MHz shift, sideband separation, tuning, filtering,
//                     2-bit quantisation
//   vdif_formatter    16 channels -> VDIF frames, time from the timer
//   eth_framer        raw Ethernet or Ethernet/IPv4/UDP packets
//   data_capture      snapshot RAM of one channel for the control processor
//
// The block list and their order follow the published design. The control processor,
// its 1G Ethernet interface, the 10GE MACs/transceivers and the optical
// modules are outside this RTL: their configuration and streams are ports.
//
// Clocks: rx_clk is the 10GE receive clock of the three input streams; clk
// is the 128 MHz processing clock, everything else runs on it. The three
// buffers start together once all hold PREFILL words. The timer is loaded
// from the first input frame header, advanced per input word, and its
// second pulse is delayed by the pipeline latency (PPS_DELAY16 or
// PPS_DELAY8 clocks, depending on bw8) so that output frames begin on the
// corresponding output sample. All channels share one video bandwidth
// (bw8), so their samples arrive on the same clocks.
module ddcb_top
  import ddcb_pkg::*;
#(
  parameter int          HDR_OFFSET     = 42,
  parameter int          BUF_DEPTH_LOG2 = 12,
  parameter int          PREFILL        = 2048,
  parameter int          Q_LOG2_N       = 16,
  parameter int          PAYLOAD_WORDS  = 1000,
  parameter int          FMT_FIFO_LOG2  = 11,
  parameter int unsigned TICKS_PER_SEC  = 128_000_000,
  parameter int          PPS_DELAY16    = 97,
  parameter int          PPS_DELAY8     = 143,
  parameter int          CAP_DEPTH_LOG2 = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rx_clk,
  input  logic         rx_rst_n,

  // 10GE receive streams
  input  logic [63:0]  rx_data  [N_IN],
  input  logic         rx_valid [N_IN],
  input  logic         rx_last  [N_IN],

  // configuration from the control processor
  input  ddc_cfg_t     cfg [N_CH],
  input  logic         bw8,
  input  logic [9:0]   thread_id,
  input  logic [15:0]  station_id,
  input  logic [127:0] vdif_user,
  input  eth_cfg_t     eth_cfg,

  // 10GE transmit stream
  output logic [63:0]  tx_data,
  output logic [7:0]   tx_keep,
  output logic         tx_valid,
  output logic         tx_last,
  input  logic         tx_ready,

  // data capture
  input  logic         cap_arm,
  input  logic [3:0]   cap_sel,
  input  logic [CAP_DEPTH_LOG2-1:0] cap_rd_addr,
  output sample_t      cap_rd_data,
  output logic         cap_done,

  // status
  output logic         running,
  output logic [31:0]  underflow_cnt [N_IN],
  output logic [31:0]  overflow_cnt  [N_IN],
  output logic [31:0]  gap_cnt       [N_IN],
  output logic [31:0]  rx_frames     [N_IN],
  output logic [15:0]  threshold     [N_CH],
  output logic [29:0]  time_sec,
  output logic [31:0]  frames_sent,
  output logic [31:0]  packets_sent
);

  // ------------------------------------------------------------ buffers
  logic             b_ready   [N_IN];
  logic             b_running [N_IN];
  logic             b_valid   [N_IN];
  logic signed [SAMPLE_W-1:0] b_data [N_IN][M];
  vdif_info_t       b_hdr     [N_IN];
  logic             b_have    [N_IN];
  logic [31:0]      b_inval   [N_IN];
  logic             go;

  always_comb begin
    go = 1'b1;
    for (int b = 0; b < N_IN; b++) go &= b_ready[b];
  end

  for (genvar b = 0; b < N_IN; b++) begin : g_in
    data_buffer #(.HDR_OFFSET(HDR_OFFSET), .DEPTH_LOG2(BUF_DEPTH_LOG2), .PREFILL(PREFILL)) u_buf (
      .rx_clk, .rx_rst_n,
      .rx_data     (rx_data[b]),
      .rx_valid    (rx_valid[b]),
      .rx_last     (rx_last[b]),
      .frames_cnt  (rx_frames[b]),
      .gap_cnt     (gap_cnt[b]),
      .invalid_cnt (b_inval[b]),
      .overflow_cnt(overflow_cnt[b]),
      .clk, .rst_n,
      .go,
      .ready       (b_ready[b]),
      .running     (b_running[b]),
      .dout_valid  (b_valid[b]),
      .dout        (b_data[b]),
      .first_hdr   (b_hdr[b]),
      .have_first  (b_have[b]),
      .underflow_cnt(underflow_cnt[b])
    );
  end

  assign running = b_running[0];

  // -------------------------------------------------------------- timer
  logic        t_load, t_run, pps_raw, was_valid;
  logic [5:0]  t_epoch;
  logic [31:0] t_tick, load_tick;

  assign load_tick = 32'(b_hdr[0].frame_no) * 32'(b_hdr[0].frame_len - 24'd4);
  assign t_load    = b_valid[0] && !was_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) was_valid <= 1'b0;
    else        was_valid <= b_valid[0];

  timer #(.TICKS_PER_SEC(TICKS_PER_SEC)) u_timer (
    .clk, .rst_n,
    .load      (t_load),
    .load_sec  (b_hdr[0].seconds),
    .load_epoch(b_hdr[0].epoch),
    .load_tick,
    .tick      (b_valid[0]),
    .running   (t_run),
    .sec       (time_sec),
    .epoch     (t_epoch),
    .tick_cnt  (t_tick),
    .pps       (pps_raw)
  );

  // Second pulse delayed by the data-path latency.
  localparam int PD = (PPS_DELAY8 > PPS_DELAY16) ? PPS_DELAY8 : PPS_DELAY16;
  logic [PD:0] pps_sr;
  logic        pps_out;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pps_sr <= '0;
    else        pps_sr <= {pps_sr[PD-1:0], pps_raw};
  assign pps_out = bw8 ? pps_sr[PPS_DELAY8] : pps_sr[PPS_DELAY16];

  // ---------------------------------------------------------- prefilters
  logic  p_valid [N_IN];
  cplx_t p_data  [N_IN][M];
  cplx_t sw_src  [N_SRC];

  for (genvar b = 0; b < N_IN; b++) begin : g_pfb
    pfb_dft8 u_pfb (
      .clk, .rst_n,
      .din_valid (b_valid[b]),
      .din       (b_data[b]),
      .dout_valid(p_valid[b]),
      .dout      (p_data[b])
    );
    for (genvar i = 0; i < M; i++) begin : g_src
      assign sw_src[b*M + i] = p_data[b][i];
    end
  end

  // -------------------------------------------------------------- switch
  logic [4:0] sw_sel [N_CH];
  logic       sw_valid;
  cplx_t      sw_out [N_CH];

  always_comb
    for (int k = 0; k < N_CH; k++) sw_sel[k] = cfg[k].src;

  channel_switch u_switch (
    .clk, .rst_n,
    .din_valid (p_valid[0]),
    .src       (sw_src),
    .sel       (sw_sel),
    .dout_valid(sw_valid),
    .dout      (sw_out)
  );

  // --------------------------------------------------------- converters
  logic             c_valid [N_CH];
  logic [1:0]       c_code  [N_CH];
  logic [N_CH-1:0]  v_valid;
  sample_t          v_data  [N_CH];
  logic [2*N_CH-1:0] codes;

  for (genvar k = 0; k < N_CH; k++) begin : g_ch
    logic vv;
    ddc_channel #(.Q_LOG2_N(Q_LOG2_N)) u_ch (
      .clk, .rst_n,
      .sync_clr   (1'b0),
      .cfg        (cfg[k]),
      .bw8,
      .din_valid  (sw_valid),
      .din        (sw_out[k]),
      .dout_valid (c_valid[k]),
      .code       (c_code[k]),
      .video_valid(vv),
      .video      (v_data[k]),
      .thr        (threshold[k])
    );
    assign v_valid[k]      = vv;
    assign codes[2*k +: 2] = c_code[k];
  end

  // ------------------------------------------------------------- output
  logic [63:0] f_data;
  logic        f_valid, f_last, f_ready, f_started;
  logic [31:0] f_drop;

  vdif_formatter #(.PAYLOAD_WORDS(PAYLOAD_WORDS), .FIFO_LOG2(FMT_FIFO_LOG2)) u_fmt (
    .clk, .rst_n,
    .en        (t_run),
    .pps       (pps_out),
    .sec       (time_sec),
    .epoch     (t_epoch),
    .thread_id,
    .station_id,
    .user      (vdif_user),
    .din_valid (c_valid[0]),
    .din       (codes),
    .m_data    (f_data),
    .m_valid   (f_valid),
    .m_last    (f_last),
    .m_ready   (f_ready),
    .started   (f_started),
    .frames_sent,
    .drop_cnt  (f_drop)
  );

  eth_framer #(.PAYLOAD_BYTES(8 * (PAYLOAD_WORDS + 4))) u_eth (
    .clk, .rst_n,
    .cfg     (eth_cfg),
    .s_data  (f_data),
    .s_valid (f_valid),
    .s_last  (f_last),
    .s_ready (f_ready),
    .m_data  (tx_data),
    .m_keep  (tx_keep),
    .m_valid (tx_valid),
    .m_last  (tx_last),
    .m_ready (tx_ready),
    .pkt_cnt (packets_sent)
  );

  // -------------------------------------------------------- data capture
  logic cap_busy;
  data_capture #(.DEPTH_LOG2(CAP_DEPTH_LOG2)) u_cap (
    .clk, .rst_n,
    .arm      (cap_arm),
    .sel      (cap_sel),
    .din_valid(v_valid),
    .din      (v_data),
    .busy     (cap_busy),
    .done     (cap_done),
    .rd_addr  (cap_rd_addr),
    .rd_data  (cap_rd_data)
  );

  // All channels run in lock step.
  for (genvar k = 1; k < N_CH; k++) begin : g_lock
    assert property (@(posedge clk) disable iff (!rst_n) c_valid[k] == c_valid[0]);
  end

endmodule

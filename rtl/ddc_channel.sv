// ddc_channel: one of the 16 downconverter channels.
//
// Takes a complex 128 MS/s sub-band from the channel switch and produces a
// 2-bit video signal, in the order the published design gives:
//   quarter_shift   optional +-32 MHz complementary shift (blind zones)
//   sideband_sep    front separator, 0.15 - 52 MHz, or 52 MHz - Nyquist with
//                   the inverters switched on (cfg.invert)
//   freq_converter  mixer + NCO, decimator, separator, 8/16 MHz filter
//   quantizer2      2-bit quantizer with floating threshold
// cfg.front_sb picks which front sideband feeds the converter. The raw
// video sample is also brought out for the data-capture module. All stages
// use a valid strobe; with the same configuration of bw8 every channel
// produces samples on the same clocks.
module ddc_channel
  import ddcb_pkg::*;
#(
  parameter int Q_LOG2_N = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync_clr,
  input  ddc_cfg_t   cfg,
  input  logic       bw8,
  input  logic       din_valid,
  input  cplx_t      din,
  output logic       dout_valid,
  output logic [1:0] code,
  output logic       video_valid,
  output sample_t    video,
  output logic [15:0] thr
);

  logic    qs_valid;
  cplx_t   qs;
  quarter_shift u_qs (.clk, .rst_n, .mode(cfg.qshift), .din_valid, .din,
                      .dout_valid(qs_valid), .dout(qs));

  logic    fs_valid;
  sample_t fs_usb, fs_lsb;
  sideband_sep u_front (.clk, .rst_n, .din_valid(qs_valid), .din(qs), .inv(cfg.invert),
                        .dout_valid(fs_valid), .usb(fs_usb), .lsb(fs_lsb));

  freq_converter u_fc (
    .clk, .rst_n, .sync_clr,
    .din_valid (fs_valid),
    .din       (cfg.front_sb ? fs_lsb : fs_usb),
    .fword     (cfg.fword),
    .bw8,
    .sb        (cfg.out_sb),
    .dout_valid(video_valid),
    .dout      (video)
  );

  logic thr_upd;
  quantizer2 #(.LOG2_N(Q_LOG2_N)) u_q (
    .clk, .rst_n,
    .din_valid (video_valid),
    .din       (video),
    .dout_valid,
    .code,
    .thr_o     (thr),
    .thr_update(thr_upd)
  );

endmodule

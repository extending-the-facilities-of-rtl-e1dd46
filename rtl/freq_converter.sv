// freq_converter: digital frequency converter of one channel.
//
// Input is a real 128 MS/s signal (0 - 64 MHz, one sideband of the front
// separator). Following the published design, the chain is: quadrature mixer driven
// by the 10 kHz-step NCO, filter-decimator by 2, sideband separator, and a
// switchable 8/16 MHz video filter.
//
//   mixer     I = x*cos(phi), Q = -x*sin(phi): f0 = fword*10 kHz moves to 0
//   decimator half-band on I and Q, 128 -> 64 MS/s (+-32 MHz)
//   separator phase method, upper (f0 + df) or lower (f0 - df) sideband
//   video     half-band, 64 -> 32 MS/s (16 MHz band); with bw8 = 1 a second
//             half-band, 32 -> 16 MS/s (8 MHz band)
//
// The published design also divides the second separator's band into three sub-bands;
// that refinement is not described closely enough to build and is left out
// here, so the separator is the same single-band phase-method block as the
// front one. Output: one real sample per dout_valid, at 32 or 16 MS/s.
// sync_clr clears the NCO phase and decimator phases are set by reset.
module freq_converter
  import ddcb_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sync_clr,
  input  logic            din_valid,
  input  sample_t         din,
  input  logic [FW_W-1:0] fword,
  input  logic            bw8,        // 1: 8 MHz video band, 0: 16 MHz
  input  logic            sb,         // 1: lower sideband, 0: upper
  output logic            dout_valid,
  output sample_t         dout
);

  sample_t nco_c, nco_s;

  nco u_nco (
    .clk, .rst_n, .sync_clr,
    .adv    (din_valid),
    .fword,
    .cos_o  (nco_c),
    .sin_o  (nco_s),
    .phase_o()
  );

  // Quadrature mixer.
  logic    mix_valid;
  sample_t mix_i, mix_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mix_valid <= 1'b0;
      mix_i     <= '0;
      mix_q     <= '0;
    end else begin
      mix_valid <= din_valid;
      if (din_valid) begin
        mix_i <= sat((acc_t'(din) * acc_t'(nco_c) + 48'sd16384) >>> 15);
        mix_q <= sat(-((acc_t'(din) * acc_t'(nco_s) + 48'sd16384) >>> 15));
      end
    end
  end

  // Filter-decimator by 2 on I and Q.
  logic    d_valid_i, d_valid_q;
  sample_t d_i, d_q;
  halfband_decim u_dec_i (.clk, .rst_n, .din_valid(mix_valid), .din(mix_i),
                          .dout_valid(d_valid_i), .dout(d_i));
  halfband_decim u_dec_q (.clk, .rst_n, .din_valid(mix_valid), .din(mix_q),
                          .dout_valid(d_valid_q), .dout(d_q));

  // Sideband separator at 64 MS/s.
  logic    s_valid;
  sample_t s_usb, s_lsb;
  sideband_sep u_sep (
    .clk, .rst_n,
    .din_valid (d_valid_i),
    .din       ('{re: d_i, im: d_q}),
    .inv       (1'b0),
    .dout_valid(s_valid),
    .usb       (s_usb),
    .lsb       (s_lsb)
  );

  // Switchable video filter.
  logic    v1_valid, v2_valid;
  sample_t v1, v2;
  halfband_decim u_vid16 (.clk, .rst_n, .din_valid(s_valid), .din(sb ? s_lsb : s_usb),
                          .dout_valid(v1_valid), .dout(v1));
  halfband_decim u_vid8  (.clk, .rst_n, .din_valid(v1_valid), .din(v1),
                          .dout_valid(v2_valid), .dout(v2));

  assign dout_valid = bw8 ? v2_valid : v1_valid;
  assign dout       = bw8 ? v2 : v1;

  // I and Q decimators run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) d_valid_i == d_valid_q);

endmodule

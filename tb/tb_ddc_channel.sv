// tb_ddc_channel: complex tones into one downconverter channel, each case
// tuned so that a known video tone should come out, and checked for power
// (amplitude A/2), frequency and the 32 MS/s code rate:
//   +30 MHz, upper front sideband, NCO 25 MHz
//   -30 MHz, lower front sideband, NCO 25 MHz
//   +2 MHz (blind zone) with the +32 MHz converter, NCO 29 MHz
//   +58 MHz (near Nyquist) with the inverters on, NCO 48 MHz: 10 MHz
//   -58 MHz into the upper front sideband with the inverters on, NCO
//     53 MHz: must be suppressed by at least 20 dB
// In the first case the 2-bit codes are also checked: the threshold must
// settle at 0.98 of the video RMS and the outer codes must take the share
// expected for a sine (about 51 %).
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_ddc_channel;
  import ddcb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sync_clr = 0, bw8 = 0, din_valid = 0;
  ddc_cfg_t cfg;
  cplx_t din = '0;
  logic dout_valid, video_valid;
  logic [1:0] code;
  sample_t video;
  logic [15:0] thr;
  int checks = 0, failures = 0;

  ddc_channel #(.Q_LOG2_N(8)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pw; int nout, ncross, nouter, ncodes; bit meas; sample_t lastv;
  always @(posedge clk) if (rst_n && meas) begin
    if (video_valid) begin
      pw += real'(video) * real'(video);
      if ((video >= 0) != (lastv >= 0)) ncross++;
      lastv = video;
      nout++;
    end
    if (dout_valid) begin
      ncodes++;
      if (code == 2'b00 || code == 2'b11) nouter++;
    end
  end

  localparam real A = 12000.0;
  task automatic run(real f_mhz, qshift_e qs, bit inv, bit fsb, int fw, real fv, string name);
    real p, f;
    @(negedge clk);
    cfg = '{src: 5'd0, qshift: qs, invert: inv, front_sb: fsb, fword: 13'(fw), out_sb: 1'b0};
    rst_n = 0; @(negedge clk); rst_n = 1;
    pw = 0; nout = 0; ncross = 0; meas = 0; lastv = 0; nouter = 0; ncodes = 0;
    for (int k = 0; k < 7000; k++) begin
      @(negedge clk);
      din_valid = 1;
      din.re = sample_t'($rtoi(A * $cos(2.0 * PI * f_mhz / 128.0 * k)));
      din.im = sample_t'($rtoi(A * $sin(2.0 * PI * f_mhz / 128.0 * k)));
      if (k == 2000) meas = 1;
    end
    @(negedge clk); din_valid = 0; meas = 0;
    p = pw / nout;
    f = real'(ncross) / 2.0 / (nout / 32.0);
    checks++;
    if (fv < 0.0) begin
      // the tone lies in the other sideband: at least 20 dB down
      if (p > A * A / 8.0 / 100.0) begin failures++; $display("FAIL %s: power %f not suppressed", name, p); end
    end else begin
      if (p < 0.75 * A * A / 8.0 || p > 1.25 * A * A / 8.0) begin failures++; $display("FAIL %s: power %f exp %f", name, p, A * A / 8.0); end
      checks++;
      if (f < fv * 0.96 || f > fv * 1.04) begin failures++; $display("FAIL %s: tone %f MHz", name, f); end
    end
    checks++;
    if (ncodes < 1248 || ncodes > 1252) begin failures++; $display("FAIL %s: %0d codes for 5000 inputs", name, ncodes); end
    if (name == "usb") begin
      checks++;
      if (real'(thr) < 0.93 * 0.98 * $sqrt(p) || real'(thr) > 1.07 * 0.98 * $sqrt(p)) begin
        failures++; $display("FAIL threshold %0d, video rms %f", thr, $sqrt(p));
      end
      checks++;
      if (real'(nouter) / ncodes < 0.44 || real'(nouter) / ncodes > 0.58) begin
        failures++; $display("FAIL outer code share %f", real'(nouter) / ncodes);
      end
    end
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run( 30.0, QS_OFF, 0, 0, 2500, 5.0, "usb");
    run(-30.0, QS_OFF, 0, 1, 2500, 5.0, "lsb front");
    run(  2.0, QS_UP,  0, 0, 2900, 5.0, "blind zone +32 MHz");
    run( 58.0, QS_OFF, 1, 0, 4800, 10.0, "inverted near Nyquist");
    run(-58.0, QS_OFF, 1, 0, 5300, -1.0, "inverted, other sideband at -58 MHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

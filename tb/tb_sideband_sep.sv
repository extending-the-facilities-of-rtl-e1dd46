// tb_sideband_sep: feeds complex tones to the phase-method separator and
// measures the power on both outputs. A positive-frequency tone must come
// out on usb and be suppressed on lsb, a negative one the other way round,
// by at least 30 dB. With the inverters on, a tone near the Nyquist
// frequency (58 MHz of 128 MS/s) must still be separated onto the right
// output. Also checks one output per input and the two-clock latency.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_sideband_sep;
  import ddcb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic din_valid = 0;
  cplx_t din = '0;
  logic inv = 0;
  logic dout_valid;
  sample_t usb, lsb;
  int checks = 0, failures = 0;

  sideband_sep dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pu, pl;
  int  nv;
  bit  meas;
  always @(posedge clk) if (dout_valid && meas) begin
    pu += real'(usb) * real'(usb);
    pl += real'(lsb) * real'(lsb);
    nv++;
  end

  task automatic tone(real f_mhz, bit want_usb, string name);
    real ratio, a;
    a = 12000.0;
    pu = 0; pl = 0; nv = 0; meas = 0;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      din_valid = 1;
      din.re = sample_t'($rtoi(a * $cos(2.0 * PI * f_mhz / 128.0 * n)));
      din.im = sample_t'($rtoi(a * $sin(2.0 * PI * f_mhz / 128.0 * n)));
      if (n == 200) meas = 1;
    end
    @(negedge clk); din_valid = 0; meas = 0;
    repeat (4) @(posedge clk);
    ratio = want_usb ? pl / (pu + 1.0) : pu / (pl + 1.0);
    checks++;
    if (ratio > 1.0e-3) begin
      failures++;
      $display("FAIL %s: suppression only %f dB", name, -10.0 * $log10(ratio + 1e-30));
    end
    // Wanted output amplitude about a (rms a/sqrt2).
    checks++;
    if ((want_usb ? pu : pl) / nv < 0.8 * a * a / 2.0 || (want_usb ? pu : pl) / nv > 1.2 * a * a / 2.0) begin
      failures++;
      $display("FAIL %s: wanted power %f", name, (want_usb ? pu : pl) / nv);
    end
    checks++;
    if (nv < 995 || nv > 1001) begin failures++; $display("FAIL %s: %0d outputs", name, nv); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    inv = 0;
    tone( 20.0, 1, "usb 20 MHz");
    tone(-20.0, 0, "lsb 20 MHz");
    tone( 45.0, 1, "usb 45 MHz");
    tone( -5.0, 0, "lsb 5 MHz");
    inv = 1;
    tone( 58.0, 1, "usb 58 MHz inverted");
    tone(-58.0, 0, "lsb 58 MHz inverted");
    inv = 0;
    // Latency: valid in at edge k -> dout_valid at edge k+2.
    @(negedge clk); din_valid = 1;
    @(negedge clk); din_valid = 0;
    checks++;
    if (dout_valid) begin failures++; $display("FAIL latency early"); end
    @(negedge clk);
    checks++;
    if (!dout_valid) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

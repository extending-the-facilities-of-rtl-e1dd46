// tb_freq_converter: real tones at 128 MS/s around a 20 MHz tuning
// (fword = 2000). For each case the output power, the tone frequency
// (from zero crossings) and the output rate are measured:
//   tone 25 MHz, upper sideband, 16 MHz band: 5 MHz tone, amplitude A/2,
//     one output per 4 inputs (32 MS/s)
//   same tone, lower sideband: suppressed by at least 30 dB
//   tone 15 MHz, lower sideband: 5 MHz tone passes
//   tone 25 MHz, upper sideband, 8 MHz band: passes, one output per 8
//   tone 33 MHz, upper sideband, 8 MHz band: 13 MHz, outside the band,
//     attenuated by at least 30 dB
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_freq_converter;
  import ddcb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sync_clr = 0, din_valid = 0;
  sample_t din = 0;
  logic [FW_W-1:0] fword = 13'd2000;
  logic bw8 = 0, sb = 0;
  logic dout_valid;
  sample_t dout;
  int checks = 0, failures = 0;

  freq_converter dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pw; int nout, ncross; bit meas; sample_t lastv;
  always @(posedge clk) if (rst_n && dout_valid && meas) begin
    pw += real'(dout) * real'(dout);
    if ((dout >= 0) != (lastv >= 0)) ncross++;
    lastv = dout;
    nout++;
  end

  localparam real A = 20000.0;
  task automatic run(real f_mhz, bit b8, bit s, output real p, output real fo, output int n);
    @(negedge clk);
    bw8 = b8; sb = s;
    rst_n = 0; @(negedge clk); rst_n = 1;
    pw = 0; nout = 0; ncross = 0; meas = 0; lastv = 0;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      din_valid = 1;
      din = sample_t'($rtoi(A * $cos(2.0 * PI * f_mhz / 128.0 * k + 0.3)));
      if (k == 1000) meas = 1;
    end
    @(negedge clk); din_valid = 0; meas = 0;
    p = pw / nout;
    n = nout;
    fo = real'(ncross) / 2.0 / (nout / (b8 ? 16.0 : 32.0));
  endtask

  initial begin
    real p, f, pref;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(25.0, 0, 0, pref, f, n);
    checks++;
    if (pref < 0.8 * A * A / 8.0 || pref > 1.2 * A * A / 8.0) begin failures++; $display("FAIL USB power %f exp %f", pref, A * A / 8.0); end
    checks++;
    if (f < 4.8 || f > 5.2) begin failures++; $display("FAIL USB tone %f MHz", f); end
    checks++;
    if (n < 1248 || n > 1252) begin failures++; $display("FAIL 32 MS/s rate: %0d outputs for 5000 inputs", n); end
    run(25.0, 0, 1, p, f, n);
    checks++;
    if (p > pref * 1.0e-3) begin failures++; $display("FAIL LSB suppression %f dB", 10.0 * $log10(pref / p)); end
    run(15.0, 0, 1, p, f, n);
    checks++;
    if (p < 0.8 * pref || f < 4.8 || f > 5.2) begin failures++; $display("FAIL LSB tone p=%f f=%f", p, f); end
    run(25.0, 1, 0, p, f, n);
    checks++;
    if (p < 0.8 * pref || f < 4.8 || f > 5.2) begin failures++; $display("FAIL 8 MHz band tone p=%f f=%f", p, f); end
    checks++;
    if (n < 623 || n > 627) begin failures++; $display("FAIL 16 MS/s rate: %0d outputs", n); end
    run(33.0, 1, 0, p, f, n);
    checks++;
    if (p > pref * 1.0e-3) begin failures++; $display("FAIL out-of-band 13 MHz in 8 MHz mode: %f dB", 10.0 * $log10(pref / p)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

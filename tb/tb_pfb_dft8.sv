// tb_pfb_dft8: compares every output of the prefilter with the defining
// sum y_i[k] = sum_n h[n] x[8k+7-n] exp(+j 2 pi i n / 8) evaluated in real
// arithmetic with coefficients computed here (Blackman-weighted sinc),
// within 2 LSB; checks the three-clock latency and one output set per input
// word; and checks with a 266 MHz tone that band 2 (256 MHz) holds the
// tone at +10 MHz while the far bands stay quiet.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_pfb_dft8;
  import ddcb_pkg::*;
  localparam int TP = 8;
  localparam int LL = 8 * TP;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic din_valid = 0;
  logic signed [7:0] din [8];
  logic dout_valid;
  cplx_t dout [8];
  int checks = 0, failures = 0;

  pfb_dft8 dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real h [LL];
  initial
    for (int n = 0; n < LL; n++) begin
      real t, w, s, v;
      t = (n - (LL - 1) / 2.0) / 8.0;
      w = 0.42 - 0.5 * $cos(2.0 * PI * n / (LL - 1)) + 0.08 * $cos(4.0 * PI * n / (LL - 1));
      s = $sin(PI * t) / (PI * t);
      v = w * s * 32767.0;
      h[n] = (v >= 0.0) ? $floor(v + 0.5) : -$floor(-v + 0.5);
    end

  int xs [$];       // all accepted samples
  int nword = 0;    // output sets seen
  real pw [8];
  bit  meas = 0;

  always @(posedge clk) if (rst_n && dout_valid) begin
    for (int i = 0; i < 8; i++) begin
      real er, ei;
      er = 0; ei = 0;
      for (int n = 0; n < LL; n++) begin
        int idx;
        idx = 8 * nword + 7 - n;
        if (idx >= 0) begin
          er += h[n] * xs[idx] * $cos(2.0 * PI * i * n / 8.0);
          ei += h[n] * xs[idx] * $sin(2.0 * PI * i * n / 8.0);
        end
      end
      er = er / 512.0; ei = ei / 512.0;
      if (er > 32767) er = 32767;
      if (er < -32768) er = -32768;
      if (ei > 32767) ei = 32767;
      if (ei < -32768) ei = -32768;
      checks++;
      if (real'(dout[i].re) - er > 2.0 || er - real'(dout[i].re) > 2.0 ||
          real'(dout[i].im) - ei > 2.0 || ei - real'(dout[i].im) > 2.0) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d band %0d: %0d,%0d exp %f,%f", nword, i, dout[i].re, dout[i].im, er, ei);
      end
      if (meas) pw[i] += real'(dout[i].re) ** 2 + real'(dout[i].im) ** 2;
    end
    nword++;
  end

  task automatic put(bit tone_mode, int k);
    @(negedge clk);
    din_valid = 1;
    for (int p = 0; p < 8; p++) begin
      int x;
      if (tone_mode) x = $rtoi(100.0 * $cos(2.0 * PI * 266.0 / 1024.0 * (8 * k + p)));
      else           x = int'($urandom_range(0, 255)) - 128;
      din[p] = 8'(x);
      xs.push_back(x);
    end
  endtask

  initial begin
    int nin;
    for (int p = 0; p < 8; p++) din[p] = 0;
    for (int i = 0; i < 8; i++) pw[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    nin = 0;
    for (int k = 0; k < 300; k++) begin
      put(0, nin); nin++;
      if (k % 5 == 4) begin @(negedge clk); din_valid = 0; end
    end
    // Latency: word presented in clock cycle c -> dout_valid in cycle c+3,
    // i.e. set by the second edge after the accepting edge.
    @(negedge clk); din_valid = 0;
    repeat (10) @(posedge clk);
    put(0, nin); nin++;
    @(negedge clk); din_valid = 0;          // accepted at the edge before
    for (int e = 1; e <= 3; e++) begin
      @(posedge clk); #1;
      checks++;
      if (dout_valid != (e == 2)) begin failures++; $display("FAIL latency at +%0d", e); end
    end
    @(posedge clk); #1;
    checks++;
    if (nword != nin) begin failures++; $display("FAIL output count %0d for %0d words", nword, nin); end
    for (int k = 0; k < 400; k++) begin
      put(1, nin); nin++;
      if (k == 50) meas = 1;
    end
    @(negedge clk); din_valid = 0;
    repeat (4) @(posedge clk);
    meas = 0;
    checks++;
    if (pw[2] < 1000.0 * (pw[0] + pw[4] + pw[1] * 0.0 + 1.0)) begin
      failures++; $display("FAIL band selectivity: band2 %e band0 %e band4 %e", pw[2], pw[0], pw[4]);
    end
    checks++;
    if (pw[2] < 2.0 * pw[1] || pw[2] < 2.0 * pw[3]) begin
      failures++; $display("FAIL band 2 not dominant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

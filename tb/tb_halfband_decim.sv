// tb_halfband_decim: checks the half-band decimator against a direct
// convolution with independently computed coefficients, the 2:1 output
// rate and the two-clock latency. Random input, then a DC step for the
// unity gain.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_halfband_decim;
  import ddcb_pkg::*;
  localparam int NT = 23;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic din_valid = 0;
  sample_t din = 0;
  logic dout_valid;
  sample_t dout;
  int checks = 0, failures = 0;

  halfband_decim #(.NTAPS(NT)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference coefficients: 0.5*sinc(k/2) times a Blackman window, Q1.15.
  int h [NT];
  function automatic int refq(real v);
    return (v >= 0.0) ? $rtoi(v * 32767.0 + 0.5) : $rtoi(v * 32767.0 - 0.5);
  endfunction
  initial begin
    for (int n = 0; n < NT; n++) begin
      real k, w, s;
      k = n - (NT - 1) / 2;
      w = 0.42 - 0.5 * $cos(2.0 * 3.141592653589793 * n / (NT - 1))
               + 0.08 * $cos(4.0 * 3.141592653589793 * n / (NT - 1));
      s = (k == 0) ? 1.0 : $sin(3.141592653589793 * k / 2.0) / (3.141592653589793 * k / 2.0);
      h[n] = refq(0.5 * s * w);
    end
  end

  int xs [$];
  int nout = 0;
  int last_in_cyc = 0, cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && dout_valid) begin
    longint acc;
    int nin;
    acc = 0;
    nin = 2 * (nout + 1);          // samples accepted when this output was formed
    for (int i = 0; i < NT; i++)
      if (nin - 1 - i >= 0) acc += longint'(h[i]) * xs[nin - 1 - i];
    acc = (acc + 16384) >>> 15;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    checks++;
    if (longint'(dout) != acc) begin
      failures++;
      if (failures < 10) $display("FAIL out %0d: got %0d exp %0d", nout, dout, acc);
    end
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      din_valid = 1;
      din = (n < 300) ? sample_t'($urandom_range(0, 40000) - 20000) : sample_t'(10000);
      xs.push_back(int'(din));
      if (n % 3 == 2) begin
        @(negedge clk);
        din_valid = 0;
      end
    end
    @(negedge clk);
    din_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != 200) begin failures++; $display("FAIL rate: %0d outputs for 400 inputs", nout); end
    // DC gain: last output should be close to the DC input.
    checks++;
    if (dout < 9900 || dout > 10100) begin failures++; $display("FAIL DC gain %0d", dout); end
    // Latency: a single accepted sample on an odd phase produces output 2 clocks later.
    xs.push_back(0); xs.push_back(0);
    @(negedge clk); din_valid = 1; din = 0;
    @(negedge clk); din_valid = 0;
    @(negedge clk); din_valid = 1;
    @(negedge clk); din_valid = 0;
    checks++;
    if (!dout_valid) begin
      @(posedge clk); #1;
      if (!dout_valid) begin failures++; $display("FAIL latency"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

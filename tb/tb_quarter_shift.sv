// tb_quarter_shift: random complex samples through all three modes,
// compared with a multiplication by exp(+-j*pi*n/2) done in real
// arithmetic; one-clock latency; a tone at +10 MHz must appear at +42 MHz
// (phase step) in QS_UP mode.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_quarter_shift;
  import ddcb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  qshift_e mode = QS_OFF;
  logic din_valid = 0;
  cplx_t din = '0;
  logic dout_valid;
  cplx_t dout;
  int checks = 0, failures = 0;

  quarter_shift dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    for (int m = 0; m < 3; m++) begin
      mode = qshift_e'(m);
      for (int k = 0; k < 200; k++) begin
        real ang, er, ei;
        cplx_t x;
        x.re = sample_t'($urandom_range(0, 65534) - 32767);
        x.im = sample_t'($urandom_range(0, 65534) - 32767);
        @(negedge clk);
        din_valid = ($urandom_range(0, 3) != 0);
        din = x;
        @(posedge clk); #1;
        if (din_valid) begin
          ang = (m == 0) ? 0.0 : (m == 1 ? PI / 2.0 * n : -PI / 2.0 * n);
          er = $floor(real'(x.re) * $cos(ang) - real'(x.im) * $sin(ang) + 0.5);
          ei = $floor(real'(x.re) * $sin(ang) + real'(x.im) * $cos(ang) + 0.5);
          checks++;
          if (!dout_valid || real'(dout.re) != er || real'(dout.im) != ei) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d n=%0d got %0d,%0d exp %f,%f", m, n, dout.re, dout.im, er, ei);
          end
          n++;
        end else begin
          checks++;
          if (dout_valid) begin failures++; $display("FAIL valid without input"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

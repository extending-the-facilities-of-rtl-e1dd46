// tb_nco: checks the oscillator's sine and cosine against real-valued
// sin/cos for several frequency words, the exact 10 kHz step (the phase
// returns to 0 after 12800/gcd steps) and the sync clear.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_nco;
  import ddcb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sync_clr = 0, adv = 0;
  logic [FW_W-1:0] fword = 0;
  sample_t cos_o, sin_o;
  logic [13:0] phase_o;
  int checks = 0, failures = 0;

  nco dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run(int fw, int steps);
    longint ph;
    @(negedge clk); sync_clr = 1; @(negedge clk); sync_clr = 0;
    fword = FW_W'(fw);
    adv = 1;
    ph = 0;
    for (int n = 0; n < steps; n++) begin
      real es, ec;
      es = 32767.0 * $sin(2.0 * PI * ph / 12800.0);
      ec = 32767.0 * $cos(2.0 * PI * ph / 12800.0);
      checks++;
      if (rabs(real'(sin_o) - es) > 1.01 || rabs(real'(cos_o) - ec) > 1.01 || int'(phase_o) != ph) begin
        failures++;
        if (failures < 10) $display("FAIL fw=%0d n=%0d sin %0d/%f cos %0d/%f", fw, n, sin_o, es, cos_o, ec);
      end
      @(negedge clk);
      ph = (ph + fw) % 12800;
    end
    adv = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 12801);        // 10 kHz: every table entry
    run(6399, 500);       // 63.99 MHz
    run(2345, 3000);
    // 1 MHz: the phase is back at 0 after exactly 128 steps.
    @(negedge clk); sync_clr = 1; @(negedge clk); sync_clr = 0;
    fword = 100; adv = 1;
    repeat (128) @(negedge clk);
    adv = 0;
    checks++;
    if (phase_o != 0) begin failures++; $display("FAIL period, phase %0d", phase_o); end
    // adv = 0 holds the phase.
    repeat (5) @(negedge clk);
    checks++;
    if (phase_o != 0) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

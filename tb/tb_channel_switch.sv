// tb_channel_switch: random source data and random selections (including
// out-of-range ones, which must give zero); every output compared with the
// selected source one clock later.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_channel_switch;
  import ddcb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic din_valid = 0;
  cplx_t src [N_SRC];
  logic [4:0] sel [N_CH];
  logic dout_valid;
  cplx_t dout [N_CH];
  int checks = 0, failures = 0;

  channel_switch dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t exp_o [N_CH];
    for (int i = 0; i < N_SRC; i++) src[i] = '0;
    for (int k = 0; k < N_CH; k++) sel[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      din_valid = t[0];
      for (int i = 0; i < N_SRC; i++) src[i] = cplx_t'($urandom);
      for (int k = 0; k < N_CH; k++) sel[k] = 5'($urandom_range(0, 26));
      for (int k = 0; k < N_CH; k++) exp_o[k] = (sel[k] < N_SRC) ? src[sel[k]] : '0;
      @(posedge clk); #1;
      checks++;
      if (dout_valid != t[0]) begin failures++; $display("FAIL valid"); end
      for (int k = 0; k < N_CH; k++) begin
        checks++;
        if (dout[k] != exp_o[k]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d out %0d sel %0d", t, k, sel[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

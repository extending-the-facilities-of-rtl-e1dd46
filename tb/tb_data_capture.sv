// tb_data_capture: arms a capture of one selected channel among random
// streams, checks busy/done timing and reads the RAM back against the
// samples of that channel; a second capture of another channel follows.
module tb_data_capture;
  import ddcb_pkg::*;
  localparam int DL = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic arm = 0;
  logic [3:0] sel = 0;
  logic [N_CH-1:0] din_valid = '0;
  sample_t din [N_CH];
  logic busy, done;
  logic [DL-1:0] rd_addr = 0;
  sample_t rd_data;
  int checks = 0, failures = 0;

  data_capture #(.DEPTH_LOG2(DL)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t got [$];

  task automatic capture(int ch);
    got.delete();
    @(negedge clk); arm = 1; sel = 4'(ch);
    @(negedge clk); arm = 0;
    checks++;
    if (!busy || done) begin failures++; $display("FAIL busy after arm"); end
    while (got.size() < (1 << DL) + 5) begin
      @(negedge clk);
      for (int k = 0; k < N_CH; k++) begin
        din[k] = sample_t'($urandom);
        din_valid[k] = ($urandom_range(0, 2) == 0);
      end
      if (din_valid[ch]) got.push_back(din[ch]);
    end
    @(negedge clk); din_valid = '0;
    checks++;
    if (busy || !done) begin failures++; $display("FAIL done"); end
    for (int a = 0; a < (1 << DL); a++) begin
      @(negedge clk); rd_addr = DL'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data != got[a]) begin
        failures++;
        if (failures < 10) $display("FAIL ch %0d addr %0d: %0d exp %0d", ch, a, rd_data, got[a]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < N_CH; k++) din[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    capture(5);
    capture(12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

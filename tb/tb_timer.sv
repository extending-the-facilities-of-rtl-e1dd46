// tb_timer: loads a time stamp and checks that seconds advance and pps
// pulses exactly every TICKS_PER_SEC ticks, counting from the loaded
// position, with gaps in the tick strobe.
//
// What is checked follows the published description of the block (rates,
// tuning step, formats); the stimuli, the reduced sizes and the tolerances
// are choices of this test.
module tb_timer;
  localparam int unsigned TPS = 50;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, tick = 0;
  logic [29:0] load_sec = 0;
  logic [5:0] load_epoch = 0;
  logic [31:0] load_tick = 0;
  logic running;
  logic [29:0] sec;
  logic [5:0] epoch;
  logic [31:0] tick_cnt;
  logic pps;
  int checks = 0, failures = 0;

  timer #(.TICKS_PER_SEC(TPS)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ticks, npps;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (running) begin failures++; $display("FAIL running before load"); end
    load = 1; load_sec = 30'd1000; load_epoch = 6'd45; load_tick = 32'd40;
    @(negedge clk); load = 0;
    checks++;
    if (!running || sec != 1000 || epoch != 45 || tick_cnt != 40) begin failures++; $display("FAIL load"); end
    ticks = 40; npps = 0;
    for (int k = 0; k < 1000; k++) begin
      tick = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (tick) begin
        ticks++;
        if (ticks == TPS) begin
          ticks = 0;
          checks++;
          if (!pps) begin failures++; $display("FAIL no pps at tick %0d", k); end
          npps++;
        end else begin
          checks++;
          if (pps) begin failures++; $display("FAIL stray pps"); end
        end
      end else begin
        checks++;
        if (pps) begin failures++; $display("FAIL pps without tick"); end
      end
      checks++;
      if (sec != 30'(1000 + npps) || tick_cnt != 32'(ticks)) begin
        failures++;
        if (failures < 10) $display("FAIL time %0d.%0d exp %0d.%0d", sec, tick_cnt, 1000 + npps, ticks);
      end
      @(negedge clk);
    end
    tick = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

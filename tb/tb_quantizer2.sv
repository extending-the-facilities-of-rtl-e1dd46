// tb_quantizer2: Gaussian-like noise of known sigma. After each interval
// of 2^LOG2_N samples the threshold must settle at 0.98 sigma of the
// samples just seen (computed here from the same samples, independently
// of the block), every code must match the comparator rule against the
// threshold in force, and the share of outer codes must be near the
// expected 32.7 %. A step in sigma checks that the threshold follows.
module tb_quantizer2;
  import ddcb_pkg::*;
  localparam int LN = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic din_valid = 0;
  sample_t din = 0;
  logic dout_valid;
  logic [1:0] code;
  logic [15:0] thr_o;
  logic thr_update;
  int checks = 0, failures = 0;

  quantizer2 #(.LOG2_N(LN)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gauss(int sigma);
    int s = 0;
    // sum of 12 uniforms in [-0.5, 0.5) has unit variance
    for (int i = 0; i < 12; i++) s += int'($urandom_range(0, 65535)) - 32768;
    return int'((longint'(s) * sigma) / 65536);
  endfunction

  real   sumsq;
  int    nsq;
  real   last_rms;
  int    updates = 0, outer = 0, ncodes = 0;
  logic [15:0] thr_used;
  sample_t x_prev;
  logic    chk_pend;

  always @(posedge clk) if (rst_n) begin
    if (thr_update) begin
      real exp_thr;
      updates++;
      exp_thr = 0.98 * last_rms;
      checks++;
      if (real'(thr_o) < exp_thr * 0.98 - 2 || real'(thr_o) > exp_thr * 1.02 + 2) begin
        failures++;
        $display("FAIL threshold %0d, expected about %f", thr_o, exp_thr);
      end
    end
  end

  task automatic feed(int sigma, int n);
    for (int k = 0; k < n; k++) begin
      int x;
      logic [1:0] e;
      logic [15:0] t;
      x = gauss(sigma);
      if (x > 32767) x = 32767;
      if (x < -32768) x = -32768;
      @(negedge clk);
      t = thr_o;
      din_valid = 1;
      din = sample_t'(x);
      sumsq += real'(x) * real'(x);
      nsq++;
      if (nsq == (1 << LN)) begin
        last_rms = $sqrt(sumsq / nsq);
        sumsq = 0; nsq = 0;
      end
      @(posedge clk); #1;
      e = (x < 0) ? ((-x > int'(t)) ? 2'b00 : 2'b01) : ((x >= int'(t)) ? 2'b11 : 2'b10);
      checks++;
      if (!dout_valid || code != e) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d thr=%0d code=%b exp %b", x, t, code, e);
      end
      if (updates >= 1) begin
        ncodes++;
        if (code == 2'b00 || code == 2'b11) outer++;
      end
      @(negedge clk);
      din_valid = 0;
    end
  endtask

  initial begin
    sumsq = 0; nsq = 0; last_rms = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (thr_o != 4096) begin failures++; $display("FAIL initial threshold %0d", thr_o); end
    feed(3000, 4 << LN);
    checks++;
    if (real'(outer) / ncodes < 0.29 || real'(outer) / ncodes > 0.36) begin
      failures++; $display("FAIL outer share %f", real'(outer) / ncodes);
    end
    feed(600, 3 << LN);
    repeat (40) @(posedge clk);
    checks++;
    if (thr_o < 540 || thr_o > 640) begin failures++; $display("FAIL threshold after step %0d", thr_o); end
    checks++;
    if (updates != 7) begin failures++; $display("FAIL %0d threshold updates", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// quantizer2: two-bit quantizer with a floating threshold.
//
// As the published design describes, the threshold follows the RMS of the signal over
// a fixed interval and the samples are classified by comparators. Here the
// squares of 2^LOG2_N samples are summed; at the end of each interval the
// mean square is handed to a 16-cycle bit-serial square root, and the new
// threshold t = sigma * THR_NUM / 256 (0.98 sigma, the usual optimum for
// 2-bit sampling) takes effect when the root is done. Interval length and
// the 0.98 factor are this design's choices.
//
// Output code (VDIF 2-bit offset binary): 00 for x < -t, 01 for -t <= x < 0,
// 10 for 0 <= x < t, 11 for x >= t. One code per din_valid, registered one
// clock later. Until the first interval completes, t = INIT_THR. The
// threshold is held at 1 or more (own choice) so that silence maps to 10.
module quantizer2
  import ddcb_pkg::*;
#(
  parameter int          LOG2_N   = 16,
  parameter int unsigned THR_NUM  = 251,
  parameter int unsigned INIT_THR = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din_valid,
  input  sample_t    din,
  output logic       dout_valid,
  output logic [1:0] code,
  output logic [15:0] thr_o,
  output logic       thr_update    // one-clock pulse when a new threshold is set
);

  localparam int ACC_W = 2 * DW + LOG2_N;

  logic [ACC_W-1:0]  acc;
  logic [LOG2_N-1:0] cnt;
  logic [15:0]       thr;

  // Bit-serial integer square root state.
  logic        busy;
  logic [31:0] rem;
  logic [31:0] root;
  logic [31:0] bitv;

  logic [31:0] sq;
  logic [ACC_W-1:0] acc_n;
  assign sq    = 32'(acc_t'(din) * acc_t'(din));
  assign acc_n = acc + ACC_W'(sq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      cnt        <= '0;
      thr        <= 16'(INIT_THR);
      busy       <= 1'b0;
      rem        <= '0;
      root       <= '0;
      bitv       <= '0;
      dout_valid <= 1'b0;
      code       <= 2'b10;
      thr_update <= 1'b0;
    end else begin
      dout_valid <= din_valid;
      thr_update <= 1'b0;
      if (din_valid) begin
        if (din < 0) code <= (-acc_t'(din) > acc_t'(thr)) ? 2'b00 : 2'b01;
        else         code <= (acc_t'(din) >= acc_t'(thr)) ? 2'b11 : 2'b10;
        cnt <= cnt + 1'b1;
        if (&cnt) begin
          acc  <= '0;
          // Start a new root; a root still running is superseded.
          rem  <= 32'(acc_n >> LOG2_N);
          root <= '0;
          bitv <= 32'h4000_0000;
          busy <= 1'b1;
        end else begin
          acc <= acc_n;
        end
      end
      if (busy && !(din_valid && &cnt)) begin
        if (bitv == 0) begin
          busy       <= 1'b0;
          // never below 1, so that a silent input gives code 10
          thr        <= ((root * THR_NUM) >> 8) == 0 ? 16'd1 : 16'((root * THR_NUM) >> 8);
          thr_update <= 1'b1;
        end else begin
          if (rem >= root + bitv) begin
            rem  <= rem - (root + bitv);
            root <= (root >> 1) + bitv;
          end else begin
            root <= root >> 1;
          end
          bitv <= bitv >> 2;
        end
      end
    end
  end

  assign thr_o = thr;

endmodule

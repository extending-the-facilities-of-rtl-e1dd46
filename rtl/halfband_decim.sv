// halfband_decim: half-band low-pass filter followed by decimation by 2.
//
// Used twice in every frequency converter: on I and Q after the quadrature
// mixer (128 -> 64 MS/s), and as the switchable 8/16 MHz video filter
// (64 -> 32 MS/s, and again 32 -> 16 MS/s in 8 MHz mode). The published design names
// a "filter-decimator with a decimation factor of 2"; the half-band form,
// its length and its Blackman window are this design's choice.
//
// Direct-form FIR over a shift register that advances on din_valid. Every
// second accepted sample produces one output; the sum is taken from the
// registered taps, so dout_valid follows the accepting din_valid by two
// clocks. Coefficients are Q1.15 with unity DC gain; the result is rounded
// and saturated to DW bits.
module halfband_decim
  import ddcb_pkg::*;
#(
  parameter int NTAPS = 23          // must be 4k+3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    din_valid,
  input  sample_t din,
  output logic    dout_valid,
  output sample_t dout
);

  typedef logic signed [CW-1:0] coef_t [NTAPS];

  function automatic coef_t mk_coefs();
    coef_t c;
    for (int n = 0; n < NTAPS; n++) c[n] = q15(halfband_coef_r(n, NTAPS));
    return c;
  endfunction

  localparam coef_t H = mk_coefs();

  sample_t sr [NTAPS];
  logic    phase;
  logic    pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) sr[i] <= '0;
      phase <= 1'b0;
      pend  <= 1'b0;
    end else begin
      pend <= 1'b0;
      if (din_valid) begin
        sr[0] <= din;
        for (int i = 1; i < NTAPS; i++) sr[i] <= sr[i-1];
        phase <= ~phase;
        pend  <= phase;
      end
    end
  end

  acc_t acc;
  always_comb begin
    acc = 0;
    for (int i = 0; i < NTAPS; i++)
      if (H[i] != 0) acc += acc_t'(H[i]) * acc_t'(sr[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      dout       <= '0;
    end else begin
      dout_valid <= pend;
      if (pend) dout <= sat((acc + 48'sd16384) >>> 15);
    end
  end

endmodule

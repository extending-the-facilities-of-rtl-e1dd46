// pfb_dft8: polyphase DFT filter bank (prefilter).
//
// Splits a real 1024 MS/s signal (M = 8 samples per clock, sample 0 the
// earliest) into M complex sub-bands of 128 MS/s. Sub-band i carries the
// spectrum around i*128 MHz moved to zero frequency:
//
//   y_i[k] = sum_{n=0}^{M*TAPS-1} h[n] * x[M*k + M-1 - n] * exp(+j*2*pi*i*n/M)
//
// which, up to a fixed phase per band, is x mixed by exp(-j*2*pi*i*m/M) and
// low-pass filtered. The sum splits into M branch filters of TAPS taps each,
// v_q[k] = sum_j h[M*j+q] * x[M*(k-j) + M-1-q], followed by an M-point DFT
// over q. The prototype h is a sinc with cut-off at half the band spacing
// shaped by a Blackman weighting window, so neighbouring bands overlap.
// The DFT-based polyphase structure, M = 8, 8 taps per branch and the use of
// a weighting function follow the published design; the window, the widths and the
// output scaling are this design's choices.
//
// Twiddles are 0, +-1 and +-sqrt(2)/2, so the DFT needs one constant
// multiplier per branch. Pipeline: shift register, branch sums, DFT; each
// stage is registered and dout_valid follows din_valid by three clocks.
// Outputs are rounded, shifted right by OUT_SHIFT and saturated to DW bits.
module pfb_dft8
  import ddcb_pkg::*;
#(
  parameter int TAPS      = 8,
  parameter int OUT_SHIFT = 9
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        din_valid,
  input  logic signed [SAMPLE_W-1:0]  din [M],
  output logic                        dout_valid,
  output cplx_t                       dout [M]
);

  localparam int L = M * TAPS;
  localparam logic signed [CW-1:0] C45 = q15(0.70710678118654752);

  typedef logic signed [CW-1:0] coef_t [L];

  function automatic coef_t mk_coefs();
    coef_t c;
    for (int n = 0; n < L; n++) c[n] = q15(pfb_coef_r(n, TAPS));
    return c;
  endfunction

  localparam coef_t H = mk_coefs();

  logic signed [SAMPLE_W-1:0] wd [TAPS][M];
  logic [1:0]                 vpipe;
  acc_t                     v  [M];
  acc_t                     vn [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < TAPS; j++)
        for (int p = 0; p < M; p++) wd[j][p] <= '0;
      vpipe <= '0;
    end else begin
      vpipe <= {vpipe[0], din_valid};
      if (din_valid) begin
        for (int p = 0; p < M; p++) wd[0][p] <= din[p];
        for (int j = 1; j < TAPS; j++) wd[j] <= wd[j-1];
      end
    end
  end

  // Branch filters.
  always_comb begin
    for (int q = 0; q < M; q++) begin
      vn[q] = 0;
      for (int j = 0; j < TAPS; j++)
        vn[q] += acc_t'(H[M*j+q]) * acc_t'(wd[j][M-1-q]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < M; q++) v[q] <= 0;
    end else if (vpipe[0]) begin
      v <= vn;
    end
  end

  // M-point DFT with exp(+j*2*pi*i*q/M).
  acc_t vc [M];
  acc_t sre [M];
  acc_t sim [M];
  always_comb begin
    for (int q = 0; q < M; q++) vc[q] = (v[q] * acc_t'(C45) + 48'sd16384) >>> 15;
    for (int i = 0; i < M; i++) begin
      sre[i] = 0;
      sim[i] = 0;
      for (int q = 0; q < M; q++) begin
        unique case ((i * q) % M)
          0: begin sre[i] += v[q];                   end
          1: begin sre[i] += vc[q]; sim[i] += vc[q]; end
          2: begin                  sim[i] += v[q];  end
          3: begin sre[i] -= vc[q]; sim[i] += vc[q]; end
          4: begin sre[i] -= v[q];                   end
          5: begin sre[i] -= vc[q]; sim[i] -= vc[q]; end
          6: begin                  sim[i] -= v[q];  end
          default: begin sre[i] += vc[q]; sim[i] -= vc[q]; end
        endcase
      end
    end
  end

  localparam acc_t RND = acc_t'(1) <<< (OUT_SHIFT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      for (int i = 0; i < M; i++) dout[i] <= '0;
    end else begin
      dout_valid <= vpipe[1];
      if (vpipe[1])
        for (int i = 0; i < M; i++) begin
          dout[i].re <= sat((sre[i] + RND) >>> OUT_SHIFT);
          dout[i].im <= sat((sim[i] + RND) >>> OUT_SHIFT);
        end
    end
  end

endmodule

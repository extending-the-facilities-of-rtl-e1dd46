// quarter_shift: complementary quadrature converter by +-32 MHz.
//
// A sub-band of the prefilter maps the frequency i*128 MHz to zero, a blind
// zone for the sideband separator that follows. Shifting the sub-band by a
// quarter of its 128 MS/s rate (32 MHz) moves such a region away from zero,
// as the published design describes. The multiplication by exp(+-j*pi*n/2) is a
// rotation by powers of j, so it is exact: only swaps and negations.
//
// mode: QS_OFF passes the signal, QS_UP multiplies by j^n (spectrum +32 MHz),
// QS_DOWN by (-j)^n (spectrum -32 MHz). One sample per din_valid; output
// registered, one clock later.
module quarter_shift
  import ddcb_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  qshift_e mode,
  input  logic    din_valid,
  input  cplx_t   din,
  output logic    dout_valid,
  output cplx_t   dout
);

  logic [1:0] n;
  logic [1:0] k;
  cplx_t      r;
  sample_t    nre, nim;

  always_comb begin
    nre = sat(-acc_t'(din.re));
    nim = sat(-acc_t'(din.im));
    unique case (mode)
      QS_UP:   k = n;
      QS_DOWN: k = -n;
      default: k = 2'd0;
    endcase
    unique case (k)
      2'd0: r = din;
      2'd1: r = '{re: nim,    im: din.re};   // * j
      2'd2: r = '{re: nre,    im: nim};      // * -1
      2'd3: r = '{re: din.im, im: nre};      // * -j
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n          <= '0;
      dout_valid <= 1'b0;
      dout       <= '0;
    end else begin
      dout_valid <= din_valid;
      if (din_valid) begin
        n    <= n + 2'd1;
        dout <= r;
      end
    end
  end

endmodule

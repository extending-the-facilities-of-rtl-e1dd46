// sideband_sep: phase-method sideband separator with spectrum inverters.
//
// Turns a complex (quadrature) signal into two real signals, the upper
// sideband (positive frequencies) and the lower sideband (negative
// frequencies):  usb = (I - H{Q}) / 2,  lsb = (I + H{Q}) / 2, where H is a
// Hilbert transformer (type III FIR, h[k] = w(k) * 2/(pi k) for odd k) and
// I is delayed by the filter's group delay. Separation by the phase method
// and the two spectrum inverters, one at the inlet and one at the outlet,
// follow the published design; filter length and window are this design's choice.
//
// With inv = 1 the inlet multiplies I and Q by (-1)^n, moving the band near
// fs/2 to low frequencies, and the outlet multiplies both outputs by (-1)^n
// to move them back. The inversion exchanges the two sidebands, so in that
// mode the outputs are swapped to keep usb the upper sideband. Note that a
// type III Hilbert filter has no gain at 0 and at fs/2 and a response
// symmetric about fs/4, so with this filter both modes separate the same
// range (35 dB from about 3.9 to 60 MHz at 128 MS/s); the inverters pay
// off only with a filter whose response is not symmetric.
//
// Timing: one sample per din_valid; the outputs appear two clocks after the
// accepting din_valid, delayed by (NTAPS-1)/2 samples.
module sideband_sep
  import ddcb_pkg::*;
#(
  parameter int NTAPS = 63          // must be 4k+3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    din_valid,
  input  cplx_t   din,
  input  logic    inv,
  output logic    dout_valid,
  output sample_t usb,
  output sample_t lsb
);

  localparam int C = (NTAPS - 1) / 2;

  typedef logic signed [CW-1:0] coef_t [NTAPS];

  function automatic coef_t mk_coefs();
    coef_t c;
    for (int n = 0; n < NTAPS; n++) c[n] = q15(hilbert_coef_r(n, NTAPS));
    return c;
  endfunction

  localparam coef_t H = mk_coefs();

  sample_t isr [C+1];
  sample_t qsr [NTAPS];
  logic    in_sgn, out_sgn;
  logic    pend;
  sample_t ii, qi;

  // Inlet inverter.
  always_comb begin
    ii = din.re;
    qi = din.im;
    if (inv && in_sgn) begin
      ii = sat(-acc_t'(din.re));
      qi = sat(-acc_t'(din.im));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= C; i++) isr[i] <= '0;
      for (int i = 0; i < NTAPS; i++) qsr[i] <= '0;
      in_sgn <= 1'b0;
      pend   <= 1'b0;
    end else begin
      pend <= din_valid;
      if (din_valid) begin
        isr[0] <= ii;
        qsr[0] <= qi;
        for (int i = 1; i <= C; i++) isr[i] <= isr[i-1];
        for (int i = 1; i < NTAPS; i++) qsr[i] <= qsr[i-1];
        in_sgn <= ~in_sgn;
      end
    end
  end

  acc_t hq, u, l;
  always_comb begin
    hq = 0;
    for (int i = 0; i < NTAPS; i++)
      if (H[i] != 0) hq += acc_t'(H[i]) * acc_t'(qsr[i]);
    hq = (hq + 48'sd16384) >>> 15;
    u  = (acc_t'(isr[C]) - hq) >>> 1;
    l  = (acc_t'(isr[C]) + hq) >>> 1;
    // Outlet inverter.
    if (inv && out_sgn) begin
      u = -u;
      l = -l;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      usb        <= '0;
      lsb        <= '0;
      out_sgn    <= 1'b0;
    end else begin
      dout_valid <= pend;
      if (pend) begin
        out_sgn <= ~out_sgn;
        usb     <= inv ? sat(l) : sat(u);
        lsb     <= inv ? sat(u) : sat(l);
      end
    end
  end

endmodule

// ddcb_pkg: types, constants and coefficient generators shared by the
// digital downconverter bank.
//
// The bank takes three 512 MHz wide real signals (1024 MS/s, 8-bit samples,
// delivered as eight samples per 128 MHz clock), splits each into eight
// complex 128 MS/s sub-bands with a polyphase DFT filter bank, routes 16 of
// the 24 sub-bands to 16 downconverter channels and packs their 2-bit outputs
// into VDIF frames carried over 10 Gigabit Ethernet.
//
// All filter and oscillator tables are computed here at elaboration time from
// closed formulas (windowed sinc, windowed 2/(pi k), quarter-wave sine), so
// no data files are needed. Sample rates, band split (M = 8), 8 taps per
// prefilter branch, the 10 kHz oscillator step and the 16 channels follow
// the published design; word widths, filter lengths and windows are this
// design's own choices.
package ddcb_pkg;

  // ---------------------------------------------------------------- widths
  localparam int SAMPLE_W = 8;    // input sample width (bits)
  localparam int DW       = 16;   // internal signal width (bits)
  localparam int CW       = 16;   // coefficient width, Q1.15
  localparam int M        = 8;    // prefilter sub-bands, samples per clock
  localparam int N_IN     = 3;    // input streams (2 x X band, 1 x S band)
  localparam int N_CH     = 16;   // downconverter channels
  localparam int N_SRC    = N_IN * M;

  // NCO: 128 MS/s, 10 kHz step -> 12800 phase steps per turn.
  localparam int NCO_MOD     = 12800;
  localparam int NCO_QUARTER = NCO_MOD / 4;
  localparam int FW_W        = 13;       // frequency word, 10 kHz units
  localparam int FW_MAX      = 6399;     // 63.99 MHz

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [47:0]   acc_t;     // accumulator for filter sums

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // 32 MHz complementary converter setting.
  typedef enum logic [1:0] {
    QS_OFF  = 2'd0,
    QS_UP   = 2'd1,   // spectrum moved up by 32 MHz
    QS_DOWN = 2'd2    // spectrum moved down by 32 MHz
  } qshift_e;

  // Per-channel configuration, written by the control processor.
  typedef struct packed {
    logic [4:0]      src;       // sub-band: stream*8 + band index
    qshift_e         qshift;    // 32 MHz converter
    logic            invert;    // front separator spectrum-inversion mode
    logic            front_sb;  // front separator output: 1 = lower sideband
    logic [FW_W-1:0] fword;     // NCO frequency, 10 kHz units
    logic            out_sb;    // converter output: 1 = lower sideband
  } ddc_cfg_t;

  // Time stamp and identity decoded from an input VDIF header.
  typedef struct packed {
    logic        invalid;
    logic [29:0] seconds;
    logic [5:0]  epoch;
    logic [23:0] frame_no;
    logic [23:0] frame_len;   // in 8-byte units, header included
    logic [9:0]  thread_id;
  } vdif_info_t;

  // Ethernet / IP / UDP addressing for the output link.
  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic        udp_en;      // 0: raw Ethernet, 1: Ethernet + IPv4 + UDP
  } eth_cfg_t;

  // ------------------------------------------------------ helper functions
  function automatic logic signed [CW-1:0] q15(real v);
    real r;
    r = v * 32767.0;
    if (r > 32767.0) r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return CW'($rtoi(r >= 0.0 ? r + 0.5 : r - 0.5));
  endfunction

  function automatic real blackman(int n, int len);
    real a;
    a = 2.0 * PI * n / (len - 1);
    return 0.42 - 0.5 * $cos(a) + 0.08 * $cos(2.0 * a);
  endfunction

  function automatic real sinc(real t);
    if (t == 0.0) return 1.0;
    return $sin(PI * t) / (PI * t);
  endfunction

  // Saturate a wide signed value to DW bits.
  function automatic logic signed [DW-1:0] sat(acc_t v);
    if (v > acc_t'(2**(DW-1) - 1)) return DW'(2**(DW-1) - 1);
    if (v < -acc_t'(2**(DW-1)))    return DW'(-(2**(DW-1)));
    return DW'(v);
  endfunction

  // Prefilter prototype: h[n] = w(n) * sinc((n - (L-1)/2) / M), L = M*taps.
  function automatic real pfb_coef_r(int n, int taps);
    int len;
    len = M * taps;
    return blackman(n, len) * sinc((n - (len - 1) / 2.0) / M);
  endfunction

  // Hilbert transformer, centre index (n-1)/2: h[k] = w * 2/(pi k) for odd k.
  function automatic real hilbert_coef_r(int n, int ntaps);
    int k;
    k = n - (ntaps - 1) / 2;
    if (k % 2 == 0) return 0.0;
    return blackman(n, ntaps) * 2.0 / (PI * k);
  endfunction

  // Half-band low-pass: h[k] = w * 0.5 * sinc(k/2), unity gain at DC.
  function automatic real halfband_coef_r(int n, int ntaps);
    int k;
    k = n - (ntaps - 1) / 2;
    return blackman(n, ntaps) * 0.5 * sinc(k / 2.0);
  endfunction

  // Quarter-wave sine table entry: sin(pi/2 * i / NCO_QUARTER).
  function automatic real nco_sin_r(int i);
    return $sin(PI / 2.0 * i / NCO_QUARTER);
  endfunction

endpackage

// nco: quadrature oscillator of the frequency converter.
//
// Tunes 0 - 63.99 MHz in 10 kHz steps at 128 MS/s, as the published design specifies,
// from sine and cosine tables. The phase accumulator counts modulo 12800
// (128 MHz / 10 kHz), so every step is exactly 10 kHz and there is no
// phase truncation error. A quarter-wave table of 3201 Q1.15 entries,
// computed at elaboration as round(32767 * sin(pi/2 * i / 3200)) and held
// in a read-only memory (block RAM in an FPGA), gives both
// outputs through quadrant symmetry; the table form is this design's
// choice.
//
// Interface: cos_o/sin_o show the phase held in the accumulator
// (combinational table read); the phase advances by fword on each clock with
// adv = 1. fword is in 10 kHz units, 0..6399. sync_clr sets the phase to 0.
module nco
  import ddcb_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sync_clr,
  input  logic            adv,
  input  logic [FW_W-1:0] fword,
  output sample_t         cos_o,
  output sample_t         sin_o,
  output logic [13:0]     phase_o
);

  typedef logic signed [CW-1:0] tab_t [NCO_QUARTER+1];

  function automatic tab_t mk_tab();
    tab_t t;
    for (int i = 0; i <= NCO_QUARTER; i++) t[i] = q15(nco_sin_r(i));
    return t;
  endfunction

  localparam tab_t TAB_INIT = mk_tab();

  // Read-only table, held as a memory so that it maps onto block RAM.
  sample_t TAB [NCO_QUARTER+1];
  initial TAB = TAB_INIT;

  // Quadrant folding: one table read per output.
  function automatic sample_t lookup(logic [13:0] p);
    logic [13:0] r;
    logic [11:0] idx;
    logic        neg;
    neg = (p >= 14'(2 * NCO_QUARTER));
    r   = neg ? p - 14'(2 * NCO_QUARTER) : p;
    idx = (r >= 14'(NCO_QUARTER)) ? 12'(14'(2 * NCO_QUARTER) - r) : 12'(r);
    return neg ? -TAB[idx] : TAB[idx];
  endfunction

  logic [13:0] acc;
  logic [14:0] nxt;
  logic [14:0] cph;

  always_comb begin
    nxt = {1'b0, acc} + 15'(fword);
    if (nxt >= 15'(NCO_MOD)) nxt = nxt - 15'(NCO_MOD);
    cph = {1'b0, acc} + 15'(NCO_QUARTER);
    if (cph >= 15'(NCO_MOD)) cph = cph - 15'(NCO_MOD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (sync_clr) acc <= '0;
    else if (adv)      acc <= nxt[13:0];
  end

  assign sin_o   = lookup(acc);
  assign cos_o   = lookup(cph[13:0]);
  assign phase_o = acc;

endmodule

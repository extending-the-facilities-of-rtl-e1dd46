// channel_switch: the 16-channel switch between prefilters and converters.
//
// Any of the N_SRC complex sub-bands (3 prefilters x 8 bands) can feed each
// of the N_OUT downconverter channels; several channels may take the same
// sub-band. The published design gives the switch's purpose; the registered full
// crossbar is this design's choice. sel[k] = stream * 8 + band. A select
// beyond N_SRC-1 gives zero. Latency one clock; valid is passed along.
module channel_switch
  import ddcb_pkg::*;
#(
  parameter int N_SRC_P = N_SRC,
  parameter int N_OUT   = N_CH
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        din_valid,
  input  cplx_t       src  [N_SRC_P],
  input  logic [4:0]  sel  [N_OUT],
  output logic        dout_valid,
  output cplx_t       dout [N_OUT]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      for (int k = 0; k < N_OUT; k++) dout[k] <= '0;
    end else begin
      dout_valid <= din_valid;
      for (int k = 0; k < N_OUT; k++)
        dout[k] <= (int'(sel[k]) < N_SRC_P) ? src[sel[k]] : '0;
    end
  end

endmodule

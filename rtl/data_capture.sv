// data_capture: snapshot memory for the control processor.
//
// The published design lists a data-capture module among the bank's blocks without
// describing it; this is the simplest version of that function. Writing
// 'arm' starts a capture: the next DEPTH samples of the selected signal
// (sel: one of the 16 channels' video outputs, W bits each) are written to
// an on-chip RAM, then 'done' rises and stays high until the next arm. The
// processor reads the RAM through rd_addr / rd_data, with one clock of read
// latency. Signals that can be selected, depth and width are this design's
// choices.
module data_capture
  import ddcb_pkg::*;
#(
  parameter int DEPTH_LOG2 = 10,
  parameter int N_SEL      = N_CH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  arm,
  input  logic [3:0]            sel,
  input  logic [N_SEL-1:0]      din_valid,
  input  sample_t               din [N_SEL],
  output logic                  busy,
  output logic                  done,
  input  logic [DEPTH_LOG2-1:0] rd_addr,
  output sample_t               rd_data
);

  sample_t              mem [1 << DEPTH_LOG2];
  logic [DEPTH_LOG2:0]  wa;
  logic [3:0]           s;
  logic                 v;

  assign v = din_valid[s];

  always_ff @(posedge clk) begin
    if (busy && v) mem[wa[DEPTH_LOG2-1:0]] <= din[s];
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      wa   <= '0;
      s    <= '0;
    end else if (arm) begin
      busy <= 1'b1;
      done <= 1'b0;
      wa   <= '0;
      s    <= sel;
    end else if (busy && v) begin
      wa <= wa + 1'b1;
      if (wa == (1 << DEPTH_LOG2) - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule

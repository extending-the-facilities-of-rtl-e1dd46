// timer: VDIF time keeper of the bank.
//
// Counts data time, not wall time: it is loaded with the time stamp of the
// first buffered input frame (seconds from the reference epoch and the
// position inside that second, in 128 MHz word ticks) and then advances by
// one on every 'tick', the strobe that moves one word of eight input
// samples through the bank. When the position wraps at TICKS_PER_SEC the
// seconds count increments and 'pps' pulses for one clock; the VDIF
// formatter numbers its frames from these pulses. The published design only names a
// timer; this behaviour is this design's choice.
module timer #(
  parameter int unsigned TICKS_PER_SEC = 128_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [29:0] load_sec,
  input  logic [5:0]  load_epoch,
  input  logic [31:0] load_tick,
  input  logic        tick,
  output logic        running,
  output logic [29:0] sec,
  output logic [5:0]  epoch,
  output logic [31:0] tick_cnt,
  output logic        pps
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      sec      <= '0;
      epoch    <= '0;
      tick_cnt <= '0;
      pps      <= 1'b0;
    end else begin
      pps <= 1'b0;
      if (load) begin
        running  <= 1'b1;
        sec      <= load_sec;
        epoch    <= load_epoch;
        tick_cnt <= load_tick;
      end else if (running && tick) begin
        if (tick_cnt == TICKS_PER_SEC - 1) begin
          tick_cnt <= '0;
          sec      <= sec + 30'd1;
          pps      <= 1'b1;
        end else begin
          tick_cnt <= tick_cnt + 32'd1;
        end
      end
    end
  end

endmodule

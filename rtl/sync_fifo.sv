// sync_fifo: single-clock FIFO with show-ahead read.
//
// rdata always shows the oldest entry while 'empty' is low; rd_en pops it.
// Writes to a full FIFO and reads from an empty one are ignored (and
// flagged by assertions). 'count' is the number of entries held.
//
// A helper of this design's own, not a block of the published design.
module sync_fifo #(
  parameter int W          = 64,
  parameter int DEPTH_LOG2 = 11
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [W-1:0]        wdata,
  input  logic                rd_en,
  output logic [W-1:0]        rdata,
  output logic                empty,
  output logic                full,
  output logic [DEPTH_LOG2:0] count
);

  logic [W-1:0]        mem [1 << DEPTH_LOG2];
  logic [DEPTH_LOG2:0] wp, rp;

  assign count = wp - rp;
  assign empty = (count == 0);
  assign full  = count[DEPTH_LOG2];
  assign rdata = mem[rp[DEPTH_LOG2-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[DEPTH_LOG2-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en && !full)  wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule

// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// Carries the extracted sample words of a data buffer from the 10GE receive
// clock to the 128 MHz processing clock. Classic design: binary and Gray
// pointers one bit wider than the address, each Gray pointer passed to the
// other domain through a two-flop synchronizer; full and empty are computed
// from the synchronized pointers, so both flags are conservative. The read
// side also reports a fill level (in read-clock terms). First-word-fall-
// through is not used: rdata is registered and valid the clock after rd_en.
//
// The published design only says the buffers restore a continuous stream;
// crossing the clock domains with this FIFO is this design's own choice.
module async_fifo #(
  parameter int W          = 64,
  parameter int DEPTH_LOG2 = 12
) (
  input  logic                  wclk,
  input  logic                  wrst_n,
  input  logic                  wr_en,
  input  logic [W-1:0]          wdata,
  output logic                  full,

  input  logic                  rclk,
  input  logic                  rrst_n,
  input  logic                  rd_en,
  output logic [W-1:0]          rdata,
  output logic                  empty,
  output logic [DEPTH_LOG2:0]   rlevel
);

  localparam int D = 1 << DEPTH_LOG2;

  logic [W-1:0] mem [D];

  logic [DEPTH_LOG2:0] wbin, wgray, rbin, rgray;
  logic [DEPTH_LOG2:0] wgray_r1, wgray_r2;   // write pointer in read domain
  logic [DEPTH_LOG2:0] rgray_w1, rgray_w2;   // read pointer in write domain

  function automatic logic [DEPTH_LOG2:0] bin2gray(logic [DEPTH_LOG2:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [DEPTH_LOG2:0] gray2bin(logic [DEPTH_LOG2:0] g);
    logic [DEPTH_LOG2:0] b;
    b[DEPTH_LOG2] = g[DEPTH_LOG2];
    for (int i = DEPTH_LOG2 - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------------------------------------------------- write side
  logic [DEPTH_LOG2:0] wbin_n;
  assign wbin_n = wbin + 1'b1;
  assign full   = (wgray == {~rgray_w2[DEPTH_LOG2:DEPTH_LOG2-1], rgray_w2[DEPTH_LOG2-2:0]});

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[DEPTH_LOG2-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  // ----------------------------------------------------------- read side
  logic [DEPTH_LOG2:0] rbin_n;
  assign rbin_n = rbin + 1'b1;
  assign empty  = (rgray == wgray_r2);
  assign rlevel = gray2bin(wgray_r2) - rbin;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rdata    <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rdata <= mem[rbin[DEPTH_LOG2-1:0]];
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end

endmodule

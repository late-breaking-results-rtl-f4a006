// weight_buffer: on-chip store of the weight tiles the array loads.
//
// The convolution is organised by input channel: for channel ch and filter
// group g (filters g*N .. g*N+N-1) the buffer holds an N x N tile whose row r
// holds kernel element r of those N filters. Tiles are stored channel-major,
// tile index = ch*G + g, and a word is one tile row, so word address =
// (ch*G + g)*N + r. The host fills the buffer through the write port; the
// array side reads one row per cycle with one cycle of read latency. Rows past
// the kernel size are zero. The layout and the port widths are this design's
// choice; the source names the weight buffer but does not describe it.
module weight_buffer
  import selfheal_pkg::*;
#(
  parameter int unsigned N     = 22,
  parameter int unsigned TILES = 6,
  localparam int unsigned DEPTH = TILES * N,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  data_t         wr_data [N],
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output data_t         rd_data [N]
);
  data_t mem [DEPTH][N];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule

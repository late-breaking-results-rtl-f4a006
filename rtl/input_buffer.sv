// input_buffer: on-chip store of the Img2Col input matrices, one per input
// channel.
//
// After the Img2Col transformation, channel ch's input matrix has P rows (one
// per output pixel) of N operands (kernel elements, zero padded to N). Row p of
// channel ch sits at word address ch*P + p. The host fills it through the write
// port; the array side reads one row per cycle with one cycle of read latency.
// The same channel matrix is streamed once for every filter group of that
// channel and again for recovery operations of that channel. Layout and widths
// are this design's choice.
module input_buffer
  import selfheal_pkg::*;
#(
  parameter int unsigned N  = 22,
  parameter int unsigned C  = 3,
  parameter int unsigned P  = 9,
  localparam int unsigned DEPTH = C * P,
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

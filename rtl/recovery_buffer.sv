// recovery_buffer: weight recovery buffer for work skipped on excluded columns.
//
// When a column is excluded, the weights it should have used (one column of the
// weight tile, N values) and the index of the filter they belong to are pushed
// here so that the operation can be redone later. The buffer is split into one
// region per input channel: weights that will be multiplied by the same channel
// input matrix are stored next to each other, so one recovery operation can
// fetch a whole group of them and run them together against that matrix.
// Each region is a FIFO of DEPTH entries. push_* writes an entry into region
// push_ch; pop_ch selects a region whose oldest entry is shown combinationally
// on pop_tag / pop_w and removed when pop_en is high. count[ch] gives each
// region's fill level. A push into a full region is dropped and sets the sticky
// overflow flag (with DEPTH = number of filters this cannot happen, since a
// filter is logged at most once per channel at a time). Push and pop may occur
// in the same cycle. FIFO regions are this design's choice.
module recovery_buffer
  import selfheal_pkg::*;
#(
  parameter int unsigned N     = 22,
  parameter int unsigned C     = 3,
  parameter int unsigned DEPTH = 44,
  parameter int unsigned TAG_W = 6,
  localparam int unsigned CW   = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_en,
  input  logic [CW-1:0]    push_ch,
  input  logic [TAG_W-1:0] push_tag,
  input  data_t            push_w  [N],
  input  logic             pop_en,
  input  logic [CW-1:0]    pop_ch,
  output logic [TAG_W-1:0] pop_tag,
  output data_t            pop_w   [N],
  output logic [PW:0]      count   [C],
  output logic             overflow
);
  logic [TAG_W-1:0] tag_mem [C][DEPTH];
  data_t            w_mem   [C][DEPTH][N];
  logic [PW-1:0]    wp [C];
  logic [PW-1:0]    rp [C];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_push, do_pop;
  assign do_push = push_en && (count[push_ch] != (PW+1)'(DEPTH));
  assign do_pop  = pop_en  && (count[pop_ch] != '0);

  always_ff @(posedge clk) begin
    if (do_push) begin
      tag_mem[push_ch][wp[push_ch]] <= push_tag;
      w_mem[push_ch][wp[push_ch]]   <= push_w;
    end
  end

  logic [C-1:0] pu, po;
  always_comb begin
    for (int c = 0; c < C; c++) begin
      pu[c] = do_push && (push_ch == CW'(c));
      po[c] = do_pop  && (pop_ch  == CW'(c));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overflow <= 1'b0;
      for (int c = 0; c < C; c++) begin
        wp[c]    <= '0;
        rp[c]    <= '0;
        count[c] <= '0;
      end
    end else begin
      if (push_en && !do_push) overflow <= 1'b1;
      for (int c = 0; c < C; c++) begin
        if (pu[c]) wp[c] <= inc(wp[c]);
        if (po[c]) rp[c] <= inc(rp[c]);
        if (pu[c] && !po[c])      count[c] <= count[c] + 1'b1;
        else if (po[c] && !pu[c]) count[c] <= count[c] - 1'b1;
      end
    end
  end

  assign pop_tag = tag_mem[pop_ch][rp[pop_ch]];
  assign pop_w   = w_mem[pop_ch][rp[pop_ch]];
endmodule

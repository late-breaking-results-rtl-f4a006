// sa_pe: one weight-stationary multiply-accumulate processing element.
//
// The PE keeps one weight in a register (written when w_we is high) and, every
// cycle, adds x_in * weight to the partial sum arriving from the PE above; the
// result is registered and passed down (psum_out). The input operand and its
// two tag bits (valid, test-vector) are registered and passed right (x_out).
// Latency is one cycle in both directions. The active-low asynchronous reset
// clears only the tag bits.
//
// fault models a configuration-memory upset inside the PE's column: it forces
// the adder carry-in to 1, so every partial sum leaving a faulty PE is off by
// one. This corruption model is this design's choice; in a real device the input
// is tied low and the corruption comes from the upset itself.
module sa_pe
  import selfheal_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  w_we,
  input  data_t w_in,
  input  data_t x_in,
  input  logic  x_vld_in,
  input  logic  x_tst_in,
  input  acc_t  psum_in,
  input  logic  fault,
  output data_t x_out,
  output logic  x_vld_out,
  output logic  x_tst_out,
  output acc_t  psum_out
);
  data_t w_q;
  acc_t  prod;

  always_comb prod = acc_t'(x_in) * acc_t'(w_q);

  always_ff @(posedge clk) begin
    if (w_we) w_q <= w_in;
    x_out    <= x_in;
    psum_out <= psum_in + prod + acc_t'(fault);
  end

  // Only the tag bits need a reset: data is ignored while its valid tag is low.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_vld_out <= 1'b0;
      x_tst_out <= 1'b0;
    end else begin
      x_vld_out <= x_vld_in;
      x_tst_out <= x_tst_in;
    end
  end
endmodule

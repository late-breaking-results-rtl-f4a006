// input_skew: diagonalizes the input matrix before it enters the systolic array.
//
// One row of the (Img2Col-ordered) input matrix arrives per cycle as a vector
// of N operands plus a valid and a test-vector tag. Element r leaves through a
// chain of r registers, so element r of a vector appears at out[r] r cycles
// after the vector arrived and the array sees the staircase ("diagonalized")
// input shown for the standard pipeline. Element 0 passes straight through, so
// the total latency of element r is r cycles. Tags travel with every element.
module input_skew
  import selfheal_pkg::*;
#(
  parameter int unsigned N = 22
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t in_x   [N],
  input  logic  in_vld,
  input  logic  in_tst,
  output data_t out_x  [N],
  output logic  out_vld[N],
  output logic  out_tst[N]
);
  for (genvar r = 0; r < N; r++) begin : g_row
    if (r == 0) begin : g_direct
      assign out_x[0]   = in_x[0];
      assign out_vld[0] = in_vld;
      assign out_tst[0] = in_tst;
    end else begin : g_delay
      data_t dx [r];
      logic  dv [r];
      logic  dt [r];
      always_ff @(posedge clk) begin
        dx[0] <= in_x[r];
        for (int k = 1; k < r; k++) dx[k] <= dx[k-1];
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < r; k++) begin
            dv[k] <= 1'b0;
            dt[k] <= 1'b0;
          end
        end else begin
          dv[0] <= in_vld;
          dt[0] <= in_tst;
          for (int k = 1; k < r; k++) begin
            dv[k] <= dv[k-1];
            dt[k] <= dt[k-1];
          end
        end
      end
      assign out_x[r]   = dx[r-1];
      assign out_vld[r] = dv[r-1];
      assign out_tst[r] = dt[r-1];
    end
  end
endmodule

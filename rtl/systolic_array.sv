// systolic_array: N x N weight-stationary systolic array whose columns can be
// excluded from computation one by one.
//
// Row r of PEs holds row r of the weight matrix, written in one cycle through
// the row write port (w_we, w_row_idx, w_row). Input row r enters at the left
// edge already skewed by r cycles (see input_skew) and moves one column per
// cycle; partial sums move one row per cycle, so column c produces
// y[c] = sum_r x[r] * W[r][c] at its bottom edge. For an input vector whose
// element 0 enters at cycle t, column c's result is valid at cycle t + N + c
// (y_vld[c], with y_tst[c] marking the checksum test vector).
//
// Column exclusion: every column is a separately reconfigurable region. A
// static bypass register per row sits beside each column; when col_en[c] is low
// the operand stream to column c+1 is taken from that bypass register instead
// of from column c's PEs, and column c's outputs are marked invalid, so the
// column may be faulty or under reconfiguration without disturbing its
// neighbours. The bypass keeps the one-cycle-per-column timing. The bypass path
// is this design's choice: the source only says faulty columns are excluded.
// col_fault[c] is the fault-model input of every PE in column c (see sa_pe).
module systolic_array
  import selfheal_pkg::*;
#(
  parameter int unsigned N = 22
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // weight row write
  input  logic                 w_we,
  input  logic [$clog2(N)-1:0] w_row_idx,
  input  data_t                w_row   [N],
  // skewed operands, one per row
  input  data_t                x_in    [N],
  input  logic                 x_vld   [N],
  input  logic                 x_tst   [N],
  // column control
  input  logic [N-1:0]         col_en,
  input  logic [N-1:0]         col_fault,
  // column results
  output acc_t                 y       [N],
  output logic [N-1:0]         y_vld,
  output logic [N-1:0]         y_tst
);
  // operand / tag nets entering each PE: index [row][col]
  data_t xi   [N][N];
  logic  vi   [N][N];
  logic  ti   [N][N];
  data_t xo   [N][N];
  logic  vo   [N][N];
  logic  to_  [N][N];
  acc_t  ps   [N+1][N];
  // static bypass registers beside each column
  data_t xb   [N][N];
  logic  vb   [N][N];
  logic  tb_  [N][N];

  for (genvar c = 0; c < N; c++) begin : g_col
    assign ps[0][c] = '0;
    for (genvar r = 0; r < N; r++) begin : g_row
      if (c == 0) begin : g_edge
        assign xi[r][c] = x_in[r];
        assign vi[r][c] = x_vld[r];
        assign ti[r][c] = x_tst[r];
      end else begin : g_inner
        assign xi[r][c] = col_en[c-1] ? xo[r][c-1]  : xb[r][c-1];
        assign vi[r][c] = col_en[c-1] ? vo[r][c-1]  : vb[r][c-1];
        assign ti[r][c] = col_en[c-1] ? to_[r][c-1] : tb_[r][c-1];
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          vb[r][c]  <= 1'b0;
          tb_[r][c] <= 1'b0;
        end else begin
          vb[r][c]  <= vi[r][c];
          tb_[r][c] <= ti[r][c];
        end
      end
      always_ff @(posedge clk) xb[r][c] <= xi[r][c];

      sa_pe u_pe (
        .clk       (clk),
        .rst_n     (rst_n),
        .w_we      (w_we && (w_row_idx == r[$clog2(N)-1:0])),
        .w_in      (w_row[c]),
        .x_in      (xi[r][c]),
        .x_vld_in  (vi[r][c]),
        .x_tst_in  (ti[r][c]),
        .psum_in   (ps[r][c]),
        .fault     (col_fault[c]),
        .x_out     (xo[r][c]),
        .x_vld_out (vo[r][c]),
        .x_tst_out (to_[r][c]),
        .psum_out  (ps[r+1][c])
      );
    end

    // The bottom PE of the column sees the vector's last element in the same
    // cycle it produces the complete sum, so its registered tags mark y.
    assign y[c]     = ps[N][c];
    assign y_vld[c] = col_en[c] && vo[N-1][c];
    assign y_tst[c] = col_en[c] && to_[N-1][c];
  end
endmodule

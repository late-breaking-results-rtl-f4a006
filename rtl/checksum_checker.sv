// checksum_checker: reference checksum bank and comparator of the online fault
// detector.
//
// While a weight tile is written into the array, the same rows are presented
// here (w_we, w_row) and an external bank of N accumulators sums each column's
// weights; these are the reference checksums. In testing mode a row of ones is
// appended to the input stream, so column c of a healthy array produces exactly
// the sum of its weights. When that test result leaves column c (y_vld & y_tst),
// it is compared with the reference. Once every enabled column has reported,
// done goes high and err_vec flags the columns whose checksums differ.
// clr (one cycle, at the start of each operation) empties the bank. Result
// columns whose col_en bit is low are never waited for and never flagged.
module checksum_checker
  import selfheal_pkg::*;
#(
  parameter int unsigned N = 22
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         w_we,
  input  data_t        w_row [N],
  input  logic [N-1:0] col_en,
  input  acc_t         y     [N],
  input  logic [N-1:0] y_vld,
  input  logic [N-1:0] y_tst,
  output logic         done,
  output logic [N-1:0] err_vec
);
  acc_t         ref_sum [N];
  logic [N-1:0] got;
  logic [N-1:0] mism;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got  <= '0;
      mism <= '0;
      for (int c = 0; c < N; c++) ref_sum[c] <= '0;
    end else if (clr) begin
      got  <= '0;
      mism <= '0;
      for (int c = 0; c < N; c++) ref_sum[c] <= '0;
    end else begin
      for (int c = 0; c < N; c++) begin
        if (w_we) ref_sum[c] <= ref_sum[c] + acc_t'(w_row[c]);
        if (y_vld[c] && y_tst[c]) begin
          got[c]  <= 1'b1;
          mism[c] <= (y[c] != ref_sum[c]);
        end
      end
    end
  end

  assign done    = &(got | ~col_en);
  assign err_vec = mism & col_en;
endmodule

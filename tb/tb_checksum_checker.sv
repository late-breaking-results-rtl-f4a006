// tb_checksum_checker: loads random weight rows, then returns test-vector
// results for each column in random order, some equal to the column's weight
// sum and some corrupted, with random excluded columns. Checks that done rises
// only when every enabled column has reported, that err_vec flags exactly the
// enabled columns whose result differed, and that data results are ignored.
`timescale 1ns/1ps
module tb_checksum_checker;
  import selfheal_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, w_we = 0;
  data_t w_row [N];
  logic [N-1:0] col_en = '1;
  acc_t y [N];
  logic [N-1:0] y_vld = '0, y_tst = '0;
  logic done;
  logic [N-1:0] err_vec;
  int checks = 0, failures = 0;

  checksum_checker #(.N(N)) dut (.*);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    int sum [N];
    logic [N-1:0] corrupt, order_done;
    for (int c = 0; c < N; c++) begin w_row[c] = '0; y[c] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      for (int c = 0; c < N; c++) sum[c] = 0;
      for (int r = 0; r < N; r++) begin
        w_we = 1;
        for (int c = 0; c < N; c++) begin
          w_row[c] = data_t'($urandom);
          sum[c] += int'(w_row[c]);
        end
        @(negedge clk);
      end
      w_we = 0;
      col_en  = N'($urandom);
      corrupt = N'($urandom) & N'($urandom);
      // a data result with a wrong value must not count
      y_vld = '1; y_tst = '0;
      for (int c = 0; c < N; c++) y[c] = acc_t'(sum[c] + 7);
      @(negedge clk);
      y_vld = '0;
      chk("done before test results", done, (col_en == '0));
      order_done = '0;
      while ((order_done | ~col_en) != '1) begin
        int c;
        c = $urandom_range(0, N - 1);
        if (!col_en[c] || order_done[c]) continue;
        y_vld = '0; y_tst = '0;
        y_vld[c] = 1; y_tst[c] = 1;
        y[c] = acc_t'(sum[c] + (corrupt[c] ? 1 : 0));
        order_done[c] = 1;
        @(negedge clk);
        y_vld = '0; y_tst = '0;
        chk("done", done, ((order_done | ~col_en) == '1));
      end
      chk("err_vec", err_vec, corrupt & col_en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

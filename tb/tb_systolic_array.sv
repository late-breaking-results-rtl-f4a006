// tb_systolic_array: loads random weights row by row, streams a random input
// matrix in skewed form followed by a test vector of ones, and checks every
// column result against the matrix product computed here, including the
// N + c cycle latency of column c. Passes run with columns excluded (their
// results must never be marked valid, and the columns beyond them must still be
// right through the bypass) and with faulty columns (results off by N).
`timescale 1ns/1ps
module tb_systolic_array;
  import selfheal_pkg::*;
  localparam int N = 4, P = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic w_we = 0;
  logic [$clog2(N)-1:0] w_row_idx = '0;
  data_t w_row [N];
  data_t x_in [N];
  logic x_vld [N], x_tst [N];
  logic [N-1:0] col_en = '1, col_fault = '0;
  acc_t y [N];
  logic [N-1:0] y_vld, y_tst;
  int checks = 0, failures = 0;
  int W [N][N], X [P][N];
  int cyc = 0;
  int t0;
  int seen [N];
  int seen_tst [N];

  systolic_array #(.N(N)) dut (.*);

  always @(negedge clk) cyc++;

  // output monitor: sampled at the negative edge, before new inputs
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) begin
      if (!col_en[c] && (y_vld[c] || y_tst[c])) begin
        failures++;
        $display("FAIL: excluded column %0d produced a result", c);
      end
      if (y_vld[c]) begin
        int p, exp;
        p = seen[c] + seen_tst[c];
        exp = 0;
        for (int r = 0; r < N; r++) exp += (y_tst[c] ? 1 : X[p][r]) * W[r][c];
        if (col_fault[c]) exp += N;
        checks++;
        if (y[c] != acc_t'(exp)) begin
          failures++;
          $display("FAIL: column %0d vector %0d got %0d expected %0d", c, p, y[c], exp);
        end
        checks++;
        if (cyc - 1 != t0 + p + N + c) begin
          failures++;
          $display("FAIL: column %0d vector %0d at cycle %0d, expected %0d", c, p, cyc - 1, t0 + p + N + c);
        end
        if (y_tst[c]) seen_tst[c]++; else seen[c]++;
      end
    end
  end

  task automatic run_pass(input logic [N-1:0] en, input logic [N-1:0] flt);
    for (int c = 0; c < N; c++) begin seen[c] = 0; seen_tst[c] = 0; end
    col_en = en;
    col_fault = flt;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) W[r][c] = int'($urandom_range(0, 255)) - 128;
    for (int p = 0; p < P; p++)
      for (int r = 0; r < N; r++) X[p][r] = int'($urandom_range(0, 255)) - 128;
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      w_we = 1; w_row_idx = ($bits(w_row_idx))'(r);
      for (int c = 0; c < N; c++) w_row[c] = data_t'(W[r][c]);
    end
    @(negedge clk) w_we = 0;
    t0 = cyc;
    // skewed stream: vector p element r enters in cycle t0 + p + r; vector P is the test vector
    for (int k = 0; k < P + N + 1; k++) begin
      for (int r = 0; r < N; r++) begin
        int p;
        p = k - r;
        x_vld[r] = (p >= 0 && p <= P);
        x_tst[r] = (p == P);
        x_in[r]  = (p >= 0 && p < P) ? data_t'(X[p][r]) : (p == P ? TEST_ELEM : data_t'($urandom));
      end
      @(negedge clk);
    end
    for (int r = 0; r < N; r++) begin x_vld[r] = 0; x_tst[r] = 0; end
    repeat (2 * N + 2) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (en[c] && (seen[c] != P || seen_tst[c] != 1)) begin
        failures++;
        $display("FAIL: column %0d delivered %0d results", c, seen[c]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < N; r++) begin
      w_row[r] = '0; x_in[r] = '0; x_vld[r] = 0; x_tst[r] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_pass('1, '0);
    run_pass(4'b1110, '0);
    run_pass(4'b1011, 4'b0001);
    run_pass(4'b0101, 4'b1010);
    run_pass('1, 4'b0100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

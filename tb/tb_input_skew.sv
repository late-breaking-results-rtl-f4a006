// tb_input_skew: streams random vectors (with random gaps and tags) through the
// skew stage and checks that element r, and the tags beside it, come out
// exactly r cycles after the vector went in.
`timescale 1ns/1ps
module tb_input_skew;
  import selfheal_pkg::*;
  localparam int N = 5;
  localparam int T = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  data_t in_x [N];
  logic in_vld = 0, in_tst = 0;
  data_t out_x [N];
  logic out_vld [N], out_tst [N];
  int checks = 0, failures = 0;
  data_t hx [T][N];
  logic  hv [T], ht [T];

  input_skew #(.N(N)) dut (.*);

  initial begin
    for (int r = 0; r < N; r++) in_x[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < N; r++) begin
        hx[t][r] = data_t'($urandom);
        in_x[r]  = hx[t][r];
      end
      hv[t] = $urandom_range(0, 1);
      ht[t] = $urandom_range(0, 1);
      in_vld = hv[t];
      in_tst = ht[t];
      #1;
      for (int r = 0; r < N; r++) begin
        if (t >= r) begin
          checks++;
          if (out_x[r] != hx[t-r][r] || out_vld[r] != hv[t-r] || out_tst[r] != ht[t-r]) begin
            failures++;
            $display("FAIL: t=%0d row %0d", t, r);
          end
        end else begin
          // reset state of the delay line: no valid data yet
          checks++;
          if (out_vld[r] !== 1'b0) failures++;
        end
      end
      @(negedge clk);
    end
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

// tb_array_sizes: runs the complete self-healing flow at the array sizes of the
// published column-reconfiguration measurements, 6, 10, 14 and 18 MACs per
// column (the 22 x 22 default is covered by tb_selfheal_top). Each size runs a
// 3-channel convolution with one faulty column and must give exact results.
`timescale 1ns/1ps
module tb_array_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NS = 4;
  logic fin [NS];
  int   ck  [NS];
  int   fl  [NS];

  size_run #(.N(6))  u6  (.clk, .rst_n, .fin(fin[0]), .checks(ck[0]), .failures(fl[0]));
  size_run #(.N(10)) u10 (.clk, .rst_n, .fin(fin[1]), .checks(ck[1]), .failures(fl[1]));
  size_run #(.N(14)) u14 (.clk, .rst_n, .fin(fin[2]), .checks(ck[2]), .failures(fl[2]));
  size_run #(.N(18)) u18 (.clk, .rst_n, .fin(fin[3]), .checks(ck[3]), .failures(fl[3]));

  int checks = 0, failures = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int k = 0; k < NS; k++) begin
      checks += ck[k];
      failures += fl[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    for (int k = 0; k < NS; k++) begin checks += ck[k]; failures += fl[k]; end
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pr_manager: reports random error vectors and answers repair requests with
// a configuration-engine model of random latency. Checks that every reported
// column is requested, that requests come one at a time in lowest-index order
// with a stable column, that a repaired column leaves the faulty set in the
// cycle after pr_done, and that reconf_count counts the repairs.
`timescale 1ns/1ps
module tb_pr_manager;
  localparam int N = 6, IW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic err_vld = 0, pr_done = 0;
  logic [N-1:0] err_vec = '0, faulty;
  logic pr_req;
  logic [IW-1:0] pr_col;
  logic [15:0] reconf_count;
  int checks = 0, failures = 0;
  logic [N-1:0] model = '0;
  int repairs = 0;

  pr_manager #(.N(N)) dut (.*);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int lat, wait_cnt;
    logic [N-1:0] old;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      // new errors at random
      old = model;
      err_vld = ($urandom_range(0, 3) == 0);
      err_vec = N'($urandom) & N'($urandom);
      if (err_vld) model |= err_vec;
      pr_done = 0;
      @(negedge clk);
      err_vld = 0;
      chk("faulty set", faulty, model);
      // the request is made from the faulty set of the cycle before: one that
      // was pending already, or else the one the new report just created
      if (old == '0) @(negedge clk);
      if (model != '0) begin
        int low;
        logic [N-1:0] basis;
        basis = (old != '0) ? old : model;
        low = 0;
        while (!basis[low]) low++;
        chk("pr_req", pr_req, 1);
        // the request taken is the lowest faulty column at request time
        lat = $urandom_range(0, 5);
        wait_cnt = 0;
        repeat (lat) begin
          @(negedge clk);
          chk("pr_req held", pr_req, 1);
        end
        chk("pr_col is a faulty column", model[pr_col], 1);
        chk("pr_col lowest", pr_col, low);
        pr_done = 1;
        model[pr_col] = 0;
        repairs++;
        @(negedge clk);
        pr_done = 0;
        chk("repaired column cleared", faulty, model);
        chk("reconf_count", reconf_count, repairs);
      end else begin
        chk("no request", pr_req, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sa_pe: checks one processing element against a reference model: weight
// capture, the registered multiply-accumulate (one-cycle latency), the operand
// and tag forwarding, the tag reset, and the +1 corruption of the fault model.
`timescale 1ns/1ps
module tb_sa_pe;
  import selfheal_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic w_we = 0, x_vld_in = 0, x_tst_in = 0, fault = 0;
  data_t w_in = '0, x_in = '0;
  acc_t psum_in = '0;
  data_t x_out;
  logic x_vld_out, x_tst_out;
  acc_t psum_out;
  int checks = 0, failures = 0;

  sa_pe dut (.*);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int w, x, ps, fl, v, t;
    @(posedge clk);
    #1;
    chk("valid tag in reset", x_vld_out, 0);
    chk("test tag in reset", x_tst_out, 0);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      w  = int'($urandom_range(0, 255)) - 128;
      x  = int'($urandom_range(0, 255)) - 128;
      ps = int'($urandom) - 32'h4000_0000;
      fl = ($urandom_range(0, 3) == 0);
      v  = $urandom_range(0, 1);
      t  = $urandom_range(0, 1);
      @(negedge clk);
      w_we = 1; w_in = data_t'(w);
      @(negedge clk);
      w_we = 0; w_in = data_t'(int'($urandom));   // must not be captured
      x_in = data_t'(x); psum_in = acc_t'(ps); fault = fl[0];
      x_vld_in = v[0]; x_tst_in = t[0];
      @(negedge clk);
      chk("psum_out", psum_out, acc_t'(ps + x * w + fl));
      chk("x_out", x_out, x);
      chk("x_vld_out", x_vld_out, v);
      chk("x_tst_out", x_tst_out, t);
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

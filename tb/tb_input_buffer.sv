// tb_input_buffer: writes random rows to random addresses, keeps a model of
// the memory, and checks that a read returns the model's row one cycle later
// (and holds it while rd_en is low).
`timescale 1ns/1ps
module tb_input_buffer;
  import selfheal_pkg::*;
  localparam int N = 4, C = 3, P = 5, DEPTH = C * P, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  data_t wr_data [N];
  data_t rd_data [N];
  data_t model [DEPTH][N];
  int checks = 0, failures = 0;

  input_buffer #(.N(N), .C(C), .P(P)) dut (.*);

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a);
      for (int c = 0; c < N; c++) begin
        model[a][c] = data_t'($urandom);
        wr_data[c]  = model[a][c];
      end
    end
    for (int k = 0; k < 400; k++) begin
      int a, ra;
      @(negedge clk);
      a  = $urandom_range(0, DEPTH - 1);
      ra = $urandom_range(0, DEPTH - 1);
      wr_en = $urandom_range(0, 1);
      wr_addr = AW'(a);
      for (int c = 0; c < N; c++) wr_data[c] = data_t'($urandom);
      rd_en = 1; rd_addr = AW'(ra);
      @(posedge clk);
      #1;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (rd_data[c] != model[ra][c]) begin
          failures++;
          $display("FAIL: addr %0d col %0d", ra, c);
        end
      end
      if (wr_en) for (int c = 0; c < N; c++) model[a][c] = wr_data[c];
      // rd_en low: output holds
      @(negedge clk);
      wr_en = 0; rd_en = 0; rd_addr = AW'($urandom_range(0, DEPTH - 1));
      @(posedge clk);
      #1;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (rd_data[c] != model[ra][c] && !(a == ra)) failures++;
      end
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

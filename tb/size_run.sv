// size_run: runs one complete convolution on a selfheal_top of array size N
// (3 channels, 2 filter groups, 9 pixels) with column N/2 upset before the run
// and a configuration-engine model of fixed latency. Compares every output
// value with a software convolution and checks that the fault was found,
// repaired once and replayed. Reports through fin / checks / failures.
`timescale 1ns/1ps
module size_run
  import selfheal_pkg::*;
#(
  parameter int N = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int C = 3, G = 2, P = 9;
  localparam int F = G * N;
  localparam int TAG_W = $clog2(F);
  localparam int IW = $clog2(N);

  logic start = 0, test_mode = 1, busy, done;
  logic wb_wr_en = 0, ib_wr_en = 0;
  logic [$clog2(C*G*N)-1:0] wb_wr_addr = '0;
  logic [$clog2(C*P)-1:0]   ib_wr_addr = '0;
  data_t wb_wr_data [N];
  data_t ib_wr_data [N];
  logic [$clog2(P)-1:0] ofm_rd_p = '0;
  logic [TAG_W-1:0]     ofm_rd_f = '0;
  acc_t ofm_rd_data;
  logic [N-1:0] cram_upset = N'(1) << (N / 2);
  logic pr_req, pr_done = 0;
  logic [IW-1:0] pr_col;
  logic [N-1:0] faulty;
  logic rb_overflow;
  logic [15:0] reconf_count, op_count, rec_op_count, logged_count, err_events,
               stall_cycles, check_wait_cycles;

  selfheal_top #(.N(N), .C(C), .G(G), .P(P)) dut (.*);

  int W [C][F][N], X [C][P][N], gold [P][F];
  int prcnt = 0;
  bit prrun = 0;

  always @(posedge clk) begin
    pr_done <= 1'b0;
    if (rst_n && pr_req && !prrun && !pr_done) begin
      prrun <= 1;
      prcnt <= 50;
    end else if (prrun) begin
      if (prcnt == 0) begin
        prrun <= 0;
        pr_done <= 1'b1;
        cram_upset[pr_col] <= 1'b0;
      end else prcnt--;
    end
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: N=%0d %s got %0d expected %0d", N, what, got, exp);
    end
  endtask

  initial begin
    fin = 0; checks = 0; failures = 0;
    for (int c = 0; c < N; c++) begin wb_wr_data[c] = '0; ib_wr_data[c] = '0; end
    for (int ch = 0; ch < C; ch++) begin
      for (int f = 0; f < F; f++) for (int r = 0; r < N; r++) W[ch][f][r] = int'($urandom_range(0, 60)) - 30;
      for (int p = 0; p < P; p++) for (int r = 0; r < N; r++) X[ch][p][r] = int'($urandom_range(0, 60)) - 30;
    end
    for (int p = 0; p < P; p++)
      for (int f = 0; f < F; f++) begin
        gold[p][f] = 0;
        for (int ch = 0; ch < C; ch++) for (int r = 0; r < N; r++) gold[p][f] += X[ch][p][r] * W[ch][f][r];
      end
    @(posedge rst_n);
    for (int ch = 0; ch < C; ch++)
      for (int g = 0; g < G; g++)
        for (int r = 0; r < N; r++) begin
          @(negedge clk);
          wb_wr_en = 1;
          wb_wr_addr = ($bits(wb_wr_addr))'((ch * G + g) * N + r);
          for (int c = 0; c < N; c++) wb_wr_data[c] = data_t'(W[ch][g*N+c][r]);
        end
    @(negedge clk) wb_wr_en = 0;
    for (int ch = 0; ch < C; ch++)
      for (int p = 0; p < P; p++) begin
        @(negedge clk);
        ib_wr_en = 1;
        ib_wr_addr = ($bits(ib_wr_addr))'(ch * P + p);
        for (int r = 0; r < N; r++) ib_wr_data[r] = data_t'(X[ch][p][r]);
      end
    @(negedge clk) ib_wr_en = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    chk("error events", err_events, 1);
    chk("repairs", reconf_count, 1);
    chk("recovery operations > 0", rec_op_count != 0, 1);
    for (int p = 0; p < P; p++)
      for (int f = 0; f < F; f++) begin
        ofm_rd_p = ($bits(ofm_rd_p))'(p);
        ofm_rd_f = TAG_W'(f);
        #1;
        chk("output feature map", ofm_rd_data, gold[p][f]);
      end
    $display("N=%0d: %0d operations, %0d recovery, %0d logged", N, op_count, rec_op_count, logged_count);
    fin = 1;
  end
endmodule

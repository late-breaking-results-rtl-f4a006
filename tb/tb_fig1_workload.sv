// tb_fig1_workload: the worked recovery example. A 3 x 3 array runs a
// convolution of an RGB input (3 channels, 9 output pixels) with 6 filters, as
// 6 operations: R f0-f2, R f3-f5, G f0-f2, G f3-f5, B f0-f2, B f3-f5. Column 0
// is faulty from the start; its repair completes while operation 3 (G f0-f2)
// runs, so column 0 misses f0 and f3 in the R channel and f0 in the G channel.
// The test checks that exactly those three weight columns are logged (R twice,
// next to each other, and G once), that two recovery operations replay them
// (R: filters 0 and 3 together, then G: filter 0), that column 0 takes part
// again from operation 4, and that all output feature maps are exact.
`timescale 1ns/1ps
module tb_fig1_workload;
  import selfheal_pkg::*;
  localparam int N = 3, C = 3, G = 2, P = 9;
  localparam int F = G * N;
  localparam int TAG_W = $clog2(F);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, test_mode = 1, busy, done;
  logic wb_wr_en = 0, ib_wr_en = 0;
  logic [$clog2(C*G*N)-1:0] wb_wr_addr = '0;
  logic [$clog2(C*P)-1:0]   ib_wr_addr = '0;
  data_t wb_wr_data [N];
  data_t ib_wr_data [N];
  logic [$clog2(P)-1:0] ofm_rd_p = '0;
  logic [TAG_W-1:0]     ofm_rd_f = '0;
  acc_t ofm_rd_data;
  logic [N-1:0] cram_upset = 3'b001;
  logic pr_req, pr_done = 0;
  logic [1:0] pr_col;
  logic [N-1:0] faulty;
  logic rb_overflow;
  logic [15:0] reconf_count, op_count, rec_op_count, logged_count, err_events,
               stall_cycles, check_wait_cycles;

  selfheal_top #(.N(N), .C(C), .G(G), .P(P)) dut (.*);

  int checks = 0, failures = 0;
  int W [C][F][N], X [C][P][N], gold [P][F];

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  // configuration engine model: the repair completes once operation 3 has
  // been evaluated, i.e. before operation 4 starts
  always @(posedge clk) begin
    pr_done <= 1'b0;
    if (rst_n && pr_req && !pr_done && op_count == 16'd3) begin
      pr_done <= 1'b1;
      cram_upset[pr_col] <= 1'b0;
    end
  end

  // trace: logged entries, column enables per operation, recovery commits
  int log_ch [$], log_tag [$];
  logic [N-1:0] en_of_op [$];
  int rec_ch [$];
  logic [N-1:0] rec_mask [$];
  int rec_tag0 [$], rec_tag1 [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.rb_push) begin
      log_ch.push_back(int'(dut.rb_push_ch));
      log_tag.push_back(int'(dut.rb_push_tag));
    end
    if (dut.ofm_commit) begin
      en_of_op.push_back(dut.col_en);
      if (dut.u_ctrl.is_rec) begin
        rec_ch.push_back(int'(dut.u_ctrl.ch));
        rec_mask.push_back(dut.commit_mask);
        rec_tag0.push_back(int'(dut.commit_tag[0]));
        rec_tag1.push_back(int'(dut.commit_tag[1]));
      end
    end
  end

  initial begin
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
    repeat (2) @(negedge clk);
    rst_n = 1;
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

    chk("operations", op_count, 8);
    chk("recovery operations", rec_op_count, 2);
    chk("logged", log_ch.size(), 3);
    if (log_ch.size() == 3) begin
      chk("log 1 channel R", log_ch[0], 0); chk("log 1 filter f0", log_tag[0], 0);
      chk("log 2 channel R", log_ch[1], 0); chk("log 2 filter f3", log_tag[1], 3);
      chk("log 3 channel G", log_ch[2], 1); chk("log 3 filter f0", log_tag[2], 0);
    end
    chk("ops committed", en_of_op.size(), 8);
    if (en_of_op.size() == 8) begin
      chk("op 1 uses column 0", en_of_op[0][0], 1);   // fault found by op 1's checksum
      chk("op 2 excludes column 0", en_of_op[1][0], 0);
      chk("op 3 excludes column 0", en_of_op[2][0], 0);
      for (int k = 3; k < 6; k++) chk("column 0 back", en_of_op[k][0], 1);
    end
    if (rec_ch.size() == 2) begin
      chk("op 7 channel R", rec_ch[0], 0);
      chk("op 7 columns", rec_mask[0], 3'b011);
      chk("op 7 filters", rec_tag0[0] * 10 + rec_tag1[0], 3);
      chk("op 8 channel G", rec_ch[1], 1);
      chk("op 8 columns", rec_mask[1], 3'b001);
      chk("op 8 filter", rec_tag0[1], 0);
    end
    for (int p = 0; p < P; p++)
      for (int f = 0; f < F; f++) begin
        ofm_rd_p = ($bits(ofm_rd_p))'(p);
        ofm_rd_f = TAG_W'(f);
        #1;
        chk("output feature map", ofm_rd_data, gold[p][f]);
      end
    chk("repairs", reconf_count, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

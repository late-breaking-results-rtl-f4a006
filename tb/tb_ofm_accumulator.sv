// tb_ofm_accumulator: runs several operations through the output accumulator.
// Each one streams P random results per column (interleaved with test-vector
// results that must be ignored, and with random gaps per column), waits for
// stage_done, then commits a random subset of columns under random distinct
// filter indices. A model of the feature maps checks every entry after each
// commit, the P-cycle commit_busy window, the read port and ofm_clr.
`timescale 1ns/1ps
module tb_ofm_accumulator;
  import selfheal_pkg::*;
  localparam int N = 4, P = 5, F = 8, TAG_W = 3, PW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, commit = 0, ofm_clr = 0;
  logic [N-1:0] expect_mask = '1, commit_mask = '0;
  acc_t y [N];
  logic [N-1:0] y_vld = '0, y_tst = '0;
  logic stage_done, commit_busy;
  logic [TAG_W-1:0] commit_tag [N];
  logic [PW-1:0] rd_p = '0;
  logic [TAG_W-1:0] rd_f = '0;
  acc_t rd_data;
  int checks = 0, failures = 0;
  int model [P][F];
  int R [P][N];

  ofm_accumulator #(.N(N), .P(P), .F(F)) dut (.*);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_all();
    for (int p = 0; p < P; p++)
      for (int f = 0; f < F; f++) begin
        rd_p = PW'(p); rd_f = TAG_W'(f);
        #1;
        chk("ofm", rd_data, model[p][f]);
      end
  endtask

  initial begin
    int sent [N];
    int busy_cycles;
    for (int c = 0; c < N; c++) begin y[c] = '0; commit_tag[c] = '0; end
    for (int p = 0; p < P; p++) for (int f = 0; f < F; f++) model[p][f] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < 25; op++) begin
      if (op == 12) begin
        @(negedge clk) ofm_clr = 1;
        @(negedge clk) ofm_clr = 0;
        for (int p = 0; p < P; p++) for (int f = 0; f < F; f++) model[p][f] = 0;
        check_all();
      end
      expect_mask = N'($urandom) | N'(1);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int c = 0; c < N; c++) sent[c] = 0;
      for (int p = 0; p < P; p++) for (int c = 0; c < N; c++) R[p][c] = int'($urandom) >>> 4;
      while (1) begin
        bit all;
        all = 1;
        for (int c = 0; c < N; c++) begin
          y_vld[c] = 0; y_tst[c] = 0;
          if (expect_mask[c] && sent[c] < P) begin
            all = 0;
            case ($urandom_range(0, 3))
              0: ;                                        // gap
              1: begin y_vld[c] = 1; y_tst[c] = 1; y[c] = acc_t'($urandom); end
              default: begin y_vld[c] = 1; y[c] = acc_t'(R[sent[c]][c]); sent[c]++; end
            endcase
          end
        end
        if (all) break;
        #1;
        chk("stage_done early", stage_done, 0);
        @(negedge clk);
      end
      y_vld = '0; y_tst = '0;
      #1;
      chk("stage_done", stage_done, 1);
      // commit a random subset under distinct random filter indices
      begin
        int perm [F];
        for (int f = 0; f < F; f++) perm[f] = f;
        perm.shuffle();
        commit_mask = N'($urandom) & expect_mask;
        for (int c = 0; c < N; c++) commit_tag[c] = TAG_W'(perm[c]);
      end
      commit = 1;
      @(negedge clk) commit = 0;
      for (int c = 0; c < N; c++)
        if (commit_mask[c])
          for (int p = 0; p < P; p++) model[p][perm_tag(c)] += R[p][c];
      busy_cycles = 0;
      while (commit_busy) begin busy_cycles++; @(negedge clk); end
      chk("commit cycles", busy_cycles, P);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int perm_tag(input int c);
    return int'(commit_tag[c]);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

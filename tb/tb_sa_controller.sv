// tb_sa_controller: drives the operation sequencer alone, with simple models of
// the buffers, checksum checker, output accumulator and recovery buffer.
// Scenario (N=3, C=2 channels, G=2 groups, P=4 pixels, testing mode on):
// column 0 is faulty during the first two operations and the checksum of
// operation 2 flags column 2. The test checks the weight-buffer and
// input-buffer address sequences, the weight rows written into the array, the
// single test vector after the P inputs, the column enables, the commit masks
// and filter tags, the entries logged into the recovery buffer (channel, tag
// and weight column), the two recovery operations that replay them (weights
// and tags from the buffer), and done.
`timescale 1ns/1ps
module tb_sa_controller;
  import selfheal_pkg::*;
  localparam int N = 3, C = 2, G = 2, P = 4;
  localparam int F = G * N, TAG_W = $clog2(F), WAW = $clog2(C*G*N), IAW = $clog2(C*P);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, test_mode = 1, busy, done;
  logic wb_rd_en; logic [WAW-1:0] wb_rd_addr; data_t wb_rd_data [N];
  logic ib_rd_en; logic [IAW-1:0] ib_rd_addr; logic sk_vld, sk_tst;
  logic sa_w_we; logic [1:0] sa_w_row_idx; data_t sa_w_row [N];
  logic [N-1:0] col_en;
  logic chk_clr, chk_done; logic [N-1:0] chk_err;
  logic ofm_clr, ofm_start, stage_done, ofm_commit, commit_busy;
  logic [N-1:0] commit_mask; logic [TAG_W-1:0] commit_tag [N];
  logic rb_push; logic [0:0] rb_push_ch; logic [TAG_W-1:0] rb_push_tag; data_t rb_push_w [N];
  logic rb_pop; logic [0:0] rb_pop_ch; logic [TAG_W-1:0] rb_pop_tag; data_t rb_pop_w [N];
  logic [$clog2(F):0] rb_count [C];
  logic [N-1:0] faulty = '0;
  logic err_vld; logic [N-1:0] err_vec;
  logic [15:0] op_count, rec_op_count, logged_count, err_events, stall_cycles, check_wait_cycles;

  sa_controller #(.N(N), .C(C), .G(G), .P(P)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic data_t wdat(input int a, input int c);
    return data_t'(a * 5 + c * 3 + 1);
  endfunction

  // weight buffer model: one-cycle read latency
  always @(posedge clk) if (wb_rd_en) for (int c = 0; c < N; c++) wb_rd_data[c] <= wdat(int'(wb_rd_addr), c);

  // recovery buffer model
  typedef struct { logic [TAG_W-1:0] tag; data_t w [N]; } ent_t;
  ent_t rq [C][$];
  always_comb for (int c = 0; c < C; c++) rb_count[c] = ($bits(rb_count[c]))'(rq[c].size());
  always_comb begin
    rb_pop_tag = '0;
    for (int r = 0; r < N; r++) rb_pop_w[r] = '0;
    if (rq[rb_pop_ch].size() != 0) begin
      rb_pop_tag = rq[rb_pop_ch][0].tag;
      rb_pop_w   = rq[rb_pop_ch][0].w;
    end
  end

  // checksum / staging / commit models and the operation trace
  int op = -1;           // operation number, counted at chk_clr
  int n_in, n_tst, stage_wait, busy_cnt;
  logic [N-1:0] err_inject;
  int wrow [N][N];       // rows written into the array in this operation
  int pushes = 0, rec_seen = 0;
  int exp_addr_base;
  assign chk_err = err_inject;

  always @(posedge clk) if (rst_n) begin
    if (chk_clr) begin
      op <= op + 1;
      n_in <= 0; n_tst <= 0; stage_wait <= 0;
    end
    if (sk_vld && !sk_tst) n_in <= n_in + 1;
    if (sk_tst) begin
      n_tst <= n_tst + 1;
      if (n_in != P) begin failures++; $display("FAIL: test vector after %0d inputs", n_in); end
    end
    if (n_tst != 0 || (!test_mode && n_in == P)) stage_wait <= stage_wait + 1;
    if (ofm_commit) busy_cnt <= P; else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (rb_pop && rq[rb_pop_ch].size() != 0) void'(rq[rb_pop_ch].pop_front());
    if (rb_push) begin
      ent_t e;
      e.tag = rb_push_tag;
      e.w = rb_push_w;
      rq[rb_push_ch].push_back(e);
    end
  end
  assign stage_done  = (stage_wait >= 6);
  assign chk_done    = (stage_wait >= 6);
  assign commit_busy = (busy_cnt != 0);

  // checks of the address streams and the array weight writes
  int wr_cnt, rd_cnt, ib_cnt;
  always @(posedge clk) if (rst_n) begin
    if (chk_clr) begin
      wr_cnt <= 0; ib_cnt <= 0;
      // the read of row 0 is issued in the same cycle as the checker clear
      if (wb_rd_en) chk("wb_rd_addr row 0", wb_rd_addr, (((op + 1) / G % C) * G + (op + 1) % G) * N);
      rd_cnt <= wb_rd_en ? 1 : 0;
    end else begin
      if (wb_rd_en) begin
        chk("wb_rd_addr", wb_rd_addr, ((op / G % C) * G + op % G) * N + rd_cnt);
        rd_cnt <= rd_cnt + 1;
      end
      if (ib_rd_en) begin
        chk("ib_rd_addr", ib_rd_addr, cur_ch() * P + ib_cnt);
        ib_cnt <= ib_cnt + 1;
      end
      if (sa_w_we) begin
        chk("row index", sa_w_row_idx, wr_cnt);
        for (int c = 0; c < N; c++) wrow[wr_cnt][c] = int'(sa_w_row[c]);
        wr_cnt <= wr_cnt + 1;
      end
    end
  end

  function automatic int cur_ch();
    return (op < C * G) ? op / G : int'(dut.ch);
  endfunction

  // per-operation expectations at commit
  always @(posedge clk) if (rst_n && ofm_commit) begin
    logic [N-1:0] exp_en, exp_mask;
    chk("test vectors per op", n_tst, 1);
    if (op < C * G) begin
      exp_en   = (op < 2) ? 3'b110 : 3'b111;
      exp_mask = exp_en & ~((op == 2) ? 3'b100 : 3'b000);
      chk("col_en", col_en, exp_en);
      chk("commit_mask", commit_mask, exp_mask);
      chk("err_vld", err_vld, op == 2);
      for (int c = 0; c < N; c++) begin
        chk("tag", commit_tag[c], (op % G) * N + c);
        for (int r = 0; r < N; r++)
          chk("weights written", wrow[r][c], wdat(((op / G) * G + op % G) * N + r, c));
      end
    end else begin
      // recovery: ch0 replays filters 0 and 3 (both originally in column 0), ch1 filter 2
      rec_seen++;
      if (op == C * G) begin
        chk("rec1 channel", dut.ch, 0);
        chk("rec1 mask", commit_mask, 3'b011);
        chk("rec1 tag0", commit_tag[0], 0);
        chk("rec1 tag1", commit_tag[1], 3);
        for (int r = 0; r < N; r++) begin
          chk("rec1 w col0", wrow[r][0], wdat(0 * N + r, 0));
          chk("rec1 w col1", wrow[r][1], wdat(1 * N + r, 0));
          chk("rec1 w col2", wrow[r][2], 0);
        end
      end else begin
        chk("rec2 channel", dut.ch, 1);
        chk("rec2 mask", commit_mask, 3'b001);
        chk("rec2 tag0", commit_tag[0], 2);
        for (int r = 0; r < N; r++) chk("rec2 w col0", wrow[r][0], wdat(2 * N + r, 2));
      end
    end
  end

  always @(posedge clk) if (rst_n && rb_push) pushes <= pushes + 1;

  initial begin
    err_inject = '0;
    busy_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    faulty = 3'b001;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      if (op_count >= 2) faulty = '0;
      err_inject = (op == 2) ? 3'b100 : 3'b000;
    end
    chk("regular + recovery ops", op_count, C * G + 2);
    chk("recovery ops", rec_op_count, 2);
    chk("recovery ops seen", rec_seen, 2);
    chk("logged entries", logged_count, 3);
    chk("pushes", pushes, 3);
    chk("error events", err_events, 1);
    chk("buffer empty", rq[0].size() + rq[1].size(), 0);
    chk("idle after done", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_selfheal_top: end-to-end test of the self-healing accelerator at its
// default size (22 x 22 array, 3 channels, 44 filters, 9 output pixels).
//
// The testbench fills the weight and input buffers with random data, computes
// the expected output feature maps itself, and runs the convolution in five
// scenarios: no fault; one column upset before the run (detected by the first
// checksum, excluded, logged, repaired and replayed); two columns upset in the
// middle of the run (repaired one at a time); every column upset with a slow
// repair (recovery stalls until a column is back); and a fault with testing
// mode off (no detection, so the affected filters come out wrong). A model of
// the device configuration engine answers each repair request after a fixed
// number of cycles and clears the column's upset. Each mechanism is counted and
// a failure is counted for any that never occurred.
`timescale 1ns/1ps
module tb_selfheal_top;
  import selfheal_pkg::*;
  localparam int N = 22, C = 3, G = 2, P = 9;
  localparam int F = G * N;
  localparam int IW = $clog2(N);
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
  logic [N-1:0] cram_upset = '0;
  logic pr_req, pr_done = 0;
  logic [IW-1:0] pr_col;
  logic [N-1:0] faulty;
  logic rb_overflow;
  logic [15:0] reconf_count, op_count, rec_op_count, logged_count, err_events,
               stall_cycles, check_wait_cycles;

  selfheal_top dut (.*);

  int checks = 0, failures = 0;
  int W [C][F][N];   // [channel][filter][kernel element]
  int X [C][P][N];   // [channel][pixel][kernel element]
  int gold [P][F];

  // ---- configuration engine model: one column at a time, fixed latency
  int  reconf_cycles = 40;
  int  prcnt = 0;
  bit  prrun = 0;
  int  n_pr_done = 0;
  logic [N-1:0] inject = '0;   // set by the stimulus, applied at the next edge
  always @(posedge clk) begin
    pr_done <= 1'b0;
    if (inject != '0) begin
      cram_upset <= cram_upset | inject;
      inject     <= '0;
    end
    if (rst_n && pr_req && !prrun && !pr_done) begin
      prrun <= 1;
      prcnt <= reconf_cycles;
    end else if (prrun) begin
      if (prcnt == 0) begin
        prrun   <= 0;
        pr_done <= 1'b1;
        cram_upset[pr_col] <= 1'b0;
        n_pr_done++;
      end else prcnt--;
    end
  end

  // ---- mechanism counters
  int m_detect = 0, m_exclude = 0, m_bypass = 0, m_log = 0, m_regions = 0,
      m_repair = 0, m_rejoin = 0, m_recovery = 0, m_stall = 0, m_pause = 0,
      m_testoff = 0, m_multi = 0;
  logic [C-1:0] ch_logged;
  logic [N-1:0] prev_en = '1;
  always @(posedge clk) if (rst_n) begin
    // rejoin: a column excluded in the previous operation is used again
    if (dut.ofm_commit) begin
      if ((~prev_en & dut.col_en) != '0) m_rejoin++;
      prev_en <= dut.col_en;
    end
    if (dut.err_vld) m_detect++;
    if (dut.rb_push) ch_logged[dut.rb_push_ch] <= 1'b1;
    if (dut.ofm_commit && dut.col_en != '1) m_exclude++;
    // bypass: a column to the right of an excluded one delivered its result
    if (dut.ofm_commit)
      for (int c = 1; c < N; c++)
        if (!dut.col_en[c-1] && dut.commit_mask[c]) begin m_bypass++; break; end
    if ($countones(faulty) > 1) m_multi++;
  end

  task automatic fill_and_gold();
    for (int ch = 0; ch < C; ch++) begin
      for (int f = 0; f < F; f++)
        for (int r = 0; r < N; r++) W[ch][f][r] = int'($urandom_range(0, 30)) - 15;
      for (int p = 0; p < P; p++)
        for (int r = 0; r < N; r++) X[ch][p][r] = int'($urandom_range(0, 30)) - 15;
    end
    for (int p = 0; p < P; p++)
      for (int f = 0; f < F; f++) begin
        gold[p][f] = 0;
        for (int ch = 0; ch < C; ch++)
          for (int r = 0; r < N; r++) gold[p][f] += X[ch][p][r] * W[ch][f][r];
      end
    // weight tile (ch, g) row r holds element r of filters g*N .. g*N+N-1
    for (int ch = 0; ch < C; ch++)
      for (int g = 0; g < G; g++)
        for (int r = 0; r < N; r++) begin
          @(negedge clk);
          wb_wr_en   = 1;
          wb_wr_addr = ($bits(wb_wr_addr))'((ch * G + g) * N + r);
          for (int c = 0; c < N; c++) wb_wr_data[c] = data_t'(W[ch][g*N+c][r]);
        end
    @(negedge clk) wb_wr_en = 0;
    for (int ch = 0; ch < C; ch++)
      for (int p = 0; p < P; p++) begin
        @(negedge clk);
        ib_wr_en   = 1;
        ib_wr_addr = ($bits(ib_wr_addr))'(ch * P + p);
        for (int r = 0; r < N; r++) ib_wr_data[r] = data_t'(X[ch][p][r]);
      end
    @(negedge clk) ib_wr_en = 0;
  endtask

  // run once; inject 'mid' upsets when op_count reaches 'at_op'
  task automatic run(input bit tm, input logic [N-1:0] mid, input int at_op);
    @(negedge clk);
    test_mode = tm;
    start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      if (mid != '0 && op_count == 16'(at_op)) begin
        inject = mid;
        mid = '0;
      end
    end
    // wait until any outstanding repair finished
    while (faulty != '0 || prrun) @(negedge clk);
    $display("run: ops=%0d recovery=%0d logged=%0d errors=%0d stall=%0d pause=%0d t=%0t",
             op_count, rec_op_count, logged_count, err_events, stall_cycles,
             check_wait_cycles, $time);
  endtask

  // compare all feature maps; returns number of mismatches
  function automatic int compare(input bit count_it);
    int bad = 0;
    for (int p = 0; p < P; p++)
      for (int f = 0; f < F; f++)
        if (dut.u_ofm.ofm[p][f] != gold[p][f]) bad++;
    if (count_it) begin
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL: %0d feature-map values differ", bad);
      end
    end
    return bad;
  endfunction

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic read_port_check();
    // the host read port returns the feature-map entries
    for (int k = 0; k < 4; k++) begin
      int p = $urandom_range(0, P - 1);
      int f = $urandom_range(0, F - 1);
      @(negedge clk);
      ofm_rd_p = ($bits(ofm_rd_p))'(p);
      ofm_rd_f = TAG_W'(f);
      #1;
      expect_eq("ofm read port", int'(ofm_rd_data), gold[p][f]);
    end
  endtask

  int n_rec_before, bad;
  initial begin
    for (int c = 0; c < N; c++) begin wb_wr_data[c] = '0; ib_wr_data[c] = '0; end
    ch_logged = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fill_and_gold();

    // 1: fault free
    run(1, '0, 0);
    void'(compare(1));
    read_port_check();
    expect_eq("recovery ops, fault free", int'(rec_op_count), 0);
    expect_eq("regular ops", int'(op_count), C * G);
    if (check_wait_cycles != 0) m_pause++;

    // 2: column 0 upset before the run
    @(negedge clk) cram_upset[0] = 1'b1;
    run(1, '0, 0);
    void'(compare(1));
    read_port_check();
    expect_eq("column 0 detections", int'(err_events), 1);
    if (rec_op_count != 0) m_recovery++;
    if (logged_count != 0) m_log++;
    if (check_wait_cycles != 0) m_pause++;

    // 3: columns 3 and 17 upset while the third operation runs
    run(1, N'(1) << 3 | N'(1) << 17, 2);
    void'(compare(1));
    if (rec_op_count != 0) m_recovery++;

    // 4: every column upset, slow repair: recovery must wait for a column
    reconf_cycles = 300;
    @(negedge clk) cram_upset = '1;
    run(1, '0, 0);
    void'(compare(1));
    expect_eq("all-column logging", int'(logged_count) >= C * F ? 1 : 0, 1);
    if (stall_cycles != 0) m_stall++;
    reconf_cycles = 40;

    // 5: testing mode off: the fault goes unnoticed and corrupts results
    @(negedge clk) cram_upset[5] = 1'b1;
    run(0, '0, 0);
    bad = compare(0);
    expect_eq("undetected errors with testing mode off", bad, P * G * 1);
    expect_eq("no detection with testing mode off", int'(err_events), 0);
    if (bad != 0) m_testoff++;
    @(negedge clk) cram_upset = '0;

    expect_eq("recovery buffer overflow", int'(rb_overflow), 0);
    m_repair  = n_pr_done;
    m_regions = $countones(ch_logged) > 1;

    begin
      string names [12];
      int vals [12];
      names = '{"detection", "exclusion", "bypass", "logging",
        "per-channel regions", "reconfiguration", "rejoin", "recovery op",
        "stall", "checksum pause", "testing mode off", "multiple faulty"};
      vals = '{m_detect, m_exclude, m_bypass, m_log, m_regions,
        m_repair, m_rejoin, m_recovery, m_stall, m_pause, m_testoff, m_multi};
      for (int k = 0; k < 12; k++) begin
        $display("mechanism %-20s %0d", names[k], vals[k]);
        checks++;
        if (vals[k] == 0) begin
          failures++;
          $display("FAIL: mechanism %s never happened", names[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

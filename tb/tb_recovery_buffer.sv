// tb_recovery_buffer: random pushes and pops across the channel regions,
// checked against a queue model per region: entries come back in order and
// only from their own region, counts track the fill level, a pop from an empty
// region does nothing, and a push into a full region raises overflow.
`timescale 1ns/1ps
module tb_recovery_buffer;
  import selfheal_pkg::*;
  localparam int N = 3, C = 3, DEPTH = 4, TAG_W = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push_en = 0, pop_en = 0;
  logic [1:0] push_ch = '0, pop_ch = '0;
  logic [TAG_W-1:0] push_tag = '0, pop_tag;
  data_t push_w [N];
  data_t pop_w [N];
  logic [$clog2(DEPTH):0] count [C];
  logic overflow;
  int checks = 0, failures = 0;
  typedef struct { logic [TAG_W-1:0] tag; data_t w [N]; } ent_t;
  ent_t q [C][$];
  bit exp_ovf = 0;

  recovery_buffer #(.N(N), .C(C), .DEPTH(DEPTH), .TAG_W(TAG_W)) dut (.*);

  initial begin
    for (int r = 0; r < N; r++) push_w[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      ent_t e;
      int pc, oc;
      bit pu, po, full;
      @(negedge clk);
      pu = ($urandom_range(0, 2) != 0);
      po = ($urandom_range(0, 2) == 0);
      pc = $urandom_range(0, C - 1);
      oc = $urandom_range(0, C - 1);
      push_en = pu; push_ch = 2'(pc); push_tag = TAG_W'($urandom);
      for (int r = 0; r < N; r++) push_w[r] = data_t'($urandom);
      pop_en = po; pop_ch = 2'(oc);
      #1;
      // head of the popped region
      if (q[oc].size() != 0) begin
        checks++;
        if (pop_tag != q[oc][0].tag || pop_w != q[oc][0].w) begin
          failures++;
          $display("FAIL: region %0d head differs", oc);
        end
      end
      for (int c = 0; c < C; c++) begin
        checks++;
        if (count[c] != ($bits(count[c]))'(q[c].size())) begin
          failures++;
          $display("FAIL: region %0d count %0d model %0d", c, count[c], q[c].size());
        end
      end
      // update the model as the buffer does at the clock edge: fullness is
      // judged on the fill level at the start of the cycle
      full = (q[pc].size() >= DEPTH);
      if (po && q[oc].size() != 0) void'(q[oc].pop_front());
      if (pu) begin
        if (!full) begin
          e.tag = push_tag;
          e.w = push_w;
          q[pc].push_back(e);
        end else exp_ovf = 1;
      end
      @(posedge clk);
      #1;
      checks++;
      if (overflow != exp_ovf) begin
        failures++;
        $display("FAIL: overflow %0d expected %0d", overflow, exp_ovf);
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

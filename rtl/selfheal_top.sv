// selfheal_top: self-healing weight-stationary systolic-array accelerator.
//
// An N x N systolic array runs a convolution as a sequence of per-channel
// matrix multiplications. In testing mode each operation carries an appended
// checksum test vector; the array's column checksums are compared with a
// reference bank, and a column that disagrees is excluded from the following
// operations while it is repaired by partial reconfiguration, one column at a
// time. The work the excluded columns could not do is logged, per input
// channel, in the weight recovery buffer and replayed as recovery operations
// after the regular ones, so the full result is produced without stopping.
//
// Blocks: weight_buffer and input_buffer (host-filled stores), input_skew,
// systolic_array, checksum_checker, ofm_accumulator, recovery_buffer,
// pr_manager and the sequencer sa_controller.
//
// Interface:
//   start / test_mode / busy / done   run the convolution held in the buffers
//   wb_wr_*  ib_wr_*                  host writes of weight tiles / inputs
//   ofm_rd_p, ofm_rd_f -> ofm_rd_data output feature map read (combinational)
//   pr_req, pr_col / pr_done          request to the device configuration
//                                     engine to rewrite one column's region
//   cram_upset[c]                     fault model of a configuration upset in
//                                     column c (tie low in a real device)
//   faulty, rb_overflow, *_count      status and activity counters
// Parameters: N array size, C input channels, G filter groups per channel
// (F = G*N filters), P output pixels per feature map.
module selfheal_top
  import selfheal_pkg::*;
#(
  parameter int unsigned N = 22,
  parameter int unsigned C = 3,
  parameter int unsigned G = 2,
  parameter int unsigned P = 9,
  localparam int unsigned F     = G * N,
  localparam int unsigned TILES = C * G,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW    = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned TAG_W = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned PW    = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned WAW   = $clog2(TILES * N),
  localparam int unsigned IAW   = $clog2(C * P),
  localparam int unsigned RPW   = $clog2(F) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             test_mode,
  output logic             busy,
  output logic             done,
  input  logic             wb_wr_en,
  input  logic [WAW-1:0]   wb_wr_addr,
  input  data_t            wb_wr_data [N],
  input  logic             ib_wr_en,
  input  logic [IAW-1:0]   ib_wr_addr,
  input  data_t            ib_wr_data [N],
  input  logic [PW-1:0]    ofm_rd_p,
  input  logic [TAG_W-1:0] ofm_rd_f,
  output acc_t             ofm_rd_data,
  input  logic [N-1:0]     cram_upset,
  output logic             pr_req,
  output logic [IW-1:0]    pr_col,
  input  logic             pr_done,
  output logic [N-1:0]     faulty,
  output logic             rb_overflow,
  output logic [15:0]      reconf_count,
  output logic [15:0]      op_count,
  output logic [15:0]      rec_op_count,
  output logic [15:0]      logged_count,
  output logic [15:0]      err_events,
  output logic [15:0]      stall_cycles,
  output logic [15:0]      check_wait_cycles
);
  // buffers
  logic             wb_rd_en, ib_rd_en;
  logic [WAW-1:0]   wb_rd_addr;
  logic [IAW-1:0]   ib_rd_addr;
  data_t            wb_rd_data [N];
  data_t            ib_rd_data [N];
  // skew / array
  logic             sk_vld, sk_tst;
  data_t            sk_in  [N];
  data_t            sx     [N];
  logic             sv     [N];
  logic             st     [N];
  logic             sa_w_we;
  logic [IW-1:0]    sa_w_row_idx;
  data_t            sa_w_row [N];
  logic [N-1:0]     col_en;
  acc_t             y      [N];
  logic [N-1:0]     y_vld, y_tst;
  // checksum
  logic             chk_clr, chk_done;
  logic [N-1:0]     chk_err;
  // ofm
  logic             ofm_clr, ofm_start, stage_done, ofm_commit, commit_busy;
  logic [N-1:0]     commit_mask;
  logic [TAG_W-1:0] commit_tag [N];
  // recovery buffer
  logic             rb_push, rb_pop;
  logic [CW-1:0]    rb_push_ch, rb_pop_ch;
  logic [TAG_W-1:0] rb_push_tag, rb_pop_tag;
  data_t            rb_push_w [N];
  data_t            rb_pop_w  [N];
  logic [RPW-1:0]   rb_count  [C];
  // health
  logic             err_vld;
  logic [N-1:0]     err_vec;

  weight_buffer #(.N(N), .TILES(TILES)) u_wbuf (
    .clk, .wr_en(wb_wr_en), .wr_addr(wb_wr_addr), .wr_data(wb_wr_data),
    .rd_en(wb_rd_en), .rd_addr(wb_rd_addr), .rd_data(wb_rd_data));

  input_buffer #(.N(N), .C(C), .P(P)) u_ibuf (
    .clk, .wr_en(ib_wr_en), .wr_addr(ib_wr_addr), .wr_data(ib_wr_data),
    .rd_en(ib_rd_en), .rd_addr(ib_rd_addr), .rd_data(ib_rd_data));

  // the checksum test vector replaces the buffer data in its cycle
  always_comb begin
    for (int r = 0; r < N; r++) sk_in[r] = sk_tst ? TEST_ELEM : ib_rd_data[r];
  end

  input_skew #(.N(N)) u_skew (
    .clk, .rst_n, .in_x(sk_in), .in_vld(sk_vld), .in_tst(sk_tst),
    .out_x(sx), .out_vld(sv), .out_tst(st));

  systolic_array #(.N(N)) u_sa (
    .clk, .rst_n, .w_we(sa_w_we), .w_row_idx(sa_w_row_idx), .w_row(sa_w_row),
    .x_in(sx), .x_vld(sv), .x_tst(st), .col_en, .col_fault(cram_upset),
    .y, .y_vld, .y_tst);

  checksum_checker #(.N(N)) u_chk (
    .clk, .rst_n, .clr(chk_clr), .w_we(sa_w_we), .w_row(sa_w_row), .col_en,
    .y, .y_vld, .y_tst, .done(chk_done), .err_vec(chk_err));

  ofm_accumulator #(.N(N), .P(P), .F(F)) u_ofm (
    .clk, .rst_n, .start(ofm_start), .expect_mask(col_en), .y, .y_vld, .y_tst,
    .stage_done, .commit(ofm_commit), .commit_mask, .commit_tag, .commit_busy,
    .ofm_clr, .rd_p(ofm_rd_p), .rd_f(ofm_rd_f), .rd_data(ofm_rd_data));

  recovery_buffer #(.N(N), .C(C), .DEPTH(F), .TAG_W(TAG_W)) u_rbuf (
    .clk, .rst_n, .push_en(rb_push), .push_ch(rb_push_ch), .push_tag(rb_push_tag),
    .push_w(rb_push_w), .pop_en(rb_pop), .pop_ch(rb_pop_ch), .pop_tag(rb_pop_tag),
    .pop_w(rb_pop_w), .count(rb_count), .overflow(rb_overflow));

  pr_manager #(.N(N)) u_prm (
    .clk, .rst_n, .err_vld, .err_vec, .faulty, .pr_req, .pr_col, .pr_done,
    .reconf_count);

  sa_controller #(.N(N), .C(C), .G(G), .P(P)) u_ctrl (
    .clk, .rst_n, .start, .test_mode, .busy, .done,
    .wb_rd_en, .wb_rd_addr, .wb_rd_data,
    .ib_rd_en, .ib_rd_addr, .sk_vld, .sk_tst,
    .sa_w_we, .sa_w_row_idx, .sa_w_row, .col_en,
    .chk_clr, .chk_done, .chk_err,
    .ofm_clr, .ofm_start, .stage_done, .ofm_commit, .commit_mask, .commit_tag,
    .commit_busy,
    .rb_push, .rb_push_ch, .rb_push_tag, .rb_push_w,
    .rb_pop, .rb_pop_ch, .rb_pop_tag, .rb_pop_w, .rb_count,
    .faulty, .err_vld, .err_vec,
    .op_count, .rec_op_count, .logged_count, .err_events, .stall_cycles,
    .check_wait_cycles);
endmodule

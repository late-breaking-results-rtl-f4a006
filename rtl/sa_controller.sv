// sa_controller: operation sequencer of the self-healing systolic array.
//
// A convolution is run as C*G operations, channel-major: operation (ch, g)
// multiplies channel ch's input matrix (P rows) by the weight tile of filters
// g*N .. g*N+N-1. Every operation goes through the same steps:
//   RUN    weight rows are read from the weight buffer and written into the
//          array one per cycle; as soon as row 0 is in place the input rows
//          are streamed (one per cycle, through the skew stage). In testing
//          mode a row of ones (the checksum test vector) is appended. The
//          sequencer then holds back the next operation until all results
//          are in and, in testing mode, the checksum comparison is complete.
//   EVAL   columns whose checksum failed are reported to pr_manager. Results
//          of healthy columns are committed to the feature maps.
//   LOG    every column that had work but could not deliver it (excluded at
//          the start of the operation, or found faulty now) has its weights
//          and filter index pushed into the recovery buffer region of the
//          operation's channel.
// The set of columns used by an operation is the complement of pr_manager's
// faulty set sampled when the operation starts, so a column under repair is
// skipped and a repaired column rejoins at the next operation.
// When the C*G regular operations are done, recovery operations drain the
// recovery buffer, lowest channel first: each one pops as many entries of one
// channel region as there are healthy columns, places them in those columns,
// and streams that channel's input matrix again; results are committed under
// the stored filter indices, and a column that fails again is logged again.
// If no column is healthy the sequencer waits (stall_cycles counts this).
// done pulses once the recovery buffer is empty.
//
// Cycle budget of one operation: max(N, P+2+test) + 1 issue cycles, the array
// latency (about 2N), 1 evaluation cycle, N logging cycles and the rest of the
// P-cycle commit. Operations do not overlap; that, the FIFO order of recovery
// work and the lowest-channel-first recovery order are this design's choices.
module sa_controller
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
  // weight buffer
  output logic             wb_rd_en,
  output logic [WAW-1:0]   wb_rd_addr,
  input  data_t            wb_rd_data [N],
  // input buffer and skew stage
  output logic             ib_rd_en,
  output logic [IAW-1:0]   ib_rd_addr,
  output logic             sk_vld,
  output logic             sk_tst,
  // array weight load and column enables
  output logic             sa_w_we,
  output logic [IW-1:0]    sa_w_row_idx,
  output data_t            sa_w_row [N],
  output logic [N-1:0]     col_en,
  // checksum checker
  output logic             chk_clr,
  input  logic             chk_done,
  input  logic [N-1:0]     chk_err,
  // output accumulator
  output logic             ofm_clr,
  output logic             ofm_start,
  input  logic             stage_done,
  output logic             ofm_commit,
  output logic [N-1:0]     commit_mask,
  output logic [TAG_W-1:0] commit_tag [N],
  input  logic             commit_busy,
  // recovery buffer
  output logic             rb_push,
  output logic [CW-1:0]    rb_push_ch,
  output logic [TAG_W-1:0] rb_push_tag,
  output data_t            rb_push_w [N],
  output logic             rb_pop,
  output logic [CW-1:0]    rb_pop_ch,
  input  logic [TAG_W-1:0] rb_pop_tag,
  input  data_t            rb_pop_w [N],
  input  logic [RPW-1:0]   rb_count [C],
  // column health
  input  logic [N-1:0]     faulty,
  output logic             err_vld,
  output logic [N-1:0]     err_vec,
  // statistics
  output logic [15:0]      op_count,
  output logic [15:0]      rec_op_count,
  output logic [15:0]      logged_count,
  output logic [15:0]      err_events,
  output logic [15:0]      stall_cycles,
  output logic [15:0]      check_wait_cycles
);
  typedef enum logic [2:0] {
    S_IDLE, S_SETUP, S_RSEL, S_RPOP, S_RUN, S_EVAL, S_LOG, S_WCOMMIT
  } state_t;

  localparam int unsigned RUN_END = ((N > P + 2) ? N : P + 2) + 1;

  state_t           state;
  logic [15:0]      cnt;
  logic [$clog2(TILES+1)-1:0] op_idx;
  logic [CW-1:0]    ch;
  logic [$clog2(G+1)-1:0] grp;
  logic             is_rec;
  logic             tmode;
  logic [N-1:0]     work;
  logic [N-1:0]     log_mask;
  logic [IW-1:0]    j;
  data_t            tile [N][N];     // [row][column]
  logic [TAG_W-1:0] tag  [N];

  // lowest channel with pending recovery work
  logic          rec_any;
  logic [CW-1:0] rec_ch;
  always_comb begin
    rec_any = 1'b0;
    rec_ch  = '0;
    for (int c = C - 1; c >= 0; c--)
      if (rb_count[c] != '0) begin
        rec_any = 1'b1;
        rec_ch  = CW'(c);
      end
  end

  // ---------------------------------------------------------------- datapath
  logic run_w_rd, run_w_wr, run_i_rd;
  assign run_w_rd = (state == S_RUN) && !is_rec && (cnt < 16'(N));
  assign run_w_wr = (state == S_RUN) && (cnt >= 16'd1) && (cnt <= 16'(N));
  assign run_i_rd = (state == S_RUN) && (cnt >= 16'd1) && (cnt <= 16'(P));

  assign wb_rd_en     = run_w_rd;
  assign wb_rd_addr   = WAW'((32'(ch) * G + 32'(grp)) * N + 32'(cnt));
  assign ib_rd_en     = run_i_rd;
  assign ib_rd_addr   = IAW'(32'(ch) * P + 32'(cnt) - 32'd1);
  assign sk_vld       = (state == S_RUN) &&
                        (((cnt >= 16'd2) && (cnt <= 16'(P + 1))) || (tmode && (cnt == 16'(P + 2))));
  assign sk_tst       = (state == S_RUN) && tmode && (cnt == 16'(P + 2));
  assign sa_w_we      = run_w_wr;
  assign sa_w_row_idx = IW'(cnt - 16'd1);
  always_comb begin
    for (int c = 0; c < N; c++)
      sa_w_row[c] = is_rec ? tile[sa_w_row_idx][c] : wb_rd_data[c];
  end

  assign chk_clr   = (state == S_RUN) && (cnt == '0);
  assign ofm_start = chk_clr;
  assign ofm_clr   = (state == S_IDLE) && start;

  logic [N-1:0] bad;
  assign bad         = tmode ? (chk_err & col_en) : '0;
  assign err_vld     = (state == S_EVAL) && (bad != '0);
  assign err_vec     = bad;
  assign ofm_commit  = (state == S_EVAL);
  assign commit_mask = col_en & work & ~bad;
  assign commit_tag  = tag;

  assign rb_push     = (state == S_LOG) && log_mask[j];
  assign rb_push_ch  = ch;
  assign rb_push_tag = tag[j];
  always_comb begin
    for (int r = 0; r < N; r++) rb_push_w[r] = tile[r][j];
  end
  assign rb_pop    = (state == S_RPOP) && col_en[j] && (rb_count[ch] != '0);
  assign rb_pop_ch = ch;

  assign busy = (state != S_IDLE);

  // ------------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= S_IDLE;
      cnt               <= '0;
      op_idx            <= '0;
      ch                <= '0;
      grp               <= '0;
      is_rec            <= 1'b0;
      tmode             <= 1'b0;
      work              <= '0;
      log_mask          <= '0;
      col_en            <= '0;
      j                 <= '0;
      done              <= 1'b0;
      op_count          <= '0;
      rec_op_count      <= '0;
      logged_count      <= '0;
      err_events        <= '0;
      stall_cycles      <= '0;
      check_wait_cycles <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          tmode             <= test_mode;
          op_idx            <= '0;
          is_rec            <= 1'b0;
          op_count          <= '0;
          rec_op_count      <= '0;
          logged_count      <= '0;
          err_events        <= '0;
          stall_cycles      <= '0;
          check_wait_cycles <= '0;
          state             <= S_SETUP;
        end
        S_SETUP: begin
          ch     <= CW'(32'(op_idx) / G);
          grp    <= ($bits(grp))'(32'(op_idx) % G);
          col_en <= ~faulty;
          work   <= '1;
          cnt    <= '0;
          state  <= S_RUN;
        end
        S_RSEL: begin
          if (!rec_any) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (faulty == '1) begin
            stall_cycles <= stall_cycles + 1'b1;
          end else begin
            is_rec <= 1'b1;
            ch     <= rec_ch;
            col_en <= ~faulty;
            work   <= '0;
            j      <= '0;
            state  <= S_RPOP;
          end
        end
        S_RPOP: begin
          if (rb_pop) work[j] <= 1'b1;
          if (j == IW'(N - 1)) begin
            cnt   <= '0;
            state <= S_RUN;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_RUN: begin
          if (cnt != 16'(RUN_END)) begin
            cnt <= cnt + 1'b1;
          end else if (stage_done && (!tmode || chk_done)) begin
            state <= S_EVAL;
          end else if (stage_done) begin
            check_wait_cycles <= check_wait_cycles + 1'b1;
          end
        end
        S_EVAL: begin
          log_mask <= work & ~(col_en & ~bad);
          if (bad != '0) err_events <= err_events + 1'b1;
          op_count <= op_count + 1'b1;
          if (is_rec) rec_op_count <= rec_op_count + 1'b1;
          j     <= '0;
          state <= S_LOG;
        end
        S_LOG: begin
          if (rb_push) logged_count <= logged_count + 1'b1;
          if (j == IW'(N - 1)) state <= S_WCOMMIT;
          else j <= j + 1'b1;
        end
        S_WCOMMIT: if (!commit_busy) begin
          if (!is_rec && (32'(op_idx) != TILES - 1)) begin
            op_idx <= op_idx + 1'b1;
            state  <= S_SETUP;
          end else begin
            state <= S_RSEL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // tile register and filter tags
  always_ff @(posedge clk) begin
    if (state == S_SETUP) begin
      for (int c = 0; c < N; c++) tag[c] <= TAG_W'(32'(op_idx) % G * N + c);
    end
    if (state == S_RSEL) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) tile[r][c] <= '0;
    end
    if (rb_pop) begin
      tag[j] <= rb_pop_tag;
      for (int r = 0; r < N; r++) tile[r][j] <= rb_pop_w[r];
    end
    if (run_w_wr && !is_rec) tile[sa_w_row_idx] <= wb_rd_data;
  end

  // logging and recovery fetches never overlap; a commit is never issued twice
  a_push_pop_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(rb_push && rb_pop));
  a_commit_idle: assert property (@(posedge clk) disable iff (!rst_n)
    ofm_commit |-> !commit_busy);
endmodule

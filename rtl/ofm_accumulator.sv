// ofm_accumulator: output collection and output-feature-map accumulation.
//
// Each operation multiplies one channel's P x N input matrix by an N x N weight
// tile; column c of the array returns P results, one per output pixel, in
// order. This block catches them in a P x N staging buffer (start clears the
// per-column row counters; results tagged as the checksum test vector are not
// staged). stage_done rises when every column in expect_mask has returned P
// results. A commit (one-cycle pulse with commit_mask and commit_tag) then adds,
// one output pixel per cycle, stage[p][c] into ofm[p][commit_tag[c]] for every
// column c in commit_mask: the per-channel partial results of each filter are
// summed into its output feature map. commit_busy is high for the P cycles this
// takes. Columns left out of commit_mask (excluded or found faulty) leave the
// feature maps untouched; their work is redone by a recovery operation that
// commits under the original filter index. ofm_clr zeroes the feature maps; the
// host reads them through rd_p / rd_f (combinational). Holding results until
// the checksum has cleared the column is this design's choice.
module ofm_accumulator
  import selfheal_pkg::*;
#(
  parameter int unsigned N     = 22,
  parameter int unsigned P     = 9,
  parameter int unsigned F     = 44,
  localparam int unsigned TAG_W = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned PW    = (P > 1) ? $clog2(P) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N-1:0]     expect_mask,
  input  acc_t             y     [N],
  input  logic [N-1:0]     y_vld,
  input  logic [N-1:0]     y_tst,
  output logic             stage_done,
  input  logic             commit,
  input  logic [N-1:0]     commit_mask,
  input  logic [TAG_W-1:0] commit_tag [N],
  output logic             commit_busy,
  input  logic             ofm_clr,
  input  logic [PW-1:0]    rd_p,
  input  logic [TAG_W-1:0] rd_f,
  output acc_t             rd_data
);
  acc_t             stage [P][N];
  logic [PW:0]      cnt   [N];
  logic [N-1:0]     col_full;
  acc_t             ofm   [P][F];
  logic [PW-1:0]    cp;
  logic [N-1:0]     cmask;
  logic [TAG_W-1:0] ctag  [N];

  for (genvar c = 0; c < N; c++) begin : g_full
    assign col_full[c] = (cnt[c] == (PW+1)'(P));
  end
  assign stage_done = &(col_full | ~expect_mask);

  // staging
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N; c++) cnt[c] <= '0;
    end else if (start) begin
      for (int c = 0; c < N; c++) cnt[c] <= '0;
    end else begin
      for (int c = 0; c < N; c++)
        if (y_vld[c] && !y_tst[c] && !col_full[c]) cnt[c] <= cnt[c] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < N; c++)
      if (y_vld[c] && !y_tst[c] && !col_full[c]) stage[cnt[c][PW-1:0]][c] <= y[c];
  end

  // commit sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      commit_busy <= 1'b0;
      cp          <= '0;
      cmask       <= '0;
    end else if (commit && !commit_busy) begin
      commit_busy <= 1'b1;
      cp          <= '0;
      cmask       <= commit_mask;
    end else if (commit_busy) begin
      if (cp == PW'(P - 1)) commit_busy <= 1'b0;
      else cp <= cp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (commit && !commit_busy) ctag <= commit_tag;
  end

  // feature-map accumulation, one output pixel per cycle: every filter picks
  // the staged result of the column (if any) committed under its index
  acc_t     srow  [N];
  acc_t     add_v [F];
  logic [F-1:0] hit;
  always_comb begin
    for (int c = 0; c < N; c++) srow[c] = stage[cp][c];
  end
  always_comb begin
    for (int f = 0; f < F; f++) begin
      add_v[f] = '0;
      hit[f]   = 1'b0;
      for (int c = 0; c < N; c++)
        if (cmask[c] && (ctag[c] == TAG_W'(f))) begin
          add_v[f] = srow[c];
          hit[f]   = 1'b1;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++)
        for (int f = 0; f < F; f++) ofm[p][f] <= '0;
    end else if (ofm_clr) begin
      for (int p = 0; p < P; p++)
        for (int f = 0; f < F; f++) ofm[p][f] <= '0;
    end else if (commit_busy) begin
      for (int f = 0; f < F; f++)
        if (hit[f]) ofm[cp][f] <= ofm[cp][f] + add_v[f];
    end
  end

  assign rd_data = ofm[rd_p][rd_f];
endmodule

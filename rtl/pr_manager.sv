// pr_manager: column health tracking and partial-reconfiguration scheduling.
//
// err_vld / err_vec report the columns whose checksum failed. Those columns
// join the faulty set (faulty), which the operation sequencer reads at the
// start of every operation to decide which columns to exclude. Faulty columns
// are repaired one at a time, lowest index first: pr_req rises with the column
// index on pr_col and both stay stable until the configuration engine answers
// with a one-cycle pr_done; the column then leaves the faulty set and the next
// faulty column, if any, is requested in the following cycle. With several
// faulty columns the total repair time is thus the sum of the per-column
// reconfiguration times, and capacity returns column by column. reconf_count
// counts completed column repairs. The configuration engine itself (the
// device's configuration port with the per-column partial bitstreams) is not
// part of this RTL. Lowest-index-first order and the req/done handshake are
// this design's choices.
module pr_manager #(
  parameter int unsigned N  = 22,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          err_vld,
  input  logic [N-1:0]  err_vec,
  output logic [N-1:0]  faulty,
  output logic          pr_req,
  output logic [IW-1:0] pr_col,
  input  logic          pr_done,
  output logic [15:0]   reconf_count
);
  logic [IW-1:0] next_col;

  always_comb begin
    next_col = '0;
    for (int c = N - 1; c >= 0; c--)
      if (faulty[c]) next_col = IW'(c);
  end

  // next faulty set: repaired column leaves, newly failed columns join
  logic [N-1:0] faulty_nxt;
  always_comb begin
    faulty_nxt = faulty;
    if (pr_req && pr_done) faulty_nxt[pr_col] = 1'b0;
    if (err_vld) faulty_nxt = faulty_nxt | err_vec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      faulty       <= '0;
      pr_req       <= 1'b0;
      pr_col       <= '0;
      reconf_count <= '0;
    end else begin
      faulty <= faulty_nxt;
      if (pr_req && pr_done) begin
        pr_req       <= 1'b0;
        reconf_count <= reconf_count + 1'b1;
      end else if (!pr_req && (faulty != '0)) begin
        pr_req <= 1'b1;
        pr_col <= next_col;
      end
    end
  end

  // The request must hold its column until the engine answers.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pr_req && !pr_done |=> pr_req && $stable(pr_col));
  a_done_only_on_req: assert property (@(posedge clk) disable iff (!rst_n)
    pr_done |-> pr_req);
endmodule

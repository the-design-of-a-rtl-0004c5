// rank_ctrl: the scheduling policy of the thread manager.
//
// The ranks of the threads (rank field of the status table, 0 = highest priority)
// form one ordered sequence of all N_THREADS thread slots; after reset thread t has
// rank t. Two operations change the sequence, and both may happen in the same cycle
// (move-to-last is applied first, then move-to-first):
//   * move to last  (back_valid, back_tid): the thread's time stamp reached its quant,
//     or it blocked on near-neighbour communication. Every thread ranked behind it
//     moves up by one and it takes the last rank.
//   * move to first (front_valid, front_tid): the data a waiting thread was blocked
//     on has arrived. It takes rank 0 and every thread ranked ahead of it moves down
//     by one (so the thread that was executing gets rank+1).
// A thread blocked on router communication keeps its rank (no operation).
// The module also makes the scheduling decision: among the threads in the ready
// state it selects the one with the lowest rank (sel_valid, sel_tid).
// Keeping idle and waiting threads inside one sequence, and selecting the best ready
// thread rather than strictly the rank-0 thread, are this implementation's reading
// of the design's examples. Purely combinational; ranks are registered in regfile.
module rank_ctrl
  import tm_pkg::*;
#(
  parameter int unsigned N_THREADS = 8,
  localparam int unsigned TID_W = (N_THREADS > 1) ? $clog2(N_THREADS) : 1
) (
  input  logic [RANK_W-1:0]  rank_q  [N_THREADS],
  input  thread_state_e      state_q [N_THREADS],
  input  logic               back_valid,
  input  logic [TID_W-1:0]   back_tid,
  input  logic               front_valid,
  input  logic [TID_W-1:0]   front_tid,
  output logic [RANK_W-1:0]  rank_d  [N_THREADS],
  output logic               sel_valid,
  output logic [TID_W-1:0]   sel_tid
);

  logic [RANK_W-1:0] rank_b [N_THREADS];
  logic [RANK_W-1:0] r_back, r_front;
  logic [RANK_W-1:0] best_rank;

  always_comb begin
    // move to last
    r_back = rank_q[back_tid];
    for (int t = 0; t < N_THREADS; t++) begin
      rank_b[t] = rank_q[t];
      if (back_valid) begin
        if (back_tid == TID_W'(t))     rank_b[t] = RANK_W'(N_THREADS - 1);
        else if (rank_q[t] > r_back)   rank_b[t] = rank_q[t] - 1'b1;
      end
    end
    // move to first
    r_front = rank_b[front_tid];
    for (int t = 0; t < N_THREADS; t++) begin
      rank_d[t] = rank_b[t];
      if (front_valid) begin
        if (front_tid == TID_W'(t))    rank_d[t] = '0;
        else if (rank_b[t] < r_front)  rank_d[t] = rank_b[t] + 1'b1;
      end
    end
  end

  // Lowest-ranked ready thread.
  always_comb begin
    sel_valid = 1'b0;
    sel_tid   = '0;
    best_rank = '1;
    for (int t = 0; t < N_THREADS; t++) begin
      if (state_q[t] == TS_READY && (!sel_valid || rank_q[t] < best_rank)) begin
        sel_valid = 1'b1;
        sel_tid   = TID_W'(t);
        best_rank = rank_q[t];
      end
    end
  end

endmodule

// state_ctrl: the eight per-thread state machines of the thread manager.
//
// Each thread has the same four-state machine (idle, ready, run, wait); its state is
// stored in the state field of the thread status table (regfile), so this module is
// the next-state logic only: it reads the current states and the per-thread event
// vectors and returns the next states, which the status table registers on the next
// clock edge.
//
// Transitions (as in the design's state diagram):
//   idle  -> ready  thread_valid       (instructions and data of the thread loaded)
//   ready -> run    thread_hit         (thread selected for execution)
//   run   -> idle   thread_over        (thread finished)
//   run   -> wait   thread_block       (blocking instruction without its data)
//   run   -> ready  thread_timeout or thread_stop (quantum used up / forced stop)
//   wait  -> ready  thread_data_arrive (the blocking data has arrived)
// The diagram does not order the run-state events when several occur in one cycle;
// this implementation gives thread_over priority, then thread_block, then
// timeout/stop. In the full thread manager the controller raises at most one of them.
// Purely combinational: no clock, no latency of its own.
module state_ctrl
  import tm_pkg::*;
#(
  parameter int unsigned N_THREADS = 8
) (
  input  thread_state_e            state_q           [N_THREADS],
  input  logic [N_THREADS-1:0]     thread_valid,
  input  logic [N_THREADS-1:0]     thread_hit,
  input  logic [N_THREADS-1:0]     thread_over,
  input  logic [N_THREADS-1:0]     thread_timeout,
  input  logic [N_THREADS-1:0]     thread_stop,
  input  logic [N_THREADS-1:0]     thread_block,
  input  logic [N_THREADS-1:0]     thread_data_arrive,
  output thread_state_e            state_d           [N_THREADS]
);

  always_comb begin
    for (int t = 0; t < N_THREADS; t++) begin
      state_d[t] = state_q[t];
      unique case (state_q[t])
        TS_IDLE:  if (thread_valid[t])       state_d[t] = TS_READY;
        TS_READY: if (thread_hit[t])         state_d[t] = TS_RUN;
        TS_RUN: begin
          if (thread_over[t])                          state_d[t] = TS_IDLE;
          else if (thread_block[t])                    state_d[t] = TS_WAIT;
          else if (thread_timeout[t] || thread_stop[t]) state_d[t] = TS_READY;
        end
        TS_WAIT:  if (thread_data_arrive[t]) state_d[t] = TS_READY;
        default:                             state_d[t] = TS_IDLE;
      endcase
    end
  end

endmodule

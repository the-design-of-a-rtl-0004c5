// stamp_ctrl: running-time stamps and the timeout signal.
//
// Every thread has a stamp field in the status table that counts the clock cycles
// the thread has executed in its current scheduling slot. While a thread runs
// (run_valid, run_tid) its stamp goes up by one per cycle; when the thread is
// dispatched into a new slot (dispatch_valid, dispatch_tid) its stamp restarts at 0.
// timeout is raised in the running cycle that brings the stamp to the thread's quant
// from the configuration table (stamp_q + 1 >= quant), so a thread executes exactly
// quant cycles per slot and its stamp reads quant when it is stopped: the design stops
// a thread when the "stamp value is equal to quant value". A quant of 0 is taken here to mean "no limit" (own choice); the
// stamp saturates at its largest value instead of wrapping (own choice).
// Next-value logic only: the stamps are registered in the status table (regfile).
module stamp_ctrl
  import tm_pkg::*;
#(
  parameter int unsigned N_THREADS = 8,
  localparam int unsigned TID_W = (N_THREADS > 1) ? $clog2(N_THREADS) : 1
) (
  input  logic [STAMP_W-1:0] stamp_q [N_THREADS],
  input  logic [QUANT_W-1:0] quant   [N_THREADS],
  input  logic               run_valid,
  input  logic [TID_W-1:0]   run_tid,
  input  logic               dispatch_valid,
  input  logic [TID_W-1:0]   dispatch_tid,
  output logic [STAMP_W-1:0] stamp_d [N_THREADS],
  output logic               timeout
);

  always_comb begin
    for (int t = 0; t < N_THREADS; t++) begin
      stamp_d[t] = stamp_q[t];
      if (dispatch_valid && dispatch_tid == TID_W'(t))
        stamp_d[t] = '0;
      else if (run_valid && run_tid == TID_W'(t) && stamp_q[t] != '1)
        stamp_d[t] = stamp_q[t] + 1'b1;
    end
    timeout = run_valid && (quant[run_tid] != '0) &&
              ({1'b0, STAMP_W'(quant[run_tid])} <= {1'b0, stamp_q[run_tid]} + 1'b1);
  end

endmodule

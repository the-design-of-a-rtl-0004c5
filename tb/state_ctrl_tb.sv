// Self-checking testbench for state_ctrl: random per-thread events are applied to the
// eight state machines (closed through a state register here) and every next state
// is compared with a reference transition function written from the state diagram.
module state_ctrl_tb;
  import tm_pkg::*;
  localparam int N = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  thread_state_e q [N], d [N];
  logic [N-1:0] valid, hit, over, tmo, stop, blk, arr;
  int checks = 0, failures = 0;
  int seen [4][4];

  state_ctrl #(.N_THREADS(N)) dut (
    .state_q(q), .thread_valid(valid), .thread_hit(hit), .thread_over(over),
    .thread_timeout(tmo), .thread_stop(stop), .thread_block(blk),
    .thread_data_arrive(arr), .state_d(d));

  function automatic thread_state_e ref_next(thread_state_e s, logic v, logic h, logic o,
                                             logic tm, logic sp, logic b, logic a);
    case (s)
      TS_IDLE:  return v ? TS_READY : TS_IDLE;
      TS_READY: return h ? TS_RUN : TS_READY;
      TS_RUN:   return o ? TS_IDLE : b ? TS_WAIT : (tm || sp) ? TS_READY : TS_RUN;
      default:  return a ? TS_READY : TS_WAIT;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < N; t++) q[t] = TS_IDLE;
    for (int i = 0; i < 3000; i++) begin
      valid = N'($urandom); hit = N'($urandom); over = N'($urandom & $urandom & $urandom);
      tmo = N'($urandom & $urandom); stop = N'($urandom & $urandom & $urandom);
      blk = N'($urandom & $urandom); arr = N'($urandom);
      #1;
      for (int t = 0; t < N; t++) begin
        thread_state_e e;
        e = ref_next(q[t], valid[t], hit[t], over[t], tmo[t], stop[t], blk[t], arr[t]);
        checks++;
        if (d[t] !== e) begin
          failures++;
          if (failures < 10) $display("thread %0d: %s -> %s, expected %s", t, q[t].name(), d[t].name(), e.name());
        end
        seen[q[t]][d[t]]++;
      end
      @(posedge clk);
      for (int t = 0; t < N; t++) q[t] = d[t];
    end
    // every transition of the diagram must have been exercised
    checks++; if (seen[TS_IDLE][TS_READY] == 0) failures++;
    checks++; if (seen[TS_READY][TS_RUN]  == 0) failures++;
    checks++; if (seen[TS_RUN][TS_IDLE]   == 0) failures++;
    checks++; if (seen[TS_RUN][TS_WAIT]   == 0) failures++;
    checks++; if (seen[TS_RUN][TS_READY]  == 0) failures++;
    checks++; if (seen[TS_WAIT][TS_READY] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for rank_ctrl. It first replays the scheduling example of
// the design with threads 0, 1, 2 and 6 (thread 0 blocks and goes last, thread 1's
// quantum ends and it goes last, thread 0's data arrives and it goes first), then
// compares random move-to-last / move-to-first traffic and the ready-thread
// selection with a list model of the rank sequence.
module rank_ctrl_tb;
  import tm_pkg::*;
  localparam int N = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [RANK_W-1:0] rq [N], rd [N];
  thread_state_e st [N];
  logic bv, fv, sel_valid;
  logic [2:0] bt, ft, sel_tid;
  int checks = 0, failures = 0;
  int order [$];                 // model: thread ids, highest priority first

  rank_ctrl #(.N_THREADS(N)) dut (.rank_q(rq), .state_q(st), .back_valid(bv), .back_tid(bt),
    .front_valid(fv), .front_tid(ft), .rank_d(rd), .sel_valid, .sel_tid);

  always_ff @(posedge clk) rq <= rd;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int pos(int tid);
    foreach (order[i]) if (order[i] == tid) return i;
    return -1;
  endfunction

  task automatic compare_all();
    for (int t = 0; t < N; t++) check($sformatf("rank of %0d", t), int'(rq[t]), pos(t));
  endtask

  // relative order of a subset of threads as seen in the DUT
  function automatic string dut_order(int ids [4]);
    string s = "";
    for (int r = 0; r < N; r++)
      foreach (ids[i]) if (int'(rq[ids[i]]) == r) s = {s, $sformatf("%0d", ids[i])};
    return s;
  endfunction

  task automatic step(logic b, int btid, logic f, int ftid);
    bv = b; bt = 3'(btid); fv = f; ft = 3'(ftid);
    @(negedge clk);
    if (b) begin order.delete(pos(btid)); order.push_back(btid); end
    if (f) begin order.delete(pos(ftid)); order.push_front(ftid); end
    bv = 0; fv = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ids [4] = '{0, 1, 2, 6};
    for (int t = 0; t < N; t++) begin rq[t] = RANK_W'(t); order.push_back(t); st[t] = TS_IDLE; end
    bv = 0; fv = 0; bt = 0; ft = 0;
    @(negedge clk);
    // the example: threads 0,1,2,6 loaded in this order
    check("example start", (dut_order(ids) == "0126") ? 1 : 0, 1);
    step(1, 0, 0, 0);   // thread 0 blocked
    check("after block", (dut_order(ids) == "1260") ? 1 : 0, 1);
    step(1, 1, 0, 0);   // thread 1 execution time = quant
    check("after quant", (dut_order(ids) == "2601") ? 1 : 0, 1);
    step(0, 0, 1, 0);   // thread 0 data arrived
    check("after arrival", (dut_order(ids) == "0261") ? 1 : 0, 1);
    compare_all();
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      int b, f;
      logic dob, dof;
      for (int t = 0; t < N; t++) st[t] = thread_state_e'($urandom);
      #1;
      begin
        int best;
        best = -1;
        for (int k = 0; k < order.size(); k++)
          if (best < 0 && st[order[k]] == TS_READY) best = order[k];
        check("sel_valid", int'(sel_valid), best >= 0);
        if (best >= 0) check("sel_tid", int'(sel_tid), best);
      end
      b = $urandom % N; f = $urandom % N;
      dob = $urandom; dof = $urandom;
      if (b == f) dof = 0;
      step(dob, b, dof, f);
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for stamp_ctrl: the stamps are kept in a register here, a
// thread is dispatched and run, and the stamp values and the cycle on which timeout
// rises (in the quant-th running cycle) are checked against an independent
// model; random dispatch/run traffic follows.
module stamp_ctrl_tb;
  import tm_pkg::*;
  localparam int N = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [STAMP_W-1:0] sq [N], sd [N];
  logic [QUANT_W-1:0] quant [N];
  logic run_valid, disp_valid, timeout;
  logic [2:0] run_tid, disp_tid;
  int checks = 0, failures = 0;
  int model [N];

  stamp_ctrl #(.N_THREADS(N)) dut (.stamp_q(sq), .quant, .run_valid, .run_tid,
    .dispatch_valid(disp_valid), .dispatch_tid(disp_tid), .stamp_d(sd), .timeout);

  always_ff @(posedge clk) sq <= sd;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    for (int t = 0; t < N; t++) begin sq[t] = '0; model[t] = 0; quant[t] = QUANT_W'(5 + 3 * t); end
    quant[7] = '0;                       // no limit
    run_valid = 0; disp_valid = 0; run_tid = 0; disp_tid = 0;
    @(negedge clk);
    // directed: thread 3 (quant 14) runs until timeout
    disp_valid = 1; disp_tid = 3;
    @(negedge clk);
    disp_valid = 0; run_valid = 1; run_tid = 3; cycles = 0;
    while (!timeout && cycles < 100) begin @(negedge clk); cycles++; end
    check("cycles to timeout, quant 14", cycles, 13);
    check("stamp in timeout cycle", int'(sq[3]), 13);
    @(negedge clk);
    check("stamp after 14 running cycles", int'(sq[3]), 14);
    // thread 7 (quant 0) never times out
    run_valid = 0; disp_valid = 1; disp_tid = 7; @(negedge clk);
    disp_valid = 0; run_valid = 1; run_tid = 7;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      checks++; if (timeout) failures++;
    end
    check("stamp of unlimited thread", int'(sq[7]), 40);
    // random traffic against the model
    for (int t = 0; t < N; t++) model[t] = int'(sq[t]);
    for (int i = 0; i < 2000; i++) begin
      disp_valid = ($urandom % 4) == 0; disp_tid = 3'($urandom);
      run_valid  = ($urandom % 4) != 0; run_tid  = 3'($urandom % 3);
      #1;
      check("timeout", int'(timeout),
            int'(run_valid && quant[run_tid] != 0 && model[run_tid] + 1 >= int'(quant[run_tid])));
      for (int t = 0; t < N; t++) begin
        if (disp_valid && disp_tid == 3'(t)) model[t] = 0;
        else if (run_valid && run_tid == 3'(t) && model[t] < 1023) model[t]++;
      end
      @(negedge clk);
      for (int t = 0; t < N; t++) check("stamp", int'(sq[t]), model[t]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

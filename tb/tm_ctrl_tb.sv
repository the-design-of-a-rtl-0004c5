// Self-checking testbench for tm_ctrl. The tables, the ranking and the stamps are
// played by the testbench (thread states follow the event outputs through a small
// model of the thread state machines). Directed scenarios check dispatch, the drain
// handshake and its cycle count, the reaction to timeout, near-neighbour block and
// wake-up, router block with the request/respond/finish handshake, preemption, SIMD
// hand-over and thread completion.
module tm_ctrl_tb;
  import tm_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic simd_req, simd_resp, simd_fin, pe_simd;
  logic set_pc_valid, pe_block, pe_stop, pe_line_empty;
  logic [PC_W-1:0] pe_set_pc, pe_current_pc;
  logic [IBASE_W-1:0] ibase_o;
  logic [MBASE_W-1:0] mbase_o;
  logic [OPND_W-1:0] dmask;
  block_mode_e bmode;
  ru_block_code_e bcode;
  logic ru_req, ru_resp, ru_fin;
  ru_transport_e ru_code;
  logic [2:0] ru_tid;
  cfg_entry_t cfg [N];
  st_entry_t st [N];
  logic sel_valid, back_valid, front_valid, timeout, run_valid, dispatch_valid;
  logic [2:0] sel_tid, back_tid, front_tid, run_tid, dispatch_tid;
  logic [N-1:0] hit, over, tmo, stop, blk, arr;
  logic pc_we, blk_we;
  logic [2:0] pc_tid, blk_tid;
  logic [PC_W-1:0] pc_d;
  logic [OPND_W-1:0] blk_mask;
  int checks = 0, failures = 0;

  tm_ctrl #(.N_THREADS(N)) dut (.clk, .rst_n,
    .simd_mode_request(simd_req), .simd_mode_respond(simd_resp), .simd_mode_finish(simd_fin),
    .pe_simd_mode(pe_simd), .set_pc_valid, .pe_set_pc, .pe_i_mem_base(ibase_o),
    .pe_d_mem_base(mbase_o), .pe_current_pc, .pe_decode_mask(dmask), .pe_block,
    .pe_block_mode(bmode), .pe_rublock_code(bcode), .pe_stop, .pe_line_empty,
    .ru_request(ru_req), .ru_respond(ru_resp), .ru_transport_code(ru_code),
    .ru_thread_id(ru_tid), .ru_finish(ru_fin), .cfg, .st,
    .sel_valid, .sel_tid, .back_valid, .back_tid, .front_valid, .front_tid,
    .timeout, .run_valid, .run_tid, .dispatch_valid, .dispatch_tid,
    .thread_hit(hit), .thread_over(over), .thread_timeout(tmo), .thread_stop(stop),
    .thread_block(blk), .thread_data_arrive(arr),
    .pc_we, .pc_tid, .pc_d, .blk_we, .blk_tid, .blk_mask);

  // thread state model driven by the event outputs
  always_ff @(posedge clk)
    for (int t = 0; t < N; t++) begin
      case (st[t].state)
        TS_READY: if (hit[t]) st[t].state <= TS_RUN;
        TS_RUN:   if (over[t]) st[t].state <= TS_IDLE;
                  else if (blk[t]) st[t].state <= TS_WAIT;
                  else if (tmo[t] || stop[t]) st[t].state <= TS_READY;
        TS_WAIT:  if (arr[t]) st[t].state <= TS_READY;
        default: ;
      endcase
    end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // select the lowest-numbered ready thread
  always_comb begin
    sel_valid = 0; sel_tid = 0;
    for (int t = N - 1; t >= 0; t--) if (st[t].state == TS_READY) begin sel_valid = 1; sel_tid = 3'(t); end
  end

  task automatic dispatch_expect(int tid, int pc);
    check("no dispatch while idle without ready thread", int'(set_pc_valid), int'(sel_valid));
    check("set_pc_valid", int'(set_pc_valid), 1);
    check("thread_hit", int'(hit), 1 << tid);
    check("pe_set_pc", int'(pe_set_pc), pc);
    check("pe_i_mem_base", int'(ibase_o), int'(cfg[tid].ibase));
    check("pe_d_mem_base", int'(mbase_o), int'(cfg[tid].mbase));
    check("dispatch_tid", int'(dispatch_tid), tid);
    @(negedge clk);
    check("run_valid", int'(run_valid), 1);
    check("run_tid", int'(run_tid), tid);
    check("pe_stop low while running", int'(pe_stop), 0);
  endtask

  // hold pe_line_empty low for 'drain' cycles, then finish the switch
  task automatic drain(int drain_cycles, int resume_pc);
    pe_line_empty = 0;
    @(negedge clk);
    for (int i = 0; i < drain_cycles; i++) begin
      check("pe_stop during drain", int'(pe_stop), 1);
      check("no state event during drain", int'(|{over, tmo, stop, blk}), 0);
      @(negedge clk);
    end
    pe_line_empty = 1; pe_current_pc = PC_W'(resume_pc);
    #1;
    check("pc_we at end of drain", int'(pc_we), 1);
    check("saved pc", int'(pc_d), resume_pc);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    simd_req = 0; simd_fin = 0; pe_block = 0; pe_line_empty = 1; pe_current_pc = 0;
    dmask = 0; bmode = BLK_NEIGHBOUR; bcode = RB_MOVEF; ru_req = 0; ru_fin = 0;
    ru_code = RT_NONE; ru_tid = 0; timeout = 0;
    for (int t = 0; t < N; t++) begin
      cfg[t] = '{quant: 10'(20 + t), ibase: 14'(100 * t), isize: 10'(50 + t), mbase: 14'(1000 + t), msize: 10'd8};
      st[t]  = '{pc: 0, state: TS_IDLE, avail: 0, mask: 0, rank: 4'(t), stamp: 0};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle: pe_stop", int'(pe_stop), 1);
    check("idle: no dispatch", int'(set_pc_valid), 0);

    // ---- dispatch thread 2 and time it out
    st[2].state = TS_READY; st[2].pc = 17;
    #1; dispatch_expect(2, 17);
    pe_current_pc = 18;
    repeat (3) @(negedge clk);
    timeout = 1; #1;
    check("no pc save before drain", int'(pc_we), 0);
    @(negedge clk); timeout = 0;
    pe_line_empty = 0;
    drain(3, 30);
    check("thread_timeout", int'(tmo), 1 << 2);
    check("timeout: move to last", int'(back_valid), 1);
    check("timeout: back_tid", int'(back_tid), 2);
    st[2].pc = 30;
    @(negedge clk);

    // ---- dispatch again, near-neighbour block
    #1; dispatch_expect(2, 30);
    pe_block = 1; bmode = BLK_NEIGHBOUR; dmask = 6'b000011; #1;
    check("block capture", int'(blk_we), 1);
    check("block mask", int'(blk_mask), 3);
    @(negedge clk); pe_block = 0;
    drain(1, 33);
    check("thread_block", int'(blk), 1 << 2);
    check("neighbour block: move to last", int'(back_valid), 1);
    @(negedge clk);
    check("blocked thread waits", int'(st[2].state), int'(TS_WAIT));
    st[2].mask = 6'b000011; st[2].avail = 6'b000001;
    @(negedge clk);
    check("no wake with partial data", int'(arr), 0);
    st[2].avail = 6'b000111; #1;
    check("wake when data available", int'(arr), 1 << 2);
    check("wake: move to first", int'(front_valid), 1);
    check("wake: front_tid", int'(front_tid), 2);
    check("no dispatch in wake cycle", int'(set_pc_valid), 0);
    @(negedge clk);

    // ---- thread 2 runs; thread 4 becomes ready; thread 2 router-blocks on CALLR
    #1; dispatch_expect(2, 30);
    pe_block = 1; bmode = BLK_ROUTER; bcode = RB_CALLR; dmask = 6'b000001;
    @(negedge clk); pe_block = 0;
    drain(0, 35);
    check("router block: thread_block", int'(blk), 1 << 2);
    check("router block keeps rank", int'(back_valid), 0);
    @(negedge clk);
    st[2].avail = 6'b111111; st[2].mask = 6'b000001;
    st[4].state = TS_READY; st[4].pc = 3;
    #1; dispatch_expect(4, 3);
    check("router-blocked thread not woken by avail", int'(arr[2]), 0);
    ru_req = 1; ru_tid = 2; ru_code = RT_DATA; #1;
    check("wrong reply refused", int'(ru_resp), 0);
    ru_code = RT_RETR; #1;
    check("RETR accepted", int'(ru_resp), 1);
    @(negedge clk); ru_req = 0;
    check("no wake before finish", int'(arr), 0);
    ru_fin = 1;
    @(negedge clk); ru_fin = 0; #1;
    check("wake after RETR delivered", int'(arr), 1 << 2);
    // ---- preemption of thread 4
    @(negedge clk);
    drain(2, 9);
    check("preempted thread stopped", int'(stop), 1 << 4);
    check("preempt keeps rank here", int'(back_valid), 0);
    @(negedge clk);
    // both 2 and 4 ready: the testbench selects 2
    #1; dispatch_expect(2, 30);

    // ---- SIMD hand-over
    simd_req = 1;
    @(negedge clk);
    drain(1, 40);
    check("SIMD: running thread stopped", int'(stop), 1 << 2);
    @(negedge clk);
    check("simd_mode_respond", int'(simd_resp), 1);
    check("pe_simd_mode", int'(pe_simd), 1);
    check("no dispatch in SIMD", int'(set_pc_valid), 0);
    simd_req = 0;
    repeat (5) @(negedge clk);
    check("still SIMD", int'(pe_simd), 1);
    simd_fin = 1; @(negedge clk); simd_fin = 0;
    check("SIMD released", int'(pe_simd), 0);
    st[2].pc = 40;

    // ---- thread completion: pc reaches I-size
    #1; dispatch_expect(2, 40);
    pe_current_pc = PC_W'(cfg[2].isize);
    @(negedge clk);
    drain(0, 52);
    check("thread_over", int'(over), 1 << 2);
    check("finished: move to last", int'(back_valid), 1);
    @(negedge clk);
    check("finished thread idle", int'(st[2].state), int'(TS_IDLE));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

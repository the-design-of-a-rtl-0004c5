// Workload testbench: the eight-program performance run. Program k is loaded into
// thread k of one PE and all eight are released together; the thread manager runs
// them to completion without any SIMD period. The PE, the synthetic programs, the
// neighbour memories and the router are the same behavioural models as in
// thread_manager_tb. It checks that every thread executes each instruction exactly
// once, in order, and ends idle, and that the run with the thread manager takes
// fewer cycles than the same programs run back to back on a PE that stalls on
// every block. The improvement is printed as
// (cycles without manager - cycles with manager) / cycles without manager.
module perf_workload_tb;
  import tm_pkg::*;
  localparam int N      = 8;
  localparam int PIPE   = 2;     // drain cycles of the PE pipeline
  localparam int NB_LAT = 24;    // neighbour data latency after a block
  localparam int QUANT  = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // DUT ports
  logic simd_req, simd_resp, simd_fin, pe_simd;
  logic set_pc_valid, pe_block, pe_stop, pe_line_empty;
  logic [PC_W-1:0] pe_set_pc, pe_current_pc;
  logic [IBASE_W-1:0] ibase_o;
  logic [MBASE_W-1:0] mbase_o;
  logic [OPND_W-1:0] dmask, davail;
  block_mode_e bmode;
  ru_block_code_e bcode;
  logic ru_req, ru_resp, ru_fin;
  ru_transport_e ru_code;
  logic [2:0] ru_tid;
  logic sm_v;
  logic [2:0] sm_tid;
  logic [OPND_W-1:0] sm_bits;
  logic [N-1:0] tvalid;
  logic cwr, srd;
  logic [2:0] caddr, saddr;
  logic [CFG_W-1:0] cdata;
  logic [ST_W-1:0] sdata;

  thread_manager dut (.clk, .rst_n,
    .simd_mode_request(simd_req), .simd_mode_respond(simd_resp), .simd_mode_finish(simd_fin),
    .pe_simd_mode(pe_simd), .set_pc_valid, .pe_set_pc, .pe_i_mem_base(ibase_o),
    .pe_d_mem_base(mbase_o), .pe_current_pc, .pe_decode_mask(dmask), .pe_block,
    .pe_block_mode(bmode), .pe_rublock_code(bcode), .pe_stop, .pe_line_empty,
    .pe_de_dcahe_avail(davail),
    .ru_request(ru_req), .ru_respond(ru_resp), .ru_transport_code(ru_code),
    .ru_thread_id(ru_tid), .ru_finish(ru_fin),
    .sm_avail_valid(sm_v), .sm_avail_tid(sm_tid), .sm_avail_bits(sm_bits),
    .thread_valid(tvalid),
    .thread_configure_reg_wr(cwr), .thread_configure_reg_addr(caddr),
    .thread_configure_reg_data(cdata),
    .thread_state_reg_rd(srd), .thread_state_reg_addr(saddr), .thread_state_reg_data(sdata));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d %s: got %0d expected %0d", cycle, what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ programs
  typedef enum int {I_ALU, I_NB, I_RU} itype_e;
  function automatic int isize_of(int t);
    return 40 + 6 * t;
  endfunction
  function automatic itype_e itype(int t, int p);
    if (t == 0 && p == 0) return I_NB;                 // the scheduling example
    if (t inside {1, 2} && p < 30) return I_ALU;       // long enough to time out / be preempted
    if ((p * 7 + t * 3) % 11 == 5) return I_NB;
    if ((p * 5 + t) % 13 == 4) return I_RU;
    return I_ALU;
  endfunction
  function automatic ru_block_code_e rcode(int t, int p);
    return ru_block_code_e'((t + p) % 4);
  endfunction
  function automatic int ru_latency(int t, int p);
    return ((t + p) % 3 == 0) ? 1 : 6 + (t + p) % 5;   // 1: reply before the thread waits
  endfunction

  // ------------------------------------------------------------ PE model
  logic [PC_W-1:0] pc_r;
  int  cur_t;
  logic active;
  int  stop_cnt;
  logic ready_data [N][1024];
  int  next_pc [N];
  int  exec_cnt [N];
  int  run_cycles;             // pe_stop-free cycles of the current slot
  logic blocked_now;

  itype_e cur_type;
  always_comb begin
    cur_type    = itype(cur_t, int'(pc_r));
    blocked_now = active && int'(pc_r) < isize_of(cur_t) && cur_type != I_ALU &&
                  !ready_data[cur_t][pc_r];
    pe_block    = blocked_now && !pe_stop;
    bmode       = (cur_type == I_RU) ? BLK_ROUTER : BLK_NEIGHBOUR;
    bcode       = rcode(cur_t, int'(pc_r));
    dmask       = (cur_type == I_NB) ? 6'b000011 : 6'b000001;
    davail      = (cur_type == I_NB) ? 6'b000001 : 6'b000000;
    pe_current_pc = pc_r;
    pe_line_empty = stop_cnt >= PIPE;
  end

  // mechanism counters
  int n_dispatch = 0, n_timeout = 0, n_nb_block = 0, n_ru_block = 0, n_nb_wake = 0;
  int n_ru_done = 0, n_ru_refused = 0, n_preempt = 0, n_simd = 0, n_over = 0, n_drain = 0;
  int dispatch_seq [$];
  logic running_slot;
  logic prev_stop;
  logic lr_over, lr_block, lr_nb;
  int lr_cycles;

  always @(posedge clk) begin
    if (!rst_n) begin
      active <= 0; pc_r <= '0; cur_t <= 0; stop_cnt <= 0; running_slot <= 0; prev_stop <= 1;
    end else begin
      stop_cnt  <= pe_stop ? stop_cnt + 1 : 0;
      prev_stop <= pe_stop;
      if (pe_stop && prev_stop && !pe_line_empty) n_drain <= n_drain + 1;   // 2nd cycle of a drain
      if (set_pc_valid) begin
        int t;
        t = int'(ibase_o) / 64;
        check("d-mem base follows i-mem base", int'(mbase_o), 4096 + t * 128);
        check("resume PC", int'(pe_set_pc), next_pc[t]);
        pc_r <= pe_set_pc; cur_t <= t; active <= 1;
        running_slot <= 1; run_cycles = 0;
        n_dispatch <= n_dispatch + 1;
        dispatch_seq.push_back(t);
      end else if (active && !pe_stop && !pe_simd) begin
        run_cycles++;
        if (int'(pc_r) < isize_of(cur_t) && !blocked_now) begin
          check("program order", int'(pc_r), next_pc[cur_t]);
          next_pc[cur_t] = int'(pc_r) + 1;
          exec_cnt[cur_t]++;
          pc_r <= pc_r + 1'b1;
        end
      end
      // what the last running cycle of the slot showed
      if (active && !pe_stop && !pe_simd && !set_pc_valid) begin
        lr_over   <= int'(pc_r) >= isize_of(cur_t);
        lr_block  <= blocked_now;
        lr_nb     <= cur_type == I_NB;
        lr_cycles <= run_cycles;
      end
      // first stop cycle after a slot: classify why the slot ended
      if (running_slot && pe_stop && !prev_stop) begin
        running_slot <= 0;
        if (lr_over) n_over <= n_over + 1;
        else if (lr_block) begin
          if (lr_nb) n_nb_block <= n_nb_block + 1; else n_ru_block <= n_ru_block + 1;
        end else begin
          // a slot that ends for no other reason must end by timeout after exactly quant
          // cycles, by preemption or by the SIMD request
          checks++;
          if (lr_cycles > QUANT) begin
            failures++;
            $display("cycle %0d: slot of thread %0d ran %0d cycles, quant %0d", cycle, cur_t, lr_cycles, QUANT);
          end
          if (lr_cycles == QUANT) n_timeout <= n_timeout + 1;
          else if (!simd_req) n_preempt <= n_preempt + 1;
        end
      end
    end
  end

  // ------------------------------------------------------------ neighbour memories
  int nb_timer [N];
  int nb_pc [N];
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < N; t++) nb_timer[t] <= -1;
    end else begin
      if (pe_block && bmode == BLK_NEIGHBOUR) begin
        nb_timer[cur_t] <= NB_LAT; nb_pc[cur_t] <= int'(pc_r);
      end
      for (int t = 0; t < N; t++)
        if (nb_timer[t] > 0 && !(pe_block && bmode == BLK_NEIGHBOUR && cur_t == t))
          nb_timer[t] <= nb_timer[t] - 1;
      if (sm_v) begin
        ready_data[sm_tid][nb_pc[sm_tid]] = 1'b1;
        nb_timer[sm_tid] <= -1;
        n_nb_wake <= n_nb_wake + 1;
      end
    end
  end
  always_comb begin
    sm_v = 0; sm_tid = 0; sm_bits = 6'b000010;
    for (int t = N - 1; t >= 0; t--) if (nb_timer[t] == 0) begin sm_v = 1; sm_tid = 3'(t); end
  end

  // ------------------------------------------------------------ router
  int ru_timer [N];
  int ru_pc [N];
  ru_block_code_e ru_kind [N];
  logic ru_busy, ru_fin_next;
  int ru_cur;
  function automatic ru_transport_e reply_for(ru_block_code_e c);
    // CALLR waits for RETR, MVT for ACK, MOVEF and MVF for the data
    if (c == RB_CALLR) return RT_RETR;
    if (c == RB_MVT)   return RT_ACK;
    return RT_DATA;
  endfunction
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < N; t++) ru_timer[t] <= -1;
      ru_busy <= 0; ru_fin_next <= 0; ru_cur <= 0;
    end else begin
      if (pe_block && bmode == BLK_ROUTER) begin
        ru_timer[cur_t] <= ru_latency(cur_t, int'(pc_r)); ru_pc[cur_t] <= int'(pc_r);
        ru_kind[cur_t] <= bcode;
      end
      for (int t = 0; t < N; t++)
        if (ru_timer[t] > 0 && !(pe_block && bmode == BLK_ROUTER && cur_t == t))
          ru_timer[t] <= ru_timer[t] - 1;
      ru_fin_next <= 0;
      if (!ru_busy) begin
        for (int t = N - 1; t >= 0; t--) if (ru_timer[t] == 0) ru_cur <= t;
        for (int t = 0; t < N; t++) if (ru_timer[t] == 0) ru_busy <= 1;
      end else if (ru_req) begin
        if (ru_resp) begin
          ru_busy <= 0; ru_fin_next <= 1; ru_timer[ru_cur] <= -1;
        end else n_ru_refused <= n_ru_refused + 1;
      end
      if (ru_fin) begin
        ready_data[ru_cur][ru_pc[ru_cur]] = 1'b1;
        n_ru_done <= n_ru_done + 1;
      end
    end
  end
  always_comb begin
    ru_req  = ru_busy;
    ru_tid  = 3'(ru_cur);
    ru_code = reply_for(ru_kind[ru_cur]);
    ru_fin  = ru_fin_next;
  end

  // ------------------------------------------------------------ SIMD controller
  logic simd_seen;
  always @(posedge clk) if (pe_simd && !simd_seen) begin simd_seen <= 1; n_simd <= n_simd + 1; end

  // ------------------------------------------------------------ stimulus
  task automatic load_thread(int t);
    @(negedge clk);
    cwr = 1; caddr = 3'(t);
    cdata = {10'(QUANT), 14'(t * 64), 10'(isize_of(t)), 14'(4096 + t * 128), 10'd128};
    @(negedge clk);
    cwr = 0; tvalid = N'(1) << t;
    @(negedge clk);
    tvalid = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tm_cycles, seq_cycles, t0;
    simd_req = 0; simd_fin = 0; cwr = 0; caddr = 0; cdata = 0; tvalid = 0; srd = 0; saddr = 0;
    simd_seen = 0;
    for (int t = 0; t < N; t++) begin
      next_pc[t] = 0; exec_cnt[t] = 0;
      for (int p = 0; p < 1024; p++) ready_data[t][p] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // write all configurations first, then release threads 0,1,2,6 together
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      cwr = 1; caddr = 3'(t);
      cdata = {10'(QUANT), 14'(t * 64), 10'(isize_of(t)), 14'(4096 + t * 128), 10'd128};
    end
    @(negedge clk); cwr = 0;
    t0 = cycle;
    tvalid = 8'hff;
    @(negedge clk); tvalid = 0;
    // run to completion
    wait (n_over == N);
    repeat (4) @(negedge clk);
    tm_cycles = cycle - t0;
    for (int t = 0; t < N; t++) begin
      st_entry_t e;
      srd = 1; saddr = 3'(t);
      @(negedge clk); srd = 0;
      e = st_entry_t'(sdata);
      check($sformatf("thread %0d idle at end", t), int'(e.state), int'(TS_IDLE));
      check($sformatf("thread %0d executed all instructions", t), exec_cnt[t], isize_of(t));
    end
    check("completions", n_over, N);
    check("one neighbour report per neighbour block", n_nb_wake, n_nb_block);
    check("one router reply per router block", n_ru_done, n_ru_block);
    // reference: programs one after another, the PE stalling on every block
    seq_cycles = 0;
    for (int t = 0; t < N; t++)
      for (int p = 0; p < isize_of(t); p++) begin
        itype_e k;
        k = itype(t, p);
        seq_cycles += 1 + ((k == I_NB) ? NB_LAT + 1 : (k == I_RU) ? ru_latency(t, p) + 2 : 0);
      end
    $display("dispatch=%0d timeout=%0d nb_block=%0d nb_wake=%0d ru_block=%0d ru_done=%0d ru_refused=%0d preempt=%0d simd=%0d over=%0d drains=%0d",
             n_dispatch, n_timeout, n_nb_block, n_nb_wake, n_ru_block, n_ru_done, n_ru_refused,
             n_preempt, n_simd, n_over, n_drain);
    $display("cycles with thread manager %0d, run sequentially with stalls %0d, improvement %0d.%0d%%",
             tm_cycles, seq_cycles, (seq_cycles - tm_cycles) * 100 / seq_cycles,
             ((seq_cycles - tm_cycles) * 1000 / seq_cycles) % 10);
    check("thread manager saves cycles", int'(tm_cycles < seq_cycles), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

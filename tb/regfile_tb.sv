// Self-checking testbench for regfile: random writes to the configuration table and
// random field updates of the status table (state/rank/stamp next values, PC saves,
// block captures, shared-memory availability reports, thread initialisation) are
// mirrored in a model; all entries and the one-cycle read port are compared.
module regfile_tb;
  import tm_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cwr, srd, pc_we, blk_we, sm_v;
  logic [2:0] caddr, saddr, pc_tid, blk_tid, sm_tid;
  logic [CFG_W-1:0] cdata;
  logic [ST_W-1:0] sdata;
  logic [OPND_W-1:0] dc_avail, blk_mask, sm_bits;
  logic [PC_W-1:0] pc_d;
  logic [N-1:0] init;
  thread_state_e state_d [N];
  logic [RANK_W-1:0] rank_d [N];
  logic [STAMP_W-1:0] stamp_d [N];
  cfg_entry_t cfg [N];
  st_entry_t st [N];
  cfg_entry_t mcfg [N];
  st_entry_t mst [N];
  int checks = 0, failures = 0;

  regfile #(.N_THREADS(N)) dut (.clk, .rst_n,
    .thread_configure_reg_wr(cwr), .thread_configure_reg_addr(caddr), .thread_configure_reg_data(cdata),
    .thread_state_reg_rd(srd), .thread_state_reg_addr(saddr), .thread_state_reg_data(sdata),
    .pe_de_dcahe_avail(dc_avail), .state_d, .rank_d, .stamp_d,
    .pc_we, .pc_tid, .pc_d, .blk_we, .blk_tid, .blk_mask,
    .sm_avail_valid(sm_v), .sm_avail_tid(sm_tid), .sm_avail_bits(sm_bits),
    .thread_init(init), .cfg_o(cfg), .st_o(st));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
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
    logic [ST_W-1:0] exp_read;
    logic rd_pending;
    cwr = 0; srd = 0; pc_we = 0; blk_we = 0; sm_v = 0; init = 0;
    caddr = 0; saddr = 0; pc_tid = 0; blk_tid = 0; sm_tid = 0; cdata = 0;
    dc_avail = 0; blk_mask = 0; sm_bits = 0; pc_d = 0;
    for (int t = 0; t < N; t++) begin state_d[t] = TS_IDLE; rank_d[t] = RANK_W'(t); stamp_d[t] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reset values
    for (int t = 0; t < N; t++) begin
      mcfg[t] = '0;
      mst[t] = '{pc: 0, state: TS_IDLE, avail: 0, mask: 0, rank: RANK_W'(t), stamp: 0};
      check("reset cfg", 64'(cfg[t]), 64'(mcfg[t]));
      check("reset st", 64'(st[t]), 64'(mst[t]));
    end
    // field packing: quant in the top 10 bits, stamp in the bottom 10 bits
    cwr = 1; caddr = 5; cdata = {10'd77, 14'h1234, 10'd99, 14'h2abc, 10'd55};
    @(negedge clk); cwr = 0;
    check("quant field", 64'(cfg[5].quant), 77);
    check("ibase field", 64'(cfg[5].ibase), 64'h1234);
    check("msize field", 64'(cfg[5].msize), 55);
    mcfg[5] = cfg_entry_t'(cdata);
    rd_pending = 0; exp_read = '0;
    for (int i = 0; i < 4000; i++) begin
      cwr = $urandom; caddr = 3'($urandom); cdata = {$urandom, $urandom};
      srd = $urandom; saddr = 3'($urandom);
      pc_we = $urandom; pc_tid = 3'($urandom); pc_d = PC_W'($urandom);
      blk_we = ($urandom % 4) == 0; blk_tid = 3'($urandom); blk_mask = OPND_W'($urandom);
      dc_avail = OPND_W'($urandom);
      sm_v = $urandom; sm_tid = 3'($urandom); sm_bits = OPND_W'($urandom);
      init = N'($urandom & $urandom & $urandom);
      for (int t = 0; t < N; t++) begin
        state_d[t] = thread_state_e'($urandom); rank_d[t] = RANK_W'($urandom); stamp_d[t] = STAMP_W'($urandom);
      end
      // model update
      if (srd) exp_read = mst[saddr];
      if (cwr) mcfg[caddr] = cfg_entry_t'(cdata);
      for (int t = 0; t < N; t++) begin
        mst[t].state = state_d[t]; mst[t].rank = rank_d[t]; mst[t].stamp = stamp_d[t];
        if (init[t]) begin
          mst[t].pc = 0; mst[t].avail = 0; mst[t].mask = 0;
        end else begin
          if (pc_we && pc_tid == 3'(t)) mst[t].pc = pc_d;
          if (blk_we && blk_tid == 3'(t)) begin
            mst[t].mask = blk_mask;
            mst[t].avail = dc_avail | ((sm_v && sm_tid == 3'(t)) ? sm_bits : '0);
          end else if (sm_v && sm_tid == 3'(t)) mst[t].avail |= sm_bits;
        end
      end
      @(negedge clk);
      if (srd) check("read port", 64'(sdata), 64'(exp_read));
      for (int t = 0; t < N; t++) begin
        check("cfg entry", 64'(cfg[t]), 64'(mcfg[t]));
        check("state entry", 64'(st[t]), 64'(mst[t]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

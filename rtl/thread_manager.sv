// thread_manager: hardware thread manager of one processing element (PE).
//
// The thread manager lets one PE interleave up to N_THREADS (8) MIMD threads so
// that a thread stalled on missing data does not stall the PE. It keeps a
// configuration entry and a status entry per thread (regfile), lets the highest
// ranked ready thread run, and switches to another thread when the running one
// finishes, blocks on near-neighbour or router communication, uses up its time
// quantum, or is preempted by a thread whose blocking data has just arrived. It also
// hands the whole PE over to the SIMD controller on request.
//
// Structure (as in the design's block diagram): tm_ctrl (control, arbitration, PE /
// router / SIMD handshakes), regfile (the two tables), stamp_ctrl (time stamps and
// timeout), rank_ctrl (scheduling ranks and selection), state_ctrl (eight per-thread
// state machines). The port names are the design's; thread_valid is the per-thread
// "loaded" pulse from the loading controllers, and sm_avail_valid/_tid/_bits, which
// report operands arriving in the near-neighbour shared memories for a thread, are
// this implementation's addition (the design says only that the manager monitors the
// shared memories). See tm_ctrl for the handshake timing.
module thread_manager
  import tm_pkg::*;
#(
  parameter int unsigned N_THREADS = 8,
  localparam int unsigned TID_W = (N_THREADS > 1) ? $clog2(N_THREADS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // SIMD controller
  input  logic                 simd_mode_request,
  output logic                 simd_mode_respond,
  input  logic                 simd_mode_finish,
  output logic                 pe_simd_mode,
  // PE
  output logic                 set_pc_valid,
  output logic [PC_W-1:0]      pe_set_pc,
  output logic [IBASE_W-1:0]   pe_i_mem_base,
  output logic [MBASE_W-1:0]   pe_d_mem_base,
  input  logic [PC_W-1:0]      pe_current_pc,
  input  logic [OPND_W-1:0]    pe_decode_mask,
  input  logic                 pe_block,
  input  block_mode_e          pe_block_mode,
  input  ru_block_code_e       pe_rublock_code,
  output logic                 pe_stop,
  input  logic                 pe_line_empty,
  input  logic [OPND_W-1:0]    pe_de_dcahe_avail,
  // router
  input  logic                 ru_request,
  output logic                 ru_respond,
  input  ru_transport_e        ru_transport_code,
  input  logic [TID_W-1:0]     ru_thread_id,
  input  logic                 ru_finish,
  // near-neighbour shared memory availability reports
  input  logic                 sm_avail_valid,
  input  logic [TID_W-1:0]     sm_avail_tid,
  input  logic [OPND_W-1:0]    sm_avail_bits,
  // loading controllers / host access to the tables
  input  logic [N_THREADS-1:0] thread_valid,
  input  logic                 thread_configure_reg_wr,
  input  logic [TID_W-1:0]     thread_configure_reg_addr,
  input  logic [CFG_W-1:0]     thread_configure_reg_data,
  input  logic                 thread_state_reg_rd,
  input  logic [TID_W-1:0]     thread_state_reg_addr,
  output logic [ST_W-1:0]      thread_state_reg_data
);

  cfg_entry_t         cfg     [N_THREADS];
  st_entry_t          st      [N_THREADS];
  thread_state_e      state_q [N_THREADS];
  thread_state_e      state_d [N_THREADS];
  logic [RANK_W-1:0]  rank_q  [N_THREADS];
  logic [RANK_W-1:0]  rank_d  [N_THREADS];
  logic [STAMP_W-1:0] stamp_q [N_THREADS];
  logic [STAMP_W-1:0] stamp_d [N_THREADS];
  logic [QUANT_W-1:0] quant   [N_THREADS];
  logic [N_THREADS-1:0] thread_init;

  always_comb begin
    for (int t = 0; t < N_THREADS; t++) begin
      state_q[t]     = st[t].state;
      rank_q[t]      = st[t].rank;
      stamp_q[t]     = st[t].stamp;
      quant[t]       = cfg[t].quant;
      thread_init[t] = thread_valid[t] && (st[t].state == TS_IDLE);
    end
  end

  logic sel_valid, back_valid, front_valid, timeout, run_valid, dispatch_valid;
  logic [TID_W-1:0] sel_tid, back_tid, front_tid, run_tid, dispatch_tid;
  logic [N_THREADS-1:0] thread_hit, thread_over, thread_timeout, thread_stop;
  logic [N_THREADS-1:0] thread_block, thread_data_arrive;
  logic pc_we, blk_we;
  logic [TID_W-1:0] pc_tid, blk_tid;
  logic [PC_W-1:0] pc_d;
  logic [OPND_W-1:0] blk_mask;

  tm_ctrl #(.N_THREADS(N_THREADS)) u_tm_ctrl (
    .clk, .rst_n,
    .simd_mode_request, .simd_mode_respond, .simd_mode_finish, .pe_simd_mode,
    .set_pc_valid, .pe_set_pc, .pe_i_mem_base, .pe_d_mem_base, .pe_current_pc,
    .pe_decode_mask, .pe_block, .pe_block_mode, .pe_rublock_code, .pe_stop,
    .pe_line_empty,
    .ru_request, .ru_respond, .ru_transport_code, .ru_thread_id, .ru_finish,
    .cfg, .st,
    .sel_valid, .sel_tid, .back_valid, .back_tid, .front_valid, .front_tid,
    .timeout, .run_valid, .run_tid, .dispatch_valid, .dispatch_tid,
    .thread_hit, .thread_over, .thread_timeout, .thread_stop, .thread_block,
    .thread_data_arrive,
    .pc_we, .pc_tid, .pc_d, .blk_we, .blk_tid, .blk_mask
  );

  regfile #(.N_THREADS(N_THREADS)) u_regfile (
    .clk, .rst_n,
    .thread_configure_reg_wr, .thread_configure_reg_addr, .thread_configure_reg_data,
    .thread_state_reg_rd, .thread_state_reg_addr, .thread_state_reg_data,
    .pe_de_dcahe_avail,
    .state_d, .rank_d, .stamp_d,
    .pc_we, .pc_tid, .pc_d, .blk_we, .blk_tid, .blk_mask,
    .sm_avail_valid, .sm_avail_tid, .sm_avail_bits,
    .thread_init,
    .cfg_o(cfg), .st_o(st)
  );

  stamp_ctrl #(.N_THREADS(N_THREADS)) u_stamp_ctrl (
    .stamp_q, .quant, .run_valid, .run_tid, .dispatch_valid, .dispatch_tid,
    .stamp_d, .timeout
  );

  rank_ctrl #(.N_THREADS(N_THREADS)) u_rank_ctrl (
    .rank_q, .state_q, .back_valid, .back_tid, .front_valid, .front_tid,
    .rank_d, .sel_valid, .sel_tid
  );

  state_ctrl #(.N_THREADS(N_THREADS)) u_state_ctrl (
    .state_q, .thread_valid, .thread_hit, .thread_over, .thread_timeout,
    .thread_stop, .thread_block, .thread_data_arrive, .state_d
  );

endmodule

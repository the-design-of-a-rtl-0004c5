// tm_ctrl: control and arbitration of the thread manager.
//
// tm_ctrl owns the PE: it dispatches the thread chosen by rank_ctrl, watches the
// running thread, and performs the context switch when the thread has to leave the
// PE. Its own controller has four states:
//   C_IDLE  no thread on the PE. If the SIMD controller asks for the PE
//           (simd_mode_request) it goes to C_SIMD; otherwise, if a thread is ready
//           and no wake-up happens in this cycle, it dispatches the selected thread:
//           thread_hit, set_pc_valid with the saved PC (pe_set_pc) and the thread's
//           instruction/data memory bases, and a restart of the thread's stamp.
//   C_RUN   a thread runs; its stamp counts. Events, highest priority first:
//           thread finished (pe_current_pc reached I-size), blocked (pe_block,
//           with pe_block_mode telling near-neighbour from router blocking), quantum
//           used up (timeout from stamp_ctrl), another thread woke up (preemption),
//           SIMD request. Any event latches its reason and goes to C_DRAIN. On a block
//           the operand mask and availability are captured into the status table.
//   C_DRAIN pe_stop is held until the PE reports an empty pipeline (pe_line_empty).
//           Then the resume PC (pe_current_pc) is saved, the thread's state machine
//           gets thread_over / thread_block / thread_timeout / thread_stop, and
//           rank_ctrl moves the thread to the last rank on finish, timeout or
//           near-neighbour block.
//   C_SIMD  the PE belongs to the SIMD controller: simd_mode_respond and
//           pe_simd_mode are high until simd_mode_finish.
// Wake-up: a waiting thread becomes ready (thread_data_arrive, move to rank 0) when
// all operand flags of its mask are available (near-neighbour block), or when the
// router has delivered the reply it waits for (router block). One thread wakes per
// cycle, lowest thread number first.
// Router handshake: the router presents ru_request with ru_thread_id and
// ru_transport_code (DATA, RETR or ACK); ru_respond answers in the same cycle when
// that thread waits on the router for this kind of reply; the router then pulses
// ru_finish (same ru_thread_id) once the reply is delivered, and the thread wakes.
// Timing: dispatch takes one cycle in C_IDLE; the PE must show the new PC on
// pe_current_pc from the next cycle. A switch costs the drain time plus two cycles.
// pc_d, blk_mask and dispatch_tid are wired straight from pe_current_pc,
// pe_decode_mask and sel_tid: they are the data that go with the pc_we, blk_we and
// dispatch_valid strobes.
// The states, the handshakes and the event priority are this implementation's
// choices; the design gives the port names and the scheduling rules.
module tm_ctrl
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
  // router
  input  logic                 ru_request,
  output logic                 ru_respond,
  input  ru_transport_e        ru_transport_code,
  input  logic [TID_W-1:0]     ru_thread_id,
  input  logic                 ru_finish,
  // tables
  input  cfg_entry_t           cfg   [N_THREADS],
  input  st_entry_t            st    [N_THREADS],
  // rank_ctrl
  input  logic                 sel_valid,
  input  logic [TID_W-1:0]     sel_tid,
  output logic                 back_valid,
  output logic [TID_W-1:0]     back_tid,
  output logic                 front_valid,
  output logic [TID_W-1:0]     front_tid,
  // stamp_ctrl
  input  logic                 timeout,
  output logic                 run_valid,
  output logic [TID_W-1:0]     run_tid,
  output logic                 dispatch_valid,
  output logic [TID_W-1:0]     dispatch_tid,
  // state_ctrl events
  output logic [N_THREADS-1:0] thread_hit,
  output logic [N_THREADS-1:0] thread_over,
  output logic [N_THREADS-1:0] thread_timeout,
  output logic [N_THREADS-1:0] thread_stop,
  output logic [N_THREADS-1:0] thread_block,
  output logic [N_THREADS-1:0] thread_data_arrive,
  // regfile updates
  output logic                 pc_we,
  output logic [TID_W-1:0]     pc_tid,
  output logic [PC_W-1:0]      pc_d,
  output logic                 blk_we,
  output logic [TID_W-1:0]     blk_tid,
  output logic [OPND_W-1:0]    blk_mask
);

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DRAIN, C_SIMD} ctrl_state_e;
  typedef enum logic [2:0] {
    R_OVER, R_BLOCK_NB, R_BLOCK_RU, R_TIMEOUT, R_PREEMPT, R_SIMD
  } reason_e;

  ctrl_state_e cstate;
  reason_e     reason;
  logic [TID_W-1:0] cur_tid;

  // router wait bookkeeping per thread
  logic [N_THREADS-1:0] ru_wait, ru_grant, ru_done;
  ru_block_code_e       ru_code [N_THREADS];

  // ---------------------------------------------------------------- wake-up
  logic [N_THREADS-1:0] wake_cond;
  logic                 wake_valid;
  logic [TID_W-1:0]     wake_tid;

  always_comb begin
    wake_valid = 1'b0;
    wake_tid   = '0;
    for (int t = 0; t < N_THREADS; t++) begin
      wake_cond[t] = (st[t].state == TS_WAIT) &&
                     (ru_wait[t] ? ru_done[t] : ((st[t].avail & st[t].mask) == st[t].mask));
    end
    for (int t = N_THREADS - 1; t >= 0; t--) begin
      if (wake_cond[t]) begin
        wake_valid = 1'b1;
        wake_tid   = TID_W'(t);
      end
    end
  end

  // ---------------------------------------------------------------- router
  always_comb begin
    ru_respond = ru_request && st[ru_thread_id].state == TS_WAIT &&
                 ru_wait[ru_thread_id] && !ru_grant[ru_thread_id] &&
                 ru_transport_code == expected_reply(ru_code[ru_thread_id]);
  end

  // ---------------------------------------------------------------- events
  logic ev_over, ev_block;
  logic dispatch, drain_done;

  always_comb begin
    ev_over    = (cstate == C_RUN) && (pe_current_pc == PC_W'(cfg[cur_tid].isize));
    ev_block   = (cstate == C_RUN) && pe_block;
    dispatch   = (cstate == C_IDLE) && !simd_mode_request && sel_valid && !wake_valid;
    drain_done = (cstate == C_DRAIN) && pe_line_empty;
  end

  always_comb begin
    thread_hit         = '0;
    thread_over        = '0;
    thread_timeout     = '0;
    thread_stop        = '0;
    thread_block       = '0;
    thread_data_arrive = '0;
    back_valid  = 1'b0;
    back_tid    = cur_tid;
    front_valid = wake_valid;
    front_tid   = wake_tid;
    if (wake_valid) thread_data_arrive[wake_tid] = 1'b1;
    if (dispatch)   thread_hit[sel_tid] = 1'b1;
    if (drain_done) begin
      unique case (reason)
        R_OVER:     begin thread_over[cur_tid]    = 1'b1; back_valid = 1'b1; end
        R_BLOCK_NB: begin thread_block[cur_tid]   = 1'b1; back_valid = 1'b1; end
        R_BLOCK_RU:       thread_block[cur_tid]   = 1'b1;
        R_TIMEOUT:  begin thread_timeout[cur_tid] = 1'b1; back_valid = 1'b1; end
        default:          thread_stop[cur_tid]    = 1'b1;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  logic [TID_W-1:0] pe_tid;
  always_comb begin
    pe_tid            = (cstate == C_IDLE) ? sel_tid : cur_tid;
    set_pc_valid      = dispatch;
    pe_set_pc         = st[pe_tid].pc;
    pe_i_mem_base     = cfg[pe_tid].ibase;
    pe_d_mem_base     = cfg[pe_tid].mbase;
    pe_stop           = (cstate == C_DRAIN) || (cstate == C_IDLE && !dispatch);
    simd_mode_respond = (cstate == C_SIMD);
    pe_simd_mode      = (cstate == C_SIMD);
    run_valid         = (cstate == C_RUN);
    run_tid           = cur_tid;
    dispatch_valid    = dispatch;
    dispatch_tid      = sel_tid;
    pc_we             = drain_done;
    pc_tid            = cur_tid;
    pc_d              = pe_current_pc;
    blk_we            = ev_block && !ev_over;
    blk_tid           = cur_tid;
    blk_mask          = pe_decode_mask;
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate   <= C_IDLE;
      reason   <= R_OVER;
      cur_tid  <= '0;
      ru_wait  <= '0;
      ru_grant <= '0;
      ru_done  <= '0;
      for (int t = 0; t < N_THREADS; t++) ru_code[t] <= RB_MOVEF;
    end else begin
      unique case (cstate)
        C_IDLE: begin
          if (simd_mode_request)  cstate <= C_SIMD;
          else if (dispatch) begin
            cstate  <= C_RUN;
            cur_tid <= sel_tid;
          end
        end
        C_RUN: begin
          if (ev_over) begin
            reason <= R_OVER;      cstate <= C_DRAIN;
          end else if (ev_block) begin
            reason <= (pe_block_mode == BLK_ROUTER) ? R_BLOCK_RU : R_BLOCK_NB;
            cstate <= C_DRAIN;
            ru_wait[cur_tid]  <= (pe_block_mode == BLK_ROUTER);
            ru_grant[cur_tid] <= 1'b0;
            ru_done[cur_tid]  <= 1'b0;
            ru_code[cur_tid]  <= pe_rublock_code;
          end else if (timeout) begin
            reason <= R_TIMEOUT;   cstate <= C_DRAIN;
          end else if (wake_valid) begin
            reason <= R_PREEMPT;   cstate <= C_DRAIN;
          end else if (simd_mode_request) begin
            reason <= R_SIMD;      cstate <= C_DRAIN;
          end
        end
        C_DRAIN: begin
          if (pe_line_empty) cstate <= (reason == R_SIMD) ? C_SIMD : C_IDLE;
        end
        C_SIMD: begin
          if (simd_mode_finish) cstate <= C_IDLE;
        end
        default: cstate <= C_IDLE;
      endcase

      if (ru_respond) ru_grant[ru_thread_id] <= 1'b1;
      if (ru_finish && ru_grant[ru_thread_id] && st[ru_thread_id].state == TS_WAIT)
        ru_done[ru_thread_id] <= 1'b1;
      if (wake_valid) begin
        ru_wait[wake_tid]  <= 1'b0;
        ru_grant[wake_tid] <= 1'b0;
        ru_done[wake_tid]  <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- checks
  logic [N_THREADS-1:0] running;
  always_comb
    for (int t = 0; t < N_THREADS; t++) running[t] = (st[t].state == TS_RUN);

  // At most one thread holds the PE.
  a_one_running: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(running));
  // The router is only answered when it asks.
  a_respond_req: assert property (@(posedge clk) disable iff (!rst_n) ru_respond |-> ru_request);
  // The PE is not released to SIMD mode while a thread runs.
  a_simd_excl:   assert property (@(posedge clk) disable iff (!rst_n) pe_simd_mode |-> running == '0);

endmodule

// regfile: the thread configuration table (thread_configure_reg) and the thread
// status table (thread_state_reg) of the thread manager.
//
// thread_configure_reg holds one 58-bit entry per thread (quant, I-base, I-size,
// M-base, M-size). It is written by the loading controllers through a write port
// (thread_configure_reg_wr/_addr/_data, one entry per cycle) and all entries are
// visible to the controllers on cfg_o.
// thread_state_reg holds one 38-bit entry per thread (PC, state, avail, mask, rank,
// stamp). Its fields are written from inside the thread manager:
//   state, rank, stamp : next values from state_ctrl, rank_ctrl and stamp_ctrl,
//                        registered every cycle;
//   PC                 : saved from the PE on a context switch (pc_we);
//   avail, mask        : captured when the running thread blocks (blk_we): mask takes
//                        the operands of the blocked instruction, avail takes
//                        pe_de_dcahe_avail; afterwards near-neighbour shared memory
//                        reports (sm_avail_valid/_tid/_bits) set avail bits;
//   thread_init[t]     : a newly loaded thread starts with PC 0 and clear flags.
// A registered read port (thread_state_reg_rd/_addr) returns one entry on
// thread_state_reg_data in the cycle after the request.
// Reset: all tables cleared, state idle, thread t at rank t. The packing of the
// entries (first field in the top bits), the read latency and the shared-memory
// report port are this implementation's choices.
module regfile
  import tm_pkg::*;
#(
  parameter int unsigned N_THREADS = 8,
  localparam int unsigned TID_W = (N_THREADS > 1) ? $clog2(N_THREADS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration table write port
  input  logic               thread_configure_reg_wr,
  input  logic [TID_W-1:0]   thread_configure_reg_addr,
  input  logic [CFG_W-1:0]   thread_configure_reg_data,
  // status table read port
  input  logic               thread_state_reg_rd,
  input  logic [TID_W-1:0]   thread_state_reg_addr,
  output logic [ST_W-1:0]    thread_state_reg_data,
  // operand availability of the instruction in decode
  input  logic [OPND_W-1:0]  pe_de_dcahe_avail,
  // field updates
  input  thread_state_e      state_d [N_THREADS],
  input  logic [RANK_W-1:0]  rank_d  [N_THREADS],
  input  logic [STAMP_W-1:0] stamp_d [N_THREADS],
  input  logic               pc_we,
  input  logic [TID_W-1:0]   pc_tid,
  input  logic [PC_W-1:0]    pc_d,
  input  logic               blk_we,
  input  logic [TID_W-1:0]   blk_tid,
  input  logic [OPND_W-1:0]  blk_mask,
  input  logic               sm_avail_valid,
  input  logic [TID_W-1:0]   sm_avail_tid,
  input  logic [OPND_W-1:0]  sm_avail_bits,
  input  logic [N_THREADS-1:0] thread_init,
  // table contents
  output cfg_entry_t         cfg_o [N_THREADS],
  output st_entry_t          st_o  [N_THREADS]
);

  cfg_entry_t cfg_q [N_THREADS];
  st_entry_t  st_q  [N_THREADS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < N_THREADS; t++) begin
        cfg_q[t]       <= '0;
        st_q[t].pc     <= '0;
        st_q[t].state  <= TS_IDLE;
        st_q[t].avail  <= '0;
        st_q[t].mask   <= '0;
        st_q[t].rank   <= RANK_W'(t);
        st_q[t].stamp  <= '0;
      end
      thread_state_reg_data <= '0;
    end else begin
      if (thread_configure_reg_wr)
        cfg_q[thread_configure_reg_addr] <= cfg_entry_t'(thread_configure_reg_data);
      for (int t = 0; t < N_THREADS; t++) begin
        st_q[t].state <= state_d[t];
        st_q[t].rank  <= rank_d[t];
        st_q[t].stamp <= stamp_d[t];
        if (thread_init[t]) begin
          st_q[t].pc    <= '0;
          st_q[t].avail <= '0;
          st_q[t].mask  <= '0;
        end else begin
          if (pc_we && pc_tid == TID_W'(t))
            st_q[t].pc <= pc_d;
          if (blk_we && blk_tid == TID_W'(t)) begin
            st_q[t].mask  <= blk_mask;
            st_q[t].avail <= pe_de_dcahe_avail |
                             ((sm_avail_valid && sm_avail_tid == TID_W'(t)) ? sm_avail_bits : '0);
          end else if (sm_avail_valid && sm_avail_tid == TID_W'(t)) begin
            st_q[t].avail <= st_q[t].avail | sm_avail_bits;
          end
        end
      end
      if (thread_state_reg_rd)
        thread_state_reg_data <= st_q[thread_state_reg_addr];
    end
  end

  assign cfg_o = cfg_q;
  assign st_o  = st_q;

endmodule

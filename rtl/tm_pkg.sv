// Shared types and constants of the hardware thread manager.
//
// The two per-thread tables follow the field lists and widths of the design:
//   configuration entry (58 bits): quant 10 | I-base 14 | I-size 10 | M-base 14 | M-size 10
//   status entry        (38 bits): PC 10 | state 2 | avail 6 | mask 6 | rank 4 | stamp 10
// The field order inside a packed word (first listed field in the most significant
// bits) and the encodings of the thread state, the block kinds and the router
// reply codes are this implementation's own choices.
package tm_pkg;

  localparam int unsigned QUANT_W = 10;
  localparam int unsigned IBASE_W = 14;
  localparam int unsigned ISIZE_W = 10;
  localparam int unsigned MBASE_W = 14;
  localparam int unsigned MSIZE_W = 10;

  localparam int unsigned PC_W    = 10;
  localparam int unsigned STATE_W = 2;
  localparam int unsigned OPND_W  = 6;   // avail and mask: operand flags
  localparam int unsigned RANK_W  = 4;
  localparam int unsigned STAMP_W = 10;

  localparam int unsigned CFG_W = QUANT_W + IBASE_W + ISIZE_W + MBASE_W + MSIZE_W; // 58
  localparam int unsigned ST_W  = PC_W + STATE_W + OPND_W + OPND_W + RANK_W + STAMP_W; // 38

  // Per-thread state, kept in the state field of the status table.
  typedef enum logic [STATE_W-1:0] {
    TS_IDLE  = 2'd0,
    TS_READY = 2'd1,
    TS_RUN   = 2'd2,
    TS_WAIT  = 2'd3
  } thread_state_e;

  typedef struct packed {
    logic [QUANT_W-1:0] quant;
    logic [IBASE_W-1:0] ibase;
    logic [ISIZE_W-1:0] isize;
    logic [MBASE_W-1:0] mbase;
    logic [MSIZE_W-1:0] msize;
  } cfg_entry_t;

  typedef struct packed {
    logic [PC_W-1:0]    pc;
    thread_state_e      state;
    logic [OPND_W-1:0]  avail;
    logic [OPND_W-1:0]  mask;
    logic [RANK_W-1:0]  rank;
    logic [STAMP_W-1:0] stamp;
  } st_entry_t;

  // Kind of block reported with pe_block (pe_block_mode).
  typedef enum logic {
    BLK_NEIGHBOUR = 1'b0,   // operand in a near-neighbour shared memory not available
    BLK_ROUTER    = 1'b1    // waiting for a router transfer
  } block_mode_e;

  // Router instruction that blocked the thread (pe_rublock_code).
  typedef enum logic [1:0] {
    RB_MOVEF = 2'd0,  // remote read, waits for the data
    RB_CALLR = 2'd1,  // remote call, waits for RETR
    RB_MVT   = 2'd2,  // cluster memory write, waits for ACK
    RB_MVF   = 2'd3   // cluster memory read, waits for the data
  } ru_block_code_e;

  // Kind of message the router delivers (ru_transport_code).
  typedef enum logic [1:0] {
    RT_DATA = 2'd0,
    RT_RETR = 2'd1,
    RT_ACK  = 2'd2,
    RT_NONE = 2'd3
  } ru_transport_e;

  // Reply that ends the wait of a router-blocked thread.
  function automatic ru_transport_e expected_reply(ru_block_code_e c);
    case (c)
      RB_CALLR: return RT_RETR;
      RB_MVT:   return RT_ACK;
      default:  return RT_DATA;
    endcase
  endfunction

endpackage

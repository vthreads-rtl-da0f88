// vt_pkg: types and constants shared by the VThreads RTL.
//
// Holds the HyperContext (HC) thread-state encoding, the syllable (RISCop)
// format used by the decoder, the decoded-operation record that travels from
// the Mid-Pipe to the Cluster, and the request/response records of the thread
// primitives (create, join, exit) that a Context sends to the DBG_IF FSM.
//
// The HC states follow the state diagram of the architecture (debug, ready,
// running, join and the two transient terminated states). The syllable
// format is this design's own: the architecture uses a 32-bit
// partially-predicated VLIW ISA whose binary encoding is not published, so a
// small VEX-like 32-bit format with a stop bit marking the last syllable of
// a long instruction word is used instead.
package vt_pkg;

  // ---------------------------------------------------------------- HC state
  typedef enum logic [2:0] {
    HC_DEBUG     = 3'd0,
    HC_READY     = 3'd1,
    HC_RUNNING   = 3'd2,
    HC_JOIN      = 3'd3,
    HC_TERM_SYNC = 3'd4,
    HC_TERM_ASYNC= 3'd5
  } hc_state_e;

  // Events seen by one HC state machine (one per cycle, resolved by DBG_IF).
  typedef enum logic [2:0] {
    EV_NONE        = 3'd0,
    EV_HOST_WRSTATE= 3'd1,  // host writes a state (DEBUG or READY)
    EV_CREATE      = 3'd2,  // host command or vthread_create allocates this HC
    EV_HOST_EXIT   = 3'd3,  // host asynchronous terminate
    EV_EXIT        = 3'd4,  // the thread executes vthread_exit
    EV_JOIN_WAIT   = 3'd5,  // vthread_join on a thread that still runs
    EV_JOIN_DONE   = 3'd6   // the joined thread has terminated
  } hc_event_e;

  // ---------------------------------------------------------- syllable format
  //  [31]    stop bit: last syllable of the long instruction word
  //  [30:25] opcode
  //  [24:19] rd  (destination, or store-data source)
  //  [18:13] rs1
  //  [12:7]  rs2          (register forms)
  //  [12:0]  imm13 signed (immediate forms)
  //  [18:0]  imm19 signed (GOTO, LUI)
  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,  OP_SUB  = 6'd2,  OP_AND  = 6'd3,  OP_OR   = 6'd4,
    OP_XOR   = 6'd5,  OP_SHL  = 6'd6,  OP_SHR  = 6'd7,  OP_SRA  = 6'd8,
    OP_SLT   = 6'd9,  OP_SLTU = 6'd10,
    OP_ADDI  = 6'd11, OP_LUI  = 6'd12,
    OP_MUL   = 6'd16, OP_MULHU= 6'd17,
    OP_LDW   = 6'd20, OP_STW  = 6'd21,
    OP_BNEZ  = 6'd24, OP_BEQZ = 6'd25, OP_GOTO = 6'd26,
    OP_CREATE= 6'd32, OP_JOIN = 6'd33, OP_EXIT = 6'd34, OP_CPUID = 6'd35,
    OP_RDPERIPH = 6'd40, OP_WRPERIPH = 6'd41,
    OP_FADD  = 6'd48, OP_FSUB = 6'd49, OP_FMUL = 6'd50, OP_ITOF = 6'd51,
    OP_FDIV  = 6'd52
  } opcode_e;

  typedef enum logic [2:0] {
    U_NONE = 3'd0, U_ALU = 3'd1, U_MUL = 3'd2, U_LSU = 3'd3,
    U_BRU  = 3'd4, U_THR = 3'd5, U_PER = 3'd6, U_FP = 3'd7
  } unit_e;

  localparam int GPR_W    = 6;   // 64 general purpose registers per HC

  // Decoded syllable (output of one DECLOGIC instance).
  typedef struct packed {
    logic             valid;
    unit_e            unit;
    opcode_e          op;
    logic             rs1_used;
    logic             rs2_used;   // rs2 field, or rd field read as store data
    logic [GPR_W-1:0] rs1;
    logic [GPR_W-1:0] rs2;
    logic             rd_used;
    logic [GPR_W-1:0] rd;
    logic             use_imm;
    logic [31:0]      imm;
  } dec_t;

  // Thread primitive request from a Context to the DBG_IF FSM.
  typedef enum logic [1:0] {
    TOP_CREATE = 2'd0, TOP_JOIN = 2'd1, TOP_EXIT = 2'd2
  } thr_op_e;

  // Thread identifier returned by vthread_create: {context, hc} packed into
  // the low bits of a 32-bit word (see thread_table for the layout).
endpackage

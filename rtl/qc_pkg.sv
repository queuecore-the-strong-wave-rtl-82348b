// qc_pkg: shared types and constants of the QueueCore (QC-2) produced-order
// queue processor.
//
// Every instruction is 16 bits: an 8-bit opcode in [15:8] and an 8-bit field in
// [7:0] that holds, depending on the class, a signed queue OFFSET, an immediate
// value, a load/store displacement or a branch target. Three opcode values are
// the document's own (ldil = 8'b0100_0000, call0 = 8'b0001_1011,
// stw0 = 8'b0111_1000); every other opcode number is this design's choice, picked
// so that the classes sit in separate ranges. The instruction names and classes
// (ALU, MLT, SET, Branch, LOAD/STORE) follow the document's instruction set.
//
// The queue register has 256 entries, so the queue pointers QH, QT and LQH are
// 8 bits wide and wrap around. The data path is 32 bits wide.
package qc_pkg;

  localparam int unsigned IW     = 16;   // instruction width
  localparam int unsigned DW     = 32;   // data path width
  localparam int unsigned GROUP  = 4;    // instructions fetched/decoded per cycle (8 bytes)
  localparam int unsigned PTR_W  = 8;    // queue pointer width (256-entry QREG)
  localparam int unsigned PC_W   = 16;   // byte program counter

  typedef logic [PTR_W-1:0] qptr_t;
  typedef logic [DW-1:0]    word_t;
  typedef logic [PC_W-1:0]  pc_t;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [7:0] {
    OP_NOP   = 8'h00,
    // ALU
    OP_ADD   = 8'h01, OP_ADDU  = 8'h02, OP_SUB   = 8'h03, OP_SUBO  = 8'h04,
    OP_SUBU  = 8'h05, OP_SUBUO = 8'h06, OP_AND   = 8'h07, OP_OR    = 8'h08,
    OP_SRU   = 8'h09, OP_SLU   = 8'h0A, OP_SR    = 8'h0B, OP_ROL   = 8'h0C,
    OP_ROR   = 8'h0D, OP_XOR   = 8'h0E, OP_NEG   = 8'h0F, OP_NOT   = 8'h10,
    OP_COM   = 8'h11, OP_COMU  = 8'h12, OP_COMC  = 8'h13, OP_COMCU = 8'h14,
    OP_INC   = 8'h15, OP_LDA   = 8'h16,
    // Branch
    OP_B     = 8'h18, OP_BEQ   = 8'h19, OP_JUMP  = 8'h1A, OP_CALL  = 8'h1B,
    OP_RFC   = 8'h1C, OP_BLT   = 8'h1D, OP_BLE   = 8'h1E, OP_BGT   = 8'h1F,
    OP_BGE   = 8'h20, OP_RETI  = 8'h21,
    // MLT
    OP_MULT  = 8'h28, OP_MULU  = 8'h29, OP_DIV   = 8'h2A, OP_DIVO  = 8'h2B,
    OP_DIVU  = 8'h2C, OP_DIVUO = 8'h2D, OP_MOD   = 8'h2E, OP_MODO  = 8'h2F,
    OP_MODU  = 8'h30, OP_MODUO = 8'h31,
    // control
    OP_HALT  = 8'h3F,
    // SET
    OP_LDIL  = 8'h40, OP_SETHH = 8'h41, OP_SETHL = 8'h42, OP_SETLH = 8'h43,
    OP_SETLL = 8'h44, OP_SETR  = 8'h45, OP_MV    = 8'h46, OP_DUP   = 8'h47,
    // offset extension prefix
    OP_CONVOP = 8'h50,
    // LOAD/STORE
    OP_LDB   = 8'h70, OP_LDBU  = 8'h71, OP_LDS   = 8'h72, OP_LDSU  = 8'h73,
    OP_LDW   = 8'h74, OP_LDWU  = 8'h75, OP_STB   = 8'h76, OP_STS   = 8'h77,
    OP_STW   = 8'h78
  } opcode_e;

  // functional unit an instruction is sent to
  typedef enum logic [2:0] {
    U_NONE = 3'd0,  // nop, convop, halt: no execution unit
    U_ALU  = 3'd1,
    U_MLT  = 3'd2,
    U_SET  = 3'd3,
    U_LSU  = 3'd4,
    U_BRU  = 3'd5
  } unit_e;

  // decoded instruction
  typedef struct packed {
    logic        valid;      // slot holds an instruction
    unit_e       unit;
    logic [7:0]  op;         // raw opcode
    logic [7:0]  fld;        // raw 8-bit field (offset / immediate / displacement / target)
    logic [1:0]  cn;         // number of queue words consumed at QH
    logic        pn;         // produces one queue word at QT
    logic        rd1;        // reads the queue word at QH (SRC1)
    logic        rd2;        // reads the queue word at QH+OFFSET (SRC2)
    logic        gpr_rd;     // reads a GPR (mv, or a0 as base register)
    logic        gpr_wr;     // writes a GPR (setr)
    logic        is_load;
    logic        is_store;
    logic        is_ctrl;    // branch, jump, call, rfc, reti: ends the issue group
    logic        is_convop;
    logic        is_halt;
  } dec_t;

  // queue addresses of one instruction, as computed by the QCU
  typedef struct packed {
    qptr_t src1;   // QH before the instruction
    qptr_t src2;   // QH + OFFSET
    qptr_t dest;   // QT before the instruction
  } qaddr_t;

  // queue pointer state
  typedef struct packed {
    qptr_t lqh;
    qptr_t qh;
    qptr_t qt;
  } qstate_t;

  // one instruction in flight from issue to execute
  typedef struct packed {
    logic        valid;
    dec_t        d;
    qptr_t       dest;
    word_t       a;        // SRC1 value (QH)
    word_t       b;        // SRC2 value (QH+OFFSET)
    word_t       g;        // GPR value (mv) or base register a0
    logic [15:0] disp;     // extended displacement (convop)
  } exe_slot_t;

  // event pulses reported by the core, one cycle each
  typedef struct packed {
    logic [2:0] issued;        // instructions issued this cycle
    logic       stall_operand; // group cut: source word not yet valid
    logic       barrier;       // group cut: source produced inside the group
    logic       unit_limit;    // group cut: MLT or LD/ST units exhausted
    logic       queue_full;    // an issued instruction overflowed QREG
    logic       fetch_empty;   // nothing to issue: window buffer empty
    logic       br_taken;
    logic       br_not_taken;
    logic       call;
    logic       rfc;
    logic       irq_taken;
    logic       reti;
    logic       convop_used;   // a load/store/lda used an extended displacement
    logic       mem_load;
    logic       mem_store;
  } qc_events_t;

  // sign extension of an 8-bit field (branch offsets)
  function automatic logic [15:0] sext8_to16(input logic [7:0] v);
    return {{8{v[7]}}, v};
  endfunction

endpackage

// Shared types and constants of the 32-bit IoT co-processor core.
//
// The core is a multi-cycle 32-bit RISC machine with 32 general purpose
// registers, a 64-bit program counter, a 64-bit two-word instruction format
// and three ALU flags (carry, zero, negative). This package holds the
// opcode map, the ALU operation codes, the jump condition codes, the flag
// layout, the control-state enumeration and the bundle of datapath control
// signals that the control translation drives.
//
// From the source design: the opcodes of Table-1 style (NOP 0x00 ... HALT
// 0x1F), the rule that the ALU operation is opcode bits [62:59], the
// jump condition codes (00 always, 01 carry, 10 zero, 11 negative) and the
// control signal names. Own choices: opcodes 0x09-0x0B for ASR, ASL and NEG
// (described but not numbered in the source), the operand fields and
// source-mode field of the instruction word, the flag bit order and the
// set of control states.
//
// Instruction word (64 bits, fetched as two 32-bit words, high word first):
//   [63:59] opcode      [58:54] register A (destination / stored register)
//   [53:49] register B  [48:47] source mode (0 reg, 1 imm, 2 memory)
//   [46:45] jump condition            [44:0] reserved, write as zero
// An immediate operand follows the instruction as one word; a memory
// address follows as two words (high word first).
package iot_core_pkg;

  localparam int DATA_W = 32;   // data bus and register width
  localparam int ADDR_W = 64;   // program counter, MAR and address bus width
  localparam int REG_AW = 5;    // 32 general purpose registers

  typedef enum logic [4:0] {
    OP_NOP   = 5'h00,
    OP_ADD   = 5'h01,
    OP_SUB   = 5'h02,
    OP_MUL   = 5'h03,
    OP_AND   = 5'h04,
    OP_OR    = 5'h05,
    OP_LSR   = 5'h06,
    OP_LSL   = 5'h07,
    OP_COMP  = 5'h08,
    OP_ASR   = 5'h09,
    OP_ASL   = 5'h0A,
    OP_NEG   = 5'h0B,
    OP_JUMP  = 5'h0F,
    OP_LOAD  = 5'h10,
    OP_STORE = 5'h11,
    OP_MOVE  = 5'h12,
    OP_HALT  = 5'h1F
  } opcode_t;

  // ALU operation = opcode bits [62:59]; 0 is the pass-through used by MOVE.
  typedef enum logic [3:0] {
    ALU_PASS = 4'h0,
    ALU_ADD  = 4'h1,
    ALU_SUB  = 4'h2,
    ALU_MUL  = 4'h3,
    ALU_AND  = 4'h4,
    ALU_OR   = 4'h5,
    ALU_LSR  = 4'h6,
    ALU_LSL  = 4'h7,
    ALU_COMP = 4'h8,
    ALU_ASR  = 4'h9,
    ALU_ASL  = 4'hA,
    ALU_NEG  = 4'hB
  } alu_op_t;

  typedef enum logic [1:0] {
    SRC_REG = 2'd0,
    SRC_IMM = 2'd1,
    SRC_MEM = 2'd2
  } src_mode_t;

  typedef enum logic [1:0] {
    COND_ALWAYS = 2'b00,
    COND_CARRY  = 2'b01,
    COND_ZERO   = 2'b10,
    COND_NEG    = 2'b11
  } cond_t;

  // flags[2] carry, flags[1] zero, flags[0] negative
  typedef struct packed {
    logic carry;
    logic zero;
    logic negative;
  } flags_t;

  typedef struct packed {
    opcode_t   opcode;
    logic [REG_AW-1:0] reg_a;
    logic [REG_AW-1:0] reg_b;
    src_mode_t mode;
    cond_t     cond;
    logic [44:0] reserved;
  } instr_t;

  typedef enum logic [4:0] {
    S_FETCH_HI,   // instruction high word -> IR[63:32]
    S_FETCH_LO,   // instruction low word  -> IR[31:0], opcode known
    S_ADDR_HI,    // address high word -> MAR[63:32]
    S_ADDR_LO,    // address low word  -> MAR[31:0]
    S_EXEC,       // ALU operates, result and flags grabbed by the ALU latch
    S_WB_LO,      // ALU latch low half -> register
    S_WB_HI,      // ALU latch high half -> odd register of the pair (MUL)
    S_LOAD,       // register <- register, immediate or memory
    S_STORE,      // memory <- register
    S_MOVE_RD,    // ALU latch <- memory (pass-through)
    S_ADDR2_HI,   // second address of MOVE, high word
    S_ADDR2_LO,   // second address of MOVE, low word
    S_MOVE_WR,    // memory <- ALU latch
    S_JR_HI,      // jump address high word -> JR[63:32]
    S_JR_LO,      // jump address low word  -> JR[31:0]
    S_JUMP,       // PC <- JR
    S_HALT        // stopped until reset
  } state_t;

  typedef struct packed {
    logic              pc_set;
    logic              pc_increment;
    logic              gp_write;
    logic              gp_read;
    logic [REG_AW-1:0] gp_input_select;
    logic [REG_AW-1:0] gp_output_select;
    logic [REG_AW-1:0] gp_alu_output_select;
    alu_op_t           alu_operation;
    logic              latch_alu;
    logic              alu_store_high;
    logic              alu_store_low;
    logic              ir_set_high;
    logic              ir_set_low;
    logic              jr_set_high;
    logic              jr_set_low;
    logic              mar_set_high;
    logic              mar_set_low;
    logic              data_bus_input;   // external memory drives the data bus
  } dp_ctrl_t;

  function automatic logic cond_true(cond_t c, flags_t f);
    case (c)
      COND_ALWAYS: return 1'b1;
      COND_CARRY:  return f.carry;
      COND_ZERO:   return f.zero;
      default:     return f.negative;
    endcase
  endfunction

  function automatic logic is_alu_binary(opcode_t op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR};
  endfunction

  function automatic logic is_alu_unary(opcode_t op);
    return op inside {OP_LSR, OP_LSL, OP_COMP, OP_ASR, OP_ASL, OP_NEG};
  endfunction

endpackage

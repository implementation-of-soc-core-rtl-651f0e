// Control state machine of the core.
//
// Each instruction starts with two fetch states that load the 64-bit
// instruction into the IR, high word first. The opcode, register fields and
// source mode are all in the high word, so the choice made at the end of
// S_FETCH_LO already sees them:
//   NOP                     -> next fetch (two cycles in all)
//   ALU, register/immediate -> S_EXEC, S_WB_LO (+ S_WB_HI for MUL)
//   ALU, memory operand     -> S_ADDR_HI, S_ADDR_LO, then as above
//   shifts, COMP, NEG       -> S_EXEC, S_WB_LO
//   LOAD                    -> S_LOAD (after S_ADDR_HI/LO for memory)
//   STORE                   -> S_ADDR_HI, S_ADDR_LO, S_STORE
//   MOVE                    -> S_ADDR_HI, S_ADDR_LO, S_MOVE_RD,
//                              S_ADDR2_HI, S_ADDR2_LO, S_MOVE_WR
//   JUMP                    -> S_JR_HI, S_JR_LO, then S_JUMP only if the
//                              condition holds on the latched flags
//   HALT                    -> S_HALT until reset
// Unknown opcodes are skipped like NOP. The source only says that the
// states are constants and that the machine reads the IR to choose the next
// cycle; the state set and every transition are this design's own.
// Reset (synchronous, active high) enters S_FETCH_HI.
module state_machine
  import iot_core_pkg::*;
(
  input  logic        clock,
  input  logic        reset,
  input  logic [63:0] ir_value,
  input  flags_t      flags,
  output state_t      state
);

  instr_t ir;
  state_t next;

  assign ir = instr_t'(ir_value);

  always_comb begin
    next = S_FETCH_HI;
    case (state)
      S_FETCH_HI: next = S_FETCH_LO;
      S_FETCH_LO: begin
        if (is_alu_binary(ir.opcode))
          next = (ir.mode == SRC_MEM) ? S_ADDR_HI : S_EXEC;
        else if (is_alu_unary(ir.opcode))
          next = S_EXEC;
        else case (ir.opcode)
          OP_LOAD:  next = (ir.mode == SRC_MEM) ? S_ADDR_HI : S_LOAD;
          OP_STORE: next = S_ADDR_HI;
          OP_MOVE:  next = S_ADDR_HI;
          OP_JUMP:  next = S_JR_HI;
          OP_HALT:  next = S_HALT;
          default:  next = S_FETCH_HI;
        endcase
      end
      S_ADDR_HI: next = S_ADDR_LO;
      S_ADDR_LO: begin
        case (ir.opcode)
          OP_LOAD:  next = S_LOAD;
          OP_STORE: next = S_STORE;
          OP_MOVE:  next = S_MOVE_RD;
          default:  next = S_EXEC;
        endcase
      end
      S_EXEC:     next = S_WB_LO;
      S_WB_LO:    next = (ir.opcode == OP_MUL) ? S_WB_HI : S_FETCH_HI;
      S_WB_HI:    next = S_FETCH_HI;
      S_LOAD:     next = S_FETCH_HI;
      S_STORE:    next = S_FETCH_HI;
      S_MOVE_RD:  next = S_ADDR2_HI;
      S_ADDR2_HI: next = S_ADDR2_LO;
      S_ADDR2_LO: next = S_MOVE_WR;
      S_MOVE_WR:  next = S_FETCH_HI;
      S_JR_HI:    next = S_JR_LO;
      S_JR_LO:    next = cond_true(ir.cond, flags) ? S_JUMP : S_FETCH_HI;
      S_JUMP:     next = S_FETCH_HI;
      S_HALT:     next = S_HALT;
      default:    next = S_FETCH_HI;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) state <= S_FETCH_HI;
    else       state <= next;
  end

endmodule

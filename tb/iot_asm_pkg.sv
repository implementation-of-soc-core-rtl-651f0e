// Testbench helpers for the IoT core: instruction encoder and the cycle
// count each instruction should take, written from the instruction format
// and timing table in the core's documentation.
package iot_asm_pkg;
  import iot_core_pkg::*;

  function automatic logic [63:0] enc(opcode_t op, int ra = 0, int rb = 0,
                                      src_mode_t mode = SRC_REG, cond_t cond = COND_ALWAYS);
    logic [63:0] w;
    w = '0;
    w[63:59] = op;
    w[58:54] = 5'(ra);
    w[53:49] = 5'(rb);
    w[48:47] = mode;
    w[46:45] = cond;
    return w;
  endfunction

  function automatic int expected_cycles(opcode_t op, src_mode_t mode, logic taken);
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR: return (mode == SRC_MEM) ? 6 : 4;
      OP_MUL:                         return (mode == SRC_MEM) ? 7 : 5;
      OP_LSR, OP_LSL, OP_COMP, OP_ASR, OP_ASL, OP_NEG: return 4;
      OP_LOAD:  return (mode == SRC_MEM) ? 5 : 3;
      OP_STORE: return 5;
      OP_MOVE:  return 8;
      OP_JUMP:  return taken ? 5 : 4;
      default:  return 2;   // NOP, HALT (to reach the halt state), unused codes
    endcase
  endfunction
endpackage

// Control signal translation: state + instruction + flags -> control lines.
//
// Pure combinational logic. Register addresses come straight from the
// instruction fields: register A is the ALU's first operand, the
// destination, and the register stored by STORE; register B is the source
// register of a register-mode operand. For MUL the destination is turned
// into a register pair: the low product word goes to the even register and
// the high word to the odd register of the pair containing register A. The
// ALU operation is opcode bits [62:59], except in S_MOVE_RD where the
// pass-through is forced. In S_JUMP the program counter set signal is raised
// when the jump condition (always / carry / zero / negative) holds on the
// latched flags, so the test costs no cycle of its own.
//
// Memory side: mem_read / mem_write go to the memory IO block; use_mar
// selects the MAR instead of the program counter as the address. Every word
// read from the instruction stream (instruction halves, immediates, address
// words) advances the program counter. In S_HALT nothing is driven.
// The per-state assignments are this design's own; the source gives the
// register-address, ALU-operation and jump-evaluation rules above.
module control_translation
  import iot_core_pkg::*;
(
  input  state_t      state,
  input  logic [63:0] ir_value,
  input  flags_t      flags,
  output dp_ctrl_t    ctrl,
  output logic        mem_read,
  output logic        mem_write,
  output logic        use_mar,
  output logic        halted
);

  instr_t ir;
  logic   is_mul;

  assign ir     = instr_t'(ir_value);
  assign is_mul = (ir.opcode == OP_MUL);

  // fetch one word of the instruction stream onto the data bus
  function automatic void stream_word(ref dp_ctrl_t c, ref logic rd);
    rd               = 1'b1;
    c.data_bus_input = 1'b1;
    c.pc_increment   = 1'b1;
  endfunction

  always_comb begin
    ctrl      = '0;
    mem_read  = 1'b0;
    mem_write = 1'b0;
    use_mar   = 1'b0;
    halted    = 1'b0;

    ctrl.alu_operation        = alu_op_t'(ir_value[62:59]);
    ctrl.gp_alu_output_select = ir.reg_a;
    ctrl.gp_input_select      = ir.reg_a;
    ctrl.gp_output_select     = ir.reg_b;

    case (state)
      S_FETCH_HI: begin
        stream_word(ctrl, mem_read);
        ctrl.ir_set_high = 1'b1;
      end
      S_FETCH_LO: begin
        stream_word(ctrl, mem_read);
        ctrl.ir_set_low = 1'b1;
      end
      S_ADDR_HI, S_ADDR2_HI: begin
        stream_word(ctrl, mem_read);
        ctrl.mar_set_high = 1'b1;
      end
      S_ADDR_LO, S_ADDR2_LO: begin
        stream_word(ctrl, mem_read);
        ctrl.mar_set_low = 1'b1;
      end
      S_EXEC: begin
        ctrl.latch_alu = 1'b1;
        if (is_alu_binary(ir.opcode)) begin
          case (ir.mode)
            SRC_REG: ctrl.gp_read = 1'b1;
            SRC_IMM: stream_word(ctrl, mem_read);
            default: begin
              mem_read            = 1'b1;
              use_mar             = 1'b1;
              ctrl.data_bus_input = 1'b1;
            end
          endcase
        end
      end
      S_WB_LO: begin
        ctrl.alu_store_low = 1'b1;
        ctrl.gp_write      = 1'b1;
        if (is_mul) ctrl.gp_input_select = {ir.reg_a[REG_AW-1:1], 1'b0};
      end
      S_WB_HI: begin
        ctrl.alu_store_high  = 1'b1;
        ctrl.gp_write        = 1'b1;
        ctrl.gp_input_select = {ir.reg_a[REG_AW-1:1], 1'b1};
      end
      S_LOAD: begin
        ctrl.gp_write = 1'b1;
        case (ir.mode)
          SRC_REG: ctrl.gp_read = 1'b1;         // COPY
          SRC_IMM: stream_word(ctrl, mem_read);
          default: begin
            mem_read            = 1'b1;
            use_mar             = 1'b1;
            ctrl.data_bus_input = 1'b1;
          end
        endcase
      end
      S_STORE: begin
        ctrl.gp_read          = 1'b1;
        ctrl.gp_output_select = ir.reg_a;
        mem_write             = 1'b1;
        use_mar               = 1'b1;
      end
      S_MOVE_RD: begin
        mem_read            = 1'b1;
        use_mar             = 1'b1;
        ctrl.data_bus_input = 1'b1;
        ctrl.alu_operation  = ALU_PASS;
        ctrl.latch_alu      = 1'b1;
      end
      S_MOVE_WR: begin
        ctrl.alu_store_low = 1'b1;
        mem_write          = 1'b1;
        use_mar            = 1'b1;
      end
      S_JR_HI: begin
        stream_word(ctrl, mem_read);
        ctrl.jr_set_high = 1'b1;
      end
      S_JR_LO: begin
        stream_word(ctrl, mem_read);
        ctrl.jr_set_low = 1'b1;
      end
      S_JUMP: begin
        ctrl.pc_set = (ir.opcode == OP_JUMP) && cond_true(ir.cond, flags);
      end
      S_HALT: begin
        halted = 1'b1;
      end
      default: ;
    endcase
  end

endmodule

// Self-checking testbench for control_translation. For every state and a
// range of random instructions and flags it checks the rules of the control
// mapping: at most one data bus source; the IR, MAR and JR half-loads and
// program counter increments of the stream-reading states; register
// addresses from the instruction fields with the MUL pair destination; ALU
// operation = instruction bits [62:59] except pass-through for MOVE; the
// jump condition table; and nothing driven in HALT.
module control_translation_tb;
  import iot_core_pkg::*;
  import iot_asm_pkg::*;
  state_t      state;
  logic [63:0] ir_value;
  flags_t      flags;
  dp_ctrl_t    ctrl;
  logic        mem_read, mem_write, use_mar, halted;
  int checks = 0, failures = 0;

  control_translation dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s op=%h mode=%0d flags=%b: %s = %b, expected %b", state.name(), ir_value[63:59],
               ir_value[48:47], flags, what, got, exp);
    end
  endtask

  initial begin
    automatic opcode_t ops [17] = '{OP_NOP, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_LSR, OP_LSL,
                          OP_COMP, OP_ASR, OP_ASL, OP_NEG, OP_JUMP, OP_LOAD, OP_STORE,
                          OP_MOVE, OP_HALT};
    for (int i = 0; i < 3000; i++) begin
      logic stream, cond, binop;
      logic [4:0] ra, rb;
      opcode_t op;
      src_mode_t m;
      state = state_t'($urandom_range(0, 16));
      op = ops[$urandom_range(0, 16)];
      m  = src_mode_t'($urandom_range(0, 2));
      ra = 5'($urandom); rb = 5'($urandom);
      ir_value = enc(op, int'(ra), int'(rb), m, cond_t'($urandom_range(0, 3)));
      flags = flags_t'($urandom);
      #1;
      binop = op inside {OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR};
      stream = state inside {S_FETCH_HI, S_FETCH_LO, S_ADDR_HI, S_ADDR_LO, S_ADDR2_HI, S_ADDR2_LO, S_JR_HI, S_JR_LO} ||
               (state == S_EXEC && binop && m == SRC_IMM) || (state == S_LOAD && m == SRC_IMM);
      checks++;
      if (!$onehot0({ctrl.gp_read, ctrl.alu_store_high, ctrl.alu_store_low, ctrl.data_bus_input})) begin
        failures++; $display("%s: several bus sources", state.name());
      end
      expect_bit("pc_increment", ctrl.pc_increment, stream);
      expect_bit("ir_set_high", ctrl.ir_set_high, state == S_FETCH_HI);
      expect_bit("ir_set_low", ctrl.ir_set_low, state == S_FETCH_LO);
      expect_bit("mar_set_high", ctrl.mar_set_high, state inside {S_ADDR_HI, S_ADDR2_HI});
      expect_bit("mar_set_low", ctrl.mar_set_low, state inside {S_ADDR_LO, S_ADDR2_LO});
      expect_bit("jr_set_high", ctrl.jr_set_high, state == S_JR_HI);
      expect_bit("jr_set_low", ctrl.jr_set_low, state == S_JR_LO);
      expect_bit("latch_alu", ctrl.latch_alu, state inside {S_EXEC, S_MOVE_RD});
      expect_bit("mem_write", mem_write, state inside {S_STORE, S_MOVE_WR});
      expect_bit("halted", halted, state == S_HALT);
      expect_bit("gp_write", ctrl.gp_write, state inside {S_WB_LO, S_WB_HI, S_LOAD});
      expect_bit("use_mar", use_mar, state inside {S_STORE, S_MOVE_RD, S_MOVE_WR} ||
                 (state == S_EXEC && binop && m == SRC_MEM) || (state == S_LOAD && m == SRC_MEM));
      if (stream) expect_bit("stream read from PC", mem_read && !use_mar && ctrl.data_bus_input, 1'b1);
      case (ir_value[46:45])
        2'b00: cond = 1;
        2'b01: cond = flags[2];
        2'b10: cond = flags[1];
        default: cond = flags[0];
      endcase
      expect_bit("pc_set", ctrl.pc_set, state == S_JUMP && op == OP_JUMP && cond);
      if (state == S_HALT)
        expect_bit("idle in HALT", |{mem_read, mem_write, ctrl.gp_read, ctrl.data_bus_input, ctrl.gp_write}, 1'b0);
      checks++;
      if (ctrl.alu_operation !== (state == S_MOVE_RD ? ALU_PASS : alu_op_t'(ir_value[62:59]))) begin
        failures++; $display("%s: alu_operation %h", state.name(), ctrl.alu_operation);
      end
      checks++;
      if (state == S_WB_LO && ctrl.gp_input_select !== (op == OP_MUL ? {ra[4:1], 1'b0} : ra) ||
          state == S_WB_HI && ctrl.gp_input_select !== {ra[4:1], 1'b1} ||
          state == S_LOAD && ctrl.gp_input_select !== ra ||
          state == S_STORE && ctrl.gp_output_select !== ra ||
          state == S_EXEC && ctrl.gp_alu_output_select !== ra ||
          state == S_EXEC && m == SRC_REG && binop && (!ctrl.gp_read || ctrl.gp_output_select !== rb)) begin
        failures++; $display("%s: register addresses wrong", state.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for the control state machine: for each
// instruction class the state sequence from S_FETCH_HI back to S_FETCH_HI
// is compared with the sequence written out here, for jumps with the
// condition both true and false, and HALT must stay halted until reset.
module state_machine_tb;
  import iot_core_pkg::*;
  import iot_asm_pkg::*;
  logic        clock = 0, reset = 1;
  logic [63:0] ir_value = 0;
  flags_t      flags = '0;
  state_t      state;
  int checks = 0, failures = 0;

  state_machine dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The IR is loaded (as the core does) at the end of S_FETCH_HI.
  task automatic run(string name, logic [63:0] instr, flags_t f, state_t exp [$]);
    state_t seen [$];
    ir_value = 64'hFFFF_FFFF_FFFF_FFFF;   // stale instruction during the first fetch
    flags = f;
    checks++;
    if (state !== S_FETCH_HI) begin failures++; $display("%s: not at fetch", name); end
    seen.push_back(state);
    @(posedge clock); #1;
    ir_value = instr;
    while (state != S_FETCH_HI && seen.size() < 20) begin
      seen.push_back(state);
      @(posedge clock); #1;
    end
    checks++;
    if (seen != exp) begin
      failures++;
      $display("%s: sequence differs", name);
      foreach (seen[i]) $display("  seen %s", seen[i].name());
    end
  endtask

  initial begin
    flags_t c1, z1, n1, none;
    c1 = '{carry: 1, zero: 0, negative: 0};
    z1 = '{carry: 0, zero: 1, negative: 0};
    n1 = '{carry: 0, zero: 0, negative: 1};
    none = '0;
    @(posedge clock); #1 reset = 0;
    run("NOP", enc(OP_NOP), none, '{S_FETCH_HI, S_FETCH_LO});
    run("ADD reg", enc(OP_ADD, 1, 2, SRC_REG), none, '{S_FETCH_HI, S_FETCH_LO, S_EXEC, S_WB_LO});
    run("SUB imm", enc(OP_SUB, 1, 2, SRC_IMM), none, '{S_FETCH_HI, S_FETCH_LO, S_EXEC, S_WB_LO});
    run("OR mem", enc(OP_OR, 1, 2, SRC_MEM), none,
        '{S_FETCH_HI, S_FETCH_LO, S_ADDR_HI, S_ADDR_LO, S_EXEC, S_WB_LO});
    run("MUL reg", enc(OP_MUL, 1, 2, SRC_REG), none, '{S_FETCH_HI, S_FETCH_LO, S_EXEC, S_WB_LO, S_WB_HI});
    run("MUL mem", enc(OP_MUL, 1, 2, SRC_MEM), none,
        '{S_FETCH_HI, S_FETCH_LO, S_ADDR_HI, S_ADDR_LO, S_EXEC, S_WB_LO, S_WB_HI});
    run("NEG", enc(OP_NEG, 1), none, '{S_FETCH_HI, S_FETCH_LO, S_EXEC, S_WB_LO});
    run("LSR", enc(OP_LSR, 1), none, '{S_FETCH_HI, S_FETCH_LO, S_EXEC, S_WB_LO});
    run("COPY", enc(OP_LOAD, 1, 2, SRC_REG), none, '{S_FETCH_HI, S_FETCH_LO, S_LOAD});
    run("LOAD imm", enc(OP_LOAD, 1, 0, SRC_IMM), none, '{S_FETCH_HI, S_FETCH_LO, S_LOAD});
    run("LOAD mem", enc(OP_LOAD, 1, 0, SRC_MEM), none, '{S_FETCH_HI, S_FETCH_LO, S_ADDR_HI, S_ADDR_LO, S_LOAD});
    run("STORE", enc(OP_STORE, 1), none, '{S_FETCH_HI, S_FETCH_LO, S_ADDR_HI, S_ADDR_LO, S_STORE});
    run("MOVE", enc(OP_MOVE), none, '{S_FETCH_HI, S_FETCH_LO, S_ADDR_HI, S_ADDR_LO, S_MOVE_RD,
                                       S_ADDR2_HI, S_ADDR2_LO, S_MOVE_WR});
    run("JMP", enc(OP_JUMP, 0, 0, SRC_REG, COND_ALWAYS), none,
        '{S_FETCH_HI, S_FETCH_LO, S_JR_HI, S_JR_LO, S_JUMP});
    run("JCAR taken", enc(OP_JUMP, 0, 0, SRC_REG, COND_CARRY), c1,
        '{S_FETCH_HI, S_FETCH_LO, S_JR_HI, S_JR_LO, S_JUMP});
    run("JCAR not", enc(OP_JUMP, 0, 0, SRC_REG, COND_CARRY), z1, '{S_FETCH_HI, S_FETCH_LO, S_JR_HI, S_JR_LO});
    run("JZERO taken", enc(OP_JUMP, 0, 0, SRC_REG, COND_ZERO), z1,
        '{S_FETCH_HI, S_FETCH_LO, S_JR_HI, S_JR_LO, S_JUMP});
    run("JZERO not", enc(OP_JUMP, 0, 0, SRC_REG, COND_ZERO), n1, '{S_FETCH_HI, S_FETCH_LO, S_JR_HI, S_JR_LO});
    run("JNEG taken", enc(OP_JUMP, 0, 0, SRC_REG, COND_NEG), n1,
        '{S_FETCH_HI, S_FETCH_LO, S_JR_HI, S_JR_LO, S_JUMP});
    run("JNEG not", enc(OP_JUMP, 0, 0, SRC_REG, COND_NEG), c1, '{S_FETCH_HI, S_FETCH_LO, S_JR_HI, S_JR_LO});
    run("unused opcode", enc(opcode_t'(5'h0D)), none, '{S_FETCH_HI, S_FETCH_LO});
    // HALT: stays until reset
    ir_value = 64'hFFFF_FFFF_FFFF_FFFF;
    @(posedge clock); #1 ir_value = enc(OP_HALT);
    repeat (10) @(posedge clock);
    #1;
    checks++;
    if (state !== S_HALT) begin failures++; $display("not halted: %s", state.name()); end
    reset = 1; @(posedge clock); #1 reset = 0;
    checks++;
    if (state !== S_FETCH_HI) begin failures++; $display("reset did not leave HALT"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

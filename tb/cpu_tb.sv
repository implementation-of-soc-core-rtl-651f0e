// End-to-end testbench of the IoT core at its default size (1024-word ROM,
// 16-word RAM). The ROM and RAM are behavioural models here, read
// combinationally and written on the clock edge.
//
// Each run loads a program into the ROM, resets the core and lets it run to
// HALT. An instruction-level reference model in this file executes the same
// program and predicts the final registers, flags, RAM contents and the total
// cycle count; the core's register file, flags and the RAM are then
// compared with it. Run 0 is a directed program that uses every instruction,
// every operand mode and every jump condition both taken and not taken.
// Later runs are random programs with forward jumps only. The test counts
// how often each mechanism happened (each opcode, each operand mode, MUL
// register-pair write-back, taken and not-taken jumps of each condition,
// MOVE through the ALU latch, ROM reads as data, HALT) and counts a failure
// for any that never did.
module cpu_tb;
  import iot_core_pkg::*;
  import iot_asm_pkg::*;

  localparam int NRUNS = 40;
  localparam logic [63:0] RAMB = 64'h400;

  logic        clock = 0, reset = 1;
  logic [63:0] address_bus;
  logic        rom_enable, ram_enable, ram_write, data_bus_oe, halted;
  logic [9:0]  rom_address;
  logic [3:0]  ram_address;
  logic [31:0] rom_data, ram_wdata, ram_rdata;

  logic [31:0] rom [1024];
  logic [31:0] ram [16];

  cpu dut (.*);

  always #5 clock = ~clock;

  assign rom_data  = rom_enable ? rom[rom_address] : 32'hDEAD_BEEF;
  assign ram_rdata = ram_enable ? ram[ram_address] : 32'hDEAD_BEEF;
  always_ff @(posedge clock) if (ram_enable && ram_write) ram[ram_address] <= ram_wdata;

  int checks = 0, failures = 0;

  // ---------------- program builder ----------------
  int wp;   // next ROM word to write
  task automatic emit(logic [31:0] w); rom[wp] = w; wp++; endtask
  task automatic ins(opcode_t op, int ra = 0, int rb = 0, src_mode_t m = SRC_REG, cond_t c = COND_ALWAYS);
    logic [63:0] w;
    w = enc(op, ra, rb, m, c);
    emit(w[63:32]); emit(w[31:0]);
  endtask
  task automatic imm(logic [31:0] v); emit(v); endtask
  task automatic adr(logic [63:0] a); emit(a[63:32]); emit(a[31:0]); endtask

  // ---------------- reference model ----------------
  logic [31:0] m_regs [32];
  logic [31:0] m_ram  [16];
  logic [31:0] init_ram [16];
  flags_t      m_flags;
  longint      m_cycles;
  int          m_steps;

  // mechanism counters
  int n_op [32];
  int n_mode [3];
  int n_taken [4], n_not_taken [4];
  int n_rom_data;

  function automatic logic [31:0] m_read(logic [63:0] a);
    if (a < 64'd1024) begin n_rom_data++; return rom[a[9:0]]; end
    if (a >= RAMB && a < RAMB + 16) return m_ram[a[3:0]];
    return 32'd0;
  endfunction

  task automatic run_model();
    logic [63:0] pc, a1, a2, w;
    logic [31:0] src, x, r, v;
    logic [63:0] p;
    logic        c, taken, done;
    opcode_t     op;
    src_mode_t   mode;
    int          ra, rb;
    foreach (m_regs[i]) m_regs[i] = 0;
    foreach (m_ram[i]) m_ram[i] = init_ram[i];
    m_flags = '0; m_cycles = 0; m_steps = 0; pc = 0; done = 0;
    while (!done && m_steps < 2000) begin
      w = {rom[pc[9:0]], rom[pc[9:0] + 10'd1]};
      pc += 2;
      op = opcode_t'(w[63:59]); ra = int'(w[58:54]); rb = int'(w[53:49]);
      mode = src_mode_t'(w[48:47]);
      taken = 0;
      m_steps++;
      n_op[w[63:59]]++;
      if (op inside {OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR}) begin
        n_mode[mode]++;
        case (mode)
          SRC_REG: src = m_regs[rb];
          SRC_IMM: begin src = rom[pc[9:0]]; pc += 1; end
          default: begin a1 = {rom[pc[9:0]], rom[pc[9:0] + 10'd1]}; pc += 2; src = m_read(a1); end
        endcase
        x = m_regs[ra]; c = 0;
        case (op)
          OP_ADD: begin {c, r} = {1'b0, x} + {1'b0, src}; end
          OP_SUB: begin r = x - src; c = x < src; end
          OP_AND: r = x & src;
          OP_OR:  r = x | src;
          default: r = 0;
        endcase
        if (op == OP_MUL) begin
          p = {32'd0, x} * {32'd0, src};
          m_regs[ra & ~1] = p[31:0];
          m_regs[ra | 1]  = p[63:32];
          m_flags = '{carry: 1'b0, zero: p == 0, negative: p[63]};
        end else begin
          m_regs[ra] = r;
          m_flags = '{carry: c, zero: r == 0, negative: r[31]};
        end
      end else if (op inside {OP_LSR, OP_LSL, OP_COMP, OP_ASR, OP_ASL, OP_NEG}) begin
        x = m_regs[ra]; c = 0;
        case (op)
          OP_LSR:  begin r = x >> 1; c = x[0]; end
          OP_LSL:  begin r = x << 1; c = x[31]; end
          OP_COMP: r = ~x;
          OP_ASR:  begin r = {x[31], x[31:1]}; c = x[0]; end
          OP_ASL:  begin r = {x[31], x[29:0], 1'b0}; c = x[30]; end
          default: r = 32'd0 - x;
        endcase
        m_regs[ra] = r;
        m_flags = '{carry: c, zero: r == 0, negative: r[31]};
      end else begin
        case (op)
          OP_LOAD: begin
            n_mode[mode]++;
            case (mode)
              SRC_REG: src = m_regs[rb];
              SRC_IMM: begin src = rom[pc[9:0]]; pc += 1; end
              default: begin a1 = {rom[pc[9:0]], rom[pc[9:0] + 10'd1]}; pc += 2; src = m_read(a1); end
            endcase
            m_regs[ra] = src;
          end
          OP_STORE: begin
            a1 = {rom[pc[9:0]], rom[pc[9:0] + 10'd1]}; pc += 2;
            if (a1 >= RAMB && a1 < RAMB + 16) m_ram[a1[3:0]] = m_regs[ra];
          end
          OP_MOVE: begin
            a1 = {rom[pc[9:0]], rom[pc[9:0] + 10'd1]}; pc += 2;
            v = m_read(a1);
            m_flags = '{carry: 1'b0, zero: v == 0, negative: v[31]};
            a2 = {rom[pc[9:0]], rom[pc[9:0] + 10'd1]}; pc += 2;
            if (a2 >= RAMB && a2 < RAMB + 16) m_ram[a2[3:0]] = v;
          end
          OP_JUMP: begin
            a1 = {rom[pc[9:0]], rom[pc[9:0] + 10'd1]}; pc += 2;
            case (cond_t'(w[46:45]))
              COND_ALWAYS: taken = 1;
              COND_CARRY:  taken = m_flags.carry;
              COND_ZERO:   taken = m_flags.zero;
              default:     taken = m_flags.negative;
            endcase
            if (taken) begin pc = a1; n_taken[w[46:45]]++; end
            else n_not_taken[w[46:45]]++;
          end
          OP_HALT: done = 1;
          default: ;
        endcase
      end
      m_cycles += longint'(expected_cycles(op, mode, taken));
    end
  endtask

  // ---------------- run one program on the core ----------------
  task automatic run_dut(string name);
    longint cyc;
    foreach (ram[i]) ram[i] = init_ram[i];
    run_model();
    reset = 1;
    @(posedge clock); @(posedge clock); #1;
    reset = 0;
    cyc = 0;
    while (!halted && cyc < 20000) begin
      @(posedge clock); #1;
      cyc++;
    end
    checks++;
    if (!halted) begin failures++; $display("%s: core did not halt", name); end
    checks++;
    if (cyc != m_cycles) begin
      failures++; $display("%s: %0d cycles, expected %0d", name, cyc, m_cycles);
    end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (dut.dp.m_gp.regs[i] !== m_regs[i]) begin
        failures++; $display("%s: r%0d = %h, expected %h", name, i, dut.dp.m_gp.regs[i], m_regs[i]);
      end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (ram[i] !== m_ram[i]) begin
        failures++; $display("%s: ram[%0d] = %h, expected %h", name, i, ram[i], m_ram[i]);
      end
    end
    checks++;
    if (dut.dp.flags !== m_flags) begin
      failures++; $display("%s: flags %b, expected %b", name, dut.dp.flags, m_flags);
    end
    // halted core stays put: no memory activity
    repeat (3) @(posedge clock);
    #1;
    checks++;
    if (!halted || rom_enable || ram_enable || data_bus_oe) begin
      failures++; $display("%s: bus active after HALT", name);
    end
  endtask

  // ---------------- directed program ----------------
  task automatic directed_program();
    int skip;
    foreach (rom[i]) rom[i] = 0;
    wp = 0;
    foreach (init_ram[i]) init_ram[i] = 32'h1000 + i;
    init_ram[3] = 32'hFFFF_FFFF;
    ins(OP_NOP);
    ins(OP_LOAD, 1, 0, SRC_IMM); imm(32'h8000_0001);       // r1 = 0x80000001
    ins(OP_LOAD, 2, 0, SRC_IMM); imm(32'h7FFF_FFFF);       // r2
    ins(OP_LOAD, 3, 1, SRC_REG);                           // COPY r3 = r1
    ins(OP_ADD, 3, 2, SRC_REG);                            // r3 = 0 + carry
    ins(OP_JUMP, 0, 0, SRC_REG, COND_CARRY); adr(64'd0);   // target filled in below
    skip = wp - 2;
    ins(OP_HALT);                                          // skipped by the taken jump
    rom[skip] = 0; rom[skip + 1] = wp;                     // jump target: next instruction
    ins(OP_JUMP, 0, 0, SRC_REG, COND_ZERO); adr(64'(wp + 4));   // zero set -> taken
    ins(OP_HALT);
    ins(OP_SUB, 4, 0, SRC_IMM); imm(32'd1);                // r4 = 0 - 1, borrow, negative
    ins(OP_JUMP, 0, 0, SRC_REG, COND_NEG); adr(64'(wp + 4));    // taken
    ins(OP_HALT);
    ins(OP_LOAD, 5, 0, SRC_MEM); adr(RAMB + 3);            // r5 = 0xFFFFFFFF
    ins(OP_ADD, 5, 0, SRC_MEM); adr(RAMB + 1);             // r5 + 0x1001
    ins(OP_JUMP, 0, 0, SRC_REG, COND_ZERO); adr(64'd0);    // not taken (zero clear)
    ins(OP_JUMP, 0, 0, SRC_REG, COND_NEG);  adr(64'd0);    // not taken
    ins(OP_AND, 1, 0, SRC_IMM); imm(32'h8000_FFFF);        // no carry
    ins(OP_JUMP, 0, 0, SRC_REG, COND_CARRY); adr(64'd0);   // not taken
    ins(OP_OR, 2, 1, SRC_REG);
    ins(OP_MUL, 6, 2, SRC_REG);                            // r6:r7 = r6 * r2 (r6 = 0)
    ins(OP_LOAD, 8, 0, SRC_IMM); imm(32'hFFFF_FFFF);
    ins(OP_MUL, 9, 0, SRC_IMM); imm(32'h0000_0003);        // pair r8:r9 = r9 * 3, r9 = 0
    ins(OP_LOAD, 11, 0, SRC_IMM); imm(32'h1234_5678);
    ins(OP_MUL, 11, 0, SRC_MEM); adr(RAMB + 3);            // pair r10:r11
    ins(OP_LOAD, 12, 0, SRC_IMM); imm(32'hC000_0003);
    ins(OP_LOAD, 13, 12, SRC_REG);
    ins(OP_LOAD, 14, 12, SRC_REG);
    ins(OP_LOAD, 15, 12, SRC_REG);
    ins(OP_LOAD, 16, 12, SRC_REG);
    ins(OP_LOAD, 17, 12, SRC_REG);
    ins(OP_LSR, 12); ins(OP_LSL, 13); ins(OP_COMP, 14);
    ins(OP_ASR, 15); ins(OP_ASL, 16); ins(OP_NEG, 17);
    ins(OP_SUB, 17, 16, SRC_MEM); adr(RAMB + 0);
    ins(OP_AND, 18, 0, SRC_MEM); adr(64'd1);               // ROM word as data
    ins(OP_OR, 18, 0, SRC_MEM); adr(RAMB + 2);
    ins(OP_STORE, 12); adr(RAMB + 8);
    ins(OP_STORE, 7); adr(RAMB + 9);
    ins(OP_MOVE); adr(RAMB + 3); adr(RAMB + 10);           // flags from moved word
    ins(OP_JUMP, 0, 0, SRC_REG, COND_NEG); adr(64'(wp + 4));
    ins(OP_HALT);
    ins(OP_MOVE); adr(64'd0); adr(RAMB + 11);              // ROM word 0 (NOP) -> zero
    ins(OP_JUMP, 0, 0, SRC_REG, COND_ALWAYS); adr(64'(wp + 4));
    ins(OP_HALT);
    ins(OP_SUB, 19, 0, SRC_IMM); imm(32'd0);               // zero, no borrow
    ins(OP_JUMP, 0, 0, SRC_REG, COND_CARRY); adr(64'd0);   // not taken
    ins(opcode_t'(5'h0C));                                          // unassigned opcode: skipped
    ins(OP_HALT);
  endtask

  // ---------------- random program ----------------
  function automatic logic [63:0] rand_data_addr(logic allow_rom);
    if (allow_rom && $urandom_range(0, 3) == 0) return 64'($urandom_range(0, 300));
    if ($urandom_range(0, 15) == 0) return 64'h2000;       // unmapped
    return RAMB + 64'($urandom_range(0, 15));
  endfunction

  task automatic random_program();
    opcode_t ops [16] = '{OP_NOP, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_LSR, OP_LSL,
                          OP_COMP, OP_ASR, OP_ASL, OP_NEG, OP_JUMP, OP_LOAD, OP_STORE, OP_MOVE};
    int n, starts [64], jump_at [$], jump_slot [$];
    opcode_t op;
    src_mode_t m;
    foreach (rom[i]) rom[i] = $urandom;
    foreach (init_ram[i]) init_ram[i] = ($urandom_range(0, 3) == 0) ? 32'd0 : $urandom;
    wp = 0;
    n = $urandom_range(20, 60);
    for (int k = 0; k < n; k++) begin
      starts[k] = wp;
      op = ops[$urandom_range(0, 15)];
      m  = src_mode_t'($urandom_range(0, 2));
      case (op)
        OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_LOAD: begin
          ins(op, $urandom_range(0, 31), $urandom_range(0, 31), m);
          if (m == SRC_IMM) imm(($urandom_range(0, 3) == 0) ? 32'd0 : $urandom);
          if (m == SRC_MEM) adr(rand_data_addr(1));
        end
        OP_STORE: begin ins(op, $urandom_range(0, 31)); adr(rand_data_addr(0)); end
        OP_MOVE:  begin ins(op); adr(rand_data_addr(1)); adr(rand_data_addr(0)); end
        OP_JUMP: begin
          ins(op, 0, 0, SRC_REG, cond_t'($urandom_range(0, 3)));
          jump_at.push_back(k); jump_slot.push_back(wp);
          adr(64'd0);
        end
        default: ins(op, $urandom_range(0, 31));
      endcase
    end
    starts[n] = wp;
    ins(OP_HALT);
    foreach (jump_at[j]) begin   // forward target: a later instruction or the HALT
      int t;
      t = starts[$urandom_range(jump_at[j] + 1, n)];
      rom[jump_slot[j]] = 0; rom[jump_slot[j] + 1] = t;
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count MUL write-backs of the odd register of a pair, seen in the core
  int n_pair_wb = 0;
  always @(posedge clock) if (!reset && dut.state == S_WB_HI) n_pair_wb++;

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    foreach (n_mode[i]) n_mode[i] = 0;
    foreach (n_taken[i]) begin n_taken[i] = 0; n_not_taken[i] = 0; end
    n_rom_data = 0;
    directed_program();
    run_dut("directed");
    for (int r = 1; r < NRUNS; r++) begin
      random_program();
      run_dut($sformatf("random%0d", r));
    end
    begin
      automatic opcode_t all_ops [17] = '{OP_NOP, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_LSR, OP_LSL,
                               OP_COMP, OP_ASR, OP_ASL, OP_NEG, OP_JUMP, OP_LOAD, OP_STORE,
                               OP_MOVE, OP_HALT};
      foreach (all_ops[i]) begin
        checks++;
        if (n_op[all_ops[i]] == 0) begin failures++; $display("opcode %s never ran", all_ops[i].name()); end
      end
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (n_mode[i] == 0) begin failures++; $display("operand mode %0d never used", i); end
      end
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (n_taken[i] == 0) begin failures++; $display("condition %0d never taken", i); end
        if (i != 0 && n_not_taken[i] == 0) begin failures++; $display("condition %0d never not-taken", i); end
      end
      checks++;
      if (n_pair_wb == 0 || n_rom_data == 0) begin failures++; $display("MUL pair write-back or ROM data read never happened"); end
      $display("mechanisms: MUL pair write-backs %0d, ROM data reads %0d, MOVE %0d, HALT %0d",
               n_pair_wb, n_rom_data, n_op[OP_MOVE], n_op[OP_HALT]);
      $display("jumps taken A/C/Z/N %0d/%0d/%0d/%0d, not taken C/Z/N %0d/%0d/%0d",
               n_taken[0], n_taken[1], n_taken[2], n_taken[3], n_not_taken[1], n_not_taken[2], n_not_taken[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

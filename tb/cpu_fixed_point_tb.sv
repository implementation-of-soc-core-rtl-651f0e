// Program-level testbench: a Q16.16 fixed-point dot product on the core.
//
// Four pairs of unsigned Q16.16 values are placed in RAM (a[i] at
// 0x400+i, b[i] at 0x404+i). The program, assembled here into the ROM,
// multiplies each pair with MUL into a 64-bit register pair, realigns the
// product to Q16.16 with a 16-pass shift loop (LSR of the low word, LSL of
// the high word, loop counter decremented with SUB and tested with JZERO,
// backward JMP), merges the halves with OR, stores each product at
// 0x408+i and their sum at 0x40C. The results are compared with
// (a*b) >> 16 computed in the testbench, and the run time with the cycle
// count worked out from the instruction timings. Three data sets are run.
module cpu_fixed_point_tb;
  import iot_core_pkg::*;
  import iot_asm_pkg::*;

  localparam logic [63:0] RAMB = 64'h400;

  logic        clock = 0, reset = 1;
  logic [63:0] address_bus;
  logic        rom_enable, ram_enable, ram_write, data_bus_oe, halted;
  logic [9:0]  rom_address;
  logic [3:0]  ram_address;
  logic [31:0] rom_data, ram_wdata, ram_rdata;
  logic [31:0] rom [1024];
  logic [31:0] ram [16];
  int checks = 0, failures = 0;
  int backward_jumps = 0;

  cpu dut (.*);

  always #5 clock = ~clock;

  assign rom_data  = rom[rom_address];
  assign ram_rdata = ram[ram_address];
  always_ff @(posedge clock) if (ram_enable && ram_write) ram[ram_address] <= ram_wdata;

  // a taken jump to a lower address
  always @(posedge clock)
    if (!reset && dut.state == S_JUMP && dut.dp.jr_value < dut.dp.pc_count) backward_jumps++;

  int wp;
  task automatic emit(logic [31:0] w); rom[wp] = w; wp++; endtask
  task automatic ins(opcode_t op, int ra = 0, int rb = 0, src_mode_t m = SRC_REG, cond_t c = COND_ALWAYS);
    logic [63:0] w;
    w = enc(op, ra, rb, m, c);
    emit(w[63:32]); emit(w[31:0]);
  endtask
  task automatic adr(logic [63:0] a); emit(a[63:32]); emit(a[31:0]); endtask

  task automatic assemble();
    int loop_top, exit_slot;
    foreach (rom[i]) rom[i] = 0;
    wp = 0;
    ins(OP_LOAD, 8, 0, SRC_IMM); emit(32'd0);                  // sum = 0
    for (int i = 0; i < 4; i++) begin
      ins(OP_LOAD, 4, 0, SRC_MEM); adr(RAMB + 64'(i));         // r4 = a[i]
      ins(OP_MUL, 4, 0, SRC_MEM); adr(RAMB + 4 + 64'(i));      // r5:r4 = a[i] * b[i]
      ins(OP_LOAD, 6, 0, SRC_IMM); emit(32'd16);               // shift count
      loop_top = wp;
      ins(OP_LSR, 4);
      ins(OP_LSL, 5);
      ins(OP_SUB, 6, 0, SRC_IMM); emit(32'd1);
      ins(OP_JUMP, 0, 0, SRC_REG, COND_ZERO); exit_slot = wp; adr(64'd0);
      ins(OP_JUMP, 0, 0, SRC_REG, COND_ALWAYS); adr(64'(loop_top));
      rom[exit_slot + 1] = wp;                                 // loop exit
      ins(OP_OR, 5, 4, SRC_REG);                               // Q16.16 product
      ins(OP_STORE, 5); adr(RAMB + 8 + 64'(i));
      ins(OP_ADD, 8, 5, SRC_REG);
    end
    ins(OP_STORE, 8); adr(RAMB + 12);
    ins(OP_HALT);
  endtask

  // cycles: LOAD imm 3; per pair LOAD mem 5, MUL mem 7, LOAD imm 3,
  // 16 x (LSR 4 + LSL 4 + SUB 4), 15 x (JZERO not taken 4 + JMP taken 5),
  // JZERO taken 5, OR 4, STORE 5, ADD 4; final STORE 5, HALT 2.
  localparam int EXPECTED_CYCLES = 3 + 4 * (5 + 7 + 3 + 16 * 12 + 15 * 9 + 5 + 4 + 5 + 4) + 5 + 2;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a [4], b [4], p [4], sum;
    logic [63:0] full;
    int cyc;
    assemble();
    for (int set = 0; set < 3; set++) begin
      sum = 0;
      for (int i = 0; i < 4; i++) begin
        a[i] = (set == 0) ? 32'h0001_8000 * (i + 1) : $urandom_range(0, 32'h000F_FFFF);  // up to ~16.0
        b[i] = (set == 0) ? 32'h0000_4000 : $urandom;
        full = {32'd0, a[i]} * {32'd0, b[i]};
        p[i] = full[47:16];
        sum += p[i];
      end
      foreach (ram[k]) ram[k] = 0;
      for (int i = 0; i < 4; i++) begin ram[i] = a[i]; ram[4 + i] = b[i]; end
      reset = 1;
      @(posedge clock); @(posedge clock); #1;
      reset = 0;
      cyc = 0;
      while (!halted && cyc < 10000) begin @(posedge clock); #1; cyc++; end
      checks++;
      if (cyc != EXPECTED_CYCLES) begin
        failures++; $display("set %0d: %0d cycles, expected %0d", set, cyc, EXPECTED_CYCLES);
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (ram[8 + i] !== p[i]) begin
          failures++; $display("set %0d: product %0d = %h, expected %h", set, i, ram[8 + i], p[i]);
        end
      end
      checks++;
      if (ram[12] !== sum) begin failures++; $display("set %0d: sum %h, expected %h", set, ram[12], sum); end
      $display("set %0d: dot product %h (Q16.16) in %0d cycles", set, ram[12], cyc);
    end
    checks++;
    if (backward_jumps != 3 * 4 * 15) begin
      failures++; $display("backward jumps %0d, expected %0d", backward_jumps, 3 * 4 * 15);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

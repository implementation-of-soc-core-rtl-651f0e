// Self-checking testbench for the datapath, driving its control bundle
// directly. It loads registers from the external bus, loads IR, MAR and JR
// half by half, runs register-register and register-bus ALU operations
// through the ALU latch back into the registers (including a 64-bit multiply
// written to a register pair), reads registers back onto the bus, and sets
// the program counter from the jump register. Expected values are computed
// in the testbench. All twelve ALU operations are run through the bus,
// the latch and the register file.
module datapath_tb;
  import iot_core_pkg::*;
  logic        clock = 0, reset = 1;
  dp_ctrl_t    ctrl;
  logic [31:0] data_bus_in = 0, data_bus;
  logic [63:0] pc_count, ir_value, mar_value, jr_value;
  flags_t      flags;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  datapath dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clock); #1; ctrl = '0; endtask

  task automatic expect32(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  task automatic write_reg(int r, logic [31:0] v);
    ctrl = '0; ctrl.data_bus_input = 1; data_bus_in = v;
    ctrl.gp_write = 1; ctrl.gp_input_select = 5'(r);
    tick();
    shadow[r] = v;
  endtask

  task automatic read_reg(int r);
    ctrl = '0; ctrl.gp_read = 1; ctrl.gp_output_select = 5'(r);
    #1 expect32($sformatf("r%0d on bus", r), data_bus, shadow[r]);
    ctrl = '0;
  endtask

  // ALU op: a = register ra, b = register rb on the bus; write back low (and high)
  task automatic alu_rr(alu_op_t op, int ra, int rb);
    logic [63:0] e;
    logic [31:0] x;
    x = shadow[ra];
    case (op)
      ALU_PASS: e = {32'd0, shadow[rb]};
      ALU_ADD:  e = {32'd0, x + shadow[rb]};
      ALU_SUB:  e = {32'd0, x - shadow[rb]};
      ALU_AND:  e = {32'd0, x & shadow[rb]};
      ALU_OR:   e = {32'd0, x | shadow[rb]};
      ALU_MUL:  e = {32'd0, x} * {32'd0, shadow[rb]};
      ALU_LSR:  e = {32'd0, x >> 1};
      ALU_LSL:  e = {32'd0, x << 1};
      ALU_COMP: e = {32'd0, ~x};
      ALU_ASR:  e = {32'd0, x[31], x[31:1]};
      ALU_ASL:  e = {32'd0, x[31], x[29:0], 1'b0};
      ALU_NEG:  e = {32'd0, 32'd0 - x};
      default:  e = 0;
    endcase
    ctrl = '0; ctrl.alu_operation = op; ctrl.gp_alu_output_select = 5'(ra);
    ctrl.gp_read = 1; ctrl.gp_output_select = 5'(rb); ctrl.latch_alu = 1;
    tick();
    checks++;
    if (flags.zero !== (op == ALU_MUL ? e == 0 : e[31:0] == 0)) begin
      failures++; $display("zero flag after %s", op.name());
    end
    ctrl.alu_store_low = 1; ctrl.gp_write = 1;
    ctrl.gp_input_select = (op == ALU_MUL) ? 5'(ra & ~1) : 5'(ra);
    #1 expect32("latch low on bus", data_bus, e[31:0]);
    tick();
    if (op == ALU_MUL) begin
      shadow[ra & ~1] = e[31:0];
      ctrl.alu_store_high = 1; ctrl.gp_write = 1; ctrl.gp_input_select = 5'(ra | 1);
      #1 expect32("latch high on bus", data_bus, e[63:32]);
      tick();
      shadow[ra | 1] = e[63:32];
    end else begin
      shadow[ra] = e[31:0];
    end
  endtask

  initial begin
    ctrl = '0;
    foreach (shadow[i]) shadow[i] = 0;
    @(posedge clock); #1 reset = 0;
    // 64-bit registers
    ctrl.data_bus_input = 1; data_bus_in = 32'hFFC1_FFFC; ctrl.ir_set_high = 1; tick();
    ctrl.data_bus_input = 1; data_bus_in = 32'hFFC0_0FFC; ctrl.ir_set_low = 1;  tick();
    checks++; if (ir_value !== 64'hFFC1_FFFC_FFC0_0FFC) begin failures++; $display("IR %h", ir_value); end
    ctrl.data_bus_input = 1; data_bus_in = 32'hFFFF_FFFF; ctrl.mar_set_high = 1; tick();
    ctrl.data_bus_input = 1; data_bus_in = 32'h0000_0003; ctrl.mar_set_low = 1;  tick();
    checks++; if (mar_value !== 64'hFFFF_FFFF_0000_0003) begin failures++; $display("MAR %h", mar_value); end
    ctrl.data_bus_input = 1; data_bus_in = 32'h0000_0007; ctrl.jr_set_high = 1; tick();
    ctrl.data_bus_input = 1; data_bus_in = 32'h0FC0_1001; ctrl.jr_set_low = 1;  tick();
    ctrl.pc_increment = 1; tick();
    checks++; if (pc_count !== 64'd1) begin failures++; $display("PC after increment %h", pc_count); end
    ctrl.pc_set = 1; ctrl.pc_increment = 1; tick();
    checks++; if (pc_count !== 64'h0000_0007_0FC0_1001) begin failures++; $display("PC after set %h", pc_count); end
    // registers and ALU
    for (int r = 0; r < 32; r++) write_reg(r, $urandom);
    for (int r = 0; r < 32; r++) read_reg(r);
    // every ALU operation in turn, then random ones
    for (int op = 0; op < 12; op++) begin
      alu_rr(alu_op_t'(op), op + 1, 31 - op);
      read_reg(op + 1);
    end
    for (int i = 0; i < 300; i++) begin
      alu_rr(alu_op_t'($urandom_range(0, 11)), $urandom_range(0, 31), $urandom_range(0, 31));
      read_reg($urandom_range(0, 31));
    end
    // ALU operand from the external bus (immediate / memory path)
    ctrl = '0; ctrl.alu_operation = ALU_ADD; ctrl.gp_alu_output_select = 5'd3;
    ctrl.data_bus_input = 1; data_bus_in = 32'd5; ctrl.latch_alu = 1; tick();
    ctrl.alu_store_low = 1; ctrl.gp_write = 1; ctrl.gp_input_select = 5'd3; tick();
    shadow[3] = shadow[3] + 5;
    read_reg(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

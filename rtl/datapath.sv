// Datapath of the core: everything that stores or transforms data.
//
// It joins the program counter, the jump register (JR), the 32 general
// purpose registers, the ALU, the ALU latch, the memory address register
// (MAR) and the instruction register (IR) around one 32-bit data bus, the
// layout of the source's datapath block diagram. The bus has four possible
// sources, of which at most one is enabled by the control in any cycle: the
// register file (gp_read), the ALU latch high or low half (alu_store_high /
// alu_store_low) and the external memory (data_bus_input). The source
// design uses a tri-state bus; here it is a multiplexer, and an assertion
// checks the one-source rule. With no source enabled the bus reads zero.
// Every register loads from the bus: IR, JR and MAR half by half, the
// register file a whole word. The ALU takes its first operand from the
// register file's ALU port and its second from the bus. The program counter
// loads from the JR. All registers update on the rising clock edge; the bus
// and the ALU are combinational within the cycle.
module datapath
  import iot_core_pkg::*;
(
  input  logic              clock,
  input  logic              reset,
  input  dp_ctrl_t          ctrl,
  input  logic [DATA_W-1:0] data_bus_in,   // word read from memory
  output logic [DATA_W-1:0] data_bus,      // current bus value (also written to memory)
  output logic [ADDR_W-1:0] pc_count,
  output logic [63:0]       ir_value,
  output logic [ADDR_W-1:0] mar_value,
  output logic [ADDR_W-1:0] jr_value,
  output flags_t            flags
);

  logic [31:0] gp_output, gp_alu_output, latch_bus;
  logic        latch_drive;
  logic [63:0] alu_result;
  flags_t      alu_flags;

  always_comb begin
    if (ctrl.gp_read)             data_bus = gp_output;
    else if (latch_drive)         data_bus = latch_bus;
    else if (ctrl.data_bus_input) data_bus = data_bus_in;
    else                          data_bus = '0;
  end

  register64 #(.W(32)) m_ir (
    .clock, .reset, .halfValueIn(data_bus),
    .setHigh(ctrl.ir_set_high), .setLow(ctrl.ir_set_low), .value(ir_value)
  );

  register64 #(.W(32)) m_jr (
    .clock, .reset, .halfValueIn(data_bus),
    .setHigh(ctrl.jr_set_high), .setLow(ctrl.jr_set_low), .value(jr_value)
  );

  register64 #(.W(32)) m_mar (
    .clock, .reset, .halfValueIn(data_bus),
    .setHigh(ctrl.mar_set_high), .setLow(ctrl.mar_set_low), .value(mar_value)
  );

  program_counter #(.AW(64)) m_pc (
    .clock, .reset, .increment(ctrl.pc_increment), .set(ctrl.pc_set),
    .newCount(jr_value), .count(pc_count)
  );

  gp_registers #(.NREGS(32), .W(32)) m_gp (
    .clock, .reset,
    .gp_write(ctrl.gp_write),
    .gp_input_select(ctrl.gp_input_select),
    .gp_output_select(ctrl.gp_output_select),
    .gp_alu_output_select(ctrl.gp_alu_output_select),
    .data_in(data_bus),
    .gp_output, .gp_alu_output
  );

  alu #(.W(32)) m_alu (
    .alu_operation(ctrl.alu_operation), .a(gp_alu_output), .b(data_bus),
    .result(alu_result), .flags(alu_flags)
  );

  alu_latch #(.W(32)) m_alu_latch (
    .clock, .reset, .grab(ctrl.latch_alu), .alu_result, .flags(alu_flags),
    .store_high(ctrl.alu_store_high), .store_low(ctrl.alu_store_low),
    .bus_out(latch_bus), .bus_drive(latch_drive), .flags_out(flags)
  );

  // At most one source may drive the data bus.
  a_one_bus_source: assert property (@(posedge clock) disable iff (reset)
    $onehot0({ctrl.gp_read, ctrl.alu_store_high, ctrl.alu_store_low, ctrl.data_bus_input}))
    else $error("datapath: more than one data bus source enabled");

endmodule

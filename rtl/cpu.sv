// Top of the 32-bit IoT co-processor core.
//
// A small multi-cycle RISC processor for fixed-point arithmetic, logic and
// branching: 32 registers of 32 bits (pairable into 16 of 64 bits for
// multiply results), a 64-bit program counter and address space, a 64-bit
// two-word instruction format and a 32-bit data bus. This module joins the
// control state machine, the control signal translation, the datapath, the
// address multiplexer and the memory IO block, and brings out the pins of
// the external program ROM and data RAM.
//
// Interface: one clock, synchronous active-high reset (the program counter
// restarts at word 0, the first ROM word). The ROM and RAM are word
// addressed, 32 bits wide and must answer reads combinationally in the same
// cycle (rom_data / ram_rdata). A RAM write happens on the cycle where
// ram_enable and ram_write are high, with the data on ram_wdata; the core
// drives the data bus only then (data_bus_oe). A read of an address that
// no memory occupies (memory_io reports no device driving the bus) returns
// zero. After HALT the core stops reading and writing and raises `halted`
// until reset; assertions below check this and that a RAM write is always
// an enabled RAM access.
//
// Cycle counts per instruction (two of them fetch the instruction): NOP 2,
// ALU op with register or immediate operand 4 (MUL 5), with memory operand
// 6 (MUL 7), shift/COMP/NEG 4, LOAD/COPY from register or immediate 3, LOAD
// from memory 5, STORE 5, MOVE 8, JUMP 4 not taken / 5 taken.
// The split of the bidirectional data bus into read data, write data and an
// output enable is this design's choice, as are the memory map's RAM base
// and the cycle counts, which follow from the state machine.
module cpu
  import iot_core_pkg::*;
#(
  parameter int          ROM_AW   = 10,
  parameter int          RAM_AW   = 4,
  parameter logic [63:0] RAM_BASE = 64'h400
) (
  input  logic              clock,
  input  logic              reset,
  output logic [ADDR_W-1:0] address_bus,
  output logic              rom_enable,
  output logic [ROM_AW-1:0] rom_address,
  input  logic [31:0]       rom_data,
  output logic              ram_enable,
  output logic              ram_write,
  output logic [RAM_AW-1:0] ram_address,
  output logic [DATA_W-1:0] ram_wdata,
  input  logic [31:0]       ram_rdata,
  output logic              data_bus_oe,
  output logic              halted
);

  state_t      state;
  dp_ctrl_t    ctrl, dp_ctrl;
  flags_t      flags;
  logic [63:0] pc_count, ir_value, mar_value;
  logic [31:0] data_bus, mem_data;
  logic        mem_read, mem_write, use_mar, memory_drives_bus;

  state_machine m_fsm (
    .clock, .reset, .ir_value, .flags, .state
  );

  control_translation m_ctl (
    .state, .ir_value, .flags, .ctrl, .mem_read, .mem_write, .use_mar, .halted
  );

  // The memory is a bus source only when a mapped device answers the read.
  always_comb begin
    dp_ctrl                = ctrl;
    dp_ctrl.data_bus_input = ctrl.data_bus_input & memory_drives_bus;
  end

  datapath dp (
    .clock, .reset, .ctrl(dp_ctrl), .data_bus_in(mem_data), .data_bus,
    .pc_count, .ir_value, .mar_value, .jr_value(), .flags
  );

  address_mux #(.AW(64)) m_addr (
    .use_mar, .pc_count, .mar_value, .address(address_bus)
  );

  memory_io #(.ROM_AW(ROM_AW), .RAM_AW(RAM_AW), .RAM_BASE(RAM_BASE)) m_mem (
    .address(address_bus), .read(mem_read), .write(mem_write),
    .rom_enable, .rom_address, .rom_data,
    .ram_enable, .ram_write, .ram_address, .ram_rdata,
    .memory_drives_bus, .mem_data
  );

  assign ram_wdata   = data_bus;
  assign data_bus_oe = mem_write;

  a_halt_quiet: assert property (@(posedge clock) disable iff (reset)
    halted |-> !(rom_enable || ram_enable || data_bus_oe))
    else $error("cpu: memory access while halted");

  a_write_enabled: assert property (@(posedge clock) disable iff (reset)
    ram_write |-> ram_enable)
    else $error("cpu: RAM write without RAM enable");

endmodule

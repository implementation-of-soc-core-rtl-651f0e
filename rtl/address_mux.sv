// Address multiplexer: chooses what goes on the address bus.
//
// During a load, store, MOVE or ALU operation on a memory operand the
// control asserts use_mar and the memory address register drives the
// address; at all other times (instruction, immediate and jump-address
// fetches) the program counter does. Purely combinational. The rule (MAR
// for memory loads and stores, PC otherwise) follows the source; applying
// it also to MOVE and to ALU operands in memory is this design's choice.
module address_mux #(
  parameter int AW = 64
) (
  input  logic          use_mar,
  input  logic [AW-1:0] pc_count,
  input  logic [AW-1:0] mar_value,
  output logic [AW-1:0] address
);

  assign address = use_mar ? mar_value : pc_count;

endmodule

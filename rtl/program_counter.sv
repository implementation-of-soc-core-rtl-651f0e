// 64-bit program counter.
//
// Holds the word address of the next instruction word and addresses the
// program ROM during fetch. On a rising edge it loads newCount (the jump
// register) when `set` is high, otherwise counts up by one when `increment`
// is high. Reset (synchronous, active high) returns it to address 0, where
// the ROM is mapped. Giving `set` priority over `increment` is this design's
// choice; the source does not say what happens if both are high.
module program_counter #(
  parameter int AW = 64
) (
  input  logic          clock,
  input  logic          reset,
  input  logic          increment,
  input  logic          set,
  input  logic [AW-1:0] newCount,
  output logic [AW-1:0] count
);

  always_ff @(posedge clock) begin
    if (reset)          count <= '0;
    else if (set)       count <= newCount;
    else if (increment) count <= count + AW'(1);
  end

endmodule

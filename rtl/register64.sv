// Generic 64-bit register loaded one 32-bit half at a time.
//
// The core uses three of these: the instruction register, the jump register
// and the memory address register. Each takes its input from the 32-bit data
// bus (halfValueIn); setHigh stores it in bits [63:32] and setLow in bits
// [31:0] on the rising clock edge. Both may be asserted together. The
// stored value is always visible on `value`. Reset is synchronous and
// active high and clears the register (this reset value is a choice of this
// design; the source only shows a reset input).
module register64 #(
  parameter int W = 32   // width of one half
) (
  input  logic           clock,
  input  logic           reset,
  input  logic [W-1:0]   halfValueIn,
  input  logic           setHigh,
  input  logic           setLow,
  output logic [2*W-1:0] value
);

  always_ff @(posedge clock) begin
    if (reset) begin
      value <= '0;
    end else begin
      if (setHigh) value[2*W-1:W] <= halfValueIn;
      if (setLow)  value[W-1:0]   <= halfValueIn;
    end
  end

endmodule

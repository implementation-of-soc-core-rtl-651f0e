// ALU latch: holds the last grabbed ALU result and flags.
//
// On a rising edge with `grab` (latch_alu) high it stores the 64-bit ALU
// result and the three flags. The stored result goes onto the data bus, high
// half with store_high or low half with store_low; bus_drive tells the
// datapath's bus multiplexer that the latch is the bus source (the source's
// tri-state "high-z" output is modelled this way). The latched flags are
// always available on flags_out, so a jump tests the flags of the last
// grabbed result. Reset clearing result and flags is this design's choice.
module alu_latch
  import iot_core_pkg::*;
#(
  parameter int W = 32
) (
  input  logic           clock,
  input  logic           reset,
  input  logic           grab,
  input  logic [2*W-1:0] alu_result,
  input  flags_t         flags,
  input  logic           store_high,
  input  logic           store_low,
  output logic [W-1:0]   bus_out,
  output logic           bus_drive,
  output flags_t         flags_out
);

  logic [2*W-1:0] held;

  always_ff @(posedge clock) begin
    if (reset) begin
      held      <= '0;
      flags_out <= '0;
    end else if (grab) begin
      held      <= alu_result;
      flags_out <= flags;
    end
  end

  always_comb begin
    bus_drive = store_high | store_low;
    if (store_high)     bus_out = held[2*W-1:W];
    else if (store_low) bus_out = held[W-1:0];
    else                bus_out = '0;
  end

endmodule

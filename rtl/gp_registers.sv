// General purpose register file: 32 registers of 32 bits.
//
// One write port and two combinational read ports. gp_input_select picks
// the register written from the data bus when gp_write is high (rising
// edge). gp_output_select picks the register sent towards the data bus and
// gp_alu_output_select the register sent to the ALU's first operand. Reads
// are combinational, so a register-to-register copy or an ALU operation on
// registers needs no extra cycle. Registers 2k and 2k+1 form a 64-bit pair
// that receives a multiply result (written by two ordinary writes). Clearing
// all registers on reset is this design's choice.
module gp_registers #(
  parameter int NREGS = 32,
  parameter int W     = 32,
  localparam int SW   = $clog2(NREGS)
) (
  input  logic          clock,
  input  logic          reset,
  input  logic          gp_write,
  input  logic [SW-1:0] gp_input_select,
  input  logic [SW-1:0] gp_output_select,
  input  logic [SW-1:0] gp_alu_output_select,
  input  logic [W-1:0]  data_in,
  output logic [W-1:0]  gp_output,
  output logic [W-1:0]  gp_alu_output
);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (gp_write) begin
      regs[gp_input_select] <= data_in;
    end
  end

  assign gp_output     = regs[gp_output_select];
  assign gp_alu_output = regs[gp_alu_output_select];

endmodule

// Arithmetic logic unit of the core (purely combinational).
//
// Operand `a` comes from the register file's ALU port, operand `b` from the
// data bus (a register, an immediate word or a memory word). The operation
// code is opcode bits [62:59]. Results are 32 bits, zero-extended to the
// 64-bit result port, except MUL, an unsigned 32x32 multiply with a 64-bit
// product. Flags: zero when the result is all zeros, negative = most
// significant result bit (bit 63 for MUL, bit 31 otherwise), carry = carry
// out of ADD, borrow of SUB, or the bit shifted out by a shift. Shifts move
// one position. ASR and ASL keep bit 31 and shift only bits [30:0]; ASR
// copies the sign into bit 30, ASL loses bit 30 into the carry. Operation 0
// passes `b` through so the ALU latch can hold a word for MOVE.
// Following the source: operation list, flag meanings, unsigned multiply,
// pass-through. Own choices: carry = 0 for MUL, AND, OR, COMP, NEG and
// pass-through, the codes 9-11 for ASR, ASL, NEG, and the flag bit order.
module alu
  import iot_core_pkg::*;
#(
  parameter int W = 32
) (
  input  alu_op_t        alu_operation,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] result,
  output flags_t         flags
);

  logic [W:0]     sum;       // carry/borrow in the top bit
  logic [W-1:0]   r;         // 32-bit result
  logic [2*W-1:0] product;
  logic           carry;

  assign product = (2*W)'(a) * (2*W)'(b);

  always_comb begin
    sum   = '0;
    r     = '0;
    carry = 1'b0;
    case (alu_operation)
      ALU_PASS: r = b;
      ALU_ADD: begin
        sum   = {1'b0, a} + {1'b0, b};
        r     = sum[W-1:0];
        carry = sum[W];
      end
      ALU_SUB: begin
        sum   = {1'b0, a} - {1'b0, b};
        r     = sum[W-1:0];
        carry = sum[W];            // borrow
      end
      ALU_AND:  r = a & b;
      ALU_OR:   r = a | b;
      ALU_LSR: begin
        r     = {1'b0, a[W-1:1]};
        carry = a[0];
      end
      ALU_LSL: begin
        r     = {a[W-2:0], 1'b0};
        carry = a[W-1];
      end
      ALU_COMP: r = ~a;
      ALU_ASR: begin
        r     = {a[W-1], a[W-1], a[W-2:1]};
        carry = a[0];
      end
      ALU_ASL: begin
        r     = {a[W-1], a[W-3:0], 1'b0};
        carry = a[W-2];
      end
      ALU_NEG:  r = W'(0) - a;
      default:  r = '0;
    endcase
  end

  always_comb begin
    if (alu_operation == ALU_MUL) begin
      result         = product;
      flags.carry    = 1'b0;
      flags.zero     = (product == '0);
      flags.negative = product[2*W-1];
    end else begin
      result         = {{W{1'b0}}, r};
      flags.carry    = carry;
      flags.zero     = (r == '0);
      flags.negative = r[W-1];
    end
  end

endmodule

// Self-checking testbench for the ALU. Every operation is checked on
// directed corner values and random operands against results and flags
// worked out here from the operation definitions (one-bit shifts, unsigned
// 64-bit product, carry = carry out / borrow / shifted-out bit).
module alu_tb;
  import iot_core_pkg::*;
  alu_op_t     alu_operation;
  logic [31:0] a, b;
  logic [63:0] result;
  flags_t      flags;
  int checks = 0, failures = 0;

  alu #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(alu_op_t op, logic [31:0] x, logic [31:0] y);
    logic [63:0] er;
    logic ec;
    logic [63:0] wide;
    ec = 0;
    case (op)
      ALU_PASS: er = {32'd0, y};
      ALU_ADD:  begin wide = {32'd0, x} + {32'd0, y}; er = {32'd0, wide[31:0]}; ec = wide[32]; end
      ALU_SUB:  begin er = {32'd0, x - y}; ec = (x < y); end
      ALU_MUL:  er = {32'd0, x} * {32'd0, y};
      ALU_AND:  er = {32'd0, x & y};
      ALU_OR:   er = {32'd0, x | y};
      ALU_LSR:  begin er = {32'd0, x >> 1}; ec = x[0]; end
      ALU_LSL:  begin er = {32'd0, x << 1}; ec = x[31]; end
      ALU_COMP: er = {32'd0, ~x};
      ALU_ASR:  begin er = {32'd0, 32'($signed(x) >>> 1)}; ec = x[0]; end
      ALU_ASL:  begin er = {32'd0, x[31], x[29:0], 1'b0}; ec = x[30]; end
      ALU_NEG:  er = {32'd0, -x};
      default:  er = 0;
    endcase
    alu_operation = op; a = x; b = y;
    #1;
    checks++;
    if (result !== er || flags.carry !== ec ||
        flags.zero !== (op == ALU_MUL ? er == 0 : er[31:0] == 0) ||
        flags.negative !== (op == ALU_MUL ? er[63] : er[31])) begin
      failures++;
      $display("op %s a=%h b=%h: got %h c%b z%b n%b expected %h c%b", op.name(), x, y,
               result, flags.carry, flags.zero, flags.negative, er, ec);
    end
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h4000_0001};

  initial begin
    for (int op = 0; op < 12; op++) begin
      foreach (CORNER[i]) foreach (CORNER[j]) check(alu_op_t'(op), CORNER[i], CORNER[j]);
      for (int k = 0; k < 300; k++) check(alu_op_t'(op), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

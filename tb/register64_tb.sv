// Self-checking testbench for register64: random half-loads checked against
// a reference copy kept in the testbench, plus reset.
module register64_tb;
  logic        clock = 0, reset = 1, setHigh = 0, setLow = 0;
  logic [31:0] halfValueIn = 0;
  logic [63:0] value, expected;
  int checks = 0, failures = 0;

  register64 #(.W(32)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (200) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expected = '0;
    @(posedge clock); #1 reset = 0;
    checks++; if (value !== 64'd0) begin failures++; $display("reset value %h", value); end
    for (int i = 0; i < 100; i++) begin
      halfValueIn = $urandom;
      setHigh = 1'($urandom_range(0, 1));
      setLow  = 1'($urandom_range(0, 1));
      @(posedge clock); #1;
      if (setHigh) expected[63:32] = halfValueIn;
      if (setLow)  expected[31:0]  = halfValueIn;
      checks++;
      if (value !== expected) begin
        failures++; $display("step %0d: got %h expected %h", i, value, expected);
      end
    end
    reset = 1; @(posedge clock); #1;
    checks++; if (value !== 64'd0) begin failures++; $display("reset value %h", value); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

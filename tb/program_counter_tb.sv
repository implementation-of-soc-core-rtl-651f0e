// Self-checking testbench for program_counter: reset to 0, increment by one
// per enabled cycle, load of newCount, and set winning over increment.
module program_counter_tb;
  logic        clock = 0, reset = 1, increment = 0, set = 0;
  logic [63:0] newCount = 0, count, expected;
  int checks = 0, failures = 0;

  program_counter #(.AW(64)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (300) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expected = 0;
    @(posedge clock); #1 reset = 0;
    checks++; if (count !== 64'd0) begin failures++; $display("reset count %h", count); end
    for (int i = 0; i < 200; i++) begin
      increment = 1'($urandom_range(0, 1));
      set       = ($urandom_range(0, 7) == 0);
      newCount  = {$urandom, $urandom};
      if (i == 10) newCount = 64'hFFFF_FFFF_FFFF_FFFF;   // wrap check follows
      @(posedge clock); #1;
      if (set)            expected = newCount;
      else if (increment) expected = expected + 1;
      checks++;
      if (count !== expected) begin
        failures++; $display("step %0d: got %h expected %h", i, count, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

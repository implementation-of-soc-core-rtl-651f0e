// Self-checking testbench for alu_latch: grab holds result and flags only on
// grab cycles; the high or low half is presented on request; nothing is
// driven when neither store signal is high.
module alu_latch_tb;
  import iot_core_pkg::*;
  logic        clock = 0, reset = 1, grab = 0, store_high = 0, store_low = 0;
  logic [63:0] alu_result = 0, held;
  flags_t      flags = '0, flags_out, held_flags;
  logic [31:0] bus_out;
  logic        bus_drive;
  int checks = 0, failures = 0;

  alu_latch #(.W(32)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (400) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    held = 0; held_flags = '0;
    @(posedge clock); #1 reset = 0;
    for (int i = 0; i < 300; i++) begin
      grab       = 1'($urandom_range(0, 1));
      alu_result = {$urandom, $urandom};
      flags      = flags_t'($urandom);
      case ($urandom_range(0, 2))
        0: begin store_high = 0; store_low = 0; end
        1: begin store_high = 1; store_low = 0; end
        default: begin store_high = 0; store_low = 1; end
      endcase
      #1;
      checks++;
      if (bus_drive !== (store_high | store_low) ||
          bus_out !== (store_high ? held[63:32] : store_low ? held[31:0] : 32'd0) ||
          flags_out !== held_flags) begin
        failures++;
        $display("step %0d: bus %h drive %b flags %b, held %h flags %b", i, bus_out, bus_drive, flags_out, held, held_flags);
      end
      @(posedge clock); #1;
      if (grab) begin held = alu_result; held_flags = flags; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

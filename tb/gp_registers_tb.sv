// Self-checking testbench for gp_registers: random writes against a shadow
// array; both read ports checked combinationally every cycle, including a
// read of the register written in the same cycle (old value until the edge).
module gp_registers_tb;
  logic        clock = 0, reset = 1, gp_write = 0;
  logic [4:0]  gp_input_select = 0, gp_output_select = 0, gp_alu_output_select = 0;
  logic [31:0] data_in = 0, gp_output, gp_alu_output;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  gp_registers #(.NREGS(32), .W(32)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (1200) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    @(posedge clock); #1 reset = 0;
    for (int i = 0; i < 1000; i++) begin
      gp_write             = 1'($urandom_range(0, 1));
      gp_input_select      = 5'($urandom);
      gp_output_select     = 5'($urandom);
      gp_alu_output_select = (i % 4 == 0) ? gp_input_select : 5'($urandom);
      data_in              = $urandom;
      #1;
      checks += 2;
      if (gp_output !== shadow[gp_output_select]) begin
        failures++; $display("port out r%0d got %h exp %h", gp_output_select, gp_output, shadow[gp_output_select]);
      end
      if (gp_alu_output !== shadow[gp_alu_output_select]) begin
        failures++; $display("port alu r%0d got %h exp %h", gp_alu_output_select, gp_alu_output, shadow[gp_alu_output_select]);
      end
      @(posedge clock); #1;
      if (gp_write) shadow[gp_input_select] = data_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

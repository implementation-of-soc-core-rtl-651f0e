// Self-checking testbench for address_mux: random addresses, both selects.
module address_mux_tb;
  logic        use_mar;
  logic [63:0] pc_count, mar_value, address;
  int checks = 0, failures = 0;

  address_mux #(.AW(64)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      use_mar = 1'($urandom_range(0, 1));
      pc_count = {$urandom, $urandom};
      mar_value = {$urandom, $urandom};
      #1;
      checks++;
      if (address !== (use_mar ? mar_value : pc_count)) begin
        failures++; $display("use_mar=%b address %h", use_mar, address);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for memory_io: ROM window at 0..1023, RAM window
// at 0x400..0x40F, enables for reads and writes, read data selection, and
// nothing enabled outside the windows or for a write to ROM.
module memory_io_tb;
  logic [63:0] address;
  logic        read, write;
  logic        rom_enable, ram_enable, ram_write, memory_drives_bus;
  logic [9:0]  rom_address;
  logic [3:0]  ram_address;
  logic [31:0] rom_data, ram_rdata, mem_data;
  int checks = 0, failures = 0;

  memory_io #(.ROM_AW(10), .RAM_AW(4), .RAM_BASE(64'h400)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(logic [63:0] adr, logic rd, logic wr);
    logic e_rom, e_ram;
    address = adr; read = rd; write = wr;
    rom_data = $urandom; ram_rdata = $urandom;
    #1;
    e_rom = rd && adr < 64'd1024;
    e_ram = (rd || wr) && adr >= 64'h400 && adr < 64'h410;
    checks++;
    if (rom_enable !== e_rom || ram_enable !== e_ram || ram_write !== (wr && e_ram) ||
        (e_rom && rom_address !== adr[9:0]) || (e_ram && ram_address !== 4'(adr - 64'h400)) ||
        memory_drives_bus !== (e_rom || (e_ram && !wr)) ||
        mem_data !== (e_rom ? rom_data : (e_ram && !wr) ? ram_rdata : 32'd0)) begin
      failures++;
      $display("adr %h rd %b wr %b: rom_en %b ram_en %b ram_wr %b drive %b data %h",
               adr, rd, wr, rom_enable, ram_enable, ram_write, memory_drives_bus, mem_data);
    end
  endtask

  localparam logic [63:0] EDGES [8] = '{64'h0, 64'h3FF, 64'h400, 64'h40F, 64'h410,
                                        64'h800, 64'h1_0000_0400, 64'hFFFF_FFFF_FFFF_FFFF};

  initial begin
    foreach (EDGES[i]) for (int m = 0; m < 4; m++) probe(EDGES[i], m[0], m[1]);
    for (int i = 0; i < 500; i++) begin
      logic [63:0] adr;
      case ($urandom_range(0, 2))
        0: adr = 64'($urandom_range(0, 1023));
        1: adr = 64'h400 + 64'($urandom_range(0, 15));
        default: adr = {$urandom, $urandom};
      endcase
      probe(adr, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Memory IO: memory map and chip enables for the external ROM and RAM.
//
// The program ROM sits at word address 0, where the program counter starts
// after reset; the data RAM sits at RAM_BASE. A read anywhere in the ROM
// window enables the ROM; a read or write in the RAM window enables the RAM,
// with ram_write for writes. The ROM is read only, and an access outside
// both windows enables nothing. The module also selects the word read back
// (mem_data) and reports whether a memory drives the data bus. All
// combinational; the memories are expected to answer in the same cycle.
// The ROM (2^10 words) and RAM (2^4 words) sizes follow the source's test
// setup; the RAM base address is this design's choice.
module memory_io #(
  parameter int          ROM_AW   = 10,
  parameter int          RAM_AW   = 4,
  parameter logic [63:0] RAM_BASE = 64'h400
) (
  input  logic [63:0]       address,
  input  logic              read,
  input  logic              write,
  output logic              rom_enable,
  output logic [ROM_AW-1:0] rom_address,
  input  logic [31:0]       rom_data,
  output logic              ram_enable,
  output logic              ram_write,
  output logic [RAM_AW-1:0] ram_address,
  input  logic [31:0]       ram_rdata,
  output logic              memory_drives_bus,
  output logic [31:0]       mem_data
);

  logic in_rom, in_ram;
  logic [63:0] ram_offset;

  assign ram_offset = address - RAM_BASE;
  assign in_rom     = (address >> ROM_AW) == 64'd0;
  assign in_ram     = (address >= RAM_BASE) && ((ram_offset >> RAM_AW) == 64'd0);

  assign rom_enable  = read & in_rom;
  assign ram_enable  = (read | write) & in_ram;
  assign ram_write   = write & in_ram;
  assign rom_address = address[ROM_AW-1:0];
  assign ram_address = ram_offset[RAM_AW-1:0];

  assign memory_drives_bus = rom_enable | (ram_enable & ~write);
  assign mem_data = rom_enable ? rom_data : (ram_enable & ~write) ? ram_rdata : 32'd0;

endmodule

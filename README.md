# A 32-bit multi-cycle co-processor core for IoT devices

This is a small RISC processor meant to sit next to a main controller in a
battery-powered device and do fixed-point arithmetic, bit manipulation and
simple branching. It keeps the hardware minimal. There is one 32-bit data
bus, and every register in the machine loads from it. One ALU serves all
operations. A short state machine moves words across the bus, one per clock.
There is no pipeline and no cache. An instruction takes 2 to 8 clock cycles.

Key numbers:

| item | value |
|---|---|
| data width | 32 bits |
| general purpose registers | 32 x 32 bits, usable as 16 pairs of 64 bits |
| program counter, address bus | 64 bits, word addressed |
| instruction word | 64 bits (two bus words), optionally followed by a 32-bit immediate or a 64-bit address |
| flags | carry, zero, negative |
| instructions | 17 (NOP, ADD, SUB, MUL, AND, OR, LSR, LSL, COMP, ASR, ASL, NEG, LOAD/COPY, STORE, MOVE, JUMP, HALT) |
| memories | external ROM (program, 1024 words at address 0), external RAM (16 words at 0x400) |

## Programmer's model

### Registers and flags

Registers `r0`–`r31` are 32 bits wide, and `r0` is an ordinary register. A
multiply writes its 64-bit product to a register pair. The low word goes to
the even register and the high word to the odd register of the pair that
holds the destination. `MUL r6, ...` and `MUL r7, ...` therefore both write
`r6` (low) and `r7` (high). Give multiplies a destination whose pair holds
nothing else you need.

Each ALU instruction sets three flags:

* **zero**: the result is all zeros (all 64 bits for MUL).
* **negative**: the top bit of the result (bit 63 for MUL).
* **carry**: depends on the operation:
  * ADD: the carry out.
  * SUB: the borrow, which is set when the subtrahend is larger (unsigned).
  * Shifts: the bit shifted out.
  * All other operations: 0.

LOAD, STORE, NOP and JUMP leave the flags alone. MOVE sets zero and
negative from the word it copies (see below). Jumps test the flags left by
the last ALU use.

### Instruction word

An instruction is two 32-bit words, high word first. All decoded fields are
in the high word:

| bits | field |
|---|---|
| 63:59 | opcode |
| 58:54 | register A: destination, first ALU operand, or the register that STORE writes out |
| 53:49 | register B: source register in register mode |
| 48:47 | source mode: 0 register, 1 immediate, 2 memory |
| 46:45 | jump condition: 00 always, 01 carry, 10 zero, 11 negative |
| 44:0 | reserved, write zero |

Operand words follow the instruction in program memory. An immediate is one
word. An address is two words, high word first.

| opcode | mnemonic | operation | operand words |
|---|---|---|---|
| 0x00 | NOP | nothing | – |
| 0x01 | ADD | A = A + src | by mode |
| 0x02 | SUB | A = A − src | by mode |
| 0x03 | MUL | pair(A) = A × src, unsigned 32×32→64 | by mode |
| 0x04 | AND | A = A & src | by mode |
| 0x05 | OR | A = A \| src | by mode |
| 0x06 | LSR | A = A >> 1, zero shifted in | – |
| 0x07 | LSL | A = A << 1 | – |
| 0x08 | COMP | A = ~A | – |
| 0x09 | ASR | bits 30:0 shift right, bit 31 copied into bit 30 | – |
| 0x0A | ASL | bits 30:0 shift left, bit 31 kept, bit 30 to carry | – |
| 0x0B | NEG | A = −A | – |
| 0x0F | JUMP | if condition then PC = address | address |
| 0x10 | LOAD | A = src. Register mode is COPY (A = B) | by mode |
| 0x11 | STORE | mem[address] = A | address |
| 0x12 | MOVE | mem[address2] = mem[address1] | two addresses |
| 0x1F | HALT | stop until reset | – |

Here "src" is register B, the immediate, or the memory word at the address,
depending on the source mode. Opcodes that are not listed run as NOP.

The low four opcode bits are the ALU operation code (0 is the ALU's
pass-through). This is why ASR, ASL and NEG sit at 0x09–0x0B.

## How an instruction moves across the bus

This is the part worth understanding before changing anything. Every cycle,
at most one of four sources drives the 32-bit data bus:

* the register file's bus read port (`gp_read`);
* the ALU latch's high half (`alu_store_high`);
* the ALU latch's low half (`alu_store_low`);
* external memory (`data_bus_input`), when a mapped device answers.

In the same cycle, any number of registers may load from the bus: the IR,
JR or MAR halves, the register file write port, or the ALU latch through the
ALU. The ALU's first operand comes from a second read port of the register
file. Its second operand is the bus itself. So a register-to-register ADD
reads register B onto the bus, reads register A on the ALU port, and grabs
the sum into the ALU latch, all in one cycle. The next cycle puts the latch
back on the bus and writes register A.

The state machine has 17 states. Each instruction starts with `FETCH_HI` and
`FETCH_LO`. The opcode is already in the IR by the end of `FETCH_HI`, so the
next state is chosen at the end of `FETCH_LO`:

| instruction | states after the two fetches | cycles |
|---|---|---|
| NOP, unused opcode | – | 2 |
| ALU op, register or immediate | EXEC, WB_LO | 4 |
| ALU op, memory operand | ADDR_HI, ADDR_LO, EXEC, WB_LO | 6 |
| MUL | as above, plus WB_HI (high word to the odd register) | 5 / 7 |
| LSR, LSL, COMP, ASR, ASL, NEG | EXEC, WB_LO | 4 |
| LOAD / COPY, register or immediate | LOAD | 3 |
| LOAD, memory | ADDR_HI, ADDR_LO, LOAD | 5 |
| STORE | ADDR_HI, ADDR_LO, STORE | 5 |
| MOVE | ADDR_HI, ADDR_LO, MOVE_RD, ADDR2_HI, ADDR2_LO, MOVE_WR | 8 |
| JUMP, not taken | JR_HI, JR_LO | 4 |
| JUMP, taken | JR_HI, JR_LO, JUMP | 5 |
| HALT | HALT (for ever) | 2 to get there |

Any state that reads a word of the instruction stream advances the program
counter. That covers the instruction halves, immediates, and address words
into the MAR or the jump register. States that use the MAR put it on the
address bus instead of the PC.

MOVE uses the ALU latch as a scratch register. `MOVE_RD` passes the memory
word through the ALU (operation 0) into the latch. `MOVE_WR` drives the
latch onto the bus as write data. The grab also stores the pass-through
flags: zero and negative of the moved word, with carry 0.

The jump condition is checked on the latched flags at the end of `JR_LO`. A
false condition goes straight on to the next fetch. A true one spends one
cycle in `JUMP`, where the PC loads from the jump register.

## Datapath blocks

* **register64**: a 64-bit register that loads from the 32-bit bus one half
  at a time (`setHigh` / `setLow`). It is used three times: as the IR, the JR
  and the MAR.
* **program_counter**: 64 bits wide. `set` loads it from the JR, and
  `increment` counts up by one. If both are high, `set` wins.
* **gp_registers**: one write port and two combinational read ports. Reads
  cost no cycle.
* **alu**: combinational, 12 operations, 64-bit result port, flags as above.
* **alu_latch**: holds the result and flags when `latch_alu` is high. The
  flags output is always valid.
* **datapath**: ties the blocks above to the bus multiplexer. It also asserts
  the one-bus-source rule.

## Control

* **state_machine**: the state register and the next-state rules in the
  table above.
* **control_translation**: purely combinational. It turns the state, the IR
  and the flags into the datapath control bundle (`dp_ctrl_t` in
  `iot_core_pkg`), the memory read and write strobes, and the address
  select. Register numbers come straight from the IR fields. For MUL, the
  write-back address is forced to the even register and then the odd
  register of the pair.

## Memory map and pins

`memory_io` decodes the 64-bit word address:

| window | device | enable |
|---|---|---|
| 0x000 – 0x3FF | ROM (`ROM_AW` = 10) | `rom_enable` on reads |
| 0x400 – 0x40F | RAM (`RAM_AW` = 4, base `RAM_BASE`) | `ram_enable`, plus `ram_write` on writes |
| anything else | nothing | reads return 0, writes are dropped |

Both memories must return read data in the same cycle (combinational read).
A RAM write takes effect at the clock edge that ends the cycle in which
`ram_enable` and `ram_write` are high. `ram_wdata` carries the data bus and
`data_bus_oe` marks the cycles in which the core drives it.

Reset is synchronous and active high. It clears every register and starts
fetching at address 0. After HALT the core raises `halted` and performs no
further memory access until it is reset.

`cpu` is the top module. Its parameters are `ROM_AW`, `RAM_AW` and
`RAM_BASE`.

## Where this RTL departs from its source description

The core follows a published description of a 32-bit IoT co-processor.
That description gives:

* the instruction list and opcodes 0x00–0x08, 0x0F and 0x10–0x1F;
* the flag rules and the jump condition codes;
* the datapath structure: one bus, three 64-bit half-loaded registers, a
  three-port register file, the ALU and the ALU latch;
* the rule that the ALU operation is opcode bits 62:59;
* the control signal names;
* the test memory sizes.

The following are choices of this RTL:

* **Instruction fields.** Only the opcode position was given. The register,
  mode and condition fields, and the operand words that follow the
  instruction, are this design's own.
* **ASR, ASL and NEG** were described without opcodes. They were given 0x09,
  0x0A and 0x0B. The source counts 14 instructions; this core decodes 17.
* **State machine.** The states and every cycle count above are this
  design's own. The source says only that NOP costs no extra cycle and that
  a jump needs no cycle to evaluate its condition. Both hold here, but a
  taken jump spends one cycle loading the PC.
* **Address width.** The requirements ask for a 32-bit address bus, while
  the PC, MAR and test bench address are 64 bits. The address bus here is
  64 bits.
* **Addressing.** The PC is said to point at the next instruction byte, but
  the test memories are arrays of 32-bit words stepped one per clock.
  Addresses here are word addresses.
* **Data bus.** The source's data bus is a tri-state bidirectional port, and
  HALT floats it. Here the bus is a multiplexer inside the core. The pins are
  separate read-data inputs, a write-data output and an output enable, and
  HALT drops the enable.
* **Flag bit order** is `{carry, zero, negative}`, with negative as bit 0.
  Carry is 0 for MUL, AND, OR, COMP, NEG and pass-through.
* **RAM base** 0x400 and the behaviour of unmapped addresses are this
  design's own.
* **Not built:** the five-stage pipeline and the 64-bit and 128-bit versions
  that the source mentions. Neither is described.

The source also reports results of its own ASIC synthesis: 66562 µm², 7.90
ns critical path (through the multiplier into the flags), 126 MHz and
1.72 mW. They come from a different RTL and library and are not claimed for
this one. The 32×32 multiplier feeding the flag register is the likely
critical path here too.

## Files

`rtl/` contains one unit per file:

* `iot_core_pkg.sv` (types, opcodes, states, control bundle)
* `register64.sv`, `program_counter.sv`, `gp_registers.sv`, `alu.sv`,
  `alu_latch.sv`, `datapath.sv`
* `state_machine.sv`, `control_translation.sv`
* `address_mux.sv`, `memory_io.sv`
* `cpu.sv` (top)

`tb/` holds one self-checking testbench per module, named `<module>_tb.sv`.
It also holds `iot_asm_pkg.sv`, which has the instruction encoder and the
expected cycle count per instruction.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
the full core test:

```sh
verilator --binary --timing --assert -y rtl -y tb +libext+.sv --top-module cpu_tb \
    rtl/iot_core_pkg.sv tb/iot_asm_pkg.sv tb/cpu_tb.sv
./obj_dir/Vcpu_tb
```

For a unit testbench, replace `cpu_tb` with its name. Verilator finds the
modules in `rtl/` and `tb/` by file name, but the two packages must come first
on the command line.

`cpu_tb` runs the core at its default size with behavioural ROM and RAM
models. A reference model at instruction level runs the same program, and
the test compares four things with it:

* all 32 registers;
* the flags;
* all 16 RAM words;
* the exact cycle count from reset to `halted`.

After HALT it checks that the bus stays idle. Run 0 is a hand-written
program. It uses every opcode and every operand mode, takes and skips a jump
on each condition, reads ROM words as data, and does MUL pair write-backs.
The other 39 runs are random programs of 20–60 instructions:

* jumps are forward only;
* memory operands are spread over RAM, ROM and unmapped space;
* immediates are often zero, so the zero flag and zero jumps get exercised.

The test counts how often each of these mechanisms happened and fails if
one never did.

The unit testbenches check each block against values computed in the
testbench. The datapath test loads the IR, MAR and PC values seen in the
source's datapath waveform.

`cpu_fixed_point_tb` runs a real program with a loop, which the random
programs cannot have because their jumps only go forward. It computes a
Q16.16 fixed-point dot product of four value pairs held in RAM:

* MUL produces each 64-bit product in a register pair;
* a 16-pass loop of LSR and LSL, counted down with SUB and closed by JZERO
  and a backward JMP, realigns the product to Q16.16;
* OR merges the two halves, and ADD accumulates the sum.

The test compares each product and the sum with `(a*b) >> 16` computed in
the testbench. It also checks the run time against the cycle count from the
timing table: 1450 cycles per dot product, or about 11.5 µs with a 126 MHz
clock.

# MIPS150: a three-stage, one-instruction-per-cycle MIPS processor and its system

This is a small MIPS computer for an FPGA. It has a pipelined processor for the
integer subset of MIPS-I, an instruction memory, two data memories and a set of
serial-port registers, all reached through one memory-mapped address space. The
design has one rule above all others: **the processor never stalls**. Every cycle
it starts a new instruction (CPI = 1). Each hazard a three-stage pipeline can
meet is therefore handled either by a bypass or by the delay slots of the
architecture, never by waiting.

## The instruction set

The processor runs the standard MIPS encodings of these instructions:

| group | instructions |
|---|---|
| memory | `LW`, `SW` (whole, word-aligned words only) |
| immediate | `ADDIU`, `SLTI`, `SLTIU`, `ANDI`, `ORI`, `XORI`, `LUI` |
| shifts | `SLL`, `SRL`, `SRA`, `SLLV`, `SRLV`, `SRAV` |
| register | `ADDU`, `SUBU`, `AND`, `OR`, `XOR`, `NOR`, `SLT`, `SLTU` |
| control | `J`, `JAL`, `JR`, `JALR`, `BEQ`, `BNE`, `BLEZ`, `BGTZ`, `BLTZ`, `BGEZ` |

Left out: floating point, traps (so `ADD`, `SUB` and `ADDI`), coprocessors,
byte and half-word accesses, multiply and divide, branch-and-link (`BLTZAL`,
`BGEZAL`) and branch-likely. Any other encoding runs as a no-op: it writes no
register, touches no memory and does not branch.

Two architectural delay slots are visible to software:

* **Branch/jump delay slot.** The instruction after a branch or jump always
  executes. The transfer happens after it.
* **Load delay slot.** The instruction right after `LW` still sees the old
  value of the loaded register. The next instruction sees the new value.

## Pipeline

```
 edge:     1              2                        3                     4
           |----- I ------|---------- X -----------|-------- M ----------|
           PC -> imem     decode, read rs/rt,      dmem data returns,    register
           address        bypass, ALU, branch      pick write-back       file written
                          resolve, drive memory    value
                          port
```

* **I.** On edge 1 the PC register changes. Its value goes straight to the
  instruction memory's synchronous read port, which registers it on edge 2.
* **X.** The instruction word comes out of the memory. It is decoded
  (`decoder`), the two source registers are read from `regfile`, the bypass
  mux picks up a fresher value if needed, `alu` computes, and `branch_unit`
  decides the next PC. A load or store drives `MemoryAddress`,
  `MemoryRead`/`MemoryWrite` and `MemoryWriteData` during X, so the data
  memory takes the access on edge 3.
* **M.** A load's word comes out of the data memory's output register. The
  write-back value is either that word, the ALU result or the link address
  PC + 8. It is written into the register file on edge 4.

### Why no hazard needs a stall

The instruction in X can depend on the two instructions ahead of it:

* **Two ahead.** That instruction wrote the register file on the edge that
  started the current X, and the file reads combinationally. Nothing more is
  needed.
* **One ahead, ALU or link result.** The result sits in the M pipeline
  register (`m_result`). It is bypassed into both X operands when
  `m_dest` matches `rs` or `rt`. This is the only bypass (`byp_rs`, `byp_rt`
  in `mips150_cpu`).
* **One ahead, a load.** The loaded word only arrives during M. This is the
  load delay slot, so the design does not bypass it. The instruction reads
  the register file's old value, as the architecture says. Because of this,
  there is no path from the data-memory output into the ALU, and the critical
  path stays short.
* **Control.** A branch resolves in X. In that same cycle, the instruction
  after it is being fetched. That instruction is the delay slot and is kept.
  The PC that goes to memory on the next edge is the target. Nothing is ever
  flushed.

Right after reset the X stage holds no instruction. A valid bit (`x_valid`)
turns it into a no-op. The first instruction fetched after reset is at
`0x00400000`.

## Memory map and I/O

The processor has one memory port: `MemoryAddress`, `MemoryReadData`,
`MemoryRead`, `MemoryWriteData` and `MemoryWrite`. It also has a separate fetch
port (`InstrAddress`, `InstrData`) that only the I stage uses. `addr_decode`
steers each access by its full 32-bit byte address:

| addresses | access | device |
|---|---|---|
| `0x00400000`-`0x00407ffc` | write only | instruction memory (`imem`, 8192 words) |
| `0x10010000`-`0x10017ffc` | read/write | heap data memory (`dmem`, 8192 words) |
| `0x7ffff000`-`0x7ffffffc` | read/write | stack data memory (`dmem`, 1024 words) |
| `0xffff0000` | read | `ControlInReg`: bit 0 = a received byte is waiting |
| `0xffff0004` | read | `DataInReg`: bits 7:0 = that byte; reading it empties the buffer |
| `0xffff0008` | read | `ControlOutReg`: bit 0 = the transmitter can take a byte |
| `0xffff000c` | write | `DataOutReg`: bits 7:0 are sent |

* **The instruction memory is write-only on the data port.** Software loads a
  program into it with ordinary stores. Only the fetch stage reads it. A load
  from its range returns zero.
* **Other protected accesses.** A store to a read-only register does nothing.
  A load from an unmapped address returns zero.
* **Synchronous reads.** All memories read synchronously, and so do the serial
  registers. Each device registers its read data on edge 3. `addr_decode`
  remembers which device was read and muxes its data onto `MemoryReadData`
  during M.
* **Assertions.** In `addr_decode`, assertions flag misaligned accesses and
  any cycle that reads and writes at once.

The serial transceiver itself (baud-rate generator, shift registers) is not
part of this RTL. `serial_mmio` holds one received byte and one byte to send.
It talks to a transceiver through two valid/ready byte streams, which
`mips150_system` brings out as ports:
`rx_data`/`rx_valid`/`rx_ready` and `tx_data`/`tx_valid`/`tx_ready`.

The full computer this system belongs to also has an Ethernet interface and a
video interface with a 2-D graphics accelerator. No addresses or behaviour are
defined for them yet, so they are not included.

## Files

| file | what it is |
|---|---|
| `rtl/mips150_pkg.sv` | opcodes, funct codes, control struct `ctrl_t`, ALU/branch/write-back enums, memory map constants |
| `rtl/mips150_system.sv` | **top**: processor + memories + serial registers + decoder |
| `rtl/mips150_cpu.sv` | the three-stage pipeline, bypass and PC logic |
| `rtl/decoder.sv` | instruction word to `ctrl_t` |
| `rtl/alu.sv` | add/sub, logic, set-less-than, shifts, LUI |
| `rtl/branch_unit.sv` | branch conditions, branch/jump targets, link value |
| `rtl/regfile.sv` | 32 x 32 registers, 2 read ports, 1 write port, r0 = 0 |
| `rtl/imem.sv` | dual-port instruction memory (sync fetch read, bus write) |
| `rtl/dmem.sv` | single-port sync-read data memory (used for heap and stack) |
| `rtl/addr_decode.sv` | address decode and read-data mux |
| `rtl/serial_mmio.sv` | the four serial-interface registers |

The memory sizes are parameters: `IMEM_W`, `HEAP_W` and `STACK_W` on
`mips150_system` give log2 of the number of words. Their defaults are the sizes
in the table above. If you change a size, change the matching range decode too:
`addr_decode` compares all address bits above the memory's own.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* **Unit tests.**
  * `tb_alu`, `tb_branch_unit`, `tb_decoder`, `tb_regfile`, `tb_imem`,
    `tb_dmem`: random and corner-case stimulus against expected values
    computed inside the testbench.
  * `tb_addr_decode`: every range, its neighbours and unmapped space.
  * `tb_serial_mmio`: random receive gaps and transmit back-pressure.
* **`tb/mips_tb_pkg.sv`.** Holds instruction encoders, an instruction-level
  reference model (`mips_iss`, with both delay slots) and a random program
  generator.
  * The generated programs mix ALU and memory instructions, every branch
    kind, `J`, `JAL`, `JR` and `JALR`, and stores into the instruction memory.
  * Every branch lands on a forward boundary, so each program ends in a
    `halt: j halt` loop.
* **`tb_mips150_cpu`.** Runs random programs on the processor alone, with a
  testbench memory. It compares all registers and the touched memory with the
  reference model.
  * It checks CPI = 1: the halt loop must reach X after exactly as many cycles
    as the model executed instructions.
  * It counts bypasses, load-delay-slot cases, taken and untaken branches,
    jumps and links, and fails if any of them never happened.
* **`tb_mips150_system`.** The end-to-end test at the default sizes. It runs a
  directed serial-register program, then random programs through the real
  memories.
  * It also counts instruction-memory stores, heap and stack accesses, serial
    reads and writes, both handshakes and dropped read-only writes.
* **`tb_mips150_programs`.** Hand-written programs: loops with backward
  branches, nested calls that save the return address on the stack, and a
  polling serial echo.

To run one with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
  rtl/mips150_pkg.sv tb/mips_tb_pkg.sv tb/tb_mips150_system.sv \
  --top-module tb_mips150_system -o sim
./obj_dir/sim
```

For unit testbenches, drop `tb/mips_tb_pkg.sv` and change the top name.
Verilator has two-state logic. The register file and the memories are not
reset, so the testbenches write what they later read.

## Choices made in this design, and where it may differ

* **Stage contents.** Only three things are fixed: three stages, the clock
  edges on which fetch, data-memory access and register write-back begin, and
  CPI = 1. What happens inside X (decode, register read, bypass, ALU, branch)
  is this design's choice.
* **No load bypass.** Software must respect the load delay slot. A compiler
  for MIPS-I does this by default.
* **Jump targets.** `J` and `JAL` take their upper four address bits from
  PC + 4, the delay-slot address, as standard MIPS does. Using the jump's own
  PC would differ only for a jump in the last word of a 256 MiB region.
* **Reset.** It is synchronous and active high. The start address is
  `0x00400000`, the start of user code.
* **Serial register bits.** The bit layout (ready flag in bit 0, byte in bits
  7:0), reading `DataInReg` to empty the buffer, and dropping writes while
  busy are all this design's choices. So is the byte-stream interface to the
  transceiver.
* **Undefined reads.** Reads of write-only or unmapped addresses return zero.
  The map leaves their value undefined.
* **Heap and stack.** They are two separate memories.
* **Not verified here.** Nothing checks timing at the 50-100 MHz target or the
  FPGA resource use. The memories hold 68 KiB, which is 17 36-Kbit block RAMs
  of the target FPGA.

# MIPS150: a three-stage MIPS processor with a memory-mapped serial console

MIPS150 is a small MIPS computer for an FPGA. A pipelined MIPS-I integer core
runs programs from an on-chip instruction memory. It talks to a host terminal
through a serial line (UART) that software reaches by loading from and storing
to special addresses. The core has three pipeline stages and **never stalls**.
Every hazard is handled by forwarding or by delay slots that the software must
respect. One instruction completes every clock cycle.

This RTL covers the processor, its two memories, and the serial line
interface. The Ethernet and video/2-D graphics devices of the full system are
not included. Their memory-mapped accesses come out of the top module on a
plain bus port (`ext_io_*`), so they can be added later.

## The pipeline

| Stage | Work done | Registered at the end of the stage |
|---|---|---|
| **I** (fetch) | The PC register addresses the instruction memory. | The instruction, in the memory's output register (the *instruction register*); the PC of that instruction (`pc_x`). |
| **X** (execute) | Decode; register-file read; forwarding; ALU; branch compare and target; data-memory address, store data and byte strobes driven onto the bus. | The result (`m_result`), its destination register and the load format. The data memory and the I/O devices sample the bus on this same edge. |
| **M** (memory) | Load data comes back from memory or from a device, and is byte/halfword aligned and extended. | Result written into the register file. |

The instruction and data memories are synchronous block RAMs. Their address
registers sit on the stage boundaries, so:

* the edge that ends I captures the PC into the instruction memory, and the
  instruction is available throughout X;
* the edge that ends X (the "leading edge of M") performs stores and captures
  load addresses, and the load data is available throughout M;
* the edge that ends M writes the register file.

### Hazards, and why there are no stalls

**Branch delay slot (one instruction).** Branches and jumps resolve in X. At
that point the next sequential instruction is already being fetched. That
instruction, the delay slot, always executes. The PC loads the target on the
edge that ends X, so the instruction after the delay slot comes from the
target. Nothing is ever squashed. Branch offsets are relative to the delay
slot address, as in standard MIPS.

```
beq  $1,$2,L   I  X  M
delay slot        I  X  M
L: ...               I  X  M      <- fetched from the target
```

**ALU forwarding.** An instruction in X may read a register that the
instruction ahead of it (now in M) has not yet written. The register file is
written only at the end of M. `mips150_forward_unit` detects this case and
selects the M-stage result (`m_result`) instead of the register-file output.
It does this separately for `rs` and `rt`, so the forwarded value also feeds
store data and branch compares. Link values from `JAL`/`JALR` (PC+8) are
forwarded the same way.

**Load delay slot (one instruction).** Load data only exists during M, too late
for the instruction right behind the load. That instruction reads the
register's *old* value. Loads are never forwarded. The instruction two behind
the load reads the register file in the cycle after the write edge, so it sees
the new value without any bypass. Software (or a compiler) must keep the slot
free of uses of the loaded register, or use it on purpose. The end-to-end test
does the latter.

Because of these rules, a loop written for a non-pipelined simulator needs a
`nop` (or useful work) after each load that feeds the next instruction, and
after each branch.

### Instruction set

Only the common MIPS-I integer instructions are decoded (`mips150_decoder`):

* R-type: `SLL SRL SRA SLLV SRLV SRAV JR JALR ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU`
* I-type: `ADDI ADDIU SLTI SLTIU ANDI ORI XORI LUI LB LH LW LBU LHU SB SH SW BEQ BNE BLEZ BGTZ BLTZ BGEZ`
* J-type: `J JAL`

The following are **not** implemented:

* multiply/divide (`HI`/`LO`);
* coprocessor 0, exceptions and interrupts;
* `BLTZAL`/`BGEZAL`;
* unaligned-access instructions.

`ADD`, `ADDI` and `SUB` wrap around exactly like their unsigned forms. Any
undefined encoding executes as a no-op. After reset the PC is 0 and all
registers are zero.

Memory is little-endian: byte lane 0 (bits 7:0) is the lowest address. An
unaligned word or halfword access ignores the low address bits.

## Address map and the serial line registers

| Address | Device |
|---|---|
| `0x0000_0000` - `0xFFFE_FFFF` | data memory (4096 words; aliases every 16 KB) |
| `0xFFFF_0000` | receiver control: bit 0 = Ready (a character is waiting) |
| `0xFFFF_0004` | receiver data: bits 7:0 = last character, other bits 0; **reading clears Ready** |
| `0xFFFF_0008` | transmitter control: bit 0 = Ready (can accept a character) |
| `0xFFFF_000C` | transmitter data: storing bits 7:0 sends the character |
| `0xFFFF_0010` - `0xFFFF_FFFF` | `ext_io_*` port for further devices |

Software polls a control register until Ready is 1, then touches the data
register:

```
        lui   $t0, 0xffff
wait:   lw    $t1, 0($t0)      # receiver control
        nop                    # load delay slot
        andi  $t1, $t1, 1
        beq   $t1, $zero, wait
        nop                    # branch delay slot
        lw    $v0, 4($t0)      # character; Ready drops
```

Output works the same way with offsets 8 and 12. The register reads are
registered on the same edge as data-memory reads, so a device answer arrives in
M like any load.

Two edge cases:

* If a character arrives before the previous one was read, the new character
  replaces it.
* A store to the transmitter data register while Ready is 0 is dropped.

The interrupt-enable bit of the classic layout is not implemented.

### Serial frame

`uart_tx` and `uart_rx` use 8N1 framing on a line that idles high. A frame is:

1. a low start bit;
2. data bits 0 to 7, least significant first;
3. a high stop bit.

For example, ASCII `K` (0x4B) goes out as `0 1 1 0 1 0 0 1 0 1`.

A bit lasts `CLKS_PER_BIT` clocks (default 434, which is 115200 baud at
50 MHz), so a frame takes exactly `10*CLKS_PER_BIT` clocks.

The receiver:

* synchronises the input with two flip-flops;
* re-checks the start bit half a bit time after the falling edge;
* samples each bit once, in its middle;
* drops a frame whose stop bit is low.

The RS-232 level shifter between these pins and the connector is a board part
and is not modelled.

## Modules

| Module | Role |
|---|---|
| `mips150_pkg` | opcodes, ALU/branch enums, control-word struct, I/O addresses |
| `mips150_top` | system: core, memories, address decode, serial interface, `ext_io` port |
| `mips150_cpu` | the three-stage core |
| `mips150_decoder` | instruction to control word |
| `mips150_regfile` | 32x32 registers, 2 combinational reads, write at end of M |
| `mips150_alu` | add/sub/logic/compare/shift/LUI |
| `mips150_branch_unit` | branch condition and next PC |
| `mips150_forward_unit` | M-to-X result forwarding select |
| `mips150_imem` | instruction RAM, output register = instruction register, load port |
| `mips150_dmem` | data RAM with byte write enables |
| `uart_cpu_adapter` | the four serial registers |
| `uart_tx`, `uart_rx` | 8N1 serial transmitter and receiver |

### Top-level ports of `mips150_top`

| Port | Description |
|---|---|
| `clk`, `rst` | Rising-edge clock; synchronous, active-high reset. |
| `serial_in`, `serial_out` | Logic-level serial lines. |
| `imem_load_we`, `imem_load_addr`, `imem_load_data` | Write instruction words by word address. Load the program while `rst` is high; the core starts at address 0 when `rst` falls. |
| `ext_io_addr`, `ext_io_re`, `ext_io_we`, `ext_io_wdata` | Request for addresses `0xFFFF0010` and up. Valid in the core's X stage; sample it on the rising edge. |
| `ext_io_rdata` | Must hold the answer in the following cycle. |

Parameters:

* `IMEM_WORDS` and `DMEM_WORDS`: default 4096 each;
* `CLKS_PER_BIT`: default 434.

## Choices made in this design

The project outline fixes the following, and the RTL follows it:

* the stages and hazard rules;
* the register-file write timing;
* the serial register layout and its Ready semantics;
* the serial frame format;
* rising-edge-only clocking.

Everything else is this design's own choice:

* the exact instruction subset;
* memory sizes and the program-loading port;
* the bit rate and the 50 MHz clock assumption;
* endianness;
* reset values;
* the overrun and busy-write behaviour of the serial registers;
* the `ext_io` port.

No timing closure has been attempted. The outline targets 50-100 MHz. The
longest path runs from the instruction register through decode, the forwarding
mux, the ALU and the branch compare into the PC and the memory address
registers.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`. `tb/mips_asm_pkg.sv` is a small assembler
(one function per instruction) used to write test programs.

Example with Verilator 5:

```
verilator --binary --timing --top-module tb_mips150_top -y rtl -y tb \
    rtl/mips150_pkg.sv tb/mips_asm_pkg.sv tb/tb_mips150_top.sv
./obj_dir/Vtb_mips150_top
```

Other testbenches build the same way with their own top module name.

* **`tb_mips150_cpu`** runs a directed program through the core. It covers
  forwarding into operands, store data and branches; both delay slots;
  loops; `JAL`/`JR`; shifts; and sub-word loads and stores. It checks all 31
  registers. It also checks that the final store happens on exactly the clock
  edge that one instruction per cycle predicts.
* **`tb_mips150_top`** runs the whole system at its default sizes. A polling
  echo program answers four characters sent over `serial_in`, including `K`.
  It exercises the external device port and uses the load delay slot on
  purpose. The testbench checks:
  * the echoed frames;
  * the data memory contents;
  * that the second echo starts one frame time after the first.

  It also counts forwarding, taken branches, load delay slot uses, polling of
  an empty receiver and of a busy transmitter, and device accesses. It fails
  if any of these never happened.

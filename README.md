# A 32-bit bit-and-word processor for PLC sequence control

A programmable logic controller runs a ladder program over and over. Each
pass (a *scan*) evaluates thousands of relay contacts and coils: single-bit
reads, ANDs, ORs and writes. Some word arithmetic is mixed in. A general-purpose
CPU handles this poorly, because every contact costs a load, a mask, a test and
a branch. This design is a coprocessor built for that job. It sits next to a
general-purpose host MPU. The host owns communication, floating point and the
I/O cards. This processor runs the scan.

The main ideas:

* **Harvard buses.** Instructions come over a 32-bit program-memory bus
  (1M instructions, 20-bit PC). Relay bits and word devices live behind a
  separate 16-bit data-memory bus (512K words). The next instruction is
  fetched in the last cycle of the current one, so fetch never costs time.
* **One fixed 32-bit instruction format family.** Every field sits at a fixed
  position, so decoding is one level of field extraction.
* **Two ALUs.** The bit ALU is a one-bit accumulator with the stacks a ladder
  diagram needs. The word ALU does binary and BCD arithmetic, logic, rotates
  and shifts. The add/shift path is 32 bits wide; the multiply/divide path is
  64 bits wide. It works on sixteen 16-bit registers, which pair into 32 bits.
* **Host hand-over.** The host loads memory while the processor is stopped,
  then lowers `HOLD`. The processor raises `GA_RUN`, runs to `END` (or a
  debugger stop) and drops `GA_RUN`, which gives the memories back to the host.

At 40 MHz (25 ns per clock), an internal bit operation takes 75 ns and a
contact read 100 ns. A rising/falling-edge contact takes 175 ns.

## Block structure

```
            HOLD ─► plc_clk_ctrl ─► GA_RUN
                         │ start/stop
PA,PI ◄► plc_pm_if ◄► plc_pc_ir ─► plc_decoder ─► plc_seq ◄──► plc_balu
                                                    │  ▲
                               plc_regs ◄─► plc_walu│  │ irq
DA,DD ◄► plc_dm_if ◄────────────────────────────────┘  plc_timer_int
                                                    plc_debug (halt)
CD,CA,CS ◄► plc_cs_block ─► plc_cpu_if ─► plc_io_if ─► IO1/IO2/EXT1/EXT2_CS
```

| file | block |
|---|---|
| `rtl/plc_pkg.sv` | widths, opcode enums, decoded control struct, BCD conversion functions |
| `rtl/plc_asic.sv` | top level, the chip pins |
| `rtl/plc_clk_ctrl.sv` | HOLD synchroniser, run/stop state, GA_RUN |
| `rtl/plc_pc_ir.sv` | 20-bit PC, 32-bit IR, host write of the PC |
| `rtl/plc_decoder.sv` | instruction fields and class |
| `rtl/plc_seq.sv` | multi-cycle sequencer: memory cycles, flow, interrupt entry, END |
| `rtl/plc_balu.sv` | bit accumulator, block/MPS/master-control stacks, edges, step gate |
| `rtl/plc_walu.sv` | word ALU (combinational) |
| `rtl/plc_regs.sv` | R0..R15, flags, two stack registers, host port |
| `rtl/plc_pm_if.sv` | program-memory bus: two 16-bit SRAMs with separate high/low strobes |
| `rtl/plc_dm_if.sv` | data-memory bus: 8-bit or 16-bit memory organisation |
| `rtl/plc_timer_int.sv` | 32-bit reloading timer, interrupt request |
| `rtl/plc_debug.sv` | 1-step, PC break, DM break |
| `rtl/plc_cs_block.sv` | host chip-select decoding, CS_SEL modes |
| `rtl/plc_cpu_if.sv` | host bus, debug/control register file |
| `rtl/plc_io_if.sv` | chip selects for the I/O and extension cards |

Each file opens with a comment giving its timing and interface. That comment
also says which parts follow the original specification and which are choices
made here.

## Instruction word

Bit 31 is a spare "p" bit. A program compiler can put parity or step
information there; the hardware ignores it. Bit 30 selects one of two
instruction families:

```
bit, direct     31 p | 30=0 | 29=0 | 28..23 op | 22..4 word address | 3..0 bit
bit, indirect   31 p | 30=0 | 29=1 | 28..23 op | 22..8 unused | 7..4 Rd | 3..0 Rs
word ld/st      31 p | 30=1 | 29..24 kind | 23..20 reg | 19..0 byte address
word register   31 p | 30=1 | 29..24 kind | 23..20 Rs | 19..16 Rd | 15..0 sub-op (ALU op in 4..0)
jump/call       31 p | 30=1 | 29..24 kind | 23..20 (unused) | 19..0 target
```

An indirect bit operand uses Rd for the data-memory word address and Rs[3:0]
for the bit number. For word load and store, IR[19:1] is the data-memory word
address. A 32-bit operand occupies two consecutive words, low half first, and
register pair Rn+1:Rn.

The opcode values are defined in `plc_pkg.sv`; they are this design's own.

* **Bit operations:** LD LDI AND ANI OR ORI XOR, LDP LDF ANDP ANDF ORP ORF,
  PLS PLF, OUT SET RST, ANB ORB, MPS MRD MPP, INV, MC MCR, STL RETS.
* **Word kinds:** LD/LDD, ST/STD, REG16/REG32 (ALU ops), JMP, CJ (jump if the
  bit accumulator is 1), CALL, RET, IRET, END.
* **ALU ops:** MOV ADD SUB MUL DIV AND OR XOR BCD BIN BADD BSUB BMUL BDIV ROL
  ROR RCL RCR SHL SHR.

An undefined opcode runs as a no-op and sets the *illegal* status bit.

`tb/tb_asm_pkg.sv` contains small encoder functions (`bi`, `bii`, `bx`, `wm`,
`wr`). These are the easiest way to write test programs.

## Bit ALU semantics

* **Block stack.** Every LD-type instruction pushes the old accumulator. ANB
  and ORB pop it and combine it with the accumulator (series or parallel
  blocks).
* **MPS stack.** MPS pushes the accumulator, MRD copies the top back, and MPP
  pops it.
* **MC/MCR.** These open and close master-control levels. Each level holds the
  accumulator ANDed with the enable of the enclosing level.
* **Step controller.** STL loads a step-relay bit as the step enable; RETS
  sets it again.
* **Coil gating.** OUT, SET, RST, PLS and PLF take effect only while both the
  master-control enable and the step enable are 1. Otherwise OUT writes 0 and
  SET/RST leave the bit unchanged.
* **Scan reset.** The stacks and enables clear at END.
* **Stack depths.** The block stack holds 8 entries, the MPS stack 16 and MC
  8 levels (`plc_balu` parameters). Overflow of the block and MPS stacks
  wraps around.

Edge instructions need the bit's value from the previous scan. Each bit has a
**history bit** at the same position in the word at `address XOR HIST_XOR`
(default `19'h40000`, the upper half of data memory).

* LDP/ANDP/ORP see a rising edge; LDF/ANDF/ORF see a falling edge. After
  either, the history takes the current value.
* PLS/PLF store the accumulator as history. They set the target bit for one
  scan on a rising or falling edge of the accumulator.

A program must therefore keep its edge-tested bits in the lower half of data
memory.

## Cycle timing

One clock is 25 ns at 40 MHz. `plc_seq` walks DEC → OPR → (memory cycles) →
EXE. The next instruction is fetched in EXE.

| instructions | cycles | time |
|---|---|---|
| ANB ORB MPS MRD MPP INV MC MCR RETS NOP, word ALU ops, JMP/CJ/CALL/RET/IRET/END | 3 | 75 ns |
| LD LDI AND ANI OR ORI XOR STL (one read) | 4 | 100 ns |
| word LD / ST (16 bit) | 4 | 100 ns |
| word LDD / STD (32 bit) | 5 | 125 ns |
| OUT SET RST (read-modify-write) | 5 | 125 ns |
| LDP LDF ANDP ANDF ORP ORF (read bit, read history, write history) | 7 | 175 ns |
| PLS PLF (read target, read history, write both) | 8 | 200 ns |

The first instruction of a run costs one more fetch cycle. The word ALU is
combinational and finishes within one clock, including 32×32 multiply and
64-bit divide. This is simple to follow but is the critical path of the
design. A pipelined or iterative divider would be the first thing to change
for a real clock target.

## Running a scan from the host

The host bus is `CD[15:0]`, `CA[20:0]` (a half-word address), `CS0-`..`CS3-`,
`C_RD-`, `C_WR-`. The strobes are sampled on the processor clock.
`C_RD_INV` is high while the host reads and sets the direction of an external
bus buffer.

With `CS_SEL = 0`, the four chip selects choose the region:

* `CS0-` program memory (half-word address; bit 0 = 0 is the low half)
* `CS1-` data memory
* `CS2-` internal registers
* `CS3-` I/O chip selects: `CA[17:16]` = 0/1/2/3 drives `IO1_CS-`, `IO2_CS-`,
  `EXT1_CS-`, `EXT2_CS-`

With `CS_SEL = 1`, only `CS0-` is used and `CA` is decoded inside the chip:

* `CA[20]=0` program memory (lower 512K instructions only)
* `CA[20:19]=10` data memory
* `CA[20:18]=110` registers
* `CA[20:18]=111` I/O

Program and data memory can only be reached from the host while `GA_RUN` is
low.

Internal registers (`CS2-` region, word offsets):

| offset | register |
|---|---|
| 0 | CTRL: [0] 1-step, [1] PC break, [2] DM break, [3] timer enable, [4] timer interrupt enable |
| 1 | STATUS: [0] running, [1] scan ended, [2] step stop, [3] PC-break hit, [4] DM-break hit, [5] timer pending, [6] bit accumulator, [7] illegal opcode. Any write clears [1]–[4] and [7] |
| 2, 3 | PC break address |
| 4, 5 | DM break word address |
| 6, 7 | timer reload value (32 bit) |
| 8, 9 | PC (writable while stopped) |
| 10 | word flags {sign, zero, carry} |
| 11, 12 | timer count |
| 16–31 | R0–R15 |

A scan runs as follows:

1. The host loads the program and data.
2. The host lowers `HOLD`. After a two-flop synchroniser, the falling edge
   starts the processor and `GA_RUN` rises three clocks later.
3. The processor runs until one of these happens: `END` (PC returns to 0 and
   STATUS[1] is set), a debugger stop, or `HOLD` going high again. Every stop
   happens at an instruction boundary.
4. `GA_RUN` falls and the host reads the results.

A new falling edge of `HOLD` starts the next scan.

### Debugger and timer

* **1-step:** the processor stops after each instruction.
* **PC break:** the processor stops *before* executing the instruction at the
  break address.
* **DM break:** the processor stops *after* the instruction that read or wrote
  the break word.

The timer counts clocks. It raises a request every `reload` clocks when
enabled. At an instruction boundary, the sequencer then saves the next PC in
stack register 1 and jumps to `ISR_ADDR` (default `20'hFF000`). `IRET`
returns. Interrupts do not nest and are not taken at `END` or `CALL`. `CALL`
uses stack register 0, so calls do not nest either.

### Data-memory organisation

`DM_16BIT = 1` selects one 16-bit SRAM: both write strobes pulse, and `LB-`/
`UB-` select the bytes. `DM_16BIT = 0` selects two 8-bit SRAMs with their own
`DM_WRL-`/`DM_WRH-` strobes, with `LB-`/`UB-` held inactive. An access takes
one clock either way. Program memory is two 16-bit SRAMs: they share `PM_RD-`
and have separate chip selects and write strobes for the low and high half.

## Where this design departs from, or adds to, the original specification

* **Opcodes and register map.** Opcode values, the host register map and the
  CS_SEL address split are not published; they are defined here.
* **Bit-instruction semantics.** The usual ladder-language meanings are used
  for the listed bit instructions. OUT, SET, RST, STL, RETS and CJ are added
  because a sequence program cannot write coils or branch without them.
* **Edge-history scheme.** The XOR-offset history word is this design's own.
* **PLS/PLF timing.** PLS and PLF take 200 ns rather than the published 175 ns
  for the pulse group, because they write both the target and its history.
* **Word-instruction timing.** Word instructions take 75 ns register to
  register. The original's measured word-instruction times (hundreds of ns to
  tens of µs, including operand transfers) are not reproduced.
* **Memory timing.** Memory accesses take one clock. Board-level 55 ns SRAM
  would need wait states that are not modelled.
* **Clock.** There is no internal clock generator: the design runs directly on
  `CLK`.
* **Reset.** Reset is asynchronous and active low, and clears everything
  except memory.
* **Not part of the RTL.** The host MPU, the SRAMs, level-shifting buffers,
  the reset IC, the serial port and the pads/package are not included. The
  testbenches use small behavioural SRAM models (`tb/tb_pm_sram.sv`,
  `tb/tb_dm_sram.sv`), and host accesses are testbench tasks.

## Simulating

`plc_seq` carries concurrent assertions for the bus rules: at most one
data-memory operation per cycle, program-memory reads only in fetch slots,
and stops only at an instruction boundary. Build with `--assert` to have
them checked.

Every block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The end-to-end test `tb/tb_plc_asic.sv` uses
the top at its default sizes. It runs two scans of a mixed bit/word program
and checks the scan time clock by clock. It also exercises the three debugger
modes, a timer interrupt, the 8-bit data-memory mode and `CS_SEL = 1`. It
counts each mechanism: fetch overlap, pulses, history writes, master control,
step stops, interrupts, hand-overs, 8- and 16-bit accesses, CALL, CJ and I/O
selects.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_plc_asic \
    rtl/plc_pkg.sv tb/tb_asm_pkg.sv rtl/*.sv tb/tb_pm_sram.sv tb/tb_dm_sram.sv \
    tb/tb_plc_asic.sv -o sim && obj_dir/sim
```

For a single block, swap the top module and testbench, and add `-y rtl -y tb`
so that the other files are found automatically:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb --top-module tb_plc_walu \
    rtl/plc_pkg.sv tb/tb_asm_pkg.sv tb/tb_plc_walu.sv -o sim && obj_dir/sim
```

`tb/tb_plc_table2.sv` times every instruction kind of the speed comparison
on the whole chip. It runs eight copies of each instruction between two
scans, observes only the `GA_RUN` pin, and prints the clocks per instruction
next to the published time.

The full-size test simulates in seconds; compiling it takes most of the
time.

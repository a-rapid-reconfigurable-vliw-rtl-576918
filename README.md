# Ternary VLIW co-processor for cycle-based logic emulation

Re-synthesising an FPGA prototype every time a circuit changes is slow. This
design avoids that step. It is a fixed, small processor that *executes* a
gate-level netlist as a program. The circuit being debugged is compiled into
straight-line code, called a *basic block*. One run of the basic block
evaluates every gate once, which is one clock cycle of the emulated circuit.
Changing the circuit means downloading a new program to RAM, not
reconfiguring the chip.

Every signal of the emulated circuit is *ternary*: 0, 1 or X (unknown). X
lets a single run cover inputs that are still unknown or do not matter. It
also shows where uninitialised state leaks into outputs.

The processor is a VLIW (very long instruction word) machine. One ALU
instruction drives four independent two-input ternary ALUs at once. Each ALU
has four 2-bit registers beside it. A result can be written into the register
bank of any of the four ALUs.

## Ternary values and the ALU

Each value takes two bits:

| value | code |
|-------|------|
| 0     | 00   |
| 1     | 11   |
| X     | 01   |

With this code, bitwise AND and OR of the codes give exactly three-valued
logic. For example, X & 0 = 00, X & 1 = 01 and X | 1 = 11. Complement cannot
be bitwise, because X must stay X. It is a small table instead: 00 → 11,
11 → 00, anything else → 01. XOR and implication are built from AND, OR and
this NOT:

- XOR = (A & !B) | (!A & B)
- implication = !A | B

A plain bitwise XOR of the codes would be wrong. It gives the unused code 10
for X ^ 1, and it gives 0 for X ^ X.

The ALU (`ternary_alu`) has a 3-bit function field:

| code | function | code | function |
|------|----------|------|----------|
| 0    | NOP (no write) | 4 | IMP: !A \| B |
| 1    | AND      | 5    | NAND     |
| 2    | OR       | 6    | NOR      |
| 3    | XOR      | 7    | XNOR     |

The mirrored implication !B | A needs no code of its own. The compiler gets
it by placing the operands in the other order. The complement of the
implication, the identities and the constants take either two instructions or
the zeros/ones instructions. Input code 10 never comes out of an ALU. If it
is loaded from memory, the ALU reads it as X.

## Registers and interconnect

This is the part that needs the most care when writing code for the machine.

There are 16 ternary registers, R0–R15. ALU *g* (g = 0…3) owns registers
R(4g)…R(4g+3):

```
           operand A mux        operand B mux
ALU g :  R(4g+0) | R(4g+2)    R(4g+1) | R(4g+3)     -> result
result -> demux g -> R(4*dst + g)      (dst = 0..3)
```

Three rules follow from this wiring:

- **Operand placement.** Operand A must sit in slot 0 or slot 2 of the ALU's
  own group. Operand B must sit in slot 1 or slot 3. Each selector is a single
  bit.
- **Where results go.** ALU *g* always writes slot *g*, in the group named by
  `dst`. For example, ALU 0 can write R0, R4, R8 or R12, and ALU 3 can write
  R3, R7, R11 or R15. Two ALUs never write the same register, so there are no
  write conflicts inside a bundle.
- **Forwarding.** All operands are read, and all results written, in the same
  clock edge. The next bundle sees the results. A value made by ALU *g* becomes
  operand A of ALU *j* when g is 0 or 2. It becomes operand B when g is 1 or 3.

The scheduler therefore has to choose which ALU computes each value. That
choice fixes which operand port the value can later feed.

The 16 × 2 bits of the registers equal the 32 bits of the register
*Reserved* (regR). The two moves transfer all of them at once, with
regR[2k+1:2k] ↔ Rk. regR is the only path between the registers and memory.
A typical basic block therefore runs:

1. load the input word into regR;
2. `mov regR -> regALU`;
3. the ALU bundles;
4. `mov regALU -> regR`;
5. store the result word;
6. halt.

At reset, regR and all sixteen registers hold X. They keep their values from
one basic block to the next.

## Instruction set and word format

Instructions are 32-bit words. They live in the same memory as the data.

```
ALU bundle      [31]=1  [30:28] reserved  [27:21] slot3  [20:14] slot2  [13:7] slot1  [6:0] slot0
   slot g       [6:4] func   [3] sel_a   [2] sel_b   [1:0] dst
other           [31]=0  [30:27] opcode   [26:0] word address (load/store only)
```

| opcode | instruction | effect |
|--------|-------------|--------|
| 0  | nop | — |
| 1  | load a | regR ← mem[a] |
| 2  | store a | mem[a] ← regR |
| 3  | mov regR → regALU | Rk ← regR[2k+1:2k] for all k |
| 4  | mov regALU → regR | regR[2k+1:2k] ← Rk for all k |
| 5  | zeros regR | regR ← 0…0 |
| 6  | zeros regALU | all Rk ← 0 |
| 7  | ones regR | regR ← 1…1 |
| 8  | ones regALU | all Rk ← 1 |
| 15 | halt | end of basic block, signal the host |

Opcodes 9–14 act as nop, and the decoder flags them as illegal. There are no
branches. A basic block is straight-line code by definition.

The `vliw_pkg` package provides builders for these words: `enc_op`, `enc_alu`
and `mk_slot`.

## Timing

Instructions and data share one memory port. That memory has one cycle of
read latency.

- While the co-processor is running, it fetches the word at `pc` every cycle.
  The fetched word is decoded and executed in the next cycle, while the
  following word is fetched.
- A load or a store needs the memory port in the cycle it executes. That
  cycle's fetch is held back, which costs one extra cycle. A load's data lands
  in regR one cycle later.
- A halt stops fetching.

| instruction | cycles |
|-------------|--------|
| ALU bundle, move, zeros/ones, nop, halt | 1 |
| load, store | 2 |

A run, counted from the start pulse until `busy` falls, lasts:

    1 + (number of instructions, halt included) + (number of loads and stores)

## Board memory and the host

`board_memory` models the emulation board's compute memory. It is four
byte-wide SRAMs in two banks: bank 0 holds bits 15:0 and bank 1 holds bits
31:16. Each bank has its own address/data multiplexer, which connects it
either to the co-processor or to the host side.

The default `ADDR_W = 17` gives 128K words of 32 bits. That matches 128K×8
chips. Boards that carry the largest supported chips (512K×8) need
`ADDR_W = 19`.

The SRAMs are modelled as synchronous RAMs, so reads have one cycle of
latency. Writes are write-first.

`emu_system` is the top. It gives both banks to the host whenever the
co-processor is not busy. The host runs one emulated clock cycle as follows:

1. **Download.** While `busy` is low, write the program and the input words
   (`host_we`, `host_addr`, `host_wdata`). An assertion fires if the host
   writes while the co-processor is busy.
2. **Compute.** Pulse `host_start` for one cycle, with `host_start_pc` set to
   the first instruction. `busy` rises on the next cycle.
3. **Halt.** The halt instruction drops `busy` and raises `halt`. `halt` stays
   high until the next start.
4. **Upload.** Put an address on `host_addr`. The word appears on
   `host_rdata` one cycle later.
5. **Restart.** The next `host_start` starts the next emulated cycle. To carry
   the state of emulated flip-flops from one cycle to the next, store it to
   memory and load it back.

On the real board this host port is a PCI interface chip. That chip is not
part of this RTL, so the port here is a plain synchronous interface.

## Example: the full adder

`tb/tb_emu_system.sv` emulates the full adder below:

- aux1 = A^B, S = aux1^CI
- aux2 = A|B, aux3 = aux2&CI, aux5 = A&B
- CO = aux5|aux3

The input word copies A, B and CI into the registers that the schedule reads:
R0=A, R1=B, R4=A, R5=B, R6=CI, R8=A, R9=B, R13=CI.

| bundle | ALU0 | ALU1 | ALU2 | ALU3 |
|--------|------|------|------|------|
| 1 | xor R0,R1 → R12 (aux1) | or R4,R5 → R5 (aux2) | and R8,R9 → R2 (aux5) | – |
| 2 | – | and R6,R5 → R1 (aux3) | – | xor R12,R13 → R15 (S) |
| 3 | or R2,R1 → R0 (CO) | – | – | – |

The whole basic block is 13 words long. It runs in 18 cycles, and that
includes extra checks of zeros/ones. The testbench runs all 27 ternary input
combinations. It checks S and CO against three-valued reference logic,
including the cases where X reaches an output. It also checks the cycle count
of every run.

## Example: a sequential circuit

`tb/tb_emu_counter.sv` emulates a 2-bit counter with synchronous reset and
enable. Each run of the basic block is one clock cycle of the counter. Its
flip-flop state goes out through memory and comes back in:

1. The host uploads the next-state word.
2. It merges that state with the next reset and enable inputs.
3. It downloads the merged word for the next run.

The counter's state starts as X. It stays X until the first reset, which
clears it. An enable set to X makes the state unknown again, until the next
reset. The schedule needs three ALU bundles, and each run takes 11 cycles.

## Modules

| file | role |
|------|------|
| `rtl/vliw_pkg.sv` | ternary type and constants, opcodes, slot and control structs, encoders |
| `rtl/ternary_alu.sv` | one ternary ALU (combinational) |
| `rtl/alu_block.sv` | four ALUs, R0–R15, operand muxes, result demuxes |
| `rtl/instr_decoder.sv` | instruction word → control bundle |
| `rtl/reg_reserved.sv` | 32-bit regR |
| `rtl/vliw_fetch.sv` | pc, run/halt state, sharing of the memory port between fetch and load/store |
| `rtl/vliw_coproc.sv` | the co-processor: the four blocks above |
| `rtl/sram_chip.sv` | one byte-wide synchronous SRAM |
| `rtl/board_memory.sv` | two banks of two SRAMs with host/co-processor multiplexing |
| `rtl/emu_system.sv` | top: co-processor + board memory + host port |

All sequential logic uses one clock, `clk`, and an asynchronous active-low
reset, `rst_n`. The memory arrays are not reset.

## Simulating

Each testbench checks itself. At the end it prints
`TB_RESULT checks=N failures=M`. The `tb/tern_ref_pkg.sv` package holds
reference three-valued logic, written on symbolic values, for the
testbenches. For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/vliw_pkg.sv tb/tern_ref_pkg.sv tb/tb_emu_system.sv \
  rtl/emu_system.sv rtl/vliw_coproc.sv rtl/vliw_fetch.sv rtl/instr_decoder.sv \
  rtl/alu_block.sv rtl/ternary_alu.sv rtl/reg_reserved.sv \
  rtl/board_memory.sv rtl/sram_chip.sv \
  --top-module tb_emu_system -Mdir obj_emu
./obj_emu/Vtb_emu_system
```

| testbench | what it checks |
|-----------|----------------|
| `tb_ternary_alu` | every function against every pair of input codes |
| `tb_alu_block` | random bundles, loads, zeros and ones against a register model |
| `tb_instr_decoder` | every opcode, and random bundles |
| `tb_reg_reserved` | random operation sequences |
| `tb_vliw_fetch` | fetch order, port sharing, load-data timing, run length |
| `tb_board_memory` | host and co-processor accesses, including split bank ownership |
| `tb_vliw_coproc` | random basic blocks against an instruction-level model: memory image and cycle count |
| `tb_emu_system` | the full adder at the default size |
| `tb_emu_counter` | a sequential circuit over 40 emulated clock cycles (see below) |

All of them finish in seconds.

## What follows the original design and what is this implementation's own

**Taken from the original design:**

- four two-input ternary ALUs;
- sixteen 2-bit registers wired with operand multiplexers and per-ALU result
  demultiplexers;
- a 32-bit bus and the 32-bit register Reserved;
- the instruction set (load, store, the two moves, zeros/ones on regR and on
  the ALU registers, AND/OR/XOR/implication, halt);
- the ternary code and ternary NOT;
- one memory for both instructions and data;
- the board memory organisation (four byte-wide SRAMs in two banks, each bank
  with its own multiplexer);
- the download / compute / halt / upload / reset protocol with the host.

**Chosen here:**

- **Instruction word layout.** The layout and opcode values are this
  implementation's own. The 7-bit slot fits four slots into one 32-bit word,
  but it leaves room for only 8 function codes. That is why NOT-implication
  has no code of its own.
- **Operand multiplexers.** The A and B multiplexers each take two inputs: R(4g)/R(4g+2)
  and R(4g+1)/R(4g+3). This is read from the interconnect drawing.
- **Moves.** The moves copy all sixteen registers at once.
- **XOR and implication.** These are built to be correct three-valued logic,
  not bitwise operations on the codes.
- **Code 10.** An input carrying code 10 is read as X.
- **Reset values.** Everything resets to X.
- **Timing.** The fetch/execute overlap and the cycle counts are this
  implementation's own.
- **SRAM model.** The SRAMs are synchronous, where the board's parts are
  asynchronous.
- **Host side.** A plain synchronous port stands in for the PCI interface.

**Not modelled:**

- the host computer;
- the PCI interface chip;
- the board's clock generator and bus switch chips;
- the compiler that turns a netlist into basic blocks.

# Small building blocks of a student computer: two CPU cores, memories and glue logic

This is a set of small synthesizable designs. Together they cover the parts a
student-built FPGA computer is made from:

- the front end of a **five-stage pipelined CPU**: fetch and register read, with a relative jump and NOP injection;
- a **microprogrammed CPU** that moves data between registers over one shared bus;
- a **three-port register file** with write-through bypass, as used in a pipeline;
- the two kinds of **FPGA RAM**: LUT RAM with combinational read, and block RAM with registered read;
- some **glue circuits**:
  - a decade counter;
  - a 32-bit parity tree;
  - a synchroniser with a one-pulser that drives an event counter;
  - a multiplexer that has no static hazard.

The designs are independent. The top level, `fo10_top`, places them side by
side on one clock. Each design keeps its own ports, and its port names start
with the design's prefix (`pipe_`, `uprog_`, `rf_`, `lram_`, `bram_`, `cnt_`,
`par_`, `pc_`, `hz_`). All of it is SystemVerilog-2017. Every module has a
self-checking testbench in `tb/`.

## The pipelined CPU front end (`pipe_cpu`, `pipe_pm`, `pipe_pkg`)

The full pipeline has five stages: IF (fetch), RR (register read and jump
target), EXE (ALU), MEM (data memory) and WB (write-back). This RTL builds the
first two stages. These two stages decide which instruction goes down the
pipeline next.

| register | loaded with | meaning |
|---|---|---|
| `PC` | `PC + 1`, or `PC2` when IR2 holds a jump | address being fetched |
| `IR1`, `PC1` | program-memory word at `PC` (or NOP), and `PC` | instruction in RR and its own address |
| `IR2`, `PC2` | `IR1`, and `PC1 + K(IR1)` | instruction leaving RR and the target it would jump to |

The program memory (`pipe_pm`) is 512 x 32 bits with a combinational read.
It is addressed by `PC[8:0]`.

**Instruction word** (`pipe_pkg::instr_t`):

- `op`: bits 31:26, the opcode;
- `operands`: bits 25:11, not decoded by this front end;
- `k`: bits 10:0, the jump constant K, a signed 11-bit value.

`OP_J` (21) is a relative jump, and `OP_NOP` (0) is the all-zero word. Opcodes
1 to 4 are placeholders used by the test program.

**Jump timing is the subtle part.** The jump target is computed while the jump
is in RR, but PC is loaded only one cycle later, when the jump sits in IR2. By
then two more words have been fetched:

1. The word that is already in IR1 when the jump reaches IR2 moves on normally. It is a **delay slot**.
2. The word being fetched in that cycle is replaced by a NOP on its way into IR1. It is **squashed**.

The built-in program shows this:

```
addr 0: 04000000  D1
addr 1: 08000000  D2
addr 2: 540007FE  J 0      (K = 0x7FE = -2, target = 2 + (-2) = 0)
addr 3: 0C000000  D3       delay slot: executed
addr 4: 10000000  D4       squashed: never reaches IR2
```

Edge by edge after reset:

| edge | PC | IR1 | IR2 | PC2 |
|---|---|---|---|---|
| 1 | 1 | D1 | NOP | 0 |
| 2 | 2 | D2 | D1 | 0 |
| 3 | 3 | J | D2 | 1 |
| 4 | 4 | D3 | J | 0 |
| 5 | 0 | NOP (D4 squashed) | D3 | 3 |
| 6 | 1 | D1 | NOP | 4 |

The loop repeats every five cycles. It has one jump, one delay-slot
instruction and one squashed fetch. Reset is synchronous and active high. It
sets PC, PC1 and PC2 to 0 and IR1 and IR2 to NOP.

The EXE, MEM and WB stages are not implemented: there is no ALU, data memory,
IR3/IR4 or write-back path. No instruction set is defined beyond J and NOP.
`IR2` and `PC2` are the outputs where those stages would connect.

## The microprogrammed CPU (`uprog_cpu`, `u_mem`, `p_mem`, `uprog_pkg`)

The CPU has one 16-bit data bus. Every clock cycle, one microword picks a
source register for the bus (TB, "to bus") and a destination register (FB,
"from bus"):

| code | 001 | 010 | 011 | 100 | other |
|---|---|---|---|---|---|
| register | IR | PM(ASR), source only | PC | ASR | bus = 0 |

**Microword layout** (`uprog_pkg::microword_t`), from bit 15 down:

| bits | field | meaning |
|---|---|---|
| 15:14 | ALU | reserved; nothing uses it |
| 13:11 | TB | bus source |
| 10:8 | FB | bus destination |
| 7 | PCsig | 1 increments PC (loading PC from the bus takes priority) |
| 6 | uPCsig | 1: next microaddress is uAddr; 0: it is uPC + 1 |
| 5:0 | uAddr | jump microaddress |

**Memories.** The micro memory has 16 words and the program memory 16 words
of 16 bits. Both have combinational read. An address beyond a table reads 0.

**The fetch microprogram** takes two cycles per instruction:

- `0: ASR := PC`
- `1: IR := PM(ASR), PC := PC + 1, uPC := 0`

After edge 2k, IR holds PM[k-1] and PC = k. Program memory holds `0042` and
`00A0`, then zeros. The core has no execute microcode and no ALU. It only
fetches.

Reset is synchronous and active high. It clears uPC, PC, IR and ASR.

## The three-port register file (`register_file`)

The register file has four 8-bit registers, one clocked write port and two
combinational read ports.

- **Write:** when `w_d` = 1, register `addr_w` loads `data_w` at the clock edge.
- **Read:** `alu_a` normally shows register `addr_a`. It shows `data_w` instead when all three of these hold:
  - `addr_a == addr_w`;
  - `w_d` = 1;
  - the read flag `r_a` = 1.

  `alu_b` works the same way with `addr_b` and `r_b`.

The bypass lets the RR stage see the value that WB is writing in the same
cycle, without a stall. A port whose read flag is 0 gets the stored value. The
count and width are parameters (`NREG`, `DW`). The registers have no reset.

In a pipeline, the read addresses come from register fields of IR1, and
`alu_a`/`alu_b` are clocked into operand registers next to IR2. That hookup
is not made here. The pipeline above defines no register fields, and it is 32
bits wide while this file is 8, so the register file stands on its own.

## FPGA memories (`l_ram`, `b_ram`)

Both RAMs are 2048 x 8 bits. At power-up address 0 holds `1F` and every other
address holds 0.

- **`l_ram`** has one port. Writes are clocked (`we`). Reads are combinational, so `data_out` follows `addr` within the cycle. This is the style for small tables, register files and microcode.
- **`b_ram`** has two independent ports, each with a clocked write and a **registered** read.
  - Read data appears one cycle after the address.
  - A port reads the word as it was before the edge (read-first).
  - If both ports write the same address in one cycle, port 2's data is kept.

  This is the style for large buffers such as a frame buffer. The read
  registers have no reset; they are valid after the first clock edge.

## Glue circuits

- **`bcd_counter`**: counts 0..9 and wraps to 0. `clear_n` = 0 clears it at the next edge (synchronous, active low).
- **`parity32`**: `pout` is the XOR of all 32 bits of `x`, so it is 1 for an odd number of ones. The XOR chain is written as a loop.
- **`pulse_counter`**: the input `x` may change at any time.
  - Two flip-flops `a` and `b` synchronise it to the clock.
  - `ep = a & ~b` is high for exactly one cycle after each rising edge of `x`.
  - `ep` enables an 8-bit counter `q`.

  Timing: `x` rises; at the next edge `ep` goes high; at the edge after that
  `q` increments and `ep` falls. The counter width and the synchronous reset
  are choices of this implementation.
- **`hazard_free_mux`**: f = x·y + x'·z + y·z. The third term is logically redundant. It keeps `f` at 1 while `x` switches with `y = z = 1`. Without it, the inverter delay on x' causes a short 0 glitch. A synthesis tool may remove the redundant term; if a glitch-free signal matters, register it.

## What is not here, and choices made

These parts of the system are not built:

- the execute, memory and write-back stages of the pipeline;
- an ALU for either CPU;
- the VGA display design;
- board pin constraints.

Where no specification existed, these choices were made. Each is also noted
in the opening comment of its file:

- **`pipe_cpu`:**
  - PC is 16 bits.
  - The opcode and K field positions and the opcode values are inferred from the encoded `J 0` word.
  - On a squash the whole IR1 word is cleared, not only its opcode.
- **Memories:** addresses beyond the 16-word tables of the microprogrammed CPU read 0.
- **`b_ram`:** the read-first and port-2-wins rules are definitions of this implementation.
- **`pulse_counter`:** it has a synchronous reset and an 8-bit counter.
- **`uprog_cpu`, `pipe_cpu`:** both have observation outputs. Their registers are brought out so the cores can be checked; a core with only clock and reset would have no outputs.

## Assertions

Three concurrent assertions state the rules the designs rely on:

- `pipe_cpu.a_squash`: after a jump reaches IR2, IR1 holds a NOP and PC equals the jump target.
- `uprog_cpu.a_fb_legal` and `a_tb_legal`: program memory is never a bus destination, and the bus source is a known code.
- `pulse_counter.a_single_pulse`: `ep` never stays high for two cycles.

Build with `--assert` to have them checked in simulation.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a watchdog. Testbenches compare against models written in the
testbench itself, or against cycle tables worked out by hand (such as the
table above).

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pipe_pkg.sv rtl/uprog_pkg.sv tb/pipe_cpu_tb.sv \
    --top-module pipe_cpu_tb -o sim
./obj_dir/sim
```

Swap in any other `tb/<name>_tb.sv`. `-Irtl` lets Verilator find the modules
by file name.

`tb/fo10_top_tb.sv` runs every design at once, at full size, for 3000 cycles.
It counts each mechanism and fails if one never happens:

- jump, delay slot and squash;
- microcode fetch;
- bypass on both register-file ports;
- RAM writes;
- block-RAM same-address and write-write clashes;
- counter wrap and clear;
- odd and even parity;
- one-pulses;
- mux switching with `y = z = 1`.

It runs in well under a second.

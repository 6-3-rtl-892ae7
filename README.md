# TOY: a 16-bit teaching computer in two clock phases

TOY is a deliberately small stored-program computer: 256 words of 16-bit
memory, sixteen 16-bit registers, an 8-bit program counter and sixteen
instructions. This RTL builds it the simplest way a processor can be built. It
uses one memory, one ALU and one set of buses. Every instruction takes exactly
two clock cycles. The first is a **fetch** phase that reads the instruction
into the instruction register and steps the PC. The second is an **execute**
phase that moves operands through the datapath and writes the result. A single
1-bit counter tells the two phases apart. A decoder, followed by a handful of
OR terms, produces every control wire.

The design is written in synthesizable SystemVerilog and is checked with
Verilator. Its top module is `toy_machine`.

## Instruction set

An instruction word is `op[15:12] d[11:8] s[7:4] t[3:0]`. The low byte
`addr = {s,t}` doubles as an 8-bit memory address.

| op | name            | effect                         |
|----|-----------------|--------------------------------|
| 0  | halt            | stop                           |
| 1  | add             | R[d] ← R[s] + R[t]             |
| 2  | subtract        | R[d] ← R[s] − R[t]             |
| 3  | and             | R[d] ← R[s] & R[t]             |
| 4  | xor             | R[d] ← R[s] ^ R[t]             |
| 5  | shift left      | R[d] ← R[s] << R[t]            |
| 6  | shift right     | R[d] ← R[s] >> R[t] (arithmetic) |
| 7  | load address    | R[d] ← addr                    |
| 8  | load            | R[d] ← mem[addr]               |
| 9  | store           | mem[addr] ← R[d]               |
| A  | load indirect   | R[d] ← mem[R[t]]               |
| B  | store indirect  | mem[R[t]] ← R[d]               |
| C  | branch zero     | if R[d] = 0: pc ← addr         |
| D  | branch positive | if R[d] > 0: pc ← addr         |
| E  | jump register   | pc ← R[t]   (see below)        |
| F  | jump and link   | R[d] ← pc; pc ← addr           |

R0 always reads as zero, and writes to it are discarded. Arithmetic is 16-bit
two's complement and wraps around. "Positive" means greater than zero as a
signed number.

## The two phases

`toy_phase_counter` is a toggle flip-flop. Its output is `execute`, and its
complement is `fetch`. Each phase lasts one clock cycle. All state changes at
the rising edge that ends a phase:

* **End of fetch:** IR ← mem[pc], pc ← pc + 1. During fetch the memory address
  is the PC, and the PC input multiplexer selects pc + 1.
* **End of execute:** the register file, the memory and (for jumps and taken
  branches) the PC take whatever the control unit enables. During execute the
  memory address comes from the result bus, and the PC input multiplexer
  selects the jump/branch target.

Reads are combinational, and all writes happen at the closing edge. An
instruction such as `R1 ← R1 + R1` therefore reads the old R1 and writes the
new one without a hazard. A machine that runs without stopping completes one
instruction every two cycles. The testbench checks this for every program it
runs.

## The datapath

This section explains how each instruction gets through the datapath. It is
all in `toy_machine.sv`.

```
                 +--------------------- result bus [7:0] (pc target) -----------+
                 |        +------------ result bus [7:0] (data address) --------+
                 v        v                                                     |
  pc+1 --> [PC mux] -> PC --> [addr mux] -> Memory --R Data--> IR (op d s t)    |
                      |                      ^  |                               |
                      +--- pc (jal) ----+    |  +--- load ---+                  |
                                        v    |               v                  |
                    result bus ----> [reg write-data mux] -> Registers          |
                                             |          A addr = s or d         |
                                store data   |          B addr = t              |
                         (A data) -----------+     A data --> ALU in1 --+       |
                                                   B data --> ALU in2 --+       |
                                 A data -> Cond Eval (=0, >0)           v       |
                                          addr {s,t} -> [ALU out mux] --+-------+
```

There are five multiplexers, each with one control wire (the register
write-data multiplexer has two):

| multiplexer              | choices                                           | control wire         |
|--------------------------|---------------------------------------------------|----------------------|
| PC input                 | pc + 1 (0) / low byte of result bus (1)           | `pc_jump` = execute  |
| memory address           | PC / low byte of result bus                       | `mem_addr_bus` = execute |
| register A address       | s / d                                             | `rega_d`             |
| ALU output ("ALU MUX")   | ALU result / `addr` zero-extended to 16 bits      | `alu_mux`            |
| register write data      | result bus / memory read data / PC zero-extended  | `regw_src` (2 bits)  |

The memory's write data is always register A data. The register file's write
address is always `d`, and its B address is always `t`.

Here is how each group of instructions uses the datapath in its execute phase:

* **add … shift right (1–6):** A = R[s] and B = R[t] go through the ALU. The
  result goes over the bus into R[d].
* **load address (7):** the ALU output multiplexer puts `addr` on the bus, and
  the bus is written to R[d].
* **load (8) / store (9):** `addr` on the bus becomes the memory address. A
  load writes the memory data into R[d]. A store switches the A address to `d`
  and writes R[d] into memory.
* **load/store indirect (A/B):** the ALU's "copy input 2" function puts R[t]
  on the bus as the memory address. A store indirect again reads R[d] through
  port A.
* **branches (C/D):** the A address switches to `d`. The condition evaluator
  tests R[d]. The target is `addr`, and the PC loads only if the condition
  holds.
* **jump register (E):** "copy input 2" puts R[t] on the bus, and the PC
  loads its low byte.
* **jump and link (F):** `addr` goes on the bus and into the PC. In the same
  edge, the PC (already pc + 1 since fetch) is written to R[d].

### Why jump register uses R[t]

The datapath has only one way to get a register's value onto the result bus
without changing it: the ALU's "copy input 2" function. Input 2 is B data,
which is R[t]. The decoder does not switch the A address for jump register, so
the instruction jumps to R[t][7:0]. Later versions of the TOY instruction set
jump to R[d] instead. This datapath cannot do that without an extra ALU
function or multiplexer. If you need R[d], add a "copy input 1" ALU code and
set `rega_d` for opcode E in `toy_control`.

## The ALU

`toy_alu` computes all five functions in parallel and selects one with a
3-bit code:

| select | function                                                   |
|--------|------------------------------------------------------------|
| 000    | add; subtract when `sub` = 1 (inverted input 2, carry in 1) |
| 001    | and                                                        |
| 010    | xor                                                        |
| 011    | shift; `shift_right` picks the direction                   |
| 100    | copy input 2                                               |

Codes 101–111 give 0. The shift amount is the whole 16-bit input 2, so an
amount of 16 or more shifts every bit out. A right shift fills with the sign
bit.

## Control

`toy_control` decodes the opcode into sixteen one-hot lines. Each control wire
is an OR of some of those lines, qualified by the phase and the condition bits:

```
write_ir  = tick & fetch
write_pc  = tick & (fetch | execute & (jal | jr | bz & eq0 | bp & gt0))
write_mem = tick & execute & (store | store indirect)
write_reg = tick & execute & (add|sub|and|xor|shl|shr|load addr|load|load indirect|jal)
alu_mux   = load addr | load | store | bz | bp | jal
rega_d    = store | store indirect | bz | bp
alu_sel   = {ldi | sti | jr,  xor | shl | shr,  and | shl | shr}
alu_sub   = sub;   alu_shr = shr
regw_src  = memory for load / load indirect, pc for jal, else result bus
```

A hand-drawn machine gates each register's clock with AND terms. This design
uses one clock and turns those terms into write enables. `tick` (`run` high
and not halted) takes the place of the clock in each term. All control wires
travel together as the packed struct `toy_pkg::ctrl_t`.

## Module overview

| file                    | block                                             |
|-------------------------|---------------------------------------------------|
| `toy_pkg.sv`            | widths, opcode enum, ALU codes, control struct    |
| `toy_machine.sv`        | top: datapath multiplexers, halt flag, load port  |
| `toy_phase_counter.sv`  | 1-bit fetch/execute counter                       |
| `toy_pc.sv`             | PC, incrementer, PC input multiplexer             |
| `toy_ir.sv`             | instruction register and field split              |
| `toy_memory.sv`         | 256 × 16 memory, combinational read               |
| `toy_regfile.sv`        | 16 × 16 registers, two read ports, one write port, R0 = 0 |
| `toy_alu.sv`            | ALU                                               |
| `toy_cond_eval.sv`      | `= 0` and `> 0` tests on register A data          |
| `toy_control.sv`        | decoder and control equations                     |

### Top-level ports (`toy_machine`)

| port                             | dir | width | meaning                                       |
|----------------------------------|-----|-------|-----------------------------------------------|
| `clk`, `rst_n`                   | in  | 1     | clock; synchronous active-low reset           |
| `run`                            | in  | 1     | let the machine step; low freezes it          |
| `load_we`, `load_addr`, `load_data` | in | 1/8/16 | write memory while `run` is low          |
| `halted`                         | out | 1     | a halt instruction has executed               |
| `execute`                        | out | 1     | current phase (0 fetch, 1 execute)            |
| `pc`, `ir`                       | out | 8/16  | program counter and instruction register      |

After reset, the registers and IR are zero, the PC is `RESET_PC` (default
0x10), and the machine is in the fetch phase. To run a program:

1. Hold `run` low.
2. Write the program through the load port, one word per clock.
3. Raise `run`.

A halt sets `halted` at the end of its execute phase. From then on the PC
points past the halt and nothing changes until the next reset. Memory is not
reset.

## Where this design makes its own choices

The instruction set, the sizes, the two-phase timing, the datapath
connections, the ALU table and the decoder terms for WRITE MEM, WRITE IR,
ALU SELECT 0, ALU MUX, READ REG A MUX and the PC load are those of the TOY
machine. The following are choices made here:

* the whole design is synchronous, with enables instead of gated clocks;
* combinational memory and register reads;
* R0 is hard-wired to zero; memory word 0xFF is ordinary storage, with no
  standard-input/output port;
* the right shift is arithmetic, the shift amount uses all of R[t], and
  "positive" is signed;
* jump register goes to R[t] (see above);
* the register write-data multiplexer encoding, the remaining control wires,
  the halt behaviour, `run`, the load port, the reset values and
  `RESET_PC` = 0x10.

Not built: a pipelined version that fetches the next instruction while the
current one executes. It would need prefetching around jumps and separate
instruction and data memories, and it is only an outlook, not part of this
machine.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* The ALU is compared against reference arithmetic and bit-serial shifts.
* The condition evaluator is checked exhaustively.
* The control unit is checked for every opcode × phase × condition against a
  per-instruction table.
* The memory, register file, PC, IR and phase counter are checked against
  shadow models under random stimulus.

`tb_toy_machine` runs the full machine at its default size. It compares the
machine with an instruction-level model after every instruction (the PC and
all registers), and compares all of memory at the end. It also checks that
each instruction takes two cycles. It runs these programs:

* the worked examples: add at 0x20 (0028 + 0064 = 008C) and jump-and-link
  FF30 at 0x20 (R[F] = 21, PC = 30), including the bus values during execute;
* a program that uses all sixteen instructions (5 × 7 by repeated addition,
  indirect load and store, taken and untaken branches, a write to R0, a call
  and return through jump and link and jump register);
* six random programs, one of them paused midway.

It fails if any instruction type, either outcome of a branch, the R0 write,
the same-register read/write or the pause never happened.

With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/toy_pkg.sv tb/tb_toy_machine.sv --top-module tb_toy_machine
./obj_dir/Vtb_toy_machine
```

Use the same command with another `tb_*` file for a single block. For lint,
use `verilator --lint-only -Wall -y rtl rtl/toy_pkg.sv rtl/toy_machine.sv`.
The top has two concurrent assertions: nothing but the IR and PC is written
in the fetch phase, and the IR is never written in the execute phase.

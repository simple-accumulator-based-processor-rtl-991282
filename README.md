# Simple12: a 12-bit accumulator processor with hardwired and microprogrammed control

Simple12 is a teaching-sized von Neumann processor. It has one data register,
the 12-bit accumulator A, an 8-bit program counter, and a single 256 x 12
memory that holds both program and data. Every instruction is one word with
a 4-bit opcode and an 8-bit memory address, and every instruction takes its
operand from memory. Nothing is pipelined: an instruction runs through a few
register-transfer steps (fetch, address, operand access, execute) and the
next one starts only when it has finished.

The interesting part is the control. The same datapath is driven by either
of two control units. Once the processor has started, the two produce
identical control signals in identical cycles:

* a **hardwired** finite-state machine with six states, and
* a **microprogrammed** unit: a 6-bit microprogram counter (Q) addressing a
  64 x 23 control-store ROM, with a small condition multiplexer that decides
  between "load a new microaddress" and "step to the next one".

The top also carries, on separate ports, the handful of small
register-transfer circuits that the description uses to introduce its
notation (a swap, a counter, conditional loads), and three tiny state
machines that show how control steps sequence transfers. They are
independent of the processor.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It has been linted
with Verilator 5 (`-Wall`) and elaborated with the slang front end of yosys.
Every block has a self-checking testbench, and all of them pass.

## Instruction set

| Opcode | Mnemonic | Effect | Cycles |
|--------|----------|--------|--------|
| 0000 | `JMP X`   | PC <- X | 2 |
| 0001 | `JN X`    | if A < 0 (A[11] = 1) then PC <- X | 2 not taken, 3 taken |
| 0010 | `JZ X`    | if A = 0 then PC <- X | 2 not taken, 3 taken |
| 0100 | `LOAD X`  | A <- M[X] | 4 |
| 0101 | `STORE X` | M[X] <- A | 3 |
| 1000 | `AND X`   | A <- A and M[X] | 4 |
| 1001 | `OR X`    | A <- A or M[X] | 4 |
| 1010 | `ADD X`   | A <- A + M[X] | 4 |
| 1011 | `SUB X`   | A <- A - M[X] | 4 |
| others | reserved | no operation (this implementation's choice) | 2 |

Instruction word: `{opcode[11:8], X[7:0]}`. Arithmetic is 12-bit two's
complement and wraps without flags. There is no halt instruction and no I/O:
a program ends by jumping to itself, and results are read from memory.
Because code lives in the same memory as data, programs can and do modify
their own instructions. The array example below walks a list by adding 1 to
the address field of its own `LOAD` and `STORE`.

## Datapath (`simple12_datapath`, `simple12_alu`)

```
  DataIn -------> MDR ----+
  DataIn[11:8] -> IR      |
                          v
  b-mux:  0 | MDR | PC ------> b --+
                                   +--> ALU --> R --> A            (12 bits)
  a-gate: 0 | A -------------> a --+            R[7:0] --> PC, MAR (8 bits)

  MAR --> Address          A --> DataOut
```

* **Registers:** PC (8), MAR (8, drives the memory address), IR (4, opcode),
  MDR (12, word read from memory), A (12, accumulator; it also drives the
  memory write data). Each one loads on the rising clock edge when its load
  bit is set. Reset is synchronous and active high, and clears all of them.
* **One ALU does all arithmetic.** The a input is 0 or A (the a-gate). The
  b input is 0, MDR or PC (the b-mux). The ALU's 4-bit control is
  `{binv, cin, fn[1:0]}`. `fn` selects AND (00), OR (01) or ADD (10), and the
  adder computes `a + (binv ? ~b : b) + cin`. The processor uses five codes:

  | Code | Operation | Used for |
  |------|-----------|----------|
  | 0000 | a AND b | `AND` |
  | 0001 | a OR b | `OR` |
  | 0010 | a + b | copies (0 + MDR, 0 + PC, A + 0) and `ADD` |
  | 0110 | a + b + 1 | PC + 1, with a = 0 and b = PC |
  | 1110 | a - b | `SUB` |

  There is no separate incrementer and no direct register-to-register path.
  PC, MAR and A are written only from the ALU result R (PC and MAR take
  R[7:0]). MDR and IR load straight from DataIn.
* **Status:** `neg` is A[11]. `alu_zero` is (R == 0). JZ tests A = 0 by
  passing A through the ALU (a = A, b = 0, ADD) and looking at the zero
  flag. The ALU is therefore busy in that cycle, and the jump target has to
  be copied in a separate cycle (BTaken, below).

## How an instruction runs

All instructions share the first step. They then diverge:

| Step | Register transfers | Taken by |
|------|--------------------|----------|
| **Stopped** | wait for `start`; then PC <- 0, MAR <- 0 | after reset |
| **IFetch** | read M[MAR]; MDR <- DataIn; IR <- DataIn[11:8]; PC <- PC+1; MAR <- PC+1 | every instruction |
| **EAGen** | JMP: PC <- MDR[7:0], MAR <- MDR[7:0] (done)<br>JN/JZ: test A[11] / A = 0; go to BTaken if the branch is taken, else done<br>memory ops: MAR <- MDR[7:0] | every instruction |
| **BTaken** | PC <- MDR[7:0], MAR <- MDR[7:0] | taken JN, JZ |
| **OpAccess** | MAR <- PC, and also:<br>LOAD/ALU: read M[MAR], MDR <- DataIn<br>STORE: write A to M[MAR] (done) | LOAD, STORE, ALU |
| **Execute** | A <- MDR, A and MDR, A or MDR, A + MDR or A - MDR | LOAD, ALU |

Two things are easy to miss:

* **MAR always points at the next instruction when an instruction ends.**
  IFetch already loads MAR with PC+1. A memory instruction borrows MAR for its
  operand address in EAGen and puts PC back into it in OpAccess, in the same
  cycle as the operand access. The memory reads combinationally, so the
  access uses the old MAR while the new value is being loaded.
* **The memory is read in the same cycle that raises `read`.** MDR captures
  the word at the end of that cycle. The RAM therefore has an asynchronous
  read port and a synchronous write port.

## The two control units

Both produce the same `dp_ctl_t` bundle: five load bits, the 4-bit ALU
code, the b-mux select, the a-gate, and the memory read and write. Select a
unit with the `MICROPROGRAMMED` parameter of `simple12_cpu` or
`simple12_system` (default 1, microprogrammed).

### Hardwired (`simple12_hardwired_control`)

This is a Mealy machine over the six steps above. Its outputs depend on the
state, IR, `start`, A[11] and the ALU zero flag. For example, Stopped clears
PC and MAR only in the cycle in which `start` is high. `start` is looked at
only in Stopped: after that the machine runs until reset.

### Microprogrammed (`simple12_micro_control`, `simple12_control_store`)

Microinstruction word, 23 bits, most significant field first:

| Cond Sel | Addr Sel | Next Addr | Load A | Load PC | Load MAR | Load MDR | ALU | b MUX | a Gate | Rd | Wt |
|---|---|---|---|---|---|---|---|---|---|---|---|
| 3 | 1 | 6 | 1 | 1 | 1 | 1 | 4 | 2 | 1 | 1 | 1 |

**Sequencing.** Cond Sel picks one condition: 000 False, 001 True,
010 ~A(11), 011 ~(ALU=0), 100 ~start. When that condition is 1, Q loads a new
address. Otherwise Q increments. The new address is Next Addr when Addr Sel
is 0. When Addr Sel is 1 it is `{1, DataIn[11:8], 0}`: a dispatch on the
opcode of the instruction being fetched in that same cycle. IR is loaded in
that dispatch cycle too.

The Stopped word is a Moore output: it clears PC and MAR in every cycle
while it waits. The hardwired unit does so only in the cycle in which
`start` is seen. The visible result is the same.

Conditions are written in the negative so that "condition holds" means
"leave the straight line". For example, JN's EAGen word uses ~A(11) with
Next Addr = IFetch. If A is not negative, Q jumps back to IFetch (not
taken). Otherwise Q steps to the next word, which is JN's BTaken step.

**Microprogram layout** (64 words):

| Address | Word |
|---------|------|
| 000000 | Stopped: PC, MAR <- 0; cond ~start, next 000000 (stay until start) |
| 000001 | IFetch: read, MDR/IR <- DataIn, PC, MAR <- PC+1; cond True, Addr Sel 1 |
| {1, op, 0} | EAGen of opcode op |
| {1, op, 1} | BTaken (JN, JZ) or OpAccess (LOAD, STORE, AND, OR, ADD, SUB) |
| {0, 1, op} | Execute (LOAD, AND, OR, ADD, SUB), then next = IFetch |

For example: EAGen for ADD is at 110100, OpAccess for ADD at 110101 (next
011010), and Execute for ADD at 011010. The ROM contents are computed by a
SystemVerilog function from these rules, not loaded from a file. To change
the microprogram, edit `rom_word()` in `rtl/simple12_control_store.sv`.

The ROM word for ADD's Execute step, for example, is
`001 0 000001 1 0 0 0 0010 10 1 0 0`: goto IFetch, load A, a + b with
b = MDR and a = A.

## Memory and system (`simple12_ram`, `simple12_system`)

`simple12_system` connects the processor to a 256 x 12 RAM. The RAM has a
second, host port (`host_addr`, `host_we`, `host_wdata`, `host_rdata`, with
the same timing). It is used to load a program and inspect results while the
processor is held in reset or is stopped. Top-level use:

1. Hold `rst` high and write the memory image through the host port, one
   word per clock.
2. Release `rst`. The processor sits in Stopped.
3. Raise `start` for at least one cycle. Execution begins at address 0.
4. Watch `fetch` (high in each IFetch cycle; `mem_rdata` then holds the
   instruction), `pc` and `acc`, and read memory back through the host port.

An assertion in the RAM checks that `read` and `write` are never high
together.

## Register-transfer examples (`rt_examples`)

The description introduces its register-transfer notation with a few
small circuits. They are built in `rtl/rt_examples.sv` as one module of
independent W-bit registers, with W = 2 by default:

| Notation | Circuit |
|----------|---------|
| `C <= A xor B` | C takes A xor B on every clock |
| `A <= A + 1` | counter; `inc_clr` clears it |
| `if (c) then D <= S` | D loads S when `ld_c` is high |
| `if (s0 and x) then Z <= c + d` | Z loads the sum when `z_s0` and `z_x` are both high |
| `A <= B, B <= A` (LOAD) | swap pair; both registers read the old values |
| `Y <= A when s=0 else B` | two-input selector, combinational (`mux_y`) |
| `A <= A & B` | register ANDed with B on every clock; `and_set` presets it |
| `A <= B << 1` | register takes B shifted left by one, 0 shifted in |
| `if (c=0) then F <= 1 else F <= 0` | one-bit flag: is `f_c` zero? |

The swap answers the question posed with it. With A = 11 and B = 00,
one clock with LOAD gives A = 00 and B = 11. `swap_set` presets the pair
from `swap_a_in`/`swap_b_in` and wins over LOAD. It, the counter clear and
the AND register's preset are additions here: the circuits as drawn have
no way to reach a known value. The selector is shown with further inputs
that are not named; only A and B are built.

These circuits have nothing to do with the processor. The top instantiates
them next to it, with their own ports. The ports are grouped into two
packed structs, `rt_in` and `rt_out` (`rtl/rt_examples_pkg.sv`). Tie
`rt_in` to zero if they are not wanted.

## Sequencing machines (`rt_sequencing`)

A second set of examples shows how a sequence of control steps performs
transfers in order. Three small state machines each compute C = X + Y.
They are built side by side with their own A, B and C registers:

| Machine | Steps | Clocks from `go` to C |
|---------|-------|-----------------------|
| `s3_*`, one transfer per step | `A <= X`; `B <= Y`; `C <= A + B` | 4 |
| `p2_*`, parallel transfers | `A <= X, B <= Y`; `C <= A + B` | 3 |
| `g_*`, with a goto | `A <= X, B <= Y`; `C <= A + B`, and back to step 1 if A[0] = 1 | 3 per pass |

Each step lasts one clock. Its transfers happen on the edge that ends it.
The first clock counted is the one that samples `go`; that clock moves a
machine from idle into step 1. The goto machine reloads A and B from the
inputs on each pass. It therefore keeps going round while X is odd and goes
idle after a pass with an even A.

The idle state, `go`, `busy`, the synchronous reset and the width (W = 2)
are this design's additions: the examples give only the steps. At the top
the ports are the `seq_in` / `seq_out` bundles. The machines have their own
reset, `seq_in.rst`.

## Example programs

The testbenches run three small programs. They are built by functions in
`tb/simple12_tb_pkg.sv`.

* **max(X, Y)**: `LOAD X; SUB Y; JN B1; LOAD X; JMP SAVE; B1: LOAD Y;
  SAVE: STORE Z`. It takes 18 cycles for X = 7, Y = 10 and 19 cycles for
  X = 10, Y = 5.
* **Array masking**: for each element of a zero-terminated list, store 1 if
  `(element & Mask) != 0`, else 0. The loop advances by incrementing the
  address fields of its own `LOAD` (L1) and `STORE` (L2). For the list
  3, 3, 3, 8, 19, 0 with Mask = 1 it leaves 1, 1, 1, 0, 1 and takes 231
  cycles.
* **Logic/arithmetic**: `((P or Q) + R) - S`, stored, then `JZ`.

All three fit easily in the 256-word memory. The largest uses 25 words.

## Where this implementation makes its own choices

These points are not fixed by the description the design follows. They are
decisions taken here:

* **Reserved opcodes** (0011, 0110, 0111, 1100-1111) run as 2-cycle
  no-operations.
* **Reset** is synchronous and active high. It clears the datapath registers
  and enters Stopped (Q = 000000). There is no way back to Stopped except
  reset.
* **OpAccess reloads MAR with PC** in the microprogram as well as in the
  state machine. Without this transfer the next fetch would read the operand
  address.
* **Sign test.** The sign is taken from A[11] directly, so JN's EAGen step
  does not need the ALU. A version that tested the ALU result bit R[11]
  would have to pass A through the ALU in that step.
* **Unused words.** JN's EAGen word leaves the ALU fields at "a = 0, b = 0,
  ADD". Unused control-store words jump to Stopped.
* **Memory write data.** STORE writes A directly to memory (DataOut = A). It
  does not pass the value through MDR.
* **Testing ports.** The host port and the observation outputs of the top
  exist only for testing.

## Files

| File | Contents |
|------|----------|
| `rtl/simple12_pkg.sv` | widths, opcodes, ALU/mux/condition encodings, `dp_ctl_t`, `uinstr_t` |
| `rtl/simple12_alu.sv` | ALU |
| `rtl/simple12_datapath.sv` | registers, a-gate, b-mux, ALU |
| `rtl/simple12_hardwired_control.sv` | state-machine control |
| `rtl/simple12_control_store.sv` | 64 x 23 microprogram ROM |
| `rtl/simple12_micro_control.sv` | Q register, condition and address muxes, ROM |
| `rtl/simple12_cpu.sv` | datapath + selected control unit |
| `rtl/simple12_ram.sv` | 256 x 12 memory with host port |
| `rtl/simple12_system.sv` | top: CPU + RAM, with the notation examples and sequencing machines beside them |
| `rtl/rt_examples_pkg.sv` | width and port structs of the notation examples and sequencing machines |
| `rtl/rt_examples.sv` | the register-transfer notation examples |
| `rtl/rt_sequencing.sv` | the three sequencing machines |
| `tb/simple12_tb_pkg.sv` | instruction-level reference model, expected control per step, example programs |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_simple12_full.sv` runs the default top |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Example,
from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/simple12_pkg.sv rtl/rt_examples_pkg.sv tb/simple12_tb_pkg.sv \
  tb/tb_simple12_system.sv --top-module tb_simple12_system
./obj_dir/Vtb_simple12_system
```

The packages are listed first; `-y` lets Verilator find every module in
`rtl/` and `tb/` by its file name. Replace the testbench file and the top
module to run another testbench (`tb_simple12_full` runs the default top).
Everything runs in well under a second.

## How far it has been checked

* `tb_simple12_alu`: every used ALU code on corner and random operands.
* `tb_simple12_datapath`: the register transfers of LOAD and SUB by hand,
  then 3000 cycles of random control against a register model.
* `tb_simple12_control_store`: the sample microinstructions bit by bit, and
  a walk of the microprogram for every opcode and branch outcome against
  the expected controls and cycle counts.
* `tb_simple12_hardwired_control`, `tb_simple12_micro_control`: 3000
  random instructions each. They check the control word in every cycle and
  every instruction's cycle count.
* `tb_simple12_cpu`: both control units side by side against an
  instruction-level model. This covers the max program and 20 random memory
  images (random instructions, including reserved opcodes and
  self-modifying stores), with PC, A and cycle count checked at every fetch
  and the whole memory at the end.
* `tb_rt_examples`: the swap question, then 2000 random cycles of all nine
  circuits against a model, at W = 2 and W = 4.
* `tb_rt_sequencing`: C after exactly 4 and 3 clocks, and the goto both
  taken and not taken. Then 3000 random cycles of all three machines
  against a step model, at W = 2 and W = 4.
* `tb_simple12_system`: all example programs end to end on both systems.
  It checks results and cycle totals, and counts each mechanism (start, each
  opcode, taken and untaken JN/JZ, stores into the program, negative A);
  each must occur at least once. It also puts the swap question to the
  register-transfer examples in the top, and runs the sequencing machines
  once.
* `tb_simple12_full`: the default top (no parameter overrides) running the
  max and array programs.

Each testbench has also been run against a deliberately broken copy of its
module and fails there.

Not checked: timing closure or area on any technology, and behaviour when
the host port writes while the processor runs.

# SIMPLE/B — a five-phase 16-bit teaching processor

SIMPLE (Sixteen-bit MicroProcessor for Laboratory Experiment) is a small
16-bit instruction set: word-addressed memory, eight general purpose
registers, four condition codes and one-word instructions. SIMPLE/B is its
most basic hardware. Each instruction runs through five phases of one clock
cycle each, and no two phases overlap:

| phase | name          | what happens                                                             |
|-------|---------------|--------------------------------------------------------------------------|
| p1    | fetch         | `IR <= mem[PC]`, `PC <= PC + 1`                                          |
| p2    | register read | `AR <= r[IR[13:11]]` (Ra/Rs), `BR <= r[IR[10:8]]` (Rb/Rd)                |
| p3    | operate       | `DR <=` ALU or shifter result; `SZCV <=` flags (operation instructions)  |
| p4    | memory / IO   | load: `MDR <= mem[DR]`; store: `mem[DR] <= AR`; IN: `MDR <= in_data`; OUT: `out_data <= AR` |
| p5    | write back    | `r[dest] <= DR` or `MDR`; taken branch: `PC <= DR`                       |

So every instruction takes exactly 5 clock cycles. One ALU does arithmetic,
logic, address computation (`BR + sign_ext(d)`) and branch targets
(`PC + sign_ext(d)`). One address bus carries the PC in p1 and DR in p4.
Speed was not the aim: the point is a datapath simple enough to draw on one
page, so each register sits on a phase boundary.

## Instruction set

Instruction bits `[15:14]` (op1) select the format. Every field below is a
bit range of the 16-bit instruction.

```
 15 14 | 13  11 | 10   8 | 7    4 | 3   0
  1  1 |   Rs   |   Rd   |  op3   |   d       operation / input-output
  0 op |   Ra   |   Rb   |        d (8)       LD (00) / ST (01)
  1  0 |  op2   |   Rb   |        d (8)       LI (000), B (100)
  1  0 |  111   |  cond  |        d (8)       BE/BLT/BLE/BNE
```

| op3  | instr | effect                    | op3  | instr | effect                         |
|------|-------|---------------------------|------|-------|--------------------------------|
| 0000 | ADD   | Rd = Rd + Rs              | 1000 | SLL   | Rd = Rd << d                   |
| 0001 | SUB   | Rd = Rd - Rs              | 1001 | SLR   | Rd = rotate left(Rd, d)        |
| 0010 | AND   | Rd = Rd & Rs              | 1010 | SRL   | Rd = Rd >> d (logical)         |
| 0011 | OR    | Rd = Rd \| Rs             | 1011 | SRA   | Rd = Rd >>> d (arithmetic)     |
| 0100 | XOR   | Rd = Rd ^ Rs              | 1100 | IN    | Rd = in_data                   |
| 0101 | CMP   | flags of Rd - Rs only     | 1101 | OUT   | out_data = Rs                  |
| 0110 | MOV   | Rd = Rs                   | 1111 | HLT   | stop after this instruction    |

- `LD Ra,d(Rb)` sets `Ra = mem[Rb + sign_ext(d)]`. `ST Ra,d(Rb)` sets
  `mem[Rb + sign_ext(d)] = Ra`.
- `LI Rb,d` sets `Rb = sign_ext(d)`. `B d` sets `PC = PC + 1 + sign_ext(d)`.
- The conditional branches use the same target when their condition holds.
  The conditions are: BE `Z`, BLT `S^V`, BLE `Z | (S^V)`, BNE `!Z`.
- Reserved encodings only advance the PC. These are op3 0111 and 1110, op2
  001/010/011/101/110, and cond 100 to 111.

### Condition codes

Only ADD, SUB, AND, OR, XOR, CMP, MOV and the four shifts write SZCV. IN, OUT,
HLT, loads, stores, LI and branches leave it unchanged.

- **S** is bit 15 of the result and **Z** means the result is zero.
- **C** has three cases:
  - ADD, SUB and CMP: the carry out of bit 15. Subtraction is computed as
    `Rd + ~Rs + 1`, so C = 1 means there was no borrow.
  - Shifts: the last bit shifted out. It is 0 for SLR and whenever d = 0.
  - AND, OR, XOR and MOV: C = 0.
- **V** is signed overflow for ADD, SUB and CMP, and 0 for everything else.

Taking the adder's carry as the C of SUB is this implementation's reading.
The architecture only calls C the carry out of the top bit, and no
branch condition reads C.

## Control: phases, start and stop

`phase_counter` holds a one-hot phase register. `controller` is purely
combinational. It turns the phase, IR and SZCV into a control word
(`simple_pkg::ctrl_t`) of register enables and selector settings.

The machine starts **stopped**, at p1, after reset. A 0→1 change on `exec`
then starts it. The first fetch happens in the cycle after the clock edge
that samples `exec` high. The machine stops at the end of p5 in two cases:

- `exec` goes 0→1 again while it is running. The current instruction always
  completes.
- The instruction is HLT. `halted` is then set.

A later `exec` press resumes at the next instruction. While stopped, all
enables are low and nothing changes.

The branch condition is evaluated in p5 from SZCV. A branch never writes
SZCV, so this gives the same result as evaluating it in p3.

## Memory timing

The main memory is a synchronous RAM of `MEM_WORDS` 16-bit words. The
default is 65536 (64 KW), the whole address space. Addresses are used as
they are. The RAM acts on the **falling** clock edge:

1. The address (PC in p1, DR in p4) is stable from the rising edge that
   starts the phase.
2. The RAM reads or writes at mid-phase.
3. IR or MDR takes the read word at the rising edge that ends the phase.

This is what makes a fetch or a load fit in a single phase. It also means
the clock period must allow half a cycle for the RAM access.

For a device with less block RAM, set `MEM_WORDS` smaller, for example
33792 for 33 KW. Addresses at or above `MEM_WORDS` then read as 0 and
ignore writes. If a write and a read hit the same address on the same edge,
the read returns the old word.

## Files

| file                    | contents                                                         |
|-------------------------|------------------------------------------------------------------|
| `rtl/simple_pkg.sv`     | opcodes, phase and flag types, control word                      |
| `rtl/simple_b.sv`       | top: datapath registers, bus and operand selectors, instances    |
| `rtl/phase_counter.sv`  | p1..p5 sequencing, exec start/stop, HLT                          |
| `rtl/controller.sv`     | instruction decode per phase, branch conditions                  |
| `rtl/pc_unit.sv`        | PC with +1 adder and branch load                                 |
| `rtl/register_file.sv`  | 8 × 16-bit, 2 read ports, 1 write port                           |
| `rtl/alu.sv`            | ADD/SUB/AND/OR/XOR/pass with S Z C V                             |
| `rtl/shifter.sv`        | SLL/SLR/SRL/SRA with S Z C V                                     |
| `rtl/main_memory.sv`    | falling-edge word RAM, optional `$readmemh` image                |
| `tb/tb_*.sv`            | one self-checking testbench per module, plus `tb_simple_b_init`  |
| `tb/fib_program.hex`    | small SIMPLE program used by `tb_simple_b_init`                  |

### Top-level ports (`simple_b`)

| port        | dir | width | meaning                                                  |
|-------------|-----|-------|----------------------------------------------------------|
| `clk`       | in  | 1     | clock; one phase per cycle                                |
| `reset`     | in  | 1     | synchronous, active high; clears PC, IR, AR, BR, DR, MDR, SZCV, registers; leaves the machine stopped |
| `exec`      | in  | 1     | start/stop push button, assumed synchronous and debounced |
| `in_data`   | in  | 16    | value read by IN, sampled at the end of p4               |
| `out_data`  | out | 16    | value of the last OUT                                    |
| `out_valid` | out | 1     | one-cycle pulse after `out_data` changes                 |
| `running`, `halted`, `pc`, `phase` | out | | status for a display or a debugger |

Parameters: `MEM_WORDS` (default 65536) and `INIT_FILE` (default empty). If
`INIT_FILE` is set, it names a `$readmemh` file with one hex word per line,
starting at address 0. A program runs from address 0 after reset and an
`exec` pulse.

## Simulating

Each testbench is a top-level module with no ports. For example:

```
verilator --binary --timing --assert -Irtl rtl/simple_pkg.sv rtl/*.sv \
          tb/tb_simple_b.sv --top-module tb_simple_b -o sim
./obj_dir/sim
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

`tb_simple_b` runs the processor at its full default size. It contains its
own instruction-set model of SIMPLE and uses it as follows:

- **Programs.** It runs a hand-written loop first: it sums 1..10, stores the
  sum and loads it back, then does OUT, IN, SLL, CMP and BLT. The expected
  values are fixed in the testbench. After that it runs 600 random programs
  that use every instruction and reserved encodings. Their branches go
  forward only, and r7 stays a base pointer into the top of memory, so
  stores never overwrite code.
- **Stops.** The processor is stopped often: by HLT, and by `exec` presses at
  random moments.
- **State checks.** At each stop the testbench compares the PC, the eight
  registers, SZCV and `halted` with the model after the same number of
  instructions. It also checks that the segment took exactly 5 cycles per
  instruction.
- **Final checks.** At the end it compares all OUT values in order, and then
  all 64 K memory words.
- **Coverage.** It counts how often each event happened: each instruction,
  the taken and not-taken outcome of every branch condition, reserved
  encodings, exec stops and restarts after HLT. An event that never
  happened counts as a failure.

`tb_simple_b_init` builds the processor with a 33 KW memory
(`MEM_WORDS = 33792`). It loads `tb/fib_program.hex` through `INIT_FILE`.
The program prints and stores the first ten Fibonacci numbers, then
touches an address beyond the 33 KW memory. The testbench checks the
numbers, the out-of-range load (which must read 0) and the cycle count.

The module testbenches check their module against values computed in the
testbench. These come from integer arithmetic for the ALU, a shift of one
bit at a time for the shifter, shadow arrays for the register file and
memory, and hand-derived sequences for the phase counter and controller.

## How far to trust it, and what is this implementation's own

All testbenches pass, and the complete processor agrees with the
instruction-set model over the tests above. The design has not been run on
an FPGA.

These choices are not fixed by the architecture:

- **Register sources.** AR comes from `IR[13:11]` and BR from `IR[10:8]`.
  Rd-op-Rs instructions are computed as `BR op AR`, and ST and OUT send AR.
- **Write-back destination.** The destination is Ra (`IR[13:11]`) for LD and
  `IR[10:8]` for everything else. This follows the instruction tables, not
  the looser wording of the p5 description.
- **Flags.** All four flags, SZCV, are written in p3, not just S, Z and C.
- **RAM timing.** The falling-edge RAM is this implementation's way of
  fitting a memory access into one phase.
- **Reset.** Reset clears the register file and all datapath registers.
- **exec edge.** `exec` is edge-detected with a single register. There is no
  synchroniser or debouncer.
- **Outputs.** `out_data`, `out_valid` and `halted` are a minimal processor
  side for the board's switches and displays. The displays themselves, any
  7-segment encoding and switch debouncing are left outside the design.
- **Shifter V flag.** The shifter's V output is a constant 0, as the
  architecture defines.

Not included: the extensions that are only suggested for SIMPLE and
SIMPLE/B. These are immediate operands, wider IN/OUT selection, branch and
link, compare-and-branch, interrupts, multiply-accumulate and conditional
operations, overlapped or pipelined phases, and two-way superscalar issue.

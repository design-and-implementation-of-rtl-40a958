# A small, extendable 16-bit accumulator processor

This is a simple processor with a hardwired control unit, written in SystemVerilog. It has a
16-bit data word, a 12-bit address (4096 words), one general-purpose register (the accumulator
AC) and 22 instructions. They cover memory operations with direct or indirect addressing,
accumulator operations, conditional skips, a subroutine call, one vectored interrupt and a halt.
The structure is kept plain on purpose, so that it is easy to extend. There are four units:
register unit, ALU, shared bus and control unit. Every register move goes over one shared bus.
A one-hot timing register steps each instruction through a fixed list of micro-operations. A new
instruction or register means new terms in one combinational block.

The RTL follows a published design description of this processor: its instruction set and
codes, its registers and widths, its bus and ALU select codes, its sequence counter and the
control equations it prints. Where that description is silent or inconsistent, the choice made
here is listed under "Departures and choices" below.

## Programmer's view

| Register | Bits | Role |
|---|---|---|
| AC | 16 | accumulator; the only general-purpose register |
| E  | 1  | carry flag (ADD carry, circulate bit) |
| PC | 12 | address of the next instruction |
| AR | 12 | address of the current memory operand; drives the address bus |
| DR | 16 | memory operand |
| IR | 16 | current instruction |
| TR | 16 | temporary; holds the return address during the interrupt cycle |
| IEN | 1 | interrupt enable (ION / IOF) |

Memory map: word 0 receives the return address of an interrupt. Word 1 is executed when an
interrupt is taken, so it normally holds `BUN isr`. After reset, execution starts at word 2
(parameter `RESET_PC`).

### Instruction formats

```
memory reference    I ooo aaaa aaaa aaaa    ooo = 000..110, I = indirect, a = address
register reference  0 111 bbbb bbbb bbbb    one bit per operation
processor control   1 111 bbbb bbbb bbbb    ION / IOF
```

With `I = 1` the 12-bit field is the address of a word whose low 12 bits are the effective
address.

| Mnemonic | Code | Operation |
|---|---|---|
| AND | I000 a | AC <- AC and M[ea] |
| ADD | I001 a | E,AC <- AC + M[ea] |
| LDA | I010 a | AC <- M[ea] |
| STA | I011 a | M[ea] <- AC |
| BUN | I100 a | PC <- ea |
| BSA | I101 a | M[ea] <- PC, PC <- ea + 1 (call; return with `BUN I ea`) |
| ISZ | I110 a | M[ea] <- M[ea] + 1; skip the next instruction if the result is 0 |
| CLA | 7800 | AC <- 0 |
| CLE | 7400 | E <- 0 |
| CMA | 7200 | AC <- not AC |
| CME | 7100 | E <- not E |
| CIR | 7080 | E,AC circulated right: AC <- {E, AC[15:1]}, E <- AC[0] |
| CIL | 7040 | E,AC circulated left: AC <- {AC[14:0], E}, E <- AC[15] |
| INC | 7020 | AC <- AC + 1 |
| SPA | 7010 | skip if AC[15] = 0 |
| SNA | 7008 | skip if AC[15] = 1 |
| SZA | 7004 | skip if AC = 0 |
| SZE | 7002 | skip if E = 0 |
| HLT | 7001 | halt (READY goes low) |
| NOP | 7000 | no operation |
| ION | F080 | IEN <- 1 |
| IOF | F040 | IEN <- 0 |

A skip adds one to PC, which jumps over the next word. A conditional jump is therefore a skip
followed by a `BUN`, and a counted loop is an `ISZ` on a negative count followed by a `BUN`.

## How an instruction runs: the timing ring

The control unit has no state machine in the usual sense. A 16-bit one-hot register T rotates
left by one place each clock, so exactly one of T0..T15 is high. Each step of an instruction is
a product term such as `D4 & T4` (BUN, step 4). Here D0..D7 is the one-hot decode of IR[14:12].
The last step of every instruction asserts `sc_clr`, and the ring goes back to T0 at the next
edge. Reset loads T15 (8000h), so the first clock after reset gives T0.

| Step | Normal cycle (R = 0) | Interrupt cycle (R = 1) |
|---|---|---|
| T0 | AR <- PC | AR <- 0, TR <- PC |
| T1 | IR <- M[AR], PC <- PC + 1 | M[AR] <- TR, PC <- 0 |
| T2 | AR <- IR[11:0] | PC <- PC + 1, IEN <- 0, R <- 0, end |
| T3 | memory reference with I = 1: AR <- M[AR]; D7: the register or control operation, end | |

Execute steps of the memory-reference instructions:

| | T4 | T5 | T6 | cycles |
|---|---|---|---|---|
| AND, ADD, LDA | DR <- M[AR] | AC <- AC op DR, end | | 6 |
| STA | M[AR] <- AC, end | | | 5 |
| BUN | PC <- AR, end | | | 5 |
| BSA | M[AR] <- PC, AR <- AR + 1 | PC <- AR, end | | 6 |
| ISZ | DR <- M[AR] | DR <- DR + 1 | M[AR] <- DR, skip if DR = 0, end | 7 |

Register-reference and control instructions take 4 cycles, and the interrupt cycle takes 3.
Indirect addressing costs nothing extra, because T3 is always spent. Each step moves at most one
value over the bus. The bus source is a 3-bit code: 001 AR, 010 PC, 011 DR, 100 AC, 101 IR,
110 TR, 111 memory. AR and PC are zero-extended.

For example, the ten-number summation loop (an indirect ADD through a pointer, ISZ on the
pointer, ISZ on a count of -10, and BUN back) runs in 259 clock cycles from reset to halt.

## Interrupts

A one-cycle pulse on `intr` is a request. It is kept only if IEN is set at that clock edge. A
request that arrives while interrupts are off is dropped, not queued. While a request is pending,
the control logic sets R in any step after T2. The current instruction finishes normally. The
next pass through the ring is then an interrupt cycle instead of a fetch: the return address
goes to word 0, PC becomes 1, and IEN is cleared so that the routine is not re-entered. The
routine at word 1 (usually `BUN isr`) runs with interrupts off. It should end with `ION` and
`BUN I 0`. The return address is taken from word 0 by the indirect jump.

## Datapath units

* **Register unit**: AR, PC, AC, DR, TR (clear, load and increment each) and IR (load only).
  Clear has priority over load, and load over increment. AC loads from the ALU and all the
  others from the bus. ZAC and ZDR are zero detectors on AC and DR. SZA uses ZAC, and the ISZ
  skip uses ZDR.
* **ALU**: combinational, with inputs AC, DR and E. Operation codes: 000 AND, 001 ADD,
  010 pass DR, 011 complement AC, 100 circulate left, 101 circulate right; all other codes give
  zero. The carry output is the adder carry, AC[15] or AC[0]. For the other operations it
  returns E unchanged.
* **Shared bus**: a plain 8-to-1 multiplexer. Code 000 gives zero.

## Ports and timing

| Port | Dir | Bits | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything changes on the rising edge |
| `reset` | in | 1 | synchronous, active high; PC <- `RESET_PC`, everything else cleared |
| `intr` | in | 1 | interrupt request, a one-cycle pulse |
| `address` | out | 12 | memory address (AR) |
| `data_in` | in | 16 | memory read data |
| `data_out` | out | 16 | memory write data; always the shared bus |
| `re`, `we` | out | 1 | memory read, memory write |
| `display` | out | 16 | the accumulator |
| `ready` | out | 1 | high while running; low after HLT until reset |

Reads are asynchronous. In a cycle with `re` high, the memory must drive `M[address]` on
`data_in` before the next rising edge, where the processor samples it. A write takes place at the
rising edge that ends a cycle with `we` high. `ready` goes low at the end of HLT's T3. While
halted, the timing ring is frozen and no control signal is active.

The memory itself is not part of the processor. The testbenches use a behavioural model
(`tb/mem_model.sv`).

## Files

| File | Contents |
|---|---|
| `rtl/cpu_pkg.sv` | widths, bus and ALU select enums, opcode and bit constants, register-strobe struct |
| `rtl/microprocessor.sv` | top level |
| `rtl/register_unit.sv`, `rtl/cpu_reg.sv` | registers and zero flags; one clear/load/increment register |
| `rtl/alu.sv` | ALU |
| `rtl/shared_bus.sv` | bus multiplexer |
| `rtl/control_unit.sv` | control unit with flags E, IEN, R, halt and the pending request |
| `rtl/opcode_decoder.sv`, `rtl/sequence_counter.sv`, `rtl/control_logic.sv` | its three parts |
| `tb/tb_*.sv` | one self-checking testbench per unit and for the whole processor |
| `tb/mem_model.sv` | behavioural 4096 x 16 memory |

To extend the instruction set, give the new operation a bit in the register-reference or
control group (or use one of the unused 1111 codes). Then add its terms to `control_logic.sv`.
A new register means a `cpu_reg` instance in the register unit, a field in `ru_ctl_t` and,
if it must drive the bus, a new bus code.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpu_pkg.sv tb/tb_microprocessor.sv \
          --top-module tb_microprocessor
./obj_dir/Vtb_microprocessor
```

* `tb_microprocessor` runs the processor at its default parameters. It runs a 32-bit addition
  (0000_0007 + 0400_FFFF = 0401_0006, 51 cycles; `display` goes 0007, 0006, 0000, 0001, 0401).
  It runs a bit set/reset sequence
  (FFFE -> FFFC -> 7FFE -> 3FFF -> 7FFF, 43 cycles). It runs the summation loop (sum 1..10 =
  0x37, 259 cycles) and an interrupt program. In that program one request is served, and two are
  dropped: one before ION and one inside the service routine.
  It then runs 25 random programs. Every program except the interrupt one runs in lockstep with an
  instruction-set model in the testbench. Each memory access (address, data, read or write, in
  order) must match the model's, and at each fetch `display` must equal the model's
  accumulator. It checks cycle counts. It also counts indirect accesses, skips, BSA, ISZ,
  carries, circulates, ION/IOF, interrupt cycles, dropped requests and halts, and fails if any of
  them never happens. It observes ports only.
* `tb_fig4_program` runs the summation program from its original memory image, which starts at
  address 0 (built with `RESET_PC = 0`). It compares all ten words with the expected image after
  the run. It also checks the order of values on `address` in the first cycles: 000, 800, 001,
  008, 009, 002, 008. The 800 is AR loaded with the low bits of CLA at T2. `display` must go
  from 0000 to 0001 in that window, as in the original trace of this run.
* `tb_alu`, `tb_register_unit`, `tb_shared_bus`, `tb_opcode_decoder`, `tb_sequence_counter`,
  `tb_control_logic` and `tb_control_unit` check the units against reference models or equations
  written in the testbench.

## Departures and choices

* **Start address.** The description says execution starts at the third word (address 2), and
  that is the default. Its summation example, however, is listed from address 0 (it jumps to
  its own second word). That program is run at `RESET_PC = 0`, and also moved up by two words
  for the default configuration.
* **Two interrupt flags.** The description calls both the enable flag switched by ION/IOF and
  the interrupt-cycle marker "R". Here they are separate: IEN and R. Clearing IEN on entry to
  the interrupt cycle, and keeping a request until the end of the instruction, are choices made
  here.
* **Data ports and the shared bus.** The original's block diagram draws a single
  bidirectional data bus, but its simulation traces show separate `data_in`/`data_out` signals
  and a `display` signal carrying the accumulator. This RTL follows the traces. The original
  shared bus is tristate; here it is a multiplexer whose unused code gives zero.
* **SPA and SNA.** SPA skips on AC[15] = 0 and SNA on AC[15] = 1.
* **Words with several register-reference bits.** These are not defined by the original.
  Here all their actions happen in the same step. When bits compete for the ALU, the priority
  is CMA, CIR, CIL; for E it is the ALU carry, then CME, then CLE. Skips look at the values
  from before the step. Undefined words in the 1111 group act as NOP.
* **ALU carry** for operations without a carry returns E; **reset** is synchronous; **halt**
  freezes the timing ring until reset. These details are not given by the original and were
  chosen here.
* **Not included:** the program memory (a simulation model only, as in the original) and the
  assembler used to prepare programs. The original reports an FPGA implementation (Xilinx
  Virtex XCV50, about 27 % of the slices, 43.9 MHz). No timing or area claim is made for this
  RTL.

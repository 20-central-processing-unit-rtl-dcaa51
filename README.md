# TOY-8: a complete CPU small enough to read in one sitting

TOY-8 is a teaching computer. Its main idea is that a whole working CPU can be
built from a handful of parts: memory bits, registers, an incrementer, one-hot
bus multiplexers and a small combinational control circuit, all driven by a
two-phase clock. It has:

- 16 words of 8-bit memory;
- one 8-bit register `R`;
- a 4-bit program counter `PC`;
- an 8-bit instruction register `IR`;
- one instruction format and eight instructions.

The same structure extends to wider machines. This repository holds
synthesizable SystemVerilog for the whole machine, from the SR flip-flop up to
the top level `toy8_cpu`, with a self-checking testbench for every module.

## Instruction set

Each instruction is one byte: `IR[7:5]` is the opcode, `IR[4]` is ignored and
`IR[3:0]` is an address. Written as hex, the opcode is the even high digit:

| hex | opcode | name        | effect                       |
|-----|--------|-------------|------------------------------|
| 0a  | 0      | halt        | stop the clock               |
| 2a  | 1      | add         | R = R + M[a] (modulo 256)    |
| 4a  | 2      | and         | R = R & M[a]                 |
| 6a  | 3      | xor         | R = R ^ M[a]                 |
| 8a  | 4      | load addr   | R = a                        |
| Aa  | 5      | load        | R = M[a]                     |
| Ca  | 6      | store       | M[a] = R                     |
| Ea  | 7      | branch zero | if (R == 0) PC = a           |

Two addresses are special:

- `M[0]` always reads 0, and writes to it are dropped.
- `M[F]` is standard input and output. A read returns the `stdin_data` port.
  A store sends R to `stdout_data`.

There is only a conditional branch. An unconditional jump is therefore written
`80` (R = 0) followed by `Ea`.

Example: this program is loaded at address 1. It adds `M[5]` and `M[6]`,
stores the sum in `M[7]` and halts, leaving R = 0D and PC = 4:

```
1: A5   R = M[5]
2: 26   R = R + M[6]
3: C7   M[7] = R
4: 00   halt
5: 05
6: 08
```

## How an instruction runs: FETCH, EXECUTE and their write pulses

This is the part that needs the most care.

The fetch/execute clock (`fe_clock`) holds two memory bits:

- `running`;
- a phase bit: FETCH or EXECUTE.

While running, each pulse of the physical clock (the `tick` input) flips the
phase bit. Each phase also has a write pulse, which is the phase ANDed with
the tick:

```
FETCH WRITE   = FETCH   & tick
EXECUTE WRITE = EXECUTE & tick & ~HALT
```

The control circuit (`control`) is purely combinational. It raises two kinds of
control wire:

- **Selection wires** (mux selects, ALU operation, PC INCREMENT/LOAD) are
  high for the whole phase, so the busses settle.
- **Write wires** (IR WRITE, R WRITE, MEMORY WRITE, PC WRITE) are the write
  pulse ANDed with the instruction. Each register captures at the clk edge
  where its write wire is high, which is the edge that ends the phase.

| phase         | all instructions                  | per instruction |
|---------------|-----------------------------------|-----------------|
| FETCH         | ADDR MUX PC                       | |
| FETCH WRITE   | IR WRITE                          | |
| EXECUTE       | PC INCREMENT (PC LOAD for a taken branch-zero) | halt: HALT; add/and/xor: ADDR MUX IR, ALU ADD/AND/XOR, R MUX ALU; load addr: R MUX IR; load: ADDR MUX IR, R MUX MEMORY; store: ADDR MUX IR |
| EXECUTE WRITE | PC WRITE                          | add/and/xor/load addr/load: R WRITE; store: MEMORY WRITE |

So each instruction takes exactly two ticks. PC + 1 is written at the end of
EXECUTE, not during the fetch.

`halt` raises HALT during its EXECUTE phase. That does two things:

- It clears `running` at the next clk edge.
- It masks the EXECUTE WRITE pulse, so a halt writes nothing.

After the sample program halts at address 4, the PC therefore still reads 4.
Because the clock stops without waiting for the tick, a run of *n*
instructions ending in a halt takes 2*n* − 1 ticks when ticks are sparse. It
takes 2*n* clk cycles when `tick` is tied high.

The "pulses" are clock enables on one synchronous clock. The original
machine uses a free-running clock and short write pulses into level-sensitive
flip-flops; here every storage element is an edge-triggered SR flip-flop on
`clk`. With `tick` tied high, every clk cycle is one phase.

## Datapath

```
           +-------------------- R mux (ALU | memory | IR[3:0]) <--+
           v                                                       |
  R ----> ALU(a)          memory out ---> ALU(b) ---> ALU out -----+
  |                       |          \--> IR --- IR[3:0] --> addr mux, PC input bus
  +--> memory input bus   +--> R mux
  +--> control (R == 0)
  PC --> addr mux --> memory address          IR[7:5] --> control
```

- `bus_mux` is the one-hot M-way selector used everywhere. Each output bit is
  the OR of (input bit AND its select line). With no select high the output is
  0. An assertion checks that at most one select is high.
- `program_counter` contains:
  - an `incrementer` (a ripple of AND/XOR cells with carry-in 1);
  - a 2-way `bus_mux` (INCREMENT selects PC + 1, LOAD selects the input bus);
  - a 4-bit `word_register` written on WRITE.

  The PC wraps from F to 0.
- `memory_bank` is a 2^N x W array of `word_register`s. A `decoder` used as a
  demux routes WRITE to the addressed word. A second decoding of the same
  address drives a one-hot `bus_mux` that reads the word out. Reads are
  combinational.
- `toy8_memory` wraps the bank with the `M[0]` and `M[F]` rules.
- `alu` computes sum, AND and XOR in parallel. The one-hot ALU ADD/XOR/AND
  lines pick one result through a `bus_mux`.
- `word_register` is W `memory_bit`s on a shared WRITE line. A `memory_bit`
  is an `sr_flipflop` with S = WRITE & d and R = WRITE & ~d.

## Module list

| module            | what it is |
|-------------------|-----------|
| `toy8_pkg`        | widths, opcode enum `opcode_e`, control-wire struct `ctrl_t` |
| `toy8_cpu`        | top: the complete computer with front-panel and I/O ports |
| `control`         | combinational control-wire decoder |
| `fe_clock`        | fetch/execute clock with RUN/HALT and write pulses |
| `program_counter` | PC = incrementer + 2-way bus mux + register |
| `alu`             | adder, AND, XOR behind a one-hot mux |
| `toy8_memory`     | 16x8 main memory with ZERO and standard I/O at M[0] / M[F] |
| `memory_bank`     | generic 2^N x W memory built of registers |
| `word_register`   | W-bit register of memory bits |
| `memory_bit`      | data + WRITE bit built on an SR flip-flop |
| `sr_flipflop`     | set/reset storage element |
| `bus_mux`         | one-hot M-way bus multiplexer |
| `incrementer`     | x + 1 ripple circuit |
| `decoder`         | N to 2^N one-hot decoder with enable |

Parameter defaults are the TOY-8 sizes, except `bus_mux`, whose default is a
4-bit 3-way mux. `W = 8` and `N = 4` at the top
are fixed by the instruction format; the building blocks are generic.

## Using the top level

Ports of `toy8_cpu`:

- **Clock and reset:** `clk`, and `rst_n` (asynchronous, active low). Reset
  clears R, IR, PC and memory and leaves the clock stopped.
- **Clock and RUN:** `tick` is the clock pulse and acts as a clock enable;
  tie it high for full speed. `run` is a one-clk pulse that starts the
  stopped machine in FETCH at the current PC. If `run` is held high, the
  machine restarts right after every halt.
- **Front panel** (active only while `halted`):
  - `panel_load_pc` copies `panel_addr` into the PC.
  - `panel_deposit` writes `panel_data` into `M[PC]`.
  - `light_mem` shows `M[PC]`.

  To load a program, set the PC and deposit, word by word.
- **Standard I/O:**
  - A read of `M[F]` that R takes in (load, add, and, xor) pulses
    `stdin_read` for one clk. Present the next word on `stdin_data` after
    that pulse.
  - A store to `M[F]` pulses `stdout_valid` with the word on `stdout_data`.
  - An instruction fetched from `M[F]` also reads `stdin_data`, but without
    a `stdin_read` pulse.
- **Lights:** `halted`, `light_pc`, `light_r`, `light_ir`, `light_mem`,
  `light_fetch`, `light_execute`.

## Simulating

Each testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/toy8_pkg.sv tb/toy8_cpu_tb.sv --top-module toy8_cpu_tb -Mdir obj
./obj/Vtoy8_cpu_tb
```

Build the other testbenches the same way: name `tb/<module>_tb.sv` and
`--top-module <module>_tb`.

- `toy8_cpu_tb` runs the top at its default size:
  - The sample program, checked phase by phase against the expected IR, R
    and PC, and for the instruction count.
  - A program that uses every instruction, both branch outcomes, `M[0]`,
    standard input and output, and self-modifying code.
  - The sample program again with an irregular `tick`.

  It counts each mechanism (halt, branch taken and not taken, each R-mux
  source, memory write, stdin, stdout, panel) and fails if any never
  happened.
- `toy8_programs_tb` runs two longer programs:
  - A Fibonacci printer, checked for 14 terms (0 to 233; later terms wrap at
    8 bits) and for its instruction count.
  - A program that sums standard input until a 0 arrives, run with random
    input lists.

  Both programs are listed in the testbench header.
- Every other module has its own testbench. These compare against reference
  models written in the testbench: exhaustive tests for the incrementer,
  decoder and control, random tests for the rest.

All simulations finish in well under a second.

## Where this RTL departs from the original description, and why

- **Synchronous clocking.** Described above. The original's warning that the
  write pulse must be very short, because of the loop through the
  incrementer, does not apply to edge-triggered registers.
- **ALU lines and load addressing.** add, and and xor each raise their own
  ALU line (ALU ADD, ALU AND, ALU XOR). load raises ADDR MUX IR together with
  R MUX MEMORY, because the memory must be addressed by the instruction's
  address field.
- **Own choices** where the original is silent:
  - the panel connections and the 2-way muxes that let the panel drive the
    PC and memory input busses;
  - the stdin/stdout handshake;
  - reset;
  - HALT masking the execute write (chosen to match the final PC of the
    example);
  - the ALU's internal structure;
  - a WRITE with no select on the PC mux loads 0.
- **Not built** because it is not logic: the switch-level feedback examples,
  the physical oscillator, and the physical switches and lamps. Their signals
  are the top's ports.

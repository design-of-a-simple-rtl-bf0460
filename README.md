# A four-instruction processor built from multiplexers

This is a complete, very small processor whose datapath is made almost
entirely from the most basic switching parts: 2-way multiplexers and
demultiplexers, registers with a "set" (load-enable) bit, and adders. It
runs a program of up to 256 16-bit instructions held in its own program
registers. It computes on eight 32-bit data registers and completes one
instruction every clock cycle. There is no pipeline, no memory bus and no
control state machine. On every cycle, four instruction circuits all work
on the current instruction at once. The instruction's 2-bit type then
decides which of their results the registers take at the clock edge.

The design is meant to be read as much as used. Each larger part is
assembled from the smaller ones (N-way multiplexers from 2-way ones, a
register with a set bit from a plain register and 2-way multiplexers). So
the RTL hierarchy, down to single clocked NOT gates, matches the way the
circuit is explained below.

## Machine state

| State | Size | Behaviour |
|---|---|---|
| R0..R7 | 8 x 32 bits | data registers; R0 is always 0 and R1 is always 1 |
| P0..P255 | 256 x 16 bits | program registers; never change while running |
| PC | 8 bits | program counter; written every cycle |

R0 and R1 are constants, so every program has 0 and 1 at hand. An
instruction that names R0 or R1 as its destination has no effect on them.
The constant 0 also makes an unconditional jump possible: `jiz R0 -> d`
always jumps.

## Instruction set and bit numbering

This is the part most easily got wrong when writing programs. The 16 bit
positions of an instruction are numbered **0 to 15 from the left**:
position 0 is the most significant bit of the 16-bit word, and position 15
is the least significant. Every multi-bit field is a binary number whose
leftmost position is its most significant bit.

| positions | 0-1 | 2-4 | 5-7 | 8-10 | 11-15 |
|---|---|---|---|---|---|
| `add Ra, Rb -> Rc` | 00 | a | b | c | 00000 |
| `neg Ra` | 01 | a | 000 | 000 | 00000 |
| `lod d -> Ra` | 10 | a | 000 | d (8-15) | |
| `jiz Ra -> d` | 11 | a | 000 | d (8-15) | |

* **add**: Rc = Ra + Rb, modulo 2^32. Then PC = PC + 1.
* **neg**: Ra = -Ra in two's complement. Then PC = PC + 1.
* **lod**: Ra = d, where d is the 8-bit constant in the low byte and the
  upper 24 bits are cleared. Then PC = PC + 1.
* **jiz**: if Ra == 0 then PC = d, otherwise PC = PC + 1. No data register
  changes.

Bits that must be zero in the table are not checked. The PC wraps from 255
to 0.

In the RTL an instruction is the packed union `sp_pkg::instr_t`. It has two
views of the same 16 bits: `.r` (`op, a, b, c`) for add and neg, and `.i`
(`op, a, d`) for lod and jiz. Because SystemVerilog packs the first struct
member into the most significant bits, `instr.r.op` is positions 0-1,
`instr.r.a` is positions 2-4, and `instr.i.d` is positions 8-15. Hex
encodings follow directly. For example, `lod 7 -> R2` is
`{2'b10, 3'd2, 3'b000, 8'd7}` = `16'h9007`. The package has encoder
functions `enc_add`, `enc_neg`, `enc_lod` and `enc_jiz`.

## One cycle of execution

```
          +-----------+  I  +----------+  Input_A, Set_A
 P0..P255 | fetch_unit|---->| add_unit |--------------+
 -------->| 256:1 mux |     +----------+              |
  PC ---->| PC + 1    |     | neg_unit |--------------+   +----------------+
          +-----------+     +----------+  Input_N, Set_N ->| writeback_unit |--> Input(Ri), Set(Ri)
             |  Increment   | load_unit|--------------+   | chosen by type |--> Input(PC)
             |  (PC)        +----------+  Input_L, Set_L ->|  bits 0-1      |
             +------------->| jump_unit|------------------>|                |
                            +----------+  Input_J(PC)      +----------------+
```

1. **Fetch** (`fetch_unit`). A 256-way 16-bit multiplexer, controlled by
   the PC, picks the instruction I out of the program registers. An 8-bit
   adder forms Increment(PC) = PC + 1.
2. **Four candidate results**, all computed combinationally from I and the
   current register outputs:
   * `add_unit`: two 8-way 32-bit multiplexers read Ra and Rb, and a 32-bit
     adder adds them. An 8-way 32-bit demultiplexer controlled by c places
     the sum on the input of Rc only. An 8-way 1-bit demultiplexer with its
     input tied to 1 produces a one-hot set vector for Rc.
   * `neg_unit`: the same structure around a 32-bit negater (invert, then
     add 1). Source and destination are both Ra.
   * `load_unit`: the zero-extended constant and a one-hot set vector are
     routed to Ra by demultiplexers.
   * `jump_unit`: an 8-way multiplexer reads Ra. A 32-input OR followed by
     NOT gives "Ra is zero". That bit controls a 2-way 8-bit multiplexer
     that picks either d or Increment(PC).
3. **Write-back** (`writeback_unit`). 4-way multiplexers controlled by the
   type bits choose which unit's register inputs and set bits go to the
   data registers. For jiz the set vector is all zeros. The next PC is the
   jump unit's output for jiz and Increment(PC) for every other
   instruction.
4. **Clock edge**. Every data register whose set bit is 1 takes its new
   input. The PC, whose set bit is tied to 1, always takes the next PC.

The units produce full-width outputs for all eight registers: a 32-bit
value plus a set bit for each. Only the demultiplexer output of the
addressed register is non-zero. This is wasteful in gates but makes every
step a plain multiplexer or demultiplexer. The synthesised processor is
about 4,300 flip-flops (4,096 of them the program registers) and roughly
38,000 cells after coarse synthesis with the hierarchy flattened. Most of
those cells are single-bit 2-way multiplexers: the feedback multiplexers
of the program registers and the tree of the 256-way instruction
multiplexer.

## Building blocks

| Module | What it is |
|---|---|
| `mux2` | 2-way 1-bit multiplexer, `z = (x1 & y) \| (x0 & ~y)` |
| `demux2` | 2-way 1-bit demultiplexer, `z0 = x & ~y`, `z1 = x & y` |
| `mux_n` | WAYS-way WIDTH-bit multiplexer: binary tree of `mux2`, most significant select bit at the root |
| `demux_n` | WAYS-way WIDTH-bit demultiplexer: binary tree of `demux2`; unselected outputs are 0 |
| `clocked_not` | clocked NOT gate: takes `~a` at each rising edge and holds it until the next |
| `clocked_reg` | plain register: per bit, a `clocked_not` followed by an ordinary NOT |
| `set_reg` | register with set bit S: a `mux2` per bit feeds back its own output when S = 0 |
| `adder` | WIDTH-bit adder, carry out dropped |
| `negater` | two's complement negation through `adder` |
| `data_registers` | R2..R7 as 32-bit `set_reg`s; R0 and R1 constant |
| `program_registers` | 256 16-bit `set_reg`s plus a load port |
| `sp_pkg` | sizes, types, opcode enum, instruction union, encoders |

`mux_n` and `demux_n` accept any power-of-two size from 2 up. A different
size stops elaboration with an error. The processor uses 2-, 4-, 8- and
256-way instances.

## Loading and running a program

The program registers are written through a port that exists only for this
purpose (`prog_we`, `prog_addr`, `prog_data`). Use it like this:

1. Hold `rst_n` low.
2. Write one instruction per clock with `prog_we` high.
3. Release `rst_n`.

Reset is asynchronous and active low. It sets PC = 0 and R2..R7 = 0. It
does not clear the program registers, so any entry you did not write holds
random contents. An assertion in `simple_processor` flags a program write
while the processor runs. While running, the program registers' set bits
are all 0 and their contents cannot change.

There is no halt instruction. End a program with a jump to itself
(`jiz R0 -> own address`). The outputs `pc`, `instr` and `regs` show the
architectural state throughout each cycle. They change just after a rising
clock edge.

Example: multiply 7 by 5 by repeated addition. This program takes exactly
27 cycles from reset release to the final self-loop.

```
0: lod 171 -> R1      ; ignored, R1 stays 1
1: lod 7   -> R2
2: lod 5   -> R3      ; loop counter
3: lod 0   -> R4      ; product
4: lod 1   -> R5
5: neg R5             ; R5 = -1
6: jiz R3  -> 10      ; loop: done when counter is 0
7: add R4, R2 -> R4
8: add R3, R5 -> R3
9: jiz R0  -> 6
10: jiz R0 -> 10      ; stop
```

## Where this design makes its own choices

The processor's architecture, instruction set and datapath structure are
those of the original description. The following choices are this
design's own:

* **Four instructions, type 11 is jiz.** The type field is 2 bits wide and
  there are four instructions. jiz takes the code that add (00), neg (01)
  and lod (10) leave free.
* **Bit order of fields**: leftmost position most significant, including
  the register index fields. The selects of the multiplexers are wired
  with position 2 (or 5, 8) as the most significant select bit.
* **Reset, load port, program start at P0, halt by self-jump.** None of
  these is specified by the original description. It assumes the program
  registers already hold the program.
* **Writes to R0 and R1 are discarded**, so the two constants stay
  permanent.
* **Internal structure of the parts given only by function.** The N-way
  multiplexers and demultiplexers are trees of the 2-way ones. The
  negater is invert-plus-one. The adders use the `+` operator rather than
  a gate-level carry chain. The write-back stage is built from 4-way
  multiplexers.
* **Clock pulse = rising edge.** A clocked gate (`clocked_not`) takes its
  new value at the rising clock edge, and every register has an
  asynchronous active-low reset.
* **Widths.** The PC incrementer is 8 bits wide, and the load unit has
  one set bit per register (8 in all).
* **Sizes in `sp_pkg`.** The sizes are fixed by the instruction format
  (3-bit register index, 8-bit address and constant), so they live in
  `sp_pkg` as constants rather than as parameters of the top module.
  `DWIDTH` can be changed there (at least 8; the testbenches assume 32).
  The others cannot be changed without changing the instruction format.

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each
ends by printing `TB_RESULT checks=N failures=M` and has a watchdog. The
reference values are computed independently in the testbench. Examples:
the truth tables for `mux2` and `demux2`, 64-bit sums for the adder,
`z + x == 0` for the negater, and a bit-by-bit assembly of the load
encoding from the position numbering.

`simple_processor_tb` runs the processor at its full size. It runs the
multiply program above and checks the product, the loop counter, R1, and
the 27-cycle count. It then loads eight random 256-instruction programs
and runs each for 1,500 cycles in lockstep with an instruction-set model
written from the bit-level encoding, comparing PC and all registers after
every edge. It also counts each mechanism and fails if one never occurs:
add, neg, lod, jump taken, jump not taken, a write aimed at R0/R1 being
discarded, and the PC wrapping from 255 to 0. A typical run makes about
108,000 checks and simulates in well under a second.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sp_pkg.sv \
    tb/simple_processor_tb.sv --top-module simple_processor_tb -o sim
./obj_dir/sim
```

Replace `simple_processor_tb` with any other `<module>_tb` to test one
block. `sp_pkg.sv` must come first on the command line. Other modules are
found through `-Irtl` by file name. To write your own programs, build
words with the `enc_*` functions in `sp_pkg` and feed them through the
load port while `rst_n` is low, as `simple_processor_tb` does in its
`load_and_start` task.

Lint (`verilator --lint-only -Wall`) reports two kinds of warning, both
expected:

* The unused R0/R1 inputs of `data_registers`.
* `rst_n` being sampled by the load-port assertion as well as used as an
  asynchronous reset.

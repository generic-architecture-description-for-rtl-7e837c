# No-instruction-set (NISC) datapaths: a programmable IP, a pipelined DCT engine, a divider core and a gated MAC

This repository holds SystemVerilog for four small pieces of hardware.
They follow the architecture examples of *Generic Architecture Description
for Retargetable Compilation and Synthesis of Application-Specific Pipelined
IPs*. That work argues that a custom IP does not need an instruction set.
The designer fixes the datapath, a netlist of register files, functional
units and multiplexers. A compiler then turns C code straight into one
*control word* per clock cycle. The control word drives every control port
of the datapath directly, so there is no instruction decoder and the
designer controls every wire of the implementation.

The four designs:

| design | top module | what it is |
|---|---|---|
| simple NISC IP | `simple_ip` | 32-bit programmable IP: controller with control memory, 32 x 32 register file, ALU, comparator, three multiplexers, external data memory |
| pipelined divider | `div_pipe` | signed 32-bit divider, 4 stages of 2 cycles each: 8-cycle latency, a new division every 2 cycles |
| pipelined DCT datapath | `cdct_datapath` | NISC datapath with four pipeline stages (address, load, multiply, accumulate) that computes an 8x8 DCT as two matrix products, one multiply-accumulate entering per cycle; optionally pipelined controller |
| ADD/MUL/MAC datapath | `mac_datapath` | multiplier and adder with one-cycle chained MAC; inputs of an idle unit are gated to zero to save power |

`nisc_top` places the four side by side. They share only the clock and reset.

## The simple NISC IP

### Datapath

```
  control word ----> konst (sign-extended) ---+-------------+
                                              v             v
  RF.r0 ----------------------------------> [In0]         [In1] <---- RF.r1
                                              |             |
              +-------------+-----------------+             +---------+-----------+
              v             v                 v             v         v           v
          dm_addr        comp.i0           alu.i0        alu.i1    comp.i1      dm_w
                            |                 |
          comp.o -> controller status         alu.o ----+
          comp.o ------------------------------------+  |   dm_r --+
                                                     v  v          v
                                                  [Out0: i0 comparator, i1 ALU, i2 memory]
                                                     |
                                                     +----> RF.w0
```

- **In0 and In1** are 2-input multiplexers. Each one chooses either a
  register-file read port or the constant field of the control word.
- **The ALU** adds, subtracts (`i0 - i1`) or inverts `i0`.
- **The comparator** tests one relation between its two inputs: `==`,
  `!=`, signed `<`, `<=`, `>`, `>=`, or unsigned `<`, `>=`. Its 1-bit result
  goes two ways: to the controller as the branch condition, and to the
  register file, so C expressions like `x < y` cost one cycle.
- **Out0** is a 3-input multiplexer. It picks the value written back to the
  register file: the comparator bit, the ALU result or the data read from
  memory.
- **The data memory** is outside the IP. Its address comes from In0, so a
  load or store uses a register or a small constant as the address. The
  write data comes from In1. Address arithmetic such as `base + i` takes
  an earlier ALU cycle.

All of this is combinational between the control memory and the register
file. One control word executes per clock cycle, without pipelining. The
register file, the data-memory write and the program counter update at
the rising edge.

### The control word

Each field of the 39-bit word (`nisc_pkg::cw_t`) is the control port of one
component:

| bits | field | drives | values |
|---|---|---|---|
| 38:37 | `nxt` | controller | 0 next, 1 jump, 2 branch if status, 3 branch if not status |
| 36 | `dm_we` | data memory | write enable |
| 35 | `dm_re` | data memory | read enable |
| 34:32 | `cmp_op` | comparator | EQ NE LT LE GT GE LTU GEU |
| 31:30 | `out0_sel` | Out0 | 0 comparator, 1 ALU, 2 memory |
| 29 | `in1_sel` | In1 | 0 constant, 1 RF.r1 |
| 28 | `in0_sel` | In0 | 0 constant, 1 RF.r0 |
| 27 | `rf_we` | register file | write enable |
| 26:22 | `rf_waddr` | register file | write address |
| 21:17 | `rf_raddr1` | register file | read address, port r1 |
| 16:12 | `rf_raddr0` | register file | read address, port r0 |
| 11:10 | `alu_op` | ALU | 0 add, 1 sub, 2 not |
| 9:0 | `konst` | In0, In1, controller | signed constant, or jump offset |

One constant field serves both data constants and jump offsets. A word
that jumps therefore cannot also use a constant operand. A word that
branches uses the comparator on its two register operands, and in the same
cycle it can still do ALU work on those operands and write back the
result.

The all-zero word is a no-operation (add, no write, next address). The
controller outputs it during reset.

### Controller and timing

The controller keeps a 10-bit program counter and a 1024-word control
memory. Its read is combinational, so the word for cycle *n* is
`cmem[pc]` in cycle *n*. The next PC is `pc + 1`, or `pc + sext(konst)`
for a jump or a taken branch. A jump with offset 0 parks the controller,
which is how programs stop.

The controller can also be pipelined (`CTRL_PIPE`, default 0). Then
`CTRL_PIPE` registers sit between the control memory and the datapath,
which takes the memory read off the critical path. A branch still
resolves when its own word reaches the datapath, so the `CTRL_PIPE` words
fetched behind it always execute. These are branch delay slots: the
program fills them, and no hardware checks for hazards. The `pc` output
always names the word the datapath is executing. The simple IP uses the
unpipelined controller; the DCT datapath below exposes the parameter.

To load a program, hold `reset` high and write words through
`prog_we / prog_addr / prog_data`, one per clock. When reset is released,
execution starts at address 0. One control word takes one cycle, so a
program's run time is exactly the number of words it passes through. The
testbenches check that count.

### Writing programs

`tb/nisc_asm_pkg.sv` builds control words with helper functions:
`alu_rr`, `alu_ri`, `li`, `clr`, `set_rr`, `ld_r`, `ld_k`, `st_r`,
`st_k`, `br_rr` and `jmp`. By convention programs set register 0 to zero
first, and `li` relies on that. For example, this loop sums 16 words
starting at address 100:

```
li(1, 100); li(2, 116); clr(3);
ld_r(6, 1);                     // r6 = mem[r1]
alu_rr(ALU_ADD, 3, 3, 6);       // r3 += r6
alu_ri(ALU_ADD, 1, 1, 1);       // r1++
br_rr(CMP_LT, 1, 1, 2, -3);     // if r1 < r2 go back 3 words
```

Writing control words by hand stands in for the compiler of the original
flow. That compiler schedules C code onto exactly these fields.

## The pipelined DCT datapath (`cdct_datapath`)

This datapath shows what the NISC approach buys when the datapath is
shaped around one application. The 8x8 DCT is computed as
`F = C1 x f x C2`. `C1` is the integer DCT matrix (the cosine matrix
`cos((2n+1)u*pi/16)/8` scaled and rounded), and `C2` is its transpose. So
the whole job is two 8x8 matrix products. The inner step of a matrix
product is split into four pipeline stages:

```
 stage 1: address       stage 2: load            stage 3: multiply   stage 4: accumulate
 adr_a <= R[r0] | ka    va <= mem[adr_a]         prod <= va * vb     acc <= (clr ? 0 : acc) + prod
 adr_b <= R[r1] | kb    vb <= mem[adr_b]                             mem[R[r0]] <= acc  (store)
```

Three changes to the C loop make this cheap:

- **The inner loop is unrolled.** The offsets `k` and `8k` become constants
  of the control word (`ka`, `kb`).
- **The two outer loops are merged.** They become one counter
  `n = 8*row + column`.
- **Index arithmetic becomes OR and AND.** Matrices sit at 64-word-aligned
  bases, so `base + 8*row + k` equals `base | 8*row | k`. Row and column
  are `n & 56` and `n & 7`.

The loop-control part is therefore small: an 8-register file, an ALU with
only add/and/or, and a comparator whose result is the branch condition. It
uses the same controller as the simple IP, with a 46-bit control word
(`cdct_pkg::cdct_cw_t`).

As in every NISC design, a stage acts in the cycle its enable field is set
in the *current* control word. Nothing travels down the pipe with the
data. The program does the scheduling.

One output element takes 15 words:

| word | stage 1 | stage 2 | stage 3 | stage 4 | loop control |
|---|---|---|---|---|---|
| 0 | k=0 | | | | |
| 1 | k=1 | k=0 | | | |
| 2 | k=2 | k=1 | k=0 | | |
| 3..7 | k=3..7 | k=2..6 | k=1..5 | k=0..4 (clear at k=0) | |
| 8 | | k=7 | k=6 | k=5 | n++ |
| 9 | | | k=7 | k=6 | row = n & 56 |
| 10 | | | | k=7 | row pointer = A \| row |
| 11 | | | | store acc | output pointer++ |
| 12..14 | | | | | column pointer, branch if n != 64 |

A product takes 7 set-up words plus 64 x 15, so the full DCT takes
2 x 967 = 1934 cycles. The data memory is outside and has two read ports,
one per operand, so a multiply-accumulate can enter every cycle.
`tb/cdct_asm_pkg.sv` generates this program.

### Pipelining the controller

With `CTRL_PIPE = P` on `cdct_datapath`, every word reaches the stages P
cycles after it is fetched. The schedule above is unchanged. The only cost
is P delay-slot no-ops behind each loop branch, i.e. P extra cycles per
output element. The DCT then takes `P + 2 x (7 + 64 x (15 + P))` cycles:

| `CTRL_PIPE` | cycles |
|---|---|
| 0 | 1934 |
| 1 | 2063 |
| 2 | 2192 |

Each controller stage costs 128 cycles, plus one cycle to fill the
pipeline after reset. In exchange, the clock no longer has to cover the
control-memory read. `tb_cdct_datapath` runs all three settings side by
side and checks each count exactly.

## The pipelined divider (`div_pipe`)

The divider's timing is the specified part:

```
cycle      t     t+1   t+2 ... t+7   t+8
start      1     0
operands   A/B   A/B   (free)
stage      1     1     2 ... 4
result                               quotient/remainder valid, done = 1
```

- Operands must stay on the inputs for two cycles, because the first stage
  reads them in both of its cycles. An assertion checks this.
- A new `start` may follow two cycles after the previous one, so up to four
  divisions are in flight.
- The result stays on the outputs until the next division leaves the last
  stage.

Inside, each stage runs 8 steps of restoring division on the operand
magnitudes, 4 per cycle. In its first cycle a stage works from its input
register and parks the partial remainder and quotient in a middle register.
In its second cycle it finishes, taking the divisor and the signs again from
its still-unchanged input. The last stage applies the signs.

Results follow C: the quotient rounds toward zero and the remainder takes
the dividend's sign. Division by zero returns quotient -1 (1 for a negative
dividend) and the dividend as remainder. `STAGES` can be changed as long
as `2*STAGES` divides `W`.

## The gated ADD/MUL/MAC datapath (`mac_datapath`)

`op` selects ADD (`acc <= a + b`), MUL (`acc <= a * b`), MAC
(`acc <= acc + a * b`) or no operation. All take one cycle. For MAC the
multiplier output feeds the adder in the same cycle. This avoids the cost
of putting registers between the units, which would make MAC take two
cycles and add clock load.

Power is saved instead by gating. With `GATING = 1` the inputs of the unit
the current operation does not use are ANDed to zero. The multiplier sees
zeros during ADD and idle cycles, the adder during MUL and idle cycles.
`GATING = 0` gives the plain datapath with identical results.

## How far to trust it, and where it fills gaps

The source architecture gives the simple IP's components, its 32-bit bus,
the 32-register 2-read/1-write register file, the ALU's three operations,
the 10-bit constant at the bottom of the control word with the ALU control
just above it, and most of the netlist. These are this design's own
choices:

- The memory address coming from In0. The source does not pin this
  down.
- The comparator's set of relations and all field encodings.
- The 2-bit next-address field, with PC-relative jumps by the constant.
- The control-memory depth (1024) and the programming port.
- Single-cycle combinational reads of the control memory and data memory.
- No hard-wired zero register.

The source counts 35 control bits (45 with the constant). The control ports
of this netlist come to 27 bits, plus the 2-bit next-address field, which
gives 39. The source does not list its control ports, so the difference
cannot be resolved.

For the divider, only the timing (4 stages x 2 cycles, operands held 2
cycles, 8-cycle latency, issue every 2 cycles) is specified. The division
algorithm and the signed semantics are this design's. For the MAC datapath,
the operations, the one-cycle chaining and the input gating are specified.
The widths and operation codes are not.

For the DCT datapath, the four stages, their order and the loop
transformations (unrolling, merged loops, OR/AND index arithmetic) follow
the source's first custom DCT design. Everything else is this design's
own choice: the second memory read port, the register count, the control
word, 32-bit data, where the store happens, and the scale factor 1024 in
`C1`. The source reports 3080 cycles for its version. This one takes 1934,
mainly because of the assumed second read port. The source's later
refinements of that datapath are included only in part. The pipelined
controller is there (`CTRL_PIPE`), with delay slots filled by no-ops. This
gives the same +128 cycles per controller stage that the source reports.
Not included are the trimmed interconnect and operation sets, the
narrower data, the multi-cycle multiplier and the extra registers after
the register file. The source names these but does not give their
structure.
The MIPS-like processors of its other experiments are not included
either.

The simple IP has no multiplier, so it cannot run the DCT. Its ALU offers
only add, subtract and not.

## Files and simulation

- `rtl/nisc_pkg.sv`: widths, encodings and the control-word struct.
- `rtl/simple_ip.sv`: the NISC IP. It instantiates `nisc_controller.sv`,
  `nisc_rf.sv`, `nisc_alu.sv`, `nisc_comparator.sv` and `nisc_mux.sv`.
- `rtl/cdct_pkg.sv`, `rtl/cdct_datapath.sv`, `rtl/cdct_alu.sv`: the DCT
  datapath. It reuses the controller, register file, multiplexer and
  comparator.
- `rtl/div_pipe.sv`, `rtl/mac_datapath.sv`: the divider and the MAC datapath.
- `rtl/nisc_top.sv`: all four side by side.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_cdct_datapath.sv`: a full 8x8 DCT on random pixels, run with 0, 1
  and 2 controller pipeline registers. It checks both intermediate and
  final matrices, and the exact cycle count of each.
- `tb/tb_nisc_top.sv`: runs all four designs at once with default
  parameters. It counts every mechanism (taken and untaken branches,
  jumps, loads, stores, each ALU operation, comparator write-back, divider
  at full rate with four divisions in flight, each MAC operation, gated
  cycles, all four DCT stages busy at once) and fails if one never occurs.
- `tb/data_mem_model.sv`, `tb/data_mem_2r1w_model.sv`: behavioural data
  memories (combinational reads, clocked write).
- `tb/nisc_asm_pkg.sv`, `tb/cdct_asm_pkg.sv`: control-word builders and
  program generators.

Run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nisc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/nisc_pkg.sv rtl/cdct_pkg.sv tb/tb_nisc_top.sv
./obj_dir/Vtb_nisc_top
```

Replace `tb_nisc_top` with any other testbench name. Every testbench runs
in well under a second.

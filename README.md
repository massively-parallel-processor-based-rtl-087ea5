# Systolic computational-memory array for difference schemes

Difference schemes update each grid point from values at its neighbours. That
holds for every step of the fractional step method used for incompressible
flow: the tentative velocity, the Poisson iteration for the pressure and the
velocity correction. Once the per-point coefficients are known, each step has
the same shape:

    x_new(i,j) = A + B x(i,j) + C x(i+1,j) + D x(i-1,j) + E x(i,j+1) + F x(i,j-1)

The coefficients A..F depend only on values held at point (i,j) itself.

The design maps one grid point (or a block of points) to each processing
element (PE) of a 2-D mesh. Every PE keeps its variables and coefficients in
its own register file, so the array's memory is distributed and its bandwidth
grows with the array: a "computational memory". Neighbour values arrive
through four communication registers per PE. One controller broadcasts the
same instruction to all PEs in each cycle. A stencil sweep is then six
instructions: one publishes x to the four communication registers, and five
multiply-adds build the sum in the accumulator, one term per cycle. All PEs do
this at once.

The arithmetic is IEEE-754 single precision. Each PE's ALU computes `a + b*c`
or `(a + b)*c`.

## Array

```
            north_in[x] / north_out[x]
                 |  ^        |  ^
           +-----v--+--+ +---v--+--+
 west_in -->  PE00     |-|  PE10     |<-- east_in
 west_out<--           | |           |--> east_out
           +-----+--^--+ +---+--^--+
                 v  |        v  |
           +-----+--+--+ +---+--+--+
 west_in -->  PE01     |-|  PE11     |<-- east_in
 west_out<--           | |           |--> east_out
           +-----+--^--+ +---+--^--+
                 v  |        v  |
            south_out[x] / south_in[x]
```

`PE<x><y>` is in column x, which grows to the east, and row y, which grows to
the south. The default array is 2x2. The parameters `NX` and `NY` set any
n x m mesh.

Each PE reads the register of each neighbour that faces it:

| PE input | comes from                  | at the array edge |
|----------|-----------------------------|-------------------|
| `n_in`   | north neighbour's S-register | `north_in[x]`     |
| `s_in`   | south neighbour's N-register | `south_in[x]`     |
| `w_in`   | west neighbour's E-register  | `west_in[y]`      |
| `e_in`   | east neighbour's W-register  | `east_in[y]`      |

The outward registers of the edge PEs come out as `north_out`, `south_out`,
`west_out` and `east_out`. The edge ports have three uses:

* The host loads and unloads the array through them.
* They supply boundary-cell values to a stencil.
* Arrays, or array halves on different chips, could be chained through them.

## Processing element

Each PE (`pe`) contains the following parts:

* **Register file** (`pe_regfile`): 32 words by default. It has three
  asynchronous read ports, one per ALU input, and one write port that writes at
  the clock edge.
* **Operand multiplexer**: it feeds each ALU input from one of eight sources:
  * a register-file word, with a separate address per input;
  * one of the four neighbour inputs;
  * the PE's own accumulator;
  * one of the constants 0.0 and 1.0.
* **ALU** (`pe_alu`): computes `a + b*c` (`OP_MAC`) or `(a + b)*c` (`OP_AMUL`).
  It can also pass `c` through unchanged (`OP_PASS`). Each step rounds on its
  own; nothing is fused.
* **Accumulator** (`acc`).
* **Four communication registers** N, S, W, E.

One instruction produces one result. That result may be written, in the same
cycle, to any combination of these places:

* the accumulator;
* one register-file word;
* any of the four communication registers.

All writes happen at the rising edge. A neighbour sees a communication-register
value from the cycle after the one that wrote it, and the value stays until the
next write. The reset `rst_n` is synchronous and active low. It clears the
accumulator and the communication registers. It does not clear the register
file.

## Instruction word

`sca_pkg::instr_t` is a packed struct of 38 bits. The first field is the most
significant.

| bits  | field    | meaning |
|-------|----------|---------|
| 37:35 | `op`     | `OP_NOP`=0, `OP_MAC`=1 (a+b*c), `OP_AMUL`=2 ((a+b)*c), `OP_PASS`=3 (c), `OP_HALT`=7 |
| 34:32 | `src_a`  | source of a: `SRC_RF`=0, `SRC_N`=1, `SRC_S`=2, `SRC_W`=3, `SRC_E`=4, `SRC_ACC`=5, `SRC_ZERO`=6, `SRC_ONE`=7 |
| 31:29 | `src_b`  | source of b, same codes |
| 28:26 | `src_c`  | source of c, same codes |
| 25:21 | `addr_a` | register-file address read when `src_a` = `SRC_RF` |
| 20:16 | `addr_b` | same for b |
| 15:11 | `addr_c` | same for c |
| 10:6  | `addr_d` | register-file address written when `wr_rf` is set |
| 5     | `wr_rf`  | write the result to the register file |
| 4     | `wr_acc` | write the result to the accumulator |
| 3..0  | `wr_n`, `wr_s`, `wr_w`, `wr_e` | write the result to that communication register |

`OP_NOP` and `OP_HALT` write nothing. `OP_HALT` ends the program.

### Programming the array

The sequencer (`sequencer`) holds the program in a 256-word instruction
memory. The host writes it through `prog_we`/`prog_addr`/`prog_data` while
the sequencer is idle; an assertion flags a write during a run. The host then
pulses `start`. The timing is as follows:

* The edge that samples `start` resets the program counter.
* From the next edge on, the sequencer presents one instruction word per cycle.
  For that word, `issue_valid` is high and `issue_pc` holds its address.
* On reaching `OP_HALT` (or after the last memory word), the sequencer drops
  `busy` and pulses `done` for one cycle.

A program of L words before its HALT therefore occupies the array for exactly
L cycles. There are no branches and no loop counter. To repeat a sequence,
unroll it in the program or start the program again.

A complete job has three phases:

1. **Loading, using the communication registers as shift registers.** Each
   register-file word takes `NX` instructions. First come `NX-1` instructions
   `E <= PASS(W)`, then one instruction `RF[k] <= PASS(W)`. In the cycle each
   instruction is issued, the host presents on `west_in[y]` the word meant for
   column `NX-1-s`, where s is the step. Use `issue_pc` to time this. After
   the last step, every column holds its own word.
2. **Computation.** For example, one sweep of the stencil above, with x in
   word 0 and A..F in words 1..6:

       PASS  c=RF0                 -> N,S,W,E        publish x
       MAC   a=RF1 b=RF2 c=RF0     -> ACC            A + B x
       MAC   a=ACC b=RF3 c=E       -> ACC            + C x(i+1,j)
       MAC   a=ACC b=RF4 c=W       -> ACC            + D x(i-1,j)
       MAC   a=ACC b=RF5 c=N       -> ACC            + E x(north)
       MAC   a=ACC b=RF6 c=S       -> ACC, RF0       + F x(south), new x

   That is 6 cycles per sweep for the whole array. All PEs update together, so
   a sweep is a Jacobi-style update. A red-black Gauss-Seidel ordering can be
   programmed through the data alone. Give each PE two coefficient sets, and
   make one set the identity (A=0, B=1, all others 0) on the points that must
   hold still during that half-sweep.
3. **Unloading.** First `E <= PASS(RF[k])`, then `NX-1` instructions
   `E <= PASS(W)`. After each of these instructions, `east_out[y]` holds
   column `NX-1`, `NX-2`, ... and so on.

When there are fewer PEs than grid points, each PE holds a block of points in
its register file. Neighbours inside a block are then register-file reads, and
only the block edges go through the communication registers. The instruction
set is the same.

## Floating-point arithmetic

`fp_add` and `fp_mul` are combinational IEEE-754 binary32 units. They follow
these conventions:

* They round to nearest, ties to even.
* Subnormal inputs count as zero, and results below the normal range are
  flushed to a signed zero.
* Overflow gives infinity.
* NaN operands, inf - inf and inf * 0 give the quiet NaN `7FC00000`.
* An exact zero sum of opposite-signed operands is +0.

The adder follows the usual sequence:

1. Order the operands by magnitude.
2. Align the smaller one, keeping guard, round and sticky bits.
3. Add or subtract.
4. Normalise with a leading-zero count.
5. Round.

The multiplier normalises the 48-bit significand product by at most one place
and then rounds.

`pe_alu` gives each operation order its own adder and multiplier chain. The
ALU therefore contains two adders and two multipliers. The original PE has
one adder and one multiplier and uses them in either order. Sharing them that
way creates a combinational loop (adder → multiplier → adder) through the
operand multiplexers. That loop is never active, but it is real in the
netlist, so this design does not share the units. A design that must save
area can share one adder and one multiplier by registering the intermediate
result and spending two cycles per operation. That halves the peak rate.

## Throughput and sizes

Each PE completes one `a+b*c` or `(a+b)*c` per cycle, which is 2 flops per PE
per cycle. The prototype this architecture was planned for has about 200 PEs
on two Stratix II EP2S180 FPGAs, with the arithmetic running at 75 MHz. That
gives a peak of 200 × 2 × 75 MHz = 30 Gflops. The default 2x2 array gives
0.6 Gflops at the same clock. Reaching 200 PEs means setting `NX`/`NY`, for
example to 20x10. `prototype_200pe_tb` runs the stencil job at that size:
the whole program is 193 words and takes 195 cycles.

In this RTL the adder and multiplier are combinational and sit in the same
cycle as the operand selection and the register-file read. It has not been
timed on an FPGA, and it will not reach 75 MHz without pipelining.

| parameter    | default | where | meaning |
|--------------|---------|-------|---------|
| `NX`, `NY`   | 2, 2    | `systolic_top`, `pe_array` | array columns and rows |
| `RF_DEPTH`   | 32      | `systolic_top`, `pe_array`, `pe` | register-file words per PE (at most 32: the address fields are 5 bits) |
| `IMEM_DEPTH` | 256     | `systolic_top`, `sequencer` | program words |

## What follows the original architecture and what is this design's own

These parts follow the original architecture:

* the 2-D mesh of PEs;
* the N/S/W/E communication registers, which neighbours read at any later
  time;
* the register file as local memory;
* the accumulator;
* the multiplexer in front of a three-input ALU that computes `a+bc` or
  `(a+b)c`;
* single-precision floating point;
* lock-step execution by all PEs;
* loading the register files by shifting through the communication
  registers;
* the 2x2 default size.

These parts are this design's own choices:

* the instruction encoding and the per-operand sources and addresses;
* the constants 0.0 and 1.0 as sources;
* `OP_PASS` and `OP_HALT`;
* the sequencer and its instruction memory;
* the host program port;
* the use of the edge ports for data in and out;
* the register-file size and port count;
* reset behaviour;
* single-cycle execution;
* the floating-point conventions above;
* the separate adder/multiplier chains for each operation order.

The original architecture has a prototype board, a PCI card with two FPGAs.
The board's host interface and the split of the array across the two chips
are not part of this RTL.

## Files

| file | content |
|------|---------|
| `rtl/sca_pkg.sv` | word and instruction types, operation and source codes |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | single-precision adder and multiplier |
| `rtl/pe_alu.sv` | `a+b*c` / `(a+b)*c` / pass |
| `rtl/pe_regfile.sv` | PE register file |
| `rtl/pe.sv` | processing element |
| `rtl/pe_array.sv` | NX x NY mesh |
| `rtl/sequencer.sv` | program memory and instruction broadcast |
| `rtl/systolic_top.sv` | sequencer + array |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `fp_add_tb`, `fp_mul_tb` | 40,000 directed and random operand pairs each, against a reference that goes through double precision and rounds to single once more. For + and ×, rounding twice this way gives the same result as rounding once. |
| `pe_alu_tb` | all operations on random operands |
| `pe_regfile_tb` | three read ports against a shadow copy while random writes run |
| `sequencer_tb` | word order, `issue_pc`, the exact cycle count, the `done` pulse, `start` ignored while busy, a program without HALT |
| `pe_tb` | 20,000 random instructions against an instruction-level model (`tb/pe_model_pkg.sv`); reset; every operand source used |
| `pe_array_tb` | a 3x2 mesh under random instructions and random boundary inputs against the model |
| `systolic_top_tb` | end to end on a 6x4 array (see below) |
| `systolic_top_full_tb` | end to end at the default 2x2 size |
| `prototype_200pe_tb` | the same end-to-end job on a 20x10 array (200 PEs) |
| `fractional_step_tb` | one complete fractional-step time step on a 4x4 array (see below) |
| `grid_block_tb` | a 4x2 grid on the 2x2 array, two points per PE, three stencil sweeps |

The end-to-end job of `systolic_top_tb`, `systolic_top_full_tb` and
`prototype_200pe_tb` runs these phases:

1. The host writes the program.
2. The program shifts in 7 words per PE.
3. It runs two stencil sweeps, with boundary inputs on all four edges.
4. It runs one `(a+b)*c`.
5. It shifts both results out.

The whole program runs twice. The test compares the results with a reference
computed in the same order of operations. It also checks that the run takes
exactly as many issue cycles as the program has words. Finally, it counts how
often each mechanism occurred (shift-in, reads from each of the four
neighbours and each boundary, accumulation, `(a+b)c`, shift-out, halt,
restart) and fails on any that never happened.

`fractional_step_tb` runs one full time step, with one staggered-grid cell
per PE. The test program holds 233 words; 120 of its cycles are loading and
20 are unloading. It runs these steps:

* It computes `v_on_u` and `u_on_v`. Each needs a diagonal neighbour, which
  arrives in two hops through the communication registers.
* It computes the velocity-dependent coefficients of the tentative velocity
  in every PE: `k + h*u` is a single multiply-add.
* It computes `u*` and `v*`, then the divergence `D`.
* It solves the pressure equation with three red-black SOR iterations
  (ω = 1.5). Each PE holds a weight that is ω on one colour and 0 on the
  other. From that weight the PE computes, for each half-sweep, the
  coefficients of `phi' = (1-w) phi + w K(...)`. Points of the idle colour
  therefore keep their value, and every PE still runs the same instructions.
* It applies the velocity correction.

The test checks `u*`, `v*`, `phi`, `u` and `v` against a double-precision
evaluation of the same equations to a relative error of 1e-4. `grid_block_tb`
checks its results against a double-precision evaluation in the same way.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -j 0 --top-module systolic_top_tb \
        -y rtl -y tb +libext+.sv rtl/sca_pkg.sv tb/fp_ref_pkg.sv \
        tb/systolic_top_tb.sv -o sim
    obj_dir/sim

Replace the top module and file for other testbenches. `pe_tb` and
`pe_array_tb` also need `tb/pe_model_pkg.sv` after `tb/fp_ref_pkg.sv`. To lint
the RTL, run `verilator --lint-only -Wall -y rtl +libext+.sv rtl/sca_pkg.sv
rtl/systolic_top.sv`.

## Known limits

* There is no loop or branch hardware. Iterative solvers such as the
  Gauss-Seidel/SOR pressure iteration are unrolled in the program or run by
  restarting it.
* There is no Gauss-Seidel wavefront support. All PEs update together.
* The fractional-step schedule in `fractional_step_tb` is one possible
  schedule, not tuned for cycle count. Its pressure solver uses the red-black
  order. The point-by-point (lexicographic) Gauss-Seidel order cannot run in
  lock step.
* The register-file address fields are 5 bits, which caps `RF_DEPTH` at 32
  unless `sca_pkg::RF_AW` is widened.

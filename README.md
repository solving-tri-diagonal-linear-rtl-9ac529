# Pipelined tri-diagonal solver (Thomas algorithm) in SystemVerilog

Many numerical codes solve large numbers of small, independent tri-diagonal
linear systems. Finite-difference schemes for PDEs on regular grids do this,
and so does cubic-spline fitting. This design solves such systems as a stream
in an FPGA co-processor. It uses the Thomas algorithm (TDMA), which is LU
factorisation specialised to a matrix of bandwidth one. The algorithm has two
passes. The forward pass factorises the matrix and substitutes forward. The
backward pass then substitutes backward. Each pass is one hardware stage that
takes one matrix row per clock cycle. Two register banks sit between the
stages, so the backward pass of one system runs at the same time as the
forward pass of the next. M systems of N rows therefore take N·(M+1) cycles
instead of 2·N·M.

The arithmetic is a floating-point library of its own. Exponent and mantissa
widths are parameters. Results are truncated, and there is no NaN, infinity
or subnormal. The defaults give the IEEE-754 single-precision layout
(8-bit exponent, 23-bit mantissa).

## Storage convention

A system of n equations is held as four arrays of n words:

| array | contents | padding |
|---|---|---|
| `L` | sub-diagonal: `L(i)` is the coefficient of x(i) in equation i+1 | `L(n) = 0` |
| `D` | diagonal | |
| `U` | super-diagonal: `U(i)` is the coefficient of x(i) in equation i−1 | `U(1) = 0` |
| `x` | right-hand side; it becomes the solution | |

Row i of the system is the tuple `(L(i), D(i), U(i), x(i))`. In the input
memory, one row is one 128-bit word. The word is packed `{L, D, U, x}`, with L
in the most significant 32 bits.

## The two stages

**Forward stage (`tdma_factorise`).** For row i it computes:

    D'(i) = D(i) − L'(i−1)·U(i)
    L'(i) = L(i) / D'(i)
    x'(i) = x(i) − L'(i−1)·x'(i−1)

`L'(i−1)` and `x'(i−1)` come from registers written by the previous row.
There are two chains of arithmetic in the stage. One is a multiply, a subtract
and a divide for D and L. The other is a multiply and a subtract for x. The
two chains are independent and work in the same cycle. The stage passes on
`(D', U, x')`. It does not pass on L, because the backward pass does not need
it.

**Backward stage (`tdma_bsub`).** Rows arrive in reverse order, n down to 1.
For each row it computes:

    x(i) = (x'(i) − U(i+1)·x(i+1)) / D'(i)

`U(i+1)` and `x(i+1)` are registers holding values from the previous row.

Both stages are combinational from their row inputs to their outputs. The
only state they hold is the pair of registers that carries values from one
row to the next. Both stages clear those registers after the last row of a
system. Row 1 of the next system therefore starts from zero, which turns the
first step into `L'(1) = L(1)/D(1)`, `x'(1) = x(1)`. The zero padding of
`L(n)` and `U(1)` would give the same result. The clear makes the design
independent of what the host writes there.

There are no pipeline registers inside the arithmetic. The critical path runs
through a multiplier, an adder and a Goldschmidt divider, and that divider is
ten multipliers deep. This is deliberate: the design trades clock frequency
for one row per cycle with no hazards. On an FPGA of the Virtex-4
generation, expect a clock below 5 MHz. Pipelining the arithmetic would
need more than one system in flight per stage, and this design does not do
that.

## Double banking: how two systems overlap

This is the heart of the design. The backward pass of a system can start only
when its forward pass has finished, because `D'(n)` and `x'(n)` come last. A
single buffer would leave the forward stage idle while the backward stage
works. `tdma_bank_pair` holds two banks, and each bank can store one whole
factorised system (up to `MAX_N` rows of `{D', U, x'}`):

* The **DEMUX** (write side) writes forward-stage rows into bank `wr_sel`, in
  row order. When it writes the row marked end-of-system (`eos`), it marks
  that bank full, records its length and switches to the other bank.
* The **MUX** (read side) reads bank `rd_sel` while that bank is full. It
  starts at the last row and works down to row 1. It marks row 1 `rd_last`.
  After row 1 it marks the bank empty and switches.

A row written at a clock edge can be read in the next cycle. For systems of N
rows that arrive without gaps, the schedule is:

| cycle | 1 … N | N+1 … 2N | 2N+1 … 3N | … | M·N+1 … (M+1)·N |
|---|---|---|---|---|---|
| forward stage | system 1, rows 1…N → bank 0 | system 2 → bank 1 | system 3 → bank 0 | … | idle |
| backward stage | idle | system 1, rows N…1 ← bank 0 | system 2 ← bank 1 | … | system M |

Bank 0 becomes empty at the edge that ends cycle 2N, which is exactly when
the forward stage needs it again. An equal-sized stream therefore never
stalls. If the sizes differ, for example a short system after a long one, the
DEMUX bank may still be busy. `wr_ready` then drops and the row waits.
`tdma_solver` reports this as `stall`. A system longer than `MAX_N` rows is
cut at `MAX_N` rows, and the sticky `overflow` flag is set. The top level
refuses such sizes at start, so this cannot happen there.

`tdma_solver` connects forward stage → bank pair → backward stage → one
output register. Solutions come out in reverse order (x(N) first). Each one
carries its row index, and x(1) is flagged `out_last`. x(N) of a system
appears two cycles after the system's last row was accepted. x(1) appears
N+1 cycles after that row.

## Floating-point units

All three units are combinational. They are parameterised by `EXP_W` and
`MAN_W`. A word is `{sign, exponent biased by 2^(EXP_W−1)−1, mantissa with a
hidden one}`, and an exponent field of zero is the value zero. Results that
underflow become zero. Results that overflow saturate to the largest finite
magnitude. All results are truncated (rounded toward zero).

* `fp_addsub` orders the operands by magnitude and aligns the smaller one,
  keeping 3 guard bits and no sticky bit. It then adds or subtracts, and
  normalises with a leading-zero count.
* `fp_mul` forms the full significand product, normalises it by at most one
  place and truncates it.
* `fp_div` uses Goldschmidt's algorithm. Both significands are halved, so the
  divisor D₀ lies in [0.5, 1). Each of the `GS_ITER` unrolled iterations
  multiplies numerator and divisor by F = 2 − D. The divisor converges
  quadratically to 1 and the numerator to the quotient. There is no seed
  table. The error after k iterations is therefore at most 2^−(2^k), and the
  default of 5 iterations covers a 23-bit mantissa. Dividing by zero gives the
  largest finite magnitude.

Errors measured over 2000 random operand pairs in single precision (printed
by the testbenches):

| operation | mean relative error | maximum relative error |
|---|---|---|
| add/sub | 2.6e-8 | 1.1e-7 |
| multiply | 4.2e-8 | 1.2e-7 |
| divide | 4.2e-8 | 1.2e-7 |

The test matrices are diagonally dominant, with sizes from 1 to 32 rows. On
these, the whole solver stays within about 3e-7 of the largest solution
component, measured against a double-precision Thomas solve of the same
input values. Systems that are not diagonally dominant will lose more
accuracy. The Thomas algorithm does not pivot.

## Memory side and run control (`tdma_coprocessor`)

The top level connects to two external memories. Each one is a pair of
64-bit, 8 MB QDR SRAMs used as a single 128-bit-wide memory with 2^20
addresses. The input memory is read only and the output memory is written
only. The host loads the input memory, sets `n_rows` (N), `n_sys` (M),
`in_base` and `out_base`, and pulses `start`.

* `sram_row_reader` issues one read per cycle and tags every N-th row as
  end-of-system. The tag is counted, not stored in the data. The SRAM answers
  `RD_LAT` cycles later (default 2), and the answers go into a FIFO of
  `RD_LAT+2` entries. A read is issued only while the FIFO has room for every
  read in flight, so back-pressure from the solver loses nothing.
* `sram_sol_writer` stores solution j of system m at flat position
  p = m·N + j. It packs four 32-bit solutions per 128-bit word. The word
  address is `out_base + p/4`, and a one-hot lane enable selects lane `p%4`.
  The host therefore reads the solutions in natural order.
* The controller refuses a start with N = 0, N > `MAX_N` or M = 0, and raises
  `err` when it does. `busy` is high during a run. `done` rises when the last
  solution has been written and stays high until the next start.
  `run_cycles` counts the cycles from start to done: **N·(M+1) + RD_LAT + 4**.
  That is the pipelined count plus the latency of the reader (RD_LAT+2), the
  solver output register and the writer register. `stall_count` counts
  stalled rows; with a constant N it stays at zero. `overlap_count` counts
  the cycles in which both passes are busy, which is (M−1)·N for a run.
  `demux_sel` and `mux_sel` show which bank each side is using.

With the defaults, the input memory holds 16 MiB of 5×5 single-precision
systems: 209,715 systems in 1,048,575 rows. The testbench
`tb_tdma_workload_5x5` solves all of them in a single run of 1,048,586
cycles.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `EXP_W`, `MAN_W` | 8, 23 | floating-point exponent and mantissa widths |
| `GS_ITER` | 5 | Goldschmidt iterations in the divider |
| `MAX_N` | 32 | rows per register bank, the largest system |
| `ADDR_W` | 20 | SRAM address width (2^20 × 128 bits = 16 MiB) |
| `RD_LAT` | 2 | input SRAM read latency (at least 1) |
| `LANES` | 4 | solutions per output word (a power of two, at least 2) |

Other precisions work unchanged. For example, an 11/52 layout with
`GS_ITER` = 6 gives double precision, and `tb_fp_precision` tests it. For a
mantissa of m bits, `GS_ITER` needs 2^GS_ITER ≥ m + 2. The package
`tdma_pkg` holds the defaults and the controller's state type.
The SRAM word is 4·(1+`EXP_W`+`MAN_W`) bits, so at other precisions it is no
longer 128 bits.

## What follows the source design and what is this design's own

The source design gives the following, and this RTL follows it:

* the Thomas algorithm as a forward stage and a backward stage, each taking
  one row per clock, with the previous row's values kept in registers
* the storage convention
* the two register banks with a DEMUX and a MUX that switch at end of system
* the N·(M+1) schedule
* single-cycle floating-point units with generic widths and truncation, with
  no special cases and division by Goldschmidt iteration
* 128-bit input and output memory paths

These are choices made here:

* the internal structure of the floating-point units (guard bits, no seed
  table, five iterations, underflow and overflow handling, result of a
  division by zero)
* the register clear at end of system
* the handshake, the stall and the overflow rule of the bank pair
* bank depth `MAX_N` = 32
* the row packing in the memory word, and end-of-system found by counting
  rows
* the read latency and FIFO
* the layout of the output memory and its lane enables
* the control and status ports

Outside this RTL:

* the host interface (NUMAlink and the vendor's RASC core services)
* the SRAM chips themselves
* a reduced, shallower divider that can be used to reach a higher clock in
  hardware, traded against accuracy

The top level exposes the host interface as plain control ports and both
memory ports.

## Files

`rtl/`: `tdma_pkg`, `fp_addsub`, `fp_mul`, `fp_div`, `tdma_factorise`,
`tdma_bsub`, `tdma_bank_pair`, `tdma_solver`, `sram_row_reader`,
`sram_sol_writer`, and the top level `tdma_coprocessor`. Each file opens with
a description of its interface and timing.

`tb/`: one self-checking testbench per module (`tb_<module>`), the
end-to-end `tb_tdma_coprocessor`, the full 16 MiB workload
`tb_tdma_workload_5x5`, `tb_fp_precision` (the units at a double-precision
and a 16-bit layout, and the solver at double precision), the helper package `tb_fp_pkg` (conversions between
the format and `real`), and `qdr_sram_model`, a behavioural SRAM used by the
memory-side tests. Every testbench compares with references computed in
double precision, has a watchdog, and ends by printing
`TB_RESULT checks=<n> failures=<n>`. The end-to-end tests also check the
cycle counts above. They count each mechanism: overlapped cycles, bank
switches, stalls and refused starts. A test fails if any of these never
happened.

## Simulating

From the directory holding `rtl/` and `tb/`, for example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/tdma_pkg.sv tb/tb_fp_pkg.sv tb/tb_tdma_coprocessor.sv \
        --top-module tb_tdma_coprocessor
    ./obj_dir/Vtb_tdma_coprocessor

Verilator finds the other modules through `-I` by their file names. The same
command works for any other testbench. Replace the last file and the top
module name, and add `tb/tb_fp_pkg.sv` wherever the testbench imports it.
The full workload test builds in a few seconds and runs in a few seconds
more. To lint a module, use
`verilator --lint-only -Wall -Irtl rtl/tdma_pkg.sv rtl/<module>.sv`.

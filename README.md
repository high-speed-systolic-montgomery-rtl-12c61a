# Systolic Montgomery modular multipliers with a two-cycle iteration

RSA encryption and decryption spend nearly all their time in modular
multiplication, `P = A*B mod N`, on 128- to 1024-bit numbers. Montgomery's
method avoids the trial division: it computes `A*B*2^(-k) mod N` by scanning
the bits of `A` and, in each step, adding either `B`, `N`, both or nothing to
a running sum and halving it. In hardware the running sum is kept in
carry-save form (a sum vector and a carry vector), so no carry has to ripple
across the word.

The usual carry-save formulation has one weak point. In each step the
quotient bit `q`, which decides whether `N` is added, depends on the LSB of
the sum *after* `a_i*B` has been added. The cell in column 0 computes `q`
and broadcasts it to every other column in the same cycle, and that chain
sets the clock period.

This design breaks the chain by splitting every iteration into two clock
cycles that share one adder per bit:

| cycle | `ctrl` | operation | what it produces |
|-------|--------|-----------|------------------|
| 1 | 0 | `(Ct, St) = Cin + Sin + a_i*B` | intermediate carry-save pair |
| 2 | 1 | `(C, S) = Ct + St + q*N`, where `q = St[0]` | result of the iteration |

Between the two cycles `St` sits in a register, so `q` is just a flip-flop
output. After cycle 2, `S[0]` is always 0 because `N` is odd. Halving is
therefore pure wiring: `Sin' = S >> 1`, `Cin' = C`.

The cycle count per iteration doubles. In exchange the critical path shrinks
to a 2:1 multiplexer plus one full adder. The design also needs no
precomputed `B + N` and no buffer to hold it, and it uses one carry vector
where the classic formulation needs two.

Two architectures are built on this iteration:

* **Design 1** (`mmm_design1`) is a two-dimensional, bit-parallel pipeline.
  It has K rows of cells, and row i performs iteration i. The default size
  is 128 bits. It accepts a new multiplication every 2 cycles, and each
  result appears 2K cycles after its operands.
* **Design 2** (`mmm_design2`) is a single row of cells that is reused for
  all K iterations. The default size is 1024 bits. Each multiplication takes
  2K cycles, and the next can start with no gap.

## What the multipliers compute

For an odd modulus `N < 2^K`, a multiplicand `B < N` and any K-bit multiplier
`A`, both designs return two (K+1)-bit vectors `s` and `c` such that

    s + c ≡ A * B * 2^(-K)  (mod N)      and      s + c < 2N

There is no final subtraction. The invariant `Sin + Cin < 2N` holds across
iterations because `(2N + B + N) / 2 < 2N`. It needs `B < N`. With `B`
allowed up to `2N` the bound grows, and the guard columns below would not be
enough. In simulation, both multipliers assert `N` odd and `B < N` on every
accepted operation.

Turning the result into an ordinary number is left to the user: add `s + c`
with a carry-propagate adder, and subtract `N` once if the sum is `N` or
more. For exponentiation, operands are normally kept in the Montgomery
domain (`X*2^K mod N`), so the `2^(-K)` factor cancels from step to step.
These blocks contain no exponentiation controller and no final adder.

## The basic cell and the row

`gfa` is a gated full adder: `{carry, sum} = in1 & in2 + in3 + in4`.

`basic_cell` puts four single-bit 2:1 multiplexers in front of a `gfa`, all
switched by `ctrl`:

| `ctrl` | `in1` | `in2` | `in3` | `in4` |
|--------|-------|-------|-------|-------|
| 0 | `a_i` | `b_j` | `sin_j` | `cin_j` |
| 1 | `q`   | `n_j` | `st_j`  | `ct_j`  |

`mx_row` is a row of W basic cells, each with a sum flip-flop and a carry
flip-flop. Most of the subtlety of the design is in how the row is wired.

* A carry produced in column j is worth `2^(j+1)`.
* Within the row (the `ctrl = 1` cycle), the carry of column j therefore
  feeds `ct` of column j+1, and `ct_0 = 0`. The sum stays in its column:
  `st_j = sum_j`.
* Towards the next iteration, the halving cancels the carry's extra weight:
  `cin_j = carry_j`. The sum moves down one column: `sin_j = sum_{j+1}`, and
  the top column gets `sin = 0`.
* `q` is the registered sum of column 0.

Both shifts are fixed wires, so an iteration costs no logic beyond the
cells. The row presents the values for the next iteration on `sin_out` and
`cin_out`.

## Guard columns (a departure from the K-column array)

An array exactly K cells wide loses information. In the `ctrl = 0` cycle,
`Sin + Cin + a_i*B` can reach almost `3N`, which needs K+2 bits. The carry
out of column K-1 would fall off the end, and the result would be wrong for
moduli near `2^K`.

Both designs therefore use `W = K + 2` columns. The top two columns have
`b = n = 0` and only catch carries. The result vectors are K+1 bits wide,
since `s + c < 2N < 2^(K+1)`. The cost is 2 columns per row. The testbenches
include moduli with the top bit set and the `N = 2^K - 1`, `B = N - 1`,
`A = 2^K - 1` corner case.

## Design 1: the two-dimensional pipeline

Row i handles iteration i. All rows share a single `ctrl` flip-flop that
toggles every cycle:

* In even cycles (`ctrl = 0`), every row takes the shifted result of the row
  above. Row 0 takes zeros.
* In odd cycles (`ctrl = 1`), every row works on its own registers.

At the end of each odd cycle, every row has finished one iteration of one
multiplication. At that same edge, the row below starts on that
multiplication, and the row itself starts on the next one. This is how the
pipeline fills:

    cycle      0  1  2  3  4  5  6  7  ...
    row 0      p0 p0 p1 p1 p2 p2 p3 p3
    row 1            p0 p0 p1 p1 p2 p2
    row 2                  p0 p0 p1 p1
    ...
    row K-1    multiplication p0 in cycles 2K-2 and 2K-1

Each row needs `a_i`, `B` and `N` of the multiplication it is currently
working on. An operand register per row (holding A, B, N and a valid bit)
moves down one row every two cycles, together with the data. Consecutive
multiplications may therefore use different operands, moduli included. Row i
uses bit i of its copy of A. Keeping all of A in every row is simple but
wasteful. A synthesis tool removes the unused bits, or the copies could be
trimmed to a triangle.

Interface and timing:

* `in_ready` is high every other cycle (`ctrl = 1`).
* Operands are accepted on a rising edge with `in_valid && in_ready`.
* `out_valid` is high for one cycle, the cycle that begins 2K edges after
  acceptance. `s_out` and `c_out` hold the result during that cycle only.
  At the next edge the last row overwrites them with intermediate data.
* With `in_valid` held high, results come out every 2 cycles, in issue
  order, and K multiplications are in flight at once.

At K = 128, the array holds 128 × 130 cells with 33,280 sum and carry
flip-flops. The operand registers add another 128 × (3 × 128 + 1) bits,
about 49 k.

## Design 2: one row, reused

One `mx_row` has its `sin_out`/`cin_out` fed back to its own `sin`/`cin`
inputs:

* `B` and `N` are captured at start and applied to all columns in parallel.
* `A` sits in a shift register, and its bit 0 provides `a_i`. It shifts once
  per iteration, so a new bit of A is used every second cycle.
* During the first iteration, the fed-back values are forced to zero. This
  is the `Sin = Cin = 0` initial state.

Interface and timing:

* `ready` is high when the multiplier is idle, and also during the last
  cycle of a multiplication.
* `start && ready` on a rising edge captures `a`, `b` and `n`.
* `done` is high for the one cycle that begins 2K edges after acceptance.
  `s_out` and `c_out` then carry the result.
* If no new multiplication was started, the row is disabled and the result
  stays on the outputs. If one was started back to back, the outputs change
  after the `done` cycle.

One 1024-bit multiplication therefore takes 2048 cycles. That is K/2K = half
a bit of result per clock, i.e. a throughput of half the clock rate in bits
per second.

## Top level

`mmm_mx_top` places Design 1 (`K1 = 128`) and Design 2 (`K2 = 1024`) side by
side. They share only `clk` and `rst_n`. The `d1_*` and `d2_*` ports are
those of the two multipliers.

Reset is synchronous and active low. It clears all cell registers and
control state. The reset, the enables and both handshakes are this design's
own choices. Only the datapath, the two-cycle schedule and the latencies
follow the architecture.

## Files

| file | contents |
|------|----------|
| `rtl/gfa.sv` | gated full adder |
| `rtl/basic_cell.sv` | 4 × 2:1 multiplexer + `gfa` |
| `rtl/mx_row.sv` | registered row of cells, shift wiring, `q` |
| `rtl/mmm_design1.sv` | 2-D pipelined multiplier (Design 1) |
| `rtl/mmm_design2.sv` | 1-D multiplier (Design 2) |
| `rtl/mmm_mx_top.sv` | both multipliers side by side |
| `tb/tb_mont_pkg.sv` | reference check and random operands for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if the design hangs.

* `tb_gfa` and `tb_basic_cell` are exhaustive (16 and 512 input
  combinations).
* `tb_mx_row` (12 columns) runs random complete iterations. It checks the
  arithmetic value of the registers after each cycle, `q`, `S[0] = 0`, the
  shifted outputs, and the enable.
* `tb_mmm_design1` (K = 16) streams 300 multiplications, mostly back to back
  with random bubbles.
* `tb_mmm_design2` (K = 24) runs 60 multiplications, started back to back or
  after idle gaps. It also checks that the result holds while idle.
* `tb_mmm_mx_top` runs at the default sizes (128 and 1024 bits). It sends 40
  pipelined multiplications through Design 1 and 3 through Design 2: one
  started back to back, one after an idle gap. It counts each of these
  situations and requires every one to occur.

The multiplier testbenches check every result without re-running the
Montgomery recurrence: they test `((s + c) * 2^K) mod N == (A*B) mod N` and
`s + c < 2N` with wide integer arithmetic. They also check that every
latency is exactly 2K cycles. All of them pass.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_mmm_design1 tb/tb_mont_pkg.sv tb/tb_mmm_design1.sv
    ./obj_dir/Vtb_mmm_design1

The full-size `tb_mmm_mx_top` takes about two minutes to compile and a few
seconds to run. The simulation is two-state. The design does not depend on
initial register values, because reset clears everything that is read.

## Limits and departures

* Guard columns: the array is K + 2 cells wide, not K (see above).
* Operand skew registers in Design 1 are this design's own choice. An array
  that only ever multiplies with one fixed `B` and `N` could drop the B and
  N copies.
* The result is unreduced carry-save, below `2N`. No final adder is
  included.
* No modular-exponentiation sequencer is included. The multipliers are
  meant to have their results fed back as operands, but the control for
  that is not specified here.
* The FPGA results this architecture is known for (about 387 MHz for the
  1024-bit one-row version and 358 MHz for the 128-bit array, on a Virtex-II
  class device) have not been reproduced. This RTL has only been simulated
  and checked for synthesizability.

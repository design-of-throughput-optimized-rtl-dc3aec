# Throughput-optimized systolic array for Nussinov RNA folding

This engine scores a stream of short RNA sequences with the Nussinov
algorithm. The score is the largest number of nested base pairs a sequence
can form. The goal is throughput over many sequences, not the latency of
one. A latency-optimal systolic array finishes one sequence as early as
possible and then sits idle while the next one is loaded. This array is
mapped so that every processing element (PE) is busy on every clock. A new
sequence can enter before the previous one has left: one sequence every
N-2 clocks. Sequences are L = N-1 bases long, so N = 61 means 60 bases and
one new sequence every 59 clocks.

The array is "array B" of the method published as *Design of
throughput-optimized arrays from recurrence abstractions*. It is the
projection of the three-dimensional Nussinov iteration space along the
vector u = [1, 1, 0], with the linear schedule [-2s, 2s+1, -s]. Here s is
the number of pipeline stages per PE. The projection, the schedule, the PE
count, the 8-bit score width, the 3-bit base code, loading through one PE
and a controller built from shift registers all come from that work. The
published text gives the array only at the level of its space-time mapping.
The dependence structure, the PE contents, the link delays, the I/O
protocol and the pairing rule were therefore derived for this RTL. They are
marked as such below.

## The recurrence the array evaluates

Bases are x_1 .. x_L. S(i,j) is the best score of the bases x_i .. x_{j-1}
(a half-open interval), for 1 <= i <= j <= N. So S(1,N) is the answer.
Intervals of zero or one base score 0. For longer intervals:

    S(i,j) = max( S(i+1,j-1) + delta(x_i, x_{j-1}),         -- x_i pairs with x_{j-1}
                  max over i<m<j of  S(i,m) + S(m,j) )       -- split at m

Splitting at m = i+1 or m = j-1 covers the cases where the first or last
base stays unpaired. delta is 1 for A-U, G-C and G-U pairs, in either
order, and 0 otherwise. That pairing rule is this design's choice.

The array runs the split maximum from both ends at once. For d = j-i and
k = 1 .. floor(d/2), step k tries m = i+k and m = j-k:

    P(i,j,k) = max( P(i,j,k+1),  S(i,i+k) + S(i+k,j),  S(i,j-k) + S(j-k,j) )
                                 \--- A ---/ \-- B --/  \-- C --/ \-- D --/

P starts from 0 above the top step. The step k = 1 also adds the pair term,
and P(i,j,1) is S(i,j). The two ends together cover every split point, and
they overlap in the middle when d is even. The points (i, j, k) with
1 <= k <= (j-i)/2 form the three-dimensional domain that is mapped onto the
array.

## Space-time mapping

**Allocation.** A point (i, j, k) runs on PE(d, k) with d = j - i. Points
that differ by a multiple of u = [1,1,0] share a PE. PEs exist for
2 <= d <= N-1 and 1 <= k <= floor(d/2). That is a triangle of 900 PEs for
N = 61, or 1640 for N = 82. Row k = 1, the "bottom row", produces the
finished scores S(i,j). The rows above it hold the partial maxima.

**Schedule.** Point (i, j, k) runs at clock

    t = -2s*i + (2s+1)*j - s*k  =  i + (2s+1)*d - s*k      (+ a constant)

For a fixed PE, consecutive i fall on consecutive clocks. The dot product
of the schedule vector with u is 1, so every PE is fully utilised while it
works on a sequence. PE(d,k) holds N-d points of one sequence. The busiest
PEs, those with d = 2, hold N-2 points. Once they have finished one
sequence they can start the next. That sets the pipelining period at N-2
clocks, whatever s is. The first point of a sequence runs at PE(2,1). The
last point, S(1,N), runs at PE(N-1,1), (2s+1)(N-3) clocks later: 174 clocks
for N = 61 and s = 1. So about three sequences are in flight at once, and
thirteen with s = 6.

**Pipelining.** With s > 1, every dependency link has at least s
registers. Each PE keeps its combinational operator (two adds, a three- or
four-way maximum and, in the bottom row, the pairing lookup). It puts s
registers after that operator. A synthesis tool with register retiming
turns these into an s-stage PE. The schedule stretches, but the period
stays N-2.

## Links between PEs — how the operands meet

This is the part of the design that is least obvious. There are no valid
bits and no control signals inside the array. Every PE computes on every
clock. Each operand reaches a PE in exactly the clock its point runs,
because every link has the register count that the schedule difference
gives it. The counts below are worked out from t = i + (2s+1)d - sk, with
s = STAGES:

| operand | meaning | path | registers |
|---|---|---|---|
| P | partial maximum | PE(d,k+1) -> PE(d,k) | s (the PE's output stages) |
| A | S(i,i+k) | PE(d,k) -> PE(d+1,k) | 2s+1 |
| D | S(j-k,j) | PE(d,k) -> PE(d+1,k) | 2s |
| A entry | S(i,i+k) | PE(k,1) -> PE(2k,k) | (s+1)k |
| D entry | S(j-k,j) | PE(k,1) -> PE(2k,k) | s*k |
| B | S(i+k,j) | PE(d,k) -> PE(d+1,k+1); enters from PE(d-1,1) | s (+ s from the result) |
| C | S(i,j-k) | PE(d,k) -> PE(d+1,k+1); enters from PE(d-1,1) | s+1 (+ s+1 from the result) |
| pair | S(i+1,j-1) | PE(d-2,1) -> PE(d,1) | 3s+1 |
| x_i | left base | along the bottom row | 2s+1 per PE |
| x_{j-1} | right base | along the bottom row | 2s per PE |

Here is how to read the table. The bottom-row result S(i, i+e) leaves
PE(e,1). It then travels four ways:

- Diagonally up and right as operand B (S(i+k,j) for the PEs above) and as
  operand C (S(i,j-k)).
- Along a long link to PE(2e,e), and from there to the right as operand A.
- Along a second long link to PE(2e,e), and from there to the right as
  operand D.
- Two columns to the right as the pair operand.

Any operand for an interval of zero or one base is the constant 0. That
covers A and D in the bottom row, and B, C and pair near d = 2. These are
tied off. The long links are simple shift registers (`link_delay`). Their
depth grows with k, so most of the array's storage is in the links: about
84 kbit for N = 61, s = 1, which FPGA tools map to shift-register
primitives.

Because no PE handles two points in the same clock, sequences can be packed
back to back without any run-time arbitration. A PE that is idle between
two sequences computes garbage that nothing reads.

The bases enter only at PE(2,1), one window (x_i, x_{i+1}) per clock. Two
streams then run along the bottom row at different speeds. The left base
moves 2s+1 clocks per PE and the right base 2s, so PE(d,1) sees x_i and
x_{i+d-1} together. The window carries two bases per clock. With one base
per clock, loading a sequence would take N-1 clocks, longer than the N-2
clock period.

## Controller and interface

`array_controller` has no counters. It uses two one-hot token shift
registers:

- The **load token** register is N-3 bits wide. A token enters on
  `in_first` and walks through while the rest of the load arrives.
  `in_ready` is high while no token is in flight. The next sequence may
  start on the clock right after the last window of the previous one.
- The **result token** register is `array_latency(N, STAGES)` bits wide.
  When the token leaves, the last PE holds S(1,N) of that sequence. The
  controller registers it into `out_score` and pulses `out_valid` for one
  clock.

Stream protocol at the top, `nussinov_b_top` (all synchronous):

| signal | dir | width | use |
|---|---|---|---|
| `in_valid`, `in_first` | in | 1 | one window per clock, i = 1 .. N-2, `in_first` on i = 1 |
| `in_xl`, `in_xr` | in | 3 | x_i and x_{i+1}; codes A=0 C=1 G=2 U=3, 4 = unknown (never pairs) |
| `in_ready` | out | 1 | a new sequence may start this clock |
| `out_valid`, `out_score` | out | 1, 8 | score, `array_latency(N,STAGES)+1` clocks after `in_first` |
| `proto_err` | out | 1 | sticky: a window missing mid-load, `in_first` mid-load, or a window with no load |
| `rst_n` | in | 1 | synchronous, active low, controller only |

A load cannot stall. Once `in_first` is accepted, the remaining N-3 windows
must arrive on consecutive clocks. `array_latency(N, s) = (2s+1)(N-1) - 3s - 1`,
which is 176 for N = 61 and s = 1. So the score appears 177 clocks after
`in_first`. Of these, 174 are the computation itself. The other 3 are the
input register, the last PE's output stage and the output register.

Shorter RNAs fit in a larger array. Pad the sequence at its end with
unknown bases. They never pair, so the score is unchanged, and the period
stays that of the full-size array.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `N` | top, array, controller | 61 | sequence length + 1 (60 bases) |
| `STAGES` | top, array, controller, PE | 1 | registers per PE (schedule [-2s, 2s+1, -s]) |
| `SCORE_W` | `nussinov_pkg` | 8 | score width; scores never exceed (N-1)/2 |
| `BASE_W` | `nussinov_pkg` | 3 | base code width |

N must be at least 5. The published sweep used one to six stages. All six
are legal values for `STAGES`.

## Files

- `rtl/nussinov_pkg.sv`: types, base codes, the pairing function, `array_latency`.
- `rtl/link_delay.sv`: register chain of one link.
- `rtl/nussinov_pe.sv`: one PE (`BOTTOM` selects the bottom-row variant).
- `rtl/nussinov_array_b.sv`: the PE triangle and its links.
- `rtl/array_controller.sv`: loading check, input register, result capture.
- `rtl/nussinov_b_top.sv`: controller plus array.
- `tb/`: self-checking testbenches, described next.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. The reference
(`tb/nussinov_ref_pkg.sv`) is the textbook O(L^3) dynamic programme over
every split point. It therefore checks the two-ended decomposition as well
as the arithmetic.

| testbench | what it covers |
|---|---|
| `tb_link_delay` | exact delay of 4- and 1-stage links |
| `tb_nussinov_pe` | the PE operator and every forwarded operand's delay, bottom PE with s = 2, upper PE with s = 1 |
| `tb_array_controller` | window register, `in_ready`, result capture cycle, spacing, all three protocol errors, reset |
| `tb_nussinov_array_b` | bare array, N = 10, s = 3, 20 sequences back to back, result read in its scheduled clock |
| `tb_nussinov_b_top` | whole engine, N = 13, s = 2: back-to-back starts, idle gaps, up to 5 sequences in flight, a broken load, reset |
| `tb_nussinov_b_full` | whole engine at the defaults (N = 61, s = 1), 24 sequences; every second one is a 41-base RNA padded to 60 |
| `tb_nussinov_b_rna41` | 300 RNAs of 41 bases (N = 42) with no gaps; checks the stream takes exactly 299*40 + 120 clocks |
| `tb_nussinov_b_maxn` | RNAs of 81 bases (N = 82, 1640 PEs), 20 sequences back to back, one per 80 clocks |
| `tb_nussinov_b_stages6` | six stages (schedule [-12, 13, -6]), N = 21, 40 sequences |

The engine and array testbenches check latency and period exactly in clocks,
the unit testbenches every link delay. All of
them pass.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/nussinov_pkg.sv tb/nussinov_ref_pkg.sv tb/tb_nussinov_b_full.sv \
        --top-module tb_nussinov_b_full -o sim
    ./obj_dir/sim

The package files must come first. Lint a module with
`verilator --lint-only -Wall rtl/nussinov_pkg.sv -y rtl +libext+.sv rtl/<module>.sv`.

## Where this design goes beyond or departs from the published one

- **The PE contents and link list are derived, not copied.** They were
  worked out from the projection and schedule above, and from the stated
  property that the sequence is loaded serially through a single PE. The
  published drawing of the array was not used as a wiring list, so
  individual links may differ from it.
- **The pairing rule and base encoding are this design's choices.** Pairs
  are Watson-Crick plus G-U, each worth 1.
- **There is no traceback.** Only the score comes out.
- **Two bases enter per clock.** That is what holds the stated N-2 period.
- **The controller protocol is new.** In particular, `in_ready`,
  `proto_err` and the no-stall rule are this design's own.
- **Pipelining is left to the synthesis tool.** The extra PE stages are
  placed as output registers for retiming; they are not hand-placed inside
  the operator.
- **No FPGA results are reproduced.** The published clock rates (180 to
  360 MHz) and area figures are FPGA measurements. So is the 15% LUT saving
  over the latency-optimal array.
- **Only array B is built.** The latency-optimal baseline (array A) and the
  other projections explored (C to F) are alternatives and are not built.
  Neither are the banded Smith-Waterman arrays, which are an analysis
  example. The software that searches projection vectors is not hardware.
- **The platform's input channel is not modelled.** It is a 64-bit host
  link. The base stream is brought out as ports instead.

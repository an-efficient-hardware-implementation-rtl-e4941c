# Bincombgen: an (n,k) combinations generator, one vector per clock

This is a small synthesizable generator of all *k*-element subsets of an
*n*-element set. Each subset comes out as an *n*-bit vector with exactly *k*
ones. The generator produces one new vector on every clock edge, with no gaps,
so a full sweep takes exactly C(n,k) cycles. Typical uses are building
mask or comparand vectors for associative searches, or stepping through
memory addresses whose Hamming weight is fixed.

The vectors come out in reverse lexicographic order, which is the same as
descending numeric order among the *n*-bit values of weight *k*. For n = 6,
k = 3:

```
111000 110100 110010 110001 101100 101010 101001 100110 100101 100011
011100 011010 011001 010110 010101 010011 001110 001101 001011 000111
```

The RTL implements the Bincombgen algorithm, in a modified form built for
hardware. Every update the algorithm makes in one step touches a disjoint
set of bits. This lets a whole step collapse into one layer of multiplexers
in front of the registers. No counter of combinations and no arithmetic wider
than a few bits is needed, whatever *n* is.

## State

Positions are numbered 1..n from the left. Position 1 is the most significant
bit of `out_data`.

| register | size | meaning |
|---|---|---|
| `B` | n bits | the vector currently shown on `out_data` |
| `A[1..k]` | k entries of `$clog2(MAX+1)` bits | A[j] is a bookkeeping value for the j-th one |
| `S` | `$clog2(MAX+2)` bits | the current offset of the one being moved |
| `IND` | `$clog2(k+1)` bits | which of the k ones is being moved (k = rightmost, 0 = finished) |

Here `MAX = n - k + 1`, the largest position offset any one can reach.

Initial state: all `A[j] = 1`; `B` is k ones followed by n-k zeros;
`IND = k`; `S = 2`.

## The step rule

This is the part that takes some reading. The rule is in
`rtl/bincombgen_step.sv`. With `v = IND + S`, one step does all of the
following at once:

1. `A[IND..k] := S`.
2. `B[v-2] := 0` and `B[v-1] := 1`. The one at position v-2 moves one place
   to the right.
3. If `S < MAX`, the moved one can go further. `S := S + 1`. Also, if
   `IND < k`, an earlier one has just moved. The ones to its right are then
   packed back directly behind it: `B[v..k+S-1] := 1` and
   `B[k+S..n] := 0`. After that, `IND := k`, so the rightmost one is moved
   again next time. This is a *refill* step.
4. Otherwise (`S = MAX`), the one at `IND` has reached its last position.
   Control moves one place left: `IND := IND - 1` and `S := A[IND-1] + 1`.
   This is a *carry* step. `A[IND-1]` is not written by the same step, so
   reading it is safe.

The sweep ends once `IND` reaches 0. The vector held at that point
(n-k zeros, then k ones) is still output.

Bits left of v-2 are never touched. The four ranges written to `B`
(v-2, v-1, v..k+S-1 and k+S..n) cannot overlap. So each bit of `B` has one
small multiplexer with its select logic, and each `A` entry has a comparator
against `IND`.

Here is the (6,3) sweep with its state, taken from register contents in
simulation:

```
 #  IND S  A      B        #  IND S  A      B
 1   3  2  1 1 1  111000  11   3  3  2 2 2  011100
 2   3  3  1 1 2  110100  12   3  4  2 2 3  011010
 3   3  4  1 1 3  110010  13   2  3  2 2 4  011001
 4   2  2  1 1 4  110001  14   3  4  2 3 3  010110
 5   3  3  1 2 2  101100  15   2  4  2 3 4  010101
 6   3  4  1 2 3  101010  16   1  3  2 4 4  010011
 7   2  3  1 2 4  101001  17   3  4  3 3 3  001110
 8   3  4  1 3 3  100110  18   2  4  3 3 4  001101
 9   2  4  1 3 4  100101  19   1  4  3 4 4  001011
10   1  2  1 4 4  100011  20   0  5  4 4 4  000111
```

Row 4 to row 5 is a refill step: 110001 becomes 101100. Row 3 to row 4 ends
in a carry: `S` reached MAX = 4, so `IND` drops to 2 and `S` becomes
A[2] + 1 = 2.

## Interface and timing (`rtl/bincombgen.sv`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | all state changes on the rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low, acts on its falling edge |
| `start` | in | 1 | sampled on the rising edge while idle |
| `out_data` | out | N | current combination; all zero while idle |
| `busy` | out | 1 | high exactly while `out_data` holds a combination |

```
clk       _/‾\_/‾\_/‾\_/‾\_ ... _/‾\_/‾\_/‾\_
start     ‾‾‾‾\_____________ ... ____________
busy      ____/‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾\_____
out_data  000 |111000|110100| ... |000111| 000
              t0     t0+1          t0+C(n,k)
```

- The edge t0 that samples `start` loads the initial state, and the first
  vector appears on that same edge.
- Each later edge applies one step.
- At edge t0 + C(n,k), `busy` falls and `out_data` returns to zero.
- A new `start` after that repeats the whole sweep.
- `start` is ignored while `busy` is high.
- The cycle after a sweep is always idle. A `start` held high therefore
  restarts one cycle later.
- Reset clears `busy` and `out_data` immediately, without a clock edge.

Two concurrent assertions in `bincombgen` check two rules: every vector
shown while busy has exactly K ones, and `out_data` is zero while idle.

## Parameters and size

`bincombgen #(N, K)` takes the two parameters n and k. Its defaults are
`N = 6`, `K = 3`. It requires `1 <= K < N`. All internal widths are derived
from these two values. Flip-flops: `N + K*$clog2(MAX+1) + $clog2(MAX+2) +
$clog2(K+1) + 1`.

| (n,k) | C(n,k) = sweep cycles | flip-flops |
|---|---|---|
| (6,3) | 20 | 21 |
| (20,10) | 184,756 | 69 |
| (40,20) | 1.38e11 | 151 |
| (80,40) | 1.08e23 | 333 |

The logic grows roughly as n × (width of `S`): each bit of `B` compares its
own position with `v` and `k+S`, and no carry chain runs along the vector.

## Departures and design choices

Three points differ from the algorithm as published, or fill gaps in it:

- **Carry update of S.** The published pseudocode writes `S := A(IND) + 1`
  followed by `IND := IND - 1`. The state sequence the algorithm is meant to
  produce (the table above) only comes out if `A` is read at the *decremented*
  index, `A[IND-1]`. The RTL does that.
- **Last step.** When `IND = 1` and `S = MAX`, there is no `A[0]`. `S` then
  becomes MAX + 1. That value is never used again.
- **Width of A.** The published width of an `A` entry is ceil(log2(MAX)). That
  cannot hold the value MAX, which `A` does take (for example, 4 when MAX = 4).
  The RTL uses `$clog2(MAX+1)` bits.

These choices are this design's own:

- the widths of `S` and `IND`;
- the values reset loads;
- ignoring `start` while busy;
- the forced idle cycle between sweeps;
- the restriction `K < N`;
- the extra `refill_o`, `carry_o` and `last_o` outputs of the step block.

## Files

- `rtl/bincombgen_step.sv`: the combinational generation step.
- `rtl/bincombgen.sv`: the generator (the top): the registers, the
  start/busy control and the assertions.
- `tb/tb_bincombgen_step.sv`: drives the step with all 20 (6,3) states and
  checks each successor. It also runs a (9,4) step in a closed loop and checks
  it against an independent successor rule.
- `tb/tb_bincombgen.sv`: end-to-end test at the default size. It checks the
  vectors, the C(6,3)-cycle busy window, restart, `start` held during a
  sweep, and an asynchronous reset in mid-sweep. It counts every mechanism.
- `tb/tb_bincombgen_sizes.sv` with `tb/bincombgen_sweep_check.sv`: runs
  (4,2), (6,3) … (20,10) through complete sweeps, checking every vector
  and the cycle count. It also runs (40,20), (60,30) and (80,40) for their
  first 1,000,000 vectors.

## Simulating

```
verilator --binary --timing --assert -y rtl -y tb tb/tb_bincombgen.sv --top tb_bincombgen
./obj_dir/Vtb_bincombgen
```

Use the same command with `tb_bincombgen_step` or `tb_bincombgen_sizes`.
Each testbench prints `TB_RESULT checks=… failures=…` and stops.
`tb_bincombgen_sizes` takes a few seconds; the others take well under one.
To try another size, instantiate `bincombgen #(.N(n), .K(k))`.

## How far it is verified

- Every vector of every sweep up to (20,10) has been compared with an
  independent successor rule, as have the counts of busy cycles.
- The (6,3) state sequence matches the published one exactly, register by
  register.
- For (40,20) and larger, only the first million vectors of each sweep
  have been simulated.
- Clock rate and FPGA resource use have not been measured here.

# Parallel-prefix 64-bit binary comparator

This block compares two unsigned 64-bit numbers, A and B, and raises exactly one of
three flags: `abig` (A > B), `bbig` (A < B) or `eq` (A = B). It is combinational and
has no clock. The aim of the architecture is to limit switching. The comparison
resolves from the most significant bit downwards. Once a bit position differs, every
less significant position is forced to a fixed 00 code, so those bits never toggle
the downstream logic. Every cell is kept to at most three inputs.

The RTL describes the logic function of a comparator that was designed as a
transistor-level 65 nm circuit. The cell functions, the 2-bit grouping, the set
structure and the repeatable 4-bit slice come from that circuit. The transistor-level
choices are not modelled: pass-transistor XOR and AND, NOR-NAND OR trees and device
sizes. Neither are the published delay, power and transistor count figures.

## How the answer is found

Think of the result as two N-bit buses, a *left bus* and a *right bus*. For the
single most significant bit position k where A and B differ, bus bit k carries
(A[k], B[k]). Every other position carries 00. So at most one bit of the two buses
is 1:

| left OR | right OR | meaning |
|---|---|---|
| 0 | 0 | A = B |
| 1 | 0 | A > B (A holds the 1 at the first difference) |
| 0 | 1 | A < B |
| 1 | 1 | cannot occur |

An OR-scan of each bus gives `abig` and `bbig`. `eq` is their NOR.

Example: A = 0101_1101, B = 0110_1001. Bits 7 and 6 agree and bit 5 differs with
B holding the 1. The right bus therefore reads 0010_0000 and the left bus is all
zero, so the result is A < B.

## The five cell sets

The operands are split into 2-bit *pairs*. Pair m holds bits 2m+1 (upper) and 2m
(lower), and m counts from the least significant end.

| set | module | per | function |
|---|---|---|---|
| 1 | `cmp_set1_xor` | bit | `D[k] = A[k] ^ B[k]`: the bits differ |
| 2 | `cmp_set2_nor` | pair | `C2[m] = ~(D[2m] \| D[2m+1])`: the pair is equal |
| 3 | `cmp_set3_and` | pair | `C3[m] = C2[m] & C3[m+1]`: this pair and everything above are equal |
| 4 | `cmp_set4_select` | bit | select the first differing bit (below) |
| 5 | `cmp_set5_mux` | bit | drive `(A[k], B[k])` onto the buses where selected, else `00` |

**Set 3 is where the early termination happens.** It is a chain of AND gates that
runs from the most significant pair downwards. At the top of the word the chain input
is 1. The first unequal pair drives the chain to 0, and it stays 0 for every pair
below. Set 4 uses the chain value from *above* pair m (`C3[m+1]`) to decide whether
pair m may speak at all:

```
upper bit 2m+1:  S = C3[m+1] & D[2m+1]
lower bit 2m:    S = C3[m+1] & ~D[2m+1] & D[2m]
```

The lower bit also needs its own pair's upper bit to be equal, so that cell has three
inputs, one of them inverted. That is the widest cell in the design. Together the
selects are one-hot or all-zero, and this gives the bus property above.

The chain is written as a ripple: one AND per pair, 32 in series for 64 bits. That is
how the slice is drawn and how the cell equation reads. A logarithmic-depth prefix
tree would compute the same function. A synthesis tool is free to restructure the
chain, but a timing-driven flow that keeps it literal gets a long path. If you need
a fast netlist without relying on restructuring, `cmp_set3_and` is the one module to
replace with a parallel-prefix AND: the port contract is unchanged.

## The 4-bit slice and the 64-bit top

`cmp4_slice` is the unit that repeats. It holds sets 1 to 5 for two pairs, plus the
first two levels of the OR tree for each bus. Its ports are:

- `c3_in`: all more significant bits are equal.
- `c3_next`: those bits and these four are equal. It feeds the next slice down.
- `abig`, `bbig`: the first difference lies in this slice, and A or B, respectively,
  holds the 1 there.

`prefix_comparator64` chains N/4 = 16 slices from the top. The topmost `c3_in` is
tied to 1. Its `cmp_decision` then ORs the 16 slice `abig` and 16 slice `bbig`
values using `cmp_or_network`, a balanced tree of 2-input ORs, and forms
`eq = ~(abig | bbig)`. The whole OR tree is log2(64) = 6 levels.

The end of the set 3 chain (`c3_next` of the least significant slice) is a second,
independent "A = B" signal. The top checks two things with immediate assertions:
that it agrees with `eq`, and that `abig` and `bbig` are never both 1.

## Files

| file | content |
|---|---|
| `rtl/prefix_comparator64.sv` | top, parameter `N` (default 64, multiple of 4) |
| `rtl/cmp4_slice.sv` | 4-bit slice |
| `rtl/cmp_set1_xor.sv` … `rtl/cmp_set5_mux.sv` | the five cell sets, parameter `N` (default 64, even) |
| `rtl/cmp_decision.sv` | final OR-scan and `eq`, parameter `W` (default 16) |
| `rtl/cmp_or_network.sv` | recursive 2-input OR tree, parameter `W` |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fig9_sequence.sv` | transient workload on the 64-bit top (see below) |

All ports are plain `logic`. There are no registers, no reset and no clock. To make
the comparator a pipeline stage, register its inputs or outputs outside it.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`.
Each also has a watchdog that counts a failure if the run does not finish in time.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_prefix_comparator64 \
          tb/tb_prefix_comparator64.sv -y rtl
./obj_dir/Vtb_prefix_comparator64
```

Replace the top module name to run any other testbench. Each one compares the module
with a reference written separately from it:

- **Cell sets**: exhaustive at a small width (8 or 16 bits), plus random vectors at
  64 bits.
- **`tb_cmp4_slice`**: all 512 combinations of the two 4-bit operands and `c3_in`.
- **`tb_prefix_comparator64`**: runs at the default width. For every one of the 64 bit
  positions it applies operands that agree above the position and differ at it, both
  ways round, with random bits below. It also applies equal operands, the 8-bit
  example above and 2000 random pairs. It counts how often the first difference
  fell at each bit position, in each slice, on an upper and on a lower pair bit, and
  how often each outcome occurred. Any of these that never happened is a failure.
- **`tb_fig9_sequence`**: holds all bits equal except bit 0 and steps
  (A0, B0) through 10, 01, 00, 11, 10, 01. This is the worst case for the chain: the
  decision needs the chain through all 16 slices.

## Departures and open points

- **Set 3 depth.** The chain is built as a ripple, following the cell equation and
  the slice drawing. A log2(N)-level version would compute the same function but is
  not provided (see above).
- **Set 4 cell.** The cell is built as the AND of the chain value, the current bit's
  difference flag and the inverted flag of the upper bit of the same pair. That is
  the only reading that selects the first differing bit.
- **OR tree.** The OR tree uses 2-input stages throughout. It is split into two
  levels inside each slice and four levels in the decision module. The NOR/NAND
  alternation of a CMOS realisation is left to synthesis.
- **Not modelled.** Delay, power and transistor count are not modelled. The intended
  circuit targets a 0.7 V, 65 nm process.

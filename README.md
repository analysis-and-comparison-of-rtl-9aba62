# Two smallest values of N items with a comparator network

This RTL finds the smallest (`min_1st`) and the second smallest (`min_2nd`) of N unsigned
M-bit numbers in one pass through a network of compare-and-swap elements. It needs no
sorting and no memory. This is the step a min-sum LDPC check node needs, for example. The
main form is purely combinational, with 2N-3 comparators in 2·log2(N) levels. Two
clocked forms share the same comparators: a pipelined one that takes a new data set every
clock, and a two-step sequential one that builds only half the comparators.

Default size: N = 256 items of M = 32 bits. Both are parameters. N must be a power of
two, at least 2.

## The comparator

`cmp_swap` has an upper and a lower input line. If the upper item is smaller than the lower
one, the two are swapped. Otherwise they pass straight through. So the larger item always
leaves on the upper line and the smaller one on the lower line. Equal items pass unchanged.

## The min_1st network

The N lines are numbered 0 (top) to N-1 (bottom). With L = log2(N), there are L levels.
Level i has N/2^(i+1) comparators. Comparator j of level i joins

    upper line  u = 2^i - 1 + j·2^(i+1)
    lower line  u + 2^i

Every other line passes through that level untouched. Level 0 pairs neighbouring lines.
Level 1 pairs the bottom lines of those pairs, and so on, like a tournament: after level i,
line 2^(i+1)·(j+1) - 1 holds the minimum of the 2^(i+1) lines that end there. After level
L-1, line N-1 holds the minimum of all N items. The comparators within a level touch
disjoint lines, so they all work at once. The network has N-1 comparators and a depth of L.

Example with N = 8 (line 0 first):

    input     10  1  5 42 89  7 21 22
    level 0   10  1 42  5 89  7 22 21
    level 1   10  5 42  1 89 21 22  7
    level 2   10  5 42  7 89 21 22  1     -> min_1st = 1

The other lines are not thrown away. They still hold the remaining N-1 items, in a new order.

## Removing min_1st and finding min_2nd

Line N-1 (the minimum) is overwritten with a copy of line N-2. The lines now hold the N-1
items that are left, plus one duplicate. The duplicate cannot change a minimum. The same
network structure then moves the smallest of those items to line N-1, and that item is
`min_2nd`. In the first level of this second network, lines N-2 and N-1 carry the same
value, so their comparator is left out. The second network therefore has N-2 comparators.
In total:

    comparators  C(N) = (N-1) + (N-2) = 2N - 3      (509 for N = 256)
    depth        2·log2(N) comparator delays        (16 for N = 256)

In the example, line 7 becomes 22. The second network then brings 5 down to line 7, so
min_2nd = 5.

If the smallest value occurs more than once, `min_2nd == min_1st`. Duplicates are not
merged.

## The three engines

| module | form | comparators | registers | result timing |
|---|---|---|---|---|
| `two_min` | combinational | 2N-3 | none | after the delay of 2·log2(N) comparators |
| `two_min_pipe` | register after every level | 2N-3 | 2·log2(N)·N·M data bits + min_1st carry + valid bits | `out_valid` 2·log2(N) cycles after the set was offered; a new set every cycle |
| `two_min_seq` | one network used twice | N-1 | N·M work register + 2·M result bits | `done` 2 cycles after the start cycle; a new set every 2 cycles |

**`two_min_pipe`.** It has 2L stages. Stages 0..L-1 form the min_1st network. When a data
set enters stage L, line N-1 is copied into a side register (`min1_q`) that moves along with
the set, and line N-1 is replaced by line N-2. Stages L..2L-1 form the min_2nd network. Each
data set carries a valid bit. There is no back-pressure. Only the valid bits are reset.

**`two_min_seq`.** It builds one full N-1 comparator network. In the start cycle (step 1),
the network works on `in_data`. At the clock edge its whole output is stored in the
N·M-bit work register. In step 2, the network input multiplexer switches to the work
register, with line N-1 replaced by line N-2. On the second edge the circuit stores
min_1st (from the work register) and min_2nd (from the network output), and it pulses
`done`. `in_data` is needed only in the start cycle. A `start` while `busy` is high is
ignored. A new `start` may be given in the same cycle as `done`.

**`two_min_top`.** It puts all three engines side by side on one shared `in_data` bus:

- `comb_*` outputs come from `two_min`.
- `in_valid` and `pipe_*` belong to `two_min_pipe`.
- `seq_start` and `seq_*` belong to `two_min_seq`.

All clocked logic uses `clk_i` and an asynchronous, active-low `rst_ni`.

## Data format

All engines take `in_data` as `logic [N-1:0][M-1:0]`, which is one N·M-bit vector. Item k
sits in bits `k*M +: M`, and line N-1 (the bottom line) is the top M bits. Items are compared
as unsigned numbers. To run a smaller problem on a larger circuit, fill the unused items
with all-ones. For narrower items, zero-extend them.

## Module hierarchy

    two_min_top
    ├── two_min          ── min_network ×2 ── cmp_level ×L ── cmp_swap
    ├── two_min_pipe     ── cmp_level ×2L ── cmp_swap
    └── two_min_seq      ── min_network ── cmp_level ×L ── cmp_swap
    two_min_pkg          line-index functions (upper_line, lower_line, level_cmps, ...)

`cmp_level` has an `OMIT_LAST` parameter, and `min_network` has `OMIT_LAST_L0`. Both drop
the level-0 comparator on lines N-2/N-1 for the min_2nd network.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/two_min_pkg.sv tb/tb_two_min_top.sv \
              --top-module tb_two_min_top -Mdir obj_top -o sim
    ./obj_top/sim

`-Irtl` lets Verilator find each module in `rtl/<module>.sv`. Only the package must be
listed explicitly.

| testbench | what it checks |
|---|---|
| `tb_cmp_swap` | every 4-bit input pair, plus random 32-bit pairs |
| `tb_cmp_level` | every level of a 16-line network, plus the omit-last variant, against a direct pair walk |
| `tb_min_network` | the 8-item example line by line; that the output is a permutation of the input; the minimum at N = 256 |
| `tb_two_min` | the example (1, 5); random sets with many ties at N = 8; N = 2; N = 256 with the minima moved over every line |
| `tb_two_min_pipe` | N = 256 streaming with bubbles: results in order, exact 2·log2(N) latency, reset while sets are in flight |
| `tb_two_min_seq` | N = 256: done exactly 2 cycles after start, busy, start refused while busy, results held between runs |
| `tb_two_min_top` | all three engines at the default size on one stream. It counts ties, padded small sets, back-to-back and bubble cycles, refused and back-to-back sequential starts, and fails if any of these never occurs |
| `tb_two_min_sizes` | `two_min` at M = 8 and M = 32 for N = 8…256, and at N = 1024 and 2048 with M = 32 |
| `tb_two_min_sizes_clocked` | all three engines side by side at M = 8 and M = 32 for N = 8…256, with exact latencies |

All of these pass. The expected values come from a linear scan that keeps the two smallest
items seen so far. This reference is independent of the network.

The two size sweeps take minutes to compile: over a minute for `tb_two_min_sizes`, because
of its N = 2048 instance, and about five minutes for `tb_two_min_sizes_clocked`. All the
other testbenches build in seconds.

## Design choices that are not fixed by the algorithm

- **Unsigned comparison.** The comparator could just as well be signed. Change the `<` in
  `cmp_swap`.
- **Leaving out the equal-line comparator** in the second network gives 2N-3 comparators. A
  plain software model instead reruns the full N-1 comparator network, and the result is the
  same.
- **Pipeline placement.** `two_min_pipe` has a register after every comparator level. That
  is the shortest possible clock period and the most flip-flops. Registering only every k-th
  level would be a simple generalisation, but it is not built.
- **Handshakes.** The handshakes of the clocked engines (`in_valid`/`out_valid` with no
  back-pressure, and `start`/`busy`/`done`) are this implementation's own. So are the reset
  (asynchronous, active low, control state only) and the side-by-side arrangement in
  `two_min_top`.
- **Default size.** N = 256 and M = 32 is the largest size normally run with this circuit.
  N = 1024 and N = 2048 elaborate and simulate as well.

## Expected cost and speed

In FPGA terms, the combinational circuit for M = 32 grows from about 140 LUTs at N = 8 to
about 21,600 LUTs at N = 256. Its maximum clock drops from about 67 MHz to 18 MHz, because
the comparator depth grows with log2(N). Those figures come from the same structure
implemented on an Artix-7 class device; they have not been reproduced with this RTL.
The pipelined engine removes that dependence on depth, at the cost of the stage registers.
The sequential engine halves the comparators and needs two cycles per result.

## Not included

- A soft-processor platform running the same network as software, and a circuit produced by
  high-level synthesis from a C++ model. These are alternative ways to realise the
  algorithm, built from vendor IP and tools, not RTL.
- A network variant with a small memory per item, which needs only N+L-2 comparators. It
  was not adopted, because the per-item memories and their multiplexing cost more than the
  comparators they save.
- Board-level circuits that feed test data to the engines and display the results.

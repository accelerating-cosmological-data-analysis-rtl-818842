# TPACF pair-counting kernel in SystemVerilog

The two-point angular correlation function ω(θ) measures how much more often
than chance two galaxies on the sky are separated by an angle θ. It is
estimated from histograms of pair separations: DD (observed × observed), RR
(random × random) and DR (observed × random), combined on the host as

    ω(θ) = (n_R · DD(θ) − 2 Σ DR_i(θ)) / Σ RR_i(θ) + 1

over n_R random catalogues. Counting the pairs is O(N²) and dominates the run
time. This RTL is the pair-counting kernel of an FPGA implementation of that
computation (a Nallatech H101 board with a Virtex-4 LX100 at 100 MHz): it
streams one point pair per clock cycle through a double-precision dot
product, a binary search over 31 bin boundaries and a bank of 11 × 32
counters, and writes the counts back to memory as doubles.

Two ideas make the kernel cheap:

* **No trigonometry.** Points are unit vectors (x, y, z). Their separation is
  θ = arccos(p·q), and since arccos is monotonic the kernel bins p·q directly
  against boundaries pre-computed in cosine space, cos(θ_j). The price is
  precision: bins of 0.01 arcmin need the dot product to about 12 decimal
  places (1 − cos θ ≈ 4·10⁻¹²), which is why the datapath is binary64.
* **Jackknife errors for free.** Each observed point carries a subsample label
  1..10. Histogram 0 counts every pair; histogram h (1..10) counts every pair
  whose outer point is *not* in subsample h. All 11 histograms are updated in
  the same cycle, so the ten "leave one subsample out" estimates needed for
  the error bars cost no extra passes.

## A kernel call

The kernel (`cross_correlation`, the top module) works on eight external SRAM
arrays of 65,536 doubles, each behind its own read port:

| array | contents |
|---|---|
| X1 Y1 Z1 | coordinates of the outer-loop points |
| JK | jackknife label of each point, stored as a double (1.0 .. 10.0) |
| X2 Y2 Z2 | coordinates of the inner-loop points (the host writes the same data as X1..Z1, so the two loops read from different ports) |
| BINV | the 31 bin boundaries at addresses n1 .. n1+30 on entry; the 11 × 32 counts on exit |

The host writes the first set at addresses 0 .. n1−1 and, for a cross count,
the second set at n1 .. n1+n2−1, then pulses `start` with `n1`, `n2`,
`nb` (= 30: nb+1 boundaries, nb+2 bins) and `do_self`:

* `do_self = 1` (DD, RR): pairs i < j within the first set, N(N−1)/2 of them;
* `do_self = 0` (DR): all n1 × n2 pairs of first × second set.

The kernel then

1. reads the boundaries into a 31-entry shift register (`bin_search`);
2. clears the counters;
3. for every outer point i, reads X1/Y1/Z1/JK[i] and streams the inner points
   one per cycle through the pair pipeline;
4. lets the pipeline drain;
5. writes count(h, b) to BINV[h·32 + b] as a double, h = 0..10, b = 0..31,
   and pulses `done`.

The loop structure, address map, boundary loading, search tree, bank rotation
and write-back order are those of the original kernel. The memory timing
(every read returns after `RD_LAT` = 2 cycles, no stalls), the start/busy/done
handshake and all pipeline depths are this implementation's own.

## The pair pipeline

```
 X2/Y2/Z2[j] ──► dot_product ──► bin_search ──► jk_histogram
 x1,y1,z1,jk     3 × fp64_mul    5 levels,       11 hist × 4 banks × 32
 (registers)     2 × fp64_add    1 per stage     read-modify-write
   RD_LAT    +      6 cycles   +   5 cycles   +     2 cycles
```

Each stage passes a valid bit and a tag ({bank = j mod 4, jk}) alongside the
data, so the pipeline needs no central scheduling: the controller only issues
addresses.

### Dot product (`dot_product`, `fp64_mul`, `fp64_add`)

`dot = (x1·x2 + y1·y2) + z1·z2`, evaluated in that order with IEEE-754
binary64 round-to-nearest-even at every step, so the result is bit-identical
to the same C expression on a CPU. The multiplier forms the full 53 × 53-bit
significand product and normalises by at most one place; the adder aligns
with guard, round and sticky bits and renormalises with a leading-zero count.
Both are two-stage pipelines. They flush subnormals to zero and do not handle
NaN or infinity: unit-vector coordinates never need either.

### Binary search (`bin_search`)

Boundaries decrease with angle: b[0] is the cosine of the smallest angle,
b[30] of the largest. The bin index is the number of boundaries the dot
product lies below, so index 0 means "closer than the first boundary" and 31
"beyond the last one"; the host ignores both or uses them as over/underflow
bins. The index is built one bit per tree level, most significant first. At
level l, with the bits decided so far forming the prefix p, the node compares
against

    b[ p · 2^(5−l) + 2^(4−l) − 1 ]

— b15 at the root, then b23 or b7, and so on down to the leaves b30 .. b0 —
and the next bit is `dot < boundary`. This is exactly the unrolled decision
tree of the original kernel. Here each level is a pipeline stage with one
comparator and a boundary multiplexer (5 comparators instead of a comparator
per tree node), accepting one dot product per cycle. Comparison of doubles is
done on the sign-magnitude bit patterns (`tpacf_pkg::fp64_lt`).

A dot product exactly equal to a boundary goes to the lower index (the tree
tests `dot < b`). A sequential search written as `while (dot > b[k]) k--`
puts such values in the other bin; that only matters for values that hit a
boundary bit for bit.

### Jackknife histograms and bank interleaving (`jk_histogram`)

Each counter is a 32-bit read-modify-write: read at the edge that accepts the
update, written at the next. If two consecutive pairs fell into the same bin
the second would read the count before the first had written it, and one
pair would be lost. The kernel therefore splits each histogram into four
banks and sends pair j to bank j mod 4: while the inner loop runs, a given
bank is touched only every fourth cycle, and between outer points the
controller leaves at least RD_LAT + 2 idle cycles. The true count of a bin is
the sum of its four bank counters, formed at write-back as (b0 + b1) + (b2 + b3).
An assertion flags any bank updated in two consecutive cycles.

A pair updates bin `bin` of all 11 histograms except histogram `jk`, in the
same cycle. With labels 1..10, histogram 0 is always updated. A label of 0
would exclude the pair from histogram 0 instead, and labels above 10 exclude
nothing.

Counters are 32 bits per bank and wrap silently; the largest per-bin total of
a single call (32,768² pairs in one bin of a DR count, about 2^30) stays below
that in every bank.

## Timing

The inner loop runs at one pair per cycle. Each outer point costs RD_LAT + 2
extra cycles (read the outer point, wait for it). A call adds fixed phases of
about 31 + 32 cycles (load boundaries, clear), 20 cycles of drain and
352 cycles of write-back. For 32,768 points at 100 MHz this gives

| count | pairs | kernel time here | measured on the original FPGA |
|---|---|---|---|
| DD or RR | 536,854,528 | 5.370 s | 5.436 s |
| DR | 1,073,741,824 | 10.739 s | 10.816 s |

The measured figures include host-side overheads that this RTL does not
model; the model is within 1.3 % of them.

## Sizes and limits

* 65,536 addresses per array. A DR count needs n1 + n2 ≤ 65,536 (the
  intended use is 32,768 + 32,768); the boundaries at BINV[n1 .. n1+30] need
  n1 ≤ 65,505. Addresses wrap silently beyond that. Larger catalogues (a
  97,000-point set, for instance) must be split into blocks by the host.
* The search hardware is fixed at 31 boundaries / 32 bins; `nb` only sets how
  many boundaries are loaded (they shift in from the top, as in the original
  kernel) and how many bins are cleared and written back.
* 11 histograms (full sample + 10 jackknife subsamples), fixed.
* All sizes are localparams in `rtl/tpacf_pkg.sv`; `RD_LAT` is a parameter of
  the top.

## How this departs from the original design

* Only the kernel is here. The original also contains the vendor's PCI-X host
  interface, clock/reset block, a memory-mapped register node, two four-way
  network routers and four DDR2 SRAM interface nodes, which connect the kernel
  to the board's four 4 MB DDR2 SSRAM banks. In their place the top brings
  out one read port per array plus the BINV write port. How the eight arrays
  share the four dual-port SRAM banks is left to the memory side.
* The kernel arguments are ports, not memory-mapped registers. The original's
  `njk` argument has no port because the hardware is unrolled for 11
  histograms.
* The original's floating-point operators came from a C-to-HDL library; the
  ones here are written out, with the rounding and flush-to-zero choices
  described above.
* A second configuration of the original put two kernels on the FPGA to halve
  the run time. How it divided the pairs between them is not known here, so
  it is not built.

## Files

| file | contents |
|---|---|
| `rtl/tpacf_pkg.sv` | sizes, latencies, the `fp64_t` struct, double compare and conversions, the array map `arr_e`, the pair tag |
| `rtl/fp64_mul.sv`, `rtl/fp64_add.sv` | binary64 multiplier and adder |
| `rtl/dot_product.sv` | three multipliers, two adders, tag delay line |
| `rtl/bin_search.sv` | boundary shift register and 5-stage search |
| `rtl/jk_histogram.sv` | 11 × 4 × 32 counters, jackknife update, clear, bank-summed readout |
| `rtl/cross_correlation.sv` | controller and top: loops, addresses, write-back |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_tpacf_workloads.sv` | DD and DR at 4,096 points per set with the timing extrapolation above |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/tpacf_pkg.sv tb/tb_cross_correlation.sv --top-module tb_cross_correlation
./obj_dir/Vtb_cross_correlation
```

Replace the testbench name for the others. What they check:

* `tb_fp64_mul`, `tb_fp64_add`, `tb_dot_product`: tens of thousands of random
  operands, every result compared bit for bit with the simulator's own double
  arithmetic (so these also pin down the rounding), plus latency and tags.
* `tb_bin_search`: boundaries of 5-per-decade bins from 0.01 to 10,000 arcmin;
  values on, one ulp beside and between boundaries; every bin must occur.
  The computed boundaries are also checked against published values for this
  binning (0.999999999995769 for 0.01 arcmin, and the next eight).
* `tb_jk_histogram`: kernel-like update streams with rotating banks, checked
  against a reference model, twice with a clear in between.
* `tb_cross_correlation`: the whole kernel at its default parameters: a DD
  count of 240 clustered points, a DR count of 240 × 160, a smaller DD
  count and two calls with no pairs at all (n2 = 0, n1 = 1), all 352 counts compared with a reference each time, and the cycle
  count bounded by the timing above. It also confirms that self and cross
  mode, jackknife exclusion, all four banks and both out-of-range bins
  occurred.
* `tb_tpacf_workloads`: the same at 4,096 points per set (about 25 million
  cycles, under a minute).

The testbenches model the SRAM themselves as arrays with the 2-cycle read
latency; they are the place to start when attaching a different memory.

# Pair-function accelerator for Variational Monte Carlo

A Variational Monte Carlo (VMC) simulation of an atomic cluster proposes a new
configuration many thousands of times, moving one atom at random each time.
For every proposal it needs two sums over all N(N-1)/2 atom pairs: the total
pair potential energy, and the trial wavefunction, which is a product of pair
factors. For a few thousand atoms these two kernels dominate the run time.

This RTL moves both kernels into hardware. Each pair term is a smooth function
of the squared distance r² alone, so every term is computed the same way:
form r², find which bin of a table r² falls in, and evaluate a quadratic
polynomial whose three coefficients are stored for that bin. All arithmetic is
fixed point, one atom pair enters the pipeline per clock cycle, and the same
pipeline computes either kernel; only the coefficient tables and the final
accumulation differ. The design follows the FPGA accelerator of Gothandaraman,
Warren, Peterson and Harrison, "Hardware acceleration of a Quantum Monte Carlo
application". Its system has two boards, one per kernel, and the top level
here has the same arrangement.

## The two regions and why the potential is transformed

A pair potential such as Lennard-Jones has two very different parts, and the
design treats them separately. The boundary is σ², the r² at which the
potential crosses zero.

* **Region I, 0 ≤ r² < σ².** The potential rises from zero to +∞ as r² falls.
  Fixed point cannot hold that range. The hardware therefore stores
  `exp(-V)`, which lies in [0, 1]. The region I part of the total energy then
  becomes a product, `Σ V = -ln Π exp(-V)`. The accelerator forms the product
  and the host takes the logarithm. The domain is finite, so 256 uniform bins
  cover it.
* **Region II, r² ≥ σ².** The potential is bounded, between -ε and 0, but the
  domain runs to infinity. Values are rescaled by -1/ε into [0, 1] and
  summed. The domain is cut at the largest r² the format can hold. It is split
  into 21 *regimes* whose end points are consecutive powers of two, and each
  regime into 64 equal bins. Bins are therefore narrow near σ², where the
  curve bends most, and wide far out, where it is flat. Finding the regime
  needs only a leading-one search, not a logarithm.

The wavefunction is not transformed. It is rescaled so that its peak is below
one and binned in the same two regions, with σ² chosen at the peak. Because
the wavefunction is a product, the wavefunction engine sends *every* value to
the product accumulator and bypasses the sum.

## Bin lookup

Both regions locate a bin by multiplying by a stored reciprocal of the bin
width, so no divider is needed:

```
region I : t = r² · recip1                    bin = ⌊t⌋ (8 bits)   entry = bin
region II: d = r² − σ²
           regime = max(0, msb(d) − 32)          (msb = leading-one position in u27.26)
           t = (d − start[regime]) · recip[regime]
           bin = ⌊t⌋ (6 bits)                 entry = 256 + 64·regime + bin
delta = frac(t) ∈ [0,1)   (u0.52)
value = c0 + c1·delta + c2·delta²              (evaluated as c0 + delta·(c1 + delta·c2))
```

A `t` past the last bin saturates to the last bin with `delta` all ones. The
leading-one search (`lzcd`) uses three priority encoders on slices of 18, 18
and 17 bits. The regime with the top bit of the word (bit 52) is regime 20.
Everything with its leading one at bit 32 or lower falls into regime 0, so
regime 0 extends down to σ². `start` and `recip` for each regime come from a
small memory, `regime_mem`, loaded by the host. With the natural choice
(`start = 0`, `recip = 2^-1` for regime 0; `start = 2^(6+k)`,
`recip = 2^-k` for regime k, in real units), every regime holds exactly 64
bins. The testbenches use those values.

The coefficients in each table are those of the polynomial in the
*normalised* coordinate `delta`, not in r². Computing them is the host's job.
Any fit works; the testbenches fit the quadratic through the function at
`delta = 0, ½, 1` in each bin. The coefficient memory has 256 + 21·64 = 1600
entries of three coefficients.

## Number formats

| quantity | format | bits |
|---|---|---|
| atom coordinates | s12.20 | 32 |
| squared distance r², σ², regime start | u27.26 | 53 |
| coefficients c0, c1, c2 and function values | s0.51 | 52 |
| reciprocal bin widths (recip1, recip[k]) | u24.40 | 64 |
| interpolation delta | u0.52 | 52 |
| product mantissa | u0.52 | 52 |
| product shift count | unsigned | 32 |
| region II sum | s23.51 | 75 |

Coordinates lie within ±2048, so r² < 3·2^24 and never overflows u27.26. As a
result, regime 20 is never used in practice. Products inside the
interpolation are truncated to 51 fractional bits by an arithmetic shift, and
the final value saturates to the s0.51 range. 1.0 itself is therefore stored
as 1 − 2^-51.

## Accumulation (`acc_func`)

* **Product.** It is kept as a mantissa `m` (u0.52) and a shift count `e`,
  and its value is `m · 2^-52 · 2^-e`. After each multiplication the result
  is shifted left until its top bit is set, and `e` grows by the number of
  shifts. Repeated factors below one would otherwise push the significant bits
  out of the word. The product starts at the largest mantissa (≈ 1) with
  `e = 0`. A zero factor makes it zero for good, which is the correct limit
  for overlapping atoms. Negative values, which only spline overshoot can
  produce, count as zero.
* **Sum.** s23.51. It can hold 2^23 values of 1.0, more than the 7,998,000
  pairs of a 4000-atom system.

The host turns the potential-energy results into energy as follows:

```
V_I   = −ln(m · 2^-52) + e · ln 2
V_II  = −ε · sum · 2^-51
V     = V_I + V_II
```

For the wavefunction, ψ = m · 2^-52 · 2^-e times the rescaling factors.

## Pipeline and timing

```
pair_addr_gen ─► position_mem ×2 ─► calc_dist ─► calc_func ────────────► acc_func
  (i,j) 1/cycle    (1 cycle)         (3 cycles)   (49 cycles)               (1 cycle)
                                                    ▲        ▲
                                              regime_mem   coef_mem
```

* `pair_addr_gen` walks i = 0..N−2 with j = i+1..N−1 and issues one pair per
  cycle.
* `position_mem` is instantiated twice with the same contents, so atom i and
  atom j are read in the same cycle. The host writes both banks at once.
* `calc_dist`: subtract (s13.20), square, sum, truncate to u27.26, and
  compare with σ² to set the region flag.
* `calc_func`: 8 arithmetic stages, then a delay line that brings the total to
  the original implementation's 49 cycles (`LATENCY` parameter, minimum 8).
  Those stages are: d = r² − σ²; LZCD and region I bin; region II bin; entry
  select and coefficient read; c2·δ; + c1; ·δ; + c0 and saturate.
* From a start to done, a configuration of P = N(N−1)/2 pairs takes exactly
  **P + 54 cycles**: 1 for address to memory, 1 for the memory read, 3 for
  CalcDist, 49 for CalcFunc. A 4000-atom configuration takes 7,998,054 cycles,
  0.2 s at a 40 MHz bus clock.

The product accumulator multiplies 52 × 52 bits in a single-cycle feedback
loop. This is correct RTL, but on an FPGA it would limit the clock. The
original implementation's internal arrangement of this loop is not known.

## Host interface (`opb_regs`)

Each board is a 32-bit OPB slave. A transfer is taken in the first cycle
`opb_select` is high and acknowledged for one cycle in the next; read data is
zero outside an acknowledge. Offsets from `BASE_ADDR` (default `0x8000_0000`):

| offset | access | contents |
|---|---|---|
| `0x00000` | W | CTRL: bit 0 = start |
| `0x00004` | R | STATUS: bit 0 busy, bit 1 done |
| `0x00008` | RW | N, the number of atoms (2..N_MAX) |
| `0x00010/14` | RW | σ² (low, high word) |
| `0x00018/1C` | RW | recip1, region I reciprocal bin width |
| `0x00020/24` | R | product mantissa |
| `0x00028` | R | product shift count |
| `0x00030/34/38` | R | region II sum, top word sign-extended |
| `0x1_0000 + 16·atom + 4·coord` | W | coordinate (coord 0, 1, 2 = x, y, z) |
| `0x2_0000 + 16·regime + 8·field + 4·hi` | W | regime start (field 0) or reciprocal (field 1) |
| `0x4_0000 + 32·entry + 8·coef + 4·hi` | W | coefficient c0/c1/c2 |

Values wider than 32 bits are written low word first. The low word is held in
a staging register, and the write of the high word commits the whole value.

To use a board:
1. Load σ², recip1, the regime constants and the coefficients once per atom
   species.
2. For each configuration, write the coordinates (after a trial move only the
   moved atom needs rewriting), write N and start.
3. Poll STATUS until done, then read the results.

Busy falls in the same cycle done rises. A start written while busy is
ignored, and N < 2 finishes at once with the initial accumulator values.

## Modules

| module | role |
|---|---|
| `qmc_top` | two boards side by side: `u_fpga0_pe` (potential energy) and `u_fpga1_wf` (wavefunction), each with its own OPB port |
| `qmc_accel` | one board: OPB slave, coefficient memory, regime memory, engine; `IS_WF` selects the mode |
| `opb_regs` | OPB slave, register map, write staging, start pulse |
| `calc_engine` | address generator, two position banks, CalcDist, CalcFunc, AccFunc |
| `pair_addr_gen` | i<j pair walker |
| `position_mem` | atom coordinates, host write port, one registered read port |
| `coef_mem` | 1600 × {c0,c1,c2} |
| `regime_mem` | 21 × {start, recip} |
| `calc_dist` | r² and region |
| `calc_func` | lookup and quadratic interpolation, 49-cycle latency |
| `lzcd`, `priority_enc` | leading-one search for the regime |
| `bin_lookup` | reciprocal-multiply bin locator, shared by both regions |
| `acc_func` | normalised product and wide sum, with the wavefunction bypass |
| `qmc_pkg` | formats, types, register map |

The host computer, the PCI link, the on-board SDRAM and PowerPC, and the OPB
bus itself are not part of this RTL; the OPB ports are where they connect.

## Where this RTL goes beyond the original description

The original description gives the structure, the table sizes, the number
formats, the 49-cycle CalcFunc latency and the accumulation scheme. The
following are choices made here:

* The regime-constant memory, its contents (regime start and reciprocal bin
  width) and the u24.40 reciprocal format.
* The normalised delta (u0.52) and Horner evaluation with truncation.
* How regime 0 ends: it extends down to σ². The power-of-two regimes are
  counted from the top of the r² format.
* The CalcFunc delay line. The arithmetic here needs 8 stages; the other 41
  are padding, so that the latency matches.
* The CalcDist split into three stages. Its original stage latencies are not
  known.
* Two identical position banks, so that two atoms can be read per cycle.
* Full normalisation of the product. The original describes a single left
  shift per product when the product falls below ½. That is the same whenever
  the new factor is at least ½, and keeps precision otherwise.
* r² is carried as 53 bits (u27.26). One passage of the original speaks of a
  52-bit squared distance while its format table gives u27.26; the format
  table is followed.
* The complete OPB register map, the write staging and the acknowledge timing.
* The start/busy/done handshake.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference is
`tb_model_pkg`, a bit-exact model written independently of the RTL with
128-bit integer arithmetic. The same package generates the test tables: a
Lennard-Jones potential with σ = 2.5 and ε = 1 for the potential board, and a
pair factor `0.999·exp(−(4/r²)^2.5)` for the wavefunction board.

| testbench | what it shows |
|---|---|
| `tb_position_mem`, `tb_coef_mem`, `tb_regime_mem` | write/read-back of every location |
| `tb_pair_addr_gen` | exact pair sequence, one pair per cycle, `last`, empty runs, start ignored while busy |
| `tb_calc_dist` | r² and region of random, close and corner-to-corner pairs; 3-cycle latency |
| `tb_lzcd`, `tb_bin_lookup` | exhaustive single-bit and random cases, bin saturation |
| `tb_calc_func` | every regime and region I, bit-exact values, 49-cycle latency |
| `tb_acc_func` | both modes, multi-bit renormalisation, zeros, negatives, empty run |
| `tb_calc_engine` | PE and WF engines over several N; P + 54 cycles |
| `tb_opb_regs` | register map, staging, acknowledge timing, foreign addresses |
| `tb_qmc_accel` | one wavefunction board driven only over OPB |
| `tb_qmc_top` | both boards, two configurations around a trial move, an empty one; counts every mechanism |
| `tb_vmc_run` | a 100-iteration VMC run at 48 atoms: trial move of one atom, rewrite on both boards, evaluate, accept when the wavefunction does not decrease, otherwise restore; every result bit-exact, energy printed per 20 iterations |
| `tb_qmc_full` | all parameters at their defaults: one 4000-atom configuration (7,998,000 pairs) on both boards, bit-exact, with the cycle count; about 40 s in Verilator |

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_qmc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/qmc_pkg.sv tb/tb_model_pkg.sv tb/tb_qmc_top.sv
./obj_dir/Vtb_qmc_top
```

Lint reports only style warnings: unused low bits of wide intermediate
products, package constants a given module does not use, and the two
deliberately open outputs of `lzcd` inside `calc_func`. It has not been placed and routed, so nothing here establishes a
clock rate. The model and the RTL were written from the same interpretation
of the formats. The tests therefore show that the RTL does what this README
describes; they do not show agreement with the original hardware bit for
bit.

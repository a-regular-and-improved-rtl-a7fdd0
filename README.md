# Multiplier-free constant vector multiplication with a shared "public" vector

Many signal-processing blocks multiply one input sample by a fixed set of
constants: the taps of a FIR filter, the rows of a transform. Built from shifts
and adders, each constant is usually written in canonical signed digit (CSD)
form and gets its own add chain, so partial results that several constants
could share are computed again and again, and every constant ends up with a
differently shaped adder chain.

This design uses another split, the *improved signed digit* (ISD) form. The
constant vector `a` is factored as

    a = PM * PV

* `PV`, the **public vector**, is a short list of numbers, each `1`, `2^q + 1`
  or `2^q - 1`. Each costs at most one adder (a shift is only wiring), and all
  outputs share them.
* `PM`, the **private matrix**, has one row per constant. Each entry is `0` or
  `±2^k`. A row says how to shift and add the public results to get that one
  constant.

The hardware therefore has two regular steps. First an **adder array** forms
`PV * x` with one adder per entry. Then one **binary adder tree** per row of
`PM` adds shifted copies of those results. Every register-to-register path
holds one adder. The number of adders is

    length(PV) + sum over rows of (nonzero entries in the row - 1)

and choosing `PV` and `PM` means making that number small.

## The worked example: an 11-tap Gaussian filter

The top module, `isd_gaussian_filter`, is an 11-tap FIR filter with the
symmetric Gaussian taps

    1  4  19  57  108  134  108  57  19  4  1

It has six distinct constants. Their decomposition uses `PV = (1, 5, 17)`, that
is `x`, `(2^2+1)x` and `(2^4+1)x`:

| constant | row of PM (over 1, 5, 17) | how it is formed |
|---------:|---------------------------|------------------|
|   1 | ( 1, 0, 0) | x |
|   4 | ( 4, 0, 0) | x << 2 |
|  19 | ( 2, 0, 1) | (x << 1) + 17x |
|  57 | ( 0, 8, 1) | (5x << 3) + 17x |
| 108 | ( 0, 8, 4) | (5x << 3) + (17x << 2) |
| 134 | (-2, 0, 8) | (17x << 3) - (x << 1) |

Stage 1 needs 2 adders, for 5x and 17x. Stage 2 needs 4: one each for 19x, 57x,
108x and 134x. That makes 6 adders and 10 registers: the input register, three
stage-1 registers and six stage-2 registers. For this filter, a CSD multiplier
block needs 9 adders and 17 registers. Both have one adder between registers.

The filter has two parts:

```
 x ──► isd_mcm (multiplier block) ──6 products──► isd_register_array ──► y
        ├─ isd_adder_array     stage 1: x, 5x, 17x
        └─ isd_private_matrix  stage 2: one isd_adder_tree per constant
```

`isd_register_array` gives each of the six products a delay line as long as its
farthest tap. For example, the product `1·x` is needed at taps 0 and 10, so its
line is 10 deep. The two taps that share a coefficient read the same line. An
11-input pipelined adder tree sums the taps:

    y[n] = sum_k c_k x[n-k]

## Modules

| module | role |
|--------|------|
| `isd_pkg` | Gaussian constants (`GAUSS_COEF`, `GAUSS_PV`, `GAUSS_PM`, `GAUSS_TAP_IDX`), default widths, and helpers: `is_pow2`, `log2_exact`, `tree_depth`, `pv_ok`, `pm_ok`, `gauss_pm_pv` |
| `isd_adder_array` | stage 1, `PV * x` |
| `isd_adder_tree` | generic pipelined binary adder tree with per-input signs |
| `isd_private_matrix` | stage 2, `PM * (PV * x)`, with one adder tree per row |
| `isd_mcm` | multiplier block: stage 1 followed by stage 2 |
| `isd_register_array` | delay lines for the taps, plus the final sum tree |
| `isd_gaussian_filter` | top: the 11-tap Gaussian filter; at elaboration it checks that `PM * PV` reproduces `GAUSS_COEF` |

Every module uses a single clock `clk` and an asynchronous active-low reset
`rst_n`. Reset clears every register, so after reset the filter history is
zero. Data moves with a `valid` bit that has the same latency as the data.

### Using another constant vector

`isd_mcm` is not tied to the Gaussian filter. Its parameters are:

* `PV [M]`: every entry must be `1`, `2^q+1` or `2^q-1`.
* `PM [N][M]`: every entry must be `0` or `±2^k`.

Elaboration checks both rules and stops with `$error` if either is broken. The
output `prod[n]` equals `(sum_m PM[n][m] * PV[m]) * x`. Some notes on using it:

* **The hardware does not find the decomposition.** You must compute `PV` and
  `PM` offline. The usual way is a search that tries growing sets of `2^q ± 1`
  terms and keeps the one with the fewest adders.
* **Width.** Choose `W` so that `max|a[n]| * 2^(W_IN-1)` fits in it. Nothing
  saturates: an overflow wraps around.
* **Rows of different sizes.** A row with `k` nonzero entries gets a tree of
  `ceil(log2 k)` levels. Shallower rows are padded with registers so that all
  outputs come out in the same cycle.
* **Filters.** `isd_register_array` takes any `TAPS` and any map `TAP_IDX` from
  taps to coefficients.

## Timing

| module (default parameters) | latency (edges from input to output) | throughput |
|------------------------------|--------------------------------------|------------|
| `isd_adder_array` | 2: input register, stage register | 1 per clock |
| `isd_private_matrix` | `DEPTH`, the deepest row tree; 1 for the Gaussian `PM` | 1 per clock |
| `isd_mcm` | 2 + `DEPTH` = 3 | 1 per clock |
| `isd_adder_tree` | max(1, ceil(log2 N)) | 1 per clock |
| `isd_register_array` | ceil(log2 TAPS) = 4 | 1 per clock |
| `isd_gaussian_filter` | 7 | 1 per clock |

When `in_valid` is low, the data still flows, but `out_valid` stays low and the
tap delay lines keep their contents. The filter therefore always works on the
last 11 *valid* samples, and gaps in the input stream do no harm.

**Merging stages.** When the clock is slow enough, you can set
`MERGE_STAGES = 1` on `isd_mcm` or on `isd_gaussian_filter`. This removes the
stage-1 registers, so stage 1 and the first level of stage 2 share one cycle.
The result:

* the multiplier block has 3 fewer registers (7 instead of 10);
* the latency is one cycle shorter (6 cycles for the filter);
* the longest path becomes two adders.

## Numbers and formats

* Input `x` is signed two's complement, `W_IN = 8` bits by default.
* Every internal value and the output `y` use `W = W_IN + 10 = 18` bits. The
  Gaussian taps sum to 512, so the worst case is `512 × (−128) = −65536`.
* `y` is the unscaled sum. Take `y >>> 9` for a unity-gain output.

## Where this RTL makes its own choices

These parts follow the ISD method as described for the example:

* the decomposition and coefficient values;
* the two-stage multiplier block;
* one adder per public entry;
* shift-and-add trees for the private rows;
* registers after every adder;
* the adder and register counts.

These parts are this implementation's own:

* the sample width, the internal width, the reset and the valid signal;
* signs are handled in the first level of the adder tree: a negative term turns
  an adder into a subtractor;
* a leftover odd input passes through a register without an adder;
* shallow rows are padded with registers to a common latency;
* the register array is built as one shared delay line per distinct
  coefficient feeding a balanced adder tree. The original layout pairs delay
  chains of various lengths with adders in an unbalanced arrangement, but it
  computes the same sum with the same one-adder-per-stage rule;
* delay lines advance only on valid samples;
* the output is left unscaled;
* `MERGE_STAGES` merges only stage 1 into stage 2. The description allows stage
  merging in general but does not say which stages to merge.

This RTL does not include:

* the search that finds `PV` and `PM`, which is a design-time software step;
* the CSD baseline it is compared against;
* the other evaluated filters: a 25-tap filter with 9-bit coefficients, a
  60-tap filter with 14-bit coefficients, and random filters with 16 to 255
  taps. Their coefficients and decompositions are not available. The modules
  accept them as parameters once a decomposition exists.

## Verification

Each module has a self-checking testbench in `tb/`. Each one works out the
expected values on its own, with plain multiplications or a direct-form FIR.
It also checks the latency, through the cycle at which each result appears and
through `out_valid`.

| testbench | what it covers |
|-----------|----------------|
| `isd_adder_array_tb` | default `PV`; a `PV` with subtracting entries; the unregistered (`REG_OUT = 0`) variant |
| `isd_adder_tree_tb` | trees of 1, 2, 4, 5 and 11 inputs with mixed signs |
| `isd_private_matrix_tb` | the Gaussian `PM`; a 3×4 matrix with a four-term row, a negated single term and an all-zero row |
| `isd_mcm_tb` | the Gaussian block (products 1, 4, 19, 57, 108, 134 times x); a second decomposition (1, 19, 43); the merged-stage block |
| `isd_register_array_tb` | random products with input gaps |
| `isd_gaussian_filter_tb` | the whole filter, default and merged-stage, against a reference FIR |
| `isd_gaussian_filter_full_tb` | the whole filter at its default parameters only |

The two filter testbenches include these cases:

* input gaps;
* full-scale runs of −128 and +127 that drive the output to its extremes,
  −65536 and 65024;
* a reset in mid-stream.

They count each of these cases and fail if one never occurs.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/isd_pkg.sv tb/isd_gaussian_filter_tb.sv --top-module isd_gaussian_filter_tb
./obj_dir/Visd_gaussian_filter_tb
```

All files are SystemVerilog 2017. They pass Verilator lint and elaborate with
the slang front end of Yosys. After synthesis, the default filter uses 16 adders
(6 in the multiplier block, 10 in the 11-input sum tree). Verilator lint still
reports that some package constants are unused in some modules and that some
upper bits of function arguments are unused. Neither affects the hardware.

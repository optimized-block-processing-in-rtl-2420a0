# Block processing in a transpose-form FIR filter

A transpose-form FIR filter is pipelined by construction. It also lets every
input sample be multiplied by all coefficients at once, so fixed coefficients
can share their shift-and-add logic (multiple constant multiplication, MCM).
Its weakness is that it takes one sample per cycle. Block processing gives L
outputs per cycle. That is easy in direct form, but the transpose form does
not support it directly.

This RTL implements a block formulation that keeps the transpose form. The
N-tap filter is cut into M = N/L short filters of L taps each. Each short
filter is applied to the current block as a small matrix-vector product. The
M partial results are then summed through a transpose-form delay-and-add
chain. Two filters are built from this idea:

* `bfir_reconfig`: a **reconfigurable** filter. It uses general multipliers
  and selects its coefficients from a ROM holding several filters, as an SDR
  channelizer does when switching between standards.
* `bfir_fixed`: a **fixed-coefficient** filter. It has no coefficient storage
  and no general multipliers. Its products come from MCM units.

`bfir_top` places both filters side by side on one input stream.

## The block formulation

Take block k of the input to be the L samples `x(kL), x(kL-1), ..., x(kL-L+1)`.
The filter output is `y(n) = sum_{i=0}^{N-1} h(i) x(n-i)`. Write the tap index
as `i = mL + j`, with `0 <= j < L` and `0 <= m < M`. Then

    y(kL-l) = sum_{m=0}^{M-1}  sum_{j=0}^{L-1} h(mL+j) * x((k-m)L - l - j)

The inner sum is an L-point inner product. Its two operands are:

* row l of the L x L input matrix `S_k`, where `S_k[l][j] = x(kL-l-j)`;
* the short weight vector `c_m = [h(mL), ..., h(mL+L-1)]`.

So the whole output block is

    y_k = S_k c_0 + S_{k-1} c_1 + ... + S_{k-M+1} c_{M-1}

This is a transpose-form FIR filter in which each "tap" is a matrix-vector
product. Every cycle, all M products are formed with the *current* matrix
`S_k`. Delays after the products line them up: the product with `c_{M-1}`
waits M-1 cycles and the product with `c_0` waits none. No product is ever
computed twice. This happens because the blocks do not overlap. A naive
approach would run L separate transpose filters, and those would repeat most
of their products.

`S_k` is a Toeplitz matrix. It holds only 2L-1 distinct samples,
`x(kL) .. x(kL-2L+2)`: the L samples of the current block and the L-1 newest
samples of the previous block.

## Reconfigurable filter (`bfir_reconfig`)

    x_k ──► RU ──S_k──┬──────────┬── ... ──┐
                      ▼          ▼         ▼
    CSU ──c_{M-1}──► IPU 1    IPU 2  ... IPU M ◄── c_0
                      │ r^0      │ r^1      │ r^{M-1}
                      ▼          ▼          ▼
                 PAU: [D]──►(+)──[D]──►(+)── ... ──►(+)──[out]──► y_k

* **RU** (`bfir_ru`, register unit). It holds L-1 registers with the newest
  samples of the previous block, and wires them with the incoming block into
  the L rows of `S_k`.
* **CSU** (`bfir_csu`, coefficient storage unit). It has one small ROM per
  tap, each with one word per stored filter. All N taps of the selected
  filter are read in one cycle, into a register.
* **IPU** (`bfir_ipu`, inner product unit). It consists of L inner product
  cells (`bfir_ipc`) that share one weight vector. IPC l computes row l of
  `S_k` times the weights, using L multipliers and a binary adder tree. The
  (m+1)th IPU takes `c_{M-1-m}` and yields the partial block `r^m`.
* **PAU** (`bfir_pau`, pipelined adder unit). It has L lanes of the
  transpose-form chain: `r^0` is registered, each later `r^m` is added to the
  registered sum before it, and the last sum is the output. This gives
  `y_k = r^{M-1}_k + r^{M-2}_{k-1} + ... + r^0_{k-M+1}`.

The critical path is one multiplier, a log2(L)-level adder tree and one PAU
adder. It does not grow with N. Throughput is L outputs per cycle.

### Changing filters

`filt_sel` is sampled by the CSU every cycle. The new coefficients apply to
blocks accepted from the next cycle on. The PAU still holds partial sums made
with the old coefficients. The M-1 output blocks after a change are therefore
a mix: the part of each output that comes from block k-m was computed with the
filter that was in force for block k-m. This is the normal behaviour of a
transpose-form filter whose taps change. Discard those blocks, or hold the
input, if a clean switch is needed. The testbenches model this mix exactly.

## Fixed-coefficient filter (`bfir_fixed`)

If the filter is known at build time, the CSU and the general multipliers are
not needed. Each of the 2L-1 distinct samples of `S_k` feeds one MCM unit
(`bfir_mcm`), which produces that sample times every coefficient. A sample
appears in several rows of `S_k`. It is still multiplied only once, and the
products are picked up wherever they are needed:

    r^m(l) = sum_j P[l+j][(M-1-m)L + j],    P[t][i] = x(kL-t) * h(i)

The same RU and PAU as in the reconfigurable filter complete the structure.

Inside an MCM unit, each constant is recoded at elaboration time into
canonical signed digits (CSD), so no two nonzero digits are adjacent. The unit
computes two subexpressions once: `3x = 2x + x` and `5x = 4x + x`. All
constants share them. In each constant, a pair of nonzero digits two places
apart becomes a single shifted copy of one of them:

| digit pair (low, high) | replaced by |
|---|---|
| (+1, +1) | `+5x` |
| (-1, +1) | `+3x` |
| (+1, -1) | `-3x` |
| (-1, -1) | `-5x` |

Any digit left over becomes a single shifted copy of x, added or subtracted.
The recoding is `bfir_pkg::mcm_terms`. It is a deliberately simple form of
common-subexpression elimination: it shares only two fixed subexpressions,
where a full search over the coefficient set would find more.

## Interface and timing

Both filters, and the top, use the same conventions:

| signal | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset clears all state |
| `in_valid` | in | 1 | `x_blk` holds a block; all registers advance only then |
| `x_blk[j]` | in | L x WX signed | `x(kL-j)`; element 0 is the newest sample |
| `filt_sel` | in | clog2(NFILT) | filter chosen from the ROM (reconfigurable filter only) |
| `y_blk[l]` | out | L x WY signed | `y(kL-l)` for the block accepted one cycle earlier |
| `out_valid` | out | 1 | `in_valid` delayed by one cycle |

Latency is one cycle: the output block appears after the clock edge that
accepted the input block. One block can be accepted every cycle. Idle cycles
(`in_valid` low) freeze the filter.

Samples before the first block after reset count as zero. The first output
blocks are therefore those of a filter started from rest.

The top's ports are `y_rcfg` and `y_fixed`, one per filter, plus a shared
`out_valid`.

## Parameters and number formats

| parameter | default | notes |
|---|---|---|
| `L` | 4 | block size; a power of two, at least 2 |
| `N` | 16 | filter length; a multiple of L (M = N/L weight vectors) |
| `WX`, `WH` | 8, 8 | two's-complement sample and coefficient widths |
| `NFILT` | 4 | filters stored in the CSU |
| `FIXED_ID` / `FILT_ID` | 0 | the filter the fixed-coefficient path is built for |

All arithmetic is exact. An IPC result has `WX+WH+log2(L)` bits. The output
has `WY = WX+WH+clog2(N)` bits and cannot overflow.

### Coefficients

No particular filter is built in. Both the CSU ROM and the fixed filter's
constants come from one function, `bfir_pkg::rom_coef(f, i, WH)`:

    h_f(i) = ((7919 f + 104729 i + 31 (f+1)(i+3)) mod (2^WH - 5)) - (2^(WH-1) - 3)

This gives well-spread signed values, -125..125 for WH = 8. It is a
placeholder: replace the function body with a table of real coefficients to
build a real filter. Both filters pick up the change, and so do the
testbenches once `bfir_tb_pkg::ref_coef` is changed to match.

## Departures and choices

The following are this implementation's own choices, not part of the
structure it follows:

* The default filter length (N = 16), the word widths, the number of stored
  filters, and the coefficient values.
* The valid strobe, the reset behaviour, and the extra register on the PAU
  output. That register makes the output registered without lengthening the
  critical path.
* The registered CSU read. It gives the one-cycle filter change described
  above. A `filt_sel` beyond the last stored filter leaves the coefficients
  unchanged.
* The MCM arrangement. There is one unit per distinct sample, and each unit
  shares only the fixed subexpressions 3x and 5x. The structure it follows
  eliminates common subexpressions more aggressively; that search is not
  implemented here.
* Placing the two filters on one input stream in `bfir_top`.

Not implemented: the direct-form block filter and the single-output
transpose-form filter, which serve only as points of comparison.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bfir_ipc`, `tb_bfir_ipu` | inner products against direct sums, random and full-scale operands |
| `tb_bfir_mcm` | every 8-bit input times all constants of two filters |
| `tb_bfir_csu` | one-cycle read of every filter, clearing on reset |
| `tb_bfir_ru` | rows of `S_k` against the recorded sample stream, with idle cycles |
| `tb_bfir_pau` | the delay-and-add chain against recorded partial blocks, with idle cycles |
| `tb_bfir_reconfig` | whole filter against convolution with random filter changes, at L=4/N=16 and L=8/N=32 |
| `tb_bfir_fixed` | whole filter against convolution at L=4/N=16, L=2/N=6 and L=8/N=32 |
| `tb_bfir_top` | both filters at default size over 2000 blocks (see below) |

`tb_bfir_top` runs the top at its defaults. It compares both outputs with a
convolution model. This model records the filter in force for every block,
so the mixed blocks after a filter change are checked exactly. The test also
checks that `out_valid` trails `in_valid` by one cycle. When the
reconfigurable filter has used the fixed filter's coefficients across an
output's whole span, the two outputs must be equal. It counts idle cycles,
filter changes, mixed output blocks, full-scale input blocks and agreeing
outputs, and fails if any of these never occurs. The filter-level
testbenches share a stimulus and checker module, `tb/bfir_fir_env.sv`.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bfir_pkg.sv tb/bfir_tb_pkg.sv tb/tb_bfir_top.sv --top-module tb_bfir_top
    ./obj_dir/Vtb_bfir_top

Substitute any other testbench name. Every test finishes in well under a
second.

## Files

| file | content |
|---|---|
| `rtl/bfir_pkg.sv` | coefficient formula, CSD and shared-term recoding functions |
| `rtl/bfir_ru.sv` | register unit |
| `rtl/bfir_csu.sv` | coefficient storage unit |
| `rtl/bfir_ipc.sv`, `rtl/bfir_ipu.sv` | inner product cell and unit |
| `rtl/bfir_pau.sv` | pipelined adder unit |
| `rtl/bfir_mcm.sv` | multiple constant multiplication unit |
| `rtl/bfir_reconfig.sv` | reconfigurable block FIR filter |
| `rtl/bfir_fixed.sv` | fixed-coefficient MCM block FIR filter |
| `rtl/bfir_top.sv` | both filters side by side |
| `tb/bfir_tb_pkg.sv`, `tb/bfir_fir_env.sv` | testbench reference model and stimulus |
| `tb/tb_*.sv` | testbenches |

# Transpose-form block FIR filters: reconfigurable and fixed-coefficient

A block FIR filter takes L new samples per clock and returns L outputs per
clock, so it runs at 1/L of the sample rate. Block filters are usually built
in direct form, because the direct form splits into blocks trivially. The
transpose form does not, but it has two advantages: it is pipelined by
construction, and every coefficient multiplies the *same* input sample, so
fixed coefficients can be implemented as multiple-constant multiplication
(MCM) with shared shift-add networks instead of multipliers.

This RTL implements a block formulation of the transpose form and two filters
built on it:

* `rfir_block`: a **reconfigurable** filter. General multipliers, and a
  coefficient store that holds several channel filters and can switch between
  them at run time (the typical use is a software-radio channelizer).
* `fixed_block_fir`: a **fixed-coefficient** filter. The coefficients are
  elaboration-time constants and every product is a shift-add network.

`block_fir_top` places the two side by side.

## The block formulation

Take an N-tap filter `y(n) = sum_i h(i) x(n-i)` with N = M·L. Block k holds the
samples x(kL), x(kL-1), ..., x(kL-L+1), newest first. Every port in this design
orders a block the same way: element `l` is x(kL-l) on inputs and y(kL-l) on
outputs.

Split the coefficients into M short weight vectors of length L:
`c_m = { h(mL), h(mL+1), ..., h(mL+L-1) }`.
Define the L×L input matrix `S0_k`, whose row `l` is
`{ x(kL-l), x(kL-l-1), ..., x(kL-l-L+1) }`. It holds only 2L-1 distinct
samples: the current block plus the newest L-1 samples of the previous block.
The output block is then

```
y_k = sum_{m=0}^{M-1} r^m_{k-m},      r^m_k = S0_k · c_m
```

Each term therefore uses the *current* matrix `S0_k`, multiplied by one weight
vector, and is delayed by m blocks. In z-domain form this is the transpose
recurrence at block level:

```
Y = r^0 + z^-1( r^1 + z^-1( r^2 + ... + z^-1 r^{M-1} ) )
```

All M products `S0_k · c_m` are computed in the same clock from the same data.
A chain of M-1 block registers, with one adder per stage, lines them up. This
chain is the only long-lived state apart from the L-1 stored samples.

Example: for L = 4 and N = 16 (M = 4), `S0_k` involves the seven samples
x(4k) ... x(4k-6). The coefficients each sample meets are:

| sample   | meets coefficients h(j + 4m), m = 0..3, for |
|----------|---------------------------------------------|
| x(4k)    | j = 0                                        |
| x(4k-1)  | j = 0, 1                                     |
| x(4k-2)  | j = 0, 1, 2                                  |
| x(4k-3)  | j = 0, 1, 2, 3                               |
| x(4k-4)  | j = 1, 2, 3                                  |
| x(4k-5)  | j = 2, 3                                     |
| x(4k-6)  | j = 3                                        |

In general, sample x(kL-s) meets h(j+mL) for every m and for every j with
0 ≤ j ≤ L-1 and 0 ≤ s-j ≤ L-1. This table is what the fixed filter's MCM
blocks are built from.

## Reconfigurable filter (`rfir_block`)

```
            sel ──► CSU ──c_0..c_{M-1}──┐
                                        ▼
 x_blk ──► RU ──S0_k rows──► IPU_0 .. IPU_{M-1} ──r^0..r^{M-1}──► PAU ──► y_blk
```

* **CSU** (`block_csu`), the coefficient selection unit. It is a read-only
  table of NUM_FILT filters × N coefficients. Every tap has its own table, so
  one read returns a complete filter as M weight vectors. The read is
  registered.
* **RU** (`block_ru`), the register unit. It holds the newest L-1 samples of
  the last accepted block and wires them, together with the current block,
  into the L rows of `S0_k`.
* **IPU** (`block_ipu`), the inner-product unit. There is one per weight
  vector. Each IPU has L inner-product cells (**IPC**, `block_ipc`), one per
  row. A cell is L signed multipliers followed by a carry-save tree of full
  adders (`csa_tree`) and one carry-propagate adder. For L = 4 the tree has
  two full-adder levels. All IPUs see the same rows.
* **PAU** (`block_pau`), the pipeline adder unit. It is the block-level
  transpose chain. Stage m registers `r^m + acc[m+1]`, and stage 0 is the
  output register.

The register-to-register path is one multiplier, then about log2 L full-adder
levels and one adder in the cell, then one adder in the PAU. It does not grow with N.

**Switching filters.** A change of `sel` reaches the IPUs one clock later.
Partial sums already in the PAU chain keep the coefficients they were formed
with, so the M-1 output blocks after a switch mix the old and new filters.
This is how a transpose-form filter behaves. The design does not flush the
chain. If clean outputs are needed, discard M-1 blocks after a switch, or
reset. The reference model in the testbenches describes the mixed outputs
exactly: output element `l` of block k is
`sum_m sum_j x(kL-l-mL-j) · h_{f(k-m)}(mL+j)`, where f(k) is the filter held
when block k was accepted.

## Fixed-coefficient filter (`fixed_block_fir`)

With constant coefficients there is no CSU and there are no general
multipliers:

```
 x_blk ──► RU ──2L-1 samples──► MCM_0 .. MCM_{2L-2} ──products──► adder network ──r──► PAU ──► y_blk
```

* **MCM block** (`mcm_block`): one per distinct sample of `S0_k`, so 2L-1 of
  them (7 for L = 4). The block for x(kL-s) forms each product x·h(j+mL) that
  the table above lists for that sample, and forms it exactly once. The adder
  network then reuses it in every row where that sample appears. This reuse
  across rows and columns of the coefficient matrix is the main saving: with
  fixed coefficients, the transpose form computes each product once. Inside
  an MCM block:
  * every constant is split into sign × odd part × 2^shift;
  * constants with the same odd part share one shift-add/subtract network for
    x·(odd part), built from the odd part's canonical-signed-digit form;
  * the other products are shifts and negations of that network's output.

  All of this is worked out from the coefficients at elaboration
  (`fir_pkg::csd_digit` and the functions in `mcm_block`).
* **Adder network** (`mcm_adder_net`): forms
  `r[m][l] = sum_j x(kL-l-j)·h(j+mL)` with one log2 L adder tree per entry.
  The layout matches the IPU outputs, so the same PAU follows.

Deeper MCM optimisation is not done. Optimisers such as Hcub, or horizontal and
vertical common-subexpression elimination, also reuse partial sums between
*different* odd parts. Synthesis tools recover some of that sharing.

## Interface and timing

Both filters have the same ports, except that only the reconfigurable one has
`sel`:

| port        | dir | width            | meaning                                         |
|-------------|-----|------------------|-------------------------------------------------|
| `clk`, `rst`| in  | 1                | clock; synchronous active-high reset            |
| `sel`       | in  | clog2(NUM_FILT)  | channel filter (rfir only); registered          |
| `in_valid`  | in  | 1                | `x_blk` holds a new block                       |
| `x_blk`     | in  | L × X_W, signed  | `x_blk[l]` = x(kL-l)                            |
| `out_valid` | out | 1                | `y_blk` was updated this clock                  |
| `y_blk`     | out | L × Y_W, signed  | `y_blk[l]` = y(kL-l), Y_W = X_W + H_W + clog2 N |

* The filter accepts one block per clock. The output block is registered and
  appears one clock after its input block (`out_valid` is `in_valid` delayed
  by one clock).
* While `in_valid` is low, no state changes: gaps in the stream are harmless,
  and `y_blk` holds.
* Reset clears the sample history and the PAU chain, so the filter restarts
  from all-zero history. In the reconfigurable filter, reset also selects
  filter 0.
* Outputs are full precision. Nothing is rounded or saturated, and an output
  cannot overflow.
* `block_csu` asserts that `sel` < NUM_FILT.

## Parameters

| parameter  | default | notes |
|------------|---------|-------|
| `L`        | 4       | block size |
| `N`        | 16      | taps; must be a multiple of L (M = N/L) |
| `X_W`      | 4       | sample width, two's complement |
| `H_W`      | 4       | coefficient width, two's complement |
| `NUM_FILT` | 4       | filters in the coefficient store (rfir only) |
| `ROM_FLAT` | placeholder | rfir coefficients: h_f(i) at bits `[(f*N+i)*H_W +: H_W]` |
| `H_FLAT`   | placeholder | fixed-filter coefficients: h(i) at bits `[i*H_W +: H_W]` |

The defaults are L = 4, N = 16, with 4-bit samples and coefficients. The
default coefficient tables are **placeholders**, not designed filters. They
come from `fir_pkg::default_coef`, with t = min(i, N-1-i):

```
h_f(i) = ((5·(f+1)·(t+1) + 3·f) mod 2^H_W) - 2^(H_W-1)
```

This gives symmetric taps with mixed signs, which is useful for testing.
Supply real channel filters through `ROM_FLAT` and `H_FLAT`. By default the
fixed filter uses placeholder filter 0, the same as filter 0 of the
reconfigurable one.

## Design choices beyond the architecture

The structure, that is the block formulation, CSU/RU/IPU/IPC/PAU, the MCM
blocks and the adder network, follows the published architecture. The items
below are choices made here:

* The `in_valid`/`out_valid` strobes, the one-clock latency, the output
  register in the PAU and the synchronous reset.
* The number format (signed), the full-precision output width, and the number
  of stored filters.
* The registered coefficient read, and the decision not to flush the PAU
  chain after a filter switch.
* The internals of the register unit, the inner-product cell and the PAU,
  which are built as the simplest logic with the required function.
* The MCM sharing scheme described above, in place of a full
  common-subexpression optimiser.
* The IPUs are numbered by the weight vector they use (IPU m uses c_m).

## Files

* `rtl/fir_pkg.sv`: defaults, placeholder tables and the CSD digit function.
* `rtl/block_ru.sv`, `rtl/block_ipc.sv`, `rtl/block_ipu.sv`,
  `rtl/block_pau.sv`, `rtl/block_csu.sv`, `rtl/csa_tree.sv`,
  `rtl/adder_tree.sv`: the building blocks.
* `rtl/rfir_block.sv`: the reconfigurable filter.
* `rtl/mcm_block.sv`, `rtl/mcm_adder_net.sv`, `rtl/fixed_block_fir.sv`: the
  fixed-coefficient filter.
* `rtl/block_fir_top.sv`: both filters, each with its own data ports.
* `tb/`: one self-checking testbench per module, plus `tb_ref_pkg.sv`, which
  restates the placeholder-coefficient formula on its own.

## Verification

Every testbench compares the outputs against integer models it computes itself
and ends by printing `TB_RESULT checks=<n> failures=<n>`:

* `tb_block_ru`, `tb_block_pau`, `tb_block_csu`: random streams with gaps. The
  PAU and CSU benches also check the one-clock timing. `tb_block_ru` also
  resets mid-stream.
* `tb_block_ipc`, `tb_block_ipu`, `tb_mcm_adder_net`, `tb_csa_tree`: random
  and corner-case operands. `tb_csa_tree` covers 2, 3, 4, 5 and 8 operands.
  `tb_mcm_block` drives every 4-bit sample value into MCM blocks
  whose coefficients cover the whole 4-bit range, -8 to 7.
* `tb_rfir_block`: the default configuration with random filter switches,
  gaps and a reset in mid-stream. It checks the mixed outputs after a switch
  exactly.
* `tb_fixed_block_fir`: the fixed filter at a different size (L = 2, N = 10,
  6-bit samples, 5-bit coefficients including -16 and +15), against a direct
  convolution.
* `tb_block_fir_top`: the top at its default parameters, end to end. It checks
  both filters and requires each of these to occur at least once: a filter
  switch, an input gap, a mixed output block after a switch, a mid-stream
  reset, and blocks where both filters run filter 0 and must agree.
* `tb_workload_4tap`: a 4-tap filter with 4-bit samples and coefficients in
  blocks of 4, so M = 1. Coefficients are -6, 2, -6, -4 and the first block is
  4, -8, 1, 2. Both structures run it.
* `tb_workload_n6_l2`: the smallest block transpose example, a 6-tap filter in
  blocks of 2 (M = 3). Both structures run it with coefficients chosen by the
  bench.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/fir_pkg.sv tb/tb_ref_pkg.sv tb/tb_block_fir_top.sv \
    --top-module tb_block_fir_top -o sim
./obj_dir/sim
```

Replace the last source file and `--top-module` to run another testbench. For
module testbenches that do not use `tb_ref_pkg`, that package can be left out.
All testbenches finish in well under a second.

## Limits

* Only bit-true behaviour in simulation has been verified. Timing, area and
  power have not been measured on any target.
* N must be a multiple of L. A shorter filter can be padded with zero
  coefficients. In the fixed filter those zero coefficients cost nothing;
  in the reconfigurable one they still occupy multipliers.
* The coefficient store is read-only. Loading new filter sets at run time would
  need a write port, which this design does not have.

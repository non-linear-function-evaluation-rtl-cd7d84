# Non-linear functions on a matrix-vector multiplier

A datapath for neural-network style workloads spends its time in two kinds of
operation: linear combinations (a weight matrix times a vector) and
element-wise non-linear functions (sigmoid, tanh, ...). Building a dedicated
evaluator for each function next to the matrix-vector multiplier leaves most of
the hardware idle at any moment, costs area for every function supported, and
needs a redesign whenever a function is added.

This design evaluates the non-linear functions **on the multiplier itself**.
The b x b multiplier is left untouched; only its inputs are overridden. In
non-linear mode every row i of the multiplier evaluates one entry x_i as a
piecewise-linear approximation with up to b segments:

    f(x_i) ~ lambda + sum_{segments j below x_i} alpha_j * beta_j  +  alpha_seg * x_i

The b multipliers of row i provide exactly those b products, and the row's
adder tree the sum. A function is nothing but numbers in memory (segment
boundaries h, slopes alpha, intercept terms beta, baseline lambda), so adding
or changing a function needs no hardware change. The only logic added to a
plain multiplier is b x b four-input multiplexers and b x (s-1) comparators.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with parameters
whose defaults are b = s = 16, 8 functions and 32-bit words.

## How a function becomes numbers

Choose boundaries h_1 < h_2 < ... < h_{s-1}; h_0 = -inf and h_s = +inf are
implicit. Segment j is [h_j, h_{j+1}). On segment j the approximation is the
line alpha_j * x + c_j. The engine never stores c_j. Instead, with
lambda = c_0, it stores beta_j so that

    alpha_j * beta_j = c_{j+1} - c_j        (j = 0 .. s-2)

Then, for x in segment `seg`, the sum above telescopes to
c_seg + alpha_seg * x. beta_{s-1} is never used.

To load function k:

| where | contents |
|---|---|
| function parameter memory, entry k | h_1..h_{b-1} (unused boundaries: largest positive word), beta_0..beta_{b-1}, lambda |
| coefficient memory, entry CMEM_DEPTH-K+k | a b x b matrix whose every row is alpha_0..alpha_{b-1} |

The slope matrix does not depend on the data, so it is stored pre-built
instead of being assembled by multiplexers.

A segment with slope zero cannot carry an intercept step (beta_j would be
infinite). Fitting with the exact asymptotic slope 0 (for example sigmoid at
-inf) therefore fails for the first segment. The testbench avoids this by
using chord slopes over a finite range [lo, hi], which are non-zero for all
eight functions tested; the two outer segments extrapolate those chords beyond
[lo, hi]. It also picks each beta_j against the intercept actually reached with
the already-quantised values, so rounding errors do not pile up from segment to
segment. This fitting runs offline. The formulas are in `tb/nlf_ref_pkg.sv`
(`fit_pwl`).

## The override multiplexers

Multiplexer [i][j] feeds the multiplier in row i, column j. Its code comes from
two comparisons, lt_j = (x_i < h_j) and lt_{j+1} = (x_i < h_{j+1}):

| m | lt_j | lt_{j+1} | code | multiplier input | meaning |
|---|---|---|---|---|---|
| 0 | - | - | 00 | x_j | linear combination (every row sees x) |
| 1 | 1 | 1 | 01 | 0 | segment j lies above x_i |
| 1 | 0 | 1 | 10 | x_i | x_i lies in segment j |
| 1 | 0 | 0 | 11 | beta_j | segment j lies below x_i |

An input equal to a boundary belongs to the upper segment (strict `<`). The
fourth combination (lt_j = 1, lt_{j+1} = 0) cannot occur with ascending
boundaries and is given code 01. A comparison against h_j is the same for every
column j that uses it, so each row needs s-1 comparators (`override_ctrl`).
With s < b the boundaries h_s..h_{b-1} act as +inf and their comparators are
not built.

## Engine organisation

```
                 +--------------------+      +-------------------+
 data memory --->| data overrider     |----->|                   |      +------------------+
 (vectors)       | (b*b 4:1 muxes,    | psi  | matrix-vector     |  v   | tile accumulator |
                 |  b*(s-1) compares) |      | multiplier        |----->| (+lambda, round, |---> data memory
 param memory -->|                    |      | (b*b mult,        |      |  saturate)       |
 (h, beta, lam)  +--------------------+      |  b*(b-1) add)     |      +------------------+
                                             |                   |
 coefficient  -->  coefficient overrider --->|                   |
 memory            (address: W tile or       +-------------------+
                    slope matrix of k)
            controller: instructions -> tiles, m, k, addresses, delayed controls
```

| module | role |
|---|---|
| `nlf_engine` | top: memories, controller, overriders, multiplier, accumulator, host ports |
| `nlf_controller` | takes instructions, issues one tile per cycle, aligns controls with the pipeline |
| `coef_overrider` | coefficient read address: weight tile (m=0) or slope matrix of function k (m=1) |
| `arith_block` | data overrider plus multiplier, one register stage between them |
| `data_overrider` | the b x b multiplexers |
| `override_ctrl` | comparators and multiplexer codes |
| `mvm` | the unchanged b x b multiplier, full-precision products and row sums |
| `tile_accumulator` | sums the tiles of one output vector, adds lambda, scales to n bits |
| `ram_1r1w` | memory with one write and one synchronous read port, used three times |
| `nlf_pkg` | default sizes, `instr_t`, code and mode enums |

## Instructions and timing

`instr_t` (in `nlf_pkg`) has the fields mode, func, src, dst, coef, n_in and
n_out. A count of zero is taken as one.

* **Linear** (`MODE_LINEAR`): for o < n_out, the result dst+o is the sum over
  t < n_in of W[coef + o*n_in + t] * x[src + t]. This is a
  (n_out*b) x (n_in*b) matrix-vector product, with the weight tiles stored row
  block by row block.
* **Non-linear** (`MODE_NONLINEAR`): for o < n_out, dst+o = f_func(x[src + o])
  entry by entry. n_in is ignored.

The host offers an instruction with `instr_valid` and holds it until
`instr_ready`; ready is high only when the engine is idle. One tile is issued
per cycle. The pipeline is:

1. memory read (1 cycle);
2. overrider output register (1 cycle);
3. product register (1 cycle);
4. row-sum register (1 cycle);
5. accumulator / output register (1 cycle);
6. write into data memory.

An operation of T tiles raises `done` exactly T + 7 cycles after the cycle in
which it was accepted. The next instruction is accepted only after the
previous results are in memory, so a non-linear step may read the vector that
the linear step just wrote.

The host loads the memories (`dm_*`, `cm_*`, `pm_*`) and reads results
(`dm_re`/`dm_raddr`, data on `dm_rdata` one cycle later) only while `busy` is
low; an assertion checks this.

## Number format

Words are signed two's complement, n = 32 bits with FRAC = 16 fraction bits
(parameters `N` and `FRAC`). Products and row sums keep all bits
(2n + log2(b) + 1). The accumulator adds 8 guard bits for up to 255 tiles.
Only at the output is the sum rounded half up to FRAC fraction bits and
saturated to n bits. `sat` shows which entries of the last result saturated.

## Cost compared with dedicated evaluators

For b inputs, a plain multiplier has b^2 multipliers and b(b-1) adders. This
design adds b(s-1) comparators and b^2 four-input multiplexers, and no adders,
multipliers, dividers, exp or log units, whatever the number of functions.
The dedicated-evaluator alternative for the same eight functions needs, on top
of the multiplier, 4b comparators, 11b adders, 7b multipliers, 4b dividers,
8b exp units and 4b log units. That alternative is not part of this RTL.

## How far it has been checked

Every module has a self-checking testbench in `tb/` comparing against models
written separately from the RTL (`tb/nlf_ref_pkg.sv`). The testbenches also
check cycle counts where the design fixes them.

* `tb_override_ctrl`, `tb_data_overrider`: random vectors and boundaries,
  including inputs exactly on a boundary and s < b; every code must appear.
* `tb_mvm`, `tb_arith_block`: exact sums and a fixed latency (2 and 3 cycles),
  with both modes interleaved cycle by cycle.
* `tb_tile_accumulator`: multi-tile sums, lambda, rounding and saturation.
* `tb_nlf_controller`: the complete tile sequence and its control timing, and
  T + 7 cycles per operation.
* `tb_ram_1r1w`: reads, writes, read-before-write and hold.
* `tb_nlf_engine`: the whole engine at its default size. It loads eight
  activation functions and runs tiled and saturating linear combinations,
  every function, and a linear layer followed by tanh. Results are checked
  bit-exactly against an integer model. It counts each mechanism (each
  multiplexer code, tile accumulation, saturation, mode switch, drain) and
  fails if one never happens.

Accuracy with 16 uniform segments over [-4, 4] (largest absolute error for the
inputs tested):

| function | max abs error | chord bound M2*w^2/8 + 0.002 |
|---|---|---|
| Sigmoid | 0.0028 | 0.0050 |
| LogSigmoid | 0.0060 | 0.0098 |
| Tanh | 0.0232 | 0.0261 |
| Tanhshrink | 0.0231 | 0.0261 |
| ELU | 0.0205 | 0.0329 |
| SELU | 0.0429 | 0.0564 |
| Softplus | 0.0076 | 0.0098 |
| Softsign | 0.0330 | 0.0627 |

These errors come from uniform segments. A relative error below 1% for all
eight functions would need boundaries placed by curvature; the hardware takes
any ascending boundaries, so that changes only the numbers loaded.

Not verified: timing closure and area on any technology. The memories are
plain arrays: at the default size the coefficient memory is 32 entries of
8192 bits. A real implementation would map it to SRAM macros or banks.

## Departures and choices

* **lambda.** lambda is added by the tile accumulator as the start value of
  the sum. The multiplier formula has no place for it. Without it the first
  segment's line would have to pass through the origin.
* **Comparators.** There are b(s-1) comparators, because the outer boundaries
  are implicit. A naive count would be b*s.
* **Boundary inputs.** An input on a boundary counts as being in the upper
  segment. This matters only by rounding, when the fitted lines meet at the
  boundary.
* **Slope matrices.** They are stored in the coefficient memory rather than
  built by multiplexers. The coefficient overrider is therefore an address
  selector.
* **This design's own choices.** The memories, the host interface, the
  instruction format, the drain rule, the pipeline registers, the number
  format, rounding and saturation are not prescribed by the method.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/nlf_pkg.sv tb/nlf_ref_pkg.sv tb/tb_nlf_engine.sv --top-module tb_nlf_engine
./obj_dir/Vtb_nlf_engine
```

Replace the testbench name to run another. Each prints
`TB_RESULT checks=<n> failures=<m>`. Sizes are parameters of `nlf_engine`;
their defaults are in `nlf_pkg`. The engine testbench reads them from the
package, so changing the package changes both.

# Multiplier-free LMS adaptive FIR filter using distributed arithmetic

This is an adaptive FIR filter whose weights follow the (delayed) least-mean-square
rule, built with no multipliers. The filter inner product
`y = sum_k w_k * x(n-k)` is computed by **distributed arithmetic (DA)**. For each
group of P = 4 taps, a small table holds all 15 non-zero sums of the four most
recent samples. The weights are then applied one bit position at a time: in each
bit cycle the bits `w_0[l]..w_3[l]` of the four weights form a table address,
and the addressed sum is accumulated with the right power of two. After L = 8 bit
cycles (one sample period) the inner product is complete.

Three ideas make this fast and small:

* **Parallel table update.** When a new sample arrives, all 15 table words are
  refreshed in the same clock edge by 7 adders. There is no sequential table fill.
* **Carry-save accumulation.** The accumulator never propagates a carry. The bit
  cycle is one table read plus one full-adder delay. A carry-propagate addition
  happens only once per sample.
* **Power-of-two error.** The weight update keeps only the sign and the position of
  the leading one of `mu*e`. Multiplying a sample by the error then becomes a
  barrel shift, and the update needs only adders and subtractors.

Filtering and adaptation run at the same time. The weight update therefore uses
the error and input vector of two sample periods earlier (adaptation delay m = 2):

    w_k(n+1) = w_k(n) +/- ( x(n-2-k) >>> t(n-2) )      sign from mu*e(n-2)

The default configuration is N = 16 taps in four 4-tap blocks, with 8-bit samples
and weights. The same RTL builds the single-block 4-tap filter (`N = 4`), the
32-tap filter (`N = 32`) and any N that is a power-of-two multiple of P.

## Number formats

| quantity | format (defaults) |
|---|---|
| samples `x`, desired `d` | L = 8-bit two's-complement integers |
| weights `w_k` | L-bit two's-complement fractions: `w = -b7 + sum b_l 2^(l-7)`, LSB = 1/128 |
| DA table words | L + log2(P) = 10 bits |
| block sum and carry words | 10 bits each |
| `y`, `e` | L + log2(N) = 12 bits (wrap on overflow) |
| `mu*e` | L bits: `e` with its log2(N) LSBs dropped (mu = 1/N) |
| magnitude `r` | L-1 = 7 bits; shift count `t` is 3 bits |

## The DA inner product, bit by bit

With weights as fractions, the inner product of one block splits over the weight bits:

    y = -Y_7 + sum_{l=0..6} 2^(l-7) * Y_l ,   Y_l = sum_k w_k[l] * x(n-k)

Each `Y_l` is one DA table word, addressed by `{w_3[l], w_2[l], w_1[l], w_0[l]}`.
Address 0 is a constant zero, so only 15 words are registers.

### Table update (`da_table`)

Entry `k` holds `c_k = sum_j k[j] * x(n-j)`. When `x(n+1)` arrives, every sample
ages by one position, which gives the recurrence

    c_k(new) = c_{k>>1}(old)              k even   (register move)
    c_k(new) = x(n+1) + c_{k>>1}(old)     k odd    (one adder; none for k = 1)

That is 2^(P-1) - 1 = 7 adders, all working in parallel at the sample edge. Every
entry is stored sign-extended to 10 bits. Entries with fewer terms could be
narrower (8 or 9 bits); a uniform width keeps the multiplexer simple.

### Carry-save shift accumulation (`csa_accumulator`)

This is the part that needs the most care. The slices arrive LSB first. The
running value is kept as a sum word S and a carry word C, each W = 10 bits, with

    V = S + 2*C          (the carry word has twice the weight of the sum word)

In each bit cycle one row of W full adders computes

    S' + 2*C' = y' + (S >>> 1) + C

Here `y'` is the table word, and `S >>> 1` is the arithmetic right shift (sign
repeated). Because `2C/2 = C`, the carry word is used unshifted. The identity
holds exactly on signed integers, including the top column, so S and C never
need extra guard bits. Only the bit of S shifted out on the right is lost each
cycle. Over a whole word this truncates the result by less than one sample LSB.

The MSB slice carries negative weight. In the last bit cycle the *sign control*
is 1, and a row of XOR gates complements the table word. That adds `-Y_7 - 1`
instead of `-Y_7`. The missing `+1` is deferred to a single carry-in at the
final adder. So the true block result is

    y_block = S + 2*C + 1

In the first bit cycle the feedback `(S>>>1, C)` is forced to zero, so no clear
cycle is needed between samples. At the edge that ends the MSB cycle, the
finished S and C are copied into output registers. They hold there for the
whole next sample period while the accumulator starts the next word.

### Summing the blocks (`adder_tree`, `error_unit`)

With N/P blocks there are N/P sum words and N/P carry words. They are added by two
binary adder trees. Each block still owes its `+1`. Since carry words weigh double,
N/(2P) unit carry-ins on the first level of the carry-word tree supply all of them
(two carry-ins for N = 16). The final adder then forms

    y = sum(S) + 2 * ( sum(C) + N/(2P) )

For a single block (N = 4) there is no tree, and the `+1` is the carry-in of the
final adder.

## Error and weight update

`error_unit` registers the desired sample and subtracts: `e = d - y`. Setting
mu = 1/N is a truncation: dropping the log2(N) LSBs of the (L+log2 N)-bit error
leaves an L-bit `mu*e`, which is registered. `sign_mag_separator` splits it into
the sign and a 7-bit magnitude `r`. The one value without a 7-bit magnitude,
-128, saturates to 127. `control_word_gen` turns `r` into the shift count:

| leading one of r | r6 | r5 | r4 | r3 | r2 | r1 | r0 | r = 0 |
|---|---|---|---|---|---|---|---|---|
| t | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |

Each `weight_increment_block` has four barrel shifters forming `x(n-2-k) >>> t`.
It also has four adder/subtractor cells: they add when the error sign is 0 and
subtract when it is 1. The results go into the weight registers and, at the same
edge, into the word-parallel bit-serial converter. The converter is one
parallel-load shift register per weight, and it feeds the next period's bit
slices to the DA multiplexer. The increment is added at the weight LSB (1/128).
Weights wrap modulo 2^L.

A zero error gives t = 7. In that case the update is `x >>> 7`, which is 0 for
non-negative samples and -1 LSB for negative ones: a tiny bias that the
shift-count table implies.

`MU_I` (default 0) selects the smaller step `mu = 2^-MU_I / N`. The samples are
pre-shifted by MU_I places in front of the barrel shifters, which is the same as
adding MU_I to every shift count.

## Large filters: chaining blocks

Block b holds samples `x(n-4b) .. x(n-4b-3)`. Its table input is the oldest
sample of block b-1, so the tables form one long delay line. The weight lanes of
block b need `x(n-4b-2) .. x(n-4b-5)`. They take two samples from their own table
and two from the next block's table. The last block takes them from two extra
registers that hold `x(n-N)` and `x(n-N-1)`. One sign and one shift count, from
the single error path, drive every weight-increment block.

## Clocking and interface timing

The published scheme uses a fast bit clock for the accumulators and converters,
and a byte clock (one per sample) for everything else. Here there is **one clock,
`clk`, the bit clock**. A sample period is L = 8 cycles. `da_bit_timing` counts
them and marks the first and last cycle. `sample_en` (the last cycle) is the
accumulator's sign control. It is also the enable of every sample-rate register,
so the rising edge that ends it plays the role of the byte-clock edge.

Ports of `da_lms_filter` (sample period n is the period whose DA table holds x(n)):

| port | dir | width | in period n |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | bit clock; asynchronous active-low reset clears all state |
| `x_in` | in | L | next sample x(n+1), sampled at the edge ending the period |
| `d_in` | in | L | desired sample **d(n)**, sampled at the same edge (one sample behind `x_in`) |
| `sample_en` | out | 1 | high in the last bit cycle of the period |
| `y_out` | out | L+log2 N | y(n-1) = sum_k w_k(n-1) x(n-1-k) (truncated DA value) |
| `e_out` | out | L+log2 N | e(n-1) = d(n-1) - y(n-1) |
| `w_out` | out | N x L | weights w(n) |

Throughput is one sample per L bit cycles. `y(n)` appears at the start of period
n+1, which is one sample period of latency. `d_in` lags `x_in` by one sample
because the output it is compared with lags by one period. After reset the sum
and carry registers are zero, so the first `y_out` reads N/P: the deferred
carry-ins.

Coarse synthesis (Yosys, before technology mapping) of the default 16-tap build:
about 1,020 flip-flop bits and about 350 word-level cells.

## Files

| module | role |
|---|---|
| `da_lms_pkg` | default sizes L = 8, P = 4, N = 16 |
| `da_lms_filter` | top level: blocks, chaining, trees, error path, update |
| `da_bit_timing` | bit-cycle counter, first / last (sign control, sample strobe) |
| `inner_product_block` | one P-tap DA inner product: table + mux + accumulator |
| `da_table` | 2^P - 1 sample-sum registers with parallel update |
| `da_lut_mux` | 2^P : 1 table read, zero at address 0 |
| `csa_accumulator` | XOR sign control, full-adder row, sum/carry registers |
| `adder_tree` | binary tree with first-level carry-ins |
| `error_unit` | final adder, d register, e = d - y, mu scaling, mu*e register |
| `sign_mag_separator` | sign and saturated magnitude of mu*e |
| `control_word_gen` | leading-zero count of the magnitude, shift count t |
| `weight_increment_block` | barrel shifters, add/sub cells, weight registers |
| `barrel_shifter` | log-stage arithmetic right shifter |
| `wpbs_converter` | weights to LSB-first bit slices |

## Where this RTL fills in or departs from the published design

* **One clock with an enable** instead of separate bit and byte clocks.
* **Final adder alignment.** The published data path draws a one-place right
  shift between the block outputs and the final adder. Here the carry word is
  shifted one place left instead, which gives the same relative alignment
  (carry = double weight) while keeping the sum word's LSB. So `y` is on the
  scale of the samples.
* **Uniform 10-bit table words** instead of 8-, 9- and 10-bit registers.
* **Undocumented details, chosen here:**
  * the table update recurrence;
  * zeroing the accumulator feedback in the first bit cycle;
  * arithmetic (floor) shifts in the barrel shifters;
  * the scale of the weight increment (weight LSB);
  * wrap-around on weight, `y` and `e` overflow;
  * saturating |-128| to 127;
  * reset values of zero;
  * the port timing of `d_in`, taken from the labels x(n+1), d(n) and y(n-1);
  * the carry-in count for other N: N/(2P), or the final-adder carry-in when N = P.
* **Not included:** offset-binary coding, which could halve the table but is not
  part of this design. Also left out is the conventional adder-based shift
  accumulator, which is the baseline the carry-save scheme replaces.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_da_lms_filter` runs the default 16-tap filter for 3000 samples of system
  identification. It compares `y_out`, `e_out` and all 16 weights with an
  independent sample-level model (`da_lms_ref_pkg`) in every period. It also:
  * checks every inner product against the exact product within the truncation
    bound;
  * checks that the sample period is 8 cycles;
  * requires the error to shrink and the weights to approach the plant;
  * requires weight adds, subtracts, the zero-error code and all eight shift
    counts to occur.

  A full-scale input burst after a high-gain plant produces the largest errors.
* `tb_da_lms_filter_sizes` runs the same bit-exact comparison at N = 4 and
  N = 32, and at N = 16 with `MU_I = 1`. It uses the parameterised
  `da_lms_filter_checker`.
* The block testbenches are exhaustive where the input space is small (barrel
  shifter, separator, control word). Elsewhere they use random and extreme
  values: the table, accumulator and inner-product block are checked against
  exact sums and the truncation bound.

Run one with Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/da_lms_pkg.sv tb/da_lms_ref_pkg.sv tb/tb_da_lms_filter.sv \
        --top-module tb_da_lms_filter
    ./obj_dir/Vtb_da_lms_filter

Testbenches that need no reference package only need `rtl/da_lms_pkg.sv` and
their own file.

## Changing the design

* `N`, `P`, `L` and `MU_I` are parameters of `da_lms_filter`. N/P must be a power
  of two, and P >= 2.
* The adaptation delay is structural: one register after the inner product and
  one after the error.
* For L other than 8, the shift-count width is clog2(L), and the zero-error code
  is L-1.
* The reference model in `tb/da_lms_ref_pkg.sv` takes all sizes as arguments, so
  `da_lms_filter_checker` can test any configuration.

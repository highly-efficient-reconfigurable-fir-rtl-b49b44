# Reconfigurable block FIR filter with pipelined modified-Booth multipliers

This is a finite-impulse-response filter whose coefficients can be swapped at
run time (for example, one filter per radio channel). It processes a *block*
of L samples every clock, so the sample rate is L times the clock rate. It is
built in the *transpose form*: each coefficient group multiplies the newest
input, and the products are delayed and summed afterwards. This keeps the
register count low and makes the critical path independent of the filter
length. Every multiplier is a three-stage pipelined radix-4 (modified) Booth
multiplier, and every adder is a carry-lookahead adder (CLA).

The default build is the main configuration: block size **L = 4**, filter
length **N = 64**, four stored channel filters, and 8-bit signed samples and
coefficients. Outputs are full precision, 8 + 8 + log2(64) = 22 bits.

## The block transpose-form idea

The filter computes `y(n) = sum_{t=0}^{N-1} h(t) x(n-t)`. Samples arrive in
blocks `x_k = [x(kL), x(kL-1), ..., x(kL-L+1)]`. Split the tap index as
`t = mL + i`, with `m = 0..M-1`, `M = N/L` and `i = 0..L-1`. Then

```
y(kL - l) = sum_{m=0}^{M-1}  r_{k-m}^{(m)}(l),
r_k^{(m)}(l) = sum_{i=0}^{L-1} h(mL + i) * x(kL - l - i)
```

So every output block is a sum of M short inner products. Inner product m
uses the weight vector `c_m = [h(mL) .. h(mL+L-1)]`, and it is taken on the
block that arrived m blocks earlier. The sample rows `x(kL-l-i)` only span
the current block and the first L-1 samples of the previous one.

In the transpose form, all M inner products are computed on the *current*
block, and a delay line ages them afterwards:

```
 x_blk --> [RU] --rows S_k--+-------------+-- ... --+
                            |             |         |
 ch_sel -> [CSU] c_{M-1} -> [IPU-1]  c_{M-2} -> [IPU-2] ...  c_0 -> [IPU-M]
                            | r^0         | r^1               | r^{M-1}
                            v             v                   v
 [PAU]   r^0 -> D -> (+) -> D -> (+) -> ... -> D -> (+) --> y_blk (registered)
```

IPU-(j+1) uses `c_{M-1-j}`, and its result `r^j` passes through M-1-j
delays. The product with `c_m` therefore reaches the output m blocks late,
which is what the equation needs.

## Blocks

| module | role |
|---|---|
| `rfir_top` | the filter; wires the units below and adds the output register and `out_valid` |
| `csu` | coefficient storage unit: `NUM_CH` channel filters of N coefficients; delivers the whole selected filter as M weight vectors one clock after `ch_sel` |
| `ru` | register unit: registers the block, keeps L-1 samples of the previous block, and forms the L overlapping rows `rows[l][i] = x(kL-l-i)` |
| `ipu` | inner-product unit: L inner-product cells sharing one weight vector |
| `ipc` | inner-product cell: L Booth multipliers and a binary CLA adder tree |
| `pau` | pipelined adder unit: L transpose-form delay lines of M-1 registers, with a CLA at every stage |
| `booth_mult` | 3-stage pipelined radix-4 Booth multiplier |
| `booth_encoder` | recodes the multiplier into radix-4 digits |
| `booth_decoder` | builds the partial-product rows from the digits |
| `wallace_tree` | 3:2 carry-save reduction of the rows to a sum and a carry |
| `cla` | carry-lookahead adder |
| `rfir_pkg` | default sizes, the Booth digit type and helper functions for the Wallace tree |

Resource count at the defaults: 16 IPUs × 4 IPCs × 4 multipliers = 256
multipliers, 16 × 4 × 3 = 192 tree adders, and 15 × 4 = 60 PAU adders.

## The pipelined Booth multiplier

In the filter, the sample is the multiplicand X. The coefficient is the
multiplier Y, and Y is the operand that gets recoded.

**Stage 1 – recoding and partial products.** Y is read in overlapping
triplets `(y[2j+1], y[2j], y[2j-1])`, with `y[-1] = 0`. Each triplet becomes
one digit in {−2, −1, 0, +1, +2}:

| triplet | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| digit | 0 | +1 | +1 | +2 | −2 | −1 | −1 | 0 |

This halves the number of partial products: an 8-bit Y needs 4 instead of 8.
A digit travels as the three signals `{neg, two, one}` (`booth_dig_t`). Row j
is 0, X or 2X, shifted left by 2j and sign-extended to the full product
width. For a negative digit the row is inverted, and the bits below 2j are
cleared again. The +1 that completes each two's-complement negation is placed
at bit 2j of one extra correction row. For 8×8 bits this gives 5 rows of 16
bits. Example, 6-bit: −21 × −25 recodes −25 = `100111` into digits −2, +2, −1.
The rows are +21, −168 and +672, which sum to 525.

**Stage 2 – Wallace tree.** At each layer the rows are taken three at a time
through a row of full adders. The sum row and the carry row, shifted up one
bit, go on to the next layer. One or two rows left over pass through
unchanged. This repeats until two rows remain: 5 → 4 → 3 → 2 for 8-bit
operands. All arithmetic is modulo 2^(WX+WY). That is exact for a signed
product, because the product always fits.

**Stage 3 – CLA.** The final addition of the sum and carry rows.

There is a register after every stage. This gives a latency of 3 clocks, and
the multiplier accepts a new operand pair every clock.

## The carry-lookahead adder

Per bit, the adder forms `P = A xor B`, `G = A and B` and `S = P xor C`.
The carries are not rippled through `C(i+1) = G(i) + P(i)C(i)`. Instead, inside
each 4-bit group every carry is written out as a two-level AND-OR of the
group's P and G bits and the group carry-in. Each group also exports a group
propagate and a group generate. A second lookahead level derives every group
carry-in directly from those signals and `cin`. The adder is used
everywhere: at the end of the multipliers, in the IPC trees and in the PAU.

## Interface and timing of `rfir_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, which clears every data register |
| `x_blk[L]` | in | 8 | `x_blk[l] = x(kL - l)`, signed; one block is consumed every clock |
| `in_valid` | in | 1 | tag carried to `out_valid`; it does **not** stall the filter |
| `ch_sel` | in | log2(NUM_CH) | channel filter applied to the block presented in the same clock |
| `coef_we`, `coef_ch`, `coef_idx`, `coef_data` | in | 1, log2(NUM_CH), log2(N), 8 | writes `h(coef_idx)` of channel `coef_ch` |
| `y_blk[L]` | out | 8+8+log2(N) | `y_blk[l] = y(kL - l)`, signed, full precision |
| `out_valid` | out | 1 | `in_valid` delayed by the latency |

**Latency.** A block is taken by the RU register at rising edge 1. Its outputs
are in `y_blk` after rising edge 5. The edges in between are used by the
three multiplier stages and the output register.

**Throughput.** One block of L samples enters and one leaves every clock.
There is no flow control.

**Coefficient timing.** A coefficient write takes effect for blocks presented
from the next clock on.

**Reconfiguration.** Switching `ch_sel` takes effect at once for new inputs.
The PAU, however, still holds partial sums that were computed with the old
filter. For the next M−1 output blocks, the tap group m of the output is
computed with whichever filter was in force when block k−m entered. The
output is therefore a clean mix of the two filters, not the new filter alone.
If that transition is not wanted, discard M−1 output blocks after a switch.

## Where this RTL departs from, or fills in, the reference design

The following are this design's own choices. The reference design does not
specify them.

- **Word lengths.** Samples and coefficients are 8 bits, and the outputs are
  full precision, with no rounding.
- **Number of channels.** `NUM_CH = 4`.
- **Coefficient store.** It is a register array with a write port. The
  reference keeps the channel filters in ROM lookup tables whose contents are
  not given. Used read-only after loading, the store behaves the same way.
- **Input register in the RU.** It aligns the samples with the registered
  coefficient read. There is also an output register after the PAU, and the
  `in_valid`/`out_valid` tag.
- **Multiplier pipeline cut.** The cut follows the multiplier's three
  functions (recode and partial products / Wallace / CLA), and every stage is
  registered.
- **Negation and sign extension.** Partial products are negated by one's
  complement plus a correction row, and are fully sign-extended. No
  sign-extension compression is used.
- **CLA structure.** 4-bit groups with a second lookahead level.
- **IPC adder tree.** It is combinational behind the multiplier pipeline.
  When L is not a power of two it is padded with zeros.
- **Fixed-width multiplier.** The source's conclusion mentions a fixed-width
  (truncated, error-compensated) Booth multiplier but does not describe one.
  All multipliers here are full width and exact.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

- `tb_cla`, `tb_wallace_tree`: corner and random operands against integer
  sums (CLA at 16 and 13 bits; trees of 5×16 and 9×12).
- `tb_booth_encoder`: exhaustive over 8-bit and 7-bit multipliers, plus the
  −25 example.
- `tb_booth_decoder`: exhaustive 8×8, checking every row and the row sum.
- `tb_booth_mult`: all 65536 8×8 pairs streamed one per clock and checked
  with a latency of exactly 3; also −21 × −25 = 525 at 6 bits.
- `tb_csu`, `tb_ru`, `tb_ipc`, `tb_ipu`, `tb_pau`: each unit against a
  reference computed in the testbench, including its latency.
- `tb_rfir_top` (default parameters) and `tb_rfir_sizes` (L=4/N=32 and L=8/N=32,
  through the parameterised environment `rfir_env`) run the
  whole filter. They load all channel filters and stream random blocks. Along
  the way they switch channels, rewrite coefficients of the running channel,
  drop `in_valid` and send extreme samples (−128, +127 against −128
  coefficients). Every output block is compared with a reference
  convolution, including the mixing after a channel switch. Each of these
  events is counted and must occur at least once.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rfir_pkg.sv tb/tb_rfir_top.sv --top-module tb_rfir_top -Mdir obj
./obj/Vtb_rfir_top
```

To run another testbench, replace `tb_rfir_top` with its name. Simulation
is two-state, and every register that is read is reset.

## Changing sizes

`L`, `N`, `NUM_CH`, `DATA_W` and `COEF_W` are parameters of `rfir_top`. Their
defaults are in `rfir_pkg`. N must be a multiple of L; elaboration fails
otherwise. The accumulator width follows as `DATA_W + COEF_W + clog2(N)`. The
latency stays at 5 for every size. Area grows with N·L multipliers.

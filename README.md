# Fused add-multiply-accumulate with sum-to-Modified-Booth recoding

Many DSP kernels multiply a *sum*. Examples are the symmetric FIR filter,
`h_i * (s_i + s_(T-1-i))`, and the FFT butterfly. The obvious add-multiply (AM)
unit first adds `A + B` with a carry-propagate adder. The result then goes
into a radix-4 Modified Booth (MB) multiplier. So the adder's carry chain sits
in front of the multiplier, on the critical path.

This design removes that adder. The MB multiplier only needs each radix-4
digit `y_j` of its multiplier operand, in `{-2,-1,0,+1,+2}`. Those digits can
be formed **directly from the bits of A and B**. A small cell per digit does
it, and no carry travels further than one cell. This is S-MB recoding (sum to
Modified Booth). The rest is a conventional MB multiplier:
- encoders
- partial-product rows with a correction term instead of sign extension
- a Wallace carry-save tree
- a final carry-look-ahead adder

On top of this fused add-multiply (FAM) datapath sits a 16x16
multiply-accumulate unit. It computes `acc <= acc + X*(A+B)` every enabled
cycle. The accumulator enters the same carry-save tree as one more row.

```
 A,B ──► S-MB recoder ──► K digit triplets ──► MB encoders ──► sign/one/two/cin
                                                    │
 X ────────────────────────────────────────► pp_gen × K ──► K partial-product rows
                                                    │
      cin row + correction term CT + accumulator ───┤
                                                    ▼
                                 Wallace CSA tree (3:2) ──► CLA ──► acc register
```

## Digits as bit triplets

A Modified Booth digit is carried between blocks as a triplet
`(hi, mid, lo)`, with value

    y_j = -2*hi + mid + lo

For an ordinary binary multiplier operand this triplet is `(y_2j+1, y_2j, y_2j-1)`.
That is what the standard Booth table reads. The S-MB recoders build the
same kind of triplet, but for the sum A+B:

    hi  = s_2j+1   a *negatively weighted* sum bit made by signed adders
    mid = s_2j     the sum bit of a full adder at position 2j
    lo  = c_2j,2   a carry coming from the cell below

So after the recoder, nothing in the multiplier knows that its operand was a
sum. `smb_pkg::mb_triplet_t` is the triplet, and `smb_pkg::mb_sel_t` holds the
encoder outputs.

## Signed-bit adders

The recoders need adders in which some inputs or outputs count negatively. The
sum bit at an odd position becomes the `-2*hi` of a digit. Each of these cells
is an ordinary half or full adder with some bits inverted:

| cell       | relation                 | equations                                   | module     |
|------------|--------------------------|---------------------------------------------|------------|
| HA         | `2c + s = p + q`         | `s = p^q`, `c = p&q`                        | half_adder |
| FA         | `2co + s = p + q + ci`   | usual full adder                            | full_adder |
| HA*        | `2c - s = p + q`         | `s = p^q`, `c = p\|q`                       | ha_star    |
| HA* (dual) | `-2c + s = -p - q`       | the same gates, every sign inverted         | ha_star    |
| HA**       | `2c - s = -p + q`        | `s = p^q`, `c = ~p&q`                       | ha_dstar   |
| FA*        | `2co - s = p - q + ci`   | `s = p^q^ci`, `co = ((p\|ci)&~q)\|(p&ci)`    | fa_star    |
| FA**       | `-2co + s = -p - q + ci` | `s = p^q^ci`, `co = ((p\|q)&~ci)\|(p&q)`     | fa_dstar   |

## The three recoding cells

Cell `j` covers bit positions `2j` and `2j+1` of both operands. It receives
two carries from cell `j-1`:
- `c_2j,1` feeds the full adder.
- `c_2j,2` goes straight into the digit.

Both carries are 0 for cell 0. Every scheme uses a conventional FA at the even
position. The schemes differ at the odd position.

**S-MB1** (`smb1_recoder`)
```
FA (a_2j, b_2j, c_2j,1)                 -> s_2j, c_2j+1
FA*(p=a_2j+1, q=b_2j+1 (-), ci=c_2j+1)  -> s_2j+1 (-), c_2j+2,2
c_2j+2,1 = b_2j+1
```
This uses the identity `b*2^(2j+1) = b*2^(2j+2) - b*2^(2j+1)`. The bit
`b_2j+1` counts negatively at its own position. It is also passed up as a
positive carry.

**S-MB2** (`smb2_recoder`)
```
HA (a_2j+1, b_2j+1)       -> h, c_2j+2,1
FA (a_2j, b_2j, c_2j,1)   -> s_2j, c_2j+1
HA*(c_2j+1, h)            -> s_2j+1 (-), c_2j+2,2
```

**S-MB3** (`smb3_recoder`)
```
HA*(a_2j+1, b_2j+1)       -> t (-), c_2j+2,1
FA (a_2j, b_2j, c_2j,1)   -> s_2j, c_2j+1
HA**(p=t, q=c_2j+1)       -> s_2j+1 (-), c_2j+2,2
```

In every scheme the longest path is the same:
- an HA or HA* on the operand bits
- then the FA of the next cell
- then one signed half or full adder

That depth is fixed and does not grow with N. You can check any cell by
adding up its weights. For S-MB2:

    a_2j + b_2j + c_2j,1 + 2(a_2j+1 + b_2j+1)
      = s_2j + 2c_2j+1 + 2h + 4c_2j+2,1
      = s_2j - 2s_2j+1 + 4c_2j+2,2 + 4c_2j+2,1

The `4*` terms move up to cell `j+1`. The digit of cell `j` is
`-2s_2j+1 + s_2j + c_2j,2`.

### Signed operands and the extra digit

A and B are N-bit two's complement numbers. Their sum needs N+1 bits. The
recoders first sign-extend both operands to `sum_width(N)` bits:
- N+2 bits for even N
- N+1 bits for odd N

They then run `K = num_digits(N)` ordinary cells and drop the two carries out
of the top cell. The digit string is congruent to A+B modulo `4^K`, and the
result is that the digit string equals A+B **exactly**. There is no overflow
and no special top cell. The reason depends on the parity of N:
- **Even N.** The digits lie within `±(2/3)·4^K` and A+B lies within
  `±4^K/4`, so the two cannot differ by a multiple of `4^K`.
- **Odd N.** The top digit must equal `c1 + c2 - sign(A) - sign(B)`. Here
  `c1` and `c2` are the two carries entering the top cell. The top digit is
  congruent to that value modulo 4, and both lie in `[-2, 2]`. The two cases
  that could clash (+2 against -2) come out right in all three cells. The
  exhaustive 5-bit tests cover every input of the top cell.

The cost is one more digit than an N-bit multiplier operand would need. For
N = 16 that is 9 partial products instead of 8. If you know that `A+B` always
fits in N bits, you can drop the top digit, but this RTL does not do so.

In S-MB1 the odd-position adder of the top cell is an FA**, read with every
sign inverted. That is the same function as FA*, so every signed cell of the
family appears somewhere in the design.

## Partial products, correction term, tree and adder

`mb_encoder` turns a triplet into:
- `sign = hi`
- `one = mid^lo`
- `two = (hi^mid)&~one`
- `cin = hi&~(mid&lo)`

The last term makes `cin` 0 for the triplet `111`, whose digit is 0.

`pp_gen` selects X or 2X and XORs it with `sign`. This gives the one's
complement for negative digits; `cin` supplies the missing +1. The row is N+1
bits wide, and its sign bit is emitted *inverted*. Read unsigned, the row
equals `X*y_j - cin + 2^N`. So the rows need no sign extension. Instead, `fam`
adds one constant row:

    CT = - sum_j 2^(N+2j)   (mod 2^OUT_W)

`fam` feeds `K + 3` rows of `OUT_W` bits to `csa_tree`:
- K partial products, row j shifted by 2j
- the `cin` bits (bit 2j of one row)
- CT
- the `addend` input

`csa_tree` is a Wallace tree. Each level groups the rows in threes through
`csa_row` (full-adder 3:2 counters). The row count falls as
`r -> 2*floor(r/3) + r mod 3`. With 12 rows (16-bit MAC) that takes 5 levels:
12 → 8 → 6 → 4 → 3 → 2.

`cla_adder` adds the last two rows. It uses 4-bit groups with full look-ahead
inside each group and a generate/propagate recurrence across the groups.

All of `fam` works modulo `2^OUT_W`. The default `OUT_W = 2N+1` is the exact
width of `X*(A+B)`. The MAC sets `OUT_W = ACC_W`.

## The MAC (`smb_mac`, top module)

| port        | dir | width | meaning                                        |
|-------------|-----|-------|------------------------------------------------|
| `clk`       | in  | 1     | clock                                          |
| `rst_n`     | in  | 1     | asynchronous active-low reset of all state     |
| `en`        | in  | 1     | take an operation this cycle (block enable)    |
| `clr`       | in  | 1     | with `en`: this operation starts a new sum     |
| `a`, `b`    | in  | N     | addends, two's complement                      |
| `x`         | in  | N     | multiplier, two's complement                   |
| `acc`       | out | ACC_W | accumulator                                    |
| `acc_valid` | out | 1     | `acc` was updated at the last rising edge      |

Parameters: `N = 16`, `ACC_W = 2N+8 = 40`, `SCHEME = smb_pkg::SMB2`.

Timing has two stages:
1. At a rising edge with `en = 1`, the operand registers load A, B, X and
   `clr`.
2. At the next edge, `acc <= (clr ? 0 : acc) + X*(A+B)` and `acc_valid` is 1.

The unit takes one operation per cycle, with a latency of two edges.

With `en = 0` the operand registers hold their values. Nothing in the
combinational datapath toggles, and the accumulator holds. This is the block
enable that keeps an idle unit from burning power. An assertion in the module
checks that the accumulator moves only on a taken operation.

The 8 guard bits of the accumulator let it absorb at least 256 worst-case
products (`|X*(A+B)| <= 2^31`) before it wraps. Past that it wraps modulo
`2^40`, with no saturation.

## Where this RTL departs from, or fills in, the source description

- **Recoding width.** The sum A+B is recoded exactly, with `N/2+1` digits for
  even N, as explained above. The usual description has k = N/2 digits and an
  N-bit Y.
- **S-MB1 cell.** The S-MB1 cell is reconstructed. Only its use of an FA at
  the even position is stated. The split of `b_2j+1` and the routing of the
  carries are this design's. They were chosen so that no carry ripples.
- **Fused accumulator.** The MAC details are this design's own: the
  accumulator as a tree row, the two-stage pipeline, `clr`, the reset style
  and the 40-bit accumulator. The source gives the size (16x16), the radix-4
  MB multiplier and the block-enable idea. It does not describe the
  "1-bit MAC slice" from which it builds the N-bit unit, so there is no such
  slice here.
- **Default scheme.** `SCHEME` defaults to S-MB2. All three schemes are
  selectable and tested.
- **Left out.** The carry-save tree uses only 3:2 counters. The final adder
  is a CLA; a Kogge-Stone adder and a radix-2 Booth encoder are mentioned
  only as alternatives and are not built. The conventional AM unit
  (adder + multiplier) is the baseline and is not built either.
- **Derived equations.** The gate equations of the MB encoder, the partial
  product bit and the signed adders are derived from their truth tables.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module with values worked out independently by integer arithmetic in the
testbench, and ends by printing `TB_RESULT checks=<n> failures=<n>`.

| testbench          | what it covers |
|--------------------|----------------|
| `tb_ha_star`, `tb_ha_dstar`, `tb_fa_star`, `tb_fa_dstar` | exhaustive check of each signed-adder relation (HA* also in its dual reading) |
| `tb_mb_encoder`    | all 8 triplets: sign/one/two/cin against the digit value |
| `tb_pp_gen`        | every digit, at N=16 on random and corner X, at N=6 on every X |
| `tb_smb{1,2,3}_recoder` | digit string = A+B: N=16 on corners and 20k random pairs; N=6 and N=5 on every pair |
| `tb_csa_tree`      | 12×40, 3×16 and 7×21 trees against a plain sum |
| `tb_cla_adder`     | W=40 and W=33, corners (including the full carry chain) and random values |
| `tb_fam`           | all three schemes at N=16 (corners and 20k random) and at N=5 (all 32k operand triples), with and without addend |
| `tb_smb_mac`       | full default size, end to end; see below |

`tb_smb_mac` runs in three phases:
1. It checks the two-edge latency.
2. It computes one output of a 32-tap symmetric FIR filter: 16 tap pairs with
   `clr` on the first.
3. It runs 20,000 cycles of random traffic with random `en`, `clr` and
   extreme operands.

Throughout, `acc` and `acc_valid` are compared every cycle with a cycle model.
The testbench also counts idle cycles, clears, accumulations and back-to-back
operations, and it fails if any of them never happens.

To run one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/smb_pkg.sv tb/tb_smb_mac.sv --top-module tb_smb_mac
./obj_dir/Vtb_smb_mac
```

Swap in any other `tb_*` name. Each testbench runs in seconds.

## Changing it

- **Operand width.** Set `N` on `smb_mac` or `fam`. Odd widths work. The
  digit count, the tree height and the correction term all follow from `N`.
- **Scheme.** Set `SCHEME` to `smb_pkg::SMB1`, `SMB2` or `SMB3`.
- **Plain fused add-multiply.** Use `fam` with `addend` tied to 0.
- **Other adders.** To try another final adder or compressor tree, replace
  `cla_adder` or `csa_tree`. Their interfaces are plain rows and a sum.

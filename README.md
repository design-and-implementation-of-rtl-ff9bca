# 8x8 Vedic multiplier with concatenation-incrementation carry-skip adders

An unsigned 8x8 multiplier, built from two ideas:

* **Urdhva Tiryagbhyam ("vertically and crosswise")** multiplication. The
  operands are cut into 4-bit halves and four 4x4 products are formed in
  parallel. Each 4x4 product is itself computed column by column: column *k*
  counts the bit products `a[i] & b[k-i]`.
* **CI-CSKA adders** combine the partial results. CI-CSKA is a carry-skip
  adder that uses concatenation and incrementation. Every stage adds its own
  bits with carry-in 0 while the carry travels along a chain of one compound
  gate per stage. A small incrementer then adds the carry that arrives.

The whole multiplier is combinational. It has no clock and no pipeline
registers, so a product is ready one combinational delay after the operands
change.

## Dataflow of the 8x8 multiplier (`vedic_mul8x8`)

```
            a[7:4]b[7:4]   a[3:0]b[7:4]   a[7:4]b[3:0]   a[3:0]b[3:0]
                 |              |              |              |
              4x4 mul        4x4 mul        4x4 mul        4x4 mul
                 m4             m3             m2             m1
                 |              +---ADDER-1----+              |
                 |              m5 (carry C1)                 |
                 |              +-------ADDER-2---------------+ m1[7:4]
                 |              m6 (carry C2)                 |
                 +--ADDER-3-- m7 = {C1|C2, m6[7:4]}           |
                 |                      |                     |
              p[15:8]               p[7:4]=m6[3:0]       p[3:0]=m1[3:0]
```

| signal | value |
|---|---|
| `m1..m4` | the four nibble products, 8 bits each |
| `m5` | `m2 + m3`, the two cross products. Both have weight 2^4. |
| `m6` | `m5 + m1[7:4]`, which adds the upper half of the low product |
| `p[15:8]` | `m4 + {C1 or C2, m6[7:4]}` |

**The second carry.** ADDER-1 and ADDER-2 can each carry out, and both
carries have weight 2^12. ADDER-3 must receive them. They are never 1
together, because `m2 + m3 + m1[7:4]` is at most 464, which is less than 512.
So ADDER-3 takes their OR as bit 4 of its second operand.

The block diagram this design follows draws only ADDER-1's carry. Leaving out
ADDER-2's carry gives 524 wrong products out of 65536. One example is
242 × 255: there `m5 = 255` and `m1[7:4] = 1`.

Worked example (50 × 77 = 3850): `m1..m6` = 26, 39, 8, 12, 47, 48,
`p[15:8]` = 15, and all carries are 0.

## The 4x4 Vedic multiplier (`vedic_mul4x4`)

Column *k* (k = 0..6) holds the crosswise products `a[i] & b[k-i]`. Their
count `s_k` is at most 4. Adding `s_k` plus the carry from column *k-1* gives
the classic one-line method. Here the seven counts are instead packed into
three 8-bit words whose fields do not overlap:

```
w0 = s0<<0 | s2<<2 | s4<<4 | s6<<6     (s0,s6 <= 1; s2,s4 <= 3: 1 or 2 bits)
w1 = s1<<1 | s5<<5                     (<= 2: 2 bits each)
w2 = s3<<3                             (<= 4: 3 bits)
p  = w0 + w1 + w2                      two 8-bit CI-CSKA adders
```

Both the column method and the use of carry-skip adders for the
partial-product sum come from the source. The three-word grouping is this
design's own choice.

## The CI-CSKA adder (`ci_cska`)

An N-bit adder is cut into Q stages. With the default N = 8 and stage size
M = 2, there are four stages.

* **Stage 1** is a plain M-bit RCA (`cska_rca`) that takes the adder's
  carry-in `ci`. Its carry out is CO,1.
* **Stage j ≥ 2** has three parts:
  * an RCA with its carry-in tied to 0 (`cska_rca`). It gives the
    intermediate sum Z and its own carry C_j. All stages do this at the same
    time.
  * an incrementation block (`cska_incrementer`). It is a half-adder chain
    that adds CO,j-1 to Z and gives the stage's final sum. Its own carry out
    is not built.
  * skip logic (`cska_skip_logic`). It computes
    `CO,j = C_j | (&Z & CO,j-1)`. If the RCA carried, the stage carries. If
    every Z bit is 1, the incoming carry skips the stage. Otherwise the
    carry is 0.

The critical path runs through stage 1's RCA, then the chain of skip gates,
then the last incrementer.

**Polarity on the carry chain.** Each skip gate is a single inverting
compound gate, and the two kinds alternate:

| stage | gate | carry in | carry out |
|---|---|---|---|
| 2, 4, 6, … | AOI `~((&Z & CO,j-1) \| C_j)` | true | complemented |
| 3, 5, 7, … | OAI `~((~&Z \| ~CO,j-1) & ~C_j)` | complemented | true |

So after every even-numbered stage the chain holds the complement of the
carry. `ci_cska` inverts the chain value back to true polarity in two places:
where it feeds an incrementer, and at the final `co` when Q is even. Keep
this in mind when changing the stage count or reading the chain in a
waveform (`g_stage[q].g_rest.u_skip.co_out`).

**Stage sizes.** The adder supports fixed and variable stage sizes:

* `M` sets a fixed stage size. The last stage takes whatever bits remain.
* `SIZES` (an array of up to `MAXQ` widths, stage 1 first, ending with
  zeros) selects a variable-size adder instead. An example is
  `'{0:1, 1:2, 2:3, 3:2, default:0}`. Elaboration stops with an error if
  the widths do not add up to N.

No particular stage sizes are prescribed for the 8-bit adders. The default
M = 2 was chosen so that both AOI and OAI gates occur.

## Files

| file | contents |
|---|---|
| `rtl/vedic_mul8x8.sv` | top: `a[7:0]`, `b[7:0]` → `p[15:0]`, no parameters |
| `rtl/vedic_mul4x4.sv` | 4x4 column multiplier |
| `rtl/ci_cska.sv` | CI-CSKA adder, parameters `N`, `M`, `MAXQ`, `SIZES` |
| `rtl/cska_rca.sv` | stage RCA, parameter `M` |
| `rtl/cska_incrementer.sv` | half-adder incrementation block, parameter `M` |
| `rtl/cska_skip_logic.sv` | AOI/OAI skip gate, parameters `M`, `OAI` |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | one-bit cells |
| `tb/tb_*.sv` | one self-checking testbench per module above, except the one-bit cells |

## Verification

Each testbench compares its module with integer arithmetic and ends by
printing `TB_RESULT checks=N failures=M`. A watchdog stops a run that hangs.

| testbench | what it applies |
|---|---|
| `tb_vedic_mul8x8` | The 50 × 77 example, including the internal `m1..m6`. Then all 65536 operand pairs. It counts ADDER-1 carries, ADDER-2 carries and stage skips in each adder, and fails if any of these never happens. |
| `tb_vedic_mul4x4` | all 256 pairs |
| `tb_ci_cska` | Exhaustive at N = 8 with M = 2, M = 3 and variable sizes 1-2-3-2, and at N = 9 with M = 2 (odd Q). Random at N = 16 with M = 4 and sizes 2-3-4-4-3. It also counts skip and generate events. |
| `tb_cska_rca`, `tb_cska_incrementer`, `tb_cska_skip_logic` | exhaustive, both gate forms |

All pass. To run one with plain Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
    --top-module tb_vedic_mul8x8 tb/tb_vedic_mul8x8.sv
./obj_dir/Vtb_vedic_mul8x8
```

## Departures and open points

* ADDER-2's carry goes to ADDER-3 (see above). This departs from the block
  diagram it is based on and is required for correct products.
* The inside of the 4x4 multiplier (the three-word grouping) and the 8-bit
  adders' stage sizes are this design's choices.
* Gate-level details are fixed only by the logic function. These include the
  AND versus NAND gate on Z and where the inverters sit for the polarity
  changes. Synthesis will restructure them anyway. The CI-CSKA's speed
  advantage is a property of the gate and transistor implementation, so an
  FPGA or standard-cell flow will not necessarily reproduce it.
* Operands are unsigned.

# One-hot check node unit for min-sum LDPC decoding

A min-sum LDPC decoder spends most of its check node logic on one job: out
of the d_c incoming messages, find the smallest magnitude, the second
smallest, and the position of the smallest. The usual way is a tree of
compare-select cells, each built from carry-propagate comparators and
multiplexers. This check node unit (CNU) uses no carry-based comparator for
the minimums. It recodes every magnitude as a one-hot vector and ORs the
vectors together. In that OR, the lowest set bit is the first minimum and the
next set bit is the second minimum.

The price is a known imprecision. The OR cannot count, so when the two
smallest magnitudes are equal the unit returns the next *larger distinct*
value as the second minimum. For example, for magnitudes 1, 2, 1, 5, 4 it
gives min1 = 1 and min2 = 2, not min2 = 1. The first minimum, its index and
the signs are always exact. This trade is aimed at high-rate codes with a
large check node degree, where the comparator tree is the biggest cost.

## Data path

```
alpha[j] (sign | q-bit magnitude), j = 0 .. DC-1
   |
 input register                                   (stage 1)
   |-- magnitude --> q-to-2^q decoder (x DC) --> DC-to-1 OR tree --> modified LZC --> min1, min2
   |-- magnitude ------------------------------> DC comparators (== min1) --> priority encoder --> min1_idx
   |-- sign -----------------------------------> sign computation --> beta_sign[DC]
 output register: min1_idx | min1 | min2 | beta_sign   (stage 2)
```

| module        | role |
|---------------|------|
| `cnu_top`     | the complete unit: input and output registers around the blocks below |
| `onehot_dec`  | q-to-2^q decoder. Magnitude 2 with q = 3 becomes `00000100` |
| `or_tree`     | balanced binary OR tree over the DC one-hot vectors |
| `lzc_min2`    | modified leading-zero counter: positions of the lowest and the second-lowest one |
| `min1_index`  | equality comparators against min1, followed by `prio_enc` |
| `prio_enc`    | priority encoder. The lowest index wins |
| `sign_comp`   | outgoing sign per input: XOR of all signs, XORed again with the input's own sign |
| `cnu_pkg`     | default sizes (q = 3, DC = 72) and an index-width helper |

### Why the OR gives the minimums

After decoding, input j sets only bit `mag[j]`. Bit k of the OR is therefore
set exactly when at least one input has magnitude k. Scanning the OR vector
from bit 0 upwards, the first one found is the smallest magnitude that occurs
(min1, exact). The second one found is the second smallest magnitude that
occurs. It equals the true second minimum unless two inputs share the
smallest value. The vector is only 2^q bits wide (8 for q = 3), so both scans
are small. The wide part of the unit is the OR tree, and OR gates are cheap
and have no carry chain.

`lzc_min2` finds the lowest one, clears it with its own one-hot mask (no
subtraction), and scans the rest. Two edge cases are this design's choice:

* **All inputs equal.** Only one bit is set, and min2 is set equal to min1.
  This is the exact answer.
* **Empty vector.** Both outputs are 0. This cannot occur inside the unit.

### First-minimum index

Once min1 is known, every input magnitude is compared with it for equality,
which gives a DC-bit match vector. `prio_enc` turns that vector into an index
of ceil(log2 DC) bits. When several inputs hold the minimum, the lowest
position is reported. The comparators are q bits wide and have no carry
chain. The path runs through the decoders, the OR tree, the LZC, the
comparators and the encoder, so it is the longest path of the unit.

### Signs

`sign_comp` applies the standard min-sum sign rule. The output sign for input
j is the product of all other input signs: `beta_sign[j] = (^sgn) ^ sgn[j]`.
The sign block's position and its DC-bit output are part of the architecture.
The XOR rule itself is this design's choice, because the architecture gives
no insides for the block.

## Interface and timing (`cnu_top`)

| port        | dir | width          | meaning |
|-------------|-----|----------------|---------|
| `clk`       | in  | 1              | clock |
| `rst_n`     | in  | 1              | asynchronous, active-low reset. Clears every register |
| `in_valid`  | in  | 1              | `alpha` holds a new input set |
| `alpha`     | in  | `[DC]` x (Q+1) | messages. Bit Q is the sign (1 = negative), bits Q-1..0 the magnitude |
| `out_valid` | out | 1              | outputs hold a new result |
| `min1`      | out | Q              | first minimum (exact) |
| `min2`      | out | Q              | second minimum (second smallest distinct magnitude) |
| `min1_idx`  | out | ceil(log2 DC)  | index of the first minimum |
| `beta_sign` | out | DC             | sign of the message returned to each input |

The unit has one pipeline stage with registered inputs and registered
outputs. A set presented with `in_valid` before clock edge n is latched at
edge n. Its result is on the outputs after edge n+1, with `out_valid` high.
A new set can be accepted every cycle. The outputs hold their value while
`out_valid` is low.

The following are this design's own choices:

* the `in_valid`/`out_valid` qualifiers;
* the reset style;
* the sign-in-MSB bit order.

The architecture fixes only the 1-bit sign with a 3-bit magnitude, and the
registered inputs and outputs.

Parameters:

* `Q` is the magnitude width. The default is 3 (4-bit messages, 3-to-8
  decoders).
* `DC` is the number of inputs. The default is 72, the largest degree in the
  evaluated range of 6 to 72.

A code of smaller degree can use a 72-input unit if every unused input is
held at sign 0 and the largest magnitude (2^Q-1). `min1`, `min1_idx` and the
signs are unaffected. `min2` reads 2^Q-1 instead of min1 only when all used
inputs are equal. The alternative is to instantiate the unit with the code's
own `DC`.

An assertion in `cnu_top` checks that a valid result never has min2 < min1.

## Sizes it covers

| check node degree | where it comes from |
|-------------------|---------------------|
| 10, 15, 20, 32, 40, 64, 72 | cost and clock-rate sweep of the architecture (FPGA synthesis) |
| 6, 9, 12, 18, 30 | regular d_v = 3 codes of rate 1/2, 2/3, 3/4, 5/6 and 9/10, with 4-bit messages |

All of these fit the default build, and `tb_cnu_degrees` runs each one.

Reported cost of this architecture on a Virtex-7 FPGA:

* 113 LUT-FF pairs at d_c = 10 and 685 at d_c = 72;
* about 9 to 30 % below a comparator-based CNU;
* a lower clock rate than the comparator-based CNU at small d_c;
* an equal or higher clock rate from d_c = 40 up.

At the BER used for comparison, the imprecise second minimum costs about
0.15 to 0.25 dB for plain min-sum and 0.08 to 0.12 dB for self-corrected
min-sum. The smaller losses are for the high-rate codes.

These figures belong to the architecture and were not measured on this RTL.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares the module against an independent reference and prints
`TB_RESULT checks=N failures=M`.

* `tb_onehot_dec` is exhaustive for q = 3 and q = 4.
* `tb_lzc_min2` is exhaustive over all 256 OR vectors.
* `tb_or_tree` and `tb_prio_enc` are random. They run at 72 inputs and also
  at a small size (5 and 10 inputs).
* `tb_min1_index` and `tb_sign_comp` are random and run at 72 inputs.
* `tb_cnu_top` runs the default 72-input unit end to end. Its reference model
  sorts the magnitudes. The test covers:
  * the two worked examples (1, 2, 4, 5 and 1, 2, 1, 5, 4);
  * sets where every input is equal;
  * random streams with idle gaps and back-to-back sets;
  * padded lower-degree sets;
  * a reset in mid-stream.

  It checks the two-cycle latency of every result. It also counts how often
  each case occurred, including the imprecise second minimum, and fails if
  any case never occurred.
* `tb_cnu_degrees` instantiates the unit at all 12 degrees listed above.
  It uses the helper `cnu_deg_check`.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cnu_pkg.sv tb/tb_cnu_top.sv \
          --top-module tb_cnu_top -o sim
./obj_dir/sim
```

## Departures and open points

* Only the check node unit is built. The rest of the LDPC decoder is not
  included: variable nodes, message memories and the schedule.
* The architecture draws the inputs as alpha_0 .. alpha_{d_c_MAX} but the sign
  output as d_c_MAX bits wide. This RTL uses DC inputs numbered 0 .. DC-1,
  which matches the sign width.
* Behaviour not fixed by the architecture was chosen here:
  * the tree shape of the OR reduction;
  * the LZC internals;
  * the rule for ties in the index (lowest position);
  * min2 when all inputs are equal;
  * the valid/reset interface.
* Nothing here has been synthesized for timing, so the frequency and cost
  figures above are not confirmed for this code.

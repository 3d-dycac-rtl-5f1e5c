# 3D-DyCAC: a crosstalk avoidance codec for TSV buses

In a 3D chip, layers talk to each other through through-silicon vias (TSVs).
TSVs are large and packed close together, so each one is coupled to its
neighbours. A TSV whose neighbours switch in the opposite direction sees its
edge slowed down or sped up, or picks up a glitch. In a TSV grid the centre
TSV of a 3x3 group (the *victim*) has four direct neighbours at distance d and
four diagonal neighbours at d√2, not just the two of a planar bus. This makes
the 2D crosstalk avoidance codes a poor fit.

3D-DyCAC codes the data in two steps before it enters the TSVs:

1. **Phase 1, numerical code.** Each slice of the data word becomes a code
   word of a special numerical system. Its code words are made of long runs of
   equal bits, so neighbouring TSVs mostly hold the same value and rarely
   switch against each other.
2. **Phase 2, dynamic inversion in a triangular window.** The code word is
   placed on a 3x3 TSV cluster and two counters check it. If the centre TSV
   disagrees with too many of its direct neighbours, or the three TSVs facing
   the previous cluster (the *triangular window*) disagree with that cluster's
   edge TSV, the centre bit is inverted, and so is one neighbour bit with it
   when the two are equal. An extra flag TSV per cluster tells the receiver.

The receiver inverts the centre bit back where the flag says so. It then turns
each code word back into a number with a plain weighted sum.

This RTL implements the complete codec, the sender and the receiver, for a
64-bit data bus. The TSVs themselves are not logic and are left outside. The
top module brings both TSV sides out as ports.

## Phase 1: the numerical system

A code word `d_N … d_1` stands for the value `Σ d_i · b_i`. The bases come
from a sequence `g_k`, the number of code words available with `k` bits:

    g_1..g_5 = 2, 3, 4, 5, 7        g_k = g_(k-1) + g_(k-5)   (k > 5)

    b_1 = 1
    b_2 = 0
    b_i = g_(i-1) - g_(i-2)         3 <= i <= N-1
    b_N = g_(N-3)

For a 9-bit cluster (N = 9) the bases are, from `b_9` down to `b_1`:
`9 3 2 2 1 1 1 0 1`. They sum to 20, so the code has g_9 = 21 values,
0 … 20. Every base is at most one more than the sum of the bases below it, so
every value in that range can be written. `dycac_pkg` computes all of this at
elaboration time for any N ≥ 6.

**The zero-weight bit.** `b_2 = 0`, so bit `d_2` does not enter the value at
all. Phase 2 uses it freely: the sender may invert `d_2` and the receiver
never needs to know.

**The mapping.** The encoder (`nbcac_encoder`) runs from `d_N` down to `d_1`
and carries a remainder `r`, which starts as the data value. At each bit it
sets `d_i` when `r` reaches a threshold, and then subtracts `b_i`. The
threshold depends on the bit just decided above it:

| bit above (`d_(i+1)`) | threshold for `d_i`                                   |
|-----------------------|-------------------------------------------------------|
| 1 (continue a run)    | `b_i`, except 0 for `d_2`                             |
| 0, or i = N (start)   | `g_(i-3)` for i ≥ 6; 4, 2, 2, 1, 1 for i = 5, 4, 3, 2, 1 |

A new run of 1s therefore starts only when enough value is left to make it
long. These thresholds are this design's own reading of the mapping. They
have the properties the method asks for, checked by enumeration for N = 6 to
24:

- the remainder always ends at 0, so the code word sums to the value;
- each value gets exactly one code word;
- no code word contains `010`, `101`, `0110` or `1001`.

Value 3 maps to `000001111`, the method's worked example. The 16 code words
a 4-bit slice uses (`d_9 … d_1`) are:

| value | code word | value | code word |
|------:|-----------|------:|-----------|
| 0 | 000000000 | 8  | 011110000 |
| 1 | 000000011 | 9  | 100000000 |
| 2 | 000001110 | 10 | 100000011 |
| 3 | 000001111 | 11 | 100001110 |
| 4 | 000111000 | 12 | 110000000 |
| 5 | 001110000 | 13 | 110000011 |
| 6 | 001111000 | 14 | 111000000 |
| 7 | 011100000 | 15 | 111000011 |

The hardware is a chain of N constant comparators and subtractors
(combinational). The decoder (`nbcac_decoder`) is a chain of constant adders.

## Phase 2: the cluster and the triangular window

A 9-bit code word sits on a 3x3 cluster, numbered column by column. Clusters
stand side by side in a mesh three TSVs high:

          cluster k-1          cluster k
        d1  d4  d7    |    d1  d4  d7
        d2  d5  d8  --|->  d2  d5  d8
        d3  d6  d9    |    d3  d6  d9

- `d5` is the victim. `d2`, `d4`, `d6` and `d8` are its direct neighbours.
  `d1`, `d3`, `d7` and `d9` are its diagonal neighbours.
- `d8` of cluster k-1 is itself a victim whose direct neighbour across the
  cluster boundary is `d2` of cluster k. `d1` and `d3` of cluster k are its
  diagonal neighbours there. Those three TSVs form the triangular window of
  cluster k.

`tw_inverter` computes two counts on the phase-1 word:

- **DNC** (direct neighbour count): how many of `d2 d4 d6 d8` equal `d5`
  (0 to 4, i.e. DNC = count/4).
- **TC** (triangular count): how many of `d1 d2 d3` equal `d8` of cluster
  k-1 (0 to 3, i.e. TC = count/3).

If `DNC ≤ DNC_MAX/4` or `TC ≤ TC_MAX/3`, the cluster is changed:

- if `d2 == d5`, both are inverted;
- otherwise only `d5` is inverted.

In both cases the cluster's flag TSV is set. `DNC_MAX = TC_MAX = 1` by
default. TC ≤ 1/3 is exactly a breach of "at least two of the three window
TSVs match `d8`". DNC ≤ 1/4 means at most one direct neighbour agrees with
the victim. For that case, inverting always leaves at least three of four in
agreement.

Inversion never touches `d8`, so each cluster's window test sees its left
neighbour's final `d8`. All clusters therefore decide at once, in parallel.
Cluster 0 has no left neighbour and skips the TC test.

**Receiver side.** `dycac_decoder` inverts `d5` of every flagged cluster and
sums. It leaves `d2` as received, because its weight is 0. After an inversion
`d2` always equals `d5`, so the receiver could not tell which of the two cases
happened anyway. One flag bit per cluster is enough only because of the zero
weight.

## The 64-bit bus

`dycac_encoder` cuts the `DATA_W`-bit word into 4-bit groups. Bits
`4k+3 … 4k` go to cluster k. A 9-bit code word has 21 values, enough for 4
bits but not 5. With the default `DATA_W = 64` that gives:

| item                        | count |
|-----------------------------|------:|
| clusters                    | 16    |
| code TSVs (16 × 9)          | 144   |
| flag TSVs (one per cluster) | 16    |
| valid line                  | 1     |

`DATA_W` may be any multiple of 4. `GROUP_W` (data bits per cluster) must fit
the 21 values of a 9-bit cluster. `nbcac_encoder` and `nbcac_decoder` take any
N ≥ 6 and reject a data width that does not fit, but the cluster logic of
phase 2 is fixed at 3x3.

## Interface and timing of `dycac_codec` (top)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous, active-low reset |
| `in_valid_i`, `in_data_i` | in | 1, DATA_W | word to send |
| `tsv_valid_o`, `tsv_code_o`, `tsv_inv_o` | out | 1, CLUSTERS×9, CLUSTERS | drive the TSVs |
| `tsv_valid_i`, `tsv_code_i`, `tsv_inv_i` | in | same | received from the TSVs |
| `out_valid_o`, `out_data_o` | out | 1, DATA_W | decoded word |

`tsv_code_o[k][i-1]` is `d_i` of cluster k (type `cluster_word_t` from
`dycac_pkg`). The encoder and the decoder each have one register stage. A word
wired straight through comes out two clocks after it goes in, at one word per
clock. There is no back-pressure. The outputs hold their last value over
idle cycles, and reset clears them.

## How it behaves

The end-to-end test sends 4000 random and directed 64-bit words (64,000
cluster words) through the codec. It counts what phase 2 does:

- 32,247 clusters pass unchanged.
- 24,553 have only `d5` inverted.
- 7,200 have `d2` and `d5` inverted together.
- 3,943 inversions are triggered by DNC and 29,215 by TC.
- Pairs of direct neighbours on the whole 3×48 mesh that switch in opposite
  directions between successive words: 88,828 after phase 1 alone, 83,368
  after phase 2, about 6 % fewer.

Two results are worth knowing before changing the thresholds:

- **TC triggers have no effect on the window.** With 4-bit groups the window
  `d3 d2 d1` of a phase-1 word is always `000`, `011`, `110` or `111`. When
  a TC breach comes with `d2 == d5`, the window is `000` facing a 1.
  Inverting `d2` then lifts TC only from 0/3 to 1/3, which is still a breach.
  In every other breach only `d5` is inverted, and `d5` lies outside the
  window. The count of TC breaches is the same before and after phase 2.
- **TC triggers can undo DNC.** They invert `d5` in clusters whose DNC was
  fine. Clusters with DNC ≤ 1/4 go from 3,943 before phase 2 to 7,506 after.

This is how the decision rule behaves as specified. The RTL keeps to that rule
and does not alter it. `DNC_MAX` and `TC_MAX` are parameters, for anyone who
wants to explore other thresholds.

## Where this design fills gaps

The method fixes the numerical system, the two counters, the inversion rule,
the 3x3 clusters, the 64-bit bus and the flag TSV. The following are this
design's own choices:

- the per-bit thresholds of the phase-1 mapping (above);
- the column-by-column numbering of the cluster, and the left-to-right
  placement of clusters;
- the values of `DNC_MAX` and `TC_MAX`, and TC being skipped for cluster 0;
- 4 data bits per cluster, and hence 16 clusters for 64 bits. A 9-bit cluster
  cannot carry 8 bits, so eight data clusters would carry only 32;
- one flag TSV per cluster;
- a valid line, one register stage per side, synchronous reset, no
  back-pressure.

The following are not built:

- extending the coding to N×N meshes;
- the clusters that carry control signals besides the data;
- any model of the TSVs' electrical coupling.

## Files

| file | content |
|------|---------|
| `rtl/dycac_pkg.sv` | constants, `cluster_word_t`, elaboration-time functions for `g_k`, `b_i` and the thresholds |
| `rtl/nbcac_encoder.sv` | phase-1 encoder, N code bits, K data bits |
| `rtl/nbcac_decoder.sv` | phase-1 decoder (weighted sum) |
| `rtl/tw_inverter.sv` | phase-2 DNC/TC check and inversion for one cluster |
| `rtl/dycac_encoder.sv` | sender: slicing, phase 1 and 2 per cluster, output register |
| `rtl/dycac_decoder.sv` | receiver: restore `d5`, decode, output register |
| `rtl/dycac_codec.sv` | top: sender and receiver |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dycac_widths` |

## Simulating

Each testbench checks its module against an independent model or against
properties, and prints `TB_RESULT checks=… failures=…`. For example, the
end-to-end test at full size:

    verilator --binary --timing -Irtl -y rtl rtl/dycac_pkg.sv \
        tb/tb_dycac_codec.sv --top-module tb_dycac_codec
    ./obj_dir/Vtb_dycac_codec

Swap in any other `tb/tb_<name>.sv` and its module name. The testbenches are:

- `tb_nbcac_encoder`: all values for N = 9 and N = 18. It checks the sums,
  the forbidden patterns, that code words are unique, and the worked example.
- `tb_nbcac_decoder`: all 512 words of a 9-bit cluster, and an encode/decode
  round trip at N = 18.
- `tb_tw_inverter`: every cluster word with every neighbour case, against a
  model. Every kind of inversion must occur.
- `tb_dycac_encoder` and `tb_dycac_decoder`: each side at 64 bits, with
  latency, hold and reset checks.
- `tb_dycac_codec`: the full 64-bit codec end to end, with the statistics
  above.
- `tb_dycac_widths`: 16-, 32- and 128-bit codecs side by side.

All of them finish in well under a second.

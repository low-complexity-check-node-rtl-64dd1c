# Half-row trellis min-max check node for a GF(32) nonbinary LDPC decoder

This RTL implements the check node side of a layered min-max decoder for a
nonbinary LDPC code over GF(32). The code is the (837, 726) code, with row
weight dc = 27 and column weight dv = 4, quantized to 6-bit LLRs. The check
node unit (CNU) uses a *half-row modified two-extra-column trellis min-max*
algorithm (HR-mTEC-TMM):

* **Half rows.** A row of 27 variable-to-check (V2C) messages is not handled
  at once. It goes through the CNU as two half rows: first 14 messages, then 13.
  All per-message hardware is therefore sized for 14 lanes, not 27.
* **The first half row is decoded from the first half only.** Its
  check-to-variable (C2V) messages are an approximation. The second half row
  is decoded from minima of the whole row: the first-half minima are kept in
  registers and merged with the second-half minima.
* **Compressed messages.** Each half row's C2V messages are compressed into
  348 bits: four LLR values, two field elements, two 4-bit deviations per
  nonzero field element, and one symbol per lane. These 348 bits are all that
  is stored between iterations.

What the design gives up is about 0.2 dB of frame error rate against the
full-row two-extra-column trellis min-max algorithm. In return, the
per-message part of the CNU (reordering networks and 1-min finder inputs) is
about half as large, and fewer bits are stored per message: 348, against 755
for the full-row algorithm and 620 for an earlier compressed-message scheme.

Around the CNU, the top-level block `hr_mtec_cn_top` performs a whole
check-node layer update for each half row. It forms the V2C messages from
the a-posteriori vectors, runs the CNU, keeps the compressed C2V messages of
all 124 rows, and returns the updated a-posteriori vectors.

## The trellis in the delta domain

Each V2C message is a vector Q(a) of 32 LLRs, one per field element a. It is
normalized so that its most reliable symbol z has Q(z) = 0. The min-max check
node output for variable n is

    R_n(a) = min over symbol choices {a_k, k != n} with sum a_k = a of max_k Q_k(a_k)

where the sum is GF(32) addition, i.e. XOR. The trellis method rewrites this in
the *delta domain*:

* Each vector is relabelled by its hard decision: dQ_k(x) = Q_k(x ^ z_k). Now
  x = 0 is always the best symbol, with LLR 0.
* A C2V message becomes a choice of "deviations". These are the few variable
  nodes that do not take their best symbol.
* The sum of all hard decisions is the syndrome beta. The delta-domain result
  dR_n(x) maps back to the normal domain as R_n(a) = dR_n(a ^ z_n ^ beta).

The CNU works on the 31 rows x = 1..31 of this delta trellis. Row 0 is all
zeros.

1. **Row minima.** For each x it finds the minimum m1(x) over the lanes and the
   lane I(x) that holds it. There is one 1-min finder per row.
2. **Extra column.** For each x it builds the candidate paths with at most two
   deviations:
   * one deviation: m1(x) at lane I(x);
   * two deviations: max(m1(e), m1(e ^ x)) at lanes {I(e), I(e ^ x)}, for
     each of the 15 pairs of nonzero elements that sum to x, used only when
     the two lanes differ.

   dQ'(x) is the best candidate and d1(x), d2(x) are its deviations.
   dQ''(x) is the best candidate that avoids both d1(x) and d2(x). It serves
   the variable nodes that are themselves on the best path, because a
   message to n must not use n's own input.
3. **Compression.** Of the 31 dQ' values, only the two smallest (at elements
   a_m1 and a_m2) are kept, together with the dQ'' values at those two
   elements.
4. **Expansion.** This step belongs to the variable node side and is done
   here by `c2v_generator`. For lane i and element x != 0 the delta-domain
   C2V value is:

   | lane i is d1(x) or d2(x) | x == a_m1 | value  |
   |--------------------------|-----------|--------|
   | no                       | yes       | dQ'_m1 |
   | no                       | no        | dQ'_m2 |
   | yes                      | yes       | dQ''_m1 |
   | yes                      | no        | dQ''_m2 |

   dR(0) = 0. The vector is then reordered with z* = z ^ beta.

   Every element other than a_m1 therefore gets the second-smallest value.
   This is a lower bound on its own dQ'(x), which is the price of storing only
   four values.

## Half-row processing in detail

| | first half row (`in_second` = 0) | second half row (`in_second` = 1) |
|---|---|---|
| lanes | 0..13 | 0..12 (lane 13 ignored) |
| row minima used | of this half | min(stored first half, this half), eq. "final min" |
| index of a minimum | {0, lane} | {half, lane} of the winner |
| syndrome beta | XOR of this half's 14 z | XOR of all 27 z |
| side effect | minima, indexes and beta stored in `final_min1` | none |

A deviation is stored as a 4-bit lane position in the half row being decoded.
In the second half row a deviation can lie in the first half. Such a
deviation is not any of the receiving lanes, so it is stored as code 15
(`IDX_NONE`), which no lane matches. If two first-half minima are equal, the
first half wins.

## Blocks

| module | role |
|---|---|
| `nbldpc_pkg` | sizes (GF_Q = 32, DC = 27, HALF = 14, WB = 6, W = 5, M_ROWS = 124) and the 348-bit `cmsg_t` |
| `reorder_net` | dout[x] = din[x ^ ctrl]: log2(q) stages of q 2:1 multiplexers; normal <-> delta domain |
| `syndrome_tree` | XOR tree of the enabled lanes' hard decisions |
| `min1_finder` | comparator tree: minimum and lane over one trellis row |
| `final_min1` | first-half register bank and the first/second-half merge |
| `tec_constructor` | dQ'(x), dQ''(x), d1(x), d2(x) for one element x (31 instances) |
| `min2_finder` | two smallest dQ' values and their elements |
| `mtec_constructor` | the 31 constructors, the 2-min finder and the dQ'' selection |
| `hr_mtec_cnu` | the check node unit: 14 reordering networks, syndrome, 31 1-min finders, Final-min1, constructor |
| `gf_permuter` | dout[a] = din[c * a] in GF(32): the relabelling by a parity-check coefficient |
| `v2c_former` | layered step 3: Qt(a) = Q(h * a) - R_old(a) |
| `v2c_normalizer` | layered steps 4-5: Qt(a) - min(Qt), hard decision z, saturation to 6 bits |
| `app_update` | layered step 7: Q(h * a) = Qnorm(a) + R_new(a) |
| `symbol_decision` | output decision: argmin of the updated a-posteriori vector |
| `c2v_generator` | compressed message -> 14 normal-domain C2V vectors |
| `c2v_mem` | 248 x 348-bit message memory (124 rows x 2 half rows) |
| `hr_mtec_cn_top` | one layer update per half row: formers, normalizers, CNU, memory, two generators, a-posteriori update |

## Timing and interfaces

* **`hr_mtec_cnu`.** It accepts one half row per cycle. The compressed message
  appears two cycles later, with the tag that came in with the data.
  * Stage 0 is the reordering, syndrome, 1-min finders and Final-min1, with a
    register at its end.
  * Stage 1 is the extra-column constructor and compression, registered at
    the output.
  * A second half row must follow the first half row of the same row, with no
    other first half in between. Idle cycles are allowed. An assertion checks
    this.
* **`hr_mtec_cn_top`.** This block performs one check-node layer update
  of the layered decoder per half row.
  * *Input.* The caller presents, per lane, the signed 8-bit a-posteriori
    vector Q_n of the variable node and its nonzero coefficient h_mn, with
    the row number and the half-row flag.
  * *Pipeline.*

    | cycle | what happens |
    |---|---|
    | t | the message memory reads last iteration's compressed message of {row, half} |
    | t+1 | it is expanded |
    | t+2 | Qt = Q(h * a) - R_old, then normalization; this enters the CNU |
    | t+4 | the new compressed message is written back |
    | t+5 | the outputs appear |

  * *Output.* `out_q_post` carries the updated vectors Q(h * a) =
    Qnorm(a) + R_new(a), permuted back with h^-1. `out_sym` carries their
    hard decisions and `out_c2v` the new C2V vectors.
  * *Throughput and reuse.* The block takes one half row per cycle. A row
    must not come back within 4 cycles of its previous pass; in a real code
    every other row lies in between.
  * *Initial state.* Memory words not yet written expand to zero, which is
    the R = 0 start of decoding.
  * *Storage.* The normalized V2C vectors wait three cycles in a delay line
    for the new C2V vectors. That is 14 x 32 x 6 bits per stage.
* **Reset and clock.** There is a single clock and an asynchronous active-low
  reset. Reset clears the pipeline valid bits, the Final-min1 registers and
  the memory's written flags. It does not clear the memory array or the data
  of the top's delay line.

## Where this RTL goes beyond the source description

The algorithm and the CNU structure follow the published description:
* half rows of ceil(dc/2);
* q-1 1-min finders and a Final-min stage whose first-half results are kept
  in registers;
* q-1 two-extra-column constructors, a 2-min finder and four kept LLR values;
* deviations for all q-1 elements;
* z* = z ^ beta control of the delta-to-normal networks;
* 348 stored bits.

The following are choices of this implementation and may differ from the
original hardware:

* **dQ''(x), the second extra column.** It is the best candidate path that
  avoids both deviations of dQ'(x).
* **How the four values fill 31 entries.** This is the table in the
  expansion step above.
* **The syndrome of the first half row.** The first half row uses only the
  beta of its own 14 symbols.
* **Tie-breaking everywhere:**
  * lower lane;
  * first half before second;
  * single deviation before pairs;
  * smaller field element first.
* **Saturation.**
  * Stored LLRs are clipped from 6 to 5 bits (w = wb - 1).
  * dQ'' with no candidate is all ones.
  * The normalizer clips to 6 bits.
* **Pipelining, latencies, tags, handshakes, reset and memory organisation.**
* **Blocks given only by their function.** `v2c_normalizer`,
  `c2v_generator`, `c2v_mem`, `v2c_former`, `app_update`, `gf_permuter` and
  `symbol_decision` are described only by what they do, so their insides
  are this implementation's.
* **Reordering networks in the expansion.** The expansion uses 14 reordering
  networks rather than 13, so that one generator serves both half rows.
* **The GF(32) polynomial.** The field uses the primitive polynomial
  x^5 + x^2 + 1.
* **The direction of the step-7 permutation.** It is taken as the exact
  inverse of step 3.
* **Row count.** The 124 rows follow from N * dv / dc = 837 * 4 / 27.

Not built: the a-posteriori memory of the 837 variable nodes and the
decoding schedule. The schedule decides which variable nodes and
coefficients each row uses, and in what order rows and iterations run. It
needs the code's parity-check matrix, which is not available. The top
therefore takes each half row's vectors and coefficients as inputs and
returns the updated vectors with their hard decisions. No error-rate
result can be reproduced without these parts. The CNU has also not been
mapped to a standard-cell library, so its size has not been compared with
gate counts reported for other check node designs.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model in
`tb/tb_ref_pkg.sv` is written independently of the RTL, as plain loops:
* it enumerates the extra-column pairs directly;
* it scans the minima linearly;
* it keeps the first-half state in a class.

`tb_hr_mtec_cn_top` runs the top at its default sizes: all 124 rows, three
layered iterations, one half row per cycle with random idle cycles.
* The testbench acts as the a-posteriori memory. Each row owns 27 variable
  nodes with random coefficients; there is no parity-check matrix.
* It computes each expected result independently:
  * GF(32) products from log/antilog tables;
  * the old C2V message from its own stored copy;
  * normalization, the reference check node and the expansion;
  * the update.
* It checks every updated a-posteriori vector, its hard decision, every new
  C2V vector, the tags and the 5-cycle latency.
* It also checks one property of the algorithm directly: every C2V vector is
  0 at z ^ beta, with beta summed by the testbench.
* Rows get four LLR profiles so that every mechanism occurs, and each is
  counted:
  * minima won by the first half and by the second half;
  * single and double deviations;
  * dQ'' without a candidate;
  * deviations in the other half row;
  * saturation of stored values;
  * lanes on a deviation path;
  * reads of unwritten and written memory words;
  * half rows on consecutive cycles.

Simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_hr_mtec_cn_top rtl/nbldpc_pkg.sv tb/tb_ref_pkg.sv \
        tb/tb_hr_mtec_cn_top.sv -o sim && ./obj_dir/sim

Replace the testbench name to run any other block's test. The sizes are
package constants in `nbldpc_pkg`, so another field or row weight means
editing the package. The leaf blocks (`reorder_net`, `min1_finder`,
`min2_finder`, `syndrome_tree`, `tec_constructor`, `mtec_constructor`) are
parameterized on their own.

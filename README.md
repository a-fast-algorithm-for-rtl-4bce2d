# Inverse-free erasure decoder for binary BCH codes

This is a hardware decoder that fills in the *erased* bits of a binary BCH codeword.
An erased bit is a position the receiver knows is unreliable but whose value it does not
know. Erasure decoding matters in hard-input iterative decoding of turbo product codes. There,
closed chains of errors that the row and column decoders cannot break are marked as
erasures and handed to an erasure decoder. The textbook way to correct erasures of a binary
BCH code runs two full hard-decision decodings. Each builds an error-locator polynomial and
searches for its roots over all n positions. This design does neither. The erasure
positions are already known, so the decoder only has to find the erased bits' *values*,
and it does so with a few small fixed arrays of Galois-field multipliers and adders:

* no error-locator polynomial,
* no Chien search,
* no field inversion.

A final syndrome check also reports when the word held errors that were not marked as
erasures.

The default build corrects up to **V = 4 erasures** in words of a double-error-correcting
BCH code (minimum distance 5, so 2t = 4 erasures are correctable) of length
**n = 255** (GF(2^8)). All three sizes are parameters.

## The algorithm

Notation: α is a primitive element of GF(2^M), the word is r(x) = r_0 + r_1 x + … +
r_{n-1} x^{n-1}, and the erased positions are l_1 < l_2 < … < l_v. Every erased bit is
read as 0. The unknown value of erased bit l_i is then δ_i ∈ {0,1}, and the syndromes
are

    S_w = r(α^w) = Σ_i δ_i α^(w·l_i),        w = 1 .. 2t

(this assumes the bits that are not erased are correct). Write P_i = α^(l_i) for the
*locator* of erasure i. The decoder uses S_1 … S_v, which form a Vandermonde system in the
δ_i. The system is solved by elimination, arranged so that no division is ever needed.

**Refining (elimination).** Define S_w^(1) = S_w and

    S_w^(k) = S_{w+1}^(k-1) + S_w^(k-1) · P_{k-1}        k = 2..v,  w = 1..v-k+1

Each step cancels erasure k−1 from every remaining equation. After k−1 steps,

    S_1^(k) = Σ_{i ≥ k} δ_i · Q_{i,k-1},     Q_{i,j} = P_i · Π_{m=1..j} (P_i + P_m).

**Q terms.** Q_{i,0} = P_i, and Q_{i,j} = Q_{i,j-1} · (P_i + P_j). Q_{k,k-1} is a product
of non-zero factors, because the locators are distinct and non-zero, so it is never 0.

**Estimating (back substitution without division).** For k = v the sum has one term:
S_1^(v) = δ_v · Q_{v,v-1}. The right-hand factor is non-zero and δ_v is a bit, so δ_v is
simply "S_1^(v) ≠ 0". Going down from k = v−1 to 1:

    δ_k = 1  if  S_1^(k) + Σ_{i>k} δ_i · Q_{i,k-1} ≠ 0,   else 0.

An ordinary Vandermonde solver would divide by Q_{k,k-1} here. A binary unknown only needs a
zero test, so the solver needs no inverse.

**Operation count.** The refining array has v(v−1)/2 cells and the Q array has (v−1)(v−2)/2
cells. Each cell is one multiplier and one adder, so there are (v−1)² multipliers in all:
9 for v = 4. The estimator adds v(v−1)/2 gated XORs.

**Check.** Once the δ_i are known, the decoder recomputes S̃_w = Σ δ_i α^(w·l_i) for the
odd w = 1, 3, …, 2t−1. For a binary code the even syndromes follow from the odd ones. If
every S̃_w equals S_w, the corrected word is a codeword. Otherwise some bit *outside* the
erasures is wrong, and the decoder raises an alarm.

## Hardware structure

```
 in_bit/in_erase ─► syndrome_unit ─┬─ S_1..S_V ─► syndrome_refine_unit ─ S_1^(k) ─┐
   (1 bit/cycle)   (registers)     │                                              ▼
                                   ├─ P_1..P_V ─► q_compute_unit ─ Q_{i,j} ─► erasure_estimate_unit ─ δ
                                   │                                              │
                                   └─ S_1..S_2T, P_i ─────────► erasure_check_unit ◄┘ ─ alarm
                                                         (all combinational)  ─► output registers
```

| module | what it is |
|---|---|
| `bch_erasure_pkg` | GF(2^M) helpers: primitive polynomial table (M = 3..16), multiply-by-α, shift-and-add multiplier, α^e |
| `syndrome_unit` | bit-serial syndrome evaluator and erasure-locator capture (sequential) |
| `syndrome_refine_unit` | triangular array of V(V−1)/2 refining cells: 6 cells for V = 4 |
| `q_compute_unit` | (V−1)(V−2)/2 Q cells: Q_{3,1}, Q_{4,1}, Q_{4,2} for V = 4 |
| `erasure_estimate_unit` | back-substitution chain δ_V → δ_1 (XOR, gate and OR per row) |
| `erasure_check_unit` | odd-syndrome re-encoding and alarm |
| `bch_erasure_decoder` | top: wires the units together and registers the result |

**Syndrome unit.** Bits arrive r_0 first. For each w = 1..2T, a power register holds
α^(w·j) for the current index j, and a constant multiplier by α^w steps it. A received 1
that is not erased XORs the power into the syndrome accumulator. The w = 1 power register
is α^j itself. On an erased bit it is copied into the next free locator slot, together
with j. Because r_0 comes first, slots fill in ascending position order. After the last
bit (index n−1), the syndromes, locators, indices, erasure count and overflow flag are
loaded into output registers. The accumulators then restart, so words can follow back to
back.

**Cell arrays.** The refining, Q and estimating units, and the check unit, are
combinational. They sit between the syndrome unit's result registers and the top's output
registers. For V = 4, M = 8 the longest path runs through three multipliers in the refining
array and four zero-test rows in the estimator. The check unit's power chain runs in
parallel, since it depends only on the locators.

### Fewer or more than V erasures

* **Fewer than V erasures.** The unused upper locator slots stay at 0. A zero locator with
  δ = 0 drops out of every sum above. The used slots still have non-zero, distinct Q_{k,k-1},
  because their products only involve lower, used slots. So the same arrays decode any v ≤ V
  without reconfiguration. The δ of an unused slot is forced to 0 at the output.
* **More than V erasures.** Only the first V are captured. `ovf_o` is set, `alarm_o` is held
  low and `delta_o` has no meaning.
* **Unflagged errors.** The estimate may then be wrong. If it is, the check makes `alarm_o`
  go high whenever no filling of the erased bits yields a codeword. `mismatch_o` tells
  which odd syndrome disagreed.

## Interface and timing (`bch_erasure_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `in_bit`/`in_erase` carry the next bit of the word |
| `in_bit` | in | 1 | received bit (ignored when erased) |
| `in_erase` | in | 1 | this bit is erased |
| `out_valid` | out | 1 | one-cycle pulse, result of one word |
| `delta_o` | out | V | `delta_o[i-1]`: corrected value of the i-th erased bit |
| `used_o` | out | V | slot i−1 holds an erasure |
| `pos_o` | out | V × M | `pos_o[i-1]` = l_i, ascending |
| `cnt_o` | out | ⌈log2(V+2)⌉ | number of erasures (saturates at V) |
| `alarm_o` | out | 1 | estimate failed the syndrome check |
| `mismatch_o` | out | T | which odd syndrome S_(2u+1) disagreed |
| `ovf_o` | out | 1 | more than V erasures, word not decoded |

A word is exactly n = 2^M − 1 accepted bits. There is no back-pressure: `in_valid` may
drop for any number of cycles inside or between words. The results of the word are
presented two cycles after the cycle that presents its last bit. The first cycle loads the
syndrome registers and the second loads the output registers. `out_valid` is high for that
one cycle, and the outputs hold until the next word completes. Throughput is one bit per
clock. The decoding itself adds no cycles between words.

To correct the word, write `delta_o[i]` into position `pos_o[i]` for each set bit of
`used_o`. The decoder does not buffer the word.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 8 | field degree; code length n = 2^M − 1; 3 ≤ M ≤ 16 |
| `V` | 4 | erasures decoded per word |
| `T` | 2 | error-correcting capability of the code; 2T syndromes; V ≤ 2T (checked at elaboration) |

The primitive polynomial for each M is the usual minimum-weight one, for example
x^8+x^4+x^3+x^2+1 for M = 8. To use a different one, change `prim_poly` in
`bch_erasure_pkg` and the matching table in `tb/tb_gf_ref_pkg.sv`.

## What follows the published design and what does not

Taken from the published design:

* the four-unit structure;
* the refining-cell equation and the six-cell array for V = 4;
* the Q recursion and its three cells;
* the δ_V → δ_1 estimation rule;
* the odd-syndrome check that raises an error alarm.

The published description gives no circuit for the syndrome unit, no field size for the
example, no clocking and no interface. Everything below is this design's own choice:

* the bit-serial syndrome unit, with r_0 first and erased bits read as 0;
* taking the locators from the syndrome unit's α^j register;
* combinational arrays between two register stages;
* M = 8 and the primitive polynomials;
* the handling of fewer or more than V erasures;
* returning (position, value) pairs instead of a corrected copy of the word;
* the asynchronous reset.

The published operation count states (v−2)² multiplications in one place and (v−1)² in
another. The design has (v−1)², which is what the two arrays add up to.

The arrays are written for any V, as the algorithm is. V = 4 is the configuration shown in
the original and the default. V = 6 is also tested.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come from
`tb_gf_ref_pkg`, which multiplies with log/antilog tables instead of the RTL's
shift-and-add circuit.

* `tb_syndrome_unit`: random words with 0–6 erasures and idle gaps. It checks all four
  syndromes, the locators, the positions, the count, the overflow flag and the pulse timing.
* `tb_syndrome_refine_unit`: checks the closed form S_1^(k) = Σ δ_i Q_{i,k−1} for consistent
  syndromes, and the row recursion for random inputs.
* `tb_q_compute_unit`: checks every Q_{i,j} against its product definition.
* `tb_erasure_estimate_unit`: random δ and 0–4 locators. δ must be recovered exactly.
* `tb_erasure_check_unit`: consistent, corrupted-syndrome and flipped-bit cases.
* `tb_bch_erasure_decoder`: end to end at the default size (M = 8, V = 4, T = 2). It sends
  400 random codewords of the (255, 239) BCH code. Each word has 0–6 erasures, about a
  quarter also carry 1–2 unflagged errors, and the erased positions hold random bits. The
  expected answer is found by trying every filling of the erased bits. The test checks
  values, alarm, overflow, positions and the two-cycle latency. It also requires that each
  case occurs at least once: 0 to 4 erasures, overflow, alarm, idle gaps and back-to-back
  words.
* `tb_bch_erasure_decoder_v6`: the same test for V = 6, T = 3, M = 6, using the
  (63, 45) code.

Running one testbench with Verilator (5.x), from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_bch_erasure_decoder \
  -y rtl -y tb +libext+.sv rtl/bch_erasure_pkg.sv tb/tb_gf_ref_pkg.sv \
  tb/tb_bch_erasure_decoder.sv
./obj_dir/Vtb_bch_erasure_decoder
```

Each testbench ends with a `TB_RESULT checks=N failures=F` line, and has a cycle-count
watchdog.

Not verified:

* timing closure or gate-level behaviour;
* field sizes other than M = 6 and 8 (the reference package knows the primitive
  polynomials up to M = 10).

# Inner–outer error control for fault-attacked crypto circuits

Cryptographic hardware faces two kinds of faults. Natural faults, from radiation or noise, are
mostly small: one S-box output, one nibble. Malicious fault injection (clock glitches, laser, EM)
flips an arbitrary, often large, set of bits. A strategic attacker can also pick the error pattern
so that it slips past a linear check such as parity, Hamming or BCH. This RTL handles both kinds
in the same hardware:

* **Inner code: a nonlinear q-ary Rabii–Keren (RK) code** over GF(16). It corrects any single
  wrong nibble and detects multi-nibble errors. Because it is *robust*, no error pattern is
  guaranteed to stay undetected.
* **Outer code: a Compact Protection Code (CPC)** of a few bits. It is checked at system level
  after the RK correction, and catches the rare cases where the RK decoder "corrects" towards the
  wrong codeword or sees no error at all.
* **System-level fault manager.** It merges both verdicts with external indications (tamper
  detector, anomaly monitor, consistency check). It then either releases the corrected word or
  raises an alarm and withholds the word.

Correction is a single-cycle table lookup. This works because the decoder does not search a
table of all correctable syndromes. It uses an *Error Coefficient and Location Table* (ECLT) with
one row per code position.

This is an RTL rendering of the scheme published as *"Error control scheme for malicious and
natural faults in cryptographic modules"*. It follows that scheme's algorithms and worked
examples. Where the publication leaves a point open, this design makes its own choices; they are
listed in [Where this design departs or chooses](#where-this-design-departs-or-chooses).

## The RK code

Symbols are nibbles, elements of GF(16) with field polynomial x⁴ + x + 1. A data word
x = (x₀ … x_{K-1}) is protected by R redundancy symbols:

    w = A · f⁻¹(x),      f(x) = x⁻¹ per symbol (0 ↦ 0)

(x, w) is the codeword. Taken alone, A defines a linear code of distance D. Sending the data
through the inversion first makes the overall code nonlinear, and therefore robust. A receiver
holding z = (z_x, z_w) computes

    y = f⁻¹(z_x),   s = A·y + z_w        (the syndrome; s = 0 for a codeword)

so in the "y domain" the code is linear: an error in data symbol i shows up as an additive error
on yᵢ.

| distance D | R = 1 + 2(D−2) | corrects | never miscorrects up to |
|-----------:|---------------:|----------|--------------------------|
| 3          | 3 symbols      | 1 symbol | —                        |
| 5          | 7 symbols      | 1 symbol | 3 symbols (all detected) |

**Where A comes from.** A is not stored as a table. `rk_pkg::rk_gen_a()` builds it at elaboration
time from a shortened BCH code over GF(256) = GF(16)², with roots α⁰, α¹, …, α^{D−2}:

* GF(256) elements are pairs c₀ + c₁β over GF(16), with β² = 4β + 2 and α = 11 + 7β.
* Column j of the check matrix stacks α^{e·j} for each root exponent e. The root α⁰ contributes
  one GF(16) row and every other root two, which gives R rows.
* The first R columns form H_r and the next K columns form H_l. Then A = H_r⁻¹·H_l, by
  Gauss–Jordan elimination over GF(16).

For K = 16 this reproduces the published matrices of the (19, 16, 3) and (23, 16, 5) codes
exactly, and the testbenches check it against them. Any other K up to 64 works the same way. The
default system needs K = 17, because the CPC nibble travels inside the RK word; the published
matrices do not cover that size.

## Single-error correction with the ECLT (`rk_decoder`)

This is the part that needs the most care. The key fact is that for a single error of value e at
position i, s = e·hᵢ, where hᵢ is column i of H = (A | I). Normalising the syndrome removes e and
leaves a fingerprint of the position:

1. **Syndrome.** Invert z_x, multiply by A, add z_w: this gives s.
2. **Normalise** (`rk_sj_norm`). s_j is the first nonzero of the first three syndrome symbols
   (1 + m with m = 2). Then ŝ = (s₀, s₁, s₂) / s_j.
3. **Look up** (`rk_eclt`). Each table row holds the normalised first three symbols of one column
   hᵢ and a coefficient gᵢ, the inverse of that column's leading nonzero symbol. ŝ is compared
   with every row in parallel; the match gives the location i.
4. **Error value** (`gf16_mul`): e = s_j · gᵢ.
5. **Verify** (`rk_syn_update`): s − e·hᵢ must be zero. If it is not, more than one symbol is
   wrong.
6. **Correct.** yᵢ ⊕= e (or z_wᵢ ⊕= e for a redundancy position), then invert back.

The table has K+R rows of 12 + 4 bits. A full syndrome table would need (q−1)·n rows for distance
3, and tens of thousands of rows for distance 5 if it also covered double errors. Only the first
three syndrome symbols are used, even at distance 5: they already identify the position uniquely
for the sizes used here, and step 5 uses the full syndrome to reject everything else.

Decoder outputs:

| flag         | meaning                                                             | event class |
|--------------|---------------------------------------------------------------------|-------------|
| `err`        | syndrome ≠ 0                                                        |             |
| `corrected`  | a single symbol was located, verified and corrected                 | C2 (or C4)  |
| `suspicious` | syndrome ≠ 0 but no table row fits or the residual syndrome ≠ 0     | C3          |

A word that is `suspicious` passes through unchanged. The decoder cannot tell a right correction
(C2) from a wrong one (C4), nor a clean word from an error that maps one codeword onto another
(C1). Telling those apart is the outer code's job.

Worked example (distance 3, the published one). The received word has data
9,11,9,3,11,**3**,2,2,12,7,1,13,1,9,3,5 and redundancy (0, 8, 10), and its symbol 5 should be 14:
* s = (3, 1, 15), s_j = 3, ŝ = (1, 14, 5).
* The table gives i = 5 and g = 10, so e = 3·10 = 13.
* y₅ = 3⁻¹ = 14, and 14 ⊕ 13 = 3. Inverting back gives 3⁻¹ = 14, the correct symbol.
* The residual syndrome is (3, 1, 15) − 13·(12, 4, 9) = 0.

`rk_decoder_tb` checks this example and the distance-5 one.

Two corner cases:
* **Redundancy symbols 3 … R−1 at distance 5.** Their columns are zero in the first three
  symbols, so they have no table row. The decoder recognises this case (first three syndrome
  symbols zero, exactly one nonzero symbol in the rest) and corrects it directly.
* **Duplicate rows at K = 33, D = 5.** Two positions (14 and 27) share a row there. A single
  error at either position is then reported as suspicious, never miscorrected. The table rows
  are unique for every configuration listed below.

## Outer code and fault manager

`cpc_encoder` computes RO outer-code bits (RO = 4, 8, 12 or 16) on the *predicted* data:
* The word is cut into RO-bit blocks b₀ … b_{T−1}, read as elements of GF(2^RO).
* o = b_{T−1}³ + b₀b₁ + b₂b₃ + …
* If one block is left over, it is multiplied by b_{T−1}.

A single block gives the plain cubic code, whose masking probability is 2^{1−RO}. These o bits,
taken as RO/4 nibbles, are appended to the RK information word. So a fault in the CPC bits is
itself corrected by the RK code.

`fault_manager` registers one verdict per word, in this priority order:

| `event_class`   | condition                                                  | alarm | `out_data` |
|-----------------|------------------------------------------------------------|:-----:|------------|
| `EV_SUSPICIOUS` | RK found an uncorrectable error                            | 1     | 0          |
| `EV_CPC_FAIL`   | RK accepted the word, CPC recomputation disagrees (S1)     | 1     | 0          |
| `EV_SYSTEM`     | codes quiet, a tamper/anomaly/consistency input is raised  | 1     | 0          |
| `EV_CORRECTED`  | one symbol corrected, CPC agrees                           | 0     | word       |
| `EV_CLEAN`      | nothing                                                    | 0     | word       |

Two 16-bit saturating counters record corrected words and alarms. The critical events are those
that RK missed (C1) or miscorrected (C4). Such an event still leaves with no alarm only if the
CPC also matches: class S2.

## Two decoders for byte-oriented ciphers

For AES-128 (32 nibbles) there are two options:
* `NDEC = 1`: a single 33-symbol RK code.
* `NDEC = 2`: two independent RK codes. Decoder 0 covers the lower nibble of every byte plus the
  CPC nibbles, and decoder 1 covers the upper nibbles. A fault in one S-box byte then looks like
  a single error to each decoder.

The two verdicts merge as follows: any suspicious gives suspicious; otherwise any correction
counts as a correction. The CPC check then catches the case where one half silently masked its
error while the other half corrected.

## Top level: `rk_cpc_top`

```
 pred_x ─┬─► cpc_encoder ─ o ─┬──────────────► (o ⊕ inj_o) ─┐
         └──────────────────► rk_encoder ─ w ─► (w ⊕ inj_w) ─┤
 comp_x ─────────────────────────────────────────────────────┴─► rk_decoder ─► fault_manager ─► out_data, alarm
                                             tamper, anomaly, consistency_err ─┘      (1 register stage)
```

| parameter | default | meaning                                         |
|-----------|--------:|-------------------------------------------------|
| `K_NIB`   | 16      | data nibbles (64-bit state)                     |
| `D`       | 5       | RK distance, 3 or 5                             |
| `RO`      | 4       | CPC bits, multiple of 4, at most 16             |
| `NDEC`    | 1       | RK decoders, 1 or 2 (2 needs even `K_NIB`)      |
| `CW`      | 16      | event counter width                             |

* `comp_x` is the output of the protected component, for example a cipher round. The component
  itself is not part of this RTL.
* `pred_x` is the value the prediction side computed for the same operation; both predictors
  encode it.
* `inj_w` / `inj_o` XOR additive errors onto the redundancy. They exist for fault emulation and
  must be tied to zero in use.
* Everything up to the fault manager is combinational. A word presented with `in_valid` appears
  with `out_valid` on the next rising edge, and a new word can be accepted every cycle.
* Reset is synchronous and active low.
* The combinational RK outputs `rk_err` and `rk_syndrome` are also brought out.

## Files

| file | role |
|------|------|
| `rtl/rk_pkg.sv` | GF(16)/GF(256)/GF(2^n) arithmetic, generation of A and of the ECLT rows, `event_t` |
| `rtl/gf16_inv_layer.sv`, `rtl/gf16_mul.sv` | inverter box, multiplier |
| `rtl/rk_amul.sv`, `rtl/rk_encoder.sv` | A·y; RK predictor |
| `rtl/rk_sj_norm.sv`, `rtl/rk_eclt.sv`, `rtl/rk_syn_update.sv`, `rtl/rk_decoder.sv` | ECLT decoder |
| `rtl/cpc_encoder.sv`, `rtl/cpc_checker.sv`, `rtl/fault_manager.sv` | outer code, system level |
| `rtl/rk_cpc_top.sv` | the whole protected subsystem |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/tb_ref_pkg.sv` | independent reference: log-table GF(16), published A₅ and ECLTs |
| `tb/rk_campaign.sv`, `tb/rk_workload_tb.sv` | fault campaigns over all evaluated configurations |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rk_pkg.sv tb/tb_ref_pkg.sv \
          tb/rk_cpc_top_tb.sv --top-module rk_cpc_top_tb -Mdir obj && obj/Vrk_cpc_top_tb
```

Replace the testbench name to run another one; the rest is found through `-Irtl -Itb`.

* `rk_cpc_top_tb` runs the default configuration end to end, with one word per clock. It first
  triggers every mechanism at least once:
  * correction of a data, CPC or redundancy symbol;
  * a multi-symbol error;
  * an RK-invisible codeword swap caught by the CPC;
  * a forced RK miscorrection caught by the CPC;
  * each system input;
  * counter saturation.

  It then runs 1,000,000 random fault events and takes about half a minute.
* `rk_workload_tb` runs 100,000 events on each of eight configurations in parallel, in about a
  minute.

## Fault-campaign results

Each data bit flips independently with probability ¼, the crossover probability measured on real
clock-glitch faults. This gives on average 16 (64-bit) or 32 (128-bit) bit flips per event, so
errors have high multiplicity. Results from `rk_workload_tb` (100,000 events each; the default
configuration is also run with 1,000,000 in `rk_cpc_top_tb`):

| state | D | dec | RO | C1 | C3 | C4 | CPC catches (S1) | CPC misses (S2) | S2 of all events |
|------:|--:|----:|---:|---:|---:|---:|-----------------:|----------------:|-----------------:|
| 64    | 3 | 1 | 4  | 0.025 % | 92.7 % | 7.28 % | 93.9 % | 6.1 % | 0.45 % |
| 64    | 3 | 1 | 8  | 0.021 % | 92.3 % | 7.72 % | 99.6 % | 0.4 % | 0.031 % |
| 64    | 3 | 1 | 12 | 0.024 % | 91.9 % | 8.12 % | 100 % | 0 | 0 |
| 64    | 3 | 1 | 16 | 0.025 % | 91.6 % | 8.34 % | 100 % | 0 | 0 |
| 64    | 5 | 1 | 4  | 0 | 100 % | 0 | — | 0 | 0 |
| 128   | 3 | 1 | 4  | 0.023 % | 86.7 % | 13.3 % | 93.8 % | 6.2 % | 0.83 % |
| 128   | 3 | 2 | 4  | 0 | 99.5 % | 0.54 % | 94.7 % | 5.3 % | 0.029 % |
| 128   | 5 | 2 | 4  | 0 | 100 % | 0 | — | 0 | 0 |

C1 is an error that leaves a zero RK syndrome, C3 a detected uncorrectable error and C4 a
miscorrection. S1 and S2 split the C1 and C4 events by the CPC verdict.
The last column is the share of all fault events that leave the subsystem wrong and without an
alarm. The published 64-bit circuits lose 0.41–0.46 % of all events at RO = 4, 0.025–0.029 % at
RO = 8 and about 0.002 % at RO = 12. One decoder over AES-128 loses 0.83 %. Those rates match
the table above, where RO = 12 would expect about two events in 100,000.

Single-symbol errors (C2) essentially never occur with such dense errors; directed tests cover
them instead. For one decoder, the C3/C4 split and the roughly 94 % / 6 % CPC split at RO = 4 are
close to the published FPGA measurements. Misses fall steeply as RO grows, and distance 5 never
lets an erroneous word out. The two-decoder distance-3 case comes out clearly better here than in
the published measurements, whose physical errors are not independent bit flips.

## Where this design departs or chooses

* **The protected component and the predictors' copy of it are not included.** Their values
  enter as `comp_x` and `pred_x`. Tamper detectors, anomaly monitors and consistency checks
  enter as plain flags.
* **The CPC construction is this design's own.** The publication names the code and its
  cubic ground code but does not give its structure. RO is limited to multiples of 4, whereas
  the CPC itself allows any width.
* **No CPC correction.** The outer code only detects.
* **Fault-manager policy.** The verdict priority, the withholding of alarmed words, the
  counters, the one-cycle register stage, the valid-only handshake and the synchronous reset are
  choices of this design.
* **Correction only after verification.** The RK decoder corrects only when the syndrome update
  confirms a single error. A suspicious word passes through uncorrected (and is then withheld by
  the fault manager).
* **ECLT coefficient.** gᵢ is the *inverse* of the column's leading symbol. This is the reading
  under which e = s_j·gᵢ and the published table and example agree.
* **Column order of the BCH matrix.** A is built with the redundancy columns first. That order
  reproduces the published matrices, although the published formula writes the data columns
  first.
* **Redundancy positions 3 … R−1 at distance 5** are corrected without the table (see above).
* **Two-decoder layout.** Lower nibbles go to decoder 0, and the CPC nibbles ride with decoder 0.
* **Not built:** the full-syndrome-table decoder and the linear BCH version, which the scheme
  is compared against, and triple modular redundancy.

# Correction masking: an SET tolerant ECC syndrome decoder

Memories are protected by error correction codes. When a word is read, a
syndrome decoder recomputes the parity checks, compares the syndrome with
the syndromes of the correctable error patterns, and flips the data bits the
matching pattern names. That decoder is combinational logic. A single event
transient (SET) inside it can flip a data bit of a word that was read
correctly. Triplicating the decoder and voting (TMR) fixes this, but it costs
about three times the area and power, and the voter adds delay.

Correction masking does the job with a few gates. It rests on the usual
single-event assumption: within one cycle there is either an upset in the
stored word or a transient in the decoder, never both. So when the decoder
suffers a transient, its input word is correct and its true syndrome is
zero. The decoder therefore lets a correction through only when the syndrome
is non-zero:

    corr_en   = s_1 | s_2 | ... | s_r
    d_i_corr  = d_i ^ (e_i & corr_en)

This repository holds synthesizable SystemVerilog for that decoder. It is
parameterized over five code families (SEC-DED, SEC-DAEC, 3-bit burst,
4-bit burst and double-error-correcting BCH) and three data widths
(16, 32 and 64 bits).

## Structure

```
 data_in (d_1..d_k)   parity_in (p_1..p_r)
        \                  /
   +----------------------------------+
   | cm_syndrome                      |  r separate cm_parity_check
   |  [check 1] [check 2] ... [check r]  instances, no shared gates
   +----------------------------------+
        | s_1..s_r             |
   +---------------------+   +------------+
   | cm_pattern_compare  |   | cm_corr_en |  r-input OR
   +---------------------+   +------------+
        | e_1..e_k             | corr_en
   +----------------------------------+
   | cm_masked_correction             |  AND with corr_en, then XOR
   +----------------------------------+
        | data_out (d_1-corr..d_k-corr)
```

| module | role |
|---|---|
| `cm_decoder` | top level; wires the four stages together |
| `cm_syndrome` | one `cm_parity_check` per syndrome bit, each fed its own row of H |
| `cm_parity_check` | one parity equation, `s_i = ^(codeword & row_i)`; marked `keep_hierarchy` |
| `cm_pattern_compare` | one equality comparator per correctable pattern that contains each data bit, ORed into `e_i` |
| `cm_corr_en` | OR of all syndrome bits |
| `cm_masked_correction` | `data_out = data_in ^ (e & {K{corr_en}})`, with an assertion that nothing flips while `corr_en` is low |
| `cm_pkg` | code families, check-bit counts and the parity check matrix builder |

The whole decoder is combinational. It has no clock, no reset and no
handshake. The output is valid one propagation delay after the input.

## Why a single transient cannot corrupt the output

This argument is the core of the design. Each part of the RTL exists to keep
it true. There are two cases of a single event.

**An upset in the stored word, with no transient.** The decoder works like
an ordinary syndrome decoder. The syndrome is non-zero, so `corr_en` is 1
and the error vector goes through unchanged.

**A transient in the decoder, with a correct word.** The true syndrome is
zero. The transient can be in one of three places:

1. *Pattern comparison.* Any `e_i` may go high. But every syndrome bit is 0,
   so `corr_en` is 0 and the AND gates block all of them.
2. *One parity check.* The checks share no logic, so a transient can corrupt
   at most one syndrome bit. The syndrome is then one-hot, and `corr_en`
   goes high. That does no harm only if a one-hot syndrome never names a
   data bit. For that, every code here is **systematic**: the H columns of
   the check bits are unit vectors. A one-hot syndrome then means "error on
   check bit p_j". Since no correctable pattern made only of data bits can
   have a unit syndrome, `e` stays all zero.
3. *The OR gate, AND gates or XOR gates.* These are not protected. They are
   meant to be built from radiation-hardened cells, the same assumption a
   TMR design makes for its voter.

Two things must survive synthesis for this to hold:

- **The parity checks must stay separate.** A synthesis tool will happily
  merge common XOR subtrees of different checks, and a transient in a shared
  gate would then corrupt several syndrome bits. `cm_parity_check` carries
  `(* keep_hierarchy *)` for this reason. Use the equivalent setting of your
  own flow, and do not flatten these instances.
- **The H matrix must keep identity columns for the check bits.** If you
  swap in another code, keep it systematic, or a single bad syndrome bit can
  cause a miscorrection.

What masking does not cover: an upset and a transient in the same cycle,
and transients in the masking and correction gates themselves.

## Codes and parity check matrices

Codeword bit `j` has H column `H[j]`, which is the syndrome of a single error
on that bit. Bits 0..r-1 are the check bits p_1..p_r, with unit columns.
Bits r..r+k-1 are the data bits d_1..d_k. This order also defines which bits
count as adjacent for the burst codes: a burst may run from the last check
bits into the first data bits. `cm_decoder` builds the codeword as
`{data_in, parity_in}`.

`cm_pkg::build_h(code, k)` computes each matrix at elaboration time:

| `CODE` | corrects | data columns | r for k = 16 / 32 / 64 |
|---|---|---|---|
| `CODE_SEC_DED` | any single error (double errors leave the syndrome non-zero) | every weight-3 vector in increasing order, then weight-5 (odd-weight columns) | 6 / 7 / 8 |
| `CODE_SEC_DAEC` | single errors and double adjacent errors | greedy search, bursts of length <= 2 | 6 / 7 / 8 |
| `CODE_BURST3` | any error within 3 adjacent bits | greedy search, bursts of length <= 3 | 7 / 9 / 9 |
| `CODE_BURST4` | any error within 4 adjacent bits | greedy search, bursts of length <= 4 | 9 / 10 / 11 |
| `CODE_BCH_DEC` | any one or two errors | x^j mod g(x), g = m1·m3 over GF(2^m), m = 5 / 6 / 7 | 10 / 12 / 14 |

The greedy search works like this. Each new data column takes the smallest
non-zero value such that every burst ending at that column has a syndrome
not yet used, counting zero as used. Bursts lying wholly in the check bits
are counted as used from the start. This gives distinct syndromes for all
correctable patterns. The r in the table is the smallest with which the
search succeeds.

The BCH generator polynomials are the standard ones:

| m | primitive polynomial | g(x) in hex |
|---|---|---|
| 5 | x^5+x^2+1 | 0x769 |
| 6 | x^6+x+1 | 0x1539 |
| 7 | x^7+x^3+1 | 0x4377 |

The codes are shortened to n = k + 2m bits.

These matrices are this design's own. They correct the same classes of
errors as the published SEC-DED, SEC-DAEC, 3-bit and 4-bit burst codes the
technique was first evaluated on, but they are not bit-for-bit those codes.
To use a particular published code, replace its branch in `build_h` (keep
the check-bit columns as unit vectors) and, if needed, its entry in
`check_bits`.

The SEC-DED variant flags no double errors. The decoder outputs corrected
data only. If you need a detection flag, add it next to `corr_en`; it is
not part of this design.

## Interface

```systemverilog
cm_decoder #(
  .CODE(cm_pkg::CODE_SEC_DED),   // code family
  .K   (32)                      // data bits: 16, 32 or 64
) u_dec (
  .data_in  (d),   // [K-1:0]  d_1 is bit 0
  .parity_in(p),   // [R-1:0]  R = cm_pkg::check_bits(CODE, K)
  .data_out (q)    // [K-1:0]  corrected data
);
```

The default is SEC-DED with k = 32, which is a (39,32) code. The encoder is
not part of this design. To write a word, store
`p = cm_tb_pkg::encode(H, d, K, R)`. Because the check-bit columns are unit
vectors, this is simply the syndrome of the data bits alone.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line.

| testbench | what it checks |
|---|---|
| `tb_cm_parity_check` | one equation against a bit-by-bit reference, for two masks |
| `tb_cm_syndrome` | zero syndrome for encoded words, the right column for each single error, and a column-by-column reference for random words (SEC-DED k=32, BCH k=16) |
| `tb_cm_pattern_compare` | every correctable pattern of all five codes at k = 16, plus SEC-DED at k = 32, gives exactly its data bits in `e`. A zero syndrome and every one-hot syndrome give `e = 0` |
| `tb_cm_corr_en` | all 2^7 syndromes |
| `tb_cm_masked_correction` | masked and unmasked correction with random vectors |
| `tb_cm_decoder` | the default decoder end to end, described below |
| `tb_cm_workloads` | the same end-to-end checks for all 15 code and width configurations, plus SEC-DED double errors |

`tb_cm_decoder` runs the default decoder end to end with 200 data words. It
applies every correctable error to each word. It then injects transients
into a correct word, either by forcing `e` to random non-zero values or by
forcing one syndrome bit at a time. The output must always equal the
original data, and the testbench counts each of these mechanisms.

`tb_cm_workloads` does the same for all 15 configurations, with an
exhaustive pattern list. For example, BCH at k = 64 has 3081 patterns. For
the SEC-DED codes it also applies every double error and checks that no
data bit is flipped: the error is detected (non-zero, even-weight syndrome)
but not miscorrected.

The transients are injected at RTL with `force`, at the two points a single
transient can reach: the `e` vector and one syndrome bit. This is not a
gate-level, timed injection campaign. It checks the logic of the masking,
not the pulse widths or the electrical masking.

To run a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cm_pkg.sv tb/cm_tb_pkg.sv tb/tb_cm_workloads.sv \
  --top-module tb_cm_workloads -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`. Elaboration takes a few
seconds per matrix. `tb_cm_workloads` takes under a minute to build and
about a second to run.

## Known departures and limits

- The parity check matrices are constructed here, not copied from the
  published codes. The check-bit counts may differ from those codes.
- There are no baseline designs. A plain decoder is `cm_decoder` with
  `corr_en` tied to 1. A TMR version would be three such decoders and a
  bitwise majority voter; neither is included.
- Area, delay and power depend on the cell library and the synthesis
  settings, and are not characterised here. The added cost is one r-input OR
  gate, k AND gates, and the loss of logic sharing between parity checks.

# Serial (23,12) Golay decoder with a split error-pattern table

The binary Golay code protects 12 message bits with 11 parity bits and
corrects any three or fewer errors in the 23-bit word. A plain syndrome
decoder needs a table from all 2^11 = 2048 syndromes to error patterns. This
design avoids storing most of that table. It sends each syndrome down one of
three paths:

1. **Direct.** If all errors are in the 11 parity bits, the syndrome *is*
   the error pattern. These syndromes have at most three ones. A weighting
   circuit (a population count) spots them, and the message passes through
   unchanged.
2. **Generated.** If the last message bit (received bit 12) is wrong, plus
   at most two parity bits, the syndrome is a fixed constant Q XOR the
   parity errors. Q is the syndrome of a lone error in bit 12. A pattern
   generating circuit XORs the syndrome with Q and weighs the result. A
   weight of two or less identifies this family, and the pattern follows
   directly.
3. **Stored.** Every other correctable pattern comes from a stored table,
   indexed by syndrome.

The three candidate patterns are merged with OR gates. At most one of them
is non-zero. The message error pattern is then XORed onto the saved message.

The hardware is serial: one received bit per clock, words back to back, and
one corrected 12-bit message out every 23 clocks.

## Code conventions

- **Bit numbers.** Bits are numbered 1..23 in the order they arrive. Bits
  1..12 are the message and bits 13..23 the parity. The example word
  "message 000000000001, parity 00000101000" is therefore the all-zero
  codeword with errors in bits 12, 18 and 20.
- **Polynomial form.** Bit *b* is the coefficient of x^(23-b). The message
  occupies degrees 22..11 and the parity degrees 10..0. Every vector in
  the RTL is indexed by degree: `v[k]` is the coefficient of x^k.
  - `message_t` bit [11] is received bit 1.
  - `message_t` bit [0] is received bit 12.
- **Encoding.** Encoding is systematic: parity = x^11·m(x) mod g(x).
- **Generator polynomial.**
  g(x) = x^11 + x^9 + x^7 + x^6 + x^5 + x + 1 (`golay_pkg::GEN_POLY`,
  12'hAE3).
  - The reciprocal polynomial x^11 + x^10 + x^6 + x^5 + x^4 + x^2 + 1
    (12'hC75) generates the mirror-image Golay code. It can be passed as
    parameter `G` of `golay_decoder`.
  - Q, the stored table and the syndrome taps are all derived from `G` at
    elaboration.
  - The testbench reference model defaults to 12'hAE3 and takes the
    generator as an optional argument; `tb_golay_decoder_recip` runs the
    decoder built for 12'hC75.

## Block structure

```
din ─► sync FF ─┬─► saving circuit (23-bit delay line) ── message[11:0] ──┐
                │                                                         ▼
                └─► syndrome calculator ─► look-up table ─► msg_err ─► correction ─► msg_out
                    (÷ g(x), 11 FFs)       ├ weighting (≤3 ?)                (XOR + register)
                                           ├ pattern generating circuit
                                           ├ stored table (2048 × 13 bit)
                                           └ OR merge
```

| Module | Role |
|---|---|
| `golay_pkg` | Sizes, types, the `lut_path_e` enum, and division helpers used at elaboration |
| `golay_syndrome_calc` | 11-stage division register. There is an XOR in front of each stage whose g coefficient is 1, six in all. |
| `golay_saving_circuit` | 24 flip-flops: 1 synchronises the input, 23 hold the word. Its message output is the first 12 received bits. |
| `golay_weighting` | Population count of 11 bits (six half adders, five 4-bit adders) compared with `THRESH` |
| `golay_pattern_gen` | XOR with Q, a weighting circuit with threshold 2, and a row of AND gates |
| `golay_pattern_rom` | Stored families: syndrome → {stored flag, 12-bit message error} |
| `golay_lookup_table` | Direct / generated / stored decision and OR merge |
| `golay_correction` | Saved message XOR error pattern, registered |
| `golay_decoder` | Top: framing counter, wiring, status outputs |

## The look-up table in detail

The Golay code is perfect. The 2048 patterns of weight ≤ 3 have 2048
distinct syndromes, which cover every possible syndrome. The three paths
split them as follows:

| Path | Patterns | Count |
|---|---|---|
| direct | errors only in parity bits (weight 0..3 over 11 bits) | 1 + 11 + 55 + 165 = 232 |
| generated | bit 12 plus 0..2 parity errors | 1 + 11 + 55 = 67 |
| stored | everything else with a message error | 1749 |

**Why the paths never overlap.** Two different patterns of weight ≤ 3 would
differ by a codeword of weight ≤ 6, and the minimum distance is 7. So:

- A syndrome of weight ≤ 3 is never also in the generated family.
- The pattern generator's threshold must be two, not three. A residual of
  weight three would be a four-error pattern that belongs to another
  syndrome's leader.

**What the table holds.** `golay_pattern_rom` computes its contents at
elaboration time. It enumerates every pattern of weight ≤ 3. It forms each
syndrome as the XOR of the single-bit syndromes x^k mod g(x). It stores the
12-bit message part for the stored families only. All other entries are
zero, so synthesis keeps only the stored part.

**Width and output.**
- Only the message part is stored, because only the message is output.
- The parity part of a stored pattern is not needed. `par_err` of
  `golay_lookup_table` is zero on that path.

**The `path` output.** It reports which path answered. `PATH_NONE` cannot
occur. The top checks this with an assertion.

## Timing and interface of `golay_decoder`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, one received bit per cycle |
| `reset` | in | 1 | synchronous, active high. Also sets the word boundary. |
| `din` | in | 1 | received bits, bit 1 of each word first |
| `msg_out` | out | 12 | corrected message, received bit 1 in [11] |
| `msg_valid` | out | 1 | high for one clock per word |
| `err_pattern` | out | 12 | message error pattern that was applied |
| `syndrome` | out | 11 | syndrome of that word |
| `path` | out | 2 | `PATH_DIRECT`, `PATH_GENERATED` or `PATH_STORED` |

**Word boundaries.**
- The sample of `din` taken at the first clock edge with `reset` low is bit
  1 of the first word. Words then follow with no gaps.
- A modulo-23 counter marks the end of each word.
- Asserting `reset` drops a partial word and starts a new word boundary.

**Pipeline.** Say the last bit of a word is on `din` in cycle *t*.

| Cycle | What happens |
|---|---|
| t+1 | The bit is captured by the synchronising flip-flop. |
| t+2 | The bit enters the syndrome register and the delay line. The syndrome is complete and the look-up is combinational. |
| t+3 | `msg_out`, `err_pattern`, `syndrome` and `path` are registered, and `msg_valid` is high. |

**Overlap.** The next word's first bit enters the syndrome register in the
same clock that the previous syndrome is used. That register restarts
itself with its `start` input, so no idle cycle is needed.

## Departures and design choices

Taken from the source description:
- the block partition;
- the 11-flip-flop / 6-XOR syndrome register;
- the 24-flip-flop saving circuit;
- the six-half-adder / five-adder weighting circuit;
- the XOR-with-constant plus AND-gate pattern generator;
- the OR merge and the XOR correction;
- the 12-bit message output;
- the worked example (message 000000000001, errors in bits 12, 18 and 20).

Choices of this implementation:
- **Q.** The generator constant is the syndrome of received bit 12
  (x^11 mod g, 11'h2E3 for the default polynomial). The threshold is two.
- **Stored table.** The table's contents and its form, a constant array
  computed from g(x) and read asynchronously.
- **Weighting tree.** How the half adders are paired in the adder tree.
- **Framing and control.** Framing by a counter after reset, synchronous
  active-high reset, the `start`/`shift` inputs and the registered output.
- **Status outputs.** `err_pattern`, `syndrome` and `path`.

Not modelled:
- physical properties: clock rate (about 55–56 MHz was reported for a
  0.25 µm implementation), area and power;
- the pad ring.

The RTL has no timing constraints. At one bit per clock, the critical path
is the look-up between the syndrome register and the output register.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values come
from `tb/golay_ref_pkg.sv`. It does its own polynomial division, systematic
encoding, and brute-force nearest-codeword decoding over all 4096 codewords.

| Testbench | What it covers |
|---|---|
| `tb_golay_weighting` | all 2048 inputs, thresholds 3 and 2 |
| `tb_golay_syndrome_calc` | 300 random words back to back, with idle cycles inside some words |
| `tb_golay_saving_circuit` | random stream with random shift enables |
| `tb_golay_pattern_gen` | all syndromes with enable on and off. Exactly the 67 generated-family syndromes must hit, with the right pattern. |
| `tb_golay_pattern_rom` | all 2048 coset leaders. Checks that syndromes are unique, and the stored entries. |
| `tb_golay_lookup_table` | all 2048 coset leaders. Checks pattern, parity part, path, and the counts 232 / 67 / 1749. |
| `tb_golay_correction` | random load / data |
| `tb_golay_decoder` | end to end at default parameters |
| `tb_golay_decoder_recip` | end to end with `G` = 12'hC75, 150 words over all three paths |

The end-to-end test `tb_golay_decoder`:
- starts with the example word (expects message 0, error pattern 001, path
  generated);
- then sends 400 random words with 0–3 errors, spread over the three paths;
- asserts `reset` in the middle of a word once;
- checks every output against the brute-force decode and the injected
  errors;
- checks the 3-clock latency and the 23-clock spacing;
- fails if any path or any error count 0..3 never occurred.

To run a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/golay_pkg.sv tb/golay_ref_pkg.sv tb/tb_golay_decoder.sv \
  --top-module tb_golay_decoder -o sim
./obj_dir/sim
```

`-y` lets Verilator find each module in the file of the same name. The two
packages are listed first because they are imported, not instantiated.
Replace the testbench file and the top module to run another test.

## Changing the design

- **Generator polynomial.** Set parameter `G`. All constants follow from
  it. The reference model's default is `REF_G` in `tb/golay_ref_pkg.sv`;
  `tb_golay_decoder_recip` shows how to pass another generator to it.
- **Other code sizes.** The package sizes (`N`, `K`, `R`, `T`) are those of
  the (23,12) code. The weighting circuit's tree is written for 11 inputs,
  and the pattern-generator logic assumes t = 3. Other codes need those two
  blocks reworked.

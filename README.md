# Fuzzy extractor for PUF key storage, with a scan-free self-test

A physical unclonable function (PUF) gives every chip a noisy fingerprint.
A *fuzzy extractor* turns that fingerprint into a stable 128-bit
cryptographic key:

* **Enrollment** (once). A random seed is encoded with an error-correcting
  code and XORed with a PUF reading. The result is *helper data*, which is
  kept in an external non-volatile memory and may be public.
* **Reconstruction** (every power-up). A fresh, noisy PUF reading is XORed
  with the helper data. This gives the code word plus the PUF noise. The
  decoders remove the noise and recover the seed. A hash compresses the
  seed into the key.

The second idea in this RTL is how the block is tested in production. A
scan chain could be abused to read the key out, so there is none. In test
mode the fuzzy extractor's own blocks are joined into a loop, a *daisy
chain*. The hash LFSR produces the test patterns. The patterns pass through
every encoder and decoder. The hash accumulator folds all the responses
into one 128-bit signature, which is compared with a known-good value. In
test mode the PUF, the seed and the helper-data memory are never used, so
no secret can leave the chip.

## Data flow and sizes

One key is handled in **86 rounds**. Each round carries 12 seed bits and
264 PUF / helper-data bits. In total that is 1032 seed bits and 22704 PUF
bits (2.8 kB).

```
 enrollment:      seed(12) -> Golay encoder -> GE_O(24) -> repetition encoder
                  -> RE_O (264 serial) -> XOR PUF -> helper data
                  seed(12) -> hash                       (so enrollment also yields the key)
 reconstruction:  PUF XOR helper data -> RD_I (264 serial) -> repetition decoder
                  -> GD_I(24) -> Golay decoder -> HF_I(12) -> hash -> key(128)
 self-test:       hash LFSR[11:0] -> Golay enc -> repetition enc -> [SISR] ->
                  repetition dec -> Golay dec -> hash accumulator -> (next round)
```

Error correction has two layers:

1. **Repetition code (11x).** Each of the 24 Golay bits is sent 11 times.
   The repetition decoder takes a majority vote, so up to 5 wrong copies
   in a group of 11 are corrected.
2. **Extended Golay code [24,12,8].** This corrects up to 3 wrong bits
   among the 24 majority results.

So a round survives any noise that leaves at most 3 of its 24 groups with
6 or more wrong copies.

## The blocks

| module | job | latency (edges from start to done) |
|---|---|---|
| `golay_encoder` | appends 12 parity bits, p = m·B | 2 |
| `repetition_encoder` | bit counter × repetition counter, serial out with valid/ready | 267 |
| `peripheral_circuitry` | mode select; XOR with the PUF; PUF and helper-memory strobes; bit address | combinational |
| `repetition_decoder` | one counter, repetition counter, destination counter; one write cycle per group | 290 |
| `golay_decoder` | nine-state FSM that corrects up to 3 errors | 4 (no error) to 8 |
| `hash_function` | input buffer, 128-bit LFSR, 128-bit accumulator | 14 per word |
| `sisr` | 16-bit single-input signature register on the serial test loop | combinational |
| `fuzzy_extractor` | top level: instantiates all blocks and runs the 86-round sequence | ≈270 cycles per enrollment round, ≈310 per reconstruction or test round |

`fe_pkg` holds the shared constants, the mode and decoder-case enums, the
Golay matrix and the LFSR step.

### Golay decoder: the hardest part

The code is systematic. A received word r is split into its message half
`wm = r[11:0]` and its parity half `wp = r[23:12]`. B is the standard 12×12
parity matrix of the extended Golay code. It is symmetric and B·B = I. Row
i (for i < 11) is `11011100010` rotated by i, with a 1 appended. Row 11 is
eleven 1s followed by a 0. `fe_pkg::golay_b_row` computes the rows from
this rule, so no table is stored.

Two syndromes are formed. They have different meanings:

* `s1 = wm·B ^ wp` is the parity error as seen from the parity side.
* `s2 = s1·B = wm ^ wp·B` is the same information moved onto the message
  side.

For an error pattern (em, ep), `s1 = em·B ^ ep` and `s2 = em ^ ep·B`. Each
error case can therefore be spotted with a weight test. The FSM visits
the cases in a fixed order, one state per case, and stops at the first one
that fits:

| state | test | correction applied to wm | error situation |
|---|---|---|---|
| case (i) | s1 = 0 | none | no error |
| case (ii) | weight(s2) ≤ 3 | em = s2 | ≤3 errors in message, none in parity |
| case (iii) | weight(s2 ^ B[i]) ≤ 2 for some row i | em = s2 ^ B[i] | ≤2 in message, exactly 1 in parity (bit i) |
| case (iv) | weight(s1 ^ B[i]) ≤ 2 for some row i | em = bit i | exactly 1 in message, ≤2 in parity |
| case (v) | weight(s1) ≤ 3 | none | message clean, ≤3 in parity |

The code has minimum distance 8. So for 3 or fewer errors exactly one case
fits. Only the message needs correcting, because the parity bits are
dropped. The row searches of cases (iii) and (iv) test all 12 rows in one
cycle. The nine states are idle, syndrome, the five cases, correct and
done. An error-free word takes 4 edges, and a word that reaches case (v)
takes 8.

If no case fits (four or more errors), the received message bits are
passed on unchanged and `fail_o` is set. The top gathers these flags into
`uncorrectable_o` for a reconstruction. The key is then wrong.

### Hash (privacy amplification)

Each 12-bit word is examined bit by bit, bit 0 first. For a 1 bit, the
current 128-bit LFSR state is XORed into the accumulator. The LFSR
advances once per examined bit. After the 86th word the accumulator
becomes `key_o`.

* LFSR: Fibonacci form, taps 128, 126, 101 and 99, with a fixed nonzero
  seed (`fe_pkg::LFSR_SEED`). `clear_i` reloads the seed and zeroes the
  accumulator.
* Because the LFSR advances only while bits are examined, the key depends
  only on the word sequence, not on the timing between words.
* The key is linear in the seed bits. It is a simple compressor, not a
  cryptographic hash.

### Built-in self-test

In self-test mode (`mode_i = MODE_SELFTEST`) the sequencer runs rounds of
the loop shown above:

1. The pattern for a round is the low 12 LFSR bits.
2. The encoder and decoder streams are joined inside `peripheral_circuitry`.
3. Each decoded word is hashed, which moves the LFSR on to the next pattern
   and folds the response into the accumulator.

**Why the SISR.** In the plain loop the Golay decoder only ever receives
valid code words. All its error cases, which are most of its logic, are
never exercised. The testbench confirms this: every one of the ≈481
rounds of a plain-loop test is case (i). The SISR sits on the one-bit line
between the repetition encoder and the repetition decoder. It scrambles
the stream: each output bit is the input XORed with the register's top
bit, and that feedback bit shifts into the register through the
polynomial x^16 + x^12 + x^5 + 1. The majority words that reach the Golay
decoder are then close to random. About 57% of them are correctable, and
they fall into every case, including the four-error failure. A SISR on a
serial line costs far less area than a 24-bit MISR on the parallel Golay
bus, and it randomises the stream just as well, so only the SISR is built.

**Test length and modes.**

* The test runs until the first round boundary at or after `TEST_CYCLES`
  cycles (default 150 000). `signature_o` / `signature_valid_o` then give
  the accumulator.
* `sisr_start_i` picks when the SISR joins the loop: at the first round
  that starts at or after that cycle.
  * `0` puts the SISR in the loop from the start.
  * `32'hFFFF_FFFF` runs the plain daisy chain.
  * `37500` runs the plain loop for a quarter of the budget and then adds
    the SISR.
* The golden signature for each setting comes from simulating the
  fault-free RTL. The testbench prints the values for the three settings
  above.
* An assertion in the top checks that the PUF, the seed and the
  helper-data ports stay idle during self-test. `key_o` stays zero.

## Top-level interface (`fuzzy_extractor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start_i`, `mode_i` | in | 1, 2 | start an operation in `MODE_ENROLL`, `MODE_RECONSTRUCT` or `MODE_SELFTEST` |
| `busy_o`, `done_o` | out | 1 | operation running; one-cycle end pulse |
| `seed_req_o`, `seed_i` | out/in | 1, 12 | a seed word is taken in each cycle where `seed_req_o` is high |
| `addr_o` | out | 15 | bit address (round·264 + bit) for the PUF and the helper memory |
| `puf_rd_o`, `puf_bit_i` | out/in | 1 | PUF read; the bit at `addr_o` must be valid in the same cycle |
| `hd_rd_o`, `hd_bit_i` | out/in | 1 | helper-data read, same timing |
| `hd_we_o`, `hd_bit_o` | out | 1 | helper-data write at the rising edge |
| `key_o`, `key_valid_o` | out | 128, 1 | key after enrollment or reconstruction |
| `uncorrectable_o` | out | 1 | some reconstruction round had more than 3 Golay errors |
| `sisr_start_i` | in | 32 | self-test cycle from which the SISR is used |
| `sisr_active_o`, `test_rounds_o` | out | 1, 32 | self-test status |
| `signature_o`, `signature_valid_o` | out | 128, 1 | self-test signature |

Parameters: `ROUNDS = 86` and `TEST_CYCLES = 150000`. `ADDR_W` is derived
from `ROUNDS`.

Each operation takes about:

* enrollment: 23 200 cycles
* reconstruction: 26 600 cycles
* self-test: just over `TEST_CYCLES`

## Choices made here, and departures

* **Enrollment produces the key too.** Each seed word is also fed to the
  hash, so enrollment and reconstruction give the same key. This is
  checked.
* **Hash latency.** The hash takes 14 cycles per word (load, 12 bits,
  close). The block it models is quoted at 32 cycles, but with no internal
  schedule that explains the figure. Nothing else depends on this number.
* **Golay decoder latency.** It takes 4 to 8 cycles, within the stated
  maximum of 10.
* **Golay encoder insides.** The parity is computed as an XOR of matrix
  rows. The original encoder uses a loop over the code space; the code
  words are the same.
* **Choices of this design:**
  * the Golay matrix, bit layout and bit order (code bit 0 is sent first)
  * the LFSR polynomial and seed
  * the SISR width and polynomial
  * the valid/ready stall between the repetition encoder and decoder
  * the PUF / memory strobe interface
  * the end-of-test rule
  * the handling of uncorrectable words
  * the reset style
* **Sequencing.** Blocks run one after another and rounds do not overlap.
  A pipelined sequencer could overlap the Golay decoding and hashing with
  the next round's serial transfer.
* **Not included:**
  * the PUF itself, the helper-data memory and the random-seed generator.
    These are external; the top brings their ports out.
  * the MISR variants of the self-test.
  * fault-coverage measurement. The reported coverage of about 95% after
    50 000 cycles with the SISR comes from a stuck-at fault simulation of
    a gate-level netlist, and is not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against reference models in `tb/tb_ref_pkg.sv`, which are written apart
from the RTL. The Golay matrix there is given as literal rows, and
decoding is a brute-force search over all 4096 code words.

| testbench | what it checks |
|---|---|
| `tb_golay_encoder` | all 4096 messages; code-word weights (0, 8, 12, 16, 24); latency 2 |
| `tb_repetition_encoder` | stream contents, with and without stalls; latency 267 |
| `tb_repetition_decoder` | majority with 0–11 flipped copies, with and without input gaps; latency 290 |
| `tb_golay_decoder` | 3000 words with 0–4 errors: message, case and fail flag; every case seen; latency limits |
| `tb_hash_function` | six 86-word keys against the model; `prng_o`; key only after the last word; latency 14 |
| `tb_sisr` | output bits and state against the model; bypass; clear |
| `tb_peripheral_circuitry` | every mode's XOR and routing; idle strobes in self-test; address counting |
| `tb_fuzzy_extractor` | end to end at full size (see below) |

`tb_fuzzy_extractor` runs at the default parameters. It checks:

* enrollment: helper data bit for bit, and the key
* reconstruction with a clean PUF, with noise that reaches every decoder
  case and out-voted groups, and with one uncorrectable round
* three 150 000-cycle self-tests (plain loop, SISR, plain then SISR):
  signatures against a round-by-round model of the loop, where the SISR
  switches in and where the test ends, and that the ports stay isolated

It prints how often each mechanism occurred, and fails if one never does.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/fe_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_fuzzy_extractor.sv --top-module tb_fuzzy_extractor
./obj_dir/Vtb_fuzzy_extractor
```

Substitute any other `tb_<module>.sv` for a single block. Each testbench
ends with a line `TB_RESULT checks=N failures=M`. The full-size run takes
about a second.

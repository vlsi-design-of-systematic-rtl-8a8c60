# Odd-weight-column SEC-DED-SBD codec with odd-bit-per-byte correction

Main memories are often built from chips or cards that each supply `b` bits
of every word, called a *byte* here. When one chip fails, several bits of the
same byte can be wrong at once. A plain SEC-DED code corrects only single-bit
errors and detects double-bit errors. This codec implements a systematic
odd-weight-column SEC-DED code that also handles byte faults:

* it **corrects** any single-bit error and **any odd number of flipped bits
  inside one byte** (1 or 3 of 4 bits when `b = 4`);
* it **detects** double-bit errors anywhere in the word and **any even number
  of flipped bits inside one byte** (2 or 4 of 4).

The default configuration is the (64,56) code: 56 data bits in fourteen 4-bit
data bytes, plus 8 check bits in two 4-bit check bytes. The code is systematic,
so data bits pass through unchanged and encoding and decoding can run in
parallel with other work on the data. Both the encoder and the decoder are
purely combinational: a syndrome computed by XOR trees, a two-level decoder,
and one XOR per bit for the correction.

The code follows the published construction "C1" for odd-weight-column
SEC-DED-SBD codes with `r = 2b` check bits. The RTL is parameterised by `b`
and has been simulated at `b = 3, 4, 5`.

## The parity-check matrix

All arithmetic is over GF(2). A word `X` is a codeword when `H·Xᵀ = 0`. For
construction C1, `H` has `r = 2b` rows. Its columns come in byte groups that
form two mirror-image *modules*, M0 and M1:

```
          byte 0  ..  byte K0-1   byte K0 | byte K0+1 .. byte 2K0   byte 2K0+1
rows 0..b-1   [ H_1  ..  H_K0       0_b   |   I_b     ..   I_b        I_b  ]
rows b..2b-1  [ I_b  ..  I_b        I_b   |   H_1     ..   H_K0       0_b  ]
               <----------- M0 ---------> <------------- M1 ------------->
```

* `K0 = 2^(b-1) - 1`. This is the number of nonzero even-weight `b`-bit
  tuples.
* `H_i` is a `b x b` matrix whose `b` columns are all equal to the `i`-th
  nonzero even-weight tuple `h_i`. This tuple is the *byte identifier* of data
  byte `i` of each module.
* `I_b` is the identity and `0_b` is all zeros.
* Byte `K0` and byte `2K0+1` are the **check bytes**. Their columns are unit
  vectors, so each check bit is tied to exactly one syndrome row.

Each data column is an even-weight identifier plus a unit vector, so it has
odd weight. Each check column has weight one. The code therefore has only
odd-weight columns. For `b = 4` this gives `K0 = 7`, 16 bytes, `n = 64`,
`k = 56` and `r = 8`.

This RTL numbers the identifiers in ascending numeric order, with syndrome bit
`S_t` as bit `t` of the tuple. For `b = 4` the identifiers are `h_1..h_7` =
`0x3, 0x5, 0x6, 0x9, 0xA, 0xC, 0xF`. Any other assignment of the even-weight
tuples gives a code with the same properties. It would not interoperate with
this one, however, so an existing memory image needs the same order.

### Why decoding is simple

Suppose an odd number of bits flip in data byte `i` of M0, with error pattern
`e` (a `b`-bit word of odd weight). The columns of that byte have `h_i` in the
upper half and a unit vector in the lower half. Their sum over the flipped
bits is therefore:

* upper syndrome half `S[b-1:0] = h_i`, because `h_i` is added an odd number
  of times;
* lower syndrome half `S[2b-1:b] = e`: **the error pattern itself**.

For the check byte of M0 the upper half is `0` instead of an identifier. M1
is the mirror image: the lower half identifies the byte and the upper half
holds the pattern.

So an odd-weight error confined to one byte gives an odd-weight syndrome. One
half of that syndrome names the byte and the other half spells out which bits
to flip. An even number of flips in one byte gives a zero identifier half and
an even-weight, nonzero pattern half. Two single-bit errors in different bytes
give an even-weight syndrome. Either way, the total syndrome weight is even
and nonzero, so these errors are detected and never "corrected".

With C1 every even-weight half value (zero included) is a byte identifier, and
there are `2^(b-1)` odd patterns. So the two modules together use all
`2^(2b-1)` odd-weight syndromes, and **every odd-weight syndrome leads to a
correction**. A larger odd number of errors spread over several bytes (three
single-bit errors in three bytes, say) is outside the code's guarantee and can
be miscorrected. This is the same limit as for any SEC-DED code.

## Codeword layout

The codeword bit order follows the matrix: bit `c` belongs to byte `c / b`.
For the default `b = 4`:

| codeword bits | contents |
|---|---|
| 0 .. 27   | data bits 0 .. 27 (M0 data bytes 0..6) |
| 28 .. 31  | check bits c4 .. c7 (M0 check byte) |
| 32 .. 59  | data bits 28 .. 55 (M1 data bytes 8..14) |
| 60 .. 63  | check bits c0 .. c3 (M1 check byte) |

Check bit `c_t` is the bit whose column is the unit vector of row `t`. A
different order was possible: the usual "data first, check bits last" layout
of a systematic code is only a column permutation of this matrix. This layout
keeps every module a contiguous 32-bit half of the word, so that each half of
the decoder drives one half of the Bit Error Pointers.
`secded_sbd_pkg::data_pos` and `check_pos` give the mapping for any `b`. The
codec also presents the data and check bits on separate ports, so a user does
not need the layout except to store the codeword.

## Blocks

```
 enc_data ──► cbgen ──► enc_check ─┐
     └────────────────────────────┴─► enc_codeword

 dec_codeword ─► syngen ─► syndrome ─► syndrome_decoder ─┬─► bit pointers ─► errcorr ─► dec_corrected_cw
                                         ├ syndec         │                              ├─► dec_data
                                         │  ├ syndec_half I0 (bitdec × K0+1)             └─► dec_check
                                         │  └ syndec_half I1 (bitdec × K0+1)
                                         └ syncnt × 2 ──► err_none / err_corrected / err_detected
```

| module | role |
|---|---|
| `secded_sbd_pkg` | `H` as constant functions: identifiers, odd patterns, columns, bit positions |
| `cbgen` | check bit generator: one XOR tree per row over the data bits |
| `syngen` | syndrome generator: one XOR tree per row over all `n` bits |
| `syndec_half` | one half of SYNDEC (instances I0 and I1), described below |
| `bitdec` | BITDEC: Bit Error Pointers of one byte |
| `syndec` | SYNDEC: two `syndec_half` instances with the syndrome halves swapped |
| `syncnt` | SYNCNT: one-hot count (ZERO, ONE, ... ) of asserted syndrome bits |
| `syndrome_decoder` | SYNDEC plus two SYNCNT, and the error flags |
| `errcorr` | XOR of each Bit Error Pointer with its codeword bit |
| `secded_sbd_codec` | top: encoder and decoder side by side |

### SYNDEC: the pointer decoder

`syndec_half` receives one syndrome half as the byte identifier (`s_id`) and
the other as the error pattern (`s_pat`). It decodes three kinds of pointer:

* **Byte Error Pointers** (`K0+1` of them): `s_id` equals `h_i`, or equals
  zero for the check byte. For `b = 4` there are eight 4-input comparisons.
* **Odd pattern pointers** (`2^(b-1)` of them): `s_pat` equals one odd-weight
  pattern. For `b = 4` these are four *single-bit* pointers (`0001, 0010,
  0100, 1000`) and four *triple-bit-per-byte* pointers (`0111, 1011, 1101,
  1110`), in that order.
* **Bit Error Pointers**: one `bitdec` per byte sets bit `j` of the byte when
  the byte pointer is set and any pattern pointer whose pattern contains bit
  `j` is set. For `b = 4` that is the single-bit pointer of `j` plus the three
  triple-bit pointers that include `j`.

`syndec` instantiates this block twice:

* I0 takes `(S[3:0], S[7:4])` and drives pointers 0..31.
* I1 takes `(S[7:4], S[3:0])` and drives pointers 32..63.

Because the modules are mirror images, the same block serves for both. At
most one byte in the whole word can have pointers set.

### SYNCNT and the error flags

`syncnt` counts the asserted bits of its inputs and gives the count in one-hot
form: `cnt[m]` is high when exactly `m` inputs are high. Its structure is a
staircase. A single token starts at level ZERO, and each input in turn either
passes the token straight on or moves it up one level. The default width is
four, giving the outputs ZERO to FOUR.

`syndrome_decoder` uses one 4-input SYNCNT per syndrome half and derives three
flags, of which exactly one is high:

| flag | condition | meaning |
|---|---|---|
| `err_none` | both halves ZERO | no error |
| `err_corrected` | total weight odd | odd error in one byte, corrected via the pointers |
| `err_detected` | total weight even, nonzero | double-bit or even-bit-per-byte error; nothing is corrected, the Bit Error Pointers are all zero |

The codec does not act on the flags itself. A memory controller would use
`err_detected` to signal an uncorrectable error and `err_corrected` to log a
corrected one.

## Interface and timing (`secded_sbd_codec`)

Parameter: `B` (byte length `b`, default 4, must be at least 3). Everything
else is derived from it: `R = 2B`, `N = B·2^B`, `K = N - 2B`.

| port | dir | width | meaning |
|---|---|---|---|
| `enc_data` | in | K | data word to store |
| `enc_check` | out | R | its check bits `c0..c(R-1)` |
| `enc_codeword` | out | N | word to write to memory, laid out as above |
| `dec_codeword` | in | N | word read from memory |
| `dec_syndrome` | out | R | `S0..S(R-1)` |
| `dec_bit_ptr` | out | N | Bit Error Pointers |
| `dec_corrected_cw` | out | N | `dec_codeword ^ dec_bit_ptr` |
| `dec_data` | out | K | corrected data bits |
| `dec_check` | out | R | corrected check bits |
| `err_none`, `err_corrected`, `err_detected` | out | 1 each | error class |

There is no clock, reset or handshake. Both paths are combinational and settle
within one propagation delay. A user who needs a pipeline adds registers
around the codec. The critical read path runs through the syndrome XOR tree
(33 inputs per row for `b = 4`), one level of 4-bit comparators, one AND-OR
`bitdec` level and the correction XOR. The original design was used in a
memory-interface ASIC that runs at 75 MHz; that timing has not been checked
here.

## Relation to the published design, and what is not here

Taken from the published design:

* the C1 matrix structure with its two mirror-image modules;
* the four-block split: check bit generator, syndrome generator, syndrome
  decoder and error corrector;
* the split of the syndrome decoder into SYNDEC and SYNCNT;
* SYNDEC as two instances of one block, each decoding byte, single-bit and
  triple-bit pointers;
* BITDEC, with one cell per byte;
* the error corrector as a bitwise XOR;
* the 4-input, one-hot SYNCNT.

Choices made in this RTL:

* the order of the byte identifiers (ascending value) and of the odd patterns
  (by weight, then by value);
* the codeword bit layout, and the check bit numbering that follows from it;
* SYNCNT applied to each syndrome half, and its counts turned into the three
  flags by syndrome parity;
* `bitdec` written as AND-OR logic, and SYNCNT written at gate level rather
  than as pass switches;
* no registers anywhere.

Not built:

* **Constructions C2 (`r > 2b`) and C3 (`b+2 <= r < 2b`).** These codes use
  a different arrangement of `I_b` and `H_i` that is not reproduced here.
  Several check-bit budgets in the published comparison table need them: for
  example, 64 data bits with `b = 4` need `r = 9`.
* **Shortened codes.** A code with fewer data bits can use this codec by tying
  the unused data inputs to zero. For example, 16 or 32 data bits with
  `b = 4` and `r = 8` work this way. There is no parameter that removes the
  unused logic.
* **The memory-interface ASIC.** The 64-data-bit code was deployed in an ASIC
  with main memory, four processor channels and an I/O channel. Only summary
  figures of that chip are known, so it is not modelled.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_ref_pkg` is a reference model written separately from the RTL package.
  Its matrix comes from an explicit identifier table. Its decoder is a
  brute-force search over all 16 bytes × 8 odd patterns for the error whose
  syndrome matches.
* `tb_cbgen` and `tb_syngen` test walking ones, random words and valid
  codewords. `tb_syncnt` is exhaustive at 4 and 8 inputs. `tb_bitdec` and
  `tb_syndec_half` are exhaustive over their inputs. `tb_syndec` and
  `tb_syndrome_decoder` try all 256 syndromes against the brute-force decoder
  and the weight-based flags. `tb_errcorr` uses random words and pointers.
* `tb_secded_sbd_codec` runs the default (64,56) codec end to end with 4000
  random words. It cycles through seven error classes and checks syndrome,
  flags, pointers and corrected data, and it requires every class to occur:
  * no error;
  * a single data-bit error;
  * a single check-bit error;
  * three bits in one data byte;
  * one or three bits in a check byte;
  * two bits in different bytes;
  * two or four bits in one byte.
* `tb_codec_exhaustive` tests the default codec with four data words. For each
  word it applies every single-bit error, every odd pattern and every even
  pattern in each of the 16 bytes, and every pair of bits in different bytes
  (1920 pairs). It checks that each error is corrected or detected exactly as
  the code promises.
* `tb_codec_other_b` instantiates the codec with `b = 3` (24,18) and `b = 5`
  (160,150). It checks, by properties alone, that clean words pass, odd
  errors within a byte are corrected, and even errors within a byte and
  double errors are detected.

To run one with Verilator 5, from the repository root (the reference package
is needed only by the testbenches that import it):

```
verilator --binary --timing -Irtl -Itb -y rtl \
    rtl/secded_sbd_pkg.sv tb/tb_ref_pkg.sv tb/tb_secded_sbd_codec.sv \
    --top-module tb_secded_sbd_codec
./obj_dir/Vtb_secded_sbd_codec
```

Every RTL file lints cleanly with `verilator --lint-only -Wall` and
elaborates with yosys/slang. Coarse synthesis of the default top gives
about 136 word-level cells and no flip-flops.

## Changing it

* **Byte length:** set `B`. The matrix, XOR trees, decoders and SYNCNT widths
  all follow, and `R = 2B`. The codeword grows as `B·2^B` (24, 64, 160, 384 for
  `b = 3..6`). The package functions support `b` up to 15.
* **Identifier order:** edit `even_tuple` in `secded_sbd_pkg`. Every module
  and the codeword stay consistent, but stored codewords from the old order
  become invalid. `tb_ref_pkg::IDS` must be changed to match.
* **Pipelining:** register `dec_syndrome` between `syngen` and
  `syndrome_decoder` in `secded_sbd_codec`. This is the natural cut, since the
  XOR tree and the decoder have similar depth.

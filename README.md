# Adjacent-error-correcting memory (AEC codec)

A particle strike in a dense SRAM rarely flips just one cell: it tends to
flip a *run of neighbouring bits* in the same word (a multiple-bit upset).
This design protects a small memory against such runs with a binary linear
block code built for the purpose. Each data word gets a few check bits. On
read, the decoder computes a syndrome. If the syndrome is zero the word is
clean. Otherwise the syndrome identifies which run of adjacent bits was hit,
and that run is flipped back.

The code follows the approach of the publication "Extending Quadruple
Adjacent Error Detection and Correction to Seven Bit Adjacent Error
Correction to Protect Memory from Soft Errors" (Vinoth et al.). That work
targets 6- and 7-bit adjacent error correction at 16, 32 and 64 data bits,
with 7, 8 and 9 check bits. This RTL implements the encoder, memory and
decoder that the publication describes. The codes it ships correct runs of
**up to 6 adjacent bits at 64 data bits** (9 check bits) and up to 5 at 16
and 32 data bits, not the published 7 and 6. The section *Code strength*
explains why.

## Data path

```
 d[K-1:0] ──► aec_encoder ──cw──► aec_memory (16 words) ──c──► aec_decoder ──► out[K-1:0]
                                      ▲                          ├ aec_syndrome      (S = c·Hᵀ)
                             upset port (seu_*)                  ├ aec_error_detect  (which burst?)
                                                                 └ aec_corrector     (flip, drop parity)
```

| module | role |
|---|---|
| `aec_pkg` | H-matrix tables and the functions that derive rows, columns and burst syndromes from them |
| `aec_encoder` | check-bit generation, one XOR tree per check bit |
| `aec_memory` | 16 × (K+R) codeword store with an XOR upset-injection port |
| `aec_syndrome` | syndrome, one XOR tree per syndrome bit |
| `aec_error_detect` | nonzero test plus parallel comparison with every correctable burst syndrome |
| `aec_corrector` | XORs the located burst into the word and returns the low K bits |
| `aec_decoder` | the three decoding steps chained together |
| `aec_top` | encoder + memory + decoder; `K` selects the configuration (default 64) |

## Codeword and H matrix

A codeword is `cw = {parity[R-1:0], data[K-1:0]}`. The check bits are on
top and the data below, the same layout as the waveforms of the original
design. "Adjacent" means neighbouring indices of `cw`, so a run can
straddle the check/data boundary and is still corrected.

The parity-check matrix H has R rows and N = K+R columns. It is
systematic: the columns of the check bits form an identity matrix. Column
`j` (`j = 0` leftmost) belongs to codeword bit `N-1-j`. `aec_pkg` stores
the columns as `HCOL8`, `HCOL16` and `HCOL32`. The 64-bit H is computed
by formula (see below). Every other constant is derived from the columns at
elaboration time:

* `h_row(K, r)` is row r as a bit mask over the codeword. Check bit r is
  `^(d & row[K-1:0])`, and syndrome bit r is `^(c & row)`.
* `burst_syn(K, p, l)` is the XOR of the columns of `cw[p +: l]`. This is
  the syndrome of an all-ones run of length `l` at position `p`.

Correction works only if all of these burst syndromes (length 1..A, every
position) are different from each other and from zero. The tables were
built to meet that rule. The build starts from the identity and appends
data columns one at a time, preferring low-weight columns. A column is
kept only if none of the new burst syndromes it creates is already taken.
If no candidate fits, the search backs up one column. This is the
column-by-column backtracking search the publication proposes. The tables
are its output and are not derived by any formula.

The 64-bit code is different: it is a shortened cyclic code. Column `j` of
H is `x^j mod g(x)` with `g(x) = x^9 + x^6 + x^5 + x^2 + 1`, its bits
written in reverse order so the first nine columns form the identity. A
run of `l` ones at position `p` then has syndrome
`x^p (x^l - 1)/(x - 1) mod g(x)`. With this `g`, those syndromes are all
distinct for `l` up to 6 over the 73-bit word. Of all degree-9 generators,
only `g` and its reciprocal have this property.

## Decoding

`aec_error_detect` holds one equality comparator per correctable burst:
`Σ_{l=1..A} (N-l+1)` comparators, which is 423 at K = 64 and A = 6. Each
comparator checks R bits. Because the syndromes are unique, at most one
comparator fires. The outputs are plain ORs of the comparator hits:

* `err_mask` is the run to flip;
* `burst_len` and `burst_pos` give the run's length and lowest bit;
* `correctable` is set when any comparator fired.

`detected` is the OR of the syndrome bits. `uncorrectable` means a
nonzero syndrome that matched no run, for example two distant single
errors.

A run longer than A is never passed on as clean. Its syndrome is nonzero,
so it is either flagged uncorrectable or, when it aliases a correctable
run's syndrome, *miscorrected*. The code cannot tell these apart.

## Code strength: 5 adjacent bits, not 6 or 7

The counting rule behind the code is simple. A code with R check bits has
2^R − 1 nonzero syndromes, and correcting all runs of 1..A bits in an
N-bit word needs `Σ (N-l+1)` of them:

| data K | check R | N | A targeted | needed / available | A shipped | used |
|---|---|---|---|---|---|---|
| 8  | 5 | 13 | 6 | 63 / 31 (impossible) | 2 | 25 |
| 16 | 7 | 23 | 6 | 123 / 127 | 5 | 105 |
| 32 | 8 | 40 | 6 | 225 / 255 | 5 | 190 |
| 64 | 9 | 73 | 7 | 490 / 511 | 6 | 423 |

At 16, 32 and 64 bits the targeted codes pass the counting rule, but only
just, so they are very densely packed. The column search quickly finds
5-bit codes for all three sizes. A scan of every shortened cyclic code
with 9 check bits gives the 6-bit code used at 64 bits. No search (the
backtracking search, a local search, or cyclic codes with or without a
gap after the check bits) has produced a 7-bit code at 64 bits or a 6-bit
code at 16 or 32 bits. The
publication does not print its matrices, so no 6- or 7-bit code was
available to copy. The 8-bit case cannot reach 6 bits with 5 check bits
under any H; runs of 1–2 bits are the most it can correct.

The RTL does not depend on A beyond the table. Put a stronger table in
`aec_pkg` (`HCOLk` plus `BURSTk`) and the comparators, widths and
testbenches follow automatically.

## Interface and timing of `aec_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset that clears every word |
| `wr`, `addr`, `d` | in | 1, 4, K | write: `mem[addr] <= {parity(d), d}` at the clock edge |
| `cw` | out | N | codeword of `d`, combinational |
| `rd` | in | 1 | read `mem[addr]`; the result appears one clock later |
| `c` | out | N | the stored word as read, including any upset |
| `out`, `out_valid` | out | K, 1 | corrected data, valid the cycle after `rd` |
| `syn`, `err_detected`, `err_corrected`, `err_uncorrectable`, `burst_len`, `burst_pos` | out | | decoder status for `c` |
| `seu_en`, `seu_addr`, `seu_mask` | in | 1, 4, N | upset model: `mem[seu_addr] ^= seu_mask` at the clock edge |

* The encoder and the decoder are combinational. Only the memory read is
  registered, so `c` and `out` change in the same cycle.
* A read in the same cycle as a write to the same address returns the old
  word.
* An upset in the same cycle as a write to the same address lands on the
  newly written word.
* The decoder corrects only the data it returns. The stored word keeps its
  error until it is rewritten; there is no scrubbing.

Parameters of `aec_top`:

* `K`: 8, 16, 32 or 64; the default is 64.
* `A`: defaults to the code's strength; a larger value stops elaboration with an error.
* `DEPTH`: 16 words by default.

## What follows the publication and what does not

Taken from the publication:

* the split into encoding, memory, syndrome calculation, error detection
  and error correction;
* the systematic H with an identity on the check bits;
* the data widths and their check-bit counts (8/5, 16/7, 32/8, 64/9);
* the syndrome-uniqueness rule that defines the correctable patterns;
* the column-by-column search used to build H;
* the signal names `d`, `cw`, `c`, `out`, `clk`, `rst`, `wr` and `addr`,
  and a 4-bit address.

Choices made for this design:

* the H tables themselves, so check-bit values differ from any printed
  example;
* the cyclic construction of the 64-bit code;
* the burst strength shown in the table above;
* only all-ones runs are corrected. The "101" almost-adjacent pattern of
  earlier 3-bit burst codes is not;
* the `rd`/`out_valid` handshake, one-cycle read latency and
  read-before-write;
* the reset that clears the memory;
* the upset-injection port;
* the `uncorrectable`/`burst_len`/`burst_pos` status outputs.

Not provided: the H-matrix search itself. It is an offline software tool,
not hardware.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `aec_ref_pkg` is the reference model. It works row by row on H, while
  the RTL works column by column.
* `aec_encoder_tb` checks encoding at 16, 32 and 64 bits against the
  reference: zero syndrome, the data field, and linearity.
* `aec_syndrome_tb` checks syndromes of random error patterns and of every
  single-bit error.
* `aec_error_detect_tb` feeds every burst syndrome at every position, then
  every other syndrome value, and expects the latter to be flagged
  uncorrectable.
* `aec_decoder_tb` tests 8 random words per size. Each is hit with every
  correctable run at every position, and with every run one bit longer
  than A, which must be flagged or miscorrected, never passed as clean.
* `aec_memory_tb` checks random reads, writes, upsets and reset against a
  shadow array.
* `aec_top_tb` runs end to end at 8, 16, 32 and 64 data bits through
  `aec_top_driver`. It fills memory, reads each word clean, then injects
  upsets of every correctable length (including at both ends of the
  word), runs one bit too long, and double errors. It also resets in the
  middle of the run. It counts each of these and fails if any never
  happened.
* `aec_top_full_tb` runs the same scenario on `aec_top` at its defaults,
  with 40 upsets per run length.

To run a testbench with Verilator (packages first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/aec_pkg.sv tb/aec_ref_pkg.sv rtl/aec_encoder.sv rtl/aec_syndrome.sv \
  rtl/aec_error_detect.sv rtl/aec_corrector.sv rtl/aec_decoder.sv \
  rtl/aec_memory.sv rtl/aec_top.sv tb/aec_top_driver.sv tb/aec_top_full_tb.sv \
  --top-module aec_top_full_tb
./obj_dir/Vaec_top_full_tb
```

## Size

At the defaults (K = 64, 16 words), coarse synthesis gives about
2,000 word-level cells. Almost all of them are the 423 syndrome
comparators and the OR network behind them. Each encoder and syndrome tree
is one 64- or 73-input XOR per check bit. The memory holds
16 × 73 = 1,168 bits.

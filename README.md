# CLC-A: an adaptive decoder for the Column Line Code

Memories in radiation-heavy environments suffer *multiple cell upsets*: one
particle flips several neighbouring bits at once. A plain SEC-DED code cannot
repair such clusters. The **Column Line Code (CLC)** can. It arranges the data
as a small 2D array and protects every line with a Hamming code plus a line
parity, and every column with a column parity.

Decoding CLC is a trade-off. One pass over the syndromes (the *standard*
decoder) is small and fast. It gives up on some 3-bit clusters, because an
error in one line can hide where the double error in another line sits. Two
passes in a row (the *extended* decoder) repair those clusters, but doubling
the logic for every word is expensive. **CLC-A** decides per word: a small
*Syndrome Analyzer* looks at the first pass. It asks for a second pass only
when it can help, that is, when several lines are faulty and one of them holds
a double error. A small FSM, the *Adaptive Control*, runs the second
pass in the next clock cycle. Most words therefore take one pass, and only the
hard ones take two.

This repository holds synthesizable SystemVerilog for the CLC(32,65) encoder,
the CLC-A decoder and a random error injector, plus a top level that wires them
into an encode → inject → decode → compare trial.

## The codeword: CLC(32,65)

The 32 data bits form 4 lines of 8. Each line gets 4 Hamming check bits `C`
and one line parity `Pr`. A fifth row holds 13 column parities `Pc`:

```
 D0  D1  D2  D3  D4  D5  D6  D7  | C0  C1  C2  C3  | Pr0
 D8  D9  D10 D11 D12 D13 D14 D15 | C4  C5  C6  C7  | Pr1
 D16 D17 D18 D19 D20 D21 D22 D23 | C8  C9  C10 C11 | Pr2
 D24 D25 D26 D27 D28 D29 D30 D31 | C12 C13 C14 C15 | Pr3
 Pc0 Pc1 Pc2 Pc3 Pc4 Pc5 Pc6 Pc7 | Pc8 Pc9 Pc10 Pc11 | Pc12
```

For line `l` with data bits `d0..d7` (that is, `D8l .. D8l+7`):

| bit | equation |
|---|---|
| `C4l`   | d0 ^ d1 ^ d3 ^ d4 ^ d6 |
| `C4l+1` | d0 ^ d2 ^ d3 ^ d5 ^ d6 |
| `C4l+2` | d1 ^ d2 ^ d3 ^ d7 |
| `C4l+3` | d4 ^ d5 ^ d6 ^ d7 |
| `Prl`   | XOR of the line's 8 D and 4 C bits |
| `Pcj`   | XOR of column `j` over the 4 lines (`j` = 0..7 D, 8..11 C, 12 Pr) |

The check equations are the ordinary Hamming(12,8) code: the data bits sit at
Hamming positions 3, 5, 6, 7, 9, 10, 11, 12 and C0..C3 at positions 1, 2, 4, 8.
So a nonzero line syndrome, read as a number, names the flipped bit's position.

That is 32 + 16 + 4 + 13 = 65 bits. The same structure with 2 lines is
CLC(16,39); every module takes `LINES` as a parameter (default 4).

**Flat bit order.** The code fixes only the 2D array. This implementation packs
the codeword as `{Pc[12:0], Pr[3:0], C[15:0], D[31:0]}`, with D in bits 31:0
and Pc12 in bit 64. Inside the decoder each line is handled as a 13-bit vector
`{Pr, C[3:0], D[7:0]}`, so that bit `j` of every line sits above `Pc[j]`.

## One correction pass

A pass first computes the syndromes: each stored redundant bit XOR its value
recomputed from the received bits (`clc_syndrome_calc`). This gives, per line,
the 4-bit Hamming syndrome `SC` and the line parity syndrome `SPr`, and over the
whole array the 13 column syndromes `SPc`. Then every line is treated at once by
this table (`SPc` here means "any column syndrome set"):

| SC≠0 | SPr | SPc | meaning | action in this design |
|:-:|:-:|:-:|---|---|
| 0 | 0 | 0 | no error | none |
| 0 | 0 | 1 | error outside the lines (Pc row) | none |
| 0 | 1 | 0 | error detected | none |
| 0 | 1 | 1 | triple error with zero Hamming syndrome | **parity**, only if this is the only faulty line |
| 1 | 0 | 0 | error detected | none |
| 1 | 0 | 1 | even (double) error | **parity**, only if this is the only faulty line |
| 1 | 1 | 0 | odd (single) error | **Hamming** |
| 1 | 1 | 1 | odd error | **parity** if only faulty line *and* the parity fix explains SC and SPr, else **Hamming** |

- **Hamming** flips the one bit the syndrome `SC` points at. Syndromes 13 to 15
  name no bit, and nothing is flipped.
- **Parity** flips every bit of the line whose column syndrome is set.

Column parities cannot say *which* line a column error came from. So parity
correction is applied only when exactly one line shows an error (`SC≠0` or
`SPr=1`). This restriction is what makes a second pass useful.

The last row of the table says "Hamming or parity". The rule used here is this
design's own. The parity fix is applied when flipping the set `SPc` columns
would produce exactly the line's `SC` and `SPr`: the signature of three errors
inside one line. Otherwise the line is treated as a single error. This keeps a
single error correctable when one or two `Pc` bits next to it flip as well. In
the logic, the Hamming syndrome of the SPc pattern is
`SPc[11:8] ^ ham_check(SPc[7:0])`.

The Pc row itself is never corrected: it does not reach the output.

## The second pass and the Syndrome Analyzer

A line has a *double error* when `SC≠0` and `SPr=0`. The Syndrome Analyzer
(`clc_syndrome_analyzer`) raises **EXTEND** when

    (more than one line shows an error) AND (some line shows a double error)

Worked example: data bits D3 and D4 (line 0) and D11 (line 1) are flipped.

- **Pass 1.** Line 0 has `SC≠0, SPr=0`: a double error. But line 1 is faulty
  too, so parity is not allowed; and the D3 and D11 column errors cancel in
  `SPc3` anyway. Line 1 has `SC=7, SPr=1`, so Hamming flips D11 back. The
  analyzer sees two faulty lines, one with a double error, and raises EXTEND.
- **Pass 2** works on the output of pass 1. Line 0 is now the only faulty line.
  `SPc3` and `SPc4` are set, so parity flips D3 and D4. The word is clean.

The second pass is the same logic as the first. It differs only in its input:
`clc_sub_decoder` corrects `enc_word` on the first enabled cycle. On an enabled
cycle that directly follows another one, it corrects its own stored result.
EXTEND is still computed in pass 2, but nothing reads it: there is never a
third pass.

## Adaptive Control and timing

`clc_adaptive_control` is a four-state FSM:

| state | EN | READY | next |
|---|:-:|:-:|---|
| IDLE    | 0 | 0 | DEC_PT1 if START, else IDLE |
| DEC_PT1 | 1 | 0 | DEC_PT2 if EXTEND, else FINISH |
| DEC_PT2 | 1 | 0 | FINISH |
| FINISH  | 0 | 1 | IDLE |

RESET (synchronous, active high here) returns it to IDLE from any state.

`clc_a_decoder` connects the FSM and the Sub-Decoder. Cycle by cycle, with
START sampled at clock edge 0:

```
edge:        0        1          2          3
one pass:    START -> DEC_PT1 -> FINISH (READY=1, dec_word valid)
two passes:  START -> DEC_PT1 -> DEC_PT2 -> FINISH (READY=1)
```

`enc_word` is read during the DEC_PT1 cycle. The simplest rule is to hold it
from START until READY. `dec_word` stays valid after READY until the next
decode. READY is a one-cycle pulse, and the extra output `extended` tells
whether the second pass ran. Each pass is one cycle, so the pass logic sits in
a single combinational stage between `word_q` and itself.

## Error injector and the trial top level

`clc_error_injector` emulates a multiple cell upset. It treats the 5 × 13 array
above as the physical cell layout and builds a mask of `n_err` distinct flipped
cells (1 to `MAX_ERR` = 8). Each new cell is a horizontal, vertical or diagonal
neighbour of a cell already in the mask. It does this with a random walk driven
by a xorshift32 generator seeded by `seed`, adding at most one cell per cycle.
`valid` pulses when the mask is complete. The walk and the generator are this
design's own choices.

`clc_a_top` runs one trial per `start` pulse:

1. register `data_in` and encode it (`clc_encoder`, combinational);
2. build the error mask and store `codeword ^ mask` (`stored_word`);
3. decode it with `clc_a_decoder`;
4. compare: `done` pulses with `data_out`, `corrected` (= `data_out == data_in`)
   and `extended`.

## Measured correction rates

Results of `tb_clc_a_top`: default parameters, 10,000 random trials per error
count, clustered errors as above. They are compared with the rates published
for CLC-A. The published error patterns were generated differently, so only
the trend is comparable.

| errors | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| this RTL, corrected % | 100 | 100 | 94.1 | 60.5 | 35.8 | 22.7 | 16.2 | 12.7 |
| this RTL, words given a 2nd pass % | 0 | 0 | 47.8 | 58.4 | 70.0 | 74.5 | 74.9 | 82.0 |
| published CLC-A, corrected % | 100 | 100 | 100 | ≈62 | 40.1 | ≈25 | 25.4 | 26.6 |

Every word with one or two errors is corrected. Every word that took the second
pass at 3 errors was corrected by it. The 3-bit clusters that fail all involve
the last data line together with the Pc row directly below it. Examples: a
double error in line 3 next to a flipped Pc bit, or Pc flips that line up with
a line-3 error. There the Pc row's own errors mislead the parity method, and
the table above has no rule that resolves them. The published decoder is
reported to correct all 3-bit clusters. It may use finer rules than the table,
or an error model that spares the Pc row. That difference, and the lower rates
at 7 and 8 errors, are the main known departures.

The CLC(16,39) variant (`LINES=2`, `tb_clc_a_top_16`) also corrects every 1-
and 2-error cluster.

## Where this implementation makes its own choices

- Flat codeword bit order (see above).
- The exact correction rules: "any column set" for `SPc`; parity only for the
  sole faulty line; the consistency test that picks between Hamming and parity.
- A Sub-Decoder that selects its input from whether the previous cycle was
  also a pass. The FSM sends it only EN, no pass number.
- Synchronous active-high reset. Registers reset to zero.
- The `extended` status output of the decoder and top.
- The injector's random-walk pattern generator and the trial sequencer in the top.
- Not built: the standard-only and extended-only decoders, which serve only as
  points of comparison. One pass of `clc_sub_decoder` is the standard decoder's
  work.

## Files

`rtl/`:

| file | contents |
|---|---|
| `clc_pkg.sv` | constants, line type, `ham_check`, syndrome-to-column map, FSM state type |
| `clc_encoder.sv` | combinational encoder |
| `clc_syndrome_calc.sv` | SC, SPr, SPc of a received word |
| `clc_syndrome_analyzer.sv` | line error flags and EXTEND |
| `clc_sub_decoder.sv` | one correction pass per EN cycle, result register |
| `clc_adaptive_control.sv` | IDLE / DEC_PT1 / DEC_PT2 / FINISH FSM |
| `clc_a_decoder.sv` | CLC-A decoder (FSM + Sub-Decoder) |
| `clc_error_injector.sv` | clustered random error masks |
| `clc_a_top.sv` | encode / inject / decode / compare trial |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) and
`tb_clc_a_top_16.sv` for the 16-bit code. `clc_tb_pkg.sv` holds a reference
encoder built from Hamming positions rather than from the check equations.
Each testbench prints `TB_RESULT checks=N failures=M`.

The testbenches check:

- the encoder against the reference encoder and a hand-worked vector;
- syndromes for all 65 single flips;
- the analyzer over all syndrome combinations;
- the FSM path by path, with one-pass latency 2 and two-pass latency 3;
- every single error and every adjacent pair of errors corrected in one pass;
- random double-plus-single patterns, where pass 1 raises EXTEND and pass 2
  repairs the word;
- injector masks that have the right size and are connected clusters;
- the full trial flow.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/clc_pkg.sv tb/clc_tb_pkg.sv tb/tb_clc_a_top.sv --top-module tb_clc_a_top
./obj_dir/Vtb_clc_a_top
```

Swap in any other `tb/tb_*.sv` and its module name. `tb_clc_a_top` runs all
90,000 trials at the default parameters in about ten seconds. For a different
code size, set `LINES` on `clc_a_top` or on `clc_a_decoder`/`clc_encoder`. The
codeword is then `13*LINES+13` bits wide and the data `8*LINES` bits.

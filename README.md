# Self-correcting encoder and syndrome logic for an OLS error-correcting code

Memories and caches are commonly protected by an error-correcting code: check
bits are computed when a word is written and re-checked when it is read. The
logic that computes those check bits can itself be hit by a fault, and then
a wrong code word is stored, or a good word read back is judged bad. This
design protects that logic. It uses an Orthogonal Latin Squares (OLS) code,
and relies on one property of that code: every data bit feeds an even number
of check bits. Because of this, the parity of the check bits can be predicted
without computing them twice. A cheap checker compares two parities. When
they disagree, a second copy of the XOR network takes over through a
multiplexer. So a fault in the encoder or in the syndrome computation is
detected and also corrected while the logic runs, with no extra cycle.

The default build is the 16-bit code that corrects one error: k = 16 data
bits, 8 check bits. The whole data path is combinational.

## The code

The 16 data bits are arranged in a 4 x 4 square; `d1..d4` form the first row.
There are 2·t·m check bits. For t = 1 and m = 4 that makes 8, in two groups
of four:

| check | covers | | check | covers |
|---|---|---|---|---|
| c1 | d1 d2 d3 d4 | | c5 | d1 d5 d9 d13 |
| c2 | d5 d6 d7 d8 | | c6 | d2 d6 d10 d14 |
| c3 | d9 d10 d11 d12 | | c7 | d3 d7 d11 d15 |
| c4 | d13 d14 d15 d16 | | c8 | d4 d8 d12 d16 |

So c1..c4 are the row parities and c5..c8 the column parities. Each data bit
lies in exactly 2t = 2 checks. No two data bits share more than one check.
Those two facts make the code decodable by a one-step majority vote.

For t > 1, group 3 and the groups after it use Latin squares: check `a` of
group `g` covers the cells (i, j) where `(g-1)·i + j = a`. The arithmetic is
done in GF(m) when m is a power of two, and modulo m otherwise. This gives
valid codes when m is prime or a power of two and 2t − 2 ≤ m − 1, for
example m = 4, t = 2 (16 check bits). With t = 2, data bit d1 lies in checks
1, 5, 9 and 13. The general construction is this design's own choice. Only
the t = 1 grouping above is fixed by the circuit this RTL was derived from.

All of this is in `ols_pkg` as the function `in_check(m, chk, dat)`. It is
evaluated only on constants, so it becomes fixed wiring.

## Parity prediction: why the checkers work

**Encoder.** Take the XOR of all the check bits. Each data bit enters it 2t
times, so the result is 0 for every data word. Split the check bits into two
halves: c1..c(tm) and c(tm+1)..c(2tm). For t = 1 each half is one full group,
and the parity of each half equals the parity of the data word. The checker
computes:

- r1 = XOR of the first half
- r2 = XOR of the second half
- e = r1 ^ r2

A fault-free network gives {r1, r2} = 00 or 11, so e = 0. A fault that flips
an odd number of check bits gives 01 or 10, so e = 1. A fault inside one of
the checker's own XOR trees also gives 01 or 10. This is the two-rail
(repetition code) form of a self-checking parity checker.

**Syndrome computation.** Each syndrome bit is the recomputed check bit XOR
the received check bit: `s(r) = c(r) ^ XOR(data bits of check r)`. The data
bits cancel out of the XOR of all syndrome bits. So that XOR equals the XOR
of the received check bits, whatever was received. The checker computes:

- r1 = XOR of all s
- r2 = XOR of all received c
- f = r1 ^ r2

The flag f is 1 only when the syndrome logic itself is faulty. An error in
the stored word does not raise f. It shows up as a nonzero syndrome, and the
decoder handles it.

**Why one faulty node is always seen.** Each check bit has its own XOR tree
of m − 1 two-input gates, and no gate is shared between check bits. A single
stuck-at node therefore corrupts at most one check or syndrome bit. One
corrupted bit is an odd number, so the checker sees it.

## Correction by a duplicate

Both `ols_ced_encoder` and `ols_ced_syndrome` instantiate the XOR network
twice on the same inputs:

```
c = e ? c_dup : c_orig        // encoder, C_OUTPUT
s = f ? s_dup : s_orig        // syndrome, S_output = f'·s_orig + f·s_dup
```

The flag is computed from the original network only. The duplicate is never
checked. It is used only after the original has been shown to be wrong. The
behaviour for each single fault is:

- **Fault in the original network.** The flag rises and the duplicate's
  correct value goes out.
- **Fault in the duplicate.** The flag stays 0 and the original's correct
  value goes out.
- **Fault in a checker rail.** The flag rises and the duplicate's value,
  also correct, goes out.

In each case the output is right. The flag (`e`, `f`) tells the system that
a fault exists.

**Limits.** Faults that flip an even number of bits are not seen. One
example is two check bits, one in each encoder half: both rails flip, e stays
0, and the wrong value goes out (`tb_ols_ced_encoder` checks this). A second
fault that hits the duplicate as well as the original is not corrected. The
multiplexer and the decoder's voting logic are not protected. These limits
come with the single-stuck-at fault model the scheme is built for.

## Majority-logic decoding

`ols_mld_decoder` counts, for each data bit, how many of its 2t syndrome bits
are 1. If at least t + 1 are 1, it inverts that bit. For t = 1 this means a
data bit is inverted when both its row check and its column check fail.

With t = 1, the decoder's results are:

- Every single error in the 24-bit stored word is handled. An error in a data
  bit is corrected. An error in a check bit flips no data bit.
- Every double error is detected (`err` = 1), but not always corrected.
  Two errors in different rows and columns can point to a wrong bit.

Check bits are never corrected; only data bits are.

## Top level: `ols_ced_top`

| port | dir | width | meaning |
|---|---|---|---|
| `d` | in | 16 | data word to encode |
| `c` | out | 8 | check bits to store with `d` |
| `r` | out | 2 | encoder checker rails, `r[1]` = r1, `r[2]` = r2 |
| `e` | out | 1 | encoder fault found, duplicate used |
| `rd_d` | in | 16 | data bits read back |
| `rd_c` | in | 8 | check bits read back |
| `s` | out | 8 | syndrome |
| `r1`, `r2` | out | 1 each | syndrome checker rails |
| `f` | out | 1 | syndrome fault found, duplicate used |
| `dc` | out | 16 | corrected data |
| `flip` | out | 16 | data bits the decoder inverted |
| `err` | out | 1 | nonzero syndrome |

Vectors are numbered from 1, so `d[1]` is d1. The widths above are for the
defaults. In general K = M² and R = 2·T·M.

The memory that holds `{d, c}` is not part of the design. Connect `c`
alongside `d` to the memory's write port, and connect the memory's read port
to `rd_d`/`rd_c`. There is no clock and no reset. Outputs settle after one XOR
tree, the checker trees and a 2:1 multiplexer, followed by the decoder's
voting. If the path is too long for the clock period, register it at the
memory boundary.

Parameters: `M` (Latin-square size, default 4) and `T` (errors corrected,
default 1). For t = 1 any M works. For t > 1, M must be prime or a power of
two, with T ≤ (M + 1)/2.

## Modules

| module | role |
|---|---|
| `ols_pkg` | default sizes, the H-matrix membership function, GF(2^p) product |
| `ols_check_gen` | one XOR tree per check bit |
| `ols_two_rail_checker` | r1 = ^x, r2 = ^y, e = r1 ^ r2 |
| `ols_ced_encoder` | original and duplicate generators, checker over the two halves, output mux |
| `ols_ced_syndrome` | original and duplicate syndrome networks, checker (s against c), output mux |
| `ols_mld_decoder` | majority vote and bit inversion, `err` flag |
| `ols_ced_top` | encoder on the write side; syndrome and decoder on the read side |

## Gate count

Each copy of the encoder uses 2tm(m − 1) two-input XORs: 24 for the default.
Each copy of the syndrome computation uses 2tm more: 32 in all. In this RTL
the checkers are reduction XORs:

- encoder checker: two trees of tm − 1 gates plus one, so 2tm − 1 = 7
- syndrome checker: two trees of 2tm − 1 gates plus one, so 4tm − 1 = 15

The description this design follows states the overhead as 4tm − 2 gates for
the encoder and 8tm − 4 for the syndrome computation. It does not say which
gates those figures count. The figures above are what this RTL builds.

## Where this design makes its own choices

- **Read-back ports.** The source shows a top with one data input `d` and
  outputs `c`, `r`, `s`, `r1`, `r2`. The read-back inputs `rd_d`/`rd_c` are
  added so that the syndrome can be computed on a stored, possibly corrupted
  word.
- **Added outputs.** The flags `e` and `f` are brought out, and so are the
  decoder outputs `dc`, `flip` and `err`. The decoder is wired in after the
  syndrome computation.
- **Rail assignment.** `r` carries the encoder's two rails, and `r1`/`r2`
  carry the syndrome computation's rails.
- **Encoder rails for t > 1.** The encoder's rails are split into halves for
  every t, generalising the t = 1 drawing.
- **Latin squares for t > 1.** The construction of the squares, described
  under "The code", is this design's own.
- **Timing.** Everything is combinational.

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog. Single faults
are injected with `force` on internal signals such as `dut.c_orig`,
`dut.u_syn.s_orig` and `dut.r1`. The RTL has no test ports.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ols_pkg.sv \
          tb/tb_ols_ced_top.sv --top-module tb_ols_ced_top
./obj_dir/Vtb_ols_ced_top
```

| testbench | what it covers |
|---|---|
| `tb_ols_check_gen` | all 65536 words against row and column parities. OLS properties (column weight 2t, one check per group, pairwise overlap ≤ 1) for m=4 t=2, m=5 t=3 and m=8 t=2. Linearity |
| `tb_ols_two_rail_checker` | exhaustive 4+4-bit inputs, random 8+8-bit inputs |
| `tb_ols_ced_encoder` | all words fault-free. Single and triple flips in the original corrected. Duplicate faults masked. Stuck rails. The undetected even-flip case |
| `tb_ols_ced_syndrome` | all words with random received check bits. Faults in the original syndrome and in the recomputed checks corrected. Duplicate faults and a stuck rail |
| `tb_ols_mld_decoder` | every single error of the t=1 word corrected. Double errors detected. Every double error of the m=4 t=2 word corrected. Random double errors for m=5 t=2 |
| `tb_ols_ced_top` | default size, end to end through a 64-word memory model. Counts encoder fixes, syndrome fixes, data-bit corrections, check-bit errors and clean reads. Any count of zero fails |
| `tb_ols_ced_top_dec` | the same path built with M=4, T=2. Single and double errors corrected, encoder and syndrome faults corrected |

Each testbench finishes in well under a second.

# Majority-logic error detection for DSCC-protected memories

A memory word protected by a difference-set cyclic code (DSCC) can be
corrected by a very small circuit: a one-step majority-logic decoder that
rotates the word through a shift register and fixes one bit per clock. Its cost
is time. An N-bit word needs N decoding cycles on every read, although almost
every word read from a memory has no error at all.

This design makes the decoder check for errors first. While it runs the
first three decoding cycles, it also watches its own check sums. If no check
sum is 1 in any of those three cycles, the word is taken to be error-free and
is released at once. For any pattern of up to five flipped bits, some check sum
is 1 within those three cycles. So a clean word costs 5 clock cycles instead of
N + 2, and only words with errors pay for full decoding (N + 5 cycles). Error
detection adds only a small, fixed amount of logic: a counter, two flip-flops,
two OR gates and a four-state FSM. Its size does not depend on N.

The default configuration is the (73,45) code: 45 data bits, 28 parity bits,
and up to 4 corrected bit-flips per word. Error-free reads take 5 cycles,
against 75 for plain majority-logic decoding.

## The codes

One integer parameter `S` (s ≥ 2) selects the code. With q = 2^S:

| S | N = 4^S+2^S+1 | K = 4^S+2^S−3^S | parity N−K = 3^S+1 | J = 2^S+1 check sums | corrects 2^(S−1) |
|---|---|---|---|---|---|
| 2 | 21 | 11 | 10 | 5 | 2 |
| **3** | **73** | **45** | **28** | **9** | **4** |
| 4 | 273 | 191 | 82 | 17 | 8 |
| 5 | 1057 | 813 | 244 | 33 | 16 |

Each code is built from a *perfect difference set* P = {l_0 = 0, l_1, …, l_q}
modulo N. In such a set, every non-zero residue mod N is the difference of
exactly one ordered pair of elements. For N = 73 the set is
{0, 2, 10, 24, 25, 29, 36, 42, 45}. The sets for the other sizes are Singer
difference sets. Take a primitive element a of GF(2^(3S)). The set is made of
the exponents i (mod N) for which a^i lies in the GF(2^S)-span of 1 and a. It
is then shifted so that it contains 0. The four sets are listed in
`rtl/dscc_pkg.sv`.

The parity checks of the code are all cyclic shifts of the incidence vector of
P. For every m, the XOR of `c[(m + l_j) mod N]` over j is 0. The checks that
contain bit 0 are the J position sets { (l_k − l_i) mod N : k }, one for each i.
Because differences in P are unique, no two of these sets share any bit other
than bit 0. They are *orthogonal* on bit 0. Now suppose at most J/2 bits are
wrong. If bit 0 is wrong, most of the J sums are 1. If bit 0 is right, most are
0. The code is cyclic, so the same J checks also work on any rotation of the
word. That is why a shift register and one fixed XOR network can decode every
bit in turn.

The encoder is systematic. It computes g(X) = (X^N + 1) / GCD(z′(X), X^N + 1)
at elaboration, where z′(X) = Σ X^((N − l_j) mod N). The codeword is
`{data, X^(N−K)·data mod g}`, with the data in the top K bits. An elaboration
check confirms that deg g = N − K.

## Decoder datapath (`mldd`)

```
        x ──load──► ┌───────────── N-tap cyclic shift register ─────────────┐
                    │ tap N-1  ◄── tap N-2 ◄ … ◄── tap 1 ◄── tap 0 ──┐      │
                    └──▲─────────────────────────────────────────────┼──────┘
                       └──────────── XOR (correction) ◄──────────────┘
                                          ▲ maj
     all taps ──► XOR matrix ──► B_1..B_J ──► majority gate
                                       └────► control unit ──► finish ──► output drivers ──► y
```

* **Shift register** (`mld_shift_reg`). Each tap has a load multiplexer. On
  each shift, tap i takes tap i+1, and tap N−1 takes `tap0 XOR maj`. Tap 0
  holds the bit under decoding. After k shifts, tap i holds word bit
  (i + k) mod N.
* **XOR matrix** (`mld_xor_matrix`). It computes the J check sums orthogonal on
  tap 0. For N = 73, sum 1 uses taps 0, 2, 10, 24, 25, 29, 36, 42 and 45.
* **Majority gate** (`mld_majority`). Its output is 1 when more sums are 1 than
  0. It is a population count compared with J/2. J is odd, so there is no tie.
* **Output drivers** (`mldd_out_buf`). They pass the taps to `y` only in the
  cycle `finish` is high, with a fixed rotation: `y[j] = tap[(j − 3) mod N]`.

## Detection and the three-cycle rule (`mldd_control`)

The control unit ORs all check sums into one bit (OR1) in each of the first
three cycles. A two-flop detection register keeps the OR1 results of the two
previous cycles. In the third cycle, OR2 combines those two bits with the
current OR1 result, so OR2 covers three cycles. If OR2 is 0 the word is
released. Otherwise the FSM keeps the register rotating. Decoding continues
during the detection cycles too: on a clean word the majority gate outputs 0,
so those shifts change nothing.

Why does the check take three cycles? Any odd number of flips makes some check
sum odd in the first cycle. An even number of flips can cancel inside one check
equation, for example flips at bits 42 and 25, which share the equation above.
After a one-bit rotation the same pair falls into a different equation, unless
the difference set has two consecutive elements (24 and 25 here). A perfect
difference set can never have three consecutive elements. So every double flip
shows up within three cycles. The same holds for the quadruple patterns tested
here (see below); this was checked by exhaustive simulation, not proved.
Patterns of six or more flips *can* escape detection in rare cases, so the rule
is a statement about up to five flips per word.

Detection measured on this RTL, as the cumulative share of patterns detected
by iteration 1 / 2 / 3:

| patterns | count | 1 | 2 | 3 |
|---|---|---|---|---|
| all double flips, N = 73 | 2,628 | 90.41 % | 99.20 % | 100 % |
| all quadruple flips, N = 73 | 1,088,430 | 97.35 % | 99.92 % | 100 % |
| all double flips, N = 273 | 37,128 | 94.51 % | 99.72 % | 100 % |

### Alignment trick and timing

A clean word leaves after 3 shifts. A decoded word would naturally leave after
N shifts, at a different rotation, and would need an N-wide multiplexer to put
it back in order. Instead, a decoded word is shifted N + 3 times. Since
N + 3 ≡ 3 (mod N), both kinds of word end up at the same rotation, and the
output wiring is fixed. This costs three cycles on the rare erroneous word.

| cycle (start = 1) | state | action |
|---|---|---|
| 1 | IDLE or FINISH | `start`: word loaded, counter and detection register cleared |
| 2, 3, 4 | DETECT | check sums ORed into the detection register; register shifts |
| 5 | FINISH | clean word: `finish`, `y` valid |
| 5 … N+4 | DECODE | word with an error: shifts up to N + 3 in total (`decoding` high) |
| N+5 | FINISH | `finish`, `y` valid |

`ready` is high in IDLE and in the FINISH cycle, so words can follow each
other without a gap. The shift counter is `clog2(N+4)` bits wide. It marks both
the third detection cycle and the end of full decoding.

## Memory system (`dscc_memory_system`)

This is the top level: encoder → memory → MLDD.

| port | dir | width | meaning |
|---|---|---|---|
| `wr_en`, `wr_addr`, `wr_data` | in | 1, log2 DEPTH, K | write a data word; it is encoded and stored |
| `rd_en`, `rd_addr` | in | 1, log2 DEPTH | read request, taken when `rd_ready` |
| `rd_ready` | out | 1 | a read may be issued (one read in flight at a time) |
| `rd_data`, `rd_valid` | out | K, 1 | corrected data word |
| `rd_decoding` | out | 1 | the word being read had an error and is being decoded |
| `inj_en`, `inj_addr`, `inj_mask` | in | 1, log2 DEPTH, N | flip bits of a stored word (upset model; tie `inj_en` low) |

The memory has a registered read. `rd_valid` therefore rises 6 cycles after
the `rd_en` cycle for a clean word, and N + 6 cycles after it for a word with
errors: one cycle of memory access, then the decoder's 5 or N + 5. Writes are
independent of reads. Parameters: `S` (default 3) and `DEPTH` (default 1024
words).

## Own choices and departures

These points are not fixed by the scheme itself. They are choices made in this
implementation:

* **Output drivers.** The scheme uses tristate buffers enabled by `finish`.
  Here they are two-state AND gates: `y` reads 0 when disabled, and `finish`
  serves as the valid flag.
* **Detection register.** It has two flip-flops; the current OR1 value is the
  third input of OR2. This covers the last three cycles.
* **Counter.** The scheme's counter only needs to reach three. Here it is
  widened to N + 3, so it also ends full decoding.
* **FSM.** The state encoding and the `ready`/`start` handshake are our own.
  The `decoding` status output is added.
* **Encoder.** It is combinational and parallel. It uses the reflected z(X), so
  that the check equations are the plain shifts of P. This gives the bit-reversed
  image of the textbook code, with identical properties.
* **Memory.** Depth is 1024, with registered read and the upset-injection port.
  An RTL array stands in for an SRAM macro.
* **Bit under decoding.** Check sums are indexed from the tap that feeds the
  correction XOR (tap 0). In the textbook form they are anchored on bit N−1;
  the two differ only by a relabelling of taps.
* **No uncorrectable-error flag.** After full decoding, the check sums of a
  correctly decoded word are all 0. This design does not test that, so a word
  with more flips than the code corrects comes out silently wrong. Five flips
  at N = 73 are one example: they are always detected, but not corrected. A
  flag could be derived from OR1 in the FINISH cycle.
* **Detection window.** The check sums are evaluated with 0, 1 and 2 shifts
  done. The word leaves after the third shift.
* **Not included.** The plain majority-logic decoder and a syndrome-based
  detector are only points of comparison for this scheme, so neither is
  included. Gate counts are not reproduced.

## Files

`rtl/`: `dscc_pkg` (code parameters, difference sets, state type),
`dscc_encoder`, `dscc_memory`, `mld_shift_reg`, `mld_xor_matrix`,
`mld_majority`, `mldd_control`, `mldd_out_buf`, `mldd`, `dscc_memory_system`.

`tb/`: one self-checking testbench per module (`tb_<module>`), plus the
following:

* `tb_workload_n73`: all double flips, N = 73.
* `tb_workload_n73_quad`: all 1,088,430 quadruple flips, N = 73. It runs for
  about 1.5 min.
* `tb_workload_n273`: all double flips and random 1–6 flips, N = 273.
* `tb_workload_n1057`: random 1–6 flips, N = 1057.

All four workload testbenches share `dscc_code_exerciser`. Every testbench
prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_dscc_memory_system -y rtl -y tb +libext+.sv \
  rtl/dscc_pkg.sv tb/tb_dscc_memory_system.sv
./obj_dir/Vtb_dscc_memory_system
```

Swap the top module for any other testbench. To change the code, set `S`, for
example `-GS=4` on a top that exposes it. `tb_dscc_memory_system` runs the full
default configuration: 1024 words, a third of them corrupted with 1–5 flips,
all read back. It checks the data and the 5 / 78-cycle latencies, and it counts
early releases, full decodes, corrections, five-flip detections, back-to-back
reads and writes during a read.

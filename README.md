# HAS-160 hash core

HAS-160 is the Korean standard hash function (TTA KO-12.0011). Like SHA-1 it
turns a message of any length into a 160-bit digest by passing padded 512-bit
blocks through a compression function that updates five 32-bit chain words
H0..H4. This core computes it in hardware with a small, iterative datapath:
one step of the compression function every three clocks, 80 steps per block,
258 clocks per block once the block is loaded. At the 110 MHz reached on an
Altera APEX-II FPGA by the design this RTL follows, that is 2.345 us per
block, or 218.3 Mbit/s.

## The algorithm in one page

A block is 16 words X[0..15]. Each word is built from four message bytes in
little-endian order: byte 0 goes in bits 7:0. The 64-bit message length in
bits is appended in the same order after the usual `0x80, 0x00...` padding.
The chain starts at

    H0 = 67452301  H1 = efcdab89  H2 = 98badcfe  H3 = 10325476  H4 = c3d2e1f0

Each block copies H into A..E and runs 4 rounds of 20 steps. After the 80
steps it adds A..E into H0..H4 word by word, modulo 2^32.

**Extra words.** At the start of each round, four extra words X[16..19] are
made, each the XOR of four message words. The round's step-to-word table l(j)
below fixes them. X[16] is used at step 10 and is the XOR of the words of
steps 1-4. X[17] (step 15) covers steps 6-9, X[18] (step 0) steps 11-14 and
X[19] (step 5) steps 16-19. So the words change from round to round.

| step | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |10 |11 |12 |13 |14 |15 |16 |17 |18 |19 |
|------|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| rnd 1|18 | 0 | 1 | 2 | 3 |19 | 4 | 5 | 6 | 7 |16 | 8 | 9 |10 |11 |17 |12 |13 |14 |15 |
| rnd 2|18 | 3 | 6 | 9 |12 |19 |15 | 2 | 5 | 8 |16 |11 |14 | 1 | 4 |17 | 7 |10 |13 | 0 |
| rnd 3|18 |12 | 5 |14 | 7 |19 | 0 | 9 | 2 |11 |16 | 4 |13 | 6 |15 |17 | 8 | 1 |10 | 3 |
| rnd 4|18 | 7 | 2 |13 | 8 |19 | 3 |14 | 9 | 4 |16 |15 |10 | 5 | 0 |17 |11 | 6 | 1 |12 |

**Step.** Step j of round r computes

    T = (A <<< S1[j]) + f_r(B, C, D) + E + X[l(j)] + K_r
    E = D;  D = C;  C = B <<< S2_r;  B = A;  A = T

* `S1` = 5 11 7 15 6 13 8 14 7 12 9 11 8 15 6 12 9 14 5 13. It is the same in every round.
* `S2` = 10, 17, 25, 30 for rounds 1-4.
* `f` = `(x&y)|(~x&z)`, `x^y^z`, `y^(x|~z)` and `x^y^z`.
* `K` = 0, 5a827999, 6ed9eba1 and 8f1bbcdc.

## Architecture

```
  host ──in_en/in_data/in_last──▶ control ──hash_out/hash_valid──▶ host
                                   │   ▲
                  words, gen, state│   │has_value (end_state)
                                   ▼   │
                                 x_gen ──X[l(j)]──▶ main_loop ◀──setup_data── x_sum
                                                        └──end_state_data────▶ x_sum
```

| module      | role |
|-------------|------|
| `control`   | Host interface and sequencer (state machine). |
| `x_gen`     | X0..X19 registers: a counter-addressed input decoder, the XOR that makes X16..X19, and the step word multiplexer. |
| `main_loop` | The A..E and A_p..E_p rows and the three-clock step datapath. |
| `x_sum`     | H0..H4: the initial constants, the final addition, and where the chain goes next. |
| `has160_top`| Connects the four. |
| `has160_pkg`| Shared types (`chain_t`, `state_t`, `phase_t`), constants and the step tables as functions. |

### The three-clock step (main_loop)

A full step has four 32-bit additions in a chain behind a rotation and a
Boolean function. That chain is too long for one FPGA clock, so it is cut
into three clocks. There are two register rows: the working row A..E and the
result row A_p..E_p. `control` holds `state` (round and step) and the
selected message word for all three clocks.

| phase | registers written |
|-------|-------------------|
| `PH_ROT`  | `A..E = A_p..E_p`, `s1_a = A_p <<< S1[j]`, `fj = f_r(B_p,C_p,D_p) + K_r` |
| `PH_ADD1` | `sum_l = E + s1_a`, `sum_r = fj + X[l(j)]` |
| `PH_ADD2` | `A_p = sum_l + sum_r`, `B_p = A`, `C_p = B <<< S2_r`, `D_p = C`, `E_p = D` |

The longest path is then one 32-bit addition behind a rotator or the Boolean
function. `K` is folded into the first clock. INIT writes the chain into the
result row, and the first `PH_ROT` of a block copies it into A..E. The result
row is `end_state_data`: after step 80 it holds the value that `x_sum` adds.

### Block schedule (control)

Counted from the clock after the 16th word of a block is accepted:

| clocks    | action |
|-----------|--------|
| 1         | INIT: `main_loop` loads the chain from `x_sum` (`setup_data`) into A_p..E_p. |
| 4 per round | GEN: `x_gen` writes X16, X17, X18 and X19, one per clock. |
| 60 per round | STEP: steps 0..19, three phases each. |
| 1         | FINAL: `x_sum` adds A..E into H0..H4. |

In total this is 1 + 4 x (4 + 60) + 1 = 258 clocks (`has160_pkg::BLOCK_CLKS`).
After a middle block, `in_ready` rises again and the next block continues
from the updated chain. After the last block, `end_state` switches `x_sum`'s
output from `setup_data` to `has_value`. `control` then puts H0..H4 on
`hash_out`, one word per clock.

### Message words (x_gen)

A 4-bit counter, advanced by each accepted word, chooses the register X[count]
that the word is written to. It wraps after 16 words, so blocks need no
address. X16..X19 are made by four multiplexers, indexed by round and
`gen_idx`, that feed a single XOR. `out_data` is a combinational multiplexer
that shows X[l(j)] for the current `state`.

## Interface and timing (has160_top)

All signals are synchronous to the rising edge of `clk`. `rst` is synchronous
and active high.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `in_ready` | out | 1  | The core accepts message words. |
| `in_en`    | in  | 1  | `in_data` holds a word. Assert it only while `in_ready` is high. |
| `in_data`  | in  | 32 | A padded message word, little-endian as above. Words of a block go X0 first. |
| `in_last`  | in  | 1  | Sampled with the 16th word of a block: this block is the message's last. |
| `hash_out` | out | 32 | Digest word H0..H4, one per clock. |
| `hash_valid` | out | 1 | `hash_out` is valid. It is high for five clocks. |

The host pads the message. The first word of each message restarts the chain
at the initial constants. Idle cycles between words are allowed. A block
costs 16 clocks of input (at one word per clock) plus 258 clocks of
processing. Input and processing do not overlap, because X0..X15 are in use
throughout the block. To print the digest as the usual byte string, write
each of H0..H4 with its least significant byte first. Assertions in `control`
and `x_gen` flag `in_en` while not ready, and loading that overlaps word
generation.

## Where this RTL departs from, or adds to, its source

The block structure follows the published design. So do the tables, the
constants, the 3-clock step and the 258-clock block time. These points are
this implementation's own:

* The Boolean functions and the round constants K are taken from the HAS-160
  standard. The published design leaves them out.
* The state machine, the `in_ready`/`in_en`/`in_last` handshake, the 32-bit
  input width and the output order H0..H4 are new here.
* The published datapath shows three adders, and its text speaks of four
  additions. The fourth, `+ K`, sits in the first phase.
* One extra word is generated per clock, 4 clocks per round. That choice,
  plus one INIT clock and one FINAL clock, reproduces the published 2.345 us
  per block at 110 MHz.
* `x_sum` has an `init` input that restarts the chain for each message. The
  published block only shows the global reset selecting the constants.
* Padding is not done in hardware.

## Verification

Each module has a self-checking testbench in `tb/`. They all print
`TB_RESULT checks=N failures=M`. `tb/has160_ref_pkg.sv` is an untimed
reference model, written separately from the RTL.

* `tb_x_gen` checks random blocks with idle cycles between words: the counter
  wrap and all 80 step words, including X16..X19.
* `tb_main_loop` runs 80 random steps per run, with random stall cycles
  between phases. It checks the result row after every step and that the row
  holds during the first two phases. It also checks that a block takes 240
  step clocks.
* `tb_x_sum` checks the constants after reset and after `init`, and the
  additions with carries out of every word. It also checks the routing
  selected by `end_state`.
* `tb_control` compares every sequencer output on every clock of 1- to
  3-block messages against the expected 258-clock schedule. It also checks
  the chain restart and the output words.
* `tb_has160_top` is the end-to-end test, at the core's only configuration.
  It hashes seven strings with published digests:
  * `""`
  * `"a"`
  * `"abc"`
  * `"message digest"`
  * the 56-byte `abcdbcde...`
  * `"1234567890"` x 8
  * 1000 x `"a"`

  It also hashes 30 random messages of 0-300 bytes, checked against the
  model, with and without input gaps. Every block must take exactly 258
  clocks. The test counts how often blocks are processed and chained,
  messages restart, extra words are generated, input is idle and words are
  output. It fails if any of these never happens.

* `tb_has160_rate` streams words at full rate. It measures 274 clocks from
  the first word to the first digest word for a one-block message: 16 to load
  plus 258 to process. A 64-byte (512-bit) message is padded to two blocks
  and takes 548 clocks.

Run, for example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/has160_pkg.sv tb/has160_ref_pkg.sv tb/tb_has160_top.sv \
      --top-module tb_has160_top -o sim && ./obj_dir/sim

The synthesis results of the published design are not reproduced here: the
110 MHz clock and 2494 of 16640 LUTs on an APEX-II device. The RTL is
device-independent.

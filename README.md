# SHA-1 with an unfolded, precomputing round pipeline

SHA-1 turns a 512-bit message block and a 160-bit chaining value into a new
160-bit chaining value through 80 rounds. In a plain implementation each round
is one clock, and the new word `a` of a round needs three 32-bit additions in
series plus the round function:

    a_t = ROTL5(a_{t-1}) + f_t(b_{t-1}, c_{t-1}, d_{t-1}) + e_{t-1} + K_t + W_t
    b_t = a_{t-1},  c_t = ROTL30(b_{t-1}),  d_t = c_{t-1},  e_t = d_{t-1}

This RTL speeds that up in two ways at once:

* **Unfolding by two.** One operation block computes two rounds per clock, so
  a block takes 40 iterations instead of 80.
* **Precomputation.** Everything in a round except the `ROTL5(a)` term is
  known one round early. The datapath therefore carries three extra words
  (`g`, `h`, `j`), prepared one step ahead. With them, two rounds cost only
  three adders on the critical path. Two plain rounds chained cost four
  adders plus the round function, and a single plain round three.

On top of that block there are two cores:

| core | module | organisation | blocks accepted | latency |
|---|---|---|---|---|
| four-stage pipeline | `sha1_pipe4` | 4 stages, one per 20-round group, each iterating 10 clocks | 1 per 10 clocks | 40 clocks |
| fully pipelined | `sha1_fullpipe` | 40 stages of one clock | 1 per clock | 40 clocks |

`sha1_top` places the two side by side. At the 98.3 MHz reported for this
architecture on a Virtex-II FPGA, these rates are 512 × 98.3 / 10 ≈ 5.03 Gbit/s
and 512 × 98.3 ≈ 50.3 Gbit/s. Those clock and area figures come from the
original FPGA work and have not been reproduced here.

## The precomputed words g, h, j

The working state after round `t-1` is `a b c d e` plus:

| word | holds | used by |
|---|---|---|
| `g` | `f_t(b, c, d)`, the round function of the *next* round | round `t` |
| `h` | `e + K_t + W_t` | round `t` |
| `j` | `K_{t+1} + W_{t+1}` | round `t+1` |

Round `t` then needs only `a_t = (g + h) + ROTL5(a)`, which is two adders. The
operation block (`sha1_round2`) goes one round further in the same clock.
Most of round `t+1` does not depend on `a_t`:

    b_t = a,  c_t = ROTL30(b),  d_t = c,  e_t = d           (wires)
    part = (d + j) + f_{t+1}(a, ROTL30(b), c)                (= e_t + K_{t+1} + W_{t+1} + f_{t+1})
    a_{t+1} = part + ROTL5(a_t)                             (third adder)

So the path from the registers to `a_{t+1}` is `g+h`, then `+ROTL5(a)`, then
`+part`: three adders in series. `part` is built beside the first two and is
not on the path. In the same pass the block prepares the three words for the
next clock:

    g' = f_{t+2}(a_t, ROTL30(a), ROTL30(b))    = f_{t+2}(b_{t+1}, c_{t+1}, d_{t+1})
    h' = c + (K_{t+2} + W_{t+2})               = e_{t+1} + K_{t+2} + W_{t+2}
    j' = K_{t+3} + W_{t+3}

It outputs `e_{t+1} = c` as well. The block has no `e` input: round `t`'s
`e` is already folded into `h`. The caller supplies `K_{t+2} + W_{t+2}`
already added (one adder, off the critical path, in `sha1_step`).

Round functions and constants change every 20 rounds: Ch with K = 5A827999
for rounds 0–19, Parity with 6ED9EBA1 for 20–39, Maj with 8F1BBCDC for 40–59,
and Parity with CA62C1D6 for 60–79. An iteration needs `f` for rounds `t+1`
and `t+2`, and `K` for rounds `t+2` and `t+3`. So at the last iteration of a
group, `g'`, `h'` and `j'` already use the next group's function and
constant. `sha1_step` makes that choice from the iteration number.

When a block enters, `a..e` are loaded from the chaining value. The loader
also forms `g = f_0(b,c,d)`, `h = e + K_0 + W_0` and `j = K_1 + W_1`
(`load_slot` in `sha1_pkg`). At the end, the chaining value is added to
`a..e` after round 79 (`final_digest`).

## Message schedule, two words per clock

`sha1_wsched2` keeps the 16 most recent schedule words as a window. Before
iteration `i` the window holds `W_{2i} .. W_{2i+15}`. The iteration uses
entries 2 and 3 (`W_{2i+2}`, `W_{2i+3}`). The window then shifts by two, and
two new words `W_n = ROTL1(W_{n-3} ^ W_{n-8} ^ W_{n-14} ^ W_{n-16})` are added
for `n = 2i+16` and `2i+17`. Both new words depend only on words already in
the window, so they are computed side by side. The window starts as the
message block itself.

## The four-stage core (`sha1_pipe4`)

Stage `s` (`sha1_iter_stage`, parameter `STAGE`) owns rounds `20s .. 20s+19`.
It holds one block: a slot with a valid bit, the chaining value, the eight
state words and the 16-word window. Each clock it runs one iteration on its
own slot.

A free-running counter 0..9 is the pipeline controller. In the clock where it
reads 9:

* `in_ready` is high, and stage 0 loads the input block through the loader.
  If `in_valid` is low, it loads an empty slot (a bubble).
* Stages 1–3 each load the result of the previous stage's tenth iteration.
* The result of stage 3's tenth iteration (the state after round 79) gets its
  chaining value added and is registered as `out_digest`, with `out_valid`
  high for one clock.

Timing, counting the clock edge that takes the block as edge 0: the block
runs in stage 0 on edges 1–10, in stage 1 on edges 11–20, and so on.
`out_valid` is high after edge 40. With blocks offered back to back, a digest
leaves every 10 clocks and four blocks are in flight. After reset, `in_ready`
is high in the first clock.

A block of a multi-block message can only start once the previous block's
digest exists, that is, 40 clocks later. A single message therefore runs at
a quarter of the peak rate. Full rate needs four (or more) independent
messages interleaved, which is why the chaining value is an input of every
block and travels with it through the pipeline.

## The fully pipelined core (`sha1_fullpipe`)

Register stage `k` holds the slot that will run iteration `k` (rounds `2k`
and `2k+1`). Every stage has its own `sha1_step`, with a constant iteration
number, so its function and constant selection folds away. Stage 0 is the
loader's register, and the digest register follows stage 39. A block is
taken on every clock with `in_valid` high; there is no back-pressure. Its
digest appears 40 clocks later, and 40 blocks can be in flight.

This costs about ten times the logic of the four-stage core. There are 40
round blocks and 40 message windows: roughly 37 kbit of state, against 3.7
kbit for the four-stage core.

## Interface

All signals are synchronous to `clk`. `rst_n` is an active-low synchronous
reset. It clears only the valid bits and the controller; datapath registers
are not reset.

| signal | width | meaning |
|---|---|---|
| `p1_in_valid` / `p1_in_ready` | 1 / 1 | four-stage core: block offered / taken on this edge if both high |
| `p1_in_block` | 512 | padded message block, word 0 (the first four bytes) in bits 511:480 |
| `p1_in_hin` | 160 | chaining value: `sha1_pkg::H_INIT` for a message's first block, otherwise the previous block's digest |
| `p1_out_valid`, `p1_out_digest` | 1, 160 | digest H0..H4, H0 in bits 159:128, valid for one clock |
| `p2_in_valid`, `p2_in_block`, `p2_in_hin` | 1, 512, 160 | fully pipelined core, same meaning, taken every clock |
| `p2_out_valid`, `p2_out_digest` | 1, 160 | its digest |

Digests leave each core in the order the blocks entered. The cores do not pad
messages. The user appends `0x80`, zero bytes and the 64-bit big-endian bit
length, as the SHA-1 standard requires.

## Files

| file | contents |
|---|---|
| `rtl/sha1_pkg.sv` | word, state, slot and digest types; `f`, `K`, rotation; loader and final addition |
| `rtl/sha1_round2.sv` | the two-round operation block with g/h/j precomputation |
| `rtl/sha1_wsched2.sv` | two-words-per-step message schedule window |
| `rtl/sha1_step.sv` | one iteration: operation block + schedule + choice of f and K |
| `rtl/sha1_iter_stage.sv` | one stage of the four-stage core |
| `rtl/sha1_pipe4.sv` | four-stage core with its controller |
| `rtl/sha1_fullpipe.sv` | fully pipelined core |
| `rtl/sha1_top.sv` | both cores |
| `tb/sha1_ref_pkg.sv` | plain round-by-round SHA-1 model, padding, random data |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the million-'a' test |

## Verification

Each testbench compares against `sha1_ref_pkg`. That package is a textbook
one-round-at-a-time SHA-1 model that shares no code with the RTL and is
itself checked against the published digest of `"abc"`.

* `tb_sha1_round2`: 1,000 random states spread over all 40 even round positions,
  compared with two reference rounds, including the g/h/j outputs.
* `tb_sha1_wsched2`: the window stepped 32 times for random blocks, compared
  with the full reference expansion.
* `tb_sha1_iter_stage`: each of the four stages loaded with the reference
  state before its group, then compared after every iteration. Also covers a
  load in mid-group and reset.
* `tb_sha1_pipe4`, `tb_sha1_fullpipe`: the standard vectors (`"abc"`, the
  empty message, the two-block `"abcdbcdecdef…nopq"`), back-to-back random
  blocks, bubbles, and interleaved three-block messages. They check every
  digest, the 40-clock latency, and the spacing of results (10 clocks or 1
  clock).
* `tb_sha1_top`: the same scenarios on both cores at once, at default sizes,
  plus random messages of every length from 0 to 129 bytes (one to three
  padded blocks, chained), checked against the reference hash of the string.
  It counts stage hand-offs, waits on `in_ready`, blocks in flight (4 and 40),
  bubbles and chained blocks, and fails if any of them never happened.
* `tb_sha1_million_a`: one million `'a'` (15,626 chained blocks) on both
  cores. Both must give `34aa973c d4c4daa4 f61eeb2b dbad2731 6534016f`. This
  takes about 780,000 clocks, a few seconds of simulation.

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog. To run one with Verilator 5, from the directory holding `rtl/` and
`tb/`:

    verilator --binary --timing --assert --top-module tb_sha1_top \
        -y rtl -y tb +libext+.sv rtl/sha1_pkg.sv tb/sha1_ref_pkg.sv tb/tb_sha1_top.sv
    ./obj_dir/Vtb_sha1_top

Replace `tb_sha1_top` with any other testbench name. A lint check is
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/sha1_pkg.sv rtl/sha1_top.sv`.
The warnings that remain are unused bits: the `e` input of `sha1_round2`, the
stage registers `cur` that `sha1_pipe4` does not read, and the constant
`H_INIT`, which is provided for users.

## What follows the original architecture and what does not

Taken from the architecture:

* the two-round operation block with its g/h/j words and their connections;
* the three-adder critical path;
* the four-stage pipeline with 10 clocks per stage and one digest every 10
  clocks;
* the fully pipelined variant with one stage per clock.

Added here, where the architecture says nothing:

* the message schedule window and expansion (from the SHA-1 standard);
* the loader and the final addition of the chaining value;
* carrying a per-block chaining value and a per-stage message window through
  the pipeline;
* the valid/ready handshake and the reset behaviour;
* the count of 40 stages for the fully pipelined core (80 rounds / 2);
* leaving padding to the user.

Not built:

* the one-round-per-clock precomputing block from which the two-round block
  was derived, and the conventional blocks it is compared against;
* timing and area: the clock rate and slice counts are properties of an FPGA
  implementation and are not checked by simulation. The reported 28,741
  slices for the fully pipelined version exceed the 5,120 slices of an
  xc2v1000, so that figure cannot be for that device.

## Changing it

`sha1_pipe4` has parameters `STAGES` (default 4) and `ITERS` (default 10). An
elaboration check requires `STAGES * ITERS = 40` and `ITERS <= 16`.
Function and constant selection works from the iteration number, so other
splits, such as 8 × 5 or 40 × 1, are legal. Only 4 × 10 is tested. To change
the unfolding factor, rewrite `sha1_round2`, `sha1_wsched2` and `sha1_step`
together: the window shift, the g/h/j meaning and the iteration count all
assume two rounds per iteration.

# Luffa-256 hash core with low-power round variants

This is a hardware core for the 256-bit Luffa hash function, a SHA-3
competition candidate, built for FPGAs with power in mind. The Luffa round
can be built in several forms. Each form changes where registers sit, or how
the S-boxes are built, to cut glitching and routing activity. The hash result
is the same in every form.

* The default form is a 10-stage pipelined round whose registers load only
  when data is in the stage before them (clock enable). It is the
  lowest-power form.
* The conventional form computes one full round per clock cycle. A message
  that pads to three 256-bit blocks then takes four cycles: three message
  rounds and one blank round.

## Algorithm in brief

The state is three 256-bit lanes H0, H1 and H2. Each lane holds eight 32-bit
words a0..a7, with a0 in the most significant bits of every 256-bit bus. For
every padded message block M, one round runs:

1. **Message injection (MI).** X_j = H_j ^ 2·(H0^H1^H2) ^ 2^j·M. Here "2·"
   means multiplication by x in GF((2^32)^8) with the polynomial
   x^8+x^4+x^3+x+1 (`luffa_mult2`): the words move up one place, and the top
   word is XORed back into words 0, 1, 3 and 4.
2. **Permutation P.** Q_j is applied to lane j. The three lanes do not mix
   inside P. Q_j is a *tweak* followed by eight *steps*:
   * Tweak: words a4..a7 are rotated left by j bits (no change for Q_0).
   * Step r:
     * SubCrumb: a 4-bit S-box is applied bit-slice-wise to (a0,a1,a2,a3)
       and to (a5,a6,a7,a4).
     * MixWord: each pair (a_k, a_k+4) is mixed with XORs and rotations by
       2, 14, 10 and 1.
     * AddConstant: constants are XORed into a0 and a4.

After the last block, one blank round runs with M = 0. The digest is
Z = H0 ^ H1 ^ H2.

Padding appends a single '1' bit and zeros up to the next 256-bit boundary. A
message whose length is already a multiple of 256 bits (0 included) gets an
extra block 1000…0.

The S-box {13,14,0,1,5,10,7,6,11,3,9,12,15,8,2,4}, the step constants and the
initial chaining value come from the Luffa specification (version 2). They
are in `rtl/luffa_pkg.sv`.

## Block structure

```
 msg_data ─► luffa_padder ─► luffa_msg_mux ─► luffa_round ───┬─► H register (768 b) ─┐
   n ──────►   (m^i)          (0 for blank)   MI ─► P        │                        │
                                                ▲            └─► luffa_zout ─► z      │
                                                └──────────── H^{i-1} ◄───────────────┘
 luffa_round = luffa_mi (3 × luffa_mult2) + luffa_p (3 × luffa_q)
 luffa_q     = luffa_tweak + 8 × luffa_step
 luffa_step  = 2 × luffa_subcrumb + 4 × luffa_mixword + luffa_addconstant
 luffa_subcrumb = bit-sliced logic, or 32 × luffa_sbox_ram (16×4 memory)
```

`luffa_top` holds the 768-bit chaining register and a small controller with
four states: idle, message, blank and finish. It also wires the blocks above
together.

## The round techniques (`TECH`, `SBOX_RAM`)

`TECH` (type `luffa_pkg::tech_e`) decides where the round's registers are.

| `TECH` | Registers inside the round | Cycles per round |
|---|---|---|
| `LUFFA_CONVENTIONAL` | none: MI, the tweak and 8 steps are one combinational path | 1 |
| `LUFFA_POSITIVE` | rising-edge registers on the M input, after MI, after the tweak and after steps 1–7; all load every cycle | 10 |
| `LUFFA_GATING` (default) | the same registers, but each loads only when a valid token reaches the stage before it (clock enable) | 10 |
| `LUFFA_NEGATIVE` | one falling-edge register in every Q_j, between steps 3 and 4 | 1 |

The pipelined forms (`LUFFA_POSITIVE` and `LUFFA_GATING`) make each round
last 10 cycles. The register after step 7 feeds step 8, and step 8's output
goes back into the chaining register. Only one message is in the core at a
time, so these forms take a new block only after the previous round has
finished. They trade throughput (40 cycles for a three-block message instead
of 4) for shorter combinational paths and fewer glitches.

In `LUFFA_GATING`, a 10-bit token shift register in `luffa_round` drives the
register enables. The stage that holds the block is the only one that loads.

`LUFFA_NEGATIVE` keeps one round per cycle. The tweak and steps 1–3 must
settle in the first half of the clock period. The falling-edge register
captures them, and steps 4–8 must settle in the second half. This form
assumes a clock with a 50 % duty cycle.

`SBOX_RAM = 1` builds each of the 32 S-boxes in a SubCrumb as a 16-entry ×
4-bit memory (`luffa_sbox_ram`), 1536 memories per round. It can be combined
with any `TECH`. The memories are read asynchronously, like FPGA LUT-RAM, so
the round timing does not change. A synchronous block RAM would add a cycle
to every step.

## Interface and timing (`luffa_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | pulse while `busy` is low to begin a message; `n` is sampled |
| `n` | in | `N_W` (64) | message length in bits |
| `msg_valid` / `msg_ready` | in / out | 1 | handshake for message blocks; ceil(n/256) blocks are taken |
| `msg_data` | in | 256 | message block; the first message bit is `msg_data[255]` |
| `busy` | out | 1 | a message is being hashed |
| `z_valid` | out | 1 | one-cycle pulse; `z` holds the digest (and keeps it) |
| `z` | out | 256 | digest, first byte in `z[255:248]` |

With the default pipelined round, a block is taken when no round is in
flight, or on the edge where the previous round ends. A message of t padded
blocks spends 10·(t+1) cycles in rounds. `z_valid` rises one cycle after the
blank round ends.

With `TECH = LUFFA_CONVENTIONAL`, the core takes one block in every cycle in
which `msg_valid` is high. The blank round follows the last block directly,
and `z_valid` rises on the next edge, so t padded blocks take t+1 cycles.
Either way, one more cycle is spent on `start`. At the 63.5 MHz clock
reported for a Virtex-5 build of the conventional round, a 768-bit padded
message gives 768 bits / 4 cycles × 63.5 MHz ≈ 12.2 Gbit/s. The pipelined
default needs 40 cycles for the same message.

The padder passes blocks straight through with no register. When the length
is a multiple of 256, it makes the extra padding block on its own.

## Where this RTL departs from or goes beyond the source architecture

* The controller, the handshakes, the `start`/`n` protocol and the reset are
  this design's own. Between messages the core spends one idle cycle for
  `start`.
* The Luffa constants, S-box, IV, tweak amounts and padding rule are taken
  from the algorithm's specification. The architecture description does not
  list them. The constants were not cross-checked here against the official
  known-answer test vectors. Check them against the specification before you
  rely on the digests.
* A published Virtex-5 build of this architecture reports 2304 flip-flops.
  The default configuration here has about 1100: the 768-bit chaining
  register, the 256-bit Z register, the padder's length counter and control.
  The source does not say where the other registers sit (a message input
  register is likely), so none are added.
* The RAM S-boxes use an asynchronous read (see above).
* The power numbers that motivate the variants are FPGA measurements and
  cannot be reproduced in simulation. The testbenches check function and
  cycle counts only.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches share `tb/luffa_ref_pkg.sv`,
a plain functional Luffa-256 model: a table S-box, a polynomial
multiplication and its own padding. Example with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/luffa_pkg.sv tb/luffa_ref_pkg.sv tb/tb_luffa_top.sv \
  --top-module tb_luffa_top -o sim && ./obj_dir/sim
```

* `tb_luffa_top` hashes about 27 messages with the default parameters. It
  covers lengths 0, 1, 255, 256, 257, 512, 600 and random lengths, with random
  input gaps. It checks every digest against the model, checks the rate for a
  768-bit padded message (4 round times: 41 edges from the first block with
  the default, 4 with a one-cycle round), and counts partial last blocks, extra
  padding blocks, blank rounds and input gaps.
* `tb_luffa_round` runs both pipelined `TECH` values and checks the result
  and the 10-cycle latency.
* `tb_luffa_q` checks the register behaviour of each technique, including
  that gated registers hold when their enable is low.
* `tb_luffa_padder` checks the padding with random back-pressure.

A one-cycle round (`LUFFA_CONVENTIONAL` and, to a lesser degree,
`LUFFA_NEGATIVE`) is slow to simulate-build with Verilator. Verilator
flattens the 24 chained steps into a few huge expressions, and the C++
compile then takes well over 15 minutes. The pipelined default builds in
seconds. For this reason, the one-cycle forms are checked at the level of a
single Q_j (`tb_luffa_q`), not as a whole core.

## Changing it

* Choose the technique with the `TECH` and `SBOX_RAM` parameters of
  `luffa_top`.
* To place pipeline registers differently, edit `luffa_q` (registers between
  steps) and `luffa_round` (M and MI registers, and the token length
  `PIPE_LAT` in `luffa_pkg`).
* The other Luffa widths (224, 384, 512) need more lanes (w = 4 or 5), more
  constants and a different output stage. They are not built here.

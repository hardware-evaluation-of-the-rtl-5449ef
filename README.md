# Luffa-224/256 in hardware: retimed, compact and pipelined

Luffa is a hash family built from a wide chaining state and a small set of
sub-permutations. For the 224- and 256-bit digests the state has w = 3
chunks of 256 bits. Each 256-bit message block is mixed into all three
chunks by a linear *message injection* (MI). Then each chunk goes through its
own permutation Q_j, made of eight identical *steps*. The three Q_j never
exchange data within a round, so the hardware can run them in parallel, one
after another or in a pipeline. This RTL builds the three architectures of a
published hardware evaluation of Luffa, all computing the same function:

| core            | idea                                                  | cycles per block | step blocks |
|-----------------|-------------------------------------------------------|------------------|-------------|
| `luffa_ht`      | retimed: registers in front of the step blocks        | 9                | 3           |
| `luffa_compact` | one step block shared by the three chunks             | 26               | 1           |
| `luffa_pipe`    | eight unrolled steps, 8 independent messages in turn   | 1 (aggregate)    | 24          |

`luffa_top` puts the three side by side, each with its own ports.

## The round, as the hardware sees it

State and message words are 32 bits. A chunk is eight words a0..a7, and a0
sits in the **most significant** 32 bits of the 256-bit vector
(`luffa_pkg::chunk_t` is `logic [0:7][31:0]`). A message block maps the same
way, so a big-endian byte string maps word by word onto a0..a7.

**Message injection (`luffa_mi`).** With H_0..H_2 the chaining chunks and M
the block:

    t    = 2 * (H_0 ^ H_1 ^ H_2)
    H_j' = H_j ^ t ^ (2^j * M)          j = 0, 1, 2

"Times 2" treats a chunk as a polynomial of degree 7 with 32-bit
coefficients (word a_k is the coefficient of x^k) and multiplies by x modulo
x^8 + x^4 + x^3 + x + 1. In wires, this is a word rotation with the old a7
XORed into a1, a3 and a4 (`luffa_pkg::mul2`). MI is pure XOR logic, about
four gate levels.

**Tweak.** Before Q_j starts, words a4..a7 of chunk j are rotated left by j
bits (chunk 0 is unchanged). This is wiring only. The cores apply it to the
MI result before it is stored.

**Step (`luffa_step`), applied eight times per Q_j:**

1. *SubCrumb* (`luffa_subcrumb`, `luffa_sbox`). For every bit position l,
   the bits {a3[l], a2[l], a1[l], a0[l]} form a nibble, with a3 as the MSB.
   The nibble goes through a 4-bit S-box and is written back to the same
   positions. The upper half uses the words in the rotated order
   (a5, a6, a7, a4) in place of (a0, a1, a2, a3). That is 64 S-boxes per
   step.
2. *MixWord* (`luffa_mixword`) on each pair (a_k, a_k+4), k = 0..3:

        r = a_k+4 ^ a_k
        l = (a_k <<< 2) ^ r
        r = (r <<< 14) ^ l
        a_k   = (l <<< 10) ^ r
        a_k+4 = r <<< 1

3. *AddConstant*: XOR a 32-bit constant into a0 and another into a4. The
   constants depend on j and on the step number r (`luffa_rc`: 3 x 8 x 2
   words).

**Finalization.** After the last message block, one *blank round* runs with
an all-zero block. The digest is Z_0 = H_0 ^ H_1 ^ H_2 (`luffa_of`). Luffa-256
outputs all 256 bits of Z_0, and Luffa-224 outputs bits 255:32. A one-block
message therefore always costs two rounds. For long messages the blank round
hardly matters, which is why the per-block figures above are twice the
one-block throughput.

## High-throughput core: where the registers sit

The obvious loop is: registers, then MI, then step, then back to the
registers. It finishes a round in 8 cycles, but the first cycle of every
round has MI and a step in series. `luffa_ht` moves the registers to the
*input* of the step blocks. The register input multiplexer picks either
`tweak(MI(state, M))` or `step(state)`:

    cycle 0      state <= tweak(MI(H or IV, M))      (blk_ready && blk_valid)
    cycle 1..8   state <= step_r(state), r = 0..7    (three Q_j in parallel)
    cycle 9      next block's injection, or the blank round's

The critical path is now the larger of MI and one step, not their sum, at the
cost of a ninth cycle per round. When `blk_last` was set, the core starts the
blank round by itself (`blk_ready` stays low meanwhile). After the blank round,
`hash_valid` is a one-cycle pulse. `hash` is the XOR of the state registers and
stays valid until the next block is taken. A flag (`fresh_q`) makes the next
injection chain from IV instead of from the state. An N-block message takes
9*(N+1) cycles from its first accepted block to `hash_valid`.

## Compact core: one step block, three registers

`luffa_compact` keeps the three 256-bit chunks in registers, each with a
3-to-1 input multiplexer:

* IV, for initialization;
* the output of the single shared step block;
* the MI result (message blocks and the blank round).

A chunk-select multiplexer feeds the step block. The result is written back
only into the chunk being worked on. The other registers have their write
enable low; a library implementation would clock-gate them here. A round is:

    1 cycle    MI + tweak into all three registers
    24 cycles  Q_0 steps 0..7, then Q_1 steps 0..7, then Q_2 steps 0..7
    1 cycle    end of round: blank-round decision or digest

`hash_valid` is high during the end-of-round cycle of the blank round, with
`hash` = XOR of the registers. At that clock edge the registers reload IV. An
N-block message takes 26*(N+1) cycles.

## Pipelined round function: eight messages in turn

Chaining makes a single message serial: block i+1 needs the result of block
i. `luffa_pipe` unrolls the eight steps into eight stages, each with a
768-bit register followed by three step blocks. Each stage works on a
*different* message. A slot counter `in_slot` runs 0..7. A round takes 8
cycles, so the state of the slot entering now is the one leaving stage 7 in
the same cycle (`out_state`, `out_valid`, `out_slot`). It goes through MI
with that slot's next block and into stage 0.

The caller does the slot bookkeeping:

* For each slot's turn, present the next block with `in_valid`. Raise
  `in_first` on a message's first block so that it chains from IV.
* After the last block, send one turn with `in_data = 0`; that is the blank
  round.
* On the slot's next turn, `out_hash` is the digest.
* A slot that gets no block on its turn drops out of the pipeline. Its state
  is lost, and `out_valid` is low on its next turn.

An assertion flags `in_valid && !in_first` on a turn with nothing to chain
from. With all slots busy, one block enters every cycle.

## Where this RTL departs from, or adds to, the source architecture

* **Constants are not verified.** The S-box table, IV, step constants,
  multiplication by 2 and tweak come from the Luffa v2 specification, not
  from the hardware evaluation. None were checked against official Luffa
  test vectors. The testbenches use the same tables, so they check the
  datapath and control, not these values. The tables are in
  `rtl/luffa_pkg.sv` if you need to correct them.
* **w = 3 only.** Luffa-384 and Luffa-512 need w = 4 and w = 5 with their own
  message-injection matrices (and a second output block for 512). These are
  not built. `W` is a package constant, not a parameter.
* **Compact round schedule.** The 26 cycles per round match the reported
  count. The split into 1 + 24 + 1 is this design's choice.
* **Pipeline depth.** The pipeline has one register per permutation stage:
  8 stages and 8 messages in flight. The reported table lists 9 cycles per
  round for the pipelined design; a 9-stage variant would add a register
  after MI.
* **Clock gating** becomes a register write enable.
* **Interfaces** are this design's own: valid/ready handshake, `blk_last`,
  automatic blank round, hash pulse, slot protocol and asynchronous
  active-low reset.
* **Padding** is not included. The cores take 256-bit blocks that are
  already padded.
* **Left out on purpose:** the non-retimed high-throughput round, which the
  retimed one replaces, and a bit-serial compact variant with two S-boxes.
  That variant was reported as no smaller and much slower.

## Files

| file | contents |
|------|----------|
| `rtl/luffa_pkg.sv` | types, w, step count, rotation amounts, S-box, IV, step constants, `mul2`, `tweak` |
| `rtl/luffa_sbox.sv`, `luffa_subcrumb.sv`, `luffa_mixword.sv`, `luffa_step.sv` | the step function |
| `rtl/luffa_rc.sv` | step-constant lookup (j, r) -> (c0, c4) |
| `rtl/luffa_mi.sv`, `luffa_of.sv` | message injection, output XOR |
| `rtl/luffa_ht.sv`, `luffa_compact.sv`, `luffa_pipe.sv` | the three architectures |
| `rtl/luffa_top.sv` | all three side by side |
| `tb/luffa_ref_pkg.sv` | behavioural reference model (independent datapath code, shared tables) |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_luffa_top` runs everything end to end, `tb_luffa_workloads` the throughput cases |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each also has a watchdog. For example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/luffa_pkg.sv tb/luffa_ref_pkg.sv rtl/luffa_*.sv \
        tb/tb_luffa_top.sv --top-module tb_luffa_top -Mdir obj_top
    ./obj_top/Vtb_luffa_top

Swap in another `tb/tb_luffa_<name>.sv` and its module name to test a single
block. The top testbench uses the full-size design, since `luffa_top` has no
parameters. It builds in under 20 s and runs in well under a second. What it
checks:

* 12 messages of 1 to 4 blocks on all three architectures concurrently.
* Every digest against the reference model and across the architectures.
* The 9- and 26-cycle latencies.
* That each mechanism occurs at least once: multi-block chaining, the blank
  round, restart from IV, producer stalls, `blk_ready` low during the blank
  round, a full pipeline and idle pipeline slots.

`tb/tb_luffa_workloads.sv` runs the throughput cases, again at full size:

* One-block messages and a 64-block message on the two iterative cores. It
  checks the block interval (9 and 26 cycles) and the message latency.
* Eight independent 16-block messages through the pipeline, checking that
  after the fill one block enters per cycle.

It prints the throughput these cycle counts give at the clock rates reported
for the synthesized designs (1124 MHz and 250 MHz). At those rates:

| core            | one-block message | long message |
|-----------------|-------------------|--------------|
| high-throughput | about 16.0 Gbps   | about 32 Gbps |
| compact         | about 1.23 Gbps   | about 2.46 Gbps |

In steady state the pipeline delivers 256 bits per cycle at 8 cycles per
round.

Both lint tools accept every file. Verilator's remaining warnings are about
the ascending `[0:7]` word ranges (deliberate: index 0 is the first word) and
the reset used both by flops and by assertion `disable iff` clauses.

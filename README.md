# Sixteen-stage pipelined DES core

This is a synchronous DES (Data Encryption Standard, FIPS 46-3) engine for
link-level encryption at tens of gigabits per second. The sixteen DES rounds
are unrolled into a sixteen-stage pipeline, one round per stage, so the core
takes one 64-bit block every clock and returns it 16 clocks later. Every
stage is built from the same three parts that a software DES is built from:

* **Key**: one step of the key schedule (rotate C and D, select the subkey),
* **F**: the round function f(R, K),
* **RL**: the register holding the left and right halves of the block.

Each block travels with its own key and its own encrypt/decrypt flag, so the
key may change on every cycle and there is no key set-up time. Stages that
hold no block keep their registers still, so a partly loaded pipeline does
not switch; this is the core's main low-power measure.

A standard-cell implementation of this architecture in a 0.18 µm library has
been reported at roughly 21 Gb/s after place and route (about 335 MHz at 64
bits per clock) for about 0.4 W. The RTL here gives 64 bits per clock; the
clock rate it reaches depends on your library and layout.

## Data path of one block

```
 in_block ──IP──► L0,R0 ─► [stage 1] ─► [stage 2] ─► ... ─► [stage 16] ─► swap ─IP⁻¹─► out_block
 in_key ──PC-1──► C0||D0 ─►   Key        Key                  Key
                              F          F                    F
                              RL         RL                   RL
```

* IP, PC-1, the final swap and IP⁻¹ are pure wiring. There is no register
  before stage 1 or after stage 16.
* Stage i computes, from the register of stage i−1:
  `CD_i = rot(CD_{i-1})`, `K_i = PC-2(CD_i)`, `L_i = R_{i-1}`,
  `R_i = L_{i-1} xor f(R_{i-1}, K_i)`, and registers L_i, R_i, CD_i, the
  mode flag and the valid bit.
* `f(R, K) = P(S1..S8(E(R) xor K))`. The eight S-boxes are 64 × 4-bit
  constant tables that synthesize to logic (yosys reports them as small
  ROMs).
* After stage 16 the halves are swapped: `out = IP⁻¹(R16 || L16)`.

All tables use the standard's numbering, in which bit 1 is the most
significant bit. `des_pkg` holds them and the functions that apply them.

## Key schedule inside the pipeline

The key is not expanded ahead of time. The 56-bit state C||D moves down the
pipeline next to the block, and each stage's Key module rotates it for its
own round.

* **Encryption.** Stage i rotates both 28-bit halves left by the standard
  amounts 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1. These add up to 28, a full turn,
  so C16||D16 = C0||D0.
* **Decryption.** The subkeys must come out in reverse order, K16 first.
  Because C16||D16 = C0||D0, K16 = PC-2(C0||D0): stage 1 does not rotate.
  Stage j ≥ 2 then rotates right by the encryption amount of round 18 − j,
  giving the amounts 0,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1. This undoes the
  encryption schedule one round at a time. After sixteen stages the state
  has turned 27 places right, one short of a full turn. That state is
  dropped at the output, so this does no harm.

Because of this, one core encrypts and decrypts, and can switch between them
on every block, with no stored subkey table.

## Low-power hold

Every register in a stage except the valid bit has a clock enable: the valid
bit of the block arriving at that stage. On a cycle with no input block, the
bubble moves down the pipeline, but the L, R, C||D and mode registers of
each stage it passes keep their old contents. The combinational logic behind
them then sees no input change and does not toggle. A clock-gating cell per
stage can replace the enable without changing the behaviour.

The core has no backpressure. Once a block is accepted it comes out 16 cycles
later, and the consumer must take it on that cycle.

## Interface (`des_pipe16`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset, empties the pipeline |
| `in_valid` | in | 1 | a block is presented this cycle |
| `in_decrypt` | in | 1 | 1 = decrypt this block, 0 = encrypt |
| `in_key` | in | 64 | DES key; the parity bits 8, 16, …, 64 are ignored |
| `in_block` | in | 64 | plaintext or ciphertext |
| `out_valid` | out | 1 | `out_block` holds a result |
| `out_decrypt` | out | 1 | the mode that result was computed in |
| `out_block` | out | 64 | result |

Timing: a block sampled with `in_valid = 1` at rising edge n appears with
`out_valid = 1` after rising edge n + 16, and stays there until edge n + 17.
Blocks leave in the order they entered. A concurrent assertion in
`des_pipe16` checks the 16-cycle rule in simulation.

## Module hierarchy

```
des_pipe16          IP / PC-1 on the inputs, 16 stages, swap + IP^-1 on the output
└── des_stage ×16   one round; parameter ROUND = 1..16
    ├── des_key     rotation for this round, PC-2 -> 48-bit subkey (combinational)
    ├── des_f       E, xor, S1..S8, P (combinational)
    └── des_rl      L/R register with the round xor and the load enable
des_pkg             tables, des_state_t (the stage-to-stage bundle), permutation functions
```

`des_state_t` is the 122-bit bundle `{valid, decrypt, L, R, C||D}` passed
from one stage to the next.

## Choices made in this implementation

The following are decisions of this RTL rather than fixed parts of the
architecture:

* Round tables, S-boxes and the rotation schedule are those of FIPS 46-3.
* There are exactly 16 register stages, one per round. Published latency
  and throughput figures for this architecture work out to between about
  14 and 16.5 clock periods of latency, so an implementation may have
  placed its registers slightly differently. The permutations at both ends
  are left unregistered. If the wiring at the ends limits the clock, add an
  input or output register. Latency then grows by one cycle for each
  register added.
* Subkeys are computed on the fly, per block. Decryption subkeys come from
  right rotations (see above).
* The low-power measure is a valid-driven clock enable, not a specific
  circuit technique.
* The port list is a simple valid handshake with no ready signal.
* There is a single asynchronous reset. Data registers are reset as well, so
  that outputs are defined from the start.
* Not included:
  * An asynchronous (desynchronized) variant of the same pipeline.
  * A Triple-DES wrapper. EDE 3DES can be built from three of these cores
    in series, or from one core by passing each block through it three
    times.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_des_f`: the textbook first round (R0 = F0AAF0AA, K1 = 1B02EFFC7072
  gives f = 234AA9BB) and 12 random vectors from an independent software
  model.
* `tb_des_key`: 16 chained Key modules per direction. For two keys they
  must produce K1…K16 when encrypting and K16…K1 when decrypting.
* `tb_des_rl`: 200 random cycles of load and hold against a model.
* `tb_des_stage`: stages 1, 3, 9 and 16 in both modes against the software
  model, then a bubble that must leave the registers untouched.
* `tb_des_pipe16` (full design at its only size):
  * 22 published known-answer vectors streamed at one block per cycle,
    each with its own key.
  * Their decryptions, interleaved with re-encryptions.
  * 300 random operations with idle gaps, checked by round trip and by
    the complementation property E(~k, ~p) = ~E(k, p).
  * Every result is also checked for a latency of exactly 16 cycles and
    for in-order delivery.
  * It counts mode switches, key changes, full-rate runs and idle cycles
    that held the stage registers. It fails if any of these never happened.
* `tb_des_workloads`: one key, batches of 3, 6 and 8 blocks encrypted and
  then decrypted (variable-plaintext known answers). Each batch must take
  exactly 16 + N − 1 cycles, i.e. 64 bits per cycle in steady state.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/des_pkg.sv tb/tb_des_pipe16.sv --top-module tb_des_pipe16
./obj_dir/Vtb_des_pipe16
```

Swap in another testbench name to run it instead. Each run takes well under
a second.

# MD5 core with round-specific functional blocks, 16 cycles per block

MD5 turns each 512-bit message block into a new 128-bit chaining value in 64
steps. Every step needs the result of the one before it, so pipelining inside a
block does not help. What you can choose is how many steps to put in one clock
cycle, and how short each of those steps can be made.

This core does four steps per cycle, so a block takes 16 cycles. It does not
build one generic four-step circuit and send every round through it. It builds
**four round-specific blocks (RFx)**, one for each MD5 round (functions F, G,
H, I). Inside an RFx the nonlinear function and the four rotation amounts are
fixed. MD5's rotations repeat every four steps within a round, so the rotations
become plain wiring and each function is one fixed gate network. No function
multiplexer or barrel shifter sits on the feedback path. RF1 runs in cycles
0–3, RF2 in cycles 4–7, RF3 in cycles 8–11 and RF4 in cycles 12–15. A 4:1
multiplexer feeds the active block's result back into the state register.

The core is not pipelined: it works on one block at a time. The next block can
start in the cycle after the previous one finishes, so it takes in 512 bits
every 16 cycles. That is 32 bits per clock. At 32 MHz this is about 1.03 Gbit/s.

## Structure

```
            block_i ──► md5_msg_buf ──words──┐
                                             ▼
  IV / H ──► md5_state_buf ──state──► RF1 RF2 RF3 RF4   (md5_rf, ROUND=0..3)
                 ▲                     │   │   │   │
                 └──── next ◄──────────┴───┴───┴───┘  4:1 mux on cycle[3:2]
                                 md5_ctrl: cycle 0..15, load, last, done
```

| File | Module | Role |
|---|---|---|
| `rtl/md5_pkg.sv` | package | state and block types; initial value; T constants; rotations; word order; round functions |
| `rtl/md5_step.sv` | `md5_step` | one MD5 step, function and rotation as parameters |
| `rtl/md5_rf.sv` | `md5_rf` | RFx: four chained steps of one round, with that round's constant and word tables |
| `rtl/md5_msg_buf.sv` | `md5_msg_buf` | 512-bit message register, passes the block through in the load cycle |
| `rtl/md5_state_buf.sv` | `md5_state_buf` | working state A–D, chaining value H, final addition |
| `rtl/md5_ctrl.sv` | `md5_ctrl` | 16-cycle sequencer and start/ready/done handshake |
| `rtl/md5_v3.sv` | `md5_v3` | top level |

## Inside an RFx block

Number the steps of a block 0 to 63. In cycle `n`, RFx number `n/4` performs
steps `4n .. 4n+3`. Step position `j` (0–3) of an RFx always has the same
rotation. Only two things change from cycle to cycle: the constant `T[i]` and
the message word `X[k]`. Both depend on `q = n mod 4`, the quarter of the round.
So each step position holds two four-entry tables, both indexed by `q`:

* constants: `T[16·ROUND + 4q + j]`, where `T[i] = floor(2^32·|sin(i+1)|)`;
* word indices: `k = (4q+j)` in round 0, `(1+5(4q+j)) mod 16` in round 1,
  `(5+3(4q+j)) mod 16` in round 2 and `7(4q+j) mod 16` in round 3.

The tables are built at elaboration from these formulas, which are in
`md5_pkg`. Each step is `A' = B + ((A + f(B,C,D) + X[k] + T[i]) <<< s)`. It
returns the state already rotated as `(D, A', B, C)`, so the four steps chain
with no renaming logic. The critical path is four steps in series, then the
4:1 result multiplexer, then the state register. In the last cycle the
chaining-value adders come after the multiplexer as well.

## Timing and handshake

```
cycle      0      1  ...  15     16        17
start_i    1      x       x      1 (opt)
load       1      0       0      1
RFx        RF1    RF1     RF4    RF1 ...   (next block)
done_o                           1
```

* `start_i` is accepted when `ready_o` is high. The cycle in which it is
  accepted is already compute cycle 0. The first four steps read `block_i` and
  the chaining value directly, so `block_i` and `init_i` only need to be valid
  in that cycle.
* `init_i = 1` starts a new message from the MD5 initial value. `init_i = 0`
  continues from the current `digest_o`, for the second and later blocks of a
  message.
* Cycle 15 adds the state after 64 steps to the chaining value. `done_o`
  pulses in the next cycle. `digest_o` then holds the result and keeps it until
  the next start with `init_i = 1`.
* `ready_o` is high again in the `done_o` cycle. A start there gives
  back-to-back operation: 16 cycles per block with no idle cycle.
* A `start_i` while the core is busy is ignored.
* `rst_n` is an asynchronous reset, active low.

Data format: `block_i[k]` is word `X[k]`, made of bytes `4k..4k+3` of the
block with byte `4k` in bits 7:0. The digest is the bytes of `digest_o.a`,
`.b`, `.c`, `.d`, each word written out least significant byte first. Padding
(append 0x80, zeros, and the 64-bit little-endian bit length) is done outside
the core.

## What follows the described architecture and what is chosen here

These parts follow the architecture this core implements:

* four round-specific functional blocks;
* four unrolled steps in each block;
* each block used four times in a row before the next one takes over;
* 16 clock cycles per 512-bit block;
* the state buffer, and the addition of the initial and final state.

These are choices of this design, because the architecture does not specify
them:

* the exact contents of an RFx: two small tables per step position, selected by
  the quarter;
* the start/ready/init/done handshake, and reset to the initial value;
* the bypass that lets the first four steps run in the cycle the block
  arrives. Without it the core would need a 17th cycle;
* doing the final addition in the 16th cycle, behind the last four steps;
* padding left to the host. Only ready-padded blocks are accepted;
* the port encoding: word and byte order as in RFC 1321.

Two simpler designs were used as comparison points: an iterative one-step core
(65 cycles) and partially unrolled cores with a generic round circuit. They are
not part of this RTL.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. The reference model
(`tb/md5_ref_pkg.sv`) does not use the RTL's tables. It computes the constants
from the sine formula and evaluates the steps one at a time.

* `tb_md5_step`: all 16 function/rotation combinations against single
  reference steps.
* `tb_md5_rf`: the four RFx blocks in every quarter against four reference
  steps. This also covers the constant and word tables.
* `tb_md5_ctrl`: a cycle-by-cycle model of the schedule. It includes ignored
  starts and back-to-back starts, and checks 16 cycles from start to done.
* `tb_md5_state_buf`, `tb_md5_msg_buf`: register behaviour against models.
* `tb_md5_v3`: runs the whole core at its default configuration.
  * Inputs: the RFC 1321 test strings (published digests checked), plus 40
    random messages of 0–300 bytes, including the 55/56-byte padding boundary.
  * Every intermediate chaining value is compared with the model.
  * The test uses random idle gaps, back-to-back starts and junk starts while
    busy.
  * Timing checks: every block takes 16 cycles, and a 12-block message sent
    back to back takes exactly 192 cycles.
  * It counts and requires each case: first block, chained block, back-to-back
    start, start after a gap, ignored start, and 4 cycles per block for each
    of the four RFx.

There is no timing or area result for this RTL. The clock rate depends on the
target and its implementation. Reported FPGA figures for this architecture are
32.18 MHz on a Virtex-II (about 1.03 Gbit/s) and 53.49 MHz on a Virtex-5
(about 1.71 Gbit/s).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
for the top level:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/md5_pkg.sv tb/md5_ref_pkg.sv rtl/md5_*.sv tb/tb_md5_v3.sv \
    --top-module tb_md5_v3 -Mdir obj_v3
./obj_v3/Vtb_md5_v3
```

Replace `tb_md5_v3` with any other `tb_*` to run that unit's test. Lint a
module with `verilator --lint-only -Wall -Irtl rtl/md5_pkg.sv rtl/<module>.sv`.

## Changing it

The number of steps per cycle is fixed at four by the RFx structure. This
matches the period of the MD5 rotations, so a round's four step positions each
keep one fixed rotation. The package constants `STEPS_PER_CYCLE` and
`CYCLES_PER_BLOCK` describe this schedule, but they are not free parameters.
The same technique (one hard-wired block per round, reused for a fixed number
of cycles) carries over to other hashes with MD5-like compression functions,
such as SHA-1, SHA-2 and RIPEMD-160. Those are not implemented here.

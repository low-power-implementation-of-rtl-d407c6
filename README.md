# Ten-core pipelined AES-128 encryptor with per-core clock gating

This design encrypts a very wide stream of data with AES-128. It puts ten
identical, fully pipelined encryption cores side by side on a 10 x 128-bit data
bus. Each core accepts a new 128-bit block every clock, so with all cores on the
chip encrypts 1280 bits per cycle. At a 667 MHz clock that is 853.8 Gbit/s.

Two choices keep the area and power of that many cores down:

* **One key schedule for all cores.** The round keys are computed once and
  wired to every core. No core carries its own key expansion.
* **Clock gating at two levels.**
  * Each core sits behind its own clock-gating cell, driven by an EN pin. A
    core that is not needed gets no clock at all. The system enables only as
    many cores as the input data rate needs: one core per 85.4 Gbit/s at
    667 MHz.
  * Inside a core, each pipeline register bank also has a clock gate. It
    passes the clock only when a valid block is arriving.

## Files

| file | what it is |
|---|---|
| `rtl/aes_pkg.sv` | types (`block_t`, `round_keys_t`), GF(2^8) arithmetic, S-box ROM computed at elaboration, ShiftRows/MixColumns/key-schedule functions |
| `rtl/cipher_round.sv` | one combinational AES round (`LAST` drops MixColumns) |
| `rtl/aes_core.sv` | initial AddRoundKey plus 10 rounds, a register after each round, and local clock gating |
| `rtl/key_expansion.sv` | shared AES-128 key schedule, one round key per cycle, holds all 11 keys |
| `rtl/clock_gate.sv` | latch-based clock-gating cell, used for both global and local gating |
| `rtl/multicore_aes.sv` | the top: `N_CORES` cores, one key schedule, one global clock gate per core |
| `tb/aes_ref_pkg.sv` | independent behavioural AES-128 model used by every testbench |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_multicore_aes` runs the whole chip at full size |

## Data path of one core

A core is the AES-128 cipher unrolled into hardware, with one pipeline stage
per round:

```
in_data -> XOR rk0 -> round 1 -> [reg] -> round 2 -> [reg] -> ... -> round 10 -> [reg] -> out_data
in_valid ----------------------> [v1]  --------------> [v2]  ... --------------> [v10] -> out_valid
```

* The initial AddRoundKey is combinational and shares stage 1 with round 1.
* Rounds 1-9 are SubBytes, ShiftRows, MixColumns and AddRoundKey. Round 10
  leaves out MixColumns.
* A register follows every round, so latency is exactly **10 cycles**. A block
  enters every cycle and there is no back-pressure: the core never stalls.
* A valid bit travels beside each block. Only the valid bits are reset. The
  128-bit data registers start undefined and are only read when their valid
  bit is set.

Bytes are ordered as in FIPS-197. Byte *k* of a block (byte 0 = the first input
byte) is bits `[127-8k -: 8]`. The state byte in row *r*, column *c* is byte
*r + 4c*. So the FIPS-197 test vectors can be applied as 128-bit hex constants
without reordering.

The S-box is not a typed-in table. `aes_pkg::make_sbox()` computes it when the
design is elaborated: each byte is inverted in GF(2^8) (modulus
x^8 + x^4 + x^3 + x + 1, computed as a^254, with 0 mapping to 0), then put through
the affine map b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ 0x63_i. The result is
a 256 x 8 constant, and each S-box instance is a ROM lookup into it. A full chip
has 1600 S-boxes in the cores and 4 in the key schedule.

## Shared key schedule

`key_expansion` is loaded with a one-cycle `key_load` pulse, which carries the
key on `key`.

* Round key 0 is the key itself.
* Round keys 1 to 10 follow one per clock, using the standard recurrence
  (RotWord, SubWord and Rcon, with Rcon doubled in GF(2^8) each step). This
  needs only one 4-byte SubWord unit.
* `key_ready` rises 10 cycles after `key_load`. It stays high until the next
  load.
* All eleven keys sit in registers that fan out to every core.
* Each key register loads in exactly one cycle per key. With `LOCAL_CG = 1` it
  has its own clock gate, so the key registers see no clock edges while
  encryption runs.

Because the keys are plain registers and do not travel down the pipeline with
the data, **a new key may only be loaded while no blocks are in flight**. That
includes blocks held inside a disabled core. The top asserts that no lane offers
data while `key_ready` is low. A block that is still inside a core when the key
changes is encrypted with a mix of old and new round keys.

## Clock gating

Both levels use the same cell, `clock_gate`. It is a latch that is transparent
while `clk` is low, followed by an AND gate:

```
en_lat follows en while clk = 0, holds while clk = 1
gclk   = clk & en_lat
```

So the enable is sampled at the rising edge and held for the whole high phase.
`en` may change at any time in the cycle without cutting the clock pulse short
or adding an extra edge. To a register on `gclk` this looks like a register on
`clk` that loads only in cycles where `en` was 1 before the edge. The latch is
intended. In an ASIC flow the module is swapped for the standard-cell library's
clock-gating cell.

**Global gating (per core, EN pins).** In `multicore_aes`, core *i* is clocked
by `clock_gate(clk, core_en[i])`.

* With `core_en[i] = 0`, nothing in the core toggles: not the valid bits, not
  the data registers, not the local gates.
* Any blocks inside the core are frozen in place. They continue where they
  stopped once EN returns to 1.
* The latency of 10 cycles therefore counts only cycles in which the core was
  enabled.
* While a lane is disabled, its `out_valid` is forced to 0, so a frozen
  output is not reported again and again.
* Offering data on a disabled lane is a usage error, and an assertion catches
  it.

**Local gating (per pipeline stage).** In `aes_core` with `LOCAL_CG = 1`, the
128-bit register behind round *i* is clocked by
`clock_gate(core_clk, v[i-1])`, where `v[i-1]` is the valid bit of the block
arriving at that register.

* Bubbles in the input stream leave whole register banks unclocked.
* The valid bits themselves run on the ungated core clock.
* The eleven round-key registers of `key_expansion` are gated the same way.
* `LOCAL_CG = 0` replaces the gates with ordinary load enables
  (`if (v[i-1]) q <= r`). That leaves clock-gate insertion to the synthesis
  tool, which recognises exactly this pattern. Both settings behave the same
  cycle for cycle, and the core and key-schedule testbenches check that.

## Interface and timing of the top

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset |
| `key_load`, `key` | 1, 128 | load and expand a new key (pipelines empty) |
| `key_ready` | 1 | round keys valid |
| `core_en` | N_CORES | EN pin per core; 0 stops that core's clock |
| `in_valid`, `in_data` | N_CORES, N_CORES x 128 | plaintext lanes; lane *i* feeds core *i* |
| `out_valid`, `out_data` | N_CORES, N_CORES x 128 | ciphertext lanes, in the order the blocks entered |

Parameters: `N_CORES = 10`, and `LOCAL_CG = 1`, which is passed down to every
core and to the key schedule.

Rules:

* Drive `in_valid[i]` only while `core_en[i]` and `key_ready` are both high.
* Change `core_en[i]` whenever you like; it takes effect at the next rising
  edge.
* A block on lane *i* comes out on lane *i* after 10 cycles in which that core
  was enabled.

The lanes are independent. There is no reordering or load balancing between
cores, and nothing inside the chip decides which cores to enable. The EN pins
are set from outside, according to the data rate.

## Operating points

The eleven operating points (0 to 10 cores active at 667 MHz) all fit the
default build. Throughput is simply the number of active cores x 128 bits x
f_clk:

| active cores | bits per cycle | at 667 MHz |
|---|---|---|
| 0 | 0 | 0 |
| 1 | 128 | 85.38 Gbit/s |
| 2 | 256 | 170.76 Gbit/s |
| 5 | 640 | 426.90 Gbit/s |
| 10 | 1280 | 853.80 Gbit/s |

The end-to-end testbench measures the bits per cycle at every point from 0 to
10 cores. The 667 MHz clock and the power savings from gating are properties of
a 45 nm standard-cell implementation. RTL simulation cannot confirm them.

## How far it is verified

Every module has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M` and includes a watchdog. Expected values come
from `tb/aes_ref_pkg.sv`. That is a separate AES model with its own S-box
construction (brute-force inverse and a matrix form of the affine map), a
4 x 4 byte state and a word-wise key schedule. The testbenches also check
published FIPS-197 vectors.

* `tb_cipher_round`: FIPS-197 Appendix B round 1, then 500 random states and
  keys, for a middle round and for the last round.
* `tb_key_expansion`: the FIPS-197 Appendix A.1 schedule plus 30 random keys,
  on a gated and an ungated instance. All 11 keys are checked, and `key_ready`
  must come exactly 10 cycles after the load.
* `tb_clock_gate`: the enable changes at random points, including during the
  high phase. The test checks that `gclk` follows the sampled enable, never
  drops early and never gives an extra edge.
* `tb_aes_core`: a gated and an ungated core run side by side. The stimulus is
  FIPS-197 C.1 and B, a 200-block back-to-back stream (one output every cycle),
  a stream with random bubbles, and a key change. Every block must have a
  latency of exactly 10 cycles.
* `tb_multicore_aes`: the full 10-core chip with default parameters.
  * It checks the key schedule timing, 100 cycles at 1280 bits per cycle, and
    the 0-to-10-core sweep.
  * It checks that a disabled core's clock does not toggle.
  * Then it switches the EN pins at random while blocks are in flight, adds
    bubbles, and loads a second key. That is about 7600 blocks, each checked
    lane by lane with latency counted in enabled cycles.
  * It counts every mechanism (key load, full-rate cycles, gated cores, frozen
    pipelines, bubbles, EN changes) and fails if any of them never happened.

Not verified: timing closure at 667 MHz, power, and gate-level behaviour of the
clock gates.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  tb/aes_ref_pkg.sv rtl/aes_pkg.sv rtl/clock_gate.sv rtl/cipher_round.sv \
  rtl/aes_core.sv rtl/key_expansion.sv rtl/multicore_aes.sv \
  tb/tb_multicore_aes.sv --top-module tb_multicore_aes -Mdir obj_top
./obj_top/Vtb_multicore_aes
```

For the other testbenches, swap the last testbench file and `--top-module`. The
module testbenches need only the package and the modules they use. Building the
full chip takes under a minute, and the simulation takes well under a second.

In your own testbench, start `rst_n` high and then pull it low. The cores' clocks
are gated off while the EN pins are 0. So only the falling edge of the
asynchronous reset clears their valid bits. A reset that is already low at time
zero produces no event for the simulator to act on.

## Design choices not fixed by the architecture

Where the architecture leaves a detail open, this RTL chooses as follows:

* **Key size.** AES-128, because of the ten rounds per core.
* **Pipeline depth.** A register after every round, with the initial
  AddRoundKey folded into stage 1. This gives 10 cycles of latency.
* **Key expansion.** Iterative, one round key per cycle. It is small, and
  the 10-cycle setup is paid only when the key changes.
* **Handshake.** Valid bits with no back-pressure.
* **Key loading.** A `key_load`/`key_ready` pair.
* **Reset.** Asynchronous, active low, on control state only.
* **Disabled lanes.** A disabled lane reports `out_valid = 0`.
* **Clock-gating cell.** Latch-based.
* **Local clock gating.** Written out explicitly in the RTL (`LOCAL_CG = 1`),
  instead of being left entirely to the synthesis tool.

To change the core count, set `N_CORES`. To hand local gating to the synthesis
flow, set `LOCAL_CG = 0`. If the key must change while data is in flight, the
round keys would need to travel down the pipeline with each block. That means
eleven 128-bit key registers per stage, or a key-version tag with double
buffering. This design does not do that.

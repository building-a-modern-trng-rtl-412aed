# Minidice: a small entropy source for the RISC-V PollEntropy interface

A processor needs a source of true randomness so that it can seed its
cryptographic random number generators. The RISC-V approach discussed here does not
put a full random-number generator in hardware. Instead, the hardware is only an
**entropy source**: a noise source, a sampler, health tests and a light,
non-cryptographic conditioner. The CPU reads that source with a single
non-blocking instruction, `pollentropy`. Each read returns either 16 bits
of seed or a status telling the software why none is available. Software then
compresses the seeds at least 2:1 with a cryptographic function (for example
AES-CBC-MAC) and uses the result to seed a DRBG such as AES-256 CTR_DRBG.

This repository holds SystemVerilog for the hardware side of the design:
ring-oscillator noise, sampling, the two standard health tests, a Blum-style
conditioner, a seed buffer with delayed release and wipe-on-read, and the
four-state status machine behind the read port. The whole core is about a
hundred flip-flops.

## The read word

A poll returns one XLEN-wide word:

| bits  | field    | value in this design |
|-------|----------|----------------------|
| 63:32 | sign extension (RV64 only) | copies of bit 31 |
| 31:30 | OPST     | 00 BIST, 01 ES16, 10 WAIT, 11 DEAD |
| 29:24 | reserved | 0 |
| 23:16 | custom   | 0. Not used, so that it cannot leak extra status |
| 15:0  | SEED     | 16 bits of seed in ES16, 0 otherwise |

The software contract is that each ES16 seed holds more than 8 bits of
entropy. So 16 words (256 bits) are expected to condition to 128 bits of full
entropy. Seeding a 256-bit DRBG takes 32 ES16 polls, or 512 bits.

## Operational states

| from | to | when |
|------|----|------|
| reset | BIST | always |
| BIST | WAIT | start-up test passed (and, after an alarm, BIST polled once) |
| BIST | DEAD | health failure during the test, or fatal alarm |
| WAIT | ES16 | a seed word has been released |
| ES16 | WAIT | the word was polled (and wiped) |
| WAIT, ES16 | BIST | health failure: non-fatal alarm |
| WAIT, ES16 | DEAD | fatal environmental alarm |
| DEAD | DEAD | until reset |

* **BIST**: after reset, the source runs a start-up test. A delay counter waits
  for `BIST_SAMPLES` (1024) raw samples while the health tests watch them. A
  health failure during BIST is treated as fatal and leads to DEAD. No seed
  is produced in BIST, and the conditioner and buffer are held empty.
* **WAIT / ES16**: this is the normal operation. The state is ES16 while the seed
  buffer holds a released word, and WAIT otherwise. An ES16 poll wipes the
  word and the state returns to WAIT.
* **Non-fatal alarm**: a health-test failure in WAIT or ES16 zeroizes the
  health-test counters and returns to BIST. The alarm is *latched*: BIST is
  left only after the test period has passed again **and** at least one poll
  has returned BIST. Software therefore always sees that an alarm happened.
* **DEAD**: a fatal environmental alarm (`env_fatal_i`, from sensors outside
  this design) enters DEAD from any state. Only reset leaves it.

The state diagram also allows a direct BIST-to-ES16 step. This design never
takes that step, because the buffer is empty when BIST ends, so the first live
state is always WAIT.

A driver should issue WFI after a WAIT or a BIST result and then poll again.
It can stop polling after DEAD.

## Data path

```
 ring 0 ─┐                     ┌─> repetition count test ─┐
 ring 1 ─┼─> sample, sync, XOR ┼─> adaptive proportion ───┴─> es_ctrl (state)
 ring 2 ─┘   (1 bit / 16 clk)  └─> Blum conditioner ─> 16-bit XOR buffer ─> rd_o
```

### Noise source and sampler (`ro_noise_source`, `noise_sampler`)

Each ring oscillator is a loop of an odd number of inverters. Its timing
jitter is the source of entropy. The top uses three rings of 7, 11 and 13 stages.
These counts are coprime, so the rings do not lock to each other. In this RTL a
ring is a **behavioural model**: it toggles every `STAGES*GATE_DELAY` time units
plus a random jitter, and it stops low when its enable is low. For silicon or an
FPGA, replace it with a hand-placed inverter loop that has the same two ports.

The sampler captures each ring output on the reference clock and passes it
through a second flip-flop. It then XORs the chains into one raw bit. It keeps
one raw sample every `SAMPLE_DIV` (16) clocks, because samples that are far
apart in time are closer to independent.

### Health tests (`health_rct`, `health_apt`)

These are the two tests that SP 800-90B requires. Both are built from counters
only:

* **Repetition count test**: counts a run of identical raw samples. The test
  fails when the run reaches `RCT_CUTOFF` = 41. It keeps failing on every
  further identical sample.
* **Adaptive proportion test**: the first sample of each 1024-sample window
  becomes the reference. The test counts how often that reference value occurs
  in the window and fails when the count reaches `APT_CUTOFF` = 793.

Both cutoffs assume a raw min-entropy of H = 0.5 bit per sample and a
false-alarm rate of 2^-20. The formulas are RCT = 1 + ceil(20/H) and
APT = 1 + CRITBINOM(1024, 2^-H, 1 − 2^-20). To use a different entropy
estimate for your own noise source, recompute both and set the parameters. No
test state lasts longer than one window. Reset and alarms zeroize it.

### Conditioner (`blum_conditioner`)

Von Neumann's extractor turns bit pairs 01 and 10 into 0 and 1 and drops 00
and 11. That removes bias, but it only works if the bits are independent. Blum's
extension handles a source that behaves like a two-state Markov chain. It runs
von Neumann separately on the bits that follow a 0 and on the bits that follow
a 1. The module keeps one pending bit per previous-bit state. When the second
bit of a pair arrives in the same state, the module outputs the first bit if
the two differ. The output rate therefore varies, at roughly a quarter of the
raw rate for good noise.

### Seed buffer (`es_output_buffer`)

The variable output rate of the conditioner would reveal something about the
noise if words appeared the moment they were complete. The buffer hides that
rate in three ways:

1. Every conditioned bit is XORed into the 16-bit buffer at a rotating
   position. Once 16 bits have arrived, the word is complete, but later bits
   keep being XORed in. The buffer is overwritten continuously until release.
2. A word is released only on a free-running tick, every `RELEASE_PERIOD` (64)
   clocks, so release times fall on a fixed grid.
3. A released word is frozen. The poll that reads it wipes it to zero
   (wipe-on-read). The buffer never shows a partial word: `data_o` is zero
   unless a word has been released.

### Control (`es_ctrl`) and core (`minidice`)

`es_ctrl` holds OPST as its state register. `minidice` connects the blocks and
formats the read word. `minidice_top` adds the rings. The shared enum and the
word-formatting function are in `es_pkg`.

## Interface and timing

`minidice_top` ports: `clk_i` (reference clock), `rst_ni` (asynchronous,
active low; zeroizes everything and starts BIST), `noise_en_i` (enables the
rings), `env_fatal_i`, `poll_i`, `rd_o[XLEN-1:0]`.

* `rd_o` is combinational from registered state. It is valid in the same clock as
  `poll_i`, like a CSR read. `poll_i` is a one-clock strobe per executed
  instruction. A poll that sees ES16 wipes the word at the end of that clock. A
  poll in the next clock therefore sees WAIT.
* At the default sizes, the source leaves BIST about 16,400 clocks after reset (1024
  samples × 16 clocks). After that it delivers a seed about every 1,000–1,100
  clocks. In simulation, 32 seeds (512 bits) were ready about 50,600 clocks
  after reset.

Parameters (defaults): `CHAINS` 3, `XLEN` 32, `SAMPLE_DIV` 16, `RCT_CUTOFF` 41,
`APT_WINDOW` 1024, `APT_CUTOFF` 793, `RELEASE_PERIOD` 64, `BIST_SAMPLES` 1024.
The 16-bit seed and the two-bit status encoding are fixed by the interface,
and 1024 is the window size that SP 800-90B suggests. All other values are
this design's own choices.

## What this design chooses where the interface leaves room

* The length of the start-up test, the health-test cutoffs, the sample
  divider and the release period (see above).
* The conditioner variant, which outputs the first bit of an unequal pair.
* The release delay. It is implemented as a fixed tick grid; other delay schemes
  would also satisfy the interface.
* A health failure during BIST is fatal. A failure while live is a non-fatal
  alarm. The interface would also allow a live failure to be fatal.
* The conditioner and buffer are flushed whenever the state is not live.
* `noise_en_i` is an addition. It lets a stopped source be modelled and tested.
* Only the baseline operation (`imm = 0`) exists. There is no raw-noise debug
  access, and there are no interrupts.
* The reference design is described as "a few hundred gate equivalents". This
  core has 97 flip-flops and about 190 word-level cells, which is probably
  somewhat larger. Most of the flip-flops are the 1024-sample window counters
  and the 16-bit buffer.

Outside this RTL: the CPU that decodes `pollentropy`, the environmental
sensors, and the software conditioner and DRBG.

## Verification

Every module has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_ro_noise_source` | half-period bounds, jitter present, stop and restart |
| `tb_noise_sampler` | sample = XOR of the chains two clocks earlier, exact 16-clock spacing |
| `tb_health_rct`, `tb_health_apt` | cycle-exact failure pulses against independent models, including windows just below, at and above the cutoff |
| `tb_blum_conditioner` | output sequence against a model; balanced output from a biased source (80 % ones) and from a correlated source (85 % repeats) |
| `tb_es_output_buffer` | cycle-exact against a model: XOR accumulation, tick-grid release, wipe-on-read, flush |
| `tb_es_ctrl` | every state transition, the alarm latch, DEAD stickiness |
| `tb_minidice` | the core with ideal random noise and short parameters, RV64 sign extension |
| `tb_minidice_top` | the full design at default sizes: start-up, 256 seeds, back-to-back polls, a stopped source (non-fatal alarm, latched, recovery), a source that stays stopped (DEAD), and a fatal alarm after reset |

The two end-to-end testbenches use `tb_es_monitor`, which checks the read port
in every clock:

* the field layout;
* that every state change appears in the diagram;
* that ES16 never survives a poll;
* that releases stay on the tick grid;
* that the polled seeds are balanced.

With Verilator 5 (the rings need `--timing`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_minidice_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/es_pkg.sv tb/tb_minidice_top.sv
./obj_dir/Vtb_minidice_top
```

The full-size run simulates about 2 ms of design time in under a second.

These tests show that the logic behaves as designed. They do not show that the
entropy is adequate: that depends on the physical rings and on an SP 800-90B
assessment of their raw output, which simulation cannot replace.

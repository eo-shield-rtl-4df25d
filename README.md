# EO-shield: one shield wire against both probing and EM side channels

An active shield is a long wire routed over a chip's sensitive logic on the
top metal layer. The chip drives a known signal into one end and checks what
comes out of the other. If someone mills through the wire with a focused ion
beam (FIB) to reach the logic underneath, or shorts or reroutes it, the
returned signal no longer matches and an alarm is raised.

EO-shield gives the same wire a second job. While it is not being checked,
the wire carries the output of a fast ring oscillator. The current pulses on
a wire that covers the whole protected area inject electromagnetic noise
right where an EM probe would pick up the leakage of the crypto core. That
lowers the correlation a correlation EM attack (CEMA) depends on. One wire,
driven by one small circuit, therefore covers both invasive attacks (FIB
probing) and non-invasive ones (EM side-channel analysis).

This RTL implements the drive-and-check circuit (the *obfuscation circuit*)
and puts it next to an AES-128 core as the protected logic. The shield wire
is layout, not logic, so it appears only as two ports and as a behavioural
model in the testbenches.

## How the shield signal is made

```
              clk (fast, 250 MHz)
               |
     +---------+-----------+
     |                     |
  eo_lfsr (15 bit)     eo_freq_divider (/10)
  x^15 + x + 1             |
     |  [3] [13]   [9]     | clk_chip (25 MHz)
     |   |   |      |      |
     |  eo_ro_generator    |
     |  rings of 3/5/7/9   |
     |  inverters          |
     |      | RO_out       |
     |      v      v       v
     |     eo_noise_mux  (clk_chip high: lfsr_out[9], low: RO_out)
     |           | shield_out
     |           v
     |     ~~~ active shield wire (top metal) ~~~
     |           | shield_in (A_out)
     |           v
     +-----> eo_comparator (checks lfsr_out[9] while clk_chip is high) --> alarm
```

- **LFSR** (`eo_lfsr`). A 15-bit maximal-length register on the primitive
  polynomial x^15 + x + 1, stepped every cycle of the fast clock `clk`. It
  repeats only after 32767 steps. Three of its bits leave it: bit 9 is the
  data sent through the shield, and bits 3 and 13 choose a ring oscillator.
- **Frequency divider** (`eo_freq_divider`). Divides `clk` by `DIV`
  (default 10) into `clk_chip`, which is high for ceil(DIV/2) cycles and low
  for the rest. `clk_chip` is also the clock of the AES core.
- **Ring-oscillator generator** (`eo_ro_generator`). Four free-running rings
  of 3, 5, 7 and 9 inverters, so four different frequencies. The select
  value `{lfsr_out[13], lfsr_out[3]}` = k picks the ring with
  3, 5, 7 or 9 stages for k = 0, 1, 2, 3. Because the select bits come from the LFSR, the noise
  frequency changes pseudo-randomly.
- **Multiplexer** (`eo_noise_mux`). Drives the shield with `lfsr_out[9]`
  while `clk_chip` is high and with the selected ring while it is low:

```
clk        _|~|_|~|_|~|_|~|_|~|_|~|_|~|_|~|_|~|_|~|_|~|_
clk_chip   _|~~~~~~~~~~~~~~~~~~~|___________________|~~~
shield_out  < lfsr_out[9], one  >< RO_out: ring     ><
              new bit per clk      oscillator noise
```

During the LFSR phase the shield bit changes with every `clk`. With n
`clk` cycles in that phase, the chance that it stays at one given level for the whole
phase is 1/2^n.

## How tampering is detected

`eo_comparator` samples the returned signal `shield_in` on every rising
edge of `clk` that ends a cycle of the LFSR phase. It compares it with the
bit that was sent during that cycle. A difference pulses `mismatch` for one
cycle and sets `alarm`, which stays high until reset. Nothing is compared
during the ring-oscillator phase, because the noise that comes back cannot
be predicted cycle by cycle.

Two timing rules follow from this:

- The delay of the shield wire must stay below one `clk` period. The
  testbenches model 800 ps against a 4 ns period. A detour that adds more
  delay is itself detected.
- Every LFSR phase performs ceil(DIV/2) checks, each on a fresh
  pseudo-random bit. A wire stuck at 0 or 1 is caught at the first check
  whose bit differs, which is almost always within the first phase. A
  forged signal that the attacker generates without knowing the LFSR state
  is wrong with probability 1/2 at each check.

In simulation, cutting, shorting, rerouting with extra delay and feeding a
forged random bit were each detected within 1 to 3 fast-clock cycles of
the LFSR phase.

What the circuit cannot see: an attacker who bridges the two ends of a cut
with a copy of the original signal and the right delay keeps the
comparison happy. Shield layouts guard against that with a random
serpentine topology that is hard to follow. That is a layout matter
(below).

## The protected circuit: AES-128

`aes128_core` is an iterative AES-128 encryption core that runs one round
per `clk_chip` cycle. Round keys are expanded on the fly. A `start` pulse
loads `plaintext ^ key`, and `done` pulses 10 cycles after the start edge,
with the ciphertext on `ciphertext`. A start while `busy` is ignored.

The S-box is computed at elaboration, not stored as a table: the
multiplicative inverse in GF(2^8) (found through exponent and logarithm
tables to the generator 3), followed by the AES affine map. The core
follows FIPS-197 byte order: byte i of a 128-bit word is bits
[127-8i -: 8], and column c holds bytes 4c..4c+3.

`protected_aes` is the top level. It holds the obfuscation circuit and the
AES core, with `clk_chip` as the AES clock. The alarm is only reported on a
port. What the chip does on an alarm (wipe keys, stop the core) is left to
the integrator.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `protected_aes`, `eo_obfuscation` | `CLK_DIV` | 10 | clk / clk_chip ratio (250 MHz to 25 MHz) |
| `eo_obfuscation`, `eo_lfsr` | `SEED` | 15'h0001 | LFSR state after reset (0 is replaced by 1) |
| `eo_obfuscation`, `eo_ro_generator` | `T_INV_PS` | 60 | modelled inverter delay in ps |
| `eo_freq_divider` | `DIV` | 10 | divide ratio, at least 2 |

Shared constants live in `eo_pkg` (LFSR width, tap positions, ring
lengths) and in `aes_pkg` (AES round functions and S-box).

The scheme was evaluated with the fast clock at 250, 200 and 166 MHz and
AES at 25 MHz. Ratios 10 and 8 give exactly 25 MHz. 166 MHz has no integer
ratio to 25 MHz (6.64). `CLK_DIV` = 7 gives 23.7 MHz there.

## Files

| File | Contents |
|---|---|
| `rtl/eo_pkg.sv` | constants of the obfuscation circuit |
| `rtl/eo_lfsr.sv` | 15-bit LFSR |
| `rtl/eo_freq_divider.sv` | clk to clk_chip divider |
| `rtl/eo_ro_generator.sv` | ring oscillators (behavioural model) |
| `rtl/eo_noise_mux.sv` | shield multiplexer |
| `rtl/eo_comparator.sv` | shield check and alarm |
| `rtl/eo_obfuscation.sv` | the obfuscation circuit assembled |
| `rtl/aes_pkg.sv`, `rtl/aes128_core.sv` | AES-128 core |
| `rtl/protected_aes.sv` | top level |
| `tb/active_shield_model.sv`, `tb/shield_tb_pkg.sv` | shield wire model with attack modes |
| `tb/aes_ref_pkg.sv` | reference AES decryption used to check ciphertexts |
| `tb/protected_aes_rate_harness.sv` | one chip at a chosen clock rate, for `tb_protected_aes_rates` |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_protected_aes_rates` |

Everything in `rtl/` is synthesizable except `eo_ro_generator`. A ring
oscillator is a combinational loop whose frequency comes from gate delays,
and RTL cannot express that. The module models the rings with delays. On
silicon it is replaced by hand-placed inverter chains with the same ports:
`sel[1:0]`, `ro_out` and `ro_all[3:0]`.

## Simulating

All testbenches print `TB_RESULT checks=N failures=M` and finish by
themselves. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_protected_aes \
  -Irtl -Itb -y rtl -y tb \
  rtl/eo_pkg.sv rtl/aes_pkg.sv tb/shield_tb_pkg.sv tb/aes_ref_pkg.sv \
  tb/tb_protected_aes.sv
./obj_dir/Vtb_protected_aes
```

For any other testbench, replace the top module and the last file. The
packages must stay in front. The files use `` `timescale 1ns / 1ps ``.

| Testbench | What it checks |
|---|---|
| `tb_eo_lfsr` | every state against the x^15 + x + 1 recurrence for a full period of 32767 steps; no zero state; no early repeat; seed-0 fallback |
| `tb_eo_freq_divider` | high and low phase lengths for ratios 10 and 7; level during reset |
| `tb_eo_noise_mux` | all input combinations |
| `tb_eo_comparator` | mismatch and sticky alarm against a model; no check while disabled; reset |
| `tb_eo_ro_generator` | period of each selected ring (2 x N x T_INV); all rings keep running |
| `tb_eo_obfuscation` | shield content in both phases; no false alarm; cut detected; reset |
| `tb_aes128_core` | FIPS-197 examples; 200 random pairs checked by decryption; latency |
| `tb_protected_aes` | default parameters: 1000 random encryptions under an intact shield with no false alarm; shield content every cycle; each of the four rings seen; cut, short, detour and forged-signal attacks all detected during an encryption |

| `tb_protected_aes_rates` | fast clock at 250, 200 and 166.7 MHz with ratios 10, 8 and 7: chip-clock period, 50 encryptions each, cut detected at each rate |

`tb_protected_aes` runs at the default parameters in a few seconds.

## Choices made in this RTL

The scheme fixes the LFSR polynomial, the taps 3, 9 and 13, the four ring
lengths, the divider from `clk` to `clk_chip`, which signal the
multiplexer passes in each phase, and the comparison of `lfsr_out[9]` with
the returned signal. The following are this implementation's own choices:

- The Fibonacci form of the LFSR, with the new bit = bit1 ^ bit0 entering
  at the top. All flip-flops use the rising clock edge and an asynchronous
  active-low reset.
- The divide ratio of 10, read from the 250 MHz / 25 MHz operating
  point, and the duty cycle.
- The mapping of the select bits onto the rings, and a 60 ps inverter
  delay in the model.
- The comparison runs only during the LFSR phase. It is sampled once per
  `clk`. The alarm is sticky.
- The AES architecture (iterative, one round per cycle), its handshake,
  and clocking it from `clk_chip`.

## What is not here

- **The shield wire and its layout.** The shield has a random Hamiltonian
  topology. It is produced by a layout generator that splits the area into
  a grid of cells, each a square of four grid points. The generator then
  merges neighbouring cells one by one into a single loop. Areas narrower
  than 8 x (wire width + wire space) get a randomised parallel pattern
  instead. This is physical design, outside RTL.
- **Antenna-effect fixes** (jumpers, transmission gates, diodes on the
  long wire). These are layout steps.
- **EM and power results.** The noise injection is meant to push the EM
  signal-to-noise ratio of the AES below 1, at an area cost of about 1.75%
  and a power cost of 6 to 10%. Neither can be measured in RTL
  simulation. These numbers come from the published evaluation in a
  180 nm process and were not reproduced here.

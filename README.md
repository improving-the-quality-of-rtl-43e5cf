# Ring-oscillator PUF with configurable oscillators

A physical unclonable function (PUF) derives a chip-unique bit string from
manufacturing variation instead of storing it. In a ring-oscillator (RO) PUF,
many identically laid-out oscillators run at slightly different frequencies. A
response bit says which oscillator of a pair is faster. This design adds two
ideas to the basic RO PUF:

* **Adjacent pairs only.** The oscillators sit in a compact array, and bit
  *i* always compares oscillator *i* with its neighbour *i+1*. Variation that is
  spatially correlated (a smooth frequency gradient across the die, similar on
  every die) then cancels inside each pair. What is left is the random,
  chip-unique part. *N* oscillators give *N−1* bits.
* **Configurable oscillators.** Each oscillator has eight selectable loops,
  set by three select bits *c1 c2 c3*. All oscillators share the same
  configuration, so a neighbouring pair can be compared in eight ways. At
  enrollment the configuration with the largest frequency difference is chosen
  for each pair. That bit is the one least likely to flip under voltage or
  temperature change. The chosen configuration is the pair's challenge and is
  used again whenever the response is regenerated.

The RTL is written for a default of 128 oscillators and a 127-bit response,
attached to a host processor as a coprocessor over two Fast Simplex Link (FSL)
FIFO channels.

## Block structure

```
puf_top
├── fsl_coproc          FSL command/reply front end
└── puf_core
    ├── ro_bank         NUM_RO × config_ro (oscillator model), shared cfg, own enables
    ├── ro_pair_select  enables RO i and i+1, routes them to the counters
    ├── ro_counter ×2   edge counters clocked by the two oscillators
    ├── freq_compare    bit = count_a > count_b, diff = |count_a − count_b|
    └── puf_ctrl        measurement sequencer
        ├── max_diff_select  best-of-eight tracker used during enrollment
        └── challenge_mem    stored configuration per pair (NUM_RO−1 × 3 bits)
```

`puf_pkg` holds the shared types: `cfg_t` (three select bits), `puf_op_e`
(the command opcodes) and `puf_cmd_t` (the command word). `ro_env_pkg` holds
one simulation-only variable: the operating point of the oscillator model
(see below).

## The configurable oscillator (`config_ro`)

One oscillator fills one logic block (CLB) of the FPGA. An AND gate (the
enable) closes the ring. It is followed by three stages. Each stage has two
inverters in parallel (one LUT each) and a 2:1 multiplexer that passes one of
them. Select *c1* drives the first stage and *c3* the last. Every one of the
2³ = 8 loops passes through three inverters, so every configuration
oscillates. Each configuration runs through a different set of inverters and
so has its own frequency, at the cost of only 7 LUTs and 3 multiplexers.

An oscillator cannot be written as synthesizable logic: it is a combinational
loop. `config_ro` is therefore a **simulation model** with the real part's ports
(`en`, `cfg[2:0]`, `ro_out`). Its half period in picoseconds is:

```
AND (700) + CORR_PS + Σ over 3 stages [ inverter (600 ± up to 30) + mux (400) ] + jitter (0..JITTER_PS)
```

* Each of the six inverters gets a fixed offset in [−30, +30] ps. The offset
  is a 32-bit hash of the oscillator's `SEED` and the inverter's index, and it
  stands for process variation.
* `ro_bank` gives oscillator *i* the seed `BASE_SEED + i`.
* `CORR_PS` is a systematic delay. It grows quadratically toward both ends of
  the array, up to `CORR_AMP_PS`, so the ends are slower than the middle.
* While `en` is low the output rests high.
* `ro_env_pkg::env_permille` is the operating point. It stands for supply
  voltage and temperature, and changes every inverter delay by that many
  parts per thousand on average. Each inverter has its own sensitivity, a
  hashed (100 ± `ENV_SPREAD`) % of the average. Because of that spread, two
  close oscillators can swap order when the operating point moves. At 0 the
  delays are exactly the nominal ones.

With these numbers an oscillator runs near 135 MHz. All delay values are
choices of this model, not measured data. To simulate a different chip,
change `BASE_SEED`. Synthesis tools will not build this file. On an FPGA it
has to be replaced by a placed hard macro: the LUTs and multiplexers locked
into one CLB, and the macros placed as a 2-D array.

## Measuring one pair

`puf_ctrl` measures one pair in one configuration in `WINDOW_CYCLES + 7`
clock cycles:

| phase  | cycles        | what happens |
|--------|---------------|--------------|
| CLEAR  | 2             | oscillators stopped, both counters cleared |
| RUN    | WINDOW_CYCLES | oscillators *i* and *i+1* enabled, counters count their rising edges |
| SETTLE | 4             | oscillators stopped, last edges settle |
| EVAL   | 1             | `freq_compare` result taken |

Each counter is clocked by its own oscillator, so it can follow frequencies
far above the system clock. Its clear is asynchronous. The system domain only
clears the counters while the oscillators are stopped, and only reads them
after stopping them again. The count is therefore static when it is read, and
no synchronizer is needed. `run` and `cnt_clr` are registered, so the
asynchronous clear is glitch-free. Both lag the state machine by one cycle,
which leaves the window length unchanged. Only the measured pair oscillates.
The other 126 oscillators are stopped, which keeps self-heating and coupling
noise down.

With a 50 MHz clock and the default 2048-cycle window, each count is near
5,500. Neighbouring oscillators in the model differ by tens of counts, and the
counters are 16 bits wide (`CNT_W`). The response bit is 1 when oscillator *i*
counts more than oscillator *i+1*; a tie gives 0.

## Enrollment and regeneration

**ENROLL** visits the pairs 0 … N−2 in order. For each pair it measures the
eight configurations 000 … 111 in order. `max_diff_select` keeps the first
configuration with the strictly largest |difference|, along with that
configuration's bit. The configuration is written to `challenge_mem` and the
bit to the response register.
Cost: (N−1)·(8·(W+7)+1) cycles, which is 2,088,007 cycles (42 ms at
50 MHz) at the defaults.

**GENERATE** measures each pair once, in its stored configuration:
(N−1)·(W+7) cycles, 260,985 at the defaults.

The host can read the configuration table out after enrollment and keep it in
its challenge database (**GETCFG**). It can load the table back later
(**SETCFG**), for example after a power cycle, since the table is cleared at
reset. **MEASURE** runs one pair in one given configuration. That allows a
single oscillator configuration to be compared with the enrolled choice.

In the full-size test, the enrolled configurations give a mean difference of
about 101 counts per pair. A fixed configuration 000 gives 58. All eight
configurations get chosen for some pairs, so no one loop is best everywhere.

## Why the enrolled configuration is more stable

A bit flips when a change of voltage or temperature moves the two
oscillators of its pair by more than their frequency difference. Choosing,
per pair, the configuration with the largest difference therefore removes
most marginal bits. It costs no extra oscillators: only eight measurements
per pair at enrollment and a 3-bit challenge per pair.

`tb_puf_reliability` shows this with the model. A 128-oscillator core is
enrolled at the nominal point, then regenerated at operating points of −15 %,
−7.5 %, 0, +7.5 % and +15 % average delay change. A bit counts as unstable if
it ever differs from its nominal value. With the enrolled configurations, 0
of 127 bits are unstable. With each of the eight fixed configurations the
count is 19 to 30 (23.6 on average). The size of the effect depends on the
model's sensitivity spread, which is an assumption. The ranking of enrolled
against fixed configurations is the part that carries over.

## Host interface (`fsl_coproc`)

The design uses the usual FSL FIFO handshake. On the command side, a word is
popped with `s_fsl_read` while `s_fsl_exists` is high. On the reply side, a
word is pushed with `m_fsl_write` while `m_fsl_full` is low. The block
handles one command at a time. Each command gets a reply, and the reply's
last word is marked with `m_fsl_control = 1`. Data bit 0 is the least
significant bit.

Command word (`puf_cmd_t`): `[31:28]` opcode, `[18:16]` configuration,
`[15:0]` pair index. The other bits are ignored.

| op | name     | reply |
|----|----------|-------|
| 1  | ENROLL   | ⌈(N−1)/32⌉ words, bit *k* of word *w* = response bit of pair 32*w*+*k*; unused bits 0 |
| 2  | GENERATE | same format |
| 3  | MEASURE  | `[31]` bit, `[18:16]` configuration, `[15:0]` \|difference\| (saturated) |
| 4  | SETCFG   | the command word echoed |
| 5  | GETCFG   | `[18:16]` stored configuration, `[15:0]` pair |
| other | —     | the command word echoed |

The first reply word of ENROLL or GENERATE appears a few cycles after the
last measurement: the core raises `done` two cycles after its last EVAL, and
the front end starts pushing on the next cycle. Assertions in `fsl_coproc` check that no word
is pushed into a full FIFO and no word is popped from an empty one.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_RO` | 128 | oscillators; response has NUM_RO−1 bits (64 and 256 are also sensible) |
| `WINDOW_CYCLES` | 2048 | counting window in system clocks (chosen here) |
| `CNT_W` | 16 | counter width; must hold the count of the fastest oscillator over one window |
| `BASE_SEED`, `CORR_AMP_PS`, `JITTER_PS` | 1, 40, 8 | oscillator model only: chip identity, systematic-variation amplitude, per-half-period jitter |

Lengthening the window raises the count resolution and the measurement time
in proportion. Widen `CNT_W` along with it: at roughly 135 MHz per
oscillator, 16 bits suffice up to a window of about 9,000 cycles at 50 MHz.

## What follows the method and what is this design's own

The following follow the method:

* the configurable oscillator's structure (AND gate, three stages of two
  inverters and a multiplexer, eight configurations);
* one configuration shared by all oscillators;
* the comparison of adjacent pairs only, giving N−1 bits;
* the exhaustive sweep over the eight configurations, with the
  maximum-difference one stored as the challenge;
* the 128-oscillator size;
* use as a coprocessor over FSL.

The following are this design's own choices:

* counter-based frequency measurement, the window length and the settle time;
* the bit polarity and the tie rule;
* running only the measured pair;
* the on-chip challenge table, which can be read out and reloaded;
* the command set and word formats;
* every number inside the oscillator model.

Voltage and temperature appear only as the model's single operating-point
variable. No physical calibration stands behind its scale, so the
unstable-bit counts above are illustrations, not predictions for silicon.

## Simulation

All files are SystemVerilog-2017. Verilator 5 needs `--timing` for the
oscillator model and the testbenches. A testbench is built like this:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/puf_pkg.sv rtl/ro_env_pkg.sv tb/tb_puf_top.sv \
  --top-module tb_puf_top -o sim && obj_dir/sim
```

Every testbench checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog that ends the run
with a failure if the simulation hangs.

| testbench | covers |
|-----------|--------|
| `tb_config_ro` | period of all eight configurations, and at moved operating points, against a recomputed delay sum; output rests high when disabled |
| `tb_ro_bank` | per-position periods including the systematic profile; only enabled oscillators toggle |
| `tb_ro_pair_select`, `tb_ro_counter`, `tb_freq_compare`, `tb_max_diff_select`, `tb_challenge_mem` | the small blocks, exhaustively or with random stimulus |
| `tb_puf_ctrl` | the sequencer against a table-driven stand-in for the datapath: window length, best-of-eight choice with ties, table access, cycle counts |
| `tb_fsl_coproc` | reply formats, control bit, back-pressure and idle gaps, against a stand-in core |
| `tb_puf_core` | 8-oscillator core with the oscillator model: measured differences, enrollment choice, regeneration |
| `tb_puf_top` | the full 128-oscillator coprocessor at default parameters, driven over FSL; about 1,300 checks, about 100 s in Verilator |
| `tb_puf_reliability` | 128 oscillators, 256-cycle window: unstable bits over an operating-point sweep, enrolled against the eight fixed configurations (about 70 s) |
| `tb_puf_uniqueness` | three simulated chips of 64 oscillators; mean inter-chip Hamming distance (50.8 %, ideal 50 %) |

`tb/ro_predict.svh` is the testbenches' reference model of oscillator
periods. It recomputes the model's delay recipe independently of the RTL.
The expected count of an oscillator is the window length (in ns) × 1000 /
period (in ps). Checks allow ±2.5 counts for the unknown start phase and for
jitter.

# Ring-oscillator PUF with Euclidean-distance ID extraction

A ring oscillator (RO) on an FPGA runs at a frequency set by the exact delays
of its LUTs and wires. Process variation makes those delays differ a little
from ring to ring and from chip to chip, so a set of identical rings makes a
fingerprint of the chip: a physically unclonable function (PUF). The difficulty
is that the absolute frequencies are mostly set by things that move *all* rings
of a chip together: die-to-die process shift, temperature and supply. Between
25 °C and 80 °C every ring moves by several MHz, far more than the tens of kHz
that separate neighbouring rings.

The design here follows the Euclidean-metric scheme of Tran, Trinh and Hoang
for RO-PUFs on Spartan-class FPGAs. The ID of a chip is the vector of
**differences between neighbouring rings**,

    id[i] = f[i] - f[i+1],   i = 0 .. n-2,

each kept as a k-bit two's-complement number rather than reduced to one
"faster/slower" bit. The common shift cancels in every difference. What is
left is the local variation pattern, which stays stable over temperature.
Two IDs are compared by their **Euclidean distance**, normalized to 0..1, and
the result is checked against a threshold. With 32 rings the ID has
31 × 24 = 744 bits. No ring has to be excluded for being too close to its
neighbour: a small difference is just as much part of the pattern.

The RTL covers the whole chain:

- the ring array (a behavioural model),
- the single multiplexed frequency counter and its sequencer,
- the ID extractor,
- a serial readout,
- on-chip enrolment (averaging samples into a nominal ID),
- a six-entry ID database,
- the distance comparator that decides match or no match.

## Block diagram

```
            ro_en                 sel
  ro_array ───────┐        ┌──────────────── meas_sequencer ──────────┐
  (32 rings) osc[31:0] ──► ro_mux ──ro_clk──► ro_counter ──count──►   │
                                   clr, gate ◄────────────────────────┤
                                                     cap_valid/idx/data
                                                         ▼
                                                   raw_freq_regs (32 × 24 b)
                                                         │ freq[]
                                   sweep_done ──► id_extractor (one subtractor,
                                                  neighbor_diff, 31 cycles)
                                                         │ id_sample (31 × 24 b)
                      ┌──────────────────────────────────┼─────────────────┐
                      ▼                                  ▼                 ▼
             data_transmitter ─► uart_tx ─► txd    id_enroll        id_comparator ─► match / idx
             (ID or raw frame)                     (mean of 255)        ▲
                                                         ▼              │
                                   host load ───►  id_database (6 entries)
```

`puf_top` wires these together. Every module is in `rtl/<name>.sv`. Shared
constants and the threshold function are in `rtl/puf_pkg.sv`.

## Measuring the rings

All rings run together from one enable, but there is only **one counter**.
`ro_mux` routes one ring at a time to it. A single counter has no
counter-to-counter bias, and it costs little area. `meas_sequencer` holds the
three counters of the measurement path:

- the window timer,
- the RO select counter (0..31),
- the sample counter (0..254), which counts complete sweeps over the array.

Each ring goes through four phases:

| phase | length (cycles) | what happens |
|---|---|---|
| CLEAR | `SETTLE_CYCLES` (16) | select the ring; the counter is held in asynchronous clear while the mux output settles |
| GATE  | `WINDOW_CYCLES` (1,000,000 = 20 ms at 50 MHz) | window open |
| HOLD  | `SETTLE_CYCLES` | the window closes in the ring clock domain; the count stops |
| CAP   | 1 | count written to `raw_freq_regs[sel]` |

`ro_counter` is clocked by the ring itself. The window (`gate`) is a
system-clock signal. It passes through a two-flip-flop synchroniser clocked by
the ring, so the counter sees the window to within one ring period. The count
is n_cycle = f × 20 ms ± 1, and f = 50 × n_cycle Hz. This ±1 count (±50 Hz)
is the measurement quantisation. Its standard deviation, about 7 Hz, is
negligible next to the spread between rings. The count is read in the system
domain only after HOLD, when it no longer changes, so it needs no Gray code or
handshake. The counter saturates at all ones. A 24-bit counter covers rings up
to 838 MHz, and a typical ring runs at 57 MHz.

One sweep of 32 rings takes 32 × (1,000,000 + 33) cycles, about 640 ms. After
the last ring, `sweep_done` starts the post-processing. The sequencer then
waits until readout and comparison are finished (`post_busy`) before it
begins the next sweep. The raw registers and the ID therefore stay stable
while they are read. A run is `NUM_SAMPLES` = 255 sweeps.

**SETTLE_CYCLES has to cover a few periods of the slowest ring.** With 16
cycles at 50 MHz, that holds for any ring above about 10 MHz.

## Forming the ID

`id_extractor` time-shares one `neighbor_diff` subtractor over the 31 pairs,
one pair per cycle. `id_valid` comes 32 cycles after the start. Each element
is `f[i] - f[i+1]` as a signed `K_BITS` number. If the exact difference does
not fit, it is clamped to the extreme of its sign and `id_sat` is raised.
With k = m = 24 that cannot happen for real rings: neighbours differ by a few
thousand counts.

## Distance, normalization and the threshold

For an ID sample R_l and a nominal ID R, both with n-1 = 31 elements, the
squared distance in counts² is

    D = Σ (R_l[j] - R[j])²

The normalized distance converts counts to Hz (×50 for the 20 ms window) and
divides by the largest possible distance, 2^k_norm · √(n-1):

    d = 50 · √D / (2^20 · √31)

Here k_norm = 20 is the effective width of the frequency differences (20 for
Spartan-3E; 21 would be used for Spartan-6). A sample matches an entry when
d ≤ 0.0181. Squaring both sides turns this into a constant bound on D:

    D ≤ 0.0181² · 2^40 · 31 / 50² = 4,466,527 counts²

`puf_pkg::dist_sq_threshold` evaluates that bound at elaboration from
`K_MEA`, `K_NORM`, `D_TH_E4` (the threshold ×10⁴) and `N_ID`. The hardware
therefore needs no square root and no divider. `id_comparator` accumulates D
with a single multiplier, one element per cycle (31 cycles per valid entry,
one cycle for an empty one). It keeps the nearest valid entry and reports
`auth_match`, `auth_idx` and `auth_dist_sq`. A host can compute
d = 50·√auth_dist_sq / (2^20·√31) to get the same normalized figure.

For scale, from the published measurements:

- the spread of ID samples of one chip gives d up to about 0.014–0.019;
- different chips are 0.107–0.244 apart;
- the threshold 0.0181 sits about six times below the closest pair of chips.

## Enrolment and authentication

- **Enrol** (`enroll = 1` during a run): `id_enroll` adds the 255 ID samples
  of the run into 32-bit accumulators. It then divides each by 255, one
  element per cycle, and the result is written to `id_database` slot
  `enroll_slot` (`enroll_done`). The division multiplies by ⌈2^S/255⌉ and
  shifts, with S chosen so that the quotient (rounded toward zero) is exact.
- **Authenticate** (`enroll = 0`): every ID sample is compared with all valid
  entries; `auth_done` pulses once per sample.
- **Host load**: `db_we`, `db_waddr`, `db_wdata` write a nominal ID computed
  elsewhere. The enrolment result has priority if both arrive in the same
  cycle.

## Serial readout

Every sample is sent by `data_transmitter` over `uart_tx` (8N1, 115200 baud,
LSB first, line idle high). A frame is:

| byte | content |
|---|---|
| 0 | `0xA5` for an ID sample, `0x5A` for raw counts |
| 1 | sample number (0..254) |
| 2.. | ID: 31 words; raw: 32 words. Each word is 3 bytes, most significant byte first; ID words are sign-extended |

`raw_mode = 1` sends the 32 raw counts instead of the ID, for characterising
the rings. An ID frame (95 bytes) takes 8.2 ms.

## Top-level interface (`puf_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | system clock (50 MHz assumed), asynchronous active-low reset |
| `start` | in | one-cycle pulse: start a run of `NUM_SAMPLES` sweeps |
| `enroll`, `enroll_slot` | in | enrol into a slot instead of authenticating; hold during the run |
| `raw_mode` | in | send raw counts instead of ID samples; hold during the run |
| `db_we`, `db_waddr`, `db_wdata[31]` | in | host write of a nominal ID |
| `txd` | out | serial output |
| `busy`, `sample_idx` | out | run in progress, current sample number |
| `run_done` | out | one-cycle pulse when the last sample of a run is finished |
| `id_valid`, `id_sample[31]`, `id_sat` | out | each ID sample as it completes |
| `auth_done`, `auth_match`, `auth_idx`, `auth_dist_sq` | out | decision per sample |
| `enroll_done` | out | nominal ID written to the database |

Main parameters and their defaults: `N_RO` 32, `M_BITS` 24, `K_BITS` 24,
`CLK_HZ` 50 MHz, `WINDOW_CYCLES` = `CLK_HZ/50` (20 ms), `SETTLE_CYCLES` 16,
`NUM_SAMPLES` 255 (at most 256), `BAUD` 115200, `DB_ENTRIES` 6, `K_MEA` 50,
`K_NORM` 20, `D_TH_E4` 181. The `RO_*` parameters only shape the ring model
(see below).

## The ring model and what it means for synthesis

A ring oscillator is a deliberate combinational loop. Its frequency is the
routed delay of its stages, which RTL cannot express. In the original design
each ring is a NAND gate plus 16 inverters, one per LUT, placed and routed by
hand as a hard macro. The macros sit at equal distances from the counter so
that all rings are alike.

`ro_cell` and `ro_array` are therefore **behavioural models, not
synthesizable**. `ro_cell` toggles every `HALF_PERIOD_PS` picoseconds while
enabled, plus an optional random jitter of up to `JITTER_PS` per half period.
`ro_array` gives ring i the half period

    RO_BASE_HALF_PS + RO_GLOBAL_PS + local(i)

where local(i) ∈ [-RO_SPREAD_PS, RO_SPREAD_PS] comes from a fixed integer hash
of `RO_SEED` and i:

- `RO_SEED` stands for one chip's local pattern;
- `RO_GLOBAL_PS` stands for whatever moves all rings of a chip together.

The defaults (8735 ± 10 ps) give 57.24 MHz ± about 65 kHz. Synthesis tools
report the model as a logic loop, which is what a ring is. To build the design
on an FPGA, replace `ro_array` with hand-placed ring macros that have the same
ports (`enable` in, `osc[N_RO-1:0]` out). Constrain `ro_clk` as a clock, and
keep the rings and the mux symmetric. Everything else is ordinary
synchronous RTL.

## Where this RTL departs from or adds to the source

These points are choices made here, not taken from the published design:

- **Normalization.** The normalized distance uses 2^k_norm (k_norm = 20) and
  frequencies in Hz, as in the source's error analysis. Its general formula
  writes 2^k with k = 24, but with 2^k the published distances (0.1–0.2)
  could not arise.
- **Enrolment and comparison on chip.** The source does these on a host
  computer. Here they are in logic, and the database can still be loaded
  from outside.
- **Averaging count.** The source speaks of both 255 and 256 repeated
  measurements. Enrolment averages the 255 samples of a run.
- **Counter order.** The RO select counter is the inner loop and the sample
  counter the outer one: one ID sample is one sweep over all rings.
- **Chosen where the source is silent:**
  - the 50 MHz clock;
  - the settle times;
  - the synchroniser and the saturating counter;
  - clamping of ID elements;
  - the UART format, rate and frame layout;
  - reporting the nearest of several matching entries;
  - reset behaviour;
  - the waiting between samples.
- **Not reproduced.** The baseline one-bit neighbour-pairing scheme, and the
  statistics that set the threshold (6σ of the intra-distance over many
  samples and temperatures). The threshold is a parameter.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- **Ring model:** periods, jitter bounds, the global shift and the seed
  pattern, against the hash recomputed in the testbench.
- **`ro_counter`:** counts within ±1 of window/period, and saturation.
- **`meas_sequencer`:**
  - the order of rings and samples;
  - exact phase lengths (2·SETTLE + WINDOW + 1 cycles per ring);
  - the mux changes only under clear;
  - the wait for `post_busy`.
- **`id_extractor`:** exact differences, clamping at k = 8, and the 32-cycle
  latency.
- **`uart_tx` and `data_transmitter`:** bit timing and byte order, decoded by
  the receiver model `tb/uart_rx_model.sv`.
- **`id_enroll`:** exact truncated means for 5 and for 255 samples, including
  values near ±2^23.
- **`id_comparator`:** against a floating-point reference of the normalized
  distance, with latency and the empty-database case.

`tb/puf_top_tb.sv` runs the whole design at reduced size: 4 rings, a
2000-cycle window, 4 samples, 12-bit IDs and `K_NORM` = 14, so that the
threshold suits the short window. It uses three devices:

- device A enrols itself and then authenticates, with raw readout;
- device B is the same chip with every ring slowed by 300 ps. It is
  recognised from A's nominal ID with a squared distance of 4 counts²;
- device C is another chip and is rejected (1918 counts²).

Every ID sample is checked against the differences predicted from the ring
periods, and every frame is decoded. The test also counts that each mechanism
occurred: sweeps, the wait for readout, enrolment, match, no match, ID
frames and raw frames.

`tb/puf_auth_workload_tb.sv` fills the database to its full six entries. It
runs thirteen copies of the top at reduced size (8 rings, otherwise as
above):

- six dies, which enrol themselves;
- the same six dies with every ring slowed by 300 ps;
- a seventh die that is never enrolled.

For every decision, the testbench works out the nearest entry and its
distance, and the threshold test in real arithmetic; the top must agree.
All 48 samples of the six dies go to their own entry, whether shifted or
not, and the outsider is rejected. The worst normalized distance to a die's
own entry is 0.0072, and the best distance to another entry is 0.041.

`tb/puf_top_full_tb.sv` runs the top with every parameter at its default. It
loads the predicted ID into slot 0, measures one full sample (32 windows of
20 ms), and checks the ID, the decision and the serial frame. It simulates
650 ms of time with 32 rings toggling at 57 MHz, which takes about nine
minutes in Verilator.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/puf_pkg.sv tb/puf_top_tb.sv --top-module puf_top_tb
./obj_dir/Vpuf_top_tb
```

Replace `puf_top_tb` with any other testbench name. The ring model needs
`--timing`. Simulation speed is dominated by the ring toggles. To explore the
design faster, reduce `N_RO`, `WINDOW_CYCLES` and `NUM_SAMPLES`. To model a
noisy ring, set `RO_JITTER_PS`. A smaller window lowers the count resolution,
so scale `K_NORM` (or `D_TH_E4`) with it, as `puf_top_tb` does.

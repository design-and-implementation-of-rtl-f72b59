# Tunable beat-frequency TRNG built from two clock managers

This is a true random number generator for FPGAs. Its randomness comes from
clock jitter. Two on-chip clock managers (DCMs) derive two clocks from one
reference clock, at frequencies that differ only slightly. A flip-flop
samples one clock with the other. The sampled value flips once per *beat*,
each time the faster clock has gained one full cycle on the slower one. A
counter measures how many cycles each beat took. Jitter moves the clock
edges, so the low bits of that count are random. They are packed into
16-bit output words.

The generator is tunable without reloading the FPGA. Each clock's
frequency is set by a multiply factor M and a divide factor D. A small
controller rewrites M and D through the clock managers' Dynamic
Reconfiguration Ports (DRP) while the design runs. This changes the beat
length and with it the character of the output.

The classic beat-frequency detection (BFD) generator uses two free-running
ring oscillators instead. Those are hard to place on an FPGA so that they
match, and they need calibration. Clock managers give exact, repeatable
frequency ratios.

```
            +--------+ clk_a
  clk ----->| DCM-A  |-------------------+
   |        +--------+                   | D
   |          ^ DRP                 +----v----+  q   +--------------+ count_max +-----------------+
   |   +-------------+              |   DFF   |----->| beat counter |---------->| post-processing |--> out[15:0]
   +-->| DRP control |              +----^----+      +------^-------+ count_vld +-----------------+--> out_valid
   |   +-------------+                   | CLK              | CLK
   |          v DRP                      |                  |
   |        +--------+ clk_b             |                  |
   +------->| DCM-B  |-------------------+------------------+------> (also clocks post-processing)
            +--------+
  add[5:0], drp -> DRP control        en -> both DCMs (held in reset while low)
```

## From beat to bits

This is the part that needs most care.

**Frequency plan.** A setting N (1..30) fixes both clocks. With a reference
frequency `fin`:

| clock   | M     | D     | frequency            |
|---------|-------|-------|----------------------|
| clock A | N + 1 | N     | fin·(N+1)/N          |
| clock B | N + 2 | N + 1 | fin·(N+2)/(N+1)      |

Clock A is slightly faster: fA − fB = fin / (N·(N+1)). One beat therefore
lasts N·(N+2) cycles of clock B. The power-up setting is N = 30. With a
100 MHz reference this gives clock A = 103.33 MHz, clock B = 103.23 MHz and
a beat of 960 cycles of clock B (about 9.3 µs). M stays within 2..32 and D
within 1..32, the usual range of a DCM frequency synthesizer.

**Detector.** `bfd_dff` samples clock A on every rising edge of clock B.
Away from the edges of clock A, the sampled value is steady. It flips when
an edge of clock A drifts past the sampling edge. Each clock-B cycle, the
relative phase moves by T_B − T_A, which is only about 10 ps at N = 30.
The jitter is much larger: ±150 ps per edge in the model. Near each
crossing, the detector output therefore toggles at random for many
cycles. This happens at both edges of clock A, so each beat has two
clusters of toggles.

**Counter.** `beat_counter` runs on clock B. It restarts on every rising
edge of the detector output. The count it had reached is reported as
`count_max`, with a one-cycle `count_valid` pulse. A count is the number of
clock-B cycles between two consecutive rising edges, and it is at least 2.
Without jitter, a count is exactly one beat. When the jitter spans many
cycles, as at N = 30, both crossings produce rising edges. The long counts
are then a little under half a beat, with short counts from inside the
clusters between them. The first interval after reset
is partial and is not reported. The count saturates at 2^COUNT_W − 1.

**Packing.** `post_processing` keeps the 3 least significant bits of every
count. It shifts them into a 16-bit register and outputs a word after every
6 counts (18 bits). The oldest count sits in the most significant bits:
bit 15 is bit 0 of count 1, bits 14:12 come from count 2, and so on down to
bits 2:0 from count 6. Bits 2:1 of count 1 are dropped, so no bit is used
twice. `out` changes one clock-B cycle after the `count_valid` that
completes a word, with a one-cycle `out_valid`.

**Tuning changes the output.** In simulation with the jitter model:

| N  | beat (clock-B cycles) | behaviour                                                          |
|----|-----------------------|--------------------------------------------------------------------|
| 30 | 960                   | long clusters, many short counts; one word every ~4 µs; words vary |
| 4  | 24                    | clusters about one cycle wide; counts 23..26; most words vary      |
| 2  | 8                     | jitter far below the phase step; counts always 8; words constant   |

A large N lets the jitter act on many samples per crossing. A small N gives
fast, deterministic counts.

## Statistical quality (with the model's jitter)

The design was evaluated by running NIST SP 800-22 tests on the output
stream. `tb_trng_stats` computes three of them on 2^20 output bits at
N = 30, from the behavioural clock model. It gives:

* ones fraction 0.5046: the frequency (monobit) test is **not passed**
  (statistic 9.5, limit 2.58);
* block frequency test (M = 128): passed;
* runs test: **not passed**, with too many runs. The many short counts
  (2, 3, ...) make neighbouring bits anticorrelated.

These figures describe the jitter model (independent, uniform ±150 ps per
edge), not silicon. Real clock-manager jitter is larger and correlated, and
behaves differently. This RTL has no whitening or error-correction stage.
If the stream is to be used for cryptography, add one (for example a von
Neumann corrector or a hash) and test the hardware output.

## Retuning through the DRP

`drp_control` runs on `clk`. While `drp` is high, it compares the requested
setting (`add` clamped to 1..30: 0 reads as 1, 31..63 as 30) with the
setting it last applied. When they differ, it:

1. writes `{M−1, D−1}` for clock A to register 0x50 of DCM-A (`den` = `dwe`
   = 1 for one cycle);
2. waits for DCM-A's `drdy`;
3. does the same for DCM-B;
4. records the new setting.

With one-cycle `drdy` a retune takes 4 cycles of `clk`. While `drp` is low,
`add` is ignored. After reset the applied setting is `N_INIT`, the factors
both clock managers power up with.

In the model, a clock manager whose M/D register is written drops `locked`,
holds its clock low and relocks after 16 reference cycles. While either
clock manager is unlocked, the clock-B logic is held in reset through a
reset bridge. So no count spans a change of frequency, and the first
partial interval after a retune is discarded.

On a real device, the DRP address and bit layout of the synthesizer
factors depend on the FPGA family, and some families need the DCM to be
reset around a DRP write. Check both in the vendor's documentation before
mapping `drp_control` onto real primitives. Only the constants
`DRP_ADDR_MD` and the function `md_word` in `trng_pkg` should need to
change.

## Clocks and reset

| domain  | logic                                      |
|---------|--------------------------------------------|
| `clk`   | DRP controller, DRP ports of both DCMs     |
| clock B | detector flip-flop, counter, post-processing, `out`, `out_valid` |
| clock A | used only as data into the detector        |

`out` and `out_valid` are in the clock-B domain, whose clock is not
brought out. To read them from `clk`, bring clock B out or add a
clock-domain crossing (for example an asynchronous FIFO).

`reset` is asynchronous and active high. `en` low holds both clock
managers in reset: the clocks stop, and the clock-B logic is reset. The
detector output goes straight into the counter with no synchronizer.
Metastability of that flip-flop is part of the entropy source. The counter
registers the value once more before using it.

## Top-level interface (`trng`)

| port        | dir | width | meaning                                               |
|-------------|-----|-------|-------------------------------------------------------|
| `clk`       | in  | 1     | reference clock of both DCMs and of the DRP controller |
| `reset`     | in  | 1     | asynchronous reset, active high                        |
| `en`        | in  | 1     | run; low holds both DCMs in reset                      |
| `drp`       | in  | 1     | allow retuning to the setting on `add`                 |
| `add`       | in  | 6     | setting N (1..30, clamped)                             |
| `out`       | out | 16    | random word (clock-B domain)                           |
| `out_valid` | out | 1     | one clock-B pulse per new word                         |

| parameter         | default | meaning                                        |
|-------------------|---------|------------------------------------------------|
| `N_INIT`          | 30      | power-up setting                               |
| `COUNT_W`         | 16      | counter width                                  |
| `LSB_BITS`        | 3       | bits taken from each count                     |
| `OUT_W`           | 16      | output word width                              |
| `ADD_W`           | 6       | width of `add`                                 |
| `CLKIN_PERIOD_PS` | 10000   | reference period the DCM model assumes before measuring it |
| `JITTER_PS`       | 150     | peak jitter of each DCM output edge (model only) |

## Files

| file                    | content                                            |
|-------------------------|----------------------------------------------------|
| `rtl/trng_pkg.sv`       | DRP request/response structs, register address, setting-to-M/D functions |
| `rtl/trng.sv`           | top level                                          |
| `rtl/dcm_model.sv`      | behavioural clock manager: clkin·M/D with jitter, DRP port, lock |
| `rtl/drp_control.sv`    | DRP retune sequencer                               |
| `rtl/bfd_dff.sv`        | detector flip-flop                                 |
| `rtl/beat_counter.sv`   | beat counter with `count_max`                      |
| `rtl/post_processing.sv`| LSB extraction and word packing                    |
| `rtl/reset_sync.sv`     | reset bridge for the clock-B domain                |
| `tb/tb_*.sv`            | self-checking testbenches, one per module, plus `tb_trng_stats` |

All modules except `dcm_model` are synthesizable. `dcm_model` uses real
numbers and delays. For an FPGA build, replace it with the vendor's clock
manager primitive, wired to the same clocks and DRP signals.

## Simulating

Verilator 5 with timing support is needed, because the clock model uses
delays. From the project root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/trng_pkg.sv tb/tb_trng.sv --top-module tb_trng
./obj_dir/Vtb_trng
```

Replace `tb_trng` with any other testbench name. Every testbench ends with
`TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog that ends a
stuck run as a failure.

* `tb_bfd_dff`: sampling on the rising edge, asynchronous reset.
* `tb_beat_counter`: random detector patterns. It checks every count, the
  dropped first interval, the two-cycle latency of `count_valid`, and
  saturation with a 4-bit counter.
* `tb_post_processing`: random counts against independently packed words
  and the one-cycle latency, for 3 and 4 bits per count.
* `tb_drp_control`: random responders with random `drdy` delay. It checks
  write data, write order, clamping, no write when idle or unchanged, and
  the 4-cycle retune.
* `tb_dcm_model`: output frequency for two M/D pairs, jitter bounds and
  variation, DRP read and write, lock and relock, reset.
* `tb_trng`: whole design at default parameters. It runs N = 30, retunes
  to 4 and then 2, and toggles `en`. A reference model follows the
  detector output, and every output word and its timing is checked against
  it. The longest count must fall within 40–110 % of N·(N+2). The test
  counts retunes, relocks, beats, jitter-induced short counts, words and
  the enable gap, and requires each at least once. Runs in well under a
  second.
* `tb_trng_stats`: 2^20 bits at N = 30 and the three statistical tests
  described above (about one minute).

## Where this design makes its own choices

The block structure and the connections follow the published BFD-TRNG with
DCMs: DCM-A and DCM-B, the DFF with clock A on D and clock B on CLK, the
counter on clock B restarted by the DFF, post-processing of the count's
three LSBs, and DRP-based tuning. The port names `clk`, `reset`, `en`,
`drp`, `add[5:0]` and `out[15:0]` also follow it. The following are this
implementation's own choices:

* the M/D rule per setting, the 100 MHz reference and N_INIT = 30;
* reading `add` as the setting N, and retuning while `drp` is high;
* the DRP register address and layout, and the relock behaviour;
* restarting the counter on the rising edge of the detector output, rather
  than holding it in reset while the output is high; dropping the first
  partial count; the 16-bit counter;
* packing 6 × 3 bits into a 16-bit word and dropping 2 bits; `out_valid`;
* `en` as a reset of both clock managers;
* the reset bridge for the clock-B domain;
* the jitter model (uniform ±150 ps per edge, not accumulated).

The generator was also described with an error-correction stage whose
working is not given. It is not implemented here.

# Dual-mode biotelemetry baseband with transmitter-side frequency pre-calibration

A body-area sensor node has to be tiny, so it cannot carry a quartz crystal.
Its on-chip CMOS oscillator can be off by as much as 100 ppm, and two errors
follow from that:

* a carrier frequency offset (CFO), which turns the received constellation;
* a sampling clock offset (SCO), which slowly slides the sample instants.

In this design the sensor node corrects both errors on its own transmit
side, before it sends anything. The central node broadcasts a downlink
preamble. The sensor node measures CFO and SCO from that preamble. It then
pre-rotates every uplink sample by the measured carrier offset, and it pulls
its own clock generator towards the central node's clock. The central node
therefore receives an almost clean signal and needs no tracking of its own.

The uplink has two modes that share one datapath:

| mode | FFT | guard | spreading | bits per symbol | rate at 5 MHz |
|---|---|---|---|---|---|
| OFDM | 64 | 2 samples | none | 64 | 64/66 × 5 MHz = **4.848 Mbit/s** |
| MT-CDMA | 16 | 2 samples | 31 chips, 8 users | 16 per 31 symbols | 16/(18·31) × 5 MHz = **143.4 kbit/s** |

OFDM is the fast mode. MT-CDMA (multi-tone CDMA) lets up to eight nodes
transmit at the same time.

The RTL is SystemVerilog (IEEE 1800-2017) and has two chips:

* `wsn_top`: the sensor node;
* `cpn_top`: the central processing node.

`wban_top` joins the two chips, each clocked by its own clock generator
(`pftcg`). All of it synthesizes except the clock generator's oscillator and
phase detector, which are behavioural models.

## Signal format

All complex samples are `cplx_t` (`wban_pkg`): two signed 16-bit fields.
One clock carries one sample at 5 MHz, and every block has a valid strobe.

**Conjugate-symmetric QPSK.** The IFFT output has to be real-valued, so an
N-point symbol carries N bits laid out as follows:

* bin 0 (DC) carries bit 0 as BPSK (±A);
* bin N/2 (Nyquist) carries bit 1 as BPSK;
* bins 1…N/2−1 carry bits 2k and 2k+1 as QPSK (±A ± jA);
* bins above N/2 hold the complex conjugates.

`map_bin` in `wban_pkg` implements this map, with A = `QPSK_AMP` = 8192.

* **OFDM symbols** take four 16-bit storage words each (LSB first) and are
  sent as 2 cyclic-prefix samples plus 64 samples.
* **MT-CDMA words** are one 16-point symbol each. The symbol is repeated 31
  times, and repetition m is multiplied by the user's chip c_u[m] = ±1. All
  user codes are cyclic shifts (by 4·user chips) of the 31-chip
  m-sequence of x⁵+x³+1, seed 00001. The receiver sums the 31 FFT outputs
  of a bin with the same signs, which despreads the wanted user and
  suppresses the other users.

**FFT.** `fft_sdf` is a radix-2 decimation-in-frequency single-delay-feedback
pipeline that takes one sample per enabled clock.

* Each stage scales by 1/2, so an N-point transform is divided by N.
* Outputs come in bit-reversed order with their index on `out_idx`.
* The latency is N−1+log₂N enabled clocks.
* The twiddle tables are computed when the design elaborates.

The modulators and demodulators each contain their own instance of
`fft_sdf`: `ofdm_sym_tx` wraps it for transmit and `ofdm_sym_rx` for
receive.

* **Transmitter:** the IFFT output goes through a ping-pong buffer that
  restores natural order and inserts the cyclic prefix. Symbols leave back
  to back with no idle clocks. This is what makes 4.848 Mbit/s an actual
  throughput rather than a peak.
* **Receiver:** the guard samples are dropped and the FFT bins go to sign
  decisions.

## The downlink frame and the two estimators

The central node's `dl_tx` sends a 356-sample preamble followed by one
64-bit OFDM information symbol. The preamble, in order:

| part | length |
|---|---|
| short preamble: 2 periods of 8 samples (every 8th bin used) | 16 |
| guard | 4 |
| long preamble: 2 periods of 64 samples | 128 + 4 guard |
| pilot preambles: 3 × (4 guard + 64) | 204 |

The tables are computed at elaboration from a fixed 64-bit pattern.

**CFO** (`cfo_estimator`) correlates each preamble with its own next
period: z = Σ r[n+L]·conj(r[n]). The angle of z, divided by L, is the
offset in cycles per sample. The angle comes from a sequential 16-iteration
CORDIC (`cordic_atan2`).

* The short preamble (L = 8) covers ±1/16 cycle/sample without ambiguity.
* The long preamble (L = 64) is 8× finer but ambiguous.
* The final estimate is the coarse value plus the wrapped residual of the
  fine value.

The output `cfo` is −ε·2²⁴, where ε is the offset in cycles per sample.
Measured accuracy is about 1e-4 cycles/sample.

**SCO** (`sco_estimator`) works on the pilot preambles after `dl_rx` has
removed the carrier offset with its own phase rotator.

1. Each pilot preamble goes through an FFT.
2. The phase θ_k is measured on 8 pilot bins, k = ±4, ±12, ±20, ±28.
3. A least-squares line θ = C0 + C1·k is fitted to each preamble. Because
   the pilots are symmetric (Σk = 0), the fit splits into C0 = Σθ/8 and
   C1 = Σkθ/2688.
4. A sampling offset δ makes the slope C1 grow by 2πδ·(preamble spacing)/64
   from one preamble to the next. So the difference between the last and
   the first C1 gives δ.
5. The result is scaled to `sco` = δ·2²⁴.

`dl_rx` then rounds the result into the 8-bit FE command:
FE = round(sco/671), because 671/2²⁴ ≈ 40 ppm is one oscillator code step.

## Pre-calibration on the sensor node

While it sleeps, the sensor node does only one thing: `storage_unit` fills a
512-word low-speed FIFO from the sensor at 610 Hz. The sensor can be the
external readout ADC or the on-chip temperature sensor, selected by
`sensor_sel`.

When the FIFO is full, the sensor node runs this sequence:

1. The frame is dumped into a second, high-speed FIFO, one word per clock.
   The low-speed FIFO can then keep sampling.
2. `wsn_fsm` asks for the downlink receiver and the chosen transmitter to
   be powered.
3. The sensor node listens for the downlink. If no downlink comes within
   4096 clocks, it gives up waiting.
4. The estimates are latched in always-on registers.
5. The receiver is powered down.
6. The transmitter sends the frame.

Every sample from either modulator passes through `phase_rotator`. Its phase
accumulator restarts at 0 on the first sample of the frame and adds `cfo`
per sample (2²⁴ = one turn). A 256-entry cosine table gives the rotation
factor. The channel adds the node's carrier offset back on the uplink, so
the two cancel at the central node.

The FE command goes to the sensor node's clock generator. The generator adds
FE to its frozen lock code, so it shortens or lengthens the period in 40 ppm
steps.

## Power gating

Each chip has three power-gated domains:

* **sensor node:** downlink receiver, MT-CDMA transmitter, OFDM transmitter;
* **central node:** downlink transmitter, MT-CDMA receiver, OFDM receiver.

Each domain sits behind a `pmc` (power management cell).

* **Waking:** the switch first connects the supply. After `SETTLE` clocks
  the isolation is released, and only then is the function enable passed
  into the domain.
* **Sleeping:** the isolation clamps the domain's outputs high, then the
  enable is removed, then the supply is cut.

A domain is held in reset while it has no supply, so it always wakes in a
known state. `power_manager` passes the controller's requests to the cells.
It switches the front end on while anything is requested, and it signals
`ready` only when every requested domain is usable and every other domain
is off. The controllers (`wsn_fsm`, `cpn_fsm`) never start a block before
`ready`.

## Clock generator (`pftcg`)

The clock generator has four parts:

* **Oscillator:** a ring of four delay stages closed by an inverter. The
  true and inverted stage outputs give eight phases, PH0…PH7, spaced T/8
  apart. The stage delay is `D_MAX_PS − code·D_STEP_PS`. With the defaults,
  5 MHz is reached near code 5000, where one code step is 40 ppm.
* **Phase detector:** compares the edges of REFCLK and PH0.
* **Controller (`pftcg_ctrl`, synthesizable):** a bang-bang
  proportional-integral loop. After 32 steady cycles it declares lock,
  freezes the code and from then on applies FE.
* **Multiplexer:** selects the output phase from PE.

The oscillator and the detector are behavioural:

* They use `#` delays.
* Synthesis drops the delays and keeps the ring as an inverter loop. The
  synthesis check reports one such loop per generator.
* Without delays the detector reduces to fixed logic. So the central
  node's `cpn_dco_code` output, whose FE is tied to zero, synthesizes to a
  constant.
* Nothing else in the design has a loop or a latch.

In `wban_top`:

* the sensor node runs from PH0;
* the central node runs from the phase selected by the `cpn_pe` pin;
* each chip stays in reset until its generator locks.

## Where the design departs from the document, or goes beyond it

* **Spreading-code clock.** The clock manager produces a 161 kHz strobe
  (5 MHz/31), as the document describes. But the MT-CDMA transmitter
  advances its chip once per 18-sample symbol, not with that strobe. Only
  that choice reproduces the documented 143 kbit/s. The strobe is exported
  but not used.
* **Invented details.** The document leaves these open, and the values here
  are this design's own:
  * the preamble split of the 356 samples;
  * the pilot positions;
  * the user-code family;
  * the 40 ppm FE step;
  * the loop filter;
  * the timeout;
  * the FIFO dump rule.
* **Not built:**
  * frame detection (packet synchronizer) in either chip. The first sample
    of each frame must be flagged by the front end (`*_first` inputs).
  * channel equalization and timing recovery in the central node.
  * how PE is derived. `cpn_pe` is a pin.
  * decoding of the downlink information symbol by the sensor node.
* **Phase rotator placement.** The rotator sits after the mode multiplexer
  in the always-on part, so both modes are pre-calibrated.
* **External parts.** The analog front ends, the readout ADC and the
  temperature sensor are outside the chips. Their samples are ports.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fft_sdf` | 64/16-point, forward/inverse, against a floating-point DFT |
| `tb_ofdm_tx`, `tb_mt_tx` | every output sample against a floating-point model of the modulator |
| `tb_ofdm_rx`, `tb_mt_rx` | bit-exact recovery; MT-CDMA with all 8 users superimposed |
| `tb_dl_tx` | preamble and information symbol against the model |
| `tb_cfo_estimator`, `tb_sco_estimator`, `tb_dl_rx` | estimates for offsets up to ±0.028 cycles/sample and ±100 ppm; FE within one step |
| `tb_pftcg` | lock at 5 MHz, the 8 phases, FE steps, PE selection |
| `tb_phase_rotator`, `tb_storage_unit`, `tb_clock_manager`, `tb_pmc`, `tb_power_manager`, `tb_wsn_fsm`, `tb_cpn_fsm` | unit behaviour with random stimulus |
| `tb_wban_top` | whole link at 8-word frames: OFDM, then MT-CDMA (user 5), then OFDM from the temperature sensor |
| `tb_wban_top_full` | the top at its default sizes: one 512-word OFDM frame sampled at 610 Hz (about 0.84 s of simulated time) |

`tb_wban_top` adds a carrier offset of 0.0213 cycles/sample in both
directions. Every received word must equal the sensed sample. The testbench
also counts that each mechanism actually happened:

* wake-up and sleep;
* storage dump;
* CFO estimate;
* FE update;
* both modes;
* the temperature-sensor path.

The testbench channel adds no sampling offset; that part is covered by
`tb_dl_rx`.

Each testbench was also run against a deliberately broken copy of its
block, and the broken copy always failed.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert rtl/wban_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv \
    tb/tb_wban_top.sv --top-module tb_wban_top -Wno-fatal
./obj_dir/Vtb_wban_top
```

List `rtl/wban_pkg.sv` first. Most testbenches need `tb/tb_ref_pkg.sv`,
which holds the floating-point reference functions.

## Lint notes

Verilator reports these remaining warnings:

* **UNUSED:** spare FIFO flags and low bits of scaled products.
* **SYNCASYNCNET:** resets used by both flip-flops and the
  `disable iff` of the assertions.
* **ZERODLY:** the oscillator's computed delay.

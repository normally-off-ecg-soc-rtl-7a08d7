# Normally-off ECG monitoring SoC: heartbeat detector and non-volatile MCU fabric

A wearable ECG sensor has to run for a long time on a coin cell. That is only
possible if almost everything is switched off almost all the time. This design
splits the chip in two:

* an **always-on 32.768 kHz domain** that samples the ECG at 128 samples/s,
  filters it, and finds every heartbeat with a noise-tolerant
  correlation-based detector. Between beats the detector predicts where the
  next QRS complex will fall and switches the ADC off until then;
* a **normally-off 24 MHz domain** with the CPU and its 16 KB memory. Its
  supply is cut while it sleeps. Its state survives in ferroelectric
  non-volatile storage: a 6T-4C non-volatile RAM and non-volatile flip-flops
  in the CPU. Once a second the always-on side wakes it up, it logs the heart
  rate and powers down again.

This repository holds synthesizable SystemVerilog for the digital logic of both
domains. It also holds a behavioural model of the 6T-4C RAM macro and a
self-checking testbench for every block. The CPU core, the flip-flops inside
it, the analog front end, the ADC's analog half and the oscillators are not
part of the RTL: they connect through the top-level ports.

## Block map

```
                       always-on, clk32 = 32.768 kHz
  adc_cmp ──► sar_adc_ctrl ──► qsw_filter ──► heartbeat_detector ──► hbd_regs
  adc_dac ◄──┘    ▲ start                         │ adc_en   hb_*         │
                  └──── rtc_timer (smp_tick) ◄────┘                       │
                        rtc_timer (log_tick) ──► nv_power_ctrl             │
                                                  │ vdd/osc/iso/resets     │
  ─────────────────────────────────────────────── │ store/recall ───────── │ ──
                       normally off, clk24 = 24 MHz ▼                      │
   CPU memory bus ──► nvram = nvram_ctrl + 8 × nvram_macro (2 KB each)     │
   CPU low-speed bus ─► lsbus_bridge (gated clk24) ◄──────────────────────┘
```

| File | Role |
|---|---|
| `rtl/ecg_soc.sv` | top: wires both domains together |
| `rtl/heartbeat_detector.sv` | coarse/fine autocorrelation, template matching, beat prediction, ADC sleep |
| `rtl/hbd_dpram.sv` | dual-port SRAM: 1024-sample ECG ring buffer and 13-word QRS template |
| `rtl/hbd_pkg.sv` | detector constants (window lengths in samples), types, weight functions |
| `rtl/qsw_filter.sv` | quadratic spline wavelet filter, scale 2^2 |
| `rtl/sar_adc_ctrl.sv` | successive-approximation logic of the 8-bit ADC |
| `rtl/rtc_timer.sv` | 128 Hz sample tick and 1 s logging tick |
| `rtl/hbd_regs.sv` | detector/ADC registers readable by the CPU |
| `rtl/nv_power_ctrl.sv` | power-down/power-up sequencer of the 24 MHz domain |
| `rtl/nvram.sv`, `rtl/nvram_ctrl.sv`, `rtl/nvram_pkg.sv` | 16 KB non-volatile RAM and its controller |
| `rtl/nvram_macro.sv` | behavioural model of one 2 KB 6T-4C macro (not synthesizable) |
| `rtl/lsbus_bridge.sv`, `rtl/clock_gate.sv` | clock-domain-crossing bus to the 32 kHz registers, with clock gating |

## The heartbeat detector

The hardest part of the design. Every time quantity below is in samples at
128 samples/s.

### Algorithm

The detector works on the filtered signal `d[t]`. It first has to learn the
heart rhythm and the shape of a QRS complex. After that it only has to
confirm each beat where it is expected.

1. **Fill.** Collect 397 consecutive samples. That is the reach of the
   widest correlation below.
2. **Coarse search: the beat interval.** Freeze the newest sample time `tn`.
   For every shift `T` from 35 to 192 (0.27 s to 1.5 s) compute

   `CC(T) = W1(T)² · Σ_{i=0..192} W2(i) · d[tn−i] · d[tn−i−T]`

   This correlates the last 1.5 s with itself shifted by `T`. `W2` weights
   recent samples more (1 for `i ≤ 48`, 0.75 up to 96, 0.5 beyond). `W1`
   favours short shifts (1 up to 0.54 s = 69, 0.75 up to 0.98 s = 125, 0.5
   beyond). Without `W1`, twice the true interval would score as well as the
   interval itself. The arg max is the interval `IHR`.
3. **Fine search: where the QRS is.** Slide a 0.1 s window (13 samples) back
   from `tn` by `T' = 0..192`. Correlate each window with the same window one
   `IHR` earlier:

   `CCf(T') = Σ_{i=0..12} d[tn−i−T'] · d[tn−i−T'−IHR]`

   Two QRS complexes one interval apart give the largest product. The best
   window's centre is taken as the QRS time: `tQRS = tn − T' − 6`.
4. **Template.** Copy the 13 samples `d[tQRS−6 .. tQRS+6]` into the template
   `TM`.
5. **Prediction and sleep.** The next QRS is expected at `tQRS + IHR`. The
   beat-to-beat variation is assumed to be at most 25 %, so the search
   window is `tQRS + IHR ± IHR/4`. The detector drops `adc_en` and only
   raises it again `6 + WAKE_MARGIN` samples before the window. The ADC,
   filter and buffer writes stop while it is low. The margin refills the
   filter history before the samples that matter.
6. **Template matching.** Once the window and its ±6 neighbours are
   buffered, score every candidate centre `c` in it:
   `S(c) = Σ_j TM[j] · d[c+j−6]`. The best `c` is the beat. The detector
   reports it (`hb_valid`, `hb_tqrs`, `hb_ihr = c − tQRS`, `hb_score`), makes
   `c − tQRS` the new `IHR` (clamped to 35..192), and updates the template as
   `TM ← (7·TM + d)/8` around `c`. Then it returns to step 5.
7. **Loss of lock.** Suppose the beat was misdetected, or the rhythm or
   shape changed abruptly. The best score then collapses. If it is not
   positive, or is below ¼ of the previous beat's score, `lost` pulses. The
   ADC stays on and the detector restarts at step 1.

There are no amplitude thresholds anywhere. Every decision is an arg max of
a correlation, which is where the noise tolerance comes from.

### Hardware

Everything runs on the 32.768 kHz clock. One sample period is 256 clocks.

* **Sample buffer:** a 1024 × 8 dual-port SRAM. It is addressed by the low
  10 bits of a 16-bit sample-time counter that advances on every `smp_tick`,
  whether the ADC is on or not. So buffered data always sits at its true
  time, and gaps left by sleep are never read.
* **One multiply-accumulate engine** does all three searches (coarse, fine,
  match). It is a three-stage pipeline: (1) address generation from the
  outer index `k` (`T`, `T'` or candidate offset) and the inner index `i`;
  (2) registered SRAM reads and one 8×8 signed multiply, weighted by `W2` in
  the coarse search, then the accumulate; (3) scaling of the finished sum by
  `W1²` and a running arg max. It takes one product per clock. Weights are
  exact in fixed point: `W2` as 4/3/2 quarters and `W1²` as 16/9/4
  sixteenths. The accumulator is 32-bit signed.
* **Port sharing:** the coarse and fine searches read two samples per
  product, on ports A and B. An arriving sample also needs port A for its
  write. The write wins, and the engine stalls for that one clock (about one
  clock in 256).
* **Template memory:** a 16 × 8 dual-port SRAM. The match reads the template
  on port B and the sample on the sample buffer's port B, so matching never
  stalls. Loading and updating the template takes two clocks per word
  (read, then write).

| Job | Products | Time at 32.768 kHz |
|---|---|---|
| coarse search | 158 × 193 = 30,494 (+ ~120 stalls) | 0.93 s |
| fine search | 193 × 13 = 2,509 | 77 ms |
| match, per beat | (2·⌊IHR/4⌋+1) × 13 ≤ 1,261 | ≤ 39 ms |
| template load/update | 26 clocks | < 1 ms |

During a coarse search about 120 new samples arrive. The buffer keeps 1024,
while the oldest sample needed lies 384 back. Acquisition from power-up
therefore takes about 397 samples of fill (3.1 s) plus 1 s of searching.

## The QSW filter

It computes the quadratic-spline wavelet transform at scale 2²: the low-pass
`[1 3 3 1]` followed by the high-pass `[1 0 −1]`. The combined impulse
response is `[1 3 2 −2 −3 −1]`. The DC gain is zero, which removes baseline
wander. At 128 samples/s, 50/60 Hz falls near the low-pass zero at
fs/2, which removes hum. The output is shifted right by `SHIFT = 2` and
saturated to a signed 8-bit sample. This turns each QRS into a sharp
biphasic pulse, which correlates well.

## Normally-off operation

### Sequence (`nv_power_ctrl`, 32.768 kHz)

```
OFF ──wake_req──► PWRUP (vdd_en, osc_en; PWRUP_CYC+1 clocks) ─► release domain reset + isolation
    ─► RECALL NVRAM ─► RECALL flip-flops ─► RUN (CPU reset released, cpu_irq pulse)
RUN ──CPU sleepdeep──► STORE NVRAM ─► STORE flip-flops ─► ISO (isolate, resets) ─► OFF (vdd_en, osc_en low)
```

The NVRAM and the flip-flops are handled one after the other, each with a
four-phase request/acknowledge handshake. Every signal coming from the 24 MHz
domain (acks, `sleepdeep`) goes through two synchronizer flip-flops and is
forced to 0 while `iso` is high. After `por_n` the domain is brought up once
without a recall: a cold boot, since nothing has been stored yet.

### 16 KB non-volatile RAM

The RAM is eight macros of 2 KB, each 128 rows × 128 columns. The CPU sees
4096 words of 32 bits (12-bit word address, byte enables). The top 3 address
bits pick the macro. An access takes one clock; data and `ready` follow on
the next.

Two techniques cut the energy of the ferroelectric cells:

* **Bit-line non-precharge.** Bit lines are never precharged to VDD. They
  are only equalized to each other. The controller holds the equalizer of
  each macro on at all times, except in the one clock that macro is
  accessed.
* **Plate-line charge sharing.** A store pulses both plate lines (PLA, PLB)
  of a row. A recall pulses PLA only. The rows go one per clock, with all
  eight macros in parallel, so either operation takes **128 clocks for the
  full 16 KB** (5.3 µs at 24 MHz). On every row after the first, the
  controller first has the previous row's still-charged plate line share its
  charge with the new one through the switch `SW_PL[row−1]`. The switch then
  opens and the driver tops the new line up. The driver thus supplies only
  half a swing per line. The command to the macros is the `pl_cmd_t` struct
  (`step, row, drv_a, drv_b, share`). The macro splits each clock into a
  share phase (clock high) and a drive phase (clock low).

`nvram_macro` is a behavioural model. It keeps an SRAM array (scrambled when
`vdd` falls) and a ferroelectric array (kept). It tracks each plate line's
voltage in units of `VMAX = 256` and sums the charge the drivers deliver in
`drv_charge`. With sharing, a store costs 2·256 + 127·2·128 = 33,024 units
per macro, against 65,536 without. Assertions flag an access made with the
equalizer on, or an idle macro left un-equalized.

### Low-speed bus (`lsbus_bridge`)

The CPU reads the always-on registers through a request/ready bus. `sel`,
`write`, `addr` and `wdata` are held until `ready`. A request toggle crosses
to the 32 kHz side through two flip-flops. There the access takes one slow
clock, and an acknowledge toggle crosses back. A transfer costs 3–4 slow
clocks (about 100–130 µs). The bridge's 24 MHz registers sit behind a
latch-based clock gate, enabled only by `sel | busy | ready`. While the bus
is idle they see no clock edge. The one latch in the design is this gating
cell, and it is intended.

Register map (`hbd_regs`, word addresses on the low-speed bus):

| Addr | Content |
|---|---|
| 0 | last beat interval `IHR` (samples; heart rate = 7680 / IHR beats/min) |
| 1 | beat count (a write clears it) |
| 2 | time of the last QRS (sample counter) |
| 3 | `{lost-lock count[31:16], detector state[3:0]}` |
| 4 | correlation score of the last beat |
| 5 | latest raw ADC code |
| 6 | latest filtered sample (sign-extended) |

## Top-level interface (`ecg_soc`)

| Port | Dir | Meaning |
|---|---|---|
| `clk32`, `por_n` | in | 32.768 kHz clock, power-on reset of the always-on domain |
| `adc_dac[7:0]`, `adc_cmp` | out/in | SAR trial code to the capacitive DAC; comparator result (1 = input ≥ DAC level) |
| `adc_en` | out | ADC/AFE may sleep when low (beat prediction) |
| `clk24` | in | 24 MHz clock; must only run while `osc24_en` is high |
| `vdd24_en`, `osc24_en`, `iso24` | out | supply switch, oscillator enable, isolation of the 24 MHz domain |
| `cpu_rst_n`, `cpu_irq`, `cpu_sleepdeep` | out/out/in | CPU reset, wake-up interrupt, deep-sleep flag |
| `mem_*` | | CPU memory bus to the NVRAM (`req, we, addr[11:0], wdata, be` → `rdata, ready`) |
| `ls_*` | | CPU low-speed bus (`sel, write, addr[7:0], wdata` → `rdata, ready`) |
| `ff_store_req/ack`, `ff_recall_req/ack` | out/in | handshakes with the CPU's non-volatile flip-flops |
| `hb_valid`, `hb_ihr[8:0]` | out | beat strobe and interval, for observation |

The SAR logic decides one bit per 32 kHz clock. A sample is therefore in the
detector 10 clocks after its tick, well inside the 256-clock sample period.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with plain
Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/hbd_pkg.sv rtl/nvram_pkg.sv tb/tb_ecg_soc.sv --top-module tb_ecg_soc
./obj_dir/Vtb_ecg_soc
```

| Testbench | What it establishes |
|---|---|
| `tb_heartbeat_detector` | Synthetic ECG (fixed QRS shape plus noise) with period 100, then 110, then 1.8 s without QRS, then 80. Checks: IHR of every beat within ±1 sample; every beat at a constant offset from the true QRS; acquisition within ±4; loss of lock and reacquisition; ADC sleep; write stalls; coarse search exactly 158·193 clocks plus stalls and under 1 s. |
| `tb_qsw_filter` | Bit-exact against a reference convolution; zero DC response; 60 Hz attenuated more than 17 dB below 16 Hz. |
| `tb_hbd_dpram` | Random traffic against a reference model, including same-address collisions. |
| `tb_rtc_timer` | Exact 256-clock sample period and 32,768-clock logging period. |
| `tb_sar_adc_ctrl` | All 256 input levels convert exactly, in 9 clocks. |
| `tb_nv_power_ctrl` | Event order of cold boot and 20 sleep/wake cycles. Invariants: never unpowered and un-isolated at once; no requests while off. |
| `tb_nvram_ctrl` | Decode, equalizer rule, one-clock latency, 128-row store/recall with sharing, stalls during store. |
| `tb_nvram_macro`, `tb_nvram` | Data survives store → power-off → recall over all 16 KB; driver charge equals the charge-shared amount. |
| `tb_lsbus_bridge` | Random register traffic across two unrelated clocks. Exactly one slow access per transfer, bounded latency, no gated clock edges while idle. |
| `tb_ecg_soc` | 17 s of operation at the default parameters. Details below. |

`tb_ecg_soc` models the CPU, the analog comparator and the flip-flop
handshakes behaviourally. The ECG has 80 beats/min on a wandering baseline,
with a 2 s stretch without QRS. Each second the CPU is woken. It checks a
program image spread over all macros, which proves store and recall across
power-off. It reads the detector over the low-speed bus and appends the
interval to a log in NVRAM. The test checks the logged rate, the whole log
after every wake, and that every mechanism actually occurred: ADC sleep,
engine stall, lost lock and reacquisition, store, recall, charge sharing,
clock gating. It takes about two seconds of host time.

Limits of what this shows: the detector has only been exercised on
synthetic ECG. No clinical records were used, so its detection accuracy on
real arrhythmic or noisy recordings is not established here. The
CPU, the flip-flops and all analog parts are stand-ins.

## Interpretation choices and departures

Where the algorithm description left room, these choices were made:

* **Position of `tQRS`.** The small-window search locates a window ending at
  `tn − T'`. The template is defined as centred on the QRS time, so `tQRS` is
  taken at the window centre (`tn − T' − 6`).
* **Length of the small window.** 0.1 s is 12.8 samples. 12 is used, so the
  template has 13 taps and is symmetric.
* **Ranges of the `W1` weight.** The three ranges are read as up to
  0.54 s, 0.54–0.98 s, and above 0.98 s. Each boundary shift belongs to
  the lower range.
* **Loss of lock.** The collapse of the correlation is detected as score
  ≤ 0 or below ¼ of the previous beat (`LOST_DIV`).
* **Template precision.** The template is kept at 8 bits, and the update
  truncates (arithmetic shift).
* **Filter scale and output scaling.** Both are this design's choice.
* **Time the 24 MHz domain stays powered.** A 16 KB store or recall takes
  5.3 µs. The sequencer runs on the 32 kHz clock, though, and each
  four-phase handshake with the fast domain passes through synchronizers.
  Each step (store NVRAM, store flip-flops, recall NVRAM, recall
  flip-flops) therefore takes several slow clock periods of 30.5 µs. That
  is well above the ~25 µs of store/recall overhead the original chip
  achieves. A faster handshake would need the sequencer, or part of it, on
  the 24 MHz clock.
* **The whole interface layer.** Buffer sizes, the engine pipeline and the
  stall rule; the SAR timing; all handshakes; the register map; the
  wake-up source (the 1 s timer tick); and the cold-boot rule.
* **Not modelled.** The CPU core and its non-volatile flip-flops; a dummy
  memory access that the published store/recall timing shows, but whose
  purpose is not explained; the MCU peripherals, which are not specified;
  and all analog circuits.

## Changing the design

* Window lengths and the sampling rate are localparams in `hbd_pkg`. For a
  different rate, recompute every sample count: `LW`, `TSH_*`, `W1_BRK*` and
  `LSW`. Keep `2^ABW` comfortably above `LW + TSH_MAX + LSW + 1` plus the
  samples that arrive during one coarse search.
* `heartbeat_detector` parameters: `WAKE_MARGIN` (samples of warm-up before
  a window) and `LOST_DIV` (loss-of-lock ratio).
* `rtc_timer`: `LOG_SAMPLES` sets the CPU wake-up period. `nv_power_ctrl`:
  `PWRUP_CYC` sets the supply/oscillator settle time.
* `nvram_macro` is the place to substitute a real memory macro. Its port list
  is the macro interface the controller expects.

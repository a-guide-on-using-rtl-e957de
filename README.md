# Real-time echo and flanger on an AC'97 codec

This is an FPGA audio-effects processor. Audio comes in through an LM4550
AC'97 codec as 18-bit samples. One of two effects is added, and the result
goes back out through the same codec:

* **Echo**: `y[n] = x[n] + 0.8 · x[n − D]`, with a fixed delay of about
  10 000 samples (≈ 227 ms at 44.1 kHz).
* **Flanger**: `y[n] = x[n] + x[n − D(n)]`. The delay `D(n)` is swept between
  about 0 and 2.3 ms by a slow sine from a direct digital synthesiser (DDS).

Both effects share **one** delay-line RAM. Each effect has its own address
counter, and a switch picks which counter addresses the RAM. Most of the
design's behaviour follows from that shared RAM and its counters.

The structure follows the echo/flanger system of Merah, Lorenz, Ali-Pacha and
Hadj-Said, *A Guide on Using Xilinx System Generator to Design and Implement
Real-Time Audio Effects on FPGA* (2021). That design was built from System
Generator blocks for a Spartan-6 (Digilent Atlys) board. This is an
independent SystemVerilog version of it. Where the original gives no detail,
this version makes its own choices; they are listed
[below](#where-this-rtl-departs-from-or-adds-to-the-reference-design).

## Signal path

```
            bit_clk, sdata_in                                sdata_out, sync, ac97_reset_n
 LM4550 ─────────────────────► lm4550_driver ──────────────────────────────────► LM4550
                               │  ac97_ctrl  (AC-link framing, 48 kHz)  ▲
                               │  ac97_cmd   (register set-up FSM)      │
                      l_in (18)│                                        │ l_out = r_out (18)
                               ▼                                        │
                 ┌────────────────────── effect_sys ────────────────────┴─┐
   ce44k ───────►│ sound_in ──┬────────────────────────► (+) ──► sound_out │
                 │            │ din                       ▲                │
                 │            ▼                           │ × a (0.8 / 1.0)│
                 │   ┌──── sp_ram (10000 × 18) ──dout─────┘                │
                 │   │ addr                                                │
                 │  MUX ◄── sw                                             │
                 │  ├── mod_counter      (0..9999, echo)                   │
                 │  └── flanger_counter  (restarts when count > L)         │
                 │            ▲ L = round(100·|sin|)                       │
                 │        abs_scale ◄── dds (16-bit phase, 6-bit sine)     │
                 │                         ▲ Δθ                            │
                 │       btn_updown (Δθ) ◄─┴── delta_plus / delta_minus    │
                 └─────────────────────────────────────────────────────────┘
   tick_div ×2: ce44k (every 2268 clocks), ce2hz (button repeat)
   btn_updown (volume, 5 bits) ◄── btn_vol_up / btn_vol_down ──► ac97_cmd
```

Everything runs on the 100 MHz board clock. The "44.1 kHz clock" and the
"2 Hz clock" are one-cycle clock-enable pulses from `tick_div`. The codec's
12.288 MHz bit clock is only sampled, never used as a clock.

## The shared delay line and its exact delays

`sp_ram` is a single-port RAM with read-before-write and one cycle of read
latency. Its contents start at zero. On every sample step (`ce`), it writes
the new input at the current address and reads out the old word there. That
word is the input from the last time the address came round. The output
stage uses the word read on the *previous* step, so there is one extra
sample of delay:

| mode (`sw`) | address sequence | output after step *n* |
|---|---|---|
| 0: echo | `n mod 10000` | `clamp(x[n] + 0.8·x[n − 10001])` |
| 1: flanger | 0, 1, …, L+1, 0, … (period L+2) | `clamp(x[n] + x[n − (L+3)])` |

For the flanger, *L* is the current sweep value, 0…100. This gives a delay of
3…103 samples, or 0.07…2.34 ms. The output is registered and changes right
after each `ce`.

Some things follow from sharing one RAM:

* Both counters run all the time. The switch only chooses which one drives
  the address, and which gain applies (0.8 for echo, 1.0 for flanger).
* When you switch effects, the first outputs in the new mode read words that
  the other mode wrote. Switching from flanger to echo gives one short burst
  of the echo of old flanger samples. This is expected, not a fault.
* In flanger mode, the counter restarts as soon as `count > L`. So when *L*
  drops, the counter jumps back early. The delay follows the sweep with
  small address discontinuities. That is how the comparator-plus-counter
  structure of the reference works. The reference design does not describe any
  interpolation, and none is added here.

## Flanger sweep: DDS, rectifier and counter

* `dds` is a 16-bit phase accumulator. It adds the tuning word Δθ once per
  sample. The top 8 bits of the phase address a 256-entry sine table,
  computed at elaboration as `round(16·sin(2πk/256))`. The output is a
  6-bit signed sine in which ±1.0 is ±16.
* `abs_scale` computes `L = round(|sine| · 100 / 16)`, with ties rounded up.
  L rises and falls between 0 and 100, with one full arch for every half
  period of the sine.
* `flanger_counter` compares `count > L` and restarts the count when it is
  true.

The sine frequency is `F = Δθ · 44 100 / 2^16`, which is 0.673 Hz per step of
Δθ. The sweep arches come at twice that rate. After reset, Δθ is 1. The
`delta_plus` and `delta_minus` buttons change it by one, twice per second
while held, saturating at 0 and 65535. Δθ = 0 freezes the sweep. With a
16-bit accumulator at 44.1 kHz, 0.67 Hz is the slowest sweep that still
moves. The slower 0.1–0.5 Hz sweeps that are typical for flangers would need
a wider accumulator: raise `PHASE_W`.

## Output stage and number formats

* Samples are 18-bit two's complement (`fx_pkg::sample_t`).
* The gain is unsigned Q1.15: 26214 ≈ 0.8 for echo, 32768 = 1.0 for flanger.
* `fx_mixer` forms `x + (d·a >>> 15)`. The product is truncated toward −∞.
  The sum is clamped to the 18-bit range.
* `effect_sys.clip` is high for a sample whose sum was clamped. With the
  flanger's gain of 1.0, a full-scale input clamps often.

## Codec interface (`lm4550_driver`)

`ac97_ctrl` carries the AC'97 link. It passes `bit_clk` and `sdata_in`
through two-flip-flop synchronisers and acts on the detected edges.

* A frame is 256 bit clocks (48 kHz). SYNC is high for the first 16 of them.
* SYNC and SDATA_OUT change just after a rising edge of BIT_CLK. SDATA_IN is
  sampled on the falling edge.
* Transmitted frame:
  * Tag: frame valid, slot 1/2 valid when a command is pending, slot 3/4
    valid.
  * Slot 1: `cmd_addr`, which is the read/write bit and a 7-bit register
    index.
  * Slot 2: `cmd_data`.
  * Slots 3 and 4: left and right PCM, in the top 18 of the 20 bits.
* Received frame: the codec answers one bit later. After slot 4 the block
  does three things:
  * It updates `l_in`/`r_in` for each PCM slot whose tag bit is valid.
  * It copies the codec-ready tag bit to `codec_ready`.
  * It pulses `ready` for one cycle, once per frame (every 20.83 µs).
* After reset, the codec reset line `ac97_reset_n` is held low for
  `RESET_CYCLES` clocks (2 µs).

`ac97_cmd` sends one register write per frame, paced by `ready`. It cycles
through five writes forever, so that button and switch changes reach the
codec within five frames:

| reg | value |
|---|---|
| 0x02 master volume | `31 − volume` attenuation on both channels |
| 0x04 headphone volume | same |
| 0x18 PCM-out volume | 0x0808 (0 dB) |
| 0x1A record select | `source` on both channels |
| 0x1C record gain | 0x0000 (0 dB) |

The effects run on the 44.1 kHz enable, not on the codec's 48 kHz frames. On
each enable, the effects take whatever left-channel sample the driver last
received. The codec sends whatever `sound_out` holds when each frame starts.
The original design also pairs a 44.1 kHz effect clock with the 48 kHz
link, and the mismatch is kept here.

## Top level (`audio_fx_top`) and board pins

| port | dir | meaning | Atlys pin |
|---|---|---|---|
| `clk` | in | 100 MHz oscillator | L15 |
| `reset` | in | reset button, active high | T15 |
| `btn_vol_up`, `btn_vol_down` | in | volume up/down, twice per second while held | |
| `delta_plus`, `delta_minus` | in | sweep-rate Δθ up/down | |
| `sw` | in | 0 = echo, 1 = flanger | |
| `source[2:0]` | in | codec record source | |
| `bit_clk` | in | 12.288 MHz from the codec | L13 |
| `sdata_in` | in | serial data from the codec | N16 |
| `sdata_out` | out | serial data to the codec | T18 |
| `sync` | out | frame sync | U17 |
| `ac97_reset_n` | out | codec reset | T17 |

The pin names come from the board's codec wiring. A button/switch
assignment and a constraints file are left to the user.

All button and switch inputs go through two-flip-flop synchronisers.
Debouncing is not needed, because the buttons are only sampled at 2 Hz.

Parameters (defaults are the reference design's numbers):

| module | parameter | default | meaning |
|---|---|---|---|
| `audio_fx_top` | `CLK_HZ` / `FS_HZ` / `BTN_HZ` | 100 M / 44 100 / 2 | clock, sample rate, button repeat |
| `audio_fx_top`, `effect_sys`, `sp_ram` | `ECHO_DEPTH` / `DEPTH` | 10000 | echo delay and RAM depth |
| `effect_sys`, `dds` | `PHASE_W` | 16 | phase accumulator width |
| `effect_sys`, `dds` | `DDS_OUT_W` / `OUT_W` | 6 | sine width |
| `effect_sys`, `abs_scale` | `SWEEP_MAX` / `SCALE` | 100 | sweep range in samples |
| `effect_sys` | `ECHO_GAIN`, `FLANGER_GAIN` | 26214, 32768 | Q1.15 gains |
| `effect_sys` | `DELTA_INIT` | 1 | Δθ after reset |
| `dds` | `LUT_AW` | 8 | sine-table address bits (this design's choice) |
| `ac97_ctrl` | `RESET_CYCLES` | 200 | codec reset length |

`effect_sys` refuses `SWEEP_MAX + 2 > DEPTH` at elaboration.

## Where this RTL departs from, or adds to, the reference design

* **Clocking.** The reference clocks its effects block from a 44.1 kHz
  divided clock and ties its clock enable to 1. Here there is a single
  100 MHz clock domain. The 44.1 kHz rate is a clock enable, and 100 MHz /
  2268 = 44.09 kHz. The 2 Hz button clock is handled the same way.
* **Extra ports on the effects block.** It has `rst`, `btn_en` (the 2 Hz
  enable for the Δθ buttons) and the `clip` flag.
* **Switch polarity and gain selection.** Which switch value picks which
  effect is this design's choice (0 = echo). The gain is switched along with
  the address.
* **Δθ buttons.** The reference names the `delta_plus` and `delta_minus`
  buttons but not how they act. They reuse the volume control's scheme: one
  step per 2 Hz tick while held, saturating. The reset value of Δθ is 1.
* **DDS details.** Phase truncation to 8 bits, the table, ±1.0 = ±16 and one
  sample of lookup latency are choices made here. The reference used a
  vendor DDS core with 16-bit phase and 6-bit output.
* **Delay values.** The reference quotes a 10000-sample (226 ms) echo and a
  0–2.2 ms flanger sweep (0–100 samples). In this RTL the delays come out a
  few samples longer. The echo is 10001 samples. The flanger is 3–103
  samples, or 0.07–2.34 ms. The extra samples come from the RAM's one-cycle
  read latency and from the counter restarting only after `count > L`.
* **DDS cosine output.** The reference's DDS core also has a cosine output.
  The flanger never uses it, so it is not built.
* **Arithmetic.** Q1.15 gains, truncating multiply, saturating add and
  half-up rounding in `abs_scale` are choices made here.
* **Codec driver.** The reference reuses a third-party driver and describes
  only its ports and purpose. The AC'97 framing, register list, volume
  mapping (31 = loudest), left-channel input, identical L/R output and
  reset length are this design's. They follow the AC'97 standard and the
  LM4550 register map.
* **Not included.**
  * The codec chip itself. The testbenches have a behavioural model of its
    link side.
  * The Simulink file source and sound-card sink used only in simulation.
  * The general flanger structure with feedback and a level control, which
    the reference shows only as background. It is not part of the system
    that was built.

## Simulating

All files in `rtl/` are SystemVerilog-2017. `fx_pkg.sv` must come first.
The testbenches need a 1 ns time unit, and they use `tb/lm4550_model.sv`
(the behavioural codec). For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  -y rtl -y tb +libext+.sv rtl/fx_pkg.sv tb/tb_audio_fx_top.sv \
  --top-module tb_audio_fx_top -Mdir obj -o sim && obj/sim
```

Each testbench compares against its own reference model. It ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_tick_div`, `tb_btn_updown`, `tb_mod_counter`, `tb_flanger_counter`, `tb_sp_ram` | small blocks against integer models |
| `tb_abs_scale` | exhaustive over all 64 sine codes |
| `tb_fx_mixer` | random and corner operands, saturation both ways |
| `tb_dds` | sine table and phase against real arithmetic, and frequency `Δθ·Fs/2^16` |
| `tb_effect_sys` | echo impulse comes back after exactly DEPTH+1 samples; 12 000 random samples with mode switches, Δθ steps and clipping, against a model |
| `tb_fx_workloads` | both effects at default sizes, one sample per clock: 25 000 samples of synthetic 16-bit mono audio through the echo (a tone burst returns after 10 001 samples at 0.8 of its peak), then one full flanger sweep cycle at Δθ = 1 (sweep value 0..100, crests 32 768 samples apart, delay 3..103 samples), every output against a model |
| `tb_ac97_cmd`, `tb_ac97_ctrl`, `tb_lm4550_driver` | command order and encoding; frame format, SYNC 16/256, `ready` every 20.83 µs; loop-back talk-through and the codec registers |
| `tb_audio_fx_top` | whole design at reduced rates (1 MHz sample enable, echo depth 200): every effect output, every DAC frame and the codec registers; counts mode switches, clipping, Δθ and volume steps, and volume saturation |
| `tb_audio_fx_full` | whole design at default parameters: 10 500 echo samples through the 10 000-word RAM, then flanger across one 2 Hz button step (55 M clock cycles, under a minute) |

## Files

* `rtl/fx_pkg.sv`: shared types (`sample_t`, `gain_t`, `ac97_cmd_t`) and
  constants
* `rtl/audio_fx_top.sv`: board top
* `rtl/lm4550_driver.sv`, `rtl/ac97_ctrl.sv`, `rtl/ac97_cmd.sv`: codec
  driver
* `rtl/effect_sys.sv`: effects system
  * `rtl/sp_ram.sv`, `rtl/mod_counter.sv`, `rtl/flanger_counter.sv`,
    `rtl/dds.sv`, `rtl/abs_scale.sv`, `rtl/fx_mixer.sv`: its parts
* `rtl/tick_div.sv`, `rtl/btn_updown.sv`: clock enables and button
  registers
* `tb/`: one testbench per module, the full-size run, the workload run and `lm4550_model.sv`

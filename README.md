# SSF: interface FPGA for the SWEA and STE particle instruments

This is the digital controller that sits between an instrument data
processing unit (the IDPU) and two space-plasma particle sensors:

- **SWEA**, an electron analyser with 16 anode counters and a swept
  high-voltage deflection system.
- **STE**, a set of four solid-state detector chains that produce
  pulse-height events.

The FPGA runs everything from one 1 MHz clock. It receives 24-bit commands
on a serial line and controls the analog supply and the high-voltage
enables. It drives three quad serial 16-bit DACs: sweep, thresholds, and a
shared MCP/STE-bias/test-pulser DAC. It counts anode pulses and monitor
rates. It digitises and histograms detector events through look-up tables
held in an external 512Kx8 SRAM, scans housekeeping channels, actuates two
instrument covers, and sends all results back as telemetry messages on a
serial line.

The design is synchronous to `clk1m`, with one exception: the anode and
rate counters are clocked by the detector pulses themselves, because those
pulses are shorter than a clock period.

## The 2-second cycle

Almost everything is paced by one repeating 2 s measurement cycle. The
`timcntl` block builds it from the IDPU's 1 s tick (`tk1s`) and the low bit
of its seconds count (`secs0`). A `tk1s` with `secs0 = 0` starts a cycle
(`CYCLECLK`). Inside a cycle:

| Signal | Period / count | Use |
|---|---|---|
| `STEPCLK` | 1344 steps of 1450 us, then a 51.2 ms gap | sweep DAC reload |
| `LOWCNT` | microsecond counter 0..1449 within a step (keeps running in the gap) | STE pulser timing |
| `GAPSTART` | start of the gap (step index 1344) | staged sweep-buffer switch, heater |
| `SAMPLECLK` | every 4th step: 336 per cycle, the last one at the gap | anode counter latch and message |
| `SAMPLECNT` | 337 down to 1, one step per `SAMPLECLK` | anode message, SWEA test-pulse rate |
| `SAMCLKINT` | free 5.8 ms divider restarted at `CYCLECLK`: 345 intervals, the last 4.8 ms | rate counter latch and message |
| `TK8HZ` | counts `SAMCLKINT` in groups of 22 and 21: 16 per cycle | housekeeping, cover timing |
| half-second tick | every 4th `TK8HZ` | protected command setting |
| `TESTCYCLECLK` | every 5th `CYCLECLK` (every 10 s) | STE pulser ramp start, energy message ID |
| `HSKPMD` | toggles every cycle while SWEA is enabled | housekeeping cycling / sweep mode |

The 100 kHz synchronisation outputs `syn100k`/`syn100kn` for the power
supplies are `clk1m` divided by ten. A command can disable them, and the
design then reports them through `syn_oe` (high impedance).

## Commands and protected commands

`commandif` receives a command frame on `cmddat`/`cmdclk`. The frame is an
8-bit ID, 16 data bits and an odd-parity bit, MSB first. Each bit is valid
during a `clk1m` cycle in which `cmdclk` is high. A frame with bad parity
is dropped and raises the `CMDPE` status bit. A partial frame is dropped
after 64 idle clocks.

| ID | Command | Takes effect |
|---|---|---|
| E0 | LUT buffer select: D1 sweep, D0 energy | sweep at next gap, energy at next cycle |
| E1 | MCP DAC: D[7:0] becomes DAC[15:8] | queued at once |
| E2 | controls: telemetry enables D15..12, AFE power force on/off D11/D10, test pulser enables D9/D8, shaper chain enables D7..4, ADC reset D3, SWEA enable D2, STE pulser low-resolution D1, synch disable D0 | telemetry, test pulser and chain enables at next cycle; the rest at once |
| E3 | protected execute | see below |
| E4 | operational heater D0 | next gap |
| E5 | threshold DAC: select D7..6, value D5..0 | shifted at once, loaded at next cycle |
| E6 | arm a protected command | at once |
| E7 | sweep-mode housekeeping channel | next cycle |
| E8 | LUT pointer: D14 sector (1 sweep, 0 energy), D13..1 word address | at once |
| E9 | LUT data word, written low byte first to the inactive buffer | at once |
| EA | SRAM quadrant (address bits 18:17) | at once |
| EB | memory test mode D8, test address D7..0 | D8 next cycle, address at once |
| EC | STE cover timeout, in 1/8 s steps, F = none | at once |
| ED | STE bias DAC: D[7:0] becomes DAC[15:8] | queued at once |

Protected commands switch the NR and MCP high voltages, the SWEA cover
actuator and the forced STE cover actuators. A protected set works like
this:

1. An **arm** (E6) must carry exactly one of D7, D6, D2, D1 or D0.
2. The arm expires on the 16th second tick after it.
3. An **execute** (E3) whose "on" bit matches the armed bit is queued.
4. The queued set is applied at the next half-second tick.
5. Any other execute, or an arm given while already armed, disarms and
   raises the protected-command error `PCE`.

Rules outside the arm sequence:

- "Off" bits (D15, D14, D10, D8) act at once and need no arm.
- An unarmed STE cover execute runs the cover in non-forced mode.
- While the analog power is off, the HV enables, chain enables and SWEA
  enable are cleared and the ADCs are held in reset.

## Analog power and latch-up

`latchupprot` drives `afepwr`:

- The force-off command turns it off, and the force-on command turns it on.
- A latch-up detect `afeshdn` clears it asynchronously, unless force-on is
  held.
- While it is off, every analog-side block is held in reset.
- Housekeeping keeps running in its shutdown mode, so the digital status
  still reaches the ground.

## Three serial DACs

All three DAC packages are AD5544-type quad 16-bit DACs. Each takes an
18-bit word (2-bit channel, 16-bit value) at 500 kHz, so a word takes
36 us. `ad5544_shift` is the shared shifter.

**Sweep DAC.** `dacsweep` handles this DAC:

- At each `STEPCLK` it pulses `swdacld`. This loads the four values
  shifted during the previous step.
- It then reads the next step's four 16-bit words from the active sweep
  LUT buffer (eight byte reads) and shifts them in.
- After the last step it sends zeros.
- The IDPU fills the inactive buffer with E8/E9 and swaps buffers with E0.
  The swap takes effect at the gap.

**Threshold DAC.** `tdacwr` shifts each E5 command at once and loads it
(`tdacld`) at the next `CYCLECLK`.

**Shared MCP / STE-bias / STE-pulser DAC.** This DAC has three users:

- `mcpdac` turns E1 and ED commands into requests.
- `stetestpulse` runs a ramp from 0 to 65535 that starts at a
  `TESTCYCLECLK`. Its ticks fall at `LOWCNT` 0, 512 and 1024, which gives
  spacings of 512, 512 and 426 us. At each tick it shifts the next value
  and then drives a 16 us active-low test pulse (`stetestpulse_n`). It
  pulses the DAC load on the pulse's rising edge. At the top of the ramp,
  or when it is disabled, it writes zero and stops. In low-resolution mode
  only the top three bits of the ramp value are used.
- `mpdacwr` arbitrates between the two. The pulser has priority. While the
  pulser is enabled, a command write may only start outside a window from
  40 us before to 88 us after each tick. This is why a command load can
  take up to about 200 us.

`atestpulse` produces the SWEA anode test pulse once every
`SAMPLECNT + 1` microseconds, so its rate sweeps through the cycle.

## Event processing and the SRAM

The SRAM (`memcntl`) is shared by four clients with fixed priority:

1. telemetry
2. command LUT writes
3. sweep reads
4. event processing

An access takes one cycle with the bus driven, followed by one idle
cycle. A client holds its request (`mem_req_t`) until `done` pulses. For a
read, the data is valid in that same cycle.

Address map (bits 18:17 are the commanded quadrant):

| Area | Address bits 16..0 |
|---|---|
| energy LUT | `0, 0, EB, chain[1:0], energy[11:0]` (one byte per entry) |
| sweep LUT | `0, 1, SB, dac[1:0], step[10:0], byte` |
| accumulators | `1, 0000000, AB, bin[7:0], byte` |

EB, SB and AB are the buffer selects. LUT writes go to the buffer not
selected for reading. The accumulator buffer select `AB` swaps when the
telemetry manager has read out and cleared a buffer. In memory test mode,
telemetry reads 512 bytes at address bits 16:9 = the test address instead.

`evproc` accepts an event on a chain when all of these hold:

- that chain's `peak` falls;
- `lld` has been high for at most 4 us;
- the chain is enabled;
- no enabled chain is asserting `pulserst` (that inhibits all chains);
- the chain has no event waiting.

A second event on a waiting chain is dropped (`evdrop`).

For an accepted event, `evproc` does the following:

1. Raises `adcsoc` until that chain's ADC reports busy.
2. Waits for the conversion to finish.
3. Joins a round-robin arbiter with the other chains and with the
   housekeeping ADC. They all share one 12-bit data bus.
4. When granted, pulses `adcread` and takes the 12-bit energy.
5. Reads the energy LUT at `{chain, energy}`, which gives a bin number.
6. Increments that bin's 16-bit counter in the accumulating buffer. This
   is a read-modify-write of the low byte, plus the high byte on a carry.

The monitor counters (`mrcounters`) count LLD, ULD and pulse-reset edges
per chain (9, 4 and 3 bits, saturating). They are latched every
`SAMCLKINT`. The pulse-reset inhibit also gates their counting.

## Housekeeping

`hskpr` reads 16 analog channels through an external mux (`amuxsel`, and
`amuxenb` = 01 for channels 0-7, 10 for 8-15) and a housekeeping ADC. Its
result word is `{channel, value[11:0]}`. It has three modes:

- **Cycling:** channel 0 at `CYCLECLK`, one conversion per `TK8HZ`, so each
  channel once per cycle.
- **Sweep:** the commanded channel, converted at every `SAMPLECLK`. The
  value goes into the anode messages and is still reported at each `TK8HZ`.
- **Shutdown** (analog power off or ADC reset): no conversions, but the
  8 Hz housekeeping message continues.

The digital housekeeping word, from bit 15 down to bit 0:

```
pce, enbswea, enbsweatp, enbstetp, hskpmd, nrhvenb, mcphvenb, anorm,
stecovsw[1:0], stecovstat[1:0], sweacovstat, afeshdn, afepwr, cmdpe
```

`cmdpe` and `pce` are cleared after a housekeeping message has carried
them.

## Covers

`covercntl` has two actuators:

- **SWEA cover:** the switch stays on for 2 s (16 `TK8HZ`).
- **STE cover:** a forced open or close runs the switch for the
  commanded timeout. In non-forced mode it runs while the cover status
  input says the cover has not yet arrived, and stops early when the
  status drops.

New cover commands are ignored while a cover is moving.

## Telemetry

`tlmmngr` sends messages on `tdat`. Each message is a `1` start bit
followed by 16-bit words, MSB first, one bit per microsecond. `tframe` is
high for the whole message. The first word is `{ID[5:0], length-2}`.

| ID | Words | When | Content |
|---|---|---|---|
| 30 / 31 | 18 / 19 | every `SAMPLECLK`, SWEA on | 16 anode counts, `SAMPLECNT`, and for 31 (sweep housekeeping mode) the housekeeping value |
| 34 / 35 | 13 | every `SAMCLKINT`; 35 for the first after `CYCLECLK` | LLD, ULD and pulse-reset counts of the 4 chains |
| 36 | 3 | 8 per second | housekeeping value, digital housekeeping word |
| 32 / 33 / 3A / 3B | 257 | once per cycle | 256 energy bin counters; +1 on a test cycle, +8 in memory test mode |

If several messages are waiting, they go out in the order anode, rates,
housekeeping, energy. An energy message only starts in the first 1 ms
after a `SAMCLKINT`, so it cannot delay the next anode message. The
energy message reads two bytes per counter, fetching one word ahead.

After the energy message the manager clears the buffer it read, one byte
per `STEPCLK` (about 0.74 s for 512 bytes), and then swaps the
accumulator buffers. The counts in one energy message therefore cover
swap-to-swap, which is a 2 s window offset from `CYCLECLK`. The first
message after power-up holds whatever was in the SRAM. Each message type
has its own enable (E2 D15..12), and only housekeeping is sent while the
analog power is off.

## Where this design fills in gaps

The description leaves some details open. This RTL picks the following:

- The bit-level framing of commands and telemetry is this design's own:
  the start bit, one bit per clock, the parity position and the 64-clock
  frame timeout.
- The arm expires on the 16th second tick; one description says 14-16 s,
  another 15-16 s.
- The `TK8HZ` grouping as 22 and 21 sample intervals puts the 126.6 ms
  period just before `CYCLECLK`, not just after it.
- The last pulser spacing at `CYCLECLK` comes out as 450 us rather than
  452 us, because `LOWCNT` keeps running through the gap.
- Event acceptance uses only PEAK, LLD duration, chain enable and
  pulse-reset; ULD plays no part.
- The housekeeping mux enable encoding, the SRAM strobe polarity, the
  memory-arbiter timing and the telemetry priority and energy-start
  window are choices made here.
- All counters get a clear pulse when their block leaves reset.
- The energy message's test-mode ID bit follows the mode in force when
  the readout starts.

## Files and hierarchy

```
ssf_top
  timcntl        cycle, step, sample and tick generation
  commandif      command receiver, registers, protected commands
  latchupprot    analog power control
  covercntl      SWEA / STE cover actuators
  memcntl        SRAM arbiter, LUT writer, buffer selects
  dacsweep       sweep DAC reload           (ad5544_shift)
  mcpdac         MCP / STE-bias command requests
  stetestpulse   STE test pulser ramp
  mpdacwr        shared DAC arbiter         (ad5544_shift)
  tdacwr         threshold DAC              (ad5544_shift)
  atestpulse     SWEA anode test pulse
  acounters      16 anode counters
  mrcounters     monitor rate counters
  evproc         event acceptance, ADC bus arbiter, histogramming
  hskpr          housekeeping ADC sequencer
  tlmmngr        telemetry messages
ssf_pkg          shared constants, command/message IDs, mem_req_t, dac_ser_t
```

Main parameters (the defaults are the instrument's values):

| Module | Parameters |
|---|---|
| `timcntl` | `STEP_US=1450`, `NSTEPS=1344`, `SAMPLE_STEPS=4`, `SAMCNT_MAX=337`, `SAMINT_US=5800`, `TESTCYC_DIV=5` |
| `commandif` | `ARM_TIMEOUT_S=16`, `FRAME_GAP=64` |
| `evproc` | `NCHAIN=4`, `LLD_MAX_US=4` |
| `acounters` | `NCH=16`, `W=14` |
| `mrcounters` | 9/4/3-bit widths |

## Simulating

Every block has a self-checking testbench in `tb/` named `tb_<block>`.
Each prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb/sram_512kx8.sv` is a behavioural model of the external SRAM.

`tb_ssf_top` runs the whole FPGA at its real timing for about 28
simulated seconds, around 40 s of wall time. It includes:

- the SRAM model;
- ADC models for the four chains and for housekeeping;
- a command sender;
- DAC and telemetry decoders.

It checks message contents, anode and rate totals against the pulses it
sent, the histogram against the LUT it loaded, and the MCP write timing
against the pulser window. It also counts about 30 mechanisms (parity
error, armed and unarmed execute, LUT writes, sweep, buffer swap, event
drop, pulse-reset inhibit, test mode, latch-up shutdown, cover timing,
STE pulser ramp, arm timeout, and others). Any mechanism that never happened counts
as a failure.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  rtl/ssf_pkg.sv rtl/*.sv tb/sram_512kx8.sv tb/tb_ssf_top.sv --top tb_ssf_top
./obj_dir/Vtb_ssf_top
```

For a single block, give the package, the block, any helper it uses
(`ad5544_shift` for the DAC writers, and the SRAM model for `memcntl`) and
its testbench. `rtl/ssf_pkg.sv` must come first.

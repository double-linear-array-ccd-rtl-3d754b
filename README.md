# Double linear-array CCD front end

This is the digital core of a small board that reads two Hamamatsu
S8377-256 CCD linear arrays behind a monochromator, in an experiment with a
pulsed laser at about 1 kHz. The arrays hold their own drive logic and
charge amplifier. The front end only has to keep their clock running, start
a readout in step with that clock after the right laser pulse, and tell an
external simultaneous-sampling ADC board when to convert each pixel of the
two analog outputs. All of that fits in one small programmable logic chip.
This RTL describes that chip.

Three ideas carry the design:

* **One time base.** The 3.54 MHz main clock is divided by 8 to give the CCD
  clock CLK (442.5 kHz, under the arrays' 500 kHz limit). Every CLK period is
  cut into eight *phases*, and every output event is placed at a fixed phase.
* **Averaging in the sensor.** A CCD pixel integrates light until it is read,
  and reading is the only way to clear it. Reading only after every n-th
  laser pulse therefore sums n pulses in the pixels, with no arithmetic in
  the logic. n is 100, 50, 20 or 1, chosen by two lines from the PC.
* **A validity flag over the average.** An optional external discriminator
  judges every laser pulse. One bad pulse marks the whole average on
  `syncout`.

## The phase grid

`clock_divider` is a free-running 3-bit counter. Its value is the phase and
its top bit is CLK:

```
phase   0   1   2   3   4   5   6   7   0   1   2   3   4 ...
CLK     ____________________/^^^^^^^^^^^^^^^\_______________/^^^^
ST      ^^^^^^^^^^^^^^^^^^^^^^^^^^^^\_______________/^^^^^^^^^^^^^  (readout start)
SAMPLE  ____________________________________________________/^^^\_  (phase 3)
```

* CLK rises on the main-clock edge from phase 3 to 4 and falls on the edge
  from phase 7 to 0.
* The arrays sample ST on the falling edge of CLK. ST is driven low in
  phases 6, 7, 0 and 1. That is half a CLK period centred on the falling
  edge, with two main-clock cycles of margin on each side.
* SAMPLE is one main-clock cycle long. By default it sits in phase 3, the
  last eighth of CLK low, so it ends exactly on the CLK rising edge. The
  `SAMPLE_PHASE` parameter moves it in steps of 1/8 CLK. This moves the ADC's
  sampling point relative to the video waveform. The original board did the
  same by reprogramming its logic chip.

Every block receives the phase and compares it with its own constants.
Nothing in the design is clocked by anything but the main clock.

## One readout, step by step

1. **Trigger.** `trin` is synchronized with two flip-flops. A trigger is a
   rising edge of the synchronized level.
2. **Averaging** (`average_selector`). A 7-bit counter counts triggers. The
   trigger that brings the count to n raises a one-cycle readout request,
   and the count restarts. The count is also cleared while ST is low. n comes
   from `ave`:

   | ave (AV1:AV0) | triggers per readout |
   |---|---|
   | 0 | 100 |
   | 1 | 50 |
   | 2 | 20 |
   | 3 | 1 (every trigger) |

   The table is the `N0`..`N3` parameters (`AVE_N0`..`AVE_N3` on the top).
3. **Start pulse** (`st_generator`). The request is held as *pending* until
   the next entry into phase 6. ST then goes low for phases 6, 7, 0 and 1.
   A request that comes while ST is already low is dropped. From the trigger
   edge to the fall of ST takes 5 to 12 main-clock cycles (1.4 to 3.4 µs):
   * 2 cycles in the synchronizer;
   * 1 cycle for edge detection and 1 for the request register;
   * up to 8 cycles waiting for phase 6.
4. **Pixels and SAMPLE** (`sample_generator`).
   * While ST is low it clears its pixel counter and arms itself.
   * From the first phase 3 after ST rises, it gives one SAMPLE pulse per CLK
     period. After 256 pulses it disarms.
   * SAMPLE pulse k is the main-clock cycle just before the CLK rising edge
     that puts pixel k on the arrays' outputs.
   * A readout takes 256 × 8 = 2048 main-clock cycles, 578.5 µs. That leaves
     more than 400 µs of the 1 ms laser period free.
5. **Gain.** `gin` goes to the arrays' VG input without change. Both arrays
   share CLK, ST and VG, so their outputs are converted in parallel.

## The discriminator flag (`sync_discriminator`)

This is the least obvious part of the design.

`syncout` is a flag that can only be set by sampling `syncin`. A sampled 1
sets it and a sampled 0 leaves it as it is, like a J-K flip-flop with K tied
low. Only the readout clears it.

* **When `syncin` is sampled.** A delay counter is held at zero while the
  trigger input is high. Once the trigger input is low, the counter counts
  CLK rising edges. On the 32nd edge `syncin` is sampled and the counter
  stops. With a 10 µs trigger pulse, this is about 82 µs after the trigger.
  That gives the discriminator time to decide.
* **When the flag is cleared.** The flag is cleared while the readout's
  pixel count is 224 to 255. That is late in the readout, about 510 µs after
  the readout starts.

In one readout cycle, things happen in this order:

1. The trigger starts a readout.
2. `syncin` is sampled for that trigger. This happens at around pixel 35.
3. The host can read `syncout` during the rest of the readout.
4. The flag is cleared near the end of the readout.

What this means for each mode:

* **Without averaging**, every trigger is read out. `syncout` is then the
  verdict on that same pulse.
* **With averaging**, the triggers that are not read out set the flag but
  nothing clears it. During the readout, `syncout` is therefore the OR of
  the verdicts on all n pulses of the average. A 1 on `syncin` means "this
  pulse is bad".

## Interface of `ccd_frontend`

| port | dir | meaning | board pin |
|---|---|---|---|
| `ckin` | in | main clock, 3.54 MHz | 43 |
| `rst_n` | in | asynchronous reset, active low | — |
| `trin` | in | laser trigger; rising edge = trigger | 2 |
| `gin` | in | gain select from the PC | 4 |
| `ave[1:0]` | in | averaging select AV1:AV0 | 6, 5 |
| `syncin` | in | discriminator verdict, 1 = bad pulse | 41 |
| `ckccd` | out | CCD CLK, `ckin`/8 | 20 |
| `trccd` | out | CCD ST, active low | 24 |
| `gout` | out | CCD VG | 26 |
| `sample` | out | ADC conversion trigger | 11 |
| `syncout` | out | flag over the current average | 40 |

All inputs except `ckin` and `rst_n` may be asynchronous. `ave` is
synchronized bit by bit, so it should only change between triggers. The
arrays' end-of-scan (EOS) output is not used.

Parameters of the top: `PIXELS` (256), `SAMPLE_PHASE` (3), `AVE_N0..3`
(100, 50, 20, 1), `SYNC_DELAY` (32 CLK edges), `SYNC_CLR` (224, first pixel
count of the clear window). The ST phases (6 and 2) are parameters of
`st_generator`.

## Files

| file | content |
|---|---|
| `rtl/ccd_pkg.sv` | phase type, phase constants, averaging-select enum |
| `rtl/clock_divider.sv` | divide by 8, phase counter |
| `rtl/sync2.sv` | two-flip-flop synchronizer |
| `rtl/average_selector.sv` | one readout per n triggers |
| `rtl/st_generator.sv` | phase-aligned ST pulse |
| `rtl/sample_generator.sv` | SAMPLE pulses and pixel count |
| `rtl/sync_discriminator.sv` | `syncout` flag |
| `rtl/ccd_frontend.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/ccd_s8377_model.sv` | behavioural model of an array's digital timing, for the top-level test |

## Departures from the original board

The original logic chip is written in an asynchronous style:

* its flip-flops are clocked by decoded counter outputs, by the trigger and
  by a multiplexer output;
* it has asynchronous clears.

This version keeps the behaviour and timing of that design, but is fully
synchronous:

* Events are placed by comparing the phase counter. Their phases are the
  original ones. They can move by up to one main-clock cycle against the
  original, for example the ~2-cycle synchronizer delay on the trigger.
* `trin`, `syncin` and `ave` are synchronized. The original used them
  directly as clocks or clears.
* There is a reset input. The original relied on power-up state.
* The averaging counter fires when it reaches or passes n−1, not only on
  equality. Changing `ave` in the middle of an average then causes at most
  one early readout. It can no longer stop readouts for a whole wrap of the
  counter.
* No SAMPLE pulse is produced while ST is low. This only matters if
  `SAMPLE_PHASE` is set to 6, 7, 0 or 1.

Two points where the original's comments and its logic disagree were
resolved in favour of the logic:

* The flag is cleared from pixel count 224, where one comment says 240.
* The flag is set by a 1 on `syncin`, where one comment describes a 0 as the
  active value.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ccd_frontend \
  rtl/ccd_pkg.sv rtl/sync2.sv rtl/clock_divider.sv rtl/average_selector.sv \
  rtl/st_generator.sv rtl/sample_generator.sv rtl/sync_discriminator.sv \
  rtl/ccd_frontend.sv tb/ccd_s8377_model.sv tb/tb_ccd_frontend.sv
./obj_dir/Vtb_ccd_frontend
```

The block testbenches need the package, the module and, for the top, the
other modules.

`tb_ccd_frontend` runs the top with all parameters at their defaults,
against two array models:

* 346 laser periods of 1 ms (about 0.35 s of board time, about one second
  of simulation);
* all four averaging modes, a mode change in the middle of an average, gain
  changes, and random discriminator verdicts.

It checks the following:

* the CLK period;
* that each readout starts on exactly the triggers the averaging rule
  selects, with its latency;
* that each readout gets 256 SAMPLE pulses and each pulse lines up with its
  pixel;
* that both arrays start and reach end of scan;
* that `syncout` at mid-readout is the OR of the average's verdicts, and is
  cleared afterwards.

It also counts each of these mechanisms and fails if one never happened.

`tb_workload_arrays` builds the front end for 128, 256, 512 and 1024 pixels
and measures one readout of each:

| pixels | ST to end of last SAMPLE | fits a 1 ms laser period |
|---|---|---|
| 128 | 1022 cycles, 289 µs | yes |
| 256 | 2046 cycles, 578 µs | yes |
| 512 | 4094 cycles, 1157 µs | no |
| 1024 | 8190 cycles, 2314 µs | no |

At the 1 kHz rate, only the 128- and 256-pixel arrays can therefore be read
after every pulse.

## How far to trust it

* All modules are small and fully synchronous. They lint cleanly apart from
  style notes.
* Each block testbench compares against a reference written independently
  in the testbench. Each has been shown to fail on a deliberately broken
  copy of its module.
* The analog side is outside this RTL: the arrays, the video buffers, the
  1 V offset reference, the supply and the ADC board.
* The array model in `tb/` only reproduces the digital timing of the
  sensor: ST sampled on CLK falling, pixels on CLK rising, EOS after the
  last pixel.
* Which edge of SAMPLE the ADC board converts on, and how long the video
  output takes to settle, are not modelled. Set `SAMPLE_PHASE` for the real
  hardware.

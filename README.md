# High-speed digital pixel sensor (DPS) imaging system in SystemVerilog

A digital pixel sensor puts an analog-to-digital converter and a small
memory in every pixel. The whole array converts at once, and the result is
read out as plain digital data. That makes very fast readout possible: the
352 × 288 chip modelled here reads out more than 10,000 frames per second
over a 64-bit bus at 167 MHz. Reading does not disturb the pixel, so a single
exposure can be sampled many times while it is still integrating. That
*non-destructive multi-capture* is the basis of two uses:

- **High dynamic range.** Dark pixels are taken from late samples and
  bright pixels from early samples, before they saturate.
- **Correlated double sampling (CDS) video.** The reset level is read just
  after reset and again at the end of the exposure; the host subtracts the
  two frames.

This RTL models two things:

- **The chip**, at the level of its published block diagram: gray code
  counter, column multiplexers, per-pixel comparator and 8-bit memory, row
  read pointer, row buffer, 64-bit shift-register output and readout
  control.
- **The board-side controller** of an experimental system that drives the
  chip. This controller sequences the reset, integration, conversion and
  readout phases for a list of capture times.

The analog parts (photogate, sense node, comparator) are a behavioural model,
so the whole system can be simulated end to end with Verilator.

## How one pixel converts

Each pixel has three parts:

- A photogate front end, which ends in a storage capacitor (the *sense
  node*).
- A comparator.
- An 8-bit memory.

Conversion is single-slope and runs in all pixels at the same time:

1. The board sets a global analog ramp to its lowest level, below every
   sense node. Every comparator (+ = sense node, − = ramp) therefore starts
   high.
2. The chip's 8-bit gray code counter is broadcast to all pixel memories.
   Every pixel whose comparator is high loads the current code on every
   clock.
3. The ramp and the counter step up together. When the ramp passes a
   pixel's sense node, that pixel's comparator drops. The memory then stops
   loading and keeps the last code it took before the crossing.

After 256 steps every memory holds its pixel's level as a gray code. Gray
code is used because only one bit changes per step. The stored code is
therefore never a mix of two values, whenever the comparator switches.

Instead of the on-chip counter, the **Counter/Aux** pin can select an 8-bit
digital sequence supplied from outside. This allows other code mappings, for
example a logarithmic one. In this system the external sequence is the
board's binary step count, so aux-mode frames come out in plain binary.

Two details matter when reading the output:

- **Direction of the code.** Light *lowers* the sense node. A bright pixel
  therefore gives a *low* code, and a dark pixel stays near the reset level
  and gives a high code.
- **Pixels below the ramp's start.** A pixel whose sense node starts below
  the ramp never loads, and keeps its previous content. The defaults avoid
  this: the model's sense node cannot fall below 400 mV, and the ramp starts
  at 390 mV. A saturated pixel therefore reads as step 2 (gray `0x03`).

With the default ramp (390 mV + 4 mV per step, 1.02 V span), a pixel at sense
level *V* reads step

    k = ceil((V − 390 mV) / 4 mV) − 1      (0 ≤ k ≤ 255)

and stores `k ^ (k >> 1)`.

**Power Enable** powers the comparators down between conversions. While it
is low every comparator output is low and no memory loads. **Write Enable**
gates the code bus the same way.

## Non-destructive capture and the acquisition schedule

Reset, integration, conversion and readout are separate phases. Reading
does not reset the pixel, so the phases can be arranged freely, and
integration can go on while earlier samples are converted and read.

`acquisition_sequencer` expresses every schedule in one form. It takes a
**list of capture times after a pixel reset**, repeated for a number of
frames:

| schedule | times | frames | result |
|---|---|---|---|
| multi-capture (HDR) | `[0 t1 t2 … tN]` | 1 | N+1 samples of one exposure |
| video with CDS | `[0 T]` | many | reset frame + exposed frame per video frame |

For each frame the sequencer works through these steps:

1. It holds Pixel Reset for `RESET_CYC` clocks.
2. It raises PG (integration), which stays high to the end of the frame.
3. When the integration time, counted in ticks of `TICK_CYC` clocks,
   reaches capture time *i*, it pulses TX for `TX_CYC` clocks. This moves the
   photogate's charge onto the sense node.
4. It runs a conversion. The comparators are powered, the gray counter and
   the ramp DAC counter are cleared in the same clock, Write Enable is
   raised, and the two counters advance together every `CNT_DIV` clocks for
   256 steps.
5. It pulses Read Reset and waits for the chip to deliver the whole frame.

The sense node only changes at TX pulses. It therefore holds the charge
collected up to that capture and is stable during the conversion.

If a capture time has already passed when the previous readout finishes,
the capture is taken at once and counted in `overruns`. This is how a
schedule that is too tight shows up.

## Readout path

Readout is started by the Read Reset strobe and then runs from the read
clock alone (`readout_controller`). Two register stages keep the 64-bit bus
busy without gaps:

- The **352 × 8-bit row buffer** takes a row from the column sense path.
- The **352-pixel → 64-bit shift register** outputs the previous row eight
  pixels at a time.

Cycle by cycle:

| cycle | action |
|---|---|
| 0 | Read Reset; row pointer → 0 |
| 1 | read row 0 from the pixel memories (sense amps, 1-cycle latency) |
| 2 | load row buffer; pointer → 1 |
| 3 | row buffer → shift register |
| 4 … 47 | words 0 … 43 of row 0 on `data_out`, `data_valid` high |
|  | during word 0: read row 1; during word 1: load it into the row buffer |
|  | on word 43: row buffer → shift register, so row 1 follows with no gap |

A frame is therefore 3 set-up clocks plus 288 × 44 = 12,672 valid words.
Each word holds 8 pixels, lowest column in bits 7:0. Rows go top to bottom.
`data_valid` is the chip's read clock handshake output.

At 167 MHz this is 75.9 µs per frame and 1.336 GB/s. With a conversion of
20–25 µs, a full capture takes 96–101 µs, about 10,000 frames/s.

In the experimental system the bus is captured by two 32-bit grabber cards
at 20 MHz. The same frame then takes 634 µs, and one capture with its
25.6 µs conversion takes 0.66 ms, about 1,500 captures/s.

## Modules

| file | role | kind |
|---|---|---|
| `dps_system.sv` | top: sequencer + chip | RTL |
| `acquisition_sequencer.sv` | board-side phase sequencing, capture list, overruns | RTL |
| `ramp_dac_counter.sv` | board counter for the ramp DAC, also the aux ramp | RTL |
| `dps_chip.sv` | the sensor chip | RTL + model |
| `gray_counter.sv` | 8-bit gray code counter | RTL |
| `digital_ramp_mux.sv` | Counter/Aux select, Write Enable gating of the code bus | RTL |
| `pixel_frontend_array.sv` | photogate, sense node, comparator of every pixel | behavioural model |
| `pixel_memory_array.sv` | per-pixel 8-bit memory, row read through the sense path | RTL |
| `row_read_pointer.sv` | memory row read pointer | RTL |
| `readout_buffer.sv` | row buffer and 64-bit output shift register | RTL |
| `readout_controller.sv` | readout sequencing and handshake | RTL |
| `dps_pkg.sv` | sizes, `pixel_t`, `mv_t`, `phase_e`, gray conversion functions | package |

All sizes default to the real chip: 288 rows, 352 columns, 8-bit pixels and
a 64-bit bus. Every module takes `R`/`C` parameters so that tests can use a
small array. The per-pixel logic is one generated block per row, each with a
loop over the row's pixels, not 101,376 module instances. This keeps compile
times reasonable: the full-size system builds with Verilator in a few minutes
and simulates one complete two-frame acquisition in under a minute.

## The behavioural pixel model

`pixel_frontend_array` is not hardware. It stands in for the analog pixel so
that frames have real content. Analog levels are carried as 12-bit millivolt
codes (`mv_t`), and the sense node has 16 extra fractional bits.

- **Light.** Light is a per-pixel photocurrent `rate` (0–255), written
  through the scene port (`scene_we/row/col/rate`). While PG is high a pixel
  collects `rate / 65536` mV per clock. At 20 MHz, rate 255 discharges 1 V
  in about 13 ms.
- **TX.** A clock with TX high subtracts the collected amount from the sense
  node, down to a floor of `SAT_MV` = 400 mV, and empties the photogate.
- **Pixel Reset.** Pixel Reset sets every sense node to the Reset Voltage
  (1400 mV from the sequencer).
- **Comparator.** `comp = power_enable && sense > ramp`. The comparator is
  ideal: it has no offset, noise or settling time.

The following are not modelled:

- photogate well capacity;
- dark current;
- fixed-pattern noise;
- the loss of charge in the memory cells over time;
- the slow reset edge that the real pixel needs.

## Departures from the real system

- **One clock.** The chip has separate counter and read clocks. Here the
  read clock is the module clock and the counter clock is an enable
  (`counter_step`). The system runs at the grabber cards' 20 MHz.
- **Memory cells.** The pixel memories are ideal registers without reset.
  The real cells are 3-transistor DRAM with a 10 ms hold time.
  - The sequencer reads every capture out within 0.7 ms of converting it,
    well inside the hold time.
  - If a change lets more than 10 ms pass between conversion and readout,
    silicon would lose data but this model would not.
- **Sense amps.** The column sense amps are a one-cycle registered row read.
- **Not modelled:**
  - the chip's Aux Controls pins and its clock generation, whose function
    is not described;
  - the comparator bias pins.
- **Host interface.** The host side is a register-write interface. The real
  system uses a PC with I/O cards and a MATLAB toolbox. The toolbox's
  exposure-list argument is what the capture list mirrors.
- **Post-processing.** CDS subtraction, HDR synthesis, optical flow and gain
  correction run on the host and are not part of this RTL.
- **Choices of this design.** All cycle counts in the sequencer and the
  readout schedule are this design's own choices. So are the ramp levels,
  the overrun rule, the byte order on the bus and the polarity of
  Counter/Aux (1 = on-chip counter).
- **Direction of the code.** Measured transfer curves of the real chip show
  the code *falling* as the sense node voltage rises. The conversion
  principle (rising ramp, rising count) gives a code that *rises* with the
  sense node voltage, and this model follows the principle. If bit-exact
  agreement with real data matters, invert the ramp or the count.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. A Verilator 5 build of the end-to-end test:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/dps_pkg.sv \
    tb/tb_dps_system.sv --top-module tb_dps_system -Mdir obj
./obj/Vtb_dps_system
```

Replace the testbench and top module name to run another; `-y rtl` lets
Verilator find each module in the file of the same name.

| testbench | what it exercises |
|---|---|
| `tb_gray_counter` | gray sequence, single-bit steps, wrap, reset |
| `tb_digital_ramp_mux` | Counter/Aux select and Write Enable gating |
| `tb_pixel_frontend_array` | reset, transfers adding up, saturation floor, power-down |
| `tb_pixel_memory_array` | load-until-switch conversion, untouched pixels, row reads |
| `tb_row_read_pointer` | advance, wrap, clear |
| `tb_readout_buffer` | row buffer and shift register working on two rows at once |
| `tb_readout_controller` | 3-clock latency, gap-free words, frame_done, restart |
| `tb_ramp_dac_counter` | DAC code, mV level, saturation |
| `tb_acquisition_sequencer` | reset width, TX timing, 255 steps per conversion, power/write windows, overrun |
| `tb_dps_chip` | whole chip at 3 × 24, driven pin by pin: gray and aux conversions, repeat captures, powered-down conversion |
| `tb_dps_system` | whole system at 3 × 24: multi-capture, CDS video with aux ramp, overrun, saturation; checks every pixel |
| `tb_workloads` | default timing on 2 × 24 pixels: 65 captures 1 ms apart over 64 ms, and 12 CDS video frames at 200 frames/s (frame period checked against 5 ms for the full array) |
| `tb_dps_system_full` | whole system at 352 × 288 with default parameters: one CDS acquisition (0 µs and 1 ms), both frames checked pixel by pixel (a few minutes to build, under a minute to run) |

The reference values in the testbenches come from a closed-form model of the
behavioural pixel: a linear discharge, the floor, and the ramp formula above.
They are not taken from the RTL. The chip and system tests therefore check
the whole conversion path, not just internal consistency.

## Changing the design

- **Array size.** Set `R`/`C` on `dps_system` or `dps_chip`. `C × 8` must be
  a multiple of 64 with at least 3 words per row.
- **Timing.** `TICK_CYC` (clocks per capture-time unit), `CNT_DIV` (clocks
  per ramp step), `RESET_CYC` and `TX_CYC` set the sequencer timing. For a
  clock other than 20 MHz, scale `TICK_CYC` and `CNT_DIV`.
- **Ramp.** `RAMP_LO_MV`, `RAMP_STEP_MV` and the model's `SAT_MV` must keep
  the ramp's first level below the lowest sense level. Otherwise saturated
  pixels never convert and keep stale codes.
- **Capture list.** `MAX_CAPS` (65) sets the capture list's depth, and
  capture times are 17 bits (up to 131 ms at 1 µs ticks).

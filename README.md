# NDAQ — eight-channel 125 MHz acquisition logic with real-time optimal filtering

This is the digital logic of a VME data-acquisition board for a surface-level
antineutrino detector. Eight photomultiplier channels are digitised at 125 MHz.
On the board, each channel goes through a 100-tap FIR filter. The filter
estimates pulse amplitude and also removes the slowly wandering baseline. The
logic triggers on the filtered samples, on a front-panel pulse, or on both in
coincidence. For every trigger it captures a 128-sample frame per channel that
starts 32 samples *before* the trigger. It then packs the frames, the TDC
(time-to-digital converter) hits and the current trigger rate into an event.
The event goes to a 32-bit external FIFO, which a VME master or a USB host
reads out.

The logic is split over the board's two FPGAs:

| FPGA | Top | Contents |
|---|---|---|
| Core FPGA | `core_fpga` | ADC clock-domain crossing, 8 × FIR filter, digital trigger, trigger conditioning, pre/post-trigger FIFOs, capture controller, trigger-rate meter, configuration registers, slave SPI, TDC reader, event builder |
| VME FPGA | `vme_fpga` | VME A24/D32 slave with block reads, master SPI to the Core FPGA, FT245BM USB-FIFO interface, USB command decoder, arbitration between VME and USB |

`ndaq_top` puts the two side by side, joins them with the SPI link, and brings
everything else out as ports. That includes the ADC buses, the trigger input,
the TDC bus, both sides of the external output FIFO, the VME bus and the
FT245BM pins. All shared constants, the trigger-mode enum and the register map
are in `rtl/ndaq_pkg.sv`.

```
 Core FPGA
   adc_data[8], adc_dco ─► adc_cdc ─► FIR ×8 ─► pre_fifo ×8 (M=32) ─► post FIFO ×8 (N=128) ─┐
                                        │                      ▲                             │
                                        ▼                      │                             ▼
   ext_trig ───────► trigger_cond ◄─ digital_trigger      capture_ctrl              data_builder ─► ofifo_* (32 bit)
                         │    └──────────────────────────────► ▲                      ▲    ▲
                         └─► freq_meter ────────────────────────────────────────────────┘    │
   tdc_* ──────────► tdc_reader ─────────────────────────────────────────────────────────────┘
   spi ◄─► spi_slave ◄─► config_regs (run, mode, bypass, thresholds, coefficients)

 VME FPGA
   fifo_* ─► vme_slave ◄─► VME bus
                 │
   spi ◄── spi_master ◄── arbitration ◄── usb_bridge ◄─► ft245_if ◄─► FT245BM pins
```

## The optimal filter and why it needs 100 taps in logic cells

The front-end shaper integrates heavily. A single-photoelectron pulse is about
800 ns wide, roughly 100 samples, and it rides on a baseline that drifts from
event to event. Each channel's amplitude is estimated as a weighted sum of the
last 100 samples, `A = Σ a_i r_i`. The weights are chosen offline to minimise
the noise variance `Σ Σ a_i a_j C_ij`, using the measured noise covariance `C`,
subject to two constraints:

* `Σ a_i s_i = 1`, where `s` is the normalised reference pulse. This makes the
  estimate unbiased in amplitude.
* `Σ a_i = 0`. Any constant pedestal adds `P·Σ a_i` to the output, so this
  constraint makes the filter blind to the baseline. The baseline never has to
  be estimated and subtracted in real time.

Solving the Lagrange system (100 + 2 equations) gives the coefficients. The
hardware does not compute them. They are written into the filter through the
configuration registers, and they reset to zero. Because of the zero-sum
constraint, a correctly loaded filter gives 0 on a flat input of any level. The
end-to-end test checks this property on channel 0.

Eight 100-tap filters need 800 multiplies per clock, far more than the
hardware multipliers of the target FPGA. So `fir_transposed` uses the
**transposed form**:

```
 z[k] <= c[k]·x + z[k+1]        (k = 1 .. TAPS-1, z[TAPS] = 0)
 y    <= c[0]·x + z[1]
```

Every tap multiplies the *current* sample and adds the partial sum held in the
next tap's register. The critical path is therefore one multiply and one add,
whatever the length. The direct form would need a 100-input adder tree in a
single clock. The coefficients and the sample enter each multiplier directly,
so the structure maps onto LUT and register pairs. Details of this design:

* The ADC code is offset binary. Inverting the MSB turns it into two's
  complement.
* Coefficients are signed 16-bit. The full-precision sum is shifted right by
  `OUT_SHIFT` = 14 and saturated to 16 bits. Scaled that way, a coefficient of
  16384 means gain 1.0.
* Latency is 3 clocks from `adc_in` to `y_out`. A new sample is accepted every
  clock.
* With the FIR bypass bit set, the raw sign-corrected ADC sample replaces the
  filter output. The trigger and the frames then see unfiltered data.

## Clock domains

There are three clocks:

* `adc_dco`, the data clock that comes with the ADC outputs;
* `core_clk`, on which all Core FPGA processing runs (125 MHz);
* `vme_clk`, for the VME FPGA.

The two FPGAs talk only over SPI, whose pins are oversampled, so they need
no common clock. The ADC samples enter the Core FPGA through `adc_cdc`. This
is one 8-deep dual-clock FIFO, 80 bits wide, carrying all channels. Its
pointers cross in Gray code through two-flop chains. The DCO and the core
clock have the same nominal rate, so the FIFO settles at a constant fill and
passes one sample per clock. If it ever runs empty, it repeats the last
sample. With the two clocks in phase, the crossing delays the samples by 4
core clocks before they reach the filters. The front-panel trigger does not
go through the crossing. This fixed offset between data and trigger shifts
which sample counts as "at the trigger", and the testbenches account for it.

## Triggering

`digital_trigger` has one comparator per channel on the filtered sample. A
channel counts when its sample is strictly greater than its 16-bit signed
threshold. The default threshold is 1000. An internal trigger is a one-clock
pulse on the first clock that any channel enabled in `REG_INTMASK` crosses
upward. A channel that stays above threshold does not retrigger.

`trigger_cond` selects the trigger source by mode:

| Mode | Code | Fires on |
|---|---|---|
| External | 0 | rising edge of the front-panel `ext_trig` (asynchronous; 2-FF synchroniser + edge detector) |
| Internal | 1 | the internal pulse |
| External+Internal | 2 | an external edge and an internal pulse no more than `REG_COINC` clocks apart (default 16), in either order |
| — | 3 | never |

The coincidence is symmetric. Each source keeps an age counter since its last
pulse, and a pulse of one source fires if the other's age is within the
window. An isolated pulse from either side is rejected. Latency is 4 clocks
from `ext_trig` rising, and 1 clock from the internal pulse.

`freq_meter` counts the triggers produced while acquisition runs, over a gate
of `GATE` clocks. The default gate is 125 000 000 clocks, which is 1 s at
125 MHz. At the end of each gate it publishes the count as the rate in Hz.

## Capturing samples from before the trigger

This is the least obvious part of the Core FPGA. Every channel has two
buffers:

* **Pre-trigger FIFO** (`pre_fifo`, M = 32). This is a ring buffer written on
  every clock while `run` is set. Once it is full, every write pushes out the
  oldest sample on `dout`, with `dout_valid` one clock later. The output stream
  is therefore the input delayed by exactly 32 samples.
* **Post-trigger FIFO** (`sync_fifo`, N = 128, first-word fall-through).

`capture_ctrl` accepts a trigger only when all three of these hold:

* it is **armed**: the pre-trigger FIFOs are full;
* it is not busy;
* the downstream side is **ready**: the post FIFOs are empty, the event builder
  is idle, and no frame is waiting.

From the accepting clock onward, it writes the pre-FIFO's delayed stream into
the post FIFO for 128 valid clocks. The delay is exactly 32, so the first 32
words written are the 32 samples that came before the trigger, and the next 96
are the samples after it. Copying out the buffer and recording the new samples
are one and the same operation. All eight channels share one controller, so
their frames are sample-aligned. After the 128th write the controller pulses
`frame_done` to start the event builder.

Triggers refused during this dead time are counted in a saturating 16-bit
`lost` counter. The dead time is 128 clocks of capture plus the builder's
readout. In the end-to-end test, a ramp input shows that word 32 of each channel's
frame is the sample that entered the filters when the trigger was accepted.

## Event format

`data_builder` writes one 32-bit word per clock while the external FIFO's
`full` flag is low. `full` is treated as an almost-full flag: one more word
may be written on the clock after it rises. The event layout is:

| Word(s) | Content |
|---|---|
| header | `{8'hA5, event number[23:0]}` |
| rate | `{8'hF0, trigger rate[23:0]}`, saturated |
| trigger | `{8'hE0, 6'd0, mode[1:0], external, 7'd0, channels above threshold[7:0]}` |
| TDC | `{4'hC, hit[27:0]}`, one word for each hit waiting, up to 64 |
| samples | channel 0 … 7, 64 words each, `{sample[2i+1], sample[2i]}` (16-bit signed) |
| trailer | `{8'h5A, word count including header and trailer}` |

With no TDC hits an event is 516 words, or 2064 bytes.

`tdc_reader` drains the TDC's output buffer whenever its empty flag `tdc_ef`
is low. Each read holds `tdc_rd_n` low for `RD_CLKS` = 3 clocks, captures the
28-bit word, and then waits one recovery clock. Hits are queued in a 64-deep
FIFO until the next event collects them.

## Register access: SPI between the FPGAs

The VME FPGA reaches the Core FPGA's 16-bit registers over a 4-wire SPI link,
mode 0, MSB first. One access is one 32-bit frame:

```
 bit 31 : 1 = read, 0 = write      bits 30:16 : register address      bits 15:0 : write data / read data on MISO
```

`spi_master` runs at `HALF` = 8 VME-FPGA clocks per SCLK half-period. `done`
comes 65·HALF + 1 clocks after `start`. `spi_slave` oversamples SCLK, CS and
MOSI through synchronisers in the core clock domain, so each SCLK phase must
last at least 5 core clocks. A write takes effect at the end of the frame. For
a read, the register is sampled after the 16th bit and shifted out from there.

| Address | Register |
|---|---|
| `0x0000` CTRL | `[0]` run, `[2:1]` trigger mode, `[3]` FIR bypass |
| `0x0001` INTMASK | `[7:0]` channels allowed to make internal triggers (reset `FF`) |
| `0x0002` STATUS | `[0]` armed, `[1]` capture busy, `[2]` builder busy (read only) |
| `0x0003/4` RATE | trigger rate, low/high halves (read only) |
| `0x0005` EVT | events built, low half (read only) |
| `0x0006` COINC | coincidence window in clocks (reset 16) |
| `0x0010 + ch` | threshold of channel `ch` (signed, reset 1000) |
| `0x1000 + ch·128 + tap` | FIR coefficient, write only |

## VME and USB access

`vme_slave` is an A24/D32 slave. Its strobes are synchronised to the VME-FPGA
clock. It answers when `A[23:16]` equals `BASE` (default `0x10`) and the
address modifier is `0x39`, `0x3D`, `0x3B` or `0x3F`. The last two are block
transfers.

| Offset | Access |
|---|---|
| `0x00` SPI_CMD | write a 32-bit SPI frame (above) to start a Core FPGA register access; read `{busy, 15'd0, last read data}` |
| `0x04` STATUS | `{30'd0, usb_active, output FIFO empty}` |
| `0x08` FIFO | each read pops one output-FIFO word (0 if empty) |

During a block transfer the address advances by 4 for each data strobe, except
on the FIFO register. There it stays put, so a whole block read drains the
event stream. DTACK is held until DS rises.

`ft245_if` drives the FT245BM USB-FIFO chip's RD#/WR strobes and its
bidirectional data bus, with `STROBE` = 4 and `GAP` = 6 clocks. Reads take
priority over writes. `usb_bridge` decodes byte commands from the host:

| Command | Bytes | Reply |
|---|---|---|
| `'W'` | `57 a1 a0 d1 d0` | none; writes register `{a1,a0}` |
| `'R'` | `52 a1 a0` | `d1 d0` |
| `'F'` | `46 n1 n0` | n output-FIFO words, 4 bytes each, MSB first |

VME has priority over USB for both shared resources. USB gets the master SPI
only when it is idle and VME is not starting an access. A USB FIFO pop counts
only on a clock where VME is not popping.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| channels, ADC bits | 8, 10 | `ndaq_pkg` |
| ADC crossing FIFO depth | 8 | `adc_cdc` |
| FIR taps, coefficient width, output shift | 100, 16, 14 | `fir_transposed`, `core_fpga.TAPS` |
| frame N, pre-trigger M | 128, 32 | `core_fpga.FRAME`, `.PRE` |
| rate gate | 125 000 000 clocks | `core_fpga.RATE_GATE` |
| TDC read strobe, hit buffer | 3 clocks, 64 | `tdc_reader` |
| VME base, SPI half-period | `0x10`, 8 | `vme_fpga` |

`ndaq_top` has no parameters. It uses all of the defaults above.

## Departures from the original board and what is not here

* **One ADC data clock.** All eight channels are assumed to arrive with a
  single DCO. The DCO is assumed to have the same frequency as `core_clk`.
* **Registers in the VME FPGA.** On the board the master SPI also reaches
  configuration registers inside the VME FPGA. Here it only addresses the Core
  FPGA. The VME FPGA's status is read directly over VME, and its settings
  (base address, SPI rate) are parameters.
* **Off-chip parts are ports only.** These are not modelled:
  * the ADCs, and the TDC chip with its configuration;
  * the discriminators and DACs;
  * the 512K × 32 output FIFO;
  * the SRAM and the clock distributor;
  * the CAN slow-control microcontroller.

  The USB chip has a behavioural model for simulation only
  (`tb/ft245bm_model.sv`).
* **Formats are this design's own.** The register map, SPI frame, event
  format, USB commands, trigger-coincidence rule and VME register offsets are
  all choices made here. Every RTL file's opening comment says which parts
  follow the original board and which are choices.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=<n> failures=<m>`, and a watchdog stops it if it hangs. The
simulator is two-state and starts registers at random values, so everything
that is read is reset. Build and run any testbench with Verilator 5. The
package comes first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ndaq_top \
  rtl/ndaq_pkg.sv $(ls rtl/*.sv | grep -v ndaq_pkg) tb/ft245bm_model.sv tb/tb_ndaq_top.sv
./obj_dir/Vtb_ndaq_top
```

`tb_ndaq_top` runs the complete board at the default parameters in a few
seconds. It:

* loads coefficients over VME→SPI;
* injects pulses and ramps;
* takes external, internal and coincidence triggers, and shows an isolated
  pulse rejected in coincidence mode;
* runs in bypass mode;
* loses triggers during the dead time;
* back-pressures the output FIFO;
* reads TDC hits;
* drains events both by VME block transfer and through the USB port.

It counts each of these mechanisms and fails if any never happened.
`tb_core_fpga` checks the frame contents and the pre-trigger alignment in
detail, using a short rate gate.

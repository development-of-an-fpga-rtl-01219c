# LTC2311 value acquisition core

This core reads measured values, such as phase currents and DC-link voltages, for a real-time
controller of power electronics. It drives groups of LTC2311 16-bit SAR ADCs over SPI, usually on
LVDS pairs. It returns every sample twice: as the raw two's-complement code and as a scaled
value `(code + offset) * factor`. A CPU sets up, triggers and watches the core through a small
AXI4-Lite register file. A hardware trigger input lets a PWM unit start conversions with no
software in the path.

The design centres on one fact about the ADC: **an LTC2311 transfer returns the result of the
conversion before it**. The core hides this from software, which is why a triggered sample
takes two SPI transfers. The sections below explain that first. They then go bottom-up through
the SPI master, the group controller with its shared multiplier, the mode logic and the registers.

```
             AXI4-Lite                        TRIGGER_CNV[g]
                 |                                  |
        +--------v--------+   registers    +--------v---------+
        | axi4lite_slave  |<-------------->|  ultrazohm_adc   |  mode FSM, trigger logic,
        +-----------------+  ack / status  |  (top)           |  parameter update, SW reset
                                           +--+------------+--+
                                              |            |        one per group g
                                     +--------v----+  +----v--------+
                                     |adc_controller| |adc_controller| ...
                                     | spi_master   | |             |
                                     | raw_to_si    | |             |
                                     +--+-------^---+ +-------------+
                                   SCLK,SS_N   MISO x CHANNELS_PER_MASTER
                                  (lvds_obuf) (lvds_ibuf)
```

## Reading an ADC that is one result behind

The LTC2311 samples its input, and starts converting, on the **rising** edge of CNV. CNV is the SPI
slave-select line, SS_N here. While CNV is low, the ADC shifts out the result of that earlier
conversion. So whatever a transfer reads was sampled at the end of the transfer before it. That
moment may be long past, or, after power-up, it may never have happened.

`adc_controller` deals with this as follows. On every trigger it first runs a **dummy transfer**
and throws its data away. The rising SS_N edge that ends the dummy transfer samples the input
*now*. The next transfer then reads that sample.

Within a series of several samples per trigger, or in continuous mode, each transfer reads the
sample that the previous transfer's end started, so no further dummy transfers are needed. The cost is
one extra SPI frame of latency per trigger.

The SS_N high time between two transfers is the ADC's acquisition time:

- Between the dummy transfer and the first real transfer it is **3 clocks**: 15 ns at a 200 MHz
  clock. That is below the LTC2311's 28.5 ns minimum, so the first value of a series may be
  slightly inaccurate at 200 MHz. At 100 MHz it is 30 ns, within the limit.
- Between two real samples the converter pipeline runs first, so SS_N is high for
  `CHANNELS_PER_MASTER + 6` clocks: 50 ns at the defaults and 200 MHz.

The original core behaves the same way. This design keeps that behaviour and adds no register
to lengthen the time.

## The SPI master and the 17-bit frame (`spi_master`)

One `spi_master` serves all ADCs of a group. They share SCLK and SS_N, and each ADC has its own
MISO line, so one frame returns `CHANNELS` codes.

The master is a Mealy state machine whose outputs are all registered. Its states are:

| State | What happens |
|---|---|
| `IDLE` | SS_N is high and SCLK is at CPOL. With `manual` = 1, both lines instead follow software. This is how the ADCs are put into nap or sleep mode. The timing settings are latched here, so rewriting them during a frame has no effect on that frame. |
| `PRE_WAIT` | SS_N goes low. The master waits `PRE_DELAY + 1` clocks. |
| `SAMPLE` / `SHIFT_OUT` | Each lasts `CLK_DIV + 1` clocks. SCLK toggles on every change between the two, so `f_SCLK = f_clk / (2 (CLK_DIV + 1))`. MISO is sampled on the change from `SAMPLE` to `SHIFT_OUT`. With CPHA = 0, which the LTC2311 needs, the master enters `SAMPLE` first. |
| `POST_WAIT` | The master waits `POST_DELAY + 1` clocks. SS_N then rises for at least one clock and the frame is published on `rx_data`. |

The LTC2311 puts its MSB on SDO when CNV falls and moves to the next bit on each falling SCLK
edge. A master that samples on falling edges therefore sees the MSB twice. The frame thus has
**DATA_WIDTH + 1 = 17 sample edges**. The bits go into a 16-bit shift register, where the
duplicate MSB falls out of the top.

Transfer time, counted in clock edges from the edge that sees ENABLE to the edge that publishes
the data, both included:

```
n_spi = 4 + PRE_DELAY + POST_DELAY + 2 * (DATA_WIDTH + 1) * (CLK_DIV + 1)     (CPHA = 0)
```

CPHA = 1 adds `CLK_DIV + 1`. At the reset settings (all zero), `n_spi` is 38 clocks. SS_N is low
for `n_spi - 1` of them.

## A group and its shared multiplier (`adc_controller`, `raw_to_si`)

A group is one `adc_controller`. It contains one `spi_master` for `CHANNELS_PER_MASTER` ADCs and
**one** `raw_to_si` unit that all channels of the group share. It also stores, per channel, a
signed offset (16 bit) and a signed factor (18 bit), plus the number of samples to take per
trigger.

`raw_to_si` has the shape of a DSP48 slice. It registers the inputs A (code), D (offset) and B
(factor), then registers the pre-adder sum and a second copy of B, then registers the product.
This gives a latency of 3 clocks, and it accepts a new operand set every clock. The controller
therefore feeds the channels in one per clock. After `CHANNELS_PER_MASTER + 3` clocks all
products are back. Bits `RES_MSB..RES_LSB` of each 35-bit product are published on `SI_VALUE`.
By default these are bits 23..6, so the factor is in effect a fixed-point number with 6
fractional bits.

The controller's state machine:

| State | What happens |
|---|---|
| `IDLE` | Manual SPI control passes through. ENABLE starts a series, dummy transfer first. |
| `OCCUPIED` | One clock: starts the SPI master. |
| `SPI_TRANSFER` | Waits for the master's BUSY to fall. After the dummy transfer the FSM goes back to `OCCUPIED`. Otherwise it publishes `RAW_VALUE` and raises `RAW_VALID`. |
| `CONVERTING` | `CHANNELS + 3` clocks. At the end it publishes `SI_VALUE` and raises `SI_VALID`. It then runs the next sample of the series. After the last sample it goes to `IDLE`, or, if ENABLE is still high, starts a new series at once with no dummy transfer. This is how continuous mode works. |

`RAW_VALID` and `SI_VALID` are levels. They fall when a transfer starts and rise when the new
value is ready.

Offsets, factors and the sample count can be written at any time, even during a series. They
reset to offset 0, factor 1 and one sample. A sample count of 0 counts as 1.

## Latency

These figures are in clock edges from the edge that samples the trigger to the edge that raises
the flag, both included:

| Event | Clocks |
|---|---|
| `RAW_VALID` after ENABLE of a group | `2 n_spi + 5` |
| `SI_VALID` after ENABLE of a group | `2 n_spi + CHANNELS_PER_MASTER + 8` |
| `SI_VALID` after a rising edge on `TRIGGER_CNV` (top level) | `2 n_spi + CHANNELS_PER_MASTER + 9` |
| Each further sample of a series, and the period in continuous mode | `n_spi + CHANNELS_PER_MASTER + 5` |

Take a 200 MHz clock with CLK_DIV = 0, which gives a 100 MHz SCLK, and the default group of 4
ADCs. Then `n_spi` is 38, so a hardware-triggered value is ready after 89 clocks, or 445 ns. In
continuous mode a new value arrives every 47 clocks, or 235 ns. That is 4.26 MS/s per ADC, below
the LTC2311's 5 MS/s.

## Modes and triggers (`ultrazohm_adc`)

The top level holds the register file, `SPI_MASTER` groups, the optional LVDS buffers and a small
mode FSM:

- **TRIGGERED** is the default. Two kinds of trigger are handled here.
  - *Hardware trigger.* A rising edge on bit `g` of `TRIGGER_CNV` requests group `g`. If the
    group is busy, the request is held and served as soon as the group is idle. Hardware requests
    always win.
  - *Software trigger.* Setting `ADC_CR.TRIGGER` starts, in the same clock, all groups selected
    in `ADC_MASTER_CHANNEL`. It waits until none of them is busy. The core then clears the bit, so
    software can see that the trigger was taken.

  A group whose `ADC_AVAILABLE` bit is 0 is never started, in any mode.
- **CONTINUOUS** is active while `ADC_CR.MODE` = 1. ENABLE of every available group is held high,
  so each group samples back to back.
- **MANUAL** is entered from TRIGGERED when `ADC_SPI_CR.SPI_CONTROL` = 1 and the selected groups
  are idle. SS_N and SCLK of the selected groups then follow `ADC_SPI_CR` bits 0 and 2, for the
  nap and sleep sequences. `ADC_SPI_CR` bits 1 and 3 report the levels: high only if high on all
  selected groups. Bit 5 reports that manual mode is active.

To write a parameter, select the groups in `ADC_MASTER_CHANNEL`, select the channels in
`ADC_CHANNEL`, and put the value in `ADC_CONV_VALUE`. Then write `ADC_CR` with the meaning in
bits 6:4 and `CONV_VALUE_VALID` = 1. The core writes the value and clears the bit.

`ADC_CR.SW_RESET` resets the register file and the whole core for one clock.

The AXI4-Lite handshake is only reset by `S_AXI_ARESETN`. `TRIGGER_CNV` must be synchronous to
`S_AXI_ACLK`, which clocks everything.

## Register map

32-bit registers at byte offsets, 16 in all. Offsets 0x28 to 0x3C are spare read/write storage.

| Offset | Name | Contents |
|---|---|---|
| 0x00 | `ADC_CR` | bit 0 MODE (1 = continuous), 1 TRIGGER, 2 SW_RESET (reads 0), 3 CONV_VALUE_VALID, 6:4 value meaning: 0 offset, 1 factor, 2 samples per trigger |
| 0x04 | `ADC_SPI_CR` | 0 SS_N level, 1 SS_N status, 2 SCLK level, 3 SCLK status, 4 manual control, 5 manual active, 6 CPOL (reset 1), 7 CPHA. Bits 1, 3 and 5 are written by the core. |
| 0x08 | `ADC_SPI_CFGR` | 15:0 CLK_DIV, 23:16 PRE_WAIT, 31:24 POST_WAIT (clocks − 1) |
| 0x0C | `ADC_MASTER_CHANNEL` | one-hot group select |
| 0x10 | `ADC_CHANNEL` | one-hot channel select within the selected groups |
| 0x14 | `ADC_MASTER_FINISH` | read only: RAW_VALID per group |
| 0x18 | `ADC_MASTER_SI_FINISH` | read only: SI_VALID per group |
| 0x1C | `ADC_MASTER_BUSY` | read only: group busy |
| 0x20 | `ADC_CONV_VALUE` | offset or factor (signed), or sample count (unsigned) |
| 0x24 | `ADC_AVAILABLE` | one-hot: 1 = group may be triggered. Resets to 0, so set it before the first trigger. |

All registers reset to 0 except `ADC_SPI_CR`, which resets to 0x40 (CPOL = 1).

## Parameters and ports

| Parameter | Default | Meaning |
|---|---|---|
| `DATA_WIDTH` | 16 | ADC code width |
| `CHANNELS_PER_MASTER` | 4 | ADCs per group (shared SCLK / SS_N) |
| `SPI_MASTER` | 2 | number of groups |
| `OFFSET_WIDTH` | 16 | offset width |
| `CONVERSION_WIDTH` | 18 | factor width |
| `RES_MSB`, `RES_LSB` | 23, 6 | slice of the product on `SI_VALUE` |
| `DIFFERENTIAL` | 1 | LVDS pairs for SCLK and MISO |

Results are packed flat. Group `g`, channel `c` is at `RAW_VALUE[(g*CPM+c)*DATA_WIDTH +: DATA_WIDTH]`
and `SI_VALUE[(g*CPM+c)*(RES_MSB-RES_LSB+1) +: ...]`, where CPM is `CHANNELS_PER_MASTER`.

Differential pairs are `{N, P}`: P is at the even index and N at the odd one, in both `SCLK_DIFF`
and `MISO_DIFF`. With `DIFFERENTIAL` = 0, the single-ended `MISO` inputs are used and `SCLK_DIFF`
is held low. The single-ended `SCLK` is always driven.

`lvds_ibuf` and `lvds_obuf` are behavioural stand-ins for the FPGA's differential IO buffers. The
input buffer outputs 1 when both lines are equal. Replace them with the vendor primitives for
implementation.

## Where this implementation departs from the original core

- **Frame-time formula.** The original gives the SPI latency with a factor `32 (CLK_DIV + 1)`.
  That is inconsistent with its own 17-bit frame, which takes `34 (CLK_DIV + 1)`. This design
  uses the 17-bit frame, so the factor here is 34.
- **Per-sample time.** The original quotes `n_spi + CHANNELS + 6` clocks per sample. This design
  takes `n_spi + CHANNELS + 5`. The end-to-end trigger latency, `2 n_spi + CHANNELS + 9`, agrees
  with the original.
- **Factor alignment.** The multiplier uses a second factor register (the DSP48 "B2" stage). This
  lets each factor meet the sum it belongs to when channels stream through back to back.
- **Reset levels.** SS_N resets high. The original's port table lists 0, but its idle logic
  drives it high.
- **ADC_AVAILABLE meaning.** 1 means available. The original's prose says the opposite of its
  bit table; the table is followed.
- **When new parameters apply.** They take effect immediately, even during a series. The
  register description in the original says "when the groups are no longer busy", while the
  text on the controller says "at any time".
- **Choices of this design.** The original does not specify these:
  - hardware-trigger edge detection and queueing;
  - the MANUAL-mode status encoding;
  - the AXI4-Lite handshake details (one transaction of each kind at a time, byte strobes
    honoured);
  - the reset values of offset, factor and sample count.

## How far it has been verified

The RTL has been checked only in simulation, against behavioural models of the LTC2311
interface, and it passes lint and generic synthesis with no latches. It has not been placed on
an FPGA. IO timing, such as the board delay that limits SCLK to about 100 MHz, is not modelled
beyond a fixed 2 ns clock-to-output in the ADC model. The LVDS buffers are models.

## Simulating

Every testbench checks itself and ends with a line `TB_RESULT checks=<n> failures=<m>`. Each has
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_ultrazohm_adc -y rtl -y tb +libext+.sv -Irtl \
    rtl/adc_pkg.sv tb/tb_ultrazohm_adc.sv
./obj_dir/Vtb_ultrazohm_adc
```

| Testbench | What it covers |
|---|---|
| `tb_spi_master` | two ADCs per master; received codes, SCLK edges and idle level for CPOL/CPHA, dividers and delays; `n_spi` cycle count; manual mode |
| `tb_raw_to_si` | random operand streams against a reference model, one result per clock, latency 3 |
| `tb_adc_controller` | dummy transfer, three-sample series, continuous operation, per-channel offset and factor, RAW/SI latencies, manual mode |
| `tb_adc_controller_two_samples` | reference scenario of a two-ADC group: offset and factor on one channel, two samples per trigger; prints the event times of the series and checks them |
| `tb_axi4lite_slave` | reads, writes, byte strobes, read-only registers, hardware acknowledge, software reset |
| `tb_lvds_ibuf`, `tb_lvds_obuf` | buffer truth tables |
| `tb_ultrazohm_adc` | full core at default parameters with eight ADC models: every mode and trigger path, queued and refused triggers, parameter updates, timing change at run time, manual control, software reset, end-to-end latency |
| `tb_ultrazohm_adc_single` | core built with `DIFFERENTIAL` = 0 as one group of eight ADCs sharing one multiplier: per-channel scaling, software series, hardware-trigger latency, continuous period, `SCLK_DIFF` held low |
| `tb_triangle_20khz` | full core at 200 MHz with a 100 MHz SCLK sampling a 20 kHz triangle: SCLK period, frame length, acquisition times, continuous sample period, one full waveform period |

`tb/ltc2311_model.sv` models the ADC's serial interface. It converts on the rising edge of CNV
and shifts out the previous result, MSB twice, with 2 ns clock-to-output. After power-up it holds
a random code.

Verilator simulates with two states and no X, so the RTL resets every register whose value is
read after reset. The multiplier pipeline is the exception: it has no reset, and its results are
only read at counted cycles. Adding `+verilator+rand+reset+2` to the simulation command starts
every unreset bit at a random value, which is a useful check after changes.

# ALIBAVA mother-board FPGA logic

ALIBAVA is a portable system for reading out silicon microstrip sensors.
Two Beetle front-end chips (128 channels each) sit on a daughter board
next to the sensor. They sample the sensor signals at 40 MHz into a
128-deep analogue pipeline, and each chip sends out a selected sample as
an analogue frame. The mother board digitises these frames and stores
complete events in a 256 Mbit SDRAM. A PC reads the events over USB.

Events can be triggered in three ways:

* a laser that the board fires itself at 1 kHz;
* a radioactive source, seen through photomultipliers or an external
  pulse, timed against a 100 ns window by a TDC;
* the Beetle's internal test pulse, used for calibration.

This repository holds synthesizable SystemVerilog for the FPGA on the
mother board. It also holds testbenches and behavioural models of the
chips around the FPGA.

## Architecture

A central state machine, the **CFSM**, is the only block that talks to
the others. Every controller connects to it and to nothing else, with a
few exceptions for the trigger path. Those exceptions are internal
trigger strobes, which must keep clock-exact timing, so they bypass the
CFSM.

```
            USB chip ── usb_control ── rx FIFO ─┐        ┌─ beetle_slow_control ── I2C ── Beetles
                                   └─ tx FIFO ──┤        ├─ beetle_fast_control ── CLK/RESET/TRIGGER/TESTPULSE
                                                │        │        ▲ TRIG_L            ▲ TRIG_R
  ADC 0 ── adc_control (FIFO) ──────────────────┤  cfsm  ├─ trigger_out ── TRIG OUT, delay-line code
  ADC 1 ── adc_control (FIFO) ──────────────────┤        ├─ tdc_control ◄── trigger_in ◄── SIN1/SIN2/PPOS/PNEG
  SDRAM ── sdram_control ───────────────────────┤        ├─ dac_control ── quad 12-bit threshold DAC
                                                │        ├─ temp_control ── thermistor converter (serial)
                                                └────────┴─ led_control ── red / green LED
  crystal, lock, external reset ── clock_generator ── clk, rst for everything
```

| Module | Job |
|---|---|
| `alibava_fpga` | Top level. It wires all blocks together and brings every board signal out as a plain port. |
| `cfsm` | Decodes host commands and runs the ten main states. It builds events and writes them to SDRAM, and streams them back to the host. |
| `beetle_fast_control` | Drives Beetle CLK, RESET, TRIGGER and TESTPULSE. It delays the chosen trigger source by the pipeline latency and enforces single readout. |
| `beetle_slow_control` | I2C master, 100 kHz, that writes one Beetle register per request. |
| `adc_control` | Stores the 128 channel samples of one frame per DATAVALID in a FIFO. |
| `sdram_control` | Initialises and refreshes the SDRAM. It serves single-word reads and writes. |
| `usb_control` | Byte interface to a USB-to-FIFO chip with RXF#, TXE#, RD# and WR. |
| `trigger_out` | 1 kHz laser trigger (TRIG OUT), the internal TRIG_L, and the 8-bit delay-line code. |
| `trigger_in` | Combines the discriminator outputs by a programmable scheme into TRIG and TRIG IN. |
| `tdc_control` | Drives the 100 ns TDC START. It makes TRIG_R from TRIG IN and reads the 32-bit result. |
| `dac_control` | Loads the four trigger thresholds into a parallel quad DAC. |
| `temp_control` | Reads a 16-bit temperature word over a 3-wire serial link. |
| `led_control` | Turns a 2-bit code into the red and green LED outputs. |
| `clock_generator` | Passes the 40 MHz clock through. It creates a synchronous reset from the external reset and the clock lock signal. |
| `sync_fifo` | First-word fall-through FIFO. It is used for the host byte links and the frame buffers. |
| `alibava_pkg` | Shared constants, host command codes, state and LED enums. |

The original system runs the CFSM as firmware on a soft processor. That
processor talks to the blocks through FIFO links and a register
arbiter. Here the CFSM is plain RTL with the same states. The FIFO links
remain only where data streams through them: the host bytes and the ADC
frames. The processor and the arbiter are not part of this design.

## Trigger timing: the hard part

A Beetle chip keeps each sample in its pipeline for 128 clocks. To read
the sample taken at the moment of interest, TRIGGER must rise exactly
128 clocks after that moment. `beetle_fast_control` handles this. While
the CFSM has armed one source (`src_sel`), a pulse from that source
loads a down-counter. TRIGGER then fires for one clock,
`LATENCY + sync_delay` clocks after the source pulse. `sync_delay` is a
host-programmed number of clocks. It covers cables and the laser path.

* **Laser:** `trigger_out` raises TRIG OUT and TRIG_L on the same
  clock, once every 40 000 clocks (1 kHz). TRIG OUT goes through an
  external delay line programmed in 1 ns steps (0–255 ns). The delay
  line moves the laser pulse within one 25 ns sampling clock, so
  repeated acquisitions scan the shape of the front-end pulse. The
  whole-clock part of the delay comes from `sync_delay`.
* **Radioactive source:** the discriminator outputs are combined in
  `trigger_in`. The scheme selects SIN1, SIN2, their coincidence, PPOS
  and PNEG. TRIG stays combinational so that it can stop the TDC with
  sub-clock precision. TRIG IN is synchronised to a one-clock pulse.
  `tdc_control` turns TRIG IN into TRIG_R on the next clock. It then
  reads the TDC, which has measured the time from the last 100 ns START
  edge to TRIG.
* **Calibration:** the CFSM's calibration strobe raises TESTPULSE and
  starts the latency count at the same clock.

**Single readout.** A frame lasts 16 header slots plus 128 channels,
which is 144 clocks or 3.6 µs. A source pulse is dropped, and reported
on `dropped`, if it arrives in either of two windows:

* while a TRIGGER is pending;
* within `HOLDOFF` = 200 clocks after a TRIGGER.

The CFSM also disarms the source as soon as a trigger is accepted, and
re-arms it only after the event has been written to SDRAM. At the top
level, extra triggers during an event are therefore never seen by the
fast control.

**Frame capture.** DATAVALID rises one clock before the frame and falls
two clocks before its end. `adc_control` starts on the rising edge and
skips the 16 header slots. It then stores exactly 128 samples, so it
does not depend on where DATAVALID falls. `ADC_LAT` adds clocks for an
ADC with conversion latency (0 by default). A sample that meets a full
FIFO is lost and flagged on `overflow`.

## Host protocol

The host link carries bytes. A command is one opcode byte followed by a
fixed number of argument bytes. Values of two bytes are sent most
significant byte first.

| Opcode | State entered | Arguments | Action |
|---|---|---|---|
| 0x01 | RESET | – | Pulse Beetle RESET and wait for the SDRAM to be ready. |
| 0x02 | BEETLE CONFIGURATION | I2C address, register, value | One I2C register write. |
| 0x03 | CALIBRATION | events (2 bytes) | Take test-pulse events. |
| 0x04 | TRIGGER IN CONFIGURATION | 4 thresholds (2 bytes each, 12 bits used), scheme | Load the DAC and the input scheme. |
| 0x05 | LASER SYNCHRONISATION | delay code (ns), sync delay (clocks) | Program the delay line and the fast control. |
| 0x06 | LASER ACQUISITION | events (2 bytes) | Run the laser and take events. |
| 0x07 | LASER READING | – | Send the last laser or calibration acquisition. |
| 0x08 | RS ACQUISITION | events (2 bytes) | Take source events. |
| 0x09 | RS READING | – | Send the last source acquisition. |

Every command is answered with `0xA5` and then a status byte:

* 0 – ok;
* 1 – no acquisition of that kind to read;
* 2 – the I2C device did not acknowledge;
* 0xEE – unknown opcode.

A read then sends a 2-byte event count, followed by every stored word
with the high byte first. Event counts above 64 776 are clamped to
64 776. After each command the CFSM returns to WAITING. The green LED
means waiting, red means busy, and both LEDs mean reset.

## Event format in SDRAM

Events are stored from address 0 upwards, one 16-bit word per address:

| Kind | Words |
|---|---|
| Laser or calibration, 257 words | temperature, chip 0 channels 0–127, chip 1 channels 0–127 |
| Radioactive source, 259 words | TDC[31:16], TDC[15:0], temperature, chip 0 channels 0–127, chip 1 channels 0–127 |

ADC samples are zero-extended to 16 bits. For a source event, the TDC
reports all ones if it never delivers a result. The largest source
acquisition takes 64 776 × 259 = 16 776 984 words, which fits in the
2²⁴ words of a 256 Mbit SDRAM.

## Interfaces of board chips (this design's choices)

The original system names most of the surrounding chips but not their buses.
These interfaces were chosen as common and simple options:

* **USB:** an FT245-style FIFO chip. RXF# and TXE# are synchronised with
  two flip-flops. RD# is held low for 3 clocks, WR high for 2 clocks,
  with a 4-clock gap. Received bytes have priority.
* **SDRAM:** 16 M × 16 bits, 4 banks, 8192 rows and 512 columns. The word
  address is split as `{row, bank, column}`. Initialisation is a 100 µs
  wait, then PRECHARGE ALL, two AUTO REFRESH and MODE REGISTER SET.
  Every access is ACTIVATE followed by READ or WRITE with
  auto-precharge. A write takes 4 clocks; read data arrives CL + 1
  clocks after the command. A refresh is issued every 312 clocks.
* **TDC:** the 32-bit result is read through a 16-bit port with a word
  address, an active-low read strobe and a ready flag.
* **Threshold DAC:** parallel quad DAC with channel address, CS#, WR# and
  LDAC#.
* **Temperature converter:** CS# low, then 16 bits read MSB first on the
  rising edge of a 1 MHz serial clock.
* **I2C:** the two Beetles are told apart by I2C address. SCL and SDA
  are open drain (`*_oe` drives the line low). There is no clock
  stretching.
* **Clock:** the crystal clock is used directly. The vendor clock
  primitive is outside this design; only its `locked` output is used.

## Departures from the original system

* The CFSM is hardware instead of firmware on an embedded processor.
  There is no processor and no arbiter. Only the host and ADC FIFOs
  remain of the processor's FIFO links.
* The bus widths printed for the original board connections are not
  reproduced. Each port here has the width its function needs.
* The event word order, the host protocol, the trigger-scheme encoding
  and the LED codes are choices of this design.
* Beetle registers can be written but not read back.
* The RESET command pulses Beetle RESET, stops every trigger and waits
  for the SDRAM. It keeps the thresholds, the delay settings and the
  last acquisition. Power-up and the external reset restart every block
  and forget the last acquisition.

## Testbenches

Each block has a self-checking testbench `tb/tb_<module>.sv` (the FIFO
testbench is `tb_sync_fifo`). Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Behavioural models
in `tb/` stand in for the board parts:

* `beetle_model` – timing of TRIGGER → DATAVALID and frame contents;
* `sdram_model` – command and timing checks;
* `usb_host_model`;
* `i2c_slave_model`;
* `spi_adc_model`;
* `tdc_model`.

* `tb_alibava_fpga` runs the whole design with shortened timing: a
  3000-clock laser period, a short SDRAM wait and a faster I2C clock. It
  goes through every command and checks every stored word of laser,
  calibration and source events against the Beetle, TDC and
  temperature models. It also checks that TRIGGER follows TRIG OUT by
  128 + sync clocks, and that single photomultiplier hits are rejected
  in coincidence mode. It counts every mechanism: laser shots, test
  pulses, TDC readings, I2C missing acknowledge, event clamp, wrong
  read, unknown opcode, SDRAM refresh, USB back-pressure and Beetle
  reset. A refused trigger (`trig_dropped`) and an ADC FIFO overflow
  (`adc_overflow`) cannot occur in the assembled design, because the
  CFSM disarms the trigger source for the whole event. These two are
  exercised in the unit testbenches of the fast control and ADC
  blocks.
* `tb_alibava_fpga_full` runs the same sequence on the top with every
  parameter at its default: a 1 kHz laser, 100 kHz I2C and a 100 µs
  SDRAM wait. It leaves out the event-limit test and takes a few
  seconds.

* `tb_cfsm_capacity` fills the memory with the largest source
  acquisition. It asks the state machine, at its default limit, for
  65 535 events, and checks the following:
  * exactly 64 776 events are stored;
  * the words are consecutive;
  * the last word lands at address 16 776 983;
  * the first and last events are correct;
  * the read-back header is correct.

  The blocks around the state machine are replaced by fast responders.
  The test takes about 10 s.

To simulate, for example, the full design:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/alibava_pkg.sv tb/tb_alibava_fpga.sv \
  --top-module tb_alibava_fpga -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test.

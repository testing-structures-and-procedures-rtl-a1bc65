# GTFE64 silicon-strip front-end chip and tracker plane readout

A silicon-strip tracker plane for a gamma-ray telescope has 1600 strips: five
ladders of 320 strips each. The strips are read by 25 identical 64-channel
front-end chips (GTFE64) that sit in a row on one hybrid board, with a
readout controller at each end. Each chip amplifies and discriminates its 64
strip signals. It raises a fast trigger, keeps up to eight acknowledged hit
patterns in a FIFO, and shifts a requested pattern out over a serial line.
The row works from either end: if a chip or a connection fails, the chips
on each side of the break can be told to talk to the controller on their
own side. Triggers and data are passed from chip to chip (daisy chains).
Commands are bussed to all chips.

This repository holds synthesizable SystemVerilog for the chip's digital
part and for a plane of 25 chips. It also holds a behavioural model of the
chip's analog front end and DACs, so that the whole signal path can be
simulated. The testbenches are self-checking. The chip-level testbench
follows the wafer-level acceptance test written for this chip, section by
section.

## The plane (`gtfe_plane`, top module)

```
 left controller                                              right controller
   cmd_l, tack_l, rdclk_l  ==== bussed to all chips ====  cmd_r, tack_r, rdclk_r
                 +--------+   +--------+          +---------+
 tlo_l, dlo  <-- | chip 0 |<->| chip 1 |<-> ... <->| chip 24 | --> tro_r, dro
 (left ends)     | addr 0 |   | addr 1 |          | addr 24 |     (right ends)
 tri_end,dri_end-> (far end input of the right-going chain)
                                    (far end input of the left-going chain) <- tli_end, dli_end
```

* Chip *i* gets address *i*. Address 31 (`11111`) is the broadcast address
  that every chip accepts, so a plane may have at most 31 chips.
* Right-going chains: chip *i*'s `tro_r`/`dro` feed chip *i+1*'s
  `tri_r`/`dri`. Left-going chains run the other way.
* Each chip drives only the chain of its current direction. The other
  output stays 0. So the plane can be split: chips 0..k work to the left
  and chips k+1..24 to the right.
* `creg_out` gives each chip's control-register output pin.
* `strip_amp[chip][channel]` is the amplified strip signal, given as an
  integer (see *Analog model*).

## Commands

Commands are sent one bit per clock on `cmd_l` or `cmd_r`, in this order:

| field   | bits | notes                                               |
|---------|------|-----------------------------------------------------|
| start   | 1    | always 1; the line is 0 when idle                   |
| address | 5    | least significant bit first; 31 = broadcast         |
| command | 3    | leftmost digit of the codes below first             |
| data    | 207  | only after `001`, straight after the last command bit |

| code | command                | effect                                                        |
|------|------------------------|---------------------------------------------------------------|
| 001  | load control register  | shifts 207 new bits in; **accepted from either line**         |
| 010  | read event             | oldest FIFO line goes to the output shift register; readout starts |
| 011  | calibration strobe     | calibration charge on calibration-masked channels             |
| 100  | clear event            | read pointer moves on one line, nothing is sent               |
| 101  | reset chip             | control register, FIFO and readout back to defaults           |
| 110  | reset FIFO             | both pointers to line 0; stored lines are kept                |
| 111  | end read event         | readout clock ignored from now on, data output 0              |

Only `001` is obeyed from the controller that the chip is not currently
working with. `001` is the command that sets the direction, so a chip can
always be won back. The decoder reports a command one clock after its
last bit, and the command takes effect at the clock edge after that.
Each chip has its own decoder for each of the two lines. A decoder also
reads past the 207 data bits of a load sent to another chip, so those bits
are never taken for a start bit.

## Control register map

The register is one 207-bit shift register. Bit *k* is the *k*-th data bit
sent. Each new bit pushes the oldest bit out on `creg_out`, so a second load
reads back the first.

| bits     | field              | meaning                                                  |
|----------|--------------------|----------------------------------------------------------|
| 1..64    | calibration mask   | bit 1 = channel 0; 1 = inject charge on strobe            |
| 65..128  | channel mask       | **reversed**: bit 65 = channel 63, bit 128 = channel 0; 1 = data enabled, 0 = always reads "no hit" (triggers still work) |
| 129..192 | trigger mask       | bit 129 = channel 0; 1 = channel may trigger              |
| 193..199 | calibration DAC    | range bit (x4), then 6-bit value, LSB first              |
| 200..206 | threshold DAC      | same layout                                              |
| 207      | direction          | 0 = left controller (default), 1 = right controller      |

After reset every bit is 0. The direction is then left, and every channel's
data and trigger are disabled. The settings are decoded from the live shift
register, so they change while a new string is being shifted in.

## Event path: trigger, FIFO and readout

The event path is the part that needs the most care.

**Trigger.** Each chip ORs 65 inputs: each discriminator output that its
trigger-mask bit lets through, plus the trigger from the previous chip in
the chain. The OR has no register, so a hit on the farthest chip reaches the
controller in the same cycle. A controller can use the length of the
trigger pulse (time over threshold) to tell noise from a particle. That
measurement belongs to the controller and is not modelled here.

**FIFO.** On the rising edge of the selected trigger acknowledge, the chip
writes one 65-bit line: bit 0 is "any hit", bits 1..64 are channels 0..63.
Each channel bit is discriminator AND channel mask. The "any hit" bit is the
OR of these masked bits. The FIFO holds eight lines. A ninth acknowledge
before any read is dropped. Read event and clear event move the read
pointer on. Reset FIFO puts both pointers on line 0 and erases nothing.
Neither read nor clear checks whether the FIFO holds anything. This is
deliberate: after a FIFO reset, two clear events and a read return the
third line written earlier, and the acceptance test relies on this.

**Readout and zero suppression.** Read event copies the line into a 65-bit
output shift register. Each clock with the readout clock (`rdclk_*`) high
moves the register one place. The chip sends its "any hit" bit, then
channels 0..63. Behind its own bits it feeds in the serial data from the
previous chip. If the line has no hit, the register acts as one bit: the
chip sends a single 0 and then passes the previous chips' data straight on.
So the controller sees, with no gaps:

```
nearest chip: 1,ch0..ch63  | next chip: 0 | next: 1,ch0..ch63 | ... | far-end input
```

The stream is one bit per readout clock and at most 25 x 65 = 1625 bits
long. End read event stops the shifting and forces the output to 0. A
controller can stop a readout early this way and leave its readout clock
running.

## Analog model (`gtfe_analog_fe`, `gtfe_dac`)

These two modules stand in for the analog circuits. They are written as
clocked integer logic so that simulators and synthesis tools accept them.
They are models, not circuit designs. All levels are integers in tenths of
the DAC's unit:

* calibration DAC: `6.2 + 6.0*value`, times 4 when the range bit is set;
* threshold DAC: `5.4 + 5.5*value`, times 4 when the range bit is set;
* a discriminator is on while `strip_amp + calibration pulse > threshold`,
  strictly greater;
* a calibration strobe adds the calibration level to every
  calibration-masked channel for `CAL_PULSE_LEN` = 20 clocks.

For example, calibration value 14 with range and threshold value 13 with
range give 360.8 against 307.6, so every strobed channel hits.

## Module map

| file                     | content                                              |
|--------------------------|------------------------------------------------------|
| `rtl/gtfe_pkg.sv`        | sizes, field positions, command enum, settings struct |
| `rtl/gtfe_cmd_decoder.sv`| one serial command decoder                           |
| `rtl/gtfe_ctrl_reg.sv`   | 207-bit control register and field decode            |
| `rtl/gtfe_dac.sv`        | DAC model                                            |
| `rtl/gtfe_analog_fe.sv`  | amplifier/discriminator/charge-injection model       |
| `rtl/gtfe_trigger.sv`    | masked fast-OR and direction routing                 |
| `rtl/gtfe_event_fifo.sv` | 8 x 65 event FIFO                                    |
| `rtl/gtfe_readout_sr.sv` | output shift register with zero suppression          |
| `rtl/gtfe64.sv`          | the chip                                             |
| `rtl/gtfe_plane.sv`      | 25-chip plane (top)                                  |

Synthesized, one chip is about 860 flip-flops. Most of them are the control
register (207) and the FIFO (520). The FIFO is cleared by reset, so it is
built from flip-flops rather than a memory macro.

## Simulating

Each testbench is in `tb/` and prints `TB_RESULT checks=N failures=M`. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/gtfe_pkg.sv tb/tb_gtfe_plane.sv \
          -y rtl +libext+.sv --top-module tb_gtfe_plane
./obj_dir/Vtb_gtfe_plane
```

* `tb_gtfe_plane` runs the full 25-chip plane at default parameters, from
  the right and then from the left. It covers:
  - a loaded control register in every chip;
  - strip-signal and calibration events;
  - the trigger reaching the chain end from the farthest chip;
  - full-chain reads with zero-suppressed chips;
  - a stopped read, a FIFO reset and a clear event;
  - a full FIFO and its wrap-around;
  - a split plane, with chips 0..11 read by the left controller and chips
    12..24 by the right one.

  It counts each of these mechanisms and fails if one never happened.
* `tb_gtfe64` repeats the single-chip acceptance test in both directions:
  - control-register read-back and reset;
  - calibration, channel and trigger masks, every third channel, three
    offsets;
  - DAC high and low;
  - a stopped read and the FIFO sequence;
  - trigger chain input to output;
  - addresses 0, 1, 2, 4, 8, 16 and broadcast;
  - a command from the wrong controller being ignored.
* One testbench for each remaining module compares it against an
  independent model.

All runs take a few seconds. Only the build of the plane testbench takes
about a minute.

## Choices where the chip's behaviour was not specified

* There is one clock domain. The readout clocks `rdclk_l/r` are clock
  enables. The trigger acknowledge acts on its rising edge.
* The three command bits are sent leftmost digit first. Data follows the
  command with no gap.
* All control-register defaults are 0. Only the direction default (left) is
  specified.
* The reset pad does the same as the reset-chip command, and both also
  clear the FIFO lines.
* Reads and clears do not check for an empty FIFO (see above).
* A write into a full FIFO is dropped.
* In a stopped read, the first bit sent is the "any hit" bit. So 30 readout
  clocks give the flag and channels 0..28.
* Pin names: on the right side the chip's pads are TACKR, CLKR, DRI, TRI and
  TRO. Here they are `tack_r`, `rdclk_r`, `dri`, `tri_r` and `tro_r`. The
  left-side pins mirror them. Data read by the right controller leaves on
  the right-going data chain.
* The differential (LVDS) I/O pads are not modelled; all signals are
  single-ended.
* The analog model has no amplifier shaping and no noise. Its
  calibration-pulse length is a free choice.

## Not included

* The readout controllers, including their time-over-threshold
  measurement. Their signals are the plane's ports, and the testbenches
  play their part.
* Power supply behaviour and the analog circuits themselves. The analog
  model above only reproduces their logic-level effect.

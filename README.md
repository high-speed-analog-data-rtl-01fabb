# High-speed analog data port for a PDP-9

A pulsed analog signal (beam charge or beam position from an accelerator
sector) is sampled every 8 µs by an existing control-room multiplexer. This
port digitises each sample to 8 bits and stores it straight into PDP-9 memory
over the data channel (DMA), so the running program is only interrupted once
a whole block of up to 108 samples is in memory. The multiplexer scans three
groups of 36 channels after every beam pulse; the 108 samples of one beam pulse
fit in one 2.7 ms interpulse period at 360 pulses per second.

The RTL has two parts. The digital part is synthesisable: the sample
sequencer, a fast Gray-to-binary converter, the data buffer, and the
data-channel interface registers. The analog front end (amplifier and ADC)
is written as behavioural models, so the whole port can be simulated end to
end.

## Signal path

```
analog_in ─► fast_pulse_amp ─► adc_br850 ─► gray2bin ─► data_buffer ─► dma.data
 (-5..+5 V)   vout=2.5+vin/2    8-bit Gray    binary      + Device flag ─► dma.req
                 (≤500 ns)        (1 µs)       (≤1 µs)
                         ▲ adc_start / adc_ready      ▲ buf_load
sample_strobe ─► digitizer_ctrl ───────────────────────┘
```

`digitizer_ctrl` runs one sequence per strobe, but only while a transfer is
enabled:

| step | waits for | default |
|------|-----------|---------|
| amplifier settle | `AMP_SETTLE_CYC` clocks | 5 (500 ns) |
| ADC conversion | `adc_ready` low, then high (synchronised) | about 1 µs |
| Gray tree settle | `GRAY_SETTLE_CYC` clocks | 10 (1 µs) |
| buffer load | one clock | |

At 10 MHz a sample reaches the buffer 30 clocks (3 µs) after its strobe. The
budget is 5 µs out of each 8 µs period. A strobe that arrives while a sequence
is still running is ignored. The 10 MHz clock is a choice made for this RTL:
the timing requirements are stated in µs, and the settle counts must be
rescaled if the clock changes.

## The three-level Gray converter

The ADC delivers Gray code. The textbook conversion, b(i) = g(i) ⊕ b(i−1),
is a chain of seven gates, so the last bit settles only after seven gate
delays (about 2.5 µs with the original gate modules). `gray2bin` regroups the
XORs so that no input is more than three gates from any output. Digit 0 is
the most significant: `gray[7]` is g0 and `bin[7]` is b0.

```
level 1:  1 = g0⊕g1     A = g2⊕g3     B = g4⊕g5     C = g6⊕g7
level 2:  2 = 1⊕g2      3 = 1⊕A       D = B⊕C       E = B⊕g6
level 3:  4 = 3⊕g4      5 = 3⊕B       6 = 3⊕E       7 = 3⊕D
b0 = g0, b1..b7 = outputs of gates 1..7
```

There are twelve gates, four on each level. The original was built from
coincidence (XNOR) gates. With XNOR gates and the same wiring, gates 1, 3, 5
and 7 come out inverted, while all other nodes come out true or cancel in
pairs. So only the odd outputs need an inverter. `COINCIDENCE=1` (the
default) builds this XNOR version, and `COINCIDENCE=0` builds the same tree
from XOR gates. The two are checked against each other and against the
definition of Gray code, for all 256 codes.

## Data-channel interface

The port sits on the second-priority port of a DM09A data-channel
multiplexer. A disk holds the first-priority port.

* **MAC** (`mac_reg`, 15 bits) holds the memory address of the next word.
  The program loads it before the transfer. It advances by one on every
  `dma_ack`.
* **W.C.** (`word_counter`, 15 bits) is loaded with minus the number of
  words. Loading it enables the transfer. It advances on every `dma_ack`,
  and the step from all ones to zero is the overflow.
* **WCOF / Done** (`status_flags`): overflow sets WCOF, which sets Done and
  disables the transfer. Done is the program interrupt request, and the bit
  that IORS reports.
* **Device flag** (`data_buffer`): set when a word is loaded, cleared by
  `dma_ack`. It is the data-channel request. `dma.addr` is the MAC and
  `dma.data` is the word, right-justified in 18 bits.

### IOT instructions (`iot_decoder`)

The I/O bus encoding is this design's own. It follows the usual PDP-9
pattern of device code, sub-device and IOP pulses:

| sub-device | pulse | action |
|-----------:|-------|--------|
| 0 | IOP1 | skip if Done |
| 0 | IOP2 | clear WCOF and Done |
| 0 | IOP4 | MAC ← AC bits 3–17 |
| 1 | IOP4 | W.C. ← AC bits 3–17, enable transfer |
| — | IORS | Done on status bit `IORS_BIT` (6) |

The device code is `DEVICE_CODE` = 55 (octal).

### A block transfer, from the program's side

1. Wait until just after the pulse of the beam you want (there are up to six
   interleaved beams). Picking the beam is done in software.
2. Load the MAC with the first address, then load the W.C. with −N.
3. The port stores one word per multiplexer strobe. The interrupt comes
   after the N-th word.
4. IORS, or the skip IOT, identifies the port. Then clear the flags.

## Files

| file | what it is |
|------|------------|
| `rtl/hsadp_pkg.sv` | widths, `io_bus_t`, `dma_req_t`, sub-device codes |
| `rtl/hsadp_top.sv` | the port: amplifier and ADC models plus `hsadp_core` |
| `rtl/hsadp_core.sv` | all synthesisable logic of the port |
| `rtl/gray2bin.sv` | three-level Gray-to-binary converter |
| `rtl/digitizer_ctrl.sv` | sample sequencer |
| `rtl/data_buffer.sv` | data buffer and Device flag |
| `rtl/mac_reg.sv`, `rtl/word_counter.sv` | MAC and W.C. |
| `rtl/status_flags.sv` | transfer enable, WCOF, Done, interrupt |
| `rtl/iot_decoder.sv` | I/O bus decoding, skip, IORS bit |
| `rtl/fast_pulse_amp.sv`, `rtl/adc_br850.sv` | behavioural analog models (not synthesisable) |
| `tb/tb_*.sv` | one self-checking bench per module |
| `tb/ccr_mux_model.sv`, `tb/dm09a_model.sv` | models of the multiplexer and of the DM09A with memory and disk traffic |

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and has a watchdog. For
example, to run the whole port:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/hsadp_pkg.sv tb/tb_hsadp_top.sv --top-module tb_hsadp_top
./obj_dir/Vtb_hsadp_top
```

Other benches are run the same way; replace the testbench name. The
simulator is two-state, so every register has a reset. To lint only the
synthesisable part, run `verilator --lint-only -Wall -Irtl -y rtl
rtl/hsadp_pkg.sv rtl/hsadp_core.sv`.

`tb_hsadp_top` runs at the default parameters. It makes three complete block
transfers: 108 words from beam 2, 40 from beam 5 and 108 from beam 0. The
disk makes random requests during the transfers. The bench checks:

* every stored word against the value predicted from its channel voltage
  (within 1 % of full scale);
* the address range that was written;
* the MAC and W.C. end values;
* the interrupt, IORS, skip and clear;
* that each word reaches memory before the next strobe arrives, 8 µs
  later, even when the disk holds the channel;
* that the 108-word block finishes inside the interpulse period (it takes
  2144 µs after the pulse).

It also fails if a mechanism was never exercised: conversions, transfers,
stalls behind the disk, strobes ignored while idle, overflows, IORS reads,
skips taken and not taken, and flag clears. The simulation takes well under
a second.

## How far to trust it, and what was chosen here

These parts follow the original description:

* the gate structure of the Gray converter;
* the widths of MAC, W.C. and data;
* the negative word-count preload and the WCOF → Done → interrupt chain;
* the Device flag as the transfer request;
* the amplifier's gain and offset;
* the ADC's range, resolution and conversion time;
* the timing figures (500 ns, 1 µs, 5 µs, 8 µs);
* the scan schedule of the multiplexer model.

These are this design's own choices:

* **Clock and handshakes:** the 10 MHz clock; one-clock strobe, start,
  load and acknowledge pulses; the ADC's start/ready handshake and the
  synchroniser on ready.
* **I/O bus:** the device code, the IOT table and the IORS bit position.
* **Flags and data word:** which event wins when a load and an acknowledge
  come in the same clock; how the flags are cleared; the placement of the
  8-bit word in the 18-bit memory word.
* **Analog models:** the amplifier is modelled as non-inverting and clips
  at 0 and 5 V; the ADC quantises as floor(v·256/5).

Nothing in the design detects a lost sample. If the disk held the channel
for longer than one 8 µs period, the next sample would overwrite the
buffered word. In the disk model used here, bursts are at most four memory
cycles.

Not designed here and only modelled in the benches: the multiplexer, the
DM09A, the PDP-9 and its memory, and the disk. The level shifter between the
ADC and the logic has no logic function and is part of the ADC model's
output.

A note on the multiplexer's scan schedule: the scan window of each group is
given as 320 µs. 36 channels at 8 µs take 288 µs, and the model uses 288 µs.

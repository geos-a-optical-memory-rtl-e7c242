# GEOS-A optical memory and control unit in SystemVerilog

A satellite's optical beacon has to fire flash tubes at exact UT2 minutes,
hours or days after the ground last spoke to it. This unit does that with a
delayed-command memory that is read once a minute. It holds 1365 bits in a
coincident-current core plane. Up to 59 words each store a start time, a
tube set and a sequence length. On every one-minute scan the whole memory is
read serially, processed bit by bit and written back. Each start-time field
counts up by one per scan, and a field that overflows fires its sequence at
the next minute mark. The same scan paces the timing: a crystal divider
chain makes the memory bit clock. A time normalizer deletes single
prescaler pulses, as directed by bits stored in the memory, so that the
satellite's minute stays within tens of microseconds of UT2 even though the
oscillator is about 50 ppm slow.

This RTL models the digital logic of the unit: divider chain, normalizer,
core scan and addressing, the per-bit processing, injection mode control,
flash control and monitor, minute marker burst and telemetry encoder. The
analog parts (oscillator, core drivers and sense amplifier, output buffers)
are outside it, and so are the command decoder and the optical sequence
controller. Its ports stand where those parts connect.

## Memory map and the one-minute scan

The plane is 65 X lines by 21 Y lines, treated as 65 words of 21 bits.
Serial bit `k` (0 = word 1 bit 1) lies on X line `k mod 65` and Y line
`k mod 21`. Because 65 and 21 are mutually prime, a diagonal scan visits
every core once in 1365 steps. The Y line is therefore the bit number, and a
given word/bit position is recognised where one X line and one Y line
coincide (`geos_pkg::at_wb`). Each axis is driven by a coincidence switch,
which is itself stepped by two ring counters of mutually prime length
(5 x 13 and 3 x 7). `cs_address` keeps the four rings as one-hot registers
and turns them back into line numbers by the Chinese remainder rule.

| words | content | per-scan processing |
|---|---|---|
| 1-59 | bits 1-12: start time, two's complement (4096 - T); bits 13-16: tubes 1-4; bit 17: 1 = seven flashes, 0 = five; bits 18-21: normalizer delete bits | bits 1-12 + 1; a carry out of bit 12 fires a sequence; a one in bits 18-21 deletes a pulse |
| 60 | normalizer vernier: odd bits 1-19 a counter, even bits 2-20 a fixed reference fraction (bit 2 = 1/2) | odd bits + 1; carry meeting a one reference bit deletes a pulse |
| 61 | flash count (9 bits used, bit 1 LSB) | + flashes counted during the last minute |
| 62-65 | unused | unchanged |

A word loaded with start value `4096 - T` overflows in the T-th scan after
the load scan. Its sequence then starts on the minute mark that follows, T
minutes after the load scan ended.

## Clock chain

Everything runs on one clock, the shaped oscillator (5 MHz - 50 ppm),
with clock enables:

```
clk --> 49:1 prescaler --> clock_control --> 4485:1 bit clock --> 91:1 --> 4 s clock
        (sr_divider)      (delete / stop)    5 x 23 x 39           7 x 13
          102.04 kHz         normalized        22.75 bit/s           15/min
```

All dividers are shift registers with feedback (`sr_divider`, a twisted-ring
counter; for odd lengths the NOR of the last two stages is fed back, which
skips one state). Several registers of mutually prime length, clocked in
parallel and decoded together, divide by the product of their lengths.
Inside one bit time (4485 normalized pulses of 9.8 us = 43.956 ms)
`bit_clock_divider` decodes:

| strobe | offset (pulses) | use |
|---|---|---|
| phi1 | 0 | read the addressed core into the sense latch; address gates act |
| restore | 20 (~196 us) | write the processed bit back; serial state updates; address steps |
| phi2 | 3082 (30.207 ms) | ends the RZ telemetry pulse |

3082 is a multiple of 23, so phi1 and phi2 differ only in the states of the
5- and 39-stage registers. The state of the 39-stage register that phi2 uses
comes round every 39 pulses, and `marker_burst` divides it by 7 and toggles
a flip-flop: 186.88 Hz. The 4 second clock is phi1 divided by 91, and its
first pulse of each minute falls on word 1 bit 1.

## Per-bit processing (`data_handling`)

A serial full adder with a one-bit carry store does all the arithmetic.
Three gate flip-flops, set and reset by address gates at phi1, choose its
inputs. All computation is done at the restore strobe.

* **FF1**, word 1 bit 1 to word 60 bit 1: in bits 1-12, memory data goes
  into X and a one into Y at bit 1. The carry is cleared at bit 1 and held
  after bit 12 for the rest of the word. That held carry is what starts a
  flash sequence.
* **FF2**, word 60 bit 2 to word 61 bit 1: toggle FF3 splits word 60 into
  odd bits, which go through the adder with the carry rippling across the
  even bits, and even bits, which are restored unchanged.
* **flash count gate**, word 61: memory data into X, the flash accumulator
  shifted out LSB first into Y.

During the load scan the restore data is the uplink data instead.

## Time normalizer and vernier

One minute at the nominal frequency is 60 f / 49 prescaler pulses. The
divider chain counts 1365 x 4485 of them per scan. So every scan needs
`N = 60 f / 49 - 6122025` extra pulses thrown away. Each delete command
arms `clock_control`, which swallows the next prescaler pulse. That
stretches every later timing signal by 9.8 us.

* **Constant part.** The integer part of N is stored as ones spread over
  the 236 bits 18-21 of words 1-59. One delete is issued per one bit read.
  236 deletions per scan cover 38.5 ppm.
* **Fractional part.** The even bits of word 60 hold the fraction in binary
  (bit 2 = 1/2, bit 4 = 1/4, ...). The odd bits count scans. Going from
  count k-1 to k, counter bit j carries out exactly when k is a multiple of
  2^(j+1). A delete is issued when that carry meets a one reference bit
  2j+2. Over many scans the average is the reference fraction: a binary
  rate multiplier.

For f = 4,999,750 Hz, N = 117.857. That gives 117 constant ones and a
reference of 1101101101. The vernier then deletes 0, 1, 0, 2, 0, 1, 0, 2, ...
pulses in scans 1, 2, 3, ... after the load. The end-to-end test checks
every scan period against `1365 x 4485 + Nc + Nv(k)` prescaler
periods.

## Injection sequence and epoch reset (`mode_control`, `epoch_reset`)

A load command sets the one-hot mode register to preload 1 (1000). Each read
of word 1 bit 1 shifts it right: preload 2 (0100), load (0010), post-load
(0001), normal (0000). Because the shift happens at the read, the load scan
replaces all 1365 bits starting at word 1 bit 1. While the register is non-zero,
the memory data line goes out as bipolar return-to-zero telemetry
(`data_encoder`). There is a positive or negative pulse from phi1 to phi2 of
each bit. The ground can compare the preload readout with its prediction and
the post-load readout with what it sent.

To move the minute epoch, the ground holds a data one tone during preload
1. The tone is sampled only during the 9.8 us pulses of the 4 second clock.
When it is seen, the clock stops: the prescaler pulses are blocked, all
dividers are reset and the address is held at word 1 bit 1. This lasts until
the tone is released, and the scan then restarts exactly on word 1 bit 1.
Deletions are ignored during the preload and load scans of such a
time-change injection, so the preload 2 scan after a reset lasts exactly
1365 x 4485 prescaler periods.

## Flash control and monitor (`flash_control`, `flash_counter`)

A sequence starts when a word's carry is held after bit 12, no sequence is
running, the flash disable is clear and no preload 1 readout is in progress.
Bits 13-16 load the tube buffer, and bit 17 sets the seven- or five-flash
flip-flop. At word 61 bit 3 the sequence gate opens. The sequence controller
ignores the first 4 second pulse inside the gate (the one 4 s before the
minute) and flashes on the minute mark and every 4 s after that. The gate
and buffer clear at word 18 bit 8 (16 s, five flashes) or word 27 bit 1
(24 s, seven flashes) of the next scan. Word 1 must be the last sequence of
a load. Its carry at bit 18 sets the flash disable, which blocks all further
sequences until the next post-load readout. The flash sensors' pulses are
counted in a 4-bit accumulator, and the count is added into word 61 once a
minute.

Two usage rules follow from this timing and are not enforced by the logic.
A sequence that follows another one minute later must come from words
32-59. Word 1 must be used last.

## Minute marker

`marker_burst` gates the 186.88 Hz square wave from word 65 bit 14 to word 1
bit 2. It drops the first divider pulse after word 1 bit 1, which gives a
180 degree phase reversal 1.5 ms after the internal minute mark. That makes
65.5 cycles before the reversal and 7.5 after it.

## Top-level interface (`geos_omcu`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 5 MHz - 50 ppm oscillator clock; asynchronous power-on reset |
| `load_cmd` | in | decoded load command, one-clock strobe |
| `uplink_tone` | in | data one tone level (epoch reset in preload 1) |
| `uplink_data` | in | decoded injection data; sampled at the restore of each bit of the load scan; bit 1 is the bit that starts with `minute_mark` |
| `flash_sense` | in | flash sensor pulse, asynchronous, at least two clocks |
| `tube_sel[3:0]` | out | tube select gates, tube 1 = bit 0 |
| `seq_gate`, `clk15` | out | sequence gate and 4 s clock (9.8 us level) for the sequence controller |
| `marker_gate`, `marker_wave` | out | marker burst and its square wave |
| `tm_enable`, `tm_pos`, `tm_neg` | out | bipolar RZ readout |
| `bit_clk1`, `bit_clk2` | out | phi1 and phi2 levels, 9.8 us wide |
| `minute_mark` | out | phi1 level at word 1 bit 1 |
| `mode[3:0]`, `clock_held` | out | mode register; epoch reset in force |

The parameter `PRESCALE` (default 49) sets the prescaler. Lowering it speeds
up simulation and changes nothing else. The divider lengths, phase offsets
and restore delay are parameters of `bit_clock_divider` and
`ppm15_divider`, with the values above as defaults.

## Files

`rtl/geos_pkg.sv` holds the sizes, the address type and gate function, the
mode encoding and the shift-register state functions. Each block has its
own file in `rtl/`, and each has a self-checking testbench `tb/tb_<block>.sv`.
`tb/tb_geos_omcu.sv` runs two injection sequences end to end with
`PRESCALE = 2`: an epoch reset, a load, seven normal scans with five- and
seven-flash sequences and a blocked start, and a second injection whose
readout shows the advanced memory. It checks the period of every scan and
takes about two minutes. `tb/tb_geos_omcu_full.sv` runs one complete
one-minute scan at the default sizes, about 300 million clocks and four
minutes. It starts from whatever the core plane holds and checks every
restored bit against its own model of the word processing. It also checks
the scan period including the normalizer deletions, the 4 second clock and
the marker burst. A whole injection at the default sizes would take more than
three such scans, so the injection sequence is tested with the smaller
prescaler only. Every other part of it runs at its full size there.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_geos_omcu -y rtl -y tb +libext+.sv rtl/geos_pkg.sv tb/tb_geos_omcu.sv
./obj_dir/Vtb_geos_omcu
```

Each testbench ends with `TB_RESULT checks=N failures=M`.

## Choices this design makes where the description is silent

* A single clock with enables replaces the original two-phase pulse logic.
  The restore is decoded 20 prescaler periods after phi1 (about 200 us,
  as described).
* The shift-register feedback form, the reset states and the decoded states
  are chosen here. They are chosen so that a stopped clock restarts on phi1
  at word 1 bit 1 with a 4 second pulse.
* The telemetry RZ pulse runs from phi1 to phi2. The flip-flop that times it
  is only named in the description.
* The sequence gate opens at word 61 bit 3, the position given. The
  description also quotes 4.835 s before the minute for it, which would be
  word 60 bit 17 (word 61 bit 3 is 4.53 s). The end gates need the sequence
  gate to be open, so a sequence started early in a scan is not cleared in
  that same scan. Flash-control actions happen at the restore strobe, so the
  last 4 s pulse of a sequence falls inside the gate.
* Bits 13-16 go into the tube buffer as stored, and a one selects a tube.
  The description calls them tube "complement" data but also says a one in
  the buffer selects its tube. It is read here as no inversion.
* The flash accumulator is copied to a shift register at word 61 bit 1 and
  restarts at once, so a flash during the shift-out counts in the next
  minute.
* The flash count adder runs over all 21 bits of word 61, and the vernier
  counter includes odd bit 21. Both are described as unused beyond bits 9
  and 20 respectively.
* The marker burst gives 65.5 square-wave cycles before the phase reversal
  and 7.5 after it, from the gate positions and the deleted divider pulse.
  The description rounds these to 66 and 8.
* A load command during an injection restarts it at preload 1.
* The core array's read is not destructive. A bit whose restore is lost
  when the clock stops keeps its value, where real core would lose it. The
  epoch reset can only happen during preload 1, before the memory is
  reloaded.

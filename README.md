# Fault detector for a two-section thyristor power supply

This RTL is the digital core of a fault detector for a Transrex-type power
supply with two rectifier sections. The detector watches the supply's
current transformers, its voltages and its discrete status contacts. It
decides within a fraction of a millisecond whether the supply must be
stopped, and it signals that decision on fault lines that are themselves
checked continuously. It also keeps a time-stamped log of every status change
and a 15 s multichannel waveform record for analysis after a fault.

The design is split the way the hardware is: one FPGA per rectifier section
(A and B) and one FPGA for the common section. The three FPGAs sit on a
shared host bus that a small embedded computer uses to configure them and
read them out.

```
              ┌──────────── section_fpga (A) ────────────┐
 32 ADC ch ──►│ decimator ► gain_offset ► section_fault_logic ► fault_output_driver ├─► 6 fault lines + clock
 discretes ──►│              ▲ settings_regs (CRC)     │ cos_fifo │ waveform_recorder ► sample_memory 4M×16 │
              └──────────────────────────────────────────┘
              section_fpga (B): identical
              ┌──────────── common_fpga ────────────────┐
  8 ADC ch ──►│ decimator ► gain_offset ► waveform_recorder ► sample_memory      │
 A/B lines ──►│ toggle_watchdog ×2 ► fault_output_driver ├─► 2 fault lines + clock
              └──────────────────────────────────────────┘
 host bus ──► all three (bus_addr[13:12] = 0 A, 1 B, 2 common)
```

## Signal chain and rates

Each section measures 32 analog signals: 18 power-module ACCTs (6 modules ×
3 phases), 12 bypass-leg DCCTs, the section input current Id and the bridge
output voltage Vd. A 14-bit ADC with simultaneous sample-and-hold converts
all of them at once. The FPGA starts a conversion at 128 kHz (`adc_convert`)
and takes the 32 words when the converter returns `adc_valid`.

* **decimator** adds 16 consecutive samples of every channel (a boxcar
  filter) and gives one 16-bit value per channel at 8 kHz. The 16-bit value
  is the 18-bit sum shifted right by 2.
* **gain_offset** converts to engineering units:
  `y = sat16(((x − offset) × gain) >>> 8)`. The gain is signed Q8.8, so 256
  means 1.0. The scale is 1 A or 1 V per LSB, and every trip level is in the
  same units.
* **section_fault_logic** evaluates the fault table on these values, every
  clock.

The 8 kHz output rate is where the numbers meet. 4,194,304 memory words
divided by (32 + 2) channels and 8,000 frames per second gives 15.4 s of
recording. 8 kHz is also twice the 4 kHz corner of the analog anti-alias
filter.

## The fault table (section_fault_logic)

This is the heart of the design. There are 24 conditions in four levels.
Each condition is one bit of `fd_pkg::faults_t`. The table gives bit
positions in the live fault word (registers 0x083/0x084) and the latched word
(0x081/0x082).

| bit | row | condition as implemented | setting |
|---|---|---|---|
| 0 | 0A module imbalance | \|ACCT_A + ACCT_B + ACCT_C\| of any module > trip | 0–3380 A |
| 1 | 0B bypass imbalance | max(DCCT) − min(DCCT) > trip | 0–6670 A |
| 2 | 0C bypass leg not conducting | any DCCT < 465 A, bypass not blocked, Vd < 0 | fixed 465 A |
| 3–6 | 0D–0G | firing generator not ready, MGD not OK, flow switch open, any PT undervoltage relay | – |
| 7 | 1A module overcurrent | any \|ACCT\| > trip | 0–6570 A |
| 8 | 1B section overcurrent | Id > trip | 2500–27500 A |
| 9 | 1C bypass fail to block | any DCCT > trip and no bypass command | 0–1000 A |
| 10 | 1D water loss with permissive | flow lost longer than trip, permissive on | 0–10000 ms |
| 11, 12 | 1E, 1F | breaker advance trip, overvoltage-suppressor fuse | – |
| 13 | 1G overtime | Id above 100 A for longer than trip | 0–18000 ms |
| 14 | 1H loss of AC | PT undervoltage and no advance trip | – |
| 15 | 1I | external Level 1 input | – |
| 16 | 1J permissive sequence | permissive and unit not ready | – |
| 17 | 1K DC power | a measured supply (+24, +15, −15, +5 V) more than the tolerance from nominal, or a supply-OK input low | 5–10 % |
| 18 | 1O command link | link not ready and permissive | – |
| 19 | 1P permissive loss | permissive off and convert on | – |
| 20 | 2A failure to suppress | suppression on for 8333 µs and any \|ACCT\| > trip | 0–1000 A |
| 21 | 3A bypass overcurrent | any DCCT > trip | 0–6670 A |
| 22 | 3B all bypass fail to conduct | bypass not blocked, every \|DCCT\| < 50 A, Vd < −trip | 0–500 V |
| 23 | 3C | external Level 3 input | – |

Level 0 rows are alarms only. They are not latched and they drive no line.
Level 1–3 rows latch. A latched bit clears only on a fault reset (the Reset
input or a host write), and only if its condition has gone by then. The
latched levels drive the actions:

| action (fault line index) | driven by |
|---|---|
| 0 Level 1 out | any Level 1 |
| 1 Level 3 out | any Level 3 |
| 2 suppress power modules | Level 1 or 3 |
| 3 fire bypass modules | Level 1 or 3 |
| 4 open AC feeder breaker | Level 2 |
| 5 close DC ground switch | Level 3 |

Row 2A uses its own timer, which starts when the suppress action rises. A
module still carrying current half a mains cycle later escalates to Level 2.
The 8333 µs value assumes 60 Hz mains.

The unit is "not ready" until a complete CRC pass has matched the stored
configuration CRC, and again whenever a pass fails. Together with the
permissive, that gives row 1J.

The discrete inputs go through a two-flop synchroniser, and their flops reset
to 0. Right after power-up the supply-OK inputs therefore read 0 for two
clocks, so row 1K latches. **A newly started unit needs one fault reset**
before its lines are healthy. That is deliberate, fail-safe behaviour.

## Fault lines that prove they are alive

`fault_output_driver` toggles a clock line every millisecond. Each fault
line carries *clock XOR fault*:

* while healthy, every line toggles in step with the clock;
* a fault is the XOR of a line with its clock;
* a line stuck high or low, a dead clock or a dead FPGA all show up as
  missing edges.

In the common FPGA, one `toggle_watchdog` per section decodes the six lines
of that section. It also times the edges of each line in microseconds. A
line without an edge for longer than the timeout (reset value 2500 µs,
settable from 1100 to 2500 µs) sets its stuck bit. The common FPGA's own two
lines carry:

* [0]: any watchdog fault;
* [1]: any Level 1 or Level 3 fault decoded from either section.

## Protected settings (settings_regs)

Gains, offsets and trip levels are one block of words. The last word is the
CRC that the host computes over them: CRC-16-CCITT, polynomial 0x1021,
initial value 0xFFFF, words in address order, MSB first.

* Writes are accepted only while the `unlock` input (the key switch) is high.
* A trip value outside its fixed range is clamped to the bound.
* The eleventh trip word (index 10, `T_1K_TOL`) is not a trip level. It is
  the 1K supply tolerance in percent, bounded to 5–10.
* Every millisecond the FPGA walks the block, one word per clock, and
  compares the result with the stored CRC. A mismatch sets `crc_error`, and
  the unit then reports not ready.
* After reset the stored CRC is 0. A unit is therefore never ready until the
  host has loaded a configuration with its CRC.

## Change-of-state log (cos_fifo)

Whenever any bit of a 40-bit status word changes, the FPGA stores
{status, 24-bit µs time stamp} in a 64-entry FIFO. The time stamp wraps
every 16.8 s.

* Section status word: 24 live fault bits, internal Level 1 (bit 24),
  internal Level 3 (bit 25), then permissive, external L1, external L3,
  reset, command link, convert, bypass command, breaker advance trip, the two
  PT relays, firing generator ready, flow OK, MGD OK and bypass block (bit 39).
* Common status word: the 32 `status_c` inputs, the two section watchdog
  faults, the decoded Level 1 and Level 3 of each section, the watchdog fault
  and the CRC error.

A full FIFO drops new changes and sets a sticky overflow flag. The flag
clears on a write of bit 1 to 0x085.

## Waveform recording

The host arms a recorder (0x090 bit 0). The next `rec_trigger` pulse, the
start event from the facility timing system, starts it. The recorder then
writes each 8 kHz frame to consecutive words of its memory, channel 0 first.
A section frame is 34 words: the 32 corrected channels plus two auxiliary
channels. The recorder stops by itself when another whole frame would not
fit: 123,361 frames (15.4 s) per section, 524,288 frames (65.5 s) for the
8-channel common section. A write of 0x090 bit 1 stops it early.

Each auxiliary channel is chosen in 0x088: latched faults, live faults, the
µs time stamp, or the uncorrected Id.

## Host register maps

Each FPGA has a 12-bit word address. Reads return data one clock after
`bus_rd`.

| address | section FPGA | common FPGA |
|---|---|---|
| 0x000– | gain[32], offset[32], trip[11], CRC | gain[8], offset[8], watchdog timeout, CRC |
| 0x080 | status {rec_done, rec_recording, rec_armed, fifo_ovf, alarm0, L3, L2, L1, not_ready, crc_error, unlock} | status {rec_done, rec_recording, rec_armed, fifo_ovf, wd_fault, not_ready, crc_error, unlock} |
| 0x081/0x082 | latched faults [15:0] / [23:16] | stuck bits of A / B (bit 6 = clock) |
| 0x083/0x084 | live faults | 0x083: decoded lines {B, A} |
| 0x085 W | bit0 fault reset, bit1 clear FIFO overflow | bit1 clear FIFO overflow |
| 0x088 | aux select (2 bits per aux channel) | – |
| 0x089/0x08A | DCCT source enables (RW) / status (R) | – |
| 0x090 W | bit0 arm, bit1 stop | same |
| 0x091/0x092 | words recorded | same |
| 0x0A0 | FIFO count | same |
| 0x0A1–0x0A4 | oldest entry, 16 bits each, LSBs first | same |
| 0x0A5 W | pop | same |
| 0x0B0/0x0B1 W | memory read address low/high | same |
| 0x0B2 | memory word, then address + 1 (reads ≥ 2 clocks apart) | same |
| 0x0C0+c | live corrected value of channel c | same |

The section's channel order is:

* 0–17: ACCT, with module m, phase p at 3m + p;
* 18–29: DCCT 1–12;
* 30: Id;
* 31: Vd;
* 32–33: auxiliary.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50,000,000 | FPGA clock (this design's choice) |
| `ADC_HZ` | 128,000 | conversion rate, 16 × 8 kHz |
| `OSR` | 16 | oversampling ratio |
| `MEM_AW` | 22 | waveform memory 2^22 words; 24 gives the 16M-word option |
| `FIFO_DEPTH` | 64 | change-of-state entries |

The timers divide `CLK_HZ` by 1,000,000 for the µs tick. `CLK_HZ` must
therefore be a multiple of 1 MHz.

## How far this follows the requirements, and where it departs

These points come from the requirements themselves:

* the three-FPGA partition;
* the channel counts;
* 16× oversampling with a decimation filter;
* gain/offset correction in the digital chain;
* the fault table's conditions, levels and ranges;
* bounded, CRC-protected, key-protected settings;
* 1 ms toggled fault lines with XOR coding, feeding watchdogs;
* the 64 × (40 + 24)-bit change-of-state FIFO;
* 4M × 16 memories with 15.4 s of recording from a facility-clock start.

These are this design's own choices, where the requirements are silent:

* the clock frequency, the bus, the register maps and the channel order;
* the boxcar filter, the Q8.8 gain and 1 A/1 V per LSB;
* the CRC polynomial and the reset values;
* latching and reset of faults;
* ZERO_A = 50 A, ID_ON_A = 100 A, the 60 Hz half cycle;
* the XOR polarity (1 = fault) and the watchdog timeout;
* the placement of the watchdogs in the common FPGA;
* the one-shot recording mode and the auxiliary channel choices.

Some rows of the fault table needed interpretation:

* 0A and 0B are read as per-module phase sums and the leg spread.
* 3B is the AND of "bypass not blocked", "all leg currents zero" and
  "bridge voltage below −trip".
* 1K checks four measured supply voltages (`supply_mv`, in mV) against a
  window of nominal ± tolerance. Where the measurements come from is not
  specified, so they arrive on a port. The supply-OK contacts also trip it.
* 0D (firing generator "TBD") is the firing generator's ready contact.
* The status list counts signals per power supply. Convert bit (2), bypass
  bit (2) and AC PT (2) become one convert, one bypass and two PT inputs per
  section. The four MGD OK signals arrive as one already-combined contact per
  section.

Fault detection works on the 8 kHz decimated data. The worst-case detection
delay is therefore about two frames (250 µs), plus the up to 1 ms wait until
a receiver sees the lines' next edge.

Not in this RTL:

* the analog front ends, filters and ADCs;
* the DCCT current sources (only their enable and status bits are here);
* the optically isolated input and output drivers;
* the analog outputs and the self-test DAC;
* the facility clock receiver (only its start pulse is a port);
* the host computer with its web and EPICS servers, the front panel and the
  removable storage.

## Simulating

Every file needs `rtl/fd_pkg.sv` first. Plain Verilator finds the rest
through `-y rtl`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/fd_pkg.sv rtl/fault_detector_top.sv tb/tb_fault_detector_top.sv \
    --top-module tb_fault_detector_top -Mdir obj && ./obj/Vtb_fault_detector_top
```

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles.

* `tb_<block>` tests one block.
* `tb_fault_detector_top` runs the whole unit at a 1 MHz clock with 256-word
  memories. It counts 14 mechanisms and fails if any never happens:
  * CRC reject and CRC accept;
  * key lock and clamping;
  * Level 0 alarm, Level 1, 2 and 3 trips;
  * watchdog decoding and stuck-line detection;
  * latch and reset;
  * change logging and FIFO overflow;
  * recording until the memory is full.
* `tb_full_size_top` runs the top with all defaults: 50 MHz, 128 kHz ADC,
  4M-word memories. It checks the 390-clock conversion interval and the
  125 µs frame spacing. It then runs one complete overcurrent trip through to
  the recorded waveform and the reset. It simulates in a few seconds.
* `tb_record_workload` runs the full recording workload. A section FPGA and a
  common FPGA, both with their full 4M-word memories, record until the memory
  is full: 123,361 frames of 34 words (15.42 s at 8 kHz) and 524,288 frames
  of 8 words. Every word of both records is compared with the value the ADC
  model fed in, and the 1 µs stamps in the section's auxiliary channels must
  step by exactly one frame period. To fit the simulation time, only the clock
  and the ADC rate are raised (3 MHz clock; the ADC runs at 1 MHz for the
  section and 1.5 MHz for the common FPGA). That shortens a frame to 48 or 32
  clocks. The recorder and the memory are unchanged. It takes about half a
  minute.

# SWEA/STE Interface FPGA (SIF)

This is the digital heart of the interface board between the IMPACT instrument
processor (the IDPU) and two particle sensors: SWEA, an electron analyser, and
STE, a set of four solid-state detectors.
- For SWEA it runs the 2-second voltage sweep, counts anode pulses and sends the counts up.
- For STE it triggers and reads four pulse-height ADCs and histograms the events
  into 256 energy bins. It also counts discriminator rates and runs a test pulser.
- For both it does housekeeping, heater and high-voltage control, cover actuators and latch-up protection.

All timing derives from the 1 MHz clock of the IDPU serial link. All bulk
storage is one external 512K x 8 SRAM, shared by time slots:
- the sweep tables,
- the energy look-up tables,
- the histogram counters.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The top module is
`sif_top`, and every block has its own self-checking testbench.

## Clocks of the measurement cycle (`sif_timing`)

The IDPU sends a tic every second with the current seconds value. A tic with an
even value starts a measurement cycle of exactly 2 000 000 clocks:

| tic | period | meaning |
|---|---|---|
| CYCLECLK | 2 s | start of cycle; swaps the double-buffered banks |
| STEPCLK | 1450 clocks (1.45 ms), 1344 per cycle | next sweep step |
| (tail) | 51 200 clocks | after step 1343; no STEPCLK, sweep holds |
| SAMPLECLK | every 4th STEPCLK | SWEA counter interval of 5.8 ms; SAMPLECNT runs 0..335 |
| TESTCYCLECLK | when seconds mod 10 = 0 | restarts the STE test pulser ramp |

All tics are one clock wide and registered. An even tic restarts the counters
even if the previous cycle has not finished, so the sweep stays locked to the
IDPU's time code.

## The shared SRAM and its 8-slot frame (`ram_sequencer`)

The SRAM does one byte transfer per 1 MHz clock. Address, data, /CE and /OE are
registered and held for a whole clock. /WE is pulsed only in the low half of
the clock, which gives the write clean address setup and hold. The low phase is
found without gating the clock: a flop toggling on the rising edge and a copy
taken on the falling edge differ only during the high phase.

The clocks form a fixed frame of eight slots (8 µs):

| slot | owner | use |
|---|---|---|
| 0 | PHA | energy LUT read: `{bank, detector, energy}` → bin |
| 1 | PHA | read counter low byte |
| 2 | PHA | write low byte + 1 |
| 3 | PHA | read counter high byte |
| 4 | PHA | write high byte + carry |
| 5 | sweep | read one byte of the next step's DAC values |
| 6 | read-out | read or clear one byte of the idle histogram bank |
| 7 | LUT loader, else read-out | write a byte the IDPU loaded; if none is waiting, the read-out takes it |

A client with nothing to do leaves its slot idle, with the chip deselected.

The sequencer publishes two values, `nxt_slot` and `cur_slot`:
- `nxt_slot` is the slot being set up in this clock. Clients form their
  requests combinationally from it.
- `cur_slot` is the slot whose transfer is on the pins now. Read data return
  during `cur_slot` and are captured at the next edge.

Each client therefore reads RAM with a fixed latency of one clock. No client
ever waits on another, so every real-time duty has a guaranteed rate:
- one PHA event per frame, 125 000 events/s;
- one sweep byte per frame, 64 clocks for a whole step;
- two read-out bytes per frame, 4.1 ms for the whole histogram.

Memory map, byte addresses:

| region | base | bank stride | layout |
|---|---|---|---|
| energy LUT | 0x00000 | 0x4000 | `{bank, det[1:0], energy[11:0]}`, 1 byte = bin |
| sweep table | 0x08000 | 0x4000 | `8*step + 2*dac + byte`, low byte first (10 752 bytes used) |
| histogram | 0x0F000 | 0x200 | `2*bin + byte`, low byte first |

Only the lowest 64 KB are used. The address bus is the full 19 bits.

## Sweep generation and double-buffered tables

**Table contents.** For each of the 1344 steps, the sweep table holds four
16-bit values, one per DAC: ANAL, DEFL1, DEFL2, VO.

**Prefetch (`dac_sequencer`).** During step *s* the sequencer fetches the
eight bytes for step *s+1* through slot 5. It then writes them to the four
DACs' input registers over the shared DAC bus. At the next STEPCLK one common
/LD pulse moves all four to their outputs together, so the voltages change in
the same clock. The values for step 0 are fetched during the tail of the
previous cycle.

**Banks and swapping.** Each table has two banks: one in use, the other open
to the IDPU. The IDPU loads the idle bank with pointer and data commands
(`lut_loader`). It writes one 16-bit word per command, and the pointer
increments by itself. The IDPU then asks for a swap. The swap takes effect at
the next CYCLECLK, so a cycle never mixes two tables.
- Sweep table: a swap that comes after the prefetch of step 0 has begun is
  held to the following cycle.
- Energy LUT: swaps at the same boundary.
- Histogram banks: swap at every CYCLECLK, with no request needed.

**DAC bus (`dac_bus`).** One byte-wide bus, with MLBYTE choosing the byte,
serves six DACs:
- the four sweep DACs,
- the MCP DAC,
- the PULSE DAC of the test pulser.

A 16-bit write runs as follows:
1. low byte, with /WR low for one clock;
2. one idle clock;
3. high byte, with /WR low for one clock;
4. one idle clock;
5. for MCP and PULSE only, their own /LD.

The sweep has priority, then PULSE, then MCP. /DACCLR is low during reset.

## STE pulse-height analysis

**Trigger and pile-up rejection (`pha_channel`, one per detector).**
- LLD is sampled every clock, and the number of samples since its rising edge is counted.
- The channel is armed only at a sample count of 3.
- Because the edge can fall anywhere within a 1 µs sample, this keeps the
  accepted PEAK fall between 2 µs and 4 µs after the real LLD edge.
- When armed, with ULD and PULSERESET low, the falling edge of PEAK itself
  drives /CVST low. The /CVST output is `!(armed & !peak)`, so it follows the
  PEAK fall within gate delays.
- The next clock edge clears `armed`, which ends the pulse in under 1 µs.
- If PEAK falls outside the window, /CVST stays high. Such an event is a
  pile-up and is not converted.
- After /CVST the channel waits for the ADC's BUSY to rise and fall, then asks to read the ADC.

Caveat: a PEAK fall just before a clock edge can make a /CVST pulse shorter
than an ADC needs. The design does not guard against this.

**ADC bus (`adc_bus_arbiter`).**
- The four PHA ADCs and the housekeeping ADC share one 12-bit data bus.
- A round-robin grant gives one source a /PHARD (or /HKPRD) read.
- Each read takes two clocks. The source just served is skipped, so no detector is favoured.

**Histogramming (`pha_accumulator`).** Events pass through a 4-deep FIFO. Each
one uses slots 0-4 of one frame:
- LUT read;
- 16-bit read-modify-write of the counter, done as two byte read/write pairs.
  The high byte gets the carry.

The LUT bank and histogram bank are sampled at slot 0, so an event is never
split across a bank swap. An event that finds the FIFO full is dropped and
counted.

**Read-out (`ste_accum_readout`).**
- At every CYCLECLK the bank just filled is read counter by counter.
- Each counter is sent as one telemetry word and cleared to zero.
- The read-out uses slot 6 and the spare slot 7, taking 16 clocks per counter.
- The message is a header then 256 counts. It ends in 4.1 ms, well before the
  bank is needed again.

## Counters and housekeeping

**SWEA counters (`swea_counters`).**
- Sixteen 14-bit anode counters count rising edges of the synchronised anode pulses.
- At each SAMPLECLK they are copied to latches and restarted. An edge in that
  same clock counts for the new interval.
- The message contains the SAMPLECNT of the interval that ended, the 16 counts and,
  in sweep-housekeeping cycles, the sweep monitor sample.
- No message is sent while SWEA is disabled.

**STE rate counters (`ste_rate_counters`).**
- Per detector there are three saturating counters: LLD (16 bit), ULD (12 bit) and PULSERESET (11 bit).
- They are latched and restarted at CYCLECLK and sent as one 13-word message.

**Housekeeping (`hk_sequencer`).** The mode alternates at every CYCLECLK:
- *Cycling*: the 16 multiplexer inputs are converted one by one, one every 125 000 clocks.
  The multiplexer is switched right after each conversion, to give it the most settling time.
- *Sweep*: the multiplexer stays on the input the IDPU chose. It is converted
  near the end of every SAMPLECLK interval, and the value is appended to that
  interval's SWEA message.

In both modes, 16 housekeeping messages per cycle carry:
- the mode and multiplexer address;
- the latest sample;
- a 16-bit digital status word (enables, cover switches and actuators, AFE
  power and shutdown, current banks).

**Telemetry (`tlm_arbiter`).**
- Four sources send 16-bit words with valid/ready/last: SWEA, histogram, rates and housekeeping.
- A round-robin arbiter grants whole messages, so messages never interleave.
- The word stream goes to the serial transmitter, which is not part of this RTL.

## Commands

The IDPU writes commands as an 8-bit ID and 16 bits of data (`sif_cmd_decoder`):

| ID | data |
|---|---|
| 0x01 | MCP DAC level `[7:0]`; written to the 16-bit DAC as the upper byte |
| 0x02 | enables: bit 0 MCP HV, 1 NR HV, 2 SWEA cover, 3 SWEA logic, 4 SWEA test pulser, 5 STE test pulser, 6 A/DRESET |
| 0x03 | heater PWM level 0..10 |
| 0x04 / 0x05 | 6-bit thresholds, detectors 0/1 and 2/3 (`[5:0]`, `[13:8]`) |
| 0x06 | sweep-housekeeping multiplexer address |
| 0x07 | STE cover request: bit 0 open, bit 1 close |
| 0x08 | arm the cover force (data must be 0xA5C3) |
| 0x09 | cover force bits; setting one needs an arm within the last second |
| 0x0A | AFE power: bit 0 force on, bit 1 force off |
| 0x0B | swap at next CYCLECLK: bit 0 sweep table, bit 1 energy LUT |
| 0x10 / 0x11 | sweep table word pointer / data |
| 0x12 / 0x13 | energy LUT word pointer / data (two entries per word, low byte = even entry) |

Telemetry message IDs sit in the upper byte of the first word:
- 0x40: SWEA counts with sweep housekeeping
- 0x41: SWEA counts without
- 0x50: histogram
- 0x51: rates
- 0x60: housekeeping

## Smaller functions

- **Heater PWM**: 100 kHz, on for *level* of every 10 clocks.
- **HV sync**: two opposite 100 kHz square waves.
- **SWEA test pulser**: a down-counter reloaded with SAMPLECNT. Its carry gives a pulse every SAMPLECNT+1 clocks, so the rate steps with the sweep.
- **STE test pulser**:
  - 10 µs low pulses at 10 kHz, starting at TESTCYCLECLK;
  - after each pulse, the PULSE DAC is written with the next value;
  - after 65 536 pulses (6.55 s) the pulser stops and the DAC returns to 0;
  - when disabled, the output is high.
- **STE cover**:
  - A request drives its actuator until the matching sense switch closes.
  - Forcing an actuator on takes two commands: an arm with a key, then the force bits within one second.
- **AFE power**:
  - Force on / force off commands set and clear AFEPWR.
  - An AFESHDN latch-up signal clears it.
  - While AFEPWR is off, every output towards the front end (/CVST, /PHARD, housekeeping address and strobes) is held low.
- **SWEA enable**: an IDPU bit ANDed with the board strap `swea_present`. The
  STE-only board ties the strap low. When disabled, the sweep and the SWEA
  messages stop.

## Where this design chooses for itself

The specification leaves several things to companion documents that were not
available. This design chooses them as follows:
- the bit-level serial interface is left out; the top has a simple command
  strobe, a tic, and a telemetry word stream instead;
- the command IDs, message IDs and message layouts shown above;
- the SRAM memory map and the slot frame.

Other choices, where the specification is silent:
- 4-deep event FIFO that drops when full;
- histogram counters wrap at 65 535, but the rate counters saturate as specified;
- the mode order of housekeeping, starting with cycling;
- DAC bus priority;
- the arm key;
- AFE power is off after reset, as are all enables.

Two numbers in the block diagram disagree with the text:
- the RAM is "64k x 8" in the diagram and 512K x 8 in the text;
- the anode counters are "16 x 16" in the diagram and 14 bits in the text.

The text is followed in both cases.

## Simulating

Each block `X` has a testbench `tb/X_tb.sv`. Each one prints a single line
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example,
with verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sif_pkg.sv tb/sif_top_tb.sv \
          --top-module sif_top_tb -o sim --Mdir obj_top
obj_top/sim +verilator+rand+reset+2
```

`tb/sram_model.sv` is a behavioural model of the SRAM. Reads are combinational;
a write stores on the rising edge of /WE.

`sif_top_tb` runs the whole FPGA at its real sizes. It covers 9.7 million
clocks (about 10 s of instrument time) and takes about 20 s to simulate:
1. The IDPU loads a complete sweep table and energy LUT by command, then swaps them in.
2. The sweep DACs are checked at every step against the table.
3. Random PHA events are sent on all four detectors, with rejected (ULD and
   PULSERESET) events mixed in. The next histogram message must match bin for
   bin, and the rate message must match.
4. An event burst on all four detectors overflows the FIFO. Fewer events must
   be counted than were converted, and all of them in the burst's bins.
5. The SWEA messages must carry the anode counts and SAMPLECNT in sequence,
   and the housekeeping modes must alternate.
6. The STE test pulser must run a full 65 536-pulse ramp.
7. Both cover paths, the SWEA disable and an AFESHDN trip are exercised.

The testbench uses only the top's ports. It works out the expected
CYCLECLK, STEPCLK and SAMPLECLK times from the tics it sends. Each of these mechanisms is counted, and one that never happens counts as a
failure. Several block testbenches shorten the block's own timing through
parameters, for example a shorter cover-arm timeout or fewer sweep steps.

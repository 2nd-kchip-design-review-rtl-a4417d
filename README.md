# Kchip readout core

The Kchip sits between four PACE3 front-end chips of the CMS Preshower and one
GOL optical-link serializer. Every PACE3 keeps its samples in an analog
pipeline. When the trigger system accepts a bunch crossing, the PACE3s read
out three time slots (J, K, L) of 32 channels, and 12-bit ADCs digitise them.
The Kchip has four jobs:

- turn the serial trigger commands into readouts;
- keep a digital copy of what the PACE3s should be doing, so it can detect a
  chip that has slipped out of step;
- buffer the samples and tag each event with its event and bunch counters;
- send every event, or a short NULL placeholder when an event cannot be
  delivered, as a CRC-protected frame on the optical link.

The main idea is that the receiver can always resynchronise from the packets
alone. Every trigger produces exactly one packet, in order, and every packet
carries EC and BC. This holds even when a buffer overflows.

This repository holds the synthesizable SystemVerilog of that digital core,
plus a self-checking testbench for each block and one for the whole chip.

## Block map

```
 T1 ──► trigger_decoder ──► trigger_control ──► pace_trig ──► PACE3 x4
              │   (mask, last cmd)  │  EC/BC, inhibit          │ DataValid,
              ▼                     ▼                          │ AlmostFull,
          calib_ctrl ──cal_req──► (DLL, outside)               │ column, ADC
              │ cal_trig             │                         ▼
              └──────────────► Trigger FIFO 128x27      pace_supervisor
                                     │                  (PACE3 emulator)
                                     │                         │ readout sequence
                                     │                         ▼
                                     │                   data_capture
                                     │            ┌────────────┴──────────┐
                                     │     Data FIFO 1Kx18 (x4)   Column FIFO 128x27
                                     ▼            ▼                       ▼
                                  event_builder ◄─┴───────────────────────┘
                                     │ 16-bit packet words
                                     ▼
                                  gol_link (SOF / CRC / fill, CIMT or 8b/10b) ──► GOL
 I2C ◄──► i2c_slave ◄──► kchip_regs (triplicated configuration, status, FIFO window)
```

| file | role |
|---|---|
| `rtl/kchip_pkg.sv` | sizes, command codes, FIFO word structs, link characters, register addresses |
| `rtl/trigger_decoder.sv` | serial T1 decoder: 100 LV1A, 110 CalPulse, 101 ReSync, 111 BC0 |
| `rtl/trigger_control.sv` | EC/BC counters, trigger inhibit, lost triggers, Trigger FIFO writes |
| `rtl/calib_ctrl.sv` | calibration pulse width (1–256 cycles) and latency timer |
| `rtl/pace_supervisor.sv` | emulated PACE3 trigger FIFO and readout sequencer, DataValid/AlmostFull cross-check |
| `rtl/data_capture.sv` | writes samples and per-event records, drops events that do not fit |
| `rtl/kchip_fifo.sv` | the synchronous FIFO used for all six buffers |
| `rtl/event_builder.sv` | assembles normal, calibration, NULL and Link Test packets |
| `rtl/crc16_ccitt.sv` | one 16-bit step of CRC-CCITT (x^16+x^12+x^5+1) |
| `rtl/gol_link.sv` | framing, fill characters, idle insertion, both encodings |
| `rtl/i2c_slave.sv` | I2C slave running on the system clock |
| `rtl/kchip_regs.sv` | register file; configuration held in `tmr_reg` |
| `rtl/tmr_reg.sv` | triplicated register with voter, scrubbing and an upset flag |
| `rtl/kchip_top.sv` | wiring, the four Data FIFOs, status collection, the I2C FIFO window |

The whole core runs on a single 40 MHz clock and has one asynchronous
active-low reset.

## Fast commands and triggers

T1 is low when idle. A command is three bits, one per clock, and the first
bit is always `1`. The decoder gives a one-cycle pulse on the clock after the
third bit. Each command can be masked by its bit in MASK_T1CMD:

- bit 0: LV1A;
- bit 1: CalPulse;
- bit 2: ReSync;
- bit 3: BC0.

LAST_T1CMD holds the last pattern received, whether or not it was masked.

A readout trigger is either an LV1A or the calibration trigger. It is handled
in one of three ways, checked in this order:

1. **Inhibited.** This happens when the inhibit logic is enabled (CONFIG bit 6
   clear) and the emulated PACE3 FIFO is full. The trigger disappears:
   - it is not sent to the PACE3s;
   - EC is not incremented;
   - it is counted in an 8-bit inhibit counter.
2. **Lost.** This happens when the Trigger FIFO has fewer than two free words.
   - EC is incremented, so the gap shows in the next packet's EC.
   - The trigger is not sent to the PACE3s.
   - It is counted in a lost counter.
3. **Stored.** The trigger goes to the PACE3s on the next clock. Two Trigger
   FIFO words follow on the next two clocks:
   - word 0: {type, PACE3-overflow, lost-before, EC, BC};
   - word 1: {lost count, inhibit count}.

   Both counters clear once they have been stored.

Stored does not mean the PACE3 accepted the trigger. With the inhibit
disabled, a trigger that finds the emulated PACE3 FIFO full is still sent and
stored, but marked as PACE3 overflow. It becomes a NULL packet.

Two other commands act on the counters and FIFOs:

- **ReSync** clears EC, BC, all FIFOs, the supervisor's error flags and the
  sticky status.
- **BC0** clears EC and BC.

A command that arrives together with a BC0 counts from zero.

### Calibration

CalPulse starts two counters:

- `cal_req` goes high for CalPulse_WIDTH cycles (0 means 256). It leaves the
  core towards the DLL, together with the DLL step from CalPulse_DELAY[3:0].
  The DLL is outside the core and shifts the pulse in 16 steps of 3.25 ns.
- The latency counter issues `cal_trig` exactly LATENCY cycles after the
  command (0 means 256; the default is 128).
  - If CONFIG bit 7 is clear, this is treated as a readout trigger of type
    CALIB.
  - If it collides with an LV1A, it waits one clock.

A CalPulse that arrives while either counter is still running is ignored and
flagged in STATUS_1.

## Watching the PACE3s without seeing them (pace_supervisor)

The PACE3 has its own trigger FIFO and readout sequencer. The Kchip gets only
the data lines, DataValid and AlmostFull from it. The supervisor runs the same
sequencer itself:

- `pend` counts the events the PACE3 holds. It goes up by one for each trigger
  sent while there is room, and down by one when a readout ends.
- While events are pending and no readout is running, it waits `RO_DELAY`
  cycles. Then it runs one readout of 96 cycles: slot J, K, L, channels 0–31
  each, one sample per clock.
- During the readout it expects DataValid high. It expects AlmostFull to be
  `pend >= AF_LEVEL`.

Each enabled stream (CONFIG[3:0]) is compared every cycle. A mismatch sets
that stream's sticky error bit ("PACE out of sync"). The bit is visible in
two places:

- STATUS_0 = {af_err[3:0], dv_err[3:0]};
- the stream-error nibble of every following packet header.

A mismatch is also marked on the affected samples (bit 17 of the Data FIFO
word).

`pace_full` says whether a trigger issued in this cycle would find the PACE3
FIFO full. It already counts a readout that ends in the same cycle. The
inhibit logic uses it, and so does the PACE3-overflow mark.

The PACE3 internals are not part of this design. They are parameters:

- `PACE_DEPTH` = 32 events;
- `AF_LEVEL` = 28;
- `RO_DELAY` = 4 cycles from trigger to first sample.

Set them to match the real chip. The testbenches use a behavioural PACE3 model
(`tb/pace3_model.sv`) with the same numbers.

## Keeping one packet per trigger through overflows

This is the part of the design that needs the most care. There are three ways
an event can fail, and the packet stream stays aligned in all of them.

| what overflows | when it is detected | what the link sees |
|---|---|---|
| PACE3 trigger FIFO | when the trigger is issued (`pace_full`) | a NULL packet with flag *pace_ovf* |
| Data FIFO (or the Column FIFO) | at the first sample of the readout | a NULL packet with flag *data_ovf* |
| Trigger FIFO | when the trigger is issued | no packet; EC jumps and the next packet has flag *trig_lost* |

A PACE3 overflow is simple. The Trigger FIFO entry is marked, and the event
builder sends a NULL packet without touching the data path.

A Data FIFO overflow is harder. The readout has already happened when the
Kchip finds that one of the four Data FIFOs lacks room for 96 words. The
whole event is dropped, on all streams, so the four FIFOs stay aligned.

The event builder must still send a NULL for the dropped event, at the right
position in the sequence. A naive design writes a "dropped" record into the
Column FIFO. But during a long overflow that fills the Column FIFO with
records of dropped events, and then the Column FIFO overflows too and the
sequence is lost. Here, only stored events get a record. The dropped events
are counted instead:

- `data_capture` counts dropped events in `drop_pending`.
- The record of the next stored event takes the current count into its check
  word (`drop_cnt`), and `drop_pending` is cleared.
- The event builder handles an event that has no PACE3 overflow mark like
  this:
  1. If it holds a record whose drop count is not zero, it sends one NULL and
     decrements the count.
  2. Otherwise, if it holds a record, it sends that event.
  3. Otherwise, if the Column FIFO holds a complete six-word record, it loads
     the record.
  4. Otherwise, if `drop_pending` is not zero, it sends a NULL and
     acknowledges it (`drop_ack`), which decrements `drop_pending`.
  5. Otherwise it waits.

So the Column FIFO never holds more records than the Data FIFOs hold events.
Ten events fit in each: 1024/96 in the Data FIFO, and at least 128/6 in the
Column FIFO.

The room check is made at the first sample, for a whole event, so a partial
event is never written. The check asks for twelve free Column FIFO words
because the previous record may still be in the six-cycle write queue.

### The Column Address FIFO record

Each stored event has a six-word record of 27 bits per word:

| word | contents |
|---|---|
| 0–3 | one per stream: {err, column J, err, column K, err, column L}. Each column address is 8 bits, taken at channel 0 of its slot. |
| 4 | status: {DataValid errors(4), AlmostFull errors(4), readout number(7), BC(12)} |
| 5 | check: {dropped events before this one(8), ~readout number, ~BC} |

The builder compares the status and check words. If they disagree, it sets
the *rec_err* flag in the packet header.

## Packets

Packets are built from 16-bit words. The link layer adds the SOF and the CRC.

```
H0  {type(2), flags(6), EC(8)}      type 0 normal, 1 calibration, 2 NULL, 3 Link Test
                                    flags {out_of_sync, pace_ovf, data_ovf,
                                           trig_lost, inhibited, rec_err}
H1  {stream_err(4), BC(12)}
H2  Kchip ID (KID register)
C0..C5   column addresses, two per word: s0 J K, s0 L s1 J, ...
D0..D383 {stream(2), slot(2), ADC(12)}  stream 0 J1..J32 K1..K32 L1..L32, then 1, 2, 3
```

Packet lengths:

- normal and calibration packets: 393 words;
- NULL packets: H0–H2 only.

A Link Test packet has 19 words:

- H0 holds a packet counter in place of EC;
- H1 holds BC;
- H2 holds KID;
- the rest are 16 walking-one words.

While CONFIG bit 4 (Link Test) is set, Link Test packets are sent back to back
whenever no event is waiting.

## Link layer (gol_link)

One 16-bit word goes to the GOL per clock. A frame is `SOF, data words, CRC`.
Between frames the link sends fill characters, so the receiver keeps bit and
character lock.

| | fill / IDLE | SOF |
|---|---|---|
| CIMT (CONFIG bit 5 clear) | FF1A and FF1B alternating | 3F80 |
| 8b/10b (CONFIG bit 5 set) | <K28.5, D16.2>, or <K28.5, D5.6> if ECONFIG[0] | <K23.7, K23.7> (carrier extend) |

In 8b/10b mode `gol_k` marks the bytes to be sent as K characters.

The CRC is CRC-CCITT with preset FFFF. It covers the data words, MSB first. A
frame can follow the previous CRC directly (back to back): the SOF itself
marks the boundary.

Idle insertion keeps the receiver locked during long data bursts. It works
when GINT_BUSY and GINT_IDLE are both non-zero. Once the link has sent no
fill for GINT_BUSY × 16 cycles, GINT_IDLE fill words are inserted after the
current frame.

If the event builder is cleared in the middle of a frame (ReSync), the CRC of
the words sent so far ends the frame at once. The receiver then sees a frame
that is short but valid.

Event packets leave back to back too. The event builder has two sides that
work in parallel. While one packet is being sent, the fetch side already
reads the next trigger words and Column FIFO record. The next header word is
therefore ready when the CRC of the previous frame goes out.

## Registers and I2C

The I2C slave samples SCL and SDA with the 40 MHz clock, through two-flop
synchronizers. Its 7-bit address is {chip_id[1:0], register[4:0]}, so one
address byte selects the chip and the register. Each transfer moves one byte.

| addr | name | access | default / meaning |
|---|---|---|---|
| 00 | CONFIG | R/W | 0x0F: {cal_trig_dis, inhibit_dis, enc_8b10b, link_test, stream_en[3:0]} |
| 01 | ECONFIG | R/W | 0: bit 0 selects the D5.6 IDLE |
| 02/03 | KID_L/H | R/W | {14'b0, chip_id} until written |
| 04 | MASK_T1CMD | R/W | 0 |
| 05 | LAST_T1CMD | RO | last 3-bit pattern |
| 06 | LATENCY | R/W | 128 |
| 07 | EVCNT | RO | EC |
| 08/09 | BNCHCNT_L/H | RO | BC of the last stored event |
| 0B | GINT_BUSY | R/W | 0 (units of 16 cycles) |
| 0C | GINT_IDLE | R/W | 0 |
| 0D | FIFOMAP | R/W | 0–3 Data FIFO, 4 Column FIFO, 5 Trigger FIFO |
| 0E/0F | FIFODATA_L/H | R/W | FIFO window, see below |
| 10 | STATUS_0 | RO | {af_err, dv_err}, cleared by ReSync |
| 11 | STATUS_1 | RO | sticky {col_ovf, fifo_ovf, idle_inserted, cal_ignored, data_drop, pace_ovf, inhibited, lost}, cleared by ReSync |
| 12 | SEU_COUNTER | RO | upsets corrected since reset, saturating |
| 13 | CalPulse_DELAY | R/W | 1 (bits 3:0 select the DLL step) |
| 14 | CalPulse_WIDTH | R/W | 1 (0 = 256) |

Each R/W configuration register is a `tmr_reg`:

- it has three copies and a bitwise majority voter;
- every copy is reloaded with the voted value on every clock, so a single
  upset lasts one cycle;
- any disagreement adds one to SEU_COUNTER.

The five state machines get the same protection. These are the T1 decoder,
the PACE3 sequencer, the fetch side of the event builder, the link framer and
the I2C slave. Each keeps its state register in three copies and decodes the
majority. Every clock reloads all three copies, either with the next state or
with the voted one. A copy that disagrees raises the block's `fsm_upset`, and
SEU_COUNTER counts those cycles too. Counters and data registers are not
triplicated: an upset there damages one event, but never the sequence of
packets.

The FIFO window only works in Link Test mode:

- Reading FIFODATA_H pops the selected FIFO. Both halves show bits 15:0 of the
  head word.
- Writing FIFODATA_H pushes {FIFODATA_H, last FIFODATA_L}.

This lets a user upload an event and send it through the link, or read one
out by I2C. The window is 16 bits wide, so the 17th and 18th bits of a Data
FIFO word, and bits above 15 of a 27-bit word, cannot be reached this way.

## Where this design goes beyond or departs from its source

The command set, actions, FIFO sizes, register addresses and defaults,
encodings and CRC polynomial follow the Kchip description. These are this
design's own choices:

- all FIFO word layouts and packet word layouts;
- the CONFIG, ECONFIG and STATUS bit fields;
- the I2C address split;
- the CIMT fill and SOF values;
- the CRC preset;
- the PACE3 depth and timing;
- the unit of GINT_BUSY;
- what happens with overlapping CalPulses.

A few things are deliberately not built:

- **Only the configuration registers and the five state registers are
  triplicated.** Counters and other control flops are not.
- **No DLL, PACE3, ADC, GOL, pads or scan chain.** Their signals are ports of
  `kchip_top`: `cal_req`, `dll_tap`, `pace_trig`, `pace_dv`, `pace_af`,
  `adc_data`, `pace_col`, `gol_data`, `gol_k`, `scl`, `sda_in` and `sda_oe`.
- **The FIFO window is 16 bits wide**, as described above.

When the Trigger FIFO is full, this design drops the trigger and lets the EC
gap reveal it. It does not hold it back.

## Simulating

Every block has a testbench in `tb/` that checks itself and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/kchip_pkg.sv tb/tb_kchip_top.sv \
          --top-module tb_kchip_top -Mdir obj_top
./obj_top/Vtb_kchip_top
```

`tb_kchip_top` runs the core at its default sizes. It includes four PACE3
models, an I2C master and a link receiver that checks every CRC and every
sample. It goes through these steps:

1. register access;
2. single triggers;
3. a calibration;
4. a dense trigger burst that overflows the PACE3, the Data FIFOs and the
   Trigger FIFO;
5. the same with the inhibit on;
6. a DataValid glitch;
7. ReSync, BC0 and masking;
8. idle insertion;
9. 8b/10b mode;
10. Link Test with the FIFO window;
11. an injected register upset.

Each of these mechanisms is counted, and one that never happens is a failure.
The simulation itself takes well under a second; most of the time goes to compiling.

`tb_fifo_capacity` fills the buffers at their full sizes with nothing read
out. It checks three capacities:

- exactly 10 events fit in the Data FIFOs, and the 11th is dropped;
- the Column FIFO then holds 60 words;
- the Trigger FIFO takes 64 triggers and loses the 65th.

The sizes are parameters of `kchip_top`: PACE_DEPTH, AF_LEVEL, RO_DELAY,
DF_DEPTH, CF_DEPTH and TF_DEPTH. Sizes and codes used in several blocks are
in `kchip_pkg`.

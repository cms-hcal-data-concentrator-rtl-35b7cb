# HCAL Data Concentrator Card — DAQ logic in SystemVerilog

The Data Concentrator Card (DCC) sits between the HCAL front-end readout
and the CMS central DAQ. On every level-1 accept (L1A) from the TTC
system, each of its 15 HTR inputs sends one block of data for that
event. The DCC waits for those blocks and checks that they belong to the
trigger, using event number (EvN) and bunch number (BcN). It then sends
them on as one event in the CMS Common Data Format (CDF) over a 64-bit
S-Link64. It also reports its readiness to the trigger through the four
Trigger Throttling System (TTS) lines and counts every error it sees. A
front-panel LED display shows the card's state.

This repository holds the synthesizable logic for all of that. The
design has one clock domain: the 40 MHz LHC bunch clock. It has no
vendor primitives. The external parts (TTCrx chip, VME/PCI bus,
S-Link64 card, LVDS drivers) are represented by plain ports.

```
 TTCrx ──► dcc_ttc_bcast ──► run / clear / calib / BC0 ...
   │          dcc_bx_counter (local BcN, orbit)
   └─ L1A, BCnt ─► dcc_l1a_capture ─► dcc_l1a_fifo ──► thresholds ─┐
                                            │                      │
 HTR 0..14 ─► dcc_htr_rx ─► dcc_htr_buffer ─┤                      ▼
                                            ▼               dcc_tts_fsm ─► TTS
                                    dcc_event_builder ◄── dcc_error_counters
                                            │ 32-bit payload       ▲
                                            ▼                      │
                                    dcc_cdf_framer (CRC) ──► S-Link64
                                            └──► dcc_monitor_buffer ──► VME
                                    dcc_led_display ──► serial LED line
```

## Triggers and numbering

**L1A capture.** The TTCrx puts three values on its 12-bit `BCnt` bus on
three successive clocks: its bunch count on the L1A clock, then EvN bits
11:0, then EvN bits 23:12. The DCC does not use the TTCrx bunch count,
which is known to be wrong. Instead it records its own counter
(`dcc_bx_counter`, 0..3563). The TTCrx event counter restarts at 0 after
an event-counter reset, while the DCC numbers events from 1. So the DCC
EvN is the TTCrx count plus one. Each trigger becomes a 37-bit entry
`{calib, EvN[23:0], BcN[11:0]}` in the trigger FIFO. This takes three
clocks, and that is also the tightest L1A spacing the trigger rules
allow.

**Broadcast commands** (`dcc_ttc_bcast`). Bits 7:5 of `Brcst<7:0>` select
a command. Bit 3 must be 1, except for StatReq, which needs 0.

| bits 7:5 | bit 3 = 1 | bit 3 = 0 |
|---|---|---|
| 001 | ResetOrbitCounter | – |
| 010 | ReSync | – |
| 011 | HardReset | – |
| 100 | Start | – |
| 101 | Stop | StatReq |
| 110 | CalibTrig | – |

Bit 1 is EvtCntReset and bit 0 is BC0. Both can come with any of the
commands above.

- ReSync and HardReset hold `daq_clear` for 16 clocks. The clear empties
  the trigger FIFO, the HTR buffers, the event builder, the framer and
  the monitor buffer. It does not touch registers or error counters.
- Start and Stop set a run flag. L1As and calibration triggers are taken
  only while `run_flag | cfg.vme_run` is 1.
- BC0 resets BcN after `cfg.bc0_delay` clocks (0..15). If BcN was not
  3563 at that moment, DCC error 10 is raised.
- ResetOrbitCounter loads the orbit counter with `cfg.orbit_reset_val`.
- StatReq and EvtCntReset only produce output pulses (`stat_req`,
  `evcnt_reset`). The TTCrx resets its own counter.

**Calibration triggers.** A CalibTrig broadcast makes a trigger entry
with `calib = 1` and the calibration event number. That number is kept
separately, starts at 1 and is reset to 1 by `vme_calib_evn_reset`. The
event is built and checked like any other, with its own pair of mismatch
counters. It never goes to the S-Link, even when the link is enabled.
The monitor buffer always keeps it. If a calibration trigger arrives on
the same clock as an L1A entry is being written, it is delayed one clock.

## HTR blocks

Each HTR input is a 16-bit word stream. Two type bits (S1,S0) come with
every word: `11` header, `10` body, `01` trailer. `dcc_htr_rx` reads
these fields, at the same positions in normal, empty and histogramming
blocks:

| word | bits | field |
|---|---|---|
| 0 (header) | 7:0 | EvN[7:0] |
| 1 | 15:0 | EvN[23:8] |
| 2 | 14:0 | EVT_Status (15 error/status bits of the HTR) |
| 4 | 11:0 | BcN |
| trailer | 15:8 / 7:0 | EvN[7:0] / LRB_Errors |

The receiver packs words in pairs into 32-bit words, first word in the
low half. It writes them to the HTR's circular buffer (`dcc_htr_buffer`,
512 × 32 bits). When the trailer arrives it pushes a descriptor
`{EvN, BcN, EVT_Status, LRB_Errors, word counts}` into a 16-deep
descriptor FIFO. The receiver also detects problems itself and ORs them
into LRB_Errors, using the bit meanings the LRB uses:

| bit | set when |
|---|---|
| 7 | the block has an odd number of 16-bit words (it is then padded with a zero half-word) |
| 6 | a header arrives inside an unfinished block (that block is closed as it is) |
| 5 | the block is longer than 1023 words or the buffer is full (the rest is thrown away) |
| 3 | the trailer EvN does not match the header |

If the descriptor FIFO is full, the whole block is discarded.

## Event building

This is the part of the design with the most judgement in it
(`dcc_event_builder`).

1. **Start.** The builder takes the oldest trigger entry once the framer
   has finished the previous event. It then waits.
2. **Wait.** It looks at the oldest block descriptor of every enabled
   HTR and compares that block's EvN with the trigger's (24-bit modular
   difference):
   - **Same EvN:** the HTR is done.
   - **Older EvN:** the block is left over from an event already given
     up on. It is dropped in one clock, the HTR's E bit is set, and
     waiting continues with the next block.
   - **Newer EvN:** the HTR skipped this event. Its block is left in
     place for the event it belongs to. The HTR counts as missing for
     this event and its E bit is set.
   - **No block yet:** keep waiting.

   The wait ends when every enabled HTR is done or missing, or after
   `cfg.timeout` clocks (4000 = 100 µs). HTRs with nothing by then are
   missing (P = 0).
3. **Check.** On the next clock the builder sends these pulses to the
   error counters:
   - each present HTR's EVT_Status bits;
   - "EvN mismatch" if any E bit is set;
   - "BcN mismatch" if a present block's BcN differs from the trigger's.

   For a calibration event, the calibration variants of the two
   mismatch errors are used.
4. **Payload.** The builder streams 32-bit words to the framer:

| word | contents |
|---|---|
| 0 | `000`, HTR status[14:0] (bits 28:14), 6 zero bits, format version (`cfg.fmt_ver`, bits 7:0) |
| 1 | error summary (see below) |
| 2..16 | one per HTR: EVT_Status[7:0] (31:24), LRB_Errors (23:16), E (15), P (14), V (13), `000`, 16-bit word count (9:0) |
| 17..19 | zero |
| 20.. | the stored 32-bit words of each present block, HTR 0 first |

In a summary word:
- V = the input is enabled.
- P = a block for this event is included.
- E = an EvN mismatch was seen on this input.

An HTR's bit in the header HTR-status field is set when it is enabled
and one of these holds:
- its block is missing;
- it has E set;
- it reports an EVT_Status bit among 7:0;
- it reports an LRB error.

Dropping older blocks and leaving newer ones in place re-aligns an HTR
that lost or gained a block. A single bad event costs at most one
event's data from that HTR, and every correction is counted.

## CDF output and CRC

`dcc_cdf_framer` wraps the payload:

```
header  : 0x5 | Evt_ty | EvN[23:0] | BcN[11:0] | Source_id[11:0] | FOV | H=0 | 000   (K word)
payload : {payload word 2n+1, payload word 2n}   (first word in the low half; odd count padded with 0)
trailer : 0xA | 0000 | length[23:0] | CRC[15:0] | 0000 | Evt_stat | TTS | T=0 | 000 (K word)
```

The length counts all 64-bit words, header and trailer included. The
CRC (`dcc_crc16_d64`) is CRC-16 with polynomial x^16+x^15+x^2+1
(0x8005). It is computed over every 64-bit word, bit 63 first, starting
from 0xFFFF, with the trailer's CRC field taken as zero. The CRC module
is written as 64 unrolled steps of the serial shift register. It gives
the same result as the usual 64-bit parallel equations for this
polynomial, and the testbench checks it against both. The TTS field is
the TTS output at the time the trailer is built.

The S-Link interface is `slink_data`, `slink_k` (1 on header and
trailer), `slink_valid` and `slink_ready`. Valid stays up until the word
is taken. When `cfg.slink_en` is 0, normal events are built and
discarded; the monitor buffer can still keep them. The two S-Link
reserved bits (1:0 of header and trailer) are driven 0.

## Trigger FIFO and TTS

The trigger FIFO (`dcc_l1a_fifo`, 64 entries) has two thresholds with
hysteresis:
- Overflow Warning turns on at `cfg.ofw_on` entries and off at
  `cfg.ofw_off`.
- Busy turns on at `cfg.bsy_on` and off at `cfg.bsy_off`.

A trigger that arrives when the FIFO is full is lost. That means loss of
synchronisation.

`dcc_tts_fsm` drives the four TTS lines (RDY, BSY, SYN, OFW):

| state | code | entered when |
|---|---|---|
| Ready | 1000 | after reset and after a ReSync/HardReset clear |
| Overflow Warning | 0001 | from Ready at the warning threshold; from Busy when busy clears |
| Busy | 0100 | from Overflow Warning at the busy threshold; during a clear |
| Out of Sync | 0010 | a trigger was lost (from any state but Error/Disconnected) |
| Error | 1100 | forced by an error control register, or an illegal forced code |
| Disconnected | 0000 / 1111 | forced by an error control register |

Overflow Warning goes back to Ready when the warning clears. Out of
Sync, Error and Disconnected, and any state forced by an error, hold
until the next ReSync/HardReset.

## Error counters

`dcc_error_counters` has:
- 15 counters for each HTR, one per EVT_Status bit (225 in total);
- 11 DCC counters.

All are 8 bits and stop at 255. `vme_err_clear` clears them all at
once. The read port is `vme_cnt_addr` (9 bits), with data on
`vme_cnt_data` one clock later:

| address | counter |
|---|---|
| 15·h + c (0x00..0xE0) | HTR h, EVT_Status bit c |
| 0x1C0 + j | DCC error j |

DCC errors:

| j | error |
|---|---|
| 0 | overflow warning on |
| 1 | overflow warning off |
| 2 | busy on |
| 3 | busy off |
| 4 | FIFO full (lost sync) on |
| 5 | FIFO full (lost sync) off |
| 6 | EvN mismatch, L1A |
| 7 | BcN mismatch, L1A |
| 8 | EvN mismatch, calibration |
| 9 | BcN mismatch, calibration |
| 10 | BcN ≠ 3563 at BC0 |

The error summary (`err_summary`, also payload word 1) works like this:
- bit c is set while any HTR's counter c is non-zero;
- bit 16 + j is set while DCC counter j is non-zero.

Each EVT_Status bit has one control register `{change_tts, new_tts[3:0]}`
(`htr_err_ctrl`), shared by all HTRs. Each DCC error has one too
(`dcc_err_ctrl`). When an error with `change_tts = 1` occurs, the TTS
machine is forced to `new_tts`. If several such errors occur on the same
clock, DCC errors win, and then the lowest index.

## Monitor buffer and LEDs

`dcc_monitor_buffer` watches the words leaving the framer and keeps whole
events in a 1024 × 65-bit FIFO (`{K, data}`) for the VME side:
- every calibration event;
- one normal event out of `cfg.mon_prescale` (0 keeps none).

An event is started only if at least 256 words are free; otherwise it is
counted as dropped.

`dcc_led_display` drives 24 LEDs. Each is off, on or blinking. They are
sent continuously on a three-wire line (`led_sclk`, `led_sdata`,
`led_latch`), LED 23 first:

| LEDs | shows |
|---|---|
| 0..4 | VME activity, TTC, L1A, DAQ (S-Link), DCC |
| 5..8 | RDY, BSY, OFW, SYN |
| 9..23 | HTR 0..14: disabled or idle / data / errors |

Short events and the TTS bits are stretched to 100 ms (`STRETCH`
clocks) so that they can be seen.

## Registers

The VME/PCI registers are input ports. The per-error control registers
are `htr_err_ctrl` and `dcc_err_ctrl`. The rest are grouped in the
`dcc_cfg_t` struct `cfg`:

| field | meaning |
|---|---|
| `vme_run` | run enable, ORed with the TTC Start/Stop flag |
| `slink_en` | send normal events to the S-Link |
| `htr_enable[14:0]` | enabled HTR inputs |
| `timeout` | HTR wait limit in clocks |
| `source_id`, `fov`, `evt_ty`, `evt_stat` | CDF fields |
| `fmt_ver` | payload format version |
| `ofw_on`, `ofw_off`, `bsy_on`, `bsy_off` | trigger FIFO thresholds |
| `bc0_delay` | BC0 delay in clocks |
| `orbit_reset_val` | orbit counter reset value |
| `mon_prescale` | monitor buffer prescale |

Status ports include:
- `bcn`, `orbit`, `calib_evn`, `l1a_level`, `l1a_full`;
- `l1a_lost`, a pulse for each trigger lost to a full FIFO;
- `eb_timeout` and `eb_drop` pulses;
- monitor buffer counters;
- the `led` vector.

## Throughput

The builder moves one 32-bit word per clock. An event therefore takes
about 20 + (32-bit words of all blocks) + 10 clocks. At 100 kHz there
are 400 clocks per trigger, so blocks of up to about 48 16-bit words
per HTR keep up. An empty HTR block is 8 words. Larger blocks make the
trigger FIFO fill, and the TTS lines then throttle the trigger.
`tb_dcc_rate` runs bursts at the limit of the trigger rules: L1As 3, 97,
140 and 1360 crossings apart, 100 kHz on average. At 48 words per HTR
it measures 399 clocks per event, with no loss.

## Where this design chooses for itself

These points are not fixed by the specification the design follows:

- **Assumed values.** The clock (40 MHz) and all buffer sizes: trigger
  FIFO 64, HTR buffer 512 words plus 16 descriptors, monitor buffer
  1024.
- **Error counter addresses.** The DCC counters start at 0x1C0. The
  HTR counters fill 0x00..0xE0, so a DCC base at 0xC0 would overlap
  them.
- **Layout choices.**
  - The bit boundaries inside header word 0.
  - The meanings of E, P and V.
  - The summary-bit mapping.
  - Taking EVT_Status[7:0] as "HTR errors" in the summary word.
- **CRC details.** The CRC start value of 0xFFFF and the zero CRC field
  during the calculation.
- **BC0 command bit.** Bit 0 of `Brcst`.
- **EvN mismatch policy.** Older blocks are dropped and newer ones are
  kept for later.
- **TTS.**
  - Out of Sync is entered from any state on a lost trigger.
  - Forced states hold until a clear.
  - After a clear the state is Ready.
- **Checks added by the DCC.** The DCC's own LRB_Errors bits and the
  zero padding of odd blocks.
- **Monitor buffer and LEDs.** The monitor buffer's prescaler and
  free-space rule, and the LED serial protocol and blink period.

These are not built:
- no second CDF header word;
- no capture of LRB monitoring data on StatReq (only a pulse);
- the orbit counter is not put into the data;
- no TTCrx I2C set-up;
- no VME/PCI bus logic, SDRAM or S-Link/LVDS hardware.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Any simulator with SystemVerilog timing support works. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/dcc_pkg.sv tb/dcc_tb_pkg.sv tb/tb_dcc_top.sv --top-module tb_dcc_top -o tb
./obj_dir/tb
```

Replace `tb_dcc_top` with any other testbench name:

| testbench | tests |
|---|---|
| `tb_dcc_top` | the whole card at its default sizes, with each event compared word for word with a reference |
| `tb_dcc_rate` | the 100 kHz / trigger-rule load above |
| `tb_dcc_<block>` | one block each, usually at reduced sizes so that overflow cases are reached quickly |

The end-to-end test `tb_dcc_top` covers, and counts:
- normal events;
- S-Link back-pressure;
- an HTR timeout;
- a stale block dropped;
- a calibration event;
- monitor capture;
- Overflow Warning, Busy, lost triggers and Out of Sync;
- ReSync;
- a forced TTS state;
- a misplaced BC0;
- Stop;
- counter reads;
- LED frames.

For lint only: `verilator --lint-only -Wall -Irtl rtl/dcc_pkg.sv rtl/dcc_top.sv -y rtl`.

## Files

`rtl/`:

| file | contents |
|---|---|
| `dcc_pkg.sv` | constants, types, register struct |
| `dcc_top.sv` | the card |
| `dcc_ttc_bcast.sv` | broadcast commands |
| `dcc_bx_counter.sv` | BcN and orbit |
| `dcc_l1a_capture.sv` | L1A / calibration trigger capture |
| `dcc_l1a_fifo.sv` | trigger FIFO and thresholds |
| `dcc_fifo.sv` | generic first-word-fall-through FIFO |
| `dcc_htr_rx.sv` | HTR block receiver |
| `dcc_htr_buffer.sv` | per-HTR block store |
| `dcc_event_builder.sv` | event builder |
| `dcc_crc16_d64.sv` | CRC-16 over 64 bits |
| `dcc_cdf_framer.sv` | CDF header/trailer |
| `dcc_error_counters.sv` | error counters and control registers |
| `dcc_tts_fsm.sv` | TTS state machine |
| `dcc_monitor_buffer.sv` | VME monitor buffer |
| `dcc_led_display.sv` | LED driver |

`tb/`:
- `dcc_tb_pkg.sv` builds HTR blocks.
- `tb_dcc_*.sv` are the testbenches.

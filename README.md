# NA48 Trigger Supervisor in SystemVerilog

The Trigger Supervisor (TS) is the central trigger processor of a kaon-decay
experiment that records data from all detectors into circular buffers at
40 MHz and must decide, within the ~200 us those buffers persist, which 25 ns
time slots to read out. Local trigger systems (a level-1 logic called L1TS, a
track-computing farm called L2C, a neutral-particle trigger called NT, and a
miscellaneous input) send their results to the TS tagged by time slot. Some
sources are synchronous and fixed-latency; L2C is asynchronous, has a variable
latency of up to ~100 us and reports events out of time order.

The TS lines these results up by timestamp, forms a 16-bit trigger word from
any combination of the 96 input bits, downscales and counts each bit, and
queues valid triggers. It then broadcasts each one as a 64-bit packet
(event number, trigger word, timestamp) to ten readout controllers (ROCs),
never faster than one packet per programmable interval dt. Apart from an XOFF
line that a ROC raises when its buffers fill, there is no handshake anywhere.
The design is a 40 MHz pipeline without dead time, except for two dead-time
sources, XOFF and a full queue, which it measures.

This repository is a synthesizable RTL model of that system at the sizes of
the original: 8K-slot input memories, 30-bit timestamps, 96 inputs to a
16-bit word, queue depth 3 and dt = 20 us by default, 10 links.

## Block map and data flow

```
 src_data[0..3], src_strobe, l2c_ts
        |
  input_card x4  (L1TS, L2C*, NT, MISC)      * asynchronous card
   ts_counter -> dp_ram 8K x 56 -> timestamp match -> widening
        |  96 bits                         \--> mon_data (monitor outputs)
  lut_tree: routing_fpga x2 (96->72) -> logic_fpga x2 (72->24)
            -> trigger_ram x4 (12 bits + timing lines -> 4 bits)
        |  16-bit trigger word
  downscaler -> trigger_counters
        |
  strobe_ram (64K x 1, addressed by the word) -> strobe
        |  strobe, {word, output timestamp}
  tqb (trigger queue buffer / derandomizer) <-- xoff_or <-- xoff[9:0]
        |           \--> deadtime_monitor
  transmitter (event number, 64-bit packet, 8 frames) --> tx_byte[9:0]
  burst_fsm: start of burst clears counters, loads presets; gates config
```

| Module | Role |
|---|---|
| `trigger_supervisor` | top level; configuration decode and readout mux |
| `input_card` | timestamped storage and time-ordered readout of one source |
| `ts_counter` | 30-bit slot counter with preset |
| `dp_ram` | dual-port RAM used by the input cards and the queue |
| `widening` | widens coincidence bits to +-1 slot |
| `lut_tree`, `routing_fpga`, `logic_fpga`, `trigger_ram` | trigger word formation |
| `downscaler`, `trigger_counters` | per-bit downscaling and burst counters |
| `strobe_ram` | trigger validation lookup |
| `tqb` | derandomizer queue with programmable depth and interval |
| `xoff_or`, `deadtime_monitor` | XOFF collection and dead-time counters |
| `transmitter` | event numbering, packet, framing for the serial links |
| `burst_fsm` | burst / interburst control |
| `ts_pkg` | widths, packet struct, configuration address map |

## Timestamps and the input memories

This part takes the most care to understand. Every 25 ns slot in the burst
has a 30-bit timestamp. Each input card writes the source's 24 bits and strobe
into an 8192-entry RAM at the address given by the timestamp's low 13 bits. It
stores the 17 high bits next to the data (entry:
`{14 spare, strobe, ts[29:13], data[23:0]}`).

* **Synchronous sources** (L1TS, NT, MISC) write every slot at the card's own
  counter. A source with latency k slots has its card counter preset k slots
  behind, so the data is written under the event's true timestamp.
* **The asynchronous source** (L2C, `ASYNC = 1`) writes only when it strobes, at
  the timestamp it delivers with the data. Results may arrive in any order,
  as long as they arrive within the read delay.
* **Reading** happens on the second port, `delay` slots behind the card
  counter (reset value 4000 slots = 100 us, the L2C time budget). A slot is
  passed on only if its stored strobe is set and its stored high bits equal
  the high bits of the slot being read. Entries left from earlier turns of the
  RAM, 204.8 us apart, are rejected this way, so the RAM never needs clearing.

**Alignment rule.** All cards must read a given slot in the same cycle. A card
preset k slots behind therefore needs a read delay k slots shorter. For
example, NT reporting 3 slots after L1TS gets `preset = P - 3` and
`delay = 4000 - 3`. The output stage has its own timestamp counter. Setting
its preset to `P - delay - 9` (9 = pipeline depth from the card read to the
queue) makes the timestamp stored with each trigger equal the event's own
slot. The reset values already satisfy this when all card presets are 0.

**Widening.** Independent sources can put an event into neighbouring slots.
For each card, a reference mask marks the bits that act as time reference and
pass unchanged. Every other bit is widened: its output for slot t is the OR of
slots t-1, t and t+1. A coincidence of a reference bit with a bit displaced by
one slot is still found.

## Trigger word formation

The network has three layers. Two routing units each pick 72 of the 96 bits
(a 7-bit select per output). Two logic units each turn every three routed
bits into one bit through a programmable 8-entry truth table (72 to 24, so 48
bits in all). Four RAMs each take 12 logic bits plus two timing lines (`in_burst` and a spare external line
`ext_timing`) and give 4 bits of the trigger word. Because the timing lines
are part of the RAM address, a trigger bit can be enabled only inside the
burst, only outside it (calibration), or always.

## Downscaling, counting and the strobe

Each bit of the word can then be downscaled by its own 16-bit factor F: of
the slots in which the bit is set, the 1st, (F+1)th, (2F+1)th and so on pass
(F = 0 or 1 passes all). Each downscaled bit is counted by a 24-bit counter
over the burst. The downscaled word addresses a 64K x 1 RAM that says whether
this combination of bits is a valid trigger (the strobe). A trigger type can
thus be switched off without touching the decision logic.

## The trigger queue (derandomizer)

Triggers arrive at random; the ROCs need at least dt between requests. The
queue is a dual-port SRAM (46-bit entries: trigger word and timestamp) with
read and write pointer counters:

* **Depth N** is programmable (1 to 128; reset 3). A valid trigger arriving
  when N entries are waiting is lost, and counted.
* **Interval dt** is a down counter reloaded at each extraction (reset 800
  slots = 20 us). An entry is extracted when the counter is zero and the
  transmitter is idle.
* **XOFF** does not stop the queue. Freezing it would let the stored triggers
  age past the buffer persistence. Entries keep being written and extracted
  every dt; an entry extracted while XOFF is active is discarded and counted
  as not dispatched. When XOFF falls, sending resumes with what the queue then
  holds.

The depth must satisfy `5 us + T_L2C + N*dt < 204.8 us - dt`. With
T_L2C = 100 us and dt = 20 us this gives N = 3. At 7 kHz of random triggers
the queue behaves as an M/D/1 system. Counting the trigger inside its dt
interval, the time fractions with 0, 1 and 2 triggers in the system are about
0.86, 0.13 and 0.01. The system is full (4 or more) about 2.5e-5 of the time,
which is the fraction of triggers lost.

The dead-time monitor counts XOFF slots, triggers dropped under XOFF, queue-full
slots and triggers lost to a full queue. XOFF is the OR of the ten ROC lines,
each with an enable bit, after a two-flop synchronizer.

## Packets and links

For each dispatched trigger the transmitter attaches a 16-bit event number,
which restarts at 0 every burst. It builds the packet

```
[63:48] event number  [47:32] trigger word  [31:30] spare (0)  [29:0] timestamp
```

and sends it as 8 bytes, most significant first, to all ten links at once. Each
byte is held for 5 clocks, with `tx_strobe` in the first clock. That is 125 ns
per 8-bit frame, the rate of a 4b/5b-encoded 80 Mbit/s serial link, so a
packet takes 1 us (the original quotes about 900 ns of transmission
overhead). The serializer chips themselves are outside this RTL.

## Burst control and configuration

`burst_fsm` has two states. A start-of-burst pulse (`sob`) in the interburst
produces one `start` cycle, which:

* loads all timestamp counter presets;
* clears the downscalers, counters, queue and event number.

`eob` returns to the interburst. Configuration writes are accepted only in
the interburst; counters can be read at any time.

The configuration bus is `cfg_we`, `cfg_addr[23:0]`, `cfg_wdata[31:0]`
and a combinational `cfg_rdata`. `cfg_addr[23:16]` selects a region and
`[15:0]` the local address (constants in `ts_pkg`):

| Region | Contents |
|---|---|
| `0x00`/`0x01` | routing select k of routing layer 0/1 (input index 0..95) |
| `0x02`/`0x03` | truth table k of logic layer 0/1 (8 bits) |
| `0x04`..`0x07` | trigger RAM 0..3, address `{ext_timing, in_burst, 12 logic bits}`, 4 bits |
| `0x08` | strobe RAM, address = trigger word, 1 bit |
| `0x09` | downscale factor of bit k |
| `0x0A`..`0x0D` | input card L1TS, L2C, NT, MISC: 0 preset, 1 delay, 2 reference mask |
| `0x0E` | output: 0 depth N, 1 dt, 2 XOFF enables, 3 output timestamp preset |
| `0x10` (read) | trigger counter k |
| `0x11` (read) | 0 XOFF slots, 1 XOFF drops, 2 full slots, 3 full losses, 4 next event number, 5 queue occupancy |

## Latency

| Stage | Cycles |
|---|---|
| card RAM read + timestamp match (to `mon_data`) | 2 |
| widening | 2 |
| routing, logic, trigger RAM | 3 |
| downscaler | 1 |
| strobe RAM | 1 |
| queue: write to earliest extraction | 1, then 1 to `out_valid` |
| transmitter | 40 per packet |

An event therefore reaches the queue `delay + 9` cycles after its slot.

## How far it follows the original, and where it departs

The RTL follows the original in:

* the stage order and all sizes: 4 x 24 inputs, 8K x 56 input RAMs, 17 stored
  timestamp bits, 96/72/24/12 bits through the formation network, a 16-bit
  word, 65 535 downscaling, 24-bit counters, a 46-bit queue entry, 16-bit
  event numbers, the 64-bit packet and 10 destinations;
* the stale-data rejection, the widening rule, the queue with programmable N
  and dt, the XOFF behaviour and the four dead-time counts.

Choices made here, where the original gives only the function:

* **Formation network:** the routing is a multiplexer per output. The logic
  functions are 3-input tables. There are two timing lines, and the order of
  the RAM outputs in the word is fixed here.
* **Queue control:** the original uses a RAM-based state machine; here it is
  comparators on the pointers. The physical queue is 128 entries deep.
* **Read alignment:** the cards are aligned through their read delay (the
  alignment rule above).
* **Configuration:** a simple bus replaces the VME bus, and writes are
  accepted only in the interburst.
* **Details:** byte order and frame timing, saturating counters, the XOFF
  enable mask and synchronizer, and the reset values of the registers.

The original specifies the strobe RAM as 16K x 1, which cannot cover every
combination of 16 bits. This design uses 64K x 1 so that every combination
can be selected, as the original intends.

Not modelled:

* the control CPU;
* the serial-link chips and the optical link to a distant ROC;
* a RAM in the transmission stage whose function is not described;
* the monitor acquisition units (the monitor data is on `mon_data`);
* the local trigger systems themselves.

All RAMs start cleared at time zero, which makes simulation deterministic. The
hardware does not depend on it.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Build and run one with
plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/ts_pkg.sv tb/tb_trigger_supervisor.sv \
          --top-module tb_trigger_supervisor -Mdir obj && obj/Vtb_trigger_supervisor
```

* `tb_trigger_supervisor` runs the whole design at its default parameters. It
  goes through an interburst and a burst of about 50 events, including
  asynchronous L2C results out of order, stale L2C results, NT displaced by
  +-1 and +-2 slots, a fast cluster that overfills the queue, an XOFF period
  and a masked XOFF line.
* It rebuilds every packet from the links and checks each timestamp and word
  against its own model of the trigger logic. It also checks event numbering,
  packet spacing, the trigger and dead-time counters, and that every expected
  trigger was sent, dropped or lost. It runs in about a second.
* `tb_tqb_workload` drives the queue at its working point (depth 3, dt 20 us)
  with random triggers at 5, 7 and 10 kHz, 4000 triggers per rate (about
  7e7 cycles, ~50 s). For each rate it measures the time fraction with
  n = 0..4 triggers in the system and checks it against the M/D/1 values
  it computes itself. It also checks the loss fraction and the dt spacing.
* `tb_tqb` checks the queue cycle by cycle against a reference model. The other
  testbenches check their block against values computed independently.

To change a size, override the module parameters (`TQB_AW`, `DELAY_RESET`,
`N_ROC` on the top; `AW`, `MEM_W` on `input_card`). The fixed widths of the
original (24-bit sources, 30-bit timestamps, 16-bit word) are in `ts_pkg`.

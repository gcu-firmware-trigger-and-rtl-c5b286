# GCU trigger and timing firmware

A large photomultiplier detector reads each group of PMTs through a Global
Control Unit (GCU). The GCU digitises its PMT continuously at 1 GS/s, keeps
the last 20 µs in a ring buffer, and asks the central trigger for a decision
by sending a trigger request *level* upstream every 16 ns. A Back-End Card
(BEC) sits between up to 48 GCUs and the central trigger. It returns trigger
validations that carry the time of the window to read out. The GCU then
copies that window into an event cache, and software pulls the events over
IPbus (Ethernet).

Every GCU time-stamps its data with its own copy of the global time. Most of
this design is therefore about keeping the 48 local clocks equal to the BEC
clock. It does this with a two-step, IEEE-1588-style exchange over the same
synchronous links that carry the trigger, and with a run-time check that all
GCUs report the same time for a broadcast message.

This repository holds synthesizable SystemVerilog for:

- the GCU side of the design: link coding, coarse delays, clock alignment,
  the L1 and L2 buffers, the event builder and the register slave;
- the BEC end of the links: 48 decoders, a synchronisation controller and
  the downstream encoder;
- an IPbus JTAG cable for remote debugging.

## Clocking and line rate

Everything runs on one clock, the 62.5 MHz **slot clock** (16 ns). Each link
carries four line symbols per slot, i.e. 250 Mbaud, on a 4-bit bus
`line_sym[3:0]`. Bit 3 is the first symbol in time. The serializer, the
deserializer and clock-data recovery that would carry these symbols on the
cable are not part of the RTL.

The four symbols of a slot hold two time-multiplexed channels. Each channel
gets two symbols per slot, i.e. one data bit per slot coded as a symbol pair.
One channel carries the trigger information and the other carries framed
messages. A `tdm_swap` input on every receiver chooses which half of the
slot is which, so a link's phase can be fixed by software.

## Upstream link: GCU → BEC (`up_link_tx`, `up_link_rx`)

- **T channel:** the trigger request level, one bit per slot. The trigger is
  the level itself; there is no edge or message.
- **D channel:** 11-bit frames, one bit per slot:

      start(0) H3 H2 H1 H0 D3 D2 D1 D0 P stop(1)

  HHHH is the command and DDDD its data. P is even parity over the 8 payload
  bits; it can be removed with `PARITY_EN = 0`. The channel idles at 1, and
  frames can follow each other every 11 slots.
- **Coding:** both channels are Manchester coded (0 → `10`, 1 → `01`), so the
  line is DC-free. Any other pair is a code error (`sym_err`).

| HHHH | command | DDDD |
|---|---|---|
| 0000 | COMMA | 0000 |
| 0001 | BACK_PRS_ON | – |
| 0010 | BACK_PRS_OFF | – |
| 0011 | DELAY_REQ | – |
| 0100 | TIME | one 4-bit nibble of the local time |
| 0101 | IDLE | 0101 |
| 0110 | TDB | – |

The decoder is kept small because the BEC needs 48 of them.

The D channel rests at 1 between frames. The GCU never sends COMMA, IDLE
or TDB frames by itself; software can send them through register 0x0B.

## Downstream link: BEC → GCU (`ttc_tx`, `ttc_rx`)

The downstream link follows the CERN TTC scheme:

- two time-multiplexed channels, A and B, each biphase-mark coded: the level
  toggles at every bit boundary, and also mid-bit for a 1;
- channel A carries one bit per slot;
- channel B carries frames and idles at 1.

| frame | bits |
|---|---|
| short (broadcast command) | `0 0 D[7:0] P 1` (12 bits) |
| long (addressed) | `0 1 A[13:0] 1 S[7:0] D[7:0] P 1` (36 bits) |

A is the 14-bit GCU address; 0x3FFF is broadcast. S is a sub-address. P is
even parity over the payload; it takes the place of TTC's Hamming bits.

Short-frame commands:

| byte | command |
|---|---|
| 01 | TIME_REQ |
| 02 | EVT_CNT_RST |
| 03 | DAQ_START |
| 04 | DAQ_STOP |
| 05 | TEST_PULSE |
| 06 | SYNC |

Long-frame sub-addresses:

| S | meaning |
|---|---|
| 00–05 | bytes of a 48-bit validation time tag |
| 06 | VALIDATE (read out the window starting at the tag) |
| 10–15 | t1_g bytes |
| 16 | FOLLOW |
| 20–25 | t4_g bytes |
| 26 | DLY_RESP |
| 30 | addressed command: D is one of the command bytes above |

Addressed DAQ_START and DAQ_STOP let the BEC stop a single GCU.

## Keeping time

### Local time

Time is a 48-bit count of 16 ns ticks, which wraps after about 52 days. It
is sent upstream as 12 nibbles. `gcu_local_time` keeps the GCU's count:

- it applies offset corrections as a single step;
- it can reset itself to zero at a programmed time `t_reset`; the reset is
  one-shot and armed by writing its enable;
- it fires a one-slot `test_pulse` when the time equals a programmed value,
  or at once on a broadcast TEST_PULSE.

Scheduled operations like these let every GCU act in the same slot without
a synchronous message.

### Clock alignment (`bec_sync_ctrl` ↔ `gcu_sync_ctrl`)

The BEC starts an alignment with `start_sync`. The exchange then runs:

1. **BEC:** broadcasts SYNC and records `t1_g`, its global time when the
   frame enters the encoder.
2. **GCU:** records `t2_l`, its local time when SYNC is decoded.
3. **BEC:** sends `t1_g` as six long frames, then FOLLOW.
4. **GCU:** on FOLLOW, sends DELAY_REQ upstream and records `t3_l`, its local
   time when the frame enters the encoder.
5. **BEC:** records `t4_g` on reception, then sends it back to that GCU as
   six addressed long frames and DLY_RESP. Responses to several GCUs are
   served lowest link first.
6. **GCU:** on DLY_RESP, computes the offset and adds it to its local time.

The offset is defined as offset = global − local. Let dd and du be the
downstream and upstream link delays. Then:

    t1_g − t2_l = offset − dd
    t4_g − t3_l = offset + du
    offset      = ((t1_g − t2_l) + (t4_g − t3_l) + t_diff) / 2,   t_diff = dd − du

`t_diff` is the known mismatch between the two directions. It is in
register 0x05, in ticks.

Only the timestamps matter, so the time from SYNC to DELAY_REQ may vary.
The exchange runs during data taking, interleaved with triggers and
validations.

This formula is derived from the definitions of the four timestamps. It is
this design's reading, not a formula quoted verbatim. The tests check it
with unequal link delays (GCU coarse delays) and a matching `t_diff`.

Because every delay is in whole ticks, the correction is exact when
dd − du − t_diff is even. Otherwise it is off by half a tick, which rounds
to one tick.

### Alignment check

The BEC starts a check with `start_time_req`, which broadcasts TIME_REQ. All
downstream paths have the same latency, so every GCU sees it in the same
slot:

- each GCU returns the local time of that slot as 12 TIME frames, most
  significant nibble first;
- the BEC compares each enabled link (`port_en`) with the lowest enabled
  link;
- `aligned[i]` is set if the two are within ±1 tick (16 ns);
- a link that did not answer within `TREQ_TIMEOUT` cycles is not aligned;
- `check_done` pulses when the verdict is ready.

Two inputs automate the monitoring:

- A non-zero `check_period` repeats the check every `check_period` cycles.
- With `auto_stop` set, every enabled link found misaligned is sent an
  addressed DAQ_STOP (`stops_sent` counts them). The GCU then stops
  trigger requests and data taking.

Restarting a stopped GCU, after a new alignment (`start_sync`), is left to
software.

### Coarse delays (`coarse_delay`)

Both directions in the GCU pass a programmable delay of 0–63 whole slots.
The latency is delay + 1 cycles. The delays are set in register 0x03 so
that every GCU sees the same total latency. Broadcast commands then act in
the same slot everywhere, and trigger requests from all GCUs arrive at the
BEC aligned.

With both delays at 0, a trigger request reaches the BEC's `trig_level`
5 cycles after `trig_req`:

- 1 cycle in the encoder;
- 2 + 1 cycles in the upstream coarse delay with the register pipeline;
- 1 cycle in the decoder.

## Data path

### L1 ring buffer (`l1_ring_buffer`)

- 1250 words of 256 bits: 320 kbit, or 20 µs of one 16 Gbit/s ADC (16
  samples of 16 bits per slot).
- The FMC brings two ADC chips (`adc_data[0]`, `adc_data[1]`). Register
  0x01 bit 4 selects the one that is buffered.
- Written every slot.
- The write pointer is the time reference: the word with time tag `t` is at
  `wr_ptr − (now − t)`.

### Event builder (`event_builder`)

**Triggers:**

- **Normal mode:** a VALIDATE frame. The window starts at the tag's sample
  and is 90 samples long (90 ns; register 0x04).
- **Autotrigger mode:** a rising edge of the local trigger request starts a
  40-sample window, 2 slots before the edge.

**Event format:** 4 header words of 32 bits (128 bits), then two samples per
word, the earlier sample in bits 15:0.

| word | contents |
|---|---|
| 0 | `{8'hEB, 7'b0, auto, 8'b0, window}` |
| 1 | event number |
| 2 | tag[47:32] |
| 3 | tag[31:0] |

A 90-sample event is 49 words (1568 bits).

**Timing:** each L1 word costs 10 cycles (read, latch, 8 writes). A normal
event is built in about 1 µs and an autotrigger event in about 0.5 µs.

**Waiting and drops:**

- A trigger whose window is still being written waits.
- One trigger can wait while another is built. A third is dropped
  (`busy_drops`).
- A trigger whose data has already left L1 is dropped (`late_drops`).
- A trigger whose event does not fit in the free L2 space is dropped
  (`full_drops`).

EVT_CNT_RST clears the event number.

### L2 event cache (`l2_event_fifo`) and back pressure

- 1024 × 32-bit first-word-fall-through FIFO in block RAM, i.e. 32 Kbit.
- It holds 20 normal events (980 words) or 42 autotrigger events.
- Software pops it word by word at register 0x20.
- Register 0x18 counts the complete events waiting, so software can pull
  them in bunches, e.g. five at a time.
- The count assumes software reads only complete events. The register
  slave finds each event's length from its header word.
- When the fill level reaches `bp_hi` (900 words), the GCU sends
  BACK_PRS_ON upstream.
- When the level falls to `bp_lo` (500 words), it sends BACK_PRS_OFF.
- The BEC keeps a back-pressure flag per link.

Upstream frames compete for the encoder in a fixed priority: DELAY_REQ,
then back pressure, then TIME nibbles, then a software frame (register
0x0B).

## Register slave (`gcu_ipb_regs`)

The GCU registers sit behind a simple IPbus slave bus: the structs
`ipb_wbus_t` and `ipb_rbus_t` in `gcu_tt_pkg`. A strobe is answered with ack
(or err) one cycle later. Word addresses:

| addr | access | contents |
|---|---|---|
| 0x00 | R | identifier 0x06C07760 |
| 0x01 | RW | [0] autotrigger, [1] downstream A/B swap, [2] scheduled clock reset enable, [3] test pulse enable, [4] ADC chip select |
| 0x02 | RW | GCU address [13:0] |
| 0x03 | RW | coarse delays: downstream [5:0], upstream [13:8] |
| 0x04 | RW | windows: normal [7:0] (90), autotrigger [15:8] (40) |
| 0x05 | RW | t_diff (signed ticks) |
| 0x06 / 0x07 | RW | test pulse time, low 32 / high 16 bits |
| 0x08 / 0x09 | RW | clock reset time t_reset, low / high |
| 0x0A | RW | back-pressure levels: on [10:0] (900), off [26:16] (500) |
| 0x0B | W | upstream software frame {HHHH, DDDD} |
| 0x10 | R | [0] synced, [1] DAQ running, [2] back pressure, [3] software frame pending |
| 0x11 / 0x12 | R | local time low / high; the high word is latched by the low read |
| 0x13 | R | last offset correction, low 32 bits |
| 0x19 | R | last offset correction, high 16 bits |
| 0x14 | R | L2 level |
| 0x15 | R | event counter |
| 0x16 | R | late drops [15:0], L2-full drops [31:16] |
| 0x17 | R | busy drops |
| 0x18 | R | complete events in L2 whose readout has not started |
| 0x20 | R | L2 data (each read pops one word) |

Other addresses answer with err.

The IPbus transport itself (Ethernet MAC, UDP/IP, the transaction engine) is
not included. The slave bus is where it connects.

## Remote JTAG cable (`ipb_jtag_tap`)

A small board-control FPGA acts as a network JTAG cable for the main FPGA.
Bit-banging one pin per IPbus transaction is slow. Instead, this slave
executes a whole Xilinx-Virtual-Cable style shift of up to 32 bits per
command:

1. Write the TMS vector (address 1) and the TDI vector (address 2).
2. Write the bit count with bit 8 set (address 0) to start.
3. Poll busy (address 0, bit 31).
4. Read the captured TDO vector (address 3).

Bits go out LSB first. TCK has a half period of `CLK_DIV` cycles (address
4). TDO is sampled on the rising TCK edge. A TCP server that turns XVC
commands into these transactions is PC software and is not part of this
repository.

## BEC link end (`bec_link_end`)

This block holds:

- 48 `up_link_rx` decoders with per-link T/D swap, trigger levels and error
  flags;
- a free-running 48-bit global time counter;
- `bec_sync_ctrl`;
- one `ttc_tx` driving the downstream line shared by all GCUs.

`bec_sync_ctrl` sequences the downstream messages, with this priority:

1. TEST_PULSE;
2. SYNC/FOLLOW;
3. delay responses;
4. TIME_REQ;
5. automatic DAQ_STOPs;
6. frames from software.

It also gathers TIME answers and back-pressure state.

The BEC global time is kept by the same `gcu_local_time` block as on the
GCU, with no offset correction. This gives the BEC two scheduled
operations:

- **Clock reset:** if BEC and GCUs are programmed with the same `t_reset`,
  all clocks restart together and stay aligned.
- **Test pulse:** at `tp_time` the BEC broadcasts TEST_PULSE, so every GCU
  pulses in the same slot. Program `tp_time` earlier by the downstream
  latency.

In a full system the global time would also follow the central timing
distribution. Here it starts at zero on reset.

## Module hierarchy

```
gcu_tt_system                top: one GCU on link 0 of a BEC, JTAG cable beside it
├── gcu_tt_top               GCU firmware
│   ├── coarse_delay (down)  ─ ttc_rx ─ gcu_sync_ctrl ─ gcu_local_time
│   ├── up_link_tx ─ coarse_delay (up)
│   ├── l1_ring_buffer ─ event_builder ─ l2_event_fifo
│   └── gcu_ipb_regs
├── bec_link_end
│   ├── up_link_rx × 48
│   ├── bec_sync_ctrl
│   └── ttc_tx
└── ipb_jtag_tap
gcu_tt_pkg                   shared types, command codes, frame sizes, IPbus structs
```

The other 47 upstream links of the BEC, the downstream line and the JTAG pins
are ports of `gcu_tt_system`.

Default parameters:

| parameter | default |
|---|---|
| `N_GCU` | 48 |
| `WORD_W` | 256 |
| `L1_DEPTH` | 1250 |
| `L2_DEPTH` | 1024 |
| `MAX_DELAY` | 64 |
| `TREQ_TIMEOUT` | 4096 |
| `CLK_DIV` | 4 |

## Simulation

Every block has a self-checking testbench in `tb/`, named `tb_<module>`. It
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog if
it hangs.

`tb_gcu_tt_system` runs the whole design at its default size. It takes the
system through:

- configuration over IPbus;
- DAQ start and stop;
- trigger requests with a fixed-latency check;
- a scheduled clock reset;
- a clock alignment with unequal delays;
- aligned and misaligned alignment checks;
- validated events read back and compared sample by sample;
- back pressure on and off;
- an L2 overflow;
- autotrigger mode;
- scheduled and broadcast test pulses;
- an event counter reset;
- a JTAG shift;
- an automatic DAQ_STOP of a misaligned link;
- a clock reset of BEC and GCU at the same programmed time;
- a TEST_PULSE broadcast scheduled in the BEC;
- periodic alignment checks;
- reading events from the second ADC chip;
- pulling events in bunches of five using the event count.

It counts each of these mechanisms and fails if any never happened. It runs
in well under a second.

`tb_gcu_workloads` runs the readout workloads on the same full-size system.
Software is modelled as a reader that pulls events in bunches of five and
reads one word every 22 slots, which is about the 90 Mbit/s of IPbus. It
covers:

- L1 depth: windows about 18.4 us old are read out, and one 20.8 us old is
  dropped as late. The event builder accepts a 90-sample window up to 1181
  slots (18.9 us) old, so that the copy ends before the 20 us L1 overwrites
  it.
- normal mode: 15 validations at 1 kHz;
- autotrigger mode: 60 triggers at 50 kHz.

At the end no event may have been dropped for lack of L2 space or for a busy
event builder.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -Irtl rtl/gcu_tt_pkg.sv tb/tb_gcu_tt_system.sv \
  --top-module tb_gcu_tt_system -o tb_gcu_tt_system
./obj_dir/tb_gcu_tt_system
```

Replace the testbench name to run a single block. `rtl/gcu_tt_pkg.sv` must
come first; the other modules are found through `-y rtl`. The testbenches
need `--timing`.

## Where this design goes beyond its source

The following come from the source description of the system:

- the overall structure;
- the upstream frame and command table, with Manchester coding and TDM;
- TTC-style coding downstream;
- the two-step alignment exchange and the run-time TIME_REQ check;
- scheduled clock reset and test pulse;
- the 20 µs / 320 kbit L1, the 128-bit header, and the 90- and 40-sample
  windows;
- the 20-event L2;
- 48 decoders per BEC;
- the buffered IPbus JTAG cable.

These are choices made here:

- **Frame details:** start/stop polarity, bit order and even parity
  upstream; the whole downstream frame layout, command bytes and
  sub-addresses (TTC-like, with parity instead of Hamming).
- **Time and timestamps:** the 48-bit time width, and the exact instants at
  which t1, t2, t3 and t4 are taken.
- **Offset formula:** the form given above, derived from the timestamp
  definitions.
- **Thresholds and limits:** the back-pressure thresholds, the coarse-delay
  range, the TIME_REQ timeout, the ±1 tick tolerance (the "within 16 ns"
  requirement), and the monitoring period, which is a register-like input.
- **Data path:** the header contents, sample packing, drop policy and the
  autotrigger pre-trigger of 2 slots.
- **Register maps:** all register maps.
- **Time correction:** the offset is applied as a single step, not a slewed
  rate correction.

Not included:

- the ADC/FMC interface; ADC words arrive already deserialised;
- the DDR3 controller and the 1 s, 2 GB supernova buffer;
- the IPbus Ethernet/UDP transport and the XVC TCP server;
- the line SERDES and clock recovery;
- the central timing distribution that would supply the BEC's global time.

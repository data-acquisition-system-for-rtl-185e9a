# Data acquisition tree for the "Proton" ep-scattering experiment

The experiment measures elastic electron–proton scattering with two gas
detectors: an active hydrogen target built as a time-projection chamber
(TPC, 32 anode channels) that sees the recoil proton, and a forward tracker
(FT, eight cathode-strip chambers, 2016 channels) that sees the scattered
electron. Every channel is digitized continuously by a flash ADC. The
readout has to answer one question cheaply: *which tracker hits belong to
the proton the TPC has just seen?*

The answer is a tree of identical serial links, one shared clock and one
shared 44-bit timestamp:

* The **TPC digitizers (ASF12eP)** watch their channels. A channel above a
  threshold raises a trigger request. The requests travel to the root of the
  tree, where the **Master concentrator** turns them into a "trigger"
  command. The command is broadcast to every board.
* On "trigger" every TPC channel records a window of readings that starts
  *before* the trigger, thanks to a pipeline delay.
* The **FT digitizers (ASF48et)** never wait for the trigger. Each strip
  triggers itself and keeps its recent pulses in a small ring buffer. On
  "trigger" it sends back only the pulses of the last 100 µs.
* The **concentrators (CCB12)** collect the twelve streams under them,
  throttle them with "hold"/"resume", and pack them into checksummed
  packets for the Ethernet side.

Every event carries the timestamp of the board that made it. All counters
start on the same broadcast "start run", so events from different boards
can be matched offline.

This repository holds the synthesizable logic of all of that, from the ADC
deserializer up to the concentrators' output FIFOs, together with
self-checking testbenches.

## The tree

```
                  host commands           output FIFO 0 (to processor / Ethernet)
                        |                        ^
                +---------------+                |
   TR (TL) ---->| Master CCB12  |----------------+
                +---------------+
       SP0..3  /  |  |  \         SP4..7
   ASF12eP x4     |  |  |         Slave CCB12 x4 -- output FIFOs 1..4
   (chained TR)                     SP0..11 of each Slave: ASF48et x12
```

`proton_daq` (rtl/proton_daq.sv) builds this tree:

* 4 ASF12eP boards of 12 channels, on Master SPs 0–3. The TPC's 32
  channels use 8 inputs of each board.
* 4 Slave CCB12s on Master SPs 4–7.
* 12 ASF48et boards of 48 channels under each Slave, 48 in all. That gives
  2304 inputs for the 2016 strips.

The trigger requests of the four ASF12eP boards are ORed along a chain of
auxiliary ports: board 0 → 1 → 2 → 3. The last board drives the trigger
link into the Master's trigger port.

The tree ends at the five concentrator output FIFOs, whose read ports are
outputs of the top. Several parts are not included and appear only as
ports:

* the concentrators' ARM processors and Gigabit Ethernet;
* the analog front end (preamplifiers, shapers);
* the ADCs themselves;
* the NIM ports and the beam monitor.

The ADCs and the analog front end are outside the FPGA.

## One clock, one timestamp, one kind of link

Everything runs on a single 100 MHz system clock. The concentrators
distribute it down the tree together with the data, so every link is
synchronous and needs no clock recovery. The 44-bit timestamp
(`ts_counter`) counts this clock, so it wraps after 2^44 / 100 MHz ≈ 48.9 h.
It is cleared and started by "start run" and holds after "stop run".

A serial link (`sl_tx`/`sl_rx`) carries one bit per clock (100 Mbps) in each
direction, in 20-bit frames:

| bit | 1 | 1 | 16 | 1 | 1 |
|---|---|---|---|---|---|
| field | start = 1 | type (1 = command, 0 = data) | payload, MSB first | even parity over type + payload | stop = 0 |

That is 5 M words/s per link. A pending command always goes before a
pending data word, so a "hold" or a "trigger" never waits behind data. The
receiver drops frames with bad parity or a missing stop bit.

Commands (`proton_pkg::cmd_e`, in the low byte of a command frame):

| code | command | direction | meaning |
|---|---|---|---|
| 1 | START_RUN | down, broadcast | clear and start timestamps, clear trigger windows |
| 2 | STOP_RUN | down, broadcast | stop counting, stop trigger requests |
| 3 | TRIGGER | down, broadcast | record / reload events |
| 4 / 5 | HOLD / RESUME | concentrator → digitizer | stop / restart the data stream |
| 6 / 7 | BUSY_ON / BUSY_OFF | Slave → Master | Slave cannot take more data |

Each concentrator forwards a broadcast to all twelve SPs in the same
cycle. All boards of one tier therefore see it in the same cycle, and a
tier's counters agree exactly. Each tier lower lags by a fixed amount: one
link hop, about 20 clocks of frame time.

## ASF12eP: the triggering TPC digitizer

Each channel (`ep_channel`) is a chain:

1. **`adc_deser`.** The ADS5282 sends each 12-bit reading on one LVDS pair
   at double data rate, six bit-clock periods per sample, framed by a frame
   clock. A shift register in the bit-clock domain assembles the word. A
   toggle plus a two-flop synchronizer hands it to the system clock as a
   one-cycle `sample_valid` strobe, 3–4 clocks after the frame edge. At
   25 MSPS a reading arrives every 4 system clocks.
2. **Trigger request**, on the undelayed readings:
   * `amp_disc`: reading ≥ threshold.
   * `miw`: a moving integrating window. It adds the 11 MSBs of each new
     reading and subtracts the one `width` samples old (width 1–127, 18-bit
     sum, 128-entry history).
   * `miw_disc`: the 15 MSBs of that sum ≥ threshold.
   * `tr_select` picks amplitude, window, both (coincidence) or off, per
     channel. This lets only chosen anode rings trigger.
3. **`delay_line`**: up to 1023 samples of delay (41 µs at 25 MHz). With a
   delay of D samples the recorded window starts D samples before the
   trigger. The intended window is 15 µs before and 25 µs after, which is
   375 + 625 samples.
4. **`ep_event_builder`**: on "trigger" it writes a 5-word header and `len`
   delayed readings into the channel's 8K-word FIFO. The FIFO word carries
   a 17th bit that marks the last word of the event.

The board (`asf12ep`) moves whole events from the 12 channel FIFOs into a
32K-word device FIFO with a round-robin `event_merger`. The events are never
interleaved. `dig_sp` then sends the device FIFO upstream and stops while
held.

Two overload rules decide what happens under pressure:

* A trigger that arrives while the channel is still recording is
  **ignored** (counted in `n_ignored`).
* An event that would not fit in the free space of the channel FIFO is not
  started. It is counted as **dropped** (`n_dropped`). A started event is
  always complete.

The board's trigger output is registered, one clock per board in the
chain: `tr_out = tr_in | (running & any channel request)`.

## ASF48et: self-triggered tracker channels with look-back

This part is the least obvious one. A tracker channel (`et_channel`) has
the same deserializer, discriminator and delay line as a TPC channel, but:

* The rising edge of the discriminator is a **self-trigger**. It starts the
  capture of `len` delayed readings, so the event holds baseline before the
  pulse and its maximum.
* `et_ring_buffer` writes the readings back-to-back into a **1024-reading
  circular memory**. The event's self-trigger timestamp and start position
  go into a **16-entry descriptor queue** once the event is complete. The
  ring stores no headers, so the memory holds only readings.
* When a new event reserves ring space, the buffer discards the descriptors
  of the events it will overwrite. Every queued descriptor therefore points
  at intact readings, and old events age out silently.
* On "trigger" the buffer walks the descriptors from the oldest. It sends
  every event with `t_trigger − t_event ≤ window` (a register in clock ticks;
  100 µs = 10 000). Each event goes out with the same 5-word header as a TPC
  event. Events stay in the ring, so overlapping windows of two triggers
  both get them.
* An event still being captured when the trigger arrives is sent as soon
  as it is complete. One further trigger that arrives during a reload is
  remembered and served next.
* A self-trigger is **lost** (counted in `n_lost`) in three cases:
  * the channel is still capturing;
  * the queue is full;
  * its readings would overwrite the event being sent.

`asf48et` merges the 48 channels into a 16K-word output FIFO with the same
merger and serial port as the TPC board.

Sizing: a typical event of 80 readings leaves room for 12 events per
channel. The maximum event of 960 readings fits one at a time. How many
events a 100 µs window really needs depends on the strip rates, which are
not known here.

## CCB12: concentrator, Master and Slave

`ccb12` is one module with a `MASTER` parameter: Master and Slave are the
same hardware with different roles.

* **Downstream ports (`ccb_sp`).** Each SP sends the broadcasts down and
  stores the digitizer's data in a 16K-word input FIFO. It sends "hold"
  when the FIFO passes 3/4 full and "resume" when it falls below 1/4. The
  margin covers words still in flight.
* **Packets (`ccb_packetizer`).** The sources are visited round-robin. A
  source holding n words gets a packet of min(n, 1024) payload words once
  the 32K-word output FIFO has room for the whole packet. One word is
  written per clock.
* **Master trigger (`master_trigger`).** The trigger request is
  synchronized and edge-detected. Each request during a run is
  time-stamped. It becomes a TRIGGER broadcast 3 clocks after the edge
  unless the tree is busy or the previous trigger was less than `min_gap`
  ticks ago. Every request, used or not, is stored as a 3-word record.
  These records form the Master's 13th packet source (SP number 12).
* **Busy.**
  * A Slave reports BUSY_ON/BUSY_OFF on its upstream port when its state
    changes. A Slave is busy while any of its SPs holds its digitizer or
    its output FIFO is nearly full.
  * On the Master, SPs marked in `sp_slave` carry only this status, no
    data; each Slave ships its own packets to Ethernet.
  * The Master refuses triggers while any Slave is busy, any of its own SPs
    is held, or its own output FIFO is nearly full. Refusals are counted
    in `n_busy_rej`.

## Data formats

Event (both digitizers), 16-bit words:

| word | content |
|---|---|
| 0 | `{2'b11, channel[5:0], 8'h00}` |
| 1 | `{4'h0, len[11:0]}` |
| 2–4 | `{4'h0, ts[43:32]}`, `ts[31:16]`, `ts[15:0]` |
| 5… | `{4'h0, reading[11:0]}` × len |

Packet:

| word | content |
|---|---|
| 0 | `{4'hA, sp[3:0], in_kw[7:0]}`: source number, kilo-words in its input FIFO |
| 1 | `{out_kw[7:0], 8'h00}`: kilo-words in the output FIFO |
| 2 | packet number (per source) |
| 3–5 | header timestamp |
| 6 | payload length n |
| 7… | n payload words |
| +0..2 | trailer timestamp |
| +3 | checksum: 16-bit sum of all earlier words of the packet |

A packet may split an event. The consumer reassembles each source's payload
stream and parses events from it. Trigger record (Master source 12):
`{3'b111, used, ts[43:32]}`, `ts[31:16]`, `ts[15:0]`.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `NEP`, `EP_NCH` | 4, 12 | TPC boards, channels per board |
| `EP_CH_FIFO`, `EP_DEV_FIFO` | 8192, 32768 | TPC channel / device FIFO words |
| `NSLV`, `ET_PER_SLV`, `ET_NCH` | 4, 12, 48 | Slaves, FT boards per Slave, channels per FT board |
| `ET_RING`, `ET_OUT_FIFO` | 1024, 16384 | FT ring readings, FT output FIFO words |
| `DELAY_DEPTH` | 1024 | pipeline delay memory (samples) |
| `CCB_IN_FIFO`, `CCB_OUT_FIFO`, `PKT_MAX` | 16384, 32768, 1024 | concentrator FIFOs, largest packet payload |

Run-time settings are input ports:

* TPC per board: `ep_cfg`, with thresholds, window width and threshold,
  delay and length.
* TPC per channel: `ep_tr_mode`.
* FT per board: `et_cfg`, with threshold, delay, length and window.
* Master: `min_gap`.
* Host commands: `host_cmd_*`.

Each board has status counters for events, drops, ignored triggers,
captured, lost and sent events, holds and packets.

## Budget at the default sizes

| case | needed | built |
|---|---|---|
| TPC event, typical 1000 readings | 1005 words | 8192-word channel FIFO |
| TPC event, maximum 4000 readings | 4005 words/channel, 48 060/board | 8192/channel + 32 768 device FIFO |
| Link load, 50 Hz × 12 ch × 1005 words | 0.60 M words/s | 5 M words/s (12 %) |
| Link load, 50 Hz × 12 ch × 4005 words | 2.4 M words/s | 5 M words/s (48 %) |
| FT event 80 / 960 readings | 12 / 1 events per channel | 1024-reading ring, 16 descriptors |
| 100 µs look-back | 10 000 ticks | 16-bit window (655 µs max) |
| 12 streams into one concentrator | 60 M words/s | 100 M words/s packetizer |

## Simulating

The testbenches use plain Verilator 5 (two-state, `--timing`). For example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/proton_pkg.sv \
    tb/tb_proton_daq.sv --top-module tb_proton_daq -Mdir obj_daq
obj_daq/Vtb_proton_daq
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog. `tb/ads5282_model.sv` is a behavioural ADC channel: it produces
bit clock, frame clock and DDR bits with the real 12-conversion latency.
The unit testbenches drive it with pulse shapes and compare against
readings worked out independently.

| testbench | what it shows |
|---|---|
| `tb_fifo_sync`, `tb_sl`, `tb_ts_counter` | FIFO order/flags; link frames, command priority, parity rejection; counter start/stop |
| `tb_adc_deser` … `tb_delay_line` | deserialized readings equal the ADC model's; discriminators, window sums and delays against reference models |
| `tb_ep_event_builder`, `tb_ep_channel`, `tb_asf12ep` | header, timestamp, exact reading window, ignore/drop rules, trigger chain |
| `tb_et_ring_buffer`, `tb_et_channel`, `tb_asf48et` | exactly the events inside the window are sent, overwrite and loss rules |
| `tb_event_merger`, `tb_dig_sp`, `tb_ccb_sp`, `tb_ccb_packetizer`, `tb_master_trigger`, `tb_ccb12` | no interleaving, hold/resume, packet layout and checksums, busy refusal, trigger records |
| `tb_proton_daq` | the whole tree at reduced size (2 channels per board, 2 FT boards per Slave, small FIFOs) |
| `tb_proton_daq_full` | the whole tree at the default size: one start, one trigger, complete readout |

`tb_proton_daq` runs free flow, then stalls two output FIFOs, then drains.
It counts each mechanism and fails if one never occurred:

* trigger, ignored trigger, dropped event;
* hold and resume, busy Slave, busy refusal;
* FT self-trigger, lost self-trigger, window reload;
* packets on all five concentrators.

It also parses every packet and event that comes out. `tb_proton_daq_full`
uses one ADC model per board (channel 0), with the other inputs at zero.
It checks that one trigger gives 48 TPC events with channel numbers 0–47,
and that the FT events received equal those the boards report sent.

The default-size tree has 48 TPC and 2304 FT channels, so
`tb_proton_daq_full` is slow to build. Verilator takes about 7.5 minutes
to build it with 8 parallel compile jobs, and more than 10 minutes with 2.
The simulation itself, 0.9 ms of operation, then takes about 80 s. It
passes. The end-to-end test meant for routine use is therefore
`tb_proton_daq`, at the reduced size described above. The largest size
simulated is the full default tree.

## Where this design departs from, or goes beyond, the system description

The description says what each board does. It gives the blocks of a
digitizer channel, the FIFO sizes, the rates and the window lengths. It
does not give encodings or protocols. These parts are choices of this
design:

* The link frame format and the command codes.
* The event header, packet and trigger-record layouts, and the checksum
  type.
* The hold/resume watermarks (3/4 and 1/4).
* The busy rule, including the BUSY_ON/BUSY_OFF status frames from the
  Slaves. The original only says triggers are made from requests.
* The rules for ignored triggers, dropped events and lost self-triggers.
* The descriptor queue of the ring buffer and its 16-entry size.
* The maximum pipeline delay (1024 samples).
* The trigger spacing `min_gap`.
* The ASF48et sample rate, assumed the same scheme as the ASF12eP.

Other differences:

* **Firmware versus logic.** In the original concentrator the packing and
  forwarding run partly on an ARM processor. Here the packing is logic,
  and forwarding to Ethernet is left out.
* **Configuration** is by input ports. The description does not say how
  thresholds and windows reach the boards.
* **FT boards per Slave.** The overview drawing shows two FT boards under
  each Slave but labels them "ASF 1-12" … "ASF 37-48". The top therefore
  has twelve per Slave (`ET_PER_SLV = 12`). Smaller values leave the upper
  SPs of a Slave idle.
* **Timestamp alignment.** Commands travel one link hop per tier. The TPC
  boards' and Slaves' counters therefore run one hop (about 20 clocks)
  behind the Master's, and the FT boards' counters run two hops behind.
  "trigger" travels the same path as "start run", so within each board the
  trigger time and the event times agree. Offline matching across tiers
  must subtract the fixed offset.
* **Not built:**
  * the NIM test and trigger ports (their use is not described);
  * slow control and the beam monitor;
  * the analog front end and the ADC chips (a behavioural ADC model is
    used in the testbenches).

## File map

* `rtl/proton_pkg.sv` holds the shared types: commands, trigger modes,
  configuration structs and the header helper.
* Each other `rtl/*.sv` file holds one module. The files are listed above
  under the board they belong to.
* `tb/tb_<module>.sv` tests that module.
* `tb/ads5282_model.sv` is the ADC model.

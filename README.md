# 10 Gigabit Ethernet data injector for the LHCb DAQ

This design is an FPGA traffic generator that acts like a readout board of the LHCb
experiment. The readout supervisor accepts an event. A real readout board would then send
that event's detector data to a node of the High Level Trigger (HLT) farm. The injector
sends data for the same event from another source: dummy data here, simulated events
from a storage system later. The DAQ network and the HLT farm cannot tell the
difference, so the whole online chain can be tested with a known data flow, in parallel
with normal running.

On the network the events travel as **MEP over IPv4 over Ethernet**. MEP
(Multi-Event Packet) is LHCb's light, UDP-like transport. One MEP carries the data of
several consecutive events for one HLT node. The datapath is 64 bits wide. At
156.25 MHz, one beat per cycle is the 10 Gb/s line rate.

## The pipeline

```
 trigger_emulator ─┐
 ext_trig_* ───────┴─► trigger FIFO ─► mep_core ◄──► event_source
   (TTC receiver)       (sync_fifo)      │  (formatting)    (reading)
                                         ▼
                                   ip_fragmenter ─► ip_tx ─► eth_tx ─► tx_* to the 10GbE MAC
                                     (encapsulating)                    (sending)
```

The four stages (reading, formatting, encapsulating, sending) each work on their own
packet at the same time. Each core has the same inner shape: a state machine, the
*control unit*, drives registers, counters and small memories, the *processing unit*.
Between stages, packets move as streams of `beat_t` (`injector_pkg`):

| field   | meaning |
|---------|---------|
| `data`  | 8 bytes, byte 0 in bits 63:56 (network order) |
| `sop`, `eop` | first and last beat of a packet |
| `empty` | unused bytes at the end of the `eop` beat |

Each stream also has a `valid`/`ready` pair. A beat moves when both are high, as on the
Avalon-ST interface of the MAC. `tx_ready` from the MAC can hold back the whole pipeline.

## Fragmenting before the IP core

This is the main idea of the design. An IP datagram larger than the link MTU (maximum
transfer unit) must be split into fragments. A standard IP core does this itself, so it
must store whole datagrams. This injector only sends, so the split is done earlier.
`ip_fragmenter` sits at the output of the MEP core and cuts each MEP, while it streams,
into pieces of `MAX_IP_PAYLOAD` = 1480 bytes. The last piece is shorter. 1480 is a
1500-byte MTU less the 20-byte IP header.

The IP core `ip_tx` then only adds a header. It knows nothing about fragmentation or
datagrams. To keep the headers of one datagram consistent, the fragmenter gives the IP
core a descriptor with each piece (`frag_desc_t`):

- payload length of the piece
- fragment offset, in 8-byte units
- more-fragments flag
- IP identification: one value per MEP, from a 16-bit counter
- destination address

The fragmenter belongs to the MEP core's processing unit. It is a module of its own so
that it can be tested alone, and the top instantiates it directly after `mep_core`.
1480 is a multiple of 8, so every cut falls between beats and the data passes straight
through. No stage stores more than a few beats of a packet. A whole MEP must still fit
in one IP datagram, so `mep_core` never builds a MEP larger than 65515 bytes.

## Packet formats

All fields are big-endian.

**MEP** (built by `mep_core`):

| bytes | field |
|-------|-------|
| 0–3   | event ID of the first event |
| 4–5   | number of events in the MEP |
| 6–7   | MEP length in bytes, this header included |
| 8–11  | partition ID (`cfg_partition`) |
| then, per event: 2 + 2 | low 16 bits of the event ID, body length in bytes |
| then  | the event body |

**IPv4** (built by `ip_tx`):

- version 4, header length 5 words, TOS 0
- total length, identification, MF flag and offset, all from the piece descriptor
- TTL 64, protocol 0xF2 (MEP)
- header checksum, computed combinationally
- source address `cfg_src_ip`: the readout board being imitated

**Ethernet II** (built by `eth_tx`):

- destination MAC = `cfg_dst_mac_prefix` (24 bits) followed by the low 24 bits of the
  destination IP. The injector therefore needs no ARP.
- source MAC `cfg_src_mac`
- EtherType 0x0800
- The MAC adds preamble, FCS and the padding of short frames.

## Byte alignment

The headers are 12, 4, 20 and 14 bytes long, so the payload rarely starts on an 8-byte
boundary. Two small blocks keep the stream packed:

- **`unit_packer`** (inside `mep_core`) takes pieces of one or two 32-bit units and
  emits full 64-bit beats. It holds back at most one unit. Event bodies are a multiple
  of 4 bytes long, as LHCb raw data is, so 32-bit units are enough. If a packet ends
  with a unit still held, one extra beat carries it out with `empty = 4`.
- **`hdr_prepend`** (used by `ip_tx` with 20 bytes and `eth_tx` with 14) sends the
  whole 8-byte words of the header first. The other R = header mod 8 bytes go in front
  of the payload. Each output beat is then R carried bytes plus the first 8−R bytes of
  the input beat, and the last R input bytes carry into the next beat. If the last input
  beat leaves no room for its carried bytes, one tail beat is added. After the header,
  the payload moves at one beat per cycle.

## Triggers

There are two trigger sources, chosen by `cfg_ext_trigger`:

- **`trigger_emulator`**: one accept every `cfg_period` cycles, with consecutive event
  IDs. The destination node changes after every `cfg_pf` events (one MEP) and cycles
  round robin over `cfg_nodes` IP addresses starting at `cfg_base_ip`.
- **`ext_trig_*` ports**: where a TTC receiver (TTCRx) would deliver the accept, the
  event ID and the destination node.

The readout supervisor does not wait, so a trigger is always taken at once. It goes into
a 64-entry FIFO. A trigger that finds the FIFO full is lost and counted in
`stat_trig_dropped`.

`mep_core` takes triggers from the FIFO until it has `cfg_pf` events. It closes a MEP
early if the next event would push it past the datagram limit. The MEP goes to the
destination of its first event. A MEP with fewer than `cfg_pf` events waits for more
triggers, unless the size limit closes it.

## Dummy events

`event_source` stands in for the storage system. The length of event *id* is

    len = cfg_len_base + 4 * (((id * 0x9E3779B1) >> 16) & cfg_len_mask)   (low 16 bits of the hash)

rounded down to a multiple of 4 and kept between 4 and 65496 bytes. Body word *k* is
`{id, 16'h0, 16'(8k)}`. The length is available combinationally before the body is
read, as from an index, so the MEP header can be written before the data.

## Timing and rate

- Bodies, MEPs, pieces and frames all stream at one beat per cycle.
- Each MEP costs `cfg_pf` cycles to collect triggers, 2 header cycles and 1 cycle per
  event.
- A frame's beats include its Ethernet and IP headers. On top of those beats, each
  frame costs about one idle cycle for the per-packet handshakes.
- The average LHCb event is 35 kB. With `cfg_pf = 1`, a 35000-byte event becomes a
  35016-byte MEP in 24 frames. In simulation two such events took 9043 cycles: 34.6 kHz
  at 156.25 MHz. A full 10 Gb/s link carries about 35 kHz of such events, and the HLT
  farm needs more than 2 kHz.
- On the wire, each frame also carries preamble, FCS and an inter-frame gap, 24 more
  bytes. A 10 Gb/s link then carries about 34.3 kHz of 35 kB events, so the injector
  keeps up with the link. `tb_workload_35kb` checks this. At 34.5 kHz of triggers the
  FIFO never holds more than the trigger just taken. At 40 kHz the queue grows, but no trigger is lost
  over 20 events.
- The clock frequency is an assumption; the design has no clock-specific logic.

## Top-level ports (`injector_top`)

| group | ports |
|-------|-------|
| clock, reset | `clk`, `rst_n` (synchronous, active low) |
| run setup | `cfg_enable`, `cfg_ext_trigger`, `cfg_trig_period`, `cfg_trig_count` (0 = endless), `cfg_first_id`, `cfg_pf` (1..`MAX_PF`), `cfg_nodes`, `cfg_base_ip`, `cfg_partition`, `cfg_len_base`, `cfg_len_mask`, `cfg_src_ip`, `cfg_src_mac`, `cfg_dst_mac_prefix` |
| external trigger | `ext_trig_valid`, `ext_trig_event_id`, `ext_trig_dest_ip` |
| MAC transmit | `tx_valid`, `tx_ready`, `tx_data`, `tx_sop`, `tx_eop`, `tx_empty` |
| counters | `stat_trig_issued` (by the emulator), `stat_trig_accepted`, `stat_trig_dropped`, `stat_meps`, `stat_frames`, `stat_trig_fifo_level` |

Parameters: `MAX_PF` = 16, `TRIG_FIFO_DEPTH` = 64, `MAX_IP_PAYLOAD` = 1480 (a multiple of 8).

The `cfg_*` ports would in practice be registers written by the experiment control
system. Change them only while the injector is idle. `cfg_pf` is an exception: it may
change while a MEP waits for events.

## What is outside this RTL

- **10GbE MAC, PHY and SFP+:** vendor IP. `tx_*` is the MAC's transmit stream.
- **TTC receiver:** an external board and ASIC. Its trigger outputs connect to
  `ext_trig_*`.
- **Storage access:** reading simulated events by iSCSI, or from a disk over PCI. Not
  designed; `event_source` produces dummy data instead.
- **Control-system interface:** the configuration is plain input ports.
- **Synchronisation with the supervisor and with other injectors:** no mechanism is
  specified beyond taking every trigger as it comes.
- **TCP send core and receive path:** a possible later transport. Only MEP is built.

## Choices this design makes

The overall architecture is fixed: the pipeline, the MEP/IP/Ethernet stack, fragmenting
at the MEP core output with a send-only IP core, and emulated triggers. The following
details are this design's own choices:

- the MEP field layout (the usual LHCb MEP convention) and IP protocol number 0xF2
- the 64-bit Avalon-ST style stream, the clock, and synchronous reset
- the piece size of 1480 bytes and per-MEP IP identification
- the MAC address mapping without ARP
- the FIFO depth, and dropping and counting triggers on overflow instead of throttling
  the supervisor
- the dummy-data formula, and closing a MEP early at the datagram size limit
- the trigger emulator's period and round-robin node scheme

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/tb_model_pkg.sv` is a reference model of the
formats. It builds expected MEPs, IP headers and Ethernet headers as byte queues,
independently of the RTL. To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/injector_pkg.sv tb/tb_model_pkg.sv tb/tb_injector_top.sv \
    --top-module tb_injector_top
obj_dir/Vtb_injector_top
```

Replace `tb_injector_top` with `tb_mep_core`, `tb_ip_fragmenter`, `tb_ip_tx`,
`tb_eth_tx`, `tb_hdr_prepend`, `tb_unit_packer`, `tb_event_source`,
`tb_trigger_emulator`, `tb_sync_fifo` or `tb_workload_35kb`.

`tb_injector_top` uses the top's default parameters. A model MAC with random `tx_ready`
takes the frames. The testbench checks every Ethernet and IP header, reassembles the
datagrams and compares each MEP byte for byte with the model. It makes each mechanism
happen at least once and fails if one never does:

- MEPs with several events
- IP fragmentation
- a MEP closed early at the size limit
- trigger FIFO overflow
- MAC back-pressure
- the external trigger input
- frames ending in a partial beat

It also measures the rate for 35 kB events.

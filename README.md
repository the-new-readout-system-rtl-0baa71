# LKr calorimeter readout: CREAM, TTC-LKr, trigger sums and L0 trigger processor

This is synthesizable SystemVerilog for the digital readout of a 13,000-channel
liquid-krypton calorimeter. The calorimeter is sampled without dead time at
40.08 MHz. Every sample is kept for several milliseconds until a first-level
trigger (L0) decision arrives. Triggered samples are then kept for seconds until
the PC farm asks for them (L1 request) over Ethernet.

A readout board (CREAM) handles 32 channels. It does four jobs:

1. It writes every 25 ns slice of its 32 channels into a circular buffer.
2. On an L0 trigger, it copies a window of slices into an event buffer.
3. It answers the farm's Multi-Request Packets (MRP) with one Sub-Detector
   Event (SDE) UDP packet per requested event.
4. Every 25 ns, it sends two 16-channel energy sums to the L0 trigger
   processor over a serial Trigger Sum Link.

A crate controller (TTC-LKr) turns the experiment's TTC trigger stream into
backplane strobes. It also gathers the boards' CHOKE and ERROR lines. The L0
trigger processor looks for energy peaks in the map of tile sums.

The top module, `lkr_readout_top`, is one slice of this system:

- the TTC-LKr;
- one CREAM in slot 0;
- the two TELDES receivers of that CREAM's trigger sums;
- an L0 trigger processor whose map holds those two sums plus the tiles of
  the other boards, which come in on a port.

```
 TTC A/B ──► ttc_lkr ──bp_l0, bp_ttype, resets──► cream ──txd/tx_en──► Ethernet PHY
 FP/VME/gen ─┘   ▲                                 │  ▲
                 └──────── CHOKE / ERROR ──────────┘  └── MRP bytes (rx_*)
                                                    │
                                   tsl_out[1:0] ────┴──► teldes_deser ×2 ──► lkr_l0tp
```

## Clocking

The whole design runs on one clock with clock enables.

- **Core clock:** 18 clocks per 25 ns sample tick, so 721 MHz for a 40.08 MHz
  sample rate.
- **ADC lines:** each 14-bit ADC sample arrives serially, one bit per core
  clock, in 14 of the 18 clocks. The frame line marks the MSB.
- **Sample tick:** the `valid` of the first ADC receiver is the tick of the
  whole board.
- **Trigger Sum Link:** each of the two lines carries one 18-bit frame per
  tick: start bit, 16 data bits LSB first, stop bit.
- **TTC strobe:** `ttc_strobe` marks one TTC bit period.
- **Data Link:** `phy_byte_en` marks each byte slot of the 1 Gbit/s link. It
  must not come more often than every third clock.

A real board would use separate clock domains. Here, every rate relation
(one slice, two sums and one TTC bit per tick) is exact, and so are the
latency numbers below.

## The CREAM data path

### Circular buffer and timestamps

The four 8-channel ADC receivers (`adc_deser`) shift in 14 bits per channel.
Each receiver locks on its frame line. The 32 samples are widened to 16 bits
and form one 512-bit slice.

The slice is written into `circular_buffer` at the address given by the low
bits of the 32-bit timestamp. The timestamp counts ticks and can be reset
from the backplane. The buffer has 2^19 slices, which is 256 Mbit or 13.1 ms
of history. The largest L0 latency it can serve is therefore 13.1 ms; the
system needs about 1 ms.

### Trigger pairing

The backplane delivers the trigger in two parts: an L0 strobe, then, a few
ticks later, its 6-bit type. This part is the least obvious one.

- `l0_trigger_ctrl` gives each strobe an event number and the timestamp of
  that moment.
- It puts the pair in a small pending queue.
- When a type arrives, it joins the oldest untyped strobe, and the complete
  trigger `{event, timestamp, type}` enters the 16-entry L0 trigger queue.
- A strobe or trigger that finds its queue full is lost. `lost` pulses and
  ERROR is raised.

### Extraction into the L0 buffer

`l0_extractor` takes one trigger at a time. It copies the slices at
`timestamp - latency + i`, for `i < nsamp` (nsamp up to 256), one slice per
clock, into the next free space of the L0 buffer.

The L0 buffer is a ring of slices. Its directory has 2^24 entries, indexed by
the low bits of the event number. Each entry holds the event header and the
event's start address.

Extraction cost and trigger types:
- A trigger takes nsamp + 3 clocks, which is 11 clocks for 8 samples.
- A trigger type whose bit in `cfg.tt_readout` is clear stores the header
  only, in 2 clocks.
- At the system's 1 MHz L0 rate there are 720 clocks per trigger.

Configuration rule: the window must end no later than the trigger time
(its last slice is `timestamp - latency + nsamp - 1`), so `latency >= nsamp`.

## Read-out

### Multi-Request Packets

`mrp_rx` parses each received Ethernet/IPv4/UDP frame. It accepts the frame
if the destination IP is the board's own address or its multicast group, and
the destination port is `cfg.mrp_port`.

The UDP payload is:
- a 16-bit count;
- then 32-bit event numbers, of which the low 24 bits are used.

At most 100 requests are taken per packet. Each request keeps the sender's
IP and MAC address, and the SDE goes back to that sender.

When the request queue (128 entries) is full, `mrp_rx` waits. If a further
request arrives while it is still waiting, that request is dropped and raises
ERROR.

### SDE packets

`sde_tx` serves one request at a time:

1. It looks up the event in the directory.
2. With zero suppression on, it scans the event to find the channels with any
   sample above `cfg.zs_threshold`.
3. It streams the Ethernet, IPv4 and UDP headers (42 bytes; the IPv4 checksum
   is computed, the UDP checksum is 0).
4. It streams a 16-byte event header.
5. It streams the samples, slice by slice: two bytes, big-endian, per kept
   channel.

| bytes | event header field |
|-------|--------------------|
| 0 | flags: bit 0 event found, bit 1 zero suppression applied |
| 1-3 | event number |
| 4-7 | timestamp (25 ns units) |
| 8 | trigger type |
| 9 | 0 |
| 10-11 | samples per channel |
| 12-15 | kept-channel mask (bit 31 first) |

An event that has been overwritten, or was never taken, is answered with the
header only and flag bit 0 clear. A 256-sample event is about 16 kB, which
needs jumbo frames.

### L0-readout and continuous modes

- **L0-readout mode** (`cfg.l0_readout`): every stored event is queued at
  once, addressed to `cfg.dest_ip` and `cfg.dest_mac`.
- **Continuous mode** (`cont_start`): the trigger controller issues internal
  triggers every nsamp ticks until 65536 samples per channel are covered.
  - The windows are contiguous.
  - Backplane strobes are ignored meanwhile, so these events are numbered
    consecutively.
  - They are not pushed one by one into the request queue; that would
    overflow it. A counter of pending event numbers feeds them in instead, and
    only while the queue is below half full. This keeps a continuous
    acquisition from raising CHOKE.

### Ethernet transmit

- `igmp_tx` builds the IGMPv2 membership report that joins the MRP multicast
  group (`igmp_join`).
- `eth_mac_tx` arbitrates between the IGMP and SDE frames, with IGMP first.
- It adds the preamble, pads frames to 60 bytes, appends the CRC-32 and keeps
  a 12-byte gap between frames.
- The output is a GMII-like byte interface (`txd`, `tx_en`) towards the PHY.

### CHOKE and ERROR

`choke_error` raises CHOKE when the trigger queue or the request queue is
three-quarters full. It drops CHOKE again only when both are at a quarter or
less.

ERROR is set by any of:
- a lost trigger;
- a dropped MRP request;
- an automatic request that found the queue full.

It stays set until `err_clear`.

## Trigger sums and TELDES

`trigger_sum` handles channels 0-15 and, in a second instance, 16-31:

- **Per channel:** it computes `max(0, sample - ped) * gain >> 11`. The gain is
  12 bits, with 2048 meaning 1.0.
- **Sum:** it adds the 16 results and saturates at 18 bits.
- **Output:** bits 17:2.
- **Latency:** 2 clocks.

`ds92lv16_ser` frames each sum like a DS92LV16 serializer. While `tsl_sync`
is high it sends the lock pattern: nine 1s, then nine 0s.

`teldes_deser` hunts for that pattern, then checks the start and stop bits of
every frame. It drops lock on a framing error.

## L0 trigger processor

`lkr_l0tp` takes a map of ROWS x COLS tile sums (32 x 32 by default) every
tick. It keeps three maps, so that it can examine the middle one. A tile is a
peak if all of these hold:

- it is at or above the threshold;
- it is a maximum in time: above the previous map, not below the next one;
- it is a maximum horizontally: above its left neighbour, not below its right
  one;
- it is a maximum vertically: above the tile below, not below the tile above.

The horizontal and vertical steps are separate pipeline stages.

Outputs:
- the peak map, the number of peaks and their summed energy;
- the total energy and the four quadrant energies;
- the examined map, which gives each peak's energy;
- its timestamp, which gives the peaks' time.

The outputs appear three clocks after the next map arrives.

In the top, the map is refreshed whenever this CREAM's sums arrive. It is
stamped with the CREAM's timestamp, which is the arrival time, a few ticks
after the samples.

## TTC-LKr

`ttc_decoder` and `ttc_lkr` handle the TTC stream.

- **Channel A:** a 1 is an L0.
- **Channel B:** short broadcast frames:
  - start bit 0, format bit 0;
  - 8 data bits, MSB first;
  - 5 Hamming check bits;
  - stop bit 1.
- **Long-format frames** (format bit 1) are skipped.
- **Check bits:** h0 = d0^d1^d2^d3, h1 = d0^d4^d5^d6, h2 = d1^d2^d4^d5^d7,
  h3 = d1^d3^d4^d6^d7, h4 = parity of d and h3..h0. A frame that fails the
  check is dropped and flagged on `ttc_ham_err`.
- **Data bits:** bit 0 is the timestamp reset, bit 1 the event-counter reset,
  and with both clear, bits 7:2 are the trigger type.

`cfg_src` chooses the trigger source:

| `cfg_src` | source |
|-----------|--------|
| 0 | TTC |
| 1 | front panel |
| 2 | VME register |
| 3 | internal generator: one L0 every `gen_period` strobes |

The controller ORs the 16 slots' CHOKE and ERROR lines under a slot mask and
sends the result to the central trigger processor.

## Configuration

All run settings are one packed struct, `cream_cfg_t` in `cream_pkg`. A real
board writes them over VME. The struct holds:

- per-channel pedestals and gains;
- the L0 latency and the number of samples;
- the trigger-type readout mask;
- the mode bits, the zero-suppression threshold;
- the board's MAC and IP, the multicast group, the ports;
- the default destination.

## Sizes, and where this design departs from the original system

| quantity | built | original |
|----------|-------|----------|
| channels per board, ADC bits | 32, 14 | same |
| circular buffer | 2^19 slices = 256 Mbit, 13.1 ms | 256 Mbit, 12.5 ms quoted |
| L0 buffer | 2^25 - 1 slices (2 GB, 4.2 s at 1 MHz x 8 samples) | 255 x 256 Mbit (16 s) |
| samples per trigger | up to 256 | up to 256 |
| requests per MRP | 100 | 100 |
| continuous mode | 65536 samples per channel | same |
| slots per crate | 16 | 16 (a passage also mentions 20 lines) |

What differs from the original system:

- **L0 buffer size.** It is limited by the 2^31-byte limit on a single memory
  object in one of the two front ends used. It holds about a quarter of the
  original's duration: L0 buffer workloads longer than 4.2 s at 1 MHz do not
  fit.
- **DDR3 storage** is replaced by on-chip memory arrays, with no refresh or
  bank timing.
- **Analog front end and external parts are not modelled.** This covers the
  shaper, ADCs, DACs, pulser and VME bus, the Ethernet PHY and switch, and the
  optical TTC receiver.
- **Trigger types.** Only one action per type is configurable: extract the
  samples or not.
- **Ethernet formats.** The MRP and SDE byte layouts, the UDP ports, the TTC
  frame details and the DS92LV16 framing are this design's own, where the
  original specifications were not available.
- **L0 trigger processor.** It is one unit over the whole map. The original
  spreads the work over several boards, and the exact peak rule is not
  public.
- **L0-readout mode** can send all events only at modest rates. 1 MHz x 8
  samples needs 594 MB/s against the link's 125 MB/s.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_adc_deser`, `tb_trigger_sum`, `tb_ds92lv16_ser`, `tb_teldes_deser` | bit order, framing, arithmetic, lock and loss of lock |
| `tb_circular_buffer`, `tb_l0_buffer` | memories and directory against a model |
| `tb_l0_trigger_ctrl` | numbering, type pairing, queue overflow, continuous-mode spacing |
| `tb_l0_extractor` | window addresses, wrap-around, directory entries, clocks per trigger |
| `tb_mrp_rx`, `tb_sde_tx`, `tb_igmp_tx`, `tb_eth_mac_tx` | frame filters, packet bytes, checksums, CRC, padding, gaps, arbitration |
| `tb_choke_error`, `tb_ttc_lkr`, `tb_lkr_l0tp` | hysteresis; TTC decoding, sources, masks; peak finding against a model |
| `tb_cream` | the CREAM alone: every SDE sample against the recorded slices, L1, L0-readout, zero suppression, continuous mode, IGMP, CHOKE and ERROR |
| `tb_lkr_readout_top` | the slice end to end, with reduced buffers (see below) |
| `tb_lkr_full` | the same test at full size, with no parameter overrides |

`tb_lkr_readout_top` counts each of these mechanisms, and fails if any never
happens:

- trigger sources: TTC, VME, generator and front-panel L0s;
- the timestamp and event-counter resets and a check-bit error;
- answered L1 requests, an unknown event and a type without readout;
- L0-readout mode, zero suppression, continuous mode and IGMP;
- TELDES lock, with 1.5 million trigger sums compared with sums computed in
  the testbench;
- L0 trigger processor peaks and energies;
- CHOKE, ERROR on a lost trigger, and clearing the ERROR.

`tb_lkr_full` runs in about 2 minutes and needs about 2.5 GB of memory for
the buffers.

To run a testbench with plain Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cream_pkg.sv tb/tb_lkr_readout_top.sv --top-module tb_lkr_readout_top
./obj_dir/Vtb_lkr_readout_top +verilator+rand+reset+2
```

Use `+verilator+rand+reset+2` so that every register starts at a random value,
as in the regression.

## Files

- `rtl/cream_pkg.sv`: sizes, types, the configuration record, and the
  checksum and CRC functions.
- `rtl/lkr_readout_top.sv`: the top.
- `rtl/cream.sv`, `rtl/ttc_lkr.sv`, `rtl/lkr_l0tp.sv`: the three boards.
- `rtl/sync_fifo.sv` and `rtl/ttc_decoder.sv`: helpers.
- The other files in `rtl/`: one block each, as named above.
- `tb/adc_model.sv`: a behavioural model of the ADCs' serial outputs, used by
  the board-level tests.

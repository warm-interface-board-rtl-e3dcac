# WIB data path: merging cold front-end links into GBT frames

A Warm Interface Board (WIB) sits on the warm side of a cryostat feedthrough,
between the cold front-end motherboards (FEMBs) and the DAQ. Each FEMB carries
two COLDDATA ASICs. Every 500 ns a *convert* command makes each ASIC send one
112-byte packet over a pair of 1.2 Gb/s 8b10b links. The WIB's FPGA has to turn
the four slow links of each FEMB into one fast DAQ link. Here that link is GBT
wide mode at 4.8 Gb/s: 40 MHz frames of 120 bits, 112 of them user data.

The main idea is a fixed slot budget. One convert period holds exactly 20 GBT
frames of 14 user bytes. One FEMB's data needs 16 of them: 2 × 112 bytes =
16 × 14 bytes. That leaves one frame for a WIB header, one for a trailer and two
idle frames. Cold modules and DAQ links therefore map 1:1, and the two idle
frames are the only slack the link has.

This RTL implements that data path for a WIB with four FEMBs (16 cold links in,
4 DAQ frame streams out). It also includes the counters that stamp each packet
and the board muxes that pick the clock and control sent to the cold side.

## Input: the COLDDATA packet

Each ASIC uses two links, A and B. Both carry one character per 120 MHz clock,
so a 500 ns period is 60 characters. Together the two links carry 16-bit words:
link A has the low byte and link B the high byte.

| word  | content                                                  |
|-------|----------------------------------------------------------|
| 1     | K28.5 on both links (start of frame)                     |
| 2, 3  | link checksums: word 2 has the low bytes (B, A), word 3 the high bytes |
| 4     | ASIC time stamp                                          |
| 5     | errors                                                   |
| 6     | reserved                                                 |
| 7, 8  | 4-bit headers of streams 1-4 and 5-8                     |
| 9-56  | streams 1..8, six words each (stream bits 99..4)         |
| 57-60 | K28.1 idle                                               |

The design takes the links already deserialized and 8b10b-decoded: a data byte
plus a K flag (`cd_char_t`).

## Output: 20 frames per convert

`gbt_frame_t` is `{h[3:0], sc[3:0], user[111:0]}`. User byte *n* (1..14) is
`user[8n-1 -: 8]`.

| frame | content |
|-------|---------|
| 1     | WIB header: byte 1 = 0xA5, byte 2 = error byte, bytes 3-4 = convert count, bytes 5-7 = reset count, bytes 8-14 = 56-bit time stamp |
| 2-9   | ASIC 1: frame 2 = 0xBCBC then words 2-7; frames 3-9 = words 8-56, seven per frame, lowest word in the lowest bytes |
| 10-17 | ASIC 2, same layout |
| 18    | trailer: CRC-32 in bytes 11-14, bytes 1-10 zero |
| 19-20 | idle (GBT header 0110, user data zero) |

The packet is packed in a plain linear way. Drop K28.5, put 0xBCBC in its place,
and the 56 words fill eight frames exactly. A frame's checksum bytes read
B_hi, A_hi, B_lo, A_lo from byte 6 down to byte 3. Data frames carry GBT
header 0101. The slow-control bits pass `slow_ctrl` through.

Error byte:

| bit | meaning |
|-----|---------|
| 0-2 | ASIC 1: link A checksum, link B checksum, framing error |
| 3-5 | ASIC 2: the same three |
| 6   | the convert counter overflowed without a sync |
| 7   | data was lost in a FIFO |

## How a packet flows

```
link A -> cd_link_framer -> link FIFO A --\
                                           +-> packer -> chunk FIFO (8 x 112 b per packet) --\
link B -> cd_link_framer -> link FIFO B --/        \--> status FIFO (1 per packet) ----------+-> wib_frame_builder -> GBT frame
              (same again for ASIC 2)                                                        /
wib_timing: time stamp, convert/reset counters, 40 MHz frame strobe ------------------------/
```

* **`cd_link_framer`**, one per link. It waits for K28.5 and then hands on the
  next 55 bytes (words 2..56), marking the first and the last. It sums the
  bytes of words 4..56 and compares the sum with the checksum in words 2-3. A
  K character inside a packet means the packet was cut short. The framer then
  pads the packet to its full length with zeros and flags a framing error. That
  way the stages behind it always see whole packets.
* **Link FIFOs** (8 entries). Links A and B are separate serial links and need
  not arrive in the same clock. Each goes into its own FIFO, and the packer only
  takes a byte pair when both FIFOs have one, so skew between A and B disappears
  here.
* **Packer** (inside `cd_asic_rx`). It joins each byte pair into a word and
  fills 14-byte payloads. Every seventh word writes a payload to the chunk FIFO
  (16 entries, two packets). The last word writes the packet's status to the
  status FIFO: checksum flags, framing flag, data-loss flag, and the *convert
  record* taken when link A's K28.5 arrived. A non-empty status FIFO therefore
  means a whole packet is waiting.
* **`wib_frame_builder`**, one per FEMB. It starts a packet only when both ASICs
  have one waiting. It takes the header counters from ASIC 1's convert record.
  It sends one frame per `frame_ce` and keeps a running CRC for the trailer.

The convert record travels with the packet. The time from convert to a complete
packet is about 63 clocks, longer than the 60-clock convert period. A counter
value sampled when the header is built would therefore already belong to the
next convert.

## Catching up with idle frames

The builder does not run a fixed 20-frame schedule. After the trailer it is in
a "post" state for two frame times. If both ASICs already have their next packet
waiting, it sends the next header straight away and pulses `idle_dropped`.
Otherwise it sends an idle frame. After two idle frames it keeps sending idles
until the packets are ready.

In steady state the next packets complete just after the two idle frames, so
nothing is dropped. If one packet started a few clocks late (the ASICs or a link
were late), its trailer also leaves late. The next packets are then already
waiting, and one or both idle frames are skipped. That pulls the output back
into step within one period. This is the only slack: a backlog of more than two
frames per period can never be recovered.

## Timing counters (`wib_timing`)

* `ts`: a 56-bit time stamp. It counts every 120 MHz clock from reset and is
  never cleared, so it rolls over only after about 19 years.
* `conv_cnt`: a 16-bit count of convert commands, cleared by a sync.
* `reset_cnt`: a 24-bit count of sync commands.
* Overflow error: at 2 MHz, 65536 converts take exactly one 30.5 Hz sync period.
  If the counter has wrapped and another convert comes with no sync, the error
  bit is set. It stays set until the next sync.
* A sync and a convert in the same clock act as sync first, so that convert is
  number 0.
* `frame_ce`: the 40 MHz frame strobe, high one clock in every three.

`convert` and `sync` are one-clock pulses that are already decoded; the
encoding of the control line is not part of this design.

## Cold clock and control muxes (`cold_timing_mux`)

On the board, the clock and the control sent to each FEMB each pass through a
2:1 mux:

* The clock mux picks the PLL output, which is locked to the 50 MHz timing
  clock, or a clock from the FPGA.
* The control mux picks the timing control line or a line from the FPGA.

The cold clock must come through a PLL, so the PLL output is the normal choice.
This module models the two muxes as combinational logic, with one select bit per
FEMB (1 = FPGA).

## What is outside this RTL

Only the ports of the top module stand for these parts:

* the 8b10b deserializers (FPGA transceivers)
* the GBT encoder, serializer and optics
* the PLL and the clock and signal fanouts
* the decoder for the timing control line
* Gigabit Ethernet slow control
* the FEMB power converters and their enables

The COLDDATA ASIC exists only as a behavioural model in `tb/colddata_model.sv`.

## Design choices to be aware of

These points are this design's own choices, not fixed by the WIB data format:

* **Clocking.** Everything runs on one 120 MHz clock. Frames advance on a
  1-in-3 strobe. Recovered link clocks are taken as already synchronous. A real
  FPGA would need a clock-domain crossing at the link FIFOs.
* **Checksum.** Each link's checksum is a plain 16-bit sum of that link's bytes
  in words 4..56. If the ASIC uses another algorithm, change
  `cd_link_framer` and `cd_checksum` in `tb/wib_tb_pkg.sv`.
* **Trailer.** CRC-32: polynomial 04C11DB7, initial value all ones, MSB first,
  no final XOR. It covers the 112 user bits of frames 1-17 and sits in bytes
  11-14. The rest of the trailer is zero.
* **GBT header codes.** 0101 for data frames and 0110 for idle frames. The
  K-character values are K28.5 = 0xBC and K28.1 = 0x3C.
* **Error byte.** The bit assignment above, and the rules that set the bits.
  Three events count as framing errors:
  * a truncated packet
  * a stray character between packets
  * links A and B disagreeing on where a packet starts or ends
* **FIFO depths** (8, 16, 4). If the builder stops reading, the packer stalls,
  the link FIFOs overflow and bit 7 is set. After such a loss the packet
  boundaries are not recovered until reset. Normal traffic never gets there.

## Files

* `rtl/wib_pkg.sv`: shared types (`cd_char_t`, `link_byte_t`, `conv_rec_t`,
  `pkt_status_t`, `gbt_frame_t`), constants and the CRC step.
* `rtl/sync_fifo.sv`, `rtl/cd_link_framer.sv`, `rtl/cd_asic_rx.sv`,
  `rtl/wib_frame_builder.sv`, `rtl/wib_timing.sv`, `rtl/cold_timing_mux.sv`:
  the blocks.
* `rtl/wib_top.sv`: the top module. It has `NUM_FEMB = 4` FEMBs. The input
  `femb_link[f][a][l]` is FEMB *f*, ASIC *a* (0 = ASIC 1), link *l* (0 = A).
* `tb/`: one self-checking testbench per block. Also:
  * `wib_tb_pkg.sv`: reference packet contents, expected payloads and an
    independent CRC.
  * `colddata_model.sv`: the ASIC model.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example, the
full four-FEMB test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/wib_pkg.sv tb/wib_tb_pkg.sv tb/tb_wib_top.sv --top-module tb_wib_top \
    -Mdir obj_top -o sim && obj_top/sim
```

Use the same command with `tb_cd_link_framer`, `tb_cd_asic_rx`, `tb_sync_fifo`,
`tb_wib_timing`, `tb_wib_frame_builder` or `tb_cold_timing_mux` in place of
`tb_wib_top`.

`tb_wib_top` runs the design at its default size and takes about a second. It
sends 14 converts' worth of packets through all four FEMBs, with link B skewed
by 0-3 clocks. It also creates the following events, counts each one, and fails
if any of them never happens:

* a checksum error
* a truncated packet
* a late packet whose idle frames get dropped
* a run of 65537 converts without a sync (overflow)
* sync counting
* every mux setting

It checks every frame against values it works out itself. It also checks that
the 18 frames of a packet leave three clocks apart.

`tb_wib_rate` is the throughput test. It runs 300 converts on all four FEMBs
with 0-3 clocks of random start jitter per convert, and checks four things:

* every link carries 18 data frames per packet
* every header names its own convert
* no packet reports an error
* the delay from convert to header stays bounded

In that run the delay stays between 62 and 69 clocks, and the idle frames
absorb the jitter: about a tenth of them are dropped.

# A transport multiplexer for nine-view 3-D video

A multiview 3-D display is fed by nine cameras at once; intermediate
viewpoints are synthesised from neighbouring views at the receiver. Each
camera has its own MPEG-2 SD encoder producing 2 to 6 Mb/s. This design
merges the nine elementary streams into **one** serial bit stream of
188-byte packets. Nine views at up to 6 Mb/s each give a 54 Mb/s output,
sent one bit per clock at 54 MHz.

The packet formats are MPEG-2 systems formats (ITU-T H.222.0) adapted to
multiview video, following the paper *The Design of a Multiplexer for
Multiview Image Processing* (D. K. Kim, Y. J. Lee, G. S. Koo, Y. S. Lee,
Yonsei University):

* **SPDU** (program data unit) replaces the PES packet. Each access unit of
  a view gets a header that carries a frame index and a reference to the
  view it relates to. The packet length is always 0, so a unit can be sent
  while it is still arriving.
* **DSS** (3-D system stream) packet replaces the transport packet. It is
  the same 188-byte packet, but its adaptation field also carries the frame
  index of the video it contains.
* **PAT** and **PMT** describe one program with nine video streams. They
  are repeated every 0.3 s. The PCR (program clock reference) travels with
  the fifth view.

The RTL is synthesizable SystemVerilog on a single clock. It has been
linted with Verilator and elaborated with Yosys/slang. Each module comes
with a self-checking testbench.

## Data path

```
 encoder i ──► spdu (x9) ──────────► spdu_stage2 (x9) ──req/gnt──┐
  bytes,       start_code_detector    input reg, FIFO,           │
  PTS/DTS/PCR  sync_fifo (buffer)     output reg, segmenter      ▼
  enables      spdu_header (FSM+mux)                       packet_arbiter
                                                                 │
 pat_section ── crc32 ───────────────────────────── req/gnt ─────┤
 pmt_section ── crc32 ───────────────────────────── req/gnt ─────┤
                                                                 ▼
 stc_counter ──► PTS/DTS (all channels), PCR ──► dss_block ◄── continuity_counter
                                                     │ one byte per 8 clocks
                                                     ▼
                                                 serial_out ──► ts_bit, ts_sop
```

Twelve sources compete for the output: SPDU1–SPDU9 (indices 0–8), the PAT
(9), the PMT (10), and the NULL packet (11). The DSS block makes the NULL
packet itself whenever nobody requests.

### 1. SPDU channel (`spdu`)

The encoder's bytes first pass the **buffer controller**
(`start_code_detector`). It watches for the three start codes that open an
access unit:

* sequence header `00 00 01 B3`
* group of pictures `00 00 01 B8`
* picture `00 00 01 00`

Each access unit runs from one of these codes to the next. The sequence end
code `00 00 01 B7` is ordinary payload. A three-byte delay line lets the
detector tag the *first* byte of each code as it enters the **SPDU buffer**
(`sync_fifo`, 32 entries of {tag, byte}).

The **header FSM** (`spdu_header`) reads the buffer. When a tagged byte
reaches the head, the FSM first sends a header and then lets the mux pass
the payload. Bytes that arrive before the first access unit have no header
and are dropped. The header layout (bytes, MSB first):

| bytes | content |
|---|---|
| 0–3 | start prefix `00 00 00 01` |
| 4 | `1`, packet_id[6:0] (channel number 1–9) |
| 5–6 | SPDU packet length = 0 |
| 7 | scrambling `00`, priority 0, copyright 0, multi-view flag 1, ref_flag, PTS_DTS_flag[1:0] |
| 8 | header data length (bytes that follow) |
| 9 | frame_index |
| +1 | master_or_slave, ref_packet_id[6:0] |
| +5 | PTS: prefix `0010`/`0011`, ts[32:30], 1, ts[29:15], 1, ts[14:0], 1 |
| +5 | DTS: prefix `0001`, same layout |

The encoder pulses `pts_en`, `dts_en` and `pcr_en`. Each pulse is remembered
and applies to the next header. A DTS is only sent together with a PTS.
PTS and DTS both carry the 33-bit STC base at the moment the header starts.
The frame index counts headers modulo 256.

**View references.** The cameras form three triples: 1–3, 4–6 and 7–9. In
each triple the middle camera is the master (`master_or_slave = 1`,
reference = itself). The two outer cameras are slaves whose
`ref_packet_id` names the middle one.

### 2. Second SPDU step (`spdu_stage2`) — cutting SPDUs into packets

This is the part that decides what goes into each packet. Every source has
an input byte register, a 512-byte FIFO and an output byte register. Twelve
sources with one register in front of and one behind their FIFO give the
design's 24 registers, and the 12 byte lanes into the DSS block.

While bytes enter, the stage cuts the stream into **segments**. Each
segment becomes the payload of one DSS packet. A segment closes in two
cases:

* it reaches `SEG_MAX` bytes; or
* the next SPDU begins. Every SPDU therefore starts a fresh packet, with
  `payload_unit_start_indicator` set.

Each closed segment is described by a `seg_info_t`: length,
payload-unit-start flag, frame index, and PCR request. These descriptions
wait in a 32-entry info FIFO, and `req` stays high while any is waiting.
`SEG_MAX` is 181 bytes, or 175 on the PCR channel. That is exactly what is
left of 188 bytes after the 4-byte header and the smallest adaptation field
that channel needs (length, flags and frame index, plus 6 PCR bytes).

The last segment of an SPDU closes only when the next SPDU starts. The
tail of an access unit therefore leaves once the encoder has begun the
next one.

### 3. Arbitration (`packet_arbiter`)

At the first byte of every packet, the DSS block pulses `next`. The arbiter
then grants one requesting source in round-robin order, starting after the
last source granted, and holds the grant for the whole packet. With nine
channels plus PAT and PMT, a channel waits at most 11 packets (0.31 ms).
With no request, the packet is NULL.

### 4. DSS packetizer (`dss_block`, `continuity_counter`)

One clock after the grant, the block latches the segment description and
works out the packet layout:

| byte | content |
|---|---|
| 0 | `0x47` |
| 1–2 | error 0, PUSI, priority 0, PID[12:0] |
| 3 | scrambling `00`, adaptation_field_control, continuity_counter |
| 4 | adaptation field length L (if there is an adaptation field) |
| 5 | flags `0 0 0 PCR_flag 0 index_flag 1 1` (if L > 0) |
| 6–11 | PCR: base 33, six 1 bits, extension 9 (if PCR_flag) |
| next | frame_index (if index_flag) |
| … | stuffing `0xFF` up to byte 4 + L |
| 5+L … 187 | payload, 183 − L bytes |

L is simply 183 − payload length. Stuffing therefore sits *between header
and payload*, so a receiver finds the payload from the header alone:

* A video packet always has an adaptation field, because it carries the
  frame index.
* A PAT or PMT packet (17 or 62 payload bytes) has an adaptation field only
  for stuffing. A 183-byte payload gives `L = 0`: one length byte and no
  flags.
* A NULL packet (PID `0x1FFF`) carries 184 bytes `0xFF` and no adaptation
  field.

The continuity counter (one 4-bit counter per source) sits outside the
packetizer. It advances once per non-NULL packet.

**PCR.** When the fifth channel's segment carries a PCR request, the block
samples the STC while the flags byte leaves and sends it in the next six
bytes. The extension counts 0–599 at 54 MHz and is halved to the 0–299
(27 MHz) units of the PCR field.

PIDs: PAT `0x0000`, PMT `0x0100`, channel *i* (1–9) `0x0100 + i`, NULL
`0x1FFF`.

### 5. PSI (`pat_section`, `pmt_section`, `crc32`)

Each table has its own timer. The table becomes pending right after reset
and again every `PSI_PERIOD` clocks (16 200 000 = 0.3 s). When granted, the
generator streams a pointer field `0x00`, then the section bytes, then the
four CRC bytes.

* The PAT has one loop entry: program 1 → PMT PID `0x0100`.
* The PMT lists the PCR PID (`0x0105`, the fifth view) and nine loop
  entries of stream_type `0x02`.

The CRC is the MPEG-2 CRC-32: polynomial `0x04C11DB7`, registers preset to
ones, MSB first, no final inversion. A receiver running the section and its
CRC through the same registers ends at zero. The section bytes feed the CRC
one byte per clock; each byte is eight steps of the bit-serial register
chain.

### 6. Time base (`stc_counter`)

A 10-bit counter runs through 0–599 at 54 MHz. Each time it wraps it
advances a 33-bit base, so the base counts at 90 kHz. The base supplies
PTS/DTS; base and extension together give the PCR. One counter serves the
whole multiplexer.

## Clocking and timing

Everything runs on one 54 MHz clock, `clk`, with a synchronous active-low
reset, `rst_n`.

The paper's three rates are present, but as strobes on that one clock
rather than three clock domains:

* The serial output sends one bit per clock.
* The packetizer is asked for one byte every 8 clocks (6.75 MHz).
* Encoder bytes arrive as `vid_valid` strobes, at most one per clock per
  channel.

Latencies:

* An input byte enters the SPDU buffer three input bytes after it arrives.
* A segment can be granted one clock after its last byte is written.
* The grant is sampled at the start of each 1504-clock packet.

## Top-level interface (`mux_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 54 MHz clock, synchronous active-low reset |
| `vid_valid` | in | 9 | byte strobe per encoder |
| `vid_data` | in | 9×8 | encoder bytes |
| `pts_en`, `dts_en`, `pcr_en` | in | 9 each | enables, taken for the next access unit |
| `ts_bit` | out | 1 | serial DSS stream, MSB first |
| `ts_sop` | out | 1 | high with the first bit of each packet |
| `overflow` | out | 9 | sticky: the channel's input buffer lost a byte |

| parameter | default | meaning |
|---|---|---|
| `PSI_PERIOD` | 16 200 000 | clocks between PAT/PMT repetitions (0.3 s) |
| `BUF_DEPTH` | 32 | SPDU buffer per channel |
| `S2_DEPTH` | 512 | second-step FIFO per channel |

The channel count (9), the PIDs and the PCR channel are constants in
`mux_pkg` and `mux_top`.

## Capacity

The output carries 54 Mb/s of packets. Of that, at most 181/188 of a video
packet is payload (175/188 on the PCR channel), so the usable video payload
is about 51.9 Mb/s.

* Nine views at 5 Mb/s (45 Mb/s, plus SPDU headers and 10 kb/s of PSI) fit
  with room to spare.
* Nine views at the full 6 Mb/s (54 Mb/s) do **not** fit. Once the FIFOs
  are full, the `overflow` flags report the loss.

`tb_workload_rates` runs both cases with constant-rate encoders. At 5 Mb/s
nothing is lost. At 6 Mb/s a channel overflows within about 3 ms.

The loss comes this soon because a channel's second-step FIFO is never
close to empty. It holds the segment still being filled, up to 181 bytes.
It also holds what arrived while the other channels had their turn: about
175 bytes at 5 Mb/s, or 210 bytes at 6 Mb/s. A deeper `S2_DEPTH` only
delays the overflow at 6 Mb/s, because the output is short of capacity.

Every access unit starts a new packet. Very small access units therefore
waste much of a packet, which matters only for unrealistic streams.

## What follows the paper and what was chosen here

These follow the paper:

* nine channels
* the SPDU and DSS field lists
* SPDU packet length 0
* header creation per access unit, triggered by the buffer controller
* the 10-bit 0–599 and 33-bit counters
* PCR on the fifth channel
* PAT/PMT with one program, repeated every 0.3 s
* the H.222.0 CRC-32
* one packet per granted source
* a NULL packet filled with ones
* stuffing between header and payload
* the continuity counter outside the packetizer
* byte-wide interior at one eighth of the bit rate
* input and output registers around the second-step buffers

These are choices made here, where the paper gives no detail:

* one clock with strobes instead of three clock domains
* the start prefix `00 00 00 01`
* the bit after it set to 1
* sticky enables
* the frame index counting headers
* PTS = DTS = STC base at header time
* the master/slave assignment
* the PID values
* round-robin arbitration
* the segment rule and `SEG_MAX`
* all buffer depths
* the pointer field before each section
* the flags-byte order: the paper's figure shows PCR, OPCR and index flags
  followed by two 1 bits, and that order is used here
* the PCR extension halved to 27 MHz units
* MSB-first serial output
* dropping input at a full buffer, with a flag

Not implemented:

* the UART the paper mentions, because its role is not described
* NIT and CAT, which the paper leaves out too

## Simulation

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mux_top \
    -y rtl -y tb +libext+.sv rtl/mux_pkg.sv tb/tb_ref_pkg.sv tb/tb_mux_top.sv
./obj_dir/Vtb_mux_top
```

Replace `tb_mux_top` with any other testbench name to run it.

`tb_mux_top` runs the whole multiplexer at its default parameters, for
about 16 million clocks (half a minute):

* Nine model encoders send access units.
* The serial output is parsed back into packets, and each view's payload is
  checked byte for byte against its expected SPDUs.
* PAT and PMT are checked against sections with a reference CRC, and must
  come round again 0.3 s after reset.
* The test counts that NULL packets, PCR insertion, stuffing, SPDUs split
  over several packets, arbitration waits, back-pressure and an input
  overflow all occur.

`tb_workload_rates` drives all nine views at a constant 5 Mb/s, then at
6 Mb/s, as described under Capacity. It takes about 20 seconds.

The block testbenches (`tb_<module>`) compare each module with an
independent model. `tb_ref_pkg` holds the reference SPDU-header builder and
a bit-serial CRC.

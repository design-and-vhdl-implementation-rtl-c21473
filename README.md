# CEALite: E1 circuit emulation over Ethernet

CEALite is the FPGA logic of a circuit emulation adaptor. It carries four E1
(2.048 Mbit/s PDH) telephony streams across an Ethernet network as UDP/IPv4
frames with an RTP/SAToP header, and carries them back the other way. Each
frame is time-stamped on sending and on receipt, so that a clock
synchronisation algorithm running on a MicroBlaze processor can recover the
E1 clocks at the far end.

The hardware has two independent halves that share one clock and one time
base:

* the **forward path** turns E1 bits into bytes, buffers them per flow, and
  on each pulse from a synchronisation clock (IP_T0) sends one flow's buffer
  as an Ethernet frame;
* the **backward path** admits frames addressed to this board, writes each
  frame's header values and a receive time stamp into a RAM that the
  MicroBlaze reads, and outputs the voice payload.

```
 E1 lines ──► bit_to_byte ×4 ──► data_packager ──► Data Block RAM ──┐
 (or pdh_dummy_source)              ▲   │ tx_start                  ▼
                       IP_T0 pulse ─┘   └────────────► mac_transmitter ──► MAC TX wrapper
                                          Header Block RAM ──┘   (MicroBlaze writes headers)

 MAC RX wrapper ──► header_analyzer ──► info_extractor ──► Data_BLK_RAM ──► MicroBlaze
                          ▲                   │ idx_ptr, payload port
                   Config_BLK_RAM ◄── MicroBlaze
```

All RTL is SystemVerilog in `rtl/`, one module or package per file, and each
block has a self-checking testbench in `tb/`. The MicroBlaze, the IP_T0
clock module, the Ethernet MAC wrappers and the E1 line interfaces are not
part of the RTL: their signals are ports of the top module `cealite_top`.

## The frame

Every frame is a 70-byte header followed by the payload (255 or 256 bytes
in normal operation, at most 256). Preamble and FCS are added and checked by
the MAC wrappers. Byte offsets count from the first destination-MAC byte.

| Bytes  | Content                                                      | Kept in                         |
|--------|--------------------------------------------------------------|---------------------------------|
| 0..55  | Ethernet, LLC/SNAP, IPv4, UDP, fixed RTP/SAToP words          | Header Block RAM, per flow      |
| 56..59 | packet counter                                                | Data Block RAM, written per frame |
| 60..63 | send time stamp (IP_T0 value at the pulse)                    | Data Block RAM                  |
| 64..67 | byte counter (payload bytes of this flow sent before this frame) | Data Block RAM               |
| 68..69 | packet length (payload bytes in this frame)                   | Data Block RAM                  |
| 70..   | payload: the flow's E1 bytes in order                         | Data Block RAM, buffer half     |

The receiver checks the destination MAC at bytes 0..5, the destination IPv4
address at 38..41 and the UDP destination port at 44..45. These are the
standard places behind a 14-byte MAC header and an 8-byte LLC/SNAP header.
The static bytes are written by the MicroBlaze and never touched by the
logic, so their content is entirely up to software.

Words in every RAM are 32 bits and big-endian: byte k of a word sits in bits
`[31-8k -: 8]`. The package `cea_pkg` holds all offsets, sizes and RAM maps.

## Forward path

### bit_to_byte

One converter per E1 line. Each cycle with `e1_rx_ena` high shifts in
`e1_rx_dat`. After the eighth bit the byte appears on `pdh_dat` with a
one-cycle `pdh_ena`. The first bit received is the MSB. There is no frame
alignment: byte borders are wherever the converter started counting, so the
E1 side must be byte-aligned when it leaves reset.

### pdh_dummy_source

A test traffic generator that can replace the four E1 lines (`use_dummy`
high). Each `t3_tick`, a one-cycle strobe from the station clock, sends one
bit on every flow. Byte k of flow f is `(k + 64 f) mod 256`, so a receiver
can check order and loss from the payload alone. Switch `use_dummy` only in
reset or while no byte is half received. The converters keep a partial byte
across a switch, and the byte borders would then shift.

### data_packager: double buffer and dynamic fields

The packager is the controller of the forward path. Each flow owns two
256-byte halves in the Data Block RAM. One half fills from the E1 side while
the other is being sent.

A Flow ID counter advances on every IP_T0 transmission-ready pulse
(`ip_t0_sig`), so the flows are served round robin. On a pulse for flow f,
in one cycle, the packager:

1. latches the time stamp `ip_t0_dat`;
2. takes the fill level of f's current half as the packet length;
3. switches f's writes to the other half, starting at byte 0.

It then writes the four dynamic words for f (`P_DYN0..3`). It waits
(`P_WAIT`) until any byte of f taken before the switch has reached the RAM.
Then it pulses `tx_start` with `tx_req = {flow, half, length}`. Last, it
adds 1 to f's packet counter and the length to f's byte counter.

The awkward part is that E1 bytes of all four flows keep arriving during all
of this, and the RAM has one write port on this side. Each flow has a
one-byte holding register that keeps the byte together with its final RAM
address. Each cycle that is not a dynamic-word write, one held byte is
written. The byte from before a switch goes first, then the lowest flow
number. An E1 byte arrives at most every 8 clocks per flow, and a frame needs
at most 5 cycles of exclusive RAM use. So a holding register never has to
take a second byte before the first is written.

Two error cases are counted rather than prevented:

* **Overflow.** A half that already holds 256 bytes drops further bytes.
  `overflow_cnt` counts the cycles in which any flow dropped one. The next
  pulse still sends the full half, and the flow starts fresh in its other
  half.
* **Missed pulse.** A pulse that comes while a frame is still being prepared
  or sent (`tx_busy`) is counted in `missed_sync_cnt`. The Flow ID still
  advances, so the skipped flow keeps filling the same half. It overflows if
  it is skipped for long.

Timing: `tx_start` is high at the 6th clock edge after the edge that samples
the pulse. It is the 7th when a byte of the served flow, taken before the
switch, was still waiting.

### mac_transmitter: streaming a frame from two RAMs

This is the hardest block to follow. There is not enough on-chip storage to
build a whole frame before sending it, so the transmitter assembles the
frame on the fly. It reads each 32-bit word just before its bytes are due,
and the words alternate between two RAMs:

| Frame words | Source                                                          |
|-------------|-----------------------------------------------------------------|
| 0..13       | Header Block RAM, word `16·flow + i` (bytes 0..55)               |
| 14..17      | Data Block RAM, dynamic word `512 + 4·flow + j`; word 17 gives only its upper 2 bytes |
| 18..        | Data Block RAM, payload word `(2·flow + half)·64 + i`            |

The frame is treated as a list of word fetches. A word counter (`ld_idx`)
walks this list and a small table chooses the RAM, the address and the
number of valid bytes of each entry. A fetch unit reads one word per cycle,
into a three-entry word queue, as long as there is room. A RAM read takes
one cycle, so a fetch issued now lands two cycles later. Three entries are
enough to cover that while one word is being unpacked. The byte unit takes
bytes from the head of the queue and puts the next byte into the output
register `mac_dat` one cycle before the wrapper takes it. A byte can thus go
out on every clock with no gaps, including across the join from the 2-byte
word 17 into the payload.

The handshake with the MAC transmit wrapper:

| Signal      | Dir | Meaning                                                        |
|-------------|-----|----------------------------------------------------------------|
| `mac_req`   | out | a frame is ready; its first byte is on `mac_dat`                |
| `mac_start` | in  | the wrapper accepts the frame (one cycle); `mac_req` drops      |
| `mac_ena`   | in  | the wrapper takes the byte on `mac_dat` this cycle              |
| `mac_dat`   | out | current byte                                                    |
| `mac_end`   | out | the byte on `mac_dat` is the last of the frame                  |
| `mac_err`   | in  | the wrapper aborts the frame                                    |
| `mac_rst`   | out | one-cycle reset to the wrapper after an abort or an underrun    |

`mac_req` comes at the 5th clock edge after the edge that samples
`tx_start`. An abort (`mac_err`), or a byte taken while the queue is empty,
ends the frame early. `mac_rst` then pulses, `frames_aborted` counts the
event, and the transmitter is free for the next `tx_start`. The packager
does not resend an aborted frame: its counters have already advanced.

States: `T_IDLE`, `T_FILL` (queue priming), `T_REQ` (waiting for
`mac_start`), `T_SEND` and `T_ABORT`.

## Backward path

### header_analyzer: admission and trailer removal

Bytes arrive from the MAC receive wrapper, one per clock, while `rx_ena` is
high. `rx_ena` covers the whole frame, FCS included. As the bytes pass, the
analyzer:

* compares bytes 0..5 with the board MAC and bytes 38..41 with the board IP;
* looks up bytes 44..45 in a four-entry UDP-port table, which gives the
  Flow_ID.

A frame that fails any of the three checks is dropped (`rx_dropped_cnt`).
From an admitted frame, bytes 56 up to the end minus the FCS go to the info
extractor, with `out_ena` high and `out_flow` set.

The end of the frame is only known when `rx_ena` falls. The last four bytes
must not be forwarded, so every byte passes through a 4-byte delay line, and
a byte leaves only once four newer bytes have arrived. `out_dat` trails
`rx_dat` by 5 cycles. One cycle after `out_ena` drops, `out_end` pulses
together with `out_crc_err`. That is the wrapper's FCS verdict (`rx_crc_err`),
which must be valid in the first cycle after `rx_ena` falls.

The board addresses and the port table live in Config_BLK_RAM:

| Word | Content                          |
|------|----------------------------------|
| 0    | MAC[47:16]                       |
| 1    | {MAC[15:0], 16'h0}               |
| 2    | IPv4 address                     |
| 3..6 | {valid, 15'b0, UDP port}, flows 0..3 |

After reset and after every frame, the analyzer copies these 7 words into
registers, which takes 8 cycles. That fits well inside the inter-frame gap
and preamble. A MicroBlaze write therefore takes effect from the next frame
on.

### info_extractor: records, ring and payload port

On the first forwarded byte (frame byte 56), the extractor takes the receive
time stamp from `ip_t0_dat` and the Flow_ID. It parses the 14 dynamic bytes.
Every later byte goes out on the payload port: `pay_valid`, `pay_dat`,
`pay_flow`, `pay_idx` (position in the payload) and `pay_pkt_cnt`. That is
enough to write a per-flow RAM directly.

At `out_end` the extractor writes an 8-word record in 8 consecutive cycles,
one field per word:

| Word | Field                                                            |
|------|------------------------------------------------------------------|
| 0    | Flow_ID                                                          |
| 1    | receive time stamp                                               |
| 2    | packet counter                                                   |
| 3    | byte counter                                                     |
| 4    | packet length                                                    |
| 5    | send time stamp                                                  |
| 6    | status: bit 0 bad FCS, bit 1 received payload length ≠ length field |
| 7    | 0                                                                |

Record n sits at word 8n, so the 2048-word Data_BLK_RAM is a ring of 256
records. After the last word, `idx_ptr` takes the number of the record just
written. It resets to all ones. Software keeps its own "last read" counter,
starting at all ones too, and reads the records between that counter and
`idx_ptr`. Software must read at least once every 256 frames. At roughly
one frame per millisecond per flow, that is tens of milliseconds with four
flows. Frames with a bad FCS are still recorded, flagged in the status word,
because their time stamps may still be of use to software.

## Top level and memories

`cealite_top` wires the blocks and four `bram_dp` instances. `bram_dp` is a
true dual-port RAM with 32-bit words, byte write enables, read-first
behaviour and one cycle of read latency.

| RAM              | Size (parameter)        | Port A                  | Port B                     |
|------------------|-------------------------|-------------------------|----------------------------|
| Header Block RAM | 512 × 32 (`H_DEPTH`)    | transmitter reads       | MicroBlaze (`mb_h_*`)      |
| Data Block RAM   | 1024 × 32 (`D_DEPTH`)   | packager writes         | transmitter reads          |
| Config_BLK_RAM   | 512 × 32 (`C_DEPTH`)    | header analyzer reads   | MicroBlaze (`mb_c_*`)      |
| Data_BLK_RAM     | 2048 × 32 (`R_DEPTH`)   | info extractor writes   | MicroBlaze reads (`mb_r_*`) |

Data Block RAM map: payload half h of flow f at word `(2f + h)·64`. Dynamic
words of flow f at `512 + 4f`. Header Block RAM: flow f's static header in
the 16-word slot at `16f`, with 14 words used.

Everything runs on one clock, `clk`, with an active-low asynchronous reset,
`rst_n`. The E1 bit strobes, `t3_tick` and the IP_T0 pulse must already be
synchronous to `clk`, one cycle wide. The counters `flow_id`,
`missed_sync_cnt`, `overflow_cnt`, `frames_sent`, `frames_aborted`,
`rx_admitted_cnt` and `rx_dropped_cnt` are outputs for status reporting.

Latency summary:

| From                       | To                      | Clock edges |
|----------------------------|-------------------------|-------------|
| 8th E1 bit strobe          | `pdh_ena`               | 1           |
| IP_T0 pulse sampled        | `tx_start`              | 6 (7 if a byte was waiting) |
| `tx_start` sampled         | `mac_req` + first byte  | 5           |
| `rx_dat` byte              | same byte on payload path | 5 to the analyzer output, +1 in the extractor |
| `rx_ena` falls             | `out_end`               | 1 after the last forwarded byte |
| `out_end`                  | `idx_ptr` updated       | 8 record writes, then update |

## Departures from the original design description

The original description gives the architecture, the signal names and the
memory organisation. It leaves much of the detail open. Where this RTL
differs from it, or fills a gap:

* **Transmitter structure.** The original transmitter is a chart of 13
  hand-made states that alternate between the two RAMs. Here a word counter,
  a source table and a word queue do the same walk. The MAC-side signal
  names are the original ones. Their directions and timing, given above, are
  this design's own.
* **Transmitter start.** The original transmitter also takes the IP_T0
  signals. Here only the packager sees them, and it starts the transmitter
  with `tx_start`/`tx_req` once the dynamic fields are in the RAM.
* **Packager states.** The packager is described as a single state. Here it
  has an idle state, four dynamic-word write states and a wait state, so
  that the four words and the held E1 bytes share one RAM port.
* **Data Block RAM size.** A single 2 KB RAM is described for the forward
  path. Two halves of 256 bytes for four flows already fill 2 KB, and the
  dynamic fields do not fit as well. The RAM here is 1024 × 32 (4 KB).
* **Header field layout.** The 70-byte header, the static/dynamic split and
  the packet counter at byte 56 follow the description. The order of the
  other dynamic fields and the offsets of the address fields are chosen
  here.
* **Record layout.** One field per 32-bit word in 8-word records in a
  2048-word RAM follows the description. The field order, the status word
  and the length check are chosen here.
* **Configuration refresh.** The analyzer rereads Config_BLK_RAM after every
  frame, as described, into registers, which takes 8 cycles. The port table
  entries have a valid bit, so a flow can be switched off.
* **Dummy traffic.** The description says only that the forward path
  generates dummy traffic from the station clock. The counting pattern and
  the `use_dummy` selection are chosen here.
* **Not built:** the MicroBlaze software, the IP_T0 clock module that sets
  the pulse rate (one pulse per 255.375 byte times per flow, giving 255- and
  256-byte payloads), the MAC wrappers and the E1 line interfaces. An early
  single-state-machine version of the forward path is described as well. It
  was replaced by the three-block design built here and is not implemented.

## Verification

Each block has a testbench that compares its outputs with an independent
model and prints `TB_RESULT checks=<n> failures=<n>`. Each also has a
watchdog.

| Testbench               | What it covers                                                        |
|-------------------------|-----------------------------------------------------------------------|
| `tb_bit_to_byte`        | random bit streams with gaps; byte values and the `pdh_ena` cycle      |
| `tb_pdh_dummy_source`   | pattern per flow, bit order, restart after `enable` drops              |
| `tb_bram_dp`            | byte enables, read-first, both ports, random traffic against a model   |
| `tb_data_packager`      | every RAM write, `tx_req`, the 6/7-cycle latency, counters, missed pulses, overflow |
| `tb_mac_transmitter`    | 60 frames of every length, byte-exact, no gaps, latency, two aborts    |
| `tb_header_analyzer`    | 150 frames: good, wrong MAC/IP/port, disabled port, config changes, bad FCS |
| `tb_info_extractor`     | 300 frames: every record word, payload port, `idx_ptr`, ring wrap      |
| `tb_cealite_top`        | end to end at the default sizes, described below                       |

`tb_cealite_top` runs the whole design with no parameter overrides. It
drives four E1 sources and an IP_T0 source with a pulse every 2044 clocks,
which gives 255/256-byte payloads. A MicroBlaze model writes the headers and
configuration and reads every record. A MAC model loops each transmitted
frame back into the receive side with an FCS. The run covers 360 pulses and
about 360 frames. It checks every header byte, payload byte, counter,
payload-port byte and record word. It also counts, and fails if any never
happened: a missed pulse, an overflow and the recovery after it, a
transmitter abort, a bad FCS, frames dropped for an unknown port or a
foreign MAC, a wrap of the record ring, and a switch to the dummy source.
It takes about a second.

## Simulating

With Verilator 5 (the package must come first):

```sh
verilator --binary --timing -Wno-fatal --top-module tb_cealite_top \
    rtl/cea_pkg.sv rtl/bram_dp.sv rtl/bit_to_byte.sv rtl/pdh_dummy_source.sv \
    rtl/data_packager.sv rtl/mac_transmitter.sv rtl/header_analyzer.sv \
    rtl/info_extractor.sv rtl/cealite_top.sv tb/tb_cealite_top.sv
./obj_dir/Vtb_cealite_top
```

For a single block, give its testbench as the top module, along with
`rtl/cea_pkg.sv` and the block's file (plus `rtl/bram_dp.sv` where the
testbench uses a RAM). `-Wno-fatal` only keeps warnings about unused
parameters from stopping the build.

## Changing the design

* **RAM sizes** are the top's parameters. `D_DEPTH` must hold
  `2·NUM_FLOWS·64 + 4·NUM_FLOWS` words. `R_DEPTH` sets the number of records
  (`R_DEPTH/8`) and the width of `idx_ptr`.
* **Number of flows** is `NUM_FLOWS` in `cea_pkg`. Change `FLOW_W` with it,
  and the E1 port widths follow. The Header RAM needs `16·NUM_FLOWS` words.
  The config map grows by one port word per flow.
* **Header layout**: the receive offsets `OFS_*` and the dynamic-field
  positions are in `cea_pkg`. The static header content is whatever software
  writes.
* The assertions in the packager check that a holding register is never
  overwritten. They fail first if the E1 rate or the number of flows is
  raised beyond what one RAM write port can absorb.

# 1x5 store-and-forward packet router

A small on-chip router with one byte-wide input port and five byte-wide
output channels. Packets arrive on `data_in` one byte per clock. The first byte
names the destination, and the router stores each packet in that channel's
buffer. A packet only becomes visible to the receiver once every byte of it is
stored (store and forward). So a receiver never sees a packet that was cut
short or rejected. Bad packets are dropped and reported on `err`. A full
channel pushes back on the source through `suspend_data`.

The design is a controller FSM with four states, an 8-bit input register, a
1-to-5 de-mux and five identical output channels. Everything runs on one clock
with one asynchronous reset.

## Pins

| pin | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; every register uses the rising edge |
| `resetn` | in | 1 | asynchronous reset, active low |
| `packet_valid` | in | 1 | high while a packet is being offered on `data_in` |
| `data_in` | in | 8 | packet byte |
| `re1`..`re5` | in | 1 each | read enable of channel 1..5 |
| `ch_out1`..`ch_out5` | out | 8 each | last byte read from channel 1..5 |
| `valid_chanel1`..`valid_chanel5` | out | 1 each | channel holds complete packet bytes not yet read |
| `err` | out | 1 | one-cycle pulse for each rejected packet |
| `suspend_data` | out | 1 | source must hold its current byte |

These are 16 inputs and 47 outputs (63 signal pins). The spelling
`valid_chanel` is kept on purpose so that the names match the original
pin list.

## Packet format

```
byte 0        DA   destination address; DA[2:0] = 0..4 selects channel 1..5
byte 1        LEN  number of payload bytes, 0..62
byte 2..LEN+1      payload
```

A packet is 2 to 64 bytes long. All of it, header and length included, is
passed to the output channel unchanged. The receiver therefore reads DA, then
LEN, and then knows how many payload bytes follow. DA[7:3] is carried along
but not decoded.

The decode of DA[2:0] comes from example traffic for this router: header
`8'b1101_0000` leaves on channel 1, `8'b1110_1001` on channel 2,
`8'b1011_1010` on channel 3, `8'b1111_1011` on channel 4 and `8'b1101_1100` on
channel 5. Their low three bits are 0 to 4. The two-byte header (DA, then LEN)
is an interpretation. The description this design follows names both fields
but does not fix their layout (see "Departures and open points").

## Input handshake and `suspend_data`

A byte is accepted on a rising edge where `packet_valid = 1` and
`suspend_data = 0`. While `suspend_data` is 1, the source must hold `data_in`
and keep `packet_valid` high. `packet_valid` frames the packet. It rises with
the header and must stay high until the last byte is accepted. It may stay high
straight into the next packet's header, so packets can be sent back to back
with no idle cycle.

`suspend_data` is computed only from registered state and the channel's free
count, never from `data_in`, so the source sees no combinational path back from
its own data. It is 1 when the input register still holds a byte and the
selected channel has no free byte to take it.

## How a byte moves through the router

```
data_in ──► router_reg (8-bit, load enable) ──► router_demux ──► router_out_chan x5 ──► ch_outN
              ▲                                    ▲                    │
              └────────── router_ctrl (FSM: load, sel, wr, last, discard)◄── free count
```

1. **Edge t:** the controller accepts the byte. The input register loads it.
   If the byte is a header, the controller also latches the channel number.
2. **Edge t+1:** if the selected channel has a free byte, the de-mux gives it
   the register's byte with a write strobe. The next input byte can be loaded
   on the same edge, so with no back-pressure the router takes one byte per
   clock.
3. The write of the packet's **last byte** also carries a commit strobe. The
   channel's commit pointer then jumps over the whole packet, and
   `valid_chanelN` rises.
4. While `reN = 1` and `valid_chanelN = 1`, the channel pops one byte per
   clock. Each byte appears on `ch_outN` on the edge after the cycle that
   popped it.

**Latency.** With no back-pressure, if the first byte of an N-byte packet is
accepted at edge t, then `valid_chanelN` is high after edge t+N. With `reN`
held high, the header is on `ch_outN` after edge t+N+1. The top-level
testbench checks this for 3-byte packets.

## The output channel buffer (`router_out_chan`)

Each channel is a 64-byte circular RAM with three pointers:

- **write pointer:** where the next byte of the incoming packet goes;
- **commit pointer:** the end of the last complete packet;
- **read pointer:** the next byte the receiver will get.

Only bytes between the read pointer and the commit pointer are readable.
`valid_chanel` means that these two pointers differ. A **discard** strobe moves
the write pointer back to the commit pointer, which throws away a packet that
was only partly stored. The channel reports `free` as DEPTH minus
(write pointer minus read pointer), so uncommitted bytes count as used. The
controller uses that count for flow control.

DEPTH is 64 bytes, exactly one packet of the largest legal size. A largest
packet therefore always fits in an empty channel. If a channel still holds
unread packets, the source is suspended until the receiver frees enough room.
A receiver that never reads its channel stalls the input port for every
channel. This is head-of-line blocking, inherent in a single input with one
register stage.

## Controller FSM (`router_ctrl`)

| state | waits for | on an accepted byte |
|---|---|---|
| `S_HDR` | header | DA[2:0] ≤ 4: load it, latch the channel, go to `S_LEN`. Otherwise: `err`, go to `S_DROP` |
| `S_LEN` | length | LEN ≤ 62: load it; go to `S_HDR` if LEN = 0 (packet complete), else `S_DATA`. LEN > 62: discard, `err`, go to `S_DROP` |
| `S_DATA` | payload | load it; after the LEN-th byte, go to `S_HDR` |
| `S_DROP` | `packet_valid` low | consume and ignore bytes; never suspends |

If `packet_valid` falls in `S_LEN` or `S_DATA`, the packet is incomplete. The
controller discards what was stored, pulses `err` and returns to `S_HDR`.
A header with an unroutable address or an illegal length is never written to
any channel. The drop state ends only when `packet_valid` falls, because the
length of such a packet cannot be trusted.

## Reset

`resetn` is inverted to an active-high asynchronous reset. That reset clears
the input register to zero, as the register is specified. It also returns the
FSM to `S_HDR` and empties all five buffers. The `ch_outN` registers are **not**
reset: they keep the last byte read. This matches the reference waveform,
where the outputs are undefined before their first byte and hold their values
across reset pulses. Do not use `ch_outN` as data until a byte has been read
from that channel.

## Files

| file | contents |
|---|---|
| `rtl/router_pkg.sv` | widths, port count, MAX_LEN, state enum, `chan_wr_t` write-request struct, header check |
| `rtl/router_reg.sv` | 8-bit register, enable, asynchronous reset to zero |
| `rtl/router_ctrl.sv` | four-state controller |
| `rtl/router_demux.sv` | steers write/commit/discard strobes to the selected channel |
| `rtl/router_out_chan.sv` | store-and-forward channel buffer |
| `rtl/router_top.sv` | the router |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters: `router_top` has `DEPTH` (default 64, bytes per channel). Byte
width (8), port count (5) and MAX_LEN (62) are package constants. The header
decode uses three address bits, so the port count cannot go above 8 without
changing `hdr_ok` and the DA field.

## Verification

Every testbench checks its outputs against an independent model. Each one
prints `TB_RESULT checks=<n> failures=<n>` and has a cycle-count watchdog.

- `tb_router_reg`: random load/hold, and asynchronous reset between edges.
- `tb_router_demux`: every select value with random requests.
- `tb_router_ctrl`: cycle-exact strobes for a good packet, an unroutable
  header, an illegal length, a cut-short packet, a zero-length packet, and a
  full channel forcing suspension.
- `tb_router_out_chan`: a queue model covering commit visibility, discard,
  full buffer, and 5000 random cycles.
- `tb_router_top`: the whole router at default size.
  - First it replays the five example headers, with a reset pulse between
    packets. It checks the channel each header leaves on, the 3-cycle packet
    latency, and that `ch_out` holds across reset.
  - Then it sends 3000 random packets: legal lengths 0..62 including many of
    the maximum size, back-to-back and gapped, unroutable headers, illegal
    lengths and cut-short packets. Readers alternate between fast and very slow.
  - A scoreboard checks every byte delivered on every channel, the number of
    `err` pulses, and that each mechanism actually happened (stall, each error
    kind, zero-length, maximum-length, back-to-back, reset, all five channels).
  - It runs in about half a second.

Assertions in `router_ctrl` and `router_out_chan` check two rules: a channel is
never written without room, and a discard happens only while a packet is open.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/router_pkg.sv tb/tb_router_top.sv --top-module tb_router_top -o sim
./obj_dir/sim
```

Lint with `verilator --lint-only -Wall -Irtl rtl/router_pkg.sv rtl/router_top.sv`.
The remaining lint notes are expected:

- `SYNCASYNCNET`: the assertions use the asynchronous reset in `disable iff`.
- `UNUSEDPARAM` on `PKT_MAX`: this appears only when a module that does not use
  the package is linted alone.

## Departures and open points

- **Header layout.** The description names a destination address of 8 bits and
  an 8-bit length of 0..62. It also mentions a "transfer word up to 64 bytes",
  and elsewhere a packet length of 1 to 63 bytes. This design uses a separate
  DA byte and LEN byte (2..64 bytes per packet). The 1..63 figure is not
  followed.
- **Which DA bits route.** Port addresses are not given. DA[2:0] = channel − 1
  is inferred from the example traffic. The other five DA bits are ignored.
- **Reset polarity.** The register is specified with an active-high reset,
  while the chip pin is `resetn`. The top inverts one into the other.
- **Read enable polarity.** One passage suggests a select line that may be tied
  low. The reference waveform shows `re1..re5` high while data leaves. Read
  enables here are active high.
- **`err` and `suspend_data`** are named in the pin list but their conditions
  are not defined. The rules above (three reject cases, full-channel
  back-pressure) are this design's own.
- **Buffer depth** is not specified. 64 bytes (one maximum packet) per channel
  is this design's choice. It costs 5 × 64 × 8 = 2560 bits of RAM.
- **Not built.** The description also has passages about a full-duplex serial
  link with serial-clock edges and master/slave select lines. There is no pin
  for such a link in the router's pin list, and no framing or timing is given,
  so nothing was built from them. Three internal signals `w1..w3` appear in the
  reference waveform without explanation. Timeouts, parity and soft resets are
  not described and not built.
- **Performance figures.** The original implementation reports 81.6 MHz on a
  4656-slice FPGA, 315 LUTs and 141 flip-flops, and a latency of 9.375 ns. None
  of these depends on RTL details that are given, so they were not reproduced.
  This RTL has 129 flip-flops plus the 2560 RAM bits.

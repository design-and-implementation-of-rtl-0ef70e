# Four-channel TCP/UDP network controller for the W3100A, with a run-time reconfigurable channel

The WIZnet W3100A is a hardwired TCP/IP chip. It contains the Ethernet MAC,
IP, ARP, ICMP, TCP and UDP, plus 16 KB of packet buffer. An FPGA that talks
to it over its 8-bit MCU bus can therefore reach a 10 Mbit/s Ethernet
network with a small amount of logic. That logic has four jobs:

- set the chip up;
- open and close TCP connections;
- move bytes between the application and the chip's circular buffers,
  keeping the chip's pointers up to date;
- share the single bus among all of this.

This RTL is that logic for four channels. Each channel can run TCP (active
or passive open) or UDP. The application sees one byte FIFO per channel and
direction.

One channel is special. It is meant to sit in a partially reconfigurable
region of the FPGA. Its configuration can be replaced at run time, while the
other three channels keep moving data. For example, it can switch from TCP
to UDP, or from a 128-byte to a 1024-byte maximum segment size. The static
logic isolates that channel while it is being replaced, then re-initialises
it in the chip with its new settings.

Target clock: 50 MHz. Everything is written in synthesizable
SystemVerilog-2017, in a single clock domain with synchronous active-high
reset.

## Block structure

```
 application                       nc_top                                W3100A
 tx_wr/tx_din ─► sync_fifo x4 ─► channel_arbiter ─► tx_fsm ─┐
                                                            │
 rx_rd/rx_dout ◄─ sync_fifo x4 ◄─ channel_classifier ◄─ rx_fsm ─┤   bus_arbiter ─► w3100a_bus_if ─► A[14:0] D[7:0]
                                   (rx_timer taps this)     │  (5 masters)       9/8-clock cycles   CS RD WR
 open_req/close_req ─► tcp_connect_fsm, tcp_disconnect_fsm ─┤                                      RST INT
                       net_data_rom ─► init_fsm ────────────┘
 rp_busy/rp_variant ─► reconfig_ctrl ─► (init_fsm re-init, channel enables)
```

| Module | Role |
|---|---|
| `nc_pkg` | Register map, command and status codes, bus request/response structs, address helper functions |
| `w3100a_bus_if` | Generates the chip's read cycle (9 clocks) and write cycle (8 clocks) |
| `bus_arbiter` | Round-robin arbitration of the one bus among the five state machines, one access at a time |
| `sync_fifo` | Show-ahead byte FIFO (8 of them, 256 bytes each by default) |
| `net_data_rom` | Table of register writes for start-up and for each channel, computed from parameters |
| `init_fsm` | Resets the chip, plays back the table, starts the chip, re-initialises the reconfigurable channel |
| `channel_arbiter` | Gives each transmit FIFO a turn of up to 2048 bytes |
| `tx_fsm` | Writes a burst into the chip's transmit buffer, then issues the send command |
| `rx_fsm` | Runs on interrupt; reads a channel's received bytes and issues the recv command |
| `channel_classifier` | Routes received bytes into the FIFO of their channel, and drops bytes for disabled channels |
| `tcp_connect_fsm` | Active and passive open, with timeouts |
| `tcp_disconnect_fsm` | Active and passive close, including Half Closed and FIN Wait |
| `reconfig_ctrl` | Isolates the reconfigurable channel and triggers its re-initialisation |
| `rx_timer` | Throughput counter: time from the first to the last received byte, plus a free-running time stamp |
| `nc_top` | Wires all of the above |

## The W3100A bus cycle

The chip's MCU bus has these signals:

- a 15-bit address and an 8-bit data bus;
- CS, RD and WR, all active low;
- RST, active high;
- INT, taken here as active low.

It must be used in its clocked mode. The rules that matter are:

- CS is low for at least 100 ns.
- RD or WR falls at least 20 ns after CS falls.
- RD or WR rises at least 20 ns before CS rises.
- The address is stable for the whole time CS is low.

At 20 ns per clock this makes a read 9 clocks (180 ns) and a write 8 clocks
(160 ns). `w3100a_bus_if` places the edges like this (clock 0 is the first
clock of the cycle):

```
read   clock: 0   1   2   3   4   5   6   7   8
       CS_n   ‾‾‾ ___ ___ ___ ___ ___ ___ ___ ‾‾‾
       RD_n   ‾‾‾ ‾‾‾ ___ ___ ___ ___ ___ ‾‾‾ ‾‾‾     data sampled at end of clock 6
write  clock: 0   1   2   3   4   5   6   7
       CS_n   ‾‾‾ ___ ___ ___ ___ ___ ___ ‾‾‾
       WR_n   ‾‾‾ ‾‾‾ ___ ___ ___ ___ ‾‾‾ ‾‾‾     data driven clocks 1..7
```

The totals of 180 ns and 160 ns come from the original design. The position
of each edge inside the cycle is this implementation's choice. All bus pins
come straight from flip-flops.

A master requests an access with `bus_req_t {req, we, addr, wdata}` and
holds it until `bus_rsp_t.done` pulses. At least one idle clock separates
two accesses, so the bus never runs back-to-back. This caps the byte rate
at about 5.5 MB/s for reads and 6.25 MB/s for writes, well above the
1.25 MB/s of 10 Mbit/s Ethernet.

The data bus is split into `w3_data_o`, `w3_data_oe` and `w3_data_i`. The
tri-state pad and its pull-down belong in the board-level wrapper.

## Chip memory map used

The chip's 32 KB address space is laid out as follows:

| Range | Contents |
|---|---|
| 0x0000–0x00FF | Control registers |
| 0x0100–0x01FF | Pointer registers |
| 0x4000 | Transmit buffers, 2 KB per channel |
| 0x6000 | Receive buffers, 2 KB per channel |

The original description names the registers but does not give their
offsets. `nc_pkg` therefore fixes a map, which must be checked against the
W3100A datasheet before use with real silicon.

| Register | Address |
|---|---|
| Command register (CR) of channel c | c |
| Interrupt status register (ISR) of channel c | 4 + c |
| Interrupt register (IR) | 0x08 |
| Interrupt mask register (IMR) | 0x09 |
| Gateway | 0x80 |
| Subnet mask | 0x84 |
| Source MAC address | 0x88 |
| Source IP address | 0x8E |
| Retry time | 0x92 |
| Retry count | 0x94 |
| Receive/transmit buffer split | 0x95 / 0x96 |

Each channel has a register block at 0xA0 + 0x18·c, holding:

| Offset | Register |
|---|---|
| +0 | SSR |
| +1 | SOPR |
| +2 | destination IP |
| +6 | destination port |
| +8 | source port |
| +11 | TOS |
| +12 | MSS |

The pointers of channel c start at 0x100 + 0x20·c. There are five of them,
in this order: RW, RR, TA, TW, TR. Each is 32 bits, stored most significant
byte first, 4 bytes apart. Each pointer also has a shadow register at
+0x18 + p. Reading the shadow register latches the pointer's current value,
so its four bytes can then be read consistently. The command, status and
socket-state codes are also in `nc_pkg`.

All these addresses are single localparams and helper functions in `nc_pkg`,
so a different map needs only that one file changed.

## Start-up (`init_fsm`, `net_data_rom`)

Start-up runs in this order:

1. The controller pulses the chip's RST pin and waits.
2. It plays back section 0 of the network data ROM: MAC, source IP (default
   10.0.0.91), gateway, mask, retry time (default 200 ms), retry count, 2 KB
   per channel, and IMR = 0xFF.
3. It writes 0x01 to channel 0's command register.
4. It polls channel 0's ISR until it reads 0x01.
5. It plays back one section per channel: protocol, source port
   (10001–10004 by default), destination, TOS, MSS (128 by default),
   pointers cleared, and a socket-initialise command.

Only then does `init_done` rise and the other machines start.

The ROM holds {address, data} words. Its contents are a function of the
top-level parameters, so changing an address or port means changing a
parameter, not a file. Section 5 is the reconfigurable channel's
alternative configuration.

## Transmit path: arbiter and pointer arithmetic

### Channel arbiter

`channel_arbiter` scans the four transmit FIFOs in turn and stays on the
first enabled channel that has data. It hands bytes to `tx_fsm` together
with a 2-bit channel number. The turn ends when either of these happens:

- the FIFO runs dry;
- 2048 bytes have been taken (`MAX_BURST`).

2048 bytes is one channel's share of the chip's 8 KB transmit memory. When
the turn ends, the arbiter raises `flush`, waits for `send_done`, and moves
to the next channel number. A channel that is disabled (not connected, half
of a half-closed connection, or being reconfigured) is skipped. If a
channel is disabled in the middle of its turn, the turn ends.

The handover between the arbiter and `tx_fsm` is atomic. `tx_fsm` raises
`pop` combinationally in the clock where it accepts the offered byte, and
keeps its own copy while the 8-clock write runs. If the arbiter withdraws a
channel during that write, the byte is therefore neither lost nor written a
second time.

### Pointers

The chip's transmit buffer for a channel is a 2 KB ring. Three 32-bit
pointers describe it:

- **TWPR**: where the controller writes next. The controller owns this one.
- **TRPR**: how far the chip has read and sent.
- **TAPR**: how far the peer has acknowledged. This one is meaningful only
  for TCP.

Space that is not yet acknowledged (TCP) or not yet sent (UDP) must not be
overwritten. For every burst, `tx_fsm` therefore does the following:

1. Read TWPR and the "tail" pointer: TAPR for a TCP channel, TRPR for a UDP
   channel. Each read is one shadow-register read followed by four byte
   reads.
2. Reduce both pointers to 11 bits (their position in the ring) and compute
   the free buffer space:
   ```
   TWPR > tail :  FBS = 2048 - (TWPR - tail)
   TWPR < tail :  FBS = tail - TWPR
   equal       :  FBS = 2048
   ```
3. Write bytes to 0x4000 + 2048·c + ((TWPR + SDS) mod 2048). SDS counts the
   bytes sent so far. Writing continues until the arbiter flushes or
   SDS = FBS − 1.
4. Read the channel's ISR until its send bit is clear, so the previous send
   command has finished. (`ev_send_wait` marks the case where it had not.)
5. Write TWPR + SDS back, most significant byte first, then write SEND to
   the command register.

The ring is never filled to the last byte (step 3 stops at FBS − 1). A full
buffer would have TWPR = tail, which the formula reads as empty. If a burst
stops because the space has run out, `ev_buf_full` pulses. The arbiter's
turn still ends with a send, and the rest of the FIFO waits for the next
turn.

The pointers are kept as full 32-bit values and written back as
TWPR + SDS. Wrap-around inside the ring therefore needs no special case. The
ring offset is always the low 11 bits.

## Receive path: interrupt, RDS and stalls

The chip writes received data into each channel's 2 KB receive ring:

- **RWPR** is moved by the chip.
- **RRPR** is moved by the controller.

The chip pulls INT low while a channel has unread data. `rx_fsm` then works
as follows:

1. It reads IR to find the lowest-numbered interrupting channel. It then
   reads that channel's ISR; the read clears the interrupt in the chip.
2. If the receive bit is set and the channel is enabled, it waits until that
   channel's receive FIFO is not full.
3. It reads RWPR and RRPR and computes the received data size:
   ```
   RWPR > RRPR :  RDS = RWPR - RRPR
   RWPR < RRPR :  RDS = 2048 - (RRPR - RWPR)
   equal       :  RDS = 0
   ```
4. It reads bytes from 0x6000 + 2048·c + ((RRPR + DRL) mod 2048) into the
   classifier. DRL counts the bytes read so far. Reading continues while
   DRL < RDS. If the receive FIFO fills, the read stops early (`ev_rx_stall`).
5. It writes RRPR + DRL back and issues the RECV command.

If bytes remain in the ring, because the FIFO filled or more data arrived
after RWPR was sampled, the chip raises the interrupt again and the process
repeats. Nothing is lost; the chip simply holds the data until there is
room.

UDP data come out exactly as the chip stores them. Each datagram is
preceded by an 8-byte header, so the application must skip or use it:

- 2 bytes of length;
- 4 bytes of source IP;
- 2 bytes of source port.

`channel_classifier` routes each byte by the channel number that
accompanies it. Bytes for a disabled channel are dropped and counted in
`rx_dropped`. Routing by source IP, to serve more than four logical
channels, is not implemented.

## TCP connections

The chip exchanges SYN, ACK and FIN packets by itself. The two connection
machines only give commands (CONNECT, LISTEN, CLOSE) and follow each
channel's socket state register (SSR), adding the timeouts the chip does
not have. Each machine keeps one state per channel and serves the channels
in turn, one bus access per visit, so a channel waiting on its peer never
blocks the others.

**Opening (`tcp_connect_fsm`).** Each TCP channel is either active or
passive.

An active channel opens like this:

1. From Connection Closed it goes to ARP Wait.
2. When the ARP reply arrives, the chip sends SYN and the channel goes to
   SYN ACK Wait.
3. When the SYN ACK arrives, the channel is Established.

Either wait times out after `TCP_TIMEOUT` clocks and returns to Closed; a
reset from the peer also returns to Closed. While the application holds
`open_req`, a closed channel retries after `RETRY_GAP` clocks.

A passive channel opens like this:

1. It listens in SYN Wait, with no timeout.
2. When a SYN arrives it goes to ACK Wait.
3. When the ACK arrives it is Established.

A timeout in ACK Wait returns the channel to SYN Wait.

**Closing (`tcp_disconnect_fsm`).** This machine also sets which direction
of each connection may carry data (`tx_up` and `rx_up` on the top).

In an active close, the application raises `close_req`:

- The channel moves to FIN ACK Wait. Transmission stops; reception
  continues.
- If the peer answers with FIN ACK, the channel goes to Closed.
- If the peer answers with only an ACK, the channel goes to FIN Wait and
  keeps receiving until the peer's FIN.
- If the peer does not answer within `TCP_TIMEOUT`, the channel goes to
  Closed.

A passive close starts when the peer's FIN arrives:

- If the channel's transmit FIFO still holds data, it goes to Half Closed.
  Transmission continues and reception stops. When the FIFO is empty, the
  controller sends FIN and moves to ACK Wait.
- If there is nothing left to send, FIN ACK is sent at once.
- The peer's ACK then closes the channel.

A peer reset closes the channel from any state.

## Run-time reconfiguration of one channel

Channel `RP_CH` (3 by default) stands for a channel held in a reconfigurable
region. Loading a partial bitstream is done by the FPGA's configuration port
and is outside this RTL. That side signals the controller with two inputs:

- `rp_busy`: high while the new module is loading.
- `rp_variant`: which module is now in place. 0 means the original; 1 means
  the alternative, with protocol `ALT_TCP` and segment size `ALT_MSS`.

`reconfig_ctrl` reacts in three steps:

1. While `rp_busy` is high, it isolates the channel. The arbiter skips the
   channel, the classifier drops what arrives for it, and its TCP state is
   cleared. The static part must not depend on a region whose logic is
   being rewritten.
2. When `rp_busy` falls, it asks `init_fsm` to replay that channel's ROM
   section: the original one, or the alternative section 5.
3. When the replay is done, it releases the channel. `ch_is_tcp` now shows
   the channel's protocol.

The other three channels carry on throughout. Reconfiguration costs the
reconfigured channel its traffic for the load time plus about 21 bus
writes. It costs the others at most a short share of the bus.

## Throughput counter

`rx_timer` watches the bytes leaving the receiver:

- The first byte after an idle period starts a measurement.
- Each byte updates the "last" time and adds to the byte count.
- After `MEAS_IDLE` clocks without data (1 s by default), `meas_valid`
  pulses. `meas_clocks` then holds the clocks from the first byte to the
  last, and `meas_bytes` the number of bytes.

`timestamp` is a free-running clock counter that a recorder can store next
to each packet.

## Parameters of `nc_top`

| Parameter | Default | Meaning |
|---|---|---|
| `MAC`, `SRC_IP`, `GATEWAY`, `SUBNET` | 00:01:02:00:00:01, 10.0.0.91, 10.0.0.1, 255.255.255.0 | Network identity |
| `CH_TCP`, `CH_ACTIVE` | 4'b1000, 4'b1111 | Per channel: TCP (1) or UDP; active (1) or passive open |
| `CH_SPORT`, `CH_DIP`, `CH_DPORT` | 10001–10004, 10.0.0.2, 10000 | Ports and peer |
| `CH_MSS` | 128 each | Maximum segment size written to the chip |
| `RP_CH`, `ALT_TCP`, `ALT_MSS` | 3, UDP, 128 | Reconfigurable channel and its alternative configuration |
| `FIFO_DEPTH` | 256 | Application FIFO depth in bytes |
| `MAX_BURST` | 2048 | Bytes per arbiter turn |
| `TCP_TIMEOUT`, `RETRY_GAP` | 50000, 5000 clocks | Connection timeouts (1 ms, 0.1 ms) |
| `MEAS_IDLE` | 50 000 000 clocks | Idle time that ends a throughput measurement |

The `events` output has one pulse per mechanism. The bit order is:

| Bit | Event |
|---|---|
| 0 | buffer full |
| 1 | send wait |
| 2 | send |
| 3 | burst limit |
| 4 | receive stall |
| 5 | recv |
| 6 | open |
| 7 | connect timeout |
| 8 | connect reset |
| 9 | active close |
| 10 | passive close |
| 11 | half closed |
| 12 | FIN wait |
| 13 | disconnect timeout |
| 14 | reconfiguration |

## How this differs from the original controller

- **Register map.** The original names the registers and shows the memory
  regions but gives no register offsets. The map in `nc_pkg` is assumed.
- **Full and empty rings.** The original's receive-size formula gives a full
  2 KB for equal pointers. Here equal pointers mean no data, and the
  transmitter leaves one byte of its ring unused, so a full ring is never
  confused with an empty one.
- **Pointer updated after a receive.** One flowchart of the original labels
  this step "update TWPR". The text updates the receive read pointer, which
  is what this design does.
- **UDP header.** The 8-byte per-datagram header from the chip is passed to
  the application, not parsed. The classifier routes by chip channel only.
- **Reconfiguration.** In the original, the channel's logic is physically
  replaced, and the static and reconfigurable regions are joined by
  tri-state bus macros. Here the channel logic is shared and static. The
  change is represented by isolating the channel and rewriting its
  configuration in the chip. Bus macros, the clock manager, the bitstream
  flow, the PHY and the W3100A itself are not part of this RTL.
- **Assumed values.** The original does not give these: the policy of the
  five-way bus arbiter, the FIFO depth, the timeouts, the reset pulse
  lengths, the order of the channel register writes, and the edge positions
  inside the bus cycle.
- **Resources.** The original reports about 1100 LUTs and 5 block RAMs on a
  Virtex XCV1000: one for the initialisation table and four for the
  application FIFOs. A generic yosys synthesis of `nc_top` gives about 1750
  cells, 960 flip-flops and 16.6 Kbit of memory. The memory is eight
  256-byte FIFOs plus the ROM; 256 is this design's choice. The two cell
  counts are not directly comparable.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Stimulus is random
(`$urandom`) where that makes sense, and expected values come from
independent models in the testbench: a queue model for the FIFO, a
reference ring buffer for the pointers, and an expected table for the ROM.

`tb/w3100a_model.sv` is a behavioural model of the chip's bus side. It is
not synthesizable and does not model the network. It provides:

- the memory map, pointers and shadow registers;
- the commands and the ISR/IR behaviour, with INT;
- socket states that a testbench can drive as the "peer" (SYN, ACK, FIN,
  FIN ACK, RST, incoming data);
- transmit completion after a set delay, with the sent bytes queued for
  checking;
- bus-timing checks: CS too short, a strobe outside CS or too close to its
  edges, overlapping RD and WR, and a send command issued while a send is
  pending.

There are three top-level testbenches:

- **`tb_nc_top`** uses reduced timeouts. It runs:
  - start-up;
  - UDP transmit and receive on several channels with byte-exact checks;
  - a receive stall against a held FIFO;
  - a throughput measurement, checked against the 9-clock read;
  - a passive TCP open with an ACK Wait timeout, data, and a half close;
  - an active TCP open with ARP timeout, peer reset, data, FIN Wait close,
    and an unanswered close;
  - reconfiguration of channel 3 from TCP to UDP with MSS 1024, and back.

  It counts every event bit and fails if any never occurred.
- **`tb_nc_reconfig_mss`** reproduces the reconfiguration scenario. Two UDP
  channels stream at close to line rate with MSS 128. Channel 1, the
  reconfigurable one here, is then switched to MSS 1024 in mid-stream. The
  test checks that:
  - channel 0 keeps sending and receiving throughout;
  - channel 1 is silent while isolated;
  - channel 1 comes back with the new MSS;
  - not one byte on either channel is lost or repeated across the switch.
- **`tb_nc_top_full`** instantiates `nc_top` with all defaults. It runs
  start-up, UDP traffic on three channels, and a complete TCP open,
  exchange and close on channel 3. It then waits out the 1 s measurement
  timeout (50 M clocks), which takes about half a minute of simulation.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/nc_pkg.sv tb/tb_nc_top.sv --top-module tb_nc_top --Mdir build/tb_nc_top -j 8
./build/tb_nc_top/Vtb_nc_top
```

Replace `tb_nc_top` with any other testbench name. Verilator reports some
width warnings; add `-Wno-fatal` to run despite them. `nc_pkg.sv` must come
first, because every module imports it.

## How far to trust it

What has been checked:

- All modules pass Verilator lint.
- Every testbench passes.
- Each testbench has been shown to fail against a deliberately broken copy
  of its module.

Everything has been checked against the behavioural chip model above, not
against a W3100A. Before hardware use, verify these against the datasheet:

- the register addresses and command codes in `nc_pkg`;
- the INT polarity;
- the socket-state codes.

The bus timing follows the stated CS/RD/WR rules with at least one clock of
margin on each edge.

# Timing and slow-control backend for drift-tube front-end boards

A drift-tube muon detector is read out by on-board front-end cards (OBDT
boards), each reached over one bidirectional optical LpGBT link. A backend
board in the counting room has two jobs towards every one of those cards:

* **timing** – hand down the LHC bunch-crossing clock and the markers that tie
  it to the machine (the bunch-crossing strobe BX, the orbit marker BC0 and the
  bunch-crossing number), with the same fixed latency on every link;
* **slow control** – let a host computer configure and monitor each card by
  sending bytes to, and reading bytes from, the control chips on it (the
  LpGBT chip and the Slow Control Adapter, SCA).

This RTL is the logic of one such board for `N_LINKS = 90` links. The machine
timing arrives as a stream of TCDS2 frames, one per bunch crossing; host access
arrives as AXI4-Lite transactions from a network stack; each link's frames are
built and taken apart by an LpGBT-FPGA core. Those three neighbours are not
part of this RTL: their signals are the ports of the top module,
`dt_backend_top`.

```
 TCDS2 frames ──► timing ──► BX, BC0, BC counter ──┬──► obdt_channel 0  ──► dl[0] / ◄── ul[0]
 (strobe + cmd)   │                                ├──► obdt_channel 1  ──► dl[1] / ◄── ul[1]
                  └► OC0, EC0, GCR, Resync, HR,    ⋮        ⋮
                     orbit counter, lock, errors   └──► obdt_channel 89 ──► dl[89]/ ◄── ul[89]
                                                            ▲
 AXI4-Lite (host) ──► axil_crossbar ── one slave per channel┘
```

## One clock, fixed latency

Everything runs on a single clock, the 320.632 MHz master clock recovered from
the TCDS2 stream: exactly eight times the 40.079 MHz bunch-crossing rate. A
bunch crossing is therefore eight clock cycles, and every "frame" in this
design (TCDS2 input, LpGBT downlink, LpGBT uplink) is marked by a one-cycle
strobe once per eight cycles. There is no clock-domain crossing anywhere and
no buffer whose fill level could change the delay; every path from the TCDS2
input to a link output is a fixed chain of registers:

| stage | module | clocks after `tcds2_strobe` |
|---|---|---|
| command field registered and split | `tcds2_decoder` | 1 |
| BC counter, orbit counter, lock | `bc_counter` | 2 |
| per-link register into the LpGBT-FPGA input | `obdt_channel` | 3 |

All 90 links get the BX strobe, BC0 and BC counter in the same clock cycle.
The testbench of the top checks this on every link in every cycle.

The host side (AXI4-Lite) is placed in the same clock domain for simplicity. In
a real board the network stack usually runs on its own clock; an AXI-Lite
clock-domain crossing would then sit in front of `axil_crossbar`.

## The TCDS2 command field

Each valid TCDS2 frame carries a 16-bit command field. BX has no bit of its
own: the frame strobe *is* the bunch crossing.

| bit | name | meaning | what this design does with it |
|---|---|---|---|
| 0 | BC0 | bunch crossing zero (start of orbit) | resets the BC counter, sent to all links |
| 1 | OC0 | orbit-counter reset | clears the orbit counter |
| 2 | EC0 | event-counter reset | decoded, brought out as `tcds2_decoded.ec0` |
| 3 | GCR | global counter reset | clears the orbit counter |
| 4 | Resync | flush pipelines | decoded, brought out |
| 5 | HR | (meaning not specified here) | decoded, brought out |
| 15..6 | reserved | unused | carried through in `tcds2_decoded.reserved` |

Only BX, BC0 and the BC counter travel to the front-end cards. The other
commands are decoded for the backend's own use and brought out of the top as
one-cycle pulses (`tcds2_decoded`), aligned with the cycle in which the same
frame's BX leaves the timing block.

## The bunch-crossing counter

This is the part with the most rules, all in `bc_counter.sv`:

* The counter advances once per bunch crossing (per BX strobe, i.e. every
  eight clocks), not once per clock.
* It runs from 0 to 3563 (3564 crossings per LHC orbit) and wraps to 0 on its
  own if no BC0 comes.
* A BC0 forces it to 0. Because the counter, BX and BC0 are registered
  together, the cycle that carries BC0 also shows `bc_count == 0`:

  ```
  BX strobe   : _|‾|_______|‾|_______|‾|_______|‾|______
  BC0         : _____________________|‾|________________
  bc_count    : =X=3562====X=3563====X=0=======X=1======
  ```
  (one BX per eight 320 MHz clocks; the counter value is held between strobes)
* `locked` rises with the first BC0 after reset. Before that the counter
  counts from 0 but is not aligned to the orbit.
* `bc0_misaligned` pulses when, once locked, a BC0 arrives while the counter
  is not at 3563 – the orbit seen was not 3564 crossings long. The counter is
  realigned to the new BC0 in the same cycle.
* The 32-bit `orbit_count` advances at each BC0 and is cleared by OC0 or GCR.

The orbit counter, the lock flag and the misalignment check are diagnostics
added by this design; the counting rule and the 0..3563 range are those of the
machine.

## Host access: address map

`axil_crossbar` connects the single AXI4-Lite master to 90 slaves, one per
channel. Address bits `[15:8]` pick the channel, so channel *i* owns the
256-byte window starting at `i * 0x100`. A window at or above 90 is answered
with DECERR and reaches no slave. The crossbar holds one transaction at a time:
it takes a write (address and data together) or a read, presents it to the
chosen slave, and returns the slave's response. Writes win when both arrive in
the same cycle.

Per-channel registers (`slow_control.sv`), offsets inside the window:

| offset | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | W | bit 0: flush the IC queues, bit 1: flush the EC queues (both self-clearing); bit 4: link reset request |
| 0x00 | CTRL | R | bit 4: link reset request |
| 0x04 | STATUS | R | 0 uplink ready, 1 timing locked, 2 IC TX full, 3 IC RX empty, 4 EC TX full, 5 EC RX empty, 6 IC RX overflow, 7 EC RX overflow |
| 0x04 | STATUS | W | write 1 to bit 6 / bit 7 to clear an overflow flag |
| 0x08 | IC_TX | W | queue byte `wdata[7:0]` for the IC lane; SLVERR if the queue is full |
| 0x0C | IC_RX | R | pop one received byte: bit 8 = valid, bits 7..0 = byte; reads 0 when empty |
| 0x10 | EC_TX | W | as IC_TX, for the EC lane |
| 0x14 | EC_RX | R | as IC_RX, for the EC lane |
| 0x18 | SCRATCH | RW | 32-bit scratch register (byte strobes honoured) |
| 0x1C | DROPS | R | how many times the link's uplink-ready fell (saturating) |
| 0x1C | DROPS | W | any write clears the count |

Any other offset answers SLVERR. CTRL bit 4 and DROPS are the link-management
part: the reset request is a level that leaves the channel as `dl[i].link_reset`
and stays until the host writes it back to 0, for the LpGBT-FPGA core and
transceiver of that link; DROPS tells the host how often the link lost lock.
Each queue is 16 bytes deep (`FIFO_DEPTH`). A byte that arrives at a full receive queue is dropped and sets the sticky
overflow flag.

## The IC and EC lanes

Each LpGBT frame carries two bits for the IC channel (to the LpGBT chip) and
two bits for the EC channel (to the SCA chip), in both directions.
`ic_ec_serdes` moves bytes over such a two-bit-per-frame lane with a simple
code of this design's own:

* idle lane: `11` in every frame;
* one byte: a start pair `00`, then the byte's four pairs, least significant
  pair first – five frames per byte, bytes may follow back to back;
* the receiver waits for `00` while idle, then collects four pairs.

Downlink pairs change together with the downlink BX strobe; uplink pairs are
sampled on the uplink frame strobe `ul[i].strobe`. With one frame per 25 ns,
a lane carries 80 Mb/s raw and 64 Mb/s of bytes.

**Limit:** the real LpGBT IC channel and SCA EC channel carry HDLC frames,
with their own flags, bit stuffing, addresses and CRC. This RTL does not build
that framing. The host has to form and check whole frames, and the lane code
above is only compatible with a peer that uses the same start-pair code. Treat
this layer as a placeholder to be replaced by the proper HDLC serialiser.

## What lies outside this RTL

| neighbour | its interface here |
|---|---|
| TCDS2 receiver (transceiver in buffer-bypass mode plus the 10.24 Gb/s frame decoder) | `tcds2_strobe`, `tcds2_cmd[15:0]` |
| LpGBT-FPGA core per link (2.56 Gb/s downlink, 5.12 Gb/s uplink, FEC, scrambling) | `dl[i]` (`bx`, `bc0`, `bc_count`, `ic`, `ec`, `link_reset`), `ul[i]` (`strobe`, `ready`, `ic`, `ec`) |
| transceivers and the external jitter-cleaning PLL | `clk` (the recovered 320 MHz clock) |
| 10 Gb/s Ethernet, reliable-UDP transport, AXI-Lite master | `axil_req`, `axil_rsp` |

How BC0 and the BC counter are placed into the 32 user bits of the downlink
frame is left to the LpGBT-FPGA side; this RTL hands them over as separate
fields. The transceivers must run with their transmit buffers bypassed for the
fixed latency of the logic to reach the fibre.

## Files

| file | content |
|---|---|
| `rtl/backend_pkg.sv` | timing constants, command-field bit positions, timing and link structs |
| `rtl/axil_pkg.sv` | AXI4-Lite request/response structs and response codes |
| `rtl/tcds2_decoder.sv` | command-field decoder |
| `rtl/bc_counter.sv` | BC counter, orbit counter, lock, misalignment check |
| `rtl/timing.sv` | decoder + counters (the timing block) |
| `rtl/axil_crossbar.sv` | 1-to-N AXI4-Lite crossbar |
| `rtl/slow_control.sv` | per-channel register slave and byte queues |
| `rtl/sync_fifo.sv` | single-clock FIFO used by `slow_control` |
| `rtl/ic_ec_serdes.sv` | byte serialiser/deserialiser for one 2-bit lane |
| `rtl/obdt_channel.sv` | one link: timing register stage, slow control, IC and EC lanes |
| `rtl/dt_backend_top.sv` | the board: timing, crossbar, 90 channels |
| `tb/tb_*.sv` | one self-checking testbench per module above |
| `tb/axil_bfm.sv` | AXI4-Lite master model used by the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; each
has a watchdog. With Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/backend_pkg.sv rtl/axil_pkg.sv tb/tb_dt_backend_top.sv \
    --top-module tb_dt_backend_top -o sim
./obj_dir/sim
```

Replace `tb_dt_backend_top` by any other `tb_<module>`. The top-level test runs
the full 90-link board through a little over two orbits (about 70 000 clocks)
in well under a minute. It drops one BC0 and sends one early, sends every
command once, writes to several channels, probes an unmapped window, and
floods one channel's queue until it refuses bytes and its receive side
overflows, drops one link's uplink-ready twice and raises another link's reset
request. It counts each of these events and fails if one never happens. The
LpGBT-FPGA cores are replaced by a loopback of each link's downlink lanes into
its uplink.

## Changing it

* `N_LINKS` (top) – number of channels, up to 256 with the 8-bit slot index
  (`IDX_W` of the crossbar). A ten-board system for about 1000 front-end cards
  needs about 100 per board.
* `FIFO_DEPTH` – depth of each of the four byte queues per channel (a power of
  two).
* `BX_PER_ORBIT_P`, `ORBIT_W` (`timing`, `bc_counter`) – orbit length and
  orbit-counter width.
* Register map and lane code are local to `slow_control.sv` and
  `ic_ec_serdes.sv`.

## How far to trust it

Taken from the system description: the single 320.632 MHz domain and the
eight-clock bunch crossing; the command-field bit positions; the 0..3563 BC
counter with BC0 at 0; that only BX, BC0 and the BC counter go to the links
while OC0, EC0, GCR and Resync are only decoded; one AXI-Lite slave per link
under one AXI-Lite master; about 90 links per board.

This design's own choices: the register stages and hence the exact latencies;
the orbit counter, lock flag and misalignment check; the crossbar's address
map and one-transaction sequencing; the per-channel register map and queue
depths; the form of link management (a reset request and a loss counter); the IC/EC lane code (see the limit above); one clock for the host
side; synchronous active-high reset everywhere.

The timing path is small and fully checked against an independent model. The
slow-control path is checked end to end through the loopback, but its lane
code is not the protocol the front-end chips speak.

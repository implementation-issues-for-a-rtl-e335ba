# A CAM-routed 2x2 packet switch, and the ARCTIC input section

This repository holds SystemVerilog for two small pieces of network hardware
from the same router project.

1. **A packet router that steers by content-addressable memory (CAM).** It has
   two inputs (West, South) and two outputs (North, East), and it moves
   fixed-size packets of 16 four-bit nibbles. The router reads each packet's
   4-bit destination node address and looks it up in an 8-entry CAM. A
   one-bit RAM beside the CAM gives the direction for that node, North or
   East. An address that is not in the table takes the default direction
   stored in location 0, and the router raises an address error. A separate
   2-bit serial port rewrites table entries while traffic flows. The router
   can also be switched into a faster "CAM load" mode, a state-reset mode and
   a test mode. This is the main design, and most of this README is about
   it.
2. **The ARCTIC input section.** It receives a 16-bit chip-to-chip link
   clocked on two opposite clock phases. The data goes through a delay line,
   and registers on both clock phases turn it into a 32-bit word. The delay
   line is an analog part and is given here as a behavioural model.

The two designs share no signals. `router_system_top` puts them side by side.

## Packets and the link handshake

Each port has a 4-bit data bus, a DAV (data available) line from the sender
and an ACK line from the receiver. A nibble moves on every rising clock edge
at which both DAV and ACK are high.

* The sender raises DAV with the first nibble on the bus. It keeps DAV high
  until the last nibble has moved. It also drops DAV if it gives up waiting
  for ACK.
* The receiver holds ACK high while its buffer can take data. ACK drops as
  soon as the buffer is full.
* Between packets an output carries `0000` with DAV low.

Packet layout: packet bit *k* is bit *k mod 4* of nibble *k/4*.

| packet bits | meaning |
|---|---|
| 0 | Start Of Packet, always 1. An idle input drops a first nibble without this bit and keeps waiting. |
| 4:1 | destination node address (bit 1 is address bit 0) |
| 63:5 | payload, passed through unchanged |

So the address is `{nibble1[0], nibble0[3:1]}`.

## Finding the route: the CAM/RAM unit (`cam_ram`)

The table has eight words, and each word is a 4-bit tag plus a 1-bit
direction (0 = North, 1 = East).

**Lookup.** On an evaluation, every tag is compared with the address at the
same time. The match lines select the RAM word directly. The unit stores
three results, one cycle after `eval_add`:

* the direction;
* a MATCH flag, and `addr_err` when nothing matched;
* `dir_rdy`.

The direction stays latched for the whole packet, until the output side
pulses `swap`. This is why a table entry can be rewritten while a packet
streams out: the packet in flight keeps its route, and the next packet sees
the new entry. The end-to-end test checks both.

**Default route.** When no tag matches, the packet goes the way of location
0, so location 0 is the default route. An external controller can therefore
keep only the exceptions in the table. If two locations hold the same tag,
the lower location wins. Apart from one exception, the loader should never
put the same address into two locations. The exception is a reserved
address that no packet carries. Location 0 and every unused location hold
that address, each with the default direction.

**Writing an entry.** The 3-bit location from the load buffer goes through a
3-to-8 word line decoder (`wordline_decoder`). The selected word takes its
tag from the CAM bit lines, which the address mux switches to the load
buffer. It takes its direction from the RAM write bus. `ld_done` pulses one
cycle after the write.

The original is a transistor-level array: nine-transistor CAM cells with
precharged match lines, evaluated in one clock phase and precharged in the
other. Here that becomes one clocked compare.

## Keeping the table current: the load port

A one-cycle `cam_av` strobe starts a load, and `cam_sd[1:0]` carries the
entry. The serial pairs go into `load_buffer`. It has four rows of two
storage cells, with every cell brought out in parallel. A one-hot shift
register selects the row to write, one row per cycle. After the last row it
recycles to row 0, ready for the next entry. Row *k* holds entry bits
2k+1:2k, so the pairs arrive in this order:

| cycle | `cam_sd` |
|---|---|
| strobe | `addr[1:0]` |
| +1 | `addr[3:2]` |
| +2 | `{loc[0], dir}` |
| +3 | `loc[2:1]` |

Once four pairs are in, `load_fsm` raises CA_RDY. The address state machine
writes the entry when it can:

* in normal mode, between packets or while a packet streams out;
* in CAM load mode, straight away.

Nothing stops the network from sending the next entry early. A new strobe
while an entry waits overwrites that entry, so the sender has to pace its
loads:

* In normal mode, send at most one entry per packet period. One packet
  period is 16 cycles.
* In CAM load mode, a new entry can start every 5 cycles, which is about 3.2
  entries per packet period. The strobe for the next entry may coincide with
  the write of the previous one.

## The four control state machines

The control is split into four small state machines. The sequence below is
the part that is hardest to follow in the code.

| machine | states | job |
|---|---|---|
| `input_fsm` (one per input) | IDLE, LOAD, FULL, RESET | Runs the input handshake. Writes nibbles into the input's fifo once the fifo shows SOP in its first row, drops ACK at FifoFull, requests routing (FA_RDY / FB_RDY) and clears the fifo after the packet has left. |
| `address_fsm` | IDLE, EVAL, XMIT, LOAD, LWAIT | Arbitrates between the two fifos and the load buffer, drives the address mux, issues EVAL_ADD or LD_CAM, and holds the current source. |
| `output_fsm` | IDLE, REQ, SEND, SWAP | Raises DAV towards the chosen port, times the wait for ACK, steps the fifo read decoder, and signals SWAP at the end of a packet or on time-out. |
| `load_fsm` | IDLE, S1, S2, S3, RDY | Fills the load buffer and hands the entry over with the CA_RDY / ca_ack handshake. |

Each input buffer (`input_fifo`) is a 16x4 memory, which holds exactly one
packet. It has two one-hot ring decoders (`fifo_ring_decoder`), one for
writing and one for reading. Each decoder has a dummy stage behind row 15.
On the write side this stage is the FifoFull flag, and on the read side it
is End Of Data (EOD).

One packet from West to an idle receiver, in clock cycles (measured on the
RTL):

| cycle | event |
|---|---|
| 0 | SOP nibble moves in; `input_fsm` goes to LOAD |
| 15 | last nibble moves in |
| 16 | FifoFull; ACK to West drops |
| 17 | `input_fsm` is in FULL and raises FA_RDY |
| 18 | `address_fsm` EVAL: the fifo's address goes to the CAM with EVAL_ADD |
| 19 | `dir_rdy`; `output_mux` latches source and direction |
| 20 | `output_fsm` REQ: DAV goes out, and the first nibble moves if ACK is already high |
| 20–35 | 16 nibbles, one per cycle while ACK stays high (a low ACK stalls the transfer) |
| 36 | EOD: DAV drops |
| 37 | SWAP: the direction is released and priority passes to the other input |
| 38 | West's ACK is high again |

So the router stores the whole packet and then forwards it. The first nibble
leaves 5 cycles after the last one arrived. One input can accept a new packet
every 38 cycles. While one input transmits, the other can be loading, so with
both inputs busy the output is kept busy most of the time.

**Arbitration.** If both fifos wait, the input that did not go last goes
next. So when both are busy the inputs strictly alternate. A waiting packet
is served before a waiting table entry. An entry that arrives while a packet
is streaming is written during the stream, after `dir_rdy`.

**Time-out.** If the receiver does not raise ACK within `TIMEOUT` cycles of
DAV (default 32, two packet periods), DAV is withdrawn and SWAP gives the
other input its turn. The abandoned packet stays in its fifo and is retried
later. Once the first nibble has moved, the time-out no longer applies, and a
receiver may stall mid-packet.

## Modes

The `mode` pins select the operating mode:

| `mode` | mode | behaviour |
|---|---|---|
| `00` | normal | packet traffic, plus slow table loading |
| `01` | CAM load | Both inputs refuse new packets (ACK low). A packet that is already loading is finished. Table entries are written as fast as they arrive. |
| `10` | state reset | Inputs are off and every state machine and status latch is reset. This is the only reset, so hold it for at least one cycle after power-up. Table and fifo contents are kept. |
| `11` | test | Entries sent to the load port are looked up, not written. The matching location comes out on `cam_loc`, LSB first, in cycles 2–4 after the entry is complete, and its direction appears on `dir_pin`. Packets are routed straight, West to East and South to North, whatever the table says. |

## The ARCTIC input section (`arctic_input_section`)

The link has two 50 MHz clocks 180 degrees apart, and every register
triggers on a falling edge. One 16-bit half-word is latched every 10 ns:

* At Clk A's falling edge, the first half-word is held in a register.
* At Clk B's falling edge, that held half and the half-word then on the line
  are loaded together into the 32-bit output, `{ClkA half, ClkB half}`.

At the pads, the data for an edge is valid only from 5750 ps to 1000 ps
*before* that edge. This window comes from launch delay, trace skew and
noise. The registers, however, need 460 ps of setup and 340 ps of hold
around the edge, so the data has to be delayed:

* The real delay must lie between 1340 ps and 5290 ps.
* After derating for process, voltage and temperature (×0.67 best case,
  ×1.74 worst case), the nominal delay must lie between 2000 ps and 3040 ps.
* `arctic_delay_line` models it as a 2500 ps transport delay. It is built
  as two half-delay stages. Pad data can change as often as every 4750 ps,
  which is shorter than the longest allowed delay, so two changes may be in
  flight at once. Each stage only ever holds one of them.

The testbench spaces the falling edges at random from 8.5 ns to 11.5 ns
(10 ns ± 1.5 ns). It changes the pad data at random moments between the
valid windows. Five input sections run side by side, with delays of:

* 2500 ps, the nominal value;
* 1675 ps and 4350 ps, the nominal value derated for best and worst case;
* 1340 ps and 5290 ps, the two limits.

Each section must pass two checks: every 32-bit word, and setup and hold
at every edge, measured on the delayed data. The setup and hold check
fails with a 1200 ps or a 5400 ps delay.

## Departures from the original, and choices made here

* **Clocking.** The original router uses a two-phase non-overlapping clock
  (maximum 20 MHz): data is valid in phase 1, and latching and CAM precharge
  happen in phase 2. Here there is one clock with rising-edge registers.
* **Choices where the original leaves details open.** These are all this
  design's own choices:
  * the mode-pin encoding;
  * the time-out length;
  * the serial bit order of a table entry;
  * the idle pattern `0000`;
  * the lowest-location rule for duplicate tags;
  * the serial format of `cam_loc`;
  * `cam_av` as a one-cycle strobe;
  * dropping a first nibble that lacks SOP, by resetting the write decoder;
  * the arbitration order between packets and table entries.
* **Control signals.** The original has one combined increment/reset line
  to the write decoder. Here it is split into `wr_inc` and `wr_rst`.
* **Test mode.** The original only says that "fifo address requests are
  disabled" in test mode and that fifo testing forces straight routing. Here
  packets still go through the address state machine, but their direction
  is forced and the CAM result is ignored.
* **Not modelled.** The circuit-level parts are left out: the CAM bit-line
  drivers, the match-line to RAM buffering, and the ARCTIC pads, output unit
  and GTL transmission line. ARCTIC's Manchester-coded frame bit is
  mentioned in the original but not described, so it is not modelled
  either.

## Files

| file | content |
|---|---|
| `rtl/router_pkg.sv` | packet constants, mode/direction/mux-select enums, load-entry struct |
| `rtl/cam_router.sv` | the router, wiring all of the blocks below |
| `rtl/input_fifo.sv`, `rtl/fifo_ring_decoder.sv` | one-packet input buffer and its row decoders |
| `rtl/cam_ram.sv`, `rtl/wordline_decoder.sv` | routing table and its write decoder |
| `rtl/load_buffer.sv`, `rtl/load_fsm.sv` | table load port |
| `rtl/address_mux.sv`, `rtl/address_fsm.sv` | CAM address selection and arbitration |
| `rtl/output_mux.sv`, `rtl/output_fsm.sv`, `rtl/timeout_counter.sv` | output path, sender control, ACK time-out |
| `rtl/arctic_input_section.sv`, `rtl/arctic_input_demux.sv`, `rtl/arctic_delay_line.sv` | ARCTIC input section |
| `rtl/router_system_top.sv` | both designs side by side |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/router_tb_env.sv` | pin-level senders, receivers, table loader and scoreboard shared by the two router-level testbenches |
| `tb/tb_mesh_network.sv` | nine routers in a 3x3 mesh carrying traffic end to end |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/router_pkg.sv tb/tb_router_system_top.sv --top-module tb_router_system_top
./obj_dir/Vtb_router_system_top
```

`tb_router_system_top` runs everything at default sizes. It covers state
reset, the table loaded back to back in CAM load mode (rate checked),
refused inputs, 60 random packets per input with hits and misses, receiver
stalls and time-outs, a table rewrite during a packet, and test mode. The
ARCTIC section runs alongside with worst-case pad timing. At the end the
testbench prints how often each of these mechanisms happened, and it fails
if any of them never happened. It takes about ten seconds. `tb_cam_router`
runs the same scenario on the router alone.

`tb_mesh_network` builds the network this router was made for: nine
routers in a 3x3 mesh. In each router, East feeds the West input of the
next router in its row, and North feeds the South input of the next
router in its column.

* **Sources and exits.** Six sources inject at the edge: the West inputs of
  the first column and the South inputs of the first row. Six exits take
  the packets at the far edge and have node addresses 0–2 (East exits) and
  4–6 (North exits).
* **Tables.** All nine tables are loaded at once in CAM load mode. Each
  table holds only the routes that differ from that router's default
  direction. Location 0 and every unused location hold a reserved address
  (15), as described under *Finding the route*, so about half of all hops
  take the default route.
* **Checks.** 180 packets travel up to five hops, with random stalls and
  time-outs at the exits and between routers. Each packet must arrive
  whole, at the exit it names. Packets from one source to one exit must
  arrive in order.

Every file carries a `timescale 1ns / 1ps` directive, so the delay model
and the testbenches can be mixed with other sources.

## How far to trust it

* Every module has a testbench that checks it against independently
  computed values.
* For every module, a deliberately broken variant was shown to make its
  testbench fail. The variants include: the CAM ignoring an address bit, the
  time-out one cycle late, priority never passing to the other input, ACK
  taken from the wrong port, and the delay line halved.
* The RTL lints cleanly with Verilator apart from a few unused-signal
  warnings. `cam_router` leaves the CAM's MATCH flag and the time-out flag
  unconnected; they are kept for observation.
* A nine-router mesh carries random traffic with stalls and time-outs, and
  every packet arrives whole, in order and at the right exit.
* Generic synthesis with yosys maps the whole top to about 450 cells: 185
  flip-flop bits plus 168 memory bits, the two packet fifos and the table.
  No latches are inferred. No timing analysis has been done.

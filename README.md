# Source-routed wormhole network-on-chip, 3x3 mesh

This is a small network-on-chip (NoC) for an FPGA multiprocessor. Nine nodes
sit in a 3x3 mesh. Each node has a five-port router, a pair of network
adapters that turn processor bus transfers (OCP) into packets and back, and
two peripherals: a UART and a small memory. The design aims for very simple
routers. It uses three ideas:

* **Source routing.** The sender writes the whole path into the first flit
  (flow-control unit) of a packet. A router only reads the top two bits,
  steers the packet, and rotates the word by two bits for the next router.
  No router makes a routing decision.
* **Flit type on the request wires.** A link has three request wires: header,
  intermediate and end. Exactly one of them is high for a valid flit. A
  router knows what a flit is without decoding any data bits.
* **Wormhole switching with one-flit-class buffers.** A header claims an
  output. The rest of the packet follows through the same output, and the end
  flit releases it. Packets of any length pass without being stored whole.

There are two identical meshes. The *request network* carries reads and
writes from processors to peripherals. The *response network* carries read
data back. Because a response never queues behind a request, the system
cannot deadlock on message dependencies.

The architecture follows a published asynchronous (4-phase bundled-data)
NoC. Here it is rebuilt as fully synchronous single-clock RTL. Each
asynchronous handshake has been replaced by its clocked equivalent (see
"Departures" below).

## The link: three requests, one acknowledge

Every channel in the design, between routers and inside them, is the packed
struct `noc_pkg::flit_t`:

| field  | width | meaning                                   |
|--------|-------|-------------------------------------------|
| `rh`   | 1     | header flit                               |
| `ri`   | 1     | intermediate flit                         |
| `re`   | 1     | end flit                                  |
| `data` | 32    | flit payload                              |

An `ack` wire runs the other way. A flit moves on a rising clock edge when
one of `rh/ri/re` is high and `ack` is high. The sender holds the flit until
that happens. It is a valid/ready handshake in which "valid" is split three
ways. A packet is one header flit, then zero or more intermediate flits, then
one end flit. So a packet has at least two flits.

## Source routes and the header flit

The route is a list of 2-bit direction codes, first hop in bits [31:30]:

| code | direction |
|------|-----------|
| 00   | North (row above)    |
| 01   | East (next column)   |
| 10   | South (row below)    |
| 11   | West (previous column) |

A packet may never leave a router on the side it came in on. That code is
therefore free, and it is used for **local delivery**: a code equal to the
side the packet entered on sends it to the router's local port. Hence the
last code of every route is the side from which the packet enters the
destination. A packet from the local port can only go N/E/S/W, so a node
cannot send a packet to itself.

Each input port passes the header on rotated left by two bits. The next
router again finds its code in bits [31:30]. A 32-bit header holds 16 codes.
In a 3x3 mesh the longest route needs 5.

Example: node 0 (north-west corner) to node 8 (south-east corner). The route
is East, East, South, South, then North for "deliver here". That is
`01 01 10 10 00` followed by zeros, i.e. `32'h5A00_0000`. After five routers
the header arrives rotated by 10 bits.

`noc_pkg::xy_route(src, dst, cols)` builds such routes. It goes
East/West first, then North/South. Dimension-ordered routing in a mesh has
no cyclic channel dependencies, so the network is deadlock-free without
virtual channels. The routers themselves follow any route they are given. The
mesh testbench uses North/South-first routes to show this.

Node `n` is at row `n / COLS`, column `n % COLS`. Node 0 is at the
north-west corner.

## Inside a router

```
 in[p] -> flit_fifo -> input_port --4 channels--> crossbar --> output_port -> flit_fifo -> out[q]
                        (steer by code,                        (access_ctrl x4,
                         rotate header)                         mutex4, merge4)
```

Ports are numbered N=0, E=1, S=2, W=3, Local=4. The numbers match the
direction codes.

* **`input_port`.** The header's own top two bits select one of its four
  output channels. The same cycle they are also written to an address latch,
  which steers the intermediate and end flits that follow. The header's data
  goes out rotated and other flits go out unchanged. `in_ack` is the
  acknowledge of the selected channel.
* **Crossbar wiring (`router`).** Input port `p` with code `c` reaches output
  `c`, or output Local when `c == p`. The local input's code `c` reaches
  output `c`. So every output port has exactly four possible sources.
* **`output_port`** = four `access_ctrl` + one `mutex4` + one `merge4`.
  * `access_ctrl`: a header asks the mutex for the output. Once the request is
    granted, the header and the rest of the packet pass straight through. After
    the end flit has been handed over, the request is dropped for one clock.
    The mutex can then hand the output to another waiting input.
  * `mutex4`: at most one grant. A grant is held while its request stays
    high. It is a tree of six 2-input mutexes (`mutex2`), one for every pair
    of inputs, in three stages: {0,1} {2,3}, then {0,2} {1,3}, then {0,3}
    {1,2}. An input must win its three mutexes in that order, and keeps those
    it has won until its request drops. Any two inputs meet in one mutex,
    which makes the grant exclusive. The fixed stage order rules out
    deadlock. A 2-input mutex breaks a tie in favour of its last loser. So a
    waiting input is overtaken by at most two requests raised after its own,
    and waits through at most five grants in all. A free tree grants in the
    same cycle.
  * `merge4`: ORs the request wires of its four (mutually exclusive) inputs.
    It multiplexes the data of the active one and returns the acknowledge
    only to that one.
* **`flit_fifo`.** A buffer at every input and every output. It stores the type
  wires with the data. Its `in_ack` is "not full" taken from a register, so no
  acknowledge path runs combinationally through a router. That keeps the
  mesh free of long timing paths and combinational loops. `FIFO_DEPTH`
  (default 2) is a parameter. Depth 2 is the smallest that streams one flit per
  clock with a registered acknowledge.

**Timing.** An idle router adds two clocks per hop: one in the input buffer
and one in the output buffer. Input port, crossbar and output port are
combinational. Within a packet a path carries one flit per clock. Between two
packets that use the same output from the same input there is one idle clock
(the mutex release). From node 0 to node 8, five routers, the first flit
reaches the destination 11 clocks after the source starts. A stream of
4-flit packets on one path runs at 4 flits per 5 clocks.

## Network adapters and the bus side

The processors are not part of this design. Each node's OCP master port is a
top-level port (arrays indexed by node).

**Address map.** `MAddr[31:28]` is the target node. `MAddr[27]` picks the
peripheral there: 0 is the UART, 1 the memory. For the UART, `MAddr[3:2]`
selects a register. For the memory, `MAddr[9:2]` is the word address (256
words by default). Other bits are carried but ignored. The slave adapter has
one command in flight at a time, so at most one of the two peripherals answers.
Their responses are ORed and the read data is taken from the one answering.

**`master_na`** (OCP slave towards a processor):

* `SCmdAccept` is high only while the adapter is idle. It handles one command
  at a time, and a new command waits until the previous request packet has
  left (or, for a read, its answer has come back).
* The header comes from a route ROM indexed by target node. The ROM is built
  at elaboration from `NODE_ID`. A second ROM holds the route back, which a
  read carries in its last flit.
* Writes are posted: no response is generated.
* A read ends when its response packet arrives. `SResp` and `SData` are then
  valid for exactly one clock (there is no `MRespAccept`).
* A command to this node itself, or to a node number outside the mesh, is not
  sent. A read gets `SResp = ERR` one clock after acceptance, and a write is
  dropped.

**`slave_na`** (OCP master towards the peripherals): collects a request packet
and issues its command. It holds the command until `SCmdAccept`. For a read
it waits any number of clocks for `SResp`. It then sends a response packet
whose header is the return route taken from the request.

**Packet formats.** One flit per row. The type is carried on the request
wires.

| packet        | header (rh)   | intermediate (ri)              | intermediate (ri) | end (re)      |
|---------------|---------------|--------------------------------|-------------------|---------------|
| write request | route         | `{25'b0, MCmd[2:0], MByteEn[3:0]}` | `MAddr`        | `MData`       |
| read request  | route         | `{25'b0, MCmd[2:0], MByteEn[3:0]}` | `MAddr`        | return route  |
| read response | return route, rotated | `{30'b0, SResp}`       | —                 | `SData`       |

## UART peripheral

Serial format is 8N1, LSB first. Each bit lasts `CLKS_PER_BIT` clocks
(default 868, which gives 115200 baud at 100 MHz). The receive line goes
through a two flip-flop synchronizer (`sync2`).

| `MAddr[3:2]` | register | access |
|---|---|---|
| 0 | TXDATA | write `MData[7:0]` to send it. Accepted only when the transmitter is idle, so a second write waits (the wait spreads back through the slave adapter and the request network). |
| 1 | RXDATA | read `{23'b0, valid, byte}`. Reading clears `valid`. A frame with a low stop bit is discarded. |
| 2 | STATUS | read `{30'b0, rx_valid, tx_busy}` |

Reads are answered with `DVA` in the clock after they are accepted.

## Memory peripheral

`ocp_mem` is `WORDS` x 32 bits (default 256). It accepts every command in the
clock it is presented. A write stores the bytes whose `MByteEn` bit is set.
A read is answered with `DVA` and the word in the next clock. The contents
are not reset.

## Test mode: traffic source and sink

With `tg_mode = 1`, node 0's request-network input is taken over by
`traffic_source`, and node 8's request-network output by `traffic_sink`. The
adapters there are cut off.

* `traffic_source` plays a ROM of `NUM_PACKETS` (100) packets of
  `FLITS_PER_PKT` (4) flits. Each entry is a type and a data word. The header
  is the route to node N-1. Flit `f` of packet `p` carries `{p[15:0], f[15:0]}`.
  The ROM is computed at elaboration. `tg_start` starts it and `tg_done`
  reports the end.
* `traffic_sink` stores `{type, data}` of every arriving flit (type 0 header,
  1 intermediate, 2 end) in a `SINK_DEPTH`-entry memory. That memory is read
  through `sink_rd_addr`/`sink_rd_data` with one clock of latency. The
  counters give flits and packets received. The capture can then be compared
  with what was sent.

Switch `tg_mode` only while both networks are idle.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `noc_top`, `noc_mesh` | `ROWS`, `COLS` | 3, 3 | mesh size (at most 15 rows + columns - 1 hops, and 16 nodes for the 4-bit node field) |
| `noc_top`, `noc_mesh`, `router` | `FIFO_DEPTH` | 2 | entries per port buffer |
| `noc_top`, `uart` | `CLKS_PER_BIT` | 868 | clocks per serial bit |
| `noc_top`, `traffic_source` | `NUM_PACKETS`, `FLITS_PER_PKT` | 100, 4 | test traffic |
| `noc_top`, `traffic_sink` | `SINK_DEPTH` | 512 | capture entries |
| `noc_top` (`MEM_WORDS`), `ocp_mem` (`WORDS`) | memory size | 256 | 32-bit words per node |
| `master_na` | `NODE_ID` | 0 | set per node by `noc_top` |

## Departures from the asynchronous original, and choices made here

* **Clocked handshakes.** The 4-phase bundled-data channel (request up,
  acknowledge up, request down, acknowledge down) is one clock edge here. The
  matched delay elements on the request wires, the C-elements and the
  handshake latches of the original have no clocked counterpart. They are
  absent.
* **Buffers.** The original FIFOs are chains of handshake latches. Here each is
  a circular buffer with a registered "not full" acknowledge.
* **Mutex.** The 4-input mutex keeps the original's tree of six 2-input
  mutexes in three stages. The pairing per stage and the tie-break
  (last loser wins) are choices made here. An asynchronous mutex resolves
  near-simultaneous requests with a metastability filter. A clocked one
  simply sees both requests in the same cycle.
* **No clock-domain crossing in the adapters.** In the original, the
  network is self-timed and each adapter synchronizes the network's
  handshake into the core clock once per packet. Here cores and network share
  one clock, so the adapters have no synchronizer. The only synchronizer is
  on the UART receive line, which is truly asynchronous.
* **Mutex release clock.** `access_ctrl` keeps the original order of events
  (request released after the end flit, before the next header can ask). This
  costs one idle clock between back-to-back packets of one input.
* **Own choices where nothing was specified:** the FIFO depth; the reset (an
  asynchronous, active-low `rst_n` everywhere); the address map (node in
  `MAddr[31:28]`); the bit layout of the control flits; posted writes; one
  outstanding command per adapter; ERR for unreachable targets; everything
  about the UART (format, baud, registers); the memory size and timing;
  the peripheral select on `MAddr[27]`; where the traffic generator
  attaches; the test packet length and contents; and North = row above.
* **Not built:** the processors (their OCP ports are brought out), and the
  vendor logic-analyser cores used to read the sink on the FPGA (the sink's
  read port takes their place).

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `noc_pkg.sv` | `flit_t`, direction and OCP codes, `xy_route()` |
| `flit_fifo.sv`, `input_port.sv`, `access_ctrl.sv`, `mutex2.sv`, `mutex4.sv`, `merge4.sv`, `output_port.sv`, `router.sv` | router |
| `noc_mesh.sv` | ROWS x COLS mesh, rim ports tied off |
| `master_na.sv`, `slave_na.sv` | network adapters |
| `uart.sv`, `sync2.sv`, `ocp_mem.sv` | peripherals |
| `traffic_source.sv`, `traffic_sink.sv` | test traffic |
| `noc_top.sv` | the whole system |

`tb/tb_<module>.sv` is a self-checking testbench for each module. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

## Simulating

With Verilator 5 (`--timing` is needed for the testbenches):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/noc_pkg.sv tb/tb_noc_top.sv \
          --top-module tb_noc_top -Mdir obj_top
./obj_top/Vtb_noc_top
```

Replace `noc_top` with any module name to run that module's testbench. The
`-y rtl` option lets Verilator find the sub-modules. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/noc_pkg.sv rtl/<module>.sv`.

## What the testbenches show

* `tb_noc_top`: the whole system at its default parameters, in under a
  second of simulation time. All nine processors at once write a byte to the
  next node's UART. The serial lines are decoded and checked. One UART gets a
  second byte, which must wait for the first. Status and RXDATA reads go
  across the request and response networks. Reads to the own node or outside
  the mesh give ERR. Every node writes whole words and a two-byte word into
  a remote memory and reads them back, with a UART read in between. Then
  100 packets run from the traffic source to the sink, and all 400 captured flits are checked, including the 10-bit-rotated
  header. The 11-clock first-flit latency and the 499-clock stream time
  are checked as well.
* `tb_router`: the two-clock hop latency, a 40-flit packet streaming at one
  flit per clock, and 600 random packets with random back-pressure checked
  per output (order, no interleaving, header rotation).
* `tb_noc_mesh`: 360 random packets between all node pairs using
  North/South-first routes, with random back-pressure at every local output.
* `tb_output_port`, `tb_access_ctrl`, `tb_mutex4`, `tb_merge4`,
  `tb_input_port`, `tb_flit_fifo`: the rules of each piece. These include
  exclusive and held grants, no request overtaken by more than two later
  ones (five grants in all), packet locking, and one flit per clock through a buffer.
* `tb_master_na`, `tb_slave_na`: packet formats, routes computed independently
  in the testbench, delayed command acceptance and delayed responses on the
  OCP side.
* `tb_uart`, `tb_traffic_source`, `tb_traffic_sink`: serial timing bit by
  bit, ROM contents, and captured contents.
* `tb_ocp_mem`: 3000 random reads and byte-enabled writes against a reference
  array, with the response timing checked every clock.

Assertions in `flit_fifo` (one request wire at a time), `mutex4` (one grant),
`merge4` (exclusive inputs) and `noc_mesh` (no flit routed off the rim) run
in every simulation built with `--assert`.

## Limits

* Timing closure, area and power on an FPGA have not been measured. Nothing
  here reproduces frequency or throughput figures.
* One outstanding command per adapter, and no write responses.
* A route that points off the mesh stalls in that router's output buffer, and
  the mesh assertion reports it. The adapters never produce such routes.
* A node cannot address its own UART or memory through the network.

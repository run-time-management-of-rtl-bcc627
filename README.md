# Communication hardware for a run-time managed many-core chip

On a many-core chip that maps applications onto cores while it runs, much of the time is
lost in communication rather than computation. There are two sources. The operating-system
kernel on each core spends time packing and unpacking messages and searching for them. The
network-on-chip (NoC) stops working, or slows down badly, when one of its links breaks.
This repository holds synthesizable SystemVerilog for two hardware answers to those two
problems. They come from a thesis on run-time management of many-core SoCs.

1. **A transport-layer aware network interface (NI).** A conventional NI only moves raw
   packets, and the kernel does the rest in software: splitting messages into packets,
   receiving them on an interrupt, unpacking them, choosing a buffer, and finding the right
   buffered message when a task calls `receive`. This NI does those jobs in hardware. It
   packs outgoing messages and keeps incoming ones in its own memory, indexed by a
   transport-layer key (application, source task, destination task). The kernel simply
   *looks up* a key. It gets the message at once if the message is there. If not, the NI
   remembers the request and interrupts the kernel only when that message arrives. Messages
   nobody has asked for yet cause no interrupt at all.
2. **Maze routing in a bufferless deflection router.** Each router decides using only the
   health of its own four links, with no tables and no global fault map. Every flit is
   still delivered whenever any path to its destination exists. When no path exists, the
   flit is recognised as unreachable after finitely many hops. The routing state travels in
   the flit header. The router is a minBD-style deflection router: flits never wait in the
   network, so the very free choice of outputs that maze routing needs cannot deadlock.

The two designs share no signals. `manycore_top` places one full-size NI and an 8x8 mesh of
maze routers side by side and brings out the ports of both.

## Maze routing

Maze routing is the less obvious half of this design, so it comes first.

### Header fields

A flit carries its destination and source, plus this routing state (`maze_pkg::flit_t`):

| field | meaning |
|---|---|
| `mode` | `NORMAL` or `TRAV` (traversal: walking around a fault region) |
| `md_best` | Manhattan distance to the destination when traversal started |
| `ntrav_x/y` | router where traversal started |
| `dir_trav` | direction the flit first took out of that router |
| `hand` | right- or left-hand rule used for this traversal |
| `unreach` | set once the destination has been found unreachable |
| `want` | output chosen by the routing unit in this router (internal) |
| `silver` | priority mark inside the router (internal) |

### Rules (`maze_route.sv`)

`maze_route` is combinational; the router has one instance per input lane. Directions are
numbered clockwise: N=0, E=1, S=2, W=3. An output is *productive* when it brings the flit
closer to its destination. The unit applies these rules in order:

- **Normal mode.** Take a productive output whose link is healthy; X before Y.
- **Entering traversal.** If no productive output is healthy:
  - record the current distance as `md_best` and this router as `ntrav`;
  - take the hand offered by the router (`hand_sel`);
  - sweep from the destination's direction and take the first healthy output:
    counter-clockwise for the right hand, clockwise for the left;
  - that output becomes `dir_trav`.
- **In traversal.** Follow the hand rule from the direction of travel:
  - right hand: try right, straight, left, back;
  - left hand: the mirror order.
- **Leaving traversal.** When the flit stands strictly closer than `md_best` *and* has a
  healthy productive output, it returns to normal mode.
- **Unreachable.** The flit is back at `ntrav` and the hand rule would take `dir_trav`
  again. It would then circle the fault region forever, so:
  - `unreach` is set;
  - the destination becomes the source;
  - the flit travels home in normal mode and is ejected there with `unreach=1`.

  Returning the flit to its source is this design's choice. The thesis only says that
  unreachability is detected.
- **At the destination but not ejected** (both ejection ports busy). Leave by any healthy
  link and come back.

Routers alternate the hand they offer every cycle and per lane. Different flits therefore
walk around an obstacle in both directions.

### The router (`minbd_router.sv`)

```
 in N/E/S/W --> Eject --> Buffer Inject --> Eject --> Inject --> MR x4 --> [reg]
            --> Silver flit --> 2x2 --> 2x2 --> Buffer Eject --> Deflection --> [reg] --> out N/E/S/W
                               permutation network    |  ^
                                                 side buffer (4 flits)
```

- **Stage 1**
  - **Ejection:** up to two flits per cycle go to the local core.
  - **Injection:** a waiting flit from the side buffer, then a new flit from the core, may
    enter an empty lane. This only happens while the router holds fewer flits than it has
    healthy links, so every flit always has a healthy output.
  - **Routing:** each lane's maze-routing unit fills in `want` and updates the header.
- **Stage 2**
  - **Silver flit:** one flit, chosen round robin, is marked and wins every arbitration.
  - **Permutation network:** two stages of 2x2 blocks (`bd_perm_block.sv`) place every flit
    on some output. Stage 0 separates N/E from S/W and stage 1 picks the port. A loser is
    deflected, never dropped.
  - **Buffer Eject:** up to one deflected flit per cycle is taken into the side buffer
    instead.
  - **Deflection** (`maze_deflect.sv`):
    - flits on a broken link are moved to a free healthy port;
    - a flit that leaves on a port it did not ask for has its mode reset to normal, since
      its traversal history no longer holds.
- **Timing:** each stage ends in a register, so a hop takes **two cycles** from input link
  to output link.
- **Events:** the router exposes one-cycle event flags (`router_ev_t`) for deflection,
  side-buffer use, dual ejection, traversal entry and exit, unreachable detection and
  steering off a broken link. Testbenches use them to prove that each mechanism occurred.

### The mesh (`maze_mesh.sv`)

The mesh is `MESH_X x MESH_Y` routers (default 8x8). Node `n = y*MESH_X + x`, with x
growing east and y growing north.

- `hlink_broken[y*(MESH_X-1)+x]` breaks the link between (x,y) and (x+1,y).
- `vlink_broken[y*MESH_X+x]` breaks the link between (x,y) and (x,y+1).
- A broken link fails in both directions, and the mesh edge counts as broken.
- Faults may change at run time. Each router sees only its own four link-health bits.

Change faults only while the links concerned are idle. A flit already on a link that
breaks is lost, just as in real hardware.

Coordinates are 4 bits wide and the distance field 6 bits, so the header can describe meshes
up to 16x16 by changing `MESH_X`/`MESH_Y`. Only the 8x8 mesh has been simulated.

## Transport-layer aware NI (`tra_ni.sv`)

### Kernel side

One 32-bit port is shared by sending and receiving.

**Send.** Write words with `send` while `send_available` is high:

1. the descriptor `{len[15:0], dst_x[7:0], dst_y[7:0]}`;
2. the segment header `{ctrl, 7'b0, app[7:0], src_task[7:0], dst_task[7:0]}`;
3. `len` data words.

`send_available` drops for exactly one cycle after the descriptor, while the packetizer
emits the size flit. It also drops while the sending FIFO is full.

**Receive.** Raise `lookup` for one cycle with the wanted header on `data_in`. The NI then
shows a status word `{hit, ctrl, 14'b0, len[15:0]}` on `data_out` with `read_available`
high. Each `read` pulse consumes the word shown.

- **Hit:** `len` data words follow, one per read. After the last one the buffer slot is
  freed.
- **Miss:** nothing follows. The key is kept as a pending request, and `interrupt` rises
  once a message with that key has been stored. The kernel then repeats the lookup.
- **`ctrl=1` lookup:** pops the oldest control packet instead. Its segment header comes
  first, then `len` data words.

`interrupt` is high while a stored message matches a pending request, or a control packet
waits. Messages with the same key are handed out in arrival order.

### Network side

- **Packet:** flits of 32 bits: destination `{16'b0, x, y}`, size (`len+1`), segment header,
  data.
- **Outgoing link:** `tx_valid/tx_flit` with credit flow control. `tx_credit` returns one
  credit, and there are `LINK_CREDITS`=8 credits.
- **Incoming link:** `rx_valid/rx_flit` into an 8-flit buffer. It returns one `rx_credit`
  for every flit it hands on.

### Inside

```
send:    kernel --> Packetizer --> Sending FIFO (16) --> Data-link interface --> tx
receive: rx --> input buffer (8) --> Depacketizing controller --> NI memory <-- Kernel interface --> kernel
                                               \--> shared registers <--/
```

- **Depacketizing controller** (`tra_ni_depacketizer.sv`):
  - strips the address and size flits and reads the segment header;
  - writes a data segment into a free slot of 128 words and commits it in the shared
    registers after the last word;
  - appends a control packet to a 64-word ring as `[len, header, data]`.
- **Stall:** with no free slot the controller waits, holding the header at the head of the
  input buffer. The buffer then fills and the credits stop the sender. Nothing is lost.
- **Shared registers** (`tra_ni_ctrl_regs.sv`):
  - a slot table (busy, valid, key, length, arrival order), searched in parallel on
    lookup;
  - an 8-entry pending-request table;
  - the control ring's head, tail and fill level;
  - the interrupt rule.
- **Memory** (`tra_ni_dpram.sv`): 1088 words (8 x 128 + 64), with two synchronous-read
  ports. One port belongs to the network side and one to the kernel side.
- **Rates:** the link carries one flit per cycle, and a message of `len` words is read out
  in `len+1` cycles after its status word.

## Files

| file | contents |
|---|---|
| `rtl/maze_pkg.sv`, `rtl/tra_ni_pkg.sv` | shared types |
| `rtl/maze_route.sv` | maze-routing unit of one lane |
| `rtl/bd_perm_block.sv` | 2x2 arbiter block of the permutation network |
| `rtl/maze_deflect.sv` | deflection stage |
| `rtl/minbd_router.sv` | one router |
| `rtl/maze_mesh.sv` | mesh of routers |
| `rtl/sync_fifo.sv` | FIFO used as the NI sending FIFO, input buffer and router side buffer |
| `rtl/tra_ni_packetizer.sv`, `rtl/tra_ni_link_tx.sv` | NI send block |
| `rtl/tra_ni_depacketizer.sv`, `rtl/tra_ni_kic.sv`, `rtl/tra_ni_ctrl_regs.sv`, `rtl/tra_ni_dpram.sv` | NI receive block |
| `rtl/tra_ni.sv` | the NI |
| `rtl/manycore_top.sv` | both designs side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. Each one is
built with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/tra_ni_pkg.sv rtl/maze_pkg.sv \
          tb/tb_manycore_top.sv --top-module tb_manycore_top -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

Swap in any other `tb/tb_*.sv`.

**`tb_manycore_top`** runs the top at its default sizes.

- **NI part:** the NI's link is looped back to itself. The test covers:
  - a lookup miss, then the interrupt, then the hit;
  - a control packet;
  - ten 128-word messages into eight slots, so the buffer fills and the link stalls on
    credits.
- **Mesh part:** at the same time, every node of the 8x8 mesh sends random flits in three
  phases:
  - all links healthy;
  - with walls of broken links;
  - with one node cut off completely.
- **What is checked:**
  - A breadth-first search in the testbench decides, for every flit, whether it must
    arrive or come back as unreachable.
  - Every mechanism of both designs is counted and must have happened.
  - A 128-word send must take one cycle per word plus one for the size flit.
- It runs in under a second.

**Other testbenches:**

- `tb_tra_ni`: two NIs back to back, including the two traffic patterns the thesis measured
  with 128-flit messages:
  - *flow*: a producer streaming to a consumer; about 1 flit/cycle on the link;
  - *ping-pong*: one message bounced between two tasks; about 0.24 flits/cycle.
- `tb_maze_mesh`: the full 8x8 mesh with more fault patterns and a one-hop latency check.
- `tb_maze_route`: routing cases worked out by hand.

## Where this departs from the thesis, or fills gaps in it

- **Exit from traversal.** The printed algorithm states the loop condition so that the exit
  happens at a distance *equal* to the best distance. This design exits only when
  *strictly closer*, which is the usual maze-routing rule. With the equality reading a flit
  could leave traversal right where it entered it.
- **Unreachable flits** are returned to their source and marked. The thesis only detects
  unreachability.
- **Choices the thesis does not give:**
  - the sweep that picks `dir_trav`;
  - X-before-Y among productive outputs;
  - the per-cycle alternation of hands;
  - the stage-2 arbitration details, in the silver flit and the 2x2 blocks;
  - the side-buffer depth (4);
  - two ejections per cycle;
  - the rule that injection waits until the router holds fewer flits than it has healthy
    links;
  - steering flits off broken links in the deflection stage.
- **NI choices the thesis does not give:**
  - every word format on the kernel port and on the link;
  - credit flow control;
  - the buffer organisation (8 slots of 128 words, a 64-word control ring, 8 pending
    requests);
  - arrival-order service of same-key messages;
  - stalling the input buffer while no slot is free.

  The slot size matches the 128-flit messages of the thesis's experiments.
- **Not present:** the NI was evaluated inside an existing 6x6 multiprocessor platform with
  wormhole routers, 32-bit processors, DMA and a small kernel. None of those parts is
  included here. The NI's link ports are brought out so that it can be attached to such a
  network. The run-time mapping algorithms of the thesis are kernel software and are not
  hardware here.
- **Fault model.** A broken link fails in both directions. The thesis's evaluation
  broke at most five links in an 8x8 mesh. The testbenches use many more
  broken links to force traversal, cut-off nodes and unreachable destinations.

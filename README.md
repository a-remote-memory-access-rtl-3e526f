# GAScore: remote memory access for global-address-space programs on FPGAs

Partitioned global address space (PGAS) languages let every compute node read
and write the memory of every other node. Running that model across FPGAs
needs a hardware engine that turns "put these words into node 7's memory" or
"run handler X on node 3" into network packets, and turns arriving packets
back into memory writes and handler calls. This RTL provides such an engine
and the network around it. The engine follows the Active Message model of the
GASNet communication library:

* a **short message** carries a handler code and up to 15 32-bit arguments;
* a **long message** also carries a block of memory, which is written into
  the receiver's memory *before* the handler is called;
* a handler may send one **reply** to the sender of the message it handles,
  without ever learning who that sender was.

Each compute node has three parts:

* a dual-ported 64 KB local memory;
* a **GAScore**, the messaging engine, on memory port B;
* a computing element on memory port A, which is either an embedded processor
  or a custom hardware core.

Custom cores do not talk to the GAScore themselves. A small programmable
controller, the **PAMS** (Programmable Active Message Sequencer), does it for
them. It runs short programs of wait, count and send instructions, and these
programs are loaded into it over the network.

The complete system, `gas_system`, has four FPGAs in a bidirectional ring.
Each FPGA holds:

* four hardware nodes (GAScore + PAMS + memory);
* one processor node (GAScore + memory, with its four FSLs brought out to
  ports);
* seven fully connected routers (NetIfs);
* two off-chip link controllers (OCCCs), one for each ring direction.

## Node numbering and routing

| node id | what |
|---|---|
| 4·f .. 4·f+3 | the four hardware nodes of FPGA f (f = 0..3) |
| 16 + f | the processor node of FPGA f |

On each FPGA, NetIf port *p* belongs to:

| port | attached block |
|---|---|
| 0–3 | hardware nodes |
| 4 | processor node |
| 5 | OCCC to FPGA f+1 (clockwise) |
| 6 | OCCC to FPGA f−1 (counter-clockwise) |

A packet for a node on the same FPGA goes directly to that node's NetIf.
A packet for another FPGA goes to the OCCC of the ring direction with fewer
hops, clockwise on a tie. Packets that only pass through an FPGA enter at one
OCCC and are routed straight to the other. `gas_pkg::route_port` holds this
rule.

## How a message travels

```
 computing element          GAScore                    NetIf  ...  NetIf         GAScore             computing element
   FSL3 request  ──► Transmit ─ reads payload ─►  packet ───────────►  Receive ─ writes payload     
   FSL4 done     ◄──        (memory port B)                                │  stores src in token buffer
                                                                          └► FSL1 handler call ──►  handler
                                                                             FSL2 token return ◄──  (after its reply)
```

The computing element and its GAScore are joined by four FSLs (Fast Simplex
Links). Each FSL is a 16-word FIFO with 33-bit words: 32 data bits plus one
control bit.

| link | direction | carries |
|---|---|---|
| FSL 1 | GAScore → element | handler calls |
| FSL 2 | element → GAScore | returned tokens |
| FSL 3 | element → GAScore | message requests |
| FSL 4 | GAScore → element | completions |

The transmit path (FSL 3 → network → FSL 4) and the receive path (network →
FSL 1 → FSL 2) never wait on each other, so the engine cannot deadlock itself.
They share only two things:

* **The token buffer.** It needs no lock because its three ports are
  separate:
  * the receive side allocates an entry;
  * the transmit side looks an entry up;
  * FSL 2 frees an entry.
* **The memory port.** `mem_arbiter` shares it round-robin between receive
  writes and transmit reads.

### Word formats

All links carry `{ctrl, data[31:0]}`. On the FSLs, `ctrl` marks the first
(header) word of a message. On network links and ring links, it marks the
last word of a packet. The header word (`gas_pkg::am_hdr_t`) is:

| bits | 31:24 | 23:16 | 15:8 | 7:4 | 3 | 2 | 1:0 |
|---|---|---|---|---|---|---|---|
| field | node | src | handler | nargs | reply | long | 0 |

What `node` holds depends on where the header is:

* on the network: the destination node;
* on FSL 1: the token;
* in an FSL 3 request: the destination node, or for a reply, the token of the
  message being answered.

The GAScore fills in `src` on the network.

| where | words |
|---|---|
| network packet | header, [destination address, word count, payload…], arguments… |
| FSL 1 handler call | header (token in `node`), [address, word count], arguments… |
| FSL 3 request | header, [source address, destination address, word count], arguments… |
| FSL 4 completion | the request header, echoed |
| FSL 2 token return | token in bits 7:0 |

The bracketed words are present only in long messages. Addresses and counts
are in 32-bit words. The arguments come after the payload, which is what lets
the receive unit meet both of its ordering rules without buffering anything:

* **Short messages are cut-through.** The handler call header leaves on FSL 1
  two cycles after the packet header arrives, and each argument follows as
  soon as it arrives.
* **Long messages call the handler only after the data is in memory.** The
  handler call is held until the last payload word has been written.

### Tokens and replies

When a packet arrives, `gas_rx` stores its source node in `token_buffer`. It
gets back a token, the index of the lowest free entry, and passes that token
to the handler in place of the sender's id. The reply flow is:

1. The handler puts the token in the `node` field of its reply request and
   sets `reply`.
2. `gas_tx` looks the token up to find where the reply must go.
3. When the handler is finished, it returns the token on FSL 2, which frees
   the entry.

All 16 entries can be in use at once. The receive unit then stalls, and the
stall spreads back through the network as back-pressure.

### Payload streaming

`gas_tx` reads a long message's payload through the arbiter into a 4-word
buffer. It keeps at most three words read ahead, which gives one word per
cycle despite the one-cycle BRAM latency. `gas_rx` writes one payload word
per cycle. Both slow down only when they collide on the shared memory port.

## The sequencer (PAMS)

Each hardware node has a PAMS on the element side of its FSLs. The PAMS:

* answers every handler call itself, returning its token;
* keeps these counters and registers:
  * **4 message counters**, each counting calls of one handler code;
  * **4 transfer counters**, each counting the payload words written by long
    messages of one handler code;
  * a free-running **32-bit timer**;
  * **ArrivalTime**, the timer value when the most recent call arrived;
* runs a program from a 512-word instruction RAM.

Programs are loaded and controlled over the network with reserved handler
codes:

| handler | arguments | effect |
|---|---|---|
| `F0` PROG | addr, w1, w2, … | writes w1.. into the instruction RAM from addr |
| `F1` START | pc | starts the program at pc |
| `F2` POLL | – | replies with `F3`, whose argument is ArrivalTime; does not update ArrivalTime |
| `F4` GET | local addr, remote addr, words, reply handler | remote read: replies with a long message holding the words |

Every other handler code only counts and updates ArrivalTime.

Instructions are 32 bits, with the opcode in bits 31:28:

| op | name | fields |
|---|---|---|
| 0 | HALT | stop |
| 1 | TIMER_THR | next word is the timer threshold for WAIT |
| 2 | TIMER_OFS | next word is added to the timer, to align nodes that left reset at different times |
| 3 | MSGCTR | [25:24] counter, [23:16] handler, [15:0] threshold; clears the count |
| 4 | XFERCTR | same fields for a transfer counter (threshold in words) |
| 5 | CTRL | [3:0] value for the control outputs |
| 6 | WAIT | [16] timer ≥ threshold, [15:12] message counters, [11:8] transfer counters, [7:4]/[3:0] control-input mask/value. All selected conditions must hold at the same time. |
| 7 | SEND | [27:20] destination, [19:12] handler, [11:8] number of code arguments, [7] long, [6] append timer, [5] append ArrivalTime |

The words after a SEND come in this order:

1. for a long send, the local address, the remote address and the word
   count;
2. the code arguments.

The timer and ArrivalTime arguments, if selected, follow the code arguments.

Each fetched instruction word costs two cycles, because the instruction RAM
is read synchronously. A counter is done when its count is at least its
threshold.

The simple barrier from the design's evaluation looks like this (node 0
first):

```
node 0:     TIMER_THR T; WAIT timer; MSGCTR 0,CALL,15; WAIT ctr0; SEND 1,DONE; ... SEND 15,DONE; HALT
node 1..15: TIMER_THR T; WAIT timer; SEND 0,CALL; MSGCTR 0,DONE,1; WAIT ctr0; HALT
```

## Network and ring links

### NetIf

`netif` is a cut-through router with two halves:

* **Local input.** It takes one routing decision per packet, from the header,
  and holds that path until the packet's last word.
* **Local output.** It merges the links from the other six NetIfs round-robin
  and holds the chosen link until the last word.

Every pair of NetIfs is joined by a 16-word FIFO in each direction, 49 FIFOs
per FPGA counting the unused self-links.

### OCCC

An `occc` bridges a NetIf to one ring link:

* The link carries `{valid, 33-bit word}` one way and one `credit` wire the
  other way.
* The sender starts with 16 credits, one for each word of the receiver's
  buffer. It spends one credit per word and gets one back for each word the
  receiver passes on.
* Two register stages on each side stand in for the pads and board wiring.

When every buffer on the path is full, the sender stops. That state is shown
on `ev_no_credit`.

## Timing and measured behaviour

Every link moves one word per cycle. The ring link is 32 bits per cycle
each way, which at 100 MHz is the 100 MT/s of the reference board.

The system testbench (`tb_gas_system`) runs the default-size design and
prints the results below. Times are from the sender's start to the timer
value in the receiver's ArrivalTime. The reference column gives the figures
reported for the original implementation at 100 MHz.

| measurement | this RTL (cycles) | reference (cycles) |
|---|---|---|
| short message, same FPGA | 9 | 17 |
| short message, 1 ring hop | 13 | – |
| short message, 2 ring hops | 17 | 31 |
| ping-pong, same FPGA | 19 | "slightly more than double" |
| one-word remote write, extra over a short message | +11 | +12 |
| remote read, same FPGA | 31 | ping-pong + 12 |
| simple 16-node barrier, last call at node 0 / all done | 53 / 123 | 87 / 196 |
| staggered barrier (one hub per FPGA) | 37 / 89 | 62 / 148 |
| 64-byte / 256-byte transfer, share of 4 B/cycle | 45 % / 77 % | about half, reached between 64 and 256 B |

Latencies are lower than the reference because the pipelines here are
shallower. The paper gives no timing for the internals of its NetIf and
OCCC, so this RTL uses the simplest versions: two cycles through the receive
unit and one register per router stage. The shape of the results matches the
reference:

* each ring hop costs a fixed number of cycles (4 here);
* a long message costs about a dozen cycles more than a short one;
* bandwidth for small transfers is poor, and reaches half of the peak between
  64 and 256 bytes.

## Where this RTL departs from or adds to the reference design

Taken from the reference design:

* the node structure (memory, GAScore, four FSLs, and PAMS or processor);
* the token buffer, and the token-based reply addressing;
* the round-robin memory sharing;
* cut-through short messages and memory-first long messages;
* the PAMS feature list (loadable code, message and transfer counters, timer
  threshold and offset, ArrivalTime with a non-updating poll, control I/O,
  ANDed wait conditions, sends with arguments from code, timer and
  ArrivalTime);
* the system shape: four FPGAs on a ring, each with 4 hardware nodes, 1
  processor node, 7 fully connected NetIfs and 2 OCCCs, and 64 KB of BRAM per
  node.

This design's own choices:

* all word formats and handler codes;
* the PAMS instruction set and encoding;
* the remote-read responder in the PAMS (`F4`);
* the sizes of the FSLs, the link FIFOs and the token buffer (16 each);
* the instruction RAM (512 words), and four counters of each kind;
* the NetIf and OCCC internals, including credit flow control and two pad
  stages;
* the node numbering and the shortest-direction ring routing.

Not included:

* The embedded processor. Its four FSLs and memory port A are top-level
  ports (`h_*`), and the testbenches drive them with a processor model
  (`tb/host_bfm.sv`).
* The custom hardware cores. Each hardware node brings out memory port A and
  the PAMS control bits (`pe_*`).
* The board-level link hardware and the UART. The OCCCs of neighbouring
  FPGAs are wired directly to each other.
* Synthesis results, clock rate and resource use, which were not evaluated.

## Files

| file | block |
|---|---|
| `rtl/gas_pkg.sv` | word formats, handler codes, PAMS opcodes, routing function |
| `rtl/fsl_fifo.sv` | FSL / link FIFO, first-word fall-through |
| `rtl/dp_bram.sv` | dual-port local memory, one-cycle read |
| `rtl/token_buffer.sv` | token allocation, lookup and freeing |
| `rtl/mem_arbiter.sv` | round-robin memory port sharing |
| `rtl/gas_rx.sv`, `rtl/gas_tx.sv` | GAScore receive and transmit units |
| `rtl/gascore.sv` | GAScore |
| `rtl/pams.sv` | sequencer |
| `rtl/netif.sv` | router |
| `rtl/occc.sv` | off-chip link controller |
| `rtl/pe_node.sv`, `rtl/host_node.sv` | hardware node and processor node |
| `rtl/gas_fpga.sv` | one FPGA |
| `rtl/gas_system.sv` | four-FPGA ring (top) |

Each `tb/tb_<block>.sv` is a self-checking testbench, and `tb/host_bfm.sv` is
the processor model. Every testbench ends by printing
`TB_RESULT checks=N failures=M`.

`tb_gas_system` runs at the top's default parameters and covers:

* loading programs over the network;
* both barriers;
* latencies at distances 0–2;
* remote writes and reads;
* a bandwidth sweep;
* a soft barrier on transfer counters with control handshakes and timer
  offsets;
* a flood that fills a token buffer and runs a ring link out of credits;
* 24 random block moves: remote reads of random blocks into node 16, then
  long writes of them to other random nodes, compared word by word.

It also counts how often each mechanism occurs and fails if one never does.
`tb_gas_fpga` tests a single FPGA against a model of its ring neighbours.

## Simulating

With Verilator 5 (timing mode), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/gas_pkg.sv tb/tb_gas_system.sv --top-module tb_gas_system -Mdir obj
obj/Vtb_gas_system
```

Replace `tb_gas_system` with any other testbench name to run that one. The
full system test takes about half a minute to build and under a second to
run.

## Changing sizes

The main parameters, all passed down from `gas_system`:

* `N_FPGA` — ring size. Node ids assume at most four FPGAs with 8-bit ids.
* `WORDS` — memory per node, in 32-bit words.
* `IMEM_WORDS` — PAMS instruction RAM size.
* `NCTRL` — number of PAMS control bits.
* `FSL_DEPTH` — depth of the four FSLs.
* `LINK_DEPTH` — depth of the link FIFOs.

The token count `NTOK`, the OCCC buffer depth `RX_DEPTH` and the pad stages
`PAD_STAGES` are parameters of `gascore` and `occc`/`gas_fpga`.

If you change the instruction encoding, keep `gas_pkg::pams_op_e` and the
instruction helpers in `tb/host_bfm.sv` in step.

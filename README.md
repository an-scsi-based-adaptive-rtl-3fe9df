# SCSI-linked torus router node

This is the receiving side and the routing logic of a node in a small
message-passing parallel computer. The computer is a two-dimensional torus
of PCs. The links between the PCs are plain SCSI buses. Every node sends
through an ordinary SCSI host adapter, which acts as the *initiator*. Every
node receives through the hardware in this repository. It has one SCSI
*target* controller per neighbour (North, South, East, West).

Each node owns one SCSI bus. On that bus, the node's adapter is the only
initiator. The four targets on the bus are the controllers in the four
neighbours that receive from this node. Nodes therefore never compete for
a bus, and SCSI ID priority cannot starve anyone.

Packets are switched whole (store and forward). A packet arriving at a node
lands in a receive buffer. The host is interrupted and looks at the
packet's routing header. It then either keeps the packet or sends it on to
the next neighbour with its own SCSI adapter. Routing is minimal and
adaptive. It is deadlock-free because the torus is split into four virtual
networks, and each ring of each virtual network has two classes of virtual
channel.

The design follows the SCSI-based adaptive router published by K.-F. Hwang,
J.-W. Jou, C.-C. Liu and T. C. Yang (Feng Chia University). That design
targets a 16-node machine built from Altera FLEX 8000 FPGAs, SRAMs and
TTL parts. This RTL is an independent implementation. The section
"Departures and own choices" lists where it had to fill gaps.

## Structure

```
                 +-------------------------- scsi_router ------------------------------+
 North bus <---->| scsi_target --(BUF_SEL,SMEMW,addr,data,done)--> buffer_pair (2 x 2 KB)|
 South bus <---->| scsi_target -->                                 buffer_pair          |<--> host read port
 East  bus <---->| scsi_target -->                                 buffer_pair          |     (host_addr, host_rd,
 West  bus <---->| scsi_target -->                                 buffer_pair          |      host_rdata, host_release,
                 |      | INT A..D                                   rec[p][b]           |      rec)
                 |      v                                                                |
                 | interrupt_unit ------------------------------------------------------>|--> irq, int_pending / int_ack
                 |                                                                       |
                 | utr_inject  (header for a new packet)                                 |<--> routing decision port
                 | utr_route   (per-hop link + virtual channel choice)                   |
                 +-----------------------------------------------------------------------+
```

| File | Contents |
|---|---|
| `rtl/router_pkg.sv` | header struct, direction enum, SCSI phase, status and opcode constants |
| `rtl/scsi_target.sv` | SCSI target controller, one per neighbour bus |
| `rtl/buffer_pair.sv` | two packet buffers, their data-record bits, and the controller/host switching |
| `rtl/sram_buffer.sv` | one byte-wide 2 KB SRAM |
| `rtl/interrupt_unit.sv` | merges the four controller interrupts into one IRQ |
| `rtl/utr_inject.sv` | picks the virtual network and builds the header at the source |
| `rtl/utr_route.sv` | per-hop minimal adaptive routing decision |
| `rtl/scsi_router.sv` | top: four ports, interrupt unit, host port, routing units |
| `tb/scsi_initiator_model.sv` | behavioural SCSI initiator (the sending node's adapter) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_torus_network` |
| `tb/torus_bench.sv` | a K x K torus of router nodes with behavioural hosts, used by `tb_torus_network` |

## How one packet is received

One SCSI transfer from a neighbour works like this (lines are written
active-high here):

1. **Selection.** The neighbour's adapter arbitrates. It then raises SEL
   and puts its own ID bit and the target's ID bit on the data bus. The
   four controllers of a node answer to four different IDs (`TARGET_IDS`,
   default North 0, South 1, East 2, West 3). A node's bus reaches the
   South controller of the node above it, the North controller of the node
   below it, and so on, so no two targets on one bus share an ID. The
   controller sees SEL with its ID while BSY is low. It raises BSY and
   waits for SEL to drop.
2. **Command phase** (C/D=1, I/O=0). The controller requests six command
   bytes with the REQ/ACK handshake. The command is SEND(6): opcode 0Ah,
   with a 24-bit byte count in bytes 2 to 4.
3. **The busy check.** The controller looks at the data-record bits of its
   two buffers.
   - If both bits are set, both buffers hold packets the host has not taken
     yet. The controller skips the data phase and answers **BUSY** status
     (08h). The sender keeps the packet and retries later.
   - Otherwise it takes buffer 0 if that is free, else buffer 1.
4. **Data-out phase** (C/D=0, I/O=0). Each byte is written into the chosen
   buffer at an incrementing address. A block counter counts the bytes
   still to come.
5. **Completion.** After the last byte the controller toggles that
   buffer's data-record bit (0 to 1) and pulses its interrupt line.
6. **Status and message.** The controller returns GOOD status and the
   COMMAND COMPLETE message, then releases BSY.

TEST UNIT READY gets GOOD status. Any other opcode, and a SEND whose count
is 0 or larger than one buffer, gets CHECK CONDITION (02h) with no data
phase.

Timing: SEL, BSY and ACK come from another machine. Each passes through a
two-flip-flop synchroniser. A byte therefore costs about six clocks plus
the initiator's own response time. The data bus is sampled once ACK has
been synchronised. This relies on the SCSI rule that the initiator holds
the data until REQ falls. The controller drives `scsi_db_o` only while
`scsi_db_oe` is high (the status and message phases).

## Buffers, data-record bits and the host

The key idea of the receive side is double buffering with one ownership bit
per buffer:

| `rec[p][b]` | buffer b of port p |
|---|---|
| 0 | empty. The SCSI controller owns the SRAM port and may fill it. |
| 1 | holds a packet. The host owns the SRAM port and may read it. |

Each record bit is a T flip-flop, toggled exactly twice per packet:

- once by the controller when the packet has been stored;
- once by the host, when it pulses `host_release` with that port and buffer
  on `host_addr`.

While the host works on one buffer, the controller can fill the other.
Only when both are full does the neighbour see BUSY. Assertions in
`buffer_pair` check the two rules: the controller completes only into an
empty buffer, and the host releases only a full one. The multiplexer in
front of each SRAM does the job of the tri-state address and data buffers
on the original board.

The host sees the buffers as memory:

```
host_addr[13:12] = port (0 North, 1 South, 2 East, 3 West)
host_addr[11]    = buffer
host_addr[10:0]  = byte offset
```

`host_rdata` is valid one clock after `host_rd`. A read of a buffer that
the controller owns returns 0.

The host's interrupt program is expected to work like this:

1. On IRQ, read `int_pending` and write the same bits to `int_ack`.
2. Scan `rec` for full buffers.
3. For each full buffer, read the header. By convention the first four
   bytes hold the 16-bit routing header and the packet length.
4. Decide the next hop, using the routing units below or software.
5. Send the packet on, or copy it out, for example by DMA.
6. Pulse `host_release` for that buffer.

The interrupt unit keeps one pending bit per controller. IRQ is high while
any bit is pending. IRQ drops for one clock after each acknowledge. This
gives an edge-triggered PC interrupt controller a fresh edge for requests
that are still pending.

## Routing: four virtual networks, p- and h-channels

### Virtual networks

The bidirectional torus is split into four virtual networks: X+Y+, X+Y-,
X-Y+ and X-Y-. The source fixes the sign of each dimension once, taking
the shorter way round each ring (`utr_inject`). After that the packet only
ever moves toward its destination, so every route is a shortest path.

While both distances are non-zero, either dimension is a valid next step.
This is what makes the routing adaptive. `utr_route` keeps the current
dimension unless that link is marked busy (`link_busy`) and the other link
is free.

### Virtual channels

Each ring of a virtual network is unidirectional. That makes the
unidirectional torus routing of Dally and Seitz applicable, with two
virtual channel classes per link:

- **p-channels** carry packets that still have to cross the ring's
  wraparound link (between nodes k-1 and 0). The wraparound link itself is
  a p-channel.
- **h-channels** carry all other packets, including those that have
  already wrapped.

Take a packet at coordinate c with n hops to go:

| direction | class p when | otherwise |
|---|---|---|
| + | c + n >= k | h |
| - | n > c | h |

Example: on a 4-ring moving +, a packet at node 3 bound for node 1 uses p
from 3 to 0 (the wraparound). It then uses h from 0 to 1.

The original publication prints this rule as a formula in
Δ = σ(current) − σ(destination). Read literally, that formula gives the
opposite classes. Its prose and its ring diagram agree with the rule above,
so this design follows the prose and the diagram.

### Header format (16 bits)

| bits | field | meaning |
|---|---|---|
| 15 | dim | 0: the last or current hop is along X; 1: along Y |
| 14 | vx | X channel class in use or last used (0 h, 1 p) |
| 13 | vy | Y channel class in use or last used |
| 12 | X | 1: X+ virtual network; 0: X- |
| 11 | Y | 1: Y+; 0: Y- |
| 10:6 | x_dist | X hops still to go |
| 5:1 | y_dist | Y hops still to go |
| 0 | reserved | 0 |

`utr_route` takes `hdr_in` and returns three things:

- `dir`: North, South, East, West, or Deliver when both distances are 0;
- `vc`: the class of the hop;
- `hdr_out`: the header with the chosen distance decremented, `dim` set to
  the dimension used, and `vx` or `vy` set to the class.

The torus radix is the input `k`, from 2 to 2**`COORD_W`. The default
`COORD_W` = 4 covers tori up to 16 x 16.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| scsi_router, buffer_pair, scsi_target | `BUF_BYTES` | 2048 | bytes per buffer (packets are 128 to 1024 bytes) |
| scsi_router | `TARGET_IDS` | {3,2,1,0} | SCSI ID of the controller of each port (N, S, E, W = 0, 1, 2, 3) |
| scsi_target | `TARGET_ID` | 0 | SCSI ID the controller answers to |
| scsi_router, utr_* | `COORD_W` | 4 | bits per coordinate |
| interrupt_unit | `N_SRC` | 4 | interrupt sources |

After coarse synthesis the whole node is about 890 word-level cells and
467 flip-flops, plus 8 x 16 Kbit of buffer memory. One SCSI controller is
about 150 cells and 111 flip-flops.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
          --top-module tb_scsi_router rtl/router_pkg.sv tb/tb_scsi_router.sv
./obj_dir/Vtb_scsi_router
```

To run another testbench, replace `tb_scsi_router` with its name.

- **`tb_scsi_router`** runs the node at its default sizes.
  - Four initiators send 128-byte, 1024-byte and random 128 to 1024-byte
    packets at the same time.
  - A slow behavioural host services the interrupts, checks every byte,
    runs the routing units against a ring-walking reference, and releases
    the buffers.
  - It requires each mechanism to occur at least once: BUSY answers and
    retries, both buffers full, the second buffer, interrupts from all
    four ports, several interrupts pending at once, CHECK CONDITION,
    delivery, forwarding on p- and on h-channels, and a busy-link dimension
    change.
- **`tb_torus_network`** builds whole tori from `scsi_router` nodes. Each
  node has a behavioural host and adapter (`tb/torus_bench.sv`), wired as
  described above.
  - It runs uniform random traffic with 128-byte, 1024-byte and mixed
    128 to 1024-byte packets, and transpose traffic, (x,y) to (y,x), on a
    4 x 4 torus.
  - It runs uniform random and transpose traffic with 128-byte packets on
    an 8 x 8 torus.
  - It checks that every packet arrives once, intact, at its destination,
    after the minimal number of hops.
  - It prints mean hops and latency per byte. The packet counts are small,
    so these figures describe a lightly loaded network. They are not a
    saturation study.
  - Its build takes a few minutes. A 16 x 16 network is one more
    `torus_bench` line with `K(16)`.
- **`tb_utr_route`** routes every source and destination pair of tori with
  radix 2 to 16 (a sample of pairs for 16) hop by hop, with random busy
  links. It checks three things: minimal hop count, delivery only at the
  destination, and the p/h class against whether the remaining walk
  crosses the wraparound link.
- **`tb_scsi_target`**, **`tb_buffer_pair`**, **`tb_sram_buffer`**,
  **`tb_interrupt_unit`** and **`tb_utr_inject`** test one module each
  against a reference model.

All testbenches except `tb_torus_network` finish in well under a second.

## Departures and own choices

What follows the original design:

- four SCSI target controllers per node, each on its own bus;
- two independent 2 KB buffers per controller;
- a T flip-flop data-record bit per buffer;
- BUSY when both buffers are full;
- record bit set and interrupt raised when a packet is complete;
- one interrupt unit merging the four interrupts;
- memory-mapped buffers;
- four virtual networks with p/h channels and minimal adaptive routing;
- the fields of the 16-bit header.

Own choices, because the original leaves them open:

- **Record bits.** They are cleared by the host with `host_release`.
  Ownership of each SRAM follows its record bit.
- **Buffer choice.** Buffer 0 is taken first.
- **Commands.** SEND(6) and TEST UNIT READY are implemented; other
  commands get CHECK CONDITION.
- **Status codes.** BUSY status carries the "busy" answer.
- **Interrupts.** The unit has pending bits, an acknowledge, and the
  one-clock IRQ gap.
- **SCSI bus.** It is 8 bits wide, asynchronous, and modelled with
  active-high levels and separate initiator and target wires instead of
  wired-OR, active-low lines. Parity, ATN and message-out, disconnect and
  reselect, and bus reset are not implemented. A board needs open-collector
  drivers, inverters and parity around `scsi_router`.
- **Header fields.** The split of the two distance fields (bits 10:6 and
  5:1, bit 0 reserved) is chosen here.
- **Routing details.** The tie-break to + is chosen here. So are the port
  order N/S/E/W, the naming X+ = East and Y+ = North, and the SCSI IDs.
- **Routing in hardware.** The routing algorithm ran as host software in
  the original. Here it is also available as combinational logic with its
  own ports on the top. The host still decides what to do with the result.
- **SRAM.** It has a synchronous read (one clock), so that it maps onto
  FPGA block RAM. The original board used asynchronous SRAM chips.
- **Buffer numbering.** Buffers are numbered 0 and 1 throughout. The
  original drawings number them both 0/1 and 1/2.
- **Clock and reset.** There is one clock and an active-low asynchronous
  reset. After reset, all buffers are empty.

Not included: the host PC (processor, interrupt controller, memory, DMA
controller) and the sending SCSI adapter. These are standard parts that
attach to the host and SCSI ports. The network-level latency and
saturation figures of the original come from a software simulation of the
whole machine. This RTL does not reproduce them.

The original reports about 2500 gates per SCSI controller on the FPGA. The
numbers above come from a different tool and cell library, so the two are
not directly comparable.

# Buffer Manager Mechanism (BMM): hardware FIFO channels between clusters

In a clustered multi-core chip, software FIFOs between processes are costly.
The sender must check the FIFO state, the CPU must exchange read and write
pointers with the other side, and every pointer update crosses the
network-on-chip. The Buffer Manager Mechanism moves all of that into
hardware.

A process sends to, or receives from, a **port**, which is a small integer.
The BMM of each cluster keeps three tables:

- which remote port each local port is connected to;
- how many words the remote FIFO can still take (**credits**);
- where each local FIFO sits in the cluster's shared memory, with its
  pointers.

Data crosses the network as plain remote writes into the receiver's FIFO.
The only control traffic is an occasional credit packet flowing back. This
maps directly onto MCAPI-style endpoints and channels:

- scalar channels become *direct* requests (one word);
- packet channels become *indirect* requests (a buffer);
- connectionless messages become *address-based* requests, which work like
  a DMA transfer.

This repository holds synthesizable SystemVerilog for one cluster's BMM.
Around it sit the cluster pieces it talks to: an Event Synchronizer (a
small interrupt controller) and a dual-port shared memory. The CPUs, the
network interface and the NoC routers are outside; their signals are ports
of the top, `bmm_cluster`.

The design follows the published BMM architecture:

- the BMI, BMW, BMR and CM blocks;
- the three register tables;
- the address encoding of requests;
- per-CPU request queues with round-robin selection;
- credit-based flow control;
- the FIFO on the receiving side.

The published description stops at the block level. So the interfaces
between blocks, the packet format, the configuration registers, the queue
depth, the memory size and all timing are this design's own choices. They
are listed below.

## Where the FIFO lives

A FIFO can live with the sender, with the receiver, or be split between
them, with a writer block on one side and a reader block on the other. This
design puts the FIFO, the block that writes it and the block that reads it
all in the **receiving** cluster. The sender then only ever does remote
*writes*, which are cheap on this kind of NoC. No pointer ever crosses the
network: the sender only needs to know how much room is left, and credits
tell it that.

Each cluster's BMM plays both roles: sender on its outgoing connections and
receiver on its incoming ones.

```
 sending cluster                                    receiving cluster
 CPU --regs--> BMI --data packets--> NoC --> BMW --> FIFO in shared memory
               ^  |                                        |
   Credit Table|  | (spend credits                          v
               CM <-- credit packets <-- NoC <-- CM <-- BMR --> target buffer / CPU
```

## Talking to the BMM: the address *is* the request

The CPU builds a request with one to three stores to the BMM's register
window. Most of the request is carried in the **address** bits:

| bits  | field | meaning |
|-------|-------|---------|
| 22:20 | `011` | selects the BMM |
| 19    | R/W   | 1 = send (write) request, 0 = receive (read) request |
| 18:17 | type  | `00` address-based, `01` direct, `10` indirect, `11` configuration |
| 16    | E     | end of request: this store completes it |
| 15:8  | port  | local port ID (256 ports) |
| 7:4   | CPU   | CPU ID: picks the request queue (16 CPUs) |

Stores with E = 0 are staged per CPU, so two CPUs may interleave their
stores. The store with E = 1 completes the request:

| request | stores (data written) |
|---|---|
| address-based send | source address, destination global address, size in bytes (E=1) |
| indirect send      | source buffer address, size in bytes (E=1) |
| indirect receive   | target buffer address, size in bytes (E=1) |
| direct send        | the data word (E=1) |
| direct receive     | one **load** with E=1. The bus waits until the word is there. |

If the CPU's queue is full, the completing store waits on the bus (ready
held low). A direct receive blocks the bus until its word arrives, and the
design has one bus per cluster. So a direct receive on an empty channel
stalls every CPU of that cluster.

The following are this design's own choices, not part of the published
mechanism:

- the polarity of bit 19;
- the type codes;
- the use of type `11` for configuration;
- sizes counted in bytes.

**Configuration** (type `11`, bit 19 = 1, bit 16 = 1). Bits 7:4 select a
field; bits 15:8 select the port:

| bits 7:4 | field | write data |
|---|---|---|
| 0 | Connection Table | `[15:8]` remote cluster, `[7:0]` remote port |
| 1 | Credit Table | credits of the port, i.e. the size of the remote FIFO in words (also readable) |
| 2 | FIFO base | byte address in shared memory |
| 3 | FIFO size | words; also clears the pointers and the fill count |
| 4 | credit threshold | global; 0 = return credits only when a read request ends |
| 5 | FIFO fill | read only |

**Global addresses.** Bits 31:24 of an address-based destination name the
cluster; the low bits are the address inside that cluster.

## Credits: the hard part

One credit is one free 32-bit word in the remote FIFO.

**Set-up.** Software gives the sending port as many credits as the
receiving FIFO has words.

**On the sending side.** The BMI only *selects* a stream request if the
Credit Table holds at least as many credits as the request has words. A
request without enough credits stays in its queue, and other CPUs'
requests pass it. When its last flit has left, the request's words are
subtracted. The next request is selected only after that, so the check
never sees stale credits.

**On the receiving side.** Each word the BMR takes out of a FIFO adds one
*pending credit* for that port in the CM. Pending credits are sent back in
a single credit packet in two cases:

- when the read request completes;
- as soon as they reach the programmable threshold, which lets a long read
  free the sender early.

The credit packet goes to the remote port named in the receiver's own
Connection Table. When it arrives, the sender's CM adds it to the Credit
Table.

Consequences worth knowing:

- **The FIFO can never overflow.** The Buffer Table asserts this in
  simulation.
- **A request larger than the remote FIFO never goes.** It can never
  collect enough credits. Size FIFOs for the largest packet.
- **Throughput depends on FIFO size.** With a FIFO exactly one packet
  long, sending and receiving cannot overlap. In the throughput workload,
  8 KB packets through a 2048-word FIFO reach about half the rate of
  512 B packets.
- **The BMR's rule mirrors the BMI's.** A read request is selected only
  when its FIFO already holds all the words it asks for. So a read request
  never blocks an engine while it waits for data.

## Blocks

| module | role |
|---|---|
| `bmm_cluster` | top: BMM + Event Synchronizer + Shared Memory on one CPU bus. Window `011` is the BMM, `100` the Event Synchronizer, anything else the shared memory. |
| `bmm` | the mechanism; wires the blocks below |
| `bmm_req_decoder` | address-encoded requests, per-CPU staging, configuration access, direct-read wait |
| `bmm_bmi` | send engine: per-CPU queues, credit-gated round robin, source reads, packet output, credit subtraction |
| `bmm_bmw` | receive engine: writes stream data into the port FIFO, address-based data at its address |
| `bmm_bmr` | read engine: per-CPU queues, data-gated round robin, FIFO-to-buffer copy or one word to the CPU |
| `bmm_cm` | Credit Manager with the Credit Table, pending credits, threshold, credit packets |
| `bmm_conn_table`, `bmm_credit_table`, `bmm_buffer_table` | the three tables, held in registers |
| `bmm_rr_arbiter` | round robin over eligible requesters; also used by the memory and packet arbiters |
| `bmm_mem_arbiter`, `bmm_tx_arbiter`, `bmm_rx_demux`, `bmm_fifo` | helpers: share the memory port and the NoC output, split incoming credit and data packets, request queues |
| `event_sync` | per CPU, a 32-bit event register (bit = port mod 32, set on completion) and a mask. The CPU's event line is high while all mask bits are set. Write ones to clear. |
| `shared_mem` | 16384-word dual-port memory, one-cycle reads (a register array, standing in for an SRAM) |
| `bmm_pkg` | field positions, request/packet/memory types |

**Packets** (own format). A packet is a series of 32-bit flits with a
`last` flag. The header flit is `{type[31:30], cluster[29:22], port[21:14],
len[13:0]}`. There are three kinds:

- *stream*: header followed by `len` data words;
- *address*: header, the destination address, then the data words;
- *credit*: the header alone, with `len` = credits.

The network interface is expected to route on the cluster field.

**Timing.** When the memory port is free, the BMI sends one word every
three cycles: read, wait, send. The BMR copies one word every three
cycles: read, wait, write. The two engines and the BMW share one memory
port, so under load each of them goes slower. Neither engine pipelines its
memory accesses, and all blocks run on one clock. The published system clocks
the CPUs at 200 MHz and the NoC at 500 MHz; crossing between the two is
left to the network interface.

## Sizes

| parameter | default | origin |
|---|---|---|
| `NUM_PORTS` | 256 | 8-bit port field |
| `NUM_CPUS` | 16 | 4-bit CPU field; the reference cluster drawing shows 2 |
| `QUEUE_DEPTH` | 4 | own choice |
| `SMEM_WORDS` | 16384 (64 KB) | own choice |
| FIFO size / packet length | up to 16383 words | own field widths |
| transfer size | up to 65535 bytes | own field widths |

At these defaults one cluster has about 37 k flip-flops. Most of them are
the tables, which hold a few words for each of the 256 ports, as in the
original design.

These sizes hold the published benchmarks. The largest, the 16 KB
ping-pong with 8 KB packets, needs a 2048-word FIFO plus 4096-word
buffers. The susan image-processing workload depends on a data layout and
cluster count that are not specified.

## Departures and interpretations

These points read the published mechanism in a particular way, or fill a
gap it leaves:

- **Address-based requests skip the credit check.** They write to an
  explicit address, not into a FIFO, so there is no remote FIFO to count
  credits for. The BMI selects them as soon as they reach the head of
  their queue.
- **Event matching.** An event for a CPU fires when every bit set in its
  mask is also set in its event register. Completions set bit `port mod
  32`, where the port is the one the request named. For an address-based
  request that is the port field of its address.
- **Address decoding.** Only bits 22:20 choose between the BMM, the Event
  Synchronizer and the shared memory. Address bits that carry no field
  are ignored, not checked to be zero.
- **Direct receives block.** A direct receive waits on the bus until its
  word arrives. It does not return a "no data" status.
- **One clock.** All blocks run on one clock, with no separate NoC clock.
- **Credit threshold.** The threshold is one register shared by all
  ports, not one register per port.

## Testbenches and how far to trust this

Every module has a self-checking testbench in `tb/`. Each one compares the
module against an independent model and prints
`TB_RESULT checks=N failures=M`.

- **`tb_bmm_cluster`** is the end-to-end test. It builds two full-size
  clusters linked by a point-to-point network with random stalls, and
  runs six scenarios:
  - an indirect transfer;
  - direct words;
  - an address-based copy;
  - 36 words through a 16-word FIFO, which shows a credit stall, a full
    request queue holding the bus, and credits flowing back;
  - a threshold-driven early credit return;
  - round-robin order between two CPUs.

  It fails if any of those mechanisms never occurs.
- **`tb_pingpong`** moves 16 KB between two clusters in packets of 8 B to
  8 KB. It checks every word and prints the cycles taken and the hardware
  rate at 200 MHz:

  | packet | 8 B | 32 B | 128 B | 512 B | 2 KB | 8 KB |
  |---|---|---|---|---|---|---|
  | Mbit/s | 1421 | 1892 | 2052 | 2052 | 1892 | 1066 |
  | link efficiency | 50 % | 80 % | 94 % | 98 % | 99 % | 99 % |

  Link efficiency is user data over all flits in both directions. That
  includes one header per packet and one credit packet per completed
  read. These figures count only the hardware's own data movement, with no
  software overhead. The 200 MHz bus limit of one word per two cycles is
  3200 Mbit/s. Small packets lose rate to per-request overhead. At 8 KB
  the 2048-word FIFO holds exactly one packet, so sending and draining
  cannot overlap.

  A second phase times round trips. The data goes out on one channel, is
  read by the other side, and is sent back on a second channel:

  | packet | 8 B | 32 B | 128 B | 512 B | 2 KB |
  |---|---|---|---|---|---|
  | one packet, cycles | 38 | 109 | 397 | 1549 | 6157 |
  | 8 KB as a chain of packets, cycles | 37888 | 27904 | 25408 | 24784 | 24628 |

  Each round trip is checked against a bound of 2·(6·words + 64) cycles.
  Six cycles per word is three for the sender plus three for the reader.

What has *not* been checked:

- behaviour against the original SystemC model;
- more than two clusters;
- many CPUs contending at once on a real bus;
- synthesis timing.

## Simulating

Every testbench is a module with no ports. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/bmm_pkg.sv \
    tb/tb_bmm_cluster.sv --top-module tb_bmm_cluster -o sim
./obj_dir/sim
```

Replace `tb_bmm_cluster` with any file in `tb/`. Testbenches drive the bus
one time unit after a rising clock edge and sample in the middle of the
cycle. Two rules apply to the design:

- a bus master holds its request until `bus_ready`;
- a flit source holds its flit until `ready`.

Both rules are asserted in simulation.

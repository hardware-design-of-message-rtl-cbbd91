# A hardware Message Passing Engine for an FPGA cluster node

MPI programs spend much of their time in collective operations: barrier,
broadcast, reduce and allreduce. On a cluster of FPGA boards with slow
embedded processors, running these operations in software costs a lot.
Protocol stacks, interrupt handlers and a slow bus all add overhead. An
embedded CPU without a usable FPU is also slow at the arithmetic of a
reduction.

This design moves the collectives into logic. Each node (one FPGA) has an
on-chip packet router. The router joins the node's six torus links with a set
of units:

- a **DMA engine** for point-to-point transfers between main memory and the
  network;
- a **Message Passing Engine (MPE)** that runs barrier, broadcast, reduce and
  allreduce over any tree of nodes, with a 4096-word buffer and a
  floating-point/integer ALU;
- accelerators that speak the same packet protocol: an **FFT unit** for the
  inter-node stages of a distributed FFT, and **MACC cores** for a distributed
  matrix-vector product;
- a **source/sink** traffic generator and a **monitor** with event counters.

The processor only writes a few registers and waits for an interrupt. Data
moves from memory through the DMA into the MPE, across the network, and
straight into an accelerator or back into memory.

The RTL is SystemVerilog-2017. The top module `mpe_node` is one complete
node. A cluster is several `mpe_node` instances whose link ports are wired
together.

## Node organisation

```
             link X+ X- Y+ Y- Z+ Z-   (ports 0..5)
                    |  |  |  |  |  |
   +----------------------------------------------+
   |            xbar_router (16 ports)             |
   |   route_calc: dimension order on 4x4x4 torus  |
   +--+------+------+------+------+------+--------+
      |6     |7     |8     |9     |10..15
     DMA    MPE   src/sink  FFT   MACC x6
      |
   memory port                       monitor (bus only)
```

Every unit sits on a 16-bit-address register bus. Address bits [15:12]
select the unit:

| Block | Unit |
|---|---|
| 0 | router |
| 1 | DMA |
| 2 | MPE |
| 3 | source/sink |
| 4 | monitor |
| 5 | FFT registers |
| 6 | FFT twiddle table, real parts |
| 7 | FFT twiddle table, imaginary parts |
| 8 | MACC cores (bits [11:8] pick the core) |

Bus timing:

- A write takes effect at the clock edge where `bus_we` is high.
- `bus_rdata` holds the addressed word from the edge after `bus_re`.

The DMA's memory port and three interrupt lines (DMA, MPE, FFT) are top-level
ports.

### Packets

All units and links carry 32-bit words. Each word comes with `sof`/`eof`
flags and a valid/ready handshake. This is a LocalLink-style stream, but with
active-high signals. A packet is:

| Word | Content |
|---|---|
| H0 | `{dst_node[5:0], dst_port[3:0], src_node[5:0], src_port[3:0], mtype[3:0], tag[7:0]}` |
| H1 | an auxiliary word (for example the memory address for a DMA write) |
| payload | zero or more data words |

The message types are listed in `mpe_pkg`:

- DMA write
- collective data
- READY
- BAR_UP
- BAR_DOWN
- stream
- MACC vector
- MACC rows
- FFT local
- FFT remote

The node ID is `{z, y, x}`, with two bits per coordinate.

### Router and routing

`xbar_router` has a 4-word FIFO on every input. A free output grants one
requesting input in round-robin order. It then stays connected to that input
until the packet's `eof` word has passed (wormhole switching, no
interleaving). A grant costs one cycle; after that a packet moves at one word
per cycle.

`route_calc` decides where a packet goes:

1. A packet for this node leaves on its `dst_port`.
2. Any other packet goes in X, then Y, then Z, the short way round each ring.
3. A packet exactly half a ring away goes + from an even coordinate and −
   from an odd one.

The rule in step 3 is what makes the network deadlock-free without virtual
channels, for the 4-ary torus built here. The only packets that hold two
links of one ring are:

- those starting at an even node going +;
- those starting at an odd node going −.

So no chain of held links can close around a ring. This argument does not
carry over to rings longer than 4. A plain "ties go +" rule deadlocks a
4-node ring when every node sends to the node opposite it, which is exactly
what the first FFT stage does.

The node ID is written over the bus (router register 0). Register 1 counts
routed packets.

## The Message Passing Engine (`mpe_core`)

The engine knows only its own place in a tree:

- its parent;
- whether it is the root;
- a list of up to 64 children.

Software writes these before an operation. Any tree can be used: binomial,
linear chain or star (the root with every other node as a child). Then the
processor writes an operation code (and an ALU op for reductions) to CTRL.
It waits for `irq`, then clears it through STATUS.

### Handshake messages

Every control message is taken in as soon as it arrives and is remembered
until it is needed:

- a READY flag per child;
- a READY flag from the parent;
- a count of BAR_UP messages;
- a BAR_DOWN flag.

A node may therefore start an operation late, after its neighbours have
already signalled. Data packets are only sent to a node that has asked for
them, so the receiver is always in the state that drains them. This is what
keeps the network free of blocked data packets.

### The operations

**Barrier:**

1. Wait for BAR_UP from all children.
2. If not the root, send BAR_UP to the parent and wait for BAR_DOWN.
3. Send BAR_DOWN to every child, then finish.

No node finishes before every node has entered.

**Broadcast:**

1. The root takes its data from a collective-data packet into the FIFO. The
   local DMA normally sends this packet, reading the buffer from memory.
2. Every other node sends READY to its parent and receives the parent's data
   into its FIFO.
3. Each node sends the FIFO to each child, once that child's READY is in.
4. Every non-root node then delivers the data locally. The destination is
   set by LOCAL_HDR/LOCAL_AUX: normally the DMA, which writes it to memory.
   It can also be any other port, for example a MACC core as its vector B.

**Reduce:**

1. Every node loads its local data into the FIFO.
2. For each child in turn, the node sends READY, then receives the child's
   packet. It combines the packet word by word with the FIFO's head through
   the ALU, and pushes results back to the FIFO's tail.
3. A non-root node sends the result up when its parent's READY arrives. The
   root delivers the result locally.

The ALU operations are float add, float max, integer add and integer max.

**Allreduce** is a reduce followed by a broadcast of the root's result. Every
node, the root included, delivers the result locally.

### Data path and timing

One FIFO holds the message. When the same data must go to several
destinations (children, then the local unit), the engine rotates the FIFO:
each word sent is pushed back, so the order is restored after every copy. The
FIFO is cleared when the operation ends.

Words move at one per cycle whenever the network accepts them. A reduce
combines one word per cycle; the ALU latency is only paid once per child, in
a short drain.

A message holds at most 4096 words (`FIFO_DEPTH`). Software splits longer
data into several operations. A collective-data packet must carry at least
one word.

Each node is store-and-forward: a message is received in full before it is
forwarded. On a linear tree, overlap therefore happens between successive
messages, not within one.

### MPE registers

| Address | Register | Fields |
|---|---|---|
| 0x0 | CTRL | op [2:0]: 1 barrier, 2 bcast, 3 reduce, 4 allreduce; ALU op [5:4] |
| 0x1 | STATUS | busy, done |
| 0x2 | TOPO | parent [5:0], root [8], number of children [22:16] |
| 0x3 | LOCAL_HDR | header of the local delivery |
| 0x4 | LOCAL_AUX | auxiliary word of the local delivery |
| 0x5 | — | last message length |
| 0x6 | — | operations done |
| 0x100+i | — | child i |

## DMA engine

To send, software writes:

- source word address;
- length;
- destination header;
- auxiliary word;

and then sets go. The engine reads memory with up to eight reads in flight,
builds the packet and raises send-done.

An arriving DMA-write packet is written to memory starting at the address in
its H1 word. The engine then raises receive-done. Receive writes take
priority over send reads on the memory port.

The memory port is a request/grant handshake. Read data returns in order
with `mem_rvalid`, after any delay.

## FFT unit (`fft_io`, `fft_core`)

A radix-2 decimation-in-frequency FFT of N = n·M points is spread over
n = 2^NST nodes. Rank r holds points r·M … r·M+M−1. In inter-node stage s,
rank r pairs with rank r XOR (n >> (s+1)):

- the lower rank keeps a + b;
- the upper rank keeps (a − b)·W^k.

The exponent is k = ((r·M + m) mod span) << s, with span = N >> (s+1).

Per stage, the unit works as follows:

1. It exchanges a READY(s) message with its partner.
2. It sends its M points while rotating its local FIFO.
3. It waits for the partner's M points in the remote FIFO.
4. It streams both FIFOs and the twiddle table through `fft_core`, writing
   the results back into the local FIFO.

The READY exchange stops a node that runs ahead from filling its partner's
remote FIFO with a later stage's data. After the last inter-node stage the
points are sent to a programmed destination, normally memory through the
DMA. The log2(M) intra-node stages are left to software.

The processor writes the twiddle table (W_N^k for k < N/2) through its own
bus port. The datapath has three parts:

- `cplex_addsub`: two float add/sub units;
- `cplex_mul`: four multipliers and two add/sub units;
- `cplex_sreg`: delays the twiddle by exactly the add/sub latency.

The unit's latency is 4 cycles for a + b and 11 cycles for (a − b)·W. It
takes one point per cycle. Complex numbers are `{re[63:32], im[31:0]}`; on
the network they travel as two words, real part first.

## MACC core

A vector-B packet fills the vector FIFO; its length sets the row length L.
A rows packet then streams rows of A:

- Each word is multiplied with the FIFO head, which is pushed back for the
  next row.
- Products go round-robin into ADD_LAT+1 partial sums, so the adder's
  latency never stalls the stream. Within a row the core takes one word per
  cycle.
- At the end of a row the partial sums are added together. This takes about
  (ADD_LAT+1)·ADD_LAT cycles, during which the input is held.
- Row results are collected and sent in one packet at the end of the rows
  packet.

In a matrix-vector product, the MPE broadcast can put vector B straight into
every node's MACC core, and the DMA streams that node's rows.

## Floating point

`fp32_add` and `fp32_mul` are single-precision units:

- They round to nearest-even.
- Subnormal inputs and results are flushed to zero.
- Infinities are produced on overflow, but NaN is not handled.

They are pipelined, with latency 4 (add) and 3 (multiply), and accept one
operation per cycle.

## Where this design departs from the original system

The original system ran on Virtex-4 boards with PowerPC processors, a PLB
bus, DDR2 memory and Aurora serial links. Those parts are vendor IP and are
not modelled here:

- The processor is replaced by a register bus.
- The memory is replaced by a simple request/grant port.
- The links are plain word streams at the node's boundary.

Other differences:

- **Vendor cores.** Floating-point units and FIFOs were generated cores in
  the original; here they are written out.
- **MACC count.** The original hybrid experiment used 8 MACC cores. A
  16-port router has room for 6 once the links and other units are placed,
  so `N_MACC` defaults to 6.
- **Protocol details are this design's own:**
  - the packet format;
  - the handshake direction of each operation;
  - register maps;
  - the FFT stage handshake;
  - the MACC result packet;
  - the routing tie-break.
- **Pipelining.** On a linear tree, the original pipelined a message through
  the chain. This design forwards whole messages.
- **Link signals.** LocalLink signals are active low; here they are active
  high.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `mpe_node` | `N_MACC` | 6 | |
| `xbar_router` | `NP` | 16 | |
| `xbar_router` | `IBUF_DEPTH` | 4 | |
| `xbar_router` | `K` | 4 | torus radix |
| `mpe_core` | `FIFO_DEPTH` | 4096 | |
| `mpe_core` | `MAX_CHILDREN` | 64 | |
| `mpe_core` | `ALU_LAT` | 4 | |
| `fft_io` | `FFT_DEPTH` | 1024 | points per node |
| `fft_io` | `TW_DEPTH` | 4096 | |
| `macc_core` | `VEC_DEPTH` | 4096 | |
| `macc_core` | `RES_DEPTH` | 256 | |
| `dma_engine` | `OBUF_DEPTH` | 8 | |
| `fp32_add` | `LAT` | 4 | |
| `fp32_mul` | `LAT` | 3 | at least 2 |

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. The shared package `tb/tb_fp_pkg.sv`
converts between floats and reals and provides reference arithmetic.

Run one testbench with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  -Irtl -Itb rtl/mpe_pkg.sv tb/tb_fp_pkg.sv tb/tb_mpe_node.sv --top-module tb_mpe_node
./obj_dir/Vtb_mpe_node
```

| Testbench | What it covers |
|---|---|
| `tb_mpe_node` | Four full nodes at default parameters, wired as the X ring of the torus, with random link stalls and a memory model per node. It runs the full list below. |
| `tb_mpe_core` | Eight engines on a behavioural network. All operations and ALU ops run on binomial, chain and star trees with random roots, staggered starts and maximum-length messages. |
| `tb_mpe_collectives` | Thirty-two engines at default parameters. Each tree shape runs a barrier, 8- and 4096-word broadcasts, a 4096-word reduce and allreduces. It prints the cycles of each operation and checks the store-and-forward lower bound. |
| `tb_fft_io` | Four FFT units with 1 and 2 inter-node stages. |
| `tb_xbar_router` | Random traffic from all 16 ports. Checks delivery port, order and packet integrity. |
| `tb_dma_engine` | Concurrent sends and receives against a random-latency memory. Also times a full-rate send. |
| `tb_macc_core` | Exact dot products for integer-valued data, tolerance checks for random data, and the one-word-per-cycle rate inside rows. |
| `tb_fp32_add`, `tb_fp32_mul` | Bit-exact comparison against a double-precision reference rounded to single. |
| other units | Checked against independent models. |

`tb_mpe_node` runs:

- two crossing DMA transfers;
- a two-hop source/sink stream;
- a barrier with a late node;
- a 4096-word broadcast from memory to memory;
- a float reduce and an integer allreduce;
- a 64-point FFT over four nodes;
- a matrix-vector product with B broadcast into the MACC cores.

It counts every mechanism: each operation, link stalls, packets forwarded
through another node, FIFO rotation, each interrupt and the monitor events.
It fails if any of them never happened.

In `tb_mpe_collectives` the behavioural network also holds each packet
whole before delivering it, so every hop costs two message lengths. With that
in mind, the 32-node 4096-word broadcast took about 49k cycles on the
binomial tree, 139k from the star's root and 262k down the chain. The
binomial tree wins because its depth is 5 and its widest fan-out is 5.
The star pays 31 serial copies at the root. The chain pays 31 store-and-forward
hops, because the engine does not pipeline within one message.

Assertions in the RTL check FIFO overflow, lane alignment and router grant
ownership.

## Known limits

- **Deadlock freedom** without virtual channels is argued only for 4-node
  rings.
- **Message size.** A message longer than the MPE FIFO must be split by
  software.
- **Empty messages.** A collective-data packet with no payload is not
  supported.
- **FFT stage order.** The FFT unit assumes every node of a group runs the
  same configuration. Ranks must map to consecutive node IDs starting at
  BASE.
- **MACC results.** A MACC rows packet may hold at most `RES_DEPTH` rows.
- **Floating point.** The reduce ALU's float max compares magnitudes with
  sign handling but does not treat NaN specially.

# Replication NIC: leader-based key-value replication in FPGA SmartNIC logic

A replicated key-value store normally pays for replication in host software: every write
crosses PCIe and the kernel network stack twice per replica before the client hears back.
This design moves the whole protocol into the NIC. Frames from the 100G MAC are parsed in
hardware. A replication engine reads and writes the key-value store directly in the card's
HBM, forwards writes to the replicas and counts their acknowledgements. It answers the
client without the host CPU seeing any of it. All other traffic still flows between the
network and the host, so the card stays a normal NIC.

Replication is leader-based and per key. A client sends a write to the node that leads that
key. The leader:

1. starts its own memory write,
2. sends the value to every replica,
3. acknowledges the client once every replica has acknowledged.

Any node can serve a read.

The RTL targets an OpenNIC-style shell on an AMD Alveo U55C. It sits in the 322 MHz user
box between the MAC (CMAC) and the host DMA (QDMA), with one HBM port reached through an
AXI Datamover. Those vendor blocks are not part of the RTL: their streams and command
channels are ports of the top module, `repl_nic_top`.

## Data path

```
 MAC RX ──► packet_parser ──► rx_filter ──┬──► replication_engine ◄──► memory_controller ◄──► Datamover/HBM
                                          │           │                  (key_hash)
                                          └──► host DMA C2H (all other frames)
                                                      ▼
 MAC TX ◄── axis_arbiter ◄── packet_deparser ◄────────┘
               ▲
               └── host DMA H2C (the host's own frames)
```

| module | role |
|---|---|
| `repl_pkg` | Stream width, header offsets, opcodes, and the metadata structs shared by all blocks. |
| `packet_parser` | Recognises replication frames and takes out the metadata. Strips the 52-byte header and realigns the value to byte 0 of the stream. Other frames pass through unchanged, tagged for the host. |
| `rx_filter` | Steers each frame by the parser's tag: to the engine or to the host DMA. |
| `replication_engine` | The protocol: two state machines, request FIFOs, broadcast buffer, outstanding-write table, and an output arbiter. |
| `outstanding_table` | Block-RAM table of writes the leader is replicating. For each one it holds the client's metadata and the number of acks received so far. |
| `memory_controller` | Hashes the key to a bucket. Issues Datamover S2MM (write) and MM2S (read) commands and passes the data through. Reports each completion back to the engine. |
| `key_hash` | Maps the 8-byte key to a 24-bit bucket index. |
| `packet_deparser` | Builds Ethernet/IPv4/UDP/replication headers from metadata and puts them in front of the payload. Pads short frames to 64 bytes. |
| `axis_arbiter` | Round-robin, frame-at-a-time merge of two streams. Used in front of the MAC (engine vs host), and inside the engine (network FSM vs memory FSM). |
| `sync_fifo` | Small first-word-fall-through FIFO used by the engine and the memory controller. |

Everything runs on one clock with a synchronous, active-low reset. All streams are AXI4-Stream
style (valid/ready/data/keep/last), 512 bits wide. Byte 0 of a frame is `tdata[7:0]`, and
multi-byte header fields are in network (big-endian) order.

## Packet format

A replication packet is an ordinary UDP/IPv4 frame. The UDP destination port is
`REPL_UDP_PORT` (default 0x1F40). After the UDP header comes a 10-byte replication header:

| bytes | field |
|---|---|
| 0–13 | Ethernet: destination MAC, source MAC, EtherType 0x0800 |
| 14–33 | IPv4, 20 bytes, no options |
| 34–41 | UDP (checksum 0 on transmit) |
| 42 | opcode |
| 43 | id, echoed unchanged in the response |
| 44–51 | key, 8 bytes |
| 52… | value: the payload of WRITE, WRITE_LEADER and READ_RESULT |

Opcodes: READ = 1, WRITE = 2, WRITE_LEADER = 3, READ_RESULT = 4, WRITE_ACK = 5.

The parser counts a frame as replication only if all of these hold:

- EtherType is IPv4;
- version/IHL is 0x45;
- protocol is UDP;
- the destination port matches;
- the whole 52-byte header fits in the first beat.

Anything else goes to the host untouched.

The metadata passed between blocks (`meta_t`) is: source IP (4 B), source MAC (6 B),
opcode, id and key. That is exactly what is needed to address and fill in a response. The
value travels separately on the stream. Responses to clients are sent from `REPL_UDP_PORT`
to `CLIENT_UDP_PORT` (0x1F41). Because of this, when the receiving node is itself a
replication NIC, a client response does not look like a request: the parser passes it to
the host like any other frame.

Frames with no payload (READ, WRITE_ACK) are padded with zeros to 64 bytes. The MAC adds the FCS.

## The replication engine

This is the part to read first if you want to change the protocol.

**Network state machine.** It takes one request at a time from two FIFOs: metadata (16
entries) and payload (64 beats, i.e. four 1 KiB values). While it is busy, in particular
while it broadcasts, new requests keep arriving in the FIFOs and wait their turn. It handles
each opcode as follows:

- **READ**: sends a read request to the memory controller, then returns to idle.
- **WRITE** (from a leader; this node is a replica): sends a write request and streams the
  value to the memory controller.
- **WRITE_LEADER** (from a client; this node leads the key):
  1. allocates an outstanding-table slot holding the client's metadata;
  2. starts its own memory write with the "no reply" flag, so the leader's write runs in the
     background;
  3. copies the value into a one-value broadcast buffer while passing it to memory;
  4. sends the value as a WRITE to each replica in turn (`replica_mac`/`replica_ip`). The
     **table slot number is used as the id**.
- **WRITE_ACK** (from a replica): looks up the slot named by the id and adds one to its ack
  count. When the count reaches `NUM_REPLICAS`, the slot is freed. A WRITE_ACK carrying the
  client's original id is then sent to the client. It does not wait for the leader's own
  memory write, and the leader never checks that write's status.
- Any other opcode is consumed and dropped. A WRITE_LEADER that arrives when the table is
  full is not dropped: the engine waits for a free slot, and the requests behind it wait too.

**Memory state machine.** It takes completions from the memory controller:

- a finished replica write becomes a WRITE_ACK to the leader, echoing the leader's id;
- a read becomes a READ_RESULT that streams the bucket contents straight from the Datamover
  to the deparser;
- a write that reported an error gets no ack. The leader then never completes that write;
  there is no timeout.

The two machines' packets are merged by an `axis_arbiter` a whole frame at a time, so a
response is never interleaved with a broadcast.

**Ack counting with several replicas.** The table keeps, per slot, the client's metadata and
an ack count. The slot is read in the cycle the ack arrives, and the new count is written back in
the following cycle. Because of this, acks for the *same* slot must be at least two cycles
apart. The engine guarantees this because every ack is a full frame. An assertion checks it.

## Memory controller and the Datamover command

Each 8-byte key is hashed to a 24-bit bucket index. The byte address is index × 1024, so
2^24 buckets of 1 KiB cover the 16 GiB HBM. Buckets are 1 KiB aligned, so no transfer crosses a
4 KiB AXI boundary.

The hash is:

```
fold = key[23:0] ^ key[47:24] ^ {8'h00, key[63:48]}
idx  = low 24 bits of fold * 0x3779B1
```

That is, an XOR fold followed by a multiply with an odd constant, so it is a bijection on
the fold.

Commands use the AXI Datamover layout; with a 64-bit address the command is 112 bits:

| bits | field | value used |
|---|---|---|
| 22:0 | BTT, bytes to transfer | `VALUE_BYTES` |
| 23 | Type | 1, incrementing burst |
| 29:24 | DSA | 0 |
| 30 | EOF | 1 |
| 31 | DRR | 0 |
| 95:32 | start address | bucket × `VALUE_BYTES` |
| 99:96 | tag | rolling 4-bit counter per direction |
| 111:100 | reserved, cache, user | 0 |

Several command bits are therefore constant and never toggle.

Requests wait in a per-direction queue of 16. A write is complete when its S2MM status
arrives; status bit 7 clear means an error. A read is complete when its first data beat
arrives, and the data then streams to the engine. Writes and reads each complete in order.

## Timing

Cycle counts are measured in the two-node end-to-end test, with the HBM model's latency
excluded:

| path | cycles |
|---|---|
| MAC receive of a READ → MM2S command | 4 |
| first read-data beat → first transmitted beat of READ_RESULT | 1 |
| leader receives WRITE_LEADER → client receives WRITE_ACK | 83 (network of zero length, HBM model write latency 30 cycles) |

The original prototype measured 152 ns / 120 ns receive/transmit in its replication path and
1776 ns for a leader write. The test uses those as upper bounds: 49, 38 and 572 cycles at
322 MHz. Throughput is one beat per cycle on every stream, except that the engine handles one
request at a time. A leader write therefore occupies the network machine for
`NUM_REPLICAS` × (value beats) cycles of broadcast.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `NUM_REPLICAS` | 1 | replicas per leader. A two-node system where each node leads some keys and replicates the other's. |
| `VALUE_BYTES` | 1024 | bucket and value size. It is also the Datamover transfer size and the broadcast buffer size. |
| `TABLE_DEPTH` | 256 | outstanding leader writes. 256 matches the one-byte id. |
| `META_FIFO_DEPTH` / `PAYLOAD_FIFO_DEPTH` | 16 / 64 | request buffering while the engine is busy |
| `ADDR_W` | 64 | Datamover address width |
| `REPL_UDP_PORT` / `CLIENT_UDP_PORT` | 0x1F40 / 0x1F41 | engine port and client response port |

`local_mac`, `local_ip`, `replica_mac[]` and `replica_ip[]` are inputs, to be set by software.

## Where this departs from the reference design, and what was chosen here

- The reference parser and deparser were generated from P4 by a vendor tool. Here they are
  hand-written RTL with the same function, and header recognition is fixed in logic.
- The reference does not say how a node knows it leads a key. Here the client says so:
  a write sent with opcode WRITE_LEADER makes the receiving node the leader, and every other
  node in `replica_*` is a replica.
- Opcode values, UDP ports, the hash function, and IPv4 details are this implementation's
  choices. The IPv4 details are: TTL 64, DF set, identification 0, checksum computed, UDP
  checksum 0.
- So are the FIFO and table depths, and the use of the table slot as the id of replicated
  writes.
- A value longer than `VALUE_BYTES` is cut to that size in the broadcast. Every Datamover
  command asks for exactly `VALUE_BYTES`. A shorter value therefore ends the S2MM stream
  (tlast) before the byte count is reached, and a read always returns the whole bucket.
  Clients should send full 1 KiB values.
- No timeouts or retransmission. A lost ack leaves its table slot in use.
- One HBM port. More ports would go inside the memory controller without touching the engine.
- Single clock domain. The crossing to the DMA clock belongs to the shell.

## Simulation

Everything is plain SystemVerilog for Verilator 5 (`--binary --timing`). The testbenches
use the shared packages `rtl/repl_pkg.sv` and `tb/tb_frames_pkg.sv`, and find other modules
by file name:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/repl_pkg.sv tb/tb_frames_pkg.sv tb/tb_repl_nic_top.sv --top-module tb_repl_nic_top -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_repl_nic_top` | Two NICs back to back at default parameters, each with a Datamover/HBM model (`tb/dm_hbm_model.sv`). Checks that writes to the leader are replicated into both memories, and that reads at the leader and at the replica return the value. Sends a burst of writes while ordinary host traffic crosses the link. Checks each received frame byte for byte, checks the cycle counts above, and counts each mechanism. The mechanisms are: a request waiting during a broadcast, ack completion, memory read, replica ack, filtering to the host, and transmit-arbiter contention. The test fails if any count is zero. |
| `tb_repl_three_nodes` | Three NICs with `NUM_REPLICAS = 2` behind a switch model that forwards by destination MAC. Each node leads one key. Checks that a write is acknowledged only after both replicas have acked, that all three memories hold every value, and that reads at every node return it. Counts acks that leave a write still waiting. |
| `tb_repl_value_sizes` | Two node pairs built at `VALUE_BYTES` = 2048 and 4096 (`tb/repl_pair_check.sv`). Checks leader writes, replication into both memories, and reads at both nodes. Every Datamover command must ask for one whole bucket at a bucket-aligned address. |
| `tb_replication_engine` | Engine with two replicas and a memory-controller model: ack counting across replicas, requests buffered during a broadcast, memory-request latency |
| `tb_packet_parser`, `tb_packet_deparser` | Round trip against a reference frame builder: realignment for every value length, IPv4 checksum, padding, back-to-back frames at line rate |
| `tb_memory_controller` | Datamover command fields, addresses against an independent hash, data integrity through the HBM model with back-pressure |
| `tb_outstanding_table`, `tb_key_hash`, `tb_axis_arbiter`, `tb_rx_filter` | The smaller blocks individually |

`tb/dm_hbm_model.sv` is a behavioural model, not a hardware description. It takes Datamover
commands, keeps a sparse byte memory, returns data and status after configurable latencies,
and can stall randomly.

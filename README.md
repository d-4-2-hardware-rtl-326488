# Zero-chunk compression in a network-on-chip interface

In a cache-coherent chip, much of the traffic between the last-level cache
and the memory controller is made of 64-byte memory blocks. In many
workloads those blocks are mostly zeros. This design is a network interface
(NI) that uses that fact. When it sends a block over the network, it drops
every 25-bit piece of the block that is entirely zero. The receiving NI puts
the block back together by filling in the missing pieces with zeros.

There is no dictionary, no table and no arithmetic. Each piece needs one
wide OR gate, and the sender needs two priority encoders and a multiplexer.
A block with no non-zero bits travels as 2 flits instead of 19. A block
with no zero piece travels as 22 flits, 3 more than without compression.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable, and it
passes Verilator lint and the slang front end of Yosys.

## Why 25-bit chunks

Flits are 32 bits. Two of those bits are the flit type (FT), which leaves a
30-bit body. A compressed flit must say which part of the block it carries.
A 5-bit chunk number fits in the body, and 25 bits of data fill the rest.
512 = 12 + 20 × 25, so a block splits into:

* a 12-bit remainder (block bits 511:500). It rides, uncompressed, in the
  second header flit, whose other bits are taken by header fields.
* twenty 25-bit chunks. Chunk 0 is bits 499:475 and chunk 19 is bits 24:0.

In the NI, a message is stored as 22 *flit positions*:

| position | width | contents                                      | sent when        |
|----------|-------|-----------------------------------------------|------------------|
| 0        | 30    | DST, SRC, ADDR[31:16]                         | always           |
| 1        | 30    | ADDR[15:0], CM, block[511:500]                | always           |
| 2 … 21   | 25    | chunk 0 … 19                                  | chunk ≠ 0        |

Together the positions take 560 bits. That is 7 + 7 + 32 + 2 + 512 bits:
destination, source, address, command and block. The packed struct
`long_msg_t` and the slot layout `slot_t` in `noc_pkg` are bit-for-bit the
same. So building the header of a long message is only a matter of placing
the fields in order.

## Packet formats

All flits carry their type in bits 31:30: `00` non-valid (idle), `01` tail,
`10` payload, `11` header.

Long message, compressed (2 to 22 flits):

| flit  | 31:30 | 29:23 | 22:16 | 15:14 | 13:12 | 11:0           |
|-------|-------|-------|-------|-------|-------|----------------|
| 0     | 11    | DST   | SRC   | ADDR[31:16] (15:0)            ||
| 1     | 10/01 | ADDR[15:0] (29:14)    || CM    | block[511:500] |
| chunk | 10/01 | chunk id (29:25), chunk data (24:0)           ||||

The last flit of the message has type `01`. When every chunk is zero, that
is flit 1.

Short message (2 flits, never compressed): flit 0 is the same as above;
flit 1 is `01`, ADDR[15:0] in 29:14, a 5-bit command in 13:9 and zero
padding in 8:0.

Long message, uncompressed (always 19 flits). This is the baseline format,
used only by the comparison path below:

| flit   | 31:30 | 29:0                                                |
|--------|-------|-----------------------------------------------------|
| 0      | 11    | as above                                            |
| 1      | 10    | ADDR[15:0] (29:14), 5-bit command (13:9), block[511:503] (8:0) |
| 2 … 17 | 10    | block[502:473] … block[52:23], 30 bits each         |
| 18     | 01    | block[22:0] (29:7), zero padding (6:0)              |

The published drawing of this format shows flit 2 as bits 503–474 and
6 padding bits in flit 18. Its labels overlap flit 1 by one bit. The
layout here shifts them by one, which gives 7 padding bits.

## The uncompressed comparison path

`baseline_long_injector` and `baseline_long_ejector` carry long messages
in the 19-flit format with no compression. They exist to measure what
compression gains. They use the same slot FIFO, Stop&Go receiver and node
handshakes as the compressing pair. The sender has no OR stage. A
position counter walks the head slot one flit per cycle and pops it after
flit 18. The receiver writes flits in arrival order, restarting at
position 0 on each header. Neither is part of `compression_ni`.

## How the sender chooses flits (`long_injector`)

```
 node ──► slot FIFO ──► OR stage ──► Nz[21:0] ──► FT/ID selection ──► MUX ──► link
 (whole message)        (20 ORs)     register      (2 prio. encoders)   (22:1)
                                        ▲                 │ select
                                        └──── clear ──────┘
```

1. The node writes a whole message in one cycle into a free slot of the
   injection FIFO (`msg_fifo`). `req_ready_o` is high when a slot is free.
2. When a message becomes the head of the FIFO, `or_stage` loads the
   22-bit **Nz** register. If the FIFO was empty, this happens in the same
   clock edge as the FIFO write. Otherwise it happens as soon as the
   message ahead is finished. Bits 0 and 1 are
   forced to one. Bit k+2 is the OR of the 25 bits of chunk k, so it is one
   exactly when that chunk has to be sent.
3. `ftid_select` chooses the next flit position to send. One priority
   encoder returns the lowest set Nz bit. A second encoder, fed with the Nz
   bits in reverse order, returns the highest set bit. When both give the
   same position, that flit is the tail. The flit type is then
   `FT[1] = header | ~tail` and `FT[0] = header | tail`, where `header`
   is Nz[0].
4. The multiplexer puts the selected position on the link. For a chunk it
   places the chunk number in bits 29:25. In the same clock edge, the
   selected Nz bit is cleared. Sending the tail pops the FIFO.

Timing, with the link free:

```
cycle      0          1        2      ...   n
node       write
FIFO, Nz   (loaded at the end of cycle 0)
link                  header   flit1  ...   tail
```

The header leaves in the cycle after the write, and the message then takes
one flit per cycle. A message that had to wait behind another in the FIFO
costs one idle cycle, in which its Nz value is loaded from the FIFO
head. There are no pipeline
registers between the Nz register and the link. The encoder-and-multiplexer
path is therefore the critical path. To run at the clock of an
uncompressed NI, that path would have to be split into two stages. This
RTL does not do that.

## How the receiver rebuilds blocks (`long_ejector`)

The ejection buffer is an array of message slots. Incoming flits are
written straight into the slot currently being filled:

* A header flit (`11`) clears the whole slot to zero and stores its body
  as position 0. Clearing the slot is what turns a chunk that was never
  sent into zeros.
* The flit right after the header is stored as position 1. It is
  recognised by its place in the message, not by its bits: its bits 29:25
  are address bits.
* Every later flit is a chunk. Its bits 29:25 select which chunk its bits
  24:0 are written to.
* A tail flit (`01`) completes the slot. From the next cycle, the message
  is offered to the node on `msg_o` with `msg_valid_o`, and the next free
  slot is used for the following message.

This assumes that flits of different messages never interleave on one
link. That holds for a single physical network without virtual channels.
Request and reply traffic are meant to use separate networks (see below).

## Flow control (`stopgo_rx`)

Every link uses Stop&Go. The receiver drives a registered `stop` back to
the sender. `stop` goes high in the cycle after the receiver's free space
(flits, or message slots for the long ejector) falls to zero. While `stop`
is high, the sender holds its flit. The link is assumed to have zero
latency, so this loses no flit. An assertion in `stopgo_rx` checks that no
flit arrives while `stop` is high. For the long ejector, `stop` can only
rise after a tail flit. A message that has started is therefore never cut.

## The complete interface (`compression_ni`)

Coherence traffic has short command messages and long block messages, and
the two need separate paths to avoid protocol deadlock. The NI therefore
has two independent halves, each on its own network:

| half  | sender                                    | receiver                       | default slots |
|-------|-------------------------------------------|--------------------------------|---------------|
| long  | `long_injector` (compression)             | `long_ejector` (decompression) | 1 × 560 bits  |
| short | `short_injector` = `header_builder` + FIFO | `short_ejector` = FIFO         | 2 × 32 bits   |

`LONG_SLOTS` and `SHORT_SLOTS` set the buffer depths; 1 to 8 are sensible
values. On the node side, simple valid/ready ports stand in for the bus
protocol (AMBA, AXI, OCP…), which is outside the NI. `node_id_i` is the
NI's own address, and the NI inserts it as the source. The short ejector
hands flits to the node one at a time; reassembling short messages is
left to the node-side protocol logic.

## Files

| file                  | contents                                                    |
|-----------------------|-------------------------------------------------------------|
| `rtl/noc_pkg.sv`      | widths, flit type enum, flit / message / slot structs       |
| `rtl/compression_ni.sv` | top level                                                |
| `rtl/long_injector.sv`| compressing sender                                          |
| `rtl/or_stage.sv`     | zero detection and Nz register                              |
| `rtl/ftid_select.sv`  | next-flit and flit-type selection                           |
| `rtl/prio_enc.sv`     | priority encoder (lowest set bit)                           |
| `rtl/long_ejector.sv` | decompressing receiver                                      |
| `rtl/header_builder.sv` | short message → two flits                                 |
| `rtl/short_injector.sv`, `rtl/short_ejector.sv` | short-message halves              |
| `rtl/msg_fifo.sv`     | slot FIFO, type-parameterised                               |
| `rtl/baseline_long_injector.sv`, `rtl/baseline_long_ejector.sv` | uncompressed long path, for comparison |
| `rtl/stopgo_rx.sv`    | Stop&Go receiver                                            |
| `tb/tb_*.sv`          | one self-checking testbench per module                      |
| `tb/tb_ref_pkg.sv`    | reference flit formats and block generator for the testbenches |
| `tb/ni_pair_check.sv`, `tb/tb_slot_configs.sv` | two NIs back to back, at 1/2/4/8 slots |
| `tb/tb_baseline_compare.sv` | same blocks over an uncompressed and a compressed link |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/noc_pkg.sv tb/tb_ref_pkg.sv tb/tb_compression_ni.sv \
  --top-module tb_compression_ni -o sim
./obj_dir/sim
```

For another testbench, replace `tb_compression_ni` with its name.
Uninitialised memory contents are never read, so any
`+verilator+rand+reset` value works.

`tb_compression_ni` connects two NIs back to back, at their default sizes,
like an L2 bank and a memory controller. Each sends 300 long and 300 short
messages to the other, and each reads its incoming messages slowly at first
and then quickly. The test checks every message bit for bit. It also
requires each of these to happen at least once: a dropped zero chunk, an
all-zero block sent as two flits, a block sent whole, stop on a long link
and stop on a short link. The blocks are synthetic: 10 % all zero, 10 % all
ones, 20 % of random zero density, and 60 % with 85 % zero chunks. With
that mix the long links carry about 2.4 times fewer flits than the
19-flit uncompressed format would need. The exact figure depends on the
random seed.

`tb_slot_configs` runs the same back-to-back test at 100 messages each
way, with both buffers set to 1, 2, 4 and 8 slots. Its helper is
`tb/ni_pair_check.sv`.

`tb_baseline_compare` sends the same blocks over two links. One is the
uncompressed pair and the other the compressing pair, each with 1 slot at
both ends. The blocks come in six classes of 60, with 0, 25, 50, 75, 90
and 100 % of their chunks zero. Both links must deliver every message
intact. The compressed link must send exactly 2 flits plus one per
non-zero chunk. A typical run prints:

| zero chunks | uncompressed flits | compressed flits | ratio |
|-------------|--------------------|------------------|-------|
| 0 %         | 1140               | 1320             | 0.86  |
| 25 %        | 1140               | 1018             | 1.12  |
| 50 %        | 1140               | 717              | 1.59  |
| 75 %        | 1140               | 427              | 2.67  |
| 90 %        | 1140               | 226              | 5.04  |
| 100 %       | 1140               | 120              | 9.50  |

A block with few zero chunks costs more flits compressed (up to 22)
than uncompressed (19). The break-even point is 17 non-zero chunks out
of 20. Each link needs about one idle cycle per message on top of its
flits, because a 1-slot sender refills only after the tail leaves.

The unit testbenches check:

* the exact flit stream against a reference written from the bit
  positions of the format;
* the one-cycle header latency and one flit per cycle inside a message;
* flits held, not lost, under random stop;
* zero refill after a block of all ones;
* FIFO order, and the free-count and stop timing.

## How far to trust it

Every module has been simulated against models written independently
from the bit-level formats. For each module, a copy with one deliberate
bug was shown to fail its testbench. Nothing here has been run on real
application traffic. The source evaluation used memory traces of
cryptographic kernels (SHA-1/256/512, AES-128/256). In those traces about
93 % of the bits between the L2 cache and memory lay in zero runs, and
the traffic fell by a factor of about 3.5. The synthetic mix above only
stands in for such traffic.

No timing has been measured on this RTL. The original 45 nm synthesis
reports the compressing sender as the slow part. With one slot, its
minimum clock period is 1.44 ns, against 0.63 ns without compression.
That is the reason a two-stage pipeline was recommended.

## Design choices not fixed by the source description

* **Slot width 560 bits.** A slot holds the message fields plus the
  2-bit long-message command field. That is 2 bits more than the 558 of
  destination, source, address and block alone.
* **Long command field is 2 bits (CM, bits 13:12)**, as in the compressed
  format. The uncompressed long format had a 5-bit command. Short messages
  keep 5 bits.
* **Chunk order**: chunk 0 is the most significant chunk after the
  remainder. Chunks are sent in increasing number.
* **Nz load for a queued message** (FIFO depth above 1): the load happens
  in the cycle after the previous tail, which costs one idle cycle. A
  message written into an empty FIFO has its Nz loaded together with the
  write.
* **Stop&Go**: only the name was given. The registered stop, the zero
  threshold and the zero-latency link are choices made here.
* **Flit 1 at the receiver** is found by position, because its bits 29:25
  hold address bits.
* **Reset** is asynchronous and active low. It clears control state only,
  not buffer contents.
* **Idle links** show flit type `00` besides a separate valid bit.
* Short-message padding is zero. Chunk numbers 20 to 31 are ignored at the
  receiver, and an assertion reports them.

## Not included

* The node-side bus adapter (AMBA/AXI/OCP injection and ejection logic).
  It is protocol-specific.
* Routers and the rest of the network.
* A complete baseline NI top level. Only its long-message path is
  built, as the comparison pair above.
* Any mechanism that turns compression on and off at run time. That idea
  was only suggested as future work.
* A two-stage pipelined sender.
* Power and area figures. Nothing here reproduces them.

Lint reports `SYNCASYNCNET` on `rst_n`. It comes from the `disable iff`
clauses of the assertions, which sample the asynchronous reset
synchronously, and is harmless.

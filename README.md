# An X.25 co-processor in SystemVerilog

A host that speaks X.25 spends most of its protocol effort on a small number of
repetitive jobs. These include framing bits on the line, computing check
sequences, moving data between the line and memory, keeping timers and
juggling buffers. This design moves those jobs into a co-processor that sits
next to the host on a shared memory.

The organising idea is that **all data lives in one shared memory, in linked
lists of buffers, and the units only ever hand each other pointers**. Every
unit works on its own and in parallel with the others. Units talk through
*service primitives* in the OSI sense: a set of parameter registers plus a
one-bit *primitive control block* (PCB) that says "a primitive is pending".
The bit-level work of level 2 (flags, zero insertion, frame check sequence,
aborts) is done in hardware at line speed. On the receive side this work turns
a bit stream into a buffer chain. On the transmit side it turns a buffer chain
back into a bit stream. Everything above that level works on whole frames and
pointers, on frame time instead of bit time.

```
             host  <── attention / interrupt ──>  hiu ──┐
  layer 3 <── commands / responses ── buf_link <──┘     │
                                         │  └───────────┤
  high level 2 ──PCB──> ll2_tx ──PCB──> layer 1         │
  (LAPB, outside)       │   ▲                           │
                        │   └─ ll2_tx_mem ──────────────┤
                        │                               ├──> miu ──> memory bus
  high level 2 <──PCB── ll2_rx_mem <── ll2_rx <──PCB── layer 1
                        │                               │
                        └── buf_mgr ────────────────────┤
  high level 2 / layer 3 ── timer_unit                  │
  high level 2 / layer 3 ── external memory port ───────┘
```

The top level is `x25_coproc`. High level 2 (the LAPB procedures, run by a
micro-controller), layer 3, layer 1 (line drivers and bit clock) and the host
are outside the chip. Their signals are the ports of the top.

## Memory, buffers and descriptors

The memory is linear and byte-addressed, with 24-bit addresses (16 Mbyte).
Every pointer is a 3-byte absolute address, and 0 is NULL. A buffer is a
14-byte descriptor that points at a separate data block. Multi-byte fields are
stored with the most significant byte first.

| offset | size | field | meaning |
|---|---|---|---|
| 0 | 3 | next | next descriptor of the chain, NULL at the end |
| 3 | 3 | buffer_pointer | first byte of the data block |
| 6 | 2 | buffer_length | size of the data block (up to 64 Kbyte - 1) |
| 8 | 3 | begin_data | first data byte (may lie inside the block) |
| 11 | 2 | data_length | whole data bytes |
| 13 | 1 | data_remain | extra bits (0..7) in one more byte, in its low bits |

`data_remain` exists because HDLC frames need not be a whole number of bytes.
A chain of *n* whole bytes and *r* extra bits holds its bits least significant
first within each byte. This is also the order in which bits go on the line.
The constants and the CRC step function are in `rtl/x25_pkg.sv`.

## Primitive control blocks (`pcb`)

A PCB is a single flip-flop. The issuing side pulses `do_prim` to set it. The
accepting side sees `atn` go high, reads the parameter registers, and pulses
`ack` to clear it. The issuer sees the same flip-flop as `busy` and may not
issue again until it drops. Two assertions check the rules: no `do_prim` while
the flip-flop is set, and no `ack` while it is clear.

The top has four PCBs:

- high level 2 to `ll2_tx` (frame transmit request);
- `ll2_tx` to layer 1 (PH-DATA-REQUEST);
- layer 1 to `ll2_rx` (PH-DATA-INDICATION);
- `ll2_rx_mem` to high level 2 (frame received).

Four more sit in `ph_mgmt`, one for each line management primitive (see
below).

## Memory interface unit (`miu`)

The MIU is the only master on the memory bus. Each client port offers nine
commands: read, write or exchange, each on a byte, a word or two bytes. A
request has a 24-bit address and, for write and exchange, 16 bits of data.

- A word is two bytes, high order at `addr` and low order at `addr+1`.
- The two-byte operation stores the same 16 bits the other way round: low
  order at `addr`, high order at `addr+1`. This is the order of 16-bit hosts
  that keep the low byte first, so their values can be moved in one request.
- A byte read returns its data in the low byte.
- An exchange reads the old value and then writes the new one. `mem_lock` stays
  high across both transfers, so the pair is atomic. This is what semaphores
  between units need.

The memory bus is byte-wide. It has `mem_en`, `mem_we`, `mem_addr` and
`mem_wdata`, and the memory answers with `mem_rdy` (any number of wait cycles)
and `mem_rdata`.

Arbitration is fixed priority, with port 0 first. At the top the ports are, in
order:

0. receive memory interface;
1. transmit memory interface;
2. buffer manager;
3. host interface;
4. the external port for high level 2 and layer 3;
5. buffer exchange;
6. statistics dump.

Incoming line data cannot wait, so it is served first.

The client handshake is shared by every unit in the design. The client holds
`req_valid` with a stable request until `done` pulses, then reads `rdata` in
that cycle. It may present its next request in the same cycle.

## Buffer manager (`buf_mgr`)

There is one free list per list number (two at the top, because each interface
port may use buffers of its own size). The head pointer and count of each list
are kept on chip. The links are the descriptors' `next` fields in memory.

- **GET** takes the head. It reads the head's next pointer, which becomes the
  new head, and writes NULL into the taken buffer, so what is handed out is a
  one-buffer chain. A GET on an empty list completes at once with `cl_empty`.
- **PUT** writes the old head into the returned buffer's next field and makes
  that buffer the head.

`need_buf` (count below `req_thresh`) and `excess` (count above `rel_thresh`)
say when buffers should be requested from, or released to, the host's buffer
manager. Client 0 at the top is the receive memory interface. Client 1 is
brought out. Client 2 is the buffer exchange.

## Buffer exchange with the host (`buf_link`)

The host runs its own buffer manager, which owns all memory not on the chip.
The two managers trade buffers with three messages from the chip and two
commands from the host. `buf_link` carries them. It sits between the host
interface unit and the layer 3 command and response ports.

Messages from the chip:

- **Buffer request** (`0x81`), sent when a list falls under the request
  threshold. It asks for `req_blocks` blocks of `req_bytes[list]` bytes. Each
  list has at most one request outstanding.
- **Buffer release** (`0x82`), sent when a list rises over the release
  threshold. The unit takes buffers off the list down to that threshold and
  links them into one chain. The message carries the chain head and the
  number of buffers.

Commands from the host:

- **Buffer disposal** (`0x01`, block pointer, byte count) answers a request.
  The byte count says which list asked, so the block goes to the list whose
  `req_bytes` matches. The block may be one buffer or a chain. Every buffer
  of it is put on the list, and that list's request is closed.
- **Release request** (`0x02`) makes every list give back its buffers above
  the request threshold. If nothing is above it, one release message with a
  NULL chain answers.

A command buffer holds a code byte, a 3-byte pointer and a 2-byte count in its
data. Commands may be linked through the descriptors' `next` fields, so a host
can hand over many blocks at once. A command list whose first command is not a
buffer command is passed whole to layer 3 on `cmd_valid`/`cmd_ptr`.

Messages go into one fixed record at `MSG_AREA` (default `0x00F010`): a
descriptor plus 6 data bytes at `MSG_AREA+16`. The record's pointer goes to
the host through the response area, taking turns with layer 3 responses.
Before the record is rewritten, the unit reads the response area until it no
longer points at the record, so the host has read the previous message.

## Timer unit (`timer_unit`)

A prescaler divides the system clock into ticks, with `presc+1` cycles per
tick. A `CLK_W`-bit clock (`now`) counts the ticks.

- **START** carries a timer id and a value in ticks. The unit stores
  `expiry = now + value` (modulo 2^CLK_W) in a free record, tagged with the port
  the command came from. Each port has its own id space.
- **STOP** frees the running record with that port and id.
- On every tick, all running records whose expiry equals the clock move to the
  expired set. Each port then reports its expired records one at a time
  (`exp_valid`, `exp_id`, acknowledged by `exp_ack`), and each record is freed
  when it is reported.

A timer of value *v* expires on the *v*-th tick after it was started. A START
for an id that is already running or expired restarts it. A value of 0 counts
as 1.

The errors are:

- `NO_RECORD`: START with no free record;
- `TOO_LONG`: value of 2^CLK_W or more;
- `NOT_FOUND`: STOP of an unknown id.

The records (`NREC`, default 16) are on chip and are compared in parallel. The
alternative, a sorted list in memory, holds many more timers but is much slower
to keep.

## Host interface unit (`hiu`)

Two 3-byte pointer fields in shared memory connect host and co-processor: the
command area (`CMD_AREA`) and the response area (`RSP_AREA`). NULL means an
area is free.

**Commands.** The host writes a pointer to a command buffer chain into the free
command area and pulses `host_attn`. The unit reads the area. If it holds a
pointer, the unit offers it on `cmd_valid`/`cmd_ptr`. Once the pointer is taken
(`cmd_ready`), the unit writes NULL back, so the host may send the next command.

**Responses.** The unit takes a response pointer (`rsp_valid`/`rsp_ptr`). It
polls the response area every `POLL_GAP` cycles until the host has emptied it,
then writes the pointer there and raises `host_irq`. `host_irq` stays high until
`host_irq_ack`.

Only the co-processor clears the command area, and only the host clears the
response area. Because each side owns one area, no lock is needed. Apart from
the buffer commands and messages above, what commands and responses mean is
left to the software on both sides.

## Low level 2, transmit (`ll2_tx`, `ll2_tx_mem`)

High level 2 hands over one frame per primitive. The frame may come in any of
three ways:

- up to 64 bits in the primitive itself, with a bit count (`hl_inl_bits`,
  `hl_inl_n`). Supervisory and unnumbered frames are at most 8 bytes, and an
  I-frame header is carried the same way;
- a buffer chain (`hl_use_buf`, `hl_buf_ptr`);
- both, with the inline bits first.

On the primitive, `ll2_tx` does the following:

1. It copies the parameters, starts `ll2_tx_mem` on the chain, writes the first
   line bit and the PCEI/SAP for layer 1, and sets the layer 1 PCB.
2. After that, each one-cycle `ph_clk` strobe from layer 1 makes it put the next
   bit on `ph_bit` in the following cycle.
3. The bit sequence is an opening flag `01111110`, the frame bits, the 16-bit
   FCS and a closing flag. Between the flags, a 0 is inserted after every five
   consecutive 1s.
4. `ph_lst` marks the last bit of the closing flag. Layer 1 then clears the PCB.
5. `ll2_tx` acknowledges high level 2 with `tx_status`.

The FCS is the HDLC CRC-16 (x^16+x^12+x^5+1, bit-reversed form 0x8408). The
register is preset to all ones, and the complement is sent low bit first.

The next bit is worked out combinationally from the current phase (opening
flag, inline bits, buffer bits, FCS, closing flag, abort) and the count of
consecutive 1s. It is loaded only on a strobe.

**Underrun.** If a buffer bit is needed and `ll2_tx_mem` has none ready, the
frame is cut off with seven 1s. This is the HDLC abort pattern. `ph_abo` is set
with the last of them (together with `ph_lst`), and the status is
`TX_UNDERRUN`. A reset from high level 2 (`hl_reset`) ends the frame the same
way, with `TX_RESET`. A collision from layer 1 (`ph_col`) stops the frame at
once, with `TX_COLLISION`. X.25 links are point to point, so this should not
happen there.

**`ll2_tx_mem`** walks the chain. For each descriptor it reads `begin_data`,
`data_length`, `data_remain` and `next` (six MIU requests), then the data bytes
one at a time. A two-stage pipeline (a shift register being emptied and one
prefetched byte) hides the byte reads. The descriptor reads at a buffer
boundary are hidden only if two byte times on the line are longer than six
memory requests. With very short buffers and a fast bit clock, the underrun
path is what catches this.

The handshake is `bit_valid`/`bit_data`, consumed by a one-cycle `bit_take`.
`eoc` signals the end of the chain and `stop` abandons it.

## Low level 2, receive (`ll2_rx`, `ll2_rx_mem`)

Layer 1 starts a PH-DATA-INDICATION: it writes the first bit and the PCEI/SAP,
then sets the PCB. It then presents one bit per `ph_clk` strobe and marks the
last with `ph_lst`. `ll2_rx` acknowledges after the last bit. It also
acknowledges after a collision, or with `ph_abo` when the memory side
overruns. The line is a continuous stream, so the frame search carries on from
one primitive to the next, and a frame may span primitives.

The receiver works like this:

- **Window.** Every line bit enters an 8-bit window, with a valid mark per
  position. A 0 that follows exactly five 1s is marked invalid, which is zero
  deletion. A window holding `01111110` is a flag. It empties the window, ends
  the current frame, if any, and opens the next one. Seven 1s are an abort.
- **Delay line.** A valid bit leaving the window inside a frame is a frame bit.
  It updates the CRC and enters a 16-bit delay line. Only bits pushed out of the
  delay line are data (`d_valid`/`d_bit`). The last 16 frame bits, the FCS, are
  therefore never passed on, without knowing in advance where the frame ends.
- **Frame end.** `d_end` carries the status:
  - `RX_SHORT` under 32 frame bits;
  - `RX_FCS_ERR` unless the CRC residue is 0xF0B8;
  - `RX_ABORT`, `RX_COLL` or `RX_OVERRUN` when the frame is cut off;
  - `RX_OK` otherwise.

  The first 32 data bits are copied as `hdr` for high level 2: the address,
  the control field and the start of a packet header.

`ll2_rx_mem` packs data bits into bytes and queues them in a small FIFO
(`FIFO_D` entries). One place is always kept free for the frame-end entry. A
byte that finds no other place is an **overrun**. `m_overrun` tells the
receiver, which ends the frame, and the rest of the frame is dropped.

A writer empties the FIFO into memory:

1. It takes a buffer from the buffer manager (GET on list `RX_LIST`) and reads
   its `buffer_pointer` and `buffer_length`.
2. It links the buffer to the previous one through that buffer's next field.
3. It writes bytes until the buffer is full, then fills in the descriptor
   (`begin_data`, `data_length`, `data_remain`).
4. At the frame end it completes the last descriptor and sets the PCB towards
   high level 2. The indication carries the first descriptor, the status, the
   length in bytes and extra bits, the header and the PCEI/SAP.
5. It waits for the acknowledge before starting the next frame.

If the free list runs dry, the rest of the frame is dropped and the status is
`RX_NOBUF`. Bad frames are passed on with their buffers. High level 2 owns the
buffers from then on and returns them.

## Line activation (`ph_mgmt`)

Before data flows, layer 2's management and layer 1 agree that the line is up.
They use four primitives, each a PCB with its parameter registers:

| primitive | issued by | parameters |
|---|---|---|
| PH-ACTIVATE-REQUEST | layer 2 | type of transfer, mode of operation |
| PH-ACTIVATE-INDICATION | layer 1 | type of transfer, mode of operation |
| PH-DEACTIVATE-REQUEST | layer 2 | none |
| PH-DEACTIVATE-INDICATION | layer 1 | originator |

The type of transfer is 1 bit: synchronous (0) or asynchronous (1). The mode
of operation is 2 bits: duplex (0), half duplex (1) or simplex (2). The
originator is 1 bit: local layer 1 (0) or remote (1). The issuer presents the
parameters with its `do_prim` pulse. They are loaded then and held for the
acceptor.

`active` is the state of the physical connection as layer 2 sees it. It rises,
with the mode and type, when layer 2 accepts an activate indication. It falls
when layer 2 accepts a deactivate indication or layer 1 accepts a deactivate
request. It is a status output only. The data primitives do not wait for it,
since on X.21 the line is always synchronous and duplex.

## Statistics query (`stat_dump`)

The operator sometimes wants to know how the link is doing. Such a query is
rare, so it may cost a little, but it must not stop the line. A statistics
primitive (a PCB, with a destination address as its parameter) asks for a
dump. The unit copies all status words into a snapshot in one cycle, writes
them to memory one word at a time, and then acknowledges. The host collects
and sorts them there.

The document suggests suspending the units during the dump. The snapshot gives
the same consistent picture while the line keeps running.

| word | contents |
|---|---|
| 0 | frames sent |
| 1 | frames aborted on transmit |
| 2 | frames received good |
| 3 | frames received bad |
| 4, 5 | free buffers on list 0, list 1 |
| 6 | free timer records |
| 7 | timer clock |
| 8 | flags: `need_buf` (bits 1..0), `excess` (3..2), line active (4), mode (6..5), type (7) |

Word *i* is at `dst + 2*i`, high byte first.

## Where the design departs from, or goes beyond, the document

The document that describes this co-processor fixes its architecture and
interfaces but leaves most internals open. The following are this design's own
choices:

- MIU arbitration order, bus signals and word byte order; the bus
  configuration is not programmable.
- Descriptor byte order and the 1-byte `data_remain` field.
- Timer records are kept on chip and compared in parallel, not in a sorted
  list in memory. The timer clock is 12 bits.
- Command and response area addresses (`0x00F000`, `0x00F004` by default),
  polling of a full response area, and a level interrupt with acknowledge.
- The codes and layout of the buffer commands and messages and the fixed
  message record. The document proposes the messages and their parameters
  but leaves their form open. Thresholds count buffers, not bytes, and a
  release on excess stops at the release threshold.
- HDLC details taken from the HDLC standard: the CRC-16 FCS, the abort pattern
  of seven 1s, bit order, a 32-bit minimum frame, and a 4-byte header copy (the
  document allows 3 or 4).
- PCEI and PH-SAP are 4 bits wide. The encodings of type of transfer, mode of
  operation and originator.
- `ll2_rx_mem` hands the finished chain straight to high level 2. The document
  routes the first-buffer pointer back through the receiver first; the
  information passed is the same.
- Receive and transmit frame counters as simple statistics, the choice of
  words in the statistics dump, and a snapshot in place of suspending the
  units.

Not built:

- High level 2 (a programmable controller running LAPB) and layer 3.
- Layer 1 itself. Only the layer 2 side of its primitives is built.
- Header request, header disposal and header release. They matter only if
  the chip segments packets, and this design keeps no header lists.
- Conformance-test mode (layers made transparent by start-up parameters) and
  hardware test (scan paths, self-test), which the document leaves for later
  study.

## Sizes

The defaults hold the largest cases X.25 produces:

- **Largest I-frame.** A 4096-byte packet plus headers is at most 4103 bytes.
  Lengths are 16 bits, so up to 65535 bytes fit.
- **Inline frames.** The transmit primitive carries 8 bytes inline, enough for
  every frame except I-frames.
- **Address space.** Pointers are 24 bits (16 Mbyte).
- **Buffer size.** Buffer and data lengths are 16 bits (64 Kbyte - 1).
- **Transmit queue.** A full modulo-128 window of maximum frames takes about
  0.5 Mbyte of buffers in memory.

## Files and simulation

`rtl/` holds one module or package per file:

- `x25_pkg` (types, descriptor offsets, CRC step);
- `pcb`, `miu`, `buf_mgr`, `buf_link`, `timer_unit`, `hiu`;
- `ll2_tx`, `ll2_tx_mem`, `ll2_rx`, `ll2_rx_mem`, `ph_mgmt`, `stat_dump`;
- the top, `x25_coproc`.

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb/` also holds two
helpers:

- `mem_model`, a byte-wide memory with random wait states;
- `hdlc_ref_pkg`, a reference HDLC encoder and decoder written as plain queue
  code, independent of the RTL.

The tests use the reference package in two ways. The transmit test decodes what
`ll2_tx` puts on the line. The receive test feeds `ll2_rx` streams that the
reference encoder built.

`tb_x25_coproc` runs the top at its default parameters. It closes layer 1 into
a loop, so each transmitted frame is received again, and plays host, high
level 2 and layer 3. It counts each mechanism and fails if any never happened:

- a command and a response through the host areas;
- a buffer PUT and GET, and an access through the external memory port;
- line activation through PH-ACTIVATE request and indication;
- a statistics dump whose words match the live counters;
- buffer requests to the host, and a host buffer disposal that fills the
  receive list;
- a timer expiry;
- a frame sent from an inline header plus a buffer chain and received into
  three linked buffers with equal contents (zero insertion and deletion, FCS);
- a corrupted frame reported as an FCS error;
- a transmit underrun seen as an abort on the receive side.

To run a test with Verilator:

```
verilator --binary --timing -y rtl -y tb rtl/x25_pkg.sv tb/hdlc_ref_pkg.sv \
          tb/tb_x25_coproc.sv --top-module tb_x25_coproc -o sim
./obj_dir/sim
```

Testbenches that do not use the reference package need only `rtl/x25_pkg.sv`
and their own file. All testbenches drive inputs and sample outputs on the
falling clock edge. Reset is asserted with an edge at time 1 so that the
asynchronous resets act before the first clock.

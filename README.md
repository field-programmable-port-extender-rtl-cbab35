# FPX: a reprogrammable port processor for IP routing and queuing

A cell switch such as the Washington University Gigabit Switch (WUGS) moves fixed-size
cells between its ports very fast, but knows nothing about IP. The Field Programmable
Port Extender (FPX) is a small FPGA board placed between each line card and its switch
port. It adds IP packet processing at the edge of the fabric, one board per port. Routing
and queuing are then spread over the ports rather than done in one central router, so
the router grows with the number of switch ports.

Each FPX has two FPGAs:

- The **NID** (network interface device) is fixed logic. It connects the line card and the
  switch and can reprogram the other FPGA over the network.
- The **RAD** (reprogrammable application device) holds the application.

This repository holds RTL for a switch with eight FPX ports and two applications loaded
into the RAD together:

- an **IP router**: each arriving cell gets a longest-prefix-match lookup of its IPv4
  destination address, and the result tells the switch which output port to use;
- **combined input/output queuing (CIOQ)**: virtual output queues at each ingress, a
  central cell scheduler, and an output queue at each egress.

The NID logic is included: bypass, loading configuration from control cells, and JTAG
programming of the RAD.

Everything is clocked by one 100 MHz clock `clk` with an active-low asynchronous reset `rst_n`.

## Cell format and streams

Cells are 56 bytes. Between blocks they move as 14 words of 32 bits, one word per clock,
with `valid`/`ready` flow control and `sof` marking word 0 of a cell.

| word | contents |
|------|----------|
| 0 | ATM-style header; VCI in bits 19:4 |
| 1 | switch tag; bits 7:0 = output port, written by the lookup |
| 2..13 | payload; an IPv4 header starts at word 2, so its destination address is word 6 (`IP_DST_WORD`) |

Control cells use VCI 34 (`CONTROL_VCI`). Word 2 carries the opcode in bits 31:24
(`01` DATA, `02` DATA_LAST, `03` CONFIRM) and a partial-reprogramming flag in bit 0.
Words 3..13 carry 11 configuration words.

The 56-byte size, the per-word stream, the cell layout, the control-cell opcodes and the
11-word payload are this design's own choices. The source describes 56-byte packets and
VCI 34 control cells, but not a byte layout.

## Block map

```
fpx_router                        (top; N_PORTS = 8)
  fpx_port  x N_PORTS             (one FPX board)
    nid                           bypass / RAD routing, control-cell capture
      cell_mux2                   merges two egress streams a cell at a time
    ingress_pair                  RAD ingress: two lanes, lookups overlapped on one SRAM
      ingress_lookup  x 2         one lane: IP lookup, writes the tag
        fiple                     Tree Bitmap lookup engine
          tbm_int_lpm             longest match inside one trie node
          tbm_child_addr          address of the next trie node
    voq                           N virtual output queues, 7 x 64-bit words per cell
    sync_fifo                     egress output queue (RAD egress)
    sync_fifo                     RAD program FIFO
    rad_jtag_loader               shifts the program FIFO into the RAD's JTAG pins
  cell_scheduler                  one matching per cell slot
fpx_pkg                           shared constants and cell field helpers
```

The top leaves these parts outside and brings their wires out as ports (one entry per
switch port):

- the switch fabric: `sw_tx_*`, `sw_rx_*`; the output port is in word 1;
- the line cards: `lc_rx_*`, `lc_tx_*`;
- the ZBT SRAMs: `sram_addr`, `sram_rd`, `sram_rdata`;
- the RAD configuration pins: `rad_tck`, `rad_tms`, `rad_tdi`, `rad_done`.

## The Tree Bitmap lookup (`fiple`, `tbm_int_lpm`, `tbm_child_addr`)

This is the hardest part to follow.

### The trie

The routing table is a multibit trie with a **4-bit stride**. Each trie node covers four
address bits and holds two bitmaps.

The **internal bitmap** (15 bits) marks which prefixes of length 0..3 relative to the node
are stored in the node:

- The bits run level by level, left to right: `*`, then `0*`, `1*`, then `00*` ... `11*`,
  then `000*` ... `111*`.
- Position `p = 2^l - 1 + v` for a prefix of `l` bits with value `v`.
- Bit 14 is position 0.

The **extending-paths bitmap** (16 bits) marks which of the 16 values of the four stride
bits lead to a child node. Bit 15 is stride value 0.

For example, the root of the table used in the tests holds prefixes `*`, `01*`, `10*`,
`110*` and `1011*`. Its internal bitmap reads `1 00 0110 00000010`.

### Memory layout

A node takes a slot of four 32-bit words in the ZBT SRAM. An 18-bit word address covers
8 Mbit.

| word | contents |
|------|----------|
| 0 | `{extending bitmap[15:0], child pointer[15:0]}` |
| 1 | `{internal bitmap[14:0], 1'b0, next-hop pointer[15:0]}` |
| 2, 3 | unused |

The children of a node sit in consecutive slots starting at `child pointer`. Child `k` is
at `{child pointer + k, 2'b00}`.

A node's next-hop entries sit in consecutive words starting at `{next-hop pointer, 2'b00}`,
one entry per stored prefix, in internal-bitmap order. Bits 7:0 of the entry are the output port.

### One step per level

At each level the engine:

1. **Finds the longest match in the node.** `tbm_int_lpm` checks the first three stride
   bits against the internal bitmap at lengths 3, 2, 1 and 0, and takes the longest one that
   is set. The entry's index is the number of ones to its left. If there is a match, the
   engine remembers the node's next-hop pointer and that index as the best match so far.
2. **Finds the child.** `tbm_child_addr` counts the ones in the extending bitmap to the left
   of the stride position. It adds that count to the child pointer and shifts left by two,
   giving the 18-bit word address.

The walk stops when the stride bit has no child, or after 8 levels. The engine then reads
the next-hop entry of the best match.

Prefixes of length 0..31 can be stored. A /32 would need a ninth level and is not supported.

### Timing

The SRAM has a 2-clock read latency. The address and the read data each pass through a
register at the FPGA pads. A read therefore returns 4 clocks after the address is chosen,
and the engine runs one node per 4 clocks.

A lookup that visits `n` nodes produces `rsp_valid` `4n + 6` clocks after the request is
accepted. The worst case is 8 nodes: 38 clocks, or 380 ns at 100 MHz. `tb_fiple` checks
this cycle count for every lookup.

One engine runs one lookup at a time (`req_ready` is low while busy). It reads the SRAM
only in the first two clocks of each 4-clock node period: word 0, word 1, and finally the
next-hop entry in place of a word 1. The entry's address is formed from the last node's
word 1 in the clock that word arrives.

### Two overlapped lookups

This leaves half of the SRAM's cycles free, so two engines can share one SRAM. With
`SHARE = 2`, engine `SLOT` starts a lookup only when a free-running 4-clock counter equals
`2*SLOT`. From then on its reads stay in its own two clocks of every four, and the two
engines never collide. Their SRAM address and read strobe are simply ORed, and both
engines see the read data.

### Departures from the source

- Caching the first two trie levels on chip is suggested in the source as a speed-up and
  is not built.
- The child-address step (mask, count, 16-bit add) is combinational within one clock. The
  source says this may not close at 10 ns in the FPGA of the time and would then need more
  pipelining, which would add clocks per level.

### The ingress function

`ingress_lookup` wraps one engine as a lane of the RAD's ingress function:

- It buffers one cell.
- It starts the lookup when word 6 arrives.
- It writes the output port into word 1 and sends the cell on.
- A cell whose address matches no prefix (possible only if the table has no `*` entry) is
  dropped and counted in `lookup_misses`.

A worst-case cell occupies a lane for 61 clocks.

`ingress_pair` runs two lanes with overlapped lookups on one SRAM:

- Cells are dealt to the lanes in turn and leave in the same turn, so their order is kept.
- A lane that drops a cell gives up its next turn at the output.

Together the two lanes take a worst-case cell every 31.7 clocks:

- At 622 Mbit/s (OC12, one cell per 68 clocks) this keeps up.
- At 2.4 Gbit/s (OC48, 18 clocks) it does not, for back-to-back minimum cells whose lookups
  all walk 8 levels. Each lane holds its cell through the lookup, which caps the rate at
  1.8 cell times per cell.

`tb_ingress_line_rate` measures both rates.

## Queuing (`voq`, `cell_scheduler`, output queue)

### Virtual output queues

An input-buffered switch with one FIFO per input loses throughput to head-of-line
blocking: a cell for a busy output holds back the cells behind it. Each ingress therefore
keeps **N virtual output queues**, one per output port (`voq`).

- All queues share a buffer of `VOQ_SLOTS` cells (512 by default).
- Each cell is stored as **7 words of 64 bits**, so storing a cell takes 7 writes and sending
  it takes 7 reads. This matches the arithmetic for a 64-bit SDRAM bank; here the buffer is
  an on-chip array.
- Queues are linked lists, with head, tail and count per queue.
- Free slots come from a counter of never-used slots plus a FIFO of released slots.
- A cell takes a slot at its word 1 (once its tag is known). It joins its queue only after
  its last word, so the scheduler never sees a half-written cell.
- A cell is dropped and counted in `voq_drops` if no slot is free or its tag is not a valid
  port.

### The scheduler

Time is cut into **cell slots** of `SLOT_CYCLES` = 16 clocks. `cell_scheduler` sees an
`N x N` request matrix. Input `i` asks for output `j` when all of these hold:

- queue `j` of input `i` is not empty;
- the VOQ of input `i` is free to start a cell;
- the RAD of input `i` is active;
- output `j`'s output queue has room for two more cells.

At the start of each slot it makes a **greedy maximal matching**, with at most one cell
per input and one per output:

- Inputs are visited in order, starting from a round-robin pointer.
- Each input takes the first free output it requests, searching from the same pointer.
- The pointer moves on by one every slot, so no input or output stays favoured.

The grant then tells each VOQ which queue to send.

The source names optimal and heuristic matchers (maximum weighted matching, MUCS, LPF)
without building one. This simple matcher is this design's choice.

### The output queue

At each egress, cells from the fabric pass through an output queue (`sync_fifo`,
`OQ_DEPTH` = 256 words) before the line card. Together with the VOQs this makes the
combined input/output queue.

When the line card stalls, the queue fills. The scheduler then stops sending to that
output, so cells wait in their VOQs rather than in the fabric. Cells for other outputs keep
moving.

## The NID and reprogramming (`nid`, `rad_jtag_loader`)

### Boot and bypass

After reset the NID is in **bypass**: cells go straight between line card and switch, in
both directions.

### Loading a configuration

The NID watches cells from the switch for VCI 34:

- **DATA** cells: the 11 configuration words go into the RAD program FIFO.
- **DATA_LAST** cell: also goes into the FIFO and ends the bitstream. On the very first
  programming this starts the load at once. After that, a load starts only on a
  **CONFIRM** cell, so a new bitstream can arrive while the old one keeps running.
- Control cells are consumed and never forwarded.

### Full and partial reprogramming

- **Full** reprogramming: the NID returns to bypass while the RAD is loaded. It moves cells
  through the RAD again once the RAD raises DONE.
- **Partial** reprogramming (flag bit 0 of the control word): the RAD stays in the data path
  throughout, so the parts of the design that are not rewritten keep handling cells.

### The JTAG loader

`rad_jtag_loader` drives the RAD's JTAG pins with TCK at half the clock rate:

1. Five TMS=1 clocks reset the TAP, then one TMS=0 clock to idle.
2. TMS 1, 0, 0 moves to Shift-DR.
3. Each FIFO word is shifted MSB first. TMS=1 on the last bit moves to Exit1-DR.
4. TMS 1, 0 goes through Update-DR and back to idle.

A load of `W` words takes `2*(11 + 32W) + W` clocks.

Not covered: the device-specific instruction that selects the FPGA's configuration
register, and the framing of a real bitstream. `rad_done` is the FPGA's DONE pin.

## Parameters

| parameter | default | from |
|-----------|---------|------|
| `N_PORTS` | 8 | eight-port WUGS-20 (8 x 2.4 Gbit/s = 20 Gbit/s) |
| `SRAM_AW`, data width | 18, 32 | 8 Mbit ZBT SRAM, 32-bit words |
| `CELL_BYTES` | 56 | smallest packet handled by the switch |
| `VOQ_SLOTS` | 512 | this design's choice |
| `OQ_DEPTH` | 256 words | this design's choice |
| `CFG_DEPTH` | 1024 words | this design's choice; a whole FPGA bitstream needs a deeper FIFO, as the board's is an external chip |
| `SLOT_CYCLES` | 16 | this design's choice (14 words + 2) |

## Other departures and limits

- The egress function of the router is only named in the source ("reassembles packet
  segments"), with no segment format. The egress here is the output queue, with no
  reassembly.
- Each cell is routed on its own; there is no per-connection state for packets spread over
  several cells.
- The VOQ's pointers and cell buffer are on-chip arrays. The board's second ZBT SRAM and its
  two SDRAM banks are not used, and SDRAM row and refresh timing is not modelled.
- The scheduler is one central block over all ports. Its request matrix grows as N², so it
  suits the 8-port switch, not the 4096-port size mentioned as a future scale.
- Most state-holding blocks reset asynchronously. The memories (trie SRAM, VOQ buffer, FIFOs)
  are not cleared; their contents are only read after being written.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

Behavioural models used by the testbenches:

- `zbt_sram_model.sv`: a ZBT SRAM with 2-clock read latency;
- `rad_tap_model.sv`: a full 16-state JTAG TAP that collects shifted words and raises DONE;
- `tbm_builder.svh`: builds a Tree Bitmap trie from a prefix list into a memory array, and
  gives a reference longest-prefix match for checking.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/fpx_pkg.sv tb/tb_fpx_router.sv --top-module tb_fpx_router
./obj_dir/Vtb_fpx_router
```

Swap the testbench name for any other `tb/tb_*.sv`.

`tb_fpx_router` runs the whole eight-port design at its default parameters, with a
behavioural fabric and SRAM and TAP models on every port. It goes through these phases:

1. bypass traffic;
2. programming every RAD with control cells;
3. routed traffic with random prefix tables, including misses;
4. an overload, with one line card stalled and one VOQ overflowing;
5. partial reprogramming of one port under traffic;
6. full reprogramming of another.

Every cell delivered is checked: right port, right contents, in order per input and
output. The cells lost must equal the VOQ drops plus lookup misses. No output may get two cells
in one slot, and no more than three cells may ever wait in the fabric for one output.

It also counts each mechanism and fails if any of them never happened:

- bypass;
- programming, full reprogramming and partial reprogramming;
- routed delivery and lookup miss;
- output contention;
- several non-empty VOQs at one input;
- a full output queue;
- a VOQ overflow;
- a cell passing a blocked head-of-line cell;
- two lookups running at once in one port.

It finishes in well under a second.

`tb_ingress_line_rate` feeds `ingress_pair` with cells whose lookups all take the full 8
levels. It offers them at 622 Mbit/s (one cell per 68 clocks), where every cell must be
taken on time. It then offers them at 2.4 Gbit/s (one per 18 clocks), where it measures
the rate the two lanes sustain.

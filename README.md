# 4x4 ATM switch with a shared cell buffer and per-VC multiplexing

This is a single-chip 4x4 ATM switch, written as synthesizable SystemVerilog. Each of its four
bidirectional links carries 400 Mb/s in each direction: one byte per clock at 50 MHz.
It is meant as the building block of larger switching fabrics. Its design rests on three ideas:

- **A shared cell RAM.** The RAM is one cell (424 bits) wide, so a whole cell is written or read
  in one access. Input and output buffers only convert between bytes and cells.
- **Per-VC flow control.** At most one cell per virtual circuit (VC) is buffered. When that cell
  is chosen for sending, a permit token goes back to the upstream chip. The upstream chip may
  send that VC's next cell only after the permit arrives. Congestion therefore pushes back per VC,
  and a VC with a dedicated buffer row never loses a cell inside the fabric.
- **Per-VC multiplexing.** Each outgoing link picks its next cell among all of its ready VCs.
  It uses four strict priority classes, and weighted round robin within a class. A searchable
  "scanning memory" makes each choice in a few steps.

Cells of a lightly loaded VC can also be *cut through*. The outgoing link starts sending the cell
while it is still arriving, so the cell never waits for the buffer RAM.

## Cells, links and configuration

- **Cells.** A cell is 53 bytes. Byte 0 is the VC ID, which is 8 bits, giving 256 VCs per link.
  The top two bits of byte 1 give the cell type: 00 normal, 01 node-ID set-up, 10 VC set-up,
  11 signalling. Byte 0 is replaced by the translated VC ID on the way through.
- **Link words.** Each clock, a link direction carries a 10-bit word {sig, data[7:0], fc}.
  - `sig = 1` marks a delimiter. Every cell is one delimiter followed by 53 data bytes, so a
    frame is 54 clocks.
  - `fc` is a separate serial channel that carries permit tokens the other way.
- **Pins.** `link_port` puts the word on five pins at double data rate: the upper half while the
  clock is high, the lower half while it is low. The receive side needs one clock to rebuild the
  word. Both ends of a link share the clock.
- **Tokens.** A token is a start bit followed by the 8-bit VC ID, MSB first, so it takes 9 clocks.
  Six tokens fit in a cell time, and at most four can be created per cell time. Tokens are sent
  back to back from a small queue (`token_tx`) and decoded by `token_rx`.
- **Configuration** (`cfg_ctrl`). Configuration travels in-band. A cell that arrives on a VC that
  is closed in its link's routing table is handled here if it is a set-up cell.
  - **Node-ID cell.** This gives the chip its 16-bit identity.
  - **VC set-up cell.** It is applied only when it names this chip. It opens or closes one VC
    end to end in this chip:
    - the routing-table entry of the incoming link and VC;
    - the scanning-memory entry of the outgoing link and VC, holding class, weight and the
      upstream link and VC.

    A set-up cell sent on an open VC is forwarded like any other cell. This is how a set-up
    reaches chips further down the path.
  - **Set-up byte layout** (chosen here):

    | Bytes | Field |
    | --- | --- |
    | 2..3 | node ID |
    | 4 bit 0 | open |
    | 5 | class |
    | 6 | incoming VC |
    | 7 | outgoing VC |
    | 8 | incoming link |
    | 9 | outgoing link |
    | 10[3:0], 11 | 12-bit weight; a weight of 0 is read as 1 |

## Data path: input buffers, buffer RAM, output buffers

- **`input_buffer`.** One per incoming link. It loads the bytes of the arriving cell into *upper
  latches*.
  - The VC ID (byte 0) is looked up at once in the link's `routing_table`. This is 256 entries of
    {open, outgoing link, new VC}, and the answer comes two clocks later.
  - After byte 52 the cell is copied into the *lower latches*, with the VC ID replaced, and a
    write to the buffer RAM is requested. The upper latches are then free for the next cell.
  - A cell cut short by a delimiter is discarded and counted. The damage from a lost byte stays
    inside one cell.
- **`buffer_ram`.** 576 rows of 424 bits, and one access per memory cycle. A memory cycle is two
  clocks, 40 ns, marked by `mem_en`. An access is a read, a write, or one half of a refresh.
  - **Rows 0..511 are dedicated:** row `128*out + vc` belongs to VC 0..127 of outgoing link
    `out`. These VCs can never lose a cell, because their one cell always has a row.
  - **Rows 512..575 are a 64-cell pool** shared by VCs 128..255 of all links. `shared_free_list`
    keeps one full bit per pool row and hands out the lowest free row with a priority encoder.
    A cell for a shared VC when the pool is empty is dropped and counted.
  - Reading a pool row frees it.
- **`output_buffer`.** One per outgoing link, built the same way in reverse. A cell read from the
  RAM lands in the lower latches. On the last clock of the cell being sent, the lower latches
  move to the upper latches, and the new frame starts with its delimiter. Cells leave back to
  back as long as the next one is loaded by frame clock 53.
- **`out_xbar`.** The crossbar for cut-through. When an outgoing link takes a cell by cut-through,
  it reads bytes from that input buffer's upper latches through the crossbar instead. The input
  keeps loading ahead of the output's byte index.
  - Cut-through is offered only while no more than `CT_LIMIT` (36) bytes have arrived. This
    bound is chosen here: the outgoing frame then never catches up with the arriving bytes.
  - A cell that is cut through is not written to the RAM.

## Choosing the next cell: the scanning memory and weighted round robin

This is the core of the chip, and the part that needs the most explanation.

### The scanning memory

Each outgoing link has a `scan_mem` with one word per VC (256). Each word holds:

- valid (open);
- the upstream link and VC, which is where permits go;
- a one-hot priority class (bit 0 is the highest class);
- a 12-bit weight;
- the state bits *enabled* (the downstream chip has room), *full* (a cell is buffered) and
  *unvisited* (not yet served in the current round);
- for VCs 128..255, the pool row of the buffered cell.

A VC is **ready** when it is valid, enabled and full. The memory is searched like a CAM:

- An OR of the class bits of all ready VCs gives the highest class that has work.
- A **label match** asks: "which ready, unvisited VCs of class *c* have a 1 in their weight at
  bit position *p*?" A priority encoder returns the lowest such VC.

### Weights and labels

Round robin runs in *scan cycles* labelled 1, 2, ..., 4095, 1, ... There is one label counter per
class. A label's rightmost 1 is at position *p*. In the scan cycle with that label, the VCs with
a 1 at position *p* of their weight are visited once each.

- Position 0 is the rightmost 1 of every other label.
- Position 1 is the rightmost 1 of every fourth label, and so on.

The weight is stored bit-reversed: its MSB meets position 0. So a weight of *w* earns *w* visits
per 4096 labels. A VC of weight 2048 is served twice as often as one of weight 1024 when both
always have a cell.

### Skipping empty labels

Most labels can match nothing. Suppose no ready VC of the class has a 1 at position *p*. Then
*p* is **sterile**, and every label whose rightmost 1 is at *p* can be skipped.

- `mux_ctrl` keeps a mask of the sterile positions it has found.
- `cycle_counter` computes, in one step, the next label above the current one whose rightmost 1
  is not sterile. It does this without stepping through the labels in between:
  1. Let *k* be the length of the run of sterile positions starting at bit 0. Clear the low
     *k* bits and add 1 at bit *k*.
  2. If bit *k* is already 1 and the first 0 above it is also sterile, add 2 at bit *k*
     instead. An imaginary bit 12 is always sterile, so 4095 wraps to a small label, never 0.

  An exhaustive testbench checks this against the definition for every label and every mask.
  If every position is sterile, the label holds.

### The selection sequence

`mux_ctrl` starts a selection period at the start of each outgoing frame (and at once on an idle
link). It then steps once per memory cycle:

1. **Find the class.** Two steps find the highest class with a ready VC.
2. **Scan.** Each step is one label match with that class's label counter.
   - A hit selects the lowest matching VC.
   - A miss ends the scan cycle. The unvisited flags of the class are set again, the position
     is marked sterile if it matched nothing all cycle, and the label jumps ahead as described
     above.
3. **Hold** the choice until the central controller's timeout.

Two *special accesses* are examined at every step:

- a permit token that has just made a full VC ready;
- a cell arriving on any input for this link that can still be cut through.

If one has a strictly higher class than the current choice, it replaces it. This is how a
high-priority VC gets the very next cell slot, without waiting for the scan to reach it.

### Finalizing the choice

At the timeout the choice becomes final:

- the VC is marked visited, not full and not enabled;
- a permit token is queued to the VC's upstream link;
- either its row is handed to the central controller for reading, or the chosen input is told
  to cut its cell through.

On an idle link there is no timeout. A stored cell is read at once, and a cut-through candidate
is taken at once.

The sterile mask is cleared at each selection start. It is also cleared whenever a cell or token
may have made a new VC ready, so that an idle link cannot keep skipping a position that has just
become useful.

### Limits

- **One cell per round trip.** A VC holds one cell and needs a round trip (about two cell times)
  before it is ready again. So a single VC can use at most about half a link. Weighted ratios
  appear only when several VCs compete for the link, as intended.
- **No urgent search.** If the scan has found nothing by the timeout, the link sends idle
  delimiters for one cell time. At a 12-bit weight this only happens when nothing is ready.

## Central control of the buffer RAM (`buf_sched`)

All four input buffers and all four output buffers share the one RAM port. Within a cell time of
27 memory cycles, the port must take up to 4 writes and 4 reads, plus refresh. The difficulty is
that reads must happen **as late as possible**, but still in time:

- **Late**, so that the multiplexing controller has the longest possible search.
- **In time**, meaning by frame clock 51, so the cell is in the output buffer before that frame
  ends.

### Deadlines and conflicts

For each busy outgoing link, the controller computes how many memory cycles its timeout can
still wait. A timeout is issued in the current cycle if, for some *k*, more than *k* links can wait
at most *k* cycles. The link with the least slack gets it. The reserved read follows exactly two
memory cycles after the timeout.

When links end their cells at the same time or close together, their timeouts are spread over
consecutive cycles, each moved earlier by up to three cycles. The testbench runs all four links
aligned to check that every read still meets its deadline.

### Priorities of a memory cycle

1. the reserved read of a link timed out two cycles ago;
2. the write-back half of a refresh;
3. an immediate read for an idle link;
4. a cell write (lowest input first). The target is the VC's dedicated row, or a free pool row.
   The cell is dropped if its VC already holds a cell (the upstream chip ignored flow control),
   or if the pool is empty;
5. otherwise a refresh read. The row is given by a rotating counter, and the refresh starts only
   when the next cycle is free of a reserved read.

Even at full load at least 19 of the 27 memory cycles of a cell time are left for immediate reads and refresh, so all 576 rows are refreshed within about 0.1 ms.

## Timing summary

- One 50 MHz clock, with `mem_en` marking every second clock (a 40 ns memory cycle).
- Pin-to-word latency is 1 clock; word-to-pin latency is 1 clock.
- **Store-and-forward cell.** The cell finishes arriving, is written in the next free memory
  cycle, and leaves in the next cell slot its VC wins.
- **Cut-through cell.** It leaves within a few clocks of its header arriving, if its link is idle
  or its class wins the current selection. The top-level test measures less than one cell time
  from first byte in to first byte out.

## Where this design differs from the original chip

- **Single clock.** The chip derives two-phase and memory clocks on chip. Here there is one
  50 MHz clock and a memory-cycle enable. The clock generator is not modelled.
- **Deadline counting.** The scheduler's deadline counting is ordinary logic. The chip used
  shift registers feeding a cascade of tally (ones-counting) circuits to take the same
  as-late-as-possible decisions.
- **No 24-byte partial transfer.** A cell that is chosen only after it has fully arrived is
  written to the RAM and read back. The chip had a partial-transfer path for this case. There is
  also no direct copy from an input's lower latches to an output buffer.
- **No urgent search.** It is not built, as the original also left it out.
- **Own choices.**
  - the `CT_LIMIT` cut-through bound;
  - the set-up cell byte layout;
  - class 0 as the highest class;
  - lowest-index tie breaking;
  - the token queue depth.
- **Unvisited flags.** The chip stores one unvisited bit per class. This design stores one per VC
  and sets it again per class, which behaves the same.
- **Circuit styles.** Dynamic circuits (the label counter's carry chain and the CAM match lines)
  are replaced by static logic with the same function.

## Files

| RTL | Purpose |
| --- | --- |
| `atm_pkg.sv` | sizes, types, row mapping, counter indices (`stat_e`) |
| `atm_switch.sv` | top level: 4 links, pins in and out, node ID and counters |
| `link_port.sv` | 5-pin DDR link interface |
| `input_buffer.sv`, `routing_table.sv` | cell assembly, VC translation, cut-through offer |
| `buffer_ram.sv`, `shared_free_list.sv` | 576-row cell RAM and pool free list |
| `output_buffer.sv`, `out_xbar.sv` | cell output and cut-through crossbar |
| `mux_ctrl.sv`, `scan_mem.sv`, `cycle_counter.sv` | per-link cell selection |
| `buf_sched.sv` | central RAM scheduling |
| `token_tx.sv`, `token_rx.sv` | permit tokens |
| `cfg_ctrl.sv` | node ID and VC set-up |

Each file begins with a description of its interface and timing.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`, and `tb/tb_atm_switch.sv` tests the
whole chip. Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing -Irtl rtl/atm_pkg.sv $(ls rtl/*.sv | grep -v atm_pkg) \
    tb/tb_atm_switch.sv --top-module tb_atm_switch -o sim && obj_dir/sim
verilator --binary --timing -Irtl rtl/atm_pkg.sv rtl/cycle_counter.sv rtl/scan_mem.sv \
    rtl/mux_ctrl.sv tb/tb_mux_ctrl.sv --top-module tb_mux_ctrl -o sim && obj_dir/sim
```

(`atm_pkg.sv` must come first, and only once.)

The chip-level testbench connects four model neighbour chips through the pins. It configures the
chip with set-up cells and then runs six phases:

1. configuration, including a set-up for another node and a truncated cell;
2. cut-through latency, and forwarding of set-up cells sent on an open VC;
3. back-pressure by held permits;
4. exhaustion and recovery of the shared pool;
5. weighted sharing of a saturated link, checked as a 2:1 ratio;
6. low latency of a class-0 VC under that load.

At the end it checks every cell's payload, order and VC translation, and the event counters.

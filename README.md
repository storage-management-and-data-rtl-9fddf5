# Data movement hardware for a linear array of L-cells

A linear array of small processing cells (L-cells) each holds one symbol of a
program being reduced, stored as a variable-length record called an *S-cell*
(or S-image) in a per-cell memory area called the *S-buffer*. Between computation
steps some expressions need more room. The array makes that room by *moving*
S-cells along the array and by *cloning* some of them (replicating a symbol
into neighbouring cells). This RTL is the hardware that does that move. It
needs no processor during the move. It is controlled by one number per
connection between neighbouring cells, the **flow number**: how many S-cells
cross that connection, with the sign giving the direction.

Each L-cell has:

* an S-buffer: a 512-byte circular buffer;
* two shifter controllers: SL on the left port, SR on the right port;
* a buffer controller that shares the S-buffer between the two shifters and the
  cell's CPU;
* address translation, so that the CPU sees the S-image at offset 0 wherever it
  ended up in the circular buffer.

The array default is 16 cells, 8-bit words and links, and a 512-byte S-buffer
per cell.

## How a data movement works

1. **Before** data movement the cell's CPU sets up the cell:
   * it places the S-image in the S-buffer;
   * it provides `img_start` (first byte) and `img_end` (one past the last byte);
     equal values mean an empty cell;
   * it provides the two flow numbers of the cell's connections.
2. A `start` pulse begins data movement in every cell at once.
3. SL and SR run concurrently. Each one's role comes from the sign of its flow
   number alone:

   | port | flow > 0 | flow < 0 |
   |------|----------|----------|
   | SL (left)  | receiver: S-cells arrive from the left | sender: S-cells leave to the left |
   | SR (right) | sender: S-cells leave to the right     | receiver: S-cells arrive from the right |

   Every S-cell started moves the flow register one step toward zero. All flow
   registers are zero at the end.
4. A **receiver** appends incoming words at the buffer's write address. A
   **sender** reads words from its own address counter.
5. When both shifters of a cell are finished, the cell raises `done`. The bounds
   of the S-cell it now holds appear on `final_start`/`final_end`. The address
   translation base is loaded with `final_start`.

### S-image format

Every S-image starts with a two-byte header, low byte first. The header holds
the image's total length in bytes, header included. The shortest image, a null
S-cell, therefore has a count of 2. The shifters read this count from the first
two bytes as they pass, and use it to find where the image ends.

### Pure shifting or cloning: the decision after every S-image sent

This is the heart of the design. It needs no clone count stored in the S-cells.
When a sender has sent a whole S-image, it looks at two things:

* whether the *other* port still has S-cells to receive (SL looks at right flow
  < 0, SR at left flow > 0);
* whether `s_counter > 1`. `s_counter` counts the S-cells in the buffer,
  including ones only partly received.

If either holds, the image just sent was passing through, and this is **pure
shifting**:
* the clone-start register moves on to the next image;
* `s_counter` is decremented.

Otherwise the image just sent is the last S-cell the cell will ever hold, and
this is **cloning**:
* the sender's address goes back to the clone-start register;
* the next S-cell this port has to send is another copy of the same image.

A clonable S-cell is called a MIRV. It therefore travels as a single S-cell
until it reaches its final cell, and then sends copies out of one or both
ports until the flow numbers run out. If both ports are senders, both clone at
the same time (**bidirectional cloning**), each with its own address and
clone-start counters.

A flow-number step toward zero and the matching `s_counter` update of a
receiver happen in the same clock. This is what makes the decision above safe.

**Flow numbers must describe a *lazy* movement.** A cell that sends S-cells
must hold an S-cell when data movement ends. The hardware relies on this. It
cannot tell "send my last S-cell away and be empty" from "send a copy and keep
the original", and it always keeps a copy. Flows must also count a MIRV once
while it travels, and each of its clones separately from the cell where it
clones. The end-to-end testbench (`tb/tb_l_array.sv`, function `gen_layout`)
shows one way to derive legal flows from an initial and a final layout:

* every clonable S-cell spreads over `1 + clones` adjacent cells around its
  position;
* a segment that would overlap its left neighbour pushes everything after it
  to the right;
* the flow of a connection is the number of items that cross it (an S-cell in
  transit, or a clone), positive to the right.

### S-buffer, full and empty

The buffer keeps one `write_address` and records whether the last access was a
read or a write (`last_op`).

* A read at the address equal to `write_address` after a read means **empty**:
  the read is refused.
* A write when the sending shifter's address equals `write_address` after a
  write means **full**: the write is refused.

The shifter retries a refused access. A receiver acknowledges a word only after
it has been stored. A full buffer therefore holds the link, and congestion
propagates backwards along the array (**blockage**). The circular organisation
lets an incoming S-image use the space freed by an outgoing one as it is freed.
No S-image may be as large as the whole buffer: equal start and end addresses
mean "empty".

The S-buffer is a single-ported RAM doing one access per clock. Shifter
requests take priority over the CPU. When both shifters ask in the same clock,
the one not served last goes first, so requests are served first come, first
served. A granted access is answered one clock later.

### Links between cells

Words cross between cells with a four-phase handshake:

1. The sender waits for `ack` low.
2. The sender drives data and raises `ready`.
3. The receiver stores the word and raises `ack`.
4. The sender drops `ready`, then the receiver drops `ack`.

Each connection carries separate `ready/data/ack` wires for the two directions.
In one data movement only the direction given by the flow sign is used. On an
uncontested path between two cells one word crosses every five clocks. A
sender alone, facing a neighbour that acknowledges at once, manages one word
every three clocks.

### Address translation

The CPU address space is 16 bits wide. The S-buffer occupies one 512-byte page,
set by `SBUF_PAGE` (default 1, i.e. 0x0200–0x03FF). For an address in that page
the low 9 bits are added to the base register and the carry is dropped. Other
addresses pass unchanged. For example, suppose a 313-byte image ends just before
offset 101. Its base is (101 − 313) mod 512 = 300, and CPU offset 0 reaches
buffer offset 300. The base can also be written directly, e.g. set to 0 for raw
access when preloading the buffer.

## Files

| file | contents |
|------|----------|
| `rtl/lcell_pkg.sv` | word width, header size, buffer-op and port-side enums |
| `rtl/s_buffer.sv` | circular S-buffer RAM, buffer controller, arbitration, full/empty test, `s_counter` |
| `rtl/shifter.sv` | shifter controller (SL or SR by parameter): receive, send, pure-shift/clone decision, link handshake |
| `rtl/addr_xlate.sv` | mod-sum address translation and its base register |
| `rtl/lcell_io.sv` | one L-cell: SL + SR + S-buffer + translation, start/done sequencing |
| `rtl/l_array.sv` | top: `LSIZE` L-cells in a line, end links and per-cell CPU ports brought out |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports of `l_array`:

* `flow[0..LSIZE]`: `flow[k]` is the flow across the connection to the left of
  cell k, so `flow[0]` and `flow[LSIZE]` are the two array ends.
* `img_start`/`img_end`, `final_start`/`final_end`: per-cell S-image bounds
  before and after data movement.
* `start`/`done`: `done` stays high from the end of data movement until the
  next `start`.
* The end links, `in_l_*`, `out_l_*`, `in_r_*` and `out_r_*`: through these, an
  external agent can feed S-cells in or take them out, acting as a virtual cell
  beyond the end.
* Per-cell CPU ports `cpu_*`.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_s_buffer`: random traffic against a reference model of the full/empty
  rule, memory contents and `s_counter`. It also checks one answer per clock,
  CPU-lowest priority and the one-clock latency.
* `tb_shifter`: SL and SR side by side against a model buffer that randomly
  refuses accesses. It covers receiving with wrap-around, pure shifting, and
  cloning.
* `tb_addr_xlate`: the 313/101/300 example, and random bases and addresses.
* `tb_lcell_io`: one cell with neighbour models. It covers a right pure shift,
  bidirectional cloning (2 copies left, 3 right), a clonable S-cell arriving
  from the right and cloning left, and a left pure shift through a cell.
* `tb_l_array`: 60 random scenarios on the default 16-cell array with all
  parameters at their defaults:
  * S-images of 2–450 bytes, placed so that many wrap around the buffer;
  * clonable S-cells; S-cells fed in at one end and pushed out at the other;
  * a slow consumer at the end in a third of the scenarios;
  * mirrored scenarios, so that pushes also run to the left.

  Every cell's final S-image is read back through the CPU ports and compared.
  The S-cells leaving the array are checked in order, and all flow registers
  must return to zero. `done` must not rise before every cell has finished.
  The shortest gap between two words on a link between cells must be five
  clocks.
  While the S-cells move, the CPUs keep reading their S-buffers. Reads in
  finished cells whose S-image stays put are checked through the translated
  address. It counts pure shifts, clones from SL and from SR, bidirectional
  clones, blockage, empty-buffer waits, shifter contention, CPU accesses held
  off by a shifter, end input/output, buffer wrap and non-zero translation
  bases. A mechanism that
  never happened counts as a failure. The run takes about 600,000 clocks,
  around 2 s of simulation.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/lcell_pkg.sv rtl/*.sv tb/tb_l_array.sv --top-module tb_l_array
./obj_dir/Vtb_l_array
```

Replace `tb_l_array` with any other testbench name. The package must come first.

## Choices made here and departures

* **Empty cell.** An empty cell has an empty buffer (`img_start == img_end`).
  A null S-cell (count 2) is an ordinary 2-byte image, moved like any other.
* **Receiver start address.** A receiver appends at `img_end` and a sender
  starts at `img_start`.
* **No peek operation.** Instead of a separate non-destructive read of the word
  count, the count is captured as the header bytes are read or received.
* **Full test.** The read address used in the full test is the address counter
  of the sending shifter. With no sender it is `img_start`. Two senders are
  only active during bidirectional cloning, when nothing is received.
* **Base register.** The base holds the image start offset and is *added*.
* **Throughput.** Shifting is meant to run at the link's full rate when
  nothing blocks. Here the sender's buffer read of the next word overlaps the
  release phase of the handshake. The rate is therefore set by the handshake,
  whose acknowledge waits for the receiver's buffer write: one word per five
  clocks between two cells on an uncontested path, and one per three clocks
  into a neighbour that acknowledges at once. Contention for the single-ported buffer
  (a cell receiving and sending at once) adds clocks.
* **Reset and clocking.** All control state has an asynchronous active-low
  reset. Everything runs on one rising clock edge.
* **Assumed widths.** The flow-number width (16), `s_counter` width (8), CPU
  address width (16) and S-buffer page (0x0200) are assumed values.
* **CPU port.** It serves only the S-buffer page. Other addresses return zero,
  because the rest of the cell memory is not part of this RTL.

## Not included

* **Outside this RTL:**
  * the cell's CPU, its other communication ports and the rest of its memory;
  * the computation of flow numbers (storage preparation, and the rewriting of
    flows so that a travelling clonable S-cell counts once). These are programs
    run by the cells, and their results are the `flow` inputs.
* **Alternatives that were not chosen:**
  * relocating the S-image to the start of the buffer after data movement (an
    in-place rotation by software). The address translation does that job
    instead.
  * shunt-through (passing words straight from receiver to sender of an empty
    cell);
  * linear (non-circular) buffering;
  * fixed-size S-cells;
  * a dual-ported S-buffer RAM.

# Mesochronous dual-clock FIFO, 128-bit data

This is a FIFO that moves 128-bit words between two clock domains that are
*mesochronous*. Both clocks run at the same frequency, but their phase offset
is unknown and fixed. This is typical when one clock is distributed to both
ends of a long link with no attempt to balance the skew.

The main idea is that **the data words are never synchronized**. Only two
single-bit events cross the clock boundary:

- *push* (transmitter → receiver): "a new word is in the buffer".
- *pop* (receiver → transmitter): "an entry has been read and is free".

The words stay in a buffer that is clocked by the transmitter. The receiver
reads them directly, with no synchronizer. This is safe because of when
the reads and writes happen (see below). The result is that a 128-bit
crossing costs the same synchronization logic as a 1-bit crossing: two
4-slot synchronizers of one bit each.

## Structure

```
            clk_tx domain                          |         clk_rx domain
                                                   |
 tx_valid ─►┌─────────┐ push,wr_addr,tx_data       |
 tx_ready ◄─│ tx_ctrl │──────►[link_pipe xL]──┬──► fifo_mem ──(read data, unsynchronized)──► rx_data
            │ tail    │                       │     ▲  raddr = head ◄─────────────────────┐
            │ count   │                       └─push─► meso_sync tx2rx ─push_sync─► ┌─────────┐ ─► rx_valid
            └─────────┘                            |                                │ rx_ctrl │ ◄─ rx_ready
                ▲ pop_sync                          |                                │ head    │
                └──── meso_sync rx2tx ◄─[link_pipe xL]◄───────── pop ────────────────│ count   │
                                                   |                                └─────────┘
 arst_n ─► reset_sync (clk_tx)          arst_n ─► reset_sync (clk_rx)
```

| Module        | Role |
|---------------|------|
| `meso_fifo`   | Top level. Wires everything below together. |
| `tx_ctrl`     | Accepts words, holds the tail pointer and the transmitter's occupancy count, and raises `push`. |
| `fifo_mem`    | `DEPTH` × `DATA_W` register array. Written on `clk_tx`; read asynchronously at the receiver's head pointer. |
| `meso_sync`   | n-slot mesochronous synchronizer for one bit. One instance carries push forward, one carries pop back. |
| `rx_ctrl`     | Counts the pushes that have arrived, holds the head pointer, offers words and raises `pop`. |
| `link_pipe`   | Optional register stages for links longer than one cycle. |
| `reset_sync`  | Reset synchronizer, one per domain: asynchronous assertion, synchronous release. |
| `meso_pkg`    | Default sizes shared by the modules. |

## Why the unsynchronized read is safe

Take one buffer entry `k` and follow it around the loop:

1. The transmitter writes word `k` on a `clk_tx` edge. In the same cycle it
   raises `push`, and its count goes up by one.
2. `push` crosses through the tx2rx synchronizer. It is read out one to three
   cycles later, and the receiver's count goes up on the following `clk_rx`
   edge. Only from then on does the receiver look at entry `k`. By that point
   the entry has been stable for at least one full clock period, so every bit
   of the 128-bit word has settled, whatever the phase.
3. The receiver reads entry `k` for as long as it likes. When the word is
   taken, it raises `pop` and moves its head pointer to `k+1`.
4. `pop` crosses back through the rx2tx synchronizer, and the transmitter's
   count goes down. Only now can the transmitter write entry `k` again, and
   the receiver has already stopped looking at it.

So every entry is stable for the whole time the receiver reads it. The flow
control *implies* the data synchronization. For static timing this means the
path from `fifo_mem` to `rx_data` is a multicycle path. It is not a
synchronizer path.

The transmitter's count includes words that are still crossing and entries
whose pop has not yet come back. It can be too high for a while, but never
too low, so the buffer cannot overflow. The receiver's count can only lag
behind the true contents, so it never reads an entry that has not yet been
written.

## The n-slot mesochronous synchronizer (`meso_sync`)

The synchronizer carries one bit per cycle. The writer side has `SLOTS`
one-bit registers and a free-running write counter. In every `clk_wr` cycle
it stores its input in slot `wr_ptr` and advances the counter. The reader
side has a free-running read counter and a mux: `q = slot[rd_ptr]`.

After reset, the read counter starts `GAP` slots behind the write counter
(`rd_ptr` resets to `SLOTS-GAP`, `wr_ptr` resets to 0). Both counters advance
once per cycle at the same rate, so this distance never changes. Each slot
is read about `GAP` cycles after it was written. It is rewritten only after
`SLOTS` cycles. The reader therefore never samples a register that is
changing.

Each writer cycle's bit is delivered exactly once. A one-cycle `push` pulse
arrives as a one-cycle `push_sync` pulse, so events can be counted directly.
No toggle encoding or edge detection is needed.

The defaults are 4 slots and a gap of 2. Both domains leave reset through
their own `reset_sync` from one asynchronous reset. Their release can
therefore differ by up to one cycle, and the effective gap lands between 1
and 3. Four slots leave a safe margin on both sides for any phase. In
simulation the delay from the write edge to the reader's sampling edge is 2
cycles at every phase tried.

`q` is combinational (a slot mux) and is registered by the receiving control
logic. For timing, the slot registers feed the mux through paths that have
`GAP` cycles of slack. Constrain them with a max-delay so that the mux
select and the data arrive within that window.

## Reset and startup

A single asynchronous active-low reset, `arst_n`, goes to a `reset_sync` in
each domain. The reset synchronizer uses two flops by default; set
`RST_STAGES = 3` for extra MTBF. After reset, `tx_ready` stays low for
`STARTUP + 1` transmitter cycles (5 by default). This makes sure the
receiver side has also left reset before the first push arrives. This hold
is a choice made in this design.

## Interface and timing

Both sides use a valid/ready handshake. A transfer happens on a rising clock
edge of that side when valid and ready are both high.

| Port | Dir | Width | Domain | Meaning |
|------|-----|-------|--------|---------|
| `arst_n`   | in  | 1      | async  | Reset, active low |
| `clk_tx`   | in  | 1      | —      | Transmitter clock |
| `tx_valid` | in  | 1      | tx     | Word offered |
| `tx_ready` | out | 1      | tx     | Word accepted. Low when full or during startup. Comes from a register. |
| `tx_data`  | in  | DATA_W | tx     | Word |
| `clk_rx`   | in  | 1      | —      | Receiver clock. Same frequency, any phase. |
| `rx_valid` | out | 1      | rx     | Word available. Comes from a register. |
| `rx_ready` | in  | 1      | rx     | Word taken |
| `rx_data`  | out | DATA_W | rx     | Word at the head. Stable while `rx_valid && !rx_ready` (this is asserted in the RTL). |

**Latency.** Into an empty FIFO, a word is offered as `rx_valid` 2 to 4
receiver cycles after the `clk_tx` edge that accepted it, plus `LINK_STAGES`.
The part that depends on phase and reset is 1 to 3 cycles through the
synchronizer. One more cycle comes from the receiver's count register. The
tests measure 3 or 4 cycles, depending on the phase.

**Throughput.** One word per cycle is sustained as long as the buffer covers
the push/pop round trip. In simulation, full rate needed
`DEPTH ≥ 6 + 2·LINK_STAGES`: 6 for a single-cycle link, 8 for one stage
and 12 for three stages. The default depth of 128 is far above this.

## Long links (`LINK_STAGES`)

When the link does not fit in one cycle, `LINK_STAGES` adds registers in both
directions:

- **Forward:** the stages are clocked by `clk_tx`. They carry the whole write
  (`push`, tail address, data word). The buffer therefore sits at the
  receiver end of the link but stays in the transmitter's clock. The write
  and its push enter the synchronizer in the same cycle, exactly as with no
  stages.
- **Backward:** the stages are clocked by `clk_rx` and carry `pop`.

The synchronizers themselves do not change. Only latency and the depth
needed for full rate grow.

## Parameters (`meso_fifo`)

| Parameter     | Default | Notes |
|---------------|---------|-------|
| `DATA_W`      | 128     | Word width |
| `DEPTH`       | 128     | Entries. Any value ≥ 2; pointers wrap at `DEPTH`. |
| `SYNC_SLOTS`  | 4       | Slots per flow-control synchronizer |
| `SYNC_GAP`    | 2       | Reset distance between write and read counters, `1 ≤ GAP < SLOTS` |
| `LINK_STAGES` | 0       | Register stages per direction. 0 = single-cycle link. |
| `RST_STAGES`  | 2       | Flops per reset synchronizer |
| `STARTUP`     | 4       | Transmitter hold after reset |

The 128 × 128 default is the main configuration. The smaller configuration
of 64-bit words and 64 entries is `meso_fifo #(.DATA_W(64), .DEPTH(64))`.

## What is the design's own, and limits

These choices are this design's own, not part of the original scheme:

- The valid/ready handshakes.
- The startup hold.
- Reset polarity.
- The register-array buffer with an asynchronous read port.
- The per-cycle pulse encoding of push and pop.
- Carrying the whole write through the forward link stages.

The buffer's read data is not put through link registers. It is a
multicycle path, as explained above.

The title's "four slots" is read as the four registers of each flow-control
synchronizer. The buffer depth is separate and defaults to 128.

Limits:

- Metastability cannot be shown in a two-state RTL simulation. The tests show
  correct ordering and counting at eight phase offsets, but real safety also
  depends on timing constraints: max-delay on the synchronizer slot paths,
  multicycle on the buffer read path.
- The clocks must really be mesochronous. A frequency difference, even a
  small one, makes the slot counters drift and breaks the synchronizer.
- Published FPGA figures for this kind of FIFO (frequency, slice counts,
  power) are not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_reset_sync` | Asynchronous assertion, and release after exactly 2 and 3 edges |
| `tb_meso_sync` | Random bit stream at 8 phases (0–9 ns of 10 ns). Each bit is delivered once, in order, 1–3 cycles later. |
| `tb_link_pipe` | 3-stage delay, reset state, and the 0-stage wire |
| `tb_fifo_mem` | Random writes with write enable; asynchronous reads against a reference array |
| `tb_tx_ctrl` | Startup hold, ready/full, push, tail and count against a model |
| `tb_rx_ctrl` | Valid, pop, head and count against a model; full and empty both reached |
| `tb_meso_fifo` | Default 128×128 FIFO at 8 phases with varied reset release. Checks latency; 300-word gap-free streaming; exactly `DEPTH` words accepted while the receiver stalls, then drained; 2000 cycles of random traffic against a scoreboard. Counts that full, empty, simultaneous push/pop and gap-free streaming all occur. |
| `tb_meso_fifo_link` | The same test with `LINK_STAGES=3`, 32-bit words, 16 entries |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/meso_pkg.sv tb/tb_meso_fifo.sv \
          --top-module tb_meso_fifo -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`. `-Wno-fatal` keeps its
style warnings (testbench timescale, variable delays) from stopping the
build. Each testbench finishes in well under a second.

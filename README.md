# Clock-gated synchronous FIFO on a dual-port memory (128 x 128 bits)

A synchronous FIFO passes data from a producer to a consumer running on the
same clock, absorbing short-term differences in their rates. This design
holds 128 words of 128 bits in a dual-port memory used as a ring, and it is
built to spend as little dynamic power as possible: a register is clocked
only in the cycles where it has something to do. Three ideas carry it:

* **A circular buffer on a dual-port memory.** One port only writes, the
  other only reads, so a write and a read can both be accepted in every
  cycle. A write pointer and a read pointer chase each other round the ring.
* **Clock gating.** The write side runs on a clock that pulses only for
  accepted writes, the read side on one that pulses only for accepted
  reads, and every status bit sits in a flip-flop whose clock is gated by
  an XOR of its own D and Q.
* **Pipelined (look-ahead) flags.** FULL, EMPTY and the word count are
  worked out one cycle early from the pointers' next values and stored in
  flip-flops, so they leave the FIFO straight from registers and change at
  the same edge as the pointers, with no comparator in the output path.

## Block structure

```
            +-----------------+       +---------------------------+
 wr_en ---->|                 | wdata |  dp_mem                   |  rdata   +----------------+
 buf_in --->| write_interface |------>|  128 x 128 dual-port      |--------->| read_interface |---> buf_out
 buf_full <-|  push, wclk     |       |  write port | read port   |          |  pop, rclk     |<--- rd_en
            +-----------------+       +---------------------------+          +----------------+---> buf_empty
                 | push, wclk              ^ waddr        ^ raddr                 | pop, rclk
                 v                         |              |                       v
            +--------------+   wr_ptr_nxt  +--------------+   rd_ptr_nxt   +--------------+
            | fifo_pointer |-------------->| compare_logic|<---------------| fifo_pointer |
            |  (write)     |               | FULL, EMPTY, |                |  (read)      |
            +--------------+               | fifo_counter |                +--------------+
                                           +--------------+
```

| File | Role |
|------|------|
| `rtl/fifo_pkg.sv` | default sizes (`FIFO_DEPTH = 128`, `FIFO_WIDTH = 128`) and width helpers |
| `rtl/sync_fifo.sv` | top level; wires the blocks below and checks flag consistency with assertions |
| `rtl/write_interface.sv` | `push = wr_en & ~buf_full`; gated write clock `wclk` |
| `rtl/read_interface.sv` | `pop = rd_en & ~buf_empty`; gated read clock `rclk`; output register `buf_out` |
| `rtl/fifo_pointer.sv` | ring pointer `{lap, address}` with a look-ahead output; used for writes and reads |
| `rtl/dp_mem.sv` | memory array: synchronous write port, combinational read port |
| `rtl/compare_logic.sv` | FULL/EMPTY/count from the look-ahead pointers, stored in clock-gating flip-flops |
| `rtl/clock_gate.sv` | AND-gate clock gating cell with a falling-edge enable hold |
| `rtl/cg_dff.sv` | XOR/AND clock gating D flip-flop |
| `rtl/cg_reg.sv` | a vector of `cg_dff`, one gate per bit |

## Top-level interface

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | the only clock; everything acts on its rising edge |
| `rst` | in | 1 | asynchronous, active high: FIFO empty, `buf_out` = 0 |
| `wr_en`, `buf_in` | in | 1, 128 | write request and data |
| `rd_en` | in | 1 | read request |
| `buf_out` | out | 128 | last word read, registered |
| `buf_full`, `buf_empty` | out | 1 | status flags, registered |
| `fifo_counter` | out | 8 | words stored, 0 to 128 |

Parameters: `DEPTH` (default 128, need not be a power of two) and `WIDTH`
(default 128). `fifo_counter` is `clog2(DEPTH+1)` bits wide.

## Cycle behaviour

* A write is accepted at a rising edge if `wr_en` is set and `buf_full` is
  clear. A write while full is dropped: the FIFO cannot overflow.
* A read is accepted at a rising edge if `rd_en` is set and `buf_empty` is
  clear. `buf_out` shows the word from that edge on, and holds it until the
  next accepted read. A read while empty is ignored: no underflow.
* One write and one read may be accepted at the same edge, including a read
  while full (then the write in the same cycle is refused, because the
  flag was still set) and a write while empty (the read is refused).
* The flags and the count describe the FIFO after the last edge. A word
  written at edge *k* clears `buf_empty` at edge *k* and can be read at
  edge *k+1*. With reads and writes every cycle, throughput is one word per
  cycle in each direction.

## How the pointers tell full from empty

Each pointer is a word address plus a *lap* bit that toggles each time the
address wraps from `DEPTH-1` to 0. When the two addresses are equal, the
FIFO is empty if the lap bits are equal, and full if they differ (the
writer is exactly one lap ahead). The count is `w - r` on the same lap and
`DEPTH - r + w` across a lap. Because the wrap is explicit, `DEPTH` may be
any value.

## The flag pipeline

`fifo_pointer` outputs, besides its register, `ptr_nxt`: the value it will
hold after the coming edge (the pointer plus the push or pop of this
cycle). `compare_logic` compares the two `ptr_nxt` values and registers the
result. At the edge where the pointers move, the flags move too, and what
leaves the FIFO comes straight from a flip-flop. A FIFO that compared the
registered pointers would show the flags one comparator delay after each
edge; this one shows them with clock-to-output delay only.

## Clock gating and its timing rule

This is the part that needs care when the FIFO is placed in a system.

**`clock_gate`** ANDs `clk` with an enable. An AND gate alone would glitch
whenever its enable changed while `clk` is high, and in a rising-edge
design enables change just after the rising edge, when `clk` is high. So
the enable is first sampled on the falling edge of `clk` by a flip-flop
(the cell stays latch-free), and the AND gate sees an enable that can only
change while `clk` is low. The gated clock then carries exactly the clock
pulses of the cycles whose enable was set.

* `write_interface` gates with `push`: `wclk` clocks the memory write port
  and the write pointer, and does not toggle at all in cycles without a
  write.
* `read_interface` gates with `pop`: `rclk` clocks the read pointer and the
  128-bit output register.

**`cg_dff`** gates a single flip-flop by its own activity: an XOR of D and
Q enables the AND gate, so the flip-flop is clocked only when its value
would change, and its gated clock has one pulse per change of D. The XOR
result is held over the high phase by a falling-edge flip-flop, for the
same reason as above. `compare_logic` stores each bit of FULL, EMPTY and
the count in one of these.

**The rule:** the request inputs `wr_en` and `rd_en` must be settled by
the falling edge of `clk` that precedes the rising edge at which they are
to act, because they decide the clock-gate enables (and, through the
pointers' look-ahead values, the flag flip-flops' D inputs). `buf_in` only
needs the usual setup time to the rising edge. Driving them from rising-edge flip-flops, as usual, meets
this as long as their paths fit in half a clock period. Inputs driven from
falling-edge logic, or changed between the falling and the rising edge, are
not supported. Static timing analysis must see these half-cycle paths.

## Where this design departs from, or adds to, its description

The FIFO's structure (write and read interface, two pointers, compare
logic, dual-port memory), its 128 x 128 size, AND-gate clock gating, the
XOR/AND gated flip-flop and the registered, predicted flags come from the
design as described. The following are choices of this implementation:

* the falling-edge hold of every clock-gate enable (described gates are a
  plain AND gate, and an XOR feeding an AND gate);
* which registers sit behind which gated clock;
* the lap-bit pointer encoding and the compare rule;
* an asynchronous, active-high reset;
* a combinational memory read port with the output register in the read
  interface, giving a read latency of zero cycles after the accepting edge;
* `fifo_counter` is 8 bits wide so that it can hold 128; a 7-bit counter
  could not tell a full FIFO from an empty one;
* FULL means the write pointer has caught up with the read pointer from
  behind, EMPTY that the read pointer has caught up with the write pointer
  (the usual convention).

Not built: a variant without the flag pipeline (only a point of comparison
for the design), and anything physical (layout, metal fill). Power, area and
frequency figures belong to a particular cell library and are not
reproduced by RTL.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_sync_fifo` runs the whole FIFO at its default 128 x 128 size against
  a queue model for about 9,600 cycles: reads while empty, a fill past
  full, read+write while full, a drain, write-then-read on the next cycle,
  300 cycles of one write and one read per cycle, idle cycles and biased
  random traffic. After every edge it checks `buf_out`, both flags and the
  count. It checks that the gated write and read clocks pulse exactly once
  per accepted write and read and never while idle, and it counts a
  failure for any mechanism (full, empty, refused write, refused read,
  simultaneous access, pointer wrap, idle) that never occurred.
* `tb_ring_sequence` walks an 8-word instance through the classic ring
  sequence (fill to full with one read in between, then drain to empty) and
  checks both pointer positions, the flags and the data after each step.
* `tb_clock_gate`, `tb_cg_dff` check pulse-for-pulse gating, including
  that an enable change in the high phase does not reach the gated clock.
* `tb_fifo_pointer`, `tb_compare_logic` also run at a non-power-of-two
  depth (5 and 6 words).
* `tb_dp_mem`, `tb_write_interface` and `tb_read_interface` check their block
  against a reference model.

To simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fifo_pkg.sv tb/tb_sync_fifo.sv --top-module tb_sync_fifo
./obj_dir/Vtb_sync_fifo
```

Replace `tb_sync_fifo` by any other testbench name to run that one. The
full-size FIFO test runs in well under a second.

To change the size, override `DEPTH` and `WIDTH` on `sync_fifo`, or change
the defaults in `fifo_pkg`. `tb_sync_fifo`, `tb_dp_mem` and the interface
testbenches take their sizes from the package.

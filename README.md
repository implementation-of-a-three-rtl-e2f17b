# Three-slot Signal ACM

An asynchronous communication mechanism (ACM) passes data items from a
*writer* to a *reader* that run at unrelated speeds and never wait for each
other's accesses to finish. This design is a **Signal**: the writer may
overwrite items the reader has not yet seen, and the reader always takes the
newest complete item but never reads the same item twice. If nothing new
has been written since its last read, a read request waits.

|                      | no re-reading | re-reading |
|----------------------|---------------|------------|
| **no overwriting**   | Channel       | Message    |
| **overwriting**      | **Signal**    | Pool       |

The classic fully asynchronous solution (Simpson's Pool) needs four slots.
Here three slots are enough, because the accesses to one shared control
variable are made atomic with a mutual exclusion element (mutex).

## The algorithm

Three slots hold data items. Three control variables name slots:

* `w`: the slot the writer will write next (private to the writer);
* `l`: the last slot the writer completed (shared);
* `r`: the slot the reader is reading, or read last (shared).

```
writer:  write slot w;  l := w;  w := differ(l, r)
reader:  wait until r != l;  r := l;  read slot r
```

`differ(l, r)` returns a slot that is neither `l` nor `r`:

| l | r      | next w |
|---|--------|--------|
| 1 | not 3  | 3      |
| 1 | 3      | 2      |
| 2 | not 1  | 1      |
| 2 | 1      | 3      |
| 3 | not 2  | 2      |
| 3 | 2      | 1      |

For each value of `l` only one question about `r` has to be asked, so the
hardware evaluates `differ` with one single-bit sampler per slot (the SYNC
arbiter below).

Why it is safe: the writer never writes `r`, and the reader only ever moves
`r` to `l`, which is never the slot the writer is about to write. So a slot
is never written while it is read (coherence). The reader always takes `l`,
the newest complete item (freshness), and waits while `r == l` (no
re-reading). The one hazard is that `l` is shared: if the writer's `l := w`
and `w := differ(l, r)` slipped in between the reader's test `r != l` and
its assignment `r := l`, the pair of slots could collide. A mutex
therefore makes "update `l` and choose the next `w`" on the writer's side,
and "test `l != r` and copy `r := l`" on the reader's side, each atomic.

## Reset state

`w = 1`, `l = 2`, `r = 2`. So the first write goes to slot 1, and a read
raised before any write waits for it.

## Structure

```
              write_start/done                      read_start/done
                   |                                      |
            +------v------+          l          +---------v----+
 data_in -->| write_ctrl  |-------------------->|  read_ctrl   |
            |  12 David   |<--------------------|   12 David   |
            |  cells, 3   |          r          |  cells, comp,|
            |  SYNC arb., |                     |  C-element,  |
            |  l latch    |--req-> mutex <-req--|  r latch     |
            +------+------+                     +------+-------+
                   | wr_start[3] / wr_done[3]          | rd_start[3] / rd_done[3]
            +------v-----------------------------------v-------+
            | data_path: 3 slot latch sets -> mux -> output set |--> data_out
            +---------------------------------------------------+
```

| Module          | Role |
|-----------------|------|
| `acm3_signal`   | top: the two controls, the shared mutex and the data path |
| `write_ctrl`    | writer's Petri net built from David cells, `l` latch, three SYNC arbiters |
| `read_ctrl`     | reader's Petri net built from David cells, `l != r` comparator, C-element, `r` latch |
| `data_path`     | three slot latch sets, slot multiplexer, output latch set |
| `david_cell`    | one Petri-net place |
| `sync_arbiter`  | samples one level at a strobe (mutex plus AND gate) |
| `mutex`         | two-way mutual exclusion element |
| `c_element`     | Muller C-element |
| `latch_set`     | W D latches with an enable and a completion signal |
| `acm3_pkg`      | slot type (one-hot), constants, reference `differ()` |

Slots are carried one-hot in three bits (`slot_t`), bit k-1 for slot k.

## How the control works: Petri nets made of David cells

Each control is a Petri net with exactly one token, and every place of the
net is a **David cell**: an SR flip-flop with nodes `x` and `xb` (`x=1,
xb=0` means "marked") and four active-low handshake wires. `inr`/`ina`
talk to the predecessor place, `outr`/`outa` to the successor place:

```
x    = ~(inr & xb)       // a request from the predecessor sets the cell
xb   = ~(x & outa)       // the successor's acknowledge clears it
outr = ~(inr & x)        // pass the token on once the predecessor has let go
ina  = xb
```

A token moves from cell A to cell B by a four-phase exchange: A pulls
`outr` low; B sets and pulls `ina` low; A clears; A's `outr` returns
high; B's request goes out to its own successor. A **transition** of the net
is the wiring between two cells. Its condition (a guard) is ORed into the
active-low request: `inr_B = outr_A | ~guard`. Every guard in this design
stays true until the token has moved. A choice (two successors) takes
either successor's acknowledge. A merge (two predecessors) accepts either
predecessor's request. With a single token this is safe.

### Writer (`write_ctrl`)

Four places per slot k:

| place      | meaning | leaves when |
|------------|---------|-------------|
| `IDLE[k]`  | w = k, waiting | `write_start` high → `WRITE[k]` |
| `WRITE[k]` | slot k open (`wr_start[k]`) | `wr_done[k]` → `UPD[k]` |
| `UPD[k]`   | slot k written; holds the mutex request; `l := k`; SYNC k strobed | SYNC result → `DONE[j]` |
| `DONE[j]`  | next w = j chosen; `write_done` high | `write_start` low → `IDLE[j]` |

In `UPD[k]` the grant opens the `l` latch. The latch's completion, ANDed
with the `UPD[k]` token, is the strobe `ck0` of SYNC arbiter k. Its `rbar`
input is "`r` differs from slot s", where s = 3, 1, 2 for k = 1, 2, 3. The
`rbar_1` output moves the token to `DONE[s]`; `rbar_0` moves it to the
remaining slot. This is the `differ` table. The mutex is held until the
token has left `UPD[k]`, so `r` cannot change while it is sampled.

### Reader (`read_ctrl`)

| place      | meaning | leaves when |
|------------|---------|-------------|
| `IDLE[j]`  | r = j, waiting | `read_start` high → `WAIT[j]` |
| `WAIT[j]`  | read requested | `r` latch done with r = m → `READ[m]` (m ≠ j) |
| `READ[m]`  | slot m steered into the output register | `rd_done[m]` → `DONE[m]` |
| `DONE[m]`  | `read_done` high | `read_start` low → `IDLE[m]` |

A C-element joins "some `WAIT` place is marked" with the comparator
`l != r`. Its output is the mutex request. The grant opens the `r` latch
(`r := l`), and the latch's completion selects the `READ` branch. After the
copy, `l == r` and the `WAIT` place empties. Both C-element inputs are then
low, the request falls, and the mutex is released. While `l == r` the
request never rises, and that is how a read waits for new data.

### SYNC arbiter

A mutex has `rbar` on one side and the strobe `ck0` on the other. `rbar_1 =
grant(rbar) & ck0`, and `rbar_0 = grant(ck0)`. If `rbar` is high when `ck0`
rises, the `rbar` side already holds the mutex and `rbar_1` answers. If it
is low, `ck0` wins and `rbar_0` answers. With `ck0` low both outputs are
low. In this design `rbar` is always stable while `ck0` is high, because the
writer holds the main mutex. The arbiter's own mutex is what would resolve
an input that changes at the strobe.

### Data path

There are three DATA_W-bit slot latch sets, each opened by `wr_start[k]`.
A multiplexer steered by the one-hot `rd_start` feeds an output latch set.
Every latch set returns a `done` one cycle after its enable. `data_out`
keeps the last item read until the next read.

## Interface and timing

Both sides use four-phase handshakes:

* writer: set `data_in` and raise `write_start`; wait for `write_done`;
  lower `write_start`; wait for `write_done` to fall. Hold `data_in` until
  `write_done` rises.
* reader: raise `read_start`; wait for `read_done`; take `data_out`;
  lower `read_start`; wait for `read_done` to fall.

`slot_l` and `slot_r` expose the control variables for observation.

**The clock is a model of gate delay, not a system clock.** The circuit is
self-timed in principle. In this RTL every gate node and storage element
(`x`, `xb`, `outr` of each David cell, the C-element, mutex grants, latches,
completion signals) is a register that takes one cycle of `clk`. The
circuit is speed-independent, so it behaves the same under any gate delays,
and one cycle per gate is one such choice. The result is a synchronous
design with no combinational loops that standard tools simulate and
synthesise. All inputs must be synchronous to `clk`. Measured at the
defaults with a free mutex:

| operation | start → done | start low → done low |
|-----------|--------------|----------------------|
| write     | 14 cycles (15 when SYNC answers `rbar_0`) | 8 cycles |
| read with new data | 14 cycles | 8 cycles |

A write never waits for the reader, except for a few cycles while the
reader holds the mutex. A read waits only when there is nothing new.

## Where this RTL departs from or adds to the original circuit

* **Cycle-based model of an asynchronous circuit.** See above. The mutex
  decides in one cycle and has no metastability. Ties go to the side that
  lost the previous contest. Analogue behaviour (sizing, real delays,
  metastability) is outside this model.
* **Fourth place per branch.** Each branch has a place that waits for the
  request to fall (`DONE → IDLE`), so that both environment handshakes
  return to zero.
* **Node equations of the David cell** are derived from the cell's signal
  transition order. Marked means `x=1, xb=0`.
* **Completion signals** of latches are the enable delayed by one cycle.
* **`read_done` is raised one cycle after the output register has captured
  the item,** so `data_out` is valid with `read_done`.
* **Encodings and reset values.** Slot numbers are one-hot. `l` starts at
  2. Data slots and `data_out` start at 0.
* The 3-slot **Message** (the dual of the Signal) is not implemented.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `acm3_signal`, `data_path` | `DATA_W` | 8 | data item width |
| `david_cell` | `INIT_TOKEN` | 0 | initial marking |
| `latch_set` | `W`, `INIT` | 8, 0 | width, reset value |

## Verification

Each module has a self-checking testbench in `tb/` named `<module>_tb`.
Each prints `TB_RESULT checks=N failures=M`.

* `acm3_signal_tb` runs the whole design at its default parameters for 3000
  writes, with writer and reader idle times drawn from exponential
  distributions. It runs three phases: equal means, a fast writer and a fast
  reader. It checks, from the handshakes alone:
  * no re-reading;
  * no item read before it was written;
  * no slot opened for writing while the reader holds it;
  * freshness, against the last write complete when the read was raised;
  * that a pending read completes once new data exists;
  * a bound on write time.

  It also requires that each of these happened at least once: a reader
  wait, an overwrite, mutex contention, both SYNC outcomes, and every slot
  written and read.
* `acm3_trace_tb` replays the item sequence 39 … 44 (hex). 3B, 3E, 3F and
  44 are overwritten or never read, and two reads have to wait. It also
  checks the 14/8-cycle latencies above.
* `write_ctrl_tb` and `read_ctrl_tb` test each control against a reference
  `differ()` and a modelled mutex, data path and partner variable.
* The leaf-cell testbenches (`david_cell_tb`, `mutex_tb`, `sync_arbiter_tb`,
  `c_element_tb`, `latch_set_tb`, `data_path_tb`) check exact cycle timing
  or compare against a reference model.

Assertions in the RTL check that the mutex never grants both sides, that
each control has at most one active place of each kind, and that no slot
is written while it is read.

To simulate with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/acm3_pkg.sv tb/acm3_signal_tb.sv \
          --top-module acm3_signal_tb
./obj_dir/Vacm3_signal_tb
```

Use the same command with another `tb/<name>_tb.sv` to run any other
testbench. Every module reads `acm3_pkg` or nothing, so `-Irtl` is all it
takes to find the rest.

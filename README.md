# Parameterised synchronous FIFO, in two flavours

A FIFO (first in, first out) buffer lets a producer hand words to a consumer
that runs at a different pace. The producer deposits a word and goes on with
its work; the consumer takes the words, oldest first, when it is ready. A
typical case is a fast CPU feeding a slow I/O device.

This RTL is a generic `DEPTH x WIDTH` FIFO with a single clock, built in two
variants that share everything except one rule:

| module          | write while full                                   |
|-----------------|----------------------------------------------------|
| `ee457_fifo`    | refused, always                                    |
| `ee457_fifo_p2` | accepted if a read is carried out in the same cycle |

`ee457_fifo_lab_top` places one of each side by side, with separate ports and a
shared clock and reset. Both default to 8 bits x 4 locations.

## Structure

```
            +-------------------------------------------+
  din ----->|  register array  (DEPTH x WIDTH)          |-----> dout
            |     ^ waddr      ^ wen        ^ raddr     |
            |   WPTR          |           RPTR          |
            |     ^ cnt_en     |              ^ cnt_en  |
  wen ----->|     +-------- control ----------+         |<----- ren
  full <----|        (item counter, flags)              |-----> empty
            +-------------------------------------------+
                        clk, rst
```

* **Register array** (`fifo_regarray`): `DEPTH` words, written at the write
  pointer on a clock edge, read combinationally at the read pointer.
* **Write pointer, read pointer** (`fifo_ptr`, two instances): counters that
  start at 0, advance by one when their count enable is high and wrap after
  location `DEPTH-1`. The wrap is an explicit compare, so any depth works
  (a 6-deep FIFO uses locations 0 to 5).
* **Control** (`fifo_ctrl`): decides which requests are carried out, counts
  the items held, and drives the flags.

## Telling full from empty

Both a full and an empty FIFO have the write pointer equal to the read
pointer: after `DEPTH` writes into an empty FIFO the write pointer has wrapped
back onto the read pointer. The pointers alone cannot tell the two apart.
The control unit therefore keeps a separate count of the items held, 0 to
`DEPTH` (`$clog2(DEPTH+1)` bits):

* a write alone increments it, a read alone decrements it, and both together,
  or neither, leave it as it is;
* `empty = (count == 0)`, `full = (count == DEPTH)`.

The flags are decoded from a register and nothing else, so they are Moore
outputs: they change only at a clock edge and never depend on the requests of
the current cycle.

## Which requests are carried out

The user may assert `wen` and `ren` at any time. The FIFO protects itself:

* read carried out: `rd = ren && !empty`;
* write carried out, `ee457_fifo`: `wr = wen && !full`;
* write carried out, `ee457_fifo_p2`: `wr = wen && (!full || rd)`.

`wr` is both the array's write enable and the write pointer's count enable;
`rd` is the read pointer's count enable. A refused request changes nothing.

### Writing into a full FIFO while it is read (`ee457_fifo_p2`)

In the basic FIFO a full buffer refuses every write until a read has freed a
location, so a producer and consumer both active every cycle lose one cycle
each time the buffer fills: the first write is refused, after which the FIFO
runs one below full at one word per clock.

In `ee457_fifo_p2`, a read carried out in a full cycle frees the oldest
location at the coming edge, so a write in that cycle is accepted too. When
full, the write pointer equals the read pointer, so the new word lands in the
very location the consumer is emptying. That is safe because the consumer has
already seen the old word on `dout` during that cycle, and the register
captures the new word only at the edge. After the edge, the read pointer has
moved to the next-oldest word, the count is still `DEPTH` and `full` stays
high. A full FIFO can be streamed through at one word per clock for as long as
both sides keep going.

Two consequences for users:

* `full` alone no longer says whether a write was taken: it was taken when
  `wen && (!full || ren)`, since `ren` with `full` high always gives a read.
* An empty FIFO still refuses a read, even when a write arrives in the same
  cycle: the word written is not on `dout` until the next cycle. The change
  applies only to the full case.

## Interface and timing

Ports of `ee457_fifo` and `ee457_fifo_p2`, in order, with parameters
`#(WIDTH, DEPTH)` in that order:

| port    | dir | width   | meaning                                              |
|---------|-----|---------|------------------------------------------------------|
| `clk`   | in  | 1       | rising-edge clock                                    |
| `rst`   | in  | 1       | active-high, synchronous; empties the FIFO           |
| `din`   | in  | `WIDTH` | word to write                                        |
| `wen`   | in  | 1       | write request                                        |
| `full`  | out | 1       | `DEPTH` words held                                   |
| `dout`  | out | `WIDTH` | oldest word; valid whenever `empty` is low           |
| `ren`   | in  | 1       | read request: the consumer takes the word on `dout`  |
| `empty` | out | 1       | no word held                                         |

`dout` is first-word fall-through: the oldest word is already there when
`empty` is low, without a read. `ren` means "I am taking the word now", and
the next word appears after the clock edge. Example, 4 deep, starting empty:

```
cycle      0    1    2    3    4
wen        1    1    0    0    0
din        A    B    -    -    -
ren        0    0    1    1    0
empty      1    0    0    0    1
dout       -    A    A    B    -
```

A word written in cycle *n* can be on `dout` in cycle *n+1*. Reset clears the
pointers and the count, so the FIFO is empty the cycle after `rst`. It does not
clear the array: nothing can read a location before it is written.

Flag adapters for users who prefer "space available / data available" are the
inversions `!full` and `!empty` outside the FIFO (for `ee457_fifo_p2`, "space
available" in the sense of "a write will be taken" is `!full || ren`).

## Parameters and cost

| parameter | default | notes                                              |
|-----------|---------|----------------------------------------------------|
| `WIDTH`   | 8       | bits per word                                      |
| `DEPTH`   | 4       | locations; any value >= 1, power of two or not     |

`fifo_ctrl` also takes `MODE` (`fifo_pkg::fifo_mode_e`): `FIFO_MODE_STRICT` for
the basic rule, `FIFO_MODE_WR_ON_READ` for the write-on-read rule. Each FIFO
holds `DEPTH*WIDTH` storage bits plus two `clog2(DEPTH)`-bit pointers and a
`clog2(DEPTH+1)`-bit counter. The logic is a few comparators and
incrementers; nothing in it grows with `WIDTH` except the array and the read
multiplexer.

## Design choices

These points are not fixed by the behaviour described above and were chosen
here:

* synchronous reset;
* combinational read port (the output is the array word at the read pointer);
* one control unit with a `MODE` parameter, rather than two copies;
* both variants under distinct module names (`ee457_fifo`, `ee457_fifo_p2`) so
  that they can be instantiated together;
* the array write enable and the write pointer count enable are the same
  signal;
* a read of an empty FIFO stays refused in the write-on-read variant.

`fifo_ctrl` carries three concurrent assertions: the count stays within
0..`DEPTH`, no read is carried out while empty, and no write is carried out
while full unless a read goes with it.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `fifo_ptr_tb`: pointers of depth 4, 6 and 1 against a modulo counter, with
  a reset mid-run.
* `fifo_regarray_tb`: random writes and reads against a model array.
* `fifo_ctrl_tb`: both modes against the request rules, cycle by cycle.
* `ee457_fifo_tb`, `ee457_fifo_p2_tb`: 8 x 4 and 16 x 6 FIFOs against a
  queue model (`tb/fifo_scoreboard.sv`), with overfill, overdrain, a
  one-cycle latency check, a stream while full (the basic FIFO must refuse
  exactly one write, the updated one must take every write), reset with data
  held, and about 2,500 cycles of random traffic.
* `ee457_fifo_lab_top_tb`: both FIFOs of the top at the default size with
  independent traffic. It counts every mechanism (refused write, refused
  read, simultaneous read and write, both pointer wraps, reset with data,
  write while full on the updated FIFO only) and fails if one never occurs.

The scoreboard checks `full`, `empty` and, when not empty, `dout` before
every clock edge. Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fifo_pkg.sv tb/ee457_fifo_lab_top_tb.sv \
    --top-module ee457_fifo_lab_top_tb -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second.

## Files

* `rtl/fifo_pkg.sv`: mode enum and width helpers
* `rtl/fifo_ptr.sv`, `rtl/fifo_regarray.sv`, `rtl/fifo_ctrl.sv`: building blocks
* `rtl/ee457_fifo.sv`, `rtl/ee457_fifo_p2.sv`: the two FIFOs
* `rtl/ee457_fifo_lab_top.sv`: both side by side
* `tb/*_tb.sv`: testbenches; `tb/fifo_scoreboard.sv`: shared reference model

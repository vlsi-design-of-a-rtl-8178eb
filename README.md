# Monolithic crossbar switch chips for processor–memory networks

A multiprocessor needs to connect N processors to M memory banks. A full
N x M crossbar does that in one step but costs N·M switch points. A Delta
network costs less: it is several stages of small n-m crossbars, where each
stage routes on a few bits of the memory address. The part that limits such a
network is the package, not the logic inside it. A chip with many crossbar
points still fits on one die, but each port costs pins.

This repository is synthesizable SystemVerilog for two single-chip n-m
crossbar switches, each designed to be a building block for such networks:

* **The serial addressed chip** spends only two pins per port, DATA and
  CONTROL. The routing address is shifted into DATA one bit per clock. The
  chip keeps the bits it needs and passes the rest on to the next stage through
  the path it has just made. A 16-16 chip with a 1-bit path therefore needs
  only 64 signal pins.
* **The parallel addressed chip** presents the whole output-port number on
  log2 m pins, plus REQIN, R/W and data. It sets up a path in two clocks, but
  needs more pins per input port.

Both chips are circuit switched. Once a path is made, it is a plain
combinational wire from the input pin to the output pin. It carries data in
either direction, chosen by a read/write mode, until the processor releases
it. Wider data paths are built by stacking chips as *bit planes*. Every plane
gets the same address, so all planes make the same routing decisions in the
same clock.

The repository also contains a complete Delta network built from the
parallel chip. It has request, direction, acknowledge, data and address
planes, and it returns an acknowledge to the processor once the path through
every stage exists.

## Files

| File | What it is |
|---|---|
| `rtl/xbar_pkg.sv` | state encodings of both row controllers, control-output struct of the serial row |
| `rtl/ser_primary_reg.sv` | serial chip: log2 m bit shift register holding this stage's output-port number |
| `rtl/ser_secondary_reg.sv` | serial chip: buffer and pointer for the next stages' address bits |
| `rtl/ser_row_fsm.sv` | serial chip: row controller (10 states) |
| `rtl/ser_row.sv` | serial chip: one input-port row (registers, FSM, output logic, R/W flip-flop) |
| `rtl/ser_rc_cell.sv` | serial chip: one row-column cell (decoder, priority, data steering) |
| `rtl/ser_crossbar.sv` | serial chip, N-M, default 16-16 |
| `rtl/par_row_ctrl.sv` | parallel chip: address latch and 4-state row controller |
| `rtl/par_rc_cell.sv` | parallel chip: one row-column cell |
| `rtl/par_crossbar.sv` | parallel chip, N-M, default 32-32 |
| `rtl/par_delta_net.sv` | N x N Delta network of parallel c-c chips in bit planes, default 16 x 16 from 4-4 |
| `rtl/xbar_top.sv` | the serial chip, the parallel chip and the network side by side |
| `tb/*.sv` | one self-checking testbench per module, plus `tb_par_delta_net_sizes` (and its helper `par_delta_traffic`) |

## How a chip is organised

Both chips have the same floor plan:

* **Rows.** There is one row per input port. The row holds the address
  register and the row controller.
* **Columns.** There is one column per output port.
* **Row-column cells.** A cell sits at every crossing. It compares the row's
  address with its own column number. It takes part in the column's priority
  chain. When its row owns the column, it connects the row's data line to the
  column's data line.

A column is a set of shared lines that every cell on it can pull. On the chip
these are precharged, active-low wired-OR lines. In the RTL each one is an OR
of the cells' contributions, in true polarity:

| Column line | Driven by |
|---|---|
| BUSY | any cell whose row is requesting or holding the column |
| Data, Control, R/W | the one cell that holds the column |

The rows run the same way in the other direction: read data and the
addressed column's BUSY and priority grant return to the row as ORs over the
row's cells.

A row puts its address on a bus to all its cells. The bus is
**double-railed**: each bit is sent true and complemented. A cell's decoder
is then just an AND of one rail per bit, which selects it when the address
equals its column number.

### The priority chain

Several rows can request one free column in the same clock. A daisy chain
runs down each column through every row, and its PIN signal decides between
them:

1. PIN enters the chain's head high.
2. Each cell passes PIN on to the next row unless its own row is requesting
   this column.
3. A requesting row that still sees PIN high has won. One that sees it low goes
   back to waiting.

The head is not row 0. Column j starts its chain at row j mod N, on the
forward diagonal, and the chain wraps from the last row back to the first. So
each row has the top priority for a different column, and no row wins every
conflict.

The chain is combinational. Its length is N cells per column, and this sets a
bound on the clock period.

A row that loses, or finds the column busy, waits. It cannot withdraw while
it waits. It takes the column once the holder lets go, and releases it in the
usual way.

## The serial addressed chip

### Ports and protocol

Each input port has two pins, DATA and CONTROL. Each output port has the same
two pins, facing the next stage. Address bits enter DATA most significant bit
first, one per clock, while CONTROL is high.

1. **Address.** CONTROL rises with the first address bit on DATA. The first
   log2 m bits shift into the **primary register** and choose this chip's
   output port. Bits that follow while CONTROL stays high belong to later
   stages. They go into the **secondary register**.
2. **Request.** On the last primary bit, the row looks at the addressed
   column's BUSY line:
   * If the column is free, the row requests it.
   * If the column is busy, the row waits and requests it once BUSY falls.

   A request can still lose to another row on the priority chain in the same
   clock. The loser goes back to waiting.
3. **Forwarding.** Once the row holds the column, it sends the buffered
   next-stage bits out of the output DATA pin. It holds the output CONTROL pin
   high while they go out. To the next chip this looks exactly like the start
   of a processor's address stream. Bits can still be arriving while earlier
   ones are leaving; the secondary register handles both at once (see below).
   If there is nothing to forward (the last stage), the row emits a one-clock
   pulse on the output CONTROL pin instead. That pulse tells the memory side
   that the path is complete.
4. **Connected.** The row's DATA pin is now wired to the output DATA pin, and
   CONTROL passes straight through. CONTROL pulses made by the processor
   therefore reach every stage of the path at once.
5. **Direction and release.** CONTROL stays low while the path is in use.
   * **Toggle direction:** raise CONTROL for two clocks. This toggles the path
     between write mode (input to output) and read mode (output to input).
   * **Release:** raise CONTROL for one clock, then drop it. This frees the
     column in every stage. The row goes back to idle, in write mode.

An output port that no row drives reads 0. The acknowledge scheme relies on
this (see below).

### Row controller

`ser_row_fsm` is a Moore machine, shown here for AW = log2 m shift states:

| State | Outputs | Leaves to |
|---|---|---|
| IDLE | S1, WRMODE | SHIFT on CONTROL (first bit shifts in); with AW = 1 straight to REQ/WAIT |
| SHIFT | S1 | after the last primary bit: REQ if the column is free, WAIT if busy |
| WAIT | S2 | REQ when BUSY falls |
| REQ | S2, REQ | WAIT if PIN is low; SEND if PIN and bits are buffered; CONN0 if PIN and nothing buffered |
| SEND | S2, REQ, DEC, CONOUT | LINK after the last buffered bit (ZERO) |
| CONN0 | REQ, CONOUT, ENDATA | LINK |
| LINK | REQ, ENDATA (+ SWMODE in the acknowledge variant) | CONN |
| CONN | REQ, CONPROP, ENDATA | CTL1 on CONTROL |
| CTL1 | REQ, CONPROP, ENDATA | SWITCH if CONTROL is still high, IDLE if it fell |
| SWITCH | REQ, CONPROP, ENDATA, SWMODE | CONN when CONTROL falls |

What each output does:

| Output | Effect |
|---|---|
| S1 | shift the primary register while CONTROL is high |
| S2 | shift the secondary register while CONTROL is high |
| DEC | send one buffered bit |
| CONOUT | drive the output CONTROL pin from the row |
| CONPROP | pass the input CONTROL pin through |
| ENDATA | connect the DATA pin to the column |
| SWMODE | toggle the R/W flip-flop |
| WRMODE | clear the R/W flip-flop to write |

`ser_row` puts three multiplexers and a flip-flop around the FSM:

* **Row Data** is the DATA pin while ENDATA is high. Otherwise it is the
  secondary register's outgoing bit.
* **Connect** is ENDATA or CONOUT.
* **Row Control** is the CONTROL pin under CONPROP. Otherwise it is CONOUT.
* **R/W** is a toggle flip-flop, advanced by SWMODE and cleared by WRMODE.

### The secondary register: forwarding while still receiving

This is the least obvious part of the chip. When the row wins its column, the
processor may still be sending the address bits of later stages. The row must
start forwarding without knowing how many bits are still to come, and it must
stop exactly after the last one.

The register has three parts:

* **Stream buffer.** A shift register of length L. Every arriving bit enters
  at index 0 and pushes the older bits one place along, so the oldest
  unsent bit is the one furthest along.
* **One-hot pointer.** It marks the oldest bit not yet sent. A selector
  (AND-OR) reads that bit out as the Row Data during SEND.
* **Occupancy flag.** It tells an empty buffer from a buffer holding one bit,
  because both have the pointer at index 0.

Each clock, one of four things happens:

| Arriving bit | Sending (DEC) | Pointer |
|---|---|---|
| yes | no | moves one place along, following the bit it marks |
| no | yes | moves one place back toward index 0 |
| yes | yes | stays: the bit it marks moved one place along, and the next-oldest bit is now under it |
| no | no | stays |

**ZERO** tells the controller that the bit being sent is the last one. It is
true when the pointer is at index 0 and no bit is arriving in the same clock.
The controller leaves SEND one clock later. As long as the processor keeps
streaming, ZERO stays low, so the row keeps forwarding. Because bits leave as
fast as they arrive, the buffer only ever holds the bits that arrived before
the column was won.

The length L sets the largest network a chip can serve: L + log2 m address
bits in all. The default L = 12 with m = 16 gives 16 bits. That is enough for
four stages of 16-16 chips, a 65,536-port network. A stream longer than the
buffer loses its excess bits.

One corner case is not covered. Suppose the column is won and exactly one
bit is buffered, with no more arriving. Then ZERO is already true on entering
REQ, and that one bit is not forwarded. This can only happen when the next
stage needs a single address bit, i.e. a 2-m chip, and that bit arrived
before the column was won. It cannot happen in networks of 4-4 or larger
chips.

### Timing

Address forwarding starts AW + 1 clocks after a stage sees the first bit of
its stream (AW = log2 m). A two-stage path of 16-16 chips delivers its
last-stage CONTROL pulse 10 clocks after the processor's first address bit.
For l stages the delay is l·(AW + 1) clocks. That is within log2 M + 2l − 1,
the usual estimate for this protocol: 11 clocks for two stages, 23 for four.

### Acknowledge-plane variant

In a network each processor must learn when its path through all stages
exists. The serial chip has a variant for this, selected by the parameter
`ACK_PLANE = 1`. It is a separate plane of chips that are set up in parallel
with the data planes. The only difference is in the row controller: it
asserts SWMODE in LINK, so the path turns to read mode by itself as soon as it
is made. A signal applied at the memory side then travels back to the
processor.

## The parallel addressed chip

Each input port has:

* log2 m address pins;
* REQIN;
* R/W;
* a data pin (b data pins with `B > 1`).

Each output port has only its data pin.

A row has a **level-sensitive address latch** and a **4-state controller**:

| State | What happens | Leaves to |
|---|---|---|
| LOAD | latch open | REQIN high: REQ if the addressed column is free, WAIT if busy |
| REQ | Row REQ asserted | CONN if PIN is high; WAIT if a higher-priority row took the column in the same clock |
| WAIT | waiting | REQ when BUSY falls |
| CONN | REQ and CONNECT asserted | LOAD when REQIN falls |

Setup timing:

* A path exists two clock edges after REQIN is first seen with a free column.
* Once the path exists, the address pins may change; the latch has closed.
* The R/W pin steers the data direction of the path directly.

The cells and the priority chain are the same as in the serial chip, without
the control lines.

## Networks of parallel chips: `par_delta_net`

The network joins N = c^k processor buses to N memory buses through k stages.
Each stage has N/c chips per plane. A bus is spread over several one-bit
planes:

| Plane | Mode | Carries |
|---|---|---|
| Request | write only | the request forward; its output drives REQIN of every plane in the next stage |
| R/W | write only | the direction forward; its output drives R/W of the data planes in the next stage |
| Acknowledge | read only | the acknowledge backward |
| Data (W of them) | R/W from the previous stage | the data word, in either direction |
| Address | write only | the address digits of later stages, as data |

There are (k − 1 − s)·log2 c address planes at stage s, so the network loses
log2 c planes per stage.

Addressing:

* At stage s, every chip of a bus takes the same log2 c-bit digit on its
  address pins, most significant digit first.
* At stage 0 the digit comes from the processor's memory-bus number.
* At later stages it comes from the previous stage's address planes.
* Every plane sees the same address and REQIN. So all planes of a bus make the
  same decision in the same clock: they connect, wait or lose together.

At the last stage, the Request plane's output is tied to the Acknowledge
plane's output. The Acknowledge plane is permanently in read mode, so the
request flows back to the processor as its acknowledge once the whole path is
made. This takes 2 clock edges per stage: 4 for the default two stages.

Between stages, the lines follow the c-ary perfect shuffle: the line number is
rotated left by log2 c bits. For two stages this is the same as sending output
p of switch q to input q of switch p. It routes on the destination digits, so
the processor presents only the memory bus number.

Like any Delta network, this one blocks internally:

* Two paths to different memories can need the same inter-stage link. One
  waits until the other releases.
* A waiting path keeps the links it already holds in earlier stages.

Chip count is N/c·{(W + 3)·log_c N + log2 N·(log_c N − 1)/2}. At the defaults
(16 x 16 of 4-4 chips, W = 8 data planes) that is 96 chips.

## Top level

`xbar_top` places three independent parts side by side. They share only the
clock and the active-low reset:

* `ser_*`: the serial 16-16 chip;
* `par_*`: the parallel 32-32 chip;
* `net_*`: the 16 x 16 network of 4-4 parallel chips.

All pads are split into in, out and output-enable signals. On the parallel
chip, the enable of an input-side data pad is simply that port's R/W pin.

## Departures from the original design, and choices made here

* **Pads and wired-OR lines.** The bidirectional pads are in/out/oe triples.
  The active-low precharged column and row lines are OR reductions in true
  polarity. Lines that nobody drives read 0.
* **Transitions out of the last shift state.** The original state diagram
  labels the BUSY branches out of the last shift state the other way round
  from its own prose. Here a free column is requested and a busy one waited
  for. This agrees with the prose and with the parallel chip's controller.
* **Look-ahead primary bus.** During a shift, the serial row's address bus
  shows the register's next value. This lets the BUSY test in the last shift
  state see the complete address.
* **ZERO and the occupancy flag.** Both are defined here, as described above.
  So is the one-bit corner case.
* **The R/W flip-flop.** It is a single-clock flip-flop that toggles after a
  rising SWMODE, not a flip-flop clocked by SWMODE.
* **The parallel chip's address latch.** It is a register plus a bypass, not a
  level-sensitive latch. This keeps one clock and no inferred latches.
* **SWITCH state.** It waits for CONTROL to fall before it returns to CONN.
* **Acknowledge variant.** It asserts SWMODE in LINK.
* **Sizes that the original gives no number for.** L = 12 and W = 8 are
  chosen here.
* **Parallel network setup time.** The acknowledge arrives after 2l clock
  edges. The original counts it as arriving during the (2l − 1)th cycle,
  which assumes a faster final stage.
* **Interstage wiring.** For more than two stages, the shuffle is this
  design's choice.
* **Reset.** Reset is asynchronous and active low. It clears every row to
  idle, in write mode, with empty registers.

## Not built

* A network of serial chips with its acknowledge plane. The chip and its
  acknowledge variant exist. What is missing is how the last stage's
  one-clock connect pulse is held until the acknowledge path has turned to
  read mode; the original does not describe it. Two serial stages are
  exercised by looping one chip's output back into its own input.
* Optional extensions that the original only outlines:
  * a query for whether a memory bank is in use;
  * priority preemption;
  * a per-column connection timer;
  * broadcast to several outputs.
* The processors, memories and their interface logic.

## Verification

Every module has a self-checking testbench. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Unless stated
otherwise, the checks compare against models written independently in the
testbench.

| Testbench | What it checks |
|---|---|
| `tb_ser_primary_reg` | random streams; double-rail bus |
| `tb_ser_secondary_reg` | random push/send sequences against a queue model |
| `tb_ser_row_fsm` | every arc of the controller; Moore outputs in every clock; the acknowledge variant |
| `tb_ser_row` | one row through a whole connection |
| `tb_ser_rc_cell` | random vectors against the cell equations |
| `tb_par_rc_cell` | random vectors against the cell equations |
| `tb_ser_crossbar` | 4-4 chip: forwarding and its latency, write, read, waiting on a busy column, diagonal priority with wrap-around, the last-stage pulse, release |
| `tb_par_row_ctrl` | every arc of the parallel row controller |
| `tb_par_crossbar` | two-edge setup, write/read steering, busy wait, priority, release |
| `tb_par_delta_net` | 16 x 16 network (see below) |
| `tb_par_delta_net_sizes` | the same network built as 8 x 8 from 2-2 chips: 6-edge setup and random traffic |
| `tb_xbar_top` | the full-size top with no parameter overrides (see below) |

`tb_par_delta_net` covers:

* the acknowledge after 4 edges;
* write and read end to end;
* two processors asking for one memory;
* internal link blocking;
* random traffic from all 16 processors.

`tb_xbar_top` runs every part at its default size:

* **Serial chip.** One output is looped into an input to make a two-stage
  path. It checks the setup-latency bound, write, read, return to write, a
  waiting request, priority and release.
* **Parallel chip.** Setup, busy wait, read, priority and release.
* **Network.** Acknowledge timing, internal blocking, read, write and release.

`tb_xbar_top` counts every mechanism. One that never happens counts as a
failure.

The design also carries assertions:

* one holder per column;
* a one-hot pointer in the secondary register;
* DEC only with a bit buffered.

## Simulating

Any testbench runs with plain Verilator 5, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/xbar_pkg.sv tb/tb_xbar_top.sv --top-module tb_xbar_top
./obj_dir/Vtb_xbar_top
```

Replace `tb_xbar_top` with any other testbench name. Verilator reports some
lint warnings with `-Wall`; none of them is an error:

* unused enables on pads that are only ever driven one way;
* the unused tail of each priority chain;
* the reset used both asynchronously and in assertions.

Parameters:

| Module | Parameters |
|---|---|
| serial chip | `N`, `M`, `L`, `B`, `ACK_PLANE` |
| parallel chip | `N`, `M`, `B` |
| network | `C`, `K`, `W` |

N and M need not be equal. The priority chain of column j starts at row
j mod N.

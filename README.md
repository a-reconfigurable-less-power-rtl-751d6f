# A clockless, self-power-gating FPGA fabric with LEDR routing

This is synthesizable SystemVerilog for a small asynchronous FPGA fabric.
It follows the published architecture "A Reconfigurable Less Power Asynchronous
FPGA Design with Power Gating and Level encoding dual rail technique". Two ideas
keep its power low:

* **No clock in the data path.** Each bit travels on two wires in the
  level-encoded dual-rail code (LEDR). Each new word flips exactly one of the
  two wires. A block therefore sees when its inputs are complete, and nothing
  switches while there is no data.
* **Autonomous fine-grain power gating.** Every logic block has its own sleep
  controller. A block powers itself off when no data has come for a while. It
  is woken *before* its data arrives, by a data-arrival (wake-up) wire that its
  predecessor raises as soon as the predecessor gets data.

The fabric is an array of cells. Each cell is a look-up-table (LUT) logic
block next to a switch block. The cells are joined by *wire-sets* of four
wires: V, R, ACK and data-arrival. The default array is 2 x 2 cells with
4-input LUTs.

```
        N border            N border
           |                   |
   +-------+-------+   +-------+-------+
W -| Logic    Switch|---| Logic    Switch|- E
   | Block    Block |   | Block    Block |
   +-------+-------+   +-------+-------+      one line = one wire-set
           |                   |              (V, R, wake forward; ACK back)
   +-------+-------+   +-------+-------+
W -| Logic    Switch|---| Logic    Switch|- E
   | Block    Block |   | Block    Block |
   +-------+-------+   +-------+-------+
           |                   |
        S border            S border
```

## The LEDR code and the two-phase handshake

Each bit uses two rails. **V** carries the value. **R** is set so that the
word's *phase*, `V ^ R`, alternates from one word to the next:

| value | phase 0 (V R) | phase 1 (V R) |
|-------|---------------|---------------|
| 0     | 0 0           | 0 1           |
| 1     | 1 1           | 1 0           |

Going from one word to the next changes exactly one wire. This holds whether or
not the value changes, so no return-to-zero spacer is needed. The receiver
knows a new word has arrived when the phase differs from the phase of the last
word it consumed.

The acknowledge is also a level. A receiver sets ACK equal to the phase of the
word it has just consumed. A sender may put the next word on the wires only
when ACK equals the phase of its current word. All blocks start in phase 0
after reset, with V = R = ACK = 0.

Choices made here: R = V in phase 0 and this form of acknowledge.

## How a logic block fires (`logic_block`)

A logic block has K LEDR inputs, one LEDR output and one acknowledge level for
all its inputs. It has no clock. It evaluates when all three of these hold:

1. every *used* input carries a new word (its phase differs from the output
   phase), checked by `ledr_phase_detect`;
2. the receiver has acknowledged the previous output (`out_ack_i` equals the
   output phase);
3. the block is powered.

When it evaluates, the output latch in `ledr_encoder` opens. The latch takes
the LUT result and the phase of the inputs. The output then has the new phase,
and three things follow:

* the first condition becomes false, so the latch closes again;
* the inputs are acknowledged, because `in_ack_o` is the output phase;
* the receiver sees a new word.

Whenever all three conditions hold, the block evaluates again. So a chain of
blocks behaves as a self-timed pipeline with one word of storage per block.
For example, if the final output is not acknowledged, the block driving it
holds its word. The blocks in front of it can still take one more word each.
The word after that is refused at the fabric's inputs.

A configuration mask, `cfg_used`, marks which LUT inputs are routed.
Completion detection ignores the others, and the LUT sees 0 on them.

**Lint note.** The evaluate signal opens a latch whose output closes it again,
and acknowledges loop back through neighbouring cells. Verilator therefore
reports `UNOPTFLAT` combinational loops, and every tool reports latches in
`ledr_encoder` and `ack_join`. This is the intended structure. In simulation
the loops settle within one time step.

## Autonomous power gating (`sleep_controller`)

Each logic block is in one of four modes (`pg_mode_e`):

| mode    | power switch | meaning |
|---------|--------------|---------|
| SLEEP   | open         | block cannot evaluate |
| WAKING  | closed       | supply settling, `WAKE_TICKS` ticks |
| STANDBY | closed       | powered, nothing pending |
| ACTIVE  | closed       | powered, a new input word is arriving or the output is unacknowledged |

* A block leaves SLEEP when its data-arrival input (from any used input) goes
  high, or when data already stands at an input.
* It returns to SLEEP after `IDLE_TICKS` consecutive ticks with no activity.
* Activity means any of these:
  * the block is busy at a tick;
  * the data-arrival input is high at a tick;
  * the block has evaluated since the previous tick.

  A word can pass through a powered block between two ticks. Evaluations are
  therefore caught from the edges of the output phase, using two edge flags
  that the tick clears. Steady traffic never powers a block off.
* A block drives its own outgoing data-arrival wire while it is busy. So the
  moment a block receives data, its successor starts to power up. Along a path
  of sleeping blocks the wake-ups overlap. In the end-to-end test, a word sent
  into a fully powered-off 2 x 2 fabric comes out after 3 ticks, which is one
  wake-up (2 ticks) plus one tick. Woken one after another, the three blocks on
  the path would need about 9 ticks.
* The environment can also raise the data-arrival wire of a border input ahead
  of the data, so that the first block is already powered when the data
  arrives.

`tick_i` is a slow timebase. The data path never uses it. It only measures the
idle time before power-off and the settling time after power-on. The
architecture says the fabric needs no clock, and it also says a block powers
off only "when the data does not come for quite a while". Measuring that
interval needs some time reference, and this design uses this tick.

Each block's output word is retained through SLEEP. This design assumes that
the output latch and the configuration memory sit on the always-on supply.
`pg_en_o` is the enable of the block's power switch (header transistor). The
switch itself is analog and is not modelled beyond the WAKING delay.

The FSM samples `busy` and `wake`, which come from the clockless fabric,
directly. A silicon version would synchronise them first.

## Switch block and routing (`switch_block`, `pass_switch`)

A switch block has 5 sources and 4 + K destinations:

* sources: the four incoming wire-sets (W, N, E, S) and the logic block output;
* destinations: the four outgoing wire-sets and the K logic block inputs.

Every (destination, source) pair has a `pass_switch`. That is four switches,
one per wire of the wire-set, sharing one memory bit. The behaviour is:

* Forward wires (V, R, wake) pass from source to destination.
* The acknowledge passes back.
* An open switch drives 0.
* Each destination is the OR of its pass switches, which models the shared node
  of pass transistors. At most one source per destination may be enabled, and
  `fpga_cell` asserts this whenever configuration is not being loaded.
* A source may drive several destinations (fanout). Its acknowledge is then the
  Muller C-element of the enabled receivers' acknowledges (`ack_join`), so the
  sender waits for the slowest receiver.

Real pass transistors are bidirectional. Here each connection has a fixed
direction, given by which pair of bits is set. This is the main departure from
a transistor-level switch box.

## Configuration (`config_chain`, `fpga_cell`)

Each cell holds `CFG_BITS = 2**K + K + (4+K)*5` memory bits, which is 60 for
K = 4. They are laid out as follows (bit 0 is the last bit shifted in):

| bits | content |
|------|---------|
| `[0 +: 2**K]` | LUT truth table; bit *i* is the output for input index *i* (input 0 = LSB) |
| `[2**K +: K]` | used-input mask |
| `[2**K+K +: (4+K)*5]` | pass-switch bits; bit `d*5+s` connects source `s` to destination `d` |

Sources are numbered 0 W, 1 N, 2 E, 3 S and 4 for the logic block output.
Destinations are numbered 0 W, 1 N, 2 E, 3 S and 4..4+K-1 for the logic block
inputs.

The cell chains are joined in row-major order: cell (0,0) first, then (0,1),
and so on. To program the fabric:

1. Hold `cfg_en_i` high.
2. Shift the concatenation `{cell(R-1,C-1), ..., cell(0,1), cell(0,0)}` in,
   most significant bit first, one bit per rising `cfg_clk_i`.
3. Drop `cfg_en_i`.

The fabric should be idle while you shift. `rst_ni` clears all memory bits,
which opens every switch. The serial chain is this design's choice; the
architecture only says that the switches and LUTs are programmed by memory
bits.

## Top level (`async_fpga`)

The east side of cell (r,c) meets the west side of cell (r,c+1). The south
side of cell (r,c) meets the north side of cell (r+1,c). Every border side is
brought out as an incoming wire-set with an acknowledge output, and as an
outgoing wire-set with an acknowledge input. Ports are packed arrays of the
struct `fpga_pkg::fwd_t {v, r, wake}`.

| parameter | default | origin |
|-----------|---------|--------|
| `ROWS`, `COLS` | 2, 2 | the architecture's drawing of the array |
| `K` (LUT inputs) | 4 | this design's choice |
| `IDLE_TICKS` | 8 | this design's choice |
| `WAKE_TICKS` | 2 | this design's choice |

To send a word on a border input:

1. Flip the phase.
2. Drive V = bit and R = bit ^ phase.
3. Wait until the input's acknowledge equals that phase.

To take a word from a border output, wait until its phase changes, read V,
then set the acknowledge to the new phase.

## Files

| file | content |
|------|---------|
| `rtl/fpga_pkg.sv` | wire-set struct, power modes, side indices, LEDR helpers |
| `rtl/async_fpga.sv` | top: array of cells and border I/O |
| `rtl/fpga_cell.sv` | one cell: logic block + switch block + configuration memory |
| `rtl/logic_block.sv` | self-timed LUT stage |
| `rtl/ledr_phase_detect.sv` | input/output phase comparison (completion detection) |
| `rtl/lut.sv` | K-input LUT |
| `rtl/ledr_encoder.sv` | output latch and LEDR encoder |
| `rtl/sleep_controller.sv` | power-gating FSM |
| `rtl/switch_block.sv` | programmable routing crossing |
| `rtl/pass_switch.sv` | one configurable wire-set connection |
| `rtl/ack_join.sv` | C-element acknowledge join for fanout |
| `rtl/config_chain.sv` | configuration shift register |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog. For example, with Verilator 5, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Wno-UNOPTFLAT -Irtl -y rtl \
    rtl/fpga_pkg.sv tb/tb_async_fpga.sv --top-module tb_async_fpga
./obj_dir/Vtb_async_fpga
```

Replace `async_fpga` with any module name to run that module's testbench.

`tb_async_fpga` runs the whole fabric at its default sizes.

1. It loads the configuration through the chain.
2. It programs the four cells to compute `y = ((a ^ b) & c) ^ d`, with a fanout
   of the result to two border outputs.
3. It checks about 165 words against its own model.
4. It counts each mechanism and fails if any of them never happened:
   * configuration load and reconfiguration;
   * words in both LEDR phases;
   * an input refused because the output was not acknowledged;
   * the fanout acknowledge join holding a word;
   * power-off after idle;
   * wake-up ahead of data;
   * data waiting for a block to power up.

Finally it resets the fabric and reprograms it for a second path, which runs
west and north. On this path one cell only routes, and one unused block must
stay powered off. It checks 50 more words on that path.

It also checks two latencies: a cold start from a fully powered-off fabric
takes at most `WAKE_TICKS + 2` ticks, and a powered fabric passes a word with
no tick of delay.

The other testbenches check each module against an independent reference:

* the LEDR code table;
* the completion rule, on random masks;
* LUT indexing;
* pass-switch gating;
* the C-element join, on random routing patterns;
* chain shifting;
* the exact tick counts of wake-up and power-off;
* the logic block's stall, sleep and wake behaviour;
* a single cell programmed through its chain.

## How far to trust it, and where it departs from the architecture

* **Taken from the architecture:**
  * the array of logic-block / switch-block cells;
  * the four-wire wire-set (V, R, ACK, data-arrival);
  * pass switches sharing one memory bit per wire-set connection;
  * LUT-based logic blocks that compare the phase of input and output words;
  * LEDR coding with an output latch and phase-steered selectors;
  * the registers that hold the output for the switch block;
  * sleep, standby and active states, with the predecessor waking its
    successor when it gets data and power-off only after a long idle time;
  * no clock in the data path.
* **Chosen here, because the architecture leaves it open:**
  * the phase convention and the two-phase acknowledge;
  * K = 4;
  * the 2 x 2 default from the array drawing;
  * directional pass switches with a full source-to-destination pattern;
  * the C-element fanout join;
  * the used-input mask;
  * the serial configuration chain and its bit layout;
  * the tick timebase, the WAKING mode, and the idle and wake-up lengths;
  * reset values;
  * retention of the output word during sleep.
* **Not modelled:**
  * the analog power switch, beyond its enable and settling delay;
  * transistor-level techniques named alongside the architecture: efficient
    charge-recovery logic (ECRL) gates and partial charge reuse between their
    output nodes. These change energy, not function.
* **Delays:** the RTL has no propagation delays. Handshakes complete in zero
  time, and the only time in the design is the tick count of the sleep
  controllers. Timing and power figures must come from a transistor-level
  implementation.

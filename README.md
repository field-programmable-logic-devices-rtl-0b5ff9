# Field-programmable logic with optical I/O: a PLA die and a Clos packet switch

An ordinary chip can move at most a few hundred gigabits per second through
its electrical pins. If photodetectors and optical modulators are bonded
directly onto the logic, each logic block gets its own optical input or
output, and the chip's I/O bandwidth grows with its area. This design shows
what such a chip can hold: programmable logic that is fast, regular and fully
pipelined, so that it can keep up with the optical streams.

The logic is a NOR-NOR programmable logic array (PLA). Each cross-point holds
one configuration bit and a pull-down transistor. The same array structure
serves for random logic and finite-state machines (FSMs), and for crossbar
switching. The RTL has two pieces of hardware built from it:

* **The logic die.** It has six small FSM cells, each a 5-input, 10-term,
  6-output PLA with pipeline registers, and 960 configuration bits in all.
  Fixed wiring between the cells lets the die act as the first two stages of
  a 12 x 12 radix-4 Clos switching network.
* **The backbone switch.** It is a three-stage Clos switch for 1024 optical
  channels at 2.488 Gbit/s (OC-48), built from three switch chips. Each chip
  has 32 crossbars of 32 x 32, and each crossbar is a PLA whose NOR arrays are
  pipelined. Every channel is deserialized 1:4, so the crossbars run at a
  quarter of the line rate.

`rtl/fpld_system_top.sv` instantiates both side by side: `u_die` and
`u_switch`. They share only clock and reset.

## The NOR array and its cross-point

`xpoint_cell` is one cross-point. It holds a flip-flop for the configuration
bit `p`, written when its column is strobed, and a pull-down `p & x` on its
row.

`nor_row` collects the pull-downs of one row: the row is high unless some
enabled column is high, so the row is a NOR.

`nor_array` adds the column drivers:
- With `DUAL_RAIL`, every input drives two columns, true and complemented, in
  the order x0, ~x0, x1, ~x1, ...
- The programming decoder writes one whole column per strobe: `sel` picks the
  array, `col_addr` the column, `prog_data` gives one bit per row, and `cas`
  writes on the clock edge.
- `INVERT_OUT` adds inverting output buffers.

## From NOR-NOR to sum of products (`pla`)

* **AND array** (dual rail, not inverted). Row i is NOR of the enabled
  columns. To form a product, enable the *complement* of each literal:
  enabling ~a and ~b gives NOR(~a, ~b) = a·b.
  - A row with nothing enabled is constant 1.
  - A row with both x and ~x enabled is constant 0. That is how an unused term
    is switched off.
* **Product-term register** (`z_q`). One NOR array is evaluated per clock
  cycle.
* **OR array** (single rail, inverting output buffers). Output k is the OR of
  the enabled terms. An output with nothing enabled is 0.

A 5-input, 10-term, 6-output PLA has 10 x 10 + 10 x 6 = 160 configuration
bits.

## The FSM cell and the die (`fsm_cell`, `stage_links`, `fpld_top`)

`fsm_cell` puts 22 flip-flops around a PLA:

| Flip-flops | Count |
|---|---|
| Input | 5 |
| Product term | 10 |
| Output | 6 |
| Feedback | 1 |

- **Latency.** From `x_in` to `y_out` is 3 cycles.
- **Feedback.** The feedback flip-flop captures the last output, y5. When
  `fb_en` is set, it replaces input x4 at the AND array. The loop is two
  cycles long, so a state machine written in the PLA advances every second
  cycle.

`fpld_top` is the die:
- **Cells.** It holds six cells on one programming bus.
  - `cfg_arr = 2*cell + plane` selects one of the 12 arrays; plane 0 is AND,
    plane 1 is OR.
  - `cfg_col` is the column and `cfg_data[9:0]` is the column's bits.
  - `cfg_cas` writes on the clock edge.
  - A full load is 120 writes.
- **Clos mode** (`link_en = 1`).
  - Cells 0..2 form the first stage: each is a 4 x 4 crossbar on x0..x3 to
    y1..y4.
  - Cells 3..5 form the second stage and take x0..x3 from the
    `stage_links` wiring.
  - Each first-stage cell sends one link to every second-stage cell, and a
    second link to the cell in its own row.
  - A crossbar is loaded with one product term per input, and an output ORs
    the terms routed to it. Any permutation, multicast or broadcast is
    therefore a configuration.
  - From a first-stage input to a second-stage output is 6 cycles.
- **Plain mode** (`link_en = 0`). Every cell takes its five inputs from its
  own pins.

## The backbone switch

### Serial converters and word timing (`word_phase`, `deserializer`, `serializer`)

Each chip has one line-rate clock. `word_phase` counts the 4 bit positions
of a word and raises `word_en` in the last one. That enable is the slower,
quarter-rate clock domain. Reset aligns the word boundary.

`deserializer` and `serializer` are banks of `LANES` converters. They keep
words as **bit planes**: plane s is bit s of every channel. The first bit
received goes to plane 0 and is also sent first.

### Pipelined NOR arrays (`pipe_nor_array`, `xbar_pla`)

A 32 x 32 array is too long to cross in one fast clock cycle, so it is cut
into 3 segments, with a register on every row wire at each segment boundary:
- Each row carries its partial pull-down, the OR of `p & v` over the columns
  seen so far, forward.
- The column inputs are delayed by one stage per segment to meet it.

Each array therefore takes 3 word cycles. `xbar_pla` cascades two of them:
- The AND array has 64 dual-rail columns and 32 terms.
- The OR array is inverting.

That is 6 word cycles through a crossbar. Loaded with one term per input, it
is a statically reconfigurable 32 x 32 crossbar with multicast. Any other sum
of products also works.

### One switch chip (`wan_fpld`)

- **Channels.** 1024 serial channels: channel `b*32 + p` is port p of
  crossbar b.
- **Bit slices.** Each of the 32 crossbars exists 4 times, one copy per bit
  plane. That is 128 `xbar_pla` per chip. The four copies have separate
  configuration memory and must be loaded alike to switch whole channels.
- **Programming.** `cfg_arr = 2*(b*4 + s) + plane` selects an array, and
  `cfg_cs` selects the chip.
- **Latency.**
  - 1 word time to deserialize.
  - 6 word times through the crossbar.
  - 1 word time to serialize.
  - Total: 8 word times, which is 32 line cycles.

### The three-stage network (`wan_clos_switch`)

- **Structure.** Three `wan_fpld` chips, joined by a full shuffle: port j of
  crossbar a feeds port a of crossbar j in the next stage.
- **Latency.** 96 line cycles from input to output.
- **Programming.** One shared programming bus; `cfg_chip` picks the chip.
- **Size.** At full size the switch holds 384 crossbar PLAs. Each has 64 x 32
  AND bits plus 32 x 32 OR bits, so the switch has 1,179,648 configuration
  bits. Logic synthesis of the whole switch is correspondingly slow. Simulation
  is fast.
- **Routing.** Computing the crossbar settings for a set of connections, the
  job of the switch controller, is not part of the hardware here. The
  testbenches compute the settings and load them through the programming
  port.

## Departures from the published device and choices made here

- **Not modelled.** The optical receivers and modulators, the electrical
  pads, the wavelength mux/demux and amplifiers, and the switch controller
  have no logic function that could be written here. `cell_in`, `cell_out`,
  `ser_in` and `ser_out` are the logic-side signals.
- **Configuration storage.** It is a flip-flop written on the clock edge, not
  a static RAM cell with its own write timing. Reset clears the pipeline but
  not the configuration.
- **Die choices.**
  - Which output and which input the feedback flip-flop connects to (y5 and
    x4).
  - The `fb_en` and `link_en` mode pins.
  - The array-index encoding of the programming bus.
  - The exact port-to-port order of the die's stage links.
- **Switch timing.** The switch uses one clock with a word enable instead of
  two clock domains with conversion circuits.
- **Switch pipelining.** The cut points of the pipelined arrays are this
  design's. The AND array of a 32-input crossbar has 64 dual-rail columns, so
  each segment crosses up to 22 cross-points.
- **Crossbar terms.** Crossbars have 32 product terms.
- **Shuffle order.** The inter-chip shuffle uses the standard port order.
- **Scaled device.** The projected larger die, about 110,000 gates on 2 cm x
  2 cm, is not built. `NUM_CELLS` and the cell sizes in `fpld_pkg` describe
  the fabricated die.

## How far to trust it

Every module has a self-checking testbench in `tb/`. Each testbench computes
its expected values independently of the RTL:
- sums of products evaluated in the testbench;
- cycle-accurate reference models of the cell and die pipelines;
- permutation and multicast tables traced through the network.

The testbenches check latencies as cycle counts: 3 per cell, 6 per die
network, 6 word times per crossbar, 32 line cycles per chip and 96 per
switch. Each testbench has also been run against a deliberately broken copy
of its module and reports failures there.

`tb_fpld_system_top` runs the whole design at its default sizes:
- It loads all 960 die bits several times.
- It runs the die as a Clos network (permutations, multicast, broadcast), as
  logic, and with feedback.
- It loads all three switch chips (36,864 column writes) with random
  permutations plus a multicast, and checks every channel at 96 cycles.
- It counts each of these mechanisms and fails if one never occurred.

No timing, power or area of a real process is modelled.

## Simulating

Each testbench is self-contained and prints
`TB_RESULT checks=<n> failures=<m>`. With plain Verilator 5, from the
directory above `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/fpld_pkg.sv \
        tb/tb_fpld_system_top.sv --top-module tb_fpld_system_top -Mdir obj -o sim -j 4
    ./obj/sim

Replace `fpld_system_top` with any module name to run its testbench
(`tb_pla`, `tb_fsm_cell`, `tb_wan_fpld`, ...). The package has to come first
on the command line; Verilator finds the other modules through `-Irtl`.

The full-size system testbench takes about a minute to compile and a few
seconds to run. `tb_wan_fpld` and `tb_wan_clos_switch` override the sizes to
4 crossbars of 4 x 4 so they run quickly. To change the design, edit the
parameters:
- `IN`, `TERMS`, `OUT` of `pla` and `fsm_cell`;
- `XBARS`, `PORTS`, `RATIO`, `STAGES` of `wan_fpld` and `wan_clos_switch`;
- `SW_*` of the top.

The Clos shuffle requires `XBARS == PORTS`.

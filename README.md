# A Boolean GSN neural network in programmable logic

A Goal Seeking Neuron (GSN) network is a weightless, Boolean neural network.
Each neuron is a tiny memory addressed by its inputs, and every signal can be
0, 1 or *undefined* (U). The network is trained once, in software. After
training, its contents can be frozen into plain combinational logic: a
trained network is just a Boolean function of its inputs. This RTL gives that
function two ways:

* as direct logic: four pyramids of 15 neurons each, 60 neurons in all, on 16
  binary inputs;
* on the cells of FLECHA, a small user-programmable gate array with
  three-input logic cells, a 4-line cell data bus and switch blocks. One
  pyramid takes 42 cells there, and the whole network takes 168. What the
  cells compute is set entirely by a configuration bit stream shifted into
  them.

The top, `gsn_top`, holds both side by side, plus one five-cell FLECHA row
with its bus and switches. A loader fills the cell version's configuration
after each reset. Loaded with the matching stream, the cell version
reproduces the direct version bit for bit.

## Three-valued signals

Each GSN value travels on two wires, `{one, u}`:

| value | wires |
|-------|-------|
| 0     | `00`  |
| 1     | `10`  |
| U     | `01`  |

`gsn_pkg::gsn_t` is this 2-bit type. The code `11` is never produced. An input
carrying it is read as U: the U wire wins. That choice is this design's own.

## The neuron and its recall rule

A two-input neuron has four memory positions, addressed by
`{first input, second input}`. Each position holds 0, 1 or U. The hardware
implements only **recall mode**:

* a binary input addresses one half of the memory; an input at U addresses
  both halves. So an input pair selects 1, 2 or 4 positions;
* among the selected positions, the output is 1 if the 1s outnumber the 0s,
  0 if the 0s outnumber the 1s, and U on a tie. Positions holding U count
  for neither side.

Example, memory `00:U 01:1 10:0 11:U`:

| in  | selected    | out |
|-----|-------------|-----|
| 0,1 | 01          | 1   |
| 0,U | 00, 01      | 1   |
| U,0 | 00, 10      | 0   |
| U,U | all four    | U (one 1, one 0) |

`gsn_neuron` takes the memory as a parameter (`MEM`). The learned contents
therefore become gates rather than storage. The neuron counts the votes
(`n_1`, `n_0`) and compares them.

Training (the GSN *validation* and *learning* modes) happens before the logic
is generated and is not part of this hardware.

## The pyramid and the network

`gsn_pyramid` is a binary tree of neurons:

```
e[1:0]  e[3:2]  ...  e[15:14]        16 binary inputs
  A0      A1    ...    A7            layer A (inputs only 0/1)
     B0          B1  B2   B3         layer B
          C0          C1             layer C
                D0                   layer D -> y
```

Input k of neuron An is `e[2n+k]`. Bi reads A(2i) and A(2i+1), and so on up
the tree. The default contents (`gsn_pkg::PYR_MEM_TRAINED`) are those of a
published trained pyramid:

| neuron | 00 | 01 | 10 | 11 |   | neuron | 00 | 01 | 10 | 11 |
|--------|----|----|----|----|---|--------|----|----|----|----|
| A0 | 0 | 0 | U | 0 | | B0 | 0 | U | U | U |
| A1 | 0 | U | U | 0 | | B1 | U | 0 | U | 1 |
| A2 | U | 1 | U | 0 | | B2 | 1 | U | 0 | U |
| A3 | 1 | U | 1 | 1 | | B3 | U | U | 0 | 1 |
| A4 | 0 | U | 1 | U | | C0 | 1 | 0 | U | U |
| A5 | 0 | U | U | U | | C1 | 0 | 0 | 1 | 0 |
| A6 | 1 | U | U | 1 | | D0 | U | 1 | 0 | U |
| A7 | 0 | 1 | 1 | U | | | | | | |

Over all 65536 inputs this pyramid answers 0 for 39936 of them, 1 for 6144
and U for 19456. Only six inputs can change its output: `e4`, `e5`, `e8`,
`e9`, `e14` and `e15`. The other ten feed neurons whose answers are masked
further up the tree. For example, B0 can only answer 0 or U, and C0 gives
the same answer for both, so `e0` to `e3` never matter. A logic minimiser
drops such inputs. `gsn_pyramid_tb` confirms the set by flipping each input
on every vector.

`gsn_network` puts `N_PYR = 4` pyramids on the same 16-bit input. Only one
trained pyramid is published, so by default all four carry it. Override
`MEM` (one `gsn_pyr_mem_t` per pyramid) for a real four-pyramid training.

Training can code the pattern class in binary across the pyramids, which
allows up to 2^4 classes. For that case `code[p]` is pyramid p's one-wire,
and `code_valid` is high when no pyramid is at U.

The whole network is combinational: the outputs settle four neuron delays
after the input changes. There is no clock.

## The FLECHA logic cell

`flecha_cell` follows the cell of the FLECHA array:

* **Functional block:** an 8-entry truth table `D0..D7` and an 8:1
  multiplexer addressed by the inputs: `f = D[{E3,E2,E1}]`.
* **Output block:** a D flip-flop and a 2:1 multiplexer. `S3 = 0` gives
  `out = f`; `S3 = 1` gives the value registered at the last rising edge.
* **Routing:** four multiplexers connect E1, E2, E3 and the output to the
  four bus lines. They share the two select bits, each with its own polarity:

  | mux        | line        |
  |------------|-------------|
  | A (E1)     | `{S1, S2}`  |
  | B (E2)     | `{!S1, S2}` |
  | C (E3)     | `{S1, !S2}` |
  | S (output) | `{!S1, !S2}`|

  The four therefore always use four different lines. With `S1 = S2 = 0`,
  for example, A takes line 0, C line 1, B line 2, and the output goes to
  line 3.
* **Configuration:** 11 bits, `flecha_cfg_t = {S3, S2, S1, D[7:0]}`, held in a
  shift register. While `cfg_en` is high, each rising edge shifts `cfg_in`
  into the top bit; `cfg_out` is bit 0. Cells chain `cfg_out -> cfg_in`. The
  first bit shifted into a chain ends in bit 0 of the last cell.

The following are this design's own choices: the bit orders above, one
clock shared by the chain and the user flip-flop, an asynchronous active-low
reset of the user flip-flop, and that flip-flop holding its value while
`cfg_en` is high.

## Mapping a neuron onto six cells

A neuron output wire depends on four input wires, `E0..E3`, which is one too
many for a 3-input cell. `flecha_neuron` splits each output function on `E3`:

```
            E0 E1 E2 E3
cell 1: f(E0,E1,E2, E3=0) --+
cell 2: f(E0,E1,E2, E3=1) --+-- cell 5: E3 ? cell2 : cell1  -> B0 (one-wire)
cell 3: g(E0,E1,E2, E3=0) --+
cell 4: g(E0,E1,E2, E3=1) --+-- cell 6: E3 ? cell4 : cell3  -> B1 (U-wire)
```

All six cells use `S1 = S2 = 0`. Cells 1 to 4 see the input bus
`{E3,E2,E1,E0}`. Cells 5 and 6 see `{0, E3, high half, low half}`. So cells 1
to 4 hold `D[{E1,E2,E0}] = f(E0,E1,E2,e3)`, and cells 5 and 6 hold a fixed
2:1 multiplexer table. Which wire each cell taps is this design's reading;
the source shows only six cells, their grouping and the two outputs.

A first-layer neuron has only two binary inputs. A pair of first-layer
neurons plus the second-layer neuron they feed is therefore a function of
four binary inputs with a two-wire output, and it too fits in six cells.
`flecha_pyramid` is thus seven six-cell neurons, 42 cells in all:

| chain position | neuron            | inputs `E0..E3`        |
|----------------|-------------------|------------------------|
| 0..3           | group g: A2g, A2g+1, Bg | `e[4g .. 4g+3]`  |
| 4, 5           | C0, C1            | `{B.one, B.u}` of B2j, B2j+1 |
| 6              | D0                | C0, C1                 |

The configuration stream has 462 bits. It is what a mapping tool would emit.
`flecha_pkg` computes it from the trained contents:

* `gsn_wire_table` and `group_wire_table` give the 16-entry table of each
  output wire;
* `neuron_cfg` splits these tables into the six cell words;
* `pyramid_chain` orders everything into the stream, bit 0 shifted first.

Every six-cell neuron is two cells deep, and a signal passes three of them,
so the longest path through the cell pyramid crosses six cells. At the
roughly 6 ns per cell of the FLECHA silicon, that is about 36 ns per
pyramid. The RTL does not model this delay.

Setting `reg_out` in `pyramid_chain` registers D0's cells. The pyramid output
then appears one clock cycle after the input.

`flecha_network` holds `N_PYR = 4` such pyramids, which is the whole
60-neuron network on 168 cells. All four read the same `e`. Their chains
are joined in order, `cfg_in -> pyramid 0 -> ... -> pyramid 3 -> cfg_out`,
into one 1848-bit chain. `network_chain` builds its stream. The first bits
shifted end up in pyramid 3. Like `gsn_network`, it also gives `code` and
`code_valid`.

## A cell row and its bus

The array places the cells of one function side by side in a row, so that
they talk only to their neighbours. `flecha_row` is one such row of
`N_CELLS = 5` cells:

* each cell owns a segment of the 4-line cell data bus;
* a switch block (one switch per line) sits between neighbouring segments and
  at both ends of the row. In the full array, the ends meet the central bus
  and the I/O pads. Here they are the ports `left_*` and `right_*`;
* lines joined by closed switches form one net. A net is modelled as the
  wired-OR of what drives it: cell outputs put on it by their output mux, and
  `left_i`/`right_i` through a closed end switch;
* the chain runs through switch block 0, cell 0, switch block 1, cell 1, and
  so on to switch block 5. That is 5 × 11 + 6 × 4 = 79 bits.

A configuration must not let combinational cells feed each other in a
circle. Such a circle would be a real combinational loop, just as in any
FPGA. To keep loading and power-up safe, two rules apply:

* `rst_n` clears the switch blocks;
* every switch is held open while `rst_n` is low or `cfg_en` is high.

Alone on its segment, a cell never reads the line it drives. Lint reports the
structural loop that runs through the cells and the bus; it is intended.

The wired-OR net model, the switch encoding and the rule that holds the
switches open are this design's own choices. The source does not describe
these electrical details. The full 40-cell array (eight rows, central bus,
lateral lines, I/O bus and pads) is not given in enough detail to build, and
is not included.

## Loading the configuration at power-up

`flecha_cfg_loader` fills a configuration chain by itself after reset, so
the array comes up configured without help from outside logic. When `rst_n`
is released, it asks for bit 0, 1, 2, ... of the stream on `rom_addr`, one
per clock. The source, for example a serial PROM or a small ROM, returns
that bit on `rom_bit` in the same cycle. The loader registers the bit and
shifts it into the chain in the next cycle, with `cfg_en` high. So `cfg_en`
is high for `CHAIN_LEN` cycles (1848 for the cell network), and `done` rises
`CHAIN_LEN + 1` cycles after reset. The loader then stays idle until the
next reset. The source interface, the register stage and the
one-bit-per-clock pace are this design's own choices.

## Top level

`gsn_top` has:

* `e[15:0]` into both networks;
* the network outputs `net_y`, `net_code` and `net_code_valid`;
* the cell network's chain (`cfg_en`, `cfg_in`, `cfg_out`) and its outputs
  `fl_y`, `fl_code` and `fl_code_valid`;
* the row's chain and its bus ends, `row_*`;
* the boot source of the cell network, `boot_addr` and `boot_bit`, and
  `boot_done`.

`clk`, `rst_n` and `cfg_en` are shared. After each reset the loader fills the
cell network from the boot source. While it works, the network ignores the
external `cfg_en` and `cfg_in`; once `boot_done` is high, they can reload it
at any time. The row has no boot source and must be loaded through
`row_cfg_in`. Pulse `rst_n` before use: it clears the row's switches, so an
unloaded row cannot form a loop. Until its chain is loaded, a cell's output
means nothing.

## Trust and limits

* Every neuron is checked against its full published truth table, all nine
  three-valued input pairs. The recall rule reproduces every entry of that
  table from the four binary-address entries alone.
* The pyramid, both networks and the 42-cell pyramid are checked exhaustively
  over all 65536 inputs. The reference models in the testbenches are written
  separately from the RTL: a truth-table lookup and a second majority model.
* The published propagation delays (tens of nanoseconds on FLECHA silicon)
  are properties of that chip. Nothing here models them.
* The cell network is a netlist of mapped cells. It is not placed on 40-cell
  FLECHA chips: 168 cells, or even 42 for one pyramid, exceed one chip. The
  published fit of the whole network into 34 cells of one chip used a
  logic-minimised netlist, which is not published either.
* The published recognition rates depend on 100 training patterns and on the
  contents of three further pyramids. None of these are published, so the
  rates cannot be reproduced.

## Simulating

Each testbench prints one line, `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/gsn_pkg.sv rtl/flecha_pkg.sv tb/gsn_ref_pkg.sv \
  rtl/gsn_neuron.sv rtl/gsn_pyramid.sv rtl/gsn_network.sv \
  rtl/flecha_cell.sv rtl/flecha_neuron.sv rtl/flecha_pyramid.sv \
  rtl/flecha_network.sv \
  rtl/flecha_row.sv rtl/flecha_cfg_loader.sv rtl/gsn_top.sv \
  tb/gsn_top_tb.sv --top-module gsn_top_tb
./obj_dir/Vgsn_top_tb
```

| testbench           | what it does |
|---------------------|--------------|
| `gsn_neuron_tb`     | 15 trained neurons plus an example neuron, all input pairs, code 11 |
| `gsn_pyramid_tb`    | published and alternative contents, all 65536 inputs, input relevance |
| `gsn_network_tb`    | identical and mixed pyramids, class code and valid flag |
| `flecha_cell_tb`    | 40 random configurations, routing, registered mode, chain |
| `flecha_neuron_tb`  | the seven mapped neurons exhaustively, registered D0 |
| `flecha_pyramid_tb` | 42-cell pyramid: exhaustive, reprogrammed, registered |
| `flecha_network_tb` | 168 cells, four different pyramids: exhaustive, chain length, one pyramid registered |
| `flecha_row_tb`     | 300 random loop-free row configurations against a net model |
| `flecha_cfg_loader_tb` | stream, timing and restart of the power-up loader |
| `gsn_top_tb`        | everything above end to end, at the default sizes, booted from a ROM model |

All run in well under a second. `gsn_ref_pkg` (in `tb/`) holds the
truth-table and majority reference models.

To use another trained network, override `MEM` on `gsn_network` or
`gsn_pyramid`. For the cell version, put
`flecha_pkg::network_chain(contents, reg_out)` in the boot source, or shift
it in later.

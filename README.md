# A configurable logic block for a quantum-dot cellular automata FPGA

Quantum-dot cellular automata (QCA) compute with the polarisation of
four-dot cells, not with currents. A clocked field paces the cells. The only
native logic elements are the three-input majority gate and the inverter. A
majority gate with one input tied to 0 acts as an AND gate; tied to 1, it acts
as an OR gate. This RTL describes the logic of an FPGA configurable logic block
(CLB) built from those elements. The CLB has three parts:

- a 4-input lookup table (LUT): 16 one-bit configuration cells read out by a
  tree of fifteen 2x1 multiplexers;
- a rising-edge D flip-flop that can register the LUT result;
- a 2x1 output multiplexer that chooses either the direct LUT output or its
  registered copy.

A loaded CLB computes any Boolean function of its four inputs A, B, C and D.
It gives the result either at once or one clock later. The registered mode lets
CLBs form counters, shift registers and state machines.

The RTL captures the logic function of the QCA layout, not its physics. Cell
counts, area, clock-zone latency and energy belong to the QCA layout and have no
counterpart here (see *Timing* below).

## Block structure

```
                 cfg_we / cfg_addr / cfg_data
                     |                 |
           +---------v---------+   +---v------+
 lut_in -->|  qca_lut (K = 4)  |   | mode cell|
 [A..D]    |  16 x sram_cell   |   | sram_cell|
           |  15 x mux2 tree   |   +---+------+
           +---------+---------+       | s0
                     | lut_out         |
                     +------------+    |
                     |            |    |
                 +---v---+    i0  v    v
   clk, reset -->|  dff  |--->+---------+
                 +-------+ i1 |  mux2   |---> clb_out
                              +---------+
```

| Module | File | Role |
|---|---|---|
| `clb` | `rtl/clb.sv` | top: LUT, flip-flop, output-mode cell and output mux |
| `qca_lut` | `rtl/qca_lut.sv` | K-input LUT: 2**K cells and a mux tree |
| `sram_cell` | `rtl/sram_cell.sv` | one configuration bit |
| `dff` | `rtl/dff.sv` | rising-edge D flip-flop with Q and its complement |
| `mux2` | `rtl/mux2.sv` | 2x1 multiplexer built from three majority gates and an inverter |
| `maj3` | `rtl/maj3.sv` | three-input majority gate |
| `qca_inv` | `rtl/qca_inv.sv` | inverter |
| `clb_pkg` | `rtl/clb_pkg.sv` | `LUT_K`, the output-mode enum `out_mode_e`, the address of the mode cell |

## The lookup table: which cell answers which input

The part most worth understanding is the order of the mux tree. The first
stage sits next to the 16 cells and has 8 muxes, all selected by **A**
(`lut_in[0]`). The second stage has 4 muxes selected by **B**, the third has 2
selected by **C**, and the single last mux is selected by **D**. A select of 1
takes the higher-numbered branch. So the bit that reaches `lut_out` is cell
number `{D,C,B,A}` read as a binary number:

    lut_out = truth[lut_in]        (cell i holds f for lut_in == i)

To load a function f, write `f(i)` to address `i` for `i = 0..15`. As
16-bit words (bit i = f(i)), some examples:

| Function | Table |
|---|---|
| A & B & C & D | `16'h8000` |
| A \| B \| C \| D | `16'hFFFE` |
| A ^ B ^ C ^ D | `16'h6996` |
| majority(A, B, C) | `16'hE8E8` |
| A ^ B | `16'h6666` |

Inside `qca_lut` the tree is a heap-indexed vector `node[2*2**K-1:1]`. Node 1
is the root. Nodes `2n` and `2n+1` feed node `n`. Nodes `2**K .. 2*2**K-1` are
the cell outputs. A node at depth `d` is selected by `sel[K-1-d]`.

Each `mux2` is written as `OR(AND(i0, ~s0), AND(i1, s0))`. Each AND and the OR
is a `maj3` with a constant third input, as in QCA logic. Synthesis reduces
this to an ordinary mux.

## Output mode and the flip-flop

The mux select comes from one more configuration cell, the *mode cell*:

| Mode cell | `out_mode_e` | `clb_out` |
|---|---|---|
| 0 | `OUT_COMB` | `truth[lut_in]`, same cycle |
| 1 | `OUT_REG` | `truth[lut_in]` as sampled at the previous rising edge of `clk` |

The flip-flop always registers the LUT output. The mode only chooses which of
the two paths reaches the pin. `dff` also produces the complement `q_n`. The
CLB leaves `q_n` unconnected, so lint reports it as an unused signal.

## Configuration interface

| Port | Width | Meaning |
|---|---|---|
| `clk` | 1 | flip-flop and configuration clock |
| `reset` | 1 | synchronous, active high; clears the flip-flop, all 16 table cells and the mode cell (result: combinational mode, constant 0) |
| `lut_in` | K | inputs A (bit 0) .. D (bit 3) |
| `cfg_we` | 1 | write one configuration cell on the next rising edge |
| `cfg_addr` | K+1 | 0..15: table cell; 16: mode cell |
| `cfg_data` | 1 | value written |
| `clb_out` | 1 | CLB output |

A write shows at the output one clock after the edge that stores it. An
assertion in `clb` flags writes to addresses above 16, which do not exist.
Configuration and normal operation share `clk`. A table can be rewritten while
the block runs.

## Timing

In the RTL, the LUT and the output mux are combinational and the flip-flop adds
one `clk` cycle. The QCA layout's own latencies are a different thing: the LUT
takes 2.5 QCA clock cycles, the CLB 3 cycles, 12 ps at a 4 ps QCA clock period.
Those cycles count the four-phase field clock zones that data crosses inside
the layout, the QCA equivalent of wire and gate delay. The RTL does not model
them. A synchronous implementation of this logic would see them only as
propagation delay.

## What comes from the QCA design, and what this RTL chooses

Taken from the QCA design:

- the LUT / flip-flop / output-mux structure;
- a 4-input LUT built from 2x1 muxes over SRAM cells, with A selecting the
  first stage and D the last;
- mux behaviour `Y = S0 ? I1 : I0`;
- a flip-flop that captures on the rising edge, with `Q(n+1) = D` and a Reset
  pin;
- AND and OR formed from majority gates with a fixed input.

Choices made here:

- **Cell order in the table.** Cell i answers input pattern i.
- **Configuration port.** The QCA design does not say how the SRAM cells are
  loaded. A one-bit addressed write port is used.
- **Mode cell.** What drives the output-mux select is not specified. A
  configuration cell holds it. Select 0 is the direct path.
- **Reset.** Reset is synchronous and active high. It also clears the
  configuration, not just the flip-flop.
- **Flip-flop circuit.** The QCA flip-flop is three ANDs, an OR, a delayed
  clock and feedback. Here it is an ordinary edge-triggered register with the
  same function. The flip-flop's truth table, read as levels, would describe a
  latch. The described behaviour is edge-triggered, and that reading is used.
- **Multiplexer gates.** The 7-cell QCA mux layout does not map onto a gate
  network. The AND/OR majority form above is used instead.

Not built:

- **The FPGA array and its routing.** It appears only as a grid of CLBs, with
  no switch boxes or routing configuration.
- **QCA wires and the four-phase field clock.** Both are physical and have no
  logic function.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_maj3` | all 8 input combinations; AND/OR behaviour with a fixed input |
| `tb_qca_inv` | complement |
| `tb_mux2` | all 8 combinations, then I0/I1/S0 square waves |
| `tb_sram_cell` | 500 random write/enable/reset cycles against a reference bit |
| `tb_dff` | random D with changes during the high phase (must not pass); reset; Q one cycle after each rising edge; a D-toggles-every-three-clocks pattern |
| `tb_qca_lut` | fixed, one-hot and 40 random tables, every input pattern; single-cell rewrites visible one clock later; reset clears the table |
| `tb_clb` | end to end at the default size; see below |

`tb_clb` loads several functions and about 20 random tables. In combinational
mode it checks the output in the same cycle. In registered mode it checks the
one-cycle latency, and that the output holds between edges. It switches the
mode both ways and resets the block mid-run. It also builds a one-bit toggle
counter: the registered output is fed back into A with `f = A ^ B`, so B acts
as a count enable. It counts configuration writes, combinational and
registered checks, mode switches, resets and toggles. If any of these never
happened, the test fails.

Each testbench was also run against a copy of its module broken on purpose, and
each broken copy was detected. The faults were:

- mux inputs swapped;
- tree stage order reversed;
- write enable ignored;
- flip-flop capturing on the falling edge;
- a majority term dropped;
- the inverter replaced by a buffer.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/clb_pkg.sv tb/tb_clb.sv \
          --top-module tb_clb -Mdir obj_tb_clb
./obj_tb_clb/Vtb_clb
```

`-Irtl` lets Verilator find each module in the file of the same name. Swap in another testbench and its `--top-module` to run it. Lint a module with
`verilator --lint-only -Wall rtl/clb_pkg.sv rtl/<module>.sv -Irtl`. The
testbenches initialise everything they read and use only `$urandom`, so they
also run under two-state simulation with random initial values.

## Changing it

`K` (default 4, from `clb_pkg::LUT_K`) sets the number of LUT inputs in `clb`
and `qca_lut`. The table grows to `2**K` cells and `2**K - 1` muxes. The mode
cell moves to address `2**K`, and `cfg_addr` stays `K+1` bits wide. The
testbenches are written for K = 4.

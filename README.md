# A programmable logic block with one LUT6 and one six-input macrogate

An FPGA logic block normally holds only lookup tables. A K-input LUT can
implement any function of K inputs, but it pays for this with 2^K
configuration bits and a deep multiplexer tree. A *macrogate* is a fixed
wide gate with a little programmability around it. It is smaller and faster
than a LUT of the same width, but it implements only some functions.

This design pairs the two elements in one programmable logic block (PLB):

* one 6-input LUT, and
* one 6-input macrogate.

The macrogate does not hold an arbitrary gate. It holds four fixed
six-input functions. They were chosen because, with inputs and output
negated as needed, they cover a large share of the functions that real
applications put into LUTs. For the training benchmark set the reported
figure is about half of all mapped functions. Every PLB in the array is the
same, so the usual place-and-route tools still apply. The mapping tool's
job is to keep the numbers of LUT nodes and macrogate nodes in a netlist
near 1:1, so that each PLB is fully used.

The RTL here covers the PLB: the macrogate, the LUT and the configuration
memory that programs both. The routing fabric around the blocks and the
software flow that produces a bitstream are not included.

## The macrogate

```
 in[0] ─[±]─┐                 ┌─ g1 ─┐
 in[1] ─[±]─┤                 ├─ g2 ─┤
   ...      ├── x[5:0] ───────┼─ g3 ─┼── 4-1 mux ──[±]── out
 in[5] ─[±]─┘                 └─ g4 ─┘   {L7,L6}    L8
        L0..L5
```

Each `[±]` is a programmable inverter (`prog_inv`). It is a 2-1 multiplexer
that picks a signal or its complement, controlled by one configuration cell.
The six inputs pass their inverters, cells L0 to L5. All four functions are
then evaluated on the same six bits, x[0] = a to x[5] = f. Cells L7 and L6
choose one function, and cell L8 can invert the result. A primed letter
means a complemented input:

| function | sum of products | what it is |
|---|---|---|
| g1 | abcdef | 6-input AND |
| g2 | ab'c' + bcf + bc'd + b'ce | 4-1 multiplexer: b,c = 00→a, 01→e, 10→d, 11→f |
| g3 | ab'cd'e + bcef + def | irregular; 12 of 64 minterms true |
| g4 | ab' + a'cd' + b'c' + e' + f' | irregular; 56 of 64 minterms true |

Configuration cells (`plb_pkg::mg_cfg_t`, cell Li at bit i):

| cells | bits | meaning |
|---|---|---|
| L0..L5 | 5:0 | 1 = invert input 0..5 |
| L6, L7 | 7:6 | {L7,L6} = 0,1,2,3 selects g1,g2,g3,g4 |
| L8 | 8 | 1 = invert output |

### Using it for functions with fewer inputs

Most of the macrogate's coverage comes from narrower functions. It gets
them because the router can tie an unused pin to a constant, or send one
signal to several pins. Both are ordinary pin assignments. The macrogate
logic does not change. Some examples, all checked in `tb_plb`:

| target | set-up |
|---|---|
| a'b' | g1; pins a,b ← a,b, both inverted; other pins ← 1 |
| a XOR b | g2; pin b ← b (steers), pin a ← a, pin d ← a inverted, pin c ← 0 |
| ab' + a'c' | g2; pin b ← a, pin a ← c inverted, pin d ← b inverted, pin c ← 0 |
| exactly one of a,b,c | g2; pins b,c ← b,c; pin a ← a; pins d,e ← a inverted; pin f ← 0 |

`tb_mg_coverage` searches every pin assignment exhaustively. Each pin gets
a constant or one of a, b, c, true or complemented. The search covers all
four functions and both output polarities:

| pins allowed | 2-input functions | 3-input functions | 3-input NPN classes |
|---|---|---|---|
| constants only, each variable on at most one pin | 16 of 16 | 174 of 256 | 8 of 14 |
| a variable may drive several pins | 16 of 16 | 256 of 256 | 14 of 14 |

These counts give each function once. Published coverage figures are
weighted by how often applications use each function, so they differ from
these counts.

This is the main limit compared with a LUT. A LUT's inputs can be
permuted freely. A macrogate's pins have fixed roles, so the router has
less freedom. The RTL takes no position on this. It only provides the pins.

Timing: the macrogate is purely combinational. The path from any input to
`out` is one inverter stage, one gate level, the 4-1 multiplexer and the
output inverter stage.

## The LUT

`lut` is a plain K-input table with K = 6 by default: `out = mask[in]`.
Truth-table bit i is the output for input value i. How the multiplexer
tree is built is left to synthesis.

## Configuration memory and the PLB

`plb` joins a `lut`, a `macrogate` and a `cfg_chain`. The two logic
elements are independent: each has its own input pins and its own output.
A packer can therefore place any LUT node and any macrogate node together.
There are no flip-flops on the logic outputs.

The configuration is a 73-cell shift register, 2^6 LUT bits plus 9
macrogate cells:

| word bits | content |
|---|---|
| 63:0 | LUT truth table |
| 72:64 | macrogate cells L0..L8 |

* While `cfg_en` is high, each rising `clk` shifts the word up one place.
  `cfg_si` enters at bit 0 and bit 72 leaves on `cfg_so`. Send a word most
  significant bit first. It is in place after exactly 73 enabled clocks.
* `cfg_so` can feed the next PLB's `cfg_si`, so a column of blocks forms
  one long chain.
* While `cfg_en` is low, the word holds.
* `rst_n` is a synchronous active-low reset. It clears every cell, which
  leaves a LUT that outputs 0 and a macrogate set to an uninverted 6-input
  AND.

The LUT size is the parameter `LUT_K` (default 6). The configuration length
follows it: 2^LUT_K + 9.

## What comes from the architecture and what is this design's choice

These parts follow the architecture as published:

* one LUT6 and one macrogate per PLB;
* the four functions;
* the macrogate's structure: six input inverters, four gates, a 4-1 mux
  and an output inverter, with its nine configuration cells.

These parts are this design's choices:

* which cell value inverts (1);
* the select code of each function;
* which pin is a…f (pin i = letter i);
* separate pins for the LUT and the macrogate;
* the serial configuration chain, its bit order and layout, and its reset;
* flip-flops in place of the SRAM cells a real FPGA would use.

Not built:

* **Routing.** The island-style channels and switches are not specified,
  so the element pins are ports of `plb`.
* **The mapping and packing flow.** Cut-based mapping with area weights,
  the integer-programming area recovery and the SAT-based packer are
  software. Their result is what is shifted into the configuration chain.
* **The LUT-4 comparison blocks.** The LUT4 + XOR2/MUX2 block and the
  LUT4-based macrogate variant were only used for comparison. Setting
  `LUT_K = 4` gives a LUT-4 PLB, but its macrogate stays the six-input one.

Real application sizes are far beyond one block. The benchmarks used to
judge the architecture map to about 4000 LUTs plus macrogates on average, so they
need on the order of 2000 of these PLBs and a routing fabric.

## Files

| file | content |
|---|---|
| `rtl/plb_pkg.sv` | sizes, `mg_cfg_t`, select codes |
| `rtl/prog_inv.sv` | programmable inverter |
| `rtl/mg_gates.sv` | g1..g4 |
| `rtl/macrogate.sv` | the macrogate |
| `rtl/lut.sv` | K-input LUT |
| `rtl/cfg_chain.sv` | serial configuration memory |
| `rtl/plb.sv` | top: the logic block |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mg_coverage` |

## Verification

Each testbench computes its expected values its own way and does not reuse
the RTL's expressions. It ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_prog_inv` checks all 4 cases.
* `tb_mg_gates` checks all 64 vectors. It uses a second form of each
  function: a mux for g2 and a product of sums for g4. It also checks the
  on-set sizes 1/32/12/56.
* `tb_macrogate` checks all 512 configurations × 64 input vectors.
* `tb_lut` checks 40 tables × 64 vectors.
* `tb_cfg_chain` checks the 73-cycle load latency, hold, serial output
  order and reset.
* `tb_mg_coverage` runs the exhaustive pin-assignment search above, about
  one million configurations on eight copies of the macrogate. It compares
  each one with a reference model. It checks that the reached sets are
  whole NPN classes and that the functions used as examples are reached.
* `tb_plb` runs the whole block at full size. Everything is configured
  only through the chain: 150 random configurations, each with all 128
  LUT and macrogate input vectors. It also checks the pin-assignment
  examples above, hold and reset. It counts each mechanism (load,
  pass-through, hold, each of g1..g4, input and output inversion, LUT
  evaluation, pin mapping) and fails if any of them never happened.

Every testbench was also run against a copy of its module with one
deliberate bug, and each one caught it. To run one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/plb_pkg.sv tb/tb_plb.sv --top-module tb_plb
./obj_dir/Vtb_plb
```

Every testbench finishes in well under a second.

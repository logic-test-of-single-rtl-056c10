# Single cycle access structure for logic test

Conventional scan test shifts every pattern through whole scan chains. Each
bit of a pattern costs a clock, every register toggles on every shift, and
peak power during shift is high. The single cycle access (SCA) structure
rewires the scan cells so that the registers of a chip behave like a small
memory. It has synchronous write and asynchronous read:

* A **line** is the set of registers at the same depth of all the scan chains
  of a page. With 32 chains, one line is 32 registers.
* One clock writes a whole line from the scan inputs. All other registers keep
  their values.
* The contents of the addressed line appear on the scan outputs without any
  clock. So the response in a line can be read while the next pattern is
  written into it.
* With the circuit running, one line can be watched continuously on the scan
  outputs, which is useful for debugging.

This repository holds synthesizable SystemVerilog for the three versions of
the structure:

| structure | cell | how an unaddressed line keeps its value | extra cost per cell |
|---|---|---|---|
| SCAhS (with hold mode) | `scah_ff` | a hold multiplexer in the cell, controlled by a global scan enable | two 2-to-1 muxes |
| SCAS (without hold mode) | `sca_ff` | it does not: it captures functional data during an access | one 2-to-1 mux |
| gSCAS (gated) | `sca_ff` | its line clock is stopped by a clock gate per line | one 2-to-1 mux |

The default size is the reference page of **31 lines × 32 chains = 992
registers**.

## The cells

Both cells are ordinary mux-scan flip-flops with a second output, `so`. The
scan-out multiplexer is the core of the idea:

```
so = line_selected ? Q : si
```

A cell whose line is not selected passes its scan input straight to its scan
output. Along a chain, every cell except the addressed one is therefore a wire.
This gives two effects:

* the chain's scan input reaches the addressed cell directly, so one clock
  writes it;
* the addressed cell's Q reaches the chain's scan output directly, so it is
  read with no clock.

`scah_ff` (SCAh-FF) has a two-bit scan enable, `se[0]` = global scan enable
and `se[1]` = line select:

| se[0] | se[1] | next Q | so |
|---|---|---|---|
| 0 | 0 | di (capture) | si |
| 0 | 1 | di (capture) | Q |
| 1 | 0 | Q (hold) | si |
| 1 | 1 | si (write) | Q |

`sca_ff` (SCA-FF) has only the line select `se`: with `se=1` it loads `si`,
and with `se=0` it captures `di`. It keeps the scan-out multiplexer and drops
the hold multiplexer.

## A page: lines and chains

```
           line 1        line 2              line SD
si[c] ──► [cell] ─so─► [cell] ─so─► ... ─► [cell] ─so─► so[c]     chain c
             ▲             ▲                   ▲
           ls[0]         ls[1]               ls[SD-1]  ◄── 1-out-of-N decoder ◄── add
```

* Chain `c` runs from `si[c]` through the cells at depths 1..SD to `so[c]`.
* Every cell at depth `k` gets line select `ls[k-1]`.
* The line decoder (`line_decoder`) decodes the line address `add`. Address 0
  selects no line. Address `k` (1..SD) selects line `k`. Addresses above SD
  select nothing.
* With SD = 31, a 5-bit address is used exactly.
* Functional data ports are two-dimensional, `di[line][chain]` and
  `dout[line][chain]`, with line index `l` = address `l+1`.
* The combinational logic of the circuit under test is not part of this RTL.
  It reads `dout` and drives `di`.

### SCAhS page (`scahs_page`)

| gse | add | effect at the clock edge | so during the cycle |
|---|---|---|---|
| 0 | 0 | all cells capture `di` | `si` |
| 0 | k | all cells capture `di` | line k (continuous read-out) |
| 1 | 0 | all cells hold | `si` |
| 1 | k | line k ← `si`, all others hold | old contents of line k |

A test pattern therefore takes SD clocks to load, one clock to capture and SD
clocks to unload. Unloading line k and loading the next pattern into it happen
in the same clock.

### SCAhS pages and page select (`scahs`)

Several SCAhS pages share the line address and the scan inputs. Each page
brings out its own scan outputs and has a page select `psel[p]`:

| gse | psel[p] | page p |
|---|---|---|
| 1 | 1 | test access: line `add` written and read, the rest of the page holds |
| 1 | 0 | holds, no line selected |
| 0 | 1 | one cycle of hold for the page while line `add` is written and read, so a line can be written while the chip runs |
| 0 | 0 | captures `di`; line `add` stays visible on `so[p]` |

The third row lets the structure serve as a register file that a processor or
debugger can write without stopping the other pages.

### SCAS page (`scas_page`)

There is no global scan enable. With `add=k`, line k is written and read
while every other line captures `di`. With `add=0`, everything captures. This
saves the hold multiplexer and the global scan-enable tree, at the price of
functional captures in the unaddressed lines during every access.

## The gated structure (gSCAS)

The gated structure gets the hold behaviour of the SCAhS from the small SCA-FF
cell. It does this by stopping the clock of every line that is not being
written. Its page (`gscas_page`) adds three things around the cells:

* **`gcl`**, one clock gate per line. Its enable is `ls | (~gse & ce)`:
  * a selected line is clocked and writes;
  * during a test access (`gse=1`) unselected lines get no clock and hold;
  * in functional mode or capture (`gse=0`) a line is clocked when its clock
    enable `ce` is high. Tie `ce` high if the circuit has no clock enables.

  The enable goes through a latch that is open while `clk` is low, and
  `gclk = clk & latched_enable`. This is a standard glitch-free clock gate.
  It is the only latch in the design, and it is intended.
* **`and_selector`**, the scan-in AND-selector. It registers `si & psel`.
  A page that is not selected gets all-zero scan inputs.
* **`line_decoder_and_sel`**. It registers `psel ? onehot(add) : 0`. A page
  that is not selected has no line selected.

`gscas` combines NP pages. The pages share the line address, one register for
the global scan enable, and one **XOR-tree** (`xor_tree`). An unselected page
has zero scan inputs and no line selected, so its chain outputs are all zero.
The bitwise XOR of all pages' chain outputs is therefore the selected page's
read data. No wide multiplexer or page-address decoder is needed on the output
side. At most one `psel` bit may be high; an assertion checks this.

### Timing of an access

All control inputs are registered on the way in, and the read data is
registered on the way out. An access applied before rising edge E1 goes as
follows:

| edge | what happens |
|---|---|
| E1 | `psel`, `add`, `si` and `gse` are registered. The addressed line's old contents appear on the page's chain outputs. |
| E2 | The addressed line loads the registered `si`. The XOR-tree registers the old contents, which are on `so` after E2. |

* Accesses can be issued every clock, one line per clock. Each read result
  comes out one clock after the next access is issued.
* A change of `gse` also takes effect one clock late. A capture applied
  before E1 happens at E2.
* `ce` comes straight from the circuit's logic and is not delayed.

In simulation, the gated cells are clocked by `gclk`, which is derived from
`clk` by an AND gate. The register stages in front of them are clocked by `clk`
directly. The testbenches show that the gated cells sample the data present
before the edge. On silicon the usual clock-tree balancing between `clk` and
the gated line clocks is needed.

## Reset

Every register has an asynchronous active-low reset `rst_n`, so the cells of
the gated structure are cleared even while their line clock is stopped.

In simulation, start `rst_n` high and then drive it low. The flip-flops react
to the falling edge, and a gated cell gets no clock edge that could apply a
reset held low from time 0.

## Modules

| module | role |
|---|---|
| `sca_pkg` | reference sizes (31, 32) and `addr_width()` |
| `scah_ff`, `sca_ff` | the two cells |
| `line_decoder` | 1-out-of-N line decoder, address 0 = none |
| `scahs_page`, `scas_page` | pages of the two ungated structures |
| `scahs` | NP SCAhS pages with page selects |
| `and_selector`, `line_decoder_and_sel`, `gcl`, `xor_tree` | parts of the gated structure |
| `gscas_page`, `gscas` | one gated page; NP gated pages with XOR-tree |
| `sca_top` | all three structures side by side, ports prefixed `h_`, `s_`, `g_` |

### Parameters

| parameter | default | meaning |
|---|---|---|
| `SD` | 31 | lines per page (scan depth) |
| `SW` | 32 | chains per page (scan width) |
| `NP` | 1 | pages of the SCAhS and of the gated structure |
| `AW` | `addr_width(SD)` = 5 | line address width |

Larger designs take more pages (`NP`) or larger pages. The 992-register
reference fits one page of each structure. A circuit such as the largest
ISCAS'89 benchmark (about 1.6k flip-flops) needs `NP=2` in the gated
structure.

## Simulation

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl rtl/sca_pkg.sv tb/sca_top_tb.sv \
          --top-module sca_top_tb -Mdir obj_top
./obj_top/Vsca_top_tb
```

* The testbenches use a small stand-in function for the circuit under test:
  each line captures the next line rotated by one bit, XOR a per-line
  constant.
* Each testbench compares every register and every scan output against an
  independent cycle-accurate reference model after every clock.
* `sca_top_tb` runs all three structures at the default size. It does three
  complete load / capture / unload operations each, plus continuous read-out
  during capture, SCAhS line writes in functional mode, idle test cycles,
  gated captures and deselected-page accesses. Each of these mechanisms is
  counted and must occur.
* `scahs_tb` covers two SCAhS pages. `gscas_tb` covers two gated pages and
  the XOR-tree merging.
* All testbenches pass. Each one also fails when a single deliberate error
  is put into its module.
* Power, switching activity and test-cycle counts on real benchmark circuits
  are properties of the method. They are not measured here.

## What follows the source description and what is this design's own

Taken from the source description of the structure:

* the SCAh-FF (two muxes around a scan flip-flop, 2-bit scan enable, scan
  output);
* the line and chain wiring with a 1-out-of-N decoder;
* address 0 = no line;
* the 31 × 32 reference page;
* the SCA-FF with one scan enable driven by the line select;
* the gated structure's parts (AND-selector, line decoder with AND selector,
  per-line clock gate with clock enable and global scan enable, XOR-tree) and
  the clock pins on them.

Choices made here where the description is silent:

* the reset style;
* the binary address encoding;
* which multiplexer the SCA-FF keeps (the scan-out one);
* the clock-gate enable equation and its latch;
* one register stage each in the AND-selector, the line decoder, the
  global-scan-enable register and the XOR-tree, which gives the two-clock
  access latency;
* XOR-ing the pages bit by bit;
* one clock enable per line;
* a single page by default in both paged structures;
* how the SCAhS page select acts (it forces the page's scan enable and
  passes the address) and separate scan outputs per SCAhS page.

Not built:

* the circuit under test itself;
* the address-controlled BIST and the trigger units for the read-out stream,
  which are only mentioned as options;
* the ATPG software side, such as pattern ordering to reduce activity.

# Clock-free NCL adder on a programmable nanowire crossbar

Nanowire crossbars are dense but hard to make precise. Self-assembled wires
come with large delay variations and many defects, and a global clock network
with tight timing margins fits such a fabric badly. This design does without a
clock. Every signal uses Null Convention Logic (NCL), a delay-insensitive
dual-rail code. Every gate is a threshold gate with hysteresis, programmed into
a small diode crossbar. Pipeline stages synchronise through local
request/acknowledge handshakes. The circuit computes as fast as its wires
allow, and a slow wire never produces a wrong result.

The RTL models the crossbar at the level of programmed crosspoints. It
contains:

- the programmable gate macro block (PGMB);
- the routing fabric, a grid of PGMBs;
- a dual-rail full adder mapped onto a 2x2 fabric;
- the NCL register, itself built from PGMBs;
- the top level: a clock-free adder pipeline, input register bank → crossbar
  adder → output register bank.

All of it is synthesizable SystemVerilog. Nothing in it uses a clock.

## Signals: DATA, NULL and the four-phase handshake

Each logical bit travels on two rails, `(r1, r0)`, held in the struct
`ncl_pkg::dr_t`:

| r1 r0 | meaning |
|-------|---------|
| 0 0   | NULL (spacer, "no data yet") |
| 0 1   | DATA 0 |
| 1 0   | DATA 1 |
| 1 1   | illegal; only a fault produces it |

A computation is a *DATA wavefront*: every input bit goes from NULL to a DATA
code, in any order and with any delay. The wavefront is followed by a *NULL
wavefront*, in which every bit goes back to NULL. Gates are built so that a
block's outputs cannot all become DATA until all its inputs are DATA. They
also cannot all return to NULL until all its inputs are NULL. Completion
can therefore be read from the data itself.

Registers hand wavefronts on with a single-rail acknowledge per direction:

- `Ko` goes from a register to the stage before it.
- `Ki` comes into a register from the stage after it.
- `Ko = 1` means "request for data": the register holds NULL and will accept
  DATA.
- `Ko = 0` means "request for null": the register holds DATA and wants NULL
  next.

One transfer takes four phases:

1. DATA arrives and passes because `Ki = 1`.
2. The register's `Ko` falls.
3. NULL arrives and passes once the next stage has dropped `Ki`.
4. `Ko` rises again.

## Threshold gates in a programmable gate macro block

This part is the hardest to read in the RTL, so it is explained in the most
detail.

An NCL threshold gate THmn has n inputs and threshold m, and some inputs may
carry integer weights: TH34w2 has four inputs, threshold 3, and weight 2 on
input A. Its output rises when the weighted count of asserted inputs
reaches m. It then stays high until *every* input is low again. This
hysteresis gives NCL its completeness properties. As a sum of products:

    Z = set(A,B,C,D) + (A + B + C + D) · Z*

Here `Z*` is the gate's previous output. For example, TH23 is
`Z = AB + BC + CA + (A + B + C)·Z*`.

A PGMB (`rtl/pgmb.sv`) realises this in a diode crossbar:

- **AND plane.** There are `PGMB_PT = 10` vertical product-term wires, each
  pulled up. Five horizontal rows cross them: the inputs A–D and a feedback
  row that carries the gate's own output. A programmed diode at a crossing
  pulls the column low whenever its row is low. Each column is therefore the
  AND of the rows programmed on it.
- **OR plane.** One pulled-down output row ORs the columns programmed onto
  it. That row is `Z`, and it also drives the feedback row.

The programming is the struct `pgmb_cfg_t`:

- `and_in[p][i]`: input row i crosses column p;
- `and_fb[p]`: the feedback row crosses column p;
- `or_pt[p]`: column p is summed into Z.

`ncl_pkg::th_cfg(n, m, w0, w1, w2, w3)` computes the programming of any
weighted threshold gate:

- Each *minimal* input subset whose weight reaches m becomes one set column.
- Each input whose own weight is below m becomes one hold column, `x_i · Z*`.

Some sizes:

| gate   | columns used |
|--------|--------------|
| TH23   | 6 |
| TH34w2 | 8 |
| TH24   | 10 (the most of any weighted threshold gate) |

That is why the block has ten columns. `th_cfg` produces the 24 weighted
threshold gates of the usual 27-gate NCL library. The three other gates in
that library are not threshold functions, and `th_cfg` does not produce them.

**How the feedback is modelled.** A wire from Z back into the plane is a
combinational loop. Simulators and synthesis tools handle such loops poorly.
`pgmb` therefore evaluates the plane twice:

- `set`: the value with the feedback row at 0;
- `hold`: the value with the feedback row at 1.

A level-sensitive latch then closes the loop: `Z ← 1` if `set`, `Z ← 0` if
not `hold`, otherwise Z keeps its value. For any monotone programming, which
includes every threshold gate, this gives the same function as the wired
loop. This latch is the only state-holding element in the design. Tools
report it as a latch, and they report loops through the routing fabric and
the handshake. Those loops are intended and are explained in the source
comments.

`rst` forces every gate output to 0, so the whole circuit starts at NULL with
every `Ko` requesting data. The architecture itself names no reset; this one
was added so that simulation and silicon start in a defined state.

## Fabric and routing

`rtl/pgmb_fabric.sv` is a `ROWS × COLS` grid of PGMBs that share `N_TRK`
routing nanowires ("tracks"). Three programmable crosspoint arrays connect
them, all instances of `rtl/xbar.sv`:

1. **Sources → tracks.** The sources are the PGMB outputs (indices 0..NG-1)
   followed by the primary inputs (the input stage). `src_cfg` places each
   source on a track.
2. **Tracks → gate rows.** `row_cfg` connects each PGMB input row to a track.
   Gate g, row i, is index `g*4 + i`.
3. **Tracks → outputs.** `out_cfg` taps tracks onto the output wires.

A crosspoint is a diode onto a pulled-down wire. If more than one crosspoint
is programmed on one wire, the wire carries the OR of their signals. Routing
a signal means programming exactly one crosspoint per wire. The
configuration is made of static input ports; programming the crosspoints
electrically is outside this model.

## The full adder (`ncl_fa_xbar`)

Four gates on a 2×2 fabric with 10 tracks:

| position     | gate   | inputs (first one has weight 2) | output |
|--------------|--------|---------------------------------|--------|
| row 1, col 1 | TH23   | a0, b0, c0                      | co0 |
| row 1, col 2 | TH23   | a1, b1, c1                      | co1 |
| row 2, col 1 | TH34w2 | **co1**, c0, a0, b0             | s0  |
| row 2, col 2 | TH34w2 | **co0**, c1, a1, b1             | s1  |

The input rails enter on tracks 4–9 (`a0 a1 b0 b1 c0 c1`) and the gate outputs
drive tracks 0–3. The TH23 gates leave their fourth row unused.

The carry is a majority function. The sum gate gets the opposite-rail carry
with weight 2. For example, s1 asserts when the carry is 0 and at least one
input is 1, which means exactly one input is 1. It also asserts, without the
carry, when all three inputs are 1.

A single output, such as the carry, may return to NULL before every input has
done so. The sum and carry together never do.

## NCL register and the pipeline

`ncl_reg1` is a 1-bit register on a 2×2 fabric with three gates:

- **Row 1:** TH12 (completion) and TH22 (rail 0).
- **Row 2, below the rail-0 TH22:** TH22 (rail 1).
- The fourth block is unused.

Each TH22 combines its data rail with `Ki`. `Ko` is the complement of
`TH12(q0, q1)`. A diode crossbar cannot invert, so this single inversion is
placed at the block's output.

`ncl_reg` groups N such bits under one `Ki`. It merges their `Ko` signals with
a chain of TH22 gates, so the bank's `Ko` changes only after every bit has
changed.

`ncl_xbar_adder` (the top) connects:

    environment ─a,b,ci→ [ncl_reg N=2W+1] → [ncl_ripple_adder W] → [ncl_reg N=W+1] ─s,co→ environment
               ←──ko────                 ←──────── Ki/Ko ────────               ←──ki──

`WIDTH` defaults to 1, a single full adder. For `WIDTH > 1`,
`ncl_ripple_adder` chains crossbar full adders through their dual-rail carry.

No timing is fixed. The latency is the sum of the gate and wire delays along
the path: one TH23 level per bit of carry ripple and one TH34w2 level for the
sum in the adder, plus one TH22 level per register and the completion chain.

## Faults

NCL makes some defects visible without any timing analysis:

- A rail stuck at 1 can never return to NULL, so the handshake halts.
- A rail stuck at 1 beside an asserted partner rail shows the illegal code
  11.
- A rail stuck at 0 is found only by a pattern that needs that rail: the
  DATA wavefront then never completes.

`tb_ncl_xbar_adder_faults` demonstrates each of these on the adder's carry
gates.

## What follows the architecture and what is this design's own

These parts follow the architecture:

- dual-rail NULL/DATA signalling;
- PGMBs made of an AND plane, an OR plane and feedback;
- a grid of PGMBs with programmable routing crosspoints and an input stage;
- TH23/TH34w2 placement and the adder netlist;
- a register of two TH22 gates and one TH12;
- the Ki/Ko request-for-data / request-for-null handshake.

These are this design's own choices:

- **Which code means which DATA value.** 01 is DATA0 and 10 is DATA1. The
  architecture fixes only NULL = 00 and that 11 is invalid.
- **PGMB size.** Ten product-term columns were chosen so that every weighted
  threshold gate fits.
- **Gate equations other than TH23.** TH34w2 and the others are read from
  the gate names: weights on the leading inputs.
- **Adder details.** The weight-2 carry input of the sum gates, and which
  rail sits in which column.
- **Fabric layout.** The track count (10 for the adder, 7 for the register),
  the track numbering, and the split into three crosspoint arrays.
- **Diode model.** Several crosspoints on one wire are read as a wired-OR.
- **Feedback model.** The latch model of the feedback wire.
- **Reset.** The `rst` input.
- **Ko inversion.** The inverter on `Ko`.
- **Bank completion.** The TH22 chain that merges the Ko signals of a
  register bank.
- **Multi-bit adder.** The ripple-carry adder for `WIDTH > 1`. The
  architecture only mentions multi-bit adders as feasible.

These parts are not modelled:

- the analog parts: pull-up and pull-down resistors (only their logic effect
  is modelled) and the buffering stages that restore signal strength in large
  grids;
- how crosspoints are programmed.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_ncl_xbar_adder \
        -y rtl -y tb +libext+.sv -Irtl rtl/ncl_pkg.sv tb/tb_ncl_xbar_adder.sv
    ./obj_dir/Vtb_ncl_xbar_adder

To run another bench, replace the name. Warnings about latches and circular
logic are expected; see above.

| testbench | what it shows |
|-----------|---------------|
| `tb_pgmb` | all 24 weighted threshold gates, programmed by `th_cfg`, against a weighted-sum reference with hysteresis |
| `tb_xbar` | wired-OR crosspoint array with random programmings |
| `tb_pgmb_fabric` | a two-level network programmed into the fabric, driven by NCL-style wavefronts |
| `tb_ncl_fa_xbar` | all operand combinations, inputs arriving and leaving in random order, no illegal code |
| `tb_ncl_reg1` | handshake phases and a random protocol-following walk |
| `tb_ncl_reg` | 3-bit bank: Ko changes only after the last bit |
| `tb_ncl_ripple_adder` | 4-bit adder: results, and that the outputs cannot complete early |
| `tb_ncl_xbar_adder` | the default 1-bit pipeline end to end |
| `tb_ncl_xbar_adder_wide` | the same environment at WIDTH = 4 |
| `tb_ncl_xbar_adder_faults` | stuck-at-1 halts or shows code 11; stuck-at-0 halts on the first pattern that needs the rail |

The two end-to-end benches push 400 words through the pipeline. A random
producer and a random consumer sit at the two ends, and the consumer
sometimes stalls. The benches count DATA and NULL wavefronts, requests for
data and for null, stalls, and back-pressure events. They require each to
occur, and they check that outputs hold steady during a stall.

## Files

- `rtl/ncl_pkg.sv`: types, PGMB geometry, `th_cfg`
- `rtl/pgmb.sv`: programmable gate macro block
- `rtl/xbar.sv`: crosspoint array
- `rtl/pgmb_fabric.sv`: PGMB grid with routing
- `rtl/ncl_fa_xbar.sv`: full adder on the fabric
- `rtl/ncl_reg1.sv`, `rtl/ncl_reg.sv`: NCL register cell and bank
- `rtl/ncl_ripple_adder.sv`: multi-bit adder
- `rtl/ncl_xbar_adder.sv`: top-level pipeline
- `tb/`: the testbenches listed above

# Reversible-logic adders, multipliers and a GCD controller

Reversible logic builds every function from gates whose outputs determine
their inputs uniquely: an n-input gate has n outputs, and no information is
thrown away. The motivation is energy. Landauer's principle puts a lower bound
of kT·ln 2 per erased bit on irreversible logic, and a circuit that erases
nothing avoids that bound. Reversible circuits have constant inputs tied to 0
or 1 and garbage outputs that exist only to keep the mapping one-to-one.

This RTL implements the circuits of the paper *Application of Reversible Logic
in Implement of High Speed Low Power Combinational and Sequential Circuits*.
Each circuit is written out as instances of reversible gates:

* a 4-bit and a 16-bit ripple-carry adder from HNG gates;
* an 8x8 Wallace tree multiplier from TSG and Peres gates, and a 16x16
  multiplier made of four of them;
* a 16:1 multiplexer as a tree of Fredkin gates;
* a D latch and a D flip-flop from Fredkin and Feynman gates;
* the control unit of an 8-bit GCD processor (Euclid's algorithm by repeated
  subtract, compare and swap), plus a datapath for it.

The paper gives the gate types and the block structure of these circuits, but
not every connection. Where this RTL fills a gap, the choice is named below
and in the opening comment of the file concerned.

Everything is synthesizable SystemVerilog. The gates are ordinary
combinational logic, so a synthesis tool will merge and re-optimise them. The
reversible structure lives in the source, not in the netlist that comes out.

## The gates

| gate | module | inputs → outputs | used as |
|---|---|---|---|
| Feynman (CNOT) | `feynman_gate` | A,B → A, A⊕B | copy (B=0), NOT (B=1), XOR |
| Peres | `peres_gate` | A,B,C → A, A⊕B, AB⊕C | half adder or AND (C=0) |
| Fredkin | `fredkin_gate` | A,B,C → A, A?C:B, A?B:C | 2:1 mux on the second output |
| HNG | `hng_gate` | A,B,C,D → A, B, A⊕B⊕C, (A⊕B)C⊕AB⊕D | full adder (D=0): sum, carry |
| TSG | `tsg_gate` | A,B,C,D → A, Ā·C̄⊕B̄, that⊕D, (that)·D⊕(AB⊕C) | full adder (C=0) on A,B,D |

The paper names each gate's role but does not print the gate equations. The
equations above are the standard definitions of these gates.

## Adders: `ripple_reversible`, `reversible_16_bit_rca`

`ripple_reversible` is a WIDTH-bit ripple adder (default 4). Each bit is one
HNG gate with D tied to 0. R is the sum, and S is the carry into the next bit.
The HNG carry is (A⊕B)·C ⊕ AB, so the incoming carry passes through only one
AND and one XOR per bit. This is the short critical path that the paper
credits for the speed of the reversible adder.

`reversible_16_bit_rca` chains four 4-bit slices. Its ports are `a[15:0]`,
`b[15:0]`, `cin`, `sum[15:0]` and `co`. The GCD datapath uses an 8-bit
`ripple_reversible` as its subtractor.

## Multipliers

### 8x8 Wallace tree: `reversible_wallace_tree`

The multiplier follows the three textbook Wallace steps:

1. **Partial products.** 64 Peres gates with C=0 form `a[j] & b[i]` on their
   R outputs. Each bit goes to column i+j, the column of weight 2^(i+j).
2. **Reduction.** Each layer works column by column. Every group of three bits
   in a column goes to a TSG full adder. A leftover pair goes to a Peres half
   adder, and a leftover single bit passes through. Sums stay in their
   column, and carries move one column up. For 8x8 the tallest column shrinks
   from 8 to 6, 4, 3 and finally 2 bits, in four layers.
3. **Final addition.** A 16-bit ripple adder adds the last two rows. Bit 0 is
   a Peres half adder and bits 1–15 are TSG full adders.

The column heights of each layer, and therefore the gate count and wiring,
are computed at elaboration by small constant functions (`kept`, `sent`,
`layer_heights`).
Each layer lives in its own generate stage (`g_stage[l].col`), so the arrays
between layers have one writer each. Carries out of column 15 are dropped.
This is exact, because an 8x8 product fits in 16 bits.

The paper's schematic uses TSG and Peres cells in a triangular arrangement.
This RTL follows the same three steps with the same two cells. Its placement
of cells follows the classic Wallace grouping rule, not a copy of the
schematic.

### 16x16: `reversible_wallace_tree_16_bit`

The 16x16 multiplier uses four 8x8 trees (`k1`–`k4`) and three 16-bit adders
(`r1`–`r3`), as in the paper's schematic. With the halves `AH, AL, BH, BL`:

```
LL = AL*BL   HL = AH*BL   LH = AL*BH   HH = AH*BH
r1: {c1, M}  = HL + LH
r2: {c2, S}  = M + {HH[7:0], LL[15:8]}     -> product[23:8]
r3:            HH[15:8] + c1 + c2          -> product[31:24]
product[7:0] = LL[7:0]
```

The wiring above between the seven blocks is this design's.

## 16:1 multiplexer: `mux_16_1_reversible_new`

The multiplexer is a tree of 15 Fredkin gates in columns of 8, 4, 2 and 1.
Column k is steered by `s[k]`, and `y = i[s]`. The 8-4-2-1 tree is the
paper's. Which select bit drives which column is this design's choice.

The GCD control unit reuses this mux as a universal logic element: each of
its next-state bits is one 16:1 mux.

## Storage: `fredkin_gate_d_latch`, `d_flip_flop`

This is the least obvious part of the design.

**Latch.** An inverter drives the Fredkin control with `~en`, so the
Fredkin's second output is `en ? d : q`. A Feynman copier (B=0) splits that
value. One copy is fed back into the Fredkin gate and holds the bit while
`en` is low. A second Feynman gate (B=1) produces `q_bar`. The gate chain and
the feedback are the paper's. The storing node is written as `always_latch`,
so that tools infer a latch rather than an unexplained loop. Verilator's lint
still reports the feedback as circular logic (UNOPTFLAT). This is expected:
the loop only carries a value while the latch is closed.

**Flip-flop.** The paper's `d_flip_flop` (ports `clk`, `d`, `q`, `q_bar`)
contains a single Fredkin latch, which is level-sensitive. A controller needs
edge-triggered state, so `d_flip_flop` here is a master-slave pair. The
master is open while `clk` is low and the slave while it is high, which gives
a rising-edge flip-flop. It has no reset.

All state in the GCD processor, in both the controller and the datapath, is
held in these flip-flops, which are pairs of latches. Do not mix them with
`always_ff` registers on the same clock in simulation. An `always_ff` block
may see the slave latch's new value in the same time step and race with it.

## GCD processor

### Algorithm and timing

`gcd_processor` (WIDTH = 8) computes gcd(a, b) with Euclid's algorithm by
subtraction:

```
IDLE --start--> LOAD --> TEST
TEST:  Y == 0 -> DONE ; X < Y -> SWAP ; else -> SUB
SWAP --> SUB --> TEST          (X,Y) <- (Y,X), then X <- X - Y
DONE --start--> LOAD ; otherwise stays in DONE with done = 1, gcd = X
```

* gcd(a, 0) = a and gcd(0, 0) = 0.
* Counting from the edge that samples `start`, `done` rises after
  3 + 2·(number of subtractions) + (number of swaps) rising edges.
* The worst 8-bit case is gcd(254, 255): 518 cycles.
* `rst` is synchronous and active high. Hold it for one rising edge after
  power-up, because the flip-flops have no reset of their own.

### Control unit: `control_unit` = `ff_unit` + `regen_unit` + `op_unit`

The split into three units (u1, u2, u3) follows the paper. The paper gives
only the units' names, so their contents are this design's:

* **`ff_unit`** holds the 3-bit state in three `d_flip_flop`s.
* **`regen_unit`** computes the next state (encoding in `gcd_pkg`: IDLE=0,
  LOAD=1, TEST=2, SWAP=3, SUB=4, DONE=5). Each next-state bit is a 16:1
  Fredkin mux selected by `{rst, state}`. Its upper eight inputs are 0, so
  reset gives IDLE. Its lower eight inputs hold the bit's value in each
  state, built from `start`, `y_zero` and `x_lt_y` with Peres ANDs and
  Feynman NOTs. An OR is Peres plus Feynman: (a⊕b)⊕ab. Codes 6 and 7 go to
  IDLE.
* **`op_unit`** decodes the state into the Moore outputs `ld`, `swap`, `sub`
  and `done`. Each output is a three-input AND made of two Peres gates. An
  assertion checks that at most one of them is high.

The fan-out-of-one rule of strict reversible design is not enforced. Signals
with several loads are wired directly instead of through Feynman copy gates.

### Datapath: `gcd_datapath`

The paper does not design the datapath; it says only what it must do. This
datapath has two WIDTH-bit registers, X and Y, built from `d_flip_flop`s. It
has a single HNG ripple adder that computes X + ~Y + 1. The result is the new
X for `sub`, and its carry-out, inverted, is the compare flag `x_lt_y`. So one
circuit does both the subtract and the compare. `y_zero` flags Y == 0. A
concurrent assertion checks that `sub` never fires while X < Y.

## Top: `reversible_circuits_top`

The paper presents separate circuits, not one system. The top therefore
places them side by side, each with its own ports:

* the 16-bit adder (`add_*`);
* the 16x16 multiplier (`mul_*`);
* the mux (`mux_*`);
* a stand-alone D flip-flop (`dff_*`);
* the GCD processor (`gcd_*`, `rst`).

The flip-flop and the GCD processor share `clk`.

## Simulating

Each module `X` has a self-checking testbench `tb/tb_X.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. The adders, the gates and
the 8x8 multiplier are checked exhaustively. The wider blocks get corner cases
plus thousands of random vectors. The GCD testbench checks both the result
and the exact cycle count of every run.

`tb_reversible_circuits_top` runs the top at its default parameters. It
counts how often each mechanism occurs and fails if one never does. The
mechanisms are adder carry-out, products above 16 bits, every mux select,
flip-flop hold, GCD swap, subtract, Y = 0, restart from DONE, and reset.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/gcd_pkg.sv tb/tb_reversible_circuits_top.sv \
    --top-module tb_reversible_circuits_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other block. `gcd_pkg.sv` must come
first, because the control unit's files import it.

Lint reports unused garbage outputs of the gates. These are inherent to
reversible logic and harmless.

## Where this design departs from the paper, or goes beyond it

* The gate equations (HNG, TSG, Peres, Fredkin, Feynman) are the standard
  definitions. The paper names the gates without their equations.
* Peres gates as the partial-product AND gates are this design's choice.
* The Wallace reduction uses the classic grouping rule. It does not copy the
  paper's cell placement.
* The 16x16 wiring between its four multipliers and three adders is this
  design's.
* `d_flip_flop` is master-slave (two latches), where the paper's schematic
  shows one latch.
* The GCD states, encoding, handshake and reset, and the gate-level contents
  of `regen_unit` and `op_unit`, are this design's.
* `gcd_datapath` is this design's. The paper designs only the control unit.
* The paper also mentions a reversible Urdhva Tiryakbhayam (Vedic) multiplier
  but gives no structure for it. It is not implemented.
* The non-reversible adders and multipliers that the paper compares against
  are not included.
* No power or delay figures are reproduced. Synthesis flattens the gates, so
  the speed and power advantages the paper reports cannot be measured on this
  RTL as it stands.

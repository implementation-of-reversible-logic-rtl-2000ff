# Reversible Feynman and TR gates, and 1-bit comparators, in QCA majority logic

Reversible logic loses no information: every output pattern corresponds to
exactly one input pattern. This matters in Quantum-dot Cellular Automata
(QCA), a nanotechnology where logic is built from cells of four quantum dots
and computed by the *majority gate*, the *inverter* and the *clocked wire*.
This library models four small reversible QCA circuits as synthesizable
SystemVerilog, gate for gate:

| Design | Module | Function | Latency |
|---|---|---|---|
| Feynman (controlled-NOT) gate, 2x2 | `feynman_gate` | P = A, Q = A xor B | 0.5 QCA cycle = 2 zones |
| Thapliyal-Ranganathan (TR) gate, 3x3 | `tr_gate` | P = A, Q = A xor B, R = AB xor C | 1 QCA cycle = 4 zones |
| 1-bit comparator on a Feynman gate | `comparator_fg` | Y1 = AB', Y2 = A nor B, Y3 = A'B | 0.5 QCA cycle = 2 zones |
| 1-bit comparator on a TR gate | `comparator_tr` | as above, plus garbage output g = AB | 0.5 QCA cycle = 2 zones |

The Feynman gate is the compact form (three majority gates, 51 cells in its
layout against 65 for the older form, half a clock cycle instead of one).
The older form is not modelled.

## Majority logic: how each gate is built

Everything reduces to one primitive, `qca_majority`: y = ab + bc + ca. In a
QCA layout one input of a majority gate is often a *fixed cell* whose
polarization is pinned at -1 or +1. Reading -1 as logic 0 and +1 as logic 1:

- maj(x, y, 0) = x AND y
- maj(x, y, 1) = x OR y

Every gate in the library is written as majority gates with such fixed
inputs (`POL_NEG`, `POL_POS` in `qca_pkg`) and `qca_inverter` instances.

**Feynman gate.** Two AND-type majority gates and one OR-type:

    Q = maj( maj(A, ~B, 0), maj(~A, B, 0), 1 )  = A xor B
    P = A

**TR gate.** The Feynman gate above gives P and Q. One more AND-type gate
forms AB. The second exclusive-OR, of AB with C, uses fixed cells +1, -1, +1:

    o = maj(AB, C, 1)            OR
    n = maj(AB, C, 0)            AND
    R = ~maj(~o, n, 1)           = ~((~(AB|C)) | (AB&C)) = AB xor C

The fixed polarities of each majority gate come from the published cell
layouts. Where the inverters sit cannot be read from those layouts. The
inverter placement is this library's choice, picked so that each gate
computes its specified function with those fixed polarities.

**Comparators.** A Feynman gate gives P = A and Q = A xor B, and all three
comparator outputs follow from P and Q alone:

    Y1 = maj(P, Q, 0)     = A and (A xor B) = A B'     (A > B)
    Y3 = maj(~P, Q, 0)    = ~A and (A xor B) = A' B    (A < B)
    Y2 = ~maj(P, Q, 1)    = ~(A or (A xor B)) = A nor B

`comparator_tr` does the same with a TR gate whose C input is held at 0. The
TR gate's third output is then R = AB. It carries no comparison result.
Reversible designs keep such *garbage outputs*, so this one is brought out as
`g`.

**Y2 is a NOR, not an equality flag.** The specification gives Y2 = A NOR B.
That is 1 only for A = B = 0, not for A = B = 1. The RTL implements the NOR
as specified. A true equality output would be ~Q (A xnor B). Add it if you
need one.

## Clock zones and latency

QCA has no wires in the CMOS sense. Data moves from one *clock zone* to the
next under a four-phase clock (zones 0, 1, 2, 3, then the cycle repeats).
Each zone holds its value while the next one switches. This library models
that as follows:

- one rising edge of `clk` stands for one clock zone, a quarter QCA cycle;
- `qca_wire #(WIDTH, ZONES)` is a ZONES-stage shift register, so data
  crossing it arrives exactly ZONES edges later;
- each gate computes its function combinationally and then passes it through
  a `qca_wire` of `DELAY_ZONES` zones.

The default latencies in `qca_pkg` are the published delays times four
zones per cycle. The Feynman gate and both comparators take 2 zones; the TR
gate takes 4. Every design accepts a new input on every edge, as a QCA
pipeline does. When a gate is nested inside another (the Feynman gate inside
the TR gate and the comparator, the TR gate inside `comparator_tr`), it is
instantiated with `DELAY_ZONES = 0`. Only the outer design's own latency
then applies. That choice matters for `comparator_tr`: its published delay
(half a cycle) is shorter than that of the TR gate alone (one cycle), and
the model follows each published figure for its own design.

This is a timing model, not a cell-level one. It does not reproduce
which cell sits in which zone, and real QCA zone boundaries inside a gate
are not modelled. Treat the latencies as the end-to-end figures they are.

`rst_n` is asynchronous and active low. It clears every zone register to 0,
which stands for polarization -1. After reset, an output shows 0 until
the first input has crossed all the zones. The comparator's Y2 is therefore
0 during that time, although Y2 is 1 for inputs A = B = 0.

## Top level

`qca_reversible_top` holds one instance of each of the four designs side by
side. They do not feed one another. Each has its own input pins and output
struct (`feynman_out_t`, `tr_out_t`, `cmp_out_t` from `qca_pkg`); all share
`clk` and `rst_n`. The top has no parameters.

## Files

`rtl/`:

- `qca_pkg.sv`: zone counts, latencies, fixed-cell constants, output structs
- `qca_majority.sv`, `qca_inverter.sv`, `qca_wire.sv`: the QCA primitives
- `feynman_gate.sv`, `tr_gate.sv`: the two reversible gates
- `comparator_fg.sv`, `comparator_tr.sv`: the two comparators
- `qca_reversible_top.sv`: all four together

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each one
drives a new input on every clock edge. The inputs are every combination
first, then random. Each output is compared with a reference computed in the
testbench from the input applied exactly the design's latency earlier. That
checks the function, the latency and back-to-back throughput together. The
gate testbenches also run each gate backwards, recovering the inputs from
the outputs. `tb_qca_reversible_top` runs all four designs at once at default
parameters for 2000 edges, resets them mid-stream, and fails if any input
combination, any comparator outcome or the reset never occurred. Each
testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl --top-module tb_qca_reversible_top \
        rtl/qca_pkg.sv rtl/*.sv tb/tb_qca_reversible_top.sv
    ./obj_dir/Vtb_qca_reversible_top

Change the top module and the testbench file to run any other testbench.
`verilator --lint-only -Wall rtl/qca_pkg.sv rtl/*.sv` lints the library. It
reports `clk` and `rst_n` as unused in zero-delay instances of `qca_wire`.
That is expected.

## Departures and limits

- Cell counts and areas (Feynman 51 cells, 0.07 um^2; TR 113 cells,
  0.20 um^2; comparators 87 and 134 cells) describe QCA layouts and have no
  RTL counterpart.
- The register-per-zone timing model, the reset, the inverter placement, the
  derivation of comparator outputs from P and Q, and the garbage port `g` are
  this library's choices.
- For the TR-based comparator the specification also states Y3 = AB in one
  place. The RTL uses Y3 = A'B, which matches the A < B meaning and the
  Feynman-based comparator.
- The physical QCA cell and the four-phase clock generator are not modelled.
  The clock is represented only by `clk`, one edge per zone.

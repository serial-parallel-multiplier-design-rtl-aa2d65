# Serial-parallel multipliers for quantum-dot cellular automata

Quantum-dot cellular automata (QCA) compute with cells that hold one bit each
as the position of two electrons. Their only logic gates are the inverter and
the three-input majority gate, and every wire is clocked. A wire is cut into
clock zones. A zone latches its value while its phase of a four-phase clock is
active, so each wire segment is also a pipeline register. Long, irregular wiring
therefore costs both area and latency. A parallel array multiplier suits QCA
badly. A serial-parallel multiplier suits it well: a row of identical cells
with short local wires.

This RTL models two such multipliers at the level of QCA clock zones:

* **CSM, carry shift multiplier.** Each column passes its carry to the next
  higher column in the same step. Latency: 1.25 QCA clocks.
* **CDM, carry delay multiplier.** Each column keeps its own carry for one
  clock and adds it back into itself (carry save). Latency: 1 QCA clock.

In both, the N-bit multiplicand B is applied in parallel and held. The
multiplier A enters one bit per QCA clock, least significant bit first. The
2N-bit product leaves the same way, one bit per clock, LSB first.

The networks come from treating the multiplier as an FIR filter. B holds the
coefficients and A is the input sample stream. The filter's delay elements are
then placed and counted in clock zones. Where a register sits in this RTL, and
how long each path is, follows those zone counts exactly.

## Using a multiplier

To multiply two N-bit words:

1. Apply B.
2. Send the N bits of A, LSB first.
3. Send N zero bits.

During those 2N bit times the output delivers the 2N product bits, LSB first.
After the last zero the network holds no state. The next operation can start
on the very next bit, so the rate is one N×N product every 2N QCA clocks.

B is read by each column when the operand bit reaches that column. It must stay
stable from the first bit of A until the last bit of A has passed the top
column: N zone steps for the CSM, 2N−1 for the CDM. That is well inside the
trailing zeros, so changing B together with the first bit of the next
operation is safe.

The CSM has one extra serial input, `cin`, which enters the carry input of the
lowest column. Its stream is added to the product, so the CSM computes
A·B + CIN. If CIN has at most N bits, the result still fits in 2N bits. Tie
`cin` to 0 for a plain product.

## The clock-zone model

This is the part most worth understanding before reading the code.

* **One `clk` edge is one clock phase.** Four edges make one QCA clock. The
  networks are written with D = one zone delay (a quarter clock), so D⁴ is one
  QCA clock.
* **Zone registers.** A delay of D^k is a chain of k registers
  (`qca_zone_delay`). Register m of a chain belongs to one of the four zones,
  and it loads only on the edge where its zone is enabled. The enables are
  one-hot and rotate 0, 1, 2, 3, 0, … (`qca_clock_phase`). A value therefore
  moves forward one zone per edge, and then stays in each register for a full
  QCA clock, as a latched QCA wire does.
  Both multipliers assert that exactly one zone is enabled on every edge.
* **Zone numbers.** The zone of every register follows from its distance to
  the serial input. A register that is d zone steps from `a_in` latches in
  zone (d−1) mod 4. So `a_in` is captured on a zone-0 edge. The three inputs of
  every full adder always come from registers of one zone. This is what lets
  the two networks stay consistent in time while their columns are skewed
  against each other.
* **Gates have no delay of their own.** The majority gates (AND, full adder)
  are combinational between two zone registers. All delay sits in the D
  elements of the networks.

Seen from outside (the top-level `phase` output says which zone latches on the
next edge):

| event | edge |
|---|---|
| present A bit k (and CIN bit k); hold it for four edges | while `phase` = 0 |
| A bit k captured | edge 4k (zone 0) |
| CIN bit k used | edge 4k+2 |
| CDM product bit k appears | after edge 4k+3; held 4 edges |
| CSM product bit k appears | after edge 4k+4; held 4 edges |

Counted from the moment a bit is presented, the CDM output follows 4 zone
steps later (1 clock) and the CSM output 5 zone steps later (1.25 clocks).
These are the latencies the multipliers were designed for, and they do not
depend on N.

A side effect of the model: a value waits in its register until its zone comes
round again. As a result, a delay line that is too short by less than a whole
clock does not show up as a wrong result. A path that is a whole clock too
long or too short does.

## Carry shift network (`qca_csm_multiplier`)

Column j (0 ≤ j < N) holds the full adder for bit b_j. Counted in zone steps
from `a_in`:

```
(s_j, c_j) = FA( b_j & a delayed j+2,  s_(j+1) delayed 3,  c_(j-1) delayed 1 )
```

* **Operand wire.** The A bit passes one zone before column 0 and then one
  zone per column. Each AND (a majority gate with one input fixed to 0) is
  followed by one zone.
* **Carry shift.** A carry moves to the next higher column after one zone. In
  the same QCA clock step it is added at the same weight, so the carry ripples
  up through all N columns. The ripple is skewed one zone per column, along the
  same diagonal the A bit travels, so nothing waits.
* **Sums.** A sum moves one column down after three zones: one clock step
  later, one weight lower. This is the shift of the accumulator.
* **Top column.** It has no sum coming from above. Instead its own carry
  returns after four zones (one clock), which is the carry-out of the
  accumulator shifted into its top bit.
* **Bottom column.** Its carry input is `cin`. Its sum reaches `p_out` after
  three more zones, five zones from `a_in` in all.

Per QCA clock this is acc ← (acc >> 1) + a_k·B + cin_k. The bit shifted out is
the product bit.

## Carry delay network (`qca_cdm_multiplier`)

```
(s_j, c_j) = FA( b_j & a delayed 2j+2,  s_(j+1) delayed 2,  c_j delayed 4 )
```

* **Operand wire.** The A bit passes one zone before column 0 and two zones
  per column after that.
* **Sums.** A sum takes two zones to reach the column below.
* **Carry delay.** Each column's carry goes back into the same column after
  four zones, one QCA clock later, at the next higher weight. No carry ever
  crosses a column, which is why the critical loop is short.
* **Top column.** It has nothing to add, so it has no adder. Its partial
  product goes straight on to column N−2. There are N−1 full adders.
* **Output.** Column 0's sum reaches `p_out` after two zones, four zones in
  all.

## Gates

* `qca_majority_gate`: M(a,b,c) = ab + bc + ca. With one input fixed to 0 it
  is an AND; fixed to 1 it is an OR.
* `qca_full_adder`: three majority gates and two inverters:
  cout = M(x,y,z) and sum = M(¬cout, z, M(x,y,¬z)). The networks only call for
  "an adder". This arrangement is this design's choice, as the smallest full
  adder built from majority gates alone.

## Top level (`qca_sp_multiplier_top`)

The two multipliers stand side by side. They share one phase generator, clock
and reset, and each has its own ports: `csm_b`, `csm_a`, `csm_cin`, `csm_p`
and `cdm_b`, `cdm_a`, `cdm_p`. The output `phase` tells the driver when to
present the next serial bit. There is one parameter: `N`, the operand width
(default 32, minimum 2).

## Files

| file | contents |
|---|---|
| `rtl/qca_pkg.sv` | zone count, one-hot zone type, zone-number helper |
| `rtl/qca_clock_phase.sv` | four-phase clock: rotating one-hot zone enables |
| `rtl/qca_zone_delay.sv` | D^k: a wire of k clock zones |
| `rtl/qca_majority_gate.sv` | majority gate (also AND / OR) |
| `rtl/qca_full_adder.sv` | majority-gate full adder |
| `rtl/qca_csm_multiplier.sv` | carry shift multiplier |
| `rtl/qca_cdm_multiplier.sv` | carry delay multiplier |
| `rtl/qca_sp_multiplier_top.sv` | both multipliers under one clock |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_qca_multiplier_sizes.sv`, `tb/qca_mult_checker.sv` | both multipliers at 4, 8, 16, 32 and 64 bits |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/qca_pkg.sv \
    tb/tb_qca_sp_multiplier_top.sv --top-module tb_qca_sp_multiplier_top
./obj_dir/Vtb_qca_sp_multiplier_top
```

Replace the testbench name to run another one. Each testbench takes well under
a second.

What is checked:

* **Products and latency.** The multiplier testbenches stream back-to-back
  operations: all ones × all ones, single bits, MSB × MSB and random words.
  The CSM testbenches also use random CIN streams. At every falling clock edge
  they compare the output with the bit that must be there, taken from ordinary
  integer arithmetic. This checks each product bit and pins the latency to
  exactly 5 (CSM) or 4 (CDM) zone steps.
* **Top level.** `tb_qca_sp_multiplier_top` runs the top at its default
  N = 32 with no parameter changes. It also counts how often each mechanism
  occurred and fails if any never did:
  * every clock zone latching
  * a carry crossing a CSM column
  * the CSM top column taking its own carry back
  * serial carry-in
  * a CDM delayed carry being added back
  * back-to-back operations
  * a change of B between operations
* **Sizes.** `tb_qca_multiplier_sizes` runs both multipliers at all five
  published sizes, 4 to 64 bits, side by side.
* **Gates.** The gate and adder testbenches are exhaustive.

## How far it follows the source design

Taken from the published design:

* the right-to-right CSM and CDM networks and every delay count in them
* the majority-gate AND
* the four-phase clocking with one zone = a quarter clock
* the latencies, 1.25 and 1 QCA clocks
* the set of word sizes

This design's own choices:

* **Clock model.** One clk edge per phase, and zones modelled as enabled
  registers.
* **Full adder.** Its internal gate structure.
* **Reset.** An asynchronous active-low reset that clears every zone.
* **`cin` on the CSM.** The network drawing ties the lowest carry input to 0,
  but the 4-bit CSM cell layout brings it out as a pin. Here it is a port.
* **Operand framing.** N bits of A followed by N zeros, following the
  published bit-product example. So is the rule for when B may change.
* **Default width.** N = 32, the largest width laid out; 4, 8, 16 and 64 were
  also evaluated.

Not modelled:

* **Physical properties.** Cell geometry, the limit of cells per clock zone,
  multi-layer wire crossings, and the area and cell counts of the layouts
  (roughly 400 to 500 cells at 4 bits and 4,300 to 4,600 at 32 bits).
* **Right-to-left networks.** These variants carry the sum in the same
  direction as the operand. Their latency grows with N (3N+2 and 2N+2 zones),
  and they were only derived for comparison.
* **"Modified" block diagrams.** These flip alternate adders for layout and
  do not change the logic.

Synthesising the RTL gives an ordinary clocked pipeline with the same
cycle-level behaviour as the QCA networks. It is a functional and timing
reference for them, not a QCA layout.

# Power-managed three-partition example design

Some parts of this small combinational design can lose their power while the
rest keeps running. A one-bit full adder and a one-bit comparator feed a third
partition, `m3`. Each of the three partitions lives in its own power domain:

| Partition | Instance | Domain    | Supply                                   | Can be off? |
|-----------|----------|-----------|------------------------------------------|-------------|
| P1        | `adder`  | `PD_TOP`  | `VDD1`, 1.8 V                            | no          |
| P2        | `comp`   | `PD_COMP` | `VDD2`, 1.0 V, a separate supply         | yes         |
| P3        | `m3`     | `PD_MOD`  | `VDD1_sw`: `VDD1` through switch `SW`, control `swCtl` | yes         |

The functional logic is trivial. The interesting part is what has to sit
around it so that a domain can be switched off, and how that behaviour is made
visible in an ordinary two-state simulation. The RTL covers:

* a comparator domain that runs at a lower voltage than its reader, so its
  outputs pass through a level shifter;
* isolation that clamps the comparator's outputs to 0 while its domain is
  powered down;
* a header switch that powers `m3`'s domain on and off;
* a table of the legal supply combinations, decoded in hardware;
* a generic state-retention register, placed beside the example.

## Signal flow

```
in1,in2,in3 ──► adder ──sum──┬──────────────────────────────► sum
               (PD_TOP)      ├──────────────────────────────► p3_a (m3.A)
                             └─Cout─────────────────────────► p3_c (m3.C)

in4,in5 ──► comp ──{G,E,L}──► level shifter ──► isolation ──┬─L─► p3_b (m3.B)
           (PD_COMP, 1.0 V)   1.0 V → 1.8 V    clamp 0 when ├─E─► equal
                                               iso_en = 1   └─G─► p3_d (m3.D)

VDD1 ──► switch SW (swCtl) ──► VDD1_sw  (supply of m3's domain)
```

`m3` takes the sum, the carry-out and the comparator's L and G flags and
drives two outputs, `out1` and `out2`. Its logic function is not known, so
`m3` is not part of this RTL. `design_top` brings out its four input signals
(`p3_a`..`p3_d`) and its switched supply `VDD1_sw`, so that a model of `m3`
can be attached outside.

## How supplies and power loss are modelled

A two-state simulator has no X and no notion of a supply net. So every supply
here is a plain struct, `lp_pkg::supply_t`: an `on` bit plus a voltage in
millivolts. The design's port states map onto it as follows:

| Port state | Value               |
|------------|---------------------|
| `ON_18`    | `{1, 1800}`         |
| `ON_10`    | `{1, 1000}`         |
| `ON_00`    | `{1, 0}` (ground)   |
| `OFF`      | `{0, 0}`            |

A domain counts as **powered** when its power net is on and its ground net is
on at 0 V (`lp_pkg::powered`). An unpowered domain does not leave its outputs
unknown. Instead, `pd_corrupt` drives every output bit to `CORRUPT_BIT = 1`.
All ones was chosen for two reasons:

* it differs from the isolation clamp value (0);
* on the comparator it is an impossible flag pattern: L, E and G all set at once.

So in any waveform you can tell a live value, a corrupted value and a clamped
value apart.

## The crossing out of `PD_COMP`

This is the part of the design where the order of the cells matters. Every
comparator output leaves a 1.0 V domain that can be switched off, and enters
always-on 1.8 V logic. On the way out it passes three stages in this order:

1. **`pd_corrupt`**: the domain's own output. It is all ones while `VDD2` is
   off.
2. **`level_shifter`**: logically a buffer. Its output is valid only while the
   input-side supply (`VDD2`), the output-side supply (`VDD1`) and ground are
   all on. Otherwise it reads all ones. While it is live, an assertion checks
   that the input-side voltage is inside the cell's 0.9 V to 1.1 V input
   range. The cell works in either direction.
3. **`isolation_cell`**: sits on the always-on supply `VDD1`. While `iso_en`
   is 1 it outputs 0; otherwise it passes its input. Like any cell, it reads
   all ones if its own supply is off.

The isolation cell comes after the level shifter because the shifter is itself
dead when `VDD2` is off. Only a clamp downstream of it can hide that. The
documented strategy places both cells at the domain's outputs and does not fix
their order; this order is a design decision of this RTL.

Two related points:

* The comparator's *inputs* `in4` and `in5` come from 1.8 V logic but are not
  level shifted. The level-shifter strategy covers outputs only.
* The outputs of `m3`'s domain are not isolated. No isolation strategy exists
  for that domain.

### Power-down sequence

The comparator domain must be powered down and up in this order:

```
iso_en = 1  →  VDD2 off  …  VDD2 on  →  iso_en = 0
```

`design_top` asserts that `iso_en` is 1 whenever `VDD2` is off while `VDD1` is
on. Nothing inside the design sequences these signals: `iso_en` and `swCtl`
are top-level inputs, to be driven by an outside power controller (the
testbench here).

## Power state table

Only four supply combinations are legal. `VDD1` is always `ON_18` and `VSS`
is always `ON_00`:

| Row       | VDD2  | VDD1_sw | Meaning             |
|-----------|-------|---------|---------------------|
| `state_1` | ON_10 | ON_18   | all on              |
| `state_2` | OFF   | ON_18   | comparator off      |
| `state_3` | ON_10 | OFF     | `m3` off            |
| `state_4` | OFF   | OFF     | both off            |

`pst_monitor` decodes the four supplies into one of these rows. It reports
`PST_ILLEGAL` with `pst_legal = 0` for any other combination, for example
`VDD1` off or `VDD2` at the wrong voltage. In a power-intent flow this table
only guides the implementation tools; decoding it in RTL makes it visible in
simulation.

## Power switch

`power_switch` copies its input supply, both the on state and the voltage, to
its output while `swctrl` is 1. While `swctrl` is 0 its output is off. In the
design, the input is `VDD1`, the output is `VDD1_sw` and the control is
`swCtl`. It switches with no ramp time.

## Retention register

`retention_cell` is a generic state-retention flop. It is not part of the
example's power intent, which uses only isolation and level shifting. It sits
in `design_top` on its own pins (`ret_*`):

* **Supplies:** the flop runs on `vdd`; a shadow copy runs on `vret`.
* **On each rising `clk` edge:**
  * `save` copies Q into the shadow;
  * `restore` loads the shadow back into the flop, and wins over `save`;
  * otherwise the flop loads D.
* **`vdd` drops:** Q reads all ones.
* **`vret` drops:** the shadow is lost as well.

Timing both save and restore on the clock edge is a choice of this model. The
cell's description names the pins but not their timing.

## Modules

| File | Kind | What it is |
|------|------|------------|
| `rtl/lp_pkg.sv` | package | supply struct, voltages, power-table enum, helpers |
| `rtl/adder.sv` | RTL | one-bit full adder (P1) |
| `rtl/comp.sv` | RTL | comparator; `WIDTH` parameter, default 1 (P2) |
| `rtl/isolation_cell.sv` | RTL | output clamp; `CLAMP_VALUE` = 0, `SENSE_HIGH` = 1 |
| `rtl/pst_monitor.sv` | RTL | power-state-table decoder |
| `rtl/pd_corrupt.sv` | behavioural | output corruption of an unpowered domain |
| `rtl/level_shifter.sv` | behavioural | level shifter with supply dependence and input-range check |
| `rtl/power_switch.sv` | behavioural | header switch |
| `rtl/retention_cell.sv` | behavioural | retention flop with shadow storage |
| `rtl/design_top.sv` | RTL | the top level |

The behavioural models stand in for analog or supply-dependent cells. Their
logic is synthesizable, but their supply inputs have no physical meaning in a
netlist.

## Simulating

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a cycle watchdog. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/lp_pkg.sv rtl/design_top.sv \
          tb/tb_design_top.sv --top-module tb_design_top
./obj_dir/Vtb_design_top
```

`tb_design_top` runs the whole design at its default parameters:

* all 32 input combinations in every power state;
* isolation with the comparator both powered and unpowered;
* power-down and power-up of the comparator domain;
* switching `m3`'s domain off and on;
* all four power-table rows;
* an illegal `VDD1`-off state, where the always-on outputs read corrupt;
* four save/power-down/restore cycles of the retention register.

It also applies the two input vectors of the original design's reference
waveform: `in1 = in2 = 1` with `in3` going from 1 to 0, and `in4` going from 1
to 0 with `in5` going from 0 to 1. It checks `sum`, the carry, L, G and
`equal` against the values published for that waveform. It counts how often
each mechanism happened and fails if any never did.

## Limits and departures

* **`m3` is missing.** Its output logic is not known, so `out1` and `out2` do
  not exist in this RTL.
* **The adder and comparator functions are inferred.** They follow from the
  block names and pin names (A, B, Cin, sum, Cout; A, B, L, E, G). They agree
  with the published waveform values, but no equation for them was given.
* **Isolation polarity.** The library description of the isolation cell gives
  its function as `data AND EN`, which passes data while EN is 1. The
  isolation strategy says active-high isolation with clamp 0. This RTL follows
  the strategy: `iso_en = 1` clamps.
* **Voltages and delays.** Voltages are bookkeeping only, used by the
  level-shifter range check and the power-table decoder. Cell delays and
  switch ramp times are not modelled.
* **Corruption is all ones, not X.** Logic that happens to expect 1 on a dead
  line will not notice the corruption.

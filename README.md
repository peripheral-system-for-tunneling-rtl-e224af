# Peripheral system for a 16 x 16 TFET content addressable memory

A content addressable memory (CAM) is searched by content: a search word is
broadcast to every stored row at once, and the memory returns the address of
the row that holds it. This RTL models the peripheral circuits around a
16 x 16 CAM array built from tunnelling field-effect transistors (TFETs). It
does not model the array itself. The TFET cells need searchline voltages far above the logic
supply: about 7 V for a '1' and 0 V for a '0'. Most of this design is
therefore about getting a 1.8 V digital search word onto the high-voltage
searchlines and turning the weak matchline signals back into a digital
address.

The system has four parts:

| Part | Module | Kind |
|---|---|---|
| Search data register: scan chain with trigger latches | `search_data_register` (`scan_ff`, `scan_latch`) | synthesizable RTL |
| High voltage switch, one per searchline | `hv_switch` | behavioural model (analog) |
| Matchline sense amplifier, one per matchline | `ml_sense_amp` | behavioural model (analog) |
| 16-to-4 priority encoder | `priority_encoder` | synthesizable RTL |

`cam_peripheral_top` wires them together. Constants shared by all of them are
in `cam_periph_pkg`.

## The CAM cell seen from the periphery

Each cell holds one bit as two TFET memory elements in opposite states. One
element's gate is on the searchline SL and the other's is on its complement
SLB. Both drains sit on the row's matchline ML. An erased element conducts
when its gate is at the high search level. A programmed one does not. For a stored '1', the SL
element is programmed and the SLB element erased. For a stored '0', it is the
other way round. The result:

| stored | SL / SLB | ML |
|---|---|---|
| 0 | 0 / 1 | stays high: match |
| 0 | 1 / 0 | discharged: mismatch |
| 1 | 0 / 1 | discharged: mismatch |
| 1 | 1 / 0 | stays high: match |

A row matches only if none of its 16 cells conducts. A mismatching cell draws
about 100 nA. The matchline is precharged to about 1 V, because the TFET drain
read voltage is VDD − VTHN with VDD = 1.8 V.

## One search, step by step

All control pins of `cam_peripheral_top` come from outside the chip (in the
measured system, an FPGA board). A complete search is:

1. **Shift in the key.** Hold `se = 0` and apply 16 bits at `sl_in`, one per
   rising `clk` edge. Apply the bit for SL15 first. After 16 clocks, scan stage
   *i* holds key bit *i*.
2. **Trigger.** Pulse `trigger`. The 16 trigger latches copy the stages
   together and drive the digital searchline bits `sl`. While `trigger` is
   low, the latches hold their value. The chain can then shift without
   disturbing the searchlines.
3. **Drive the searchlines.** For each column, one `hv_switch` drives `sl_v[c]`
   and a second drives `slb_v[c]` from the complement. A rising searchline
   reaches 7 V after 210 ns. A falling one reaches 0 V after 145 ns.
4. **Sense.** Pulse `mlsa_rst` to clear all sense latches. Then pulse `pch` to
   precharge every matchline to 1 V. Release it and let the array discharge
   the mismatching lines (the testbench waits 1 µs). Then pulse `lat`. Every
   sense latch whose matchline is still above the trip point flips, so
   `mlso[r] = 1` marks a match.
5. **Encode.** `addr` is the highest-numbered matching row at all times.
6. **Read out.** Hold `se = 1` for one clock. Stages 0..3 capture `addr[0..3]`
   and stages 4..15 capture a fixed test pattern (stage *i* gets *i* mod 2).
   Then shift 16 clocks with `se = 0`. `scan_out` first gives the 12 pattern
   bits, then `addr[3]`, `addr[2]`, `addr[1]`, `addr[0]`.

The same chain thus carries the search word in and the result out. The
pattern bits let the chain itself be tested.

## Search data register

`scan_ff` is a 2:1 multiplexer in front of a D flip-flop. `se = 1` selects
the SI input and `se = 0` the DI input. In the chain, DI is the previous
stage, so `se = 0` shifts. SI is an encoder bit or a constant, so `se = 1`
captures. The flip-flops have no reset: shifting defines their content.
`scan_latch` is level-sensitive. It is transparent while `trigger` is high
and cleared by `latch_rst`, which wins over `trigger`. These 16 latches are
intended, so synthesis reports latches.

## Priority encoder

Several rows can match at once. The encoder resolves this by reporting only
the highest-numbered matching row. Each output is a two-level sum of products:

```
Y3 = D15 + D14 + ... + D8
Y2 = D15 + D14 + D13 + D12 + D11'D10'D9'D8'(D7 + D6 + D5 + D4)
Y1 = D15 + D14 + D13'D12'(D11 + D10)
     + D13'D12'D9'D8'(D7 + D6 + D5'D4'D3 + D5'D4'D2)
Y0 = D15 + D14'D13 + D14'D12'(D11 + D10'D9)
     + D14'D12'D10'D8'(D7 + D6'D5 + D6'D4'D3 + D6'D4'D2'D1)
```

D0 does not appear. With no match the output is 0, the same as a match on
row 0: the circuit has no "match found" flag. Software that needs to tell
the two apart must know from elsewhere whether row 0 can match.

## Analog behavioural models

`hv_switch` and `ml_sense_amp` stand in for transistor circuits. They keep
those circuits' pins and use `real` voltages. They are for simulation only.
Synthesis tools cannot read them.

- **`hv_switch`**: a cascoded level shifter with a V_HIGH rail, a VPP
  cascode bias and a separate V_LOW stage for '0'. The model slews `vout`
  linearly towards `v_high` (for `vin = 1`) or `v_low` (for `vin = 0`). It
  covers the full swing in `T_RISE` = 210 ns or `T_FALL` = 145 ns, and updates
  every `STEP_NS` = 1 ns. It prints a message once if the rails are not ordered
  `v_low < v_pp < v_high`. The 210 ns and 145 ns are measured transition times.
  The linear shape is a simplification.
- **`ml_sense_amp`**: an NMOS precharge device, a latch flipped through two
  series NMOS devices gated by ML and LAT, and an NMOS reset device. An NMOS is
  used for precharge because the line only needs VDD − VTHN. The model owns the
  matchline node. It treats the node as a capacitor `C_LINE` = 100 fF,
  discharged by the current `ml_i` that the array draws. `V_TRIP` is 0.5 V. With these
  numbers, one mismatching cell (100 nA) pulls the line below the trip point in
  0.5 µs. The capacitance and the trip point are estimates, not measured
  values. Change them to fit a real array.
  An assertion reports PCH and LAT being high at the same time, since that
  would sense a line that is still being precharged.

The CAM array is not part of this RTL. The top exposes the array side as
`real` ports: `sl_v`/`slb_v` out, and `ml_i` (current drawn per matchline) in.
`tb/tfet_cam_array_model.sv` is a simple array model for the testbenches.

## Where this model departs from, or goes beyond, the circuit description

The following are choices made for this RTL, not taken from the circuit
description:

- the SE polarity of the scan flip-flop (1 = capture);
- the alternating test pattern;
- the serial output taken at the last stage;
- the clear value 0 of the trigger latches;
- each SLB switch driven by the complement of its column's bit;
- the linear ramps of the switch model;
- the matchline capacitance and trip point;
- the ramp of the matchline, which the model treats as a current-driven node;
- every control timing used in the testbenches: a 100 ns clock, a 100 ns
  precharge pulse, 1 µs of evaluation and a 20 ns LAT pulse.

The encoder equations, the chain structure, the voltage levels, the
transition times and the four-step sensing sequence follow the circuit
description. Energy (about 63 pJ per search in circuit simulation) and silicon
area are not modelled.

## Simulating

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog stops it
if it hangs. All testbenches run at the default sizes. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/cam_periph_pkg.sv tb/tb_cam_peripheral_top.sv \
  --top-module tb_cam_peripheral_top -o sim
./obj_dir/sim
```

For a unit testbench, change the testbench file and `--top-module`. Timing
control (`--timing`) is needed because the analog models use delays.
Verilator may warn that it detects no latch in the `always_latch` blocks of
`scan_latch` and `ml_sense_amp`. Both blocks are latches by design, and the
testbenches check that they hold their value.

| Testbench | What it checks |
|---|---|
| `tb_scan_ff` | mux select and flop over random inputs |
| `tb_scan_latch` | transparency, hold, clear |
| `tb_search_data_register` | shift, trigger, hold while shifting, capture, serial readout order |
| `tb_priority_encoder` | all 65,536 inputs against a highest-set-bit reference |
| `tb_hv_switch` | 7 V / 0 V levels, 210 ns rise and 145 ns fall, raised low rail |
| `tb_ml_sense_amp` | precharge level, match / mismatch decisions, hold until reset |
| `tb_cam_peripheral_top` | 12 random searches through the array model, plus three forced-matchline cases |

The forced-matchline cases hold chosen matchlines high independently of the
array:

| High matchlines | Expected address |
|---|---|
| ML2 | 2 |
| ML11 and ML2 | 11 |
| ML15, ML11 and ML2 | 15 |

The end-to-end testbench counts each mechanism it must exercise and fails if
one never happens. The mechanisms are:

- shift, trigger and latch clear;
- searchline rise and fall, including their timing;
- match, mismatch, several matches and no match;
- capture and readout;
- forced matchlines.

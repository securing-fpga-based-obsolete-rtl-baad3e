# Trojan-resistant FPGA replacement of an obsolete part

When a part of a long-lived (legacy) system wears out and is no longer made, an FPGA can take
its place. The FPGA vendor and its CAD tools can't be trusted, though. A tool can quietly add
logic in unused slices, change pin settings, or tamper with the placed design, and none of
this shows up in the HDL. This RTL wraps the replacement function in two run-time defences:

* **Runtime pin grounding (RPG).** Every user I/O pin the function does not need gets a name in
  the top level and a pull-down in the pin constraints. A Trojan could use such a pin as a
  trigger input or a leak output. The pull-down alone is not enough, because the tool can undo
  it. So the design NORs all those pins in logic every clock and raises `pin_alarm` if any pin
  is ever not at ground.
* **Hardware moving target defence (HMTD).** The function (the *module to replace*, MTR) is
  built several times, as replicas CP_0..CP_3. Every clock an on-chip random generator picks
  two different replicas. Only those two get the operands, and their results are compared.
  If they agree, the result goes out. If they differ, the outputs are grounded and
  `trojan_flag` is set for good. The pair changes from cycle to cycle, and the replicas are
  meant to be placed far apart. A tool that plants a Trojan in one copy therefore can't know
  which copy will be checked against it. To get a wrong result through, it would have to
  corrupt two copies in exactly the same way.

Here the replaced part is the ISCAS'85 **c6288** function, a 16x16 unsigned multiplier
(32 inputs, 32 outputs). The default pin count matches a Spartan-6 XC6SLX16 in the CSG324
package (Nexys-3 board), which has 232 user I/O pins. The top uses 68 of them and checks the
other 164.

## Structure

```
             u2_a,u2_b (from legacy unit U2)
                    |
 lfsr_rng --rnd--> rin_unit --rep_in[0..3]--> mtr_c6288 x4 (g_cp[k])
                    | sel_a, sel_b                 | rep_out[0..3]
                    +---------------------------> rout_unit --out_a,out_b--> ccu --> u1_p (to U1)
                                                                              \--> trojan_flag
 unused_pins[163:0] --> rpg_checker --> pin_alarm
```

| file | role |
|---|---|
| `rtl/hmtd_pkg.sv` | widths, replica count, pin budget, the pair-selection function |
| `rtl/mtr_c6288.sv` | one replica: a carry-save array multiplier |
| `rtl/lfsr_rng.sv` | 16-bit Galois LFSR, taps 0xB400, period 65535 |
| `rtl/rin_unit.sv` | Rin: picks the pair, feeds the operands to those two replicas, gives the rest zero |
| `rtl/rout_unit.sv` | Rout: muxes the two selected replica outputs |
| `rtl/ccu.sv` | consistency checking unit: compare, pass or ground, sticky flag |
| `rtl/rpg_checker.sv` | NOR of the unused pins, sampled each clock, sticky alarm |
| `rtl/secure_mtr_top.sv` | top level, wires all of the above |

## Replica selection

Each cycle the random word `rnd` (the LFSR state held in that cycle) sets the pair:

* `sel_a = rnd[7:0] mod NUM_REP`
* `sel_b = (sel_a + 1 + (rnd[15:8] mod (NUM_REP-1))) mod NUM_REP`

The offset is between 1 and NUM_REP-1, so `sel_b` never equals `sel_a`. With 4 replicas all 12
ordered pairs (6 unordered ones) occur. The LFSR distribution makes them not exactly equally
likely. `rin_unit` carries an assertion that the two indices differ.

Rin gives the operands only to the two selected replicas. The other replicas get all-zero
inputs, so they do not switch: this is input gating, which saves power. A sequential MTR
would need its state restored when a gated replica comes back into use. The c6288 function
is combinational, so nothing of the kind is needed here.

## Timing and termination

* Operands applied before a rising edge are compared and registered on that edge. `u1_p`
  holds their product for the following cycle, so the latency is one clock, and a new
  operation can start every clock.
* The LFSR steps every clock, so consecutive operations usually use different pairs.
* On a mismatch, the `u1_p` register loads zero instead of the result, so the differing
  value never reaches U1. `trojan_flag` rises in the same cycle. After that the CCU keeps the
  output at zero and the flag high until `rst_n` is asserted (synchronous, active low): the
  replacement has stopped itself. Assertions in `ccu.sv` check that the flag is sticky and
  that the output stays grounded while it is set.
* `pin_alarm` rises one clock after any unused pin is seen high and stays high until reset.
  The alarm does not affect the datapath; wire it to whatever response the system needs.
  The current NOR result is also there, as `u_rpg.pins_grounded`, but it is not a top
  port: that keeps the pin count at 232.

## Design choices beyond the basic scheme

The scheme fixes the structure: RPG by a NOR of named unused pins checked every clock; HMTD
by replicas, random choice of two, input gating, output comparison, grounding of the
outputs and a detection flag. These points are this design's own choices:

* 4 replicas (the scheme just says "multiple"). `NUM_REP` can be 2 or more.
* An LFSR as the "low-cost" random generator. Its seed is the `SEED` parameter, loaded at
  reset; a zero seed is replaced by 1. Every reset restarts the same pair sequence. If that
  is a concern, load a per-device seed.
* The pair mapping above, and zero as the gated input value.
* Detection stops the replacement until reset, rather than letting it carry on.
* The multiplier's internals: a row-by-row carry-save array and a final ripple adder. It has
  the c6288's function and array organisation, not its exact gate netlist.
* No action on `pin_alarm` beyond the flag.

Two parts of the scheme are physical constraints, not logic, and live outside the RTL:

* the `PULLDOWN` attribute on each unused pin;
* relative placement (RLOC) that keeps the replicas far apart on the die.

Keep the four `g_cp[k]` instances from being merged during synthesis: the four copies are
identical, and a tool that shares their logic removes the protection. Other ISCAS'85
circuits (c432, c1355) could be used as the MTR too, by swapping the replica module and
setting `N_IN`/`M_OUT`. Only c6288 is provided.

## Testbenches

Each has a watchdog and ends with a `TB_RESULT checks=N failures=M` line.

| testbench | what it shows |
|---|---|
| `tb_mtr_c6288` | corner operands, all single-bit pairs and 20000 random pairs against the built-in product |
| `tb_lfsr_rng` | state sequence against a reference model, hold when `en=0`, never zero, period exactly 65535 |
| `tb_rin_unit` | pair mapping and gating against an independent calculation, at 4 and 3 replicas; every ordered pair occurs |
| `tb_rout_unit` | every pair of selections |
| `tb_ccu` | pass-through, grounding and flag on a one-bit mismatch, stays terminated, reset recovery |
| `tb_rpg_checker` | each of the 164 pins alone raises the alarm, which latches; reset clears it |
| `tb_secure_mtr_top` | whole design at default parameters (see below) |
| `tb_trojan_bypass` | bypass-rate experiment (see below) |

`tb_secure_mtr_top` acts as U2 and U1. It keeps its own model of the LFSR and the pair
mapping, so it predicts every cycle's pair and result without reading the design's
selection. Trojans are modelled with `force` on one product bit of a replica. It runs four
scenarios, each from reset:

1. A clean run.
2. One Trojan copy. It stays unnoticed while idle and is caught the first time it is
   compared with a visibly wrong result.
3. Two copies with the same Trojan. When exactly those two are paired the wrong result gets
   through; when one of them is paired with a clean copy it is caught.
4. An unused pin driven high.

It counts each mechanism: pairs used, gated replicas, idle-Trojan cycles, detections,
grounded cycles, colluding pairs and pin alarms. A mechanism that never happens counts as a
failure.

`tb_trojan_bypass` scatters 1 to 10 Trojans over the slices of the FPGA. A Trojan that lands
in a replica's slices makes that replica's result wrong by a fixed payload; all Trojans
carry the same payload, as a tool that knows the design could make them. The experiment
runs 300 trials of 40 operations each, on 2278 slices (the XC6SLX16) and on a device twice
that size. The 150 slices per replica is an estimate. The bypass rate is wrong results
delivered over operations. Its self-checks:

* with one Trojan the rate is exactly 0;
* the rate rises with the Trojan count;
* the larger device is no worse.

A typical run gives about 0.045 at 10 Trojans on 2278 slices and under 0.01 on 4556.

## Simulating

With Verilator 5 (two-state: all state that is read is reset):

```
verilator --binary --timing --assert -Irtl rtl/hmtd_pkg.sv rtl/*.sv tb/tb_secure_mtr_top.sv \
          --top-module tb_secure_mtr_top
./obj_dir/Vtb_secure_mtr_top
```

Use the same command for any other testbench; the package must come first. Each block
testbench also runs with just the package, its block and itself. Every run takes seconds.

## Limits

* Only the c6288 replica exists.
* No placement constraints or pin pull-downs are given, since they depend on the tool and
  the board.
* The bypass experiment is a statistical model driven through the real selection and
  checking logic. It is not a measurement on hardware.
* Timing overhead from placing the replicas far apart depends on the placement and is not
  modelled.

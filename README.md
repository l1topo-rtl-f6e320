# Topological trigger algorithms: parallel and sequential forms

A topological trigger looks at the trigger objects (TOBs) of one collision event:
electrons, jets and so on, each with a transverse energy ET and a position (eta, phi).
It fires when some *combination* of objects meets a set of cuts. Typical cuts are an
invariant mass window, an angular separation, or a minimum ET on each object. Such an
algorithm is mostly combinatorics. With 6 leading jets and 10 selected electrons there
are 60 pairs, and each pair needs the same arithmetic and the same thresholds.

This RTL builds that algorithm family in two forms, which are computed the same way and
give the same trigger bit:

* **Parallel form.** This suits a system that takes a new event every bunch crossing
  (25 ns). There is one logic block per combination, all evaluated in one clock, with an
  OR tree at the end. It is fast but large: the logic grows with the number of
  combinations.
* **Sequential form.** This suits a time-multiplexed event processor. Each processor
  gets a whole event only every 48 bunch crossings (1.2 us), but has a small logic
  budget. TOBs arrive as streams. The combinations are fed one after another through a
  single logic block (or a few), and the results are ORed over time. A parameter sets
  the working point: doubling the logic halves the latency.

Both forms share the package `topo_pkg`, the selector and the pair logic. The top
`l1topo_top` puts them side by side on the same parameter records, so one event can be
run through both and the results compared.

## Data formats

| Format | Bits | Fields |
|---|---|---|
| GenericTOB (`generic_tob_t`) | 64 | valid, 4-bit type, 8 flag bits, 24 reserved bits, ET[13], eta[8] signed, phi[6] |
| ReducedTOB (`reduced_tob_t`) | 30 | valid, 2 flag bits, ET[13], eta[8] signed, phi[6] |
| EmptyTOB (`EMPTY_TOB`) | 30 | all zero (valid = 0) |

* Every selector reads the GenericTOB. Once a TOB passes selection it travels on as a
  ReducedTOB. A TOB that fails is replaced by an EmptyTOB, so a select stream keeps one
  slot per input.
* Units: ET counts 100 MeV. Eta moves in steps of 0.1 (|eta| <= 4.9). Phi has 64 steps
  of 2*pi/64.
* The field widths and units are this implementation's own choice. To change them, edit
  the `localparam`s and structs in `topo_pkg`.

## The combination logic (`pair_logic`)

This block is the core of both forms. For TOB a from list 1 and TOB b from list 2 it
computes:

```
deta  = |eta_a - eta_b|                       0..98 (table index saturates at 99)
dphi  = |phi_a - phi_b| folded to 0..32       (the shorter way round the circle)
dR^2  = deta^2 + dphi^2                       (0.1 and 2*pi/64 steps treated as equal)
M^2   = 2 * ET_a * ET_b * (cosh(deta) - cos(dphi))
```

The combination passes when all of these hold:

* both TOBs are valid;
* each TOB meets its own ET threshold;
* each TOB meets its flag requirement, `(flags & mask) == req`;
* every enabled window cut holds: deta, dphi, dR^2 and M^2, each `min <= x <= max`.

The `dec_param_t` record holds all the thresholds and the enable bits.

The invariant mass does not use any trigonometric hardware. `cosh(0.1*d)` for d = 0..99
and `cos(2*pi*k/64)` for k = 0..32 come from two constant tables in 2^10 fixed point.
Constant functions in `topo_pkg` (`build_cosh_table`, `build_cos_table`) build these
tables during elaboration. They sum the power series
`sum x^n/n!` (even n, alternating signs for cos) in 64-bit integer arithmetic with
2^20 fraction bits, then round to 2^10. There is no data file. M^2 is then
`(ET_a*ET_b*(cosh - cos)) >> 9`, in units of (100 MeV)^2, 48 bits wide. Compared with
exact arithmetic, the table values agree to within one count plus a relative error of
1e-5. `topo_pkg_tb` checks this.

## Sequential algorithms

**Select (`serial_select`).** Each clock, one GenericTOB goes through the selector
(`tob_selector`). The selector checks ET >= et_min, eta in [eta_min, eta_max] and the
required flags. The output, one clock later, is the ReducedTOB if the TOB passed, and
an EmptyTOB if it did not.

**Multiplicity (`serial_multiplicity`).** The same selector feeds a counter that is
cleared per event. The counter is CNT_W = 3 bits wide and saturates at 7 rather than
wrapping.

**List buffer (`tob_list_buffer`).** A decision algorithm reads a list of bounded length,
such as the 10 selected electrons. The buffer keeps the first DEPTH non-empty TOBs of
the event in arrival order. If more arrive it sets `overflow_o`, and that overflow is
passed on with the decision bit.

**Sort (`serial_sort`).** A systolic chain of NSTAGE = 6 stages, one stored TOB per
stage:

```
            +--------+      +--------+            +--------+
 TOB in --->| stage0 |----->| stage1 |--> ... --->| stage5 |---> tob_o
            | stored |      | stored |            | stored |
            +--------+      +--------+            +--------+
  each stage: if ET(arriving) > ET(stored): store arriving, pass the old one on
              else pass the arriving TOB on
```

* When the last TOB has passed the last stage (NSTAGE clocks after it entered), stage k
  holds the (k+1)-th highest ET.
* The key is `{valid, ET}`, so a real TOB always displaces an EmptyTOB.
* When several TOBs have the same ET, which of them is kept is not specified. The chain
  does not preserve arrival order for ties.
* In pipe-out mode (`mux_ctrl_i = 1`) the stored TOBs shift right, one stage per clock,
  and leave on `tob_o` lowest first. `sorted_o` also gives the whole stored list in
  parallel, with stage 0 leading.

**Decision (`serial_decision`): the heart of the sequential form.**

* There are NPAR copies of `pair_logic`, called lanes. Lane k owns list-1 entries
  `k*N1/NPAR ... (k+1)*N1/NPAR - 1`. N1 must be a multiple of NPAR.
* Each clock, every lane takes its next list-1 entry together with the current list-2
  entry. The list-1 index is the inner loop and the list-2 index the outer loop. With
  6 jets (1..6) and 10 electrons (a..j), NPAR = 2 issues:

  ```
  clock: 1    2    3    4    5    6   ...  30
  lane0: 1a   2a   3a   1b   2b   3b  ...  3j
  lane1: 4a   5a   6a   4b   5b   6b  ...  6j
  ```

* Lane results are registered, ANDed with "this pair counts", and ORed into `accept_o`.
* On `start_i` the two lists and their overflow flags are latched. The inputs may then
  change.
* `done_o` rises at the (N_COMB/NPAR + 1)-th clock edge after the edge that sampled
  `start_i`:
  * 61 clocks for 6 x 10 pairs with one lane;
  * 31 clocks with two lanes.

  At 320 MHz (3.125 ns sub-ticks) the first is about 190 ns, well inside a 1.2 us event
  slot.
* `two_lists_i = 0` gives the one-list mode of the generic algorithm. It uses every
  unordered pair i < j of list 1 once. It steps through N1 x N1/NPAR clocks and masks
  off the pairs with i >= j.
* In the top, the same module serves three roles:
  * fully sequential (NPAR = 1);
  * semi-sequential (NPAR = 2);
  * a generic one/two-list instance with its own cut record.

## Parallel algorithms

* **`parallel_select`**: the first K = 10 of N_IN = 144 TOBs that pass, by prefix
  counting, with an overflow flag. Two register stages.
* **`parallel_sort`**: the K = 6 leading of N_IN = 192 TOBs that pass, by rank
  counting. Each TOB counts how many others beat it; ties go to the lower input index.
  Two register stages.
* **`parallel_decision`**: one `pair_logic` per combination (60 for 6 x 10, or the 15
  unordered pairs in one-list mode), an OR tree and one output register.
* **`parallel_multiplicity`**: a saturating count of the TOBs that pass the cuts. The top
  uses it for 144 electrons, 144 taus and 192 jets. Two register stages.
* **`energy_thresholds`**: missing ET compared with NTHR = 4 thresholds, one bit each,
  registered.

From the inputs, the parallel chain in the top gives:

* the trigger and overflow bits after 3 clocks;
* the electron, tau and jet multiplicities after 2 clocks;
* the missing-ET bits after 1 clock.

## The top (`l1topo_top`)

**Sequential side (clock `clk`).**

* An event starts with `ev_start_i`, which clears the algorithms.
* While `ready_o` is high, the electron and jet streams (`*_tob_i`, `*_valid_i`,
  `*_last_i`) are accepted independently. Gaps are allowed.
* Once both last beats have arrived, the controller waits N_J + 2 clocks. This lets the
  select register, the sort chain and the list buffer drain.
* It then starts the three decisions on the finished lists. In the same clock the sort
  chain begins to pipe the sorted jets out on `sort_out_tob_o` / `sort_out_valid_o`.
* `ev_done_o` pulses once all three decisions are done. The results hold until the next
  `ev_start_i`.
* `mult_o` and `j_mult_o` give the electron and jet multiplicities of the event.
* `seq_cycles_o` and `semi_cycles_o` report the measured decision latencies.
* For a full event (192 jets, 144 electrons in parallel streams) this takes about 264
  clocks, inside the 360 clocks of a 1.2 us slot at 300 MHz.

**Parallel side (clock `clk_bc`).** All 144 electrons, 144 taus and 192 jets are
presented at once, and the results appear at the latencies given above.

Select, sort and decision are instantiated for the electron and jet paths of the example
algorithm. Taus feed only a multiplicity. Tau and muon lists (muons have 32 inputs)
would be further instances of the same select and sort modules with other `N_IN`. The event-sequencing controller is this implementation's own design.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/tb_ref_pkg.sv` are independent of the RTL. In particular, the invariant mass is
computed from the real-valued `$cosh` and `$cos`. The end-to-end test `l1topo_top_tb`
runs the top at its default sizes:

* 200 random events go through both forms with the same cuts;
* the results are compared with the reference;
* the decision latencies (61 and 31 clocks) and the pipe-out order are checked;
* the test fails if any mechanism never occurred: selection reject, list overflow,
  accept and reject, one-list and two-list generic decisions, multiplicity saturation,
  sort pipe-out, missing-ET bits set and clear.

`invm_drsqr_compare_tb` runs one fixed decision through both forms, over 64 random
events. The decision is a two-list invariant-mass window plus a dR^2 window, with ET
thresholds. The test checks that the same events fire in both forms, and that the
sequential result arrives 61 clocks after start.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module l1topo_top_tb \
  -y rtl -y tb +libext+.sv -Irtl rtl/topo_pkg.sv tb/tb_ref_pkg.sv tb/l1topo_top_tb.sv
./obj_dir/Vl1topo_top_tb
```

Replace `l1topo_top_tb` with any other `*_tb` to test one block. The full-size top test
builds in about 10 s and runs in about 1 s.

## Where this departs from, or goes beyond, what is published

* **Field formats and units.** TOB field widths, units and the EmptyTOB encoding are
  assumed. The published description gives only the 64-bit generic format.
* **Fixed-point arithmetic.** The invariant-mass formula and its fixed point, and the
  dR^2 that treats eta and phi steps as equal, are this implementation's choices. Real
  firmware uses detector-specific granularities.
* **Selector cuts.** The selector implements ET, an eta window and flag bits. The
  detector-specific decoding and isolation cuts of the real input sources are not
  modelled.
* **Sizes and counters.** The sort chain has 6 stages, to match the 6-jet example (the
  published sort diagram draws 5). Counter width 3 and saturation are assumed.
* **List order.** Lists keep the first TOBs in arrival order. Sorted jets are piped out
  lowest first.
* **Not included.** These have no logic description to build from: decision algorithms
  for large-jet reclustering and missing ET; input links, deserialisers, CRC and
  coordinate decoding; the register access bus for the parameters; the output
  serialiser; the multiplexer and demultiplexer layers of the time-multiplexed system.
  Here every parameter record is a plain input port.
* **Not comparable.** Resource figures (LUT counts) cannot be compared with this RTL.

## Files

`rtl/` holds one module or package per file:

* `topo_pkg`: types and tables;
* `tob_selector`, `serial_select`, `serial_multiplicity`, `tob_list_buffer`,
  `serial_sort`, `pair_logic`, `serial_decision`: the sequential form;
* `parallel_select`, `parallel_sort`, `parallel_decision`, `parallel_multiplicity`,
  `energy_thresholds`: the parallel form;
* `l1topo_top`: the top.

`tb/` holds one `<module>_tb.sv` per module, plus `tb_ref_pkg.sv`.

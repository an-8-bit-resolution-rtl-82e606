# Fuzzy inference processor with 8-bit resolution

This is a small fuzzy-logic inference engine for fast control loops, such as engine control,
where the controller needs both speed and 8-bit or finer resolution. It evaluates a base of
fuzzy rules on J crisp inputs and returns one crisp output. At the default size it produces
a new result every 72 clock cycles, or about 139 000 inferences per second at 10 MHz.

The architecture rests on three ideas:

* **Two membership circuits are enough.** Membership functions are computed by logic rather
  than looked up in a table, because a table grows exponentially with resolution. In practice
  no more than two membership functions of an input are non-zero at any point. So the
  functions are split into two groups whose members never overlap. One membership-function
  circuit (MFC) per group returns the single label of its group that may be non-zero, and the
  membership value of that label.
* **One cheap operational element per consequent.** Each rule consequent is a singleton (a
  single output value S_k). All rules with the same consequent are merged into one OR of
  AND-terms, and one operational element (OPE) evaluates it with only MIN and MAX. K such
  elements run in parallel.
* **Singleton defuzzification.** The output is the weighted mean of the singletons,
  `y = sum(w_k * S_k) / sum(w_k)`. This needs only a multiply-accumulate and one division.

```
 input register file ─┬─► MFC (group 1) ─┐     ┌─► OPE 0 ─┐
                      │                  ├─────┼─► OPE 1 ─┼─► MUX ─► WAC ─► output register
                      └─► MFC (group 2) ─┘     └─► ...   ─┘
                          (label, value)        K elements    weighted-average circuit
```

## Describing membership functions as edges

The hardest part to use correctly is the way membership functions are stored. Each input j
has two groups, and each group is a list of M *edges* ordered by rising turning point
a_0 < a_1 < ... < a_{M-1}:

* an **even** edge i is a rising edge that starts at a_i;
* an **odd** edge i is a falling edge that starts at a_i;
* edges 2l and 2l+1 together form the function with label l of that group, so a group holds
  M/2 labels and an input has M labels across its two groups.

Every edge has a slope `alpha_i = A_i * 2^-B_i`. A_i is an N-bit mantissa and B_i is a
log2(N)-bit shift, so slopes run from 2^-(N-1) to 2^N - 1. For an input x the circuit takes
the last edge with a_i <= x and evaluates

```
d = x - a_i
p = min( (d * A_i) >> B_i , F )        F = 2^N - 1 (all ones)
value = p        if i is even (rising)
value = F - p    if i is odd  (falling; computed as the bitwise inverse of p)
label = i >> 1
```

A rising edge saturates at F, which gives the flat top of a trapezoid. The following falling
edge then starts at its own a_i. A falling edge saturates at 0, and the value stays 0 until
the next rising edge begins, or up to the end of the input range. An x below a_0 gives label
0 with value 0. Triangles, trapezoids and shoulders can all be built this way.

A function that should start at the very bottom of the range with full membership (a left
shoulder) is written as a rising edge at a_0 = 0 with a steep slope, followed by its falling
edge.

## Membership-function circuit (`fp_mfc`)

The MFC is a three-stage pipeline. Each stage lasts one *slot* of `S = max(M,N) + 1` cycles.

1. **Scan.** A counter steps i = 0..M-1. The word {a_i, A_i, B_i} at address {j, i} is read
   into registers, and one cycle later `RE1 - RE2` (x - a_i) is formed. When the sign bit is
   clear, A_i, B_i, i and the difference are kept in RE3..RE6. After the scan these registers
   hold the last edge at or below x. The registered read costs one cycle, which is why a
   slot is max(M,N)+1 cycles long.
2. **Multiply.** A shift-and-add multiplier (`fp_mul`) forms d * A_i in N cycles.
3. **Shift and gate.** The shifter (`fp_shifter`) moves the 2N-bit product right B_i times,
   one bit per cycle with zero fill. Any set bit among the upper N bits saturates the result
   to F. The gate then inverts all bits when bit 0 of i is set.

Pipeline registers between the stages carry B_i, i, the input index and a found flag. This
lets three inputs be in flight at once. Both MFCs share the phase counter and run in lock
step. An input taken at the end of slot t gives a result that is held on `out_*` through
slot t+4.

## Rules and operational elements (`fp_ope`)

OPE k evaluates

```
IF (A_11(x_1) and ... and A_1J(x_J)) or ... or (A_I1(x_1) and ... and A_IJ(x_J)) THEN S_k
w_k = MAX over i of MIN over j of mu_{A_ij}(x_j)
```

It does this with I = 4 sub-rules (AND-terms) per element, so the default K = 8 elements hold
32 rules.

* **Label memory.** J*I words, at address `j*I + i`. Input is the outer index, so all labels
  for x_1 come first. A word is a label code `{group, label}`: the MSB selects the first (0)
  or second (1) MFC, and the lower bits give the label within that group. The membership is
  the MFC's value if the MFC currently reports that label, and 0 otherwise.
* **Register file.** I words that hold the running MIN of each sub-rule across the inputs.
  It behaves as a RAM, so each sub-rule takes two cycles: read the label and the register
  file, then MIN and write back. Eight cycles of the nine-cycle slot serve the four
  sub-rules. More sub-rules would need a longer slot, and the parameter check
  `2*I <= S` enforces this.
* **MAX.** The MAX over sub-rules is built while the last input is processed. w_k is updated,
  with a one-cycle `w_valid`, in the 2I-th cycle of that slot. It then holds until the next
  inference reaches the same point.

Every sub-rule names a label for every input. There is no "don't care" code. A rule that
ignores an input must name a label of that input that is full wherever it matters. For
example, a rising edge at a_0 = 0 with A = F and B = 0, and no falling edge below the top of
the range, is full for every x >= 1.

## Weighted-average circuit (`fp_wac`, `fp_mux`)

When the scores are ready, the WAC steps the multiplexer select through k = 0..K-1, one
score per cycle. It accumulates `sum(w*S)` (2N + log2(K+1) bits) and `sum(w)`. A restoring
divider then produces the N quotient bits in N cycles. The quotient always fits in N bits
because it is a weighted mean of N-bit values. It is truncated, not rounded. If every score
is 0, the output is 0. The singleton positions S_k sit in a K-word memory inside the WAC.
The result goes to the output register (`fp_output_reg`), and `y_valid` pulses for one cycle.

## Timing

| quantity | cycles at defaults | formula |
|---|---|---|
| slot (one pipeline stage, one input) | 9 | max(M,N) + 1 |
| spacing of back-to-back results | 72 | J * S |
| start (sampled at the last cycle of a slot) to `y_valid` | 127 | (J+3)*S + 2I + K + N + 4 |

The slot controller (`fp_ctrl`) runs a free-running phase counter `ph`. A `start` request,
or one that arrives while a run is still feeding inputs, is taken at the next slot boundary.
The controller then presents input j = 0..J-1 from the input register file, one per slot. A
run that follows another starts in the very next slot, so consecutive inferences overlap in
the pipeline. An input register can be rewritten as soon as its slot has passed. The output
stage takes K + N + 2 cycles, far fewer than the 72 cycles between sets of scores, so it
never stalls.

## Programming the processor

All memories have plain synchronous write ports on `fp_top`. Write them before `start`:

| port group | selects | address | data |
|---|---|---|---|
| `mfm_we[g]`, `mfm_waddr`, `mfm_wdata` | group g = 0/1 | `{j, i}` | `{a_i, A_i, B_i}` (N + N + log2 N bits) |
| `lab_we[k]`, `lab_waddr`, `lab_wdata` | OPE k | `j*I + i` | `{group, label}` |
| `sing_we`, `sing_waddr`, `sing_wdata` | — | k | S_k |
| `in_we`, `in_waddr`, `in_wdata` | — | j | x_j |

Reset (`rst_n` low, synchronous) clears the control state, the registers and the input
register file. It does not clear the memories.

## Parameters

| name | default | meaning |
|---|---|---|
| `N` | 8 | resolution of inputs, memberships and singletons |
| `M` | 8 | edges per group per input (M/2 labels per group, M labels per input) |
| `J` | 8 | number of inputs |
| `K` | 8 | operational elements (singleton consequents) |
| `I` | 4 | sub-rules per operational element (must satisfy 2I <= S) |

`fp_top` also takes the slot length `S` as a parameter. It defaults to max(M,N) + 1. Setting
`I = 8` with `S = 17` gives 64 rules (8 sub-rules per element). The price is a result every
136 cycles instead of 72. The end-to-end, MFC and OPE testbenches pass in this configuration
when the package defaults are changed to match.

The defaults live in `fuzzy_pkg`. Every module takes them as parameters, and `fp_top` passes
its own values down.

## How far it follows the original architecture

These parts follow the architecture as published:

* the block structure;
* the two-group membership scheme and the edge formula;
* the MFC's registers, scan, shift-and-add multiplication, saturating shifter and inversion
  gate;
* the rule form and the label-memory order;
* the two-cycle sub-rule step and its 32-rule limit;
* the 72-cycle throughput.

These are this implementation's own choices:

* **Slot length.** The stage time is max(M,N) + 1 cycles rather than max(M,N). The extra
  cycle is the registered memory read in front of the subtractor. With it, the published
  throughput of 72 cycles comes out exactly.
* **Latency.** It is 127 cycles. The published chip took 174 cycles including
  synchronisation overhead. How that time was split among the stages is not known here.
* **Design-specific logic.** The OPE circuit itself, the WAC (MAC plus restoring divider),
  the slot controller and the memory write ports are this design's own.
* **Encodings and defaults.** The label code, the {j, i} memory addressing and the number of
  inputs J = 8 were chosen here. So were the zero output for an input below every edge and
  for an all-zero score set, and truncation in the division.
* **No "don't care" label** (see above).

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog. The end-to-end test
`tb_fp_top` runs the full default configuration. It writes random rule bases, compares every
result with a reference model written straight from the formulas above, checks the
127-cycle latency and the 72-cycle spacing, and checks that these cases all occurred:

* an input below every edge;
* shifter saturation;
* rising and falling edges;
* label hits and misses in both groups;
* an all-zero score set;
* a queued start.

`tb_fp_workload_32rules` runs a realistic rule base. It is a two-input controller with
eight overlapping triangular labels per input, and 32 rules spread over the eight
consequents. The test runs 60 inferences back to back at a 10 MHz clock and checks each
result against the reference. It also checks that the results arrive every 72 cycles,
which is about 138 900 inferences per second.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fuzzy_pkg.sv rtl/fp_*.sv \
          tb/tb_fp_top.sv --top-module tb_fp_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_fp_top` with, for example, `tb_fp_workload_32rules`, `tb_fp_mfc`, `tb_fp_ope`,
`tb_fp_wac`, `tb_fp_mul`, `tb_fp_shifter`, `tb_fp_ctrl`, `tb_fp_mfm`,
`tb_fp_input_regfile`, `tb_fp_mux` or `tb_fp_output_reg`. All of them finish in well under
a second.

## Files

* `rtl/fuzzy_pkg.sv`: default sizes and the slot-length function.
* `rtl/fp_top.sv`: the processor.
* `rtl/fp_ctrl.sv`: the slot controller.
* `rtl/fp_input_regfile.sv`: the input register file.
* `rtl/fp_mfc.sv`: the membership-function circuit. It uses `fp_mfm.sv` (memory),
  `fp_mul.sv` (multiplier) and `fp_shifter.sv` (shifter).
* `rtl/fp_ope.sv`: the operational element.
* `rtl/fp_mux.sv`, `rtl/fp_wac.sv` and `rtl/fp_output_reg.sv`: the output stage.
* `tb/tb_<module>.sv`: one testbench per module.

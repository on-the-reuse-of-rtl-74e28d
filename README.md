# Online path-delay testing for a Blade timing-resilient pipeline

Blade is an asynchronous, bundled-data pipeline style that tolerates timing
violations: every stage keeps its latches open for a short *timing resiliency
window* (TRW) after the nominal arrival time of its data, watches the latch
inputs for transitions during that window, and, if one occurs, tells the next
stage to wait a little longer. Late data is therefore caught and corrected on
line instead of causing a failure.

That same error-detection hardware can be reused as a tester for path delay
faults. In **delay test mode** (`dtm`) a stage opens its window one Δ later
than usual. A path that is slow enough to miss the normal window, which would
silently corrupt data in normal operation, now ends inside the shifted window
and is flagged as an error. Flags from all stages are ORed onto a single pin,
`error_o`. A functional workload runs through the pipeline as usual, only
slower. Any pulse on `error_o` while `dtm` is set means a critical path has a
delay fault.

The test hardware is small:

* an extra Δ delay line,
* an AND gate and a multiplexer in each controller's CLK path,
* one OR gate for `error_o`,
* optionally, a scan chain with one `dtm` bit per controller.

This repository holds SystemVerilog for the whole pipeline: stages,
controllers, error detection logic, delay lines, the test-mode CLK circuit,
the `error_o` gate and the optional DTM scan chain. It also has
self-checking testbenches that show the detection mechanism end to end.

## Timing zones: what the shifted window sees

This section explains how the design works. All times are measured from the
moment the data driving a stage's logic is launched, which is when the
previous stage's latch opens. δ is the stage's request delay line and Δ the
window width. t_comp is the small compensation delay explained under "Error
detection logic".

| a path that settles at...     | normal mode                                   | delay test mode (`dtm`=1)              |
|-------------------------------|-----------------------------------------------|----------------------------------------|
| before δ                      | latched, no flag                              | latched, no flag                       |
| δ + t_comp … δ + Δ            | latched, **Err1** (recovered violation)       | latched, no flag                       |
| δ + Δ … δ + 2Δ                | **missed: wrong data, no flag**               | latched, **Err1 → `error_o`** (fault found) |
| after δ + 2Δ                  | missed                                        | missed (the fault is larger than the method can see) |

In normal mode, a timing violation in the second row is a recovered event,
not a fault. A path in the third row is a real delay fault that normal
operation cannot see. Delay test mode turns exactly those paths into flags.
Two limits follow from the table:

* A fault larger than Δ beyond the normal window is not caught.
* A path is only checked when the workload makes it toggle, because the
  detector reacts to transitions.

`tb_blade_pipeline` and `tb_blade_stage` exercise every row of this table.

## How a stage runs

Each stage (`blade_stage`) has four parts:

* a δ delay line on its incoming request,
* a controller,
* a Δ delay line inside the controller,
* the error detection logic (EDL) around its latches.

The combinational logic of the stage sits between the previous stage's
latches and this stage's latches. In this RTL it lives outside the pipeline
module (see "Pipeline top"). One data item goes through a stage as follows:

1. **Request arrives.** The previous stage raises its request as soon as its
   own latches open, before it knows whether its data will need
   correcting. This is the *speculative* request. The request passes through
   δ, which matches the logic delay up to the start of the window.
2. **Error status check.** The controller asks the previous stage, over the
   error channel (LE here, RE there), whether it saw a violation. The
   previous stage answers at once if it did not, and Δ later if it did. In
   the error case this stage's latches open Δ later, which gives the late
   data time to propagate.
3. **Window.** The controller raises its internal clock `int_clk`. The
   latches open (CLK high) and the stage sends its own speculative request to
   the right.
4. **Close and sample.** When the Δ line reports `delay`, the controller
   lowers `int_clk`, which closes the latches, and raises `Sample` at the
   same time. The Q-Flops resolve to the dual-rail result Err1 (violation)
   or Err0 (clean).
5. **Acknowledge.** Once Err has resolved, the controller acknowledges the
   left stage and keeps the result for the right stage's error request.

With nominal paths and one item in flight, the request reaches the output
after `NUM_STAGES·δ`. The last stage's final error answer comes another
`Δ + t_res` later, where t_res is the Q-Flop resolution time. With the default
values that is 3000 ps and 3350 ps. In delay test mode every stage is Δ
slower: 3900 ps to the output request. After a violation, the next stage
opens Δ later.

## The CLK output circuit (`blade_clk_out`)

Without the test mode, CLK is simply `int_clk`, and the Δ line from CLK
produces `delay`, which tells the controller to close the window. The test
mode adds three things:

* a second Δ line on `int_clk`,
* an AND of `int_clk` with its delayed copy,
* a multiplexer, selected by `dtm`, between the plain and the ANDed signal.

With `dtm`=1, CLK rises Δ after `int_clk`. Because of the AND, CLK still
falls as soon as `int_clk` falls; without the AND the window would grow to
2Δ instead of moving. `delay` is still CLK delayed by Δ, so the window stays
exactly Δ wide and the rest of the controller is unchanged. The stage is
simply Δ slower. `dtm` should only change while the stage is idle.

## Error detection logic (`blade_edl`)

* **Latches.** There are `WIDTH` latches, transparent while CLK is high.
  Latches whose bit is set in `EDL_MASK` are error detecting latches, meant
  for the endpoints of critical paths. The others are plain latches.
* **Transition detector** (`blade_td`). The XOR of the latch input with a
  copy delayed by t_TD. It gives a t_TD-wide pulse X on every edge.
* **C-element** (`blade_celem`), an asymmetric one.
  * It clears while its clock is low.
  * It sets when its clock and X are both high.
  * Otherwise it holds its value.

  Its clock is CLK delayed by t_comp (t_comp ≥ t_TD). This delay keeps an
  edge that happens just before the window opens from being flagged. It also
  keeps the C-element's value until after the window closes, so the Q-Flops
  can sample it at the closing edge.
* **Q-Flops** (`blade_qflop`). The C-elements are ORed in groups of
  `QGROUP`, and each group feeds one Q-Flop. `Err1` is the OR of all
  Q-Flops' err1 outputs. `Err0` is the AND of their err0 outputs, so it rises
  only when every Q-Flop has resolved "clean". `{Err1,Err0}=00` means not
  yet resolved.

A transition is flagged if it comes between `CLK↑ + t_comp` and the closing
edge.

## Pipeline top (`blade_pipeline`), `error_o` and per-stage control

`blade_pipeline` chains `NUM_STAGES` stages.

**Combinational logic.** The logic between stages belongs to the user's
design, so it is not inside this module:

* `stage_q_o[k]` (the latch outputs of stage k) goes out to the logic.
* The logic's result comes back on `stage_d_i[k+1]`.
* `stage_d_i[0]` carries the logic driven by the input data.

Because the logic is outside the module, the pipeline can be wrapped around
any datapath, with the logic's path delays modelled in the testbench or
back-annotated in gate-level simulation.

**Environment channels.** All channels are four-phase (full return-to-zero)
handshakes.

* The environment on the left must answer `in_le_req_o` (it may tie
  `in_le_ack_i` to it).
* The environment on the right must ask `out_re_req_i` and wait for
  `out_re_ack_o` before it takes the data.

**`error_o`.** This output is the OR of every stage's Err1. In delay test
mode a pulse on it means a fault was found. In normal mode it reports
recovered violations. Their rate over time can serve as a sign that the chip
is ageing.

**`DTM_SCAN`.** This parameter chooses how `dtm` reaches the controllers:

* `DTM_SCAN = 0` (default): the single input `global_dtm_i` drives every
  controller. The scan ports are then unused and `dtm_o` is 0.
* `DTM_SCAN = 1`: the scan chain `blade_dtm_scan` replaces `global_dtm_i`.
  The chain runs `dtm_i → DTM 1 … DTM n → dtm_o`. It shifts on `scan_clk_i`
  while `scan_en_i`=1 and resets to all-zero. Load it with the bit for the
  last controller first.

With one `dtm` bit per stage the scan chain allows two things:

* **Diagnosis.** Shift the window of one stage at a time. Only the stage
  whose logic has the fault raises `error_o`.
* **Repair.** Leave `dtm` set on a stage that has a fault, in normal
  operation. That stage becomes Δ slower and delivers correct data, while
  the other stages keep full speed.

`tb_blade_pipeline_scan` shows both.

## Modules

| module | what it is |
|---|---|
| `blade_pkg` | default delays (ps) and the dual-rail `err_dr_t` type |
| `blade_pipeline` | top: stages, dtm distribution, `error_o` |
| `blade_stage` | δ line + controller + EDL |
| `blade_controller` | stage controller (behavioural), contains `blade_clk_out` |
| `blade_clk_out` | CLK output circuit with the test-mode shift |
| `blade_edl` | latches, transition detectors, C-elements, Q-Flops |
| `blade_td`, `blade_celem` | transition detector, asymmetric C-element |
| `blade_qflop` | Q-Flop (behavioural) |
| `blade_delay_line` | matched delay line (behavioural) |
| `blade_error_or` | `error_o` gate |
| `blade_dtm_scan` | DTM scan chain |

## Parameters and defaults

| parameter | default | meaning |
|---|---|---|
| `NUM_STAGES` | 3 | stages (controllers) |
| `WIDTH` | 32 | latches per stage |
| `EDL_MASK` | all ones | which latches are error detecting (same for all stages) |
| `QGROUP` | 8 | error detecting latches per Q-Flop |
| `DTM_SCAN` | 0 | 0: `global_dtm_i`; 1: per-stage scan chain |
| `SMALL_DELAY_PS` (δ) | 1000 | request delay line |
| `DELTA_PS` (Δ) | 300 | window width and shift |
| `T_TD_PS`, `T_COMP_PS`, `T_RES_PS` | 40, 60, 50 | detector pulse, C-element clock compensation, Q-Flop resolution |

The stage count of 3 and the 32-bit width match a small 3-stage 32-bit
processor. All delay values are example numbers. In a real design, δ and Δ
come from timing analysis of the stage logic: δ covers the logic up to the
window, and Δ is the amount of margin removed.

## How far to trust it, and where it is a model

* **Delay elements and the Q-Flop are behavioural.** They use `#` delays and
  need an event-driven simulator with timing (`verilator --timing`). In
  silicon they are buffer chains and a metastability-filtered cell. Gates
  are modelled with zero delay; a real layout would fold the gate delays
  into the delay lines.
* **The stage controller is behavioural.** The real Blade controller is
  three interacting burst-mode asynchronous state machines, which this
  repository does not reproduce. Its behaviour at the ports is reproduced:
  * speculative request at the opening of the latches,
  * window timed by the Δ line through the dtm circuit,
  * sampling at window close,
  * error answer Δ late after a violation.

  The following details are this design's own choice:
  * four-phase signalling on every channel,
  * the order of the handshakes,
  * encoding the error answer in the *time* of RE.Ack rather than on a
    separate wire.

  Replace this model with a gate-level controller for timing sign-off.
* **Latches and C-elements** are written as `always_latch`. Lint tools report
  them as latches or as "no latch detected"; both are intended.
* **Synthesis.** The gate-level parts synthesize: the C-element, the
  transition detector gate, the EDL latches and OR/AND trees, the CLK
  multiplexer, `error_o` and the scan chain. The modules that contain
  behavioural models do not synthesize as a whole; their delay elements
  must be mapped to real cells.
* **Choices not fixed by the method:**
  * the grouping of C-elements into Q-Flops (`QGROUP`),
  * one `EDL_MASK` shared by all stages,
  * the reset of the scan chain,
  * its plain shift-register form, with no separate update latch.

  Because the scan chain has no update latch, `dtm` bits change while
  shifting, so load it while the pipeline is idle.
* **Not included:**
  * the datapaths that such a pipeline would wrap,
  * the tool flow that converts a clocked design into Blade stages and
    picks the critical latches,
  * fault simulation driven by back-annotated delays,
  * a cheaper variant that makes the shift by running the existing Δ line
    twice instead of adding a second one,
  * an on-chip counter of `error_o` pulses for error-rate (ageing)
    monitoring; `error_o` is brought out for an external monitor.

  The testbenches instead model the logic with per-bit transport delays and
  inject one slow path at a time.

## Simulating

The testbenches are self-checking. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog. The RTL also carries
simulation assertions, which run whenever `--assert` is given. The EDL checks
that Err1 and Err0 are never both high. Each controller checks that its
neighbours keep the four-phase order on the L, R, LE and RE channels: a
request falls only after its acknowledge has risen. Start-up values and edges
during reset are ignored. Build and run one with
Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/blade_pkg.sv \
    tb/tb_blade_pipeline.sv --top-module tb_blade_pipeline -o sim
./obj_dir/sim
```

| testbench | checks |
|---|---|
| `tb_blade_pipeline` | whole pipeline at default size. Streaming in both modes against a reference model, latencies, recovered violations, the Δ delay of the next stage after a violation, faults escaping normal mode and caught in delay test mode, faults past the shifted window, unexcited paths. Counts each mechanism. |
| `tb_blade_fault_coverage` | fault-coverage campaign on the default pipeline. Each of the 96 latch paths in turn gets a delay fault inside the shifted window while a stimulus runs in delay test mode. A path must be reported exactly when the stimulus toggles it. Random data covers every path; the values 0..7, whose high bits never change, cover 9 of 96. |
| `tb_blade_xtea` | XTEA workload on a 3-stage, 64-bit pipeline. Each stage's logic is one XTEA cycle, so the pipeline runs the first 3 of the 32 cycles. Results are checked against a reference XTEA, itself checked on the published test vector (key `00010203…0c0d0e0f`, `41424344 45464748` → `497df3d0 72612cb5`). The same coverage campaign runs on 192 paths with 8 random blocks: about 99 % are detected, and every path that toggles is caught. |
| `tb_blade_pipeline_scan` | `DTM_SCAN=1`: loading the chain, `dtm_o`, one-stage slow-down, fault diagnosis per stage, repair by a permanently shifted stage |
| `tb_blade_stage` | one stage with a delayed logic path: opening time, Err1, error-answer timing, latched data |
| `tb_blade_controller` | controller handshakes and timing driven by hand |
| `tb_blade_clk_out` | CLK and delay edges in both modes |
| `tb_blade_edl` | flagging before, inside and after the window, plain latches, dual-rail timing |
| `tb_blade_td`, `tb_blade_celem`, `tb_blade_qflop`, `tb_blade_delay_line`, `tb_blade_error_or`, `tb_blade_dtm_scan` | the leaf cells |

`tb_blade_comb` is a testbench helper that models the stage logic. Stage k
computes `rotl(x,1) ^ 0x9E3779B9·(k+1)`, each output bit with its own path
delay. Because that function maps complements to complements, sending `x`
then `~x` makes every path toggle.

To try another design point, change the parameters on `blade_pipeline`. Keep
these relations between the delays:

* δ > Δ + t_res, so that a stage normally gets its error answer before its
  request arrives;
* t_comp ≥ t_TD.

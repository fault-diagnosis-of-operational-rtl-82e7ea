# Model assisted bi-modular redundancy (MABMR)

A synchronous digital system is built twice: subsystem A and subsystem B. Both run on the
same inputs, and exclusive-or detectors compare them on every clock cycle. Plain duplication
can tell *that* something failed but not *which* copy failed. It also loses its checking
as soon as one whole copy is switched off.

MABMR solves both problems with two ideas:

* **Redundancy at module level.** Each subsystem is a chain of N modules. Module `k` of A and
  its twin `k̄` of B form *level k*. Steering switches between the levels can interchange the
  two modules of any level, or take one out of service so that its twin serves both
  subsystems. Checking then continues on every level that still has two modules.
* **A model as referee.** When the subsystems disagree, the clock is stopped. A computer then
  evaluates a Boolean model of the system (next-state function F, output function G). It
  starts from the state and input of the cycle *before* the error, which a buffer register
  keeps. The result is the fault-free response. The error cycle is then replayed a few times,
  each time with a different set of levels interchanged. Each replay records which subsystem
  disagrees with the model. From these answers a *binary model* of the system names the
  defective modules. Those modules are switched out, the state is restored and the system
  runs again.

The diagnosis works the same way whatever logic the modules hold. It needs the same pair of
consecutive inputs applied under a short sequence of configurations. Which
configurations to use is computed by a test-weighting algorithm. For four levels it needs
three reconfigurations to tell apart all 8 single-module faults and all 24 correctable
double faults.

## Structure

```
            sys_in
              │        ┌──────── in_sel: live / buffered I(t-T) / error-period I(t)
              ▼        ▼
   level 0 ─ steering_switch ─ level 1 ─ ... ─ level N-1 ─► sys_out (subsystem A)
     │ A0  B0 │                  │ A1 B1 │          │
     └─ disagree_detector on each level's two outputs and on the state vectors ─► err
                                                                                  │
   bmr_buffer  ◄── {S(t), I(t)} while no error        diag_controller ◄──────────┘
   (S(t-T), I(t-T), I(t))                              │  clock enable, restore, swap,
        │                                              │  isolate, irq
        └──► diagnostic computer ──► model_state, model_out, model_we
                                                       │
                   test_generator ──► tests ──► diag_controller ──► results ──► fault_locator
```

| File | Role |
|---|---|
| `rtl/mabmr_pkg.sv` | Sizes, the ternary outcome type `result_e`, the binary model function |
| `rtl/bmr_module.sv` | One redundant module: state register, F and G, restorable state |
| `rtl/steering_switch.sv` | The switch pair of one level: interchange or isolate |
| `rtl/disagree_detector.sv` | XOR disagreement detector |
| `rtl/bmr_buffer.sv` | Buffer of the previous state and input, plus the error-period input |
| `rtl/test_generator.sv` | Test-weighting algorithm in hardware |
| `rtl/fault_locator.sv` | Binary-model matcher that names the defective modules |
| `rtl/diag_controller.sv` | Freeze, interrupt, replay loop, isolation, restart |
| `rtl/mabmr_system.sv` | Top level |

## The module and its state

Each module is a synchronous machine `s(t+T) = F(s, x)`, `y = G(s, x)`, and the modules of a
subsystem are chained (`x` of level k+1 is `y` of level k). The example function used here is
`F = s + x`, `G = s ^ x` on `W = 4` bits. Both functions pass any input difference on, so a
corrupted signal always reaches both the state and the system output. To put real logic under
MABMR, replace `bmr_module`, keeping its ports. Two ports must stay: `load`, which restores the
memory elements, and `en`, the clock enable used to freeze and to single-step.

`flt_mask`/`flt_val` force stuck-at values on a module's output. They exist to demonstrate
the diagnosis; tie them to zero in a real build.

## Steering switches: interchange and isolation

Bit `k` of a test vector (`swap[k]`) exchanges the two modules of level k. Module k then takes
B's input and drives B's output and state, and `k̄` does the same for A. Level 0, or the lowest
level still in service, is never interchanged: the complement of a test tells nothing new, so
this halves the candidates to `2^(N-1)`.

Isolating a module (`iso_a[k]` or `iso_b[k]`) sends its twin's output and state to both
subsystems. The twin keeps listening to its own subsystem's input. An isolated level gives
equal signals to both sides, so the detector that follows it falls silent, while every other
detector keeps working.

## Detection and freezing

On every cycle the detectors compare, between A and B:

* the output of every level, which is also the input of the next level (the last one is the
  system output);
* the complete state vectors.

If they agree, the buffer stores `{S(t), I(t)}` and the modules advance. If any of them
disagrees, in that same cycle:

* the module clock enable drops, so the erroneous state is never overwritten;
* the input of the error period is captured;
* `irq` rises.

## The diagnosis loop

The computer reads `buf_state` (S(t-T)), `buf_input` (I(t-T)) and `err_input` (I(t)). It
returns the model state `S_m(t) = F(S(t-T), I(t-T))` and the output of every level under
`I(t)`, then pulses `model_we`. The controller then runs, for each test vector
`T0 … T(r-1)`:

| Cycle | What happens |
|---|---|
| LOAD | Apply the interchange vector. Load the buffered state into every module. Select I(t-T). |
| STEP | Enable the clock for one cycle, so each module computes its state for the error period. |
| CMP | Select I(t). Compare each subsystem's state and level outputs with the model. Record the outcome. |

The recorded outcome is one of `RES_A` (A alone disagrees), `RES_B` (B alone), `RES_BOTH`,
or `RES_NONE`. The first test, T0, has no interchange:

* If T0 finds A = model = B, the error came from the checking logic itself. A transient fault
  looks the same. The system resumes without isolating anything, and `n_detector` counts it.
* Otherwise, once all tests have run, the fault locator is consulted. The modules it names are
  isolated. Every memory element is loaded with `S_m(t)` and the clock runs again.
* If no unique fault condition fits the outcomes, the system halts with `irq` held. This
  covers, for example, both modules of one level failing.

A diagnosis takes `3·r + 1` cycles after `model_we`. With all four levels redundant, `r = 4`,
so it takes 13 cycles.

## Choosing the tests: weighting

A *fault condition* is a set of defective modules. Its *fault pattern* is the row of outcomes
it would give under the chosen tests. Consider the tests selected so far. They split the fault
conditions of one order into *branches*: groups with identical outcomes. A candidate test
splits each branch three ways, into `N0`, `N1` and `N2` conditions for outcomes A, B and both.
It therefore separates `N0·N1 + N1·N2 + N0·N2` pairs in that branch. The candidate's weight is
this number summed over all branches.

`test_generator` starts with T0. For fault order 1 and then order 2, it adds the heaviest
candidate again and again until no candidate has a positive weight. It computes the weight
as the number of pairs that share a branch and that the candidate separates. This is the same
quantity, without building the branch matrices.

Conditions are walked as one module (order 1) or as a pair of modules (order 2). One pair
of conditions is weighed per clock, about 4 000 cycles for four levels. It runs
after reset and again after every isolation, so the sequence always covers the levels that
remain. Operation runs meanwhile. Only a diagnosis waits for the sequence to be ready.

For four levels it produces, written `[t0 t1 t2 t3]`:

| Test | Vector | Weight when chosen |
|---|---|---|
| T0 | `[0000]` | — |
| 2nd | `[0110]` | 8 |
| 3rd | `[0101]` | 4 |
| 4th | `[0100]` | 6 |

Ties go to the lowest vector value. A hand-worked choice of `[0011]`, `[0101]`, `[0110]`
picks different vectors among equal weights. Both sequences have the same length, and both
give all 32 single and double conditions distinct patterns. `tb_fault_locator` checks this
second sequence and `tb_test_generator` checks the first.

## Locating: the binary model

Two N-bit words stand for A and B, with a 1 marking a defective module. A test swaps the bits
it marks between the words. A non-zero word means a faulty subsystem
(`mabmr_pkg::binary_model`). `fault_locator` computes this pattern for every single-module
condition and every correctable two-module condition (never both modules of one level) on
the levels still in service. It compares each pattern with the recorded outcomes. The lowest
order with a match wins, on the premise that one failure is far likelier than two between
consecutive clock checks.

## Graceful degradation and its limits

After isolation, the system keeps checking the levels that still have two modules. The
comparison with the model is also restricted to those levels. A level reduced to one module
feeds both subsystems. Take a fault in A upstream of such a level: in a test that moves the
fault to the other side, the shared module would carry its effect into both subsystems. The
binary model assumes a fault stays inside its subsystem, so this would mislead it. Masking
shared levels removes the problem where the shared level comes after the fault. The problem
remains in one case: the shared module listens to a subsystem that holds an active fault
further upstream. The fault then shows in both subsystems, and the diagnosis may halt instead
of locating it. Once every level is down to one module, detection ends. A fault in a module
that serves both sides is invisible.

## Interface of `mabmr_system`

Parameters: `N` levels (4), `W` data width (4), `MAX_ORD` highest fault order (2; the
locator supports 1 and 2).

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; asynchronous active-low reset to full redundancy |
| `sys_in` / `sys_out` | in / out | W | System input; output of subsystem A |
| `flt_mask_a/b`, `flt_val_a/b` | in | N×W | Stuck-at insertion on module outputs (demonstration) |
| `irq` | out | 1 | High from detection until the system runs again (and while halted) |
| `buf_state`, `buf_input`, `err_input` | out | N·W, W, W | S(t-T), I(t-T), I(t) for the computer |
| `model_state`, `model_out`, `model_we` | in | N·W, N·W, 1 | Model response; level k at bits `k*W +: W`; one-cycle strobe |
| `err`, `halted`, `diagnosing`, `tests_busy` | out | 1 | Status |
| `iso_a`, `iso_b`, `swap` | out | N | Isolated modules; interchange being applied |
| `n_errors`, `n_detector`, `n_isolations`, `n_tests` | out | 16 | Event counters |

`model_we` may arrive any number of cycles after `irq` rises. The computer is not part of the
RTL; `tb/diag_computer_model.sv` is a behavioural stand-in for the example module chain.

## Where this design makes its own choices

* The procedure is normally described as run by a general-purpose computer, which handles
  the interrupt. Here, sequencing, test generation and location are hardware. Only the model
  evaluation stays outside.
* The model response includes every level's output, not just the system output. Without it,
  a fault hidden behind an isolated level would be reported as a detector error.
* The clock is inhibited through a clock enable, not by gating.
* T0 is a replay like the other tests, not a comparison of the frozen vectors. For a fault
  that persists, both give the same outcome.
* Resuming loads the model state into all modules.
* The module function, the widths, the tie-break in test selection, and halting on an
  unresolved fault are all choices of this design.
* Faults in a steering switch or in a detector are not modelled separately. A switch fault
  appears as a fault of the module whose signals it carries, and isolating that module
  also bypasses the switch. A detector fault shows up as the A = model = B outcome.
* Not built: releasing the system on a whole subsystem (mask the interrupt, select A or B,
  restart) without module-level diagnosis. Also not built: the example application, an
  electronic timer with six logic modules, because its logic is not available. At `N = 6`
  the framework would have the right number of levels, but not that logic.

## Simulating

Each testbench prints `TB_RESULT checks=… failures=…` and stops itself. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/mabmr_pkg.sv \
          tb/tb_mabmr_system.sv --top-module tb_mabmr_system -o sim
./obj_dir/sim
```

Replace the testbench name for the unit tests: `tb_bmr_module`, `tb_steering_switch`,
`tb_disagree_detector`, `tb_bmr_buffer`, `tb_fault_locator`, `tb_test_generator`,
`tb_diag_controller`.

`tb_mabmr_system` runs the top at its default size and needs well under a second. It inserts:

* a single fault in A;
* a single fault in B;
* a transient fault, which resolves as a detector error;
* a simultaneous double fault;
* faults in both modules of one level, which halt the system.

A golden model checks the output on every cycle that runs freely. The bench checks the
isolated modules after every diagnosis and the `3·r + 1` cycle diagnosis time. It counts every
mechanism (freeze, interchange, single and double location, detector error, regeneration,
halt) and fails if one never happened.

`tb_mabmr_workloads` sweeps fault conditions through two instances, one of four levels and
one of six. Each run starts from reset. Every single-module fault must be isolated exactly,
and so must a set of random correctable double faults: all 24 kinds at four levels, 12 at
six. It takes about ten seconds. The harness it uses, `tb/mabmr_fault_sweep.sv`, can be
instantiated at any level count.

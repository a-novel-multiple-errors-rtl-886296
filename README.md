# Scan-chain multiple error recovery for TMR (combined compare-and-repair)

Triple modular redundancy (TMR) masks one wrong module behind a majority
voter, but it does not repair the wrong module, and it cannot cope when a
second module goes wrong later. A fault that has flipped a flip-flop without
yet reaching the module's outputs (a *latent* fault) is invisible to the voter
and turns the next visible fault into a two-module failure.

This RTL implements a roll-forward repair for TMR that reuses the scan chains
the modules already carry for manufacturing test. When the voter sees a
disagreement, the controller shifts the three scan chains once all the way
round. Every flip-flop of every module passes the controller in lock step, so
the controller compares the complete internal states, not only the outputs,
and overwrites each bit that disagrees with the other two while it is
shifting. One pass of `L_SC` clock cycles (`L_SC` = scan chain length)
therefore both locates and repairs:

* one faulty module, with any number of wrong flip-flops;
* two faulty modules, provided they are not wrong in the same flip-flop;
* latent faults in any module, together with the visible fault that started
  the pass.

This is the "modified SMERTMR" variant of the scan-chain multiple error
recovery technique (SMERTMR). The earlier variant needs two passes: one to
compare and locate, one to copy a fault-free state into the faulty modules.
This one merges them, which removes the second pass and the logic that steers
it.

## Block structure

```
                 din (a, b)
        +-----------+-----------+
        v           v           v
  +-----------+ +-----------+ +-----------+
  | module I  | | module II | | module III|   scan_module x3
  | SCI SCO   | | SCI SCO   | | SCI SCO   |   (shared SCE, shared enable)
  +-----------+ +-----------+ +-----------+
     |  ^ out      |  ^ out      |  ^ out
     |  |   +------+--|---+------+--|---> tmr_voter --> vout
     |  |   |         |   |          |       | E12 E13 E23
     v  |   v         |   v          |       v      ^ Pr12 Pr13 Pr23
  +-----------------------------------------------------+
  | smertmr_controller                                  |
  |   mismatch_counters  (C12 C13 C23 + counter12/13/23) |
  |   scan_router        (priority encoder + muxes)      |
  |   fault_locator      (FLU + FMR)                     |
  |   permanent_fault_detector (MRFM + NCF)              |
  |   state machine + shift counter                     |
  +-----------------------------------------------------+
        degraded   unrecoverable   recovering   fmr
```

| File | Module | Role |
|---|---|---|
| `rtl/smertmr_pkg.sv` | package | state and verdict enums, module/pair bit order |
| `rtl/scan_module.sv` | `scan_module` | one replica with its scan chain |
| `rtl/tmr_voter.sv` | `tmr_voter` | comparators, error lines, output mux |
| `rtl/mismatch_counters.sv` | `mismatch_counters` | per-pair bit comparators and mismatch counters |
| `rtl/scan_router.sv` | `scan_router` | picks the fault-free bit and feeds every SCI |
| `rtl/fault_locator.sv` | `fault_locator` | classifies the counts, holds the faulty modules register |
| `rtl/permanent_fault_detector.sv` | `permanent_fault_detector` | repeated-fault history (MRFM, NCF) |
| `rtl/smertmr_controller.sv` | `smertmr_controller` | state machine, owns the four blocks above |
| `rtl/smertmr_top.sv` | `smertmr_top` | three modules, voter and controller |

Bit conventions used everywhere: a *module vector* has bit 0 = module I,
bit 1 = module II, bit 2 = module III; a *pair vector* has bit 0 = pair I/II,
bit 1 = I/III, bit 2 = II/III.

## The repair pass, bit by bit

During the pass all three modules shift (`sce` = 1). In each cycle the three
scan-out bits are the same flip-flop of the three modules. The
`scan_router` looks at the three pairwise mismatches of those bits:

| I/II | I/III | II/III | odd one out | SCI of I | SCI of II | SCI of III |
|---|---|---|---|---|---|---|
| 0 | 0 | 0 | none | SCO I | SCO II | SCO III |
| 1 | 1 | 0 | I | fault-free bit | SCO II | SCO III |
| 1 | 0 | 1 | II | SCO I | fault-free bit | SCO III |
| 0 | 1 | 1 | III | SCO I | SCO II | fault-free bit |

A priority encoder picks the lowest-numbered module that is not the odd one
out, and a multiplexer forwards its scan-out as the fault-free bit. Modules
that agree recirculate their own bit, so after `L_SC` shifts every chain is
back in its original order and every disagreeing bit has been replaced by the
majority bit. Three binary bits can never all differ pairwise, so at any one
bit position at most one module is the odd one out.

Worked example, `L_SC` = 3, correct state `101`, module II wrong in
flip-flop 0 and module III wrong in flip-flop 2:

```
           module I   module II   module III
before       101        100         001
after        101        101         101      (3 shifts; II/III counted as faulty)
```

The limitation follows directly: if two modules are wrong in the *same*
flip-flop they outvote the good module at that position and the good module
is overwritten. The technique assumes the replicas are built to make such
common-mode faults unlikely. It also assumes the three replicas are identical
and clocked in lock step, so that their chains line up bit for bit.

## Locating the faulty modules

While shifting, `mismatch_counters` counts the disagreements of each pair
(counter12, counter13, counter23). If `n_i` is the number of positions at
which module *i* alone is wrong, then `c_ij = n_i + n_j`. After the pass the
fault locator unit (FLU) applies the classification of the original technique:

| condition | verdict | FMR |
|---|---|---|
| all three counts zero | no faulty module (the error was outside the modules, e.g. a comparator) | unchanged |
| `c_ij = c_ik != 0`, `c_jk = 0` | one faulty module *i* | *i* |
| `c_ik != 0`, `c_jk != 0`, `c_ij = c_ik + c_jk` | two faulty modules *i*, *j*; *k* is clean | *i*, *j* |
| anything else | cannot be located | — |

With the bitwise repair above, "anything else" means that each of the three
modules was the odd one out at some position. The repair has in fact produced
the majority state, but with all three modules faulty the technique does not
trust it and halts the system. The faulty modules register (FMR, output
`fmr`) keeps the last located set; it is what a system would read to log
which replicas were hit.

## Voter

`tmr_voter` compares the three outputs pairwise (C12, C13, C23, giving TE12,
TE13, TE23). Each TE is ORed with a permanent-fault line Pr from the
controller into an error line E. The voted output is Output I, or Output II
when E12 and E13 are both high: either module I disagrees with the other two,
or the controller has marked module I as permanently faulty. A faulty
comparator shows up as a single raised E line; the controller then runs a
pass, finds all counts zero and returns to normal operation.

## Permanent faults and master/checker operation

A module that is repaired again and again is assumed to be permanently
broken. After every located fault the controller compares the FMR with the
most recent faulty module register (MRFM). The same single module again
increments the number of consecutive faults (NCF); anything else resets NCF to
zero. When NCF exceeds `NCF_TH`, i.e. on the `NCF_TH + 2`-th consecutive fault
of the same module, the system degrades to master/checker: Pr is raised on
both pairs of the broken module, so the voter ignores it and takes its output
from the two remaining modules, and the controller watches only the remaining
pair. Any disagreement between master and checker halts the system.

## Controller states and timing

| state | what happens | modules |
|---|---|---|
| `ST_NORMAL` | voter watched | run (frozen in the cycle an error is seen) |
| `ST_SCAN` | `L_SC` cycles of compare-and-repair shifting | scan shift |
| `ST_DECIDE` | FLU verdict, FMR/MRFM/NCF update | frozen |
| `ST_MC` | master/checker, dropped module ignored | run (frozen on error) |
| `ST_UNREC` | halted until reset | frozen |

A fault seen by the voter in cycle *t* freezes the modules in cycle *t*, the
chains shift in cycles *t*+1 … *t*+`L_SC` (the shift counter is loaded with
`L_SC` and counts down), the verdict is taken in cycle *t*+`L_SC`+1 and the
modules run again from cycle *t*+`L_SC`+2. `recovering` is high during the
shift and verdict cycles; `vout` is not a functional output while it is high.
Assertions in the controller check the pass length and that the halt is final.

## The protected circuit

The technique works for any synchronous circuit with a full scan chain. The
circuit used here is a stand-in of the size used to demonstrate the technique
(three flip-flops, two inputs *a* and *b*): a 3-bit register that rotates
towards its output bit and XORs `a ^ b` into the bit it rotates in. Its output
and its scan-out are both the last flip-flop. Because it rotates, a flipped
flip-flop stays a single wrong bit and reaches the output only after a few
cycles, which makes it a convenient source of latent faults. To protect a
different circuit, replace the body of `scan_module` and keep its port list;
`L_SC` must equal the number of flip-flops on the chain.

`scan_module` has an `upset` input that flips chosen flip-flops at the next
clock edge, and the voter has a `te_flip` input that inverts chosen
comparators. Both exist only to inject faults in simulation; tie them to zero
in a real system.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `L_SC` | 3 | flip-flops per module = scan chain length = pass length in cycles |
| `IN_W` | 2 | module inputs |
| `NCF_TH` | 2 | consecutive repeats of one faulty module tolerated before master/checker |

Counter widths follow from these (`$clog2(L_SC+1)`, `$clog2(NCF_TH+2)`).

## Choices made in this implementation

These points are not fixed by the original description of the technique and
were decided here:

* The stand-in circuit's next-state function, the output width of 1, and the
  fault-injection ports.
* The SCI multiplexers are steered per bit by "this module is the odd one
  out", and the priority encoder prefers module I, then II.
* The modules are frozen for one cycle when the error is seen, so a wrong
  state is not advanced before the pass, and for one verdict cycle after it.
* The FLU's two-module rule requires both counts to be non-zero so it cannot
  overlap the one-module rule.
* `NCF_TH` = 2; NCF counts only repeats of a single module and resets to 0.
* In master/checker mode Pr is raised on the two pairs of the dropped module.
* All registers reset asynchronously (active-low `rst_n`) to zero and to
  `ST_NORMAL`.

## Where this implementation differs from the published technique

* The two-pass variant's "unsuccessful recovery" exit (counters that do not
  return to zero in the second pass, revealing a fault during recovery) has
  no counterpart: with a single merged pass, a fault that strikes during the
  pass is repaired or missed like any other, and is not reported separately.
* The scan chains are not brought out for off-line manufacturing test; the
  controller is their only driver.
* In the published simulations the scan enable is driven from outside; here
  the controller raises it itself when the voter reports an error.
* The earlier single-pass scheme for single faults (ScTMR) and the two-pass
  SMERTMR controller are only comparison points for this design and are not
  implemented.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `scan_module_tb` | random normal/hold/scan/upset sequences against a model; a full recirculating pass restores the state |
| `tmr_voter_tb` | all 512 combinations of outputs, Pr and comparator faults |
| `scan_router_tb` | all 8 bit patterns: every SCI gets the majority bit |
| `mismatch_counters_tb` | random bits, enables and clears against counts kept by the testbench |
| `fault_locator_tb` | every count triple, against an independent rule (solve for `n_i`, locatable iff all are non-negative integers and one is zero) |
| `permanent_fault_detector_tb` | random fault histories against a model of MRFM/NCF |
| `smertmr_controller_tb` | directed passes with stand-in shift registers: pass length, repaired contents, verdicts, false alarm, master/checker, halts |
| `smertmr_top_tb` | 300 random episodes on the full system with a golden model: one and two faulty modules, latent faults, false alarms, three faulty modules, then permanent fault, master/checker and checker mismatch; each must occur at least once; the time from detection to resumed operation must be `L_SC`+2 cycles |
| `smertmr_multibit_tb` | the system at `L_SC` = 8 with several wrong flip-flops per module: one or two hit modules are fully repaired and named in the FMR, three hit modules halt, and two modules wrong in the same flip-flop end up equal but wrong, with the good module reported |
| `smertmr_two_faulty_tb` | the demonstration case: modules II and III faulty, repaired in exactly three shift edges, FMR naming II and III |

All of them pass. `smertmr_top_tb` and `smertmr_two_faulty_tb` run the system at
its default parameters.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/smertmr_pkg.sv tb/smertmr_top_tb.sv --top-module smertmr_top_tb
./obj_dir/Vsmertmr_top_tb +verilator+rand+reset+2
```

Swap the testbench file and `--top-module` for any other testbench. `verilator --lint-only -Wall` reports no errors on the RTL; its remaining
warnings are style notes (unconnected debug outputs of `scan_router`, and
`rst_n` used both as asynchronous reset and in assertion `disable iff`).

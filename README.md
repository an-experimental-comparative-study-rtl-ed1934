# Fault-tolerant pipeline stages: improved hybrid architecture and TMR

Faults in the combinational logic (CL) of a pipeline stage come in two kinds:
short single-event transients (SETs) that corrupt one computation, and
permanent faults (stuck-at, wear-out) that corrupt every computation that
sensitises them. This RTL protects one pipeline stage (input register, CL,
output register) against both, in three ways that can be simulated side by
side:

* **Improved hybrid fault-tolerant stage (iHyFT)**: the main design. It
  keeps three copies of the CL but runs only two. The two running copies are
  compared to detect errors. A detected error is first treated as transient:
  the input register rolls back and the result is computed again. If the
  error is still there, it is treated as permanent and the standby copy is
  switched in. Because one copy is always idle, it costs less power than
  triplication.
* **Partial TMR**: three CL copies between one input register and one output
  register, with a majority voter in front of the output register.
* **Full TMR**: three complete lanes (input register, CL, output register),
  with the voter after the output registers.

The TMR stages mask errors silently and never report them. The hybrid
stage either corrects an error or reports that it cannot. That is why the
hybrid stage still behaves safely once faults pile up in two copies, which
the fault-accumulation test below shows.

## Files

| file | contents |
|---|---|
| `rtl/ft_pkg.sv` | configuration and state types, configuration order |
| `rtl/ihyft.sv` | the hybrid stage, built from the five blocks below it |
| `rtl/shadow_input_reg.sv` | input register with shadow copy for rollback |
| `rtl/cl_demux.sv`, `rtl/cl_mux.sv` | reconfiguration demultiplexer and multiplexer |
| `rtl/window_comparator.sv` | comparator that checks the two running copies |
| `rtl/hyft_control.sv` | control logic: configuration and recovery state machine |
| `rtl/partial_tmr.sv`, `rtl/full_tmr.sv`, `rtl/tmr_voter.sv` | the two TMR stages and the voter |
| `rtl/cl_example.sv` | the protected combinational function (a stand-in), with fault-injection masks |
| `rtl/ft_arch_top.sv` | the three stages side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## The hybrid stage

```
             rollback                reconfigure (cfg)
        +-----------------+   +-------------+-------------+
        |                 v   |             v             v
in ---> [input reg | shadow] -> demux -> CL1 -+-> mux --y_a--+--> [output reg] --> out
                                    \--> CL2 -+      \        |
                                     \-> CL3 -+       \-y_b-> (=) <-- dc
                                                                |
                                          control logic <-- error
```

### Configurations

`cfg` names the two running copies. The first one (path A) feeds the
output register. The second one (path B) only feeds the comparator. The
demultiplexer drives the standby copy's inputs with zeros, so that copy does
not switch.

| `cfg` | path A | path B | standby |
|---|---|---|---|
| `CFG_12` (reset) | CL1 | CL2 | CL3 |
| `CFG_13` | CL1 | CL3 | CL2 |
| `CFG_23` | CL2 | CL3 | CL1 |

After a persistent error the stage moves to the next row (12, then 13, then
23, then back to 12). Two steps are enough to leave out any single faulty
copy.

### Where the comparison happens

The comparator takes both running results straight from the multiplexer, in
front of the output register. It compares them at the same rising edge the
output register captures on. Any value the register can capture has
therefore been checked. This is the point of the *improved* version. The
original hybrid stage compared the output register's content against the
second copy a little after the edge, so it missed transients that arrived
during the register's setup-hold time.

`dc` is the comparison-window enable. The control logic raises it in cycles
whose result is about to be captured: a valid slot in normal flow, and the
re-computation cycle. It is low in the rollback cycle, whose output is
thrown away. A mismatch inside the window clears the captured result's
`out_valid`. A wrong result is never presented as valid.

### Recovery sequence

The control logic has three states:

* `RUN` is normal flow.
* `ROLLBACK` is the cycle after a mismatch.
* `RECOMP` recomputes the input that failed.

In both recovery states the input register *swaps* its main and shadow
contents. This brings the failing input back to the CL and keeps the input
that followed it. The second swap restores the original order.

A corrected transient on input `x0`, with `f` the CL function:

| cycle | state | input reg | shadow | output reg | `out_valid` | `in_ready` |
|---|---|---|---|---|---|---|
| c0 | RUN (copies disagree at end of c0) | x0 | - | - | - | 1 |
| c1 | ROLLBACK | x1 | x0 | f(x0), wrong | 0 | 0 |
| c2 | RECOMP (copies agree) | x0 | x1 | f(x1), discarded | 0 | 0 |
| c3 | RUN | x1 | x0 | f(x0) | 1 | 1 |
| c4 | RUN | x2 | x1 | f(x1) | 1 | 1 |

Without the error, f(x0) would have been valid in c1. The recovery costs
exactly **two cycles**, and `in_ready` is low for those two cycles.

If the copies still disagree in `RECOMP`, the error is taken as permanent:

1. `cfg` advances to the next configuration.
2. The stage goes back to `ROLLBACK` and computes the same input again with
   the new pair. Each such reconfiguration adds two more cycles.
3. If all three configurations disagree, the stage raises the sticky flag
   `fatal` and drops that input. The likely causes are two faulty copies, or
   a fault outside the copies.
4. After that the stage keeps running fail-safe. A mismatch still blocks
   `out_valid`, but no recovery starts.

The retry budget is reset after every successful recovery.

### Interface and timing (`ihyft`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising-edge clock; active-low synchronous reset |
| `in_data`, `in_valid`, `in_ready` | in/in/out | W/1/1 | input is taken on a rising edge with `in_valid && in_ready` |
| `out_data`, `out_valid` | out | W/1 | checked result, valid two edges after its input was taken (no faults); no back-pressure |
| `fatal` | out | 1 | sticky: an error survived every configuration |
| `cfg` | out | 2 | current configuration (`ft_pkg::cfg_t`) |
| `ev_rollback`, `ev_reconfig`, `ev_corrected` | out | 1 | one-cycle event pulses |
| `flt_flip`, `flt_sa0`, `flt_sa1` | in | 3 x W | fault injection per CL copy; tie to zero |

Without faults the stage accepts one input per cycle.

## The TMR stages

`partial_tmr` votes in front of its single output register. A fault in
either register is not protected. An upset in the output register goes
straight to the output. The port `flt_seu` flips bits of the stored value
to show this. A fault on the net that feeds all three
copies from the input register reaches every copy in the same way, so the
vote cannot mask it (common-mode failure). The port `flt_in_flip` injects
exactly there.

`full_tmr` triplicates both registers and votes after them, so the three
lanes share nothing. An upset in one lane's register, injected with
`flt_seu[i]`, is voted away. Its valid bit is triplicated and voted like
the data.

Both stages have a latency of two edges, take one input per cycle, and have
no handshake beyond `in_valid` and `out_valid`. The voter is a bitwise
two-of-three majority.

## The protected logic and fault injection

The stages are generic: they wrap whatever CL sits between the two
registers. `cl_example` is a stand-in chosen for this RTL:

    f(x) = (5*x + 3 mod 2^W) XOR rotate(x, W/2)

It has no pass-through path. To protect real logic, replace the body of
`cl_example` (keep its ports) and set `W` to the stage's register width.

Each copy has three fault masks applied to its output:
`y = ((f(x) ^ flt_flip) & ~flt_sa0) | flt_sa1`. A one-cycle pulse on
`flt_flip` models an SET that reaches the output register. Holding `flt_sa0`
or `flt_sa1` models a stuck-at fault. These are test hooks: tie them to zero
in a real design. Synthesis then removes them.

## Top level

`ft_arch_top` places `ihyft`, `partial_tmr` and `full_tmr` next to each
other. They share `clk` and `rst_n`. Every other port is brought out per
stage with the prefixes `hy_`, `pt_` and `ft_`, so the three stages can be
given the same stimulus and the same faults. The only parameter is `W`,
which defaults to 8.

## Verification

Every testbench checks against reference values computed in the testbench
itself. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. To
run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/ft_pkg.sv tb/tb_ihyft.sv --top-module tb_ihyft -o sim
    ./obj_dir/sim

What each testbench covers:

* **`tb_hyft_control`** checks the control outputs cycle by cycle through
  these cases:
  * a corrected transient, with a stall of exactly two cycles;
  * a persistent error that walks through all three configurations into
    `fatal`;
  * fail-safe operation after `fatal`;
  * an error cured by one reconfiguration;
  * the retry budget starting again.
* **`tb_ihyft`** runs the hybrid stage against a scoreboard. It checks:
  * two-edge latency and full throughput;
  * random transients: all results correct and in order, and two stall
    cycles per recovery;
  * a stuck-at fault on CL2, which moves the stage to `CFG_13`;
  * a stuck-at fault on CL1, which moves it to `CFG_23`;
  * two faulty copies: `fatal`, and no wrong result marked valid.
* **`tb_partial_tmr`, `tb_full_tmr`** check latency and throughput. They
  check that single-copy transient and stuck-at faults are masked, that the
  same error in two copies outvotes the good copy, and that an upset in one
  output register is masked by full TMR but reaches the output of partial
  TMR. For partial TMR they also check that a fault on the shared input net
  gets through.
* **`tb_ft_arch_top`** runs fault-injection campaigns on all three stages at
  once, at the default size. It classifies each fault per stage as silent,
  corrected (the hybrid stage recovered) or fail-silent (a wrong result was
  marked valid). The campaigns are:
  * **Transients:** 2000 single-bit, one-cycle flips on a random copy, one
    every 400 cycles. That is 250 000 faults/s at 100 MHz. One in ten hits
    the partial-TMR shared input net instead.
  * **Permanent faults:** 48 runs with one stuck-at bit each.
  * **Fault accumulation:** two copies wrong in an overlapping bit.
  * **Register upsets:** 200 one-cycle upsets in the TMR stages' output
    registers.

  The testbench fails if any mechanism never happens: rollback, correction,
  reconfiguration, `fatal`, recovery stall, TMR masking, TMR outvoting, a
  silent fault on the standby copy, or a common-mode failure. The upset
  campaign must end with every partial-TMR upset fail-silent and every
  full-TMR upset masked.

A typical campaign result:

| stage | transient: silent / corrected / fail-silent | permanent: fail-silent | two faulty copies |
|---|---|---|---|
| hybrid | 48.5% / 51.5% / 0% | 0% | `fatal` raised, nothing marked valid |
| partial TMR | 90.0% / 0% / 10.0% (all from the shared input net) | 0% | wrong results, unflagged |
| full TMR | 100% / 0% / 0% | 0% | wrong results, unflagged |

These figures come from a cycle-level model with faults at the CL outputs.
They show the mechanisms at work. They do not predict gate-level fault
rates.

## Limits and departures

* **Sub-cycle timing is not modelled.** The architecture defines the
  comparison window as the high phase of a delayed clock. It uses a
  pseudo-dynamic comparator: a static comparator combined with a transition
  detector that catches transitions inside the window. Here:
  * the window is a cycle-level enable;
  * only the static comparison is built;
  * an SET shorter than a cycle is modelled as a flip that lasts the whole
    cycle, so every injected SET is captured.

  For the same reason, three things are missing:
  * The *original* hybrid stage is not provided. It compared after the
    edge, which relies on CL propagation delay. At cycle level it behaves
    like the improved stage.
  * The late-capture escapes that separate the two versions cannot be
    reproduced.
  * Delay faults from wear-out can only be approximated, as flips or
    stuck-at faults.
* **The shadow is a flip-flop, not a latch.** Recovery works by swapping
  the main and shadow registers. This design's own choices include:
  * the swap itself;
  * the valid/ready handshake;
  * the retry limit;
  * the order of configurations;
  * the `fatal` behaviour;
  * driving zeros into the standby copy;
  * using the lower-numbered running copy as path A.
* **Faults are injected at each copy's output**, not at gate level inside
  it. The only shared net that can be faulted is the partial-TMR input
  fan-out. Register upsets can be injected only into the TMR stages. The
  hybrid stage's registers are unprotected in the architecture, and they
  have no upset hook here.
* **The protected logic is a stand-in.** The benchmark circuits the
  architectures are usually evaluated on are not included. Area, power and
  timing overheads are not reproduced.
* **The unprotected baseline stage is not provided.**

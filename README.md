# Concurrent error detection for asynchronous burst-mode machines

An asynchronous burst-mode machine (ABMM) is a clockless controller: a
two-level AND-OR network whose state lines are fed straight back to its
inputs. The environment changes a *burst* of inputs, in any order and at any
pace; only when the whole burst is in does the machine answer, with a state
and output change that must be free of glitches, because the environment
reads every output edge as a handshake event.

Concurrent error detection (CED) means checking, while the circuit runs, that
its outputs are right, so that a single-event transient on any gate is
reported. Two things make this hard for a burst-mode machine:

* **There is no clock to say when to compare.** A duplicate (or a code
  generator) settles at its own moment after a burst, so comparing
  continuously gives false alarms. The fix here is *checking synchronization*
  by a **Transition Prediction Function (TPF)**: a second small burst-mode
  machine whose output is 0 exactly while a multi-bit burst is only partly
  applied. Inside a burst nothing may move, so the checker is on; once a burst
  is complete the checker is off until the next input change, at which moment
  the results of the previous burst must have settled and agree.
* **Redundant logic hides errors.** The extra products that keep the machine
  glitch-free mean that an upset in one of them often leaves every final value
  right and only makes an output glitch. A comparator never sees that, but the
  environment does. A **Hazard Detection Circuit (HDC)** watches each output
  for a second edge within one burst.

On top of these two pieces this RTL builds three complete CED schemes around
one example machine and puts them side by side in `ced_top`:

| scheme | checker input | extra hardware |
|---|---|---|
| duplication (`ced_duplication`) | identical hazard-free copy, comparator | TPF, input change detector, HDC |
| transition-triggered (`ced_transition_triggered`) | cheaper copy that may glitch, state held by multiplexers, comparator | TPF, input and output change detectors, HDC |
| Berger code (`ced_berger`) | inverter-free re-encoded machine, Berger check-symbol generator, Berger checker | TPF, input change detector, HDC |

The duplication and transition-triggered schemes leave the monitored machine
untouched. The Berger scheme replaces it by a re-encoded version, which is
cheaper in total but changes the monitored circuit itself.

## The example machine

Inputs `{a,b,c,d}`, outputs `{x,w}`, three states. Entries are next state,
then `x w`; `-` is a combination the environment never applies.

| state | 0000 | 1000 | 1001 | 1010 | 1011 | 1100 |
|---|---|---|---|---|---|---|
| S0 | S0,00 | S0,01 | S0,00 | S2,00 | - | S1,00 |
| S1 | S0,00 | S1,10 | S1,11 | - | - | S1,00 |
| S2 | - | S2,00 | S0,00 | S2,00 | S2,00 | - |

Every burst changes one input bit except in S2, where `c` falls and `d`
rises (1010 -> 1001), in either order. The columns 1000 and 1011 of S2 are
the half-way points of that burst; the machine must stay in S2 there. This
one burst is what gives the TPF, the state multiplexers and the G2 gates
something to do.

All the machines in `rtl/` are written as explicit sum-of-products covers
(see each file's header). The covers were derived for this RTL so that every
burst of the table is glitch-free: every 1->1 output transition is held by
one product, and no product switches twice during a burst. They are not a
copy of any published gate netlist.

| module | role | state code |
|---|---|---|
| `abmm_example` | the monitored machine | S0=00, S1=10, S2=01 on `{Y1,Y0}` |
| `abmm_example_optdup` | cheaper duplicate (hazards allowed, half-way columns are don't-cares) | same |
| `tpf_example` | transition prediction function | one line `V`, set in S2 |
| `abmm_example_invfree` | monitored machine for the Berger scheme; no complemented state literal anywhere | S0=0011, S1=0110, S2=1001 on `{Y3..Y0}` |
| `berger_gen_example` | produces check symbol `{k1,k0}` = complement of the number of 1s in `{x,w}` | same as `abmm_example` |

## How asynchrony is modelled

The circuits have no clock, but SystemVerilog needs some notion of delay to
show a glitch, a pulse or a race. This RTL uses a **unit-delay model**:
`clk` is a free-running time-step clock and one tick stands for one gate
delay.

* Every AND gate of a machine is a flip-flop on `clk` (a one-literal
  product counts as a gate). The OR gates are zero delay. So every feedback
  loop has exactly one delay element, and a machine's outputs react one tick
  after an input change. Outputs that also depend on the new state settle one
  tick later, so **outputs are final two ticks after the last bit of a
  burst**.
* The delay line of a change detector is `DELAY` flip-flops (default 1). Its
  pulse after a change is `DELAY` ticks wide.
* The feedback loop of the HDC is one flip-flop.

The result is ordinary synthesizable synchronous RTL that behaves, tick by
tick, like the asynchronous circuit with unit gate delays. A real
implementation would drop the clock and use the gates themselves. The
environment must respect fundamental mode: wait until the machines have
settled (the testbenches wait six ticks) before starting the next burst. The
bits of one burst may arrive in any order, at any spacing, several in one
tick or one per tick.

Reset (`rst_n`, active low, asynchronous) is this design's addition: it loads
every machine with state S0 and with the gate values that S0 gives at inputs
0000. Hold the inputs at 0000 during reset.

## The checking pieces

**Change detection circuit** (`change_detector`). For each signal,
`Change_i = sig_i XOR sig_i delayed by DELAY ticks`, ORed over all signals.
On the primary inputs it marks the start of each burst and clears the HDC. In
the transition-triggered scheme it also watches the outputs, to see when they
really change.

**Hazard detection circuit** (`hazard_detector`). For every monitored
output, a transition pulse (the same delay-and-compare circuit) feeds a
feedback loop:

    fb_i     <= Change_i | (fb_i & ~in_change)
    Hazard_i  = fb_i & Change_i          hazard = OR of all Hazard_i

The first edge of an output after an input change sets `fb_i`; a second edge
before the next input change is a hazard. An edge in the same tick as the
clearing pulse still sets the loop. `hazard` is a one-tick pulse per extra
edge, not a held flag. Only the monitored machine's outputs are watched: the
duplicate and the code generator do not talk to the environment. The state
lines need no watching either, because a glitch on a state line always shows
up as a wrong or glitching output.

**TPF** (`tpf_example`). Written as a burst-mode machine so that it is itself
glitch-free: `TPF = V' + c d' + c' d`, `V = a b' c d' + a b' d' V + a b' c V`.
The published TPF has two dummy states, one for each order of the multi-bit
burst. They agree with S2 on every entry, so after state reduction a single
feedback line is enough; this reduction is this design's own.

**Comparator** (`output_comparator`) and **Berger checker**
(`berger_checker`). Both are plain combinational checks. The checker counts
the 1s in the information bits, complements the count and compares it with
the check symbol. Any error that only flips bits 1->0, or only 0->1, makes a
noncode word. A self-checking two-rail checker is the usual choice in
practice; it is not built here.

## Glue gates: when a mismatch counts

Each scheme ends in gates G1 and G2 and their OR with the HDC, G3 = `error`.
`in_change` is the input change pulse, `out_change` the output change pulse,
and `bad` is the comparator mismatch (or the Berger checker's noncode).

| scheme | G1 | G2 |
|---|---|---|
| duplication | `bad & in_change`: a new burst starts, the previous one must have settled to agreeing outputs | `bad & ~TPF`: a mismatch inside a multi-bit burst |
| transition-triggered | `out_change & ~TPF`: the machine moved while the TPF said nothing may move | `bad & in_change & TPF`: a new burst starts after a complete one |
| Berger | as duplication, with noncode | as duplication, with noncode |

In the transition-triggered scheme the `TPF` term in G2 is this design's
choice. The optimized duplicate is allowed to show anything at the half-way
columns of a multi-bit burst, so the comparison must skip the input change
that completes such a burst. The duplicate's state multiplexers take the new
state only when `load = TPF & ~in_change`. A glitch in the duplicate's
don't-care region therefore never reaches its state.

For the Berger scheme, the published description mixes two arrangements:
the transition-triggered G1 ("output changes while the TPF predicts none"),
and a block diagram that is the duplication arrangement with one input change
detector. The RTL follows the block diagram.

## What the testbenches show

Every block has a self-checking testbench in `tb/` (`tb_<module>.sv`). They
compare against a reference model in `tb/ced_tb_pkg.sv`. That model holds
the flow table above, the TPF rule and the Berger symbol, written from the
specification and not from the RTL covers. The machine testbenches walk at
random through all legal bursts, with the bits of the multi-bit burst in both
orders. They check the final values and the state code. They check that
outputs are valid two ticks after a burst, that no output moves before a
burst is complete, and that no output changes twice.

The scheme testbenches and `tb_ced_top` add single-event transients through
the `upset` ports. An `upset` port XORs a mask into the AND-gate outputs of
the monitored machine; it is a test access of this design.

| injected transient | result | caught by |
|---|---|---|
| the only product holding `w` flips for one tick, in S0 at 1000 | `w` glitches 1->0->1, all final values right | HDC only: the checker is off between bursts |
| a state product flips in S0 at 1000 | machine settles in S1 (S0/S1 mix for the inverter-free one) between bursts | duplication G1, Berger G1 at the next input change; transition-triggered G2. The HDC also fires when the wrong edge hits an output that already moved in this burst |
| a gate flips after the first bit of the S2 burst (TPF low) | an output moves inside the burst | duplication G2, transition-triggered G1, Berger G2 |

An error-free run of several hundred bursts must raise no flag in any scheme,
which shows that the TPF and change-detector timing give no false alarms.
`tb_ced_top` counts every mechanism and fails if one never happened:
single-bit and multi-bit bursts in both orders, the TPF going low, the
duplicate's multiplexers holding, every state, every flag of every scheme, and
a Berger noncode word.

`tb_ced_campaign` tests the central claim exhaustively for the example. A
scheme should flag every functional error and every error-induced hazard,
and nothing else. For each scheme the campaign flips each AND gate of the
monitored machine for one tick. It does this at every tick from just before
a burst to the end of its settling time, for every legal burst (the
multi-bit burst in both bit orders). After the burst the run follows the
error-free path for three more bursts. Each run is compared with the
error-free run, per burst interval:

* **functional**: a settled output value is wrong;
* **hazard only**: all settled values are right, but an output made extra
  edges, or moved before the last bit of its burst was in;
* **harmless**: at most an edge came later. A clockless circuit may answer
  late, so timing alone is not an error.

Every functional and hazard-only run must raise `error`, and every harmless
run must raise nothing. All of them do:

| scheme | upsets | functional | hazard only | harmless |
|---|---|---|---|---|
| duplication | 1088 | 252 | 366 | 470 |
| transition-triggered | 1088 | 252 | 366 | 470 |
| Berger | 1632 | 374 | 353 | 905 |

About a third of the upsets in the example's hazard-free cover are
hazard-only: a comparator alone would miss them. The inverter-free machine
has more gates, so a smaller share of its upsets matters at all.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        rtl/ced_pkg.sv tb/ced_tb_pkg.sv tb/tb_ced_top.sv --top-module tb_ced_top
    ./obj_dir/Vtb_ced_top

Replace `tb_ced_top` by any other `tb_*` module to test one block. Each
testbench runs in well under a second. Uninitialised variables may start at
random values (`+verilator+rand+reset+2`): everything that is read is reset or
initialised. `tb_ced_top` runs the top at its only configuration, since the
top has no parameters.

## Changing it

* **A different machine.** Write its cover in the style of `abmm_example`:
  an `and_plane` function, one flip-flop per product, OR plane as `assign`s.
  Do the same for its TPF, and for an optimized duplicate or an inverter-free
  version plus code generator. Then widen the `N` of the detectors,
  comparator and checker (`R`, `K`). The detectors, comparator and checker
  are generic. The machines are specific to the example.
* **Wider change pulses.** Set `DELAY` of `change_detector`. A pulse must be
  shorter than the fastest response of the machines, or the HDC will clear
  the first real edge of a burst. It must also last until the TPF has
  reacted, or the duplicate's multiplexers will open too early.
* Product indices for the `upset` ports are listed in each machine's header.

## Limits and departures

* Clockless circuits are modelled with unit gate delays on a clock. Real
  gate delays differ, and the detectors rely on pulse widths relative to
  them. Hazard widths smaller than one tick do not exist in this model.
* The covers, the reduced TPF, the reset and the `upset` ports are this
  design's own. The state codes of the example (S0, S1, S2 as 00, the code
  with `Y1` set, the code with `Y0` set) and of the inverter-free machine
  (0011, 0110, 1001) follow the published method.
* The thirteen benchmark controllers the method was evaluated on are not
  included: only their sizes are known, not their flow tables.
* The checkers and the glue gates are not themselves protected. An upset
  there either raises a false alarm or goes unnoticed while the machine is
  right.

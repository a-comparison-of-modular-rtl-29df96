# Modular self-timed control: sequencers, calls and selects in 2-phase and 4-phase handshake styles

A self-timed controller has no clock. Each unit of work is started by a
request and reports that it is done with an acknowledge. Controllers are built
from a few small modules:

- **Sequencers** run steps one after another.
- **Selects** branch on a condition.
- **C-elements** join parallel branches.
- **Call elements** let several places in the algorithm share one resource,
  such as an ALU or a register.

Everything in this library concerns one question. When a step's work has been
acknowledged, how long must the sequencer wait before it starts the next step?

- In **2-phase** (transition) signalling, every edge is an event and nothing
  needs to return to zero. The acknowledge of one step can simply be the
  request of the next, so sequencing costs no logic at all.
- In **4-phase** (return-to-zero) signalling, every request and acknowledge
  must go back to 0 before the wire can be used again. A sequencer can start
  the next step at one of three points:

  | Release | Next step starts when... |
  |---|---|
  | **broad** | ...the whole work handshake is back at zero |
  | **weak-broad** | ...the work request has fallen (the acknowledge may still be high) |
  | **narrow** | ...the work is acknowledged, while its handshake is still restoring |

Earlier release overlaps useful work with the restoration of the handshake, so
it is faster. The price is that requests and acknowledges of different steps
may now be high at the same time. Every shared resource then needs a call
element that can tolerate this overlap, and a branch condition may need to be
latched.

The library contains:

- the sequencers for each release style;
- the call element and the select that match each style;
- one control segment of a processor state machine (a 12-bit, PDP-8-like
  datapath), built in every style side by side so that the styles can be
  compared on the same algorithm:
  - 2-phase;
  - 4-phase flat broad, weak-broad and narrow;
  - 4-phase fully hierarchical.

## The example segment

The segment uses the registers AC, MB, PC and LINK, and the carry flag
CARRYOUT. Each pass through it does this:

```
step 1   AC -> MB
step 2   fork:  write MB to memory
               || nested sequence: AC+1 -> AC, then if not CARRYOUT: complement LINK
         join
branch   if SKIP: step 3 (PC+1 -> PC), else go straight on
merge    both paths
step 4   F -> IX (brought out as a request/acknowledge pair), then on to the next step
```

The segment shows all four kinds of control: sequencing, a parallel fork and
join, a conditional branch, and a merge of two paths. Step 2 also contains a
nested sequence.

**4-phase version (`ctrl_seg_4ph`).**

- Steps 1 to 4 are sequencers of the chosen style: flat (state-machine)
  sequencers, or van Berkel sequencers in the fully hierarchical style.
- The nested sequence in step 2 uses the hierarchical van Berkel sequencer. A
  flat sequencer acknowledges its input early, before its work has finished,
  so it cannot report when a nested sequence is complete. The hierarchical
  sequencer can.
- The two branch paths meet in a call element of the matching style. This
  works because the two paths are never active at the same time.
- The true branch of the CARRYOUT select has no work, so it acknowledges
  itself at once.

**2-phase version (`ctrl_seg_2ph`).**

- It is pure wiring plus two selects, one C-element join and two XOR merges.
- The acknowledge event of each unit of work is the request event of the next.
- A merge of two mutually exclusive event wires is an XOR.

## Sequencers (4-phase)

Each sequencer has three handshakes:

- input (`in_req` / `in_ack`), from the previous step;
- work (`wk_req` / `wk_ack`), to this step's work;
- output (`out_req` / `out_ack`), to the next step.

`s` is a C-element with master clear. `AC(common; plus)` is an asymmetric
C-element: its output rises when all of its inputs are high, and falls when its
common inputs are low. The plus inputs only gate the rising edge.

| Module | Release | Circuit |
|---|---|---|
| `seq_vanberkel` | broad, hierarchical | `s = C(in_req, wk_ack)`, `wk_req = in_req & ~s`, `out_req = s & ~wk_ack`, `in_ack = out_ack` |
| `seq_winkel_broad` | broad, flat | `s = C(in_req, ~out_ack)`, `wk_req = in_req`, `out_req = s & ~wk_req & ~wk_ack`, `in_ack = wk_ack` |
| `seq_winkel_weak_broad` | weak-broad, flat | as broad, but `wk_req = in_req & ~out_ack` and `out_req = s & ~wk_req` |
| `seq_winkel_narrow` | narrow, flat | `wk_req = AC(in_req; ~out_ack)`, `out_req = AC(s; wk_ack)`, `in_ack = wk_ack` |

`seq_step` picks one of the four sequencers from the `STYLE` parameter (type
`seq_style_e` in `selftimed_pkg`). `SEQ_HIER` selects the van Berkel
sequencer.

**Hierarchical sequencer.** The van Berkel sequencer passes its output
acknowledge straight back as its input acknowledge. A chain of them therefore
acknowledges only when the last step is done, and it returns to zero only when
every step has returned to zero.

**Flat sequencers.**

- All three acknowledge their input as soon as their own work is acknowledged.
  This is what makes a loop of them fast.
- The broad sequencer expects no new input request before its output
  acknowledge has risen. This holds in any loop of two or more steps. A
  testbench that drives it alone must respect this rule.

**Fully hierarchical segment.** The segment can also be built entirely from
van Berkel sequencers (`STYLE = SEQ_HIER`). It is then one nested sequence:

- its input acknowledge `ia1` rises only after the output handshake
  `or4`/`oa4` has completed;
- every request stays high until the whole sequence has finished, so both
  selects are latched.

**How release style shows up in the timing.** The top-level testbench runs six
passes per style, with the same 5 ns work delays. It measured:

| Style | Time for six passes |
|---|---|
| flat broad | 246 ns |
| hierarchical | 246 ns |
| weak-broad | 154 ns |
| narrow | 148 ns |

From the start request to the request for the last step, the 2-phase segment
took 100 ns over the same six passes. Every 4-phase style took 148 to 246 ns.
Sequencing by wires avoids all return-to-zero traffic.

The testbench checks that narrow ≤ weak-broad ≤ broad ≤ hierarchical, and
that 2-phase is fastest. Narrow
release gains little over weak-broad here. Each step waits on a delay line, and
the two differ only by a few gate delays per step, which are zero in the
simulation model.

## Call elements

A call element shares one resource between clients that never request it at
the same instant. It forwards a client's request to the resource (`rs`/`as`)
and returns the acknowledge to the client that asked.

| Module | Use with | What it tolerates | Circuit (per client i) |
|---|---|---|---|
| `call_2ph` | 2-phase | 2 clients, events | `rs = r1 ^ r2`, `a1 = C(r1, as ^ r2)`, `a2 = C(as ^ r1, r2)` |
| `call_broad_4ph` | broad | nothing overlaps | `rs = OR(req)`, `ack[i] = C(req[i], as)` |
| `call_weak_broad_4ph` | weak-broad | old acknowledge still high when a new request arrives | `g[i] = req[i] & ~ack[others]`, `rs = OR(g)`, `ack[i] = C(g[i], as)` |
| `call_narrow_4ph` | narrow | old request and acknowledge both still high | `g[i] = AC(req[i]; ~req[others] & ~ack[others])`, `ack[i] = AC(as; g[i])`, `rs = OR(g)` |

- In the weak-broad call, a new request is held back from the resource until
  the old acknowledge has fallen. A resource acknowledge left over from the
  old call therefore cannot answer it.
- In the narrow call, the new request is also held back until the other
  client's request has fallen.
- None of the calls arbitrates between two requests that rise at exactly the
  same time. Such a resource needs a mutual-exclusion element, which is not
  part of this library.

## Selects

- **`select_4ph`** copies its input request to the true or the false output.
  - With `LATCHED = 0` it is a plain demultiplexer. The condition must then
    stay stable for as long as the request is high.
  - With `LATCHED = 1` a transparent latch follows the condition while the
    request is low and holds it while the request is high. A later step can
    then change the condition without redirecting a request that is still
    active.
  - The segment uses latched selects in the narrow and hierarchical styles.
    There a request can stay high for a whole loop. This is the default of
    `LATCH_SELECTS`.
- **`select_2ph`** holds state. It compares its input with the parity of its
  two outputs. If they differ, an event is pending, and it toggles the output
  chosen by the condition at that moment. Between events the condition is
  ignored.
- Neither select handles a condition that changes at the same moment as the
  request arrives, such as an external interrupt line. That case needs a
  select with a metastability-safe sampler, which is not included.

## Datapath and bundled data

`seg_datapath` holds AC, MB, PC, LINK and CARRYOUT (width `W`, 12 by default).
It has these handshakes:

- AC -> MB;
- AC+1 -> AC, which also sets CARRYOUT;
- complement LINK;
- PC+1 -> PC.

Each register loads on the edge of a strobe:

- In 4-phase, the strobe is the request level. This is the REQ-only
  ("weak-broad") level control, used for every sequencer style.
- In 2-phase (`TWO_PHASE = 1`), the strobe is `req ^ ack`. Its rising edge is
  the request event.

Each acknowledge is the request delayed by `matched_delay`. This is the usual
bundled-data rule: the delay must be longer than the logic it stands for. The
delay is a behavioural model (`assign #DELAY`) and is not synthesizable. A real
implementation uses a chain of gates sized to the register path.

Memory is not modelled. Its write handshake (`mem_req`/`mem_ack`, data
`mem_data` = MB) is brought out of the top, and so is the F -> IX work
handshake.

## Top level

`selftimed_top` (parameters `W = 12`, `DELAY = 5` ns) contains five copies of
the segment. Each copy has its own datapath:

| Index | Signalling | Sequencers | Call | Selects |
|---|---|---|---|---|
| 0 | 4-phase | flat broad | broad | combinational |
| 1 | 4-phase | flat weak-broad | weak-broad | combinational |
| 2 | 4-phase | flat narrow | narrow | latched |
| 3 | 4-phase | hierarchical (van Berkel) | broad | latched |
| `_2ph` | 2-phase | wires | XOR merges | state-holding |

**4-phase ports.** Each is an array indexed by segment:

- `ir1`/`ia1`: start the segment.
- `or4`/`oa4`: pass control on.
- `wr4`/`wa4`: F -> IX.
- `mem_req`/`mem_ack`/`mem_data`: memory write.
- `skip`: the branch condition.
- `ac`, `mb`, `pc`, `link`, `carryout`: register values.

**2-phase ports.** The 2-phase segment has the same signals with the suffix
`_2ph`. `r1_2ph` starts it, and `r4_2ph` requests F -> IX.

**Master clear.** `mc_n` is an active-low master clear. It clears every
C-element and loads `ac_init`, `pc_init` and `link_init` into all five
datapaths.

`call_2ph` is a library element and is not used in the top. The 2-phase
segment only merges exclusive paths, which needs an XOR, not a call.

## Simulation

Every testbench checks its results itself. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends it if it hangs.
With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/selftimed_pkg.sv \
          tb/selftimed_top_tb.sv --top-module selftimed_top_tb -o sim
./obj_dir/sim
```

Replace `selftimed_top_tb` with any other file in `tb/` to test one element.
`selftimed_top_tb` runs the top with its default parameters. For each style it
runs six passes. AC starts two counts below overflow, so that CARRYOUT is
both true and false, and SKIP alternates. It checks:

- every register, and the data written to memory, against a reference model;
- that each pass gives exactly one memory write, one F -> IX request and one
  output request (an extra one would reveal a glitch);
- the timing relation between the styles.

It also counts how often each mechanism happened:

- the SKIP branch, taken both ways;
- the CARRYOUT branch, taken both ways;
- memory writes;
- F -> IX requests;
- early input acknowledges (flat styles) and late ones (hierarchical).

A count of zero is a failure.

Things to know when changing the RTL:

- **Two-state start-up.** Verilator has only two logic states and starts
  undriven storage at random values. The testbenches therefore pulse `mc_n`
  low before they start, and they ignore handshake activity before that.
- **Combinational loops.** Verilator warns about combinational loops
  (UNOPTFLAT) in every controller. Handshake rings have no clocked register in
  them, so these loops are expected. Each module's header explains its loops.
- **C-element models.** C-elements are written as `always_latch` blocks with
  blocking assignments. An update that can be evaluated twice in one time step
  must give the same result both times (see `select_2ph`). Otherwise an event
  wire can toggle twice.

## Where this design makes its own choices

The circuits of the sequencers, the call elements, the selects and both
segments follow the published design. These parts are this design's own:

- **Master clear.** The active-low master clear on every state-holding element.
- **Narrow sequencer and narrow call.** The published circuits do not mark
  which inputs of each asymmetric C-element act on the rising edge only.
  That choice is this design's reading of the stated rules for when each
  signal may rise and fall.
- **Styles other than flat broad.** The published segment is drawn only in
  flat broad style and in 2-phase style. The weak-broad, narrow and
  hierarchical copies change only the sequencers, the merge call and (for
  narrow and hierarchical) the selects. The hierarchical copy keeps the
  final output handshake instead of ending the sequence.
- **Datapath.** The register datapath is minimal: edge-triggered registers, a
  plain increment for AC+1 and PC+1, and a fixed matched delay. The processor
  this segment belongs to uses a dual-rail ALU with completion detection
  instead.
- **Not built.** The rest of the processor is not built: instruction set,
  memory, interrupts and ALU. So no instruction-level program can be run.
  Neither are the D-element and pipeline sequencers from the literature that
  the styles are usually compared with.

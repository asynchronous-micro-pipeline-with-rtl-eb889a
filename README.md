# Asynchronous micro-pipeline with multi-stage sections

An ordinary asynchronous micro-pipeline has one-stage sections: each section
is a register plus some logic, and every request/acknowledge handshake moves
data one step along the chain. This design builds a pipeline from
**multi-stage sections** instead. Each section runs an iterative computation
on its own local clock. Its register file feeds its operation logic, and the
result goes back into the register file on every clock cycle, for as many
cycles as the algorithm needs. Each section therefore keeps its own data, so
no pipeline registers are needed between sections. What is needed is control
that knows when a section has finished and when the next one is free to take
the result. Sections finish at very different times, so that control is
asynchronous. It takes one RS latch per section boundary, plus one flip-flop
per section that brings the asynchronous start request into the section's
clock domain.

```
             +-----+           +-----+           +-----+           +-----+
 source ---> | CA0 | --Go----> | MPS1| --R-----> | CA1 | --Go----> | MPS2| ... ---> | CAN | --Go--> sink
   R  <--A-- |     | <--F,B--- |     | <--A----- |     | <--F,B--- |     |          |     | <-F,B--
             +-----+           +-----+           +-----+           +-----+
   data ===========================> DataOut of MPS1 ====================> ...   ==> out_data
```

## Section states and the signals between neighbours

After reset a section is always in exactly one of three states, and it
passes through them in a fixed order, Free -> Busy -> Ready -> Free:

| state | meaning | status signal |
|-------|---------|---------------|
| Free  | the last result has been taken; the section can be started | `F` (read by the automaton upstream) |
| Busy  | iterating; the input bus is ignored, the output bus is not valid | `B` (read by the automaton upstream) |
| Ready | finished; the result is held on the output bus | `R` (read by the automaton downstream) |

Two control signals come back to each section. `Go` comes from the automaton
on its input side and starts it. `Acknowledgement` (`A`) comes from the
automaton on its output side and tells it that its result has been taken.
The state is one-hot (`mp_pkg::sec_state_e`), so `F` and `B` are each
straight flip-flop outputs and cannot glitch. The automata depend on that,
because they are not clocked.

## The control automaton (`ca`)

Each boundary between section k and section k+1 has a two-state Moore
automaton, built as one RS latch:

* **S0** (latch clear): `A_k` is high and `Go_k+1` is low.
* **S0 -> S1** when `R_k & F_k+1`: the upstream section has a result and the
  downstream section is free.
* **S1** (latch set): `Go_k+1` is high and `A_k` is low.
* **S1 -> S0** when `B_k+1`: the downstream section has started, so it has
  loaded the data. Reset also forces S0, and it takes priority.

The latch is written with `always_latch`. A section's `F` and `B` are never
high together, so the latch is never set and reset at the same time.

One exchange is a four-phase handshake:

1. section k enters Ready, so `R_k` rises;
2. the latch sets: `Go_k+1` rises and `A_k` falls;
3. section k+1 catches `Go` on its clock, loads `DataOut_k` and enters Busy, so `B_k+1` rises;
4. the latch clears: `Go_k+1` falls and `A_k` rises. Section k sees that its
   data has been taken and enters Free.

Two orders of arrival are possible, and every automaton sees both in the tests.

* **Waiting for data:** section k+1 is already Free when section k becomes Ready.
* **Waiting for a free section:** section k is already Ready while section k+1
  is still busy. The latch then fires the moment `F_k+1` rises.

## How a section knows its result was taken (`mps_control`)

This is the most delicate part of the design. It is also largely this
design's own choice, because the original defines the rule only as "Free
follows Ready together with Acknowledgement".

In S0 the automaton holds `A_k` high all the time. A high `A_k` on its own
therefore means nothing. The evidence that the data was taken is a low phase
of `A_k` (S1) followed by `A_k` high again (back in S0). That low phase lasts
only about two clock periods of the downstream section. It can be shorter
than one period of the upstream section, so sampling `A_k` on the upstream
clock could miss it and deadlock the chain. To prevent this:

* a flip-flop `taken` is set **asynchronously** by `A_k` going low, and
  cleared when the section next loads data;
* the section goes Ready -> Free on the first local clock edge with
  `taken & A_k`;
* the output `R` is `Ready & ~taken`, so `R` falls the moment the automaton
  enters S1. Without this, a slow upstream section would hold `R` high long
  enough for a fast downstream section to finish and become Free again. The
  automaton would then fire a second time and hand over the same data twice.
  `taken` is cleared only on the next load, so `R` does not glitch at the
  Ready -> Free edge.

An assertion in `mps_control` checks that `A` is low only while the section
is Ready. The tests count how often the low phase was shorter than the
upstream clock period (`short_s1`). With the default clocks this happens
thousands of times.

## The synchronizer (`synchronizer`)

`Go` is asynchronous to the section's clock. A rising-edge D flip-flop
samples it. Its asynchronous Clear is driven by the section's `Busy`, which
has priority.

* Variant A: `Enable = Q`.
* Variant B: `Enable = Q & Go`. The fall of `Go` then ends `Enable` directly.

The default is variant B. `VARIANT = mp_pkg::SYNC_A` selects variant A; the
original offers both without preferring one. Timing, in local clock edges:

* the first edge after `Go` rises sets `Q`, so `Enable` rises;
* the next edge loads the data and enters Busy;
* `Busy` then clears `Q` at once and keeps it cleared for the whole
  computation.

`Enable` therefore lasts at most one clock period. Reliable capture needs
`Go` to stay high for at least one period plus one clock pulse
(`t_Go >= T + t1`). The handshake guarantees this, because `Go` falls only
when the section reports Busy. The global reset is also ORed into Clear, so
that `Enable` is low after power-up; that is this design's addition. The
flip-flop is a single stage, and metastability is not modelled.

## What a section computes (`mps_regfile`, `mps_oplogic`)

The original leaves the iterative algorithm open. This design uses one step
of a Galois LFSR per clock: shift left and, if the bit shifted out was 1,
XOR in `POLY`. This is multiplication by x in GF(2^W). A section with
`ITERS` iterations turns its input `a` into `a * x^ITERS mod POLY`. The whole
pipeline therefore computes `in_data * x^(sum of ITERS)`, which a test can
check exactly. The register file is a single W-bit register. It loads
`DataIn` in Free on `Enable`, takes the operation logic result on each Busy
cycle, and otherwise holds. To run a different algorithm, replace
`mps_oplogic` and, if the iteration count should depend on the data,
replace the counter in `mps_control`.

## Parameters (`mp_pipeline`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 4       | number of sections (the original's drawing shows four) |
| `W`       | 16      | data width |
| `POLY`    | `16'h1021` | LFSR polynomial (CRC-16-CCITT) |
| `ITERS`   | `'{4, 9, 3, 6}` | iterations of each section; must have N entries, each >= 1 |
| `VARIANT` | `SYNC_B` | synchronizer variant |

Only `N` is taken from the original, from its drawing. Every other value is
this design's choice. If you override `N`, override `ITERS` too.

## The two ends

Automaton 0 sits between the data source and section 1, and automaton N
between section N and the data sink. Both speak the section protocol.

* **Source:** drive `in_data` and raise `in_r`. When `in_ack` falls, the data
  has been accepted: drop `in_r`, but keep `in_data` until `in_ack` is high
  again.
* **Sink:** hold `out_f` high while free. When `out_go` rises, `out_data` is
  valid. Take it, then swap to `out_b = 1, out_f = 0`. `out_go` then falls.
  When ready for more, set `out_b = 0, out_f = 1`. Never raise `out_f` and
  `out_b` together.

Every section has its own clock input, `clk_sec[k-1]`. The clocks need no
relation to each other. The local oscillators are not part of the RTL. `rst`
is asynchronous and active high. It forces every section to Free and every
automaton to S0. The observation outputs `sec_ss`, `sec_en`, `ca_go` and
`ca_ack` show every status and control signal.

## Files

| file | content |
|------|---------|
| `rtl/mp_pkg.sv` | section state enum, status struct `ss_t`, synchronizer variant enum |
| `rtl/mp_pipeline.sv` | top: N sections and N+1 automata |
| `rtl/mps.sv` | one section: synchronizer, control, register file, operation logic |
| `rtl/mps_control.sv` | Free/Busy/Ready sequencing, iteration counter, capture of the acknowledgement |
| `rtl/synchronizer.sv` | Go -> Enable, variants A and B |
| `rtl/mps_regfile.sv`, `rtl/mps_oplogic.sv` | section datapath |
| `rtl/ca.sv` | control automaton (RS latch) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mp_pipeline_sync_a` |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mp_pkg.sv -y rtl \
          tb/tb_mp_pipeline.sv --top-module tb_mp_pipeline -Mdir obj
./obj/Vtb_mp_pipeline
```

Replace the testbench name to run another test. Each test ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. `-Wall` lint reports
that `A` is used both as an asynchronous set and as a sampled level in
`mps_control`. That mixed use is the mechanism described above.

## What the tests check

* `tb_mp_pipeline` runs the default configuration end to end, with four
  unrelated section clocks (half-periods 5.0, 2.3, 7.3 and 3.1 ns) and a
  random source and sink. It runs four phases: a fast sink, a stalling sink, a
  reset in the middle of traffic, and resumed traffic. About 800 operands pass
  through. It checks that every result is correct, appears once and in order,
  that every section is always in exactly one state, and that no automaton is
  asked to set while B is high. It counts both arrival orders at every
  automaton, back pressure from the sink, starvation at the source, short S1
  phases, Enable pulses against loads, and the mid-traffic reset. Each must
  occur. `tb_mp_pipeline_sync_a` runs the same test with variant A.
* `tb_mps` checks one section against emulated automata. The start takes
  exactly two clock edges after `Go`, Busy lasts `ITERS` cycles, the result is
  correct and held, and the section is Free one edge after the acknowledgement.
* `tb_mps_control`, `tb_synchronizer`, `tb_ca`, `tb_mps_regfile` and
  `tb_mps_oplogic` cover each module alone. They include the difference
  between the two synchronizer variants and every input combination of the
  automaton from both states.

## Limits and departures

* The control automaton relies on ordinary asynchronous-circuit timing. The
  RTL uses an ideal latch. It does not model gate delays, hazards or
  metastability. The original draws the latch in two equivalent gate-level
  forms, which are not built separately.
* The original describes variant A of the synchronizer as using both clock
  edges, but does not show how. Here both variants use the rising edge only.
* These parts are this design's own choices: the capture flip-flop and the
  early withdrawal of `R` in `mps_control`, the automata at the two ends, the
  computation, the widths and the iteration counts.
* Mixing multi-stage sections with one-stage (C-element) sections is not
  covered.

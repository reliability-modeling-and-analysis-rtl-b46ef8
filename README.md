# Clockless two-phase wave pipeline with request redundancy and bipolar switches

A wave pipeline speeds up a block of combinational logic without cutting it
into register stages. Several datawaves travel through the logic at the same
time, one behind the other, and only the spread between the fastest and the
slowest path limits how close together they may follow. This design is the
clockless version. There is no clock. A single request signal travels
alongside the data, and each of its levels, high or low, carries one datawave.
That makes it easy to embed as a core in a system-on-chip whose other cores run
on unrelated clocks.

The weak point of such a pipeline is keeping each datawave together with its
request level. Two faults matter:

- **Intrawave fault.** Bits of a datawave run so far ahead of, or lag so far
  behind, their request level that they land in the neighbouring level.
- **Request glitch.** A short pulse on the request line briefly opens or closes
  a switch and tears a datawave apart.

This RTL builds the pipeline skeleton with two countermeasures against these
faults: redundant request lines with masking gates, and *bipolar switches*
steered by *affiliate* requests. The structure follows the design published by
T. Feng, N.-J. Park, M. Choi and N. Park in "Reliability Modeling and Analysis
of Clockless Wave Pipeline Core for Embedded Combinational Logic Design",
which builds on the two-phase asynchronous wave pipeline of Hauck, Garg and
Huss. That publication is mostly a statistical reliability study. This RTL
takes from it only the circuit structure, and its own choices are listed at the
end.

## How a datawave moves

The combinational logic is cut into `STAGES` stages. There are `STAGES+1` switch
boundaries: one before each stage and one at the primary output. A switch is a
level-sensitive latch (`wp_switch`):

| switch   | transparent while request is | opaque (holding) while request is |
|----------|------------------------------|-----------------------------------|
| n-switch | high                         | low                               |
| p-switch | low                          | high                              |

Boundary `b` is an n-switch for even `b` and a p-switch for odd `b`, so the
polarities alternate n, p, n, p from the primary input. Setting
`FIRST_POL = SW_P` starts with a p-switch instead. A datawave sent on a
high level therefore passes the n-switches and is latched at the p-switches.
A datawave sent on a low level is latched at the n-switches instead.

The request does not reach every switch at once. Each stage has a request
delay line (`req_delay_line`) of `DS_PS`. That delay is chosen as the stage's
slowest data path plus a margin (d_s = d_max + alpha), so a request edge
reaches a boundary just after the slowest bit of its datawave. The latency from
the primary input to the primary output is therefore `STAGES*DS_PS`. The
throughput is one datawave per request level.

With stage path delays between `dmin` and `dmax`, margin `alpha = DS - dmax`
and request level length `L`, a zero-delay analysis of this structure gives:

- **Single switch per boundary.** A transparent switch passes its datawave from
  the moment the request edge arrives. After time `L + dmin`, early bits of the
  next datawave also leak through it. The next boundary therefore sees one clean
  datawave only if `L >= 2*(dmax - dmin + alpha)`. The skew of two attached
  stages adds up. This matches the publication's practice of measuring a
  "partial path" over two attached stages.
- **Bipolar switch per boundary.** The affiliated second switch closes `EXT_PS`
  after the request edge and holds the datawave for the rest of the level.
  The condition relaxes to `L >= dmax - dmin + alpha`, provided that
  `DS + EXT <= L + dmin`, so the second switch closes before the next
  datawave's earliest bits arrive.

With the defaults (stages of 21..162 ps, `DS_PS = 170`, `EXT_PS = 62`), the
single-switch pipeline needs L >= 298 ps. The bipolar one needs L >= 211 ps.
The testbenches confirm both limits in simulation.

## Request redundancy and masking (`req_mask`)

The request is sent on `NREQ` parallel lines (default 2). Which glitch is
harmful depends on the switch. An n-switch is hurt by a low glitch on a high
request. A p-switch is hurt by a high glitch on a low request. So the lines are
combined like this:

- **In front of an n-switch:** OR. One line glitching low is covered by the
  others.
- **In front of a p-switch:** AND. One line glitching high is covered.

Only a glitch that hits all lines at the same moment gets through. The cost of
this scheme is that the opposite glitch direction is now passed from *any*
line. That direction is harmless unless it falls near a request edge.

The simulation shows how serious that weakness is. In this model, a
single-line glitch in the unmasked direction that lands late in a level
(60 ps before the next edge) briefly opens a switch that should be holding.
At that moment the early bits of the next datawave are already at its input,
so the held datawave is corrupted. An early glitch is harmless in either
direction, because the switch input has settled by then.

`MODE = MASK_MAJORITY` replaces AND/OR with a majority vote. It masks a
minority glitch in either direction. With an even line count, a tie falls back
to the AND/OR rule. The majority vote is an option, not the default.

## Bipolar switches and affiliate requests (`bipolar_switch`, `affiliate_gen`)

In the enhanced pipeline (`BIPOLAR = 1`), every boundary is a pair of switches
of opposite polarity in series:

- **Even boundaries:** an np-switch (n, then p).
- **Odd boundaries:** a pn-switch (p, then n).

The arrangement along the pipeline is np, pn, np, pn, and so on. With
`FIRST_POL = SW_P` it is the mirror image, pn, np, pn.

The first switch of a pair works exactly like the single switch it replaces.
The second, *affiliated* switch is steered by an affiliate request. That
request is the boundary's masked primary request with one level stretched by
`EXT_PS`:

- **Affiliate N (np-switch).** The low level is extended: the rising edge comes
  `EXT_PS` late. It is computed as `aff = req & req_delayed`.
- **Affiliate P (pn-switch).** The high level is extended: the falling edge
  comes `EXT_PS` late. It is computed as `aff = req | req_delayed`.

Take an np-switch on a high level. The n-switch opens and the p-switch is still
open during the stretch, so the datawave flows through. When the stretch ends,
the p-switch closes and holds that datawave for the rest of the level. Early
bits of the next datawave may still leak through the open n-switch, but they
stop at the closed p-switch. This second alignment is what relaxes the timing
condition above. On the other level the pair behaves like a single switch.

`affiliate_gen` needs a real delay, and so does `req_delay_line`. Both are
therefore behavioural models. They use transport delays, so a glitch shorter
than the delay travels through unchanged and is not swallowed. All other
modules are synthesizable logic. The switches are intentional latches.

## Modules and interfaces

All modules share the package `cwp_pkg` (switch polarity `sw_pol_e`, masking
mode `mask_mode_e`, and the helpers `opposite()` and `boundary_pol()`).
The timescale is `1ps/1ps`.

| module           | kind        | role |
|------------------|-------------|------|
| `cwp_core`       | top         | the pipeline skeleton: boundaries, masking, delay lines |
| `bipolar_switch` | RTL         | np/pn pair of `wp_switch` |
| `wp_switch`      | RTL (latch) | n- or p-switch |
| `req_mask`       | RTL         | AND/OR (or majority) of the request lines |
| `affiliate_gen`  | behavioural | affiliate request, one level stretched by `EXT_PS` |
| `req_delay_line` | behavioural | per-stage request delay `DS_PS`, transport |

`cwp_core` ports:

| port        | dir | width            | meaning |
|-------------|-----|------------------|---------|
| `req_in`    | in  | `NREQ`           | request lines at the primary input; one level per datawave, same value on all lines |
| `data_in`   | in  | `WIDTH`          | datawave; apply it slightly (e.g. 2 ps) before its request edge |
| `stage_in`  | out | `STAGES x WIDTH` | datawave entering combinational stage k |
| `stage_out` | in  | `STAGES x WIDTH` | result of stage k, fed to boundary k+1 |
| `req_out`   | out | `NREQ`           | request lines at the output, `STAGES*DS_PS` later |
| `data_out`  | out | `WIDTH`          | datawave j, valid from its `req_out` edge for one level |

The combinational stages are **not** inside `cwp_core`. They are the logic of
whatever core is being wave-pipelined, and you connect them to
`stage_in`/`stage_out`. `DS_PS` has to match their longest path plus margin.

Parameters of `cwp_core`:

| parameter   | default       | origin |
|-------------|---------------|--------|
| `WIDTH`     | 36            | design choice (36 is the input count of the ISCAS c432 benchmark the timing is modelled on) |
| `STAGES`    | 3             | the smallest stage count in the publication's evaluation (3 to 16 studied) |
| `NREQ`      | 2             | one primary and one redundant line, as in the masking table |
| `BIPOLAR`   | 1             | enhanced design; 0 gives the original single-switch pipeline for comparison |
| `MASK_MODE` | `MASK_AND_OR` | the AND/OR masking; majority is optional |
| `FIRST_POL` | `SW_N`        | n-switch at the primary input (np-pn-np); `SW_P` gives pn-np-pn |
| `DS_PS`     | 170           | design choice: 162 ps slowest stage path + 8 ps margin |
| `EXT_PS`    | 62            | design choice: 0.2 of a 310 ps request level |

The stage timing behind the defaults (21..162 ps per stage, 310 ps level) is
half of the two-stage path spread reported for c432 cut into three stages
(41.5..323.7 ps), together with the 310 ps level length studied there.

## Simulating

Verilator 5 with `--timing` is required for the delays. From the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cwp_pkg.sv tb/cwp_tb_pkg.sv tb/cwp_core_tb.sv --top-module cwp_core_tb
./obj_dir/Vcwp_core_tb
```

Replace `cwp_core_tb` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench            | what it shows |
|----------------------|---------------|
| `cwp_core_tb`        | default pipeline end to end: 60 random datawaves at L = 310 ps; exact latency (3 x 170 ps) and one datawave per level; glitches on single lines; counts of multiple datawaves in flight, OR-masked and AND-masked glitches, and second alignments |
| `cwp_intrawave_tb`   | original vs. enhanced pipeline (both arrangements): all intact at L = 330 ps; at L = 230 ps the original corrupts datawaves (intrawave faults) while both bipolar ones stay intact |
| `cwp_glitch_tb`      | 15 ps request glitches on every level: early single-line glitches harmless; late single-line glitches corrupt the AND/OR pipeline but not the 3-line majority one; late glitches on all lines corrupt even the majority one |
| `cwp_level_sweep_tb` | default pipeline over request levels 100..350 ps: intact from 212 ps up, corrupted at 100 and 130 ps, matching the timing window above |
| `cwp_stage_sweep_tb` | the c432 timing cut into 3, 5, 8 and 16 stages (per-stage path spread from the published per-stage-count table, request level 1.6 × (skew + 8 ps)): the bipolar pipeline is intact at every stage count, the single-switch one corrupts datawaves at each; uses the helper `tb_sweep_unit` |
| `wp_switch_tb`, `req_mask_tb`, `bipolar_switch_tb`, `affiliate_gen_tb`, `req_delay_line_tb` | each block on its own |

The stages in the pipeline testbenches are a stand-in (`tb_stage_model`). It
applies a mixing function (`stage_fn` in `cwp_tb_pkg`). Each output bit has its
own transport delay between 21 and 162 ps (in the stage-count sweep, between
the bounds of the stage count under test). A mixed-up datawave therefore shows
up as a wrong result.

Latches have no reset. Before the first request level opens a switch, its
content is whatever the simulator starts with. The testbenches check only
datawaves that were sent.

## Where this departs from, or goes beyond, the publication

- **Masking gates.** One passage describes the masking gates the wrong way
  round: an AND that would mask a *low* glitch at a p-switch. This design
  follows the masking table and the closing summary instead: OR in front of
  n-switches, AND in front of p-switches.
- **Affiliate request.** Its shape is given only as "low level extended by n"
  and "high level extended by p". The construction from a delayed copy of the
  masked primary request, and the choice to derive it from the *masked* signal,
  are this design's own.
- **Request delay lines.** The per-stage lines and their placement (one per
  stage, all `NREQ` lines delayed equally) are this design's reading of "the
  request signal path within the partial circuit".
- **Numeric values.** All delays are picked to match the c432 three-stage
  timing. The parameters `np` and `gamma` of the publication's reliability curves
  belong to a statistical delay model and have no counterpart here. In the RTL
  the only knob is `EXT_PS`.
- **Timing conditions.** The conditions in "How a datawave moves" come from
  this model with zero-delay switches. They are not the publication's
  probabilistic yield formulas. Those formulas, the MTTG reliability model and
  the intrawave/interwave fault rates are analysis, not hardware, and are not
  part of the RTL.
- **Not provided.** The glitch-insensitive buffer and the ratio-logic majority
  gate suggested as further countermeasures are circuit-level techniques and
  are not modelled. The majority function itself is available in `req_mask`.
  The request source and the combinational stage logic are also outside the
  RTL.
- **Synthesis.** The behavioural delay models do not synthesize, so a
  synthesis flow sees `cwp_core` only after they are replaced by real delay
  cells. `wp_switch`, `req_mask` and `bipolar_switch` synthesize as they are.
- **Lint.** Verilator may report "no latches detected" for `wp_switch` inside
  the full pipeline. The block is a latch all the same, as its testbench
  shows.

# Two asynchronous phase detectors for PLLs

An exclusive-OR gate is the quietest phase detector a PLL can have. It has
one output, and that output varies linearly with phase. Pulse-type
phase-frequency detectors (two outputs, Early and Late) instead have a
crossover non-linearity exactly at the lock point. The XOR gate has two
weaknesses, though:

* it cannot tell frequency, so a PLL built around it may fail to acquire;
* its characteristic has only one stable point per cycle. If the reference
  jumps by 180 degrees, as a BPSK carrier does at every data change, the
  loop is pushed onto the unstable slope and must slip half a cycle.

This repository holds two small **asynchronous sequential circuits**
(clockless state machines built from gates with feedback), one for each
weakness:

| module | what it is | feedback variables | outputs |
|---|---|---|---|
| `xor_pfd` | XOR-type phase-*frequency* detector | F, G, H | `pd`, `pd_n`, `lock` |
| `bpsk_pd` | BPSK phase detector: a loop built on it stays locked through 180-degree carrier flips and recovers the data | F, G | `pd`, `pd_n`, `bpsk` |

`two_pfd_top` places both side by side. The loop filter, the VCO and the
data low-pass filter that complete each PLL are analogue parts. They are not
part of the RTL, but the testbenches model them.

## Thinking in input columns and edge directions

Both circuits see two square waves, R (reference) and V (VCO). Each state
belongs to one input combination RV, called its *column*. Because only one
input changes at a time, the inputs walk around the ring

    00 -> 01 -> 11 -> 10 -> 00        forward sequence (V leads R)
    00 -> 10 -> 11 -> 01 -> 00        reverse sequence (R leads V)

Every input edge therefore goes either *forward* or *reverse* around this
ring. Forward edges are V rising at 00, R rising at 01, V falling at 11 and
R falling at 10; all others are reverse. A PLL with an XOR detector locks
in the forward sequence with V leading R by 90 degrees. A 180-degree jump of
R turns the forward sequence into the reverse one.

Both circuits need to know which way the last edge went. They get it from
two C-elements (Muller elements: the output copies the two inputs when they
agree and holds when they differ):

    F = C(R, V)     1 after RV = 11, 0 after RV = 00
    G = C(R, !V)    1 after RV = 10, 0 after RV = 01

In every column one of the two is forced by the inputs and the other holds.
The one that holds records which neighbouring column the circuit came
from, and so the direction of the last edge:

    fwd = !R!V G  |  !R V !F  |  R V !G  |  R !V F        (pd_pkg::last_edge_forward)

`fwd` reads only the variable that holds in the present column. It is
therefore valid the moment an input changes, before F or G react, and the
XOR-type detector relies on this.

## The BPSK phase detector (`bpsk_pd`)

The two C-elements are the whole state: 8 states, two per column.
`pd = F ^ G` is 0 after a V edge and 1 after an R edge. In the forward
sequence this is the XNOR of R and V, an ordinary XOR-type response. In the
reverse sequence it is the XOR, i.e. inverted. Average PD against the phase
lead of V is therefore a sawtooth with stable lock points at 90 and
270 degrees, instead of the XOR triangle:

| V leads R by | 30 | 60 | 90 | 120 | 150 | 210 | 240 | 270 | 300 | 330 |
|---|---|---|---|---|---|---|---|---|---|---|
| `xor_pfd` average PD | .833 | .667 | .500 | .333 | .167 | .167 | .333 | .500 | .667 | .833 |
| `bpsk_pd` average PD | .833 | .667 | .500 | .333 | .167 | .833 | .667 | .500 | .333 | .167 |

When the BPSK data flips, the operating point moves from 90 to 270 degrees
(or back), which is again a stable point, and the loop stays locked. The
`bpsk` output is `fwd`: 1 in the forward sequence, 0 in the reverse one. It
is the data, with the usual 180-degree BPSK ambiguity in polarity.
Low-pass filtering it gives the data out.

State numbering (columns 00, 01, 11, 10): states 1, 2, 3, 4 follow a V
edge, and states 5, 6, 7, 8 follow an R edge. `bpsk` is 1 in 5, 2, 7, 4.
Encoding {F,G}: 1, 2 = 00; 5, 8 = 01; 3, 4 = 11; 6, 7 = 10. Each edge flips
at most one C-element, so there are no races. There is no reset: after the
first edge on each input the state is valid whatever F and G powered up
with.

## The XOR-type phase-frequency detector (`xor_pfd`)

This is the harder of the two circuits. It has twelve states, three per
column, in three kinds:

| kind | states (cols 00, 01, 11, 10) | entered by | PD | Lock |
|---|---|---|---|---|
| L, locked | 5, 2, 7, 4 | any forward edge | XNOR(R,V) | 1 |
| A, first reverse | 1, 6, 3, 8 | a reverse edge out of an L state | XOR(R,V) | 0 |
| D, deep reverse | 9, 10, 11, 12 | a reverse edge out of an A or D state | XNOR(R,V) | 0 |

So a forward edge always leads to L. A reverse edge leads from L to A, and
from A or D to D.

* **Near lock** (same frequency, forward sequence) the circuit stays in the
  L states and PD is exactly an XOR detector's output. In a steady reverse
  sequence it sits in D, where PD is also the XOR response. At equal
  frequencies the circuit is thus indistinguishable from an XOR gate, with
  the same linear, single-output characteristic (the triangle in the table
  above).
* **Frequency detection** comes from A. If V is too fast, V makes two edges
  between R edges. The second one is a reverse edge out of L, giving A, and
  the next V edge is forward again, giving L. While R stays low this toggles
  between states 1 and 2, with PD = 0 in both; while R stays high, between
  3 and 4 (again PD = 0). If R is too fast, the same happens between 5 and 8
  or between 6 and 7 with PD = 1. PD is therefore low on average when V is
  too fast and high when V is too slow.

Measured average PD (both detectors behave alike here):

| V period / R period | 0.2 | 0.33 | 3 | 5 |
|---|---|---|---|---|
| average PD | 0.10 | 0.23 | 0.97 | 0.98 |

The frequency bias is weak close to equal frequency. For the XOR-type
detector, V periods between about 0.8 and 1.25 times the R period give averages within
0.03 of one half. Final pull-in then comes from the XOR characteristic
itself. In the closed-loop test below, the loop still acquires from 0.2 to
5 times the reference frequency.

### State assignment and sequencing

F and G are the C-elements described above, so `fwd` (which is also `lock`)
is known at every moment. H is 1 exactly in the D states. Codes {F,G,H}:

    1, 2 = 000   5, 8 = 010   6, 7 = 100   3, 4 = 110
    9 = 001      12 = 011     10 = 101     11 = 111

The delicate case is a reverse edge out of an A state, where H must rise.
The new state differs in H and in the C-element that the new column forces.
Once that C-element has switched, the circuit looks like an A state again,
so H must switch first. The circuit sees that it is in this case because
the forced C-element has not switched yet (`pend`): a reverse edge arriving
with `pend` set came from a reverse state. Behaviourally:

    pend = (R == V) ? F != R : G != R
    hold = !fwd & pend & !H
    F    = rst_n & (hold ? F : C(R, V, F))
    G    = rst_n & (hold ? G : C(R, !V, G))
    H    = rst_n & !fwd & (H | pend)
    pd   = XNOR(R, V) ^ (!fwd & !H)        lock = fwd

In the RTL, each of F, G and H is written out as the sum of all its prime
implicants (5, 5 and 12 product terms). Such a complete sum covers every
single-variable change that keeps the output at 1 with one product term, so
the two-level logic has no static hazards. Every transition is a sequence
of single-variable changes, so there are no critical races. This was checked for all 24 transitions under every
order of the feedback variables' delays. `rst_n = 0` clears F, G and H: that is
state 1 at RV=00 and state 2 at RV=01. Released at RV=11 or RV=10, the
circuit settles into state 7 or 12 respectively.

## Interfaces and timing

| port | dir | `xor_pfd` | `bpsk_pd` |
|---|---|---|---|
| `r` | in | reference | received BPSK carrier |
| `v` | in | VCO output | VCO output |
| `rst_n` | in | reset, active low | none |
| `pd` | out | to the loop filter | to the loop filter |
| `pd_n` | out | complement, for a differential loop-filter input | same |
| `lock` / `bpsk` | out | lock indicator | data, before the data low-pass filter |

`two_pfd_top` brings out both sets as `pfd_*` and `bpsk_*`, with the BPSK
output named `bpsk_data`.

There is no clock. Outputs follow each input edge once the feedback has
settled, after at most two feedback-variable changes; in RTL simulation
this takes zero time. The inputs of one detector must never change at the
same instant (fundamental-mode operation). Square waves from a reference
and a VCO meet this except at exactly coincident edges. Outputs may glitch
during settling, as in any asynchronous machine; the loop filter averages
this away.

## Using it in hardware

The feedback variables are **combinational loops by design**. Lint and
synthesis report them (Verilator `UNOPTFLAT`, yosys "logic loop"), and those
warnings stand. To implement the circuit:

* keep the loops intact: do not let a tool break, retime or register them;
* keep the feedback equations as the two-level covers given in the RTL
  (complete sums of primes; the majority-form C-elements of `bpsk_pd` are
  complete sums too). Logic optimisation that drops the redundant consensus
  terms brings static hazards back. Essential hazards have not been
  analysed: they rely on the usual margin of feedback-path delay over input
  skew;
* no timing model is included. In a CPLD or FPGA such circuits are
  expected to work at input frequencies of a few hundred MHz, but the
  actual limit depends entirely on the device.

## How this RTL relates to the original design

Followed as published:

* both circuits' state graphs: states, transitions, which states are
  locked or carry BPSK = 1;
* the numbers of feedback variables;
* the BPSK detector's F, PD and BPSK equations;
* the XOR-type detector's Lock states and its PD behaviour (low on average
  when V is too fast);
* the active-low reset;
* the suggestion of a complementary output for a differential loop-filter
  input (`pd_n`).

Choices and corrections made here:

* **XOR-type detector equations.** The state assignment and the
  next-state equations above are this design's own, derived from the state
  graph. They use three feedback variables, F, G and H, as the original
  does, but they are not the original's equations, and the Lock and PD
  expressions are rewritten for this encoding.
* **BPSK detector G.** G is C(R, !V). With this G, the published PD and
  BPSK equations reproduce the state graph.
* **PD polarity.** In both detectors `pd` is the complement of the "Out"
  column of the published state graphs. That is the polarity of the
  published PD equations and the one that makes PD low when V is too fast;
  `pd_n` carries the state graphs' "Out".
* `two_pfd_top` is only a container; the two detectors are independent
  designs.

## Simulation

Files: `rtl/pd_pkg.sv` (shared C-element and edge-direction functions),
`rtl/xor_pfd.sv`, `rtl/bpsk_pd.sv`, `rtl/two_pfd_top.sv`; testbenches in
`tb/`. Each testbench prints `TB_RESULT checks=N failures=M`.

    verilator --binary --timing --assert -Wno-UNOPTFLAT -Irtl \
        rtl/pd_pkg.sv rtl/xor_pfd.sv rtl/bpsk_pd.sv rtl/two_pfd_top.sv \
        tb/tb_two_pfd_top.sv --top-module tb_two_pfd_top -o sim && obj_dir/sim

| testbench | what it checks |
|---|---|
| `tb_xor_pfd` | every output after every edge against the 12-state graph written as a table; forward, reverse, V-fast, R-fast and random sequences; all 24 transitions exercised; reset |
| `tb_bpsk_pd` | the same against the 8-state graph; all 16 transitions; power-up without reset |
| `tb_two_pfd_top` | both detectors on the same R and V: the phase characteristics in the table above, frequency detection at 1:5 and 1:3 both ways, a BPSK carrier with random data flips (BPSK output, Lock, PD average 0.5), mid-run reset; all mechanisms counted |
| `tb_pll_loop` | each detector closed in a PLL with a behavioural loop filter (first-order low pass plus integrator) and VCO: the XOR-type loop locks from 0.2x, 0.5x, 2x and 5x the reference frequency with V leading by 90 +/- 5.4 degrees and Lock high; the BPSK loop locks from 0.5x to 1.25x and recovers all of the last 60 data bits (8 carrier periods per bit) with one polarity |

Both circuits are asynchronous, so the simulator settles the feedback loops
by iteration after each input change. The testbenches therefore space input
edges by at least one time step. A zero-delay simulation settles the loops
in one fixed order and so cannot expose a race between feedback variables.
Freedom from races rests on the transition analysis described above, not
on these testbenches.

Outside the tested range, the BPSK loop with the models and gains in
`tb_pll_loop` did not acquire from 1.5 or 2 times the carrier frequency
while data was flipping every 8 periods. The VCO, loop filter and data
low-pass filter are left to the user; no component values are implied.

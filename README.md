# Flow-diagram phase registers: asynchronous control without races

This is RTL for a way of building asynchronous (clockless) sequential control
circuits that avoids the classic failures of such circuits: critical races and
essential hazards. The idea is simple. The control sequence is drawn as a flow
diagram and cut into **phases**, and each phase gets its own storage cell. The
phases are coded one-hot ("1 out of n"), so exactly one phase is 1 at a time.
Each cell is an **edge-sensitive** element, built around an ordinary
edge-triggered D flip-flop. Its delay rules are fixed by the flip-flop itself,
not by the wiring around it. A circuit built this way does not depend on the
relative speed of its gates and flip-flops, so nobody has to hunt for hazards
in the finished network.

Two circuits built with the method are included, plus the cells they use:

* `data_transfer_block`: a clockless controller that moves bytes between an
  IBM System/360 selector channel and a fast peripheral. It has 11 phases,
  built from 13 elements.
* `channel_select_register` with `two_phase_clock_gen`: a register that lets a
  control unit shared by two unrelated IBM 360 channels grant itself to one
  of them. The requests of the two channels can arrive at the same instant,
  so this circuit samples them with a two-phase running clock. That clock is
  made by a second, four-phase phase register.

`asyncfd_top` places both circuits side by side; they share no signal.

## The phase register element

Everything rests on one cell, `phase_reg_element`. It has three inputs that
matter:

| input | role |
|---|---|
| `ckj` | set trigger. A rising edge sets the cell, provided `j` is 1 at that moment |
| `j`   | enable, sampled on the rising `ckj` |
| `ckk` | reset trigger. A rising edge clears the cell |

Nothing else changes the cell. A rising `ckj` while the cell is set does
nothing. Neither does a rising `ckk` while it is clear, nor any falling edge.
`j` may do anything while the cell is set. Asynchronous active-low preset
and clear (`pr_n`, `clr_n`) override everything.

Inside there is a single D flip-flop. Its clock is *steered by its own
output*: while `q = 0` the flip-flop is clocked by `ckj`, and while `q = 1`
by `ckk`. Its data input is `j & ~q`. A clock edge while the cell is clear
therefore loads `j`, and one while it is set loads 0. The steering cannot
create an edge of its own. `q` only changes because the input that was
selected rose, so that input is high at the switch-over. The newly selected
input is then either high too (no edge) or low (a falling edge, which is
ignored). This is why the cell behaves the same whatever the relative delays
of its inputs: the one timing rule left is the flip-flop's own set-up and
hold time on `j` around the rising `ckj`.

Lint tools flag `q` as both data and part of a clock. That is intended.

## From flow diagram to phase register

A flow diagram for this method uses two kinds of test:

* a **trigger** `F`: a function of the inputs whose 0→1 change moves the
  circuit out of the current phase;
* a **branch** `G`: a level condition that decides whether that change counts
  and, if there are several, which next phase it leads to.

Each arrow "from phase P, on F rising, if G, go to phase N" becomes one
element of phase N, with

```
ckj = F        j = G & P        ckk = OR of every phase that can follow N
```

Because `ckk` is the OR of the successor phases, a phase clears itself as
soon as the next phase is 1. The register is never empty, and it holds two
phases at once only for the delay of one element.

A phase entered by several arrows has several elements; the phase is their
OR. This is `phase_cell #(M)`. All M elements share `ckk`, and only element
0 has a preset, which is enough because the outputs are ORed. Arrows that
use the same trigger and the same enable into the same next phase can share
one element whose `j` is the OR of their source phases. The data transfer
block does this for PH1.

The flow diagram must obey a few formal rules for this to work:

* within a phase, one input change raises at most one of the triggers that
  lead out of it;
* a branch condition is stable while its trigger rises;
* a trigger that just produced a phase cannot also fire a trigger of the new
  phase.

The rules are checked on the diagram, not in the hardware.

## Output part

Outputs are produced from the one-hot phases with two-level logic plus two
kinds of storage cell:

| instruction in a phase | hardware |
|---|---|
| output = `K` during the phase, 0 after (sum form) | `z = Σ (phase_i · K_i)` |
| output = `K` during the phase, 1 after (product form) | `z = Π (~phase_i + K_i)` |
| SET / RESET | `sr_flipflop`, with `s = Σ phase_i · K_S`, `r = Σ phase_i · K_R` |
| follow `K_D` during the phase, hold afterwards | `dg_flipflop` (transparent latch), `d = K_D`, `gate = Σ phase_i` |

The two storage cells are level-sensitive latches by design: the S-R
flip-flop is the cross-coupled pair of gates of the original network, and
the D-G flip-flop is a gated latch. The data transfer block needs only the
sum form (SERI) and one S-R flip-flop (INFST). The D-G cell is used by
neither circuit. It is brought out at the top on its own pins (`dg_d`,
`dg_gate`, `dg_init`, `dg_q`).

## Initialisation

The reset condition ("initialise whatever else happens") is wired to the
asynchronous preset of the initial phase and the asynchronous clear of every
other phase. It therefore takes priority over all triggers. In the data
transfer block this signal is `zer`, active high. The clock generator and the
selection register have an `init` input (`cs_init` at the top). In this RTL,
preset and clear act on the flip-flop as one asynchronous load. Clear wins if
both are active, but a clear that arrives while preset is already held waits
until preset is released. None of the circuits here ever applies both at
once.

## The data transfer block

Ports: `zer start rdy infrdy wr parf uc sero cmdo adro` in; `seri infst
ph[11:1]` out. The signals are:

* SERO / SERI: Service Out / Service In of the channel interface.
* CMDO: Command Out.
* ADRO: Address Out.
* START: given by the channel-side control unit. It may be raised only in
  PH1.
* RDY and INFRDY: impulses from the peripheral.
* WR: 1 for a write.
* PARF: parity error on a byte from the channel.
* UC: a transfer error.
* INFST: tells the peripheral that the next byte may move.

`ph[i]` is phase PHi.

| phase | meaning | entered from (trigger, enable) |
|---|---|---|
| PH1 | ready (initial) | PH5/PH7/PH8/PH11 on RDY↑ (one shared element) |
| PH2 | read: wait for the peripheral's byte | PH1 on START↑ if WR=0; PH4 on SERO↓ |
| PH3 | read: SERI up, byte offered to the channel | PH2 on INFRDY↑ if UC=0 |
| PH4 | read: channel took it | PH3 on SERO↑ |
| PH5 | read: channel disconnected | PH3 on ADRO↑ |
| PH6 | write: SERI up, byte requested | PH1 on START↑ if WR=1; PH10 on INFRDY↑ if UC=0 |
| PH7 | channel answered SERI with CMDO (count done) | PH3 or PH6 on CMDO↑ |
| PH8 | write: parity error on the byte | PH6 on SERO↑ if PARF=1 |
| PH9 | write: good byte, passed to the peripheral | PH6 on SERO↑ if PARF=0 |
| PH10 | write: SERO dropped, wait for the peripheral | PH9 on SERO↓ |
| PH11 | peripheral error | PH2 or PH10 on INFRDY↑ if UC=1 |

Outputs:

* `SERI = PH3 + PH6`.
* INFST is set in PH2, PH4 and PH9, and reset in PH3, PH6 and PH11.
* While PH5, PH7, PH8 or PH11 is 1, the channel-side control unit is in
  charge. The block waits for RDY.

A read cycle is PH2 →(INFRDY)→ PH3 →(SERO↑)→ PH4 →(SERO↓)→ PH2. A write
cycle is PH6 →(SERO↑)→ PH9 →(SERO↓)→ PH10 →(INFRDY)→ PH6.

The block is specified for **single input changes**: one input changes at a
time, and the next change comes only after the phase register has settled.
It also relies on the channel being faster than the peripheral, so that the
SERI/SERO exchange always falls between two INFRDY impulses.

## The clocked circuits: sampling requests that may coincide

The two channels belong to different computers, so their initial-selection
sequences can start at exactly the same moment. Triggering a phase register
directly on both would risk setting two phases at once. Instead, the idle
phase CS1 tests both channels on every rising `clock1`. On each edge the
condition is, for A, SELO·HLDO·ADRO·I (`chan_req_t` fields `selo hldo adro
ident`), and the same for B:

* if channel A's condition holds, the register moves to CS2 and `sel_a = 1`;
* otherwise, if channel B's holds, it moves to CS3 and `sel_b = 1`.

A connected channel is released on a rising `clock2` while its release
signal (`ar` or `br`) is 1. The release signals can arrive at any time
relative to `clock1`, and this second clock phase is what lets them be
sampled cleanly. If both channels are seen at the same edge, channel A wins.
The sampled signals must meet the flip-flop's set-up and hold time around
the clock edges; a violation can make an element metastable, as with any
synchroniser. For every request to be seen, inputs should last at least two
periods of `clock1` (four periods of `clock`).

`two_phase_clock_gen` makes `clock1` and `clock2` from one square `clock` with
a four-phase ring A→B→C→D. B is entered on a rising clock, C on a falling
one, D on a rising one and A on a falling one. `clock1 = B` and `clock2 = D`:
two non-overlapping pulses, each one clock high-time long, at half the
clock rate. After `init` the first rising clock edge produces `clock1`.

## Where this RTL departs from or adds to the original design

* The phase enables and triggers of the data transfer block were checked
  one by one against the protocol they implement (for example, PH8 and
  PH9 are the two outcomes of the same SERO rise, and PH10 follows on the
  next SERO fall). The table above is what is built.
* ADRO is an input of the built block. It drives PH5 in the published
  control functions, but is missing from the published signal list.
* INFST is cleared by `zer`. None of its reset terms includes the initial
  phase, yet it must start at 0.
* The gate-level wiring around the D flip-flop inside the element is not
  copied. The element is written from its required behaviour (see above). An
  alternative using a J-K flip-flop (74109) is not built.
* The clocked circuits get an `init` input, with phase A and CS1 as
  initial phases. Channel A's precedence on a tie is made explicit in the
  CS3 enable.
* The busy reply to the second channel and the service request of the full
  control unit are not part of the selection register. Neither are the
  channel, the peripheral or the channel-side control unit: their signals
  are ports.

## Simulating

Everything is SystemVerilog-2017 and runs with plain Verilator 5. Each
testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For
example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/asyncfd_pkg.sv \
    tb/tb_asyncfd_top.sv --top-module tb_asyncfd_top -Mdir obj -o sim
./obj/sim
```

| testbench | what it shows |
|---|---|
| `tb_phase_reg_element` | random single input changes against a reference: set, reset, ignore, preset, clear |
| `tb_phase_cell` | three elements: shared reset, OR output, preset of element 0 only |
| `tb_sr_flipflop`, `tb_dg_flipflop` | random levels against a reference |
| `tb_data_transfer_block` | 20,000 random single input changes, including illegal ones, against a phase-transition table; all 18 transitions must occur |
| `tb_two_phase_clock_gen` | random half-periods of 4 to 16 ns; exact alternation and rate of `clock1` / `clock2`; init mid-pulse |
| `tb_channel_select_register` | random requests, ties, busy requests, releases and init, against a sampling model |
| `tb_asyncfd_top` | complete read and write transfers (1 to 12 bytes) with every exit: CMDO, ADRO, parity error, UC, ZER. Runs at the same time as the channel selection and the D-G cell; each mechanism is counted and must occur |

## How far it can be trusted

The simulations are zero-delay. They show that the logic is right: every
transition, output function and initialisation behaves as specified, and
the phase vector stays one-hot. They cannot show the property the method is
about: independence from gate and wire delays. That rests on the argument in
the element section, and in silicon on the flip-flop's set-up and hold time.
The circuits are asynchronous by nature; they have derived clocks and
latches. Conventional synchronous timing analysis does not apply to them
without constraints written for this purpose. They map to ordinary cells:
one flip-flop per element and one latch per S-R or D-G output.

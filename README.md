# Rendezvous hardware for formally specified processes

This RTL implements the hardware half of a hardware/software co-design flow in
which a system is specified as communicating processes in a LOTOS-style
process algebra (Templated T-LOTOS) and every operator of the specification is
translated directly into hardware or C. The method comes from V. Carchiolo,
M. Malgeri and G. Mangioni, *Hardware/Software Synthesis of Formal
Specifications in Codesign of Embedded Systems*; this code is an independent
register-transfer rendering of it, and the places where it had to fill gaps
are listed below.

The central problem is the language's synchronisation semantics. An event on a
gate `g` happens only when every process that takes part in it is ready at the
same time (a rendezvous); the transmitter offers a value (`g!v`), the receivers
accept it (`g?v`). There are no buffers: hardware processes meet through a
handful of wires per gate, and software processes meet hardware through a
register interface polled by a software scheduler.

## The gate handshake

Every gate carries four signals:

| signal  | driven by    | meaning |
|---------|--------------|---------|
| `g_rdy` | receiver     | "I am waiting on this gate" |
| `g_ack` | transmitter  | "the rendezvous is on", one cycle |
| `g_n`   | receiver     | "I really took part", one cycle |
| `g_v`   | transmitter  | the value, one cycle |

Each event is a small control sequence, one step per clock cycle
(`ttl_tx`, `ttl_rx`):

```
transmitter g!v                       receiver g?v
X  : wait until all g_rdy             Y  : g_rdy = 1, wait for g_ack
X1 : g_ack = 1                        Y1 : g_n = 1
X2 : all g_n ? go X3 : go back to X   Y2 : v_r := g_v        (done)
X3 : g_v = v_t              (done)
```

With both sides waiting the cycles line up as

```
cycle        t      t+1     t+2     t+3
transmitter  X      X1      X2      X3
receiver     Y      Y       Y1      Y2
lines        rdy    ack     n       v  (v_r updated after t+3)
```

so a rendezvous costs four cycles from the moment the last party becomes
ready. With several receivers (one-to-many) the transmitter waits for the AND
of all ready lines and of all confirm lines (`N_RX` parameter).

Why three control lines and not two: a receiver sitting in a *choice* offers
itself on several gates at once and more than one transmitter may acknowledge
in the same cycle. The receiver confirms (`g_n`) only on the gate it chose;
the transmitter that gets no confirmation returns to step X and keeps
offering, exactly as the specification requires.

All control lines are decoded from the current step (Moore outputs), so any
number of these blocks can be wired together without combinational loops.
Each block has a one-cycle `start` input (enter the first step) and a
one-cycle `done` output (high in the last step). `done` of one event is the
`start` of the next; a recursive process feeds its `done` back into its own
`start`, which the block accepts in its last step and re-enters its first step
on the next cycle.

## Choices

A choice `B1 [] B2` offers all its first events and follows whichever one
synchronises. Three blocks cover the cases:

* `ttl_choice_tx` — all branches transmit (`g1!v1 [] g2!v2 ...`). In step X it
  watches every gate's receivers; the first gate whose receivers are all
  ready is acknowledged, and only that one.
* `ttl_choice_rx` — all branches receive. It raises `g_rdy` on every gate,
  confirms on the first gate that acknowledges, and loads the value from that
  gate into its single register.
* `ttl_choice_rxtx` — one receive and one transmit branch (`g1?v [] g2!v`);
  an acknowledgement on the receive side wins.

The specification language leaves simultaneous alternatives
nondeterministic. The hardware resolves ties *a priori*: the lowest-numbered
branch wins. That rule can starve a branch forever, and the example below
does exactly that. `ttl_choice_tx` therefore has a `ROTATE` parameter
(default 0, first branch wins). With `ROTATE = 1` it starts the search at the
branch after the one served last. That option is an addition of this design.

`done` of a choice block is a vector with one bit per branch, so each branch
can continue with its own successor.

Two small systems show the receive and mixed choices working against real
partners. Each starts its transmitters and receivers separately, so ties can
be produced on purpose:

* `ttl_case2_system`: `R := g1?v; R [] g2?v; R` with single-shot `T1 := g1!a`
  and `T2 := g2!b`. When T1 and T2 start in the same cycle, both acknowledge
  at once. R confirms only g1, so T2 falls back to waiting and is served on
  R's next round, four cycles after T1.
* `ttl_case3_system`: `TR := g1?u; TR [] g2!w; TR` with `T := g1!a` and
  `R := g2?y`. When all three start together, R is already ready when TR
  first chooses, so TR transmits. T's acknowledgement in that same cycle goes
  unconfirmed, and T is served on TR's next round: R finishes after four
  cycles and T after eight.

## Composition

* Sequential composition `P1 >> P2` is just a wire: `P1`'s exit pulse is
  `P2`'s start.
* Parallel composition `P1 || ... || PN` (`ttl_par`) broadcasts the start
  pulse and signals the end when every process has exited. Exits arrive in
  different cycles, so the block remembers the exits it has seen since the last
  start.
* `exit` is the `done` of the last event of a process, used as its exit pulse.

## The example process

`ttl_example_p` is the hardware for

```
P  := P1 || P2 || P3
P1 := g1!v1; P1 [] g2!v2; P1
P2 := g1?x; P2
P3 := P4 >> P5      P4 := g2?y; exit      P5 := g2?z; P5
```

P1 is a two-way transmit choice, P2, P4 and P5 are receivers. P4 and P5
share gate g2 and are never active together, so their `g_rdy` and `g_n`
lines are ORed. After the first g2 value lands in `y`, P4 exits and starts
P5, which then keeps taking g2 values into `z`. `x` follows `v1`. Since
every process is recursive, `p_exit` never rises.

There is one departure here. P2 is ready again in the very cycle that P1
comes back to its choice, so with first-branch-wins P1 serves only g1 and
`y` and `z` stay zero forever. The module therefore has a parameter
`FAIR_CHOICE`, which defaults to 1 and sets `ROTATE` on P1. In that mode the
two gates alternate and P1 completes one rendezvous every four cycles.
`FAIR_CHOICE = 0` gives the strict first-branch-wins behaviour; the
testbench checks both settings.

## The system around it

`codesign_top` puts the pieces of a complete hardware/software system around
the hardware processes. The processor and its software (the event-polling
scheduler and the software processes compiled to C) are outside; the
processor reaches the hardware over a simple register bus:

* `hw_scheduler` — the hardware part of the scheduler. Writing a mask to
  `A_SCHED_START` pulses the start line of the selected hardware processes.
  It also records which have started and which have exited. The start bits
  are:

  | bit | process |
  |-----|---------|
  | 0 | example P |
  | 1 | echo E |
  | 2, 3, 4 | R, T1, T2 of `ttl_case2_system` |
  | 5, 6, 7 | TR, T, R of `ttl_case3_system` |

  The two choice systems send `v1` and `v2` as their values. Their registers
  are brought out as `c2_v`, `c3_u` and `c3_y`.
* `hwsw_interface` — lets the software take part in a rendezvous with hardware.
  * *Software transmits* (gate gA). The software writes the value register,
    which drives the gate's value line. The hardware receivers' ready lines
    appear as status bit `RDY`. When the software issues `ACK`, the interface
    pulses `g_ack` and checks the confirms. It then reports `DONE`, or `FAIL`
    if a receiver had gone elsewhere; the software retries later.
  * *Hardware transmits* (gate gB). The software writes `READY`, which raises
    `g_rdy` towards the hardware transmitter. On its `g_ack` the interface
    confirms with `g_n` and captures the value line into a register. It
    reports `ACKED` until the software writes `CLEAR`. A `CLEAR` written while
    still waiting withdraws the offer.
* Echo process `E := gA?a; gB!a; E` (a `ttl_rx` followed by a `ttl_tx`):
  a hardware module on the two interface gates, so that both directions are
  exercised. It is an example of this design's own.

Register map (`ttl_pkg`, word addresses):

| addr | name           | write                         | read |
|------|----------------|-------------------------------|------|
| 0    | `A_SCHED_START`| start mask                    | started mask |
| 1    | `A_SCHED_EXIT` | —                             | exited mask |
| 2    | `A_SWTX_VALUE` | value for gA                  | value |
| 3    | `A_SWTX_CTRL`  | bit0 ACK                      | {BUSY, FAIL, DONE, RDY} |
| 4    | `A_HWTX_CTRL`  | bit0 READY, bit1 CLEAR        | {ACKED, READY} |
| 5    | `A_HWTX_VALUE` | —                             | value received on gB |

Writes take one cycle (`bus_wr`, `bus_addr`, `bus_wdata`); `bus_rdata` is
combinational on `bus_addr`.

## Modules and parameters

| module            | role | parameters (default) |
|-------------------|------|----------------------|
| `ttl_pkg`         | value width, bus map | `VALUE_W` (32) |
| `ttl_tx`          | transmitter event | `W` (32), `N_RX` (1) |
| `ttl_rx`          | receiver event | `W` |
| `ttl_choice_tx`   | choice of transmits | `W`, `NB` (2), `N_RX` (1), `ROTATE` (0) |
| `ttl_choice_rx`   | choice of receives | `W`, `NB` (2) |
| `ttl_choice_rxtx` | receive/transmit choice | `W`, `N_RX` (1) |
| `ttl_par`         | parallel composition | `N` (3) |
| `ttl_example_p`   | example process P | `W`, `FAIR_CHOICE` (1) |
| `ttl_case2_system`| receive-choice example | `W` |
| `ttl_case3_system`| mixed-choice example | `W` |
| `hw_scheduler`    | hardware scheduler | `N_MOD` (8) |
| `hwsw_interface`  | hardware/software interface | `W`, `N_RX` (1) |
| `codesign_top`    | whole hardware side | — |

All logic is synchronous to one clock with a synchronous, active-high `rst`.

## Choices made here, not in the source method

* Value width 32 bits (the example's values are integers).
* Reset behaviour, the idle state of each control sequence and the
  `start`/`done` pulse protocol.
* After its acknowledge, an unconfirmed transmitter returns to its waiting
  step X; a confirmed one moves on to the value step.
* `ROTATE` / `FAIR_CHOICE` (see above), on by default only in the example.
* Storing exits in `ttl_par`.
* The bus, register map and status bits of `hw_scheduler` and
  `hwsw_interface`. The interface confirms and captures a hardware
  transmitter's value on its own, mirroring a hardware receiver.
* The echo process and the choice of hardware modules in `codesign_top`.
* The receive- and mixed-choice systems complete process fragments into
  whole processes: the choosing process is recursive and its partners run
  once.

Not implemented in RTL: the software scheduler, the software processes and
the processor. The testbench of `codesign_top` plays the scheduler's role on
the bus.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_codesign_top \
    -y rtl rtl/ttl_pkg.sv tb/tb_codesign_top.sv
./obj_dir/Vtb_codesign_top
```

`tb_codesign_top` runs the whole hardware side at its default parameters. It
starts the modules and sends eight words through the echo process in both
directions. It also forces a failed acknowledge and a withdrawn offer, runs
both choice systems with simultaneous partners, and checks the example's `x`,
`y` and `z`. It counts every mechanism
(scheduler start, both interface procedures, failure and withdrawal, both
choice branches, the `>>` hand-over) and fails if one never happens. The
block testbenches check the cycle timing of each step sequence. Concurrent
assertions in the event blocks flag a `start` that arrives in the middle of a
rendezvous.

# Reversible 4-bit shift registers from a single 4x4 gate

A reversible gate maps every input vector to a distinct output vector, so no
information is thrown away. Landauer's limit ties each lost bit to a minimum
heat of kT ln 2. This design builds sequential logic from such gates. The
centre of it is one new 4-input, 4-output gate, called **AS**. Tied the right
way, a single AS gate is a D latch. Two of them and a Feynman gate make a
master-slave D flip-flop with Q and Q'. Four of those flip-flops make each of
the four classic 4-bit shift registers:

| register | module | gates | garbage outputs |
|---|---|---|---|
| serial in, serial out (SISO) | `rev_siso` | 12 | 8 |
| serial in, parallel out (SIPO) | `rev_sipo` | 12 | 8 |
| parallel in, parallel out (PIPO) | `rev_pipo` | 12 | 8 |
| parallel in, serial out (PISO) | `rev_piso` | 15 (12 + 3 Fredkin) | 11 |

A *garbage output* is a gate output that nothing uses. It only exists so the
gate can stay reversible. A *constant input* is an input tied to 0 or 1 for the
same reason. Those two counts, and the number of gates, are how reversible
designs are usually compared. The RTL keeps every gate and brings every
garbage output out as a port, so the counts can be read straight off the
netlist.

The RTL describes logic behaviour. The circuit was meant for adiabatic
(charge-recovery) transistor logic, and that part is not modelled (see
"Limits").

## The AS gate

```
P = A'
Q = A B + A' C          (A picks B when 1, C when 0)
R = D xor Q
S = B xor C
```

The inputs can always be recovered from the outputs, so the gate is
reversible. P gives A. Q then gives B (if A = 1) or C (if A = 0). S gives the
other of B and C, and R gives D. `tb_as_gate` applies all 16 input vectors and
checks that no two give the same output.

Tying one input turns the gate into a familiar function. These are the uses
the testbench checks:

| tie | what appears |
|---|---|
| A = 0 | Q = C (copy), R = D xor C, S = B xor C |
| B = 1 | Q = A + C (OR), S = C' (NOT) |
| C = 0 | Q = A B (AND), S = B |

Module: `rtl/as_gate.sv`. The Feynman gate (`P = A, Q = A xor B`) and the
Fredkin gate (`P = A, Q = A'B + AC, R = AB + A'C`) are standard.
`rtl/feynman_gate.sv` and `rtl/fredkin_gate.sv` implement them.

## From gate to latch: the feedback loop

Tie the AS gate as A = clk, B = d, D = 0, and feed its R output back to C:

```
      clk ──A┌────┐P── clk'
        d ──B│ AS │Q── clk·d + clk'·Q    (latch output)
   ┌──────── C│    │R── Q ──┐
   │    0 ──D└────┘S── d xor Q (garbage)
   └────────────────────────┘
```

While clk = 1, Q = d and the latch is transparent. While clk = 0, Q = C, which
is the value Q had, so the latch holds. One gate, one constant input and one
garbage output (`as_latch`). Adding a Feynman gate with its second input tied
to 1 gives Q and Q' together (`rev_d_latch`: two gates, two constant inputs,
one garbage output).

The R -> C wire is the only storage in the whole design. Written as a plain
wire it would be a combinational loop with no delay, which simulators and
synthesis handle badly. So `as_latch` writes it as an `always_latch` that holds
the fed-back bit while clk is low. The AS gate then reads that bit on C. The
latches that synthesis reports (one per AS latch, 35 in the top) are intended:
they are the circuit.

## The flip-flop, and why it triggers on the falling edge

```
 clk ─A[ AS master ]P── clk' ──A[ AS slave ]P── clk_out (= clk)
   d ─B            Q──────────B            Q── Feynman(·,1) ── q, qbar
       (R->C fb, D=0)   g1        (R->C fb, D=0)   g2
```

The master's P output is clk'. It drives the slave's A input, so no separate
clock inverter is needed. The master is transparent while clk = 1 and the
slave while clk = 0. When clk falls, the master freezes the value d had just
before the edge, and the slave passes it to Q. When clk rises, the slave
freezes first, so Q does not move. The result is a **falling-edge** flip-flop:
Q changes only after a 1 -> 0 transition of clk.

The slave's P output is clk again. It comes out as `clk_out`, and every
register passes the clock from one stage's `clk_out` to the next stage's
`clk`. Logically all stages see the same clock. The hand-over is kept because
it is how the reversible circuit routes its clock.

Count: three gates, three constant inputs (0, 0, 1) and two garbage outputs
(the S outputs `g1`, `g2`). Module: `rtl/rev_dff.sv`.

## The four registers

All stages act on the falling edge of `clk`. Bit 0 of a parallel port is the
first stage, D1/Q1, which is the stage next to the serial input.

- **SISO** (`rev_siso`): stage 0 takes `d`, and each later stage takes the
  previous stage's Q. A bit applied to `d` reaches `q` after N falling edges
  (4 by default). `stage_q` exposes every stage.
- **SIPO** (`rev_sipo`): the same chain, with every Q and Q' brought out. The
  newest bit is in `q[0]`. After the serial sequence 0, 1, 0, 1, `q` reads
  `4'b0101`.
- **PIPO** (`rev_pipo`): four independent stages. The word on `d` appears on
  `q` after one falling edge.
- **PISO** (`rev_piso`): a Fredkin gate in front of stages 1..N-1 is the
  write/shift multiplexer. Its inputs are A = `ws`, B = the previous stage's Q
  and C = the parallel bit, and its Q output feeds the stage. With `ws = 1`
  the next falling edge writes `d` into all stages. With `ws = 0` each edge
  shifts the word one stage towards the output. Each Fredkin gate passes `ws`
  on to the next through its P output. Its R output is garbage.

  The serial output is the last stage. Right after a write edge it shows
  `d[N-1]`, and the next N-1 edges bring `d[N-2]` .. `d[0]`. So `d[0]`, the
  first stage's bit, comes out on the fourth edge counting the write.

  Stage 0 has no multiplexer: it takes `d[0]` on every edge, so while shifting
  it refills the chain with `d[0]`. Keep `d` steady, or don't care about it,
  while draining a word.

## Top level

`rev_shift_registers_top` (parameter `N = 4`) places the four registers, one
stand-alone flip-flop and one stand-alone latch side by side. The original
circuits are separate designs, so nothing is wired between them. Each has its
own data ports, named by prefix (`siso_`, `sipo_`, `pipo_`, `piso_`, `dff_`,
`latch_`). The flip-flops all share `clk`, and the latch has its own enable
`latch_clk`. Sharing `clk` is a choice made here. The garbage outputs stay
inside the top.

## Where this RTL makes its own choices

- **No reset.** None of the circuits has a reset or clear. Every stage is
  unknown until it has been written. With the two-state simulators used for
  the testbenches, it starts at a random value, and the testbenches only check
  a register once it has been filled.
- **Feedback as an `always_latch`.** The storage is modelled this way, as
  explained above. The gate equations around it are unchanged.
- **Bit order of parallel ports.** Bit 0 = first stage. This matches the SIPO
  behaviour described above. For the PISO it decides which bit leaves first.
- **Width as a parameter.** `N` defaults to 4. Larger N builds the same chains
  with more stages; only N = 4 has been simulated.
- **Garbage outputs as ports.** They are brought out of every block below the
  top, so a netlist count matches the gate and garbage counts above.

## Limits

- The AS gate was meant to be built as an adiabatic circuit: 30 transistors in
  efficient charge-recovery logic (ECRL), with dual-rail outputs and a
  four-phase power clock. Its energy behaviour has no RTL counterpart, and
  there is no model of it here. `as_gate` gives only its logic function.
- Timing is zero-delay. The master-slave pair relies on the slave closing no
  later than the master opens (and on the clock hand-over between stages).
  In the RTL this holds by construction. In silicon it is a hold-time question
  that this RTL cannot answer.
- FPGA synthesis gives ordinary latches and LUTs. It keeps the behaviour but
  not the reversibility: the gates get merged, and nothing in the result is
  energy-recovering.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and ends the run. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rev_piso \
    -y rtl -y tb +libext+.sv tb/tb_rev_piso.sv
./obj_dir/Vtb_rev_piso +verilator+rand+reset+2
```

| testbench | what it checks |
|---|---|
| `tb_as_gate` | all 16 vectors, the three reduced uses, one-to-one mapping |
| `tb_feynman_gate`, `tb_fredkin_gate` | full truth tables |
| `tb_as_latch`, `tb_rev_d_latch` | random enable/data sequences against a reference latch, transparent and hold phases both seen |
| `tb_rev_dff` | Q after each falling edge, no change on the rising edge, `clk_out`, garbage |
| `tb_rev_siso` | random data against a reference chain; single-bit latency = 4 edges |
| `tb_rev_sipo` | sequence 0,1,0,1 giving 0101 step by step, then random data |
| `tb_rev_pipo` | words 1010, 0110, 1100 and random words, one-edge latency |
| `tb_rev_piso` | words 1010 and 0011 shifted out in order, then random write/shift mixes |
| `tb_rev_shift_registers_top` | the whole top at N = 4 for 1000 clocks, with every register, the flip-flop and the latch against reference models; also counts that each mechanism (capture, shift, parallel load, PISO write and shift, latch transparent and hold) happened |

All testbenches finish in well under a second.

## Files

`rtl/`: `as_gate`, `feynman_gate`, `fredkin_gate` (gates); `as_latch`,
`rev_d_latch` (latches); `rev_dff` (flip-flop); `rev_siso`, `rev_sipo`,
`rev_pipo`, `rev_piso` (registers); `rev_shift_registers_top`. One module per
file. `tb/`: one `tb_<module>.sv` per module.

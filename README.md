# Testable reversible latches and flip-flops from Fredkin gates

Sequential logic built from ordinary gates needs many test vectors to find
stuck-at faults, and a feedback loop makes the state hard to control from
outside. This design builds latches and flip-flops entirely out of one
reversible, *conservative* gate: the Fredkin gate, which never changes the
number of 1s passing through it. A circuit made only of such gates, with its
feedback loops broken, maps an all-0 input vector to all-0 outputs and an
all-1 input vector to all-1 outputs. So a single stuck-at-1 fault on any
line shows up as a 1 under the all-0s vector, and a stuck-at-0 fault shows
up as a 0 under the all-1s vector. Two vectors test the whole cell.

Every storage loop therefore passes through a second Fredkin gate whose
data inputs are two control bits, C1 and C2. In normal mode that gate closes
the loop and copies the stored bit. In test mode it replaces the feedback
with a constant, so the loop is cut.

The cells are:

| module | what it is | Fredkin gates |
|---|---|---|
| `fredkin_gate` | the 3x3 controlled-swap gate | 1 |
| `fredkin_dlatch_pos` | testable D latch, transparent while E = 1 | 2 |
| `fredkin_dlatch_neg` | testable D latch, transparent while E = 0 | 2 |
| `fredkin_ms_dff` | testable master-slave D flip-flop | 4 |
| `fredkin_det_ff` | testable double-edge-triggered D flip-flop | 6 |
| `fredkin_seq_top` | the two flip-flops side by side | 10 |

`fredkin_pkg` holds the encoding of the control pairs.

## The Fredkin gate

Inputs A, B, C and outputs P, Q, R:

    P = A
    Q = A'B xor AC
    R = A'C xor AB

With A = 0, B and C pass straight through (Q = B, R = C). With A = 1 they
are swapped (Q = C, R = B). Some descriptions of this gate state the
opposite polarity (control 1 passes, control 0 swaps). The equations above
are used here, because the latch mappings below only work with them.

## How a latch is made of two gates

Gate 1 gets A = E (the enable, used as the clock), B = D and C = the fed-back
state `fb`. Its outputs are:

    Q = E'.D  xor E.fb      -> D while E = 0, fb while E = 1
    R = E'.fb xor E.D       -> fb while E = 0, D while E = 1

So R, fed back, is a positive-enable latch (`fredkin_dlatch_pos`), and Q,
fed back, is a negative-enable latch (`fredkin_dlatch_neg`). A
negative-enable latch made this way needs no inverted clock. The unused
output of gate 1 is a garbage output. Gate 1's P output carries E onward, so
a following cell can take E from it instead of from a fan-out.

Gate 2 gets A = the stored bit, B = C1 and C = C2:

    P  = stored bit                  -> the latch output q
    T1 = Q'.C1 xor Q.C2              -> fed back to gate 1
    T2 = Q'.C2 xor Q.C1

| {C1,C2} | mode | T1 | T2 | test vector | fault-free outputs |
|---|---|---|---|---|---|
| 01 | normal | Q | ~Q | — | — |
| 00 | stuck-at-1 test | 0 | 0 | E = D = 0 | all 0 |
| 11 | stuck-at-0 test | 1 | 1 | E = D = 1 | all 1 |

In normal mode T1 = Q closes the loop, and the cell behaves as a D latch
whose output has two copies without fan-out. In either test mode the
feedback becomes a constant equal to the test vector, so the whole cell is
loop-free and conservative.

The drawing of these cells does not show clearly which of T1 and T2 goes
back to gate 1. T1 is used here. It is the only choice that holds the state:
T2 would feed back the inverse, and the loop would oscillate.

### The loop is the storage

There are no `always_ff` blocks and no latch primitives in this RTL. The bit
is held by a combinational loop, gate 1 → gate 2 → T1 → gate 1, exactly as
in a latch built from gates. Verilator reports it as `UNOPTFLAT` (circular
logic) and yosys as a logic loop. Both are expected. On an FPGA each loop
becomes a LUT with feedback. Static timing tools will not treat it as a
latch, so constrain or check the D-to-E timing yourself. In simulation the
model has zero delay. D must not change in the same time step as the enable
edge that closes the latch.

## Master-slave D flip-flop (`fredkin_ms_dff`)

A positive-enable master feeds a negative-enable slave. E enters the
master's gate 1 and leaves on its P output to become the slave's enable.
The master's output (P of its gate 2) is the slave's D. While E = 1 the
master follows D and the slave holds. While E = 0 the master holds and the
slave shows the master's bit. **Q therefore takes D at the falling edge of
E** and changes at no other time. A general remark about master-slave
flip-flops describes them as acting on the rising edge. The latch
polarities, master positive and slave negative, are followed here, and they
give a falling-edge flip-flop. For a rising-edge version, swap the latch
types.

The controls are {mC1,mC2} for the master and {sC1,sC2} for the slave. The
two pairs are independent. For example, mC = 11 with sC = 00 forces
mT1 = mT2 = 1 and sT1 = sT2 = 0 whatever E and D do.

## Double-edge-triggered flip-flop (`fredkin_det_ff`)

A positive and a negative latch sit in parallel, and a Fredkin gate used as
a 2:1 multiplexer shows whichever one is holding. The flip-flop takes D on
both edges of E, so it gives the same data rate as the master-slave
flip-flop at half the clock frequency. The gates, numbered as in the
original drawing:

- **Gate 6, copy of D** (A = D, B = dC1, C = dC2). With {dC1,dC2} = 01, both
  P and Q equal D, and R = ~D is garbage. Gate 6 gives each latch its own
  copy of D. A Fredkin circuit may not fan out a wire, so this gate is
  needed.
- **Gates 1, 2**: the positive latch, controls pC1 and pC2. It is fed from
  gate 6's P output.
- **Gates 3, 4**: the negative latch, controls nC1 and nC2. It is fed from
  gate 6's Q output.
- **Gate 5, multiplexer** (A = E as passed on by gate 1's P output, B = the
  positive latch, C = the negative latch). Its output Q = E'.Qp xor E.Qn.
  While E = 1 it selects the negative latch, which holds the bit taken at
  the rising edge. While E = 0 it selects the positive latch, which holds
  the bit taken at the falling edge.

The drawing feeds E to gate 1 and to gate 3 as two inputs of the same net,
and this RTL does the same. In test mode all six control bits take the
vector's value (all 0 or all 1).

## Interfaces

All ports are single bits. The latches have `e, d, c1, c2` in and
`e_out, g, q, t1, t2` out. `fredkin_ms_dff` and `fredkin_det_ff` bring out
their T outputs and every garbage output (`e_out`, `mg`, `sg`; `dg`, `pg`,
`ng`, `ne`, `mux_p`, `mux_r`). Each of these is an observation point for
the two-vector test. `fredkin_seq_top` prefixes the master-slave ports with
`ms_` and the DET ports with `det_`. The design has no parameters and no
reset: load a value by making the latch transparent.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_fredkin_gate` tries all 8 inputs against a swap model. It also checks
  conservation (equal count of 1s in and out) and reversibility (8 distinct
  outputs).
- `tb_fredkin_dlatch_pos` / `_neg` run 400 random steps in normal mode
  against a latch model. They check T1 = Q and T2 = ~Q, and apply both test
  vectors from either stored value. Then they `force` each internal net
  stuck at 0 and at 1 and check that the matching vector exposes the fault.
- `tb_fredkin_ms_dff` runs 200 clock periods with D changing between
  edges. A monitor fails the run if Q moves anywhere but at a falling edge.
  The testbench also replays the mixed control setting above, and detects
  12 injected stuck-at faults.
- `tb_fredkin_det_ff` does the same with captures on both edges, and
  detects 16 injected faults.
- `tb_fredkin_seq_top` is the end-to-end test. It streams 300 random bits
  through both flip-flops, with the DET clock at half the master-slave
  clock. It checks that each bit appears on both outputs at the same time,
  and that both outputs hold until the next sampling edge. It then runs both
  test vectors, injects faults, and returns to normal mode. It counts each
  of these mechanisms and fails if any never happened.

To run one with Verilator 5 (timing support is needed for the `#` delays),
from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_fredkin_seq_top \
        -y rtl -y tb rtl/fredkin_pkg.sv tb/tb_fredkin_seq_top.sv
    ./obj_dir/Vtb_fredkin_seq_top

`-Wno-fatal` is needed because of the intended `UNOPTFLAT` warnings. The
simulator has two states, so the stored bit of each latch starts random. The
testbenches load a known value before checking anything.

## Departures and open points

- Gate polarity follows the output equations, not the prose that states the
  opposite polarity (see above).
- The feedback comes from T1, not T2, as chosen above.
- The master-slave flip-flop captures on the falling edge of E, as follows
  from its latch polarities.
- Both characteristic equations are read with the complements that their
  stated behaviour requires: Q+ = D.E + E'.Q for the positive latch, and
  Q+ = D.E' + E.Q for the negative one.
- The dC1/dC2 controls of the copy gate appear only in the drawings. Their
  normal value 01 is taken from there.
- There is no test controller or scan logic: the two vectors are applied
  from outside on the ordinary inputs.
- The plain, non-testable reversible D latch is the baseline and is not
  included.
- The stuck-at fault model is checked only for single faults forced on
  internal nets, one net at a time.

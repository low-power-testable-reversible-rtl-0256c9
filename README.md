# Two-vector testable sequential circuits from conservative gates

A gate is *conservative* when every output pattern has as many ones as the
input pattern that produced it. Build a circuit only from such gates and the
whole circuit stays conservative. Drive every input to 0 and every line
inside must then be 0. Drive every input to 1 and every line must be 1. A
single line stuck at 1 breaks the first pattern and a line stuck at 0 breaks
the second. So two fixed test vectors, all zeros and all ones, detect any
unidirectional stuck-at fault. No scan chain or test pattern generation is
needed.

Sequential circuits are the hard case, because their feedback loop can hold
the wrong value during a test. This RTL builds D latches, a master-slave D
flip-flop and a double-edge-triggered (DET) D flip-flop from conservative
gates. Two control inputs, C1 and C2, force the feedback to the test value,
so the two-vector test covers the storage loop as well.

Two conservative gates are used:

| gate | function | majority voters |
|---|---|---|
| Fredkin (reversible) | P = A, Q = A ? C : B, R = A ? B : C | 6, two levels |
| MX-CQCA (conservative, not reversible) | P = A·B, Q = B ? C : A, R = B + C | 5, two levels |

MX-CQCA is a cheaper alternative to Fredkin that was proposed with this
design. Its Q output is a 2:1 multiplexer with B as select, and it costs one
majority voter less than a Fredkin gate in quantum-dot cellular automata
(QCA). In QCA the basic device is the 3-input majority voter
M(a,b,c) = ab + bc + ac. Each gate here is therefore written as a network of
`majority_voter` instances, so the voter count the two gates are compared on
can be read straight from the RTL. On an FPGA this network collapses to a few
LUTs.

## How a testable latch works

`fredkin_d_latch` has two Fredkin gates:

```
            +-----------+  Qm   +------------+
  E  ------>| A      P  |-> g1  |            |
  fb ------>| B  F1  Q  |------>| A   F2  P  |--> Q
  D  ------>| C      R  |-> g0  |            |
            +-----------+  C1 ->| B       Q  |--> QN   (Q' when C1C2 = 10)
                 ^         C2 ->| C       R  |--+ fb    (copy of Qm)
                 |              +------------+  |
                 +------------------------------+
```

- **F1 is the storage multiplexer:** Qm = E ? D : fb. With `ACTIVE_LOW = 1`
  the B and C inputs are swapped and the latch is open while E = 0.
- **F2 is the fan-out gate:** in normal mode (C1 = 1, C2 = 0) its P output is
  Q, its Q output is Q', and its R output is a second copy of the state that
  is fed back to F1.
- **Storage:** the state is held in the loop F1 → F2 → F1. There is no
  flip-flop or latch primitive; the circuit is a gate-level latch with a
  stable feedback loop.
- **Test mode:** with C1 = C2 = 0, F2 drives the feedback to 0. With
  C1 = C2 = 1 it drives it to 1. So with {D, E, C1, C2} all 0, all four
  outputs (Q, QN and the two *garbage* outputs g1 = E and g0 of F1) are 0.
  With all inputs 1 they are all 1. This holds whatever the latch stored
  before.

`mx_cqca_d_latch` works the same way with two MX-CQCA gates:

- **Multiplexer:** gate 1 is (A = fb, B = E, C = D), so Qm = E ? D : fb.
- **Fan-out:** gate 2 is (A = C1, B = Qm, C = C2). Its P output is C1·Qm,
  which is the feedback. Its R output is Qm + C2, which is Q. Its Q output is
  Q' in normal mode.
- **Test mode:** C1 = 0 cuts the feedback to 0 for the all-zero test.

Garbage outputs are the gate outputs that the function does not need. They
are brought out on purpose, because the two-vector test must observe them.
In normal mode they are predictable, and the testbenches check them:
{E, D} for the Fredkin latch, and {Q·E, E + D} for the MX-CQCA latch.

## Flip-flops

**`fredkin_ms_dff`: master-slave, rising edge.**

- A Fredkin fan-out gate (A = CLK, B = C1, C = C2) makes two copies of the
  clock.
- The master is a Fredkin latch that is open while CLK = 0. The slave follows
  the master and is open while CLK = 1.
- Q takes the value D had just before the rising edge and is valid in the
  same time step. There is no extra cycle of latency.
- Outputs: Q, QN and six garbage bits.

**`fredkin_det_ff`: double-edge triggered.**

- D goes through one Fredkin fan-out gate. CLK goes through two, chained, to
  make three copies.
- The two copies of D feed a latch that is open while CLK = 1 and a latch that
  is open while CLK = 0.
- A Fredkin gate with CLK as control outputs whichever latch is closed:
  Q = CLK ? q_lo : q_hi.
- Q therefore takes D at both clock edges, which moves two bits per clock
  period.
- Outputs: Q and eleven garbage bits. There is no QN: the output multiplexer
  does not produce one.

In both flip-flops C1 and C2 go to every gate. With every input (C1 and C2
included) at 0, every output is 0; with every input at 1, every output is 1.

**Timing.** D must be stable around the clock edges that capture it. The
master closes as the slave opens, and there is no separate setup or hold
margin in the logic.

**Reset.** There is none. Neither the latches nor the flip-flops have a reset
input; they power up holding whatever value the loop settles to.

## Control encoding

`rev_pkg::test_mode_e` gives the three uses of {C1, C2}:

| {C1, C2} | mode |
|---|---|
| 10 | normal operation (`MODE_NORMAL`) |
| 00 | all-zero test vector; drive every other input to 0 as well |
| 11 | all-one test vector; drive every other input to 1 as well |

The value 01 is not used.

## Top level: `testable_seq_top`

The top level places the four sequential circuits side by side. They share D
and C1/C2. Both latches use `en` and both flip-flops use `clk`.

- **`latch_fr_q`, `latch_mx_q`, `msff_q`, `detff_q`:** the four Q outputs.
- **`test_outputs[27:0]`:** every output of the four circuits, garbage
  included. Under the all-0 vector it must read all zeros, and under the
  all-1 vector all ones. Any other value means a fault.
- **`gate_in[2:0]` / `gate_out[11:0]`:** a bank holding one of each gate on
  the same inputs {A, B, C}. The outputs are Fredkin PQR, MX-CQCA PQR,
  Toffoli PQR, Feynman PQ (on A, B) and NOT (on C).

The Feynman (P = A, Q = A ⊕ B), Toffoli (P = A, Q = B, R = AB ⊕ C) and NOT
gates are the basic reversible gates. They are included so the gate set is
complete. The sequential circuits do not use them: a Feynman gate is not
conservative, so fan-out is done with Fredkin or MX-CQCA gates instead.

## Where this RTL makes its own choices

The gate equations, the voter counts (5 and 6) and the two-vector test
principle come from the published design. These points do not, and were
chosen here:

- The arrangement of the voters inside each gate (see the file headers).
- The two-gate structure of each latch, and the C1/C2 encoding.
- The rising edge of the master-slave flip-flop.
- The whole structure of the DET flip-flop. Only its existence was given.
- The MX-CQCA latch.
- Sharing D and C1/C2 across the circuits in the top level.

Not modelled:

- **Controlled-V and Controlled-V+ gates:** these are quantum gates with no
  Boolean function.
- **QCA cells, wires, inverter chains and the four QCA clocking zones:** the
  clocking zones set delay in a QCA layout and have no counterpart in FPGA
  logic.
- **The procedure that maps arbitrary functions onto MX-CQCA gates:** it uses
  a library of 13 standard functions that is not reproduced here.

## Tool notes

**Intended loops.** The latches are combinational loops. Verilator reports
them as `UNOPTFLAT` and Yosys reports them as logic loops. Both are expected
and explained in the module headers. For an FPGA build, the loop in each
latch needs a timing exception or loop-breaking constraint, as any
gate-level latch does. Synthesis will not infer latch primitives here.

**Simulating stuck-at faults.** The top-level testbench injects stuck-at
faults with `force`. With Verilator, forcing two different nets of the same
loop in one simulation broke its evaluation of that loop, so each latch has
at most one forced net inside its loop.

## Simulating

Each file in `tb/` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and stops; a watchdog ends it with a failure
if it hangs. The simulator needs `-Wno-fatal` because of the intended loops:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/rev_pkg.sv tb/tb_testable_seq_top.sv --top-module tb_testable_seq_top
./obj_dir/Vtb_testable_seq_top
```

| testbench | what it covers |
|---|---|
| `tb_majority_voter`, `tb_not_gate`, `tb_feynman_gate`, `tb_toffoli_gate` | exhaustive truth tables |
| `tb_fredkin_gate` | truth table, conservation of ones, reversibility, and the point a=1 b=0 c=1 → p=1 q=1 r=0 |
| `tb_mx_cqca_gate` | the published truth table, written out, and conservation of ones |
| `tb_fredkin_d_latch` | random D/E against a reference latch for both enable polarities, then both test vectors from either stored value |
| `tb_mx_cqca_d_latch` | the same for the MX-CQCA latch |
| `tb_fredkin_ms_dff` | capture at rising edges, hold through D changes and falling edges, both test vectors |
| `tb_fredkin_det_ff` | capture at both edges, hold between edges, both test vectors |
| `tb_testable_seq_top` | everything together at the default configuration (see below) |

`tb_testable_seq_top` runs:

1. 400 clock cycles of normal operation.
2. The two-vector test.
3. Nine single stuck-at faults forced onto internal lines of all four
   circuits, each of which the two vectors must detect.
4. The gate bank, exhaustively.

It counts every mechanism and fails if any never occurred: latch
transparent/hold, capture/hold of each flip-flop, DET capture on each edge,
each test vector, fault detection, Fredkin swap and MX-CQCA select.

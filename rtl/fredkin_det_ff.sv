// fredkin_det_ff: two-vector testable double-edge-triggered (DET) D
// flip-flop made of six Fredkin gates.
//
// Structure (gate numbers as in the cell's drawing):
//   gate 6  copy of D: a = D, b = dC1, c = dC2. With {dC1,dC2} = 01 both P
//           and Q carry D (R = ~D is garbage), giving the two latches their
//           own copy of D without fan-out.
//   gates 1,2  testable positive-enable latch (fredkin_dlatch_pos), controls
//           pC1, pC2, fed from gate 6's P.
//   gates 3,4  testable negative-enable latch (fredkin_dlatch_neg), controls
//           nC1, nC2, fed from gate 6's Q.
//   gate 5  2:1 multiplexer: a = E (as passed on by gate 1's P output),
//           b = positive latch output, c = negative latch output. Its Q
//           output E'.Qp xor E.Qn selects the latch that is holding: the
//           negative latch while E = 1, the positive latch while E = 0.
//
// Behaviour: Q takes the value of D at every rising and every falling edge
// of E and holds it for the following half period, so two data values are
// taken per clock period.
//
// Modes: {dC1,dC2}, {pC1,pC2}, {nC1,nC2} all 01 is normal operation. All
// controls 0 with E = D = 0 is the stuck-at-1 test (every output 0), all
// controls 1 with E = D = 1 the stuck-at-0 test (every output 1).
//
// Interface: e, d and the six controls in; q, pt1, pt2, nt1, nt2 out, plus
// the garbage outputs dg (gate 6 R), pg and ng (spare outputs of gates 1
// and 3), ne (gate 3 P), mux_p and mux_r (gates 5 P and R).
//
// Timing: no clock and no internal delay; both latches are combinational
// loops (see fredkin_dlatch_pos). D must be stable around each edge of E.
//
// The gate list and their connections follow the specification. The enable
// enters gates 1 and 3 as two separate wires of the same net E, as drawn;
// which of gate 6's outputs feeds which latch is read from the drawing.
module fredkin_det_ff (
  input  logic e,
  input  logic d,
  input  logic dc1,
  input  logic dc2,
  input  logic pc1,
  input  logic pc2,
  input  logic nc1,
  input  logic nc2,
  output logic q,
  output logic pt1,
  output logic pt2,
  output logic nt1,
  output logic nt2,
  output logic dg,
  output logic pg,
  output logic ng,
  output logic ne,
  output logic mux_p,
  output logic mux_r
);

  logic d_pos, d_neg;  // the two copies of D
  logic e_mux;         // enable after gate 1, mux select
  logic q_pos, q_neg;  // latch outputs

  // Gate 6: copy of D
  fredkin_gate u_g6 (.a(d), .b(dc1), .c(dc2), .p(d_pos), .q(d_neg), .r(dg));

  // Gates 1 and 2
  fredkin_dlatch_pos u_pos (
    .e(e), .d(d_pos), .c1(pc1), .c2(pc2),
    .e_out(e_mux), .g(pg), .q(q_pos), .t1(pt1), .t2(pt2)
  );

  // Gates 3 and 4
  fredkin_dlatch_neg u_neg (
    .e(e), .d(d_neg), .c1(nc1), .c2(nc2),
    .e_out(ne), .g(ng), .q(q_neg), .t1(nt1), .t2(nt2)
  );

  // Gate 5: output multiplexer
  fredkin_gate u_g5 (.a(e_mux), .b(q_pos), .c(q_neg), .p(mux_p), .q(q), .r(mux_r));

endmodule

// fredkin_dlatch_neg: two-vector testable negative-enable D latch built from
// two Fredkin gates.
//
// Same structure as fredkin_dlatch_pos, but the stored bit is taken from the
// Q output of gate 1: Q = E'.D xor E.fb, so Q+ = D while E = 0 and Q+ = Q
// while E = 1. It therefore needs no inverted clock when used as the slave of
// a master-slave flip-flop or as the second latch of a double-edge flip-flop.
// Gate 2 (a = Q, b = C1, c = C2) copies Q to its P output and produces the
// feedback T1 and the spare T2:
//   {C1,C2} = 01  normal mode: T1 = Q, T2 = ~Q.
//   {C1,C2} = 00  stuck-at-1 test: T1 = T2 = 0; apply E = D = 0, all outputs 0.
//   {C1,C2} = 11  stuck-at-0 test: T1 = T2 = 1; apply E = D = 1, all outputs 1.
//
// Interface: e, d, c1, c2 in; e_out (gate 1 P), g (gate 1 R, garbage), q,
// t1, t2 out.
//
// Timing: no clock; the storage is the combinational loop gate 1 Q ->
// gate 2 -> T1 -> gate 1 c, reported by synthesis as a loop on purpose.
// Q follows D while E = 0 and holds from the rising edge of E.
//
// Mapping the latch on gate 1's second output follows the specification;
// the feedback from T1 is this implementation's reading, as in the
// positive latch.
module fredkin_dlatch_neg (
  input  logic e,
  input  logic d,
  input  logic c1,
  input  logic c2,
  output logic e_out,
  output logic g,
  output logic q,
  output logic t1,
  output logic t2
);

  logic latch_q;  // Q output of gate 1, the stored bit

  fredkin_gate u_g1 (.a(e),       .b(d),  .c(t1), .p(e_out), .q(latch_q), .r(g));
  fredkin_gate u_g2 (.a(latch_q), .b(c1), .c(c2), .p(q),     .q(t1),      .r(t2));

endmodule

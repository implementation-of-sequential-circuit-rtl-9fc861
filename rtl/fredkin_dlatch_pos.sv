// fredkin_dlatch_pos: two-vector testable positive-enable D latch built from
// two Fredkin gates.
//
// Gate 1 (a = E, b = D, c = feedback) realises the latch equation on its R
// output: R = E'.fb xor E.D, so Q+ = D while E = 1 and Q+ = Q while E = 0.
// Gate 2 (a = Q, b = C1, c = C2) does two jobs. Its P output is the latch
// output Q, so Q never drives two loads directly (no fan-out). Its other two
// outputs are T1 = Q'C1 xor QC2 and T2 = Q'C2 xor QC1; T1 is the feedback.
//   {C1,C2} = 01  normal mode: T1 = Q, T2 = ~Q, the loop stores the bit.
//   {C1,C2} = 00  test mode: T1 = T2 = 0, loop broken; with E = D = 0 every
//                 output must be 0, a 1 anywhere reveals a stuck-at-1 fault.
//   {C1,C2} = 11  test mode: T1 = T2 = 1, loop broken; with E = D = 1 every
//                 output must be 1, a 0 anywhere reveals a stuck-at-0 fault.
//
// Interface: e, d, c1, c2 in; e_out (gate 1 P, the enable handed on to a
// following cell), g (gate 1 Q, a garbage output), q, t1, t2 out.
//
// Timing: there is no clock. The storage element is the combinational loop
// gate 1 R -> gate 2 -> T1 -> gate 1 c; that loop is the point of the design
// and is why synthesis reports a combinational loop (on an FPGA it maps to a
// LUT with feedback, as any latch made of gates). Q follows D with zero
// delay while E = 1 and holds when E falls; D must be stable around the
// falling edge of E.
//
// The two-gate structure, the mode encodings and the use of R for the
// positive latch follow the cell's specification. Taking the feedback from
// T1 (not T2) is the one reading that makes normal mode hold Q, and is this
// implementation's interpretation of the drawing.
module fredkin_dlatch_pos (
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

  logic latch_q;  // R output of gate 1, the stored bit

  fredkin_gate u_g1 (.a(e),       .b(d),  .c(t1), .p(e_out), .q(g),  .r(latch_q));
  fredkin_gate u_g2 (.a(latch_q), .b(c1), .c(c2), .p(q),     .q(t1), .r(t2));

endmodule

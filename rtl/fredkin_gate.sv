// fredkin_gate: the 3x3 Fredkin (controlled-swap) gate, the only primitive
// the sequential cells are built from.
//
// Function: P = A, Q = A'B xor AC, R = A'C xor AB. With A = 0 the data
// inputs pass straight through (Q = B, R = C); with A = 1 they are swapped
// (Q = C, R = B). The gate is reversible (a bijection on 3 bits) and
// conservative (it never changes the number of 1s), which is what makes the
// all-0s / all-1s test of the larger cells work.
//
// Interface: a is the control, b and c the data inputs; p, q, r the outputs
// in the same order. Purely combinational, no clock.
//
// The output equations are the gate's specification and are written here
// as given.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end

endmodule

// fredkin_pkg: shared types and constants of the two-vector testable
// reversible sequential cells.
//
// Every testable latch carries a second Fredkin gate whose data inputs are
// two control bits {C1, C2}. The pair selects the operating mode:
//   {C1,C2} = 2'b01  normal: the gate copies the latch output (T1 = Q,
//                    T2 = ~Q) and T1 closes the storage loop.
//   {C1,C2} = 2'b00  stuck-at-1 test: T1 = T2 = 0, the loop is broken and
//                    the all-0s vector must give all-0 outputs.
//   {C1,C2} = 2'b11  stuck-at-0 test: T1 = T2 = 1, the loop is broken and
//                    the all-1s vector must give all-1 outputs.
// These three encodings are the ones the cells are specified with; 2'b10 is
// not used by the design (it would feed back ~Q).
package fredkin_pkg;

  // Control pair of one testable latch, C1 in the upper bit.
  typedef enum logic [1:0] {
    MODE_TEST_SA1 = 2'b00,
    MODE_NORMAL   = 2'b01,
    MODE_TEST_SA0 = 2'b11
  } test_mode_e;

endpackage

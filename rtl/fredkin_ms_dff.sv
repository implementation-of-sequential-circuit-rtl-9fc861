// fredkin_ms_dff: two-vector testable master-slave D flip-flop made of four
// Fredkin gates.
//
// The master is a testable positive-enable latch (fredkin_dlatch_pos), the
// slave a testable negative-enable latch (fredkin_dlatch_neg) in series with
// it. The enable E enters the master's first gate and leaves it again on
// that gate's P output, which drives the slave's enable, so E reaches both
// latches without fan-out and the slave needs no inverted clock. The
// master's output (P of its copy gate) is the slave's data.
//
// Behaviour with E as the clock: while E = 1 the master is transparent and
// the slave holds; while E = 0 the master holds and the slave passes the
// master's bit to Q. Q therefore takes the value D had when E fell, and
// changes only on the falling edge of E.
//
// Modes: each latch has its own control pair, {mC1,mC2} for the master and
// {sC1,sC2} for the slave. 01/01 is normal operation. All controls 0 with
// E = D = 0 is the stuck-at-1 test (every output 0 when fault-free); all
// controls 1 with E = D = 1 is the stuck-at-0 test (every output 1).
//
// Interface: e, d, mc1, mc2, sc1, sc2 in; q, mt1, mt2, st1, st2 out, plus
// the garbage outputs e_out (the enable after the slave's first gate),
// mg and sg (spare outputs of the two first gates).
//
// Timing: no clock and no internal delay. Each latch stores its bit in a
// combinational loop through its two gates (see fredkin_dlatch_pos), which
// tools report as circular logic; the loops are the storage and stay. D
// must be stable around the falling edge of E.
//
// The series connection, the enable hand-over and the control names follow
// the specification; the names of the garbage ports are this design's.
module fredkin_ms_dff (
  input  logic e,
  input  logic d,
  input  logic mc1,
  input  logic mc2,
  input  logic sc1,
  input  logic sc2,
  output logic q,
  output logic mt1,
  output logic mt2,
  output logic st1,
  output logic st2,
  output logic e_out,
  output logic mg,
  output logic sg
);

  logic e_m2s;  // enable handed from master to slave
  logic q_m;    // master output, slave data

  fredkin_dlatch_pos u_master (
    .e(e), .d(d), .c1(mc1), .c2(mc2),
    .e_out(e_m2s), .g(mg), .q(q_m), .t1(mt1), .t2(mt2)
  );

  fredkin_dlatch_neg u_slave (
    .e(e_m2s), .d(q_m), .c1(sc1), .c2(sc2),
    .e_out(e_out), .g(sg), .q(q), .t1(st1), .t2(st2)
  );

endmodule

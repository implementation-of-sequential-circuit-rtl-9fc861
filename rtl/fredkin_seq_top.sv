// fredkin_seq_top: the two testable reversible flip-flops side by side.
//
// The design is a family of sequential cells made only of Fredkin gates that
// can be tested for single stuck-at faults with two vectors, all 0s and all
// 1s. This top holds its two flip-flops, each with its own ports:
//   ms_*   fredkin_ms_dff, master-slave D flip-flop (captures on the falling
//          edge of ms_e); it contains one positive and one negative
//          testable D latch.
//   det_*  fredkin_det_ff, double-edge-triggered D flip-flop (captures on
//          both edges of det_e).
// The two cells share nothing, so each can be clocked, tested and observed
// on its own. Every gate output, garbage outputs included, is brought out:
// in test mode each of them is an observation point.
//
// The cells hold their state in combinational loops through Fredkin gates
// (one per latch, four in all), not in flip-flop primitives; tools report
// those loops, and they are intended.
//
// Placing the two cells side by side, and the port names, are this design's
// choices; the cells themselves follow their specification.
module fredkin_seq_top (
  // master-slave D flip-flop
  input  logic ms_e,
  input  logic ms_d,
  input  logic ms_mc1,
  input  logic ms_mc2,
  input  logic ms_sc1,
  input  logic ms_sc2,
  output logic ms_q,
  output logic ms_mt1,
  output logic ms_mt2,
  output logic ms_st1,
  output logic ms_st2,
  output logic ms_e_out,
  output logic ms_mg,
  output logic ms_sg,
  // double-edge-triggered D flip-flop
  input  logic det_e,
  input  logic det_d,
  input  logic det_dc1,
  input  logic det_dc2,
  input  logic det_pc1,
  input  logic det_pc2,
  input  logic det_nc1,
  input  logic det_nc2,
  output logic det_q,
  output logic det_pt1,
  output logic det_pt2,
  output logic det_nt1,
  output logic det_nt2,
  output logic det_dg,
  output logic det_pg,
  output logic det_ng,
  output logic det_ne,
  output logic det_mux_p,
  output logic det_mux_r
);

  fredkin_ms_dff u_ms (
    .e(ms_e), .d(ms_d), .mc1(ms_mc1), .mc2(ms_mc2), .sc1(ms_sc1), .sc2(ms_sc2),
    .q(ms_q), .mt1(ms_mt1), .mt2(ms_mt2), .st1(ms_st1), .st2(ms_st2),
    .e_out(ms_e_out), .mg(ms_mg), .sg(ms_sg)
  );

  fredkin_det_ff u_det (
    .e(det_e), .d(det_d), .dc1(det_dc1), .dc2(det_dc2),
    .pc1(det_pc1), .pc2(det_pc2), .nc1(det_nc1), .nc2(det_nc2),
    .q(det_q), .pt1(det_pt1), .pt2(det_pt2), .nt1(det_nt1), .nt2(det_nt2),
    .dg(det_dg), .pg(det_pg), .ng(det_ng), .ne(det_ne),
    .mux_p(det_mux_p), .mux_r(det_mux_r)
  );

endmodule

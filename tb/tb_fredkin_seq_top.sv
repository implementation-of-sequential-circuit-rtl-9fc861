// tb_fredkin_seq_top: end-to-end test of both flip-flops in the top, at the
// top's default configuration.
//
// Phase 1, normal mode: one random data stream, a new bit every 20 ns, is
//   fed to both cells. The master-slave flip-flop is clocked with a 20 ns
//   period (captures on each falling edge), the double-edge flip-flop with
//   a 40 ns period (captures on each edge), so both take one bit per 20 ns.
//   After every capture both Q outputs must equal the bit just sampled:
//   the DET cell delivers the same data rate at half the clock frequency.
//   Just before each sampling edge both must still show the previous bit.
// Phase 2, test mode: the all-0s and all-1s vectors on every input of both
//   cells must give all-0 and all-1 outputs.
// Phase 3, fault detection: stuck-at faults forced inside each cell must
//   make the matching vector fail.
// Phase 4, back to normal mode: both cells must capture data again.
// Each mechanism is counted and a failure is counted for any that never
// happened.
`timescale 1ns/1ps
module tb_fredkin_seq_top;
  import fredkin_pkg::*;

  localparam int BITS = 300;

  logic ms_e, ms_d, ms_mc1, ms_mc2, ms_sc1, ms_sc2;
  logic ms_q, ms_mt1, ms_mt2, ms_st1, ms_st2, ms_e_out, ms_mg, ms_sg;
  logic det_e, det_d, det_dc1, det_dc2, det_pc1, det_pc2, det_nc1, det_nc2;
  logic det_q, det_pt1, det_pt2, det_nt1, det_nt2, det_dg, det_pg, det_ng, det_ne;
  logic det_mux_p, det_mux_r;

  int checks = 0, failures = 0;
  int n_ms_capture = 0, n_hold = 0, n_det_rise = 0, n_det_fall = 0;
  int n_sa1_test = 0, n_sa0_test = 0, n_fault_detect = 0, n_resume = 0;

  fredkin_seq_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: ms_q=%b det_q=%b", what, $time, ms_q, det_q);
    end
  endtask

  task automatic set_modes(input test_mode_e m);
    {ms_mc1, ms_mc2}   = m;
    {ms_sc1, ms_sc2}   = m;
    {det_dc1, det_dc2} = m;
    {det_pc1, det_pc2} = m;
    {det_nc1, det_nc2} = m;
  endtask

  function automatic bit ms_all(input logic lvl);
    return {ms_q, ms_mt1, ms_mt2, ms_st1, ms_st2, ms_e_out, ms_mg, ms_sg} == {8{lvl}};
  endfunction

  function automatic bit det_all(input logic lvl);
    return {det_q, det_pt1, det_pt2, det_nt1, det_nt2, det_dg, det_pg, det_ng,
            det_ne, det_mux_p, det_mux_r} == {11{lvl}};
  endfunction

  task automatic apply_vector(input logic lvl);
    set_modes(lvl ? MODE_TEST_SA0 : MODE_TEST_SA1);
    ms_e = lvl; ms_d = lvl; det_e = lvl; det_d = lvl;
    #5;
  endtask

  // Stream n bits through both cells. Bit i is applied at 20i and sampled at
  // 20i + 10, by a falling edge of ms_e and by an edge of det_e.
  // Just before each sampling edge both Q outputs must still hold the
  // previous bit although D has already changed.
  task automatic stream(input int n, inout int captures);
    logic prev;
    prev = ms_q;
    for (int i = 0; i < n; i++) begin
      logic bitv;
      bitv = 1'($urandom_range(0, 1));
      ms_d = bitv; det_d = bitv;
      ms_e = 1'b1;
      #9;
      check(ms_q == prev,  "MS flip-flop holds until its sampling edge");
      check(det_q == prev, "DET flip-flop holds until its sampling edge");
      if (bitv != prev && ms_q == prev && det_q == prev) n_hold++;
      #1;
      ms_e = 1'b0;
      det_e = ~det_e;
      #1;
      check(ms_q == bitv,  "MS flip-flop holds the sampled bit");
      check(det_q == bitv, "DET flip-flop holds the sampled bit");
      if (ms_q == bitv && det_q == bitv) captures++;
      if (det_e)  n_det_rise++; else n_det_fall++;
      n_ms_capture++;
      prev = bitv;
      #9;
    end
  endtask

  // Load 0 into both cells and leave both enables low.
  task automatic preload();
    ms_d = 1'b0; det_d = 1'b0;
    ms_e = 1'b1; det_e = 1'b1;
    #5;
    ms_e = 1'b0; det_e = 1'b0;
    #5;
    check(ms_q == 1'b0 && det_q == 1'b0, "preload");
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int good = 0;
    set_modes(MODE_NORMAL);
    preload();

    // Phase 1
    stream(BITS, good);
    check(good == BITS, "every bit delivered by both cells");

    // Phase 2
    apply_vector(1'b0);
    check(ms_all(1'b0) && det_all(1'b0), "all-0s vector gives all 0s");
    if (ms_all(1'b0) && det_all(1'b0)) n_sa1_test++;
    apply_vector(1'b1);
    check(ms_all(1'b1) && det_all(1'b1), "all-1s vector gives all 1s");
    if (ms_all(1'b1) && det_all(1'b1)) n_sa0_test++;

    // Phase 3
    for (int f = 0; f < 4; f++) begin
      logic lvl;
      lvl = 1'(f % 2);
      if (f < 2) force dut.u_ms.u_slave.t1 = lvl;
      else       force dut.u_det.u_neg.latch_q = lvl;
      apply_vector(~lvl);
      check(!(ms_all(~lvl) && det_all(~lvl)), "injected stuck-at fault detected");
      if (!(ms_all(~lvl) && det_all(~lvl))) n_fault_detect++;
      release dut.u_ms.u_slave.t1;
      release dut.u_det.u_neg.latch_q;
      #5;
    end

    // Phase 4
    set_modes(MODE_NORMAL);
    preload();
    good = 0;
    stream(20, good);
    check(good == 20, "normal operation resumes after test mode");
    if (good == 20) n_resume++;

    $display("hold events=%0d", n_hold);
    $display("MS captures=%0d DET rising=%0d DET falling=%0d SA1 tests=%0d SA0 tests=%0d faults detected=%0d resumed=%0d",
             n_ms_capture, n_det_rise, n_det_fall, n_sa1_test, n_sa0_test, n_fault_detect, n_resume);
    check(n_ms_capture > 0,    "mechanism: MS falling-edge capture");
    check(n_hold > 0,          "mechanism: hold while D changes");
    check(n_det_rise > 0,      "mechanism: DET rising-edge capture");
    check(n_det_fall > 0,      "mechanism: DET falling-edge capture");
    check(n_sa1_test > 0,      "mechanism: stuck-at-1 test vector");
    check(n_sa0_test > 0,      "mechanism: stuck-at-0 test vector");
    check(n_fault_detect == 4, "mechanism: fault detection");
    check(n_resume > 0,        "mechanism: switch back to normal mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

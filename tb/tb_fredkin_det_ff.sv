// tb_fredkin_det_ff: self-checking test of the testable double-edge-
// triggered D flip-flop.
//
// 1. Normal mode (all control pairs 01): E runs as a 20 ns clock for 200
//    periods while D changes at random twice per half period, away from
//    the edges. A behavioural model (positive latch follows D while E = 1,
//    negative latch while E = 0, Q shows the latch that holds) gives Q and
//    the T outputs. Q must take the value of D at every edge of E, rising
//    and falling, and a monitor fails the test if Q changes anywhere but at
//    an edge: zero latency, two samples per clock period.
// 2. The two test vectors: all inputs 0 give all outputs 0, all inputs 1
//    give all outputs 1.
// 3. Stuck-at faults forced on eight internal nets must each be revealed by
//    the matching vector.
`timescale 1ns/1ps
module tb_fredkin_det_ff;
  import fredkin_pkg::*;

  localparam int PERIODS = 200;

  logic e, d, dc1, dc2, pc1, pc2, nc1, nc2;
  logic q, pt1, pt2, nt1, nt2, dg, pg, ng, ne, mux_p, mux_r;
  int   checks = 0, failures = 0;
  int   n_rise_capture = 0, n_fall_capture = 0, n_detect = 0;
  bit   normal_run = 1'b0;

  fredkin_det_ff dut (
    .e(e), .d(d), .dc1(dc1), .dc2(dc2), .pc1(pc1), .pc2(pc2), .nc1(nc1), .nc2(nc2),
    .q(q), .pt1(pt1), .pt2(pt2), .nt1(nt1), .nt2(nt2),
    .dg(dg), .pg(pg), .ng(ng), .ne(ne), .mux_p(mux_p), .mux_r(mux_r)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: e=%b d=%b ctl=%b%b%b%b%b%b -> q=%b pt=%b%b nt=%b%b dg=%b pg=%b ng=%b ne=%b mux=%b%b",
               what, $time, e, d, dc1, dc2, pc1, pc2, nc1, nc2,
               q, pt1, pt2, nt1, nt2, dg, pg, ng, ne, mux_p, mux_r);
    end
  endtask

  task automatic set_modes(input test_mode_e m);
    {dc1, dc2} = m;
    {pc1, pc2} = m;
    {nc1, nc2} = m;
  endtask

  function automatic bit all_outputs(input logic lvl);
    return {q, pt1, pt2, nt1, nt2, dg, pg, ng, ne, mux_p, mux_r} == {11{lvl}};
  endfunction

  task automatic apply_vector(input logic lvl);
    set_modes(lvl ? MODE_TEST_SA0 : MODE_TEST_SA1);
    e = lvl; d = lvl;
    #5;
  endtask

  // Q may change only at an edge of E (every 10 ns).
  always @(q) begin
    if (normal_run) begin
      checks++;
      if ($time % 10 != 0) begin
        failures++;
        $display("FAIL Q changed at %0t, not at an edge of E", $time);
      end
    end
  end

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model_p, model_n, model_q;
    set_modes(MODE_NORMAL);
    // load both latches with 0
    d = 1'b0; e = 1'b1; #10; e = 1'b0; #10;
    model_p = 1'b0; model_n = 1'b0; model_q = 1'b0;
    normal_run = 1'b1;

    // 1. normal mode, E as a clock
    for (int p = 0; p < PERIODS; p++) begin
      for (int h = 0; h < 2; h++) begin
        logic q_before;
        q_before = model_q;
        e = (h == 0);
        if (e) model_p = d; else model_n = d;
        model_q = e ? model_n : model_p;
        for (int k = 0; k < 2; k++) begin
          #1;
          if (k == 0) begin
            check(q == d, "normal: Q equals D at the edge");
            if (e && q != q_before)  n_rise_capture++;
            if (!e && q != q_before) n_fall_capture++;
          end
          check(q == model_q,    "normal: Q");
          check(pt1 == model_p,  "normal: pT1 = positive latch");
          check(pt2 == ~model_p, "normal: pT2 = ~positive latch");
          check(nt1 == model_n,  "normal: nT1 = negative latch");
          check(nt2 == ~model_n, "normal: nT2 = ~negative latch");
          check(dg == ~d,        "normal: copy gate garbage = ~D");
          check(mux_p == e && ne == e, "normal: enable passed through");
          #2;
          d = 1'($urandom_range(0, 1));
          if (e) model_p = d; else model_n = d;
          #2;
        end
      end
    end
    normal_run = 1'b0;
    check(n_rise_capture > 0, "normal: captures on rising edges");
    check(n_fall_capture > 0, "normal: captures on falling edges");

    // 2. the two test vectors
    apply_vector(1'b0);
    check(all_outputs(1'b0), "all-0s vector gives all 0s");
    apply_vector(1'b1);
    check(all_outputs(1'b1), "all-1s vector gives all 1s");

    // 3. injected stuck-at faults on internal nets
    for (int f = 0; f < 16; f++) begin
      logic lvl;
      lvl = 1'(f % 2);
      case (f / 2)
        0: force dut.d_pos = lvl;
        1: force dut.d_neg = lvl;
        2: force dut.e_mux = lvl;
        3: force dut.q_pos = lvl;
        4: force dut.q_neg = lvl;
        5: force dut.u_pos.latch_q = lvl;
        6: force dut.u_neg.latch_q = lvl;
        default: force dut.pt1 = lvl;
      endcase
      apply_vector(~lvl);
      check(!all_outputs(~lvl), "injected stuck-at fault detected");
      if (!all_outputs(~lvl)) n_detect++;
      release dut.d_pos;
      release dut.d_neg;
      release dut.e_mux;
      release dut.q_pos;
      release dut.q_neg;
      release dut.u_pos.latch_q;
      release dut.u_neg.latch_q;
      release dut.pt1;
      #5;
    end
    check(n_detect == 16, "all injected faults detected");

    $display("rising-edge captures=%0d falling-edge captures=%0d faults detected=%0d",
             n_rise_capture, n_fall_capture, n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

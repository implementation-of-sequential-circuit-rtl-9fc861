// tb_fredkin_ms_dff: self-checking test of the testable master-slave D
// flip-flop.
//
// 1. Normal mode (all control pairs 01): E runs as a 20 ns clock (high in
//    the first half of each period) for 200 periods while D changes at
//    random twice per half period, away from the edges. A behavioural model
//    (master follows D while E = 1, Q takes the master's bit when E falls)
//    gives Q, mT1 = master bit, mT2 = its inverse, sT1 = Q, sT2 = ~Q. A
//    monitor fails the test if Q ever changes other than at a falling edge
//    of E, which is the flip-flop's latency: zero after the falling edge.
// 2. The mixed setting of the published waveform (mC1 = mC2 = 1,
//    sC1 = sC2 = 0): mT1 = mT2 = 1 and sT1 = sT2 = 0 whatever E and D do.
// 3. The two test vectors: all inputs 0 give all outputs 0, all inputs 1
//    give all outputs 1.
// 4. Stuck-at faults forced on six internal nets must each be revealed by
//    the matching vector.
`timescale 1ns/1ps
module tb_fredkin_ms_dff;
  import fredkin_pkg::*;

  localparam int PERIODS = 200;

  logic e, d, mc1, mc2, sc1, sc2;
  logic q, mt1, mt2, st1, st2, e_out, mg, sg;
  int   checks = 0, failures = 0;
  int   n_capture = 0, n_hold = 0, n_detect = 0;
  bit   normal_run = 1'b0;

  fredkin_ms_dff dut (
    .e(e), .d(d), .mc1(mc1), .mc2(mc2), .sc1(sc1), .sc2(sc2),
    .q(q), .mt1(mt1), .mt2(mt2), .st1(st1), .st2(st2),
    .e_out(e_out), .mg(mg), .sg(sg)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: e=%b d=%b m=%b%b s=%b%b -> q=%b mt=%b%b st=%b%b e_out=%b mg=%b sg=%b",
               what, $time, e, d, mc1, mc2, sc1, sc2, q, mt1, mt2, st1, st2, e_out, mg, sg);
    end
  endtask

  task automatic set_modes(input test_mode_e m, input test_mode_e s);
    {mc1, mc2} = m;
    {sc1, sc2} = s;
  endtask

  function automatic bit all_outputs(input logic lvl);
    return {q, mt1, mt2, st1, st2, e_out, mg, sg} == {8{lvl}};
  endfunction

  task automatic apply_vector(input logic lvl);
    test_mode_e m;
    m = lvl ? MODE_TEST_SA0 : MODE_TEST_SA1;
    set_modes(m, m);
    e = lvl; d = lvl;
    #5;
  endtask

  // Q may change only at a falling edge of E (periods start at multiples
  // of 20 ns with E rising, so falling edges are at 10 ns mod 20 ns).
  always @(q) begin
    if (normal_run) begin
      checks++;
      if ($time % 20 != 10) begin
        failures++;
        $display("FAIL Q changed at %0t, not at a falling edge of E", $time);
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
    logic model_m, model_q;
    set_modes(MODE_NORMAL, MODE_NORMAL);
    // load a known value: E high then low with D = 0
    e = 1'b1; d = 1'b0; #10; e = 1'b0; #10;
    model_m = 1'b0; model_q = 1'b0;
    check(q == 1'b0, "initial load");
    normal_run = 1'b1;

    // 1. normal mode, E as a clock
    for (int p = 0; p < PERIODS; p++) begin
      for (int h = 0; h < 2; h++) begin
        logic q_before;
        q_before = model_q;
        e = (h == 0);
        if (e)  model_m = d;        // rising edge: master opens
        if (!e) model_q = model_m;  // falling edge: slave opens
        if (!e && model_q != q_before) n_capture++;
        for (int k = 0; k < 2; k++) begin
          #1;
          check(q == model_q,    "normal: Q");
          check(mt1 == model_m,  "normal: mT1 = master bit");
          check(mt2 == ~model_m, "normal: mT2 = ~master bit");
          check(st1 == model_q,  "normal: sT1 = Q");
          check(st2 == ~model_q, "normal: sT2 = ~Q");
          check(e_out == e,      "normal: enable passed through");
          #2;
          d = 1'($urandom_range(0, 1));
          if (e) model_m = d;
          if (d != model_q) n_hold++;
          #2;
        end
      end
    end
    #1;
    normal_run = 1'b0;
    check(n_capture > 0 && n_hold > 0, "normal: captures and holds exercised");

    // 2. control setting of the published waveform
    set_modes(MODE_TEST_SA0, MODE_TEST_SA1);
    for (int i = 0; i < 8; i++) begin
      {e, d} = 2'(i);
      #5;
      check(mt1 && mt2 && !st1 && !st2, "mixed test setting: mT=11, sT=00");
    end

    // 3. the two test vectors
    apply_vector(1'b0);
    check(all_outputs(1'b0), "all-0s vector gives all 0s");
    apply_vector(1'b1);
    check(all_outputs(1'b1), "all-1s vector gives all 1s");

    // 4. injected stuck-at faults on internal nets
    for (int f = 0; f < 12; f++) begin
      logic lvl;
      lvl = 1'(f % 2);
      case (f / 2)
        0: force dut.u_master.latch_q = lvl;
        1: force dut.mt1 = lvl;
        2: force dut.q_m = lvl;
        3: force dut.e_m2s = lvl;
        4: force dut.u_slave.latch_q = lvl;
        default: force dut.st1 = lvl;
      endcase
      apply_vector(~lvl);
      check(!all_outputs(~lvl), "injected stuck-at fault detected");
      if (!all_outputs(~lvl)) n_detect++;
      release dut.u_master.latch_q;
      release dut.mt1;
      release dut.q_m;
      release dut.e_m2s;
      release dut.u_slave.latch_q;
      release dut.st1;
      #5;
    end
    check(n_detect == 12, "all injected faults detected");

    $display("captures=%0d hold events=%0d faults detected=%0d", n_capture, n_hold, n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

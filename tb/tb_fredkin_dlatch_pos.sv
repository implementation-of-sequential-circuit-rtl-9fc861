// tb_fredkin_dlatch_pos: self-checking test of the testable positive-enable
// D latch.
//
// 1. Normal mode ({C1,C2} = 01): 400 random (E, D) steps against a
//    behavioural latch model (load D while E = 1, hold while E = 0). Checks
//    Q, the fan-out copies T1 = Q and T2 = ~Q, the enable pass-through, and
//    counts transparent steps and hold steps in which D differed from Q.
// 2. The two test vectors: {C1,C2} = 00 with E = D = 0 must give all
//    outputs 0; {C1,C2} = 11 with E = D = 1 must give all outputs 1, both
//    starting from either stored value.
// 3. Stuck-at faults injected with force on the two internal nets (the
//    stored bit and the feedback): each stuck-at-1 must be revealed by the
//    all-0s vector and each stuck-at-0 by the all-1s vector.
`timescale 1ns/1ps
module tb_fredkin_dlatch_pos;
  import fredkin_pkg::*;

  logic e, d, c1, c2;
  logic e_out, g, q, t1, t2;
  int   checks = 0, failures = 0;
  int   n_transparent = 0, n_hold = 0, n_detect = 0;

  fredkin_dlatch_pos dut (
    .e(e), .d(d), .c1(c1), .c2(c2),
    .e_out(e_out), .g(g), .q(q), .t1(t1), .t2(t2)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: e=%b d=%b c1=%b c2=%b -> e_out=%b g=%b q=%b t1=%b t2=%b",
               what, $time, e, d, c1, c2, e_out, g, q, t1, t2);
    end
  endtask

  task automatic set_mode(input test_mode_e m);
    {c1, c2} = m;
  endtask

  // Apply one test vector (all inputs equal to lvl) and report whether every
  // output equals lvl.
  function automatic bit all_outputs(input logic lvl);
    return {e_out, g, q, t1, t2} == {5{lvl}};
  endfunction

  task automatic apply_vector(input logic lvl);
    set_mode(lvl ? MODE_TEST_SA0 : MODE_TEST_SA1);
    e = lvl; d = lvl;
    #5;
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    set_mode(MODE_NORMAL);
    e = 1'b1; d = 1'b0; #5;
    model = 1'b0;

    // 1. normal mode
    for (int i = 0; i < 400; i++) begin
      e = 1'($urandom_range(0, 1));
      d = 1'($urandom_range(0, 1));
      #5;
      if (e) begin
        model = d;
        n_transparent++;
      end else if (d != model) begin
        n_hold++;
      end
      check(q == model,   "normal: Q");
      check(t1 == model,  "normal: T1 copy of Q");
      check(t2 == ~model, "normal: T2 = ~Q");
      check(e_out == e,   "normal: enable passed on");
      #5;
    end
    check(n_transparent > 0 && n_hold > 0, "normal: both latch phases exercised");

    // 2. two-vector test, from either stored value
    for (int s = 0; s < 2; s++) begin
      set_mode(MODE_NORMAL); e = 1'b1; d = 1'(s); #5; e = 1'b0; #5;
      apply_vector(1'b0);
      check(all_outputs(1'b0), "all-0s vector gives all 0s");
      apply_vector(1'b1);
      check(all_outputs(1'b1), "all-1s vector gives all 1s");
    end

    // 3. injected stuck-at faults
    for (int f = 0; f < 4; f++) begin
      logic lvl;
      lvl = 1'(f % 2);  // stuck value
      case (f / 2)
        0: if (lvl) force dut.latch_q = 1'b1; else force dut.latch_q = 1'b0;
        default: if (lvl) force dut.t1 = 1'b1; else force dut.t1 = 1'b0;
      endcase
      apply_vector(~lvl);  // stuck-at-1 needs the all-0s vector and vice versa
      check(!all_outputs(~lvl), "injected stuck-at fault detected");
      if (!all_outputs(~lvl)) n_detect++;
      release dut.latch_q;
      release dut.t1;
      #5;
    end
    check(n_detect == 4, "all injected faults detected");

    $display("transparent steps=%0d hold steps=%0d faults detected=%0d",
             n_transparent, n_hold, n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

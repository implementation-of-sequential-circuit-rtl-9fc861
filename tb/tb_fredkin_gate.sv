// tb_fredkin_gate: exhaustive self-checking test of fredkin_gate.
//
// Applies all eight input vectors. The expected outputs come from the
// behavioural reading of the gate (A = 0: B and C pass, A = 1: B and C are
// swapped), not from the output equations. Also checks that the gate is
// conservative (same number of 1s out as in) and reversible (the eight
// output vectors are all different).
`timescale 1ns/1ps
module tb_fredkin_gate;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b -> p=%b q=%b r=%b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin : watchdog
    #10us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_q, exp_r;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #10;
      if (a) begin exp_q = c; exp_r = b; end
      else   begin exp_q = b; exp_r = c; end
      check(p == a,     "P output");
      check(q == exp_q, "Q output");
      check(r == exp_r, "R output");
      check(int'(a) + int'(b) + int'(c) == int'(p) + int'(q) + int'(r), "conservative");
      check(!seen[{p, q, r}], "reversible (output vector unique)");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_fredkin_gate: exhaustive self-checking test of the Fredkin gate.
//
// All 8 input patterns are applied; with A = 0 the lines B and C must pass
// straight, with A = 1 they must be swapped, and the number of ones must be
// kept (a Fredkin gate is conservative). A second instance fed with the
// first one's outputs must give the inputs back. A watchdog ends the run
// after 1000 clock cycles.
module tb_fredkin_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic a, b, c, p, q, r, p2, q2, r2;

  fredkin_gate dut  (.a, .b, .c, .p, .q, .r);
  fredkin_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b -> %b%b%b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      check(p == a, "P output");
      if (a) check({q, r} == {c, b}, "swap when A=1");
      else   check({q, r} == {b, c}, "pass when A=0");
      check($countones({p, q, r}) == $countones({a, b, c}), "conservative");
      check({p2, q2, r2} == {a, b, c}, "self-inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_feynman_gate: exhaustive self-checking test of the Feynman gate.
//
// All 4 input patterns are applied; Q must be 1 exactly when A and B differ,
// P must pass A. A second instance fed with the first one's outputs must give
// the inputs back. A watchdog ends the run after 1000 clock cycles.
module tb_feynman_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic a, b, p, q, p2, q2;

  feynman_gate dut  (.a, .b, .p, .q);
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%b b=%b -> %b%b", what, a, b, p, q);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      check(p == a, "P output");
      check(q == (a != b), "Q output");
      check({p2, q2} == {a, b}, "self-inverse");
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

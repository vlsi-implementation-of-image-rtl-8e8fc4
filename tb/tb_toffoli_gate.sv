// tb_toffoli_gate: exhaustive self-checking test of the Toffoli gate.
//
// All 8 input patterns are applied; R must be C inverted exactly when both
// A and B are 1, P and Q must pass A and B. A second instance fed with the
// first one's outputs must give the inputs back (reversibility). A watchdog
// ends the run after 1000 clock cycles.
module tb_toffoli_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic a, b, c, p, q, r, p2, q2, r2;

  toffoli_gate dut  (.a, .b, .c, .p, .q, .r);
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

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
      check({p, q} == {a, b}, "pass-through");
      check(r == ((v == 6 || v == 7) ? ~c : c), "R output");
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

// tb_scl_gate: exhaustive self-checking test of the SCL gate.
//
// All 16 input patterns are applied. Each output is compared with the gate's
// truth written as a case split (S flips D exactly when A is 1 and B or C is
// 1), and a second instance fed with the first one's outputs must give the
// inputs back, which shows that the gate is reversible and its own inverse.
// A watchdog ends the run after 1000 clock cycles.
module tb_scl_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s, p2, q2, r2, s2;

  scl_gate dut  (.a, .b, .c, .d, .p, .q, .r, .s);
  scl_gate dut2 (.a(p), .b(q), .c(r), .d(s), .p(p2), .q(q2), .r(r2), .s(s2));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b d=%b -> %b%b%b%b", what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin
    logic exp_s;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      @(posedge clk);
      if (a == 1'b1 && (b == 1'b1 || c == 1'b1)) exp_s = ~d;
      else                                      exp_s = d;
      check({p, q, r} == {a, b, c}, "pass-through");
      check(s == exp_s, "S output");
      check({p2, q2, r2, s2} == {a, b, c, d}, "self-inverse");
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

// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate,
// purely combinational.
//
// P = A, Q = B, R = AB xor C: the third line is inverted when both controls
// are 1. The gate is its own inverse. Equations as in the source design;
// no clock, zero latency.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end
endmodule

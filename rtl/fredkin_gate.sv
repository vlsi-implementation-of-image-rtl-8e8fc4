// fredkin_gate: 3x3 reversible Fredkin (controlled swap) gate, purely
// combinational.
//
// P = A, Q = A'B xor AC, R = A'C xor AB: with A = 0 the lines B and C pass
// straight, with A = 1 they swap. The gate is its own inverse. Equations as
// in the source design; no clock, zero latency.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end
endmodule

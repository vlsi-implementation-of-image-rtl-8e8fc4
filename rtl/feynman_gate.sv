// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate, purely
// combinational.
//
// P = A, Q = A xor B. The gate is its own inverse. In the cipher it is the
// only gate that mixes the upper and lower halves of a pixel. Equations as in
// the source design; no clock, zero latency.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule

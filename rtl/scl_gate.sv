// scl_gate: 4x4 reversible SCL gate, purely combinational.
//
// P = A, Q = B, R = C pass through; S = A(B + C) xor D. Because A, B and C
// are passed on unchanged, applying the gate twice restores D, so the gate is
// its own inverse. The equations are the source design's; the one-bit port
// style is this implementation's choice. No clock, zero latency.
module scl_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = b;
    r = c;
    s = (a & (b | c)) ^ d;
  end
endmodule

// Toffoli gate (TG): the 3x3 reversible controlled-controlled-NOT gate.
//
// A and B pass through (P = A, Q = B) and the target is flipped when both
// controls are 1 (R = A&B ^ C).  With C tied to 0 the gate is a reversible
// AND, which is its use in the 2x2 Vedic multiplier.  Quantum cost 5.
//
// Interface: a, b, c in; p, q, r out.  Purely combinational.
// The gate equations follow the published gate symbol.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule

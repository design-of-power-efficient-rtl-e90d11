// Peres gate (PG): a 3x3 reversible gate equal to a Toffoli followed by a
// Feynman gate.
//
// P = A, Q = A ^ B, R = A&B ^ C.  With C tied to 0 one gate is a reversible
// half adder: Q is the sum and R the carry.  The 2x2 Vedic multiplier uses
// it that way, and the 8x8 multiplier uses one to merge the two carries of
// its first two adders.  Quantum cost 4.
//
// Interface: a, b, c in; p, q, r out.  Purely combinational.
// The gate equations follow the published gate symbol.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule

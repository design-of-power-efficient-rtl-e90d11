// HNG gate: a 4x4 reversible gate that works as a one-bit full adder.
//
// P = A, Q = B, R = A ^ B ^ C, S = ((A ^ B) & C) ^ (A & B) ^ D.
// With D tied to 0, A and B the operand bits and C the incoming carry, R is
// the sum bit and S the carry out; P and Q are garbage outputs that only
// keep the gate reversible.  Quantum cost 6.
//
// Interface: a, b, c, d in; p, q, r, s out.  Purely combinational.
// The gate equations and the full-adder use follow the published gate
// symbol and description.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;

  assign axb = a ^ b;
  assign p   = a;
  assign q   = b;
  assign r   = axb ^ c;
  assign s   = (axb & c) ^ (a & b) ^ d;
endmodule

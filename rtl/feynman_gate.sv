// Feynman gate (FG): the 2x2 reversible controlled-NOT gate.
//
// The control input passes straight through (P = A) and the target is
// XORed with it (Q = A ^ B).  With B tied to 0 it copies A, which is how the
// multipliers in this design fan a signal out without breaking the
// no-fan-out rule of reversible logic.  Quantum cost 1.
//
// Interface: a, b in; p, q out.  Purely combinational, no clock.
// The gate equations follow the published gate symbol; nothing here is a
// design choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule

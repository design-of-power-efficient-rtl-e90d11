// 2x2 Vedic multiplier in reversible logic.
//
// Urdhva Tiryagbhyam ("vertically and crosswise") on two 2-bit numbers:
//   q[0] = a0 b0                      (vertical, right column)
//   q[1] = a1 b0 ^ a0 b1              (crosswise)
//   q[2] = a1 b1 ^ carry of q[1]      (vertical, left column)
//   q[3] = carry of q[2]
// Four Feynman gates with a constant-0 target copy each operand bit, so
// that no signal drives more than one gate input.  Four Toffoli gates with
// a constant-0 target form the four bit products.  Two Peres gates with a
// constant-0 third input act as half adders: the first adds the two cross
// products, the second adds the vertical product a1 b1 to that carry.
// Gate count: 4 FG + 4 TG + 2 PG, quantum cost 4 + 20 + 8 = 32.
//
// Interface: a, b (2 bits) in; q (4 bits) out, q = a * b.  Combinational.
//
// That the multiplier uses Feynman, Peres and Toffoli gates is the
// published design; which gate does which product, and the use of
// Feynman gates as copiers, are this design's own choices.
module vedic2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  // Copies of the operand bits (the p output of each FG is the original).
  logic a0, a1, b0, b1;
  logic a0_copy, a1_copy, b0_copy, b1_copy;

  feynman_gate u_fg_a0 (.a(a[0]), .b(1'b0), .p(a0), .q(a0_copy));
  feynman_gate u_fg_a1 (.a(a[1]), .b(1'b0), .p(a1), .q(a1_copy));
  feynman_gate u_fg_b0 (.a(b[0]), .b(1'b0), .p(b0), .q(b0_copy));
  feynman_gate u_fg_b1 (.a(b[1]), .b(1'b0), .p(b1), .q(b1_copy));

  // Bit products; p and q outputs of every Toffoli gate are garbage.
  logic [3:0] tg_gp, tg_gq;
  logic       a1b0, a0b1, a1b1;

  toffoli_gate u_tg_00 (.a(a0),      .b(b0),      .c(1'b0),
                        .p(tg_gp[0]), .q(tg_gq[0]), .r(q[0]));
  toffoli_gate u_tg_10 (.a(a1),      .b(b0_copy), .c(1'b0),
                        .p(tg_gp[1]), .q(tg_gq[1]), .r(a1b0));
  toffoli_gate u_tg_01 (.a(a0_copy), .b(b1),      .c(1'b0),
                        .p(tg_gp[2]), .q(tg_gq[2]), .r(a0b1));
  toffoli_gate u_tg_11 (.a(a1_copy), .b(b1_copy), .c(1'b0),
                        .p(tg_gp[3]), .q(tg_gq[3]), .r(a1b1));

  // Half adders.
  logic [1:0] pg_gp;
  logic       cross_carry;

  peres_gate u_pg_cross (.a(a1b0), .b(a0b1),        .c(1'b0),
                         .p(pg_gp[0]), .q(q[1]), .r(cross_carry));
  peres_gate u_pg_left  (.a(a1b1), .b(cross_carry), .c(1'b0),
                         .p(pg_gp[1]), .q(q[2]), .r(q[3]));
endmodule

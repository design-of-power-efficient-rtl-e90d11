// 8x8 reversible Vedic multiplier (Urdhva Tiryagbhyam), the top of the
// design.
//
// Each operand is split into 4-bit halves, a = {aH, aL}, b = {bH, bL}, and
//   a*b = (aH bH) << 8  +  (aH bL + aL bH) << 4  +  aL bL.
// Four 4x4 Vedic multipliers produce the four 8-bit partial products in
// parallel, and three 8-bit HNG ripple-carry adders combine them:
//   adder 1: aL bH + aH bL                  -> sum1, carry ca1
//   adder 2: sum1 + {0000, (aL bL)[7:4]}    -> sum2, carry ca2
//            p[3:0] = (aL bL)[3:0], p[7:4] = sum2[3:0]
//   adder 3: aH bH + {ca1+ca2, sum2[7:4]}   -> p[15:8]
// ca1 and ca2 both weigh 2^12.  A Peres gate adds them (its Q output is the
// XOR, its R output the AND) before they enter adder 3.  The two carries are
// never 1 at the same time, so the AND is always 0; it is still wired in so
// the tree is exact by construction.  The carry out of adder 3 is always 0
// (255 * 255 fits in 16 bits) and is left unused.
//
// Interface: a, b (8 bits) in; p (16 bits) out, p = a * b (unsigned).
// Purely combinational: the result is valid one propagation delay after
// the operands change.  The longest path runs through a 4x4 multiplier and
// all three 8-bit ripple-carry adders.
//
// Following the published design: four 4x4 multipliers, three 8-bit HNG
// ripple-carry adders, the operand pairing, and an XOR and an AND that
// combine the adder carries next to the adders.  This design's own
// choices: realising that XOR/AND pair as one Peres gate, and leaving out
// the clock input that the published schematics route to every adder, as
// no registered behaviour is described for it.
module vedic8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] m_ll, m_lh, m_hl, m_hh;   // m_xy = a-half x times b-half y

  vedic4x4 u_m_ll (.a(a[3:0]), .b(b[3:0]), .q(m_ll));
  vedic4x4 u_m_lh (.a(a[3:0]), .b(b[7:4]), .q(m_lh));
  vedic4x4 u_m_hl (.a(a[7:4]), .b(b[3:0]), .q(m_hl));
  vedic4x4 u_m_hh (.a(a[7:4]), .b(b[7:4]), .q(m_hh));

  logic [7:0] sum1, sum2;
  logic       ca1, ca2, ca3;
  logic       carry_x, carry_and, merge_gp;

  hng_rca #(.WIDTH(8)) u_add1 (
    .a(m_lh), .b(m_hl), .cin(1'b0), .sum(sum1), .cout(ca1)
  );

  hng_rca #(.WIDTH(8)) u_add2 (
    .a(sum1), .b({4'b0000, m_ll[7:4]}), .cin(1'b0), .sum(sum2), .cout(ca2)
  );

  peres_gate u_merge (
    .a(ca1), .b(ca2), .c(1'b0), .p(merge_gp), .q(carry_x), .r(carry_and)
  );

  hng_rca #(.WIDTH(8)) u_add3 (
    .a(m_hh), .b({2'b00, carry_and, carry_x, sum2[7:4]}), .cin(1'b0),
    .sum(p[15:8]), .cout(ca3)
  );

  assign p[3:0] = m_ll[3:0];
  assign p[7:4] = sum2[3:0];
endmodule

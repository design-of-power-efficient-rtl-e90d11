// 4x4 Vedic multiplier built from four 2x2 Vedic multipliers.
//
// Splitting a = {aH, aL} and b = {bH, bL} into 2-bit halves, the product is
//   a*b = (aH bH) << 4  +  (aH bL + aL bH) << 2  +  aL bL.
// The four 2x2 multipliers form the four partial products at once (the
// "vertical and crosswise" step).  Three 4-bit HNG ripple-carry adders then
// combine them:
//   adder 1: aL bH + aH bL                  -> sum1, carry ca1
//   adder 2: sum1 + {00, (aL bL)[3:2]}      -> sum2, carry ca2
//            q[1:0] = (aL bL)[1:0], q[3:2] = sum2[1:0]
//   adder 3: aH bH + {ca1+ca2, sum2[3:2]}   -> q[7:4]
// ca1 and ca2 both weigh 2^6.  A Peres gate adds them (XOR as sum, AND as
// carry) before they enter adder 3; the two are never 1 together, so the
// AND output is 0 for every operand pair, but it is wired in so the adder
// tree is exact by construction.  The carry out of adder 3 is always 0 (the
// largest product, 225, fits in 8 bits) and is left unused.
//
// Interface: a, b (4 bits) in; q (8 bits) out, q = a * b.  Combinational.
//
// The four 2x2 multipliers, three adders and their operand pairing follow
// the published block diagram.  That diagram labels the adders carry
// look-ahead while the text builds every adder of the design as an HNG
// ripple-carry adder; this design follows the text.  The Peres gate that
// merges ca1 and ca2 is this design's own choice.
module vedic4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);
  logic [3:0] m_ll, m_lh, m_hl, m_hh;   // m_xy = a-half x times b-half y

  vedic2x2 u_m_ll (.a(a[1:0]), .b(b[1:0]), .q(m_ll));
  vedic2x2 u_m_lh (.a(a[1:0]), .b(b[3:2]), .q(m_lh));
  vedic2x2 u_m_hl (.a(a[3:2]), .b(b[1:0]), .q(m_hl));
  vedic2x2 u_m_hh (.a(a[3:2]), .b(b[3:2]), .q(m_hh));

  logic [3:0] sum1, sum2;
  logic       ca1, ca2, ca3;
  logic       carry_x, carry_and, merge_gp;

  hng_rca #(.WIDTH(4)) u_add1 (
    .a(m_lh), .b(m_hl), .cin(1'b0), .sum(sum1), .cout(ca1)
  );

  hng_rca #(.WIDTH(4)) u_add2 (
    .a(sum1), .b({2'b00, m_ll[3:2]}), .cin(1'b0), .sum(sum2), .cout(ca2)
  );

  peres_gate u_merge (
    .a(ca1), .b(ca2), .c(1'b0), .p(merge_gp), .q(carry_x), .r(carry_and)
  );

  hng_rca #(.WIDTH(4)) u_add3 (
    .a(m_hh), .b({carry_and, carry_x, sum2[3:2]}), .cin(1'b0),
    .sum(q[7:4]), .cout(ca3)
  );

  assign q[1:0] = m_ll[1:0];
  assign q[3:2] = sum2[1:0];
endmodule

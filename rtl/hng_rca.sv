// Reversible ripple-carry adder built from a chain of HNG gates.
//
// Bit i of the sum comes from HNG gate i, whose inputs are A = a[i],
// B = b[i], C = the carry from gate i-1 (cin for gate 0) and D = 0.  Its
// R output is sum[i] and its S output is the carry into gate i+1; the
// last S is cout.  Each gate leaves two garbage outputs (P and Q), so an
// 8-bit adder has 16 garbage outputs and a quantum cost of 8 x 6 = 48.
//
// Interface: a, b (WIDTH bits) and cin in; sum (WIDTH bits) and cout out.
// Purely combinational; the carry ripples through WIDTH gates.
//
// The gate chain, the constant-0 D inputs and the 8-bit default follow the
// published adder.  WIDTH is a parameter so the same module also serves as
// the 4-bit adder inside the 4x4 multiplier.
module hng_rca #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] garbage_p;
  logic [WIDTH-1:0] garbage_q;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    hng_gate u_hng (
      .a (a[i]),
      .b (b[i]),
      .c (carry[i]),
      .d (1'b0),
      .p (garbage_p[i]),
      .q (garbage_q[i]),
      .r (sum[i]),
      .s (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule

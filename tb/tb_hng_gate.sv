// Self-checking testbench for hng_gate.  All sixteen input combinations are
// applied.  P and Q must repeat A and B.  With D = 0 the gate must be a full
// adder: {S, R} equals the count of ones among A, B and C.  With D = 1 the
// S output must be the inverted carry.  The sixteen outputs must all be
// different (the gate is reversible).
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  int   ones;
  bit   seen [16];

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== ones[0] || s !== (ones[1] ^ d)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b -> pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeated, gate not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for toffoli_gate: applies all eight input
// combinations and compares the outputs with the gate's truth table
// (P = A, Q = B, R = C inverted when A and B are both 1).  It also checks that the gate is reversible: the eight outputs
// seen are all different.
module tb_toffoli_gate;
  logic a, b, c, p, q, r;
  logic exp_q, exp_r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      exp_q = b;
      exp_r = (a && b) ? !c : c;
      checks++;
      if (p !== a || q !== exp_q || r !== exp_r) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated, gate not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

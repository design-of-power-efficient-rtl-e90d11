// Self-checking testbench for vedic4x4: all 256 operand pairs, each product
// compared with integer multiplication.  It also watches the carries of the
// first two adders: each must occur at least once, and they must never be 1
// together, so the AND output of the carry-merging Peres gate stays 0.
module tb_vedic4x4;
  logic [3:0] a, b;
  logic [7:0] q;
  int         checks = 0, failures = 0;
  int         n_ca1 = 0, n_ca2 = 0;

  vedic4x4 dut (.a(a), .b(b), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x); b = 4'(y);
        #1;
        checks++;
        if (q !== 8'(x * y)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", x, y, q);
        end
        if (dut.ca1) n_ca1++;
        if (dut.ca2) n_ca2++;
        checks++;
        if (dut.ca1 && dut.ca2) begin
          failures++;
          $display("FAIL ca1 and ca2 both set for %0d * %0d", x, y);
        end
      end
    $display("adder-1 carry %0d times, adder-2 carry %0d times", n_ca1, n_ca2);
    checks += 2;
    if (n_ca1 == 0) begin failures++; $display("FAIL adder-1 carry never occurred"); end
    if (n_ca2 == 0) begin failures++; $display("FAIL adder-2 carry never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

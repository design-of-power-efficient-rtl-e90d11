// End-to-end self-checking testbench for the 8x8 Vedic multiplier at its
// default (and only) size.  It first applies the operand pair of the
// published multiplier waveform (16 * 3 = 48), then all 65,536 operand
// pairs, comparing each 16-bit product with integer multiplication.
//
// It counts the events the design is built around and fails if one never
// happens: the carry out of adder 1 (ca1), the carry out of adder 2 (ca2),
// and a carry merged into adder 3 through the Peres gate.  It also checks
// that ca1 and ca2 are never 1 together, so the merging gate's AND output
// stays 0, and that the product's top bit is used (so the full 16-bit
// width is exercised).
module tb_vedic8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int          checks = 0, failures = 0;
  int          n_ca1 = 0, n_ca2 = 0, n_merge = 0, n_top = 0;

  vedic8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int x, input int y);
    a = 8'(x); b = 8'(y);
    #1;
    checks++;
    if (p !== 16'(x * y)) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d", x, y, p);
    end
    checks++;
    if (dut.ca1 && dut.ca2) begin
      failures++;
      $display("FAIL ca1 and ca2 both set for %0d * %0d", x, y);
    end
    if (dut.ca1)       n_ca1++;
    if (dut.ca2)       n_ca2++;
    if (dut.carry_x)   n_merge++;
    if (p[15])         n_top++;
  endtask

  initial begin
    check(16, 3);
    checks++;
    if (p !== 16'b0000_0000_0011_0000) begin
      failures++;
      $display("FAIL published vector 00010000 * 00000011 gave %b", p);
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        check(x, y);
    $display("ca1 %0d, ca2 %0d, merged carry %0d, top product bit %0d",
             n_ca1, n_ca2, n_merge, n_top);
    checks += 4;
    if (n_ca1 == 0)   begin failures++; $display("FAIL ca1 never occurred"); end
    if (n_ca2 == 0)   begin failures++; $display("FAIL ca2 never occurred"); end
    if (n_merge == 0) begin failures++; $display("FAIL no carry was merged"); end
    if (n_top == 0)   begin failures++; $display("FAIL p[15] never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

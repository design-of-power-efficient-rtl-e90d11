// Self-checking testbench for hng_rca.  It instantiates the 8-bit adder
// (the default) and a 4-bit one, as used inside the 4x4 multiplier, and
// applies every operand pair with both carry-in values, comparing
// {cout, sum} with integer addition.  The first vector is the one of the
// published adder waveform: 16 + 65 = 81.  It counts how many sums carried
// out, so a run that never exercised the carry out is a failure.
module tb_hng_rca;
  logic [7:0] a8, b8, s8;
  logic       ci8, co8;
  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  int         checks = 0, failures = 0;
  int         carries_out = 0;

  hng_rca              dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  hng_rca #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input int x, input int y, input int ci);
    a8 = 8'(x); b8 = 8'(y); ci8 = ci[0];
    #1;
    checks++;
    if ({co8, s8} !== 9'(x + y + ci)) begin
      failures++;
      $display("FAIL 8-bit %0d + %0d + %0d -> %0d", x, y, ci, {co8, s8});
    end
    if (co8) carries_out++;
  endtask

  initial begin
    a4 = '0; b4 = '0; ci4 = 1'b0;
    check8(16, 65, 0);
    if (s8 !== 8'b0101_0001) begin
      failures++;
      $display("FAIL published vector 00010000 + 01000001 gave %b", s8);
    end
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++)
          check8(x, y, ci);
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          a4 = 4'(x); b4 = 4'(y); ci4 = ci[0];
          #1;
          checks++;
          if ({co4, s4} !== 5'(x + y + ci)) begin
            failures++;
            $display("FAIL 4-bit %0d + %0d + %0d -> %0d", x, y, ci, {co4, s4});
          end
        end
    checks++;
    if (carries_out == 0) begin
      failures++;
      $display("FAIL carry out never occurred");
    end
    $display("carry out occurred %0d times", carries_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

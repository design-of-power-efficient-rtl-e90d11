// Self-checking testbench for vedic2x2: all sixteen operand pairs, each
// product compared with integer multiplication.
module tb_vedic2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int         checks = 0, failures = 0;

  vedic2x2 dut (.a(a), .b(b), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        a = 2'(x); b = 2'(y);
        #1;
        checks++;
        if (q !== 4'(x * y)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", x, y, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

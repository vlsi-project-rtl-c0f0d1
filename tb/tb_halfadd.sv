// tb_halfadd: exhaustive test of the half adder (all four input pairs,
// checked against the arithmetic sum a + b = {c, s}).
`timescale 1ns / 1ns
module tb_halfadd;

  logic a, b, s, c;
  int checks = 0, failures = 0;

  halfadd dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({c, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("a=%0d b=%0d got c=%0d s=%0d", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

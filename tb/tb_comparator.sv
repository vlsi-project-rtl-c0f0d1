// tb_comparator: 13-bit equality comparator against the tick rollover
// constant 4999: all 8192 values, so exactly one must report equal, plus
// 2000 random pairs of which about half are equal.
`timescale 1ns / 1ns
module tb_comparator;

  logic [12:0] v1, v2;
  logic        eq;
  int checks = 0, failures = 0, hits = 0;

  comparator #(.WIDTH(13)) dut (.val1(v1), .val2(v2), .equals(eq));

  initial begin
    v2 = 13'd4999;
    for (int v = 0; v < 8192; v++) begin
      v1 = 13'(v);
      #1;
      checks++;
      if (eq) hits++;
      if (eq != (v == 4999)) begin
        failures++;
        if (failures < 10) $display("v=%0d eq=%0d", v, eq);
      end
    end
    checks++;
    if (hits != 1) failures++;
    for (int n = 0; n < 2000; n++) begin
      v1 = 13'($urandom);
      v2 = $urandom_range(1) ? v1 : 13'($urandom);
      #1;
      checks++;
      if (eq != (int'(v1) == int'(v2))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

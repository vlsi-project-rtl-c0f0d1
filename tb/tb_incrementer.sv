// tb_incrementer: exhaustive test of the 8-bit half-adder incrementer:
// every value with increment 0 and 1, compared with (valin + inc) mod 256.
`timescale 1ns / 1ns
module tb_incrementer;

  logic [7:0] valin, valout;
  logic       inc;
  int checks = 0, failures = 0;

  incrementer #(.WIDTH(8)) dut (.valin(valin), .increment(inc), .valout(valout));

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < 2; i++) begin
        valin = 8'(v); inc = 1'(i);
        #1;
        checks++;
        if (valout != 8'((v + i) % 256)) begin
          failures++;
          if (failures < 10) $display("%0d + %0d gave %0d", v, i, valout);
        end
      end
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

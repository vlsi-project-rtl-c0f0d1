// tb_latch: checks that the latch follows d while ph is high and holds
// the value present when ph fell while ph is low, over 500 random steps.
`timescale 1ns / 1ns
module tb_latch;

  logic       ph;
  logic [7:0] d, q, held;
  int checks = 0, failures = 0;

  latch #(.WIDTH(8)) dut (.ph(ph), .d(d), .q(q));

  initial begin
    ph = 1'b1; d = 8'h00;
    #1;
    held = d;
    for (int n = 0; n < 500; n++) begin
      if ($urandom_range(3) == 0) ph = ~ph;
      d = 8'($urandom);
      #1;
      if (ph) held = d;
      checks++;
      if (q != held) begin
        failures++;
        if (failures < 10) $display("step %0d ph=%0d d=%h q=%h expected %h", n, ph, d, q, held);
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

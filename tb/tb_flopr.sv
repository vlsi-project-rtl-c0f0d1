// tb_flopr: two-phase flop with synchronous reset. Random d and reset
// (reset about 1 cycle in 4) for 1000 cycles; after each ph1 the output
// must be 0 if reset was high during the preceding ph2, else that d.
`timescale 1ns / 1ns
module tb_flopr;

  logic ph1, ph2, reset;
  logic [7:0] d, q, expected;
  int checks = 0, failures = 0, resets_seen = 0;

  two_phase_clock clk (.ph1(ph1), .ph2(ph2));
  flopr #(.WIDTH(8)) dut (.ph1(ph1), .ph2(ph2), .reset(reset), .d(d), .q(q));

  initial begin
    reset = 1'b1; d = 8'hff; expected = '0;
    @(posedge ph2);
    @(negedge ph1);
    for (int n = 0; n < 1000; n++) begin
      reset = ($urandom_range(3) == 0);
      d = 8'($urandom | 1);          // never zero, so a reset is visible
      expected = reset ? '0 : d;
      if (reset) resets_seen++;
      @(negedge ph1);
      checks++;
      if (q != expected) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%h expected %h", n, q, expected);
      end
    end
    checks++;
    if (resets_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1100 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

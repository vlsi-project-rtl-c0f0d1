// tb_flop: two-phase master/slave flop. d changes twice per cycle: once
// between ph1 and ph2 (the value to capture) and once while ph2 is low
// after it (which must not reach q until the following cycle). q is
// checked during ph1 and during ph2 of each of 1000 cycles: it must equal
// the value present at the end of the previous ph2, and must not move
// during ph2.
`timescale 1ns / 1ns
module tb_flop;

  logic ph1, ph2;
  logic [7:0] d, q, expected;
  int checks = 0, failures = 0;

  two_phase_clock clk (.ph1(ph1), .ph2(ph2));
  flop #(.WIDTH(8)) dut (.ph1(ph1), .ph2(ph2), .d(d), .q(q));

  task automatic check(input string where);
    checks++;
    if (q != expected) begin
      failures++;
      if (failures < 10) $display("%s: q=%h expected %h", where, q, expected);
    end
  endtask

  initial begin
    d = 8'h5a;
    @(posedge ph2);
    @(negedge ph2);
    expected = 8'h5a;
    for (int n = 0; n < 1000; n++) begin
      @(posedge ph1); #10;
      check("ph1");
      @(negedge ph1);
      d = 8'($urandom);
      @(posedge ph2); #10;
      check("ph2");                  // master open, slave closed: q holds
      @(negedge ph2);
      expected = d;
      #10 d = 8'($urandom);          // change after ph2 closed: must be ignored
    end
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

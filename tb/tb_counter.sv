// tb_counter: self-checking test of the two-phase up counter.
//
// Drives random enable/reset patterns (reset about 1 in 16 cycles) for
// 2000 cycles at WIDTH = 4, so the count wraps often, and compares the
// count after every ph1 with a reference model (next = reset ? 0 :
// count + enable mod 16). Inputs change after ph1 falls and are sampled
// while ph2 is high; outputs are checked after ph1 falls.
`timescale 1ns / 1ns
module tb_counter;

  localparam int unsigned W = 4;

  logic ph1, ph2, reset, enable;
  logic [W-1:0] count, model;
  int checks = 0, failures = 0;

  two_phase_clock clk (.ph1(ph1), .ph2(ph2));
  counter #(.WIDTH(W)) dut (.ph1(ph1), .ph2(ph2), .reset(reset), .enable(enable), .count(count));

  initial begin
    reset = 1'b1; enable = 1'b0; model = '0;
    @(posedge ph2);
    @(negedge ph1);               // first cycle loads zero
    @(negedge ph1);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      if (count !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count=%0d expected %0d", cyc, count, model);
      end
      checks++;
      reset  = ($urandom_range(15) == 0);
      enable = ($urandom_range(3) != 0);
      model  = reset ? '0 : W'(model + W'(enable));
      @(negedge ph1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2000 * 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

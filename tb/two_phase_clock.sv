// two_phase_clock: testbench source of a non-overlapping two-phase clock.
//
// One period is: both phases low for GAP, ph1 high for HIGH, both low for
// GAP, ph2 high for HIGH. The defaults (200 ns gaps, 800 ns high times,
// 2000 ns period) give the 500 kHz clock the stopwatch expects when the
// time unit is 1 ns. Both phases start low. Simulation only.
`timescale 1ns / 1ns
module two_phase_clock #(
  parameter int unsigned GAP  = 200,
  parameter int unsigned HIGH = 800
) (
  output logic ph1,
  output logic ph2
);

  initial begin
    ph1 = 1'b0;
    ph2 = 1'b0;
    forever begin
      #(GAP)  ph1 = 1'b1;
      #(HIGH) ph1 = 1'b0;
      #(GAP)  ph2 = 1'b1;
      #(HIGH) ph2 = 1'b0;
    end
  end

endmodule

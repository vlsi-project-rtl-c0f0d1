// tb_timerchip_50khz: the slow-clock bench test. The chip, at its default
// 5000 ticks per hundredth, is clocked at 50 kHz instead of 500 kHz, so
// it runs ten times slow and its tenths digit should step once per real
// second. After reset and a start press the display is read at 0.55 s,
// 1.55 s, ... 9.55 s of simulated time: the tenths digit must equal the
// whole seconds elapsed, hundredths must read 5 and the upper digits 0.
`timescale 1ns / 1ns
module tb_timerchip_50khz;
  import tb_seg_pkg::*;

  localparam longint PERIOD_NS = 20_000;          // 50 kHz

  logic ph1, ph2, reset, startstop;
  logic [6:0] h, t, s, tn;
  int checks = 0, failures = 0;

  two_phase_clock #(.GAP(2000), .HIGH(8000)) clk (.ph1(ph1), .ph2(ph2));
  timerchip dut (.ph1(ph1), .ph2(ph2), .reset(reset), .startstop(startstop),
                 .hundredths(h), .tenths(t), .secs(s), .tens(tn));

  initial begin
    reset = 1'b1; startstop = 1'b0;
    @(posedge ph2);
    @(negedge ph1);
    repeat (2) @(negedge ph1);
    reset = 1'b0;
    @(negedge ph1);
    startstop = 1'b1;
    @(negedge ph1);
    startstop = 1'b0;
    #(550_000_000 - PERIOD_NS);                   // 0.55 s after the press
    for (int sec = 0; sec < 10; sec++) begin
      checks++;
      if (t != ~lit(sec) || h != ~lit(5) || s != ~lit(0) || tn != ~lit(0)) begin
        failures++;
        $display("at %0d.55 s real time the tenths digit is wrong", sec);
      end
      #(1_000_000_000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd12 * 1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

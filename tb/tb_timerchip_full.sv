// tb_timerchip_full: the stopwatch at its real size -- 5000 ticks per
// hundredth of a 500 kHz two-phase clock -- taken through a complete
// session in simulated real time (about 115 s of chip time):
//   reset, start, check at 5.43 s and later while counting;
//   pause with a long (0.5 s) press, check the time is frozen;
//   resume with a 1 s press, check counting continues;
//   hold startstop and assert reset: reset wins, display 00.00, and
//   toggling startstop under reset changes nothing;
//   release, start again, check 00.90 after 0.9 s;
//   keep running past 99.99 s and check the wrap to 00.00.
// The expected time is the number of clock cycles in which the chip was
// running (mode high when sampled) divided by 5000, where mode follows the
// button one cycle after the press is sampled.
`timescale 1ns / 1ns
module tb_timerchip_full;
  import tb_seg_pkg::*;

  localparam longint CYC_PER_S = 500_000;

  logic ph1, ph2, reset, startstop;
  logic [6:0] h, t, s, tn;
  logic   m_mode = 1'b0, m_held = 1'b0;
  longint running = 0;               // cycles counted since the last reset
  int checks = 0, failures = 0;

  two_phase_clock clk (.ph1(ph1), .ph2(ph2));
  timerchip dut (.ph1(ph1), .ph2(ph2), .reset(reset), .startstop(startstop),
                 .hundredths(h), .tenths(t), .secs(s), .tens(tn));

  // Advance n clock cycles with the inputs as they are.
  task automatic run(input longint n);
    for (longint i = 0; i < n; i++) begin
      if (reset) begin
        m_mode = 1'b0; m_held = 1'b0; running = 0;
      end else begin
        if (m_mode) running++;
        if (startstop && !m_held) m_mode = ~m_mode;
        m_held = startstop;
      end
      @(negedge ph1);
    end
  endtask

  task automatic expect_time(input int hund, input string what);
    checks++;
    if (h != ~lit(hund % 10) || t != ~lit((hund / 10) % 10) ||
        s != ~lit((hund / 100) % 10) || tn != ~lit(hund / 1000)) begin
      failures++;
      $display("%s: display wrong, expected %0d.%02d", what, hund / 100, hund % 100);
    end else
      $display("%s: %0d.%02d ok", what, hund / 100, hund % 100);
  endtask

  function automatic int model_hund();
    return int'((running / 5000) % 10000);
  endfunction

  initial begin
    reset = 1'b1; startstop = 1'b0;
    @(posedge ph2);
    @(negedge ph1);
    run(3);
    reset = 1'b0; run(5);
    expect_time(0, "after reset");
    startstop = 1'b1; run(1);
    startstop = 0;    run(5_43 * CYC_PER_S / 100);
    expect_time(543, "counting");
    checks++;
    if (model_hund() != 543) failures++;
    run(2_14 * CYC_PER_S / 100);
    expect_time(model_hund(), "still counting");
    // Pause with a long press.
    startstop = 1'b1; run(CYC_PER_S / 2);
    startstop = 1'b0; run(CYC_PER_S / 2);
    expect_time(model_hund(), "paused");
    checks++;
    if (model_hund() != 757) begin
      failures++;
      $display("model time %0d, expected 7.57 frozen", model_hund());
    end
    // Resume with a 1 s press.
    startstop = 1'b1; run(CYC_PER_S);
    startstop = 1'b0; run(CYC_PER_S / 2);
    expect_time(model_hund(), "resumed");
    // Reset while startstop is held: reset wins.
    startstop = 1'b1; run(CYC_PER_S / 4);
    reset = 1'b1;     run(CYC_PER_S / 4);
    expect_time(0, "reset with startstop held");
    startstop = 1'b0; run(1000);
    startstop = 1'b1; run(1000);
    startstop = 1'b0; run(1000);
    expect_time(0, "startstop toggled under reset");
    reset = 1'b0; run(CYC_PER_S / 100);
    expect_time(0, "reset released");
    startstop = 1'b1; run(1);
    startstop = 1'b0; run(CYC_PER_S * 9 / 10);
    expect_time(90, "0.90 s");
    // Run on to the end of the range and past it.
    run(longint'(9999 - 90) * 5000);
    expect_time(9999, "99.99 s");
    run(5000);
    expect_time(0, "wrapped");
    run(5000 * 17);
    expect_time(17, "after wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd120 * 1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

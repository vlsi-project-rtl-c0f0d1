// tb_timerchip: end-to-end test of the stopwatch with a shortened
// hundredth (3 clock cycles) so the display can run through a complete
// 00.00 -> 99.99 -> 00.00 cycle in simulation.
//
// The buttons are driven at random: presses of 1..5 cycles (so held-down
// buttons occur), resumes soon after each pause, occasional resets while
// counting, and resets coinciding with a press. A reference model keeps
// the run/pause state and the elapsed time as a count of hundredths; after
// every ph1 all four segment buses are compared with the reference glyphs
// (active low). It also checks that the display holds 00.00 while reset
// is released and nobody presses. Each mechanism -- start, pause, resume,
// held press, reset while counting, reset winning over a press, frozen
// display while paused, rollover of each digit, wrap after 99.99 -- is
// counted, and one that never happened is a failure.
`timescale 1ns / 1ns
module tb_timerchip;
  import tb_seg_pkg::*;

  localparam int unsigned T    = 3;
  localparam int unsigned NCYC = 45_000;

  logic ph1, ph2, reset, startstop;
  logic [6:0] h, t, s, tn;

  logic m_mode = 1'b0, m_held = 1'b0;
  int   ticks = 0, hund = 0, prev_hund = 0;
  int   checks = 0, failures = 0;
  int   n_start = 0, n_pause = 0, n_resume = 0, n_held = 0, n_rst_run = 0;
  int   n_rst_press = 0, n_frozen = 0, n_wrap = 0, n_idle = 0;
  int   n_roll [4] = '{0, 0, 0, 0};
  int   press_left = 0;

  two_phase_clock clk (.ph1(ph1), .ph2(ph2));
  timerchip #(.TICKS_PER_HUNDREDTH(T), .TICK_W(2)) dut (
    .ph1(ph1), .ph2(ph2), .reset(reset), .startstop(startstop),
    .hundredths(h), .tenths(t), .secs(s), .tens(tn));

  // One clock cycle: advance the model with the inputs now applied, wait
  // for the chip to update, compare the display.
  task automatic cycle();
    prev_hund = hund;
    if (reset) begin
      if (m_mode) n_rst_run++;
      if (startstop && !m_held) n_rst_press++;
      m_mode = 1'b0; m_held = 1'b0; ticks = 0; hund = 0;
    end else begin
      if (m_mode) begin
        if (ticks == T - 1) begin
          ticks = 0;
          for (int k = 0, p = 1; k < 4; k++, p *= 10)
            if ((hund / p) % 10 == 9 && hund % p == p - 1) n_roll[k]++;
          if (hund == 9999) n_wrap++;
          hund = (hund + 1) % 10000;
        end else ticks++;
      end
      if (startstop && !m_held) begin
        if (m_mode) n_pause++;
        else if (hund == 0 && ticks == 0) n_start++;
        else n_resume++;
        m_mode = ~m_mode;
      end else if (startstop) n_held++;
      m_held = startstop;
    end
    @(negedge ph1);
    checks++;
    if (h  != ~lit(hund % 10)       || t  != ~lit((hund / 10) % 10) ||
        s  != ~lit((hund / 100) % 10) || tn != ~lit(hund / 1000)) begin
      failures++;
      if (failures < 10) $display("t=%0t display wrong, expected %0d", $time, hund);
    end
    if (!m_mode && !reset && hund == prev_hund && hund != 0) n_frozen++;
  endtask

  initial begin
    reset = 1'b1; startstop = 1'b0;
    @(posedge ph2);
    @(negedge ph1);
    repeat (3) cycle();
    // Released reset, no press: display must stay at 00.00.
    reset = 1'b0;
    repeat (20) begin
      cycle();
      if (hund == 0) n_idle++;
    end
    for (int n = 0; n < NCYC; n++) begin
      reset = 1'b0;
      if (press_left > 0) begin
        startstop = 1'b1;
        press_left--;
      end else begin
        startstop = 1'b0;
        if (m_mode ? ($urandom_range(1499) == 0) : ($urandom_range(19) == 0))
          press_left = $urandom_range(5, 1);
        else if (m_mode && $urandom_range(9999) == 0 && n > 35_000) begin
          reset = 1'b1;
          startstop = $urandom_range(1);
        end
      end
      cycle();
    end
    // Directed: reset together with a fresh press, then reset must win.
    startstop = 1'b0; cycle();
    reset = 1'b1; startstop = 1'b1; cycle();
    reset = 1'b0; startstop = 1'b0; cycle();

    $display("starts=%0d pauses=%0d resumes=%0d held=%0d reset_running=%0d reset_with_press=%0d",
             n_start, n_pause, n_resume, n_held, n_rst_run, n_rst_press);
    $display("frozen=%0d idle=%0d rollovers=%0d/%0d/%0d/%0d wraps=%0d",
             n_frozen, n_idle, n_roll[0], n_roll[1], n_roll[2], n_roll[3], n_wrap);
    checks++;
    if (n_start == 0 || n_pause == 0 || n_resume == 0 || n_held == 0 || n_rst_run == 0 ||
        n_rst_press == 0 || n_frozen == 0 || n_idle != 20 || n_wrap == 0 ||
        n_roll[0] == 0 || n_roll[1] == 0 || n_roll[2] == 0 || n_roll[3] == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'(NCYC + 200) * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

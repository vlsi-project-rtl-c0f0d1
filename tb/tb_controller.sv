// tb_controller: run/pause mode register and display decoders.
// startstop is driven with presses of random length (1..6 cycles) and
// random gaps, plus resets, some of them during a press. After each ph1
// mode is compared with a model that toggles once per press (a press is
// startstop high after a cycle with it low; reset clears both). The digit
// inputs are random and each segment bus is compared with the reference
// glyph, active low. Counts starts, pauses, held presses, and presses
// masked by reset.
`timescale 1ns / 1ns
module tb_controller;
  import tb_seg_pkg::*;

  logic ph1, ph2, reset, startstop;
  logic [3:0] hv, tv, sv, tnv;
  logic [6:0] h, t, s, tn;
  stopwatch_pkg::mode_t mode;
  logic m_mode = 1'b0, m_held = 1'b0;
  int checks = 0, failures = 0;
  int n_start = 0, n_pause = 0, n_hold = 0, n_masked = 0;

  two_phase_clock clk (.ph1(ph1), .ph2(ph2));
  controller dut (.ph1(ph1), .ph2(ph2), .reset(reset), .startstop(startstop),
                  .hundredths_val(hv), .tenths_val(tv), .secs_val(sv), .tens_val(tnv),
                  .mode(mode), .hundredths(h), .tenths(t), .secs(s), .tens(tn));

  task automatic step();
    if (reset) begin
      if (startstop && !m_held) n_masked++;
      m_mode = 1'b0; m_held = 1'b0;
    end else begin
      if (startstop && !m_held) begin
        if (m_mode) n_pause++; else n_start++;
        m_mode = ~m_mode;
      end else if (startstop) n_hold++;
      m_held = startstop;
    end
    @(posedge ph2);
    @(negedge ph1);
    checks++;
    if (mode != m_mode) begin
      failures++;
      if (failures < 10) $display("t=%0t mode=%0d expected %0d", $time, mode, m_mode);
    end
  endtask

  initial begin
    reset = 1'b1; startstop = 1'b0; {hv, tv, sv, tnv} = '0;
    @(negedge ph1);
    step();
    reset = 1'b0;
    for (int n = 0; n < 400; n++) begin
      automatic int len = $urandom_range(6, 1);
      automatic int gap = $urandom_range(4, 1);
      automatic bit rst_in_press = ($urandom_range(9) == 0);
      for (int k = 0; k < len; k++) begin
        startstop = 1'b1;
        reset = rst_in_press && (k == 0);
        step();
      end
      reset = 1'b0;
      for (int k = 0; k < gap; k++) begin
        startstop = 1'b0;
        {hv, tv, sv, tnv} = 16'($urandom);
        #1;
        checks += 4;
        if (h  != ~lit(hv))  failures++;
        if (t  != ~lit(tv))  failures++;
        if (s  != ~lit(sv))  failures++;
        if (tn != ~lit(tnv)) failures++;
        step();
      end
    end
    $display("starts=%0d pauses=%0d held=%0d masked=%0d", n_start, n_pause, n_hold, n_masked);
    checks++;
    if (n_start == 0 || n_pause == 0 || n_hold == 0 || n_masked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5000 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_datapath: the five-slice counting chain at a shortened hundredth
// (4 ticks, 3-bit tick counter) so that a full 00.00 -> 99.99 -> 00.00
// cycle fits in 50,000 clock cycles. mode is held mostly high with random
// pauses, and reset is pulsed a few times early on. After every ph1 the
// four BCD digits are compared with a model that keeps time as a plain
// count of ticks and hundredths. Counts pauses, resets, rollovers of each
// digit and the 99.99 wrap, and fails if any never happened.
`timescale 1ns / 1ns
module tb_datapath;

  localparam int unsigned T = 4;
  localparam int unsigned NCYC = 50_000;

  logic ph1, ph2, reset, mode;
  logic [3:0] h, t, s, tn;
  int ticks = 0, hund = 0;
  int checks = 0, failures = 0;
  int n_pause = 0, n_reset = 0, n_wrap = 0;
  int n_roll [4] = '{0, 0, 0, 0};

  two_phase_clock clk (.ph1(ph1), .ph2(ph2));
  datapath #(.TICKS_PER_HUNDREDTH(T), .TICK_W(3)) dut (
    .ph1(ph1), .ph2(ph2), .reset(reset), .mode(mode),
    .hundredths_val(h), .tenths_val(t), .secs_val(s), .tens_val(tn));

  initial begin
    reset = 1'b1; mode = 1'b0;
    @(posedge ph2);
    @(negedge ph1);
    for (int n = 0; n < NCYC; n++) begin
      reset = (n < 5000) && ($urandom_range(999) == 0);
      mode  = ($urandom_range(49) != 0);
      if (!mode) n_pause++;
      if (reset) begin
        n_reset++;
        ticks = 0; hund = 0;
      end else if (mode) begin
        if (ticks == T - 1) begin
          ticks = 0;
          for (int k = 0, p = 1; k < 4; k++, p *= 10)
            if ((hund / p) % 10 == 9 && hund % p == p - 1) n_roll[k]++;
          if (hund == 9999) n_wrap++;
          hund = (hund + 1) % 10000;
        end else ticks++;
      end
      @(negedge ph1);
      checks++;
      if (int'(h) != hund % 10 || int'(t) != (hund / 10) % 10 ||
          int'(s) != (hund / 100) % 10 || int'(tn) != hund / 1000) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: %0d%0d.%0d%0d expected %0d", n, tn, s, t, h, hund);
      end
    end
    $display("pauses=%0d resets=%0d rollovers=%0d/%0d/%0d/%0d wraps=%0d",
             n_pause, n_reset, n_roll[0], n_roll[1], n_roll[2], n_roll[3], n_wrap);
    checks++;
    if (n_pause == 0 || n_reset == 0 || n_wrap == 0 ||
        n_roll[0] == 0 || n_roll[1] == 0 || n_roll[2] == 0 || n_roll[3] == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'(NCYC + 100) * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_timeslice: one digit slice (WIDTH 4, LAST 9) wired as the datapath
// wires it: it clears when enabled at its last count, and also on random
// external resets. Random enables for 3000 cycles; value and at_last are
// checked after each ph1 against a decimal-digit model. Counts the
// rollovers and fails if there were none.
`timescale 1ns / 1ns
module tb_timeslice;

  logic ph1, ph2, ext_reset, enable, reset, at_last;
  logic [3:0] value;
  int model = 0, checks = 0, failures = 0, rollovers = 0;

  two_phase_clock clk (.ph1(ph1), .ph2(ph2));
  timeslice dut (.ph1(ph1), .ph2(ph2), .reset(reset), .enable(enable),
                 .value(value), .at_last(at_last));

  assign reset = ext_reset | (enable & at_last);

  initial begin
    ext_reset = 1'b1; enable = 1'b0;
    @(posedge ph2);
    @(negedge ph1);
    for (int n = 0; n < 3000; n++) begin
      ext_reset = ($urandom_range(99) == 0);
      enable    = ($urandom_range(1) == 1);
      if (ext_reset) model = 0;
      else if (enable) begin
        if (model == 9) rollovers++;
        model = (model + 1) % 10;
      end
      @(negedge ph1);
      checks += 2;
      if (int'(value) != model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: value=%0d expected %0d", n, value, model);
      end
      if (at_last != (model == 9)) failures++;
    end
    checks++;
    if (rollovers == 0) failures++;
    $display("rollovers=%0d", rollovers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(3100 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_sevenseg: all 16 input values through two decoders, one active low
// (the default) and one active high, compared with glyphs written from
// segment letters in tb_seg_pkg.
`timescale 1ns / 1ns
module tb_sevenseg;
  import tb_seg_pkg::*;

  logic [3:0] s;
  logic [6:0] segs_lo, segs_hi;
  int checks = 0, failures = 0;

  sevenseg                       dut_lo (.s(s), .segs(segs_lo));
  sevenseg #(.ACTIVE_LOW(1'b0))  dut_hi (.s(s), .segs(segs_hi));

  initial begin
    for (int v = 0; v < 16; v++) begin
      s = 4'(v);
      #1;
      checks += 2;
      if (segs_lo != ~lit(v)) begin
        failures++;
        $display("digit %0d active-low: %b expected %b", v, segs_lo, ~lit(v));
      end
      if (segs_hi != lit(v)) begin
        failures++;
        $display("digit %0d active-high: %b expected %b", v, segs_hi, lit(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

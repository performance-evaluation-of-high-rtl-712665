// Self-checking test of the Booth partial product selector.
// For random multiples and each of the nine digits -4..+4, the value
// pp + neg, read as a 19-bit signed number, must equal digit * multiplicand
// (the multiples are generated here as 1y..4y of a random y).
module tb_booth_pp_gen;
  import mbe_pkg::*;

  int checks = 0, failures = 0;

  booth_digit_t digit;
  logic [18:0]  m1, m2, m3, m4, pp;
  logic         neg;

  booth_pp_gen dut (.digit(digit), .m1(m1), .m2(m2), .m3(m3), .m4(m4), .pp(pp), .neg(neg));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int yv;
      yv = int'($urandom_range(131071)) - 65536;
      if (i == 0) yv = -65536;
      if (i == 1) yv = 65535;
      m1 = 19'(yv); m2 = 19'(2 * yv); m3 = 19'(3 * yv); m4 = 19'(4 * yv);
      for (int d = -4; d <= 4; d++) begin
        int mag, expv, got;
        mag = d < 0 ? -d : d;
        digit = '0;
        digit.neg = d < 0;
        digit.sel.x1 = mag == 1;
        digit.sel.x2 = mag == 2;
        digit.sel.x3 = mag == 3;
        digit.sel.x4 = mag == 4;
        #1;
        expv = d * yv;
        got  = int'($signed(pp)) + int'(neg);
        checks++;
        if (got != expv || neg != (d < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d d=%0d got %0d neg=%b", yv, d, got, neg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

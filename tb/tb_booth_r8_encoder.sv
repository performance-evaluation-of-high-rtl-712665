// Self-checking test of the radix-8 Booth recoder.
// All sixteen 4-bit groups are applied; the expected digit is computed as
// -4*g[3] + 2*g[2] + g[1] + g[0] and compared with the sign and one-hot
// magnitude the recoder returns. Zero digits must have no select and no sign.
module tb_booth_r8_encoder;
  import mbe_pkg::*;

  logic [3:0]   grp;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_r8_encoder dut (.grp(grp), .digit(digit));

  function automatic int decode(booth_digit_t d);
    int mag;
    mag = (d.sel.x1 ? 1 : 0) + (d.sel.x2 ? 2 : 0) + (d.sel.x3 ? 3 : 0) + (d.sel.x4 ? 4 : 0);
    return d.neg ? -mag : mag;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 16; g++) begin
      int expv;
      grp = 4'(g);
      #1;
      expv = -4 * ((g >> 3) & 1) + 2 * ((g >> 2) & 1) + ((g >> 1) & 1) + (g & 1);
      checks++;
      if ($countones(digit.sel) > 1 || decode(digit) != expv) begin
        failures++;
        $display("FAIL grp=%b digit=%p expected %0d", grp, digit, expv);
      end
      checks++;
      if (expv == 0 && digit != '0) begin
        failures++;
        $display("FAIL grp=%b zero digit not all-zero: %p", grp, digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

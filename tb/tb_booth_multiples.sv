// Self-checking test of the multiplicand multiples.
// Every 17-bit two's complement multiplicand is applied; the four outputs,
// read as 19-bit signed numbers, must equal 1, 2, 3 and 4 times it.
module tb_booth_multiples;
  int checks = 0, failures = 0;

  logic [16:0] y;
  logic [18:0] m1, m2, m3, m4;

  booth_multiples dut (.y(y), .m1(m1), .m2(m2), .m3(m3), .m4(m4));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -65536; v < 65536; v++) begin
      y = 17'(v);
      #1;
      checks++;
      if (int'($signed(m1)) != v || int'($signed(m2)) != 2 * v ||
          int'($signed(m3)) != 3 * v || int'($signed(m4)) != 4 * v) begin
        failures++;
        if (failures < 10)
          $display("FAIL y=%0d: %0d %0d %0d %0d", v, $signed(m1), $signed(m2),
                   $signed(m3), $signed(m4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

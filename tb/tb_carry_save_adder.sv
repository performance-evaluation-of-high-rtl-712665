// Self-checking test of the carry save adder row.
// For random and corner rows the sum row must be the bitwise XOR of the
// inputs and sum + carry must equal x + y + z modulo 2^32.
module tb_carry_save_adder;
  int checks = 0, failures = 0;

  logic [31:0] x, y, z, s, c;

  carry_save_adder dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      x = $urandom; y = $urandom; z = $urandom;
      if (i == 0) begin x = '1; y = '1; z = '1; end
      if (i == 1) begin x = '1; y = 32'h1; z = '0; end
      #1;
      checks++;
      if (s + c != x + y + z || s != (x ^ y ^ z) || c[0] != 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %h -> s=%h c=%h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

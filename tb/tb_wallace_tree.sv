// Self-checking test of the Wallace tree.
// Trees of 7 (default), 3, 9 and 2 rows get random and all-ones rows; the two
// output rows must add up to the sum of the input rows modulo 2^W.
module tb_wallace_tree;
  int checks = 0, failures = 0;

  logic [31:0] r7 [7];
  logic [31:0] s7, c7;
  logic [15:0] r3 [3];
  logic [15:0] s3, c3;
  logic [23:0] r9 [9];
  logic [23:0] s9, c9;
  logic [11:0] r2 [2];
  logic [11:0] s2, c2;

  wallace_tree                    dut7 (.rows(r7), .sum_row(s7), .carry_row(c7));
  wallace_tree #(.R(3), .W(16))   dut3 (.rows(r3), .sum_row(s3), .carry_row(c3));
  wallace_tree #(.R(9), .W(24))   dut9 (.rows(r9), .sum_row(s9), .carry_row(c9));
  wallace_tree #(.R(2), .W(12))   dut2 (.rows(r2), .sum_row(s2), .carry_row(c2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10000; i++) begin
      logic [31:0] e7;
      logic [15:0] e3;
      logic [23:0] e9;
      logic [11:0] e2;
      e7 = '0; e3 = '0; e9 = '0; e2 = '0;
      foreach (r7[k]) begin r7[k] = (i == 0) ? '1 : $urandom; e7 += r7[k]; end
      foreach (r3[k]) begin r3[k] = (i == 0) ? '1 : 16'($urandom); e3 += r3[k]; end
      foreach (r9[k]) begin r9[k] = (i == 0) ? '1 : 24'($urandom); e9 += r9[k]; end
      foreach (r2[k]) begin r2[k] = (i == 0) ? '1 : 12'($urandom); e2 += r2[k]; end
      #1;
      checks++;
      if (s7 + c7 != e7) begin failures++; $display("FAIL R7 %h + %h != %h", s7, c7, e7); end
      checks++;
      if (s3 + c3 != e3) begin failures++; $display("FAIL R3 %h + %h != %h", s3, c3, e3); end
      checks++;
      if (s9 + c9 != e9) begin failures++; $display("FAIL R9 %h + %h != %h", s9, c9, e9); end
      checks++;
      if (s2 + c2 != e2) begin failures++; $display("FAIL R2 %h + %h != %h", s2, c2, e2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the carry select adder.
// The default 19-bit, 4-bit-block adder and a 10-bit adder with 3-bit blocks
// (narrow last block) get corner and random operands and both carry-ins; the
// sum and carry-out are compared with the + operator.
module tb_carry_select_adder;
  int checks = 0, failures = 0;

  logic [18:0] x1, y1, s1;
  logic        c1, co1;
  logic [9:0]  x2, y2, s2;
  logic        c2, co2;

  carry_select_adder                      dut1 (.x(x1), .y(y1), .cin(c1), .s(s1), .cout(co1));
  carry_select_adder #(.W(10), .BLK(3))   dut2 (.x(x2), .y(y2), .cin(c2), .s(s2), .cout(co2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [19:0] e1;
    logic [10:0] e2;
    #1;
    e1 = {1'b0, x1} + {1'b0, y1} + 20'(c1);
    e2 = {1'b0, x2} + {1'b0, y2} + 11'(c2);
    checks++;
    if ({co1, s1} !== e1) begin
      failures++;
      $display("FAIL W19 %h + %h + %b = %h, expected %h", x1, y1, c1, {co1, s1}, e1);
    end
    checks++;
    if ({co2, s2} !== e2) begin
      failures++;
      $display("FAIL W10 %h + %h + %b = %h, expected %h", x2, y2, c2, {co2, s2}, e2);
    end
  endtask

  initial begin
    // corners: all-ones plus one, carries through every block
    x1 = '1; y1 = '0; c1 = 1; x2 = '1; y2 = '0; c2 = 1; check();
    x1 = '1; y1 = '1; c1 = 1; x2 = '1; y2 = '1; c2 = 1; check();
    x1 = '0; y1 = '0; c1 = 0; x2 = '0; y2 = '0; c2 = 0; check();
    x1 = 19'h0FFFF; y1 = 19'h1; c1 = 0; x2 = 10'h0FF; y2 = 10'h1; c2 = 0; check();
    for (int i = 0; i < 20000; i++) begin
      x1 = 19'($urandom); y1 = 19'($urandom); c1 = 1'($urandom);
      x2 = 10'($urandom); y2 = 10'($urandom); c2 = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

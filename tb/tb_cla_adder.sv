// Self-checking test of the carry look-ahead adder.
// The default 32-bit adder and a 13-bit adder (narrow last group) get corner
// and random operands with both carry-ins; sum and carry-out are compared
// with the + operator.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [31:0] x1, y1, s1;
  logic        c1, co1;
  logic [12:0] x2, y2, s2;
  logic        c2, co2;

  cla_adder                   dut1 (.x(x1), .y(y1), .cin(c1), .s(s1), .cout(co1));
  cla_adder #(.W(13), .G(4))  dut2 (.x(x2), .y(y2), .cin(c2), .s(s2), .cout(co2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [32:0] e1;
    logic [13:0] e2;
    #1;
    e1 = {1'b0, x1} + {1'b0, y1} + 33'(c1);
    e2 = {1'b0, x2} + {1'b0, y2} + 14'(c2);
    checks++;
    if ({co1, s1} !== e1) begin
      failures++;
      $display("FAIL W32 %h + %h + %b = %h, expected %h", x1, y1, c1, {co1, s1}, e1);
    end
    checks++;
    if ({co2, s2} !== e2) begin
      failures++;
      $display("FAIL W13 %h + %h + %b = %h, expected %h", x2, y2, c2, {co2, s2}, e2);
    end
  endtask

  initial begin
    x1 = '1; y1 = '0; c1 = 1; x2 = '1; y2 = '0; c2 = 1; check();
    x1 = '1; y1 = '1; c1 = 1; x2 = '1; y2 = '1; c2 = 1; check();
    x1 = '1; y1 = '0; c1 = 0; x2 = '1; y2 = '0; c2 = 0; check();
    x1 = 32'h7FFF_FFFF; y1 = 32'h1; c1 = 0; x2 = 13'h0FFF; y2 = 13'h1; c2 = 0; check();
    for (int i = 0; i < 20000; i++) begin
      x1 = $urandom; y1 = $urandom; c1 = 1'($urandom);
      x2 = 13'($urandom); y2 = 13'($urandom); c2 = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

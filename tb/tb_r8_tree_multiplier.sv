// Self-checking test of the combinational radix-8 Booth tree multiplier.
// The default 16-bit core gets the worked examples (1203 x 1004 and
// -13 x 12), the extreme operands and random operands in signed and unsigned
// mode; an 8-bit core is checked exhaustively in both modes. Expected
// products come from the * operator on sign- or zero-extended operands.
module tb_r8_tree_multiplier;
  int checks = 0, failures = 0;

  logic        tc16, tc8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [7:0]  a8, b8;
  logic [15:0] p8;

  r8_tree_multiplier           dut16 (.tc(tc16), .a(a16), .b(b16), .p(p16));
  r8_tree_multiplier #(.N(8))  dut8  (.tc(tc8),  .a(a8),  .b(b8),  .p(p8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref16(logic tc, logic [15:0] a, logic [15:0] b);
    longint av, bv;
    av = tc ? longint'($signed(a)) : longint'(a);
    bv = tc ? longint'($signed(b)) : longint'(b);
    return 32'(av * bv);
  endfunction

  task automatic check16(logic tc, logic [15:0] a, logic [15:0] b);
    tc16 = tc; a16 = a; b16 = b;
    #1;
    checks++;
    if (p16 !== ref16(tc, a, b)) begin
      failures++;
      if (failures < 10)
        $display("FAIL N16 tc=%b %h * %h = %h, expected %h", tc, a, b, p16, ref16(tc, a, b));
    end
  endtask

  initial begin
    static logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h8001};
    tc8 = 0; a8 = 0; b8 = 0;
    // worked examples: 1203 x 1004 = 1207812, 12 x -13 = -156
    check16(1'b0, 16'd1203, 16'd1004);
    check16(1'b1, 16'd1203, 16'd1004);
    check16(1'b1, 16'd12, -16'sd13);
    checks++;
    if (p16 !== -32'sd156) begin failures++; $display("FAIL 12 x -13 = %0d", $signed(p16)); end
    foreach (corners[i]) foreach (corners[j]) begin
      check16(1'b0, corners[i], corners[j]);
      check16(1'b1, corners[i], corners[j]);
    end
    for (int i = 0; i < 50000; i++) check16(1'($urandom), 16'($urandom), 16'($urandom));
    // exhaustive 8-bit core, both modes
    for (int m = 0; m < 2; m++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          int xv, yv;
          tc8 = (m != 0); a8 = 8'(x); b8 = 8'(y);
          #1;
          xv = (m != 0) ? int'($signed(a8)) : x;
          yv = (m != 0) ? int'($signed(b8)) : y;
          checks++;
          if (p8 !== 16'(xv * yv)) begin
            failures++;
            if (failures < 10) $display("FAIL N8 tc=%0d %0d * %0d = %h", m, xv, yv, p8);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

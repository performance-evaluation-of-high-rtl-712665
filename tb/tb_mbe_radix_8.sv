// End-to-end test of the registered 16 x 16 radix-8 Booth tree multiplier,
// at its default parameters.
// A new operand pair and mode enter every clock cycle; each product is
// expected exactly two rising edges later and compared with the * operator
// on the sign- or zero-extended operands. The stream holds the worked
// example 1203 x 1004 = 1207812 in both modes, extreme operands and random
// ones, with one reset in the middle that must clear the product register.
// The test counts how often each mechanism was exercised: signed and unsigned
// mode, every radix-8 digit value -4..+4 (worked out here from the
// multiplier), negative products and the reset. Any mechanism that never
// occurred counts as a failure.
module tb_mbe_radix_8;
  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        tc;
  logic [15:0] a, b;
  logic [31:0] p;

  mbe_radix_8 dut (.clk(clk), .rst_n(rst_n), .tc(tc), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  // expected products, by the cycle their operands were applied
  logic [31:0] exp_q [$];
  int n_signed = 0, n_unsigned = 0, n_negprod = 0, n_reset = 0;
  int n_digit [9];   // index = digit + 4

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ext(logic t, logic [15:0] v);
    return t ? longint'($signed(v)) : longint'(v);
  endfunction

  // count the radix-8 digits of the multiplier
  task automatic count_digits(logic t, logic [15:0] v);
    longint bv;
    bv = ext(t, v);
    for (int i = 0; i < 6; i++) begin
      longint lo, grp;
      // digit i = b[3i+2]*-4 + b[3i+1]*2 + b[3i] + b[3i-1]
      lo  = (i == 0) ? 0 : ((bv >>> (3 * i - 1)) & 1);
      grp = (bv >>> (3 * i)) & 7;
      n_digit[int'(-4 * ((grp >> 2) & 1) + 2 * ((grp >> 1) & 1) + (grp & 1) + lo) + 4]++;
    end
  endtask

  // drive one operand pair before the next rising edge
  task automatic apply(logic t, logic [15:0] x, logic [15:0] y);
    longint pr;
    tc = t; a = x; b = y;
    pr = ext(t, x) * ext(t, y);
    exp_q.push_back(32'(pr));
    if (t) n_signed++; else n_unsigned++;
    if (pr < 0) n_negprod++;
    count_digits(t, y);
    @(posedge clk);
    #1;
  endtask

  // compare the product that leaves two edges after its operands went in
  always @(posedge clk) begin
    if (rst_n && exp_q.size() > 2) begin
      logic [31:0] e;
      e = exp_q.pop_front();
      checks++;
      if (p !== e) begin
        failures++;
        if (failures < 10) $display("FAIL p=%h expected %h at %0t", p, e, $time);
      end
    end
  end

  initial begin
    static logic [15:0] corners [5] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
    rst_n = 1'b0; tc = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (p !== '0) begin failures++; $display("FAIL p not cleared by reset"); end
    rst_n = 1'b1;

    // latency: one pair, then zeros; product must show exactly two edges later
    tc = 1'b0; a = 16'd1203; b = 16'd1004;
    @(posedge clk); #1;
    tc = 1'b0; a = 16'd0; b = 16'd0;
    checks++;
    if (p !== 32'd0) begin failures++; $display("FAIL product one edge early"); end
    @(posedge clk); #1;
    checks++;
    if (p !== 32'd1207812) begin failures++; $display("FAIL 1203 x 1004 gave %0d", p); end
    @(posedge clk); #1;

    // stream, one pair per cycle
    apply(1'b0, 16'd1203, 16'd1004);
    apply(1'b1, 16'd1203, 16'd1004);
    apply(1'b1, 16'd12, -16'sd13);
    foreach (corners[i]) foreach (corners[j]) begin
      apply(1'b0, corners[i], corners[j]);
      apply(1'b1, corners[i], corners[j]);
    end
    for (int i = 0; i < 20000; i++) apply(1'($urandom), 16'($urandom), 16'($urandom));
    apply(1'b0, 0, 0);
    apply(1'b0, 0, 0);
    @(posedge clk); #1;

    // reset in the middle of operation clears the output register
    tc = 1'b1; a = 16'h7FFF; b = 16'h7FFF;
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b0;
    #1;
    n_reset++;
    checks++;
    if (p !== '0) begin failures++; $display("FAIL asynchronous reset did not clear p"); end
    exp_q.delete();
    @(posedge clk); #1;
    rst_n = 1'b1;
    apply(1'b1, -16'sd1203, 16'd1004);
    apply(1'b0, 0, 0);
    apply(1'b0, 0, 0);
    @(posedge clk); #1;

    $display("mechanisms: signed=%0d unsigned=%0d negative_products=%0d resets=%0d",
             n_signed, n_unsigned, n_negprod, n_reset);
    for (int d = -4; d <= 4; d++) $display("  digit %0d used %0d times", d, n_digit[d+4]);
    checks++;
    if (n_signed == 0 || n_unsigned == 0 || n_negprod == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    for (int d = 0; d < 9; d++) begin
      checks++;
      if (n_digit[d] == 0) begin failures++; $display("FAIL digit %0d never used", d - 4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

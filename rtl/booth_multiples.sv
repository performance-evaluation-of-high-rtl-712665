// Multiples of the multiplicand for radix-8 Booth recoding.
//
// From the W-bit two's complement multiplicand y it forms 1y, 2y, 3y and 4y,
// each sign-extended to W+2 bits, which holds 4y exactly. 2y and 4y are left
// shifts by one and two places. 3y, the "hard multiple", needs a carry
// propagating addition y + 2y, done here by a carry select adder.
// Negative multiples are not formed here: the partial product selector
// complements the positive one. Purely combinational.
module booth_multiples #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0]   y,
  output logic [W+1:0]   m1,
  output logic [W+1:0]   m2,
  output logic [W+1:0]   m3,
  output logic [W+1:0]   m4
);

  logic unused_cout;

  assign m1 = {{2{y[W-1]}}, y};
  assign m2 = {y[W-1], y, 1'b0};
  assign m4 = {y, 2'b00};

  carry_select_adder #(.W(W + 2), .BLK(4)) u_add3 (
    .x    (m1),
    .y    (m2),
    .cin  (1'b0),
    .s    (m3),
    .cout (unused_cout)
  );

endmodule

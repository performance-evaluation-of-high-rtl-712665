// Radix-8 Booth partial product selector.
//
// Picks 0, 1y, 2y, 3y or 4y with the one-hot select of the digit (an AND-OR
// multiplexer) and, for a negative digit, inverts every bit. The inverted
// value is -m - 1; the missing +1 leaves on neg and is added as a single bit
// in the reduction tree, so no adder is needed here. Purely combinational.
// An assertion checks that the digit selects at most one multiple.
module booth_pp_gen
  import mbe_pkg::*;
#(
  parameter int unsigned W = 19
) (
  input  booth_digit_t digit,
  input  logic [W-1:0] m1,
  input  logic [W-1:0] m2,
  input  logic [W-1:0] m3,
  input  logic [W-1:0] m4,
  output logic [W-1:0] pp,
  output logic         neg
);

  logic [W-1:0] mag;

  always_comb begin
    mag = ({W{digit.sel.x1}} & m1)
        | ({W{digit.sel.x2}} & m2)
        | ({W{digit.sel.x3}} & m3)
        | ({W{digit.sel.x4}} & m4);
    pp  = mag ^ {W{digit.neg}};
    neg = digit.neg;
  end

  // A digit selects at most one multiple
  always_comb begin
    assert ($onehot0(digit.sel))
      else $error("booth_pp_gen: more than one multiple selected: %b", digit.sel);
  end

endmodule

// Shared types of the radix-8 modified Booth multiplier.
//
// A radix-8 Booth digit takes the values -4..+4. It is carried between the
// recoder and the partial product selector as a sign flag and a one-hot
// select of the positive multiple (1, 2, 3 or 4 times the multiplicand); the
// digit 0 has no select bit set. This split into sign and one-hot magnitude is
// a choice of this design; the digit table itself is the standard radix-8
// recoding.
package mbe_pkg;

  // One-hot magnitude select of a radix-8 digit
  typedef struct packed {
    logic x4;
    logic x3;
    logic x2;
    logic x1;
  } booth_sel_t;

  // Radix-8 Booth digit: value = (neg ? -1 : +1) * magnitude
  typedef struct packed {
    logic       neg;
    booth_sel_t sel;
  } booth_digit_t;

  // Number of radix-8 digits needed for a W-bit two's complement multiplier
  function automatic int unsigned r8_digits(int unsigned w);
    return (w + 2) / 3;
  endfunction

endpackage

// Radix-8 Booth recoder for one digit.
//
// Takes four overlapping multiplier bits {b[3i+2], b[3i+1], b[3i], b[3i-1]}
// (b[-1] = 0 for the lowest digit) and returns the digit
//   d = -4*b[3i+2] + 2*b[3i+1] + b[3i] + b[3i-1],
// which is the sixteen-entry radix-8 recoding table (0000 -> 0, 0001 -> +1,
// 0011 -> +2, 0101 -> +3, 0111 -> +4, 1000 -> -4, ... 1111 -> 0).
// The digit leaves as a sign flag and a one-hot select of 1y..4y; the two
// zero codes 0000 and 1111 select nothing and have the sign flag clear.
// Purely combinational.
module booth_r8_encoder
  import mbe_pkg::*;
(
  input  logic [3:0]   grp,    // {b[3i+2], b[3i+1], b[3i], b[3i-1]}
  output booth_digit_t digit
);

  always_comb begin
    digit = '0;
    unique case (grp)
      4'b0000, 4'b1111: digit = '0;
      4'b0001, 4'b0010: digit.sel.x1 = 1'b1;
      4'b0011, 4'b0100: digit.sel.x2 = 1'b1;
      4'b0101, 4'b0110: digit.sel.x3 = 1'b1;
      4'b0111:          digit.sel.x4 = 1'b1;
      4'b1000:          begin digit.neg = 1'b1; digit.sel.x4 = 1'b1; end
      4'b1001, 4'b1010: begin digit.neg = 1'b1; digit.sel.x3 = 1'b1; end
      4'b1011, 4'b1100: begin digit.neg = 1'b1; digit.sel.x2 = 1'b1; end
      4'b1101, 4'b1110: begin digit.neg = 1'b1; digit.sel.x1 = 1'b1; end
      default:          digit = '0;
    endcase
  end

endmodule

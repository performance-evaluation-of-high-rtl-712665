// Carry save adder: a row of W independent full adders.
//
// Three W-bit rows x, y, z become a sum row s and a carry row c with
// x + y + z = s + c (mod 2^W). The carries are returned already moved one
// place to the left, so c[0] is 0 and the carry out of bit W-1 is dropped,
// which is right for arithmetic modulo 2^W. No carry runs along the row.
// Purely combinational.
module carry_save_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-2:0] maj;  // majority of bits 0..W-2; bit W-1's carry leaves the word

  assign s   = x ^ y ^ z;
  assign maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
  assign c   = {maj, 1'b0};

endmodule

// Radix-8 tree based Booth multiplier, combinational core.
//
// Multiplies two N-bit operands, as two's complement numbers when tc = 1 and
// as unsigned numbers when tc = 0, giving the exact 2N-bit product.
//  1. Both operands are widened by one bit (their sign when tc = 1, a zero
//     when tc = 0), so from here on everything is N+1-bit two's complement.
//  2. The multiplier, with a 0 appended below its LSB and sign-extended to a
//     multiple of three bits, is cut into overlapping 4-bit groups, one every
//     three bits. Each group is recoded into a digit in -4..+4, giving
//     ND = ceil((N+1)/3) partial products (6 for N = 16) instead of the N of
//     a shift-and-add multiplier.
//  3. The multiples y, 2y, 3y, 4y of the multiplicand are formed once (3y by a
//     carry select adder); each digit selects one, inverted when the digit is
//     negative.
//  4. Each partial product is sign-extended and moved left by three places
//     per digit. These ND rows, plus one row that holds the +1 of every
//     negative digit, are reduced to two rows by a Wallace tree of carry save
//     adders, and a carry look-ahead adder adds the two.
// All arithmetic after step 1 is modulo 2^(2N); the product always fits.
// The sign-extended rows and the separate +1 row are this design's choices;
// the recoding, the multiples, the tree and the final adder type follow the
// radix-8 Booth tree multiplier it implements.
module r8_tree_multiplier
  import mbe_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic           tc,   // 1: signed operands, 0: unsigned
  input  logic [N-1:0]   a,    // multiplicand
  input  logic [N-1:0]   b,    // multiplier
  output logic [2*N-1:0] p
);

  localparam int unsigned NE  = N + 1;           // widened operand width
  localparam int unsigned ND  = r8_digits(NE);   // radix-8 digits
  localparam int unsigned MB  = 3 * ND;          // multiplier bits recoded
  localparam int unsigned PPW = NE + 2;          // width of +-4y
  localparam int unsigned PW  = 2 * N;           // product width
  localparam int unsigned R   = ND + 1;          // rows into the tree

  // Step 1: widen the operands
  logic [NE-1:0] ye;
  logic [MB:0]   bx;   // multiplier, sign-extended, with b[-1] = 0 at bit 0

  assign ye = {tc & a[N-1], a};
  assign bx = {{(MB - N){tc & b[N-1]}}, b, 1'b0};

  // Step 3: multiples of the multiplicand
  logic [PPW-1:0] m1, m2, m3, m4;

  booth_multiples #(.W(NE)) u_mult (
    .y  (ye),
    .m1 (m1),
    .m2 (m2),
    .m3 (m3),
    .m4 (m4)
  );

  // Steps 2 and 3: recode each digit and select its partial product
  booth_digit_t   digit [ND];
  logic [PPW-1:0] pp    [ND];
  logic [ND-1:0]  neg;

  for (genvar i = 0; i < ND; i++) begin : g_digit
    booth_r8_encoder u_enc (
      .grp   (bx[3*i +: 4]),
      .digit (digit[i])
    );

    booth_pp_gen #(.W(PPW)) u_pp (
      .digit (digit[i]),
      .m1    (m1),
      .m2    (m2),
      .m3    (m3),
      .m4    (m4),
      .pp    (pp[i]),
      .neg   (neg[i])
    );
  end

  // Step 4: place the rows and reduce them
  logic [PW-1:0] rows [R];

  always_comb begin
    for (int unsigned i = 0; i < ND; i++) begin
      rows[i] = PW'({{PW{pp[i][PPW-1]}}, pp[i]}) << (3 * i);
    end
    rows[ND] = '0;
    for (int unsigned i = 0; i < ND; i++) begin
      rows[ND][3*i] = neg[i];
    end
  end

  logic [PW-1:0] sum_row, carry_row;

  wallace_tree #(.R(R), .W(PW)) u_tree (
    .rows      (rows),
    .sum_row   (sum_row),
    .carry_row (carry_row)
  );

  logic unused_cout;

  cla_adder #(.W(PW), .G(4)) u_final (
    .x    (sum_row),
    .y    (carry_row),
    .cin  (1'b0),
    .s    (p),
    .cout (unused_cout)
  );

endmodule

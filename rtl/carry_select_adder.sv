// Carry select adder.
//
// The W-bit operands are cut into blocks of BLK bits. The lowest block is a
// ripple-carry adder fed by cin. Every higher block holds two ripple-carry
// adders, one assuming a carry-in of 0 and one assuming 1, and the carry that
// arrives from the block below only chooses between the two results, so the
// carry path through the adder is one multiplexer per block. The last block
// may be narrower than BLK. Purely combinational.
// In the multiplier it forms the hard multiple 3y = y + 2y; the block size is
// this design's choice.
module carry_select_adder #(
  parameter int unsigned W   = 19,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NB = (W + BLK - 1) / BLK;

  logic [NB:0] bc;  // carry into each block

  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned LO = k * BLK;
    localparam int unsigned BW = (LO + BLK <= W) ? BLK : W - LO;

    logic [BW-1:0] s0, s1;
    logic          c0, c1;

    // Two ripple-carry sums of this block, for carry-in 0 and 1
    always_comb begin
      logic r0, r1;
      r0 = 1'b0;
      r1 = 1'b1;
      for (int unsigned i = 0; i < BW; i++) begin
        s0[i] = x[LO+i] ^ y[LO+i] ^ r0;
        s1[i] = x[LO+i] ^ y[LO+i] ^ r1;
        r0    = (x[LO+i] & y[LO+i]) | (r0 & (x[LO+i] ^ y[LO+i]));
        r1    = (x[LO+i] & y[LO+i]) | (r1 & (x[LO+i] ^ y[LO+i]));
      end
      c0 = r0;
      c1 = r1;
    end

    // The incoming carry selects one of them
    assign s[LO +: BW] = bc[k] ? s1 : s0;
    assign bc[k+1]     = bc[k] ? c1 : c0;
  end

  assign cout = bc[NB];

endmodule

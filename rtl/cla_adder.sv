// Two-level carry look-ahead adder.
//
// Every bit forms generate g = x & y and propagate p = x ^ y. The bits are
// cut into groups of G; each group forms a group generate and propagate. A
// look-ahead unit computes the carry into every group directly from the group
// signals and cin (a sum of products, no ripple), and inside each group the
// carry into every bit is again computed directly from that bit's group
// carry-in and the bit g/p signals. The last group may be narrower than G.
// Used as the final adder that turns the two rows left by the Wallace tree
// into the product. Purely combinational; the group size is this design's
// choice.
module cla_adder #(
  parameter int unsigned W = 32,
  parameter int unsigned G = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = (W + G - 1) / G;

  logic [W-1:0]  g, p, c;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;       // carry into each group, gc[NG] = carry out

  assign g = x & y;
  assign p = x ^ y;

  // Group generate and propagate
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int unsigned i = k * G; i < k * G + G && i < W; i++) begin
        gg[k] = g[i] | (p[i] & gg[k]);
        gp[k] = gp[k] & p[i];
      end
    end
  end

  // Second level: carry into group j = OR over k<j of gg[k] & gp[k+1..j-1],
  // plus cin & gp[0..j-1]
  always_comb begin
    for (int unsigned j = 0; j <= NG; j++) begin
      logic term;
      gc[j] = 1'b0;
      for (int unsigned k = 0; k < j; k++) begin
        term = gg[k];
        for (int unsigned m = k + 1; m < j; m++) term = term & gp[m];
        gc[j] = gc[j] | term;
      end
      term = cin;
      for (int unsigned m = 0; m < j; m++) term = term & gp[m];
      gc[j] = gc[j] | term;
    end
  end

  // First level: carry into each bit from its group carry-in
  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      int unsigned lo;
      logic        term;
      lo   = (i / G) * G;
      c[i] = 1'b0;
      for (int unsigned k = lo; k < i; k++) begin
        term = g[k];
        for (int unsigned m = k + 1; m < i; m++) term = term & p[m];
        c[i] = c[i] | term;
      end
      term = gc[i / G];
      for (int unsigned m = lo; m < i; m++) term = term & p[m];
      c[i] = c[i] | term;
    end
  end

  assign s    = p ^ c;
  assign cout = gc[NG];

endmodule

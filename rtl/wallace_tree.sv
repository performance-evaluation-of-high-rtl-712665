// Wallace tree: reduces R rows of W bits to two rows with the same sum.
//
// At each level the rows present are taken three at a time, from the top,
// and each group of three goes through a carry save adder, which returns two
// rows (sum and shifted carries). One or two rows left over at the bottom of a
// level pass to the next level unchanged. Levels repeat until two rows remain;
// seven rows take four levels (7 -> 5 -> 4 -> 3 -> 2). All groups of a level
// work in parallel and no carry propagates inside the tree, so its delay is a
// few full adders. Bits where a row has no partial product bit are constant 0,
// which turns those full adders into half adders or wires after synthesis.
// Sums are modulo 2^W. Purely combinational.
module wallace_tree #(
  parameter int unsigned R = 7,
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] rows [R],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);

  // Rows left after one level of 3:2 reduction
  function automatic int unsigned next_rows(int unsigned r);
    return (r / 3) * 2 + (r % 3);
  endfunction

  // Rows present at level l (level 0 = the inputs)
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned r = R;
    for (int unsigned i = 0; i < l; i++) r = next_rows(r);
    return r;
  endfunction

  // Number of levels needed to get down to two rows
  function automatic int unsigned num_levels();
    int unsigned r = R;
    int unsigned n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // Level l holds cur (its RIN input rows) and nxt (its ROUT output rows)
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned RIN  = rows_at(l);
    localparam int unsigned NG   = RIN / 3;
    localparam int unsigned ROUT = next_rows(RIN);

    logic [W-1:0] cur [RIN];
    logic [W-1:0] nxt [ROUT];

    if (l == 0) begin : g_first
      assign cur = rows;
    end else begin : g_chain
      assign cur = g_lvl[l-1].nxt;
    end

    for (genvar g = 0; g < NG; g++) begin : g_csa
      carry_save_adder #(.W(W)) u_csa (
        .x (cur[3*g]),
        .y (cur[3*g+1]),
        .z (cur[3*g+2]),
        .s (nxt[2*g]),
        .c (nxt[2*g+1])
      );
    end

    for (genvar k = 0; k < RIN % 3; k++) begin : g_pass
      assign nxt[2*NG+k] = cur[3*NG+k];
    end
  end

  if (LEVELS == 0) begin : g_none
    assign sum_row   = rows[0];
    assign carry_row = (R > 1) ? rows[R-1] : '0;
  end else begin : g_out
    assign sum_row   = g_lvl[LEVELS-1].nxt[0];
    assign carry_row = g_lvl[LEVELS-1].nxt[1];
  end

endmodule

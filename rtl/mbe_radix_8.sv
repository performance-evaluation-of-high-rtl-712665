// MBE_RADIX_8: registered radix-8 tree based Booth multiplier.
//
// Multiplies two N-bit operands (N = 16 by default), signed when tc = 1 and
// unsigned when tc = 0, into a 2N-bit product. The operands and the mode are
// captured in input registers on a rising clock edge, multiplied by the
// combinational radix-8 Booth / Wallace tree core (r8_tree_multiplier) and the
// product is captured in an output register on the next edge: a new operand
// pair can enter every cycle and its product appears on p two rising edges
// after it was presented. The register-to-register path is the full
// multiplier, so the clock frequency is set by the core.
// With N = 16 the ports are 16 + 16 + 32 data pins plus clk, rst_n and tc.
// The placement of the registers and the asynchronous active-low reset, which
// clears all registers, are this design's choices.
module mbe_radix_8 #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tc,     // 1: signed (two's complement), 0: unsigned
  input  logic [N-1:0]   a,      // multiplicand
  input  logic [N-1:0]   b,      // multiplier
  output logic [2*N-1:0] p       // product, two cycles after a, b, tc
);

  logic           tc_q;
  logic [N-1:0]   a_q, b_q;
  logic [2*N-1:0] p_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tc_q <= 1'b0;
      a_q  <= '0;
      b_q  <= '0;
    end else begin
      tc_q <= tc;
      a_q  <= a;
      b_q  <= b;
    end
  end

  r8_tree_multiplier #(.N(N)) u_core (
    .tc (tc_q),
    .a  (a_q),
    .b  (b_q),
    .p  (p_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= p_d;
  end

endmodule

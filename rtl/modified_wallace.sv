// modified_wallace: N x N unsigned Wallace-tree multiplier (N = 32 by default).
// Three stages, all combinational:
//   1. pp_gen forms the N partial-product rows (AND array);
//   2. csa_tree reduces them with levels of 3:2 carry-save compressors to a
//      sum row and a carry row (multi-operand addition without carry
//      propagation);
//   3. one carry-propagate adder adds the two rows into the 2N-bit product.
// The 64-bit MAC uses four of these as its 32x32 sub-multipliers. The split
// into partial-product generation and multi-operand addition follows the
// design's description; the AND-array rows and the plain row-wise Wallace
// grouping are this implementation's choices.
module modified_wallace #(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] prod
);
  logic [N-1:0][2*N-1:0] pp;
  logic [2*N-1:0]        s_row, c_row;

  pp_gen #(.N(N)) u_ppg (
    .a (a),
    .b (b),
    .pp(pp)
  );

  csa_tree #(.M(N), .W(2*N)) u_moa (
    .ops  (pp),
    .sum  (s_row),
    .carry(c_row)
  );

  assign prod = s_row + c_row;
endmodule

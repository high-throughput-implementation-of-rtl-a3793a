// csa_row: one 3:2 carry-save compressor across a whole row of W bits.
// Each bit position is a full adder: the sum bits stay in place and the
// carry bits move up one position, so x + y + z == sum + carry (mod 2^W).
// Purely combinational. This is the building cell of the multi-operand
// carry-save tree (csa_tree).
module csa_row #(
  parameter int W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  // majority of the three inputs; the carry out of the top bit is dropped
  logic [W-2:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    carry = {maj, 1'b0};
  end
endmodule

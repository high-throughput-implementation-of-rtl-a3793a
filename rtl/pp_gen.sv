// pp_gen: partial-product generation for an unsigned N x N multiply.
// Row i is the multiplicand a gated by multiplier bit b[i] and shifted left
// by i places, in a 2N-bit field: pp[i] = (b[i] ? a : 0) << i. The sum of
// all N rows is a*b. A plain AND array; no Booth recoding is used.
// Purely combinational.
module pp_gen #(
  parameter int N = 32
) (
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  output logic [N-1:0][2*N-1:0]   pp
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = (2*N)'({N{b[i]}} & a) << i;
    end
  end
endmodule

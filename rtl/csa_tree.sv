// csa_tree: multi-operand carry-save adder tree (Wallace tree on whole rows).
// It reduces M operands of W bits to two rows, sum and carry, whose binary
// sum equals the sum of all operands modulo 2^W. Each level groups its rows
// in threes, feeds every group to a 3:2 row compressor (csa_row) and passes
// the one or two leftover rows through, so a level of n rows leaves
// 2*(n/3) + n%3. Levels repeat until two rows remain: 8 levels for M = 32.
// Purely combinational; no carry propagates inside the tree, so its delay
// grows with the number of levels, not with W. The caller adds sum + carry
// in one carry-propagate adder. Rows are packed: operand i is ops[i].
module csa_tree #(
  parameter int M = 32,
  parameter int W = 64
) (
  input  logic [M-1:0][W-1:0] ops,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);
  // rows left after one level of 3:2 compression
  function automatic int next_rows(int n);
    return (n <= 2) ? n : 2 * (n / 3) + n % 3;
  endfunction

  // rows present at level l (level 0 holds the operands)
  function automatic int rows_at(int l);
    int n = M;
    for (int i = 0; i < l; i++) n = next_rows(n);
    return n;
  endfunction

  // number of levels needed to reach two rows
  function automatic int num_levels();
    int n = M, l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int L = num_levels();

  // lvl[l] holds the rows of level l; rows past rows_at(l) are tied to zero
  logic [M-1:0][W-1:0] lvl [L+1];

  assign lvl[0] = ops;

  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int N = rows_at(l);
    localparam int G = N / 3;          // full-adder groups on this level
    localparam int R = N % 3;          // rows passed through

    for (genvar g = 0; g < G; g++) begin : g_csa
      csa_row #(.W(W)) u_row (
        .x    (lvl[l][3*g]),
        .y    (lvl[l][3*g+1]),
        .z    (lvl[l][3*g+2]),
        .sum  (lvl[l+1][2*g]),
        .carry(lvl[l+1][2*g+1])
      );
    end
    for (genvar r = 0; r < R; r++) begin : g_pass
      assign lvl[l+1][2*G+r] = lvl[l][3*G+r];
    end
    for (genvar k = 2 * G + R; k < M; k++) begin : g_zero
      assign lvl[l+1][k] = '0;
    end
  end

  assign sum = lvl[L][0];
  if (M > 1) begin : g_carry
    assign carry = lvl[L][1];
  end else begin : g_no_carry
    assign carry = '0;
  end
endmodule

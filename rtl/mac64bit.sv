// mac64bit: 64-bit multiplier-accumulator. Every clock cycle it forms the
// 128-bit product a*b, adds it to the 129-bit accumulator and stores the
// result, so after n cycles out of reset the accumulator holds
// F = sum(a_i * b_i).
// Structure: wallace_mult64 (four 32x32 Wallace-tree multipliers and two
// combining adders) -> mac_adder (product + accumulator feedback) ->
// accumulator (129-bit PIPO register).
// Interface: a, b are unsigned 64-bit operands; p is the low 128 bits of the
// accumulator and p_carry its bit 128. rst is synchronous and active high.
// Timing: the multiplier and adders are combinational; a and b sampled at a
// rising edge are included in p right after that edge, so one MAC is
// accepted every cycle with a latency of one clock edge.
// The port names and the 64/128/129-bit widths follow the design; the
// p_carry port, the reset style and unsigned operands are this
// implementation's choices.
module mac64bit #(
  parameter int W = 64
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p,
  output logic           p_carry
);
  localparam int PW = 2 * W;
  localparam int AW = 2 * W + 1;

  logic [PW-1:0] prod;
  logic [AW-1:0] acc_d, acc_q;

  wallace_mult64 #(.W(W)) u_mult (
    .a   (a),
    .b   (b),
    .prod(prod)
  );

  mac_adder #(.PW(PW), .AW(AW)) u_add (
    .prod(prod),
    .acc (acc_q),
    .sum (acc_d)
  );

  accumulator #(.AW(AW)) u_acc (
    .clk(clk),
    .rst(rst),
    .d  (acc_d),
    .q  (acc_q)
  );

  assign p       = acc_q[PW-1:0];
  assign p_carry = acc_q[AW-1];
endmodule

// mac_adder: the accumulate adder of the MAC. Adds the PW-bit product to the
// AW-bit accumulator value fed back from the register and returns an AW-bit
// sum (PW = 128, AW = 129: the extra bit keeps the carry out of a 128-bit
// add). Sums beyond AW bits wrap around. Purely combinational.
module mac_adder #(
  parameter int PW = 128,
  parameter int AW = 129
) (
  input  logic [PW-1:0] prod,
  input  logic [AW-1:0] acc,
  output logic [AW-1:0] sum
);
  assign sum = AW'(prod) + acc;
endmodule

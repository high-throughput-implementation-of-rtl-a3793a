// accumulator: AW-bit parallel-in parallel-out register (AW = 129) holding
// the running MAC sum. On each rising clock edge it loads d, or clears to
// zero while rst is high (synchronous, active-high reset; the reset style is
// this implementation's choice). Its output q is both the MAC result and the
// feedback operand of the accumulate adder.
module accumulator #(
  parameter int AW = 129
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule

// wallace_mult64: W x W unsigned multiplier (W = 64) built from four
// W/2 x W/2 modified Wallace multipliers. With a = {aH, aL}, b = {bH, bL}:
//   a*b = (aH*bH << W) + ((aH*bL + aL*bH) << W/2) + aL*bL
// The high and low products do not overlap, so they are simply
// concatenated; one adder forms the (W+1)-bit cross sum aH*bL + aL*bH and a
// second adds it, shifted by W/2, to the concatenation. Purely
// combinational; output is the full 2W-bit product. The four-way split and
// the two combining adders follow the design's schematic; which adder adds
// which partial product is this implementation's reading of it.
module wallace_mult64 #(
  parameter int W = 64
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] prod
);
  localparam int H = W / 2;

  logic [W-1:0]   p_hh, p_hl, p_lh, p_ll;
  logic [W:0]     p_cross;

  modified_wallace #(.N(H)) mw321 (.a(a[W-1:H]), .b(b[H-1:0]), .prod(p_hl));
  modified_wallace #(.N(H)) mw322 (.a(a[H-1:0]), .b(b[W-1:H]), .prod(p_lh));
  modified_wallace #(.N(H)) mw323 (.a(a[H-1:0]), .b(b[H-1:0]), .prod(p_ll));
  modified_wallace #(.N(H)) mw324 (.a(a[W-1:H]), .b(b[W-1:H]), .prod(p_hh));

  // adder 1: sum of the two cross products
  assign p_cross = {1'b0, p_hl} + {1'b0, p_lh};
  // adder 2: place the p_cross sum between the high and low products
  assign prod  = {p_hh, p_ll} + ((2*W)'(p_cross) << H);
endmodule

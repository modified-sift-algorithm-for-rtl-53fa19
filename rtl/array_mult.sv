// array_mult: unsigned combinational array multiplier.
//
// The Gaussian filters use array multipliers instead of generic multipliers.
// This is the textbook array: row r is the multiplicand ANDed with bit r of
// the multiplier, shifted left by r, and the rows are added one after the
// other (a ripple of row adders). The product is purely combinational; the
// caller registers it. The row-by-row structure is this design's reading of
// "array multiplier", which the text names without drawing.
//
// Ports: a (A_W bits) times b (B_W bits) gives p (A_W+B_W bits), no latency.
module array_mult #(
  parameter int A_W = 9,
  parameter int B_W = 11
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);

  // acc[r] is the sum of partial-product rows 0..r-1.
  logic [A_W+B_W-1:0] acc [B_W+1];

  assign acc[0] = '0;

  for (genvar r = 0; r < B_W; r++) begin : g_row
    logic [A_W+B_W-1:0] pp;
    assign pp         = (A_W+B_W)'(a & {A_W{b[r]}}) << r;
    assign acc[r + 1] = acc[r] + pp;
  end

  assign p = acc[B_W];

endmodule

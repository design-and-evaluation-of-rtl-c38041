// csa42_row: CMPRS, a row of W (4:2) compressors. Four W-bit words become a sum
// word and a carry word with a + b + c + d == sum + carry (mod 2^W).
//
// Cell k takes its cin from cell k-1's cout (cell 0 takes 0); the carry word is
// already shifted one place left and the bits leaving position W-1 are dropped,
// which is exact whenever the true total fits in W bits. In the sum-of-squares
// units this row merges the sum/carry pair of the x squarer with that of the y
// squarer, and it also forms the levels of the reduction arrays.
// Purely combinational.
module csa42_row #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] cy;
  logic [W:0]   ci;

  assign ci[0] = 1'b0;

  for (genvar k = 0; k < W; k++) begin : g_cmp
    comp42 u_cmp (
      .x1(a[k]), .x2(b[k]), .x3(c[k]), .x4(d[k]), .cin(ci[k]),
      .sum(sum[k]), .carry(cy[k]), .cout(ci[k+1])
    );
  end

  // Both cout and carry have weight 2; cout already went into the next cell.
  assign carry = {cy[W-2:0], 1'b0};
endmodule

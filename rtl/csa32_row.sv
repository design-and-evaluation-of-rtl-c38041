// csa32_row: a row of W (3:2) counters. Three W-bit words become a sum word and
// a carry word with a + b + c == sum + carry (mod 2^W); the carry word is
// already shifted one place left, its bit 0 is zero and the carry out of bit
// W-1 is dropped. Used by the reduction arrays when three rows are left over.
// Purely combinational.
module csa32_row #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] co;

  for (genvar k = 0; k < W; k++) begin : g_fa
    counter32 u_fa (.a(a[k]), .b(b[k]), .c(c[k]), .s(sum[k]), .co(co[k]));
  end

  assign carry = {co[W-2:0], 1'b0};
endmodule

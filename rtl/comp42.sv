// comp42: (4:2) compressor cell, the building block of the reduction arrays and
// of the CMPRS stage that merges the two squarers' carry-save results.
//
// Five inputs of weight 1 (x1..x4 and cin from the neighbouring cell) are
// reduced to sum (weight 1) and carry, cout (both weight 2):
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// cout does not depend on cin, so a row of these cells has no ripple path.
// The cell is built from two (3:2) counters, the usual construction; the
// published design only names the cell. Purely combinational.
module comp42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  counter32 u_fa1 (.a(x1), .b(x2), .c(x3),  .s(s1),  .co(cout));
  counter32 u_fa2 (.a(s1), .b(x4), .c(cin), .s(sum), .co(carry));
endmodule

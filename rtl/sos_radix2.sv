// sos_radix2: sum of two squares, s = x^2 + y^2, of N-bit unsigned magnitudes,
// built on radix-2 folding squarers.
//
// Dataflow: each operand has its own GEN-Ps (r2_gen_ps, the folded bit array)
// and RA (reduce_tree, down to a sum and a carry word). CMPRS (one row of (4:2)
// compressors) merges the four words into one carry-save pair, which is brought
// out as cs_sum/cs_carry for a following unit that accepts redundant input
// (e.g. a square root). FAs (final_adder: LSB and MSB halves, Kogge-Stone by
// default) produce the binary result. All words are W = 2N+1 bits, enough for
// 2*(2^N-1)^2, so the modular carry-save arithmetic is exact.
// Interface: x, y in; sos and the carry-save pair out (cs_sum + cs_carry ==
// sos mod 2^W). Timing: purely combinational, no clock, result valid one
// combinational delay after the inputs settle. The dataflow follows the published design;
// the word widths and the packing of the arrays are this design's.
module sos_radix2
  import sos_pkg::*;
#(
  parameter int unsigned N    = 24,
  parameter adder_topo_e TOPO = KOGGE_STONE
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N:0]   sos,
  output logic [2*N:0]   cs_sum,
  output logic [2*N:0]   cs_carry
);
  localparam int unsigned W    = 2 * N + 1;
  localparam int unsigned ROWS = r2_rows(N);

  logic [ROWS-1:0][W-1:0] x_rows, y_rows;
  logic [W-1:0]           xs, xc, ys, yc;
  logic                   unused_cout;

  r2_gen_ps #(.N(N), .WO(W), .ROWS(ROWS)) u_gen_x (.x(x), .rows(x_rows));
  r2_gen_ps #(.N(N), .WO(W), .ROWS(ROWS)) u_gen_y (.x(y), .rows(y_rows));

  reduce_tree #(.ROWS(ROWS), .W(W)) u_ra_x (.rows(x_rows), .sum(xs), .carry(xc));
  reduce_tree #(.ROWS(ROWS), .W(W)) u_ra_y (.rows(y_rows), .sum(ys), .carry(yc));

  csa42_row #(.W(W)) u_cmprs (
    .a(xs), .b(xc), .c(ys), .d(yc), .sum(cs_sum), .carry(cs_carry)
  );

  final_adder #(.W(W), .TOPO(TOPO)) u_fa (
    .a(cs_sum), .b(cs_carry), .s(sos), .cout(unused_cout)
  );
endmodule

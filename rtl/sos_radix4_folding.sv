// sos_radix4_folding: sum of two squares, s = x^2 + y^2, of N-bit two's
// complement operands, built on radix-4 Booth folding squarers.
//
// Dataflow per operand: R4BR (booth_r4_recoder) recodes it into M = ceil(N/2)
// digits; r4f_gen_p forms the folded partial squares P_i and the digit squares
// C_i (GEN-W, GEN-C, SHF-CMP, GEN-P) as a bit array of R = r4_rows(N, 1) rows
// (7 for N = 24); RA (reduce_tree) reduces them to a carry-save pair. CMPRS ((4:2) compressor row) merges the two pairs and
// FAs (final_adder, split LSB/MSB, Kogge-Stone by default) produce the binary
// sum. W = 2N bits holds 2*(2^(N-1))^2 = 2^(2N-1).
// Interface: x, y in; sos and its carry-save form (cs_sum + cs_carry == sos
// mod 2^W) out. Timing: purely combinational. The dataflow follows the published design;
// widths, sign handling and row packing are this design's.
module sos_radix4_folding
  import sos_pkg::*;
#(
  parameter int unsigned N    = 24,
  parameter adder_topo_e TOPO = KOGGE_STONE
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] sos,
  output logic [2*N-1:0] cs_sum,
  output logic [2*N-1:0] cs_carry
);
  localparam int unsigned W = 2 * N;
  localparam int unsigned M = booth_digits(N);
  localparam int unsigned R = r4_rows(N, 1'b1);

  booth_digit_t [M-1:0] x_dig, y_dig;
  logic [R-1:0][W-1:0]  x_rows, y_rows;
  logic [W-1:0]         xs, xc, ys, yc;
  logic                 unused_cout;

  booth_r4_recoder #(.N(N)) u_r4br_x (.x(x), .digit(x_dig));
  booth_r4_recoder #(.N(N)) u_r4br_y (.x(y), .digit(y_dig));

  r4f_gen_p #(.N(N), .WO(W)) u_gen_x (.x(x), .digit(x_dig), .rows(x_rows));
  r4f_gen_p #(.N(N), .WO(W)) u_gen_y (.x(y), .digit(y_dig), .rows(y_rows));

  reduce_tree #(.ROWS(R), .W(W)) u_ra_x (.rows(x_rows), .sum(xs), .carry(xc));
  reduce_tree #(.ROWS(R), .W(W)) u_ra_y (.rows(y_rows), .sum(ys), .carry(yc));

  csa42_row #(.W(W)) u_cmprs (
    .a(xs), .b(xc), .c(ys), .d(yc), .sum(cs_sum), .carry(cs_carry)
  );

  final_adder #(.W(W), .TOPO(TOPO)) u_fa (
    .a(cs_sum), .b(cs_carry), .s(sos), .cout(unused_cout)
  );
endmodule

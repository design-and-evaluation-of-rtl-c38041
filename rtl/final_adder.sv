// final_adder: FAs, the carry-propagate adder that turns the carry-save result
// of a sum-of-squares unit into one binary number.
//
// The W-bit operands are split into a low half of WL = W/2 bits and a high
// half of W-WL bits, each summed by its own parallel-prefix adder (Kogge-Stone
// by default, the choice the published comparison found best). The high adder takes
// the low adder's carry out as its carry in. s = a + b (mod 2^W); cout is the
// carry out of bit W-1. How the two halves are joined is not given by the
// published design; passing the carry is this design's choice. Purely combinational.
module final_adder
  import sos_pkg::*;
#(
  parameter int unsigned W    = 49,
  parameter adder_topo_e TOPO = KOGGE_STONE
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned WL = W / 2;
  localparam int unsigned WH = W - WL;

  logic c_mid;

  prefix_adder #(.W(WL), .TOPO(TOPO)) u_lsb (
    .a(a[WL-1:0]), .b(b[WL-1:0]), .cin(1'b0),
    .s(s[WL-1:0]), .cout(c_mid)
  );

  prefix_adder #(.W(WH), .TOPO(TOPO)) u_msb (
    .a(a[W-1:WL]), .b(b[W-1:WL]), .cin(c_mid),
    .s(s[W-1:WL]), .cout(cout)
  );
endmodule

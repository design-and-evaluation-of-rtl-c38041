// sos_top: the three sum-of-squares units side by side, each with its own
// operands and results, so that they can be compared on the same inputs.
//
//   r2_*   radix-2 folding (sos_radix2):          unsigned N-bit x, y
//   r4f_*  radix-4 Booth folding:                 two's complement N-bit x, y
//   r4d_*  radix-4 dual recoding:                 two's complement N-bit x, y
//
// Each unit returns x^2 + y^2 in binary (*_sos) and in the carry-save form that
// precedes its final adder (*_cs_sum + *_cs_carry == *_sos modulo the output
// width), for use by a following unit that accepts redundant operands. All
// three are purely combinational. N defaults to 24 bits, the operand size the
// comparison concentrates on; 16 and 32 were also evaluated. TOPO selects the
// prefix network of all final adders (Kogge-Stone by default).
module sos_top
  import sos_pkg::*;
#(
  parameter int unsigned N    = 24,
  parameter adder_topo_e TOPO = KOGGE_STONE
) (
  input  logic [N-1:0]   r2_x,
  input  logic [N-1:0]   r2_y,
  output logic [2*N:0]   r2_sos,
  output logic [2*N:0]   r2_cs_sum,
  output logic [2*N:0]   r2_cs_carry,

  input  logic [N-1:0]   r4f_x,
  input  logic [N-1:0]   r4f_y,
  output logic [2*N-1:0] r4f_sos,
  output logic [2*N-1:0] r4f_cs_sum,
  output logic [2*N-1:0] r4f_cs_carry,

  input  logic [N-1:0]   r4d_x,
  input  logic [N-1:0]   r4d_y,
  output logic [2*N-1:0] r4d_sos,
  output logic [2*N-1:0] r4d_cs_sum,
  output logic [2*N-1:0] r4d_cs_carry
);
  sos_radix2 #(.N(N), .TOPO(TOPO)) u_radix2 (
    .x(r2_x), .y(r2_y), .sos(r2_sos), .cs_sum(r2_cs_sum), .cs_carry(r2_cs_carry)
  );

  sos_radix4_folding #(.N(N), .TOPO(TOPO)) u_radix4_folding (
    .x(r4f_x), .y(r4f_y), .sos(r4f_sos), .cs_sum(r4f_cs_sum), .cs_carry(r4f_cs_carry)
  );

  sos_radix4_dual #(.N(N), .TOPO(TOPO)) u_radix4_dual (
    .x(r4d_x), .y(r4d_y), .sos(r4d_sos), .cs_sum(r4d_cs_sum), .cs_carry(r4d_cs_carry)
  );
endmodule

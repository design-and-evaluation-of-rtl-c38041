// counter32: (3:2) counter, i.e. a full adder. Reduces three bits of equal
// weight to a sum bit of the same weight and a carry bit of twice the weight.
// Purely combinational.
module counter32 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end
endmodule

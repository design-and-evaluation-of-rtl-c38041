// booth_r4_recoder: R4BR, radix-4 Booth recoding of an N-bit two's complement
// operand into M = ceil(N/2) digits X_i = -2*b_{2i+1} + b_{2i} + b_{2i-1},
// with b_{-1} = 0 (an odd N is sign-extended by one bit).
//
// Each digit leaves in the sign / one-hot-magnitude form of the recoder truth
// table: n (negative), d1 (|X_i| = 2), d2 (|X_i| = 1). The all-ones triplet is
// the digit 0 with n = 0. Both radix-4 squarers use this block.
// Purely combinational.
module booth_r4_recoder
  import sos_pkg::*;
#(
  parameter int unsigned N = 24,
  parameter int unsigned M = booth_digits(N)
) (
  input  logic [N-1:0]         x,
  output booth_digit_t [M-1:0] digit
);
  logic [2*M-1:0] xs;  // x sign-extended to an even width
  logic [2*M:0]   xe;  // {xs, b_{-1} = 0}

  assign xs = (2*M)'(signed'(x));
  assign xe = {xs, 1'b0};

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      logic bm1, b0, b1;
      bm1 = xe[2*i];      // b_{2i-1}
      b0  = xe[2*i+1];    // b_{2i}
      b1  = xe[2*i+2];    // b_{2i+1}
      digit[i].n  = b1 & ~(b0 & bm1);
      digit[i].d1 = (b1 & ~b0 & ~bm1) | (~b1 & b0 & bm1);
      digit[i].d2 = b0 ^ bm1;
    end
  end
endmodule

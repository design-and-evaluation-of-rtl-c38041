// r4f_shf_cmp: SHF-CMP of the radix-4 folding squarer, one per Booth digit.
// Multiplies the folded multiplicand W_i by the digit X_i, giving the partial
// square P_i = X_i * (W_i + b_{2i+1}) of the folding scheme.
//
// w is W_i sign-extended to WO bits. For a non-negative digit the product is
// |X_i| * W_i. A negative digit occurs only with b_{2i+1} = 1, and then
// X_i * (W_i + 1) = |X_i| * (-W_i - 1) = |X_i| * ~W_i, so negation is a plain
// bitwise complement with no +1 to inject. Alignment (x2) is a one-place shift.
// The result is exact modulo 2^WO. Deriving the complement rule this way is this
// design's reading of the folding identity. Purely combinational.
module r4f_shf_cmp
  import sos_pkg::*;
#(
  parameter int unsigned WO = 48
) (
  input  logic [WO-1:0] w,
  input  booth_digit_t  digit,
  output logic [WO-1:0] p
);
  logic [WO-1:0] wc;

  assign wc = w ^ {WO{digit.n}};

  always_comb begin
    if (digit.d1)      p = {wc[WO-2:0], 1'b0};
    else if (digit.d2) p = wc;
    else               p = '0;
  end
endmodule

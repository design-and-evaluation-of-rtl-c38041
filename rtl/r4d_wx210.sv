// r4d_wx210: one partial square of the radix-4 dual recoding squarer: the dual
// encoder (DE) for digit I and its row of wired multiplication cells (Wx210).
//
// With X_I the Booth digit and L_I = sum_{j<I} X_j 4^j the recoded tail, the
// partial square is X_I * q_I * 4^I with squarand q_I = X_I*4^I + 2*L_I. The
// dual encoder forms q_I by wiring alone: as a (2I+2)-bit two's complement
// string it is {b_{2I+1}, b_{2I}, b_{2I-2}, ..., b_0, 0}, i.e. the low bits of
// x moved up one place with b_{2I-1} dropped. It has the same value as the
// complemented-tail squarand of the published scheme. Each wired
// multiplication cell selects Q_j (|X_I| = 1) or Q_{j-1} (|X_I| = 2,
// Q_{-1} = 0) and inverts it when X_I is negative; the +1 of that two's
// complement is the inversion bit, added by r4d_gen_array.
// row = (|X_I| * q_I, inverted if negative) << 2I, modulo 2^WO.
// Purely combinational.
module r4d_wx210
  import sos_pkg::*;
#(
  parameter int unsigned N  = 24,
  parameter int unsigned WO = 2 * N,
  parameter int unsigned I  = 1
) (
  input  logic [N-1:0]  x,
  input  booth_digit_t  digit,
  output logic [WO-1:0] row
);
  localparam int unsigned NB = 2 * booth_digits(N);

  logic [NB-1:0] xs;
  logic [WO-1:0] q;

  assign xs = NB'(signed'(x));

  // DE: dual-encoded squarand, sign-extended to WO bits
  always_comb begin
    for (int k = 0; k < int'(WO); k++) begin
      if (k < 2 * int'(I))       q[k] = (k == 0) ? 1'b0 : xs[k-1];
      else if (k == 2 * int'(I)) q[k] = xs[2*I];
      else                       q[k] = xs[2*I+1];
    end
  end

  // Wx210: wired multiplication
  always_comb begin
    row = '0;
    for (int unsigned j = 0; j + 2 * I < WO; j++) begin
      logic qm1;
      qm1 = (j == 0) ? 1'b0 : q[j-1];
      row[j+2*I] = ((digit.d2 & q[j]) | (digit.d1 & qm1)) ^ digit.n;
    end
  end
endmodule

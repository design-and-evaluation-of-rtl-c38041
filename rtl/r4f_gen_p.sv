// r4f_gen_p: partial-square array of the radix-4 folding squarer, holding the
// GEN-W, GEN-C, SHF-CMP and GEN-P steps. With X_i the M Booth digits of x,
//   x^2 = sum_i (8*P_i + C_i) * 16^i,
//   C_i = X_i^2 in {0, 1, 4},
//   P_i = X_i * (W_i + b_{2i+1}),  W_i = x >>> (2i+2)  (bits above digit i).
// GEN-W is the arithmetic shift, SHF-CMP (r4f_shf_cmp) forms P_i and GEN-C
// forms C_i. GEN-P places the terms in a bit array: P_i (i < M-1; P_{M-1} is
// always zero) is a k = 2M-2i-1 bit two's complement field at column 4i+3,
// and C_i puts one bit in column 4i or 4i+2. Sign extension is avoided: the
// sign bit of each P_i field is inverted and the constant
// -sum 2^(4i+3+k-1) (sos_pkg::r4_const) is injected as one-bits. Row r of
// the output holds the r-th bit of each column, so the array has
// ROWS = sos_pkg::r4_rows(N, 1) rows (7 for N = 24, against 12 for the
// radix-2 array). The rows add up to x^2 modulo 2^WO.
// The identities follow the published scheme, as do the injected
// constants; the sign-inversion form of those constants and the packing order
// are this design's. Purely combinational.
module r4f_gen_p
  import sos_pkg::*;
#(
  parameter int unsigned N    = 24,
  parameter int unsigned WO   = 2 * N,
  parameter int unsigned M    = booth_digits(N),
  parameter int unsigned ROWS = r4_rows(N, 1'b1)
) (
  input  logic [N-1:0]            x,
  input  booth_digit_t [M-1:0]    digit,
  output logic [ROWS-1:0][WO-1:0] rows
);
  localparam logic [255:0] KFULL = r4_const(N, 1'b1);

  logic signed [WO-1:0]       xw;
  logic [M-1:0][WO-1:0]       p;   // P_i, sign-extended to WO bits

  assign xw    = WO'(signed'(x));
  assign p[M-1] = '0;

  for (genvar i = 0; i < M - 1; i++) begin : g_p
    logic [WO-1:0] w_i;

    assign w_i = xw >>> (2 * i + 2);   // GEN-W

    r4f_shf_cmp #(.WO(WO)) u_shf_cmp (.w(w_i), .digit(digit[i]), .p(p[i]));
  end

  // GEN-P (with GEN-C): place every bit in the next free row of its column
  always_comb begin
    int unsigned cnt [WO];
    int unsigned o, k;
    rows = '0;
    for (int unsigned c = 0; c < WO; c++) cnt[c] = 0;
    for (int unsigned i = 0; i < M; i++) begin
      if (i + 1 < M) begin
        o = r4f_offset(i);
        k = r4f_width(N, i);
        for (int unsigned j = 0; j < k; j++) begin
          if (o + j < WO) begin
            rows[cnt[o+j]][o+j] = (j + 1 == k) ? ~p[i][j] : p[i][j];
            cnt[o+j]++;
          end
        end
      end
      rows[cnt[4*i]][4*i] = digit[i].d2;      // C_i = 1
      cnt[4*i]++;
      if (4 * i + 2 < WO) begin
        rows[cnt[4*i+2]][4*i+2] = digit[i].d1; // C_i = 4
        cnt[4*i+2]++;
      end
    end
    for (int unsigned c = 0; c < WO; c++) begin
      if (KFULL[c]) begin
        rows[cnt[c]][c] = 1'b1;
        cnt[c]++;
      end
    end
  end
endmodule

// r4d_gen_array: partial-square array of the radix-4 dual recoding squarer,
//   x^2 = sum_i X_i * q_i * 4^i,   q_i = X_i*4^i + 2*sum_{j<i} X_j 4^j,
// for the M Booth digits X_i of x. Each r4d_wx210 (dual encoder plus wired
// multiplication) gives partial square i as a 2i+3 bit two's complement field
// at column 2i, complemented when X_i is negative. The inversion bit (IB), the
// sign n_i of digit i, goes into column 2i and completes that complement.
// Sign extension is avoided: the sign bit of each field is inverted and the
// constant -sum 2^(4i+2) (sos_pkg::r4_const) is injected as one-bits. Row r of
// the output holds the r-th bit of each column, so the array has
// ROWS = sos_pkg::r4_rows(N, 0) rows (8 for N = 24). The rows add up to x^2
// modulo 2^WO. The decomposition, cells and inversion bits follow
// the published scheme; the sign constant and the packing order are this design's.
// Purely combinational.
module r4d_gen_array
  import sos_pkg::*;
#(
  parameter int unsigned N    = 24,
  parameter int unsigned WO   = 2 * N,
  parameter int unsigned M    = booth_digits(N),
  parameter int unsigned ROWS = r4_rows(N, 1'b0)
) (
  input  logic [N-1:0]            x,
  input  booth_digit_t [M-1:0]    digit,
  output logic [ROWS-1:0][WO-1:0] rows
);
  localparam logic [255:0] KFULL = r4_const(N, 1'b0);

  logic [M-1:0][WO-1:0] pp;   // partial squares, sign-extended, already shifted

  for (genvar i = 0; i < M; i++) begin : g_wx
    r4d_wx210 #(.N(N), .WO(WO), .I(i)) u_wx (
      .x(x), .digit(digit[i]), .row(pp[i])
    );
  end

  // place every bit in the next free row of its column
  always_comb begin
    int unsigned cnt [WO];
    int unsigned o, k;
    rows = '0;
    for (int unsigned c = 0; c < WO; c++) cnt[c] = 0;
    for (int unsigned i = 0; i < M; i++) begin
      o = r4d_offset(i);
      k = r4d_width(i);
      for (int unsigned j = 0; j < k; j++) begin
        if (o + j < WO) begin
          rows[cnt[o+j]][o+j] = (j + 1 == k) ? ~pp[i][o+j] : pp[i][o+j];
          cnt[o+j]++;
        end
      end
      // IB: inversion bit
      rows[cnt[o]][o] = digit[i].n;
      cnt[o]++;
    end
    for (int unsigned c = 0; c < WO; c++) begin
      if (KFULL[c]) begin
        rows[cnt[c]][c] = 1'b1;
        cnt[c]++;
      end
    end
  end
endmodule

// r2_gen_ps: GEN-Ps of the radix-2 folding squarer. Forms the folded bit array
// of x*x for an N-bit magnitude x and packs it into ROWS words of WO bits, so
// that the rows add up to x*x.
//
// The array uses x_i*x_i = x_i and x_i*x_j + x_j*x_i = 2*x_i*x_j, leaving the
// diagonal bits and one triangle shifted one place left. The diagonal bit x_i
// (column 2i) and the pair term x_{i-1}*x_i (also column 2i) are then replaced
// by x_{i-1}'*x_i in column 2i and x_{i-1}*x_i in column 2i+1. The remaining
// terms x_i*x_j, j >= i+2, sit in column i+j+1. Row r holds the r-th bit of
// every column, so ROWS is the tallest column (sos_pkg::r2_rows). The
// identities follow the published scheme; the packing order is this design's.
// Purely combinational.
module r2_gen_ps
  import sos_pkg::*;
#(
  parameter int unsigned N    = 24,
  parameter int unsigned WO   = 2 * N,
  parameter int unsigned ROWS = r2_rows(N)
) (
  input  logic [N-1:0]            x,
  output logic [ROWS-1:0][WO-1:0] rows
);
  always_comb begin
    int unsigned cnt [WO];
    rows = '0;
    for (int unsigned c = 0; c < WO; c++) cnt[c] = 0;
    // column 0: the diagonal bit x_0 alone
    rows[cnt[0]][0] = x[0];
    cnt[0]++;
    // columns 2i, 2i+1: diagonal x_i merged with the pair term x_{i-1} x_i
    for (int unsigned i = 1; i < N; i++) begin
      rows[cnt[2*i]][2*i] = ~x[i-1] & x[i];
      cnt[2*i]++;
      rows[cnt[2*i+1]][2*i+1] = x[i-1] & x[i];
      cnt[2*i+1]++;
    end
    // remaining off-diagonal terms, doubled, in column i+j+1
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = i + 2; j < N; j++) begin
        rows[cnt[i+j+1]][i+j+1] = x[i] & x[j];
        cnt[i+j+1]++;
      end
  end
endmodule

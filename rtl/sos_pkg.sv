// sos_pkg: types and elaboration-time helpers shared by the sum-of-squares units.
//
// adder_topo_e selects the parallel-prefix network of the carry-lookahead final
// adders (Kogge-Stone, Brent-Kung, Sklansky). booth_digit_t is one radix-4 Booth
// digit in the sign/one-hot-magnitude form of the recoder's truth table: n is the
// sign, d1 selects magnitude 2, d2 selects magnitude 1. The functions give array
// sizes that the partial-square generators and reduction trees agree on.
package sos_pkg;

  typedef enum logic [1:0] {
    KOGGE_STONE = 2'd0,
    BRENT_KUNG  = 2'd1,
    SKLANSKY    = 2'd2
  } adder_topo_e;

  typedef struct packed {
    logic n;   // digit is negative
    logic d1;  // |digit| == 2
    logic d2;  // |digit| == 1
  } booth_digit_t;

  // Number of radix-4 Booth digits of an n-bit two's complement operand.
  function automatic int unsigned booth_digits(input int unsigned n);
    return (n + 1) / 2;
  endfunction

  // Tallest column of the folded radix-2 partial-square array of an n-bit
  // magnitude; this is the number of rows the array is packed into.
  function automatic int unsigned r2_rows(input int unsigned n);
    int unsigned h [256];
    int unsigned mx;
    for (int c = 0; c < 256; c++) h[c] = 0;
    h[0]++;
    for (int unsigned i = 1; i < n; i++) begin
      h[2*i]++;
      h[2*i+1]++;
    end
    for (int unsigned i = 0; i < n; i++)
      for (int unsigned j = i + 2; j < n; j++)
        h[i+j+1]++;
    mx = 1;
    for (int c = 0; c < 256; c++) if (h[c] > mx) mx = h[c];
    return mx;
  endfunction

  // Radix-4 arrays. Every partial square is a two's complement field of k bits
  // at column offset o. Instead of sign-extending it, its sign bit is inverted
  // and -2^(o+k-1) is added; the sum of those terms is one constant word whose
  // one-bits are injected into the array. The functions below give the fields,
  // the constant and the resulting array height; the generators place their
  // bits in exactly this order.

  // Folding array, partial square P_i (i < M-1): width and offset.
  function automatic int unsigned r4f_width(input int unsigned n, input int unsigned i);
    return 2 * booth_digits(n) - 2 * i - 1;
  endfunction
  function automatic int unsigned r4f_offset(input int unsigned i);
    return 4 * i + 3;
  endfunction

  // Dual recoding array, partial square i (i < M): width and offset.
  function automatic int unsigned r4d_width(input int unsigned i);
    return 2 * i + 3;
  endfunction
  function automatic int unsigned r4d_offset(input int unsigned i);
    return 2 * i;
  endfunction

  // Sign constant of the folding (fold = 1) or dual recoding (fold = 0) array
  // of an n-bit operand, modulo 2^(2n).
  function automatic logic [255:0] r4_const(input int unsigned n, input bit fold);
    logic [255:0] k;
    int unsigned  m, top;
    m = booth_digits(n);
    k = '0;
    for (int unsigned i = 0; i < m; i++) begin
      if (fold && i + 1 < m) begin
        top = r4f_offset(i) + r4f_width(n, i) - 1;
        if (top < 2 * n) k = k - (256'd1 << top);
      end else if (!fold) begin
        top = r4d_offset(i) + r4d_width(i) - 1;
        if (top < 2 * n) k = k - (256'd1 << top);
      end
    end
    for (int unsigned c = 2 * n; c < 256; c++) k[c] = 1'b0;
    return k;
  endfunction

  // Tallest column of the radix-4 folding (fold = 1) or dual recoding
  // (fold = 0) array of an n-bit operand: the number of rows it is packed into.
  function automatic int unsigned r4_rows(input int unsigned n, input bit fold);
    int unsigned  h [256];
    int unsigned  m, mx, wo;
    logic [255:0] k;
    m  = booth_digits(n);
    wo = 2 * n;
    k  = r4_const(n, fold);
    for (int c = 0; c < 256; c++) h[c] = 0;
    for (int unsigned i = 0; i < m; i++) begin
      if (fold) begin
        if (i + 1 < m)
          for (int unsigned j = 0; j < r4f_width(n, i); j++)
            if (r4f_offset(i) + j < wo) h[r4f_offset(i) + j]++;
        h[4*i]++;                      // C_i, magnitude 1
        if (4 * i + 2 < wo) h[4*i+2]++; // C_i, magnitude 2
      end else begin
        for (int unsigned j = 0; j < r4d_width(i); j++)
          if (r4d_offset(i) + j < wo) h[r4d_offset(i) + j]++;
        h[2*i]++;                      // inversion bit
      end
    end
    for (int unsigned c = 0; c < wo; c++) if (k[c]) h[c]++;
    mx = 1;
    for (int c = 0; c < 256; c++) if (h[c] > mx) mx = h[c];
    return mx;
  endfunction

  // Ceiling of log2, at least 1.
  function automatic int unsigned clog2_min1(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((1 << r) < v) r++;
    return (r == 0) ? 1 : r;
  endfunction

endpackage

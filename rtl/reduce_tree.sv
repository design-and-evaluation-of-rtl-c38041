// reduce_tree: RA, the reduction array of a squarer. ROWS words of W bits
// (the partial-square array, one bit-array row per word, zeros where a row has
// no bit) are reduced to one sum and one carry word:
//   sum + carry == rows[0] + ... + rows[ROWS-1]   (mod 2^W).
//
// Each level takes the rows four at a time through a row of (4:2) compressors;
// three left-over rows go through a row of (3:2) counters and one or two pass
// to the next level unchanged, until two rows remain (three levels for twelve
// rows: 12, 6, 4, 2). Bit positions
// where an input row is constant zero shrink to (2:2) counters (half adders)
// when the logic is synthesized. The published design gives the reduction only as
// figures with the cell types; this level order is this design's own choice.
// Purely combinational.
module reduce_tree #(
  parameter int unsigned ROWS = 12,
  parameter int unsigned W    = 48
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);
  // Rows left after one level applied to r rows.
  function automatic int unsigned next_rows(input int unsigned r);
    return (r <= 2) ? r : 2 * (r / 4) + ((r % 4 == 3) ? 2 : r % 4);
  endfunction

  // Rows present at level l (level 0 is the input array).
  function automatic int unsigned rows_at(input int unsigned l);
    int unsigned r;
    r = ROWS;
    for (int unsigned k = 0; k < l; k++) r = next_rows(r);
    return r;
  endfunction

  // Number of levels until at most two rows remain.
  function automatic int unsigned num_levels();
    int unsigned r, n;
    r = ROWS;
    n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned NLVL = num_levels();

  // stage[l] holds the rows of level l; rows beyond rows_at(l) are zero.
  logic [NLVL:0][ROWS-1:0][W-1:0] stage;

  assign stage[0] = rows;

  for (genvar l = 0; l < NLVL; l++) begin : g_level
    localparam int unsigned R   = rows_at(l);
    localparam int unsigned G4  = R / 4;
    localparam int unsigned REM = R % 4;
    localparam int unsigned NXT = next_rows(R);

    for (genvar g = 0; g < G4; g++) begin : g_c42
      csa42_row #(.W(W)) u_c42 (
        .a(stage[l][4*g]), .b(stage[l][4*g+1]),
        .c(stage[l][4*g+2]), .d(stage[l][4*g+3]),
        .sum(stage[l+1][2*g]), .carry(stage[l+1][2*g+1])
      );
    end

    if (REM == 3) begin : g_c32
      csa32_row #(.W(W)) u_c32 (
        .a(stage[l][4*G4]), .b(stage[l][4*G4+1]), .c(stage[l][4*G4+2]),
        .sum(stage[l+1][2*G4]), .carry(stage[l+1][2*G4+1])
      );
    end else if (REM == 2) begin : g_pass2
      assign stage[l+1][2*G4]   = stage[l][4*G4];
      assign stage[l+1][2*G4+1] = stage[l][4*G4+1];
    end else if (REM == 1) begin : g_pass1
      assign stage[l+1][2*G4] = stage[l][4*G4];
    end

    for (genvar r = NXT; r < ROWS; r++) begin : g_zero
      assign stage[l+1][r] = '0;
    end
  end

  if (rows_at(NLVL) == 1) begin : g_one
    assign sum   = stage[NLVL][0];
    assign carry = '0;
  end else begin : g_two
    assign sum   = stage[NLVL][0];
    assign carry = stage[NLVL][1];
  end
endmodule

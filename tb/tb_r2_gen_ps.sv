// tb_r2_gen_ps: checks the folded radix-2 partial-square array. The rows must
// add up to x*x: exhaustively for 8-bit x and randomly for the default 24 bits.
// It also checks the 6-bit array height against the count worked out by hand
// from the folding identities (3 rows: columns 5..7 hold three bits each).
module tb_r2_gen_ps;
  import sos_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned R8  = r2_rows(8);
  localparam int unsigned R24 = r2_rows(24);

  logic [7:0]             x8;
  logic [23:0]            x24;
  logic [R8-1:0][15:0]    rows8;
  logic [R24-1:0][47:0]   rows24;

  r2_gen_ps #(.N(8))  u8  (.x(x8),  .rows(rows8));
  r2_gen_ps           u24 (.x(x24), .rows(rows24));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (r2_rows(6) != 3) begin
      failures++;
      $display("FAIL r2_rows(6)=%0d, expected 3", r2_rows(6));
    end
    for (int v = 0; v < 256; v++) begin
      logic [15:0] acc;
      x8 = v[7:0];
      @(posedge clk);
      acc = '0;
      for (int r = 0; r < int'(R8); r++) acc += rows8[r];
      checks++;
      if (acc != 16'(v * v)) begin
        failures++;
        $display("FAIL n=8 x=%0d sum of rows=%0d", v, acc);
      end
    end
    for (int t = 0; t < 1000; t++) begin
      logic [47:0] acc, want;
      x24 = (t == 0) ? 24'hFFFFFF : 24'($urandom);
      @(posedge clk);
      acc = '0;
      for (int r = 0; r < int'(R24); r++) acc += rows24[r];
      want = 48'(x24) * 48'(x24);
      checks++;
      if (acc != want) begin
        failures++;
        $display("FAIL n=24 x=%h sum of rows=%h want=%h", x24, acc, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

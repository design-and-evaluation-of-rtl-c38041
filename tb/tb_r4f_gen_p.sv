// tb_r4f_gen_p: checks the radix-4 folding partial-square array (GEN-W,
// GEN-C, SHF-CMP, GEN-P, sign constant). Digits come from the Booth recoder.
// The rows must add up to x^2 modulo 2^(2N): exhaustively for 8-bit and randomly for 24-bit
// two's complement x. The array heights (3 rows at 8 bits, 7 at 24) are
// checked against values worked out by hand.
module tb_r4f_gen_p;
  import sos_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned R8  = r4_rows(8, 1'b1);
  localparam int unsigned R24 = r4_rows(24, 1'b1);

  logic [7:0]  x8;
  logic [23:0] x24;
  booth_digit_t [3:0]  d8;
  booth_digit_t [11:0] d24;
  logic [R8-1:0][15:0]  rows8;
  logic [R24-1:0][47:0] rows24;

  booth_r4_recoder #(.N(8)) r8  (.x(x8),  .digit(d8));
  booth_r4_recoder          r24 (.x(x24), .digit(d24));
  r4f_gen_p #(.N(8)) u8  (.x(x8),  .digit(d8),  .rows(rows8));
  r4f_gen_p          u24 (.x(x24), .digit(d24), .rows(rows24));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // array heights worked out by hand from the field widths and offsets
    checks++;
    if (R8 != 3 || R24 != 7) begin
      failures++;
      $display("FAIL array height n=8: %0d (want 3), n=24: %0d (want 7)", R8, R24);
    end
    for (int v = 0; v < 256; v++) begin
      logic [15:0] acc, want;
      x8 = v[7:0];
      @(posedge clk);
      acc = '0;
      for (int r = 0; r < int'(R8); r++) acc += rows8[r];
      want = 16'(int'($signed(x8)) * int'($signed(x8)));
      checks++;
      if (acc != want) begin
        failures++;
        $display("FAIL n=8 x=%0d sum of rows=%h want=%h", $signed(x8), acc, want);
      end
    end
    for (int t = 0; t < 1000; t++) begin
      logic [47:0] acc, want;
      x24 = (t == 0) ? 24'h800000 : (t == 1) ? 24'h7FFFFF : 24'($urandom);
      @(posedge clk);
      acc = '0;
      for (int r = 0; r < int'(R24); r++) acc += rows24[r];
      want = 48'(longint'($signed(x24)) * longint'($signed(x24)));
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

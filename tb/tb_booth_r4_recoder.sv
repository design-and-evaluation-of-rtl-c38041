// tb_booth_r4_recoder: checks the radix-4 Booth recoder. Exhaustively for 8-bit
// and 7-bit (odd, sign-extended) operands, and randomly at 24 bits: every digit
// is well formed (not both magnitudes, n only with a non-zero magnitude) and
// sum X_i 4^i equals the signed operand. Also checks the truth-table rows
// individually through 2-bit operands driven into digit 0.
module tb_booth_r4_recoder;
  import sos_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  x8;
  logic [6:0]  x7;
  logic [23:0] x24;
  booth_digit_t [3:0]  d8, d7;
  booth_digit_t [11:0] d24;

  booth_r4_recoder #(.N(8)) u8  (.x(x8),  .digit(d8));
  booth_r4_recoder #(.N(7)) u7  (.x(x7),  .digit(d7));
  booth_r4_recoder          u24 (.x(x24), .digit(d24));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dval(input booth_digit_t d);
    int m;
    m = d.d1 ? 2 : (d.d2 ? 1 : 0);
    return d.n ? -m : m;
  endfunction

  function automatic bit bad(input booth_digit_t d);
    return (d.d1 && d.d2) || (d.n && !d.d1 && !d.d2);
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      longint acc;
      x8 = v[7:0];
      x7 = v[6:0];
      @(posedge clk);
      acc = 0;
      for (int i = 3; i >= 0; i--) begin
        acc = acc * 4 + dval(d8[i]);
        checks++;
        if (bad(d8[i])) begin failures++; $display("FAIL malformed digit"); end
      end
      checks++;
      if (acc != longint'($signed(x8))) begin
        failures++;
        $display("FAIL n=8 x=%h value=%0d", x8, acc);
      end
      acc = 0;
      for (int i = 3; i >= 0; i--) acc = acc * 4 + dval(d7[i]);
      checks++;
      if (acc != longint'($signed(x7))) begin
        failures++;
        $display("FAIL n=7 x=%h value=%0d", x7, acc);
      end
      // digit 1 of x8 sees b3 b2 b1: compare with -2*b3 + b2 + b1
      checks++;
      if (dval(d8[1]) != -2 * int'(x8[3]) + int'(x8[2]) + int'(x8[1])) begin
        failures++;
        $display("FAIL truth table b3b2b1=%b", x8[3:1]);
      end
    end
    for (int t = 0; t < 500; t++) begin
      longint acc;
      x24 = (t == 0) ? 24'h800000 : 24'($urandom);
      @(posedge clk);
      acc = 0;
      for (int i = 11; i >= 0; i--) acc = acc * 4 + dval(d24[i]);
      checks++;
      if (acc != longint'($signed(x24))) begin
        failures++;
        $display("FAIL n=24 x=%h value=%0d", x24, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

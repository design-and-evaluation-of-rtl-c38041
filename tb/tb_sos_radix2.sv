// tb_sos_radix2: checks the radix-2 folding sum-of-squares unit against
// x*x + y*y computed directly, for unsigned operands at the default 24 bits
// (Kogge-Stone final adder), at 16 bits with a Brent-Kung final adder and at
// 32 bits with a Sklansky final adder. Both the binary result and the
// carry-save pair (cs_sum + cs_carry) are compared. Corners: zero and the
// largest magnitudes.
module tb_sos_radix2;
  import sos_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] x, y;
  logic [48:0] s24, cs24, cc24;
  logic [32:0] s16, cs16, cc16;
  logic [64:0] s32, cs32, cc32;

  sos_radix2 u24 (.x(x[23:0]), .y(y[23:0]), .sos(s24), .cs_sum(cs24), .cs_carry(cc24));
  sos_radix2 #(.N(16), .TOPO(BRENT_KUNG)) u16 (
    .x(x[15:0]), .y(y[15:0]), .sos(s16), .cs_sum(cs16), .cs_carry(cc16));
  sos_radix2 #(.N(32), .TOPO(SKLANSKY)) u32 (
    .x(x), .y(y), .sos(s32), .cs_sum(cs32), .cs_carry(cc32));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] ref_sos(input int unsigned n);
    logic [127:0] a, b;
    a = 128'(x) & ((128'd1 << n) - 1);
    b = 128'(y) & ((128'd1 << n) - 1);
    return a * a + b * b;
  endfunction

  task automatic cmp(input string name, input logic [127:0] got, input logic [127:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s x=%h y=%h got=%h want=%h", name, x, y, got, want);
    end
  endtask

  task automatic check_all();
    @(posedge clk);
    cmp("sos24", 128'(s24), ref_sos(24));
    cmp("cs24",  128'(49'(cs24 + cc24)), ref_sos(24));
    cmp("sos16", 128'(s16), ref_sos(16));
    cmp("cs16",  128'(33'(cs16 + cc16)), ref_sos(16));
    cmp("sos32", 128'(s32), ref_sos(32));
    cmp("cs32",  128'(65'(cs32 + cc32)), ref_sos(32));
  endtask

  initial begin
    x = '0; y = '0; check_all();
    x = '1; y = '1; check_all();
    x = '1; y = '0; check_all();
    for (int t = 0; t < 2000; t++) begin
      x = $urandom; y = $urandom;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_final_adder: checks the split final adder at its default width (49 bits,
// Kogge-Stone halves) and at 32 bits with Brent-Kung and Sklansky halves,
// against a + b. Includes operands whose low-half carry must reach the top.
module tb_final_adder;
  import sos_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [48:0] a, b, s;
  logic        co;
  logic [31:0] s_bk, s_sk;
  logic        co_bk, co_sk;

  final_adder dut (.a(a), .b(b), .s(s), .cout(co));
  final_adder #(.W(32), .TOPO(BRENT_KUNG)) u_bk (.a(a[31:0]), .b(b[31:0]), .s(s_bk), .cout(co_bk));
  final_adder #(.W(32), .TOPO(SKLANSKY))   u_sk (.a(a[31:0]), .b(b[31:0]), .s(s_sk), .cout(co_sk));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [49:0] w49;
    logic [32:0] w32;
    @(posedge clk);
    w49 = 50'(a) + 50'(b);
    w32 = 33'(a[31:0]) + 33'(b[31:0]);
    checks += 3;
    if ({co, s} !== w49) begin
      failures++;
      $display("FAIL 49 a=%h b=%h got=%h want=%h", a, b, {co, s}, w49);
    end
    if ({co_bk, s_bk} !== w32) begin
      failures++;
      $display("FAIL bk32 a=%h b=%h got=%h want=%h", a[31:0], b[31:0], {co_bk, s_bk}, w32);
    end
    if ({co_sk, s_sk} !== w32) begin
      failures++;
      $display("FAIL sk32 a=%h b=%h got=%h want=%h", a[31:0], b[31:0], {co_sk, s_sk}, w32);
    end
  endtask

  initial begin
    a = '1; b = 49'd1; check_all();
    a = {25'd0, 24'hFFFFFF}; b = 49'd1; check_all();
    a = '1; b = '1; check_all();
    for (int t = 0; t < 3000; t++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

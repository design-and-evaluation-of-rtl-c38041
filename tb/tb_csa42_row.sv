// tb_csa42_row: random test of a 16-bit (4:2) compressor row (CMPRS):
// a+b+c+d == sum+carry modulo 2^16, carry bit 0 is zero. Also checks the
// all-ones corner, where every cell produces both carry outputs.
module tb_csa42_row;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, c, d, sum, carry;

  csa42_row #(.W(W)) dut (.a(a), .b(b), .c(c), .d(d), .sum(sum), .carry(carry));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [W-1:0] expect_total;
    @(posedge clk);
    expect_total = a + b + c + d;
    checks++;
    if (W'(sum + carry) != expect_total || carry[0] != 1'b0) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h d=%h sum=%h carry=%h", a, b, c, d, sum, carry);
    end
  endtask

  initial begin
    a = '1; b = '1; c = '1; d = '1;
    check_one();
    a = '0; b = '0; c = '0; d = '0;
    check_one();
    for (int t = 0; t < 2000; t++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); d = W'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

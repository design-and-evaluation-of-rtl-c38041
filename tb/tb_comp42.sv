// tb_comp42: exhaustive test of the (4:2) compressor cell. For all 32 input
// combinations it checks x1+x2+x3+x4+cin == sum + 2*(carry+cout), and that
// cout does not depend on cin (no ripple along a row).
module tb_comp42;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] in;
  logic sum, carry, cout, cout_prev;

  comp42 dut (.x1(in[0]), .x2(in[1]), .x3(in[2]), .x4(in[3]), .cin(in[4]),
              .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cout_prev = 1'b0;
    for (int v = 0; v < 32; v++) begin
      int expect_total;
      in = v[4:0];
      @(posedge clk);
      expect_total = in[0] + in[1] + in[2] + in[3] + in[4];
      checks++;
      if (expect_total != sum + 2 * (carry + cout)) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b cout=%b", in, sum, carry, cout);
      end
      if (v >= 16) begin  // same x1..x4 as v-16, cin now 1
        checks++;
        if (cout != cout_q[v-16]) begin
          failures++;
          $display("FAIL cout depends on cin for in=%b", in);
        end
      end else cout_q[v] = cout;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic cout_q [16];
endmodule

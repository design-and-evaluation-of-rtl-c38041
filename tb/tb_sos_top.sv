// tb_sos_top: end-to-end test of the three sum-of-squares units in sos_top at
// their default size (24-bit operands, Kogge-Stone final adders).
//
// Each unit's binary result and carry-save pair are compared with x^2 + y^2
// computed directly (unsigned operands for the radix-2 unit, two's complement
// for the two radix-4 units). In part of the vectors the three units get the
// same non-negative operands and must agree with each other.
// The test counts how often each mechanism of the datapath is exercised and
// fails if one never is: negative Booth digits (complemented partial squares,
// inversion bits), magnitude-2 digits (shifted partial squares), the zero digit
// of an all-ones bit triplet, a carry from the low to the high half of each
// final adder, and the most negative operand.
module tb_sos_top;
  import sos_pkg::*;
  localparam int unsigned N = 24;
  localparam int unsigned M = booth_digits(N);
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]   r2_x, r2_y, r4f_x, r4f_y, r4d_x, r4d_y;
  logic [2*N:0]   r2_sos, r2_cs_sum, r2_cs_carry;
  logic [2*N-1:0] r4f_sos, r4f_cs_sum, r4f_cs_carry;
  logic [2*N-1:0] r4d_sos, r4d_cs_sum, r4d_cs_carry;

  sos_top dut (.*);

  int n_neg_digit, n_mag2_digit, n_zero111, n_fa_carry_r2, n_fa_carry_r4f, n_fa_carry_r4d;
  int n_most_negative;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] sq_u(input logic [N-1:0] v);
    return 128'(v) * 128'(v);
  endfunction

  function automatic logic [127:0] sq_s(input logic [N-1:0] v);
    logic signed [127:0] s;
    s = 128'($signed(v));
    return s * s;
  endfunction

  task automatic cmp(input string name, input logic [127:0] got, input logic [127:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got=%h want=%h", name, got, want);
    end
  endtask

  task automatic check_all();
    logic [127:0] w2, wf, wd;
    @(posedge clk);
    w2 = sq_u(r2_x) + sq_u(r2_y);
    wf = sq_s(r4f_x) + sq_s(r4f_y);
    wd = sq_s(r4d_x) + sq_s(r4d_y);
    cmp("r2 sos",  128'(r2_sos), w2);
    cmp("r2 cs",   128'((2*N+1)'(r2_cs_sum + r2_cs_carry)), w2);
    cmp("r4f sos", 128'(r4f_sos), wf);
    cmp("r4f cs",  128'((2*N)'(r4f_cs_sum + r4f_cs_carry)), wf);
    cmp("r4d sos", 128'(r4d_sos), wd);
    cmp("r4d cs",  128'((2*N)'(r4d_cs_sum + r4d_cs_carry)), wd);
    // mechanism counters
    for (int i = 0; i < int'(M); i++) begin
      if (dut.u_radix4_folding.x_dig[i].n) n_neg_digit++;
      if (dut.u_radix4_dual.x_dig[i].n)    n_neg_digit++;
      if (dut.u_radix4_folding.x_dig[i].d1 || dut.u_radix4_dual.x_dig[i].d1) n_mag2_digit++;
      if (r4d_x[2*i+1] && r4d_x[2*i] && (i == 0 || r4d_x[2*i-1])) n_zero111++;
    end
    if (dut.u_radix2.u_fa.c_mid)         n_fa_carry_r2++;
    if (dut.u_radix4_folding.u_fa.c_mid) n_fa_carry_r4f++;
    if (dut.u_radix4_dual.u_fa.c_mid)    n_fa_carry_r4d++;
    if (r4f_x == {1'b1, {(N-1){1'b0}}} || r4d_y == {1'b1, {(N-1){1'b0}}}) n_most_negative++;
  endtask

  task automatic need(input string name, input int count);
    checks++;
    $display("mechanism %-28s exercised %0d times", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", name);
    end
  endtask

  initial begin
    n_neg_digit = 0; n_mag2_digit = 0; n_zero111 = 0;
    n_fa_carry_r2 = 0; n_fa_carry_r4f = 0; n_fa_carry_r4d = 0; n_most_negative = 0;
    // corners
    {r2_x, r2_y} = '0; {r4f_x, r4f_y} = '0; {r4d_x, r4d_y} = '0;
    check_all();
    r2_x = '1; r2_y = '1;
    r4f_x = {1'b1, {(N-1){1'b0}}}; r4f_y = {1'b1, {(N-1){1'b0}}};
    r4d_x = '1; r4d_y = {1'b1, {(N-1){1'b0}}};
    check_all();
    // independent random operands
    for (int t = 0; t < 1500; t++) begin
      r2_x = N'($urandom); r2_y = N'($urandom);
      r4f_x = N'($urandom); r4f_y = N'($urandom);
      r4d_x = N'($urandom); r4d_y = N'($urandom);
      check_all();
    end
    // the same non-negative operands into all three units
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] a, b;
      a = N'($urandom) >> 1;
      b = N'($urandom) >> 1;
      r2_x = a; r2_y = b; r4f_x = a; r4f_y = b; r4d_x = a; r4d_y = b;
      check_all();
      checks++;
      if (128'(r2_sos) != 128'(r4f_sos) || 128'(r4f_sos) != 128'(r4d_sos)) begin
        failures++;
        $display("FAIL units disagree a=%h b=%h: %h %h %h", a, b, r2_sos, r4f_sos, r4d_sos);
      end
    end
    need("negative Booth digit", n_neg_digit);
    need("magnitude-2 Booth digit", n_mag2_digit);
    need("zero digit from 111 triplet", n_zero111);
    need("final adder half carry r2", n_fa_carry_r2);
    need("final adder half carry r4f", n_fa_carry_r4f);
    need("final adder half carry r4d", n_fa_carry_r4d);
    need("most negative operand", n_most_negative);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

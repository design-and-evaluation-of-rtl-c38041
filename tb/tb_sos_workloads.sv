// tb_sos_workloads: runs sos_top at the other two operand sizes of the
// comparison, 16 and 32 bits, with each prefix network for the final adders
// (16-bit with Brent-Kung, 32-bit with Sklansky and with Kogge-Stone). All
// three units of each instance are compared with x^2 + y^2 computed directly,
// for random operands and for the extreme values.
module tb_sos_workloads;
  import sos_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] ux, uy, sx, sy;

  logic [32:0] a_r2;  logic [31:0] a_r4f, a_r4d;
  logic [32:0] a_r2c, a_r2s; logic [31:0] a_fs, a_fc, a_ds, a_dc;
  logic [64:0] b_r2;  logic [63:0] b_r4f, b_r4d;
  logic [64:0] b_r2c, b_r2s; logic [63:0] b_fs, b_fc, b_ds, b_dc;
  logic [64:0] c_r2;  logic [63:0] c_r4f, c_r4d;
  logic [64:0] c_r2c, c_r2s; logic [63:0] c_fs, c_fc, c_ds, c_dc;

  sos_top #(.N(16), .TOPO(BRENT_KUNG)) u16 (
    .r2_x(ux[15:0]), .r2_y(uy[15:0]), .r2_sos(a_r2), .r2_cs_sum(a_r2s), .r2_cs_carry(a_r2c),
    .r4f_x(sx[15:0]), .r4f_y(sy[15:0]), .r4f_sos(a_r4f), .r4f_cs_sum(a_fs), .r4f_cs_carry(a_fc),
    .r4d_x(sx[15:0]), .r4d_y(sy[15:0]), .r4d_sos(a_r4d), .r4d_cs_sum(a_ds), .r4d_cs_carry(a_dc));
  sos_top #(.N(32), .TOPO(SKLANSKY)) u32s (
    .r2_x(ux), .r2_y(uy), .r2_sos(b_r2), .r2_cs_sum(b_r2s), .r2_cs_carry(b_r2c),
    .r4f_x(sx), .r4f_y(sy), .r4f_sos(b_r4f), .r4f_cs_sum(b_fs), .r4f_cs_carry(b_fc),
    .r4d_x(sx), .r4d_y(sy), .r4d_sos(b_r4d), .r4d_cs_sum(b_ds), .r4d_cs_carry(b_dc));
  sos_top #(.N(32)) u32k (
    .r2_x(ux), .r2_y(uy), .r2_sos(c_r2), .r2_cs_sum(c_r2s), .r2_cs_carry(c_r2c),
    .r4f_x(sx), .r4f_y(sy), .r4f_sos(c_r4f), .r4f_cs_sum(c_fs), .r4f_cs_carry(c_fc),
    .r4d_x(sx), .r4d_y(sy), .r4d_sos(c_r4d), .r4d_cs_sum(c_ds), .r4d_cs_carry(c_dc));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] ref_u(input int unsigned n);
    logic [127:0] a, b;
    a = 128'(ux) & ((128'd1 << n) - 1);
    b = 128'(uy) & ((128'd1 << n) - 1);
    return a * a + b * b;
  endfunction

  function automatic logic [127:0] ref_s(input int unsigned n);
    logic signed [127:0] a, b;
    a = $signed(128'(sx) << (128 - n)) >>> (128 - n);
    b = $signed(128'(sy) << (128 - n)) >>> (128 - n);
    return a * a + b * b;
  endfunction

  task automatic cmp(input string name, input logic [127:0] got, input logic [127:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s ux=%h uy=%h sx=%h sy=%h got=%h want=%h", name, ux, uy, sx, sy, got, want);
    end
  endtask

  task automatic check_all();
    @(posedge clk);
    cmp("16 r2",      128'(a_r2), ref_u(16));
    cmp("16 r2 cs",   128'(33'(a_r2s + a_r2c)), ref_u(16));
    cmp("16 r4f",     128'(a_r4f), ref_s(16));
    cmp("16 r4f cs",  128'(32'(a_fs + a_fc)), ref_s(16));
    cmp("16 r4d",     128'(a_r4d), ref_s(16));
    cmp("16 r4d cs",  128'(32'(a_ds + a_dc)), ref_s(16));
    cmp("32s r2",     128'(b_r2), ref_u(32));
    cmp("32s r4f",    128'(b_r4f), ref_s(32));
    cmp("32s r4d",    128'(b_r4d), ref_s(32));
    cmp("32s r4d cs", 128'(64'(b_ds + b_dc)), ref_s(32));
    cmp("32k r2",     128'(c_r2), ref_u(32));
    cmp("32k r2 cs",  128'(65'(c_r2s + c_r2c)), ref_u(32));
    cmp("32k r4f",    128'(c_r4f), ref_s(32));
    cmp("32k r4f cs", 128'(64'(c_fs + c_fc)), ref_s(32));
    cmp("32k r4d",    128'(c_r4d), ref_s(32));
  endtask

  initial begin
    ux = '0; uy = '0; sx = '0; sy = '0; check_all();
    ux = '1; uy = '1; sx = 32'h8000_8000; sy = 32'h8000_8000; check_all();
    ux = '1; uy = '0; sx = 32'h7FFF_7FFF; sy = 32'hFFFF_FFFF; check_all();
    for (int t = 0; t < 2000; t++) begin
      ux = $urandom; uy = $urandom; sx = $urandom; sy = $urandom;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

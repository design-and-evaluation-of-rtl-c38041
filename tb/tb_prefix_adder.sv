// tb_prefix_adder: checks the parallel-prefix adder with each network
// (Kogge-Stone, Brent-Kung, Sklansky) at 24 bits (the default), 13 bits (not
// a power of two), 48 and 64 bits (the widest adders of the comparison),
// against a + b + cin computed directly. Random operands plus the full
// carry-propagation case (all ones + 1).
module tb_prefix_adder;
  import sos_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [23:0] a, b;
  logic        cin;
  logic [23:0] s_ks, s_bk, s_sk, s_def;
  logic [12:0] t_ks, t_bk, t_sk;
  logic        co_ks, co_bk, co_sk, co_def, d_ks, d_bk, d_sk;

  logic [63:0] wa, wb, w_ks, w_bk, w_sk;
  logic [47:0] h_ks, h_bk, h_sk;
  logic        e_ks, e_bk, e_sk, f_ks, f_bk, f_sk;

  prefix_adder #(.W(64), .TOPO(KOGGE_STONE)) x_ks (.a(wa), .b(wb), .cin(cin), .s(w_ks), .cout(e_ks));
  prefix_adder #(.W(64), .TOPO(BRENT_KUNG))  x_bk (.a(wa), .b(wb), .cin(cin), .s(w_bk), .cout(e_bk));
  prefix_adder #(.W(64), .TOPO(SKLANSKY))    x_sk (.a(wa), .b(wb), .cin(cin), .s(w_sk), .cout(e_sk));
  prefix_adder #(.W(48), .TOPO(KOGGE_STONE)) y_ks (.a(wa[47:0]), .b(wb[47:0]), .cin(cin), .s(h_ks), .cout(f_ks));
  prefix_adder #(.W(48), .TOPO(BRENT_KUNG))  y_bk (.a(wa[47:0]), .b(wb[47:0]), .cin(cin), .s(h_bk), .cout(f_bk));
  prefix_adder #(.W(48), .TOPO(SKLANSKY))    y_sk (.a(wa[47:0]), .b(wb[47:0]), .cin(cin), .s(h_sk), .cout(f_sk));

  prefix_adder                                   u_def (.a(a), .b(b), .cin(cin), .s(s_def), .cout(co_def));
  prefix_adder #(.W(24), .TOPO(KOGGE_STONE)) u_ks (.a(a), .b(b), .cin(cin), .s(s_ks), .cout(co_ks));
  prefix_adder #(.W(24), .TOPO(BRENT_KUNG))  u_bk (.a(a), .b(b), .cin(cin), .s(s_bk), .cout(co_bk));
  prefix_adder #(.W(24), .TOPO(SKLANSKY))    u_sk (.a(a), .b(b), .cin(cin), .s(s_sk), .cout(co_sk));
  prefix_adder #(.W(13), .TOPO(KOGGE_STONE)) v_ks (.a(a[12:0]), .b(b[12:0]), .cin(cin), .s(t_ks), .cout(d_ks));
  prefix_adder #(.W(13), .TOPO(BRENT_KUNG))  v_bk (.a(a[12:0]), .b(b[12:0]), .cin(cin), .s(t_bk), .cout(d_bk));
  prefix_adder #(.W(13), .TOPO(SKLANSKY))    v_sk (.a(a[12:0]), .b(b[12:0]), .cin(cin), .s(t_sk), .cout(d_sk));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string name, input logic [24:0] got, input logic [24:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b got=%h want=%h", name, a, b, cin, got, want);
    end
  endtask

  task automatic cmp64(input string name, input logic [64:0] got, input logic [64:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b got=%h want=%h", name, wa, wb, cin, got, want);
    end
  endtask

  task automatic check_all();
    logic [64:0] w64;
    logic [48:0] w48;
    logic [24:0] w24;
    logic [13:0] w13;
    @(posedge clk);
    w24 = 25'(a) + 25'(b) + 25'(cin);
    w13 = 14'(a[12:0]) + 14'(b[12:0]) + 14'(cin);
    w64 = 65'(wa) + 65'(wb) + 65'(cin);
    w48 = 49'(wa[47:0]) + 49'(wb[47:0]) + 49'(cin);
    cmp64("ks64", {e_ks, w_ks}, w64);
    cmp64("bk64", {e_bk, w_bk}, w64);
    cmp64("sk64", {e_sk, w_sk}, w64);
    cmp64("ks48", 65'({f_ks, h_ks}), 65'(w48));
    cmp64("bk48", 65'({f_bk, h_bk}), 65'(w48));
    cmp64("sk48", 65'({f_sk, h_sk}), 65'(w48));
    cmp("def24", {co_def, s_def}, w24);
    cmp("ks24",  {co_ks, s_ks},   w24);
    cmp("bk24",  {co_bk, s_bk},   w24);
    cmp("sk24",  {co_sk, s_sk},   w24);
    cmp("ks13",  25'({d_ks, t_ks}), 25'(w13));
    cmp("bk13",  25'({d_bk, t_bk}), 25'(w13));
    cmp("sk13",  25'({d_sk, t_sk}), 25'(w13));
  endtask

  initial begin
    a = '1; b = '0; wa = '1; wb = '0; cin = 1'b1; check_all();
    a = '1; b = '1; wa = '1; wb = '1; cin = 1'b1; check_all();
    a = '0; b = '0; wa = '0; wb = '0; cin = 1'b0; check_all();
    for (int t = 0; t < 3000; t++) begin
      a = 24'($urandom); b = 24'($urandom); cin = 1'($urandom);
      wa = {$urandom, $urandom}; wb = {$urandom, $urandom};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

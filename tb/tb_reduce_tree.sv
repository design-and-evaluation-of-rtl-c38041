// tb_reduce_tree: checks the reduction array for several heights (1, 2, 3, 5,
// 12 and 13 rows of 40 bits): sum + carry must equal the sum of all rows
// modulo 2^40, for random rows and for all-ones rows.
module tb_reduce_tree;
  localparam int unsigned W = 40;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [12:0][W-1:0] rows;
  logic [W-1:0] s1, c1, s2, c2, s3, c3, s5, c5, s12, c12, s13, c13;

  reduce_tree #(.ROWS(1),  .W(W)) u1  (.rows(rows[0:0]),  .sum(s1),  .carry(c1));
  reduce_tree #(.ROWS(2),  .W(W)) u2  (.rows(rows[1:0]),  .sum(s2),  .carry(c2));
  reduce_tree #(.ROWS(3),  .W(W)) u3  (.rows(rows[2:0]),  .sum(s3),  .carry(c3));
  reduce_tree #(.ROWS(5),  .W(W)) u5  (.rows(rows[4:0]),  .sum(s5),  .carry(c5));
  reduce_tree #(.ROWS(12), .W(W)) u12 (.rows(rows[11:0]), .sum(s12), .carry(c12));
  reduce_tree #(.ROWS(13), .W(W)) u13 (.rows(rows[12:0]), .sum(s13), .carry(c13));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] total(input int unsigned n);
    logic [W-1:0] acc;
    acc = '0;
    for (int unsigned r = 0; r < n; r++) acc += rows[r];
    return acc;
  endfunction

  task automatic cmp(input int unsigned n, input logic [W-1:0] s, input logic [W-1:0] c);
    checks++;
    if (W'(s + c) != total(n)) begin
      failures++;
      $display("FAIL rows=%0d sum=%h carry=%h expected=%h", n, s, c, total(n));
    end
  endtask

  task automatic check_all();
    @(posedge clk);
    cmp(1, s1, c1);   cmp(2, s2, c2);   cmp(3, s3, c3);
    cmp(5, s5, c5);   cmp(12, s12, c12); cmp(13, s13, c13);
  endtask

  initial begin
    rows = '1;
    check_all();
    for (int t = 0; t < 1000; t++) begin
      for (int r = 0; r < 13; r++) rows[r] = {$urandom, $urandom};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

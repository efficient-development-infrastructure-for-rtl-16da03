// Sorter configurations evaluated for the original design, at reduced data
// size: 16-way trees with 2 in parallel (4096 keys), 4-way with 4 in
// parallel (1024 keys), 8-way with 2 (1024 keys) and 8-way with 4 (8192
// keys). Each runs a random and a descending sort (see sort_run) and
// must return the sorted keys with the expected number of Phases. The
// four harnesses run concurrently on one clock; the test ends when all
// have finished. Origin: the tree shapes are those the document evaluates;
// the data sizes are reduced by this testbench's choice.
module tb_sort_configs;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int c [4], f [4];
  bit fin [4];
  sort_run #(.K(16), .P(2), .NL(256)) r0 (.clk, .rst, .checks(c[0]), .failures(f[0]), .fin(fin[0]));
  sort_run #(.K(4),  .P(4), .NL(64))  r1 (.clk, .rst, .checks(c[1]), .failures(f[1]), .fin(fin[1]));
  sort_run #(.K(8),  .P(2), .NL(64))  r2 (.clk, .rst, .checks(c[2]), .failures(f[2]), .fin(fin[2]));
  sort_run #(.K(8),  .P(4), .NL(512)) r3 (.clk, .rst, .checks(c[3]), .failures(f[3]), .fin(fin[3]));

  int checks, failures;
  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule

// Self-checking test of the multiply-adder: 200 blocks of 8 points, each
// point fed its four (operand, coefficient) pairs in the block order of
// the stencil node (8 term-0 operands, 8 term-1, ...), some blocks
// back-to-back and some with gaps. Every result must equal the
// single-precision reference ((c0 x0 + 0) + c1 x1 + c2 x2) + c3 x3, carry its
// point's tag, and appear 40 cycles after the point's first operand.
module tb_madd;
  import fp_ref_pkg::*;
  localparam int NS = 8, LAT = 5 * NS;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [1:0] in_term = 0;
  logic [31:0] x = 0, c = 0, y;
  logic [9:0] in_tag = 0, out_tag;
  madd #(.STAGES(NS), .TAG_W(10)) dut (.clk, .rst, .in_valid, .in_term, .x, .c, .in_tag,
    .out_valid, .y, .out_tag);

  int checks = 0, failures = 0, cyc = 0, n_out = 0;
  logic [31:0] exp_y [$];
  logic [9:0] exp_tag [$];
  int exp_t [$];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst && out_valid) begin
    checks += 3;
    n_out++;
    if (y !== exp_y[0]) begin failures++; if (failures < 5) $display("FAIL: result %h expected %h", y, exp_y[0]); end
    if (out_tag !== exp_tag[0]) failures++;
    if (cyc - exp_t[0] != LAT) begin failures++; if (failures < 5) $display("FAIL: latency %0d", cyc - exp_t[0]); end
    void'(exp_y.pop_front()); void'(exp_tag.pop_front()); void'(exp_t.pop_front());
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int b = 0; b < 200; b++) begin
      logic [31:0] xs [4][NS], cs [4];
      for (int k = 0; k < 4; k++) begin
        cs[k] = rnd(2);
        for (int p = 0; p < NS; p++) xs[k][p] = rnd(6);
      end
      for (int p = 0; p < NS; p++) begin
        logic [31:0] s;
        s = fadd(fmul(cs[0], xs[0][p]), 32'd0);
        for (int k = 1; k < 4; k++) s = fadd(fmul(cs[k], xs[k][p]), s);
        exp_y.push_back(s);
        exp_tag.push_back(10'(b * NS + p));
        exp_t.push_back(cyc + 1 + p);
      end
      for (int k = 0; k < 4; k++)
        for (int p = 0; p < NS; p++) begin
          in_valid <= 1; in_term <= 2'(k); x <= xs[k][p]; c <= cs[k]; in_tag <= 10'(b * NS + p);
          @(posedge clk);
        end
      if ($urandom_range(1) != 0) begin
        in_valid <= 0;
        repeat ($urandom_range(1, 12)) @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (n_out != 200 * NS) begin failures++; $display("FAIL: %0d results", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

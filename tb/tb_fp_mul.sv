// Self-checking test of the pipelined single-precision mul unit: random
// normal operands (wide and narrow exponent spread, so that both
// cancellation and large alignment shifts occur) plus special cases, one
// operation per cycle. Each result is compared with the double-precision
// reference rounded to single, and must appear exactly 8 cycles after its
// operands.
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic iv, ov;
  logic [31:0] a, b, y;
  logic [15:0] itag, otag;
  fp_mul #(.STAGES(8), .TAG_W(16)) dut (.clk, .rst, .in_valid(iv), .a, .b, .in_tag(itag),
                                        .out_valid(ov), .y, .out_tag(otag));
  int checks = 0, failures = 0;
  logic [31:0] qa [int], qb [int];
  int issue_cyc [int];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && ov) begin
    logic [31:0] e;
    e = fmul(qa[otag], qb[otag]);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL: %h mul %h = %h, expected %h", qa[otag], qb[otag], y, e);
    end
    checks++;
    if (cyc - issue_cyc[otag] != 8) begin
      failures++;
      $display("FAIL: latency %0d", cyc - issue_cyc[otag]);
    end
  end

  initial begin
    logic [31:0] sa [8], sb [8];
    sa = '{32'h3f800000, 32'h7f800000, 32'h7f800000, 32'h00000000, 32'h7f7fffff, 32'h00800000, 32'h3f800000, 32'hbf800000};
    sb = '{32'hbf800000, 32'h00000000, 32'hff800000, 32'h80000000, 32'h7f7fffff, 32'h3e800000, 32'h33800000, 32'h3f800000};
    iv = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] x, z;
      if (i < 8) begin x = sa[i]; z = sb[i]; end
      else if (i % 2 == 0) begin x = rnd(20); z = rnd(20); end
      else begin x = rnd(2); z = rnd(2); end
      iv <= 1; a <= x; b <= z; itag <= 16'(i);
      qa[i] = x; qb[i] = z; issue_cyc[i] = cyc + 1;
      @(posedge clk);
    end
    iv <= 0;
    repeat (12) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

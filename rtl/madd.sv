// Multiply-adder (MADD) of the stencil node.
// Computes c0*x0 + c1*x1 + c2*x2 + c3*x3 for a stream of points with one
// multiplier and one adder, both STAGES deep (8: a 7-stage floating-point
// core plus a register). Operands come in blocks of STAGES points: first
// the term-0 operand of STAGES consecutive points, then their term-1
// operands, and so on. A product of term 0 passes the adder with 0 added;
// every later product is added to the partial sum that leaves the adder in
// the same cycle, which is the partial sum of the same point because the
// block width equals the adder depth. The term-3 operand of a point
// enters 3*STAGES cycles after its term-0 operand and its sum leaves
// 2*STAGES cycles later, so a point whose first operand entered at cycle 0
// is done at cycle 5*STAGES (40 for STAGES = 8; the original counts this
// as k = 5n+1 = 41 cycles including the entry cycle). in_tag must be the
// same for the four operands of a point and is returned with the result.
// Origin: the MADD structure, term order and 5n-cycle timing follow the
// original design; tags and the block-alignment check are this design's own.
module madd #(
  parameter int unsigned STAGES = 8,
  parameter int unsigned TAG_W  = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [1:0]       in_term,
  input  logic [31:0]      x,
  input  logic [31:0]      c,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      y,
  output logic [TAG_W-1:0] out_tag
);
  logic             mv, av;
  logic [31:0]      mp, as;
  logic [TAG_W+1:0] mt, at;

  fp_mul #(.STAGES(STAGES), .TAG_W(TAG_W+2)) u_mul (
    .clk, .rst, .in_valid, .a(x), .b(c), .in_tag({in_term, in_tag}),
    .out_valid(mv), .y(mp), .out_tag(mt));

  // term 0 starts a new sum; later terms add the sum leaving the adder now
  fp_add #(.STAGES(STAGES), .TAG_W(TAG_W+2)) u_add (
    .clk, .rst, .in_valid(mv), .a(mp), .b(mt[TAG_W +: 2] == 2'd0 ? 32'd0 : as), .in_tag(mt),
    .out_valid(av), .y(as), .out_tag(at));

  assign out_valid = av && at[TAG_W +: 2] == 2'd3;
  assign y         = as;
  assign out_tag   = at[TAG_W-1:0];

  // the partial sum fed back must belong to the same point
  a_block: assert property (@(posedge clk) disable iff (rst)
    mv && mt[TAG_W +: 2] != 2'd0 |-> av && at[TAG_W +: 2] == mt[TAG_W +: 2] - 2'd1 && at[TAG_W-1:0] == mt[TAG_W-1:0]);
endmodule

// Pipelined IEEE 754 single-precision multiplier.
// Round to nearest even. Subnormal inputs are read as zero and results
// below the normal range are flushed to signed zero, as is usual for FPGA
// floating-point cores; infinities and NaN follow IEEE 754 (any NaN result
// is the quiet NaN 0x7fc00000). The product is formed combinationally and
// then passes STAGES registers, so the latency is STAGES cycles at one
// operation per cycle; in_tag travels with the operands.
// Origin: the original uses a generated 7-stage core; this unit, its
// rounding and flush-to-zero are this design's own, with the same 8-cycle
// latency.
module fp_mul #(
  parameter int unsigned STAGES = 8,
  parameter int unsigned TAG_W  = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      y,
  output logic [TAG_W-1:0] out_tag
);
  function automatic logic [31:0] mul(input logic [31:0] opa, input logic [31:0] opb);
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] prod;
    logic [23:0] m;
    logic        g, st, up;
    logic [9:0]  e;     // signed, biased
    logic [24:0] mr;
    s  = opa[31] ^ opb[31];
    ea = opa[30:23];
    eb = opb[30:23];
    if ((ea == 8'hff && opa[22:0] != 0) || (eb == 8'hff && opb[22:0] != 0)) return 32'h7fc0_0000;
    if (ea == 8'hff || eb == 8'hff) begin
      if (ea == 0 || eb == 0) return 32'h7fc0_0000;    // inf * 0
      return {s, 8'hff, 23'd0};
    end
    if (ea == 0 || eb == 0) return {s, 31'd0};
    prod = {1'b1, opa[22:0]} * {1'b1, opb[22:0]};
    e    = 10'(ea) + 10'(eb) - 10'd127;
    if (prod[47]) begin
      m = prod[47:24]; g = prod[23]; st = |prod[22:0]; e = e + 10'd1;
    end else begin
      m = prod[46:23]; g = prod[22]; st = |prod[21:0];
    end
    up = g && (st || m[0]);
    mr = {1'b0, m} + 25'(up);
    if (mr[24]) begin mr = mr >> 1; e = e + 10'd1; end
    if ($signed(e) >= 255) return {s, 8'hff, 23'd0};
    if ($signed(e) <= 0)   return {s, 31'd0};
    return {s, e[7:0], mr[22:0]};
  endfunction

  logic [31:0]      pd [STAGES];
  logic             pv [STAGES];
  logic [TAG_W-1:0] pt [STAGES];

  always_ff @(posedge clk) begin
    pd[0] <= mul(a, b);
    pt[0] <= in_tag;
    pv[0] <= rst ? 1'b0 : in_valid;
    for (int i = 1; i < int'(STAGES); i++) begin
      pd[i] <= pd[i-1];
      pt[i] <= pt[i-1];
      pv[i] <= rst ? 1'b0 : pv[i-1];
    end
  end
  assign y         = pd[STAGES-1];
  assign out_valid = pv[STAGES-1];
  assign out_tag   = pt[STAGES-1];
endmodule

// Pipelined IEEE 754 single-precision adder.
// Round to nearest even with guard, round and sticky bits. Subnormal
// inputs are read as zero and results below the normal range are flushed
// to signed zero; infinities and NaN follow IEEE 754 (NaN results are
// 0x7fc00000, inf - inf is NaN). An exact zero difference is +0. The sum
// is formed combinationally and then passes STAGES registers: latency
// STAGES cycles at one operation per cycle; in_tag travels along.
// Origin: the original uses a generated 7-stage core; this unit, its
// rounding and flush-to-zero are this design's own, with the same 8-cycle
// latency.
module fp_add #(
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
  function automatic logic [31:0] add(input logic [31:0] opa, input logic [31:0] opb);
    logic [31:0] p, q;         // |p| >= |q|
    logic [7:0]  d;
    logic [26:0] mp, mq;       // 1.23 mantissa followed by guard, round, sticky
    logic [27:0] r;
    logic [9:0]  e;
    logic [4:0]  lz;
    logic        up;
    logic [24:0] mr;
    logic [7:0]  ea, eb;
    ea = opa[30:23];
    eb = opb[30:23];
    if ((ea == 8'hff && opa[22:0] != 0) || (eb == 8'hff && opb[22:0] != 0)) return 32'h7fc0_0000;
    if (ea == 8'hff && eb == 8'hff) return (opa[31] == opb[31]) ? opa : 32'h7fc0_0000;
    if (ea == 8'hff) return opa;
    if (eb == 8'hff) return opb;
    if (ea == 0 && eb == 0) return {opa[31] & opb[31], 31'd0};
    if (ea == 0) return opb;
    if (eb == 0) return opa;
    if (opa[30:0] >= opb[30:0]) begin p = opa; q = opb; end else begin p = opb; q = opa; end
    d  = p[30:23] - q[30:23];
    mp = {1'b1, p[22:0], 3'b000};
    mq = {1'b1, q[22:0], 3'b000};
    if (d >= 8'd27) mq = 27'd1;            // everything shifted into sticky
    else if (d != 0) mq = (mq >> d) | 27'(|(mq & ((27'd1 << d) - 27'd1)));
    e = 10'(p[30:23]);
    if (p[31] == q[31]) begin
      r = 28'(mp) + 28'(mq);
      if (r[27]) begin r = {1'b0, r[27:2], r[1] | r[0]}; e = e + 10'd1; end
    end else begin
      r = 28'(mp) - 28'(mq);
      if (r == 0) return 32'd0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (r[i]) break;
        lz = lz + 5'd1;
      end
      r = r << lz;
      e = e - 10'(lz);
    end
    up = r[2] && (r[1] || r[0] || r[3]);
    mr = {1'b0, r[26:3]} + 25'(up);
    if (mr[24]) begin mr = mr >> 1; e = e + 10'd1; end
    if ($signed(e) >= 255) return {p[31], 8'hff, 23'd0};
    if ($signed(e) <= 0)   return {p[31], 31'd0};
    return {p[31], e[7:0], mr[22:0]};
  endfunction

  logic [31:0]      pd [STAGES];
  logic             pv [STAGES];
  logic [TAG_W-1:0] pt [STAGES];

  always_ff @(posedge clk) begin
    pd[0] <= add(a, b);
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

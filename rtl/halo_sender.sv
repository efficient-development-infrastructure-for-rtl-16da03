// Boundary-value sender of a stencil node.
// The MADDs that compute boundary points push their results (value and
// its index along the boundary) into one FIFO per lane; a round-robin
// multiplexer (mux8 for the eight MADD lanes of a row boundary) moves one
// value per cycle to the link towards the neighbour node. The link is
// valid/index/data without back-pressure: a boundary row of LANES*DEPTH
// values is produced in DEPTH cycles and drained in LANES*DEPTH cycles.
// Origin: per-MADD FIFOs and the mux8 follow the original node; the link
// format (valid, index, data) replaces the serial links and is this design's
// own.
module halo_sender #(
  parameter int unsigned LANES = 8,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned IDX_W = 7
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [LANES-1:0] in_valid,
  input  logic [IDX_W-1:0] in_idx  [LANES],
  input  logic [31:0]      in_data [LANES],
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output logic [31:0]      out_data
);
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1;
  logic [IDX_W+31:0] head [LANES];
  logic [LANES-1:0]  empty, full, pop;
  logic [LW-1:0]     rr, sel;
  logic              any;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [$clog2(DEPTH+1)-1:0] cnt;
    sync_fifo #(.WIDTH(IDX_W+32), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst, .clr(1'b0), .push(in_valid[l]), .wr_data({in_idx[l], in_data[l]}), .pop(pop[l]),
      .rd_data(head[l]), .empty(empty[l]), .full(full[l]), .count(cnt));
    a_cnt: assert property (@(posedge clk) disable iff (rst) cnt <= ($bits(cnt))'(DEPTH));
  end

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int i = 0; i < int'(LANES); i++) begin
      logic [LW-1:0] c;
      c = LW'((int'(rr) + i) % int'(LANES));
      if (!any && !empty[c]) begin any = 1'b1; sel = LW'(c); end
    end
    pop = '0;
    pop[sel] = any;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= any;
      if (any) rr <= LW'((int'(sel) + 1) % int'(LANES));
    end
    out_idx  <= head[sel][IDX_W+31:32];
    out_data <= head[sel][31:0];
  end

  a_no_drop: assert property (@(posedge clk) disable iff (rst) (in_valid & full) == '0);
endmodule

// Base+delta decompressor on the read side of the accelerator.
// Lines read from memory, each with a tag (the way it is destined for),
// wait in a FIFO. The head line is checked for the compression flag
// (bits 511:479 equal to 1). A plain line goes on unchanged in one cycle;
// a packed pair is split into its two 227-bit packs, which go on in two
// consecutive cycles, the first (bits 226:0) first. The line is popped from
// the FIFO with its last piece. Every line then passes a pipeline of 15
// adders, one per register stage: stage i turns delta i of a pack into key
// i by adding key i-1, so the keys are rebuilt as a running sum without a
// long carry chain. Plain lines pass the same stages untouched, which
// keeps the order of lines. Latency: 1 cycle in the FIFO stage plus 15.
// dec_en low treats every line as plain (the unsorted input data of the
// first phase is never packed). out_plain tells a plain line from a piece
// of a packed pair. The output has no ready: the reader reserves room before it reads.
// Origin: FIFO, temp stage and prefix-adder decompression follow the
// original design; one adder stage per key and the credit output are this
// design's choices.
module bd_decompressor
  import sort_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             dec_en,    // 0: every line is plain (first phase)
  input  logic             in_valid,
  input  line_t            in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic [$clog2(DEPTH+1)-1:0] free,
  output logic             out_valid,
  output line_t            out_data,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_plain   // the line was stored uncompressed
);
  localparam int unsigned NS = LINE_KEYS - 1;  // 15 adder stages
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [LINE_W+TAG_W-1:0] head;
  logic empty, full, pop, half;
  logic [CW-1:0] cnt;
  line_t h_line;
  logic  h_comp;

  sync_fifo #(.WIDTH(LINE_W+TAG_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clr(1'b0), .push(in_valid), .wr_data({in_tag, in_data}), .pop(pop),
    .rd_data(head), .empty(empty), .full(full), .count(cnt));
  assign free   = CW'(DEPTH) - cnt;
  assign h_line = head[LINE_W-1:0];
  assign h_comp = dec_en && h_line[LINE_W-1 -: FLAG_W] == COMP_FLAG;
  assign pop    = !empty && (!h_comp || half);

  function automatic line_t unpack(input pack_t p);
    line_t l = '0;
    l[KEY_W-1:0] = p[KEY_W-1:0];
    for (int i = 1; i < int'(LINE_KEYS); i++)
      l[i*KEY_W +: KEY_W] = KEY_W'(p[KEY_W + (i-1)*DELTA_W +: DELTA_W]);
    return l;
  endfunction

  // pipeline registers: stage 0 is the split stage
  line_t            pd [NS+1];
  logic             pv [NS+1];
  logic             pc [NS+1];
  logic [TAG_W-1:0] pt [NS+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      half  <= 1'b0;
      pv[0] <= 1'b0;
    end else begin
      pv[0] <= !empty;
      if (!empty && h_comp) half <= !half;
    end
    pt[0] <= head[LINE_W +: TAG_W];
    pc[0] <= h_comp;
    pd[0] <= !h_comp ? h_line :
             half ? unpack(h_line[2*PACK_W-1:PACK_W]) : unpack(h_line[PACK_W-1:0]);
  end

  for (genvar s = 1; s <= NS; s++) begin : g_add
    always_ff @(posedge clk) begin
      if (rst) pv[s] <= 1'b0;
      else     pv[s] <= pv[s-1];
      pt[s] <= pt[s-1];
      pc[s] <= pc[s-1];
      pd[s] <= pd[s-1];
      if (pc[s-1])
        pd[s][s*KEY_W +: KEY_W] <= pd[s-1][s*KEY_W +: KEY_W] + pd[s-1][(s-1)*KEY_W +: KEY_W];
    end
  end

  assign out_valid = pv[NS];
  assign out_data  = pd[NS];
  assign out_tag   = pt[NS];
  assign out_plain = !pc[NS];

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !(in_valid && full));
endmodule

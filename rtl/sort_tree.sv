// One merge sorter tree of the sorting accelerator with its buffers:
// K input buffers (one per way), the K-way merge tree, the output buffer
// (counter, tree reset and 512-bit packing) and, when COMPRESS is set, the
// base+delta compressor. Lines for way w arrive on line_valid/line_way.
// Sorted lines leave on out_* with a valid/ready handshake; out_last marks
// the line that completes a memory region of region_lines uncompressed
// lines (the compressor never pairs lines across that mark). iter_done
// pulses once per merged Unit of e_p1 keys.
// Origin: the tree with input buffers, output buffer and compressor follows
// the original design; the region counter for out_last is this design's own.
module sort_tree
  import sort_pkg::*;
#(
  parameter int unsigned K        = 8,
  parameter bit          COMPRESS = 1'b1,
  parameter int unsigned IB_DEPTH = 8,
  parameter int unsigned LINE_AW  = 26,
  parameter int unsigned CNT_W    = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [CNT_W-1:0]   e_p,
  input  logic [CNT_W-1:0]   e_p1,
  input  logic [LINE_AW-1:0] region_lines,
  input  logic               line_valid,
  input  logic [$clog2(K)-1:0] line_way,
  input  line_t              line_data,
  output logic [$clog2(IB_DEPTH+1)-1:0] ib_count [K],
  output logic               out_valid,
  output line_t              out_data,
  output logic               out_last,
  output logic               out_packed,
  input  logic               out_ready,
  output logic               iter_done,
  output logic               sep_any     // some way is sending separators
);
  logic             tree_clr;
  logic [K-1:0]     lv, lr, sep;
  key_t             lk [K];
  logic             rv, rr;
  key_t             rk;
  logic             ob_valid, ob_ready, ob_last;
  line_t            ob_data;
  logic [LINE_AW-1:0] wl_cnt;

  for (genvar w = 0; w < K; w++) begin : g_ib
    input_buffer #(.DEPTH(IB_DEPTH), .CNT_W(CNT_W)) u_ib (
      .clk, .rst, .clr(tree_clr), .e_p,
      .line_valid(line_valid && line_way == w), .line_data,
      .line_count(ib_count[w]),
      .key_valid(lv[w]), .key(lk[w]), .key_ready(lr[w]), .sep_active(sep[w]));
  end
  assign sep_any = |sep;

  merge_tree #(.K(K), .KEY_W(KEY_W)) u_tree (
    .clk, .rst, .clr(tree_clr), .leaf_valid(lv), .leaf_key(lk), .leaf_ready(lr),
    .out_valid(rv), .out_key(rk), .out_ready(rr));

  output_buffer #(.CNT_W(CNT_W)) u_ob (
    .clk, .rst, .e_p1, .key_valid(rv), .key(rk), .key_ready(rr), .tree_clr,
    .line_valid(ob_valid), .line_data(ob_data), .line_ready(ob_ready));
  assign iter_done = tree_clr;

  // position of the line inside its memory region
  assign ob_last = (wl_cnt == region_lines - 1'b1);
  always_ff @(posedge clk) begin
    if (rst) wl_cnt <= '0;
    else if (ob_valid && ob_ready) wl_cnt <= ob_last ? '0 : wl_cnt + 1'b1;
  end

  if (COMPRESS) begin : g_comp
    bd_compressor u_comp (
      .clk, .rst, .in_valid(ob_valid), .in_data(ob_data), .in_last(ob_last), .in_ready(ob_ready),
      .out_valid, .out_data, .out_last, .out_ready, .out_packed);
  end else begin : g_plain
    assign out_valid  = ob_valid;
    assign out_data   = ob_data;
    assign out_last   = ob_last;
    assign out_packed = 1'b0;
    assign ob_ready   = out_ready;
  end
endmodule

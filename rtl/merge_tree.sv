// K-way merge sorter tree.
// A perfect binary tree of sorter cells. Every node owns a short FIFO:
// the K leaf FIFOs are filled by the input buffers, every sorter cell
// looks at the heads of its two child FIFOs and, when both hold a key and
// its own FIFO has room, moves the smaller key up (the left one on a tie).
// The root FIFO is the tree output. One key leaves per cycle in steady
// state; a key needs log2(K)+1 cycles from a leaf FIFO to the output.
// clr is the reset signal of the output buffer: it empties every FIFO of
// the tree between two Iterations. Nodes are numbered as a heap: node 1
// is the root, nodes K..2K-1 are the leaves (way w is node K+w).
// Origin: cells with 2-entry FIFOs follow the original tree; tie-breaking to
// the left is this design's choice.
module merge_tree #(
  parameter int unsigned K          = 8,   // number of ways, a power of two
  parameter int unsigned KEY_W      = 32,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clr,
  input  logic [K-1:0]        leaf_valid,
  input  logic [KEY_W-1:0]    leaf_key [K],
  output logic [K-1:0]        leaf_ready,
  output logic                out_valid,
  output logic [KEY_W-1:0]    out_key,
  input  logic                out_ready
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);
  logic [KEY_W-1:0] head  [1:2*K-1];
  logic             empty [1:2*K-1];
  logic             full  [1:2*K-1];
  logic             push  [1:2*K-1];
  logic             pop   [1:2*K-1];
  logic [KEY_W-1:0] din   [1:2*K-1];

  for (genvar n = 1; n < 2 * K; n++) begin : g_node
    logic [CW-1:0] cnt;
    sync_fifo #(.WIDTH(KEY_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst, .clr, .push(push[n]), .wr_data(din[n]), .pop(pop[n]),
      .rd_data(head[n]), .empty(empty[n]), .full(full[n]), .count(cnt));
    a_cnt: assert property (@(posedge clk) disable iff (rst) cnt <= CW'(FIFO_DEPTH));
  end

  // sorter cells
  for (genvar n = 1; n < K; n++) begin : g_cell
    logic fire, take_right;
    assign take_right = head[2*n+1] < head[2*n];
    assign fire       = !empty[2*n] && !empty[2*n+1] && !full[n];
    assign push[n]    = fire;
    assign din[n]     = take_right ? head[2*n+1] : head[2*n];
    assign pop[2*n]   = fire && !take_right;
    assign pop[2*n+1] = fire && take_right;
  end

  // leaves
  for (genvar w = 0; w < K; w++) begin : g_leaf
    assign push[K+w]     = leaf_valid[w] && !full[K+w];
    assign din[K+w]      = leaf_key[w];
    assign leaf_ready[w] = !full[K+w];
  end

  assign out_valid = !empty[1];
  assign out_key   = head[1];
  assign pop[1]    = out_ready && !empty[1];
endmodule

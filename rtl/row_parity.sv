// Odd/even row identification of a node in the FPGA array.
// Nodes are chained upward by one wire. A node with no neighbour below
// (bottom row) drives 0 upward; every other node drives the inverse of the
// bit it receives from below. The bit a node drives is its own row parity:
// 0 for the bottom row, 1 for the row above it, and so on. The stencil
// node uses it to choose its computation order (parity 1: upward),
// so vertically adjacent nodes always run in opposite directions.
// Purely combinational: the chain settles after reset like any wire.
// Origin: the one-inverter-per-node chain follows the original design; the
// bottom-node convention is this design's choice.
module row_parity (
  input  logic has_below,    // a neighbour is connected below
  input  logic from_below,   // bit driven by that neighbour
  output logic to_above,     // bit driven to the neighbour above
  output logic odd           // this node is on an odd row
);
  assign to_above = has_below ? ~from_below : 1'b0;
  assign odd      = to_above;
endmodule

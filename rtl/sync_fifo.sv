// Synchronous FIFO used for the long FIFOs (input/output buffers), the
// short FIFOs between sorter cells and the decompressor input FIFO.
// First-word-fall-through: rd_data shows the oldest entry whenever
// empty is low. A push when full or a pop when empty is ignored (and
// flagged by an assertion). clr empties the FIFO in one cycle; it is the
// tree reset of the merge sorter. count is the occupancy.
// Origin: a generic helper of this design.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp] <= wr_data;

  a_no_overflow: assert property (@(posedge clk) disable iff (rst || clr) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst || clr) !(pop && empty));
endmodule

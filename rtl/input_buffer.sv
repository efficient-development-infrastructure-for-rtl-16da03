// Input buffer of one way of the merge sorter tree.
// Lines of 16 sorted keys arrive from the sorting network and wait in the
// long FIFO. A 512-bit shift register takes one line at a time and hands
// its keys, smallest first, to the leaf FIFO of the tree. A counter counts
// the keys handed over in the current Iteration; once it has reached e_p
// (the number of keys per Unit in this phase) the buffer sends MAX_KEY
// instead, so the keys of the next Unit stay in the long FIFO until the
// tree reset (clr) clears the counter. Keys of the next Unit are never
// mixed into the current merge.
// Timing: a line pushed into an empty buffer gives its first key one cycle
// later; after that one key per cycle while the tree accepts them.
// Origin: long FIFO, shift register, counter and MaxValue insertion follow
// the original design; the FIFO depth and the exact separator cycle are this
// design's choices.
module input_buffer
  import sort_pkg::*;
#(
  parameter int unsigned DEPTH = 8,    // long FIFO depth in lines
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,          // tree reset between Iterations
  input  logic [CNT_W-1:0] e_p,          // keys per Unit in this phase
  // lines from the sorting network
  input  logic             line_valid,
  input  line_t            line_data,
  output logic [$clog2(DEPTH+1)-1:0] line_count,
  // keys to the leaf FIFO of the tree
  output logic             key_valid,
  output key_t             key,
  input  logic             key_ready,
  output logic             sep_active     // MAX_KEY is being sent
);
  line_t fifo_head;
  logic  fifo_empty, fifo_full, fifo_pop;
  line_t sr_line;
  logic [3:0] sr_idx;
  logic  sr_valid;
  logic [CNT_W-1:0] cnt;
  logic  take;

  sync_fifo #(.WIDTH(LINE_W), .DEPTH(DEPTH)) u_long (
    .clk, .rst, .clr(1'b0), .push(line_valid), .wr_data(line_data), .pop(fifo_pop),
    .rd_data(fifo_head), .empty(fifo_empty), .full(fifo_full), .count(line_count));

  assign sep_active = (cnt >= e_p);
  assign key_valid  = !clr && (sep_active || sr_valid);
  assign key        = sep_active ? MAX_KEY : sr_line[sr_idx*KEY_W +: KEY_W];
  assign take       = key_ready && !clr && !sep_active && sr_valid;
  // load the shift register when it is empty or its last key is taken
  assign fifo_pop   = !fifo_empty && (!sr_valid || (take && sr_idx == 4'd15));

  always_ff @(posedge clk) begin
    if (rst) begin
      sr_valid <= 1'b0;
      sr_idx   <= '0;
      cnt      <= '0;
    end else begin
      if (fifo_pop) begin
        sr_line  <= fifo_head;
        sr_idx   <= '0;
        sr_valid <= 1'b1;
      end else if (take) begin
        sr_idx <= sr_idx + 4'd1;
        if (sr_idx == 4'd15) sr_valid <= 1'b0;
      end
      if (clr)       cnt <= '0;
      else if (take) cnt <= cnt + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !(line_valid && fifo_full));
endmodule

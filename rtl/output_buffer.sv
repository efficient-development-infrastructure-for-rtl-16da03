// Output buffer front end of one merge sorter tree.
// Takes the keys leaving the root of the tree, counts them, and packs them
// into 512-bit lines with a shift register (first key in the least
// significant bits). When the counter reaches e_p1, the number of keys in
// the Unit being built (E_p+1), every key of that Unit is stored and the
// keys still behind it in the tree are only separators: the buffer then
// raises tree_clr for one cycle, which empties the tree FIFOs and clears
// the counters of the input buffers and of this buffer, so the tree starts
// on the next Unit. tree_clr doubles as the end-of-Iteration pulse.
// Lines leave through a one-line register with a valid/ready handshake.
// Origin: the counter against E_p+1 and the tree reset follow the original
// design; the handshake is this design's own.
module output_buffer
  import sort_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] e_p1,
  input  logic             key_valid,
  input  key_t             key,
  output logic             key_ready,
  output logic             tree_clr,
  output logic             line_valid,
  output line_t            line_data,
  input  logic             line_ready
);
  logic [CNT_W-1:0] cnt;
  logic [LINE_W-KEY_W-1:0] pk;    // keys 0..14 of the line being packed
  logic [3:0] pk_idx;
  logic accept, line_done;

  assign tree_clr  = (cnt >= e_p1);
  assign key_ready = !tree_clr && !(pk_idx == 4'd15 && line_valid && !line_ready);
  assign accept    = key_valid && key_ready;
  assign line_done = accept && pk_idx == 4'd15;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; pk_idx <= '0; line_valid <= 1'b0;
    end else begin
      if (tree_clr)    cnt <= '0;
      else if (accept) cnt <= cnt + 1'b1;
      if (accept) begin
        if (pk_idx != 4'd15) pk[pk_idx*KEY_W +: KEY_W] <= key;
        pk_idx <= pk_idx + 4'd1;
      end
      if (line_done) begin
        line_valid <= 1'b1;
        line_data  <= {key, pk};
      end else if (line_ready) begin
        line_valid <= 1'b0;
      end
    end
  end

  a_line_aligned: assert property (@(posedge clk) disable iff (rst) tree_clr |-> pk_idx == 4'd0);
endmodule

// Base+delta compressor for the output side of a merge sorter tree.
// A 512-bit line of 16 ascending keys is compressible when every key is
// at most 0x1fff above its lower neighbour. Such a line is reduced to a
// 227-bit pack: the smallest key as base (bits 31:0) and the 15
// neighbour differences as 13-bit deltas (delta i, key i minus key i-1, at
// bits 32+13(i-1)). Two compressible lines in a row are written as one
// line: flag 1 in bits 511:479, zeros in 478:454, second pack in 453:227,
// first pack in 226:0. A compressible line waits in a one-line temp slot
// for its successor; if the successor is not compressible both go out
// unchanged, one per cycle. in_last marks the last line of a memory
// region; a pair never crosses it, so the decompressor reading one region
// only ever sees lines of that region. out_last marks the line that
// completes the region. Handshakes are valid/ready on both sides.
// Origin: the compressibility test, the packed layout and the temp slot
// follow the original design; the valid/ready handshake and the region rule
// (no pair across in_last) are this design's own.
module bd_compressor
  import sort_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  line_t in_data,
  input  logic  in_last,
  output logic  in_ready,
  output logic  out_valid,
  output line_t out_data,
  output logic  out_last,
  input  logic  out_ready,
  output logic  out_packed      // the current output line is a packed pair
);
  function automatic logic compressible(input line_t l);
    logic ok = 1'b1;
    for (int i = 1; i < int'(LINE_KEYS); i++)
      if (l[i*KEY_W +: KEY_W] - l[(i-1)*KEY_W +: KEY_W] > MAX_DELTA) ok = 1'b0;
    return ok;
  endfunction

  function automatic pack_t pack(input line_t l);
    pack_t p;
    p[KEY_W-1:0] = l[KEY_W-1:0];
    for (int i = 1; i < int'(LINE_KEYS); i++)
      p[KEY_W + (i-1)*DELTA_W +: DELTA_W] =
        DELTA_W'(l[i*KEY_W +: KEY_W] - l[(i-1)*KEY_W +: KEY_W]);
    return p;
  endfunction

  logic  h_valid, h_plain, h_last;
  line_t h_line;
  logic  can_out, in_comp, fire;

  assign can_out  = !out_valid || out_ready;
  assign in_ready = can_out && !(h_valid && h_plain);
  assign fire     = in_valid && in_ready;
  assign in_comp  = compressible(in_data);

  always_ff @(posedge clk) begin
    if (rst) begin
      h_valid <= 1'b0; out_valid <= 1'b0; out_packed <= 1'b0; out_last <= 1'b0;
    end else if (can_out) begin
      out_valid <= 1'b0;
      if (h_valid && h_plain) begin
        out_valid <= 1'b1; out_data <= h_line; out_last <= h_last; out_packed <= 1'b0;
        h_valid <= 1'b0;
      end else if (fire) begin
        if (!h_valid) begin
          if (in_comp && !in_last) begin
            h_valid <= 1'b1; h_plain <= 1'b0; h_line <= in_data; h_last <= 1'b0;
          end else begin
            out_valid <= 1'b1; out_data <= in_data; out_last <= in_last; out_packed <= 1'b0;
          end
        end else if (in_comp) begin
          out_valid  <= 1'b1;
          out_data   <= {COMP_FLAG, 25'd0, pack(in_data), pack(h_line)};
          out_last   <= in_last;
          out_packed <= 1'b1;
          h_valid    <= 1'b0;
        end else begin
          out_valid <= 1'b1; out_data <= h_line; out_last <= 1'b0; out_packed <= 1'b0;
          h_valid <= 1'b1; h_plain <= 1'b1; h_line <= in_data; h_last <= in_last;
        end
      end
    end
  end
endmodule

// Initial data generator of the sorting accelerator.
// Produces the unsorted input: n_lines memory lines of 16 keys, one key
// per cycle, in one of three orders: xorshift pseudo-random keys
// (Marsaglia's 128-bit xorshift: t = x ^ (x << 11), new w =
// w ^ (w >> 19) ^ t ^ (t >> 8), state shifted x <- y <- z <- w; seeds
// 123456789, 362436069, 521288629 and 88675123 xor seed), ascending keys
// 1, 2, ..., or descending keys n, n-1, ..., 1 where n = 16 n_lines.
// start loads the state; a finished line is offered with line_valid and
// its line number and held until line_ready; done rises after the last.
// Origin: the xorshift seeds and shifts and the three orders follow the
// original generator; the line handshake is this design's own.
module init_data_gen
  import sort_pkg::*;
#(
  parameter int unsigned LINE_AW = 24
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  gen_mode_e          mode,
  input  key_t               seed,
  input  logic [LINE_AW-1:0] n_lines,
  output logic               line_valid,
  output line_t              line_data,
  output logic [LINE_AW-1:0] line_idx,
  input  logic               line_ready,
  output logic               done
);
  key_t x, y, z, w, t;
  key_t seq;             // next key of the sorted / reverse orders
  logic busy;
  logic [3:0] kidx;
  logic [LINE_AW-1:0] gen_cnt;  // lines generated so far
  logic [LINE_W-KEY_W-1:0] acc;   // keys 0..14 of the line being built
  logic step;

  assign t    = x ^ (x << 11);
  assign step = busy && !(line_valid && !line_ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; line_valid <= 1'b0; done <= 1'b0;
    end else if (start) begin
      x <= 32'd123456789; y <= 32'd362436069; z <= 32'd521288629; w <= 32'd88675123 ^ seed;
      seq      <= (mode == GEN_REVERSE) ? key_t'({n_lines, 4'd0}) : 32'd1;
      busy     <= (n_lines != 0);
      done     <= (n_lines == 0);
      kidx     <= '0;
      gen_cnt  <= '0;
      line_idx <= '0;
      line_valid <= 1'b0;
    end else begin
      if (line_valid && line_ready) begin
        line_valid <= 1'b0;
        line_idx   <= line_idx + 1'b1;
        if (line_idx + 1'b1 == n_lines) done <= 1'b1;
      end
      if (step) begin
        key_t k;
        unique case (mode)
          GEN_SORTED:  begin k = seq; seq <= seq + 1'b1; end
          GEN_REVERSE: begin k = seq; seq <= seq - 1'b1; end
          default: begin
            k = (w ^ (w >> 19)) ^ (t ^ (t >> 8));   // the new w is the key
            x <= y; y <= z; z <= w;
            w <= k;
          end
        endcase
        if (kidx != 4'd15) acc[kidx*KEY_W +: KEY_W] <= k;
        kidx <= kidx + 4'd1;
        if (kidx == 4'd15) begin
          line_valid <= 1'b1;
          line_data  <= {k, acc};
          gen_cnt <= gen_cnt + 1'b1;
          if (gen_cnt + 1'b1 == n_lines) busy <= 1'b0;
        end
      end
    end
  end
endmodule

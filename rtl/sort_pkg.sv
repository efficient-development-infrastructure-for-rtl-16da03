// Shared types and constants of the merge-sort accelerator.
// A memory line is 512 bits and holds sixteen 32-bit keys, key 0 in the
// least significant bits. Keys are unsigned and sorted ascending inside a
// line. MAX_KEY (all ones) is the separator inserted after the keys of a
// Unit so that a sorter cell never picks a key that belongs to the next Unit.
// The compressed line format follows the 2x compression layout:
//   [511:479] flag (33 bits, value 1 marks a compressed line)
//   [478:454] void (25 bits, zero)
//   [453:227] second packed line: 15 x 13-bit deltas above a 32-bit base
//   [226:0]   first packed line:  15 x 13-bit deltas above a 32-bit base
// Origin: widths and the packed layout follow the original design.
package sort_pkg;
  localparam int unsigned KEY_W    = 32;
  localparam int unsigned LINE_KEYS = 16;
  localparam int unsigned LINE_W   = KEY_W * LINE_KEYS;   // 512
  localparam int unsigned DELTA_W  = 13;
  localparam int unsigned PACK_W   = KEY_W + (LINE_KEYS - 1) * DELTA_W; // 227
  localparam int unsigned FLAG_W   = 33;
  localparam logic [FLAG_W-1:0] COMP_FLAG = 33'h0_0000_0001;
  localparam logic [KEY_W-1:0]  MAX_KEY   = '1;
  localparam logic [KEY_W-1:0]  MAX_DELTA = 32'h0000_1fff;

  typedef logic [KEY_W-1:0]  key_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [PACK_W-1:0] pack_t;

  // data-generation types of the initial data generator
  typedef enum logic [1:0] {GEN_XORSHIFT = 2'd0, GEN_SORTED = 2'd1, GEN_REVERSE = 2'd2} gen_mode_e;
endpackage

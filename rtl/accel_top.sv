// Top level: the two accelerators of the design side by side.
//   - Sorting accelerator (sort_accel, 8-way merge trees, 8 trees in
//     parallel, base+delta compression) with its initial data generator.
//     Both share one external-memory interface of 512-bit lines: the
//     generator fills the source area (src_base + line index) when started
//     with gen_start, the sorter then sorts the area in place of memory
//     with sort_start. The memory side is the controller's user port:
//       read : rd_req/rd_addr, accepted by rd_gnt; data returns in order
//              on rd_valid/rd_data after any latency;
//       write: wr_req/wr_addr/wr_data, accepted by wr_gnt.
//     The write port belongs to the generator while the sorter is idle.
//   - Stencil array (stencil_array, 4 x 4 nodes of 64 x 128 values) with
//     its host load/readback port and its counters.
// The two parts share only clock and reset.
// Origin: both accelerators follow the original designs; placing them in one
// top and sharing the write port between generator and sorter are this
// design's choices.
module accel_top
  import sort_pkg::*;
#(
  parameter int unsigned K       = 8,
  parameter int unsigned P       = 8,
  parameter bit          COMPRESS = 1'b1,
  parameter int unsigned LINE_AW = 26,
  parameter int unsigned NX      = 4,
  parameter int unsigned NY      = 4,
  parameter int unsigned NM      = 8,
  parameter int unsigned NS      = 8,
  parameter int unsigned H       = 128,
  parameter int unsigned PERIOD  = 4 * 8 * 128 + 64
) (
  input  logic               clk,
  input  logic               rst,
  // ---- data generator
  input  logic               gen_start,
  input  gen_mode_e          gen_mode,
  input  key_t               gen_seed,
  output logic               gen_done,
  // ---- sorter control
  input  logic               sort_start,
  input  logic [LINE_AW-1:0] n_lines,
  input  logic [LINE_AW-1:0] src_base,
  input  logic [LINE_AW-1:0] tmp_base,
  output logic               sort_busy,
  output logic               sort_done,
  output logic [LINE_AW-1:0] result_base,
  output logic [LINE_AW-1:0] result_end [K*P],
  output logic [47:0]        sort_cycles,
  output logic [7:0]         st_phases,
  output logic [31:0]        st_sort_iters,
  output logic [31:0]        st_packed,
  output logic [31:0]        st_rd_stall,
  output logic [31:0]        st_sep,
  // ---- external memory
  output logic               rd_req,
  output logic [LINE_AW-1:0] rd_addr,
  input  logic               rd_gnt,
  input  logic               rd_valid,
  input  line_t              rd_data,
  output logic               wr_req,
  output logic [LINE_AW-1:0] wr_addr,
  output line_t              wr_data,
  input  logic               wr_gnt,
  // ---- stencil array
  input  logic               sten_start,
  input  logic [31:0]        sten_iters,
  input  logic [31:0]        coef [4],
  output logic               sten_done,
  input  logic               ld_we,
  input  logic [$clog2(NX*NY)-1:0]    ld_node,
  input  logic [1:0]                  ld_sel,
  input  logic [$clog2(NM*NS*H)-1:0]  ld_addr,
  input  logic [31:0]                 ld_data,
  input  logic [$clog2(NX*NY)-1:0]    rb_node,
  input  logic [$clog2(NM*NS*H)-1:0]  rb_addr,
  output logic [31:0]                 rb_data,
  output logic [31:0]        st_sten_iters,
  output logic [31:0]        st_sten_stall,
  output logic [31:0]        st_halo,
  output logic [NY-1:0]      row_odd
);
  // ------------------------------------------------------------ sorter side
  logic               g_valid, g_ready;
  line_t              g_data;
  logic [LINE_AW-1:0] g_idx;
  logic               s_wr_req;
  logic [LINE_AW-1:0] s_wr_addr;
  line_t              s_wr_data;

  init_data_gen #(.LINE_AW(LINE_AW)) u_gen (
    .clk, .rst, .start(gen_start), .mode(gen_mode), .seed(gen_seed), .n_lines,
    .line_valid(g_valid), .line_data(g_data), .line_idx(g_idx), .line_ready(g_ready),
    .done(gen_done));

  sort_accel #(.K(K), .P(P), .COMPRESS(COMPRESS), .LINE_AW(LINE_AW)) u_sort (
    .clk, .rst, .start(sort_start), .n_lines, .src_base, .tmp_base,
    .busy(sort_busy), .done(sort_done), .result_base, .result_end, .cycles(sort_cycles),
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .wr_req(s_wr_req), .wr_addr(s_wr_addr), .wr_data(s_wr_data), .wr_gnt,
    .st_phases, .st_iters(st_sort_iters), .st_packed, .st_rd_stall, .st_sep);

  always_comb begin
    if (sort_busy) begin
      wr_req = s_wr_req; wr_addr = s_wr_addr; wr_data = s_wr_data;
    end else begin
      wr_req = g_valid; wr_addr = src_base + g_idx; wr_data = g_data;
    end
  end
  assign g_ready = !sort_busy && wr_gnt;

  // ------------------------------------------------------------ stencil side
  stencil_array #(.NX(NX), .NY(NY), .NM(NM), .NS(NS), .H(H), .PERIOD(PERIOD)) u_sten (
    .clk, .rst, .start(sten_start), .n_iters(sten_iters), .coef, .done(sten_done),
    .ld_we, .ld_node, .ld_sel, .ld_addr, .ld_data, .rb_node, .rb_addr, .rb_data,
    .st_iters(st_sten_iters), .st_stall(st_sten_stall), .st_halo, .row_odd);
endmodule

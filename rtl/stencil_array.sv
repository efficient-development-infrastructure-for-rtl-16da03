// Two-dimensional array of stencil nodes (NX columns x NY rows, 4 x 4 =
// 16 FPGAs by default) computing one large Jacobi grid of
// (NX*NM*NS) x (NY*H) values, each node owning one block.
// Wiring between neighbours (node (x,y), y = 0 is the top row):
//   - boundary links: a node's bottom row goes to the halo above of the
//     node below, its top row to the halo below of the node above, and its
//     left/right columns to the right/left neighbours; halos at the array
//     edge keep the values loaded by the host (fixed boundary);
//   - synchronisation: node (0,0) is the master; every node listens to the
//     sync outputs of its left and upper neighbours, so the event sweeps
//     right and down;
//   - row parity: each node passes its parity to the node above; the
//     bottom row has no node below and is even.
// Host port: start/n_iters/coef go to all nodes; ld_* writes into node
// ld_node and rb_* reads node rb_node (same encoding as the node, read
// data two cycles after rb_node/rb_addr). done when all nodes are done.
// Counters: Iterations of the master, summed stall cycles of all nodes,
// boundary values moved over the links, and the row-parity pattern.
// Origin: the 2D array, master-driven synchronisation and parity chain
// follow the original system; direct links, the host port and the fixed
// boundary are this design's choices.
module stencil_array #(
  parameter int unsigned NX     = 4,
  parameter int unsigned NY     = 4,
  parameter int unsigned NM     = 8,
  parameter int unsigned NS     = 8,
  parameter int unsigned H      = 128,
  parameter int unsigned PERIOD = 4 * 8 * 128 + 64,
  parameter int unsigned PULSE  = 32,
  parameter int unsigned DET    = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] n_iters,
  input  logic [31:0] coef [4],
  output logic        done,
  input  logic        ld_we,
  input  logic [$clog2(NX*NY)-1:0] ld_node,
  input  logic [1:0]  ld_sel,
  input  logic [$clog2(NM*NS*H)-1:0] ld_addr,
  input  logic [31:0] ld_data,
  input  logic [$clog2(NX*NY)-1:0] rb_node,
  input  logic [$clog2(NM*NS*H)-1:0] rb_addr,
  output logic [31:0] rb_data,
  output logic [31:0] st_iters,
  output logic [31:0] st_stall,
  output logic [31:0] st_halo,
  output logic [NY-1:0] row_odd
);
  localparam int unsigned N  = NX * NY;
  localparam int unsigned W  = NM * NS;
  localparam int unsigned IW = $clog2(2*H > 2*W ? 2*H : 2*W);

  logic        n_done [N];
  logic        par_up [N];
  logic        sync_o [N];
  logic        hov [N][4];
  logic [IW-1:0] hoi [N][4];
  logic [31:0] hod [N][4];
  logic [31:0] n_rb [N], n_it [N], n_st [N];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned ID = y * NX + x;
      logic          hiv [4];
      logic [IW-1:0] hii [4];
      logic [31:0]   hid [4];
      // halo above <- bottom row of the node above, etc.
      assign hiv[0] = (y > 0)      ? hov[(y > 0 ? ID - NX : ID)][1] : 1'b0;
      assign hii[0] = (y > 0)      ? hoi[(y > 0 ? ID - NX : ID)][1] : '0;
      assign hid[0] = (y > 0)      ? hod[(y > 0 ? ID - NX : ID)][1] : '0;
      assign hiv[1] = (y < NY - 1) ? hov[(y < NY - 1 ? ID + NX : ID)][0] : 1'b0;
      assign hii[1] = (y < NY - 1) ? hoi[(y < NY - 1 ? ID + NX : ID)][0] : '0;
      assign hid[1] = (y < NY - 1) ? hod[(y < NY - 1 ? ID + NX : ID)][0] : '0;
      assign hiv[2] = (x > 0)      ? hov[(x > 0 ? ID - 1 : ID)][3] : 1'b0;
      assign hii[2] = (x > 0)      ? hoi[(x > 0 ? ID - 1 : ID)][3] : '0;
      assign hid[2] = (x > 0)      ? hod[(x > 0 ? ID - 1 : ID)][3] : '0;
      assign hiv[3] = (x < NX - 1) ? hov[(x < NX - 1 ? ID + 1 : ID)][2] : 1'b0;
      assign hii[3] = (x < NX - 1) ? hoi[(x < NX - 1 ? ID + 1 : ID)][2] : '0;
      assign hid[3] = (x < NX - 1) ? hod[(x < NX - 1 ? ID + 1 : ID)][2] : '0;

      stencil_node #(.NM(NM), .NS(NS), .H(H), .PERIOD(PERIOD), .PULSE(PULSE), .DET(DET)) u_node (
        .clk, .rst, .start, .n_iters, .coef,
        .is_master(x == 0 && y == 0), .done(n_done[ID]),
        .has_below(y < NY - 1),
        .parity_from_below((y < NY - 1) ? par_up[(y < NY - 1 ? ID + NX : ID)] : 1'b0),
        .parity_to_above(par_up[ID]),
        .sync_in_left((x > 0) ? sync_o[(x > 0 ? ID - 1 : ID)] : 1'b0),
        .sync_in_up((y > 0) ? sync_o[(y > 0 ? ID - NX : ID)] : 1'b0),
        .sync_out(sync_o[ID]),
        .hin_valid(hiv), .hin_idx(hii), .hin_data(hid),
        .hout_valid(hov[ID]), .hout_idx(hoi[ID]), .hout_data(hod[ID]),
        .ld_we(ld_we && ld_node == ($clog2(N))'(ID)), .ld_sel, .ld_addr, .ld_data,
        .rb_addr, .rb_data(n_rb[ID]),
        .st_iters(n_it[ID]), .st_stall(n_st[ID]));
    end
    assign row_odd[y] = par_up[y * NX];
  end

  // readback: node select registered to line up with the node's read data
  logic [$clog2(N)-1:0] rb_sel;
  always_ff @(posedge clk) begin
    rb_sel  <= rb_node;
    rb_data <= n_rb[rb_sel];
  end

  always_comb begin
    done = 1'b1;
    st_stall = '0;
    for (int i = 0; i < int'(N); i++) begin
      done = done && n_done[i];
      st_stall = st_stall + n_st[i];
    end
  end
  assign st_iters = n_it[0];

  // boundary values moved between nodes (edge links are not connected)
  always_ff @(posedge clk) begin
    if (rst || start) st_halo <= '0;
    else begin
      logic [31:0] s;
      s = '0;
      for (int y = 0; y < int'(NY); y++)
        for (int x = 0; x < int'(NX); x++) begin
          if (hov[y*NX+x][0] && y > 0)            s = s + 1;
          if (hov[y*NX+x][1] && y < int'(NY) - 1) s = s + 1;
          if (hov[y*NX+x][2] && x > 0)            s = s + 1;
          if (hov[y*NX+x][3] && x < int'(NX) - 1) s = s + 1;
        end
      st_halo <= st_halo + s;
    end
  end
endmodule

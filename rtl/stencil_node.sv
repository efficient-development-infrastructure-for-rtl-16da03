// One node (one FPGA) of the scalable 2D Jacobi stencil accelerator.
//
// The node holds a W x H block of single-precision values, W = NM * NS
// (8 MADDs x 8 pipeline stages = 64 columns) by H = 128 rows, split into
// NM vertical strips of NS columns, strip j in memory bank j. Each
// Iteration computes, for every point,
//   v'(i,j) = c0 v(i-1,j) + c1 v(i,j-1) + c2 v(i,j+1) + c3 v(i+1,j).
// All MADDs work in lockstep, one row per 4*NS-cycle block: in each block
// MADD j is fed, NS points at a time, the term of the row processed before
// (term 0), the left neighbours (term 1), the right neighbours (term 2)
// and the row processed after (term 3). All banks are read at the same
// address each cycle; a MADD takes the left neighbour of its first column
// from bank j-1 and the right neighbour of its last column from bank j+1.
// A point's result is written back 5*NS cycles after its first operand,
// after its old value has been read for the last time, so no extra buffer
// is needed: one Iteration takes 4*NS*H cycles (4096).
//
// Rows are processed downward (top row first) on even rows of nodes and
// upward on odd rows (row_parity), so a boundary row is computed almost an
// Iteration before the neighbour needs it. Values outside the block come
// from halo memories: the rows above and below (one value per column) and
// the columns left and right (one value per row). Computed boundary values
// are sent to the four neighbours through FIFOs and round-robin
// multiplexers; incoming ones are written to the halo memories. Halo
// memories of an array edge keep what the host loaded: a fixed boundary.
//
// Iterations start on the go events of the sync unit; a node that has
// finished an Iteration stalls until the next event. Host port (while
// idle): ld_* writes a value (ld_sel 0: block, address row*W+col; 1: halo
// rows, 0..W-1 above, W..2W-1 below; 2: halo columns, 0..H-1 left,
// H..2H-1 right); rb_addr reads the block with one cycle of latency.
// Origin: 8 MADDs over 8-column strips, the term order, the up/down row
// order and the boundary FIFOs follow the original node; halo storage as
// register arrays, in-place write-back and the host port are this design's
// choices.
module stencil_node #(
  parameter int unsigned NM      = 8,     // MADDs
  parameter int unsigned NS      = 8,     // MADD pipeline depth = strip width
  parameter int unsigned H       = 128,   // rows
  parameter int unsigned PERIOD  = 4 * 8 * 128 + 64,   // alpha + beta
  parameter int unsigned PULSE   = 32,
  parameter int unsigned DET     = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,          // arm for n_iters Iterations
  input  logic [31:0] n_iters,
  input  logic [31:0] coef [4],       // c0..c3
  input  logic        is_master,
  output logic        done,
  // location
  input  logic        has_below,
  input  logic        parity_from_below,
  output logic        parity_to_above,
  // synchronisation
  input  logic        sync_in_left,
  input  logic        sync_in_up,
  output logic        sync_out,
  // boundary links: 0 up, 1 down, 2 left, 3 right
  input  logic        hin_valid [4],
  input  logic [$clog2(2*H > 2*NM*NS ? 2*H : 2*NM*NS)-1:0] hin_idx [4],
  input  logic [31:0] hin_data [4],
  output logic        hout_valid [4],
  output logic [$clog2(2*H > 2*NM*NS ? 2*H : 2*NM*NS)-1:0] hout_idx [4],
  output logic [31:0] hout_data [4],
  // host access
  input  logic        ld_we,
  input  logic [1:0]  ld_sel,
  input  logic [$clog2(NM*NS*H)-1:0] ld_addr,
  input  logic [31:0] ld_data,
  input  logic [$clog2(NM*NS*H)-1:0] rb_addr,
  output logic [31:0] rb_data,
  // event counters
  output logic [31:0] st_iters,
  output logic [31:0] st_stall
);
  localparam int unsigned W     = NM * NS;
  localparam int unsigned BLK   = 4 * NS;
  localparam int unsigned AW    = $clog2(W * H);
  localparam int unsigned BAW   = $clog2(NS * H);       // bank address
  localparam int unsigned RWD   = $clog2(H);
  localparam int unsigned CWD   = (NS > 1) ? $clog2(NS) : 1;
  localparam int unsigned TW    = $clog2(BLK);
  localparam int unsigned IW    = $clog2(2*H > 2*W ? 2*H : 2*W);
  localparam int unsigned TAG_W = RWD + CWD;

  // ------------------------------------------------------------ location, sync
  logic odd, go, pending, running, enabled;
  logic [31:0] iters_left;
  row_parity u_par (.has_below, .from_below(parity_from_below), .to_above(parity_to_above), .odd);
  sync_unit #(.PERIOD(PERIOD), .PULSE(PULSE), .DET(DET)) u_sync (
    .clk, .rst, .enable(enabled), .is_master, .sync_in_left, .sync_in_up, .sync_out, .go);

  // ------------------------------------------------------------ sequencing
  logic [TW-1:0]  t;        // cycle in block
  logic [RWD-1:0] blk;      // block number
  logic [RWD-1:0] row;
  logic [1:0]     term;
  logic [CWD-1:0] c;
  logic [7:0]     drain;

  assign term = t[TW-1 -: 2];
  assign c    = t[CWD-1:0];
  assign row  = odd ? RWD'(H - 1) - blk : blk;

  always_ff @(posedge clk) begin
    if (rst) begin
      enabled <= 1'b0; running <= 1'b0; pending <= 1'b0; done <= 1'b0;
      t <= '0; blk <= '0; iters_left <= '0; st_iters <= '0; st_stall <= '0; drain <= '0;
    end else begin
      if (start) begin
        enabled <= (n_iters != 0); iters_left <= n_iters; done <= (n_iters == 0);
        st_iters <= '0; st_stall <= '0; pending <= 1'b0;
      end else begin
        if (go && iters_left != 0) pending <= 1'b1;
        if (!running && pending && iters_left != 0) begin
          running <= 1'b1; pending <= go; t <= '0; blk <= '0;
        end else if (running) begin
          t <= t + 1'b1;
          if (t == TW'(BLK - 1)) begin
            blk <= blk + 1'b1;
            if (blk == RWD'(H - 1)) begin
              running    <= 1'b0;
              iters_left <= iters_left - 1'b1;
              st_iters   <= st_iters + 1'b1;
              if (iters_left == 1) drain <= 8'(6 * NS + 8);
            end
          end
        end else if (enabled && iters_left != 0) begin
          st_stall <= st_stall + 1'b1;
        end
        // the last results leave the MADDs 5*NS cycles after the last issue
        if (drain != 0) begin
          drain <= drain - 1'b1;
          if (drain == 1) begin done <= 1'b1; enabled <= 1'b0; end
        end
      end
    end
  end

  // ------------------------------------------------------------ issue stage
  logic [RWD-1:0] rr;          // row read when it is inside the block
  logic           halo_row_rd; // term reads a halo row
  logic           halo_up;     // which halo row
  logic [CWD-1:0] cc;          // column read inside each strip
  logic           shl, shr;    // take from strip j-1 / j+1
  logic [31:0]    wgt;
  always_comb begin
    logic signed [RWD+1:0] r;
    r  = $signed({2'b00, row});
    cc = c;
    shl = 1'b0; shr = 1'b0;
    unique case (term)
      2'd0: r = odd ? r + 1 : r - 1;
      2'd3: r = odd ? r - 1 : r + 1;
      2'd1: begin cc = c - 1'b1; shl = (c == 0); end
      default: begin cc = c + 1'b1; shr = (c == CWD'(NS - 1)); end
    endcase
    halo_row_rd = (r < 0) || (r >= $signed((RWD+2)'(H)));
    halo_up     = (r < 0);
    rr          = RWD'(r);
    unique case (term)
      2'd0: wgt = odd ? coef[3] : coef[0];
      2'd1: wgt = coef[1];
      2'd2: wgt = coef[2];
      default: wgt = odd ? coef[0] : coef[3];
    endcase
  end

  // ------------------------------------------------------------ memories
  logic [31:0]    bank_q [NM];
  logic [BAW-1:0] rd_a, wr_a;
  logic           wr_en;
  logic [31:0]    wr_d [NM];
  logic [31:0]    halo_row [2][W];
  logic [31:0]    halo_col [2][H];

  assign rd_a = running ? BAW'(rr) * BAW'(NS) + BAW'(cc)
                        : BAW'(rb_addr / AW'(W)) * BAW'(NS) + BAW'(rb_addr % AW'(NS));

  for (genvar j = 0; j < NM; j++) begin : g_bank
    logic [31:0] mem [NS * H];
    logic        we;
    logic [BAW-1:0] wa;
    logic [31:0] wd;
    assign we = wr_en || (!running && ld_we && ld_sel == 2'd0 && (ld_addr % AW'(W)) / AW'(NS) == AW'(j));
    assign wa = wr_en ? wr_a : BAW'(ld_addr / AW'(W)) * BAW'(NS) + BAW'(ld_addr % AW'(NS));
    assign wd = wr_en ? wr_d[j] : ld_data;
    always_ff @(posedge clk) begin
      if (we) mem[wa] <= wd;
      bank_q[j] <= mem[rd_a];
    end
  end

  // readback: bank chosen by the column, one cycle later
  logic [$clog2(NM)-1:0] rb_bank;
  always_ff @(posedge clk) rb_bank <= ($clog2(NM))'((rb_addr % AW'(W)) / AW'(NS));
  assign rb_data = bank_q[rb_bank];

  // halo memories
  always_ff @(posedge clk) begin
    if (hin_valid[0]) halo_row[0][hin_idx[0][$clog2(W)-1:0]] <= hin_data[0];
    if (hin_valid[1]) halo_row[1][hin_idx[1][$clog2(W)-1:0]] <= hin_data[1];
    if (hin_valid[2]) halo_col[0][hin_idx[2][RWD-1:0]] <= hin_data[2];
    if (hin_valid[3]) halo_col[1][hin_idx[3][RWD-1:0]] <= hin_data[3];
    if (!running && ld_we && ld_sel == 2'd1) halo_row[ld_addr >= AW'(W)][($clog2(W))'(ld_addr % AW'(W))] <= ld_data;
    if (!running && ld_we && ld_sel == 2'd2) halo_col[ld_addr >= AW'(H)][RWD'(ld_addr % AW'(H))] <= ld_data;
  end

  // ------------------------------------------------------------ operand stage
  logic           s_valid, s_hrow, s_shl, s_shr;
  logic [1:0]     s_term;
  logic [CWD-1:0] s_c;
  logic [RWD-1:0] s_row;
  logic [31:0]    s_wgt, s_hl, s_hr;
  logic [31:0]    s_hrv [NM];
  always_ff @(posedge clk) begin
    s_valid <= running && !rst;
    s_hrow  <= halo_row_rd;
    s_shl   <= shl;
    s_shr   <= shr;
    s_term  <= term;
    s_c     <= c;
    s_row   <= row;
    s_wgt   <= wgt;
    s_hl    <= halo_col[0][row];
    s_hr    <= halo_col[1][row];
    for (int j = 0; j < int'(NM); j++) s_hrv[j] <= halo_row[halo_up ? 0 : 1][j * NS + int'(cc)];
  end

  logic             m_ov [NM];
  logic [31:0]      m_y  [NM];
  logic [TAG_W-1:0] m_tag [NM];
  for (genvar j = 0; j < NM; j++) begin : g_madd
    logic [31:0] xo;
    always_comb begin
      if (s_hrow)                xo = s_hrv[j];
      else if (s_shl)            xo = (j == 0)      ? s_hl : bank_q[(j + NM - 1) % NM];
      else if (s_shr)            xo = (j == NM - 1) ? s_hr : bank_q[(j + 1) % NM];
      else                       xo = bank_q[j];
    end
    madd #(.STAGES(NS), .TAG_W(TAG_W)) u_madd (
      .clk, .rst, .in_valid(s_valid), .in_term(s_term), .x(xo), .c(s_wgt),
      .in_tag({s_row, s_c}),
      .out_valid(m_ov[j]), .y(m_y[j]), .out_tag(m_tag[j]));
    assign wr_d[j] = m_y[j];
  end

  // ------------------------------------------------------------ write-back
  logic [RWD-1:0] w_row;
  logic [CWD-1:0] w_c;
  assign {w_row, w_c} = m_tag[0];
  assign wr_en = m_ov[0];
  assign wr_a  = BAW'(w_row) * BAW'(NS) + BAW'(w_c);

  // boundary values to the neighbours
  logic [NM-1:0] up_v, dn_v;
  logic [IW-1:0] up_i [NM];
  logic [31:0]   up_d [NM];
  for (genvar j = 0; j < NM; j++) begin : g_bnd
    assign up_v[j] = m_ov[j] && w_row == '0;
    assign dn_v[j] = m_ov[j] && w_row == RWD'(H - 1);
    assign up_i[j] = IW'(j * NS) + IW'(w_c);
    assign up_d[j] = m_y[j];
  end
  logic [IW-1:0] l_i [1], r_i [1];
  logic [31:0]   l_d [1], r_d [1];
  assign l_i[0] = IW'(w_row);
  assign r_i[0] = IW'(w_row);
  assign l_d[0] = m_y[0];
  assign r_d[0] = m_y[NM-1];

  halo_sender #(.LANES(NM), .DEPTH(NS), .IDX_W(IW)) u_snd_up (
    .clk, .rst, .in_valid(up_v), .in_idx(up_i), .in_data(up_d),
    .out_valid(hout_valid[0]), .out_idx(hout_idx[0]), .out_data(hout_data[0]));
  halo_sender #(.LANES(NM), .DEPTH(NS), .IDX_W(IW)) u_snd_dn (
    .clk, .rst, .in_valid(dn_v), .in_idx(up_i), .in_data(up_d),
    .out_valid(hout_valid[1]), .out_idx(hout_idx[1]), .out_data(hout_data[1]));
  halo_sender #(.LANES(1), .DEPTH(4), .IDX_W(IW)) u_snd_l (
    .clk, .rst, .in_valid(wr_en && w_c == '0), .in_idx(l_i), .in_data(l_d),
    .out_valid(hout_valid[2]), .out_idx(hout_idx[2]), .out_data(hout_data[2]));
  halo_sender #(.LANES(1), .DEPTH(4), .IDX_W(IW)) u_snd_r (
    .clk, .rst, .in_valid(wr_en && w_c == CWD'(NS - 1)), .in_idx(r_i), .in_data(r_d),
    .out_valid(hout_valid[3]), .out_idx(hout_idx[3]), .out_data(hout_data[3]));
endmodule

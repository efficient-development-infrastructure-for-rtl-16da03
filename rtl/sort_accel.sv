// Merge-sort accelerator: a Batcher sorting network in front of P
// duplicated K-way merge sorter trees, working in Phases through an
// external memory, with optional base+delta compression of the lines it
// writes.
//
// The data set is N = 16 * n_lines 32-bit keys, with n_lines = K^n for
// some n >= 1 and n_lines >= K*P. One Phase reads every line once, passes
// it through the decompressor and the sorting network into the input
// buffer of one way of one tree, merges K Units of E_p keys into one Unit
// of E_p+1 = K * E_p keys per Iteration, and writes the result. The first
// Phase starts from E_1 = 16 (the sorting network sorts each line), so n
// Phases sort the data; the last Phase writes one sorted Unit.
//
// Memory layout: two areas (src_base, holding the input, and tmp_base)
// alternate as read and write area. Each area is cut into S = K*P slices of
// n_lines/S lines at fixed bases; the K regions of a Phase (one per way)
// are P consecutive slices each. In every Phase but the last, tree t
// reads slice t of every region and writes slices t*K .. t*K+K-1; in the
// last Phase tree 0 alone reads whole regions and writes all slices.
// Because compressed slices have variable length, the end address of each
// written slice is kept and tells the next Phase where a slice stops: a
// slice is written from its base onward and the writer moves to the base
// of the next slice when a slice is complete. That replaces the grain
// throttling of a burst-oriented memory controller. After done,
// result_base and result_end give the slices of the sorted output; with
// COMPRESS set, its lines may be packed pairs (see sort_pkg).
//
// Memory port: a read is issued with rd_req/rd_addr and accepted on
// rd_gnt; its line returns later on rd_valid/rd_data, in request order.
// A write is wr_req/wr_addr/wr_data, accepted on wr_gnt. Reads are only
// issued when the input buffer and the decompressor FIFO have room for the
// answer (two lines are reserved per read, since a packed pair expands to
// two), so the read-data path needs no back-pressure.
// Origin: Phases, duplicated trees with a single-tree last Phase, and
// compression follow the original design; the slice layout with end pointers
// (in place of grain-size throttling), the memory port and the read
// scheduling are this design's own.
module sort_accel
  import sort_pkg::*;
#(
  parameter int unsigned K         = 8,     // ways per tree
  parameter int unsigned P         = 8,     // duplicated trees
  parameter bit          COMPRESS  = 1'b1,
  parameter int unsigned LINE_AW   = 26,    // line address width (4 GiB / 64 B)
  parameter int unsigned IB_DEPTH  = 8,     // input buffer long FIFO, lines
  parameter int unsigned DEC_DEPTH = 8,     // decompressor FIFO, lines
  parameter int unsigned OB_DEPTH  = 8,     // output buffer long FIFO, lines
  parameter int unsigned CNT_W     = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [LINE_AW-1:0] n_lines,
  input  logic [LINE_AW-1:0] src_base,
  input  logic [LINE_AW-1:0] tmp_base,
  output logic               busy,
  output logic               done,
  output logic [LINE_AW-1:0] result_base,
  output logic [LINE_AW-1:0] result_end [K*P],
  output logic [47:0]        cycles,
  // memory read port
  output logic               rd_req,
  output logic [LINE_AW-1:0] rd_addr,
  input  logic               rd_gnt,
  input  logic               rd_valid,
  input  line_t              rd_data,
  // memory write port
  output logic               wr_req,
  output logic [LINE_AW-1:0] wr_addr,
  output line_t              wr_data,
  input  logic               wr_gnt,
  // event counters
  output logic [7:0]         st_phases,
  output logic [31:0]        st_iters,
  output logic [31:0]        st_packed,
  output logic [31:0]        st_rd_stall,
  output logic [31:0]        st_sep
);
  localparam int unsigned LK    = $clog2(K);
  localparam int unsigned LP    = (P > 1) ? $clog2(P) : 0;
  localparam int unsigned S     = K * P;
  localparam int unsigned LS    = $clog2(S);
  localparam int unsigned R     = K * P;             // readers: one per (tree, way)
  localparam int unsigned RW    = $clog2(R);
  localparam int unsigned SW    = LS + 1;
  localparam int unsigned IBC_W = $clog2(IB_DEPTH + 1);
  localparam int unsigned DCW   = $clog2(DEC_DEPTH + 1);
  localparam int unsigned OBW   = LINE_W + LINE_AW;

  typedef enum logic [1:0] {ST_IDLE, ST_SETUP, ST_RUN} state_e;
  state_e state;

  // phase parameters
  logic [CNT_W-1:0]   e_p, e_p1, n_keys;
  logic [LINE_AW-1:0] rd_area, wr_area, region_lines;
  logic [5:0]         lg_slice;
  logic               last_phase;
  logic [LINE_AW-1:0] rd_end_tbl [S];
  logic [LINE_AW-1:0] wr_end_tbl [S];

  // readers
  logic [LINE_AW-1:0] r_addr [R];
  logic [SW-1:0]      r_slice [R];
  logic [SW-1:0]      r_left [R];
  logic               r_act [R];
  logic [IBC_W:0]     r_resv [R];
  logic [IBC_W-1:0]   ib_cnt [P][K];
  logic [R-1:0]       r_elig;
  logic [RW-1:0]      rr_ptr, pick;
  logic               pick_ok;
  logic [DCW-1:0]     dec_free, outstanding;

  // writers
  logic [LINE_AW-1:0] w_addr [P];
  logic [SW-1:0]      w_slice [P];
  logic [SW-1:0]      w_stop [P];
  logic               w_act [P];

  function automatic logic [LINE_AW-1:0] slice_base(input logic [LINE_AW-1:0] area,
                                                     input logic [SW-1:0] s,
                                                     input logic [5:0] lg);
    return area + (LINE_AW'(s) << lg);
  endfunction

  // lg(n_lines) for a power of two
  logic [5:0] lg_lines;
  always_comb begin
    lg_lines = '0;
    for (int i = 0; i < int'(LINE_AW); i++) if (n_lines[i]) lg_lines = 6'(i);
  end

  assign n_keys = CNT_W'({n_lines, 4'd0});
  assign busy   = (state != ST_IDLE);

  // ---------------------------------------------------------------- read side
  logic               rd_fire;
  logic               tag_empty, tag_full;
  logic [RW-1:0]      tag_head;
  logic [$clog2(DEC_DEPTH+1)-1:0] tag_cnt;
  logic               dv, dplain;
  line_t              dd;
  logic [RW-1:0]      dt;
  logic               nv;
  line_t              nd;
  logic [RW:0]        nt;     // {plain, reader}

  always_comb begin
    for (int r = 0; r < int'(R); r++) begin
      logic has, room;
      has  = r_act[r] && (r_addr[r] != rd_end_tbl[r_slice[r][LS-1:0]]);
      room = (IBC_W+1)'(ib_cnt[r / K][r % K]) + r_resv[r] + 2 <= (IBC_W+1)'(IB_DEPTH);
      r_elig[r] = (state == ST_RUN) && has && room;
    end
    pick_ok = 1'b0;
    pick    = '0;
    for (int i = 0; i < int'(R); i++) begin
      logic [RW-1:0] c;
      c = RW'(rr_ptr + RW'(i));
      if (!pick_ok && r_elig[c]) begin pick_ok = 1'b1; pick = c; end
    end
  end

  assign rd_req  = pick_ok && (outstanding < dec_free);
  assign rd_addr = r_addr[pick];
  assign rd_fire = rd_req && rd_gnt;

  sync_fifo #(.WIDTH(RW), .DEPTH(DEC_DEPTH)) u_tags (
    .clk, .rst, .clr(1'b0), .push(rd_fire), .wr_data(pick), .pop(rd_valid),
    .rd_data(tag_head), .empty(tag_empty), .full(tag_full), .count(tag_cnt));
  // the decompressor credit check keeps outstanding reads within the tag FIFO
  a_tag_room: assert property (@(posedge clk) disable iff (rst)
    !(rd_fire && tag_full) && tag_cnt <= ($bits(tag_cnt))'(DEC_DEPTH));

  bd_decompressor #(.DEPTH(DEC_DEPTH), .TAG_W(RW)) u_dec (
    .clk, .rst, .dec_en(COMPRESS && e_p != CNT_W'(16)),
    .in_valid(rd_valid), .in_data(rd_data), .in_tag(tag_head), .free(dec_free),
    .out_valid(dv), .out_data(dd), .out_tag(dt), .out_plain(dplain));

  oem_sort_net #(.N(LINE_KEYS), .KEY_W(KEY_W), .TAG_W(RW+1)) u_net (
    .clk, .rst, .in_valid(dv), .in_tag({dplain, dt}), .in_data(dd),
    .out_valid(nv), .out_tag(nt), .out_data(nd));

  // ---------------------------------------------------------------- trees
  logic             t_ov [P], t_olast [P], t_opk [P], t_ordy [P], t_iter [P], t_sep [P];
  line_t            t_od [P];
  logic [P-1:0]     ob_empty, ob_full, ob_pop;
  logic [OBW-1:0]   ob_head [P];
  logic [P-1:0]     t_push;

  for (genvar t = 0; t < P; t++) begin : g_tree
    logic [$clog2(OB_DEPTH+1)-1:0] obc;
    sort_tree #(.K(K), .COMPRESS(COMPRESS), .IB_DEPTH(IB_DEPTH), .LINE_AW(LINE_AW), .CNT_W(CNT_W)) u_st (
      .clk, .rst, .e_p, .e_p1, .region_lines,
      .line_valid(nv && (nt[RW-1:0] / RW'(K)) == RW'(t)), .line_way(LK'(nt[RW-1:0] % RW'(K))),
      .line_data(nd), .ib_count(ib_cnt[t]),
      .out_valid(t_ov[t]), .out_data(t_od[t]), .out_last(t_olast[t]), .out_packed(t_opk[t]),
      .out_ready(t_ordy[t]), .iter_done(t_iter[t]), .sep_any(t_sep[t]));
    assign t_ordy[t] = !ob_full[t];
    assign t_push[t] = t_ov[t] && t_ordy[t];
    sync_fifo #(.WIDTH(OBW), .DEPTH(OB_DEPTH)) u_obuf (
      .clk, .rst, .clr(1'b0), .push(t_push[t]), .wr_data({w_addr[t], t_od[t]}), .pop(ob_pop[t]),
      .rd_data(ob_head[t]), .empty(ob_empty[t]), .full(ob_full[t]), .count(obc));
    a_obc: assert property (@(posedge clk) disable iff (rst) obc <= ($bits(obc))'(OB_DEPTH));
  end

  // ---------------------------------------------------------------- write side
  logic [LP > 0 ? LP-1 : 0:0] wr_rr;
  logic [LP > 0 ? LP-1 : 0:0] wsel;
  logic wsel_ok;
  always_comb begin
    wsel_ok = 1'b0;
    wsel    = '0;
    for (int i = 0; i < int'(P); i++) begin
      logic [$bits(wsel)-1:0] c;
      c = ($bits(wsel))'((int'(wr_rr) + i) % int'(P));
      if (!wsel_ok && !ob_empty[c]) begin wsel_ok = 1'b1; wsel = ($bits(wsel))'(c); end
    end
    ob_pop = '0;
    ob_pop[wsel] = wsel_ok && wr_gnt;
  end
  assign wr_req  = wsel_ok;
  assign wr_addr = ob_head[wsel][LINE_W +: LINE_AW];
  assign wr_data = ob_head[wsel][LINE_W-1:0];

  // ---------------------------------------------------------------- control
  logic phase_done;
  always_comb begin
    phase_done = (state == ST_RUN) && (&ob_empty);
    for (int t = 0; t < int'(P); t++)
      if (w_act[t] && w_slice[t] != w_stop[t]) phase_done = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE; done <= 1'b0; rr_ptr <= '0; wr_rr <= '0; outstanding <= '0;
      cycles <= '0; st_phases <= '0; st_iters <= '0; st_packed <= '0; st_rd_stall <= '0; st_sep <= '0;
      for (int r = 0; r < int'(R); r++) begin r_act[r] <= 1'b0; r_resv[r] <= '0; end
      for (int t = 0; t < int'(P); t++) w_act[t] <= 1'b0;
    end else begin
      // statistics
      if (busy) cycles <= cycles + 1'b1;
      if (rd_req && !rd_gnt) st_rd_stall <= st_rd_stall + 1'b1;
      for (int t = 0; t < int'(P); t++) begin
        if (t_iter[t]) st_iters <= st_iters + 1'b1;
        if (t_push[t] && t_opk[t]) st_packed <= st_packed + 1'b1;
      end
      if (t_sep[0]) st_sep <= st_sep + 1'b1;

      outstanding <= outstanding + DCW'(rd_fire) - DCW'(rd_valid);
      if (wsel_ok && wr_gnt) wr_rr <= ($bits(wr_rr))'((int'(wsel) + 1) % int'(P));

      // reservations of input-buffer room
      for (int r = 0; r < int'(R); r++) begin
        logic [IBC_W:0] add, sub;
        add = (rd_fire && pick == RW'(r)) ? (IBC_W+1)'(2) : '0;
        sub = (nv && nt[RW-1:0] == RW'(r)) ? (nt[RW] ? (IBC_W+1)'(2) : (IBC_W+1)'(1)) : '0;
        r_resv[r] <= r_resv[r] + add - sub;
      end

      // advance the reader that issued
      if (rd_fire) begin
        logic [LINE_AW-1:0] nxt;
        nxt = r_addr[pick] + 1'b1;
        rr_ptr <= RW'(pick + 1'b1);
        if (nxt == rd_end_tbl[r_slice[pick][LS-1:0]] && r_left[pick] > 1) begin
          r_slice[pick] <= r_slice[pick] + 1'b1;
          r_left[pick]  <= r_left[pick] - 1'b1;
          r_addr[pick]  <= slice_base(rd_area, r_slice[pick] + 1'b1, lg_slice);
        end else begin
          r_addr[pick] <= nxt;
        end
      end

      // writers: place each line leaving a tree, close slices
      for (int t = 0; t < int'(P); t++) begin
        if (t_push[t]) begin
          if (t_olast[t]) begin
            wr_end_tbl[w_slice[t][LS-1:0]] <= w_addr[t] + 1'b1;
            w_slice[t] <= w_slice[t] + 1'b1;
            w_addr[t]  <= slice_base(wr_area, w_slice[t] + 1'b1, lg_slice);
          end else begin
            w_addr[t] <= w_addr[t] + 1'b1;
          end
        end
      end

      unique case (state)
        ST_IDLE: begin
          if (start) begin
            done     <= 1'b0;
            cycles   <= '0;
            e_p      <= CNT_W'(16);
            e_p1     <= CNT_W'(16) << LK;
            rd_area  <= src_base;
            wr_area  <= tmp_base;
            lg_slice <= lg_lines - 6'(LS);
            region_lines <= n_lines >> LS;
            st_phases <= '0; st_iters <= '0; st_packed <= '0; st_rd_stall <= '0; st_sep <= '0;
            for (int s = 0; s < int'(S); s++)
              rd_end_tbl[s] <= src_base + (LINE_AW'(s + 1) << (lg_lines - 6'(LS)));
            state <= ST_SETUP;
          end
        end
        ST_SETUP: begin
          last_phase <= (e_p1 == n_keys);
          for (int t = 0; t < int'(P); t++) begin
            // active trees: P in every Phase but the last, 1 in the last
            logic act;
            logic [SW-1:0] first_w, stop_w, per;
            act     = (e_p1 != n_keys) || (t == 0);
            per     = (e_p1 != n_keys) ? SW'(K) : SW'(S);
            first_w = SW'(t) * per;
            stop_w  = first_w + per;
            w_act[t]   <= act;
            w_slice[t] <= first_w;
            w_stop[t]  <= stop_w;
            w_addr[t]  <= slice_base(wr_area, first_w, lg_slice);
            for (int w = 0; w < int'(K); w++) begin
              logic [SW-1:0] fs, nsl;
              nsl = (e_p1 != n_keys) ? SW'(1) : SW'(P);
              fs  = SW'(w * P) + ((e_p1 != n_keys) ? SW'(t) : SW'(0));
              r_act[t*K+w]   <= act;
              r_slice[t*K+w] <= fs;
              r_left[t*K+w]  <= nsl;
              r_addr[t*K+w]  <= slice_base(rd_area, fs, lg_slice);
            end
          end
          state <= ST_RUN;
        end
        ST_RUN: begin
          if (phase_done) begin
            st_phases <= st_phases + 1'b1;
            for (int r = 0; r < int'(R); r++) r_act[r] <= 1'b0;
            if (last_phase) begin
              done        <= 1'b1;
              result_base <= wr_area;
              state       <= ST_IDLE;
            end else begin
              rd_end_tbl <= wr_end_tbl;
              rd_area    <= wr_area;
              wr_area    <= rd_area;
              e_p        <= e_p1;
              e_p1       <= e_p1 << LK;
              state      <= ST_SETUP;
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign result_end = wr_end_tbl;

  a_tags: assert property (@(posedge clk) disable iff (rst) rd_valid |-> !tag_empty);
  a_pow2: assert property (@(posedge clk) disable iff (rst) start |-> (n_lines & (n_lines - 1'b1)) == 0);
endmodule

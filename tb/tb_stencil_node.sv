// Self-checking test of one stencil node (reduced to 2 MADDs and 8 rows,
// 16 x 8 values) in both computation orders: one node on an even row
// (top row first) and one on an odd row (bottom row first), each its own
// master. The host loads the block and fixed halo values, runs three
// Iterations and reads the block back; every value is compared with a
// single-precision reference that adds the four products in the order the
// hardware does. Also checked: one Iteration every PERIOD cycles, one
// Iteration lasting 4*8*H cycles of issue, stalls between Iterations, and
// the boundary values sent to the four neighbours.
module tb_stencil_node;
  import fp_ref_pkg::*;
  localparam int NM = 2, NS = 8, H = 8, W = NM * NS, PERIOD = 4 * NS * H + 40, NIT = 3;
  localparam int IW = $clog2(2*H > 2*W ? 2*H : 2*W);
  localparam int AW = $clog2(W * H);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start;
  logic [31:0] coef [4];
  logic ld_we; logic [1:0] ld_sel; logic [AW-1:0] ld_addr, rb_addr; logic [31:0] ld_data;
  logic done [2];
  logic [31:0] rb_data [2], st_iters [2], st_stall [2];
  logic hin_valid [4]; logic [IW-1:0] hin_idx [4]; logic [31:0] hin_data [4];
  logic hov [2][4]; logic [IW-1:0] hoi [2][4]; logic [31:0] hod [2][4];
  logic p2a [2], so [2];

  for (genvar n = 0; n < 2; n++) begin : g_dut
    stencil_node #(.NM(NM), .NS(NS), .H(H), .PERIOD(PERIOD)) dut (
      .clk, .rst, .start, .n_iters(NIT), .coef, .is_master(1'b1), .done(done[n]),
      .has_below(n == 1), .parity_from_below(1'b0), .parity_to_above(p2a[n]),
      .sync_in_left(1'b0), .sync_in_up(1'b0), .sync_out(so[n]),
      .hin_valid, .hin_idx, .hin_data,
      .hout_valid(hov[n]), .hout_idx(hoi[n]), .hout_data(hod[n]),
      .ld_we, .ld_sel, .ld_addr, .ld_data, .rb_addr, .rb_data(rb_data[n]),
      .st_iters(st_iters[n]), .st_stall(st_stall[n]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] v [2][H][W];
  logic [31:0] hu [W], hd [W], hl [H], hr [H];
  int sent [2][4];
  int last_iter_cyc [2], cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  // count boundary values sent, check their values against the reference
  always @(posedge clk) if (!rst)
    for (int n = 0; n < 2; n++) for (int d = 0; d < 4; d++) if (hov[n][d]) sent[n][d]++;
  // period between Iterations
  logic [31:0] prev_it [2];
  always @(posedge clk) if (!rst) for (int n = 0; n < 2; n++) begin
    if (st_iters[n] != prev_it[n] && st_iters[n] > 1) begin
      checks++;
      if (cyc - last_iter_cyc[n] != PERIOD) begin
        failures++; $display("FAIL: node %0d Iteration spacing %0d", n, cyc - last_iter_cyc[n]);
      end
    end
    if (st_iters[n] != prev_it[n]) last_iter_cyc[n] = cyc;
    prev_it[n] <= st_iters[n];
  end

  function automatic logic [31:0] at(input int n, input int i, input int j);
    if (i < 0) return hu[j];
    if (i >= H) return hd[j];
    if (j < 0) return hl[i];
    if (j >= W) return hr[i];
    return v[n][i][j];
  endfunction

  task automatic ref_iter(input int n, input bit odd);
    logic [31:0] nv [H][W];
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        logic [31:0] t0, t1, t2, t3, s;
        t0 = odd ? fmul(coef[3], at(n, i+1, j)) : fmul(coef[0], at(n, i-1, j));
        t1 = fmul(coef[1], at(n, i, j-1));
        t2 = fmul(coef[2], at(n, i, j+1));
        t3 = odd ? fmul(coef[0], at(n, i-1, j)) : fmul(coef[3], at(n, i+1, j));
        s = fadd(t0, 32'd0);
        s = fadd(t1, s);
        s = fadd(t2, s);
        s = fadd(t3, s);
        nv[i][j] = s;
      end
    v[n] = nv;
  endtask

  task automatic load(input logic [1:0] sel, input int a, input logic [31:0] d);
    ld_we = 1; ld_sel = sel; ld_addr = AW'(a); ld_data = d;
    @(posedge clk);
    #1 ld_we = 0;
  endtask

  initial begin
    int t_start;
    start = 0; ld_we = 0; rb_addr = 0;
    for (int n = 0; n < 2; n++) for (int d = 0; d < 4; d++) sent[n][d] = 0;
    for (int d = 0; d < 4; d++) begin hin_valid[d] = 0; hin_idx[d] = 0; hin_data[d] = 0; end
    coef = '{32'h3e800000, 32'h3e99999a, 32'h3e4ccccd, 32'h3e800000}; // 0.25 0.3 0.2 0.25
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < H; i++) for (int j = 0; j < W; j++) begin
      v[0][i][j] = r2f(real'($urandom_range(1000)) / 1000.0);
      load(0, i * W + j, v[0][i][j]);
    end
    v[1] = v[0];
    for (int j = 0; j < W; j++) begin
      hu[j] = r2f(1.0 + real'(j) / 16.0); hd[j] = r2f(0.5);
      load(1, j, hu[j]); load(1, W + j, hd[j]);
    end
    for (int i = 0; i < H; i++) begin
      hl[i] = r2f(2.0); hr[i] = r2f(real'(i) / 8.0);
      load(2, i, hl[i]); load(2, H + i, hr[i]);
    end
    check(p2a[0] == 0 && p2a[1] == 1, "row parity");
    start <= 1; @(posedge clk); start <= 0; t_start = cyc;
    wait (done[0] && done[1]);
    @(posedge clk);
    for (int n = 0; n < 2; n++) begin
      for (int k = 0; k < NIT; k++) ref_iter(n, n == 1);
      check(st_iters[n] == NIT, $sformatf("node %0d Iterations %0d", n, st_iters[n]));
      check(st_stall[n] == (NIT - 1) * (PERIOD - 4 * NS * H - 1) + 1,
            $sformatf("node %0d stall cycles %0d", n, st_stall[n]));
      for (int i = 0; i < H; i++) for (int j = 0; j < W; j++) begin
        rb_addr <= AW'(i * W + j);
        @(posedge clk); @(posedge clk);
        checks++;
        if (rb_data[n] !== v[n][i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL: node %0d (%0d,%0d) = %h expected %h", n, i, j, rb_data[n], v[n][i][j]);
        end
      end
      check(sent[n][0] == NIT * W && sent[n][1] == NIT * W, $sformatf("node %0d rows sent %0d %0d", n, sent[n][0], sent[n][1]));
      check(sent[n][2] == NIT * H && sent[n][3] == NIT * H, $sformatf("node %0d cols sent %0d %0d", n, sent[n][2], sent[n][3]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

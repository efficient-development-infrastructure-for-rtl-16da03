// Full-size run of the top level with every parameter at its default:
// sorter with 8-way trees, 8 trees in parallel and compression over a
// 2^26-line memory (sparse model, latency 3, 70 % grants); stencil array
// of 4 x 4 nodes of 64 x 128 values. The generator writes 512 lines
// (8192 keys: three Phases) of xorshift keys, then of descending keys,
// each sorted and checked; the stencil array runs two Iterations on a
// 512 x 256 grid that is compared value by value with a single-precision
// reference. The same mechanism counters as the reduced test are checked.
module tb_accel_full;
  import sort_pkg::*;
  import fp_ref_pkg::*;
  localparam int K = 8, P = 8, AW = 26, NL = 512, LAT = 3;
  localparam int S = K * P;
  localparam int NX = 4, NY = 4, NM = 8, NS = 8, H = 128, W = NM * NS;
  localparam int PERIOD = 4 * NS * H + 64, NIT = 2;
  localparam int GW = NX * W, GH = NY * H;
  localparam int NAW = $clog2(NX * NY), LAW = $clog2(W * H);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic gen_start = 0, gen_done, sort_start = 0, sort_busy, sort_done;
  gen_mode_e gen_mode;
  logic [AW-1:0] result_base, result_end [S];
  logic [47:0] sort_cycles;
  logic [7:0] st_phases;
  logic [31:0] st_sort_iters, st_packed, st_rd_stall, st_sep;
  logic rd_req, rd_gnt, rd_valid, wr_req, wr_gnt;
  logic [AW-1:0] rd_addr, wr_addr;
  line_t rd_data, wr_data;
  logic sten_start = 0, sten_done, ld_we = 0;
  logic [31:0] coef [4];
  logic [NAW-1:0] ld_node = 0, rb_node = 0;
  logic [1:0] ld_sel = 0;
  logic [LAW-1:0] ld_addr = 0, rb_addr = 0;
  logic [31:0] ld_data = 0, rb_data, st_sten_iters, st_sten_stall, st_halo;
  logic [NY-1:0] row_odd;

  accel_top dut (
    .clk, .rst, .gen_start, .gen_mode, .gen_seed(32'd7), .gen_done,
    .sort_start, .n_lines(AW'(NL)), .src_base(AW'(0)), .tmp_base(AW'(1 << 20)),
    .sort_busy, .sort_done, .result_base, .result_end, .sort_cycles,
    .st_phases, .st_sort_iters, .st_packed, .st_rd_stall, .st_sep,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data, .wr_req, .wr_addr, .wr_data, .wr_gnt,
    .sten_start, .sten_iters(NIT), .coef, .sten_done,
    .ld_we, .ld_node, .ld_sel, .ld_addr, .ld_data, .rb_node, .rb_addr, .rb_data,
    .st_sten_iters, .st_sten_stall, .st_halo, .row_odd);

  // ---------------------------------------------------------------- memory
  line_t mem [int unsigned];
  logic [LAT-1:0] pv;
  logic [AW-1:0]  pa [LAT];
  always_ff @(posedge clk) begin
    pv[0] <= rd_req && rd_gnt;
    pa[0] <= rd_addr;
    for (int i = 1; i < LAT; i++) begin pv[i] <= pv[i-1]; pa[i] <= pa[i-1]; end
  end
  // sparse store, written in the clock edge (no read hits a line being written)
  always @(posedge clk) if (wr_req && wr_gnt) mem[wr_addr] = wr_data;
  assign rd_valid = pv[LAT-1];
  assign rd_data  = mem.exists(pa[LAT-1]) ? mem[pa[LAT-1]] : '0;
  always_ff @(negedge clk) begin
    rd_gnt <= ($urandom_range(99) < 70);
    wr_gnt <= ($urandom_range(99) < 70);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_sep = 0, n_phase2 = 0, n_packed = 0, n_rdstall = 0, n_sstall = 0, n_halo = 0, n_orders = 0;

  // ---------------------------------------------------------------- sorter
  int unsigned ref_keys [$], got [$];
  task automatic decode(input line_t l);
    if (l[511:479] == 33'h1) begin
      for (int h = 0; h < 2; h++) begin
        int unsigned v;
        v = l[h*227 +: 32];
        got.push_back(v);
        for (int i = 1; i < 16; i++) begin
          v = v + l[h*227 + 32 + (i-1)*13 +: 13];
          got.push_back(v);
        end
      end
    end else
      for (int i = 0; i < 16; i++) got.push_back(l[i*32 +: 32]);
  endtask

  task automatic sort_pass(input gen_mode_e m, input string name);
    int unsigned x, y, z, w, t;
    x = 123456789; y = 362436069; z = 521288629; w = 88675123 ^ 7;
    gen_mode <= m;
    @(posedge clk); gen_start <= 1; @(posedge clk); gen_start <= 0; @(posedge clk);
    wait (gen_done); repeat (3) @(posedge clk);
    ref_keys.delete(); got.delete();
    for (int l = 0; l < NL; l++)
      for (int i = 0; i < 16; i++) begin
        int unsigned v;
        if (m == GEN_XORSHIFT) begin
          t = x ^ (x << 11); x = y; y = z; z = w;
          w = w ^ (w >> 19) ^ t ^ (t >> 8);
          v = w;
        end else v = NL * 16 - (l * 16 + i);
        ref_keys.push_back(v);
        checks++;
        if (mem[l][i*32 +: 32] != v) begin
          failures++;
          if (failures < 5) $display("FAIL: %s generator key %0d,%0d = %h expected %h", name, l, i, mem[l][i*32 +: 32], v);
        end
      end
    ref_keys.sort();
    @(posedge clk); sort_start <= 1; @(posedge clk); sort_start <= 0; @(posedge clk);
    wait (sort_done); @(posedge clk);
    for (int s = 0; s < S; s++)
      for (int a = int'(result_base) + s * (NL / S); a < int'(result_end[s]); a++) decode(mem[a]);
    check(got.size() == ref_keys.size(), $sformatf("%s: key count %0d", name, got.size()));
    for (int i = 0; i < ref_keys.size() && i < got.size(); i++)
      if (got[i] != ref_keys[i]) begin
        check(0, $sformatf("%s: key %0d is %0d, expected %0d", name, i, got[i], ref_keys[i]));
        break;
      end
    n_sep     += int'(st_sep);
    n_phase2  += (st_phases >= 2);
    n_packed  += int'(st_packed);
    n_rdstall += int'(st_rd_stall);
    $display("%s: sorted in %0d cycles, packed %0d, separators %0d, read stalls %0d",
             name, sort_cycles, st_packed, st_sep, st_rd_stall);
  endtask

  // ---------------------------------------------------------------- stencil
  logic [31:0] g [GH+2][GW+2];   // grid with fixed boundary ring
  task automatic sten_ref();
    logic [31:0] ng [GH+2][GW+2];
    ng = g;
    for (int i = 1; i <= GH; i++)
      for (int j = 1; j <= GW; j++) begin
        logic [31:0] up, dn, s;
        bit odd;
        odd = row_odd[(i - 1) / H];
        up = fmul(coef[0], g[i-1][j]);
        dn = fmul(coef[3], g[i+1][j]);
        s = fadd(odd ? dn : up, 32'd0);
        s = fadd(fmul(coef[1], g[i][j-1]), s);
        s = fadd(fmul(coef[2], g[i][j+1]), s);
        s = fadd(odd ? up : dn, s);
        ng[i][j] = s;
      end
    g = ng;
  endtask

  task automatic ld(input int node, input int sel, input int a, input logic [31:0] d);
    ld_we = 1; ld_node = NAW'(node); ld_sel = 2'(sel); ld_addr = LAW'(a); ld_data = d;
    @(posedge clk);
    #1 ld_we = 0;
  endtask

  task automatic sten_load();
    for (int i = 0; i < GH + 2; i++)
      for (int j = 0; j < GW + 2; j++)
        g[i][j] = r2f(real'($urandom_range(1000)) / 1000.0);
    for (int ny = 0; ny < NY; ny++)
      for (int nx = 0; nx < NX; nx++) begin
        int n, r0, c0;
        n = ny * NX + nx; r0 = ny * H + 1; c0 = nx * W + 1;
        for (int i = 0; i < H; i++)
          for (int j = 0; j < W; j++) ld(n, 0, i * W + j, g[r0 + i][c0 + j]);
        for (int j = 0; j < W; j++) begin
          ld(n, 1, j, g[r0 - 1][c0 + j]);
          ld(n, 1, W + j, g[r0 + H][c0 + j]);
        end
        for (int i = 0; i < H; i++) begin
          ld(n, 2, i, g[r0 + i][c0 - 1]);
          ld(n, 2, H + i, g[r0 + i][c0 + W]);
        end
      end
  endtask

  task automatic sten_check();
    for (int k = 0; k < NIT; k++) sten_ref();
    for (int ny = 0; ny < NY; ny++)
      for (int nx = 0; nx < NX; nx++)
        for (int i = 0; i < H; i++)
          for (int j = 0; j < W; j++) begin
            rb_node <= NAW'(ny * NX + nx); rb_addr <= LAW'(i * W + j);
            repeat (3) @(posedge clk);
            checks++;
            if (rb_data !== g[ny * H + 1 + i][nx * W + 1 + j]) begin
              failures++;
              if (failures < 10) $display("FAIL: stencil node %0d (%0d,%0d) = %h expected %h",
                ny * NX + nx, i, j, rb_data, g[ny * H + 1 + i][nx * W + 1 + j]);
            end
          end
    n_sstall += int'(st_sten_stall);
    n_halo   += int'(st_halo);
    n_orders  = (row_odd != '0) + (row_odd != '1);
    $display("stencil: %0d Iterations, stall cycles %0d, boundary transfers %0d, row parity %b",
             st_sten_iters, st_sten_stall, st_halo, row_odd);
    check(st_sten_iters == NIT, "stencil Iterations");
    // each Iteration moves every inner boundary value once
    check(st_halo == NIT * (2 * (NY - 1) * NX * W + 2 * (NX - 1) * NY * H), "boundary transfer count");
  endtask

  initial begin
    coef = '{32'h3e800000, 32'h3e99999a, 32'h3e4ccccd, 32'h3e800000};
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    sten_load();
    fork
      begin
        @(posedge clk); sten_start <= 1; @(posedge clk); sten_start <= 0; @(posedge clk);
        wait (sten_done); @(posedge clk);
      end
      begin
        sort_pass(GEN_XORSHIFT, "xorshift");
        sort_pass(GEN_REVERSE, "reverse");
      end
    join
    sten_check();
    check(n_sep > 0, "separator insertion seen");
    check(n_phase2 == 2, "two Phases in both sorts");
    check(n_packed > 0, "packed lines seen");
    check(n_rdstall > 0, "read stalls seen");
    check(n_sstall > 0, "stencil stalls seen");
    check(n_halo > 0, "boundary transfers seen");
    check(n_orders == 2, "both computation orders present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

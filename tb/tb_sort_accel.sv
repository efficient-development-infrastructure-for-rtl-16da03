// Self-checking test of the merge-sort accelerator at K = 4 ways, P = 2
// trees, 256 keys (16 lines, two Phases). A memory model answers reads after
// a fixed latency and accepts requests with a configurable probability.
// Each run fills the source area, starts the accelerator, then reads the
// result slices, expands packed pairs with an independent decoder and
// compares the keys with a sorted copy of the input. Runs: reversed keys
// with compression (every output line packs), random keys with compression
// and a stalling memory, random keys with an ideal memory (cycle count
// compared with the performance model), small-range keys.
module tb_sort_accel;
  import sort_pkg::*;
  localparam int K = 4, P = 2, AW = 10, NL = 16, LAT = 3;
  localparam int S = K * P;

  logic clk = 0, rst = 1, start = 0;
  always #5 clk = ~clk;

  logic busy, done, rd_req, rd_gnt, rd_valid, wr_req, wr_gnt;
  logic [AW-1:0] rd_addr, wr_addr, result_base;
  logic [AW-1:0] result_end [S];
  line_t rd_data, wr_data;
  logic [47:0] cycles;
  logic [7:0] st_phases;
  logic [31:0] st_iters, st_packed, st_rd_stall, st_sep;

  sort_accel #(.K(K), .P(P), .COMPRESS(1'b1), .LINE_AW(AW)) dut (
    .clk, .rst, .start, .n_lines(AW'(NL)), .src_base(AW'(0)), .tmp_base(AW'(64)),
    .busy, .done, .result_base, .result_end, .cycles,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .wr_req, .wr_addr, .wr_data, .wr_gnt,
    .st_phases, .st_iters, .st_packed, .st_rd_stall, .st_sep);

  line_t mem [1 << AW];
  int grant_pct = 100;
  // read pipeline of the memory model
  logic [LAT-1:0] pv;
  logic [AW-1:0]  pa [LAT];
  always_ff @(posedge clk) begin
    pv[0] <= rd_req && rd_gnt;
    pa[0] <= rd_addr;
    for (int i = 1; i < LAT; i++) begin pv[i] <= pv[i-1]; pa[i] <= pa[i-1]; end
    if (wr_req && wr_gnt) mem[wr_addr] <= wr_data;
  end
  assign rd_valid = pv[LAT-1];
  assign rd_data  = mem[pa[LAT-1]];
  always_ff @(negedge clk) begin
    rd_gnt <= ($urandom_range(99) < grant_pct);
    wr_gnt <= ($urandom_range(99) < grant_pct);
  end

  int checks = 0, failures = 0;
  int unsigned ref_keys [$];
  int unsigned got [$];
  int unsigned total_packed = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // independent decoder of the 2x compressed line format
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

  task automatic run(input int mode, input int gp, input string name);
    int unsigned base_s;
    grant_pct = gp;
    ref_keys.delete(); got.delete();
    for (int l = 0; l < NL; l++)
      for (int i = 0; i < 16; i++) begin
        int unsigned v;
        case (mode)
          0: v = NL * 16 - (l * 16 + i);              // reversed 256..1
          1: v = $urandom();                           // random
          default: v = $urandom_range(5000);           // small range
        endcase
        mem[l][i*32 +: 32] = v;
        ref_keys.push_back(v);
      end
    ref_keys.sort();
    @(posedge clk); start <= 1; @(posedge clk); start <= 0; @(posedge clk);
    wait (done); @(posedge clk);
    base_s = result_base;
    for (int s = 0; s < S; s++)
      for (int a = base_s + s * (NL / S); a < result_end[s]; a++) decode(mem[a]);
    check(got.size() == ref_keys.size(), $sformatf("%s: key count %0d", name, got.size()));
    for (int i = 0; i < ref_keys.size() && i < got.size(); i++)
      if (got[i] != ref_keys[i]) begin
        check(0, $sformatf("%s: key %0d is %0d, expected %0d", name, i, got[i], ref_keys[i]));
        break;
      end
    check(1, name);
    check(st_phases == 2, $sformatf("%s: phases %0d", name, st_phases));
    // Iterations: N/(16K) + N/(16K^2) = 4 + 1
    check(st_iters == 5, $sformatf("%s: iterations %0d", name, st_iters));
    total_packed += st_packed;
    $display("%s: cycles=%0d packed=%0d rd_stall=%0d", name, cycles, st_packed, st_rd_stall);
  endtask

  initial begin
    int unsigned model;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    run(0, 100, "reverse");
    // reversed keys: every written line pair is compressible
    check(st_packed > 0, "reverse: packed lines written");
    run(1, 60, "random/stalling memory");
    check(st_rd_stall > 0, "read stalls seen");
    run(1, 100, "random/ideal memory");
    // model: phase 1 on P trees, last phase on one tree; N + I*OH_iter plus
    // a fill allowance per phase (pipeline of decompressor, network, tree)
    model = (NL*16 + 4*3) / P + (NL*16 + 1*3) + 2 * 60;
    check(cycles <= model, $sformatf("cycles %0d above model bound %0d", cycles, model));
    check(cycles >= (NL*16) / P + NL*16, $sformatf("cycles %0d below throughput limit", cycles));
    run(2, 80, "small range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

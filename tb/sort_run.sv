// Test harness for one sorter configuration, used by tb_sort_configs:
// a sort_accel with K ways and P trees, a memory model (latency 3, random
// 80 % grants), and a sequence that fills NL lines with random keys,
// sorts them, decodes the result (packed pairs expanded by an independent
// decoder) and compares it with the sorted input; then the same with
// descending keys. Reports its check and failure counts and raises fin.
// Timing: runs from the first clock after rst falls until fin, one sort
// at a time. Origin: the key orders follow the document's data generator;
// the memory latency, grant pattern and sizes are this harness's choice.
module sort_run
  import sort_pkg::*;
#(
  parameter int K  = 8,
  parameter int P  = 2,
  parameter int NL = 64
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   fin
);
  localparam int AW = 12, LAT = 3, S = K * P;
  logic start = 0, busy, done, rd_req, rd_gnt, rd_valid, wr_req, wr_gnt;
  logic [AW-1:0] rd_addr, wr_addr, result_base;
  logic [AW-1:0] result_end [S];
  line_t rd_data, wr_data;
  logic [47:0] cycles;
  logic [7:0] st_phases;
  logic [31:0] st_iters, st_packed, st_rd_stall, st_sep;

  sort_accel #(.K(K), .P(P), .COMPRESS(1'b1), .LINE_AW(AW)) dut (
    .clk, .rst, .start, .n_lines(AW'(NL)), .src_base(AW'(0)), .tmp_base(AW'(1 << (AW - 1))),
    .busy, .done, .result_base, .result_end, .cycles,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .wr_req, .wr_addr, .wr_data, .wr_gnt,
    .st_phases, .st_iters, .st_packed, .st_rd_stall, .st_sep);

  line_t mem [1 << AW];
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
    rd_gnt <= ($urandom_range(99) < 80);
    wr_gnt <= ($urandom_range(99) < 80);
  end

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

  task automatic run(input bit descending);
    int phases;
    ref_keys.delete(); got.delete();
    for (int l = 0; l < NL; l++)
      for (int i = 0; i < 16; i++) begin
        int unsigned v;
        v = descending ? NL * 16 - (l * 16 + i) : $urandom();
        mem[l][i*32 +: 32] = v;
        ref_keys.push_back(v);
      end
    ref_keys.sort();
    @(posedge clk); start <= 1; @(posedge clk); start <= 0; @(posedge clk);
    wait (done); @(posedge clk);
    for (int s = 0; s < S; s++)
      for (int a = int'(result_base) + s * (NL / S); a < int'(result_end[s]); a++) decode(mem[a]);
    checks++;
    if (got.size() != ref_keys.size()) begin
      failures++; $display("FAIL: K=%0d P=%0d: %0d keys, expected %0d", K, P, got.size(), ref_keys.size());
    end
    for (int i = 0; i < ref_keys.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != ref_keys[i]) begin
        failures++; $display("FAIL: K=%0d P=%0d: key %0d", K, P, i);
        break;
      end
    end
    // one Phase for the network plus ceil(log_K(NL)) merging Phases
    phases = 1;
    for (int n = K; n < NL; n *= K) phases++;
    checks++;
    if (st_phases != phases + 0) begin
      failures++; $display("FAIL: K=%0d P=%0d: %0d Phases, expected %0d", K, P, st_phases, phases);
    end
    $display("K=%0d P=%0d %0d keys (%s): %0d cycles, %0d packed lines", K, P, NL * 16,
             descending ? "descending" : "random", cycles, st_packed);
  endtask

  initial begin
    checks = 0; failures = 0; fin = 0;
    wait (!rst);
    repeat (2) @(posedge clk);
    run(0);
    run(1);
    fin = 1;
  end
endmodule

// Self-checking test of the K-way merge tree (K = 4 and 8 instances share
// the stimulus style): each way supplies a sorted run of random length
// (0..40 keys, duplicates allowed) followed by MaxValue separators; the
// tree must output the merge of all runs in ascending order, then
// MaxValue. Leaf valid and output ready toggle randomly (back-pressure).
// A tree reset (clr) between two rounds must empty every FIFO. With
// every input and the output always ready the tree must sustain one key
// per cycle once full.
module tb_merge_tree;
  localparam int K = 8, KW = 32;
  logic clk = 0, rst = 1, clr = 0;
  always #5 clk = ~clk;
  logic [K-1:0] leaf_valid, leaf_ready;
  logic [KW-1:0] leaf_key [K];
  logic out_valid, out_ready;
  logic [KW-1:0] out_key;
  merge_tree #(.K(K), .KEY_W(KW), .FIFO_DEPTH(2)) dut (.clk, .rst, .clr, .leaf_valid, .leaf_key,
    .leaf_ready, .out_valid, .out_key, .out_ready);

  int checks = 0, failures = 0;
  int unsigned runs [K][$];
  int unsigned all [$];
  int pv = 0, pr = 100;   // percent valid / ready

  // stimulus changes on the falling edge; a key counts as taken when valid
  // and ready are both high just before the rising edge
  logic [K-1:0] took;
  always @(negedge clk) begin
    for (int w = 0; w < K; w++) begin
      if (took[w] && runs[w].size()) void'(runs[w].pop_front());
      leaf_valid[w] = !clr && ($urandom_range(99) < pv);
      leaf_key[w]   = runs[w].size() ? runs[w][0] : 32'hffffffff;
    end
    out_ready = ($urandom_range(99) < pr);
    #1 took = leaf_valid & leaf_ready;
  end
  task automatic round(input int p_v, input int p_r, input int maxlen, output int cycles);
    int n, got, t0;
    all.delete();
    for (int w = 0; w < K; w++) begin
      int unsigned v;
      runs[w].delete();
      n = $urandom_range(maxlen);
      v = $urandom_range(100);
      for (int i = 0; i < n; i++) begin
        v += $urandom_range(3);
        runs[w].push_back(v); all.push_back(v);
      end
    end
    all.sort();
    pv = p_v; pr = p_r;
    got = 0; t0 = $time / 10;
    while (got < all.size()) begin
      @(negedge clk); #2;
      if (out_valid && out_ready) begin
        checks++;
        if (out_key != all[got]) begin
          failures++;
          if (failures < 5) $display("FAIL: key %0d = %0d expected %0d", got, out_key, all[got]);
        end
        got++;
      end
    end
    cycles = $time / 10 - t0;
    // after the runs only separators follow
    repeat (20) begin
      @(negedge clk); #2;
      if (out_valid && out_ready) begin
        checks++;
        if (out_key != 32'hffffffff) failures++;
      end
    end
    pv = 0; @(negedge clk); clr = 1; repeat (2) @(negedge clk); clr = 0; #2;
    checks++;
    if (out_valid) begin failures++; $display("FAIL: tree not empty after reset"); end
  endtask

  initial begin
    int c;
    took = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 10; r++) round(70, 70, 40, c);
    round(100, 100, 40, c);
    for (int w = 0; w < K; w++) runs[w].delete();
    // throughput: 8 runs of 64 keys with no back-pressure
    all.delete();
    for (int w = 0; w < K; w++) for (int i = 0; i < 64; i++) begin runs[w].push_back(i * 8 + w); all.push_back(i * 8 + w); end
    all.sort();
    pv = 100; pr = 100;
    begin
      int got, t0;
      got = 0; t0 = $time / 10;
      while (got < all.size()) begin
        @(negedge clk); #2;
        if (out_valid && out_ready) begin
          checks++;
          if (out_key != all[got]) failures++;
          got++;
        end
      end
      checks++;
      // K*64 keys plus a fill latency of a few cycles per level
      if ($time / 10 - t0 > K * 64 + 4 * $clog2(K) + 4) begin
        failures++; $display("FAIL: throughput %0d cycles for %0d keys", $time / 10 - t0, K * 64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

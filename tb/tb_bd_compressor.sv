// Self-checking test of the base+delta compressor. A stream of sorted
// lines (random mix of lines whose 15 neighbour differences all fit in 13
// bits and lines with one larger step) is fed under random valid and
// output back-pressure, with in_last marking the end of each region of
// 1..9 lines. Expected: two consecutive compressible lines of the same
// region leave as one packed line (Flag, Void, Compressed1, Base1,
// Compressed0, Base0), any other line leaves unchanged; out_last marks the
// output line holding a region's last input line. Every output line is
// decoded by an independent decoder and compared with the input keys, and
// the number of packed lines with a reference pairing model.
module tb_bd_compressor;
  import sort_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0, in_ready, out_valid, out_last, out_ready = 0, out_packed;
  line_t in_data, out_data;
  bd_compressor dut (.clk, .rst, .in_valid, .in_data, .in_last, .in_ready, .out_valid, .out_data,
    .out_last, .out_ready, .out_packed);

  int checks = 0, failures = 0;
  int unsigned exp_keys [$];
  int exp_packed = 0, got_packed = 0, exp_lasts = 0, got_lasts = 0, got_lines = 0, exp_lines = 0;
  bit done_in = 0;

  function automatic bit fits(line_t l);
    for (int i = 1; i < 16; i++) if (l[i*32 +: 32] - l[(i-1)*32 +: 32] > 32'h1fff) return 0;
    return 1;
  endfunction

  always @(negedge clk) begin
    out_ready = $urandom_range(99) < 70;
    #1;
    if (out_valid && out_ready) begin
      got_lines++;
      if (out_last) got_lasts++;
      if (out_data[511:479] == 33'h1) begin
        checks++;
        got_packed++;
        if (!out_packed) failures++;
        for (int h = 0; h < 2; h++) begin
          int unsigned v;
          v = out_data[h*227 +: 32];
          for (int i = 0; i < 16; i++) begin
            if (i > 0) v += out_data[h*227 + 32 + (i-1)*13 +: 13];
            checks++;
            if (v != exp_keys[0]) begin failures++; if (failures < 5) $display("FAIL: packed key %0d", i); end
            void'(exp_keys.pop_front());
          end
        end
      end else
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (out_data[i*32 +: 32] != exp_keys[0] || out_packed) begin
            failures++; if (failures < 5) $display("FAIL: plain key %0d", i);
          end
          void'(exp_keys.pop_front());
        end
    end
  end

  initial begin
    int unsigned base;
    bit held;
    repeat (3) @(posedge clk);
    rst <= 0;
    base = 1000;
    for (int r = 0; r < 60; r++) begin
      int n;
      n = $urandom_range(1, 9);
      held = 0;
      for (int l = 0; l < n; l++) begin
        line_t d;
        bit big;
        big = $urandom_range(99) < 25;
        for (int i = 0; i < 16; i++) begin
          base += (big && i == 7) ? 32'h4000 : $urandom_range(i == 0 ? 100 : 32'h1fff);
          d[i*32 +: 32] = base;
          exp_keys.push_back(base);
        end
        // reference pairing
        if (fits(d)) begin
          if (held) begin exp_packed++; exp_lines++; held = 0; end
          else if (l == n - 1) exp_lines++;
          else held = 1;
        end else begin
          if (held) exp_lines++;
          held = 0;
          exp_lines++;
        end
        @(negedge clk);
        while ($urandom_range(3) == 0) @(negedge clk);
        in_valid = 1; in_data = d; in_last = (l == n - 1);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        in_valid = 0; in_last = 0;
      end
      exp_lasts++;
    end
    repeat (50) @(negedge clk);
    checks += 4;
    if (got_packed != exp_packed) begin failures++; $display("FAIL: %0d packed lines, expected %0d", got_packed, exp_packed); end
    if (got_lines != exp_lines) begin failures++; $display("FAIL: %0d lines, expected %0d", got_lines, exp_lines); end
    if (got_lasts != exp_lasts) begin failures++; $display("FAIL: %0d region ends, expected %0d", got_lasts, exp_lasts); end
    if (exp_keys.size() != 0) begin failures++; $display("FAIL: %0d keys missing", exp_keys.size()); end
    $display("packed %0d of %0d output lines", got_packed, got_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

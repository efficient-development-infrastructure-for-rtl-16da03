// Self-checking test of the base+delta decompressor. The test encodes
// lines itself (packed pairs in the 2x format, and plain sorted lines) and
// feeds them with random gaps, never more than the FIFO room the
// decompressor reports (free). Every packed input must come out as two
// lines, every plain one as one line, in order, each with its input's tag
// and the right out_plain flag. With dec_en low every line must pass
// unchanged, even one that looks packed.
module tb_bd_decompressor;
  import sort_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1, dec_en = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, out_plain;
  line_t in_data, out_data;
  logic [3:0] in_tag, out_tag;
  logic [$clog2(DEPTH+1)-1:0] free;
  bd_decompressor #(.DEPTH(DEPTH), .TAG_W(4)) dut (.clk, .rst, .dec_en, .in_valid, .in_data, .in_tag,
    .free, .out_valid, .out_data, .out_tag, .out_plain);

  int checks = 0, failures = 0, n_out = 0, n_exp = 0;
  line_t exp_l [$];
  logic [4:0] exp_t [$];   // {plain, tag}

  always @(posedge clk) if (!rst && out_valid) begin
    checks++;
    n_out++;
    if (out_data !== exp_l[0] || {out_plain, out_tag} !== exp_t[0]) begin
      failures++; if (failures < 5) $display("FAIL: output line %0d", n_out - 1);
    end
    void'(exp_l.pop_front()); void'(exp_t.pop_front());
  end

  function automatic line_t sorted_line(input int unsigned start, input int unsigned maxd);
    line_t l;
    int unsigned v;
    v = start;
    for (int i = 0; i < 16; i++) begin
      if (i > 0) v += $urandom_range(maxd);
      l[i*32 +: 32] = v;
    end
    return l;
  endfunction

  task automatic send(input line_t d, input logic [3:0] tag);
    @(negedge clk);
    while (free == 0 || $urandom_range(2) == 0) @(negedge clk);
    in_valid = 1; in_data = d; in_tag = tag;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 400; n++) begin
      logic [3:0] tag;
      tag = 4'($urandom());
      if (n == 300) begin repeat (40) @(negedge clk); dec_en = 0; end
      if ($urandom_range(1)) begin
        line_t a, b, p;
        a = sorted_line($urandom_range(1 << 30), 32'h1fff);
        b = sorted_line(a[511:480], 32'h1fff);
        p = '0;
        p[511:479] = 33'h1;
        for (int h = 0; h < 2; h++) begin
          line_t s;
          s = h ? b : a;
          p[h*227 +: 32] = s[31:0];
          for (int i = 1; i < 16; i++) p[h*227 + 32 + (i-1)*13 +: 13] = 13'(s[i*32 +: 32] - s[(i-1)*32 +: 32]);
        end
        if (dec_en) begin
          exp_l.push_back(a); exp_t.push_back({1'b0, tag});
          exp_l.push_back(b); exp_t.push_back({1'b0, tag});
          n_exp += 2;
        end else begin
          exp_l.push_back(p); exp_t.push_back({1'b1, tag});
          n_exp++;
        end
        send(p, tag);
      end else begin
        line_t a;
        a = sorted_line($urandom(), 32'h100000);
        exp_l.push_back(a); exp_t.push_back({1'b1, tag});
        n_exp++;
        send(a, tag);
      end
    end
    repeat (100) @(negedge clk);
    checks++;
    if (n_out != n_exp) begin failures++; $display("FAIL: %0d lines out, expected %0d", n_out, n_exp); end
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

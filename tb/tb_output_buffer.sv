// Self-checking test of the output buffer: keys enter one at a time under
// random valid and line back-pressure; every 16 keys must leave as one
// line (key 0 in the low bits). After E_p+1 keys tree_clr must rise and
// no further key be taken until it falls again; the count restarts for
// the next Iteration. E_p+1 = 48 and 64 are used, the 64-key Iteration
// with the line side ready only 5 % of the time.
module tb_output_buffer;
  import sort_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] e_p1;
  logic key_valid = 0, key_ready, tree_clr, line_valid, line_ready = 0;
  key_t key;
  line_t line_data;
  output_buffer dut (.clk, .rst, .e_p1, .key_valid, .key, .key_ready, .tree_clr, .line_valid,
    .line_data, .line_ready);

  int checks = 0, failures = 0, n_clr = 0, rpct = 60;
  key_t q [$];
  int lines_got = 0;

  always @(negedge clk) begin
    line_ready = $urandom_range(99) < rpct;
    #1;
    if (line_valid && line_ready) begin
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (line_data[i*32 +: 32] != q[0]) begin failures++; if (failures < 5) $display("FAIL: line key %0d", i); end
        void'(q.pop_front());
      end
      lines_got++;
    end
  end

  task automatic iteration(input int n);
    int sent;
    e_p1 = n;
    sent = 0;
    while (!tree_clr) begin
      @(negedge clk);
      key_valid = $urandom_range(99) < 70;
      key = $urandom();
      #2;
      if (key_valid && key_ready) begin q.push_back(key); sent++; end
    end
    @(negedge clk); key_valid = 0;
    checks++;
    if (sent != n) begin failures++; $display("FAIL: %0d keys taken before tree reset, expected %0d", sent, n); end
    n_clr++;
    repeat (400) @(negedge clk);
  endtask

  initial begin
    e_p1 = 48;
    repeat (3) @(posedge clk);
    rst <= 0;
    iteration(48);
    rpct = 5;          // long line back-pressure: keys must wait
    iteration(64);
    rpct = 60;
    iteration(48);
    checks += 2;
    if (lines_got != (48 + 64 + 48) / 16) begin failures++; $display("FAIL: %0d lines", lines_got); end
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

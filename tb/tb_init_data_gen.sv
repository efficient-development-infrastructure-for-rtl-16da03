// Self-checking test of the initial data generator: 40 lines in each of
// the three orders (xorshift with two seeds, ascending, descending) under
// random line back-pressure. Keys are compared with an independent
// xorshift model and with the expected sequences; line numbers must count
// up from 0 and done must rise after the last line. With no back-pressure
// one line must appear every 16 cycles (one key per cycle).
module tb_init_data_gen;
  import sort_pkg::*;
  localparam int AW = 12, NL = 40;
  logic clk = 0, rst = 1, start = 0, line_valid, line_ready = 0, done;
  always #5 clk = ~clk;
  gen_mode_e mode;
  key_t seed;
  line_t line_data;
  logic [AW-1:0] line_idx;
  init_data_gen #(.LINE_AW(AW)) dut (.clk, .rst, .start, .mode, .seed, .n_lines(AW'(NL)),
    .line_valid, .line_data, .line_idx, .line_ready, .done);

  int checks = 0, failures = 0, rdy_pct = 60;
  always @(negedge clk) line_ready = $urandom_range(99) < rdy_pct;

  task automatic run(input gen_mode_e m, input key_t s);
    int unsigned x, y, z, w, t, v;
    int got, t_first, t_last;
    x = 123456789; y = 362436069; z = 521288629; w = 88675123 ^ s;
    v = (m == GEN_REVERSE) ? NL * 16 : 1;
    mode = m; seed = s;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    got = 0;
    while (got < NL) begin
      @(negedge clk); #1;
      if (line_valid && line_ready) begin
        if (got == 0) t_first = $time / 10;
        t_last = $time / 10;
        checks++;
        if (line_idx != AW'(got)) failures++;
        for (int i = 0; i < 16; i++) begin
          int unsigned e;
          if (m == GEN_XORSHIFT) begin
            t = x ^ (x << 11); x = y; y = z; z = w;
            w = w ^ (w >> 19) ^ t ^ (t >> 8);
            e = w;
          end else begin
            e = v;
            v = (m == GEN_REVERSE) ? v - 1 : v + 1;
          end
          checks++;
          if (line_data[i*32 +: 32] != e) begin
            failures++; if (failures < 5) $display("FAIL: mode %0d line %0d key %0d = %h expected %h", m, got, i, line_data[i*32 +: 32], e);
          end
        end
        got++;
      end
    end
    repeat (2) @(posedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL: done"); end
    if (rdy_pct == 100) begin
      checks++;
      if (t_last - t_first > (NL - 1) * 16 + 2) begin failures++; $display("FAIL: rate %0d cycles", t_last - t_first); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run(GEN_XORSHIFT, 0);
    run(GEN_XORSHIFT, 32'h1234);
    run(GEN_SORTED, 0);
    run(GEN_REVERSE, 0);
    rdy_pct = 100;
    run(GEN_XORSHIFT, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the input buffer of one way: lines of 16 keys go
// in (at random times, never beyond the FIFO's room), keys come out one
// at a time, key 0 of a line first, under random back-pressure. After
// E_p keys of the Unit the buffer must send MaxValue (sep_active high)
// until the tree reset; after the reset the next Unit's keys follow.
// Two E_p values are used: 32 (two lines) and 16 (one line).
module tb_input_buffer;
  import sort_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst = 1, clr = 0;
  always #5 clk = ~clk;
  logic [31:0] e_p;
  logic line_valid = 0, key_valid, key_ready = 0, sep_active;
  line_t line_data;
  logic [$clog2(DEPTH+1)-1:0] line_count;
  key_t key;
  input_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst, .clr, .e_p, .line_valid, .line_data, .line_count,
    .key_valid, .key, .key_ready, .sep_active);

  int checks = 0, failures = 0;
  key_t sent [$];

  task automatic unit(input int ep, input int nlines);
    int got, seps;
    e_p = ep;
    fork
      for (int l = 0; l < nlines; l++) begin
        line_t d;
        for (int i = 0; i < 16; i++) begin d[i*32 +: 32] = $urandom_range(32'hfffffffe); sent.push_back(d[i*32 +: 32]); end
        @(negedge clk);
        while (line_count >= DEPTH || $urandom_range(1)) @(negedge clk);
        line_valid = 1; line_data = d;
        @(negedge clk); line_valid = 0;
      end
      begin
        got = 0; seps = 0;
        while (seps < 5) begin
          @(negedge clk);
          key_ready = $urandom_range(99) < 70;
          #1;
          if (key_valid && key_ready) begin
            checks++;
            if (got < ep) begin
              if (key != sent[0] || sep_active) begin
                failures++; $display("FAIL: key %0d = %h expected %h", got, key, sent[0]);
              end
              void'(sent.pop_front());
              got++;
            end else begin
              if (key != MAX_KEY || !sep_active) begin failures++; $display("FAIL: separator expected"); end
              seps++;
            end
          end
        end
      end
    join
    @(negedge clk); key_ready = 0; clr = 1; @(negedge clk); clr = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    unit(32, 2);
    unit(32, 2);
    unit(16, 1);
    checks++;
    if (sent.size() != 0) failures++;
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

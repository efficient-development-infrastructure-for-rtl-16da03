// Self-checking test of the Iteration synchroniser with a master and a
// chain of three slaves (master -> s1 by the left input, s1 -> s2 by the
// upper input, s2 -> s3 by the left input), PERIOD 200, PULSE 16, DET 4.
// Checked: the master's go events come exactly PERIOD cycles apart; each
// slave fires exactly once per master event, in the DET-th consecutive
// cycle its input is high; a glitch shorter than DET on a slave input causes no event; no
// event happens while disabled.
module tb_sync_unit;
  localparam int PERIOD = 200, PULSE = 16, DET = 4, NEV = 6;
  logic clk = 0, rst = 1, enable = 0, glitch = 0;
  always #5 clk = ~clk;
  logic so [4], go [4];
  sync_unit #(.PERIOD(PERIOD), .PULSE(PULSE), .DET(DET)) u_m (.clk, .rst, .enable, .is_master(1'b1),
    .sync_in_left(1'b0), .sync_in_up(1'b0), .sync_out(so[0]), .go(go[0]));
  sync_unit #(.PERIOD(PERIOD), .PULSE(PULSE), .DET(DET)) u_s1 (.clk, .rst, .enable, .is_master(1'b0),
    .sync_in_left(so[0]), .sync_in_up(1'b0), .sync_out(so[1]), .go(go[1]));
  sync_unit #(.PERIOD(PERIOD), .PULSE(PULSE), .DET(DET)) u_s2 (.clk, .rst, .enable, .is_master(1'b0),
    .sync_in_left(1'b0), .sync_in_up(so[1]), .sync_out(so[2]), .go(go[2]));
  sync_unit #(.PERIOD(PERIOD), .PULSE(PULSE), .DET(DET)) u_s3 (.clk, .rst, .enable, .is_master(1'b0),
    .sync_in_left(so[2] || glitch), .sync_in_up(1'b0), .sync_out(so[3]), .go(go[3]));

  int checks = 0, failures = 0, cyc = 0;
  int n_go [4], last_go [4];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst)
    for (int i = 0; i < 4; i++) if (go[i]) begin
      if (!enable) begin failures++; $display("FAIL: event while disabled"); end
      if (i == 0 && n_go[0] > 0) begin
        checks++;
        if (cyc - last_go[0] != PERIOD) begin failures++; $display("FAIL: master period %0d", cyc - last_go[0]); end
      end
      if (i > 0) begin
        checks++;
        // input rises one cycle after the previous go; the event is its DET-th high cycle
        if (cyc - last_go[i-1] != DET) begin failures++; $display("FAIL: slave %0d delay %0d", i, cyc - last_go[i-1]); end
      end
      n_go[i]++;
      last_go[i] = cyc;
    end

  initial begin
    for (int i = 0; i < 4; i++) begin n_go[i] = 0; last_go[i] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_go[0] != 0) failures++;
    enable <= 1;
    repeat (100) @(posedge clk);
    // short glitch on the last slave's input
    glitch <= 1; repeat (DET - 1) @(posedge clk); glitch <= 0;
    repeat (PERIOD * (NEV - 1) + 20) @(posedge clk);
    enable <= 0;
    repeat (PERIOD) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_go[i] != NEV) begin failures++; $display("FAIL: node %0d had %0d events, expected %0d", i, n_go[i], NEV); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the 16-input odd-even merge sorting network:
// 2000 random vectors (random keys, small-range keys with ties, and
// all-equal vectors) with gaps in the input; every output must be the
// input sorted ascending (key 0 in the low bits), carry the input's tag,
// and appear exactly 10 cycles after its input.
module tb_oem_sort_net;
  localparam int N = 16, KW = 32, LAT = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [3:0] in_tag = 0, out_tag;
  logic [N*KW-1:0] in_data = '0, out_data;
  oem_sort_net #(.N(N), .KEY_W(KW), .TAG_W(4)) dut (.clk, .rst, .in_valid, .in_tag, .in_data,
    .out_valid, .out_tag, .out_data);

  int checks = 0, failures = 0, cyc = 0, sent = 0, recv = 0;
  logic [N*KW-1:0] exp_q [$];
  logic [3:0] tag_q [$];
  int t_q [$];
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && out_valid) begin
    logic [N*KW-1:0] e;
    e = exp_q.pop_front();
    checks += 3;
    if (out_data !== e) begin failures++; if (failures < 5) $display("FAIL: vector %0d not sorted", recv); end
    if (out_tag !== tag_q.pop_front()) failures++;
    if (cyc - t_q.pop_front() != LAT) begin failures++; $display("FAIL: latency"); end
    recv++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    while (sent < 2000) begin
      if ($urandom_range(9) < 8) begin
        int unsigned k [N];
        int m;
        m = $urandom_range(2);
        for (int i = 0; i < N; i++)
          k[i] = (m == 0) ? $urandom() : (m == 1) ? $urandom_range(5) : 32'h77;
        for (int i = 0; i < N; i++) in_data[i*KW +: KW] <= k[i];
        in_tag <= 4'(sent);
        in_valid <= 1;
        k.sort();
        begin
          logic [N*KW-1:0] e;
          for (int i = 0; i < N; i++) e[i*KW +: KW] = k[i];
          exp_q.push_back(e);
        end
        tag_q.push_back(4'(sent));
        t_q.push_back(cyc + 1);
        sent++;
      end else in_valid <= 0;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (recv != sent) begin failures++; $display("FAIL: %0d of %0d vectors out", recv, sent); end
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

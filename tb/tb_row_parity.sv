// Self-checking test of the row-parity chain: columns of 1 to 12 nodes
// are built from the cell; the bottom node has no node below; every node
// must see odd = (its distance from the bottom) mod 2. Each cell is also
// checked exhaustively on its own.
module tb_row_parity;
  localparam int NMAX = 12;
  logic hb [NMAX], fb [NMAX], ta [NMAX], od [NMAX];
  for (genvar i = 0; i < NMAX; i++) begin : g
    row_parity u (.has_below(hb[i]), .from_below(fb[i]), .to_above(ta[i]), .odd(od[i]));
  end
  int checks = 0, failures = 0;
  initial begin
    // single cells, all inputs
    for (int v = 0; v < 4; v++) begin
      hb[0] = v[1]; fb[0] = v[0];
      #1;
      checks++;
      if (od[0] != (v[1] && !v[0]) || ta[0] != od[0]) begin failures++; $display("FAIL: cell input %0d", v); end
    end
    // columns: node 0 at the bottom
    for (int n = 1; n <= NMAX; n++) begin
      for (int i = 0; i < NMAX; i++) hb[i] = (i > 0 && i < n);
      for (int k = 0; k < NMAX; k++) begin
        for (int i = 0; i < NMAX; i++) fb[i] = (i > 0) ? ta[i-1] : 1'b0;
        #1;
      end
      for (int i = 0; i < n; i++) begin
        checks++;
        if (od[i] != i[0]) begin failures++; $display("FAIL: column %0d node %0d", n, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

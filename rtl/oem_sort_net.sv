// Pipelined Batcher odd-even merge sort network.
// Sorts N keys (default 16, one 512-bit memory line) in ascending order,
// key 0 (least significant) smallest. The comparator positions are those of
// Batcher's network, generated from the usual (p, k) iteration: for every
// merge size p = 1, 2, 4, ... and every distance k = p, p/2, ..., 1 there is
// one column of comparators, so N = 16 gives 10 columns and 63 comparators.
// A register follows every column, so a line enters each cycle and leaves
// STAGES = log2(N)(log2(N)+1)/2 cycles later. in_valid and in_tag ride along
// unchanged. The network has no mode: an already sorted line passes through
// unchanged, which is how it acts as a plain data path after the first phase.
// Origin: the 16-input odd-even merge network follows the original design;
// it is generated here from the recursive definition of the network.
module oem_sort_net #(
  parameter int unsigned N     = 16,
  parameter int unsigned KEY_W = 32,
  parameter int unsigned TAG_W = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [TAG_W-1:0]      in_tag,
  input  logic [N*KEY_W-1:0]    in_data,
  output logic                  out_valid,
  output logic [TAG_W-1:0]      out_tag,
  output logic [N*KEY_W-1:0]    out_data
);
  localparam int unsigned LG     = $clog2(N);
  localparam int unsigned STAGES = LG * (LG + 1) / 2;

  // distance k and merge size p of column s
  function automatic int unsigned col_p(input int unsigned s);
    int unsigned c = 0;
    for (int unsigned lp = 0; lp < LG; lp++)
      for (int lk = int'(lp); lk >= 0; lk--) begin
        if (c == s) return 1 << lp;
        c++;
      end
    return 1;
  endfunction
  function automatic int unsigned col_k(input int unsigned s);
    int unsigned c = 0;
    for (int unsigned lp = 0; lp < LG; lp++)
      for (int lk = int'(lp); lk >= 0; lk--) begin
        if (c == s) return 1 << lk;
        c++;
      end
    return 1;
  endfunction

  logic [KEY_W-1:0] st   [STAGES+1][N];
  logic             stv  [STAGES+1];
  logic [TAG_W-1:0] stt  [STAGES+1];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign st[0][i] = in_data[i*KEY_W +: KEY_W];
  end
  assign stv[0] = in_valid;
  assign stt[0] = in_tag;

  for (genvar s = 0; s < STAGES; s++) begin : g_col
    localparam int unsigned P = col_p(s);
    localparam int unsigned K = col_k(s);
    logic [KEY_W-1:0] nx [N];
    always_comb begin
      nx = st[s];
      for (int unsigned j = K % P; j + K < N; j += 2 * K)
        for (int unsigned i = 0; i < K && i + j + K < N; i++)
          if ((i + j) / (2 * P) == (i + j + K) / (2 * P))
            if (st[s][i+j] > st[s][i+j+K]) begin
              nx[i+j]   = st[s][i+j+K];
              nx[i+j+K] = st[s][i+j];
            end
    end
    always_ff @(posedge clk) begin
      st[s+1]  <= nx;
      stt[s+1] <= stt[s];
      if (rst) stv[s+1] <= 1'b0;
      else     stv[s+1] <= stv[s];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign out_data[i*KEY_W +: KEY_W] = st[STAGES][i];
  end
  assign out_valid = stv[STAGES];
  assign out_tag   = stt[STAGES];
endmodule

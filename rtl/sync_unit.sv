// Iteration synchroniser of a stencil node.
// The array has no common clock, so the master node starts an Iteration
// every PERIOD = alpha + beta cycles (alpha: cycles of one Iteration,
// beta: margin for clock drift) and marks it by driving its sync output
// high for PULSE cycles. Every other node watches the sync inputs from its
// left and upper neighbours; when one of them has been high for DET
// consecutive cycles the node takes it as a synchronisation event: it
// pulses go for one cycle and drives its own sync output (to the right and
// lower neighbours) high for PULSE cycles, so the event sweeps across the
// array. The master pulses go in the cycle it raises its output.
// enable low holds the unit idle (no events, outputs low).
// Origin: the master period alpha+beta, detection over several cycles and
// forwarding right and down follow the original scheme; beta, pulse length
// and detection length are assumed values.
module sync_unit #(
  parameter int unsigned PERIOD = 4096 + 64,
  parameter int unsigned PULSE  = 32,
  parameter int unsigned DET    = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic enable,
  input  logic is_master,
  input  logic sync_in_left,
  input  logic sync_in_up,
  output logic sync_out,
  output logic go
);
  logic [$clog2(PERIOD)-1:0] per_cnt;
  logic [$clog2(PULSE+1)-1:0] pulse_cnt;
  logic [$clog2(DET+1)-1:0]   hi_cnt;
  logic in_any, armed, det_evt, mst_evt;

  assign in_any  = sync_in_left || sync_in_up;
  assign mst_evt = enable && is_master && per_cnt == '0;
  assign det_evt = enable && !is_master && armed && in_any && hi_cnt == ($bits(hi_cnt))'(DET - 1);
  assign go      = mst_evt || det_evt;
  assign sync_out = pulse_cnt != '0;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      per_cnt <= '0; pulse_cnt <= '0; hi_cnt <= '0; armed <= 1'b1;
    end else begin
      per_cnt <= (per_cnt == ($bits(per_cnt))'(PERIOD - 1)) ? '0 : per_cnt + 1'b1;
      if (go) pulse_cnt <= ($bits(pulse_cnt))'(PULSE);
      else if (pulse_cnt != '0) pulse_cnt <= pulse_cnt - 1'b1;
      // count consecutive high cycles; one event per pulse
      if (!in_any) begin hi_cnt <= '0; armed <= 1'b1; end
      else if (hi_cnt != ($bits(hi_cnt))'(DET)) hi_cnt <= hi_cnt + 1'b1;
      if (det_evt) armed <= 1'b0;
    end
  end
endmodule

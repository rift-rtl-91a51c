// rift_feed_sched: wavefront alignment for the systolic modes.
//
// A systolic array needs lane i of an operand vector to arrive i cycles after
// lane 0 (skew), and the bottom-row results, which leave column j j cycles
// after column 0, to be re-aligned before they are stored (de-skew). This
// block is a set of per-lane shift registers: with DESKEW = 0 lane i is
// delayed by i cycles, with DESKEW = 1 by N-1-i cycles. Lane 0 (or lane N-1)
// passes through without a register. The indexed sparse reads that the
// architecture also assigns to the feed scheduler are done by the RPU
// sequencer (rift_idex), which takes read addresses from the sparse queue
// buffer; this module only aligns. Reset clears the delay lines.
module rift_feed_sched #(
  parameter int N      = 4,
  parameter int W      = 8,
  parameter bit DESKEW = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din  [N],
  output logic [W-1:0] dout [N]
);
  for (genvar i = 0; i < N; i++) begin : g_lane
    localparam int D = DESKEW ? (N - 1 - i) : i;
    if (D == 0) begin : g_thru
      assign dout[i] = din[i];
    end else begin : g_dly
      logic [W-1:0] sr [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < D; k++) sr[k] <= '0;
        end else begin
          sr[0] <= din[i];
          for (int k = 1; k < D; k++) sr[k] <= sr[k-1];
        end
      end
      assign dout[i] = sr[D-1];
    end
  end
endmodule

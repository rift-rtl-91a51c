// rift_topk_merge: second stage of the in-stream top-k unit.
//
// Keeps a sorted list of the best KMAX candidates seen since the last clear.
// Each valid input group (CS candidates, already sorted by rift_topk_sorter)
// is merged with the list in one cycle by a two-pointer merge that keeps the
// first KMAX results, so only KMAX + CS candidates are ever buffered. The
// first k entries of the list are the top-k for any runtime k <= KMAX.
// The small merge stage follows the architecture; its size KMAX and the
// merge circuit are this implementation's choices.
// Timing: list is a register, updated the cycle after in_valid. clear has
// priority over in_valid.
module rift_topk_merge
  import rift_pkg::*;
#(
  parameter int CS   = 4,
  parameter int KMAX = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  cand_t in   [CS],
  output cand_t list [KMAX]
);
  cand_t list_q [KMAX];
  cand_t nx     [KMAX];

  always_comb begin
    int ia, ib;
    cand_t ca, cb;
    ia = 0;
    ib = 0;
    for (int o = 0; o < KMAX; o++) begin
      ca = (ia < KMAX) ? list_q[ia] : cand_t'(0);
      cb = (ib < CS)   ? in[ib]     : cand_t'(0);
      if (ca.valid && (!cb.valid || !cand_before(cb, ca))) begin
        nx[o] = ca;
        ia++;
      end else begin
        nx[o] = cb;
        ib++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < KMAX; i++) list_q[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < KMAX; i++) list_q[i] <= '0;
    end else if (in_valid) begin
      list_q <= nx;
    end
  end

  assign list = list_q;
endmodule

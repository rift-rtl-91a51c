// rift_dispatch: runtime controller for dependency-aware scheduling.
//
// The host loads a table of up to NB blocks. Each entry holds a block
// descriptor, the RPU that runs it, and a dependency mask: bit d set means
// the block may start only after block d has completed. This is the block
// dependency DAG. After go, entries 0..go_count-1 take part: every cycle the
// lowest-numbered entry that is not yet issued, whose dependencies have all
// completed, whose RPU block queue has room and that has no unissued
// lower-numbered entry for the same RPU, is pushed into that queue with its
// entry number as tag. Blocks of one RPU therefore issue, and run, in
// table order; blocks of different RPUs overtake one another freely. A
// full queue holds dispatch back (backpressure). An RPU reports completion with done and the tag, which
// sets the entry's done bit and may release its successors. Independent
// blocks placed on different RPUs therefore run at the same time.
// The DAG-driven dispatch of ready blocks through queues follows the
// architecture; the table format, one dispatch per cycle, the priority
// by entry number and the per-RPU table order are this implementation's choices.
// Timing: an entry written with tw_en is visible the next cycle; go clears
// all issued/done bits. busy is high from go until every taking-part block
// has completed.
module rift_dispatch
  import rift_pkg::*;
#(
  parameter int NB = 16,
  parameter int NR = 4,
  localparam int IW = (NB > 1) ? $clog2(NB) : 1,
  localparam int RW = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // table load
  input  logic          tw_en,
  input  logic [IW-1:0] tw_idx,
  input  instr_t        tw_instr,
  input  logic [RW-1:0] tw_rpu,
  input  logic [NB-1:0] tw_deps,
  input  logic          go,
  input  logic [IW:0]   go_count,
  // RPU block queues
  output logic [NR-1:0] iq_push,
  output instr_t        iq_din,
  input  logic [NR-1:0] iq_full,
  input  logic [NR-1:0] rpu_done,
  input  logic [7:0]    rpu_tag [NR],
  // status
  output logic          busy,
  output logic [NB-1:0] done_mask,
  output logic [NB-1:0] issued_mask
);
  instr_t        tbl_instr [NB];
  logic [RW-1:0] tbl_rpu   [NB];
  logic [NB-1:0] tbl_deps  [NB];
  logic [NB-1:0] act, iss, dn;
  logic          found;
  logic [IW-1:0] pick;

  // pend[r]: a lower-numbered entry for RPU r has not been issued yet, so
  // later entries for r must wait (per-RPU table order is kept).
  always_comb begin
    logic [NR-1:0] pend;
    found = 1'b0;
    pick  = '0;
    pend  = '0;
    for (int b = 0; b < NB; b++) begin
      if (act[b] && !iss[b]) begin
        if (!found && !pend[tbl_rpu[b]] && ((tbl_deps[b] & ~dn) == '0) && !iq_full[tbl_rpu[b]]) begin
          found = 1'b1;
          pick  = IW'(b);
        end
        pend[tbl_rpu[b]] = 1'b1;
      end
    end
  end

  always_comb begin
    iq_push = '0;
    iq_din  = tbl_instr[pick];
    iq_din.tag = 8'(pick);
    if (found) iq_push[tbl_rpu[pick]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (tw_en) begin
      tbl_instr[tw_idx] <= tw_instr;
      tbl_rpu[tw_idx]   <= tw_rpu;
      tbl_deps[tw_idx]  <= tw_deps;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= '0;
      iss <= '0;
      dn  <= '0;
    end else if (go) begin
      for (int b = 0; b < NB; b++) act[b] <= (b < 32'(go_count));
      iss <= '0;
      dn  <= '0;
    end else begin
      if (found) iss[pick] <= 1'b1;
      for (int r = 0; r < NR; r++)
        if (rpu_done[r] && 32'(rpu_tag[r]) < NB) dn[IW'(rpu_tag[r])] <= 1'b1;
    end
  end

  assign busy        = |(act & ~dn);
  assign done_mask   = dn;
  assign issued_mask = iss;

  a_done_after_issue: assert property (@(posedge clk) disable iff (!rst_n)
    (rpu_done[0] && 32'(rpu_tag[0]) < NB) |-> iss[IW'(rpu_tag[0])]);
endmodule

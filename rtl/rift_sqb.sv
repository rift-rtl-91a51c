// rift_sqb: sparse queue buffer of one RPU.
//
// Holds the token indices kept by the top-k unit, in the order it emits
// them (best first), and hands them to later blocks that read their
// operands at those indices, so pruning gates the reads and the work of the
// kernels that follow. Indices are appended with push; the head is visible
// on head while empty is low and pop advances to the next one. Because
// several kernels may be gated by one pruning result, rewind returns the
// read pointer to the first index written since the last clear; clear
// empties the queue before a new top-k pass. Only the name and role of this
// buffer come from the architecture; the rewind/clear interface and the
// depth are this implementation's choices. Priority: clear, rewind, then
// push/pop. Reset empties the queue. total tells a block that is completed at
// run time how many indices the last top-k pass kept.
module rift_sqb #(
  parameter int DEPTH = 16,
  parameter int IW    = 16,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          rewind,
  input  logic          push,
  input  logic [IW-1:0] din,
  input  logic          pop,
  output logic [IW-1:0] head,
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count,
  output logic [AW:0]   total     // indices written since the last clear
);
  logic [IW-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;   // wp: entries written; rp: entries consumed

  assign full  = (wp == (AW+1)'(DEPTH));
  assign empty = (rp == wp);
  assign count = wp - rp;
  assign total = wp;
  assign head  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full && !clear) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (clear) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (rewind)                rp <= '0;
      else if (pop && !empty)    rp <= rp + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) (push && !clear) |-> !full);
endmodule

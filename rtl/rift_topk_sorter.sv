// rift_topk_sorter: first stage of the in-stream top-k unit.
//
// Sorts one group of CS candidates (score + token index) per cycle, the
// width of one PE-array output row, so scores can be filtered as they leave
// the array. It is an odd-even transposition network of CS compare layers,
// each followed by a register, so it accepts a new group every cycle and
// delivers it sorted (best first, per rift_pkg::cand_before) CS cycles later.
// The width matching and the pipelined compare network follow the
// architecture; the choice of network is this implementation's.
module rift_topk_sorter
  import rift_pkg::*;
#(
  parameter int CS = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cand_t in  [CS],
  output logic  out_valid,
  output cand_t out [CS]
);
  cand_t st [CS+1][CS];
  logic  vs [CS+1];

  always_comb begin
    st[0] = in;
    vs[0] = in_valid;
  end

  for (genvar s = 0; s < CS; s++) begin : g_stage
    cand_t nx [CS];
    always_comb begin
      nx = st[s];
      for (int i = s % 2; i + 1 < CS; i += 2) begin
        if (cand_before(st[s][i+1], st[s][i])) begin
          nx[i]   = st[s][i+1];
          nx[i+1] = st[s][i];
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[s+1] <= 1'b0;
        for (int i = 0; i < CS; i++) st[s+1][i] <= '0;
      end else begin
        vs[s+1] <= vs[s];
        st[s+1] <= nx;
      end
    end
  end

  assign out       = st[CS];
  assign out_valid = vs[CS];
endmodule

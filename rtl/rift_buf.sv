// rift_buf: a multi-lane on-chip buffer of an RPU.
//
// The top, left, centre and bottom buffers of an RPU are each one instance:
// DEPTH words of LANES lanes of W bits. One write port writes any subset of
// the lanes of a word (lane mask); two read ports each read a whole word,
// one for the engine and one for the host. Reads are registered: data
// appear the cycle after the address. The buffers and their placement
// around the PE array follow the architecture; the depth, the lane-masked
// write and the second read port are this implementation's choices. The
// contents are not reset (a RAM); the read registers are.
module rift_buf #(
  parameter int LANES = 4,
  parameter int W     = 8,
  parameter int DEPTH = 64,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LANES-1:0] we,
  input  logic [AW-1:0]    waddr,
  input  logic [W-1:0]     wdata [LANES],
  input  logic [AW-1:0]    raddr_a,
  output logic [W-1:0]     rdata_a [LANES],
  input  logic [AW-1:0]    raddr_b,
  output logic [W-1:0]     rdata_b [LANES]
);
  logic [W-1:0] mem [DEPTH][LANES];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      if (we[l]) mem[waddr][l] <= wdata[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        rdata_a[l] <= '0;
        rdata_b[l] <= '0;
      end
    end else begin
      rdata_a <= mem[raddr_a];
      rdata_b <= mem[raddr_b];
    end
  end
endmodule

// rift_host_if: memory-mapped host interface of the accelerator.
//
// Turns 32-bit host reads and writes into buffer accesses of the RPUs and
// into loads of the dispatcher's block table. Address fields:
//   addr[31:28] unit: RPU number 0..NR-1, or 4'hF for the control block
//   addr[27:24] region inside an RPU: 0 top, 1 left, 2 centre, 3 bottom,
//               4 sparse queue buffer (word 0 clear, word 1 push; read: count)
//   addr[23:20] lane,  addr[15:0] word address
// An RPU write stores wdata[7:0] into one lane of one word (top, left); an
// RPU read returns one lane (int8 lanes sign-extended, centre lanes whole).
// Control block registers (addr[7:0]):
//   0..3  descriptor staging words (word 0 = descriptor bits 31:0)
//   4     wdata[NB-1:0] dependency mask, wdata[27:24] RPU number
//   5     write the staged descriptor into table entry wdata[7:0]
//   6     start: run table entries 0..wdata[7:0]-1
//   8     read: bit 31 busy, bits NB-1:0 completed blocks
// Read data come back on host_rdata with host_rvalid one cycle after the
// request. Requests to the RPUs are combinational. Every RPU receives the
// same address fields and write data, so those output bits are copies of
// inputs. Only the per-RPU we/re strobes are decoded. The host interface
// itself is part of the architecture; this
// address map is this implementation's own.
module rift_host_if
  import rift_pkg::*;
#(
  parameter int NR = 4,
  parameter int NB = 16,
  localparam int IW = (NB > 1) ? $clog2(NB) : 1,
  localparam int RW = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          host_valid,
  input  logic          host_we,
  input  logic [31:0]   host_addr,
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata,
  output logic          host_rvalid,
  // RPU buffers
  output hreq_t         hreq [NR],
  input  logic [31:0]   hrdata [NR],
  // dispatcher table
  output logic          tw_en,
  output logic [IW-1:0] tw_idx,
  output instr_t        tw_instr,
  output logic [RW-1:0] tw_rpu,
  output logic [NB-1:0] tw_deps,
  output logic          go,
  output logic [IW:0]   go_count,
  input  logic          busy,
  input  logic [NB-1:0] done_mask
);
  logic [3:0]  unit;
  logic        is_ctrl;
  logic [31:0] stage [4];
  logic [31:0] meta;
  logic [3:0]  rd_unit_q;
  logic        rd_ctrl_q;
  logic [31:0] ctrl_rd_q;

  assign unit    = host_addr[31:28];
  assign is_ctrl = (unit == HOST_UNIT_CTRL);

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      hreq[r].we     = host_valid && host_we  && !is_ctrl && (unit == 4'(r));
      hreq[r].re     = host_valid && !host_we && !is_ctrl && (unit == 4'(r));
      hreq[r].region = host_addr[27:24];
      hreq[r].lane   = host_addr[23:20];
      hreq[r].addr   = host_addr[15:0];
      hreq[r].wdata  = host_wdata;
    end
  end

  assign tw_en    = host_valid && host_we && is_ctrl && host_addr[7:0] == 8'd5;
  assign tw_idx   = host_wdata[IW-1:0];
  assign tw_instr = instr_t'({stage[3], stage[2], stage[1], stage[0]});
  assign tw_deps  = meta[NB-1:0];
  assign tw_rpu   = meta[24 +: RW];
  assign go       = host_valid && host_we && is_ctrl && host_addr[7:0] == 8'd6;
  assign go_count = host_wdata[IW:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < 4; w++) stage[w] <= '0;
      meta        <= '0;
      rd_unit_q   <= '0;
      rd_ctrl_q   <= 1'b0;
      ctrl_rd_q   <= '0;
      host_rvalid <= 1'b0;
    end else begin
      if (host_valid && host_we && is_ctrl) begin
        if (host_addr[7:0] < 8'd4) stage[host_addr[1:0]] <= host_wdata;
        if (host_addr[7:0] == 8'd4) meta <= host_wdata;
      end
      host_rvalid <= host_valid && !host_we;
      if (host_valid && !host_we) begin
        rd_unit_q <= unit;
        rd_ctrl_q <= is_ctrl;
        ctrl_rd_q <= (host_addr[7:0] == 8'd8) ? ({busy, 31'd0} | 32'(done_mask)) : 32'd0;
      end
    end
  end

  always_comb begin
    host_rdata = '0;
    if (rd_ctrl_q) host_rdata = ctrl_rd_q;
    else
      for (int r = 0; r < NR; r++)
        if (rd_unit_q == 4'(r)) host_rdata = hrdata[r];
  end
endmodule

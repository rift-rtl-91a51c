// rift_top: the RIFT accelerator, a GR x GC grid of RPUs on one bitstream.
//
// Each RPU (rift_rpu) holds a mode-switchable PE array, in-stream top-k
// pruning, norm/activation units and its buffers. The RPU in row r, column c
// pushes its output rows into an inter-RPU buffer (rift_fifo) that the RPU
// below it reads; the top row reads from the up_* stream ports and the
// bottom row's buffers are drained through the dn_* ports. A host interface
// (rift_host_if) maps the RPU buffers and the table of the dependency-aware
// dispatcher (rift_dispatch) into one 32-bit address space; the dispatcher
// feeds each RPU's block queue with blocks whose predecessors have
// completed, so independent kernels overlap across RPUs. Changing the
// dataflow between blocks only changes descriptor fields.
// The grid, the per-RPU contents and the vertical inter-RPU buffers follow
// the architecture figure (a 2 x 2 grid of 4 x 4 PE arrays is drawn); the
// sizes of buffers and queues are this implementation's.
// Observation outputs (rpu_busy, rpu_stall, rpu_mode) are for monitoring.
module rift_top
  import rift_pkg::*;
#(
  parameter int GR   = 2,
  parameter int GC   = 2,
  parameter int RS   = 4,
  parameter int CS   = 4,
  parameter int TBD  = 64,
  parameter int LBD  = 64,
  parameter int CBD  = 64,
  parameter int BBD  = 64,
  parameter int SQBD = 16,
  parameter int KMAX = 8,
  parameter int QD   = 4,
  parameter int IRBD = 8,   // inter-RPU buffer depth
  parameter int NB   = 16,  // dispatcher table entries
  localparam int NR  = GR * GC
) (
  input  logic            clk,
  input  logic            rst_n,
  // host bus
  input  logic            host_valid,
  input  logic            host_we,
  input  logic [31:0]     host_addr,
  input  logic [31:0]     host_wdata,
  output logic [31:0]     host_rdata,
  output logic            host_rvalid,
  // rows entering the top RPU row
  input  logic [CS*8-1:0] up_data  [GC],
  input  logic [GC-1:0]   up_empty,
  output logic [GC-1:0]   up_pop,
  // rows leaving the bottom RPU row
  output logic [CS*8-1:0] dn_data  [GC],
  output logic [GC-1:0]   dn_empty,
  input  logic [GC-1:0]   dn_pop,
  // status
  output logic            busy,
  output logic [NB-1:0]   done_mask,
  output logic [NR-1:0]   rpu_busy,
  output logic [NR-1:0]   rpu_stall,
  output mode_e           rpu_mode [NR]
);
  localparam int IW  = (NB > 1) ? $clog2(NB) : 1;
  localparam int RW  = (NR > 1) ? $clog2(NR) : 1;
  localparam int OCW = $clog2(IRBD) + 1;

  hreq_t         hreq   [NR];
  logic [31:0]   hrdata [NR];
  logic          tw_en, go;
  logic [IW-1:0] tw_idx;
  logic [IW:0]   go_count;
  instr_t        tw_instr, iq_din;
  logic [RW-1:0] tw_rpu;
  logic [NB-1:0] tw_deps, issued_mask;
  logic [NR-1:0] iq_push, iq_full, rpu_done;
  logic [7:0]    rpu_tag [NR];

  rift_host_if #(.NR(NR), .NB(NB)) u_host (
    .clk, .rst_n, .host_valid, .host_we, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .hreq, .hrdata, .tw_en, .tw_idx, .tw_instr, .tw_rpu, .tw_deps, .go, .go_count,
    .busy, .done_mask
  );

  rift_dispatch #(.NB(NB), .NR(NR)) u_disp (
    .clk, .rst_n, .tw_en, .tw_idx, .tw_instr, .tw_rpu, .tw_deps, .go, .go_count,
    .iq_push, .iq_din, .iq_full, .rpu_done, .rpu_tag, .busy, .done_mask, .issued_mask
  );

  // inter-RPU buffers: one below every RPU
  logic [CS*8-1:0] o_data [NR], f_data [NR], i_data [NR];
  logic [NR-1:0]   o_push, f_empty, f_full, f_pop, i_empty, i_pop;
  logic [OCW-1:0]  f_count [NR];

  for (genvar n = 0; n < NR; n++) begin : g_rpu
    localparam int R = n / GC;
    localparam int C = n % GC;

    if (R == 0) begin : g_up
      assign i_data[n]  = up_data[C];
      assign i_empty[n] = up_empty[C];
      assign up_pop[C]  = i_pop[n];
    end else begin : g_mid
      assign i_data[n]     = f_data[n - GC];
      assign i_empty[n]    = f_empty[n - GC];
      assign f_pop[n - GC] = i_pop[n];
    end

    if (R == GR - 1) begin : g_dn
      assign dn_data[C]  = f_data[n];
      assign dn_empty[C] = f_empty[n];
      assign f_pop[n]    = dn_pop[C];
    end

    rift_rpu #(
      .RS(RS), .CS(CS), .TBD(TBD), .LBD(LBD), .CBD(CBD), .BBD(BBD),
      .SQBD(SQBD), .KMAX(KMAX), .QD(QD), .OFD(IRBD)
    ) u_rpu (
      .clk, .rst_n,
      .iq_push(iq_push[n]), .iq_din(iq_din), .iq_full(iq_full[n]),
      .busy(rpu_busy[n]), .done(rpu_done[n]), .done_tag(rpu_tag[n]),
      .stall(rpu_stall[n]), .mode(rpu_mode[n]),
      .hreq(hreq[n]), .hrdata(hrdata[n]),
      .in_data(i_data[n]), .in_empty(i_empty[n]), .in_pop(i_pop[n]),
      .out_data(o_data[n]), .out_push(o_push[n]), .out_count(f_count[n])
    );

    rift_fifo #(.W(CS*8), .DEPTH(IRBD)) u_irb (
      .clk, .rst_n, .push(o_push[n]), .din(o_data[n]), .pop(f_pop[n]),
      .dout(f_data[n]), .full(f_full[n]), .empty(f_empty[n]), .count(f_count[n])
    );
  end

endmodule

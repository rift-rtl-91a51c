// rift_rpu: one reconfigurable processing unit (RPU).
//
// Around one mode-switchable PE array (rift_mse) sit the buffers of the
// unit: a double-banked top buffer (int8, CS lanes) and a left buffer (int8,
// RS lanes) that feed the array from the north and the west, a centre
// buffer (32-bit, CS lanes) that receives array results, and a bottom
// buffer (int8, CS lanes) for post-processed rows. Feed schedulers skew the
// west and north operands for the systolic modes and de-skew the WS results.
// Results streamed into the centre buffer can at the same time pass the
// two-stage top-k unit (CS-wide sorter, then a merge into the running top-k
// list); the kept token indices go to the sparse queue buffer (SQB), from
// which later SIMD1/RADT blocks take their read addresses. A POST block reads
// centre-buffer rows through the norm and activation units into the bottom
// buffer, and optionally to the downstream inter-RPU buffer; a RECV block
// writes rows from the upstream inter-RPU buffer into the top or left
// buffer. rift_idex sequences all of this from a queue of block descriptors.
//
// Candidate token index of lane j of result row r is r*CS + j. In SIMD1 and
// RADT blocks with use_sqb the SQB index addresses the top buffer, and in
// SIMD1 also the left buffer, whose lane 0 is the broadcast scalar.
// RADT configuration: aux[CS-1:0] lane mask, aux[CS +: log2(CS)*CS] join
// bits. POST: aux[7:0] gamma, aux[31:8] beta.
//
// Host interface: hreq writes one lane of one word or requests a read,
// whose data appear on hrdata the next cycle. A host write to the top or left
// buffer takes precedence over a RECV write in the same cycle. Region
// REG_SQB: a write to word 0 empties the SQB, a write to word 1 appends
// wdata[15:0] (for gather lists that do not come from top-k, e.g. graph
// neighbours); a read returns how many indices were written since the last
// clear, i.e. how many tokens the last top-k pass kept.
// The unit's composition follows the architecture figure; buffer depths,
// the descriptor and the data paths of the RECV/POST blocks are this
// implementation's choices.
module rift_rpu
  import rift_pkg::*;
#(
  parameter int RS    = 4,
  parameter int CS    = 4,
  parameter int TBD   = 64,  // words per top-buffer bank
  parameter int LBD   = 64,
  parameter int CBD   = 64,
  parameter int BBD   = 64,
  parameter int SQBD  = 16,
  parameter int KMAX  = 8,
  parameter int QD    = 4,   // block queue depth
  parameter int OFD   = 8,   // depth of the downstream inter-RPU buffer
  localparam int OCW  = $clog2(OFD) + 1,
  localparam int LV   = (CS > 1) ? $clog2(CS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // block queue (from the dispatcher)
  input  logic          iq_push,
  input  instr_t        iq_din,
  output logic          iq_full,
  output logic          busy,
  output logic          done,
  output logic [7:0]    done_tag,
  output logic          stall,     // a read is waiting on the SQB or an inter-RPU buffer
  output mode_e         mode,      // mode ID of the current block
  // host access
  input  hreq_t         hreq,
  output logic [31:0]   hrdata,
  // upstream inter-RPU buffer
  input  logic [CS*8-1:0] in_data,
  input  logic          in_empty,
  output logic          in_pop,
  // downstream inter-RPU buffer
  output logic [CS*8-1:0] out_data,
  output logic          out_push,
  input  logic [OCW-1:0] out_count
);
  localparam int TAW = $clog2(2 * TBD);
  localparam int LAW = $clog2(LBD);
  localparam int CAW = $clog2(CBD);
  localparam int BAW = $clog2(BBD);
  localparam int SAW = $clog2(SQBD);
  localparam int QAW = $clog2(QD);

  // ---------------- block queue and sequencer ----------------
  logic   q_empty, q_pop;
  instr_t q_head, cur;
  logic [QAW:0] q_count;

  rift_fifo #(.W(INSTR_W), .DEPTH(QD)) u_iq (
    .clk, .rst_n, .push(iq_push), .din(iq_din), .pop(q_pop), .dout(q_head),
    .full(iq_full), .empty(q_empty), .count(q_count)
  );

  mse_ctl_e    mse_ctl;
  logic        rd_en, feed_valid, wb_en;
  logic [15:0] rd_addr, wb_addr, wb_row;
  logic        sqb_empty, sqb_pop, sqb_clear, sqb_rewind, sqb_push, sqb_full;
  logic [15:0] sqb_head, sqb_din;
  logic [SAW:0] sqb_count, sqb_total;
  logic        tk_clear, tk_in_valid, recv_we;
  logic [15:0] recv_addr;
  cand_t       tk_list [KMAX];

  rift_idex #(.RS(RS), .CS(CS), .KMAX(KMAX), .OFD(OFD)) u_idex (
    .clk, .rst_n, .q_empty, .q_head, .q_pop, .cur, .busy, .done, .done_tag, .stall,
    .mse_ctl, .rd_en, .rd_addr, .feed_valid, .wb_en, .wb_addr, .wb_row,
    .sqb_empty, .sqb_head, .sqb_total(16'(sqb_total)), .sqb_pop, .sqb_clear, .sqb_rewind, .sqb_push, .sqb_din,
    .tk_clear, .tk_in_valid, .tk_list, .in_empty, .in_pop, .recv_we, .recv_addr,
    .out_count, .out_push
  );

  assign mode = cur.mode;

  // ---------------- buffers ----------------
  logic [7:0]  in_lane [CS];
  for (genvar j = 0; j < CS; j++) begin : g_in
    assign in_lane[j] = in_data[j*8 +: 8];
  end

  // top buffer
  logic [CS-1:0]  tb_we;
  logic [TAW-1:0] tb_waddr;
  logic [7:0]     tb_wdata [CS];
  logic [7:0]     tb_rd [CS], tb_hrd [CS];
  logic           host_top, host_left;
  assign host_top  = hreq.we && hreq.region == REG_TOP;
  assign host_left = hreq.we && hreq.region == REG_LEFT;

  always_comb begin
    tb_we    = '0;
    tb_waddr = {cur.tbank, recv_addr[TAW-2:0]};
    tb_wdata = in_lane;
    if (host_top) begin
      tb_we    = CS'(1) << hreq.lane;
      tb_waddr = hreq.addr[TAW-1:0];
      for (int j = 0; j < CS; j++) tb_wdata[j] = hreq.wdata[7:0];
    end else if (recv_we && !cur.to_left) begin
      tb_we = '1;
    end
  end

  rift_buf #(.LANES(CS), .W(8), .DEPTH(2 * TBD)) u_top (
    .clk, .rst_n, .we(tb_we), .waddr(tb_waddr), .wdata(tb_wdata),
    .raddr_a({cur.tbank, rd_addr[TAW-2:0]}), .rdata_a(tb_rd),
    .raddr_b(hreq.addr[TAW-1:0]), .rdata_b(tb_hrd)
  );

  // left buffer
  logic [RS-1:0]  lb_we;
  logic [LAW-1:0] lb_waddr;
  logic [7:0]     lb_wdata [RS];
  logic [7:0]     lb_rd [RS], lb_hrd [RS];

  always_comb begin
    lb_we    = '0;
    lb_waddr = recv_addr[LAW-1:0];
    for (int r = 0; r < RS; r++) lb_wdata[r] = (r < CS) ? in_lane[r % CS] : 8'd0;
    if (host_left) begin
      lb_we    = RS'(1) << hreq.lane;
      lb_waddr = hreq.addr[LAW-1:0];
      for (int r = 0; r < RS; r++) lb_wdata[r] = hreq.wdata[7:0];
    end else if (recv_we && cur.to_left) begin
      lb_we = '1;
    end
  end

  rift_buf #(.LANES(RS), .W(8), .DEPTH(LBD)) u_left (
    .clk, .rst_n, .we(lb_we), .waddr(lb_waddr), .wdata(lb_wdata),
    .raddr_a(rd_addr[LAW-1:0]), .rdata_a(lb_rd),
    .raddr_b(hreq.addr[LAW-1:0]), .rdata_b(lb_hrd)
  );

  // ---------------- feed schedulers and PE array ----------------
  logic [7:0] west_raw [RS], west_sk [RS];
  logic [7:0] north_raw [CS], north_sk [CS];
  data_t      west_in [RS], north_in [CS];
  acc_t       mse_out [CS];
  logic [31:0] mse_out_u [CS], deskew_u [CS];
  logic [CS-1:0] out_root;

  always_comb begin
    for (int r = 0; r < RS; r++) west_raw[r] = feed_valid ? lb_rd[r] : 8'd0;
    for (int j = 0; j < CS; j++) north_raw[j] = feed_valid ? tb_rd[j] : 8'd0;
  end

  rift_feed_sched #(.N(RS), .W(8), .DESKEW(1'b0)) u_feed_w (
    .clk, .rst_n, .din(west_raw), .dout(west_sk)
  );
  rift_feed_sched #(.N(CS), .W(8), .DESKEW(1'b0)) u_feed_n (
    .clk, .rst_n, .din(north_raw), .dout(north_sk)
  );

  always_comb begin
    for (int r = 0; r < RS; r++) west_in[r] = data_t'(west_sk[r]);
    for (int j = 0; j < CS; j++)
      north_in[j] = (cur.mode == M_OS) ? data_t'(north_sk[j]) : data_t'(north_raw[j]);
  end

  rift_mse #(.RS(RS), .CS(CS)) u_mse (
    .clk, .rst_n, .mode(cur.mode), .ctl(mse_ctl), .elt_mul(cur.elt_mul),
    .radt_mask(cur.aux[CS-1:0]), .radt_join(cur.aux[CS +: LV*CS]),
    .west_in, .north_in, .bcast_in(data_t'(west_raw[0])),
    .out(mse_out), .out_root
  );

  always_comb
    for (int j = 0; j < CS; j++) mse_out_u[j] = mse_out[j];

  rift_feed_sched #(.N(CS), .W(32), .DESKEW(1'b1)) u_feed_out (
    .clk, .rst_n, .din(mse_out_u), .dout(deskew_u)
  );

  // ---------------- centre buffer ----------------
  logic [31:0] res_row [CS];
  logic [31:0] cb_rd [CS], cb_hrd [CS];
  logic [CS-1:0] cb_we;

  always_comb begin
    for (int j = 0; j < CS; j++) res_row[j] = (cur.mode == M_WS) ? deskew_u[j] : mse_out_u[j];
    cb_we = (wb_en && cur.mode != M_POST) ? '1 : '0;
  end

  rift_buf #(.LANES(CS), .W(32), .DEPTH(CBD)) u_center (
    .clk, .rst_n, .we(cb_we), .waddr(wb_addr[CAW-1:0]), .wdata(res_row),
    .raddr_a(rd_addr[CAW-1:0]), .rdata_a(cb_rd),
    .raddr_b(hreq.addr[CAW-1:0]), .rdata_b(cb_hrd)
  );

  // ---------------- two-stage top-k and sparse queue buffer ----------------
  cand_t tk_in [CS], tk_sorted [CS];
  logic  tk_sorted_v;

  always_comb begin
    for (int j = 0; j < CS; j++) begin
      tk_in[j].valid = (cur.mode != M_RADT) || out_root[j];
      tk_in[j].score = acc_t'(res_row[j]);
      tk_in[j].idx   = 16'(32'(wb_row) * CS + j);
    end
  end

  rift_topk_sorter #(.CS(CS)) u_sorter (
    .clk, .rst_n, .in_valid(tk_in_valid), .in(tk_in),
    .out_valid(tk_sorted_v), .out(tk_sorted)
  );

  rift_topk_merge #(.CS(CS), .KMAX(KMAX)) u_merge (
    .clk, .rst_n, .clear(tk_clear), .in_valid(tk_sorted_v), .in(tk_sorted),
    .list(tk_list)
  );

  // The host may also clear the SQB and push its own indices (a gather
  // list such as a graph's neighbour list); a top-k push wins a collision.
  logic        host_sqb_clr, host_sqb_push, sqb_clr_m, sqb_push_m;
  logic [15:0] sqb_din_m;
  assign host_sqb_clr  = hreq.we && hreq.region == REG_SQB && hreq.addr == 16'd0;
  assign host_sqb_push = hreq.we && hreq.region == REG_SQB && hreq.addr == 16'd1;
  assign sqb_clr_m     = sqb_clear || host_sqb_clr;
  assign sqb_push_m    = sqb_push || host_sqb_push;
  assign sqb_din_m     = sqb_push ? sqb_din : hreq.wdata[15:0];

  rift_sqb #(.DEPTH(SQBD), .IW(16)) u_sqb (
    .clk, .rst_n, .clear(sqb_clr_m), .rewind(sqb_rewind), .push(sqb_push_m),
    .din(sqb_din_m), .pop(sqb_pop), .head(sqb_head), .empty(sqb_empty),
    .full(sqb_full), .count(sqb_count), .total(sqb_total)
  );

  // ---------------- norm, activation, bottom buffer ----------------
  acc_t  nrm_in [CS], nrm_out [CS];
  data_t act_out [CS];
  logic [7:0] bb_wdata [CS], bb_rd [CS], bb_hrd [CS];
  logic [CS-1:0] bb_we;

  always_comb
    for (int j = 0; j < CS; j++) nrm_in[j] = acc_t'(cb_rd[j]);

  rift_norm #(.CS(CS)) u_norm (
    .mode(cur.norm), .gamma(cur.aux[7:0]), .beta(cur.aux[31:8]),
    .x(nrm_in), .y(nrm_out)
  );

  rift_act #(.CS(CS)) u_act (
    .mode(cur.act), .shift(cur.shift), .x(nrm_out), .y(act_out)
  );

  always_comb begin
    for (int j = 0; j < CS; j++) begin
      bb_wdata[j] = act_out[j];
      out_data[j*8 +: 8] = act_out[j];
    end
    bb_we = (wb_en && cur.mode == M_POST) ? '1 : '0;
  end

  rift_buf #(.LANES(CS), .W(8), .DEPTH(BBD)) u_bottom (
    .clk, .rst_n, .we(bb_we), .waddr(wb_addr[BAW-1:0]), .wdata(bb_wdata),
    .raddr_a(rd_addr[BAW-1:0]), .rdata_a(bb_rd),
    .raddr_b(hreq.addr[BAW-1:0]), .rdata_b(bb_hrd)
  );

  // ---------------- host read-back ----------------
  logic [3:0] h_region_q, h_lane_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_region_q <= '0;
      h_lane_q   <= '0;
    end else if (hreq.re) begin
      h_region_q <= hreq.region;
      h_lane_q   <= hreq.lane;
    end
  end

  always_comb begin
    unique case (h_region_q)
      REG_TOP:    hrdata = 32'(signed'(tb_hrd[h_lane_q[$clog2(CS)-1:0]]));
      REG_LEFT:   hrdata = 32'(signed'(lb_hrd[h_lane_q[$clog2(RS)-1:0]]));
      REG_CENTER: hrdata = cb_hrd[h_lane_q[$clog2(CS)-1:0]];
      REG_BOTTOM: hrdata = 32'(signed'(bb_hrd[h_lane_q[$clog2(CS)-1:0]]));
      REG_SQB:    hrdata = 32'(sqb_total);
      default:    hrdata = '0;
    endcase
  end

endmodule

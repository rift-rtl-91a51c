// rift_idex: instruction decode / execute unit of one RPU.
//
// Takes one block descriptor (rift_pkg::instr_t) at a time from the RPU's
// block queue and runs it: the mode ID selects the PE-array dataflow, len is
// the loop bound, src/dst the buffer base addresses, and the RADT routing
// mask travels in aux. Switching mode between blocks only drains the
// pipeline and reloads these registers; nothing is reconfigured.
//
// Phases of a block:
//   CLR    clear the array's partial sums; clear the top-k list and the
//          sparse queue buffer (SQB) if the block prunes; rewind the SQB if
//          the block reads through it; a block marked len_sqb (a template
//          for a layer whose size is known only at run time) takes its loop
//          bound from the number of indices the last top-k pass kept
//   ISSUE  one row read per cycle: address src+i, or (use_sqb) the next
//          kept index popped from the SQB, or src+len-1-i for weight loads;
//          a read stalls while the SQB is empty, while the upstream
//          inter-RPU buffer is empty (RECV) or while the downstream one has
//          no room for the rows in flight (POST with fwd)
//   WAIT   let the last row leave the pipeline (per-mode latency LAT below)
//   DRAIN  output stationary only: shift RS result rows out of the array
//   TKWAIT/TOPK  wait for the sorter and merge stages, then push the first
//          k kept indices into the SQB
//   DONE   report the block's tag to the dispatcher
// A write-back pipeline carries each issued row's destination to the cycle
// its result is ready: LAT = RS+CS (WS, with input skew and output
// de-skew), RS+1 (RADT), 2 (SIMDE, SIMD1 whose single result row is written
// after the last step), 1 (POST; LOADW, which writes nothing back). The phases, latencies and descriptor
// format are this implementation's; the role of the unit (mode ID, routing
// masks, loop bounds kept in small control registers) follows the
// architecture.
module rift_idex
  import rift_pkg::*;
#(
  parameter int RS   = 4,
  parameter int CS   = 4,
  parameter int KMAX = 8,
  parameter int OFD  = 8,   // depth of the downstream inter-RPU buffer
  localparam int OCW = $clog2(OFD) + 1,
  localparam int PL  = RS + CS + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // block queue
  input  logic        q_empty,
  input  instr_t      q_head,
  output logic        q_pop,
  // status
  output instr_t      cur,
  output logic        busy,
  output logic        done,
  output logic [7:0]  done_tag,
  output logic        stall,
  // PE array
  output mse_ctl_e    mse_ctl,
  // engine reads of the buffers
  output logic        rd_en,
  output logic [15:0] rd_addr,
  output logic        feed_valid,
  // write-back of result rows
  output logic        wb_en,
  output logic [15:0] wb_addr,
  output logic [15:0] wb_row,
  // sparse queue buffer
  input  logic        sqb_empty,
  input  logic [15:0] sqb_head,
  input  logic [15:0] sqb_total,
  output logic        sqb_pop,
  output logic        sqb_clear,
  output logic        sqb_rewind,
  output logic        sqb_push,
  output logic [15:0] sqb_din,
  // top-k
  output logic        tk_clear,
  output logic        tk_in_valid,
  input  cand_t       tk_list [KMAX],
  // inter-RPU buffers
  input  logic        in_empty,
  output logic        in_pop,
  output logic        recv_we,
  output logic [15:0] recv_addr,
  input  logic [OCW-1:0] out_count,
  output logic        out_push
);
  typedef enum logic [2:0] {
    S_IDLE, S_CLR, S_ISSUE, S_WAIT, S_DRAIN, S_TKWAIT, S_TOPK, S_DONE
  } state_e;

  state_e      st;
  logic [15:0] i, cnt;
  logic        pv [PL];    // write-back pipeline: valid
  logic [15:0] pr [PL];    // write-back pipeline: row number
  logic        fv_q;
  int          lat;
  logic        can_issue, issue_now, wb_here, last_issue;
  logic [15:0] eff_len;

  assign eff_len = cur.len_sqb ? sqb_total : cur.len;

  always_comb begin
    unique case (cur.mode)
      M_WS:             lat = RS + CS;
      M_RADT:           lat = RS + 1;
      M_SIMDE, M_SIMD1: lat = 2;
      M_POST, M_LOADW:  lat = 1;
      default:          lat = 0;
    endcase
  end

  // Issue conditions
  always_comb begin
    can_issue = 1'b1;
    if ((cur.mode == M_SIMD1 || cur.mode == M_RADT) && cur.use_sqb && sqb_empty)
      can_issue = 1'b0;
    if (cur.mode == M_RECV && in_empty)
      can_issue = 1'b0;
    if (cur.mode == M_POST && cur.fwd &&
        (32'(out_count) + 32'(pv[0]) >= OFD))
      can_issue = 1'b0;
  end

  assign issue_now  = (st == S_ISSUE) && can_issue;
  assign last_issue = issue_now && (i == cur.len - 16'd1);
  assign stall      = (st == S_ISSUE) && !can_issue;
  assign busy       = (st != S_IDLE);

  // Read address
  always_comb begin
    if (cur.mode == M_LOADW)                                        rd_addr = cur.src + cur.len - 16'd1 - i;
    else if ((cur.mode == M_SIMD1 || cur.mode == M_RADT) && cur.use_sqb) rd_addr = sqb_head;
    else                                                            rd_addr = cur.src + i;
  end
  assign rd_en      = issue_now && (cur.mode != M_RECV);
  assign sqb_pop    = issue_now && cur.use_sqb && (cur.mode == M_SIMD1 || cur.mode == M_RADT);
  assign in_pop     = issue_now && (cur.mode == M_RECV);
  assign recv_we    = in_pop;
  assign recv_addr  = cur.src + i;
  assign feed_valid = fv_q;

  // Write-back pipeline: entry enters at issue, leaves at stage lat-1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fv_q <= 1'b0;
      for (int s = 0; s < PL; s++) begin
        pv[s] <= 1'b0;
        pr[s] <= '0;
      end
    end else begin
      fv_q  <= rd_en;
      pv[0] <= issue_now && (cur.mode != M_SIMD1 || last_issue) &&
               (cur.mode inside {M_WS, M_RADT, M_SIMDE, M_SIMD1, M_POST});
      pr[0] <= (cur.mode == M_SIMD1) ? 16'd0 : i;
      for (int s = 1; s < PL; s++) begin
        pv[s] <= pv[s-1];
        pr[s] <= pr[s-1];
      end
    end
  end

  always_comb begin
    wb_here = 1'b0;
    wb_row  = '0;
    if (st == S_DRAIN) begin
      wb_here = 1'b1;
      wb_row  = cnt;
    end else if (lat > 0) begin
      wb_here = pv[lat-1];
      wb_row  = pr[lat-1];
    end
  end
  assign wb_en       = wb_here;
  assign wb_addr     = cur.dst + wb_row;
  assign out_push    = wb_here && (cur.mode == M_POST) && cur.fwd;
  assign tk_in_valid = wb_here && cur.topk_en && (cur.mode != M_POST);

  // PE-array control
  always_comb begin
    mse_ctl = CTL_HOLD;
    unique case (st)
      S_CLR:   mse_ctl = CTL_CLR;
      S_DRAIN: mse_ctl = CTL_DRAIN;
      S_ISSUE, S_WAIT: begin
        if (cur.mode == M_LOADW || cur.mode == M_SIMD1)
          mse_ctl = fv_q ? CTL_RUN : CTL_HOLD;
        else if (cur.mode inside {M_WS, M_OS, M_SIMDE, M_RADT})
          mse_ctl = CTL_RUN;
      end
      default: ;
    endcase
  end

  assign q_pop      = (st == S_IDLE) && !q_empty;
  assign tk_clear   = (st == S_CLR) && cur.topk_en;
  assign sqb_clear  = (st == S_CLR) && cur.topk_en;
  assign sqb_rewind = (st == S_CLR) && cur.use_sqb;
  assign sqb_push   = (st == S_TOPK) && (32'(cnt) < 32'(cur.k)) && (32'(cnt) < KMAX) &&
                      tk_list[(32'(cnt) < KMAX) ? cnt[$clog2(KMAX)-1:0] : '0].valid;
  assign sqb_din    = tk_list[(32'(cnt) < KMAX) ? cnt[$clog2(KMAX)-1:0] : '0].idx;
  assign done       = (st == S_DONE);
  assign done_tag   = cur.tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      cur <= '0;
      i   <= '0;
      cnt <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (!q_empty) begin
          cur <= q_head;
          st  <= S_CLR;
        end
        S_CLR: begin
          i  <= '0;
          if (cur.len_sqb) cur.len <= sqb_total;
          st <= (eff_len == 16'd0 || cur.mode == M_NOP) ? S_DONE : S_ISSUE;
        end
        S_ISSUE: if (issue_now) begin
          i <= i + 16'd1;
          if (last_issue) begin
            if (cur.mode == M_OS) begin
              cnt <= 16'(RS + CS - 2);
              st  <= S_WAIT;
            end else if (lat > 0) begin
              cnt <= 16'(lat - 1);
              st  <= S_WAIT;
            end else begin
              st  <= S_DONE;
            end
          end
        end
        S_WAIT: begin
          if (cnt != 16'd0) cnt <= cnt - 16'd1;
          else if (cur.mode == M_OS) begin
            cnt <= 16'(RS - 1);
            st  <= S_DRAIN;
          end else if (cur.topk_en && cur.mode != M_POST) begin
            cnt <= 16'(CS - 1);
            st  <= S_TKWAIT;
          end else st <= S_DONE;
        end
        S_DRAIN: begin
          if (cnt != 16'd0) cnt <= cnt - 16'd1;
          else if (cur.topk_en) begin
            cnt <= 16'(CS - 1);
            st  <= S_TKWAIT;
          end else st <= S_DONE;
        end
        S_TKWAIT: begin
          if (cnt != 16'd0) cnt <= cnt - 16'd1;
          else st <= S_TOPK;
        end
        S_TOPK: begin
          if (32'(cnt) + 1 >= 32'(cur.k) || 32'(cnt) + 1 >= KMAX) st <= S_DONE;
          cnt <= cnt + 16'd1;
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule

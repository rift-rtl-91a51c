// tb_rift_top: end-to-end run of the whole accelerator at its default size
// (2 x 2 RPUs, 4 x 4 PE arrays), everything driven through the host bus.
// Phase 1 (16 blocks, one dependency DAG):
//   RPU0  rows arrive on the up stream into the left buffer (RECV); weights
//         are loaded (LOADW); a WS product computes token scores that the
//         in-stream top-k prunes to 4 tokens; a 1 x CS SIMD block
//         accumulates over the kept tokens only (SQB-gated reads); a POST
//         block turns the result into a softmax row and forwards it to RPU2.
//   RPU1  an OS product, then layer norm (gamma 2, beta 4) + GELU forwarded to RPU3, plus three
//         independent element-wise blocks that overfill its block queue
//         (dispatcher backpressure) and overlap with RPU0's work.
//   RPU2  waits (dependency) for RPU0's row, loads it as weights, scales two
//         rows element-wise and sends them out on the down stream.
//   RPU3  waits for RPU1's rows and receives them.
// Phase 2 (a new table): RPU3 loads weights and reduces its rows with a
// 2 x (2-1) routable adder tree; results leave on the down stream.
// All values are checked against references computed here. Counted
// mechanisms, each of which must occur: every mode ID, mode switches,
// RPU stalls (empty/full inter-RPU buffers), dispatcher backpressure, top-k
// pruning, SQB-gated reads, and two or more RPUs busy at once.
module tb_rift_top;
  import rift_pkg::*;
  localparam int CS = 4, RS = 4, GC = 2, NR = 4;
  logic clk = 0, rst_n = 1;
  logic host_valid, host_we, host_rvalid;
  logic [31:0] host_addr, host_wdata, host_rdata;
  logic [CS*8-1:0] up_data [GC], dn_data [GC];
  logic [GC-1:0] up_empty, up_pop, dn_empty, dn_pop;
  logic busy;
  logic [15:0] done_mask;
  logic [NR-1:0] rpu_busy, rpu_stall;
  mode_e rpu_mode [NR];
  int checks = 0, failures = 0;

  rift_top dut (.clk, .rst_n, .host_valid, .host_we, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .up_data, .up_empty, .up_pop, .dn_data, .dn_empty, .dn_pop, .busy, .done_mask,
    .rpu_busy, .rpu_stall, .rpu_mode);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // ---------------- host bus ----------------
  task automatic hw(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    host_valid = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_valid = 0; host_we = 0;
  endtask

  task automatic hr(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    host_valid = 1; host_we = 0; host_addr = a;
    @(negedge clk);
    host_valid = 0;
    d = host_rdata;
  endtask

  function automatic logic [31:0] ba(input int rpu, input logic [3:0] region, input int lane, input int addr);
    return {4'(rpu), region, 4'(lane), 4'h0, 16'(addr)};
  endfunction

  task automatic put_block(input int idx, input int rpu, input logic [15:0] deps, input instr_t i);
    logic [127:0] b;
    b = i;
    for (int w = 0; w < 4; w++) hw({4'hF, 20'd0, 8'(w)}, b[w*32 +: 32]);
    hw({4'hF, 20'd0, 8'd4}, {4'd0, 4'(rpu), 8'd0, deps});
    hw({4'hF, 20'd0, 8'd5}, 32'(idx));
  endtask

  function automatic instr_t mk(input mode_e m, input int len, input int src, input int dst);
    instr_t i;
    i = '0;
    i.mode = m; i.len = 16'(len); i.src = 16'(src); i.dst = 16'(dst);
    return i;
  endfunction

  // ---------------- reference arithmetic ----------------
  function automatic int sat(input longint v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return int'(v);
  endfunction

  function automatic int gelu(input int v);
    if (v <= -48) return 0;
    if (v >= 48) return v;
    return (v * (v + 48)) / 96;
  endfunction

  // ---------------- streams and mechanism counters ----------------
  logic [CS*8-1:0] upq [$];
  logic [CS*8-1:0] dnq [GC][$];
  int n_stall = 0, n_overlap = 0, n_backpressure = 0, n_switch = 0, n_prune = 0, n_sqb_read = 0;
  int mode_seen [16];
  mode_e last_mode [NR];
  logic gap;

  assign up_data[0] = (upq.size() > 0) ? upq[0] : '0;
  assign up_data[1] = '0;
  assign up_empty   = {1'b1, (upq.size() == 0) || gap};
  assign dn_pop     = ~dn_empty;

  always @(posedge clk) begin
    int nb;
    gap <= ($urandom_range(0, 1) == 0);
    if (up_pop[0]) void'(upq.pop_front());
    for (int c = 0; c < GC; c++) if (dn_pop[c]) dnq[c].push_back(dn_data[c]);
    nb = 0;
    for (int n = 0; n < NR; n++) begin
      if (rpu_busy[n]) begin
        nb++;
        mode_seen[rpu_mode[n]]++;
        if (rpu_mode[n] != last_mode[n]) n_switch++;
        last_mode[n] = rpu_mode[n];
      end
      if (rpu_stall[n]) n_stall++;
    end
    if (nb >= 2) n_overlap++;
    if (dut.u_disp.found == 1'b0 && (|(dut.iq_full)) && busy) n_backpressure++;
    if (dut.g_rpu[0].u_rpu.sqb_push) n_prune++;
    if (dut.g_rpu[0].u_rpu.sqb_pop) n_sqb_read++;
  end

  // ---------------- test data ----------------
  data_t A0 [24][RS];    // RPU0 left rows (0..5 arrive on the up stream)
  data_t W0 [RS][CS];    // RPU0 top bank 0 rows 0..3
  data_t T0 [24][CS];    // RPU0 top bank 1 rows 0..23
  data_t L1 [8][RS];     // RPU1 left rows 0..4 (P transposed)
  data_t Q1 [16][CS];    // RPU1 top bank 0 rows 0..4 (Q), 8..13 (filler)
  data_t X2 [3][CS];     // RPU2 top bank 0 rows 1..2
  data_t WR3 [CS];       // RPU3 top bank 0 row 10 (tree weights)

  initial begin
    logic [31:0] d;
    int t0, t1;
    cand_t cands [$];
    int kept [4];
    longint simd [CS];
    int sm [CS];
    int g1 [RS][CS];
    int dn0_ref [2][CS];
    int dn1_ref [RS][CS];
    instr_t i;

    host_valid = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    for (int n = 0; n < NR; n++) last_mode[n] = M_NOP;
    for (int m = 0; m < 16; m++) mode_seen[m] = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;

    // ---- data, host loads ----
    for (int a = 0; a < 24; a++) for (int r = 0; r < RS; r++) A0[a][r] = data_t'($urandom_range(0, 60)) - 30;
    for (int r = 0; r < RS; r++) for (int j = 0; j < CS; j++) W0[r][j] = data_t'($urandom_range(0, 60)) - 30;
    for (int a = 0; a < 24; a++) for (int j = 0; j < CS; j++) T0[a][j] = data_t'($urandom_range(0, 20)) - 10;
    for (int a = 0; a < 8; a++) for (int r = 0; r < RS; r++) L1[a][r] = data_t'($urandom);
    for (int a = 0; a < 16; a++) for (int j = 0; j < CS; j++) Q1[a][j] = data_t'($urandom);
    for (int a = 1; a < 3; a++) for (int j = 0; j < CS; j++) X2[a][j] = data_t'($urandom);
    for (int j = 0; j < CS; j++) WR3[j] = data_t'($urandom);

    for (int r = 0; r < RS; r++) for (int j = 0; j < CS; j++) hw(ba(0, REG_TOP, j, r), 32'(W0[r][j]));
    for (int a = 0; a < 24; a++) for (int j = 0; j < CS; j++) hw(ba(0, REG_TOP, j, 64 + a), 32'(T0[a][j]));
    for (int a = 6; a < 24; a++) for (int r = 0; r < RS; r++) hw(ba(0, REG_LEFT, r, a), 32'(A0[a][r]));
    for (int a = 0; a < 5; a++) for (int r = 0; r < RS; r++) hw(ba(1, REG_LEFT, r, a), 32'(L1[a][r]));
    for (int a = 0; a < 14; a++) for (int j = 0; j < CS; j++) hw(ba(1, REG_TOP, j, a), 32'(Q1[a][j]));
    for (int a = 1; a < 3; a++) for (int j = 0; j < CS; j++) hw(ba(2, REG_TOP, j, a), 32'(X2[a][j]));
    for (int j = 0; j < CS; j++) hw(ba(3, REG_TOP, j, 10), 32'(WR3[j]));
    for (int a = 0; a < 6; a++) begin
      logic [CS*8-1:0] row;
      for (int r = 0; r < RS; r++) row[r*8 +: 8] = A0[a][r];
      upq.push_back(row);
    end

    // ---- phase 1 table ----
    i = mk(M_RECV, 6, 0, 0); i.to_left = 1;                 put_block(0, 0, 16'h0000, i);
    i = mk(M_LOADW, RS, 0, 0);                               put_block(1, 0, 16'h0000, i);
    i = mk(M_WS, 6, 0, 0); i.topk_en = 1; i.k = 4;           put_block(2, 0, 16'h0000, i);
    i = mk(M_SIMD1, 0, 0, 10); i.use_sqb = 1; i.tbank = 1; i.len_sqb = 1;
                                                             put_block(3, 0, 16'h0000, i);
    i = mk(M_POST, 1, 10, 0); i.act = A_SOFTMAX; i.shift = 5'd4; i.fwd = 1;
                                                             put_block(4, 0, 16'h0000, i);
    i = mk(M_OS, 5, 0, 0);                                   put_block(5, 1, 16'h0000, i);
    i = mk(M_POST, RS, 0, 0); i.norm = N_LAYER; i.act = A_GELU; i.shift = 5'd0; i.fwd = 1;
    i.aux = {24'sd4, 8'sd2};                               put_block(6, 1, 16'h0000, i);
    for (int f = 0; f < 3; f++) begin
      i = mk(M_SIMDE, 2, 8 + 2 * f, 20 + 2 * f);             put_block(7 + f, 1, 16'h0000, i);
    end
    i = mk(M_RECV, 1, 0, 0);                                 put_block(10, 2, 16'h0010, i);
    i = mk(M_LOADW, 1, 0, 0);                                put_block(11, 2, 16'h0000, i);
    i = mk(M_SIMDE, 2, 1, 0); i.elt_mul = 1;                 put_block(12, 2, 16'h0000, i);
    i = mk(M_POST, 2, 0, 0); i.fwd = 1;                      put_block(13, 2, 16'h0000, i);
    i = mk(M_RECV, RS, 0, 0);                                put_block(14, 3, 16'h0040, i);
    i = mk(M_NOP, 0, 0, 0);                                  put_block(15, 3, 16'h4000, i);

    t0 = $time;
    hw({4'hF, 20'd0, 8'd6}, 32'd16);
    do hr({4'hF, 20'd0, 8'd8}, d); while (d[31]);
    t1 = $time;
    chk(d[15:0] == 16'hFFFF, "phase 1: all blocks completed");
    $display("top: phase 1 (16 blocks on 4 RPUs) took %0d cycles", (t1 - t0) / 10);

    // ---- references for phase 1 ----
    for (int t = 0; t < 6; t++)
      for (int j = 0; j < CS; j++) begin
        cand_t c;
        acc_t s;
        s = 0;
        for (int r = 0; r < RS; r++) s += acc_t'(A0[t][r]) * acc_t'(W0[r][j]);
        c.valid = 1; c.score = s; c.idx = 16'(t * CS + j);
        cands.push_back(c);
        hr(ba(0, REG_CENTER, j, t), d);
        chk(acc_t'(d) == s, "RPU0 WS scores");
      end
    for (int a = 0; a < cands.size(); a++)
      for (int b = a + 1; b < cands.size(); b++)
        if (cand_before(cands[b], cands[a])) begin cand_t x; x = cands[a]; cands[a] = cands[b]; cands[b] = x; end
    for (int n = 0; n < 4; n++) kept[n] = cands[n].idx;
    for (int j = 0; j < CS; j++) begin
      simd[j] = 0;
      for (int n = 0; n < 4; n++) simd[j] += longint'(A0[kept[n]][0]) * longint'(T0[kept[n]][j]);
      hr(ba(0, REG_CENTER, j, 10), d);
      chk(acc_t'(d) == acc_t'(simd[j]), "RPU0 SIMD1 over kept tokens");
    end
    // softmax reference: q = sat8(x >> 4); p_j = 2^-floor((max-q_j)*23/256), out = floor(127 p_j / sum p)
    begin
      int q [CS];
      int mx;
      real p [CS];
      real s;
      for (int j = 0; j < CS; j++) q[j] = sat(simd[j] >>> 4);
      mx = q[0];
      for (int j = 1; j < CS; j++) if (q[j] > mx) mx = q[j];
      s = 0;
      for (int j = 0; j < CS; j++) begin
        int e;
        e = ((mx - q[j]) * 23) / 256;
        p[j] = (e >= 16) ? 0.0 : 1.0 / (2.0 ** e);
        s += p[j];
      end
      for (int j = 0; j < CS; j++) sm[j] = int'($floor(127.0 * p[j] / s));
    end
    for (int j = 0; j < CS; j++) begin
      hr(ba(2, REG_TOP, j, 0), d);
      chk(int'(data_t'(d[7:0])) == sm[j], "RPU2 received softmax row");
    end
    for (int a = 1; a < 3; a++)
      for (int j = 0; j < CS; j++) dn0_ref[a-1][j] = sat(X2[a][j] * sm[j]);
    // RPU1: OS product, layer norm (gamma 2, beta 4), GELU
    for (int r = 0; r < RS; r++) begin
      longint c [CS];
      longint s;
      acc_t mean;
      longint sd;
      s = 0;
      for (int j = 0; j < CS; j++) begin
        c[j] = 0;
        for (int k = 0; k < 5; k++) c[j] += longint'(L1[k][r]) * longint'(Q1[k][j]);
        s += c[j];
        hr(ba(1, REG_CENTER, j, r), d);
        chk(acc_t'(d) == acc_t'(c[j]), "RPU1 OS product");
      end
      mean = acc_t'(s / CS);
      begin
        longint v;
        v = 0;
        for (int j = 0; j < CS; j++) v += (c[j] - mean) * (c[j] - mean);
        v = v / CS;
        sd = 1;
        while ((sd + 1) * (sd + 1) <= v) sd++;
      end
      for (int j = 0; j < CS; j++) begin
        g1[r][j] = gelu(sat(((c[j] - mean) * 16 * 2) / sd + 4));
        hr(ba(3, REG_TOP, j, r), d);
        chk(int'(data_t'(d[7:0])) == g1[r][j], "RPU3 received layer-norm + GELU rows");
      end
    end
    for (int f = 0; f < 6; f++)
      for (int j = 0; j < CS; j++) begin
        hr(ba(1, REG_CENTER, j, 20 + f), d);
        chk(acc_t'(d) == acc_t'(Q1[8 + f][j]), "RPU1 element-wise blocks");
      end

    // ---- phase 2: RPU3 routable adder tree 2 x (2-1) ----
    i = mk(M_LOADW, 1, 10, 0);                               put_block(0, 3, 16'h0000, i);
    i = mk(M_RADT, RS, 0, 0); i.aux[CS-1:0] = 4'b1111; i.aux[CS +: 8] = 8'b0000_0101;
                                                             put_block(1, 3, 16'h0001, i);
    i = mk(M_POST, RS, 0, 0); i.shift = 5'd6; i.fwd = 1;     put_block(2, 3, 16'h0002, i);
    hw({4'hF, 20'd0, 8'd6}, 32'd3);
    do hr({4'hF, 20'd0, 8'd8}, d); while (d[31]);
    chk(d[2:0] == 3'b111, "phase 2: all blocks completed");
    for (int r = 0; r < RS; r++) begin
      dn1_ref[r][0] = sat((g1[r][0] * WR3[0] + g1[r][1] * WR3[1]) >>> 6);
      dn1_ref[r][1] = 0;
      dn1_ref[r][2] = sat((g1[r][2] * WR3[2] + g1[r][3] * WR3[3]) >>> 6);
      dn1_ref[r][3] = 0;
    end
    repeat (5) @(negedge clk);

    // ---- down streams ----
    chk(dnq[0].size() == 2, "down stream 0 row count");
    chk(dnq[1].size() == RS, "down stream 1 row count");
    for (int a = 0; a < 2 && a < dnq[0].size(); a++)
      for (int j = 0; j < CS; j++) chk(int'(data_t'(dnq[0][a][j*8 +: 8])) == dn0_ref[a][j], "RPU2 output rows");
    for (int a = 0; a < RS && a < dnq[1].size(); a++)
      for (int j = 0; j < CS; j++) chk(int'(data_t'(dnq[1][a][j*8 +: 8])) == dn1_ref[a][j], "RPU3 tree output rows");

    // ---- mechanisms ----
    $display("top: stalls=%0d overlap=%0d backpressure=%0d mode_switches=%0d pruned_pushes=%0d sqb_reads=%0d",
             n_stall, n_overlap, n_backpressure, n_switch, n_prune, n_sqb_read);
    for (int m = 1; m <= 8; m++) begin
      $display("top: mode %s busy cycles=%0d", mode_e'(m), mode_seen[m]);
      chk(mode_seen[m] > 0, "every mode used");
    end
    chk(n_stall > 0, "RPU stall");
    chk(n_overlap > 0, "RPUs overlapped");
    chk(n_backpressure > 0, "dispatcher backpressure");
    chk(n_switch > 0, "mode switch");
    chk(n_prune == 4, "top-k pushed k indices");
    chk(n_sqb_read == 4, "SQB-gated reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

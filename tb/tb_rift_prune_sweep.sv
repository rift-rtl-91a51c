// tb_rift_prune_sweep: token-pruning sweep on the whole accelerator at its
// default size (2 x 2 RPUs, 4 x 4 PE arrays), driven only through the host
// bus. It is the attention step of a pruned vision transformer, at the
// scale of one tile. Four heads run at the same time, one per RPU. Each head
// runs four blocks:
//   LOADW  a 4 x 4 key tile into the weight registers;
//   WS     two query rows against it: 8 token scores, and the in-stream
//          top-k keeps k of them in the SQB;
//   SIMD1  sums attention weight x value row over the kept tokens only,
//          reading through the SQB. Its length is taken from the number
//          of indices kept, so the descriptor is a template;
//   POST   requantises the sum (shift 4) into the bottom buffer.
// The sweep drops a fraction p of the 8 tokens: p = 0 (dense), 0.1, 0.2
// and 0.3, so k = 8 - ceil(8p) = 8, 7, 6, 5. Every score, sum and output
// is checked against a reference computed here. The number of SQB pushes
// must equal k. The cycles an RPU spends in SIMD1 mode must shrink by
// exactly one for every token dropped, which shows that pruned tokens
// cost no compute.
module tb_rift_prune_sweep;
  import rift_pkg::*;
  localparam int CS = 4, RS = 4, GC = 2, NR = 4, NT = 8;
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

  assign up_data  = '{default: '0};
  assign up_empty = '1;
  assign dn_pop   = '0;

  initial begin
    #3000000;
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

  task automatic put_block(input int idx, input int rpu, input instr_t i);
    logic [127:0] b;
    b = i;
    for (int w = 0; w < 4; w++) hw({HOST_UNIT_CTRL, 20'd0, 8'(w)}, b[w*32 +: 32]);
    hw({HOST_UNIT_CTRL, 20'd0, 8'd4}, {4'd0, 4'(rpu), 24'd0});
    hw({HOST_UNIT_CTRL, 20'd0, 8'd5}, 32'(idx));
  endtask

  function automatic instr_t mk(input mode_e m, input int len, input int src, input int dst);
    instr_t i;
    i = '0;
    i.mode = m; i.len = 16'(len); i.src = 16'(src); i.dst = 16'(dst);
    return i;
  endfunction

  function automatic int sat(input longint v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return int'(v);
  endfunction

  // per-RPU counters, cleared before each run
  int simd_cycles [NR];
  int pushes [NR];
  logic count_en = 0;
  always @(posedge clk) if (count_en)
    for (int n = 0; n < NR; n++) begin
      if (rpu_busy[n] && rpu_mode[n] == M_SIMD1) simd_cycles[n]++;
    end
  always @(posedge clk) if (count_en) begin
    if (dut.g_rpu[0].u_rpu.sqb_push) pushes[0]++;
    if (dut.g_rpu[1].u_rpu.sqb_push) pushes[1]++;
    if (dut.g_rpu[2].u_rpu.sqb_push) pushes[2]++;
    if (dut.g_rpu[3].u_rpu.sqb_push) pushes[3]++;
  end

  data_t K [NR][RS][CS];     // key tile, top bank 0 rows 0..3
  data_t Q [NR][2][RS];      // query rows, left rows 32..33
  data_t A [NR][NT];         // attention weight per token, left lane 0 rows 0..7
  data_t V [NR][NT][CS];     // value rows, top bank 1 rows 0..7

  initial begin
    logic [31:0] d;
    int dense_cycles [NR];
    int ps [4] = '{0, 10, 20, 30};   // p in percent

    host_valid = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;

    for (int h = 0; h < NR; h++) begin
      for (int r = 0; r < RS; r++) for (int j = 0; j < CS; j++) K[h][r][j] = data_t'($urandom_range(0, 60)) - 30;
      for (int t = 0; t < 2; t++) for (int r = 0; r < RS; r++) Q[h][t][r] = data_t'($urandom_range(0, 60)) - 30;
      for (int t = 0; t < NT; t++) A[h][t] = data_t'($urandom_range(0, 40)) - 20;
      for (int t = 0; t < NT; t++) for (int j = 0; j < CS; j++) V[h][t][j] = data_t'($urandom_range(0, 40)) - 20;
      for (int r = 0; r < RS; r++) for (int j = 0; j < CS; j++) hw(ba(h, REG_TOP, j, r), 32'(K[h][r][j]));
      for (int t = 0; t < NT; t++) for (int j = 0; j < CS; j++) hw(ba(h, REG_TOP, j, 64 + t), 32'(V[h][t][j]));
      for (int t = 0; t < 2; t++) for (int r = 0; r < RS; r++) hw(ba(h, REG_LEFT, r, 32 + t), 32'(Q[h][t][r]));
      for (int t = 0; t < NT; t++) hw(ba(h, REG_LEFT, 0, t), 32'(A[h][t]));
    end

    foreach (ps[pi]) begin
      int k, t0, t1;
      instr_t i;
      k = NT - (NT * ps[pi] + 99) / 100;
      for (int h = 0; h < NR; h++) begin
        i = mk(M_LOADW, RS, 0, 0);                                 put_block(4 * h + 0, h, i);
        i = mk(M_WS, 2, 32, 0); i.topk_en = 1; i.k = 8'(k);         put_block(4 * h + 1, h, i);
        i = mk(M_SIMD1, 0, 0, 10); i.use_sqb = 1; i.len_sqb = 1; i.tbank = 1;
                                                                   put_block(4 * h + 2, h, i);
        i = mk(M_POST, 1, 10, 0); i.shift = 5'd4;                   put_block(4 * h + 3, h, i);
      end
      for (int n = 0; n < NR; n++) begin simd_cycles[n] = 0; pushes[n] = 0; end
      count_en = 1;
      t0 = $time;
      hw({HOST_UNIT_CTRL, 20'd0, 8'd6}, 32'd16);
      do hr({HOST_UNIT_CTRL, 20'd0, 8'd8}, d); while (d[31]);
      t1 = $time;
      count_en = 0;
      chk(d[15:0] == 16'hFFFF, "all 16 blocks completed");
      $display("sweep: p=0.%0d keep %0d of %0d tokens, 4 heads in %0d cycles, SIMD1 busy cycles per head %0d",
               ps[pi] / 10, k, NT, (t1 - t0) / 10, simd_cycles[0]);

      for (int h = 0; h < NR; h++) begin
        cand_t c [$];
        longint s [CS];
        c.delete();
        // scores and the reference top-k
        for (int t = 0; t < 2; t++)
          for (int j = 0; j < CS; j++) begin
            cand_t x;
            acc_t sc;
            sc = 0;
            for (int r = 0; r < RS; r++) sc += acc_t'(Q[h][t][r]) * acc_t'(K[h][r][j]);
            hr(ba(h, REG_CENTER, j, t), d);
            chk(acc_t'(d) == sc, "token scores");
            x.valid = 1; x.score = sc; x.idx = 16'(t * CS + j);
            c.push_back(x);
          end
        for (int a = 0; a < c.size(); a++)
          for (int b = a + 1; b < c.size(); b++)
            if (c[b].score > c[a].score || (c[b].score == c[a].score && c[b].idx < c[a].idx)) begin
              cand_t x; x = c[a]; c[a] = c[b]; c[b] = x;
            end
        for (int j = 0; j < CS; j++) begin
          s[j] = 0;
          for (int n = 0; n < k; n++) s[j] += longint'(A[h][c[n].idx]) * longint'(V[h][c[n].idx][j]);
          hr(ba(h, REG_CENTER, j, 10), d);
          chk(acc_t'(d) == acc_t'(s[j]), "sum over kept tokens");
          hr(ba(h, REG_BOTTOM, j, 0), d);
          chk(int'(data_t'(d[7:0])) == sat(s[j] >>> 4), "requantised output");
        end
        chk(pushes[h] == k, "SQB holds k indices");
        if (ps[pi] == 0) dense_cycles[h] = simd_cycles[h];
        else chk(simd_cycles[h] == dense_cycles[h] - (NT - k), "SIMD1 time shrinks by one cycle per dropped token");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

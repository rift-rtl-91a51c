// tb_rift_rpu: end-to-end test of one RPU (and of its ID/EX sequencer).
// The host loads the buffers, then a sequence of blocks runs through the
// block queue, changing mode between blocks:
//   LOADW + WS   dense product A x W, with in-stream top-k (k = 4) pruning
//   SIMD1        1 x CS SIMD over the kept token indices read from the SQB
//   LOADW + RADT 4-1 adder-tree dot products, again over the kept indices
//                (the SQB is rewound, so the same pruning result gates both)
//   OS           dense product P x Q, output stationary with drain
//   SIMDE        element-wise add of a bias row
//   POST         batch norm + GELU into the bottom buffer, forwarded to a
//                downstream buffer that is nearly full (backpressure stalls)
//   RECV         rows from an upstream buffer that is often empty (stalls)
//   SIMD1        again, over a gather list the host pushed into the SQB
// Results are read back through the host port and compared with values
// computed here from the same random data. The cycle count of the WS block
// is checked against its pipeline length (T rows + RS + CS + 4 cycles).
module tb_rift_rpu;
  import rift_pkg::*;
  localparam int RS = 4, CS = 4, KMAX = 8, OFD = 8;
  localparam int T = 6, K = 5, NT = T * CS;
  logic clk = 0, rst_n = 1;
  logic iq_push, iq_full, busy, done, stall, in_empty, in_pop, out_push;
  instr_t iq_din;
  logic [7:0] done_tag;
  mode_e mode;
  hreq_t hreq;
  logic [31:0] hrdata;
  logic [CS*8-1:0] in_data, out_data;
  logic [3:0] out_count;
  int checks = 0, failures = 0, stalls = 0, dones = 0;

  rift_rpu #(.RS(RS), .CS(CS), .KMAX(KMAX), .OFD(OFD)) dut (.clk, .rst_n, .iq_push, .iq_din, .iq_full,
    .busy, .done, .done_tag, .stall, .mode, .hreq, .hrdata, .in_data, .in_empty, .in_pop,
    .out_data, .out_push, .out_count);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference copies of the buffers
  data_t top0 [64][CS];   // bank 0
  data_t top1 [64][CS];   // bank 1
  data_t left [64][RS];
  acc_t  ctr  [64][CS];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  task automatic hwrite(input logic [3:0] region, input int lane, input int addr, input data_t d);
    @(negedge clk);
    hreq = '0;
    hreq.we = 1; hreq.region = region; hreq.lane = 4'(lane); hreq.addr = 16'(addr);
    hreq.wdata = 32'(d);
    @(negedge clk);
    hreq = '0;
  endtask

  task automatic hread(input logic [3:0] region, input int lane, input int addr, output logic [31:0] d);
    @(negedge clk);
    hreq = '0;
    hreq.re = 1; hreq.region = region; hreq.lane = 4'(lane); hreq.addr = 16'(addr);
    @(posedge clk); #1;
    d = hrdata;
    hreq = '0;
  endtask

  function automatic instr_t mk(input mode_e m, input int len, input int src, input int dst);
    instr_t i;
    i = '0;
    i.mode = m; i.len = 16'(len); i.src = 16'(src); i.dst = 16'(dst);
    return i;
  endfunction

  // push a block and wait for its completion; returns the cycles taken
  task automatic run(input instr_t i, output int cycles);
    int c;
    @(negedge clk);
    iq_din = i; iq_push = 1;
    @(negedge clk);
    iq_push = 0;
    c = 1;
    while (!done) begin @(negedge clk); c++; end
    cycles = c;
    chk(done_tag == i.tag, "done tag");
    @(negedge clk);
  endtask

  task automatic check_center(input int addr, input acc_t want [CS], input string what);
    logic [31:0] d;
    for (int j = 0; j < CS; j++) begin
      hread(REG_CENTER, j, addr, d);
      chk(acc_t'(d) == want[j], $sformatf("%s row %0d lane %0d got %0d want %0d", what, addr, j, acc_t'(d), want[j]));
    end
  endtask

  // mock inter-RPU buffers
  logic [CS*8-1:0] upq [$];
  int out_n, push_seen;
  logic [CS*8-1:0] outq [$];
  always @(posedge clk) begin
    if (busy && stall) stalls++;
    if (done) dones++;
    if (in_pop) void'(upq.pop_front());
    if (out_push) begin outq.push_back(out_data); push_seen++; end
    // downstream drains one row every fourth cycle
    out_n = out_n + (out_push ? 1 : 0) - ((out_n > 0 && ($urandom_range(0, 3) == 0)) ? 1 : 0);
    if (out_n > OFD) begin failures++; $display("FAIL downstream overflow"); end
  end
  assign out_count = 4'(out_n);
  logic gap;
  always @(posedge clk) gap <= ($urandom_range(0, 2) == 0);
  assign in_empty = (upq.size() == 0) || gap;
  assign in_data  = (upq.size() > 0) ? upq[0] : '0;

  initial begin
    int cyc;
    cand_t kept [$];
    acc_t row [CS];
    logic [31:0] d;
    iq_push = 0; iq_din = '0; hreq = '0; out_n = 0; push_seen = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;

    // ---------------- host loads buffers ----------------
    for (int a = 0; a < 32; a++) begin
      for (int j = 0; j < CS; j++) begin
        top0[a][j] = data_t'($urandom); hwrite(REG_TOP, j, a, top0[a][j]);
        top1[a][j] = data_t'($urandom); hwrite(REG_TOP, j, 64 + a, top1[a][j]);
      end
      for (int r = 0; r < RS; r++) begin
        left[a][r] = data_t'($urandom); hwrite(REG_LEFT, r, a, left[a][r]);
      end
    end
    begin
      hread(REG_TOP, 2, 64 + 5, d);
      chk(data_t'(d[7:0]) == top1[5][2], "host read-back");
    end

    // ---------------- LOADW rows 0..RS-1 of bank 0, WS over left rows 0..T-1, top-k ----------------
    begin
      instr_t i;
      i = mk(M_LOADW, RS, 0, 0); i.tag = 1;
      run(i, cyc);
      i = mk(M_WS, T, 0, 0); i.tag = 2; i.topk_en = 1; i.k = 4;
      run(i, cyc);
      chk(cyc <= T + RS + CS + 4 + CS + 4 + 1, $sformatf("WS+topk block took %0d cycles", cyc));
      $display("rpu: WS block of %0d rows with top-k took %0d cycles", T, cyc);
    end
    kept.delete();
    for (int t = 0; t < T; t++) begin
      for (int j = 0; j < CS; j++) begin
        cand_t c;
        row[j] = 0;
        for (int r = 0; r < RS; r++) row[j] += acc_t'(left[t][r]) * acc_t'(top0[r][j]);
        ctr[t][j] = row[j];
        c.valid = 1; c.score = row[j]; c.idx = 16'(t * CS + j);
        kept.push_back(c);
      end
      check_center(t, row, "WS");
    end
    // reference top-4
    for (int a = 0; a < kept.size(); a++)
      for (int b = a + 1; b < kept.size(); b++)
        if (cand_before(kept[b], kept[a])) begin cand_t t; t = kept[a]; kept[a] = kept[b]; kept[b] = t; end
    for (int n = 0; n < 4; n++) chk(dut.u_sqb.mem[n] == kept[n].idx, "SQB contents");
    hread(REG_SQB, 0, 0, d);
    chk(d == 32'd4, "host reads the kept-token count");

    // ---------------- SIMD1 gated by SQB ----------------
    begin
      instr_t i;
      i = mk(M_SIMD1, 0, 0, 40); i.tag = 3; i.use_sqb = 1; i.tbank = 1; i.len_sqb = 1;
      run(i, cyc);
      for (int j = 0; j < CS; j++) begin
        row[j] = 0;
        for (int n = 0; n < 4; n++) row[j] += acc_t'(left[kept[n].idx][0]) * acc_t'(top1[kept[n].idx][j]);
      end
      check_center(40, row, "SIMD1");
    end

    // ---------------- RADT 4-1 gated by SQB (rewound) ----------------
    begin
      instr_t i;
      i = mk(M_LOADW, 1, 30, 0); i.tag = 4; i.tbank = 1;    // row 0 weights = top1[30]
      run(i, cyc);
      i = mk(M_RADT, 4, 0, 44); i.tag = 5; i.use_sqb = 1; i.tbank = 0;
      i.aux = '0;
      i.aux[CS-1:0] = 4'b1111;
      i.aux[CS +: 8] = 8'b0001_0101;                           // level 1: lanes 0 and 2; level 2: lane 0
      run(i, cyc);
      for (int n = 0; n < 4; n++) begin
        row[0] = 0;
        for (int j = 0; j < CS; j++) row[0] += acc_t'(top0[kept[n].idx][j]) * acc_t'(top1[30][j]);
        for (int j = 1; j < CS; j++) row[j] = 0;
        check_center(44 + n, row, "RADT");
      end
    end

    // ---------------- OS: left[8+s][r] = P[r][s], top1[8+s] = Q[s] ----------------
    begin
      instr_t i;
      i = mk(M_OS, K, 8, 16); i.tag = 6; i.tbank = 1;
      run(i, cyc);
      for (int r = 0; r < RS; r++) begin
        for (int j = 0; j < CS; j++) begin
          row[j] = 0;
          for (int s = 0; s < K; s++) row[j] += acc_t'(left[8+s][r]) * acc_t'(top1[8+s][j]);
          ctr[16+r][j] = row[j];
        end
        check_center(16 + r, row, "OS");
      end
    end

    // ---------------- SIMDE: top0[20..23] + row-0 weights (top1[30]) ----------------
    begin
      instr_t i;
      i = mk(M_SIMDE, 4, 20, 24); i.tag = 7; i.elt_mul = 0;
      run(i, cyc);
      for (int t = 0; t < 4; t++) begin
        for (int j = 0; j < CS; j++) row[j] = acc_t'(top0[20+t][j]) + acc_t'(top1[30][j]);
        check_center(24 + t, row, "SIMDE");
      end
    end

    // ---------------- POST: OS result rows through batch norm + GELU, forwarded ----------------
    begin
      instr_t i;
      logic signed [7:0] g;
      logic signed [23:0] bta;
      out_n = OFD - 1;     // downstream almost full: forces backpressure
      g = 8'sd3; bta = -24'sd100;
      i = mk(M_POST, RS, 16, 8); i.tag = 8; i.norm = N_BATCH; i.act = A_GELU; i.shift = 5'd6;
      i.fwd = 1; i.aux = {bta, g};
      run(i, cyc);
      chk(push_seen == RS, "forwarded rows");
      for (int r = 0; r < RS; r++) begin
        for (int j = 0; j < CS; j++) begin
          acc_t y;
          int q, e;
          y = ctr[16+r][j] * 3 - 100;
          q = y >>> 6;
          if (q > 127) q = 127;
          if (q < -128) q = -128;
          e = (q <= -48) ? 0 : (q >= 48) ? q : (q * (q + 48)) / 96;
          hread(REG_BOTTOM, j, 8 + r, d);
          chk(int'(data_t'(d[7:0])) == e, $sformatf("POST row %0d lane %0d", r, j));
          if (outq.size() > r) chk(int'(data_t'(outq[r][j*8 +: 8])) == e, "forwarded data");
        end
      end
    end

    // ---------------- RECV: 5 rows from upstream into top bank 0, rows 50.. ----------------
    begin
      instr_t i;
      logic [CS*8-1:0] rows [5];
      for (int n = 0; n < 5; n++) begin rows[n] = {$urandom}; upq.push_back(rows[n]); end
      i = mk(M_RECV, 5, 50, 0); i.tag = 9;
      run(i, cyc);
      for (int n = 0; n < 5; n++)
        for (int j = 0; j < CS; j++) begin
          hread(REG_TOP, j, 50 + n, d);
          chk(d[7:0] == rows[n][j*8 +: 8], "RECV data");
        end
    end

    // ---------------- SIMD1 over a gather list the host pushed into the SQB ----------------
    begin
      instr_t i;
      int lst [3] = '{7, 3, 11};
      hwrite(REG_SQB, 0, 0, 0);
      foreach (lst[n]) hwrite(REG_SQB, 0, 1, data_t'(lst[n]));
      hread(REG_SQB, 0, 0, d);
      chk(d == 32'd3, "host-loaded SQB count");
      i = mk(M_SIMD1, 3, 0, 44); i.tag = 10; i.use_sqb = 1; i.tbank = 1;
      run(i, cyc);
      for (int j = 0; j < CS; j++) begin
        row[j] = 0;
        foreach (lst[n]) row[j] += acc_t'(left[lst[n]][0]) * acc_t'(top1[lst[n]][j]);
      end
      check_center(44, row, "SIMD1 over host gather list");
    end

    chk(stalls > 0, "stall mechanism exercised");
    chk(dones == 10, "block count");
    $display("rpu: %0d stall cycles, %0d blocks", stalls, dones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rift_mm_tiles: one tile of each kind of layer in a multimodal model,
// all running at the same time on the whole accelerator at its default size
// (2 x 2 RPUs, 4 x 4 PE arrays). Everything is driven through the host bus
// and goes in one dispatch table.
//   ViT MLP (RPU0 -> RPU2): fc1 as a WS product of 6 tokens x 4 features,
//     then layer norm and GELU. The rows are forwarded through the
//     inter-RPU buffer into RPU2's left buffer. RPU2 runs fc2 as a second
//     WS product, requantises (shift 4) and sends the rows out on down
//     stream 0.
//   CNN layer (RPU1): a 3 x 3 convolution of one input channel into 4
//     output channels, at 4 output pixels, as an OS product. The patch
//     matrix (K = 9) is built here. Batch norm (gamma 3, beta -20), shift 3
//     and ReLU follow.
//   GNN aggregation (RPU3): each row holds one feature of 4 nodes. Two
//     routable-adder-tree blocks sum the edge-weighted features of two
//     different neighbour sets: nodes {0, 1, 2} and nodes {0, 1, 3}. The
//     3-1 tree shape masks one lane off. Shift 2 and ReLU follow. A third
//     block gathers over a neighbour list {2, 5, 1} that the host pushes
//     into the SQB. It is a SIMD1 block that sums edge weight x feature row
//     over the listed nodes only.
// Every intermediate and final value is checked against a reference
// computed here, and all four RPUs must have been busy in the same cycle.
module tb_rift_mm_tiles;
  import rift_pkg::*;
  localparam int CS = 4, RS = 4, GC = 2, NR = 4, NTOK = 6, KC = 9, NF = 6;
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
  assign dn_pop   = ~dn_empty;

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

  task automatic put_block(input int idx, input int rpu, input logic [15:0] deps, input instr_t i);
    logic [127:0] b;
    b = i;
    for (int w = 0; w < 4; w++) hw({HOST_UNIT_CTRL, 20'd0, 8'(w)}, b[w*32 +: 32]);
    hw({HOST_UNIT_CTRL, 20'd0, 8'd4}, {4'd0, 4'(rpu), 8'd0, deps});
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

  function automatic int gelu(input int v);
    if (v <= -48) return 0;
    if (v >= 48) return v;
    return (v * (v + 48)) / 96;
  endfunction

  function automatic int relu(input int v);
    return (v > 0) ? v : 0;
  endfunction

  // layer norm of one row, gamma 1, beta 0, as fixed point with 4 fraction bits
  function automatic void lnorm(input longint c [CS], output longint y [CS]);
    longint s, mean, v, sd;
    s = 0;
    for (int j = 0; j < CS; j++) s += c[j];
    mean = s / CS;
    v = 0;
    for (int j = 0; j < CS; j++) v += (c[j] - mean) * (c[j] - mean);
    v = v / CS;
    sd = 1;
    while ((sd + 1) * (sd + 1) <= v) sd++;
    for (int j = 0; j < CS; j++) y[j] = ((c[j] - mean) * 16) / sd;
  endfunction

  logic [CS*8-1:0] dnq [$];
  int n_all4 = 0;
  always @(posedge clk) begin
    if (dn_pop[0]) dnq.push_back(dn_data[0]);
    if (&rpu_busy) n_all4++;
  end

  data_t X [NTOK][RS];      // tokens, RPU0 left rows 0..5
  data_t W1 [RS][CS];       // fc1, RPU0 top rows 0..3
  data_t W2 [RS][CS];       // fc2, RPU2 top rows 0..3
  data_t IMG [3][6];        // CNN input image
  data_t P [KC][RS];        // patch matrix, RPU1 left rows 0..8
  data_t F [KC][CS];        // filters, RPU1 top rows 0..8
  data_t G [NF][CS];        // node features, RPU3 top rows 0..5
  data_t EW [CS];           // edge weights, RPU3 top row 20
  data_t AW [NF];           // gather weights, RPU3 left lane 0 rows 0..5
  int    NBR [3] = '{2, 5, 1};

  initial begin
    logic [31:0] d;
    instr_t i;
    int h1 [NTOK][CS];
    int o2 [NTOK][CS];

    host_valid = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;

    for (int t = 0; t < NTOK; t++) for (int r = 0; r < RS; r++) X[t][r] = data_t'($urandom_range(0, 60)) - 30;
    for (int r = 0; r < RS; r++) for (int j = 0; j < CS; j++) W1[r][j] = data_t'($urandom_range(0, 60)) - 30;
    for (int r = 0; r < RS; r++) for (int j = 0; j < CS; j++) W2[r][j] = data_t'($urandom_range(0, 30)) - 15;
    for (int y = 0; y < 3; y++) for (int x = 0; x < 6; x++) IMG[y][x] = data_t'($urandom_range(0, 40)) - 20;
    for (int k = 0; k < KC; k++) for (int j = 0; j < CS; j++) F[k][j] = data_t'($urandom_range(0, 20)) - 10;
    for (int k = 0; k < KC; k++) for (int r = 0; r < RS; r++) P[k][r] = IMG[k / 3][r + k % 3];
    for (int f = 0; f < NF; f++) for (int j = 0; j < CS; j++) G[f][j] = data_t'($urandom_range(0, 60)) - 30;
    for (int j = 0; j < CS; j++) EW[j] = data_t'($urandom_range(0, 20)) - 10;

    for (int t = 0; t < NTOK; t++) for (int r = 0; r < RS; r++) hw(ba(0, REG_LEFT, r, t), 32'(X[t][r]));
    for (int r = 0; r < RS; r++) for (int j = 0; j < CS; j++) hw(ba(0, REG_TOP, j, r), 32'(W1[r][j]));
    for (int r = 0; r < RS; r++) for (int j = 0; j < CS; j++) hw(ba(2, REG_TOP, j, r), 32'(W2[r][j]));
    for (int k = 0; k < KC; k++) for (int r = 0; r < RS; r++) hw(ba(1, REG_LEFT, r, k), 32'(P[k][r]));
    for (int k = 0; k < KC; k++) for (int j = 0; j < CS; j++) hw(ba(1, REG_TOP, j, k), 32'(F[k][j]));
    for (int f = 0; f < NF; f++) for (int j = 0; j < CS; j++) hw(ba(3, REG_TOP, j, f), 32'(G[f][j]));
    for (int j = 0; j < CS; j++) hw(ba(3, REG_TOP, j, 20), 32'(EW[j]));
    for (int u = 0; u < NF; u++) begin
      AW[u] = data_t'($urandom_range(0, 20)) - 10;
      hw(ba(3, REG_LEFT, 0, u), 32'(AW[u]));
    end
    hw(ba(3, REG_SQB, 0, 0), 32'd0);
    foreach (NBR[n]) hw(ba(3, REG_SQB, 0, 1), 32'(NBR[n]));
    hr(ba(3, REG_SQB, 0, 0), d);
    chk(d == 32'd3, "host-loaded SQB holds 3 indices");

    // ViT MLP
    i = mk(M_LOADW, RS, 0, 0);                                  put_block(0, 0, 16'h0000, i);
    i = mk(M_WS, NTOK, 0, 0);                                   put_block(1, 0, 16'h0000, i);
    i = mk(M_POST, NTOK, 0, 0); i.norm = N_LAYER; i.aux = 32'd1; i.act = A_GELU; i.fwd = 1;
                                                                put_block(2, 0, 16'h0000, i);
    // CNN layer
    i = mk(M_OS, KC, 0, 0);                                     put_block(3, 1, 16'h0000, i);
    i = mk(M_POST, RS, 0, 0); i.norm = N_BATCH; i.aux = {24'hFFFFEC, 8'd3}; i.shift = 5'd3; i.act = A_RELU;
                                                                put_block(4, 1, 16'h0000, i);
    // ViT MLP, second layer
    i = mk(M_LOADW, RS, 0, 0);                                  put_block(5, 2, 16'h0000, i);
    i = mk(M_RECV, NTOK, 0, 0); i.to_left = 1;                  put_block(6, 2, 16'h0004, i);
    i = mk(M_WS, NTOK, 0, 0);                                   put_block(7, 2, 16'h0000, i);
    i = mk(M_POST, NTOK, 0, 0); i.shift = 5'd4; i.fwd = 1;      put_block(8, 2, 16'h0000, i);
    // GNN aggregation
    i = mk(M_LOADW, 1, 20, 0);                                  put_block(9, 3, 16'h0000, i);
    i = mk(M_RADT, NF, 0, 0); i.aux[CS-1:0] = 4'b0111; i.aux[CS +: 8] = 8'b0001_0101;
                                                                put_block(10, 3, 16'h0000, i);
    i = mk(M_RADT, NF, 0, 8); i.aux[CS-1:0] = 4'b1011; i.aux[CS +: 8] = 8'b0001_0101;
                                                                put_block(11, 3, 16'h0000, i);
    i = mk(M_POST, NF, 0, 0); i.shift = 5'd2; i.act = A_RELU;   put_block(12, 3, 16'h0000, i);
    i = mk(M_SIMD1, 3, 0, 16); i.use_sqb = 1;                   put_block(13, 3, 16'h0000, i);

    hw({HOST_UNIT_CTRL, 20'd0, 8'd6}, 32'd14);
    do hr({HOST_UNIT_CTRL, 20'd0, 8'd8}, d); while (d[31]);
    chk(d[13:0] == 14'h3FFF, "all 14 blocks completed");
    repeat (4) @(negedge clk);

    // ---- ViT MLP ----
    for (int t = 0; t < NTOK; t++) begin
      longint c [CS], y [CS];
      for (int j = 0; j < CS; j++) begin
        c[j] = 0;
        for (int r = 0; r < RS; r++) c[j] += longint'(X[t][r]) * longint'(W1[r][j]);
        hr(ba(0, REG_CENTER, j, t), d);
        chk(acc_t'(d) == acc_t'(c[j]), "ViT fc1 product");
      end
      lnorm(c, y);
      for (int j = 0; j < CS; j++) begin
        h1[t][j] = gelu(sat(y[j]));
        hr(ba(2, REG_LEFT, j, t), d);
        chk(int'(data_t'(d[7:0])) == h1[t][j], "ViT layer norm + GELU rows received by RPU2");
      end
    end
    for (int t = 0; t < NTOK; t++)
      for (int j = 0; j < CS; j++) begin
        longint s;
        s = 0;
        for (int r = 0; r < RS; r++) s += longint'(h1[t][r]) * longint'(W2[r][j]);
        o2[t][j] = sat(s >>> 4);
      end
    chk(dnq.size() == NTOK, "ViT fc2 row count on the down stream");
    for (int t = 0; t < NTOK && t < dnq.size(); t++)
      for (int j = 0; j < CS; j++) chk(int'(data_t'(dnq[t][j*8 +: 8])) == o2[t][j], "ViT fc2 output rows");

    // ---- CNN layer: output pixel r, channel j ----
    for (int r = 0; r < RS; r++)
      for (int j = 0; j < CS; j++) begin
        longint c;
        c = 0;
        for (int k = 0; k < KC; k++) c += longint'(IMG[k / 3][r + k % 3]) * longint'(F[k][j]);
        hr(ba(1, REG_CENTER, j, r), d);
        chk(acc_t'(d) == acc_t'(c), "CNN convolution");
        hr(ba(1, REG_BOTTOM, j, r), d);
        chk(int'(data_t'(d[7:0])) == relu(sat((c * 3 - 20) >>> 3)), "CNN batch norm + ReLU");
      end

    // ---- GNN aggregation: lane 0 holds each sum, other lanes read 0 ----
    for (int f = 0; f < NF; f++) begin
      longint a0, a1;
      a0 = longint'(G[f][0]) * EW[0] + longint'(G[f][1]) * EW[1] + longint'(G[f][2]) * EW[2];
      a1 = longint'(G[f][0]) * EW[0] + longint'(G[f][1]) * EW[1] + longint'(G[f][3]) * EW[3];
      for (int j = 0; j < CS; j++) begin
        hr(ba(3, REG_CENTER, j, f), d);
        chk(acc_t'(d) == ((j == 0) ? acc_t'(a0) : 0), "GNN aggregation over nodes 0,1,2");
        hr(ba(3, REG_CENTER, j, 8 + f), d);
        chk(acc_t'(d) == ((j == 0) ? acc_t'(a1) : 0), "GNN aggregation over nodes 0,1,3");
        hr(ba(3, REG_BOTTOM, j, f), d);
        chk(int'(data_t'(d[7:0])) == ((j == 0) ? relu(sat(a0 >>> 2)) : 0), "GNN output");
      end
    end

    for (int j = 0; j < CS; j++) begin
      longint g;
      g = 0;
      foreach (NBR[n]) g += longint'(AW[NBR[n]]) * longint'(G[NBR[n]][j]);
      hr(ba(3, REG_CENTER, j, 16), d);
      chk(acc_t'(d) == acc_t'(g), "GNN gather over the host-loaded neighbour list");
    end

    $display("mm_tiles: %0d cycles with all four RPUs busy", n_all4);
    chk(n_all4 > 0, "all four RPUs busy at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

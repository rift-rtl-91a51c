// tb_rift_mse: self-checking test of the mode-switchable PE array.
// Runs, on one array, a weight-stationary and an output-stationary matrix
// product (inputs skewed by the testbench), a 1 x CS SIMD accumulation,
// element-wise multiply and add, and the three adder-tree shapes of the
// architecture (4-1, 3-1, 2 x (2-1)). Expected values are computed in the
// testbench from the same random operands. The WS output timing (row t of
// column j leaves the bottom row RS-1+j+t cycles after its first input) and
// the OS/RADT latencies are checked cycle by cycle.
module tb_rift_mse;
  import rift_pkg::*;
  localparam int RS = 4, CS = 4, LV = 2, T = 6, K = 5;
  logic clk = 0, rst_n = 1;
  mode_e mode;
  mse_ctl_e ctl;
  logic elt_mul;
  logic [CS-1:0] radt_mask;
  logic [LV*CS-1:0] radt_join;
  data_t west [RS];
  data_t north [CS];
  data_t bcast;
  acc_t  out [CS];
  logic [CS-1:0] root;
  int checks = 0, failures = 0;

  data_t W [RS][CS];
  data_t A [T][RS];
  data_t P [RS][K];
  data_t Q [K][CS];
  acc_t  exp_v;

  rift_mse #(.RS(RS), .CS(CS)) dut (.clk, .rst_n, .mode, .ctl, .elt_mul, .radt_mask, .radt_join,
    .west_in(west), .north_in(north), .bcast_in(bcast), .out, .out_root(root));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input acc_t got, input acc_t want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic clear_in();
    for (int r = 0; r < RS; r++) west[r] = 0;
    for (int j = 0; j < CS; j++) north[j] = 0;
    bcast = 0;
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  // load rows Wr[RS-1..0] so that PE row r holds Wr[r]
  task automatic load_w(input data_t Wr [RS][CS]);
    mode = M_LOADW; ctl = CTL_RUN;
    for (int s = 0; s < RS; s++) begin
      for (int j = 0; j < CS; j++) north[j] = Wr[RS-1-s][j];
      step();
    end
    ctl = CTL_HOLD; clear_in();
  endtask

  initial begin
    mode = M_NOP; ctl = CTL_HOLD; elt_mul = 0; radt_mask = '0; radt_join = '0;
    clear_in();
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int r = 0; r < RS; r++) for (int j = 0; j < CS; j++) W[r][j] = data_t'($urandom);
    for (int t = 0; t < T; t++) for (int r = 0; r < RS; r++) A[t][r] = data_t'($urandom);
    for (int r = 0; r < RS; r++) for (int k = 0; k < K; k++) P[r][k] = data_t'($urandom);
    for (int k = 0; k < K; k++) for (int j = 0; j < CS; j++) Q[k][j] = data_t'($urandom);
    @(negedge clk);

    // ---------------- weight stationary ----------------
    load_w(W);
    mode = M_WS; ctl = CTL_RUN;
    for (int c = 0; c < T + RS + CS + 2; c++) begin
      for (int r = 0; r < RS; r++)
        west[r] = (c - r >= 0 && c - r < T) ? A[c-r][r] : data_t'(0);
      step();
      // after the edge ending cycle c: column j holds row t = c-RS+1-j
      for (int j = 0; j < CS; j++) begin
        int t;
        t = c - RS + 1 - j;
        if (t >= 0 && t < T) begin
          exp_v = 0;
          for (int r = 0; r < RS; r++) exp_v += acc_t'(A[t][r]) * acc_t'(W[r][j]);
          chk(out[j], exp_v, "WS");
        end
      end
    end
    clear_in();

    // ---------------- output stationary ----------------
    mode = M_OS; ctl = CTL_CLR; step();
    ctl = CTL_RUN;
    for (int c = 0; c < K + RS + CS - 2; c++) begin
      for (int r = 0; r < RS; r++) west[r]  = (c - r >= 0 && c - r < K) ? P[r][c-r] : data_t'(0);
      for (int j = 0; j < CS; j++) north[j] = (c - j >= 0 && c - j < K) ? Q[c-j][j] : data_t'(0);
      step();
    end
    clear_in();
    ctl = CTL_DRAIN;
    for (int d = 0; d < RS; d++) begin
      for (int j = 0; j < CS; j++) begin
        exp_v = 0;
        for (int k = 0; k < K; k++) exp_v += acc_t'(P[RS-1-d][k]) * acc_t'(Q[k][j]);
        chk(out[j], exp_v, "OS");
      end
      step();
    end

    // ---------------- 1 x CS SIMD ----------------
    mode = M_SIMD1; ctl = CTL_CLR; step();
    ctl = CTL_RUN;
    for (int k = 0; k < K; k++) begin
      bcast = P[0][k];
      for (int j = 0; j < CS; j++) north[j] = Q[k][j];
      step();
    end
    ctl = CTL_HOLD; clear_in(); step();
    for (int j = 0; j < CS; j++) begin
      exp_v = 0;
      for (int k = 0; k < K; k++) exp_v += acc_t'(P[0][k]) * acc_t'(Q[k][j]);
      chk(out[j], exp_v, "SIMD1");
    end

    // ---------------- element-wise SIMD ----------------
    load_w(W);   // row 0 holds W[0]
    mode = M_SIMDE; ctl = CTL_RUN;
    for (int t = 0; t < 4; t++) begin
      elt_mul = t[0];
      for (int j = 0; j < CS; j++) north[j] = A[t][j];
      step();
      for (int j = 0; j < CS; j++)
        chk(out[j], elt_mul ? acc_t'(A[t][j]) * acc_t'(W[0][j]) : acc_t'(A[t][j]) + acc_t'(W[0][j]), "SIMDE");
    end

    // ---------------- routable adder tree ----------------
    mode = M_RADT;
    for (int cfg = 0; cfg < 3; cfg++) begin
      acc_t pr [CS];
      case (cfg)
        0: begin radt_mask = 4'b1111; radt_join = 8'b0000_0101 | 8'b0000_0001 << 4; end // 4-1
        1: begin radt_mask = 4'b0111; radt_join = 8'b0000_0101 | 8'b0000_0001 << 4; end // 3-1
        default: begin radt_mask = 4'b1111; radt_join = 8'b0000_0101; end               // 2x(2-1)
      endcase
      for (int j = 0; j < CS; j++) north[j] = A[cfg][j];
      for (int j = 0; j < CS; j++) pr[j] = radt_mask[j] ? acc_t'(A[cfg][j]) * acc_t'(W[0][j]) : 0;
      ctl = CTL_RUN;
      for (int s = 0; s < RS; s++) step();   // latency: RS register rows
      if (cfg < 2) begin
        chk(out[0], pr[0] + pr[1] + pr[2] + pr[3], "RADT 4-1/3-1");
        chk(acc_t'(root), 1, "RADT root");
        chk(out[1], 0, "RADT non-root");
      end else begin
        chk(out[0], pr[0] + pr[1], "RADT 2x(2-1) a");
        chk(out[2], pr[2] + pr[3], "RADT 2x(2-1) b");
        chk(acc_t'(root), 5, "RADT roots");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

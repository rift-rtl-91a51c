// tb_rift_dispatch: the dispatcher drives four behavioural RPUs kept in the
// testbench (a 2-entry block queue each, random run time per block). A random
// dependency DAG of NB blocks (edges only from lower to higher numbers) is
// loaded and run three times. Checked: every block is pushed exactly once,
// to its own RPU, with its number as tag, never before all its
// predecessors completed, never into a full queue, and never ahead of a
// lower-numbered block of the same RPU; all blocks complete
// and busy falls; independent blocks ran on different RPUs at the same time.
module tb_rift_dispatch;
  import rift_pkg::*;
  localparam int NB = 16, NR = 4;
  int last_push [NR];   // highest block number pushed to each RPU so far
  logic clk = 0, rst_n = 1;
  logic tw_en, go, busy;
  logic [3:0] tw_idx;
  logic [4:0] go_count;
  instr_t tw_instr, iq_din;
  logic [1:0] tw_rpu;
  logic [NB-1:0] tw_deps, done_mask, issued_mask;
  logic [NR-1:0] iq_push, iq_full, rpu_done;
  logic [7:0] rpu_tag [NR];
  int checks = 0, failures = 0, overlap = 0;
  logic [NB-1:0] deps [NB];
  int rpu_of [NB];
  int pushes [NB];
  logic [NB-1:0] completed;
  int q [NR][$];
  int remaining [NR];
  int running [NR];

  rift_dispatch #(.NB(NB), .NR(NR)) dut (.clk, .rst_n, .tw_en, .tw_idx, .tw_instr, .tw_rpu, .tw_deps,
    .go, .go_count, .iq_push, .iq_din, .iq_full, .rpu_done, .rpu_tag, .busy, .done_mask, .issued_mask);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural RPUs
  always_comb for (int r = 0; r < NR; r++) iq_full[r] = (q[r].size() >= 2);

  always @(posedge clk) begin
    int nbusy;
    nbusy = 0;
    for (int r = 0; r < NR; r++) begin
      rpu_done[r] <= 1'b0;
      if (running[r] >= 0) begin
        nbusy++;
        if (remaining[r] == 0) begin
          rpu_done[r] <= 1'b1;
          rpu_tag[r]  <= 8'(running[r]);
          completed[running[r]] = 1'b1;
          running[r] = -1;
        end else remaining[r]--;
      end else if (q[r].size() > 0) begin
        running[r] = q[r].pop_front();
        remaining[r] = $urandom_range(2, 12);
      end
      if (iq_push[r]) begin
        int b;
        b = int'(iq_din.tag);
        checks++;
        if (b >= NB || rpu_of[b] != r || q[r].size() >= 2 || (deps[b] & ~completed) != 0 ||
            iq_din.len != 16'(b * 3 + 1) || b <= last_push[r]) begin
          failures++;
          $display("FAIL push of block %0d to rpu %0d", b, r);
        end
        if (b < NB) pushes[b]++;
        last_push[r] = b;
        q[r].push_back(b);
      end
    end
    if (nbusy >= 2) overlap++;
  end

  initial begin
    tw_en = 0; go = 0; tw_idx = 0; go_count = 0; tw_instr = '0; tw_rpu = 0; tw_deps = 0;
    for (int r = 0; r < NR; r++) begin running[r] = -1; remaining[r] = 0; rpu_tag[r] = 0; end
    rpu_done = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      for (int r = 0; r < NR; r++) last_push[r] = -1;
      for (int b = 0; b < NB; b++) begin
        deps[b] = '0;
        for (int d = 0; d < b; d++) if ($urandom_range(0, 5) == 0) deps[b][d] = 1'b1;
        rpu_of[b] = $urandom_range(0, NR - 1);
        pushes[b] = 0;
        @(negedge clk);
        tw_en = 1; tw_idx = 4'(b); tw_rpu = 2'(rpu_of[b]); tw_deps = deps[b];
        tw_instr = '0; tw_instr.mode = M_WS; tw_instr.len = 16'(b * 3 + 1);
      end
      @(negedge clk);
      tw_en = 0;
      completed = '0;
      go = 1; go_count = 5'(NB);
      @(negedge clk);
      go = 0;
      checks++;
      if (!busy) failures++;
      wait (!busy);
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (pushes[b] != 1 || !done_mask[b]) failures++;
      end
    end
    checks++;
    if (overlap == 0) failures++;
    $display("dispatch: %0d cycles with two or more RPUs busy", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

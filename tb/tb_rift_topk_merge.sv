// tb_rift_topk_merge: streams sorted groups of CS candidates into the merge
// stage and checks after every group that the list equals the best KMAX of
// everything seen since the last clear, computed in the testbench by
// sorting the whole history. Also checks clear.
module tb_rift_topk_merge;
  import rift_pkg::*;
  localparam int CS = 4, KMAX = 8, NG = 40;
  logic clk = 0, rst_n = 1;
  logic clear, in_valid;
  cand_t in [CS], list [KMAX];
  cand_t seen [$];
  int checks = 0, failures = 0;

  rift_topk_merge #(.CS(CS), .KMAX(KMAX)) dut (.clk, .rst_n, .clear, .in_valid, .in, .list);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; in_valid = 0;
    for (int j = 0; j < CS; j++) in[j] = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(negedge clk);
    for (int pass = 0; pass < 3; pass++) begin
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      seen.delete();
      checks++;
      if (list[0].valid) failures++;
      for (int g = 0; g < NG; g++) begin
        cand_t grp [CS];
        @(negedge clk);
        for (int j = 0; j < CS; j++) begin
          grp[j].valid = ($urandom_range(0, 5) != 0);
          grp[j].score = acc_t'($urandom_range(0, 1000)) - 500;
          grp[j].idx   = 16'(g * CS + j);
        end
        for (int a = 0; a < CS; a++)
          for (int b = a + 1; b < CS; b++)
            if (cand_before(grp[b], grp[a])) begin
              cand_t t;
              t = grp[a]; grp[a] = grp[b]; grp[b] = t;
            end
        in = grp;
        in_valid = ($urandom_range(0, 3) != 0);
        if (in_valid) for (int j = 0; j < CS; j++) if (grp[j].valid) seen.push_back(grp[j]);
        @(posedge clk); #1;
        in_valid = 0;
        begin
          cand_t all [$];
          all = seen;
          for (int a = 0; a < all.size(); a++)
            for (int b = a + 1; b < all.size(); b++)
              if (cand_before(all[b], all[a])) begin
                cand_t t;
                t = all[a]; all[a] = all[b]; all[b] = t;
              end
          for (int o = 0; o < KMAX; o++) begin
            checks++;
            if (o < all.size()) begin
              if (list[o] !== all[o]) failures++;
            end else if (list[o].valid) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rift_topk_sorter: feeds one random group of CS candidates per cycle
// (random scores, some invalid, some ties) and checks that each group
// comes out sorted, best first, exactly CS cycles later. The expected order
// is computed in the testbench by a selection sort.
module tb_rift_topk_sorter;
  import rift_pkg::*;
  localparam int CS = 4, NG = 200;
  logic clk = 0, rst_n = 1;
  logic in_valid, out_valid;
  cand_t in [CS], out [CS];
  cand_t grp [NG][CS];
  int checks = 0, failures = 0;

  rift_topk_sorter #(.CS(CS)) dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    for (int j = 0; j < CS; j++) in[j] = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < NG + CS + 1; c++) begin
      if (c < NG) begin
        in_valid = 1;
        for (int j = 0; j < CS; j++) begin
          in[j].valid = ($urandom_range(0, 7) != 0);
          in[j].score = acc_t'($urandom_range(0, 20)) - 10;
          in[j].idx   = 16'($urandom_range(0, 999));
          grp[c][j] = in[j];
        end
      end else in_valid = 0;
      @(posedge clk); #1;
      // group c-CS+1 is at the output now
      if (c - CS + 1 >= 0 && c - CS + 1 < NG) begin
        cand_t ref_s [CS];
        ref_s = grp[c-CS+1];
        for (int a = 0; a < CS; a++)
          for (int b = a + 1; b < CS; b++)
            if (cand_before(ref_s[b], ref_s[a])) begin
              cand_t t;
              t = ref_s[a]; ref_s[a] = ref_s[b]; ref_s[b] = t;
            end
        checks++;
        if (!out_valid) failures++;
        for (int j = 0; j < CS; j++) begin
          checks++;
          if (out[j] !== ref_s[j]) failures++;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

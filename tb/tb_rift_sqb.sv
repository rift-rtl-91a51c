// tb_rift_sqb: fills the sparse queue buffer with index lists, consumes
// them, rewinds and consumes them again, and clears; head, empty, full and
// count are compared with a reference list every cycle.
module tb_rift_sqb;
  localparam int DEPTH = 16, IW = 16;
  logic clk = 0, rst_n = 1;
  logic clear, rewind, push, pop, empty, full;
  logic [IW-1:0] din, head;
  logic [$clog2(DEPTH):0] count, total;
  logic [IW-1:0] lst [$];
  int rp;
  int checks = 0, failures = 0;

  rift_sqb #(.DEPTH(DEPTH), .IW(IW)) dut (.clk, .rst_n, .clear, .rewind, .push, .din, .pop,
    .head, .empty, .full, .count, .total);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; rewind = 0; push = 0; pop = 0; din = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      int n;
      n = $urandom_range(1, DEPTH);
      @(negedge clk);
      clear = 1; @(posedge clk); #1; clear = 0;
      lst.delete(); rp = 0;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        push = 1; din = IW'($urandom);
        lst.push_back(din);
        @(posedge clk); #1; push = 0;
      end
      checks++;
      if (full != (n == DEPTH)) failures++;
      for (int pass = 0; pass < 2; pass++) begin
        for (int k = 0; k < n; k++) begin
          @(negedge clk);
          checks++;
          if (empty || head !== lst[k] || count != (n - k) || total != n) failures++;
          pop = 1;
          @(posedge clk); #1; pop = 0;
        end
        checks++;
        if (!empty) failures++;
        @(negedge clk);
        rewind = 1; @(posedge clk); #1; rewind = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

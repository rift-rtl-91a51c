// tb_rift_fifo: random push/pop traffic against a SystemVerilog queue used
// as reference; checks head data, count, full and empty every cycle, and
// that pushes while full are refused (backpressure).
module tb_rift_fifo;
  localparam int W = 32, DEPTH = 8;
  logic clk = 0, rst_n = 1;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH):0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, full_seen = 0;

  rift_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty, .count);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH)) failures++;
      if (model.size() > 0) begin
        checks++;
        if (dout !== model[0]) failures++;
      end
      if (full) full_seen++;
      // bias toward filling in the first half, draining in the second
      push = !full && ($urandom_range(0, 9) < ((c % 400) < 200 ? 7 : 3));
      pop  = !empty && ($urandom_range(0, 9) < ((c % 400) < 200 ? 3 : 7));
      din  = $urandom;
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (full_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

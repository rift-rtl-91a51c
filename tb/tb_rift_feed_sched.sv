// tb_rift_feed_sched: checks the skew (lane i delayed i cycles) and de-skew
// (lane i delayed N-1-i cycles) delay lines against a history of the random
// inputs kept by the testbench.
module tb_rift_feed_sched;
  localparam int N = 4, W = 8, H = 64;
  logic clk = 0, rst_n = 1;
  logic [W-1:0] din [N], sk [N], dk [N];
  logic [W-1:0] hist [H][N];
  int checks = 0, failures = 0;

  rift_feed_sched #(.N(N), .W(W), .DESKEW(1'b0)) u_sk (.clk, .rst_n, .din, .dout(sk));
  rift_feed_sched #(.N(N), .W(W), .DESKEW(1'b1)) u_dk (.clk, .rst_n, .din, .dout(dk));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) din[i] = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < H; c++) begin
      for (int i = 0; i < N; i++) begin
        din[i] = W'($urandom);
        hist[c][i] = din[i];
      end
      #1;
      for (int i = 0; i < N; i++) begin
        if (c - i >= 0) begin
          checks++;
          if (sk[i] !== hist[c-i][i]) failures++;
        end
        if (c - (N - 1 - i) >= 0) begin
          checks++;
          if (dk[i] !== hist[c-(N-1-i)][i]) failures++;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

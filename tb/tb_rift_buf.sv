// tb_rift_buf: random lane-masked writes and reads on both read ports of a
// buffer, compared with a reference array; read data are checked one
// cycle after the address (registered read).
module tb_rift_buf;
  localparam int LANES = 4, W = 8, DEPTH = 64;
  logic clk = 0, rst_n = 1;
  logic [LANES-1:0] we;
  logic [5:0] waddr, ra, rb, ra_q, rb_q;
  logic [W-1:0] wdata [LANES], rda [LANES], rdb [LANES];
  logic [W-1:0] model [DEPTH][LANES];
  int checks = 0, failures = 0;

  rift_buf #(.LANES(LANES), .W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .we, .waddr, .wdata,
    .raddr_a(ra), .rdata_a(rda), .raddr_b(rb), .rdata_b(rdb));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; waddr = 0; ra = 0; rb = 0;
    for (int l = 0; l < LANES; l++) wdata[l] = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    // initialise every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = '1; waddr = 6'(a);
      for (int l = 0; l < LANES; l++) begin wdata[l] = W'($urandom); model[a][l] = wdata[l]; end
    end
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      we = LANES'($urandom); waddr = 6'($urandom); ra = 6'($urandom); rb = 6'($urandom);
      for (int l = 0; l < LANES; l++) wdata[l] = W'($urandom);
      ra_q = ra; rb_q = rb;
      @(posedge clk); #1;
      for (int l = 0; l < LANES; l++) begin
        checks += 2;
        if (rda[l] !== model[ra_q][l]) failures++;
        if (rdb[l] !== model[rb_q][l]) failures++;
      end
      for (int l = 0; l < LANES; l++) if (we[l]) model[waddr][l] = wdata[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

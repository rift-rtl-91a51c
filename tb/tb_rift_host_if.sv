// tb_rift_host_if: drives host writes and reads through the address map and
// checks the routed RPU accesses, the assembly of a block descriptor from
// four staging words plus the RPU/dependency word, the table-write and
// start strobes, and read-back data from RPUs and the status register one
// cycle after the request.
module tb_rift_host_if;
  import rift_pkg::*;
  localparam int NR = 4, NB = 16;
  logic clk = 0, rst_n = 1;
  logic host_valid, host_we, host_rvalid;
  logic [31:0] host_addr, host_wdata, host_rdata;
  hreq_t hreq [NR];
  logic [31:0] hrdata [NR];
  logic tw_en, go, busy;
  logic [3:0] tw_idx;
  instr_t tw_instr;
  logic [1:0] tw_rpu;
  logic [NB-1:0] tw_deps, done_mask;
  logic [4:0] go_count;
  int checks = 0, failures = 0;

  rift_host_if #(.NR(NR), .NB(NB)) dut (.clk, .rst_n, .host_valid, .host_we, .host_addr, .host_wdata,
    .host_rdata, .host_rvalid, .hreq, .hrdata, .tw_en, .tw_idx, .tw_instr, .tw_rpu, .tw_deps,
    .go, .go_count, .busy, .done_mask);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    host_valid = 1; host_we = 1; host_addr = a; host_wdata = d;
    #1;
  endtask

  initial begin
    host_valid = 0; host_we = 0; host_addr = 0; host_wdata = 0; busy = 0; done_mask = 0;
    for (int r = 0; r < NR; r++) hrdata[r] = 32'hA000_0000 + r;
    #1 rst_n = 0;
    #20 rst_n = 1;
    // RPU writes are routed to exactly one RPU
    for (int n = 0; n < 50; n++) begin
      int r;
      logic [31:0] a, d;
      r = $urandom_range(0, NR - 1);
      a = {4'(r), 4'($urandom_range(0, 3)), 4'($urandom_range(0, 3)), 4'h0, 16'($urandom)};
      d = $urandom;
      wr(a, d);
      for (int k = 0; k < NR; k++) begin
        chk(hreq[k].we == (k == r), "write select");
        chk(hreq[k].re == 1'b0, "no read on write");
      end
      chk(hreq[r].region == a[27:24] && hreq[r].lane == a[23:20] && hreq[r].addr == a[15:0] &&
          hreq[r].wdata == d, "write fields");
      chk(!tw_en && !go, "no control strobe");
    end
    // descriptor staging and table write
    begin
      logic [127:0] desc;
      desc = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 4; w++) wr({4'hF, 20'd0, 8'(w)}, desc[w*32 +: 32]);
      wr({4'hF, 20'd0, 8'd4}, {4'd0, 4'd3, 8'd0, 16'hBEEF});
      wr({4'hF, 20'd0, 8'd5}, 32'd9);
      chk(tw_en && tw_idx == 4'd9 && tw_instr == instr_t'(desc) && tw_rpu == 2'd3 &&
          tw_deps == 16'hBEEF, "table write");
      wr({4'hF, 20'd0, 8'd6}, 32'd12);
      chk(go && go_count == 5'd12 && !tw_en, "go");
    end
    // reads: RPU data and status, one cycle later
    for (int n = 0; n < 20; n++) begin
      int r;
      r = $urandom_range(0, NR - 1);
      @(negedge clk);
      host_valid = 1; host_we = 0; host_addr = {4'(r), 4'd2, 4'd1, 20'd5};
      #1;
      chk(hreq[r].re && !hreq[r].we, "read request");
      @(negedge clk);
      host_valid = 0;
      chk(host_rvalid && host_rdata == 32'hA000_0000 + r, "read data");
    end
    busy = 1; done_mask = 16'h00F3;
    @(negedge clk);
    host_valid = 1; host_we = 0; host_addr = {4'hF, 20'd0, 8'd8};
    @(negedge clk);
    host_valid = 0;
    chk(host_rvalid && host_rdata == 32'h8000_00F3, "status read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

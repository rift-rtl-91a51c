// tb_rift_pe: self-checking test of one processing element.
// Random operation sequences are applied; a reference model kept in the
// testbench (weight, partial-sum and forwarding registers) predicts every
// output after each clock edge.
module tb_rift_pe;
  import rift_pkg::*;
  logic clk = 0, rst_n = 1;
  pe_op_e op;
  data_t west, north, east, south, wout;
  acc_t  psin, side, psout;
  int checks = 0, failures = 0;
  data_t m_a, m_b, m_w;
  acc_t  m_r;

  rift_pe dut (.clk, .rst_n, .op, .west_in(west), .north_in(north), .psum_in(psin),
               .side_in(side), .east_out(east), .south_out(south), .w_out(wout), .psum_out(psout));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    op = PE_HOLD; west = 0; north = 0; psin = 0; side = 0;
    m_a = 0; m_b = 0; m_w = 0; m_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      op    = pe_op_e'($urandom_range(0, 8));
      west  = data_t'($urandom);
      north = data_t'($urandom);
      psin  = acc_t'($urandom);
      side  = acc_t'($urandom);
      // reference model
      if (op != PE_HOLD) begin
        case (op)
          PE_CLR:  m_r = 0;
          PE_LDW:  m_w = north;
          PE_MACW: m_r = psin + acc_t'(west) * acc_t'(m_w);
          PE_MACC: m_r = m_r + acc_t'(west) * acc_t'(north);
          PE_ADD:  m_r = psin + side;
          PE_PASS: m_r = psin;
          PE_MULW: m_r = acc_t'(west) * acc_t'(m_w);
          PE_ADDW: m_r = acc_t'(west) + acc_t'(m_w);
          default: ;
        endcase
        m_a = west;
        m_b = north;
      end
      @(posedge clk); #1;
      checks++;
      if (psout !== m_r || east !== m_a || south !== m_b || wout !== m_w) begin
        failures++;
        if (failures < 5) $display("mismatch op=%0d psum %0d/%0d", op, psout, m_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rift_norm: random rows through batch-norm (affine), layer-norm
// (mean, standard deviation, fixed-point normalisation, affine) and bypass, checked against values computed in the
// testbench.
module tb_rift_norm;
  import rift_pkg::*;
  localparam int CS = 4;
  norm_e mode;
  logic signed [7:0] gamma;
  logic signed [23:0] beta;
  acc_t x [CS], y [CS];
  int checks = 0, failures = 0;

  rift_norm #(.CS(CS)) dut (.mode, .gamma, .beta, .x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      longint s;
      acc_t m, e;
      longint sd;
      mode  = norm_e'(n % 3);
      gamma = 8'($urandom);
      beta  = 24'($urandom);
      s = 0;
      for (int j = 0; j < CS; j++) begin
        x[j] = acc_t'($urandom_range(0, 200000)) - 100000;
        s += x[j];
      end
      m = acc_t'(s / CS);
      begin
        longint v;
        v = 0;
        for (int j = 0; j < CS; j++) v += (longint'(x[j]) - m) * (longint'(x[j]) - m);
        sd = longint'($floor($sqrt(real'(v / CS))));
        // correct floating-point rounding at perfect squares
        while (sd * sd > v / CS) sd--;
        while ((sd + 1) * (sd + 1) <= v / CS) sd++;
        if (sd == 0) sd = 1;
      end
      #1;
      for (int j = 0; j < CS; j++) begin
        case (mode)
          N_BATCH: e = x[j] * gamma + beta;
          N_LAYER: e = acc_t'(((longint'(x[j]) - m) * 16 * gamma) / sd) + beta;
          default: e = x[j];
        endcase
        checks++;
        if (y[j] !== e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

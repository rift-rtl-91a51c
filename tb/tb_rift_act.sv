// tb_rift_act: checks requantisation (shift + int8 saturation), ReLU, the
// hard-GELU and piecewise ELU approximations at every int8 input, and the
// base-2 softmax on random rows, against reference functions written
// independently in the testbench (real arithmetic where possible).
module tb_rift_act;
  import rift_pkg::*;
  localparam int CS = 4;
  act_e mode;
  logic [4:0] shift;
  acc_t x [CS];
  data_t y [CS];
  int checks = 0, failures = 0;

  rift_act #(.CS(CS)) dut (.mode, .shift, .x, .y);

  function automatic int q8(input longint v, input int sh);
    longint t;
    t = v >>> sh;
    if (t > 127) t = 127;
    if (t < -128) t = -128;
    return int'(t);
  endfunction

  function automatic int ref_gelu(input int v);
    if (v <= -48) return 0;
    if (v >= 48) return v;
    return (v * (v + 48)) / 96;
  endfunction

  function automatic int ref_elu(input int v);
    real t;
    if (v >= 0) return v;
    // pieces through (0,0), (-16,-10), (-32,-13), then slope 1/16, floor -16
    if (v >= -16)      t = $floor(v * 0.625);
    else if (v >= -32) t = -10.0 + $floor((v + 16) * 3.0 / 16.0);
    else               t = -13.0 + $floor((v + 32) / 16.0);
    if (t < -16) t = -16;
    return int'(t);
  endfunction

  task automatic chk(input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 8) $display("FAIL mode=%0d got %0d want %0d", mode, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // element-wise functions at every int8 input (shift 0), plus saturation
    for (int m = 0; m < 4; m++) begin
      mode = act_e'(m); shift = 0;
      for (int v = -140; v < 140; v += CS) begin
        for (int j = 0; j < CS; j++) x[j] = v + j;
        #1;
        for (int j = 0; j < CS; j++) begin
          int q;
          q = q8(v + j, 0);
          case (m)
            0: chk(y[j], q);
            1: chk(y[j], q < 0 ? 0 : q);
            2: chk(y[j], ref_gelu(q));
            default: chk(y[j], ref_elu(q));
          endcase
        end
      end
    end
    // requantisation shift
    mode = A_PASS;
    for (int n = 0; n < 100; n++) begin
      shift = 5'($urandom_range(0, 12));
      for (int j = 0; j < CS; j++) x[j] = acc_t'($urandom_range(0, 400000)) - 200000;
      #1;
      for (int j = 0; j < CS; j++) chk(y[j], q8(x[j], shift));
    end
    // softmax: outputs follow 127 * 2^-e_j / sum 2^-e_k with e = floor(d*23/256)
    mode = A_SOFTMAX; shift = 0;
    for (int n = 0; n < 200; n++) begin
      int q [CS];
      int mx;
      real p [CS];
      real s;
      for (int j = 0; j < CS; j++) begin x[j] = acc_t'($urandom_range(0, 255)) - 128; q[j] = x[j]; end
      mx = q[0];
      for (int j = 1; j < CS; j++) if (q[j] > mx) mx = q[j];
      s = 0;
      for (int j = 0; j < CS; j++) begin
        int e;
        e = ((mx - q[j]) * 23) / 256;
        p[j] = (e >= 16) ? 0.0 : 32768.0 / (2.0 ** e);
        s += p[j];
      end
      #1;
      for (int j = 0; j < CS; j++) chk(y[j], int'($floor(127.0 * p[j] / s)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

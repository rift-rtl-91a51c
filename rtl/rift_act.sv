// rift_act: requantisation and nonlinear functions of the RPU.
//
// Takes one row of CS 32-bit lanes (combinational), shifts each right by
// `shift` and saturates it to int8, read as fixed point with 4 fraction bits
// (16 = 1.0), then applies:
//   A_PASS     the int8 value
//   A_RELU     max(x, 0)
//   A_GELU     hard-GELU: 0 for x <= -3, x for x >= 3, x*(x+3)/6 between
//              (x*(x+48)/96 in the integer scale)
//   A_ELU      x for x >= 0; below, three linear pieces through
//              (0,0), (-1,-0.625), (-2,-0.8125), saturating at -1.0
//   A_SOFTMAX  softmax over the CS lanes of the row, base-2 approximation:
//              e_j = 2^15 >> floor((max - x_j) * 23 / 256), i.e. 2^(-d*1.4375/16),
//              out_j = 127 * e_j / sum(e) (127 = 1.0)
// The architecture names GELU, ELU and softmax approximation units; which
// approximations are used here is this implementation's choice.
module rift_act
  import rift_pkg::*;
#(
  parameter int CS = 4
) (
  input  act_e       mode,
  input  logic [4:0] shift,
  input  acc_t       x [CS],
  output data_t      y [CS]
);
  data_t q [CS];

  function automatic data_t gelu(input data_t v);
    acc_t t;
    if (v <= -48) return '0;
    if (v >= 48)  return v;
    t = (acc_t'(v) * (acc_t'(v) + 48)) / 96;
    return data_t'(t);
  endfunction

  function automatic data_t elu(input data_t v);
    acc_t t;
    if (v >= 0) return v;
    if (v >= -16)      t = (acc_t'(v) * 5) >>> 3;
    else if (v >= -32) t = -10 + ((acc_t'(v) + 16) * 3 >>> 4);
    else               t = -13 + ((acc_t'(v) + 32) >>> 4);
    if (t < -16) t = -16;
    return data_t'(t);
  endfunction

  always_comb begin
    data_t mx;
    logic [31:0] e   [CS];
    logic [31:0] sum;
    logic [31:0] d;
    for (int j = 0; j < CS; j++) q[j] = sat8(x[j] >>> shift);
    mx = q[0];
    for (int j = 1; j < CS; j++) if (q[j] > mx) mx = q[j];
    sum = '0;
    for (int j = 0; j < CS; j++) begin
      d    = 32'(((32'(signed'(mx) - signed'(q[j]))) * 23) >> 8);
      e[j] = (d >= 16) ? 32'd0 : (32'd32768 >> d[3:0]);
      sum  = sum + e[j];
    end
    for (int j = 0; j < CS; j++) begin
      unique case (mode)
        A_RELU:    y[j] = (q[j] < 0) ? data_t'(0) : q[j];
        A_GELU:    y[j] = gelu(q[j]);
        A_ELU:     y[j] = elu(q[j]);
        A_SOFTMAX: y[j] = data_t'((e[j] * 32'd127) / sum);
        default:   y[j] = q[j];
      endcase
    end
  end
endmodule

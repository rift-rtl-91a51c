// rift_norm: normalisation stage of the RPU post-processing path.
//
// Works on one row of CS 32-bit accumulator lanes per cycle
// (combinational). N_BATCH applies the inference form of batch norm, an
// affine y = x * gamma + beta with gamma and beta taken from the block
// descriptor (the running mean and variance are folded into them).
// N_LAYER normalises the row itself: mean = sum / CS, variance = sum of
// squared deviations / CS, sd = floor(sqrt(variance)) (at least 1), and
// y = ((x - mean) * 16 * gamma) / sd + beta, i.e. the normalised value in
// fixed point with 4 fraction bits (16 = one standard deviation), scaled by
// gamma. Divisions truncate toward zero. N_NONE passes the row. The
// presence of a layer/batch-norm unit follows the architecture; the integer
// formulation is this implementation's choice.
module rift_norm
  import rift_pkg::*;
#(
  parameter int CS = 4
) (
  input  norm_e              mode,
  input  logic signed [7:0]  gamma,
  input  logic signed [23:0] beta,
  input  acc_t               x [CS],
  output acc_t               y [CS]
);
  // floor(sqrt(v)) by the bit-by-bit method
  function automatic logic [31:0] isqrt(input logic [63:0] v);
    logic [63:0] rem, res, bit_v;
    rem   = v;
    res   = '0;
    bit_v = 64'd1 << 62;
    for (int k = 0; k < 32; k++) begin
      if (rem >= res + bit_v) begin
        rem = rem - (res + bit_v);
        res = (res >> 1) + bit_v;
      end else begin
        res = res >> 1;
      end
      bit_v = bit_v >> 2;
    end
    return res[31:0];
  endfunction

  always_comb begin
    logic signed [39:0] sum;
    logic signed [39:0] dev [CS];
    logic [63:0] sq;
    logic [31:0] sd;
    acc_t mean;
    sum = '0;
    for (int j = 0; j < CS; j++) sum += 40'(x[j]);
    mean = acc_t'(sum / 40'(CS));
    sq = '0;
    for (int j = 0; j < CS; j++) begin
      dev[j] = 40'(x[j]) - 40'(mean);
      sq += 64'(dev[j] * dev[j]);
    end
    sd = isqrt(sq / 64'(CS));
    if (sd == 0) sd = 32'd1;
    for (int j = 0; j < CS; j++) begin
      unique case (mode)
        N_BATCH: y[j] = x[j] * acc_t'(gamma) + acc_t'(beta);
        N_LAYER: y[j] = acc_t'((64'(dev[j]) * 16 * 64'(gamma)) / signed'(64'(sd))) + acc_t'(beta);
        default: y[j] = x[j];
      endcase
    end
  end
endmodule

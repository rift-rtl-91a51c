// rift_pe: one processing element of the mode-switchable engine.
//
// Each PE has a west operand input (forwarded east one cycle later), a north
// operand input (forwarded south), a partial-sum input from the PE above, a
// side partial-sum input used when the PE acts as an adder-tree node, one
// local weight register and one partial-sum register. A per-cycle opcode
// (rift_pkg::pe_op_e) selects MAC, ADD or PASS behaviour, so the same array
// serves systolic, SIMD and adder-tree dataflows. West, north, partial-sum
// and the MAC/ADD/PASS operation set follow the architecture; the weight
// register being a single entry, the extra LDW/MULW/ADDW/CLR ops and the
// 32-bit partial sum are choices of this implementation.
//
// Timing: every output is a register; results appear one cycle after the
// operation. PE_HOLD freezes all state. Reset clears every register.
module rift_pe
  import rift_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  pe_op_e op,
  input  data_t  west_in,
  input  data_t  north_in,
  input  acc_t   psum_in,
  input  acc_t   side_in,
  output data_t  east_out,
  output data_t  south_out,
  output data_t  w_out,
  output acc_t   psum_out
);
  data_t a_q, b_q, w_q;
  acc_t  r_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      w_q <= '0;
      r_q <= '0;
    end else if (op != PE_HOLD) begin
      a_q <= west_in;
      b_q <= north_in;
      unique case (op)
        PE_CLR:  r_q <= '0;
        PE_LDW:  w_q <= north_in;
        PE_MACW: r_q <= psum_in + acc_t'(west_in) * acc_t'(w_q);
        PE_MACC: r_q <= r_q + acc_t'(west_in) * acc_t'(north_in);
        PE_ADD:  r_q <= psum_in + side_in;
        PE_PASS: r_q <= psum_in;
        PE_MULW: r_q <= acc_t'(west_in) * acc_t'(w_q);
        PE_ADDW: r_q <= acc_t'(west_in) + acc_t'(w_q);
        default: ;
      endcase
    end
  end

  assign east_out  = a_q;
  assign south_out = b_q;
  assign w_out     = w_q;
  assign psum_out  = r_q;

endmodule

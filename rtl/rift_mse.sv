// rift_mse: the mode-switchable engine, an RS x CS array of rift_pe.
//
// One PE array is time-shared by every dataflow; only the operand muxes in
// front of each PE and the per-PE opcode change with the mode:
//   M_LOADW  north row shifts down through the PE weight registers (LDW).
//   M_WS     weight stationary: west operands travel east, partial sums
//            travel south and leave at the bottom row (column j is j cycles
//            later than column 0; the caller skews inputs and de-skews outputs).
//   M_OS     output stationary: west operands travel east, north operands
//            travel south, every PE accumulates its own output; CTL_DRAIN then
//            shifts the results down and out of the bottom row, last row first.
//   M_SIMD1  1 x CS SIMD: row 0 only; the scalar bcast_in times north_in[j]
//            is accumulated in every lane.
//   M_SIMDE  element-wise SIMD: row 0 computes north_in[j] (*|+) weight[j].
//   M_RADT   routable adder tree: row 0 multiplies north_in[j] by its weight
//            (lanes with radt_mask[j]=0 give 0); row l (1..log2 CS) holds
//            tree level l: the node at lane j (j a multiple of 2^l) adds the
//            lane j+2^(l-1) partner when its join bit radt_join[(l-1)*CS+j] is
//            set, otherwise every lane passes. out_root marks the lanes that
//            carry a finished sum; other lanes read 0. A 4-1 tree is
//            mask=1111 with every join set, 3-1 is mask=0111, 2x(2-1) is mask=1111
//            with only the level-1 joins set.
// The four modes and their panels follow the architecture figure; the tree
// encoding, the weight register as second operand in SIMDE/RADT and the drain
// order are this implementation's choices.
//
// Timing: out is taken from the bottom row for WS, OS and RADT (latency RS
// rows of registers) and from row 0 for SIMD1/SIMDE (one register). CTL_HOLD
// freezes the array; CTL_CLR clears all partial sums. Requires RS > log2(CS).
module rift_mse
  import rift_pkg::*;
#(
  parameter int RS = 4,
  parameter int CS = 4,
  localparam int LV = (CS > 1) ? $clog2(CS) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mode_e    mode,
  input  mse_ctl_e ctl,
  input  logic     elt_mul,
  input  logic [CS-1:0]    radt_mask,
  input  logic [LV*CS-1:0] radt_join,
  input  data_t    west_in  [RS],
  input  data_t    north_in [CS],
  input  data_t    bcast_in,
  output acc_t     out      [CS],
  output logic [CS-1:0] out_root
);
  pe_op_e op   [RS][CS];
  data_t  a_in [RS][CS];
  data_t  b_in [RS][CS];
  acc_t   p_in [RS][CS];
  acc_t   s_in [RS][CS];
  data_t  a_o  [RS][CS];
  data_t  b_o  [RS][CS];
  data_t  w_o  [RS][CS];
  acc_t   p_o  [RS][CS];

  // Lanes that remain tree roots after all joins.
  always_comb begin
    logic [CS-1:0] alive;
    alive = '1;
    for (int l = 1; l <= LV; l++)
      for (int j = 0; j < CS; j += (1 << l))
        if (radt_join[(l-1)*CS + j] && (j + (1 << (l-1)) < CS))
          alive[j + (1 << (l-1))] = 1'b0;
    out_root = alive;
  end

  for (genvar r = 0; r < RS; r++) begin : g_row
    for (genvar j = 0; j < CS; j++) begin : g_col
      localparam int PART = (r >= 1 && r <= LV) ? j + (1 << (r-1)) : CS;
      localparam bit NODE = (r >= 1 && r <= LV) && (j % (1 << r) == 0) && (PART < CS);

      always_comb begin
        // operand routing
        a_in[r][j] = (j == 0) ? west_in[r] : a_o[r][j-1];
        b_in[r][j] = (r == 0) ? north_in[j] : b_o[r-1][j];
        p_in[r][j] = (r == 0) ? acc_t'(0) : p_o[r-1][j];
        s_in[r][j] = '0;
        if (NODE) s_in[r][j] = p_o[r-1][PART];
        unique case (mode)
          M_LOADW: if (r > 0) b_in[r][j] = w_o[r-1][j];
          M_SIMD1: a_in[r][j] = bcast_in;
          M_SIMDE, M_RADT: a_in[r][j] = north_in[j];
          default: ;
        endcase
        // opcode
        op[r][j] = PE_HOLD;
        unique case (ctl)
          CTL_CLR:   op[r][j] = PE_CLR;
          CTL_DRAIN: op[r][j] = PE_PASS;
          CTL_RUN: begin
            unique case (mode)
              M_LOADW: op[r][j] = PE_LDW;
              M_WS:    op[r][j] = PE_MACW;
              M_OS:    op[r][j] = PE_MACC;
              M_SIMD1: op[r][j] = (r == 0) ? PE_MACC : PE_HOLD;
              M_SIMDE: op[r][j] = (r == 0) ? (elt_mul ? PE_MULW : PE_ADDW) : PE_HOLD;
              M_RADT: begin
                if (r == 0)
                  op[r][j] = radt_mask[j] ? PE_MULW : PE_CLR;
                else if (NODE && radt_join[(r-1)*CS + j])
                  op[r][j] = PE_ADD;
                else
                  op[r][j] = PE_PASS;
              end
              default: op[r][j] = PE_HOLD;
            endcase
          end
          default: op[r][j] = PE_HOLD;
        endcase
      end

      rift_pe u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .op       (op[r][j]),
        .west_in  (a_in[r][j]),
        .north_in (b_in[r][j]),
        .psum_in  (p_in[r][j]),
        .side_in  (s_in[r][j]),
        .east_out (a_o[r][j]),
        .south_out(b_o[r][j]),
        .w_out    (w_o[r][j]),
        .psum_out (p_o[r][j])
      );
    end
  end

  always_comb begin
    for (int j = 0; j < CS; j++) begin
      unique case (mode)
        M_SIMD1, M_SIMDE: out[j] = p_o[0][j];
        M_RADT:           out[j] = out_root[j] ? p_o[RS-1][j] : acc_t'(0);
        default:          out[j] = p_o[RS-1][j];
      endcase
    end
  end

endmodule

// rift_pkg: types and constants shared by the RIFT accelerator RTL.
//
// Data are int8 operands accumulated in 32-bit partial sums. The mode ID,
// per-PE operation codes and the block descriptor (the "instruction" one
// reconfigurable processing unit, RPU, executes) are defined here. The
// descriptor layout, the opcodes and the approximations selected by act_e are
// choices of this implementation; the set of engine modes (weight/output
// stationary systolic, 1 x C_S SIMD, element-wise SIMD, routable adder tree)
// follows the architecture.
package rift_pkg;

  typedef logic signed [7:0]  data_t;
  typedef logic signed [31:0] acc_t;

  // Operation of one processing element in one cycle.
  typedef enum logic [3:0] {
    PE_HOLD = 4'd0,  // keep all state
    PE_CLR  = 4'd1,  // clear the partial-sum register
    PE_LDW  = 4'd2,  // load the local weight register from the north input
    PE_MACW = 4'd3,  // weight stationary: psum_out = psum_in + west * weight
    PE_MACC = 4'd4,  // output stationary: acc += west * north
    PE_ADD  = 4'd5,  // adder-tree node: psum_out = psum_in + side_in
    PE_PASS = 4'd6,  // psum_out = psum_in (tree bypass, output drain)
    PE_MULW = 4'd7,  // element-wise: psum_out = west * weight
    PE_ADDW = 4'd8   // element-wise: psum_out = west + weight
  } pe_op_e;

  // Mode ID of a block: what the RPU does while executing it.
  typedef enum logic [3:0] {
    M_NOP   = 4'd0,
    M_LOADW = 4'd1,  // shift rows of the top buffer into the PE weight registers
    M_WS    = 4'd2,  // weight-stationary systolic DDMM
    M_OS    = 4'd3,  // output-stationary systolic DDMM
    M_SIMD1 = 4'd4,  // 1 x C_S SIMD: scalar broadcast times a row, accumulated
    M_SIMDE = 4'd5,  // element-wise SIMD (bias, scale)
    M_RADT  = 4'd6,  // routable adder tree reduction
    M_POST  = 4'd7,  // norm + nonlinear function, centre buffer -> bottom buffer
    M_RECV  = 4'd8   // pop rows from the upstream inter-RPU buffer
  } mode_e;

  // Control of the whole PE array for one cycle.
  typedef enum logic [1:0] {
    CTL_HOLD  = 2'd0,
    CTL_CLR   = 2'd1,
    CTL_RUN   = 2'd2,
    CTL_DRAIN = 2'd3
  } mse_ctl_e;

  typedef enum logic [2:0] {
    A_PASS = 3'd0, A_RELU = 3'd1, A_GELU = 3'd2, A_ELU = 3'd3, A_SOFTMAX = 3'd4
  } act_e;

  typedef enum logic [1:0] {
    N_NONE = 2'd0, N_BATCH = 2'd1, N_LAYER = 2'd2
  } norm_e;

  // Block descriptor. 128 bits, written by the host as four 32-bit words.
  typedef struct packed {
    logic [7:0]  tag;      // block number, returned on completion
    mode_e       mode;
    logic [15:0] len;      // loop bound: number of rows issued
    logic [15:0] src;      // first source address
    logic [15:0] dst;      // first destination address
    logic        use_sqb;  // take read addresses from the sparse queue buffer
    logic        topk_en;  // stream results through the top-k unit
    logic        fwd;      // POST: also push rows to the downstream RPU
    logic        tbank;    // top-buffer bank (double buffering)
    logic [7:0]  k;        // number of indices kept by top-k
    logic        elt_mul;  // SIMDE: 1 = multiply, 0 = add
    act_e        act;
    norm_e       norm;
    logic [4:0]  shift;    // POST: arithmetic right shift before int8 saturation
    logic        to_left;  // RECV: write the left buffer instead of the top buffer
    logic        len_sqb;  // fuzzy-layer template: loop bound = indices in the SQB
    logic [10:0] rsvd;
    logic [31:0] aux;      // RADT: lane mask and join bits; POST: scale/bias
  } instr_t;

  localparam int INSTR_W = $bits(instr_t);

  // Host address map, fields of the 32-bit address.
  localparam logic [3:0] HOST_UNIT_CTRL = 4'hF;  // addr[31:28] = RPU number or this
  localparam logic [3:0] REG_TOP    = 4'd0;      // addr[27:24] region inside an RPU
  localparam logic [3:0] REG_LEFT   = 4'd1;
  localparam logic [3:0] REG_CENTER = 4'd2;
  localparam logic [3:0] REG_BOTTOM = 4'd3;
  localparam logic [3:0] REG_SQB    = 4'd4;      // word 0: clear, word 1: push

  // A top-k candidate: a score and the token index it belongs to.
  typedef struct packed {
    logic        valid;
    acc_t        score;
    logic [15:0] idx;
  } cand_t;

  // Ordering used by the top-k unit: valid before invalid, higher score
  // first, lower token index first on equal scores.
  function automatic logic cand_before(input cand_t a, input cand_t b);
    if (a.valid != b.valid) return a.valid;
    if (a.score != b.score) return a.score > b.score;
    return a.idx < b.idx;
  endfunction

  // One host access, already routed to one RPU (see rift_host_if).
  typedef struct packed {
    logic        we;      // write one lane of one word
    logic        re;      // read one lane of one word (data next cycle)
    logic [3:0]  region;  // REG_TOP, REG_LEFT, REG_CENTER, REG_BOTTOM
    logic [3:0]  lane;
    logic [15:0] addr;
    logic [31:0] wdata;
  } hreq_t;

  // Saturate a 32-bit value to int8.
  function automatic data_t sat8(input acc_t v);
    if (v > 127)       return data_t'(127);
    else if (v < -128) return data_t'(-128);
    else               return data_t'(v);
  endfunction

endpackage

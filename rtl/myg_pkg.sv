// myg_pkg: types and constants shared by the blocks of the myg circuit.
//
// The myg circuit evaluates (x, y) = myg(a, b, c) with
//   p = a*b, q = c+1, r = p*q, s = b+c, t = p-s, x = r+t, y = r*t
// on one multiplier and one add/sub/increment unit, scheduled over the four
// control steps (c-steps) 0..3 and four registers r1..r4.
// This package holds the schedule length, the operation code of the
// multi-purpose unit, the select codes of the multiplexers in front of
// (operand_mux) and behind (register_mux) the functional unit, and the
// control word that the control decoder produces for every c-step.
// The encodings are this design's own choice.
package myg_pkg;

  // Last c-step of one evaluation: c-steps are numbered 0..MYG_N_CSTEPS.
  localparam int unsigned MYG_N_CSTEPS = 3;
  // Number of registers after register allocation.
  localparam int unsigned MYG_NUM_REGS = 4;
  // Width of the c-step number.
  localparam int unsigned CSTEP_W  = $clog2(MYG_N_CSTEPS + 1);

  typedef logic [CSTEP_W-1:0] cstep_t;

  // Control input of the multi-purpose unit.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_INC = 2'd2
  } mp_op_t;

  // Source of one functional-unit operand (left multiplexers).
  typedef enum logic [2:0] {
    SRC_R1   = 3'd0,
    SRC_R2   = 3'd1,
    SRC_R3   = 3'd2,
    SRC_R4   = 3'd3,
    SRC_IN_A = 3'd4,
    SRC_IN_B = 3'd5,
    SRC_IN_C = 3'd6
  } opnd_src_t;

  // Source of the next value of one register (right multiplexers).
  typedef enum logic [2:0] {
    RSRC_HOLD = 3'd0,
    RSRC_IN_A = 3'd1,
    RSRC_IN_B = 3'd2,
    RSRC_IN_C = 3'd3,
    RSRC_MUL  = 3'd4,
    RSRC_MP   = 3'd5
  } reg_src_t;

  // Control word of one c-step.
  typedef struct packed {
    opnd_src_t                mul_a;    // multiplier operand a
    opnd_src_t                mul_b;    // multiplier operand b
    opnd_src_t                mp_d;     // multi-purpose operand d
    opnd_src_t                mp_e;     // multi-purpose operand e
    mp_op_t                   mp_op;    // multi-purpose operation
    reg_src_t [MYG_NUM_REGS-1:0]  reg_src;  // next-value source of r1..r4 (index 0 = r1)
    logic                     out_valid;// (x, y) on the FU outputs is the result
  } ctrl_word_t;

endpackage

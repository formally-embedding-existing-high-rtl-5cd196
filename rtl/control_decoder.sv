// control_decoder: control word of each c-step of the myg circuit.
//
// Holds the result of scheduling, register binding and functional-unit
// binding for myg as a combinational table indexed by the c-step:
//
//   c-step | multiplier  | multi-purpose     | r1   r2   r3   r4   | output
//   -------+-------------+-------------------+---------------------+-------
//     0    | (unused)    | s = b + c   (in)  | a    b    s    c    |
//     1    | p = r1*r2   | q = r4 + 1        | p    q    hold hold |
//     2    | r = r1*r2   | t = r1 - r3       | r    t    hold hold |
//     3    | y = r1*r2   | x = r1 + r2       | hold hold hold hold | (x, y)
//
// After c-step 0 the registers hold (a, b, s, c), after c-step 1 (p, q, s, -)
// and after c-step 2 (r, t, -, -). Operands the schedule leaves unused are
// fed from a register, and registers whose contents no longer matter keep
// their value; both are this design's choice for the don't-care entries.
// The packed encoding of the control word is this design's own.
// With this binding the multiplier always reads r1 and r2, so its two
// select fields are constant. Purely combinational; the table is fixed to
// the four-step schedule.
module control_decoder
  import myg_pkg::*;
(
  input  cstep_t     cstep,
  output ctrl_word_t ctrl
);

  always_comb begin
    // Defaults: multiplier on r1*r2, nothing written, no output.
    ctrl.mul_a     = SRC_R1;
    ctrl.mul_b     = SRC_R2;
    ctrl.mp_d      = SRC_R1;
    ctrl.mp_e      = SRC_R2;
    ctrl.mp_op     = OP_ADD;
    ctrl.reg_src   = {MYG_NUM_REGS{RSRC_HOLD}};
    ctrl.out_valid = 1'b0;
    unique case (cstep)
      cstep_t'(0): begin  // s = b + c; load a, b, c
        ctrl.mp_d       = SRC_IN_B;
        ctrl.mp_e       = SRC_IN_C;
        ctrl.mp_op      = OP_ADD;
        ctrl.reg_src[0] = RSRC_IN_A;
        ctrl.reg_src[1] = RSRC_IN_B;
        ctrl.reg_src[2] = RSRC_MP;
        ctrl.reg_src[3] = RSRC_IN_C;
      end
      cstep_t'(1): begin  // p = a * b; q = inc(c)
        ctrl.mp_d       = SRC_R4;
        ctrl.mp_e       = SRC_R4;
        ctrl.mp_op      = OP_INC;
        ctrl.reg_src[0] = RSRC_MUL;
        ctrl.reg_src[1] = RSRC_MP;
      end
      cstep_t'(2): begin  // r = p * q; t = p - s
        ctrl.mp_d       = SRC_R1;
        ctrl.mp_e       = SRC_R3;
        ctrl.mp_op      = OP_SUB;
        ctrl.reg_src[0] = RSRC_MUL;
        ctrl.reg_src[1] = RSRC_MP;
      end
      default: begin      // c-step 3: x = r + t; y = r * t
        ctrl.mp_d       = SRC_R1;
        ctrl.mp_e       = SRC_R2;
        ctrl.mp_op      = OP_ADD;
        ctrl.out_valid  = 1'b1;
      end
    endcase
  end

endmodule
